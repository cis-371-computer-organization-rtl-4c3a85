// mips_ctrl: control decoder of a four-instruction MIPS-like machine.
//
// Combinational example of "control as logic": the 6-bit opcode
// (insn[31:26]) and function field (insn[5:0]) are matched against add
// (opcode 0x00, func 0x20), addi (0x0F), lw (0x23) and sw (0x2A), and the
// datapath controls are OR/NOT combinations of those matches:
//   ALUinB = addi | lw | sw   (ALU's second operand is the immediate)
//   Rwe    = add | addi | lw  (register file write enable)
//   Rwd    = lw               (write-back takes memory data)
//   Rdst   = ~add             (destination is the rt field, not rd)
//   DMwe   = sw               (data memory write enable)
// These equations and encodings are the lecture example's; the module
// boundary and port names are this design's.
module mips_ctrl (
  input  logic [31:0] insn,
  output logic        alu_in_b,
  output logic        rwe,
  output logic        rwd,
  output logic        rdst,
  output logic        dm_we
);

  logic [5:0] opcode, func;
  logic       is_add, is_addi, is_lw, is_sw;

  assign opcode  = insn[31:26];
  assign func    = insn[5:0];
  assign is_add  = (opcode == 6'h00) && (func == 6'h20);
  assign is_addi = (opcode == 6'h0F);
  assign is_lw   = (opcode == 6'h23);
  assign is_sw   = (opcode == 6'h2A);

  assign alu_in_b = is_addi | is_lw | is_sw;
  assign rwe      = is_add | is_addi | is_lw;
  assign rwd      = is_lw;
  assign rdst     = ~is_add;
  assign dm_we    = is_sw;

endmodule
