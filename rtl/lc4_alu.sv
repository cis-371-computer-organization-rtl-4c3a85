// lc4_alu: the single arithmetic unit of the LC4 single-cycle datapath.
//
// Combinational. From the instruction, the current PC and the two register
// operands it produces the one value each instruction needs:
//   ADD/SUB/MUL/DIV/ADDI, AND/NOT/OR/XOR/ANDI, SLL/SRA/SRL/MOD -> result
//   CMP/CMPU/CMPI/CMPIU  -> -1, 0 or +1 (signed or unsigned compare of Rs
//                            with Rt or the immediate; only sets NZP)
//   LDR/STR              -> Rs + sext(imm6), the data address
//   CONST                -> sext(imm9);  HICONST -> (Rd & 0x00FF) | imm8<<8
//   BR, JMP imm          -> PC + 1 + sext(imm9 / imm11), the branch target
//   JSR imm              -> (PC & 0x8000) | imm11<<4;  JSRR, JMPR -> Rs
//   TRAP                 -> 0x8000 | imm8;  RTI -> R7 (read on port 1)
// Sharing one unit for data results and branch targets is what the
// datapath diagram shows (a single ALU fed by the instruction, the PC and
// both register ports, its output going both to memory/write-back and to the
// next-PC mux). The operation list is the LC4 instruction set. DIV and MOD
// are unsigned, and divide or modulo by zero gives 0: this design's choice.
// Undefined opcodes give 0.
module lc4_alu
  import lc4_pkg::*;
(
  input  logic [15:0] insn,
  input  logic [15:0] pc,
  input  logic [15:0] r1data,
  input  logic [15:0] r2data,
  output logic [15:0] out
);

  opcode_e     op;
  logic [15:0] imm5, imm6, imm7s, imm7u, imm9, imm11, pc_inc;
  logic [3:0]  shamt;
  logic signed [16:0] cmp_a, cmp_b;

  assign op     = opcode_e'(insn[15:12]);
  assign imm5   = {{11{insn[4]}},  insn[4:0]};
  assign imm6   = {{10{insn[5]}},  insn[5:0]};
  assign imm7s  = {{9{insn[6]}},   insn[6:0]};
  assign imm7u  = {9'd0,           insn[6:0]};
  assign imm9   = {{7{insn[8]}},   insn[8:0]};
  assign imm11  = {{5{insn[10]}},  insn[10:0]};
  assign shamt  = insn[3:0];
  assign pc_inc = pc + 16'd1;

  // Compare operands extended to 17 bits: sign extension for the signed
  // forms (insn[7] = 0), zero extension for the unsigned ones.
  always_comb begin
    logic [15:0] b;
    b     = insn[8] ? (insn[7] ? imm7u : imm7s) : r2data;
    cmp_a = insn[7] ? {1'b0, r1data} : {r1data[15], r1data};
    cmp_b = insn[7] ? {1'b0, b}      : {b[15], b};
  end

  always_comb begin
    out = 16'd0;
    unique case (op)
      OP_BR:      out = pc_inc + imm9;
      OP_ARITH:
        if (insn[5]) out = r1data + imm5;
        else begin
          unique case (insn[4:3])
            2'b00: out = r1data + r2data;
            2'b01: out = r1data * r2data;
            2'b10: out = r1data - r2data;
            2'b11: out = (r2data == 16'd0) ? 16'd0 : r1data / r2data;
          endcase
        end
      OP_CMP:
        if (cmp_a < cmp_b)       out = 16'hFFFF;
        else if (cmp_a == cmp_b) out = 16'd0;
        else                     out = 16'd1;
      OP_JSR:     out = insn[11] ? ((pc & 16'h8000) | {1'b0, insn[10:0], 4'b0000}) : r1data;
      OP_LOGIC:
        if (insn[5]) out = r1data & imm5;
        else begin
          unique case (insn[4:3])
            2'b00: out = r1data & r2data;
            2'b01: out = ~r1data;
            2'b10: out = r1data | r2data;
            2'b11: out = r1data ^ r2data;
          endcase
        end
      OP_LDR, OP_STR: out = r1data + imm6;
      OP_RTI:     out = r1data;
      OP_CONST:   out = imm9;
      OP_SHIFT:
        unique case (insn[5:4])
          2'b00: out = r1data << shamt;
          2'b01: out = 16'($signed(r1data) >>> shamt);
          2'b10: out = r1data >> shamt;
          2'b11: out = (r2data == 16'd0) ? 16'd0 : r1data % r2data;
        endcase
      OP_JMP:     out = insn[11] ? (pc_inc + imm11) : r1data;
      OP_HICONST: out = {insn[7:0], r1data[7:0]};
      OP_TRAP:    out = TRAP_BASE | {8'd0, insn[7:0]};
      default:    out = 16'd0;
    endcase
  end

endmodule
