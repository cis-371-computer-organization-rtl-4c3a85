// lc4_decoder: control unit of the LC4 single-cycle datapath.
//
// Combinational. Turns the fetched instruction into the control word
// lc4_pkg::ctrl_t that drives the datapath's muxes and write enables (the
// dotted control inputs of the datapath diagram):
//   r1sel   insn[8:6] (Rs) normally; insn[11:9] for CMP* and HICONST, which
//           read Rd/Rs from that field; R7 for RTI.
//   r2sel   insn[2:0] (Rt) normally; insn[11:9] for STR (the value stored).
//   wsel    insn[11:9] normally; R7 for JSR, JSRR and TRAP (return address).
//   result  PC+1 for JSR, JSRR, TRAP (written to R7), ALU output otherwise.
//   write-back from data memory for LDR.
// Register writes: arithmetic, logic, shifts, LDR, CONST, HICONST, JSR(R),
// TRAP. NZP writes: the same plus CMP*. Stores: STR. BR, JMP(R), RTI and the
// undefined opcodes (0011, 1011, 1110) write nothing; undefined opcodes thus
// behave as no-ops, which is this design's choice. The mux structure is the
// diagram's; which instruction uses which input follows the LC4 instruction
// set.
module lc4_decoder
  import lc4_pkg::*;
(
  input  logic [15:0] insn,
  output ctrl_t       ctrl
);

  opcode_e op;
  assign op = opcode_e'(insn[15:12]);

  always_comb begin
    ctrl = '{r1sel: R1_RS, r2sel: R2_RT, default: '0};
    unique case (op)
      OP_ARITH, OP_LOGIC, OP_SHIFT, OP_CONST: begin
        ctrl.regfile_we = 1'b1;
        ctrl.nzp_we     = 1'b1;
      end
      OP_CMP: begin
        ctrl.r1sel  = R1_RD;
        ctrl.nzp_we = 1'b1;
      end
      OP_HICONST: begin
        ctrl.r1sel      = R1_RD;
        ctrl.regfile_we = 1'b1;
        ctrl.nzp_we     = 1'b1;
      end
      OP_LDR: begin
        ctrl.is_load    = 1'b1;
        ctrl.regfile_we = 1'b1;
        ctrl.nzp_we     = 1'b1;
      end
      OP_STR: begin
        ctrl.r2sel    = R2_RD;
        ctrl.is_store = 1'b1;
      end
      OP_JSR, OP_TRAP: begin
        ctrl.wsel_r7    = 1'b1;
        ctrl.sel_pc_inc = 1'b1;
        ctrl.regfile_we = 1'b1;
        ctrl.nzp_we     = 1'b1;
      end
      OP_RTI: ctrl.r1sel = R1_R7;
      default: ;
    endcase
  end

endmodule
