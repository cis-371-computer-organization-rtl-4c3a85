// lc4_branch_logic: next-PC select of the LC4 single-cycle datapath.
//
// Combinational. Looks at the instruction and the NZP register and says
// whether the next PC is the ALU's output (a redirect) or PC+1:
//   BR   taken when insn[11:9] (the n,z,p test bits) shares a set bit with
//        the NZP register; BR with no test bit is the no-op.
//   JSR, JSRR, JMP, JMPR, TRAP, RTI always redirect.
// The block and its inputs (instruction, NZP register) are the datapath
// diagram's; the branch rules are those of the LC4 instruction set.
module lc4_branch_logic
  import lc4_pkg::*;
(
  input  logic [15:0] insn,
  input  logic [2:0]  nzp,
  output logic        take_alu
);

  opcode_e op;
  assign op = opcode_e'(insn[15:12]);

  always_comb begin
    unique case (op)
      OP_BR:                           take_alu = |(insn[11:9] & nzp);
      OP_JSR, OP_JMP, OP_TRAP, OP_RTI: take_alu = 1'b1;
      default:                         take_alu = 1'b0;
    endcase
  end

endmodule
