// mips_ctrl_tb: checks the five control outputs of the MIPS-style example
// decoder for add, addi, lw, sw and other instructions, against a truth
// table written per instruction (not the gate equations).
module mips_ctrl_tb;
  logic [31:0] insn;
  logic alu_in_b, rwe, rwd, rdst, dm_we;
  int checks = 0, failures = 0;
  int seen [5];
  mips_ctrl dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp;  // {ALUinB, Rwe, Rwd, Rdst, DMwe}
    int kind;
    foreach (seen[k]) seen[k] = 0;
    for (int i = 0; i < 5000; i++) begin
      insn = $urandom;
      kind = $urandom_range(0, 4);
      case (kind)
        0: begin insn[31:26] = 6'h00; insn[5:0] = 6'h20; end  // add
        1: insn[31:26] = 6'h0F;                               // addi
        2: insn[31:26] = 6'h23;                               // lw
        3: insn[31:26] = 6'h2A;                               // sw
        default: ;
      endcase
      #1;
      if (insn[31:26] == 6'h00 && insn[5:0] == 6'h20) begin exp = 5'b01000; kind = 0; end
      else if (insn[31:26] == 6'h0F) begin exp = 5'b11010; kind = 1; end
      else if (insn[31:26] == 6'h23) begin exp = 5'b11110; kind = 2; end
      else if (insn[31:26] == 6'h2A) begin exp = 5'b10011; kind = 3; end
      else begin exp = 5'b00010; kind = 4; end
      seen[kind]++;
      checks++;
      if ({alu_in_b, rwe, rwd, rdst, dm_we} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL insn %h: %b expected %b", insn, {alu_in_b, rwe, rwd, rdst, dm_we}, exp);
      end
    end
    foreach (seen[k]) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
