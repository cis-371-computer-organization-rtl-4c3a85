// lc4_branch_logic_tb: all 16 opcodes x all test-bit and NZP combinations,
// against the LC4 branch rules: BR redirects when a test bit matches the
// NZP code, JSR(R)/JMP(R)/TRAP/RTI always, everything else never.
module lc4_branch_logic_tb;
  logic [15:0] insn;
  logic [2:0]  nzp;
  logic        take_alu, exp;
  int checks = 0, failures = 0, taken_br = 0, untaken_br = 0;
  lc4_branch_logic dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++)
      for (int t = 0; t < 8; t++)
        for (int c = 0; c < 8; c++)
          repeat (4) begin
            insn = {4'(op), 3'(t), 9'($urandom)};
            nzp = 3'(c);
            #1;
            case (op)
              0: begin
                exp = ((t & c) != 0);
                if (exp) taken_br++; else untaken_br++;
              end
              4, 8, 12, 15: exp = 1;
              default: exp = 0;
            endcase
            checks++;
            if (take_alu !== exp) begin
              failures++;
              if (failures < 10) $display("FAIL insn %h nzp %b: %b", insn, nzp, take_alu);
            end
          end
    checks++; if (taken_br == 0 || untaken_br == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
