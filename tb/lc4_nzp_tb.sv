// lc4_nzp_tb: exhaustive check of the condition-code function over all
// 65536 values (n for bit 15 set, z for zero, p otherwise).
module lc4_nzp_tb;
  logic [15:0] value;
  logic [2:0]  nzp, exp;
  int checks = 0, failures = 0;
  lc4_nzp dut (.*);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 65536; v++) begin
      value = 16'(v);
      #1;
      exp = (v == 0) ? 3'b010 : (v >= 32768) ? 3'b100 : 3'b001;
      checks++;
      if (nzp !== exp) begin failures++; if (failures < 10) $display("FAIL %h -> %b", value, nzp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
