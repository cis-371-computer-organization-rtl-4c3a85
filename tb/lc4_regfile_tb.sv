// lc4_regfile_tb: random reads and writes against an array model.
// Checks both read ports combinationally before each edge (so a read of the
// register being written still shows the old value), writes only with we
// and gwe, and the clear on reset.
module lc4_regfile_tb;
  logic clk = 0, rst = 1, gwe, we;
  logic [2:0] r1sel, r2sel, wsel;
  logic [15:0] r1data, r2data, wdata;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  lc4_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string w, logic [15:0] g, logic [15:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s: %h vs %h", w, g, e); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gwe = 1; we = 0; wsel = 0; wdata = 0; r1sel = 0; r2sel = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = 16'd0;
    for (int i = 0; i < 8; i++) begin
      r1sel = 3'(i); #1; chk("reset value", r1data, 16'd0);
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0; gwe = $urandom_range(0, 3) != 0;
      wsel = 3'($urandom); wdata = 16'($urandom);
      r1sel = ($urandom_range(0, 3) == 0) ? wsel : 3'($urandom);
      r2sel = 3'($urandom);
      #1;
      chk("r1data", r1data, model[r1sel]);
      chk("r2data", r2data, model[r2sel]);
      @(posedge clk);
      if (we && gwe) model[wsel] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
