// lc4_clkgen_tb: checks the little-clock sequence of the big-clock
// generator. With run high, fetch_en, load_en and gwe must be high exactly
// on the 1st, 3rd and 4th little cycle of every 4-cycle big cycle (so gwe
// has period 4 and fetch follows gwe by one clock, load by three). With run
// low, nothing may be raised until a step pulse, which must produce exactly
// one fetch, one load and one gwe, in that order.
module lc4_clkgen_tb;
  logic clk = 0, rst = 1, run = 0, step = 0;
  logic gwe, fetch_en, load_en;
  logic [1:0] phase;
  int checks = 0, failures = 0, n_gwe = 0, n_steps = 0;

  lc4_clkgen #(.LITTLE_PER_BIG(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string w, logic [2:0] g, logic [2:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s: %b expected %b", w, g, e); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; run = 1;
    // Free-running: expected {fetch, load, gwe} by little cycle 0..3.
    for (int c = 0; c < 400; c++) begin
      #1;
      case (c % 4)
        0: chk("cycle +1 fetch", {fetch_en, load_en, gwe}, 3'b100);
        1: chk("cycle +2 idle",  {fetch_en, load_en, gwe}, 3'b000);
        2: chk("cycle +3 load",  {fetch_en, load_en, gwe}, 3'b010);
        3: begin chk("cycle +4 gwe", {fetch_en, load_en, gwe}, 3'b001); n_gwe++; end
      endcase
      @(negedge clk);
    end
    // Halted and single-stepped.
    run = 0;
    for (int s = 0; s < 20; s++) begin
      int nf, nl, ng;
      bit order_ok;
      repeat (1 + $urandom_range(0, 5)) begin
        #1; chk("halted", {fetch_en, load_en, gwe}, 3'b000);
        @(negedge clk);
      end
      step = 1; @(negedge clk); step = 0;
      nf = 0; nl = 0; ng = 0; order_ok = 1;
      repeat (10) begin
        #1;
        if (fetch_en) nf++;
        if (load_en) begin nl++; if (nf != 1) order_ok = 0; end
        if (gwe) begin ng++; if (nl != 1) order_ok = 0; end
        @(negedge clk);
      end
      chk("one big cycle per step", {nf == 1, nl == 1, ng == 1}, 3'b111);
      checks++; if (!order_ok) failures++;
      n_steps++;
    end
    // Reset in mid-cycle returns to the start of a big cycle.
    run = 1;
    @(negedge clk); @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    #1; chk("after reset", {fetch_en, load_en, gwe}, 3'b100);
    checks++; if (n_gwe == 0 || n_steps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
