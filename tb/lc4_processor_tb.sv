// lc4_processor_tb: random-program test of the single-cycle LC4 processor.
//
// The whole 64K-word memory is filled with random well-formed instructions,
// so wherever jumps, traps and returns lead, the processor executes random
// code and loads/stores touch random addresses (code included). The memory
// here is combinational (read in the same cycle), and gwe is high on a
// random 3 of 4 clock edges, so the test also checks that nothing changes on
// an edge without gwe. On every gwe edge the test_* outputs are compared
// with the reference model's record of the same instruction; when gwe is
// low the PC must hold. Counts of each instruction class and of taken
// branches, loads and stores are printed, and any class never executed
// counts as a failure. Random code can loop, so every 50 instructions the
// words just ahead of the PC are replaced with fresh random code in both the
// memory and the model.
module lc4_processor_tb;
  import lc4_ref_pkg::*;

  localparam int NINSN = 30000;

  logic clk = 0, rst = 1, gwe = 0;
  logic [15:0] imem_addr, imem_out, dmem_addr, dmem_out, dmem_in;
  logic dmem_we;
  logic [1:0]  test_stall;
  logic [15:0] test_pc, test_insn, test_regfile_in, test_dmem_addr, test_dmem_value;
  logic test_regfile_we, test_nzp_we, test_dmem_we;
  logic [2:0] test_regfile_reg, test_nzp_in;
  logic [7:0] switch_data, led_data;
  logic [15:0] seven_segment_data;

  logic [15:0] mem [65536];
  assign imem_out = mem[imem_addr];
  assign dmem_out = mem[dmem_addr];

  lc4_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_op [16];
  int cnt_taken = 0, cnt_hold = 0;
  lc4_ref ref_m;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (pc %h insn %h)", what, got, exp, test_pc, test_insn);
    end
  endtask

  initial begin : watchdog
    repeat (NINSN * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trace_t e;
    logic [15:0] held_pc;
    int n;
    ref_m = new(0);
    foreach (mem[a]) begin
      mem[a] = rand_insn();
      ref_m.mem[a] = mem[a];
    end
    foreach (cnt_op[k]) cnt_op[k] = 0;
    switch_data = 8'd0;
    gwe = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    check("reset pc", test_pc, 16'h8200);
    check("test_stall", {14'd0, test_stall}, 16'd0);
    n = 0;
    while (n < NINSN) begin
      // Random code can fall into short loops: every 50 instructions,
      // rewrite the code just ahead of the PC (in both copies).
      if (n % 50 == 49 && gwe) begin
        for (int k = 0; k < 8; k++) begin
          mem[16'(ref_m.pc + 16'(k))] = rand_insn();
          ref_m.mem[16'(ref_m.pc + 16'(k))] = mem[16'(ref_m.pc + 16'(k))];
        end
      end
      gwe = ($urandom_range(0, 3) != 0);
      // Board debug outputs.
      switch_data = 8'($urandom_range(0, 5));
      #1;
      case (switch_data)
        0: check("7seg pc", seven_segment_data, test_pc);
        1: check("7seg insn", seven_segment_data, imem_out);
        2: check("7seg daddr", seven_segment_data, dmem_addr);
        3: check("7seg dout", seven_segment_data, dmem_out);
        4: check("7seg din", seven_segment_data, dmem_in);
        default: check("7seg dead", seven_segment_data, 16'hDEAD);
      endcase
      check("leds", {8'd0, led_data}, {8'd0, switch_data});
      if (!gwe) begin
        held_pc = test_pc;
        @(posedge clk); #1;
        check("pc held without gwe", test_pc, held_pc);
        cnt_hold++;
      end else begin
      e = ref_m.step();
      check("pc", test_pc, e.pc);
      check("insn", test_insn, e.insn);
      check("regfile_we", {15'd0, test_regfile_we}, {15'd0, e.rf_we});
      if (e.rf_we) begin
        check("regfile_reg", {13'd0, test_regfile_reg}, {13'd0, e.rf_reg});
        check("regfile_in", test_regfile_in, e.rf_in);
      end
      check("nzp_we", {15'd0, test_nzp_we}, {15'd0, e.nzp_we});
      if (e.nzp_we) check("nzp_in", {13'd0, test_nzp_in}, {13'd0, e.nzp_in});
      check("dmem_we", {15'd0, test_dmem_we}, {15'd0, e.dm_we});
      check("dmem_addr", test_dmem_addr, e.dm_addr);
      check("dmem_value", test_dmem_value, e.dm_value);
      if (e.dm_we) mem[e.dm_addr] = e.dm_value;  // memory write at this edge
      cnt_op[e.insn[15:12]]++;
      if (e.taken) cnt_taken++;
      @(posedge clk);
      n++;
      end
      @(negedge clk);
    end
    foreach (cnt_op[k])
      if (k inside {0,1,2,4,5,6,7,8,9,10,12,13,15}) begin
        checks++;
        if (cnt_op[k] == 0) begin failures++; $display("opcode %h never executed", k); end
      end
    checks++; if (cnt_taken == 0) begin failures++; $display("no redirect"); end
    checks++; if (cnt_hold == 0)  begin failures++; $display("no gwe-low cycle"); end
    $display("executed: BR %0d ARITH %0d CMP %0d JSR %0d LOGIC %0d LDR %0d STR %0d RTI %0d CONST %0d SHIFT %0d JMP %0d HICONST %0d TRAP %0d undefined %0d; redirects %0d, gwe-low cycles %0d",
      cnt_op[0], cnt_op[1], cnt_op[2], cnt_op[4], cnt_op[5], cnt_op[6], cnt_op[7], cnt_op[8], cnt_op[9], cnt_op[10], cnt_op[12], cnt_op[13], cnt_op[15], cnt_op[3]+cnt_op[11]+cnt_op[14], cnt_taken, cnt_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
