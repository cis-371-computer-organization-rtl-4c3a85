// lc4_system_tb: end-to-end test of the LC4 system at its default size.
//
// The 64K-word memory is loaded with a short directed program at the reset
// PC 0x8200 that reads the keyboard, timer and switch registers, writes the
// timer interval, LED and seven-segment registers, reads the timer interval
// back and stores a pixel into the frame buffer; every other word is a random
// well-formed instruction, so execution continues into random code. Each
// instruction is checked at its gwe edge against the reference model
// (test_* outputs), and the test also checks:
//   - with run high, one instruction every 4 clocks (the big/little clock
//     ratio), i.e. gwe exactly 4 clocks apart;
//   - with run low, no gwe and a frozen PC, and exactly one instruction per
//     step pulse;
//   - the video port returns the frame-buffer word one clock after its
//     address, including pixels written by the program;
//   - the memory-mapped LED/seven-segment/timer-interval outputs and the
//     tir_we pulse;
//   - the MIPS-style decoder beside the LC4 system.
// Each of these mechanisms is counted and one that never happened fails.
module lc4_system_tb;
  import lc4_ref_pkg::*;

  localparam int NRUN  = 50000; // instructions with run high
  localparam int NSTEP = 40;    // single-stepped instructions

  logic clk = 0, rst = 1, run = 0, step = 0, gwe;
  logic [7:0]  switch_data, led_data, mmio_leds;
  logic [15:0] seven_segment_data, mmio_sevseg, tir, tsr, kbsr, kbdr, vga_data;
  logic        tir_we;
  logic [13:0] vga_addr;
  logic [1:0]  test_stall;
  logic [15:0] test_pc, test_insn, test_regfile_in, test_dmem_addr, test_dmem_value;
  logic        test_regfile_we, test_nzp_we, test_dmem_we;
  logic [2:0]  test_regfile_reg, test_nzp_in;
  logic [31:0] mips_insn;
  logic        mips_alu_in_b, mips_rwe, mips_rwd, mips_rdst, mips_dm_we;

  lc4_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_insn = 0, n_step_insn = 0, n_idle = 0, n_cpi = 0, n_vga = 0, n_vga_prog = 0;
  int n_tir_pulse = 0, n_loads = 0, n_stores = 0, n_redirect = 0, n_mips = 0;
  lc4_ref ref_m;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %h expected %h (pc %h insn %h)", what, got, exp, test_pc, test_insn);
    end
  endtask

  task automatic count_ok(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat ((NRUN + NSTEP) * 40 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Directed start-up program (LC4 encodings).
  localparam logic [15:0] PROG [13] = '{
    16'h9000,  // CONST   R0, #0
    16'hD1FE,  // HICONST R0, xFE        R0 = xFE00 (device page)
    16'h6200,  // LDR     R1, R0, #0     KBSR
    16'h6402,  // LDR     R2, R0, #2     KBDR
    16'h6608,  // LDR     R3, R0, #8     TSR
    16'h680C,  // LDR     R4, R0, #12    switches
    16'h720A,  // STR     R1, R0, #10    TIR
    16'h740E,  // STR     R2, R0, #14    LEDs
    16'h7610,  // STR     R3, R0, #16    seven-segment
    16'h6A0A,  // LDR     R5, R0, #10    TIR read back
    16'h9C05,  // CONST   R6, #5
    16'hDDC0,  // HICONST R6, xC0        R6 = xC005 (frame buffer)
    16'h7980   // STR     R4, R6, #0     pixel (5,0)
  };

  // One clock; on a gwe edge, check and retire one instruction.
  int since_gwe = 0;
  logic [13:0] vga_prev;
  logic        vga_prev_ok = 0;
  logic        last_store = 0;
  logic [15:0] last_store_addr;
  logic [15:0] held_pc;

  task automatic one_clock();
    trace_t e;
    @(negedge clk);
    // Video port: data of the address presented one clock earlier.
    if (vga_prev_ok && !(last_store && last_store_addr == 16'hC000 + 16'(vga_prev))) begin
      check("vga_data", {16'd0, vga_data}, {16'd0, ref_m.mem[16'hC000 + 16'(vga_prev)]});
      n_vga++;
      if (vga_prev == 14'd5) n_vga_prog++;
    end
    last_store = 0;
    vga_prev   = ($urandom_range(0, 3) == 0) ? 14'd5 : 14'($urandom_range(0, 128 * 120 - 1));
    vga_addr   = vga_prev;
    vga_prev_ok = 1;
    // MIPS-style decoder example.
    begin
      logic [5:0] op, fn;
      logic a, ai, l, s;
      mips_insn = $urandom;
      case ($urandom_range(0, 4))
        0: mips_insn[31:26] = 6'h00;
        1: mips_insn[31:26] = 6'h0F;
        2: mips_insn[31:26] = 6'h23;
        3: mips_insn[31:26] = 6'h2A;
        default: ;
      endcase
      if ($urandom_range(0, 1) == 0) mips_insn[5:0] = 6'h20;
      #1;
      op = mips_insn[31:26]; fn = mips_insn[5:0];
      a = (op == 0) && (fn == 6'h20); ai = (op == 6'h0F); l = (op == 6'h23); s = (op == 6'h2A);
      check("mips controls", {27'd0, mips_alu_in_b, mips_rwe, mips_rwd, mips_rdst, mips_dm_we},
            {27'd0, ai | l | s, a | ai | l, l, !a, s});
      n_mips++;
    end
    since_gwe++;
    if (gwe) begin
      e = ref_m.step();
      check("pc", {16'd0, test_pc}, {16'd0, e.pc});
      check("insn", {16'd0, test_insn}, {16'd0, e.insn});
      check("regfile_we", {31'd0, test_regfile_we}, {31'd0, e.rf_we});
      if (e.rf_we) begin
        check("regfile_reg", {29'd0, test_regfile_reg}, {29'd0, e.rf_reg});
        check("regfile_in", {16'd0, test_regfile_in}, {16'd0, e.rf_in});
      end
      check("nzp_we", {31'd0, test_nzp_we}, {31'd0, e.nzp_we});
      if (e.nzp_we) check("nzp_in", {29'd0, test_nzp_in}, {29'd0, e.nzp_in});
      check("dmem_we", {31'd0, test_dmem_we}, {31'd0, e.dm_we});
      check("dmem_addr", {16'd0, test_dmem_addr}, {16'd0, e.dm_addr});
      check("dmem_value", {16'd0, test_dmem_value}, {16'd0, e.dm_value});
      check("test_stall", {30'd0, test_stall}, 32'd0);
      if (run) begin
        if (n_insn > 0) begin
          check("clocks per instruction", since_gwe, 4);
          n_cpi++;
        end
      end else n_step_insn++;
      if (e.dm_we) begin
        n_stores++;
        last_store = 1;
        last_store_addr = e.dm_addr;
      end
      if (e.insn[15:12] == 4'h6) n_loads++;
      if (e.taken) n_redirect++;
      since_gwe = 0;
      n_insn++;
      @(posedge clk);
      #1;
      // Memory-mapped outputs after the edge.
      check("mmio leds", {24'd0, mmio_leds}, {24'd0, ref_m.leds});
      check("mmio sevseg", {16'd0, mmio_sevseg}, {16'd0, ref_m.sevseg});
      check("tir", {16'd0, tir}, {16'd0, ref_m.tir});
      check("tir_we", {31'd0, tir_we}, {31'd0, e.dm_we && e.dm_addr == 16'hFE0A});
      if (tir_we) n_tir_pulse++;
      // Board debug outputs: LEDs mirror switches, 7-seg shows the PC at 0.
      check("led_data", {24'd0, led_data}, {24'd0, switch_data});
      // New device inputs for the next instruction, and fresh code ahead
      // of the PC now and then (random code can loop).
      kbsr = 16'($urandom); kbdr = 16'($urandom); tsr = 16'($urandom);
      ref_m.kbsr = kbsr; ref_m.kbdr = kbdr; ref_m.tsr = tsr;
      if (n_insn > 20 && n_insn % 50 == 0)
        for (int k = 0; k < 8; k++) begin
          logic [15:0] a, w;
          a = ref_m.pc + 16'(k);
          w = rand_insn();
          ref_m.mem[a] = w;
          dut.u_mem.ram[a] = w;
        end
    end
  endtask

  initial begin
    ref_m = new(1);
    switch_data = 8'h00;
    kbsr = 16'h8000; kbdr = 16'h0041; tsr = 16'h8000;
    ref_m.kbsr = kbsr; ref_m.kbdr = kbdr; ref_m.tsr = tsr; ref_m.sw = switch_data;
    vga_addr = 0; mips_insn = 0;
    repeat (3) @(posedge clk);
    // Load the memory image (after the memory's own start-up clear).
    for (int a = 0; a < 65536; a++) begin
      logic [15:0] w;
      w = (a >= 'h8200 && a < 'h8200 + 13) ? PROG[a - 'h8200] : rand_insn();
      if (a >= 'hFE00 && a < 'hFE20) w = 16'd0;
      ref_m.mem[a] = w;
      dut.u_mem.ram[a] = w;
    end
    @(negedge clk);
    switch_data = 8'h80;
    ref_m.sw = switch_data;
    rst = 0;
    run = 1;
    #1;
    check("7seg shows pc", {16'd0, seven_segment_data}, 32'h8200);
    // Free-running.
    while (n_insn < NRUN) one_clock();
    // Single-step.
    run = 0;
    for (int s = 0; s < NSTEP; s++) begin
      held_pc = test_pc;
      repeat (6) begin
        one_clock();
        check("no gwe while halted", {31'd0, gwe}, 32'd0);
        check("pc frozen while halted", {16'd0, test_pc}, {16'd0, held_pc});
        n_idle++;
      end
      begin
        int n_before;
        n_before = n_step_insn;
        @(negedge clk); step = 1;
        @(negedge clk); step = 0;
        since_gwe = 0;
        repeat (6) one_clock();
        check("one instruction per step", n_step_insn - n_before, 1);
      end
    end
    // Mechanisms.
    count_ok("instruction retired in run mode", n_cpi);
    count_ok("single-stepped instruction", n_step_insn);
    count_ok("halted cycle", n_idle);
    count_ok("device register read", ref_m.dev_reads);
    count_ok("device register write", ref_m.dev_writes);
    count_ok("timer interval write pulse", n_tir_pulse);
    count_ok("load", n_loads);
    count_ok("store", n_stores);
    count_ok("branch/jump redirect", n_redirect);
    count_ok("video read", n_vga);
    count_ok("video read of program-written pixel", n_vga_prog);
    count_ok("MIPS decoder check", n_mips);
    checks++;
    if (ref_m.mem[16'hC005] !== 16'h0080) begin
      failures++; $display("FAIL program pixel not in frame buffer");
    end
    $display("instructions %0d (stepped %0d), halted cycles %0d, device reads %0d writes %0d, tir pulses %0d, loads %0d, stores %0d, redirects %0d, video reads %0d",
             n_insn, n_step_insn, n_idle, ref_m.dev_reads, ref_m.dev_writes, n_tir_pulse, n_loads, n_stores, n_redirect, n_vga);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
