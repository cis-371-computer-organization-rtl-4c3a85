// lc4_program_tb: runs a small LC4 program loaded from a hex memory image.
//
// The system's memory is initialised from tb/lc4_test1.hex (run the
// simulation from the repository root), the way a program image is placed
// in the block RAM. The program, at the reset PC 0x8200:
//   8200  CONST R0,#0 ; CONST R1,#10
//   8202  loop: ADD R0,R0,R1 ; ADD R1,R1,#-1 ; BRp loop      (R0 = 55)
//   8205  JSR draw                                           (R7 = 0x8206)
//   8206  CONST/HICONST R2 = 0xFE00
//   8208  STR R0 -> LED register ; STR R3 -> seven-segment register
//   820A  BRnzp #-1                                          (spin)
//   8210  draw: R4 = 0xC100 (row 2), R5 = 0x7C00, R6 = 8
//   8215  loop: STR R5,[R4] ; R4++ ; R6-- ; BRp loop         (8 pixels)
//   8219  R3 = 6 * 7 (MUL) ; LDR R1,[R4-1] ; RET (JMPR R7)
// Every instruction is checked against the reference model (started from
// the same image), and at the end: LED register = 55, seven-segment
// register = 42, pixels 256..263 of the frame read 0x7C00 through the video
// port and pixel 264 reads 0, and the spin loop is first reached after
// exactly 79 instructions, its gwe edge 316 clocks after the first
// instruction's (4 clocks per instruction).
module lc4_program_tb;
  import lc4_ref_pkg::*;

  logic clk = 0, rst = 1, run = 0, step = 0, gwe;
  logic [7:0]  switch_data = 8'h00, led_data, mmio_leds;
  logic [15:0] seven_segment_data, mmio_sevseg, tir, tsr = 0, kbsr = 0, kbdr = 0, vga_data;
  logic        tir_we;
  logic [13:0] vga_addr = 0;
  logic [1:0]  test_stall;
  logic [15:0] test_pc, test_insn, test_regfile_in, test_dmem_addr, test_dmem_value;
  logic        test_regfile_we, test_nzp_we, test_dmem_we;
  logic [2:0]  test_regfile_reg, test_nzp_in;
  logic [31:0] mips_insn = 0;
  logic        mips_alu_in_b, mips_rwe, mips_rwd, mips_rdst, mips_dm_we;

  lc4_system #(.MEM_INIT_FILE("tb/lc4_test1.hex")) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  lc4_ref ref_m;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (pc %h)", what, got, exp, test_pc);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trace_t e;
    int n_insn, n_clk, spin_at_insn, spin_at_clk, first_clk;
    ref_m = new(1);
    repeat (2) @(negedge clk);
    for (int a = 0; a < 65536; a++) ref_m.mem[a] = dut.u_mem.ram[a];
    check("image word at 0x8200", {16'd0, ref_m.mem[16'h8200]}, 32'h9000);
    rst = 0; run = 1;
    n_insn = 0; n_clk = 0; spin_at_insn = -1; spin_at_clk = -1; first_clk = 0;
    while (n_insn < 100) begin
      @(negedge clk);
      n_clk++;
      if (gwe) begin
        if (test_pc == 16'h820A && spin_at_insn < 0) begin
          spin_at_insn = n_insn;
          spin_at_clk  = n_clk - first_clk;  // clocks since the first gwe
        end
        if (n_insn == 0) first_clk = n_clk;
        e = ref_m.step();
        check("pc", {16'd0, test_pc}, {16'd0, e.pc});
        check("insn", {16'd0, test_insn}, {16'd0, e.insn});
        check("regfile_we", {31'd0, test_regfile_we}, {31'd0, e.rf_we});
        if (e.rf_we) check("regfile_in", {16'd0, test_regfile_in}, {16'd0, e.rf_in});
        check("dmem_we", {31'd0, test_dmem_we}, {31'd0, e.dm_we});
        check("dmem_addr", {16'd0, test_dmem_addr}, {16'd0, e.dm_addr});
        check("dmem_value", {16'd0, test_dmem_value}, {16'd0, e.dm_value});
        n_insn++;
      end
    end
    check("instructions before spin", spin_at_insn, 79);
    check("clocks before spin", spin_at_clk, 79 * 4);
    check("LED register = sum 1..10", {24'd0, mmio_leds}, 32'd55);
    check("seven-segment register = 6*7", {16'd0, mmio_sevseg}, 32'd42);
    check("R1 = last pixel read back", {16'd0, ref_m.r[1]}, 32'h7C00);
    for (int p = 256; p <= 264; p++) begin
      @(negedge clk); vga_addr = 14'(p);
      @(negedge clk);
      check("pixel", {16'd0, vga_data}, (p < 264) ? 32'h7C00 : 32'h0);
    end
    $display("program reached its spin loop after %0d instructions, %0d clocks after the first", spin_at_insn, spin_at_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
