// lc4_system: LC4 single-cycle processor system.
//
// Connects the processor to the shared memory the way the system block
// diagram does: the CPU's instruction port and data port (DMEM_ADDR, DMEM_IN,
// DMEM_WE, DMEM_OUT) go to lc4_memory, whose data bus also carries the
// timer (TIR out, TSR in) and keyboard (KBSR, KBDR in) registers, and whose
// video port (VGA_ADDR in, VGA_DATA out) serves a display controller. The
// timer, keyboard and display controller are external, so their register
// signals are ports here.
//
// One clock, clk, is the fast "little" clock. lc4_clkgen divides each
// instruction into 4 little cycles and raises gwe on the 4th: the processor's
// registers and data stores change only then, while the memory samples the
// PC one little edge after a big edge and the data address three edges after
// it. An instruction therefore takes 4 clk cycles while run is high; with
// run low, each pulse on step executes one instruction. rst is synchronous
// and active high and must be held for at least one clk edge.
//
// Board outputs: seven_segment_data and led_data are the processor's debug
// outputs selected by switch_data; mmio_leds and mmio_sevseg are the
// registers a program writes through memory. The test_* outputs and gwe let a
// testbench check each instruction against a reference at every gwe edge.
//
// Beside the LC4 system, and independent of it, sits mips_ctrl, the
// lecture's four-instruction control decoder, with its own ports.
module lc4_system #(
  parameter string MEM_INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        step,
  output logic        gwe,
  // board
  input  logic [7:0]  switch_data,
  output logic [15:0] seven_segment_data,
  output logic [7:0]  led_data,
  output logic [7:0]  mmio_leds,
  output logic [15:0] mmio_sevseg,
  // timer and keyboard registers
  output logic [15:0] tir,
  output logic        tir_we,
  input  logic [15:0] tsr,
  input  logic [15:0] kbsr,
  input  logic [15:0] kbdr,
  // video
  input  logic [13:0] vga_addr,
  output logic [15:0] vga_data,
  // per-instruction test outputs
  output logic [1:0]  test_stall,
  output logic [15:0] test_pc,
  output logic [15:0] test_insn,
  output logic        test_regfile_we,
  output logic [2:0]  test_regfile_reg,
  output logic [15:0] test_regfile_in,
  output logic        test_nzp_we,
  output logic [2:0]  test_nzp_in,
  output logic        test_dmem_we,
  output logic [15:0] test_dmem_addr,
  output logic [15:0] test_dmem_value,
  // MIPS-style control decoder example
  input  logic [31:0] mips_insn,
  output logic        mips_alu_in_b,
  output logic        mips_rwe,
  output logic        mips_rwd,
  output logic        mips_rdst,
  output logic        mips_dm_we
);

  logic        fetch_en, load_en;
  logic [15:0] imem_addr, imem_out, dmem_addr, dmem_out, dmem_in;
  logic        dmem_we;

  lc4_clkgen #(.LITTLE_PER_BIG(4)) u_clkgen (
    .clk(clk), .rst(rst), .run(run), .step(step),
    .gwe(gwe), .fetch_en(fetch_en), .load_en(load_en), .phase()
  );

  lc4_processor u_cpu (
    .clk(clk), .rst(rst), .gwe(gwe),
    .imem_addr(imem_addr), .imem_out(imem_out),
    .dmem_addr(dmem_addr), .dmem_out(dmem_out), .dmem_we(dmem_we), .dmem_in(dmem_in),
    .test_stall(test_stall), .test_pc(test_pc), .test_insn(test_insn),
    .test_regfile_we(test_regfile_we), .test_regfile_reg(test_regfile_reg),
    .test_regfile_in(test_regfile_in), .test_nzp_we(test_nzp_we), .test_nzp_in(test_nzp_in),
    .test_dmem_we(test_dmem_we), .test_dmem_addr(test_dmem_addr), .test_dmem_value(test_dmem_value),
    .switch_data(switch_data), .seven_segment_data(seven_segment_data), .led_data(led_data)
  );

  lc4_memory #(.ADDR_W(16), .INIT_FILE(MEM_INIT_FILE)) u_mem (
    .clk(clk), .rst(rst), .gwe(gwe),
    .i_re(fetch_en), .i_addr(imem_addr), .i_dout(imem_out),
    .d_re(load_en), .d_addr(dmem_addr), .d_din(dmem_in), .d_we(dmem_we), .d_dout(dmem_out),
    .vga_addr(vga_addr), .vga_data(vga_data),
    .kbsr(kbsr), .kbdr(kbdr), .tsr(tsr), .switches(switch_data),
    .tir(tir), .tir_we(tir_we), .leds(mmio_leds), .sevseg(mmio_sevseg)
  );

  mips_ctrl u_mips (
    .insn(mips_insn), .alu_in_b(mips_alu_in_b), .rwe(mips_rwe),
    .rwd(mips_rwd), .rdst(mips_rdst), .dm_we(mips_dm_we)
  );

endmodule
