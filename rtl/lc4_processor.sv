// lc4_processor: single-cycle (non-pipelined) LC4 processor.
//
// Every instruction completes in one "big" cycle, i.e. one clock edge on
// which gwe is high. Within that cycle the datapath is one combinational
// path: PC -> instruction memory (outside) -> decoder and register file ->
// ALU -> result mux (ALU output or PC+1) -> data memory address (outside) ->
// write-back mux (result or memory data) -> register file, with the n/z/p
// code of the write-back value going to the NZP register and the branch
// logic choosing PC+1 or the ALU output as the next PC. The PC, the register
// file and the NZP register are nbit_reg state written only when gwe is
// high; the PC resets to 0x8200.
//
// Memory is outside: imem_addr/imem_out fetch the instruction,
// dmem_addr/dmem_in/dmem_we/dmem_out access data. The memories are read on
// edges of the fast clock, so imem_out and dmem_out must settle within the
// big cycle (lc4_clkgen and lc4_memory arrange this). dmem_addr is driven to
// 0 by instructions that do not access memory.
//
// The test_* outputs report, for the instruction now executing, what will be
// written at the next gwe edge, so a testbench can compare each instruction
// with a reference trace; test_stall is always 0 in this non-pipelined
// design. For board debugging the seven-segment value shows the PC
// (switches = 0), the instruction (1), dmem_addr (2), dmem_out (3) or
// dmem_in (4), else 0xDEAD, and the LEDs mirror the switches.
//
// The block structure, port list, reset PC and debug outputs follow the lab
// skeleton and its datapath diagram. The decode rules are the LC4
// instruction set's; zeroing dmem_addr and test_dmem_value for non-memory
// instructions is this design's choice.
module lc4_processor
  import lc4_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        gwe,

  output logic [15:0] imem_addr,
  input  logic [15:0] imem_out,
  output logic [15:0] dmem_addr,
  input  logic [15:0] dmem_out,
  output logic        dmem_we,
  output logic [15:0] dmem_in,

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

  input  logic [7:0]  switch_data,
  output logic [15:0] seven_segment_data,
  output logic [7:0]  led_data
);

  logic [15:0] pc, next_pc, pc_inc, insn;
  ctrl_t       ctrl;
  logic [2:0]  r1sel, r2sel, wsel;
  logic [15:0] r1data, r2data, alu_out, result, wdata;
  logic [2:0]  nzp, nzp_new;
  logic        take_alu;

  // ---- fetch ----
  nbit_reg #(.N(16), .RESET_VALUE(RESET_PC)) u_pc_reg (
    .clk(clk), .rst(rst), .we(1'b1), .gwe(gwe), .d(next_pc), .q(pc)
  );
  assign pc_inc    = pc + 16'd1;
  assign imem_addr = pc;
  assign insn      = imem_out;

  // ---- decode and register read ----
  lc4_decoder u_dec (.insn(insn), .ctrl(ctrl));

  always_comb begin
    unique case (ctrl.r1sel)
      R1_RD:   r1sel = insn[11:9];
      R1_R7:   r1sel = 3'd7;
      default: r1sel = insn[8:6];
    endcase
  end
  assign r2sel = (ctrl.r2sel == R2_RD) ? insn[11:9] : insn[2:0];
  assign wsel  = ctrl.wsel_r7 ? 3'd7 : insn[11:9];

  lc4_regfile u_rf (
    .clk(clk), .rst(rst), .gwe(gwe),
    .r1sel(r1sel), .r1data(r1data),
    .r2sel(r2sel), .r2data(r2data),
    .we(ctrl.regfile_we), .wsel(wsel), .wdata(wdata)
  );

  // ---- execute ----
  lc4_alu u_alu (.insn(insn), .pc(pc), .r1data(r1data), .r2data(r2data), .out(alu_out));
  assign result = ctrl.sel_pc_inc ? pc_inc : alu_out;

  // ---- memory ----
  assign dmem_addr = (ctrl.is_load || ctrl.is_store) ? result : 16'd0;
  assign dmem_in   = r2data;
  assign dmem_we   = ctrl.is_store;

  // ---- write-back and condition codes ----
  assign wdata = ctrl.is_load ? dmem_out : result;
  lc4_nzp u_nzp (.value(wdata), .nzp(nzp_new));
  nbit_reg #(.N(3), .RESET_VALUE(3'b000)) u_nzp_reg (
    .clk(clk), .rst(rst), .we(ctrl.nzp_we), .gwe(gwe), .d(nzp_new), .q(nzp)
  );

  // ---- next PC ----
  lc4_branch_logic u_br (.insn(insn), .nzp(nzp), .take_alu(take_alu));
  assign next_pc = take_alu ? alu_out : pc_inc;

  // ---- test outputs ----
  assign test_stall       = 2'b00;
  assign test_pc          = pc;
  assign test_insn        = insn;
  assign test_regfile_we  = ctrl.regfile_we;
  assign test_regfile_reg = wsel;
  assign test_regfile_in  = wdata;
  assign test_nzp_we      = ctrl.nzp_we;
  assign test_nzp_in      = nzp_new;
  assign test_dmem_we     = dmem_we;
  assign test_dmem_addr   = dmem_addr;
  assign test_dmem_value  = ctrl.is_store ? r2data : (ctrl.is_load ? dmem_out : 16'd0);

  // ---- board debug outputs ----
  always_comb begin
    unique case (switch_data[6:0])
      7'd0:    seven_segment_data = pc;
      7'd1:    seven_segment_data = imem_out;
      7'd2:    seven_segment_data = dmem_addr;
      7'd3:    seven_segment_data = dmem_out;
      7'd4:    seven_segment_data = dmem_in;
      default: seven_segment_data = 16'hDEAD;
    endcase
  end
  assign led_data = switch_data;

endmodule
