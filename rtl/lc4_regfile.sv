// lc4_regfile: LC4 register file, eight 16-bit registers R0..R7.
//
// Two combinational read ports (r1sel/r1data, r2sel/r2data) and one write
// port (wsel/wdata/we) that writes on the clock edge when we and the global
// write enable gwe are both high. A read of the register being written
// returns the old value; the new value is visible after the edge, which is
// what a single-cycle datapath needs. Each register is an nbit_reg, so the
// file follows the lab's rule of building all state from that module and
// clears to zero on rst (the reset value is this design's choice).
module lc4_regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned SELW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             gwe,
  input  logic [SELW-1:0]  r1sel,
  output logic [WIDTH-1:0] r1data,
  input  logic [SELW-1:0]  r2sel,
  output logic [WIDTH-1:0] r2data,
  input  logic             we,
  input  logic [SELW-1:0]  wsel,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    nbit_reg #(.N(WIDTH), .RESET_VALUE('0)) u_reg (
      .clk (clk),
      .rst (rst),
      .we  (we && (wsel == SELW'(i))),
      .gwe (gwe),
      .d   (wdata),
      .q   (regs[i])
    );
  end

  assign r1data = regs[r1sel];
  assign r2data = regs[r2sel];

endmodule
