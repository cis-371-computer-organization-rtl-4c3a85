// nbit_reg: N-bit state register with a local and a global write enable.
//
// On each rising clock edge the register loads RESET_VALUE while rst is high,
// otherwise it loads d when both we (this register's enable) and gwe (the
// global write enable shared by all state) are high, and holds otherwise.
// The global enable is how the system runs its state on a slow "big clock"
// while the memories see every edge of the fast clock, and how it
// single-steps. Synchronous, active-high reset as in the lab's register;
// the output is the stored value with no modelled delay (this design's
// choice). Ports: clk, rst, we, gwe, d[N-1:0], q[N-1:0].
module nbit_reg #(
  parameter int unsigned     N           = 1,
  parameter logic [N-1:0]    RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic         gwe,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)             q <= RESET_VALUE;
    else if (gwe && we)  q <= d;
  end

endmodule
