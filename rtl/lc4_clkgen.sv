// lc4_clkgen: big-clock / little-clock sequencer built on one fast clock.
//
// The block RAMs can only be read on a clock edge, yet a single-cycle
// processor must fetch an instruction and then load data within one cycle.
// The system therefore runs everything from one fast "little" clock and lets
// state change only once every LITTLE_PER_BIG (4) little cycles: that edge
// is the "big clock", signalled by gwe, the global write enable of all
// registers. Counting little-clock edges from a big-clock edge:
//   edge +1  fetch_en  - the instruction memory port samples the PC
//   edge +3  load_en   - the data memory port samples the data address
//   edge +4  gwe       - registers and data stores commit (next big edge)
// The phase counter advances only while run is high or a single step is
// pending; a one-cycle pulse on step while run is low executes exactly one
// instruction (one big cycle) and stops again at the start of the next one.
// Reset (synchronous, active high) returns to the start of a big cycle.
// The 4:1 ratio and the fetch/load/store edges follow the lab hints; the
// run/step interface is this design's choice.
module lc4_clkgen #(
  parameter int unsigned LITTLE_PER_BIG = 4,
  localparam int unsigned PW = $clog2(LITTLE_PER_BIG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          step,
  output logic          gwe,
  output logic          fetch_en,
  output logic          load_en,
  output logic [PW-1:0] phase
);

  logic step_pending, active;

  assign active   = run || step_pending;
  assign fetch_en = active && (phase == PW'(0));
  assign load_en  = active && (phase == PW'(LITTLE_PER_BIG - 2));
  assign gwe      = active && (phase == PW'(LITTLE_PER_BIG - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase        <= '0;
      step_pending <= 1'b0;
    end else begin
      if (active)
        phase <= (phase == PW'(LITTLE_PER_BIG - 1)) ? '0 : phase + PW'(1);
      if (gwe)       step_pending <= 1'b0;
      else if (step) step_pending <= 1'b1;
    end
  end

  initial assert (LITTLE_PER_BIG >= 3)
    else $error("lc4_clkgen: fetch, load and commit need at least 3 little cycles");

endmodule
