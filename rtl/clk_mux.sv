// Glitch-free 2:1 clock multiplexer, the switching element of clock-phase
// noise (the role an FPGA's BUFGMUX_CTRL global clock buffer plays).
//
// Each input has a two-stage enable: stage A samples the request on the
// rising edge of that input's own clock, stage B passes it on at the falling
// edge. Both stages only turn on while the other side's stage B is off, so
// at most one side drives clk_out even when sel toggles faster than a switch
// completes (the clock-phase noise PRNG changes it every system clock), and
// an enable only changes while its clock is low. The interlock relies on the
// two inputs never falling at the same instant, which holds for any two
// distinct phases of one clock. A pulse in progress therefore always completes, the new clock can only
// start with a whole high phase, and a switch only ever lengthens the gap
// between rising edges (by about one to two periods of the clocks involved).
// sel may change at any time, asynchronously to both clocks.
//
// The behaviour (no truncated pulse, periods only stretched) follows the
// source design; the circuit is this design's choice. clk_out is an AND-OR of
// the clocks with enables that change only while the gated clock is low, the
// usual clock-gating structure. Asynchronous reset turns both sides off; the
// selected side comes up about one period after release. active shows
// which side currently drives clk_out.
module clk_mux (
  input  logic       rst_n,
  input  logic       clk0,
  input  logic       clk1,
  input  logic       sel,
  output logic       clk_out,
  output logic [1:0] active
);

  logic req0_a, req0_b;
  logic req1_a, req1_b;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) req0_a <= 1'b0;
    else        req0_a <= ~sel & ~req1_b;
  end

  always_ff @(negedge clk0 or negedge rst_n) begin
    if (!rst_n) req0_b <= 1'b0;
    else        req0_b <= req0_a & ~req1_b;
  end

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n) req1_a <= 1'b0;
    else        req1_a <= sel & ~req0_b;
  end

  always_ff @(negedge clk1 or negedge rst_n) begin
    if (!rst_n) req1_b <= 1'b0;
    else        req1_b <= req1_a & ~req0_b;
  end

  assign clk_out = (clk0 & req0_b) | (clk1 & req1_b);
  assign active  = {req1_b, req0_b};

endmodule
