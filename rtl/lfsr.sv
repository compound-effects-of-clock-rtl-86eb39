// Fibonacci linear-feedback shift register used as the pseudo-random number
// generator of both countermeasures.
//
// On every clock with en=1 the state shifts one place toward the MSB and the
// XOR of the tapped bits (TAPS mask, bit k taps state bit k) enters bit 0.
// Each bit of `state` is used directly as a random control bit: a row enable
// in the voltage-noise array, a clock-mux select in the clock-phase noise
// generator. The 32-bit width (noise array) and 8-bit width (clock noise)
// follow the source design; the polynomial and seed are this design's
// choice. Asynchronous active-low reset loads SEED, which must be non-zero.
// The new state is visible one clock after the enabled edge.
module lfsr #(
  parameter int unsigned       WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(32'h8020_0003),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  initial begin
    assert (WIDTH >= 2) else $error("lfsr: WIDTH must be at least 2");
    assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
    assert (TAPS[WIDTH-1]) else $error("lfsr: TAPS must include the top bit");
  end

endmodule
