// One row of the voltage-noise array, "SRL" type.
//
// NUM_SRL shift registers of SRL_DEPTH bits each (on an FPGA, one SRLC32E
// shift-register LUT apiece) are chained Q to D, and the Q of the last one is
// fed back to the D of the first, closing a ring. All share the clock and the
// row enable. Every shift register starts with alternating 1s and 0s; since
// the ring length is even, each enabled shift makes every stored bit take its
// neighbour's opposite value, so all NUM_SRL*SRL_DEPTH bits toggle on every
// enabled clock. That constant switching is the noise: the row draws maximum
// dynamic power when enabled and none when idle.
//
// Ring structure, sizes and alternating start pattern follow the source
// design. The synchronous reset that reloads the pattern is this design's
// choice (an FPGA shift-register LUT gets it from its INIT value instead).
// q is the Q of the last shift register, one bit per clock.
module vn_srl_row #(
  parameter int unsigned NUM_SRL   = 32,
  parameter int unsigned SRL_DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q
);
  import vn_pkg::*;

  localparam logic [SRL_DEPTH-1:0] INIT = SRL_DEPTH'(alt_pattern(SRL_DEPTH));

  logic [SRL_DEPTH-1:0] sr  [NUM_SRL];
  logic [NUM_SRL-1:0]   d_in;

  always_comb begin
    d_in[0] = sr[NUM_SRL-1][SRL_DEPTH-1];
    for (int i = 1; i < NUM_SRL; i++) d_in[i] = sr[i-1][SRL_DEPTH-1];
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_SRL; i++) begin
      if (!rst_n)  sr[i] <= INIT;
      else if (en) sr[i] <= {sr[i][SRL_DEPTH-2:0], d_in[i]};
    end
  end

  assign q = sr[NUM_SRL-1][SRL_DEPTH-1];

  initial begin
    assert (((NUM_SRL * SRL_DEPTH) % 2) == 0)
      else $error("vn_srl_row: ring length must be even for the pattern to toggle");
  end

endmodule
