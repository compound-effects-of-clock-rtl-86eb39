// One row of the voltage-noise array, "SRL-LFSR" type.
//
// The same chain of NUM_SRL shift registers of SRL_DEPTH bits as the SRL
// row, but the D of the first shift register is the XOR of the outputs of
// the shift registers picked by TAPS (bit i = output of shift register i)
// rather than the last output alone. The row is then one long Fibonacci
// LFSR whose tap distances are whole shift registers, so its switching
// activity is irregular and lower than that of the plain ring.
//
// XOR of shift-register outputs as feedback and the alternating start
// pattern follow the source design. The taps are this design's choice:
// outputs 1, 2, 22 and 32, i.e. y^32+y^22+y^2+y+1 with y one shift register.
// Because every tap distance is a multiple of SRL_DEPTH (even), bits of the
// start pattern that are 0 belong to interleaved sub-sequences that stay 0;
// only the other half of the bits switch. Synchronous reset reloads the
// pattern. q is the Q of the last shift register.
module vn_srl_lfsr_row #(
  parameter int unsigned         NUM_SRL   = 32,
  parameter int unsigned         SRL_DEPTH = 32,
  parameter logic [NUM_SRL-1:0] TAPS      = NUM_SRL'(32'h8020_0003)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q
);
  import vn_pkg::*;

  localparam logic [SRL_DEPTH-1:0] INIT = SRL_DEPTH'(alt_pattern(SRL_DEPTH));

  logic [SRL_DEPTH-1:0] sr  [NUM_SRL];
  logic [NUM_SRL-1:0]   q_srl;
  logic [NUM_SRL-1:0]   d_in;

  always_comb begin
    for (int i = 0; i < NUM_SRL; i++) q_srl[i] = sr[i][SRL_DEPTH-1];
    d_in[0] = ^(q_srl & TAPS);
    for (int i = 1; i < NUM_SRL; i++) d_in[i] = q_srl[i-1];
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_SRL; i++) begin
      if (!rst_n)  sr[i] <= INIT;
      else if (en) sr[i] <= {sr[i][SRL_DEPTH-2:0], d_in[i]};
    end
  end

  assign q = q_srl[NUM_SRL-1];

  initial begin
    assert (TAPS[NUM_SRL-1])
      else $error("vn_srl_lfsr_row: TAPS must include the last shift register");
  end

endmodule
