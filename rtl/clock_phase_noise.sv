// Clock-phase noise (CPN): a random clock built from phase-shifted copies of
// one clock.
//
// An 8-bit LFSR on the system clock supplies random select bits to a tree of
// glitch-free clock multiplexers (clk_mux) whose inputs are NUM_PHASES clocks
// of equal frequency and different phase. Whenever a select bit changes, the
// output moves to another phase; the mux finishes the current pulse first, so
// each switch inserts a random delay before the next rising edge and the
// logic clocked by rand_clk runs with an irregular period.
//
//   2 phases: one mux, select = prng[0]
//   3 phases: mux(mux(clk_ph[0], clk_ph[1], prng[0]), clk_ph[2], prng[1])
//   4 phases: mux(mux(ph0, ph1, prng[0]), mux(ph2, ph3, prng[0]), prng[1])
//
// PRNG width, mux tree and select-bit use follow the source design (two
// phases, 0 and 90 degrees, in its main configuration). The LFSR polynomial,
// seed and the mux circuit are this design's choice. The PRNG steps every
// system clock; a switch takes effect one to two periods later.
module clock_phase_noise
  import vn_pkg::*;
#(
  parameter int unsigned            NUM_PHASES = 2,
  parameter int unsigned            PRNG_WIDTH = 8,
  parameter logic [PRNG_WIDTH-1:0]  PRNG_TAPS  = PRNG_WIDTH'(LFSR8_TAPS),
  parameter logic [PRNG_WIDTH-1:0]  PRNG_SEED  = PRNG_WIDTH'(8'h5A)
) (
  input  logic                  sys_clk,
  input  logic                  rst_n,
  input  logic [NUM_PHASES-1:0] clk_ph,
  output logic                  rand_clk,
  output logic [PRNG_WIDTH-1:0] prng
);

  lfsr #(.WIDTH(PRNG_WIDTH), .TAPS(PRNG_TAPS), .SEED(PRNG_SEED)) u_prng (
    .clk   (sys_clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .state (prng)
  );

  if (NUM_PHASES == 2) begin : g_two
    clk_mux u_mux (
      .rst_n (rst_n), .clk0 (clk_ph[0]), .clk1 (clk_ph[1]), .sel (prng[0]),
      .clk_out (rand_clk), .active ()
    );
  end else if (NUM_PHASES == 3) begin : g_three
    logic m0;
    clk_mux u_mux0 (
      .rst_n (rst_n), .clk0 (clk_ph[0]), .clk1 (clk_ph[1]), .sel (prng[0]),
      .clk_out (m0), .active ()
    );
    clk_mux u_mux1 (
      .rst_n (rst_n), .clk0 (m0), .clk1 (clk_ph[2]), .sel (prng[1]),
      .clk_out (rand_clk), .active ()
    );
  end else begin : g_four
    logic m0, m1;
    clk_mux u_mux0 (
      .rst_n (rst_n), .clk0 (clk_ph[0]), .clk1 (clk_ph[1]), .sel (prng[0]),
      .clk_out (m0), .active ()
    );
    clk_mux u_mux1 (
      .rst_n (rst_n), .clk0 (clk_ph[2]), .clk1 (clk_ph[3]), .sel (prng[0]),
      .clk_out (m1), .active ()
    );
    clk_mux u_mux2 (
      .rst_n (rst_n), .clk0 (m0), .clk1 (m1), .sel (prng[1]),
      .clk_out (rand_clk), .active ()
    );
  end

  initial begin
    assert (NUM_PHASES >= 2 && NUM_PHASES <= 4)
      else $error("clock_phase_noise: NUM_PHASES must be 2, 3 or 4");
    assert (PRNG_WIDTH >= 2)
      else $error("clock_phase_noise: PRNG_WIDTH must be at least 2");
  end

endmodule
