// Voltage-noise (VN) array: a switchable bank of noisy shift-register rows.
//
// A PRNG_WIDTH-bit LFSR steps on every clock; its low ROWS bits are the row
// enables, bit i enabling row i for that clock. Each row is NUM_SRL chained
// shift registers of SRL_DEPTH bits (vn_srl_row or vn_srl_lfsr_row, chosen by
// ROW_TYPE). The number of rows enabled at a time, and so the extra supply
// current, therefore varies at random from clock to clock: ROWS sets the
// variance of the noise and NUM_SRL its amplitude per row.
//
// Topology, sizes (32-bit PRNG, 32 shift registers of 32 bits per row, 16
// rows in the combined countermeasure) and row types follow the source
// design; which PRNG bits drive which rows is this design's choice. All
// logic runs on `clk`; row_en shows the enables of the current clock.
// row_q brings out each row's last bit so that the rows are observable.
module voltage_noise
  import vn_pkg::*;
#(
  parameter int unsigned          ROWS       = 16,
  parameter int unsigned          NUM_SRL    = 32,
  parameter int unsigned          SRL_DEPTH  = 32,
  parameter vn_row_type_e         ROW_TYPE   = VN_SRL,
  parameter int unsigned          PRNG_WIDTH = 32,
  parameter logic [PRNG_WIDTH-1:0] PRNG_TAPS = PRNG_WIDTH'(LFSR32_TAPS),
  parameter logic [PRNG_WIDTH-1:0] PRNG_SEED = PRNG_WIDTH'(32'h1357_9BDF)
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [ROWS-1:0] row_en,
  output logic [ROWS-1:0] row_q
);

  logic [PRNG_WIDTH-1:0] prng;

  lfsr #(.WIDTH(PRNG_WIDTH), .TAPS(PRNG_TAPS), .SEED(PRNG_SEED)) u_prng (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .state (prng)
  );

  assign row_en = prng[ROWS-1:0];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    if (ROW_TYPE == VN_SRL) begin : g_srl
      vn_srl_row #(.NUM_SRL(NUM_SRL), .SRL_DEPTH(SRL_DEPTH)) u_row (
        .clk (clk), .rst_n (rst_n), .en (row_en[r]), .q (row_q[r])
      );
    end else begin : g_srl_lfsr
      vn_srl_lfsr_row #(.NUM_SRL(NUM_SRL), .SRL_DEPTH(SRL_DEPTH)) u_row (
        .clk (clk), .rst_n (rst_n), .en (row_en[r]), .q (row_q[r])
      );
    end
  end

  initial begin
    assert (ROWS >= 1 && ROWS <= PRNG_WIDTH)
      else $error("voltage_noise: ROWS must be 1..PRNG_WIDTH (one PRNG bit per row)");
  end

endmodule
