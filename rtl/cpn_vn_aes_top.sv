// Combined clock-phase-noise and voltage-noise protection around an AES-128
// encryption core.
//
// The clock-phase noise generator (CPN) turns NUM_PHASES equal-frequency,
// phase-shifted clocks (from an on-chip clock manager, supplied on clk_ph)
// into one random clock, rand_clk. Both the AES core and the voltage-noise
// array (VN) run on rand_clk: AES rounds happen at random instants, and on
// every one of those edges a random subset of VN rows toggles thousands of
// flip-flops at the same moment, so the AES switching current is both
// displaced in time and buried in data-independent noise. Neither
// countermeasure touches the AES core itself.
//
// Interface: the host must drive start/key/pt and sample ct/done on rand_clk
// (it is an output for that purpose); busy is high during an encryption and
// serves as a capture trigger. Reset is asynchronous; the rand_clk domain is
// released through a reset synchroniser. cpn_sel, vn_row_en and vn_row_q make
// the random selections and the noise rows observable.
//
// Topology and default sizes (2 phases, 16 rows of 32 shift registers of 32
// bits, SRL rows) are those of the source design's main combined
// configuration; the port list and reset scheme are this design's choice.
module cpn_vn_aes_top
  import vn_pkg::*;
#(
  parameter int unsigned  NUM_PHASES   = 2,
  parameter int unsigned  VN_ROWS      = 16,
  parameter int unsigned  VN_NUM_SRL   = 32,
  parameter int unsigned  VN_SRL_DEPTH = 32,
  parameter vn_row_type_e VN_ROW_TYPE  = VN_SRL
) (
  input  logic                  sys_clk,
  input  logic                  rst_n,
  input  logic [NUM_PHASES-1:0] clk_ph,
  output logic                  rand_clk,
  input  logic                  start,
  input  logic [127:0]          key,
  input  logic [127:0]          pt,
  output logic [127:0]          ct,
  output logic                  busy,
  output logic                  done,
  output logic [7:0]            cpn_sel,
  output logic [VN_ROWS-1:0]    vn_row_en,
  output logic [VN_ROWS-1:0]    vn_row_q
);

  logic rrst_n;

  clock_phase_noise #(.NUM_PHASES(NUM_PHASES)) u_cpn (
    .sys_clk  (sys_clk),
    .rst_n    (rst_n),
    .clk_ph   (clk_ph),
    .rand_clk (rand_clk),
    .prng     (cpn_sel)
  );

  rst_sync u_rst_sync (
    .clk       (rand_clk),
    .rst_n_in  (rst_n),
    .rst_n_out (rrst_n)
  );

  aes128 u_aes (
    .clk   (rand_clk),
    .rst_n (rrst_n),
    .start (start),
    .key   (key),
    .pt    (pt),
    .ct    (ct),
    .busy  (busy),
    .done  (done)
  );

  voltage_noise #(
    .ROWS      (VN_ROWS),
    .NUM_SRL   (VN_NUM_SRL),
    .SRL_DEPTH (VN_SRL_DEPTH),
    .ROW_TYPE  (VN_ROW_TYPE)
  ) u_vn (
    .clk    (rand_clk),
    .rst_n  (rrst_n),
    .row_en (vn_row_en),
    .row_q  (vn_row_q)
  );

endmodule
