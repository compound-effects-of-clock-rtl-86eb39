// Behavioural model of an FPGA mixed-mode clock manager, for simulation only
// (the real part is an analog vendor primitive). Output k is the reference
// clock delayed by k*PHASE_STEP_DEG degrees of its period; `locked` rises
// after LOCK_CYCLES reference cycles. Frequency multiplication is not
// modelled: all outputs run at the reference frequency.
module mmcm_model #(
  parameter int unsigned NUM_OUT        = 2,
  parameter realtime     PERIOD         = 52.083,  // reference period in ns
  parameter real         PHASE_STEP_DEG = 90.0,
  parameter int unsigned LOCK_CYCLES    = 4
) (
  input  logic               clk_in,
  output logic [NUM_OUT-1:0] clk_out,
  output logic               locked
);
  int unsigned n_ref = 0;

  initial begin
    clk_out = '0;
    locked  = 1'b0;
  end

  always @(posedge clk_in) begin
    n_ref++;
    if (n_ref == LOCK_CYCLES) locked = 1'b1;
  end

  for (genvar k = 0; k < NUM_OUT; k++) begin : g_out
    always @(clk_in) clk_out[k] <= #(PERIOD * PHASE_STEP_DEG * k / 360.0) clk_in;
  end
endmodule
