// Reset synchroniser: asserts rst_n_out asynchronously with rst_n_in and
// releases it on the second rising edge of clk after rst_n_in rises, so the
// logic of that clock domain leaves reset on a clean edge. Used for the
// random-clock domain, whose clock may stop and restart while the clock
// multiplexer switches.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage     <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage     <= 1'b1;
      rst_n_out <= stage;
    end
  end

endmodule
