// Test of the voltage-noise array at its full size with both row types.
// The row enables must equal the low 16 bits of an independent model of the
// 32-bit PRNG, clock by clock. In the SRL array a row's output toggles exactly
// on the clocks that row was enabled; in either array a disabled row's output
// holds. The number of rows enabled at once must vary.
module tb_voltage_noise;
  import vn_pkg::*;
  localparam int ROWS = 16;

  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] en_a, q_a, en_b, q_b, q_a_prev, q_b_prev, en_prev;
  logic [31:0] model;
  int checks = 0, failures = 0, min_on = ROWS + 1, max_on = -1;

  voltage_noise #(.ROW_TYPE(VN_SRL))      dut_a (.clk, .rst_n, .row_en (en_a), .row_q (q_a));
  voltage_noise #(.ROW_TYPE(VN_SRL_LFSR)) dut_b (.clk, .rst_n, .row_en (en_b), .row_q (q_b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int on;
    model = 32'h1357_9BDF;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      check(en_a === model[ROWS-1:0], $sformatf("row enables %04h expected %04h", en_a, model[ROWS-1:0]));
      check(en_b === model[ROWS-1:0], "row enables of second array");
      on = $countones(en_a);
      if (on < min_on) min_on = on;
      if (on > max_on) max_on = on;
      en_prev  = en_a;
      q_a_prev = q_a;
      q_b_prev = q_b;
      @(negedge clk);
      model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      check((q_a ^ q_a_prev) === en_prev, "SRL rows toggle exactly when enabled");
      check(((q_b ^ q_b_prev) & ~en_prev) === '0, "disabled SRL-LFSR rows hold");
    end
    check(max_on > min_on, $sformatf("enabled-row count varies (%0d..%0d)", min_on, max_on));
    $display("rows enabled per clock: %0d..%0d of %0d", min_on, max_on, ROWS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
