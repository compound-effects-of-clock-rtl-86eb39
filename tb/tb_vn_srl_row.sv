// Test of the SRL-type noise row at full size: a model of the closed ring is
// advanced alongside the row under random enables. Every stored bit must
// equal the model, q must equal the model's last bit, and on every enabled
// clock all NUM_SRL*SRL_DEPTH bits must toggle (none while disabled).
module tb_vn_srl_row;
  localparam int NS = 32, D = 32, L = NS * D;

  logic clk = 0, rst_n = 0, en = 0, q;
  logic [L-1:0] model, prev, now;
  int checks = 0, failures = 0, enabled = 0;

  vn_srl_row #(.NUM_SRL(NS), .SRL_DEPTH(D)) dut (.clk, .rst_n, .en, .q);

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

  // chain position p = D*i + b holds bit b of shift register i
  function automatic logic [L-1:0] dut_state();
    logic [L-1:0] s;
    for (int i = 0; i < NS; i++) s[D*i +: D] = dut.sr[i];
    return s;
  endfunction

  initial begin
    for (int p = 0; p < L; p++) model[p] = p[0];
    @(negedge clk);  // reset sampled on the first edge
    @(negedge clk);
    now = dut_state();
    check(now === model, "alternating pattern after reset");
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      en   = ($urandom % 3) != 0;
      prev = dut_state();
      @(negedge clk);
      if (en) begin
        model = {model[L-2:0], model[L-1]};
        enabled++;
      end
      now = dut_state();
      check(now === model, $sformatf("state mismatch at step %0d", n));
      check(q === model[L-1], "q is the last bit of the ring");
      if (en) check((now ^ prev) === '1, "all bits toggle when enabled");
      else    check(now === prev, "no bit changes when disabled");
    end
    check(enabled > 0, "row was enabled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
