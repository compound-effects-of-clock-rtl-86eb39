// Test of the SRL-LFSR noise row at full size against a model of the long
// Fibonacci LFSR: the new first bit is the XOR of the last bits of shift
// registers 1, 2, 22 and 32. Every stored bit and q are compared under random
// enables; the number of toggling bits must stay below that of the plain ring
// and be non-zero on some enabled clocks.
module tb_vn_srl_lfsr_row;
  localparam int NS = 32, D = 32, L = NS * D;

  logic clk = 0, rst_n = 0, en = 0, q;
  logic [L-1:0] model, prev, now;
  int checks = 0, failures = 0, max_tog = 0, tog_steps = 0;

  vn_srl_lfsr_row #(.NUM_SRL(NS), .SRL_DEPTH(D)) dut (.clk, .rst_n, .en, .q);

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

  function automatic logic [L-1:0] dut_state();
    logic [L-1:0] s;
    for (int i = 0; i < NS; i++) s[D*i +: D] = dut.sr[i];
    return s;
  endfunction

  initial begin
    logic fb;
    int tog;
    for (int p = 0; p < L; p++) model[p] = p[0];
    @(negedge clk);
    @(negedge clk);
    check(dut_state() === model, "alternating pattern after reset");
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      en   = ($urandom % 4) != 0;
      prev = dut_state();
      @(negedge clk);
      if (en) begin
        fb    = model[D*1-1] ^ model[D*2-1] ^ model[D*22-1] ^ model[D*32-1];
        model = {model[L-2:0], fb};
      end
      now = dut_state();
      check(now === model, $sformatf("state mismatch at step %0d", n));
      check(q === model[L-1], "q is the last bit of the chain");
      if (!en) check(now === prev, "no change while disabled");
      tog = $countones(now ^ prev);
      if (tog > max_tog) max_tog = tog;
      if (en && tog > 0) tog_steps++;
    end
    check(max_tog < L, "switching activity below the plain ring");
    check(tog_steps > 0, "bits switch on enabled clocks");
    $display("max toggles per clock %0d of %0d", max_tog, L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
