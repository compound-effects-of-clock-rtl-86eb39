// Test of the glitch-free clock multiplexer with two 50 ns clocks 90 degrees
// apart and a select that changes at random times. Checked on every output
// edge, and at every change of the enables (never both on): each output rising edge coincides with a rising edge of the input
// that is active, no high or low phase is shorter than the inputs' 25 ns,
// and no period is shorter than 50 ns. After the select has been stable for
// a while the output must follow the selected input. A second phase toggles
// the select about once per period, faster than a switch completes. Switches and stretched
// periods are counted and must both occur.
module tb_clk_mux;
  localparam realtime T = 50.0, HALF = 25.0, SHIFT = 12.5, EPS = 0.01;

  logic rst_n = 0, clk0 = 0, clk1 = 0, sel = 0, clk_out;
  logic [1:0] active;
  int checks = 0, failures = 0, switches = 0, stretched = 0;
  realtime t_rise0 = -1000, t_rise1 = -1000, t_out_rise = -1000, t_out_fall = -1000;
  realtime t_sel = 0;
  int last_src = -1;

  clk_mux dut (.*);

  initial forever begin #HALF clk0 = ~clk0; end
  initial begin #SHIFT; forever begin #HALF clk1 = ~clk1; end end

  always @(posedge clk0) t_rise0 = $realtime;
  always @(posedge clk1) t_rise1 = $realtime;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  always @(posedge clk_out) begin
    realtime now;
    int src;
    #0;
    now = $realtime;
    src = (t_rise0 == now) ? 0 : (t_rise1 == now) ? 1 : -1;
    check(src >= 0, "output rise coincides with an input rise");
    if (src >= 0) check(active[src], "rising input is the active one");
    if (t_out_rise >= 0) begin
      check(now - t_out_rise >= T - EPS, $sformatf("period %0.2f shorter than %0.2f", now - t_out_rise, T));
      if (now - t_out_rise > T + EPS) stretched++;
      check(now - t_out_fall >= HALF - EPS, "low phase too short");
    end
    if (last_src >= 0 && src >= 0 && src != last_src) switches++;
    last_src = src;
    t_out_rise = now;
  end

  // at most one input may ever be enabled
  always @(active) if (rst_n) check(active !== 2'b11, "both inputs enabled at once");

  always @(negedge clk_out) begin
    if (rst_n) check($realtime - t_out_rise >= HALF - EPS, "high phase too short");
    t_out_fall = $realtime;
  end

  initial begin
    #(3*T);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      #($urandom_range(1, 400) * 1.0);
      if (($urandom % 2) == 0) begin
        sel = ~sel;
        t_sel = $realtime;
      end
      if ($realtime - t_sel > 4*T) begin
        check(active === (sel ? 2'b10 : 2'b01), "output follows a stable select");
      end
    end
    // select toggling about every period, faster than a switch completes
    for (int n = 0; n < 3000; n++) begin
      #($urandom_range(2, 80) * 1.0);
      sel = $urandom % 2;
    end
    check(switches > 10, $sformatf("switches happened (%0d)", switches));
    check(stretched > 10, $sformatf("stretched periods happened (%0d)", stretched));
    $display("switches=%0d stretched=%0d", switches, stretched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
