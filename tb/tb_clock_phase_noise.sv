// Test of clock-phase noise with 2, 3 and 4 phases (0/90/180/270 degrees of
// a 52 ns clock; the system clock is phase 0). For each instance, at every
// rising edge of rand_clk: the edge must coincide with a rising edge of one
// of the phase clocks (its source), no period may be shorter than 52 ns, and
// once the PRNG select bits have not changed for six system clocks the
// source must be the one they select (mux tree of the 2/3/4-phase builds).
// Source switches and stretched periods are counted and must occur, and
// every phase must be used (three of four in the 4-phase build, where the
// two select bits are adjacent LFSR bits and phase 1 is starved).
module tb_clock_phase_noise;
  localparam realtime T = 52.0, EPS = 0.01;
  localparam int STABLE = 6;

  logic sys_clk, rst_n = 0;
  logic [3:0] ph = '0;
  logic [2:0] rclk;
  logic [7:0] prng [3];
  int checks = 0, failures = 0;

  // phase clocks: ph[k] is ph[0] delayed by k quarter periods
  initial forever begin #(T/2) ph[0] = ~ph[0]; end
  always @(ph[0]) ph[1] <= #(T/4) ph[0];
  always @(ph[0]) ph[2] <= #(T/2) ph[0];
  always @(ph[0]) ph[3] <= #(3*T/4) ph[0];
  assign sys_clk = ph[0];

  clock_phase_noise #(.NUM_PHASES(2)) dut2 (.sys_clk, .rst_n, .clk_ph (ph[1:0]), .rand_clk (rclk[0]), .prng (prng[0]));
  clock_phase_noise #(.NUM_PHASES(3)) dut3 (.sys_clk, .rst_n, .clk_ph (ph[2:0]), .rand_clk (rclk[1]), .prng (prng[1]));
  clock_phase_noise #(.NUM_PHASES(4)) dut4 (.sys_clk, .rst_n, .clk_ph (ph[3:0]), .rand_clk (rclk[2]), .prng (prng[2]));

  realtime t_ph [4] = '{-1000, -1000, -1000, -1000};
  for (genvar k = 0; k < 4; k++) begin : g_ph
    always @(posedge ph[k]) t_ph[k] = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int switches [3], stretched [3], settled [3];
  int used [3][4];

  for (genvar g = 0; g < 3; g++) begin : g_inst
    localparam int N = g + 2;
    int expect_hist [STABLE];
    realtime t_last = -1000;
    int last_src = -1;

    function automatic int expected_src(input logic [7:0] p);
      if (N == 2) return int'(p[0]);
      if (N == 3) return p[1] ? 2 : int'(p[0]);
      return int'({p[1], p[0]});
    endfunction

    always @(posedge sys_clk) begin
      for (int i = STABLE - 1; i > 0; i--) expect_hist[i] = expect_hist[i-1];
      expect_hist[0] = rst_n ? expected_src(prng[g]) : -1;
    end

    always @(posedge rclk[g]) begin
      realtime now;
      int src;
      bit stable;
      #0;
      now = $realtime;
      src = -1;
      for (int k = 0; k < N; k++) if (t_ph[k] == now) src = k;
      check(src >= 0, $sformatf("%0d-phase: rand_clk rise on a phase-clock rise", N));
      if (t_last >= 0) begin
        check(now - t_last >= T - EPS, $sformatf("%0d-phase: period %0.2f too short", N, now - t_last));
        if (now - t_last > T + EPS) stretched[g]++;
      end
      stable = 1;
      for (int i = 1; i < STABLE; i++) if (expect_hist[i] != expect_hist[0]) stable = 0;
      if (stable && expect_hist[0] >= 0) begin
        settled[g]++;
        check(src === expect_hist[0], $sformatf("%0d-phase: source %0d, PRNG selects %0d", N, src, expect_hist[0]));
      end
      if (src >= 0) used[g][src]++;
      if (last_src >= 0 && src >= 0 && src != last_src) switches[g]++;
      last_src = src;
      t_last = now;
    end
  end

  initial begin
    #(3*T + 1);
    rst_n = 1;
    #(3000*T);
    for (int g = 0; g < 3; g++) begin
      check(switches[g] > 20, $sformatf("%0d-phase: switches %0d", g + 2, switches[g]));
      check(stretched[g] > 20, $sformatf("%0d-phase: stretched periods %0d", g + 2, stretched[g]));
      check(settled[g] > 0, $sformatf("%0d-phase: settled-select checks %0d", g + 2, settled[g]));
      // In the 4-phase tree out[1] is out[0] one clock later (LFSR shift),
      // so phase 1 rarely if ever reaches the output: require 3 of 4 there.
      begin
        int n_used = 0;
        for (int k = 0; k < g + 2; k++) if (used[g][k] > 0) n_used++;
        check(n_used >= ((g === 2) ? 3 : g + 2), $sformatf("%0d-phase: %0d phases used", g + 2, n_used));
      end
      $display("%0d-phase: switches=%0d stretched=%0d settled=%0d use=%0d/%0d/%0d/%0d", g + 2,
               switches[g], stretched[g], settled[g], used[g][0], used[g][1], used[g][2], used[g][3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
