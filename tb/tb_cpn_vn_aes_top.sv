// End-to-end test of the combined countermeasure at its default size
// (2 clock phases, 16 noise rows of 32x32-bit shift registers, SRL rows).
// A 19.2 MHz system clock feeds a behavioural clock manager that makes the
// 0 and 90 degree clocks. The host side drives start/key/pt on the falling
// edge of the random clock and checks every ciphertext against a reference
// AES model, with the latency in random-clock cycles (10). It also checks,
// per random-clock edge, that no period is shorter than the nominal one,
// that each edge comes from one of the phase clocks, and that each noise
// row's output toggles exactly when its PRNG enable was set.
// Mechanisms counted (each must happen): clock-source switch, stretched
// clock period, encryption slowed by the random clock, noise row toggling,
// change in the number of enabled rows, every row enabled at some point.
module tb_cpn_vn_aes_top;
  import aes_ref_pkg::*;
  localparam realtime T = 52.083, EPS = 0.01;
  localparam int ROWS = 16, N_ENC = 120, LATENCY = 10;

  logic sys_clk = 0, rst_n = 0, locked;
  logic [1:0] clk_ph;
  logic rand_clk, start = 0, busy, done;
  logic [127:0] key = '0, pt = '0, ct;
  logic [7:0] cpn_sel;
  logic [ROWS-1:0] vn_row_en, vn_row_q;

  int checks = 0, failures = 0;
  int n_switch = 0, n_stretch = 0, n_slow_enc = 0, n_row_toggle = 0, n_count_change = 0;
  int rclk_cycles = 0, min_on = ROWS + 1, max_on = -1;
  logic [ROWS-1:0] rows_seen = '0;
  realtime max_enc_time = 0;

  always #(T/2) sys_clk = ~sys_clk;

  mmcm_model #(.NUM_OUT(2), .PERIOD(T)) u_mmcm (.clk_in (sys_clk), .clk_out (clk_ph), .locked (locked));

  cpn_vn_aes_top dut (
    .sys_clk, .rst_n, .clk_ph, .rand_clk, .start, .key, .pt, .ct, .busy, .done,
    .cpn_sel, .vn_row_en, .vn_row_q
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #(T * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- random clock monitor ----
  realtime t_ph [2] = '{-1000, -1000};
  always @(posedge clk_ph[0]) t_ph[0] = $realtime;
  always @(posedge clk_ph[1]) t_ph[1] = $realtime;

  realtime t_last = -1000;
  int last_src = -1;
  logic [ROWS-1:0] q_prev, en_prev;
  bit vn_live = 0;
  bit host_ready = 0;
  int last_on = -1;

  always @(posedge rand_clk) begin
    realtime now;
    int src, on;
    #0;
    now = $realtime;
    rclk_cycles++;
    src = (t_ph[0] == now) ? 0 : (t_ph[1] == now) ? 1 : -1;
    check(src >= 0, "random clock edge comes from a phase clock");
    if (t_last >= 0) begin
      check(now - t_last >= T - EPS, $sformatf("random clock period %0.3f too short", now - t_last));
      if (now - t_last > T + EPS) n_stretch++;
    end
    if (last_src >= 0 && src >= 0 && src != last_src) n_switch++;
    last_src = src;
    t_last = now;
  end

  // noise rows: sample just after each edge has settled
  always @(negedge rand_clk) begin
    int on;
    if (host_ready) begin
      if (vn_live) begin
        check((vn_row_q ^ q_prev) === en_prev, "noise rows toggle exactly when enabled");
        n_row_toggle += $countones(vn_row_q ^ q_prev);
      end
      on = $countones(vn_row_en);
      if (on < min_on) min_on = on;
      if (on > max_on) max_on = on;
      if (last_on >= 0 && on != last_on) n_count_change++;
      last_on = on;
      rows_seen |= vn_row_en;
      q_prev  = vn_row_q;
      en_prev = vn_row_en;
      vn_live = 1;
    end
  end

  // ---- host ----
  task automatic encrypt(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int c0;
    realtime t0, dt;
    @(negedge rand_clk);
    key = k; pt = p; start = 1;
    @(negedge rand_clk);
    start = 0;
    c0 = rclk_cycles;
    t0 = t_last;
    check(busy === 1'b1, "busy after start");
    while (!done) @(negedge rand_clk);
    check(rclk_cycles - c0 === LATENCY, $sformatf("latency %0d random-clock cycles", rclk_cycles - c0));
    check(ct === exp, $sformatf("ct %032h expected %032h", ct, exp));
    dt = t_last - t0;
    if (dt > LATENCY * T + EPS) n_slow_enc++;
    if (dt > max_enc_time) max_enc_time = dt;
  endtask

  initial begin
    logic [127:0] k, p;
    wait (locked);
    repeat (4) @(posedge sys_clk);
    rst_n = 1;
    repeat (4) @(negedge rand_clk);
    host_ready = 1;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < N_ENC; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(k, p, ref_encrypt(k, p));
      repeat ($urandom_range(0, 3)) @(negedge rand_clk);
    end
    check(n_switch > 0,       $sformatf("clock-source switches: %0d", n_switch));
    check(n_stretch > 0,      $sformatf("stretched periods: %0d", n_stretch));
    check(n_slow_enc > 0,     $sformatf("encryptions slowed by the random clock: %0d", n_slow_enc));
    check(n_row_toggle > 0,   $sformatf("noise row toggles: %0d", n_row_toggle));
    check(n_count_change > 0, $sformatf("changes in number of enabled rows: %0d", n_count_change));
    check(rows_seen === '1,    "every noise row enabled at least once");
    $display("random-clock cycles=%0d switches=%0d stretched=%0d slow encryptions=%0d of %0d",
             rclk_cycles, n_switch, n_stretch, n_slow_enc, N_ENC + 2);
    $display("longest encryption %0.1f ns = %0.2f x nominal; rows enabled per clock %0d..%0d",
             max_enc_time, max_enc_time / (LATENCY * T), min_on, max_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
