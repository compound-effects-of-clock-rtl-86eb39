// Test harness for one configuration of the combined countermeasure: a
// behavioural clock manager with NUM_PHASES outputs 90 degrees apart, the
// top module with the given parameters, and a host that runs N_ENC random
// encryptions on the random clock and checks each against the reference
// model (ciphertext and 10-cycle latency). Per random-clock edge it checks
// the period (never below nominal) and the edge source (a phase clock);
// per noise-array clock it checks that disabled rows hold and, for SRL rows,
// that enabled rows toggle. Results are returned through the output ports;
// finished rises when the run is over.
module top_variant_harness
  import vn_pkg::*;
#(
  parameter int unsigned  NUM_PHASES = 2,
  parameter int unsigned  ROWS       = 16,
  parameter vn_row_type_e ROW_TYPE   = VN_SRL,
  parameter int           N_ENC      = 40
) (
  output int checks,
  output int failures,
  output int switches,
  output int stretched,
  output int phases_used,
  output bit finished
);
  import aes_ref_pkg::*;
  localparam realtime T = 52.083, EPS = 0.01;
  localparam int LATENCY = 10;

  logic sys_clk = 0, rst_n = 0, locked;
  logic [NUM_PHASES-1:0] clk_ph;
  logic rand_clk, start = 0, busy, done;
  logic [127:0] key = '0, pt = '0, ct;
  logic [7:0] cpn_sel;
  logic [ROWS-1:0] row_en, row_q, q_prev, en_prev;
  int rclk_cycles = 0, last_src = -1;
  realtime t_last = -1000;
  realtime t_ph [NUM_PHASES];
  bit used [NUM_PHASES];
  bit host_ready = 0, vn_live = 0;

  initial begin
    checks = 0; failures = 0; switches = 0; stretched = 0; phases_used = 0; finished = 0;
    for (int k = 0; k < NUM_PHASES; k++) begin t_ph[k] = -1000; used[k] = 0; end
  end

  always #(T/2) sys_clk = ~sys_clk;

  mmcm_model #(.NUM_OUT(NUM_PHASES), .PERIOD(T)) u_mmcm (.clk_in (sys_clk), .clk_out (clk_ph), .locked (locked));

  cpn_vn_aes_top #(.NUM_PHASES(NUM_PHASES), .VN_ROWS(ROWS), .VN_ROW_TYPE(ROW_TYPE)) dut (
    .sys_clk, .rst_n, .clk_ph, .rand_clk, .start, .key, .pt, .ct, .busy, .done,
    .cpn_sel, .vn_row_en (row_en), .vn_row_q (row_q)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d phases, %0d rows, %s] %s at %0t", NUM_PHASES, ROWS, ROW_TYPE.name(), what, $realtime);
    end
  endtask

  for (genvar k = 0; k < NUM_PHASES; k++) begin : g_ph
    always @(posedge clk_ph[k]) t_ph[k] = $realtime;
  end

  always @(posedge rand_clk) begin
    realtime now;
    int src;
    #0;
    now = $realtime;
    rclk_cycles++;
    src = -1;
    for (int k = 0; k < NUM_PHASES; k++) if (t_ph[k] == now) src = k;
    check(src >= 0, "random clock edge comes from a phase clock");
    if (src >= 0) used[src] = 1;
    if (t_last >= 0) begin
      check(now - t_last >= T - EPS, "random clock period not below nominal");
      if (now - t_last > T + EPS) stretched++;
    end
    if (last_src >= 0 && src >= 0 && src != last_src) switches++;
    last_src = src;
    t_last = now;
  end

  always @(negedge rand_clk) begin
    if (host_ready) begin
      if (vn_live) begin
        check(((row_q ^ q_prev) & ~en_prev) === '0, "disabled noise rows hold");
        if (ROW_TYPE == VN_SRL)
          check((row_q ^ q_prev) === en_prev, "enabled SRL rows toggle");
      end
      q_prev  = row_q;
      en_prev = row_en;
      vn_live = 1;
    end
  end

  task automatic encrypt(input logic [127:0] k, input logic [127:0] p);
    int c0;
    @(negedge rand_clk);
    key = k; pt = p; start = 1;
    @(negedge rand_clk);
    start = 0;
    c0 = rclk_cycles;
    while (!done) @(negedge rand_clk);
    check(rclk_cycles - c0 === LATENCY, "latency in random-clock cycles");
    check(ct === ref_encrypt(k, p), "ciphertext matches the reference");
  endtask

  initial begin
    wait (locked);
    repeat (4) @(posedge sys_clk);
    rst_n = 1;
    repeat (4) @(negedge rand_clk);
    host_ready = 1;
    for (int n = 0; n < N_ENC; n++)
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int k = 0; k < NUM_PHASES; k++) phases_used += int'(used[k]);
    finished = 1;
  end
endmodule
