// Runs the combined countermeasure in the other configurations that were
// evaluated: 3- and 4-phase clock noise, SRL-LFSR noise rows, and 8- and
// 32-row noise arrays (the default 2-phase, 16-row SRL build has its own
// end-to-end test). Each configuration encrypts random blocks under the
// random clock and is checked as described in top_variant_harness; each must
// see clock-source switches and stretched periods.
module tb_cpn_vn_aes_variants;
  import vn_pkg::*;
  localparam int NV = 4;

  int checks [NV], failures [NV], switches [NV], stretched [NV], used [NV];
  bit finished [NV];

  top_variant_harness #(.NUM_PHASES(3), .ROWS(16), .ROW_TYPE(VN_SRL)) h0
    (.checks (checks[0]), .failures (failures[0]), .switches (switches[0]),
     .stretched (stretched[0]), .phases_used (used[0]), .finished (finished[0]));
  top_variant_harness #(.NUM_PHASES(4), .ROWS(16), .ROW_TYPE(VN_SRL)) h1
    (.checks (checks[1]), .failures (failures[1]), .switches (switches[1]),
     .stretched (stretched[1]), .phases_used (used[1]), .finished (finished[1]));
  top_variant_harness #(.NUM_PHASES(2), .ROWS(16), .ROW_TYPE(VN_SRL_LFSR)) h2
    (.checks (checks[2]), .failures (failures[2]), .switches (switches[2]),
     .stretched (stretched[2]), .phases_used (used[2]), .finished (finished[2]));
  top_variant_harness #(.NUM_PHASES(2), .ROWS(8), .ROW_TYPE(VN_SRL)) h3
    (.checks (checks[3]), .failures (failures[3]), .switches (switches[3]),
     .stretched (stretched[3]), .phases_used (used[3]), .finished (finished[3]));

  // 32 rows uses every bit of the noise PRNG
  int c32, f32, s32, st32, u32;
  bit fin32;
  top_variant_harness #(.NUM_PHASES(2), .ROWS(32), .ROW_TYPE(VN_SRL)) h4
    (.checks (c32), .failures (f32), .switches (s32), .stretched (st32),
     .phases_used (u32), .finished (fin32));

  int total_checks = 0, total_failures = 0;

  initial begin
    #(52.083 * 20000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #1000;
      all_done = fin32;
      for (int v = 0; v < NV; v++) all_done &= finished[v];
    end while (!all_done);
    for (int v = 0; v < NV; v++) begin
      total_checks   += checks[v] + 2;
      total_failures += failures[v] + int'(switches[v] == 0) + int'(stretched[v] == 0);
      $display("config %0d: checks=%0d failures=%0d switches=%0d stretched=%0d phases used=%0d",
               v, checks[v], failures[v], switches[v], stretched[v], used[v]);
    end
    total_checks   += c32 + 2;
    total_failures += f32 + int'(s32 == 0) + int'(st32 == 0);
    $display("config 32 rows: checks=%0d failures=%0d switches=%0d stretched=%0d", c32, f32, s32, st32);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
