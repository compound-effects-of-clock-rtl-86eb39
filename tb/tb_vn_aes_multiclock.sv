// Test of voltage noise as a countermeasure on its own, beside an AES core,
// with the noise array clocked at one, two and four times the AES clock.
//
// The AES core runs on a 52 ns clock (about 19.2 MHz). Three noise clocks of
// 52, 26 and 13 ns come from one time base, so all of their rising edges
// coincide with AES edges, the way clock-manager outputs of 1x, 2x and 4x
// frequency would. Each noise clock drives four voltage_noise arrays of 8,
// 16, 24 and 32 rows of SRL rings, twelve arrays in all. The core encrypts
// random key/plaintext pairs meanwhile.
//
// Checks:
// * every ciphertext, against the reference model;
// * the 10-clock latency of the core;
// * per array, the row enables on every noise clock, against a model of the
//   32-bit PRNG;
// * per array, that a row's output toggles exactly when the row was enabled;
// * that each array's PRNG steps exactly RATIO times per AES clock;
// * that every array toggled rows while an encryption ran, and that at each
//   row count a faster noise clock switched more rows during the encryptions.
// The mean number of rows switched per AES clock is printed for each array.
module tb_vn_aes_multiclock;
  import vn_pkg::*;
  import aes_ref_pkg::*;

  localparam int NF = 3;
  localparam int NR = 4;
  localparam int RATIO [NF] = '{1, 2, 4};
  localparam int NUM_ENC = 20;
  localparam int LATENCY = 10;

  logic [NF-1:0] clk_vn = '0;
  logic          rst_n = 0;
  logic          clk_aes;
  logic          start = 0;
  logic [127:0]  key = '0, pt = '0, ct;
  logic          busy, done;
  bit            enc_active = 0;
  int checks = 0, failures = 0, aes_cycle = 0, enc_cycles = 0;

  assign clk_aes = clk_vn[0];

  // Time base: the first rising edge of every clock is at 6.5 ns.
  for (genvar f = 0; f < NF; f++) begin : g_clk
    initial begin
      #6.5;
      forever begin
        clk_vn[f] = ~clk_vn[f];
        #(26.0 / RATIO[f]);
      end
    end
  end

  aes128 u_aes (.clk (clk_aes), .rst_n, .start, .key, .pt, .ct, .busy, .done);

  always @(posedge clk_aes) begin
    aes_cycle++;
    if (enc_active) enc_cycles++;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar r = 0; r < NR; r++) begin : g_r
      localparam int ROWS = 8 * (r + 1);

      logic [ROWS-1:0] en, q, en_p, q_p;
      logic [31:0]     model;
      bit              armed = 0;
      int              steps = 0, toggles_enc = 0;

      voltage_noise #(.ROWS (ROWS)) u_vn (
        .clk    (clk_vn[f]),
        .rst_n,
        .row_en (en),
        .row_q  (q)
      );

      // PRNG model: x^32 + x^22 + x^2 + x + 1, shifting towards the MSB.
      always @(posedge clk_vn[f] or negedge rst_n) begin
        if (!rst_n) begin
          model <= 32'h1357_9BDF;
        end else begin
          model <= {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
          steps <= steps + 1;
        end
      end

      always @(negedge clk_vn[f]) begin
        if (rst_n) begin
          check(en === model[ROWS-1:0],
                $sformatf("%0dx/%0d rows: enables %h expected %h",
                          RATIO[f], ROWS, en, model[ROWS-1:0]));
          if (armed) begin
            check((q ^ q_p) === en_p,
                  $sformatf("%0dx/%0d rows: rows toggle exactly when enabled", RATIO[f], ROWS));
            if (enc_active) toggles_enc += $countones(en_p);
          end
          en_p  = en;
          q_p   = q;
          armed = 1;
        end
      end
    end
  end

  // PRNG steps of each array per AES clock, seen 1 ns after each AES edge.
  initial begin
    int last [NF][NR];
    wait (rst_n);
    @(posedge clk_aes);
    #1;
    last[0] = '{g_f[0].g_r[0].steps, g_f[0].g_r[1].steps, g_f[0].g_r[2].steps, g_f[0].g_r[3].steps};
    last[1] = '{g_f[1].g_r[0].steps, g_f[1].g_r[1].steps, g_f[1].g_r[2].steps, g_f[1].g_r[3].steps};
    last[2] = '{g_f[2].g_r[0].steps, g_f[2].g_r[1].steps, g_f[2].g_r[2].steps, g_f[2].g_r[3].steps};
    forever begin
      int now [NF][NR];
      @(posedge clk_aes);
      #1;
      now[0] = '{g_f[0].g_r[0].steps, g_f[0].g_r[1].steps, g_f[0].g_r[2].steps, g_f[0].g_r[3].steps};
      now[1] = '{g_f[1].g_r[0].steps, g_f[1].g_r[1].steps, g_f[1].g_r[2].steps, g_f[1].g_r[3].steps};
      now[2] = '{g_f[2].g_r[0].steps, g_f[2].g_r[1].steps, g_f[2].g_r[2].steps, g_f[2].g_r[3].steps};
      for (int f = 0; f < NF; f++)
        for (int r = 0; r < NR; r++)
          check(now[f][r] - last[f][r] === RATIO[f],
                $sformatf("%0dx/%0d rows: %0d PRNG steps in one AES clock",
                          RATIO[f], 8 * (r + 1), now[f][r] - last[f][r]));
      last = now;
    end
  end

  task automatic encrypt(input logic [127:0] k, input logic [127:0] p);
    int t0;
    logic [127:0] exp;
    exp = ref_encrypt(k, p);
    @(negedge clk_aes);
    key = k; pt = p; start = 1;
    enc_active = 1;
    @(negedge clk_aes);
    t0 = aes_cycle;   // counts the start edge
    start = 0;
    while (!done) @(negedge clk_aes);
    check(aes_cycle - t0 === LATENCY,
          $sformatf("latency %0d expected %0d", aes_cycle - t0, LATENCY));
    check(ct === exp, $sformatf("ct %h expected %h", ct, exp));
    enc_active = 0;
  endtask

  initial begin
    int tog [NF][NR];
    int cyc0;
    #275;
    rst_n = 1;
    repeat (3) @(negedge clk_aes);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    cyc0 = aes_cycle;
    for (int n = 1; n < NUM_ENC; n++)
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(negedge clk_aes);

    tog[0] = '{g_f[0].g_r[0].toggles_enc, g_f[0].g_r[1].toggles_enc, g_f[0].g_r[2].toggles_enc, g_f[0].g_r[3].toggles_enc};
    tog[1] = '{g_f[1].g_r[0].toggles_enc, g_f[1].g_r[1].toggles_enc, g_f[1].g_r[2].toggles_enc, g_f[1].g_r[3].toggles_enc};
    tog[2] = '{g_f[2].g_r[0].toggles_enc, g_f[2].g_r[1].toggles_enc, g_f[2].g_r[2].toggles_enc, g_f[2].g_r[3].toggles_enc};
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < NR; r++) begin
        check(tog[f][r] > 0,
              $sformatf("%0dx/%0d rows: no row toggled during encryptions", RATIO[f], 8 * (r + 1)));
        $display("noise %0dx AES clock, %2d rows: %0d row toggles during encryptions, %0d per AES clock",
                 RATIO[f], 8 * (r + 1), tog[f][r], tog[f][r] / enc_cycles);
      end
    // More rows switch per AES clock when the noise clock is faster.
    for (int r = 0; r < NR; r++) begin
      check(tog[1][r] > tog[0][r], $sformatf("2x switches more than 1x at %0d rows", 8 * (r + 1)));
      check(tog[2][r] > tog[1][r], $sformatf("4x switches more than 2x at %0d rows", 8 * (r + 1)));
    end
    $display("AES clocks from first encryption: %0d", aes_cycle - cyc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
