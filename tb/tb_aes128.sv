// Self-checking test of the iterative AES-128 core: the FIPS-197 example
// vectors, random key/plaintext pairs against the reference model, the
// 10-clock start-to-done latency, and that start is ignored while busy.
module tb_aes128;
  import aes_ref_pkg::*;

  localparam int LATENCY = 10;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] key = '0, pt = '0, ct;
  logic         busy, done;
  int checks = 0, failures = 0, cycle = 0;

  aes128 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  task automatic encrypt(input logic [127:0] k, input logic [127:0] p,
                         input logic [127:0] exp, input bit poke_busy);
    int t0, lat;
    logic [127:0] k2, p2;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    t0 = cycle;   // counts the start edge
    start = 0;
    check(busy === 1'b1, "busy after start");
    if (poke_busy) begin
      // a second start while busy, with other data, must be ignored
      k2 = ~k; p2 = ~p;
      key = k2; pt = p2; start = 1;
      @(negedge clk);
      start = 0;
    end
    while (!done) @(negedge clk);
    lat = cycle - t0;
    check(lat === LATENCY, $sformatf("latency %0d expected %0d", lat, LATENCY));
    check(ct === exp, $sformatf("ct %032h expected %032h", ct, exp));
    check(busy === 1'b0, "busy low at done");
    @(negedge clk);
    check(done === 1'b0, "done is a single pulse");
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reference model sanity against FIPS-197
    check(ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model C.1");
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int n = 0; n < 60; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      if (n == 0) k = '0;
      if (n == 1) k = '1;
      encrypt(k, p, ref_encrypt(k, p), n % 7 == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
