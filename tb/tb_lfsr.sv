// Test of the LFSR PRNG: an 8-bit instance must run through all 255 non-zero
// states before repeating; a 32-bit instance must match a tap-by-tap model of
// x^32+x^22+x^2+x+1 step for step; both hold their state while en=0 and
// reset to the seed.
module tb_lfsr;
  logic clk = 0, rst_n = 1, en = 0;
  logic [7:0]  s8;
  logic [31:0] s32, m32;
  int checks = 0, failures = 0;
  bit seen [256];

  lfsr #(.WIDTH(8), .TAPS(8'hB8), .SEED(8'h01)) dut8 (.clk, .rst_n, .en, .state (s8));
  lfsr dut32 (.clk, .rst_n, .en, .state (s32));

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
    int period;
    logic [7:0] first;
    logic [7:0] h8;
    logic [31:0] h32;
    #1 rst_n = 0;
    #1;
    check(s8 === 8'h01 && s32 === 32'h1, "reset value is the seed");
    m32 = 32'h1;
    @(negedge clk); rst_n = 1; en = 1;
    first = s8;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      if (s8 === 0) check(0, "8-bit LFSR reached zero");
      if (period < 255) begin
        if (seen[s8]) check(0, $sformatf("state %02h repeated early", s8));
        seen[s8] = 1;
      end
      // 32-bit model: feedback = s31 ^ s21 ^ s1 ^ s0
      m32 = {m32[30:0], m32[31] ^ m32[21] ^ m32[1] ^ m32[0]};
      check(s32 === m32, $sformatf("32-bit state %08h expected %08h", s32, m32));
    end while (s8 != first && period < 300);
    check(period === 255, $sformatf("8-bit period %0d expected 255", period));
    // hold while disabled
    en = 0; h8 = s8; h32 = s32;
    repeat (5) @(negedge clk);
    check(s8 === h8 && s32 === h32, "state held while en=0");
    // reset again
    rst_n = 0; #1;
    check(s8 === 8'h01 && s32 === 32'h1, "asynchronous reset to seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
