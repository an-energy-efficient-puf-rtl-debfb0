// tb_stream_randomness: produces one 10,000-bit stream the way the randomness evaluation
// does: the full-size design runs with Von Neumann correction on, and each clock's 256-bit
// output is fed back as the next challenges (chain p takes bits 64*(p mod 4) +: 64). It
// then applies three tests of the NIST SP 800-22 suite to the first 10,000 output bits at
// the significance level 0.05:
//  * frequency (monobit): |sum(2b-1)|/sqrt(n) <= 1.960   (erfc(x/sqrt2) >= 0.05)
//  * block frequency, M = 128, 78 blocks: chi2 = 4M sum (pi_i - 1/2)^2 <= 99.62
//    (upper 5% point of chi-square with 78 degrees of freedom)
//  * runs: prerequisite |pi - 1/2| < 2/sqrt(n), then
//    |V - 2n pi(1-pi)| / (2 sqrt(2n) pi(1-pi)) <= 1.386       (erfc(x) >= 0.05)
// It also checks that the output is 0/1 balanced per bit position family (each of the
// 256 positions takes both values) and reports the same statistics for the raw PUF bits.
module tb_stream_randomness;
  timeunit 1ps;
  timeprecision 1ps;

  localparam time T = 200_000;
  localparam int NBITS = 10_000;
  localparam int CLOCKS = (NBITS + 255) / 256;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, race_in = 0;
  logic [7:0][63:0] challenge;
  logic seed_load = 0, vn_en = 1;
  logic [3:0][63:0] seed = '0, lfsr_q;
  logic [255:0] out;
  logic out_valid;
  logic [7:0] puf_resp, vn_bit, vn_valid, vn_discard;

  race_compute_puf dut (.*);

  always #(T/2) clk = ~clk;
  always @(clk) race_in <= #(T/4) clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(T * (CLOCKS + 50));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stream [NBITS];
  bit raw [CLOCKS * 8];

  initial begin
    int n, ones, runs, blocks;
    real s_obs, chi2, pi, x, sum_sq;
    logic [255:0] seen0, seen1;
    seen0 = '0; seen1 = '0;
    for (int p = 0; p < 8; p++) challenge[p] = 64'h5DEE_CE66_D1CE_0000 + 64'(p);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;     // first response registered
    n = 0;
    for (int c = 0; c < CLOCKS; c++) begin
      for (int p = 0; p < 8; p++) challenge[p] = out[64 * (p % 4) +: 64];
      @(posedge clk); #1;
      for (int i = 0; i < 256; i++) begin
        if (n < NBITS) stream[n] = out[i];
        n++;
      end
      for (int p = 0; p < 8; p++) raw[8*c + p] = puf_resp[p];
      seen0 |= ~out; seen1 |= out;
    end
    // frequency
    ones = 0;
    for (int i = 0; i < NBITS; i++) ones += int'(stream[i]);
    s_obs = ((2.0 * ones - NBITS) < 0 ? -(2.0 * ones - NBITS) : (2.0 * ones - NBITS)) / $sqrt(real'(NBITS));
    $display("frequency: ones %0d of %0d, s_obs %f", ones, NBITS, s_obs);
    check(s_obs <= 1.960, "frequency test");
    // block frequency
    blocks = NBITS / 128;
    sum_sq = 0.0;
    for (int b = 0; b < blocks; b++) begin
      int k;
      k = 0;
      for (int i = 0; i < 128; i++) k += int'(stream[128*b + i]);
      sum_sq += (real'(k) / 128.0 - 0.5) ** 2;
    end
    chi2 = 4.0 * 128.0 * sum_sq;
    $display("block frequency: chi2 %f over %0d blocks", chi2, blocks);
    check(chi2 <= 99.62, "block frequency test");
    // runs
    pi = real'(ones) / NBITS;
    check((pi - 0.5 < 0 ? 0.5 - pi : pi - 0.5) < 2.0 / $sqrt(real'(NBITS)), "runs prerequisite");
    runs = 1;
    for (int i = 1; i < NBITS; i++) if (stream[i] != stream[i-1]) runs++;
    x = (real'(runs) - 2.0 * NBITS * pi * (1.0 - pi));
    if (x < 0) x = -x;
    x = x / (2.0 * $sqrt(2.0 * NBITS) * pi * (1.0 - pi));
    $display("runs: %0d, statistic %f", runs, x);
    check(x <= 1.386, "runs test");
    check(&seen0 && &seen1, "every output position takes both values");
    ones = 0;
    for (int i = 0; i < CLOCKS * 8; i++) ones += int'(raw[i]);
    $display("raw PUF bits (for comparison): %0d ones of %0d", ones, CLOCKS * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
