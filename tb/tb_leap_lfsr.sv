// tb_leap_lfsr: runs two leap-forward LFSRs on an ideal model of their chains (level of a
// segment = running XOR of the logic inputs, as seen at the rising clock edge):
//  * the 4-bit example, checked against its printed next-state equations
//      q0' = q0^q3, q1' = q0^q1^q3, q2' = q0^q1^q2^q3, q3' = q0^q1^q2
//    and for a full period of 15 clocks;
//  * the default 64-bit LFSR on two 64-segment chains, checked against 64 single shifts
//    of a plain Fibonacci LFSR per clock, with seed loading.
module tb_leap_lfsr;
  timeunit 1ps;
  timeprecision 1ps;

  localparam time T = 10_000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #(T/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(T * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal chains: prefix XOR of the segment logic inputs, restarting per chain
  function automatic logic [127:0] chain_levels(logic [127:0] a, logic [127:0] b, int segs, int n);
    logic [127:0] lv;
    logic par;
    lv = '0;
    for (int s = 0; s < n; s++) begin
      if (s % segs == 0) par = 1'b0;
      par ^= a[s] ^ b[s];
      lv[s] = par;
    end
    return lv;
  endfunction

  // 4-bit example
  logic       load4;
  logic [3:0] seed4, q4, a4, b4, lv4;
  leap_lfsr #(.W (4), .TAPS (64'h9), .SEGS (4), .CHAINS (1), .RESET_SEED (64'h1)) u4 (
    .clk, .rst_n, .load (load4), .seed (seed4), .seg_level (lv4), .seg_a (a4), .seg_b (b4), .q (q4));
  always_comb lv4 = chain_levels(128'(a4), 128'(b4), 4, 4)[3:0];

  // default 64-bit LFSR on two chains
  logic         load64;
  logic [63:0]  seed64, q64;
  logic [127:0] a64, b64, lv64;
  leap_lfsr u64 (
    .clk, .rst_n, .load (load64), .seed (seed64), .seg_level (lv64), .seg_a (a64), .seg_b (b64), .q (q64));
  always_comb lv64 = chain_levels(a64, b64, 64, 128);

  function automatic logic [63:0] step64(logic [63:0] q, int k);
    for (int i = 0; i < k; i++) q = {^(q & puf_pkg::TAPS64), q[63:1]};
    return q;
  endfunction

  initial begin
    logic [3:0]  e4, start4;
    logic [63:0] e64;
    load4 = 0; load64 = 0; seed4 = '0; seed64 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(q4 == 4'h1 && q64 == 64'h0123_4567_89AB_CDEF, "reset seeds");
    $display("64-bit layout: %0d segments carry logic, %0d rows as plain XOR",
             u64.USED_SEGS, u64.FALLBACK_ROWS);
    check(u64.USED_SEGS <= 128 && u64.FALLBACK_ROWS < 64, "64-bit layout fits");
    check(u4.FALLBACK_ROWS == 0 && u4.USED_SEGS == 4, "4-bit example uses exactly 4 segments");
    // 4-bit: equations (1)-(4)
    seed4 = 4'b1011; load4 = 1;
    @(posedge clk); #1 load4 = 0;
    check(q4 == 4'b1011, "4-bit seed load");
    start4 = q4;
    for (int c = 1; c <= 15; c++) begin
      e4[0] = q4[0] ^ q4[3];
      e4[1] = q4[0] ^ q4[1] ^ q4[3];
      e4[2] = q4[0] ^ q4[1] ^ q4[2] ^ q4[3];
      e4[3] = q4[0] ^ q4[1] ^ q4[2];
      @(posedge clk); #1;
      check(q4 == e4, $sformatf("4-bit step %0d: %b expected %b", c, q4, e4));
      if (c < 15) check(q4 != start4, "4-bit period shorter than 15");
    end
    check(q4 == start4, "4-bit period 15");
    // 64-bit: against 64 single steps
    for (int c = 0; c < 300; c++) begin
      if (c == 100) begin
        seed64 = {$urandom, $urandom} | 64'h1;
        load64 = 1;
        @(posedge clk); #1 load64 = 0;
        check(q64 == seed64, "64-bit seed load");
      end
      e64 = step64(q64, 64);
      @(posedge clk); #1;
      check(q64 == e64, $sformatf("64-bit clock %0d: %h expected %h", c, q64, e64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
