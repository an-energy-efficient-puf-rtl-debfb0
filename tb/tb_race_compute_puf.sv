// tb_race_compute_puf: end-to-end test of the full design at its default size (eight
// 64-segment PUFs, four 64-bit leap-forward LFSRs, 256-bit output). The racing signal is
// the clock delayed by a quarter period. Every clock it checks:
//  * each LFSR word against 64 single shifts of a reference Fibonacci LFSR (or the seed
//    after seed_load),
//  * each PUF response against the path-delay model of its chain,
//  * the Von Neumann outputs against a reference pairing model,
//  * out = LFSR words XOR the (raw or corrected) responses repeated 32 times.
// Three phases: random challenges with raw responses, random challenges with correction,
// then the output fed back as the next challenges (the stream mode used for randomness
// testing). Every mechanism is counted and must occur: seed load, both racing phases,
// both response values, corrected and dropped pairs, both post-processing modes, rows
// built as plain XOR.
module tb_race_compute_puf;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, NP = 8, NL = 4, SEED = 32'h1234_5678, BASE = 500, SPREAD = 100;
  localparam time T = 200_000;
  localparam int CYCLES = 240;

  int checks = 0, failures = 0;
  int n_load = 0, n_in_phase = 0, n_anti = 0, n_one = 0, n_zero = 0, n_tie = 0;
  int n_vn_bit = 0, n_vn_drop = 0, n_vn_mode = 0, n_raw_mode = 0, n_feedback = 0;

  logic clk = 0, rst_n = 0, race_in = 0;
  logic [NP-1:0][N-1:0] challenge;
  logic seed_load, vn_en;
  logic [NL-1:0][N-1:0] seed, lfsr_q;
  logic [NL*N-1:0] out;
  logic out_valid;
  logic [NP-1:0] puf_resp, vn_bit, vn_valid, vn_discard;

  race_compute_puf dut (.*);

  always #(T/2) clk = ~clk;
  always @(clk) race_in <= #(T/4) clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(T * (CYCLES + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] step64(logic [63:0] q, int k);
    for (int i = 0; i < k; i++) q = {^(q & puf_pkg::TAPS64), q[63:1]};
    return q;
  endfunction

  function automatic int expected(logic [N-1:0] c, int unsigned chain);   // -1 for a tie
    longint tu, tl, nu, nl;
    tu = 0; tl = 0;
    for (int s = 0; s < N; s++) begin
      nu = (c[s] ? tl : tu) + longint'(puf_pkg::lut_delay_ps(SEED, chain, s, 0, BASE, SPREAD));
      nl = (c[s] ? tu : tl) + longint'(puf_pkg::lut_delay_ps(SEED, chain, s, 1, BASE, SPREAD));
      tu = nu; tl = nl;
    end
    return (tl == tu) ? -1 : (tl < tu) ? 1 : 0;
  endfunction

  initial begin
    logic [NL-1:0][N-1:0] e_lfsr;
    logic [NP-1:0] e_resp, tie, vn_first, vn_held, e_vn_valid, e_vn_drop, sel, e_vn_bit;
    logic vn_second, e_valid;
    logic [NL*N-1:0] e_out, mask;

    challenge = '0; seed = '0; seed_load = 0; vn_en = 0;
    vn_first = '0; vn_held = '0; vn_second = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(out_valid == 0, "no valid output before the first race");
    // first clock: load seeds, race random challenges
    for (int l = 0; l < NL; l++) seed[l] = {$urandom, $urandom} | 64'h1;
    seed_load = 1;
    e_lfsr = seed;
    n_load++;
    for (int p = 0; p < NP; p++) challenge[p] = {$urandom, $urandom};
    for (int c = 0; c < CYCLES; c++) begin
      // expected results of this clock's race
      tie = '0; e_resp = '0;
      for (int p = 0; p < NP; p++) begin
        int e;
        e = expected(challenge[p], p);
        if (e < 0) begin tie[p] = 1; n_tie++; end
        else e_resp[p] = e[0];
      end
      // Von Neumann model sees this clock's registered responses
      e_vn_valid = '0; e_vn_drop = '0;
      if (out_valid) begin
        if (!vn_second) vn_first = puf_resp;
        else
          for (int p = 0; p < NP; p++)
            if (vn_first[p] != puf_resp[p]) begin vn_held[p] = vn_first[p]; e_vn_valid[p] = 1; end
            else e_vn_drop[p] = 1;
        vn_second = !vn_second;
      end
      e_vn_bit = vn_held;
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        if (dut.level[p][N-1]) n_anti++; else n_in_phase++;
      #1;
      // LFSR words
      for (int l = 0; l < NL; l++)
        check(lfsr_q[l] == e_lfsr[l], $sformatf("clock %0d lfsr %0d: %h expected %h", c, l, lfsr_q[l], e_lfsr[l]));
      check(out_valid == 1, "out_valid");
      // responses
      for (int p = 0; p < NP; p++)
        if (!tie[p]) begin
          check(puf_resp[p] == e_resp[p], $sformatf("clock %0d puf %0d response %0d expected %0d", c, p, puf_resp[p], e_resp[p]));
          if (e_resp[p]) n_one++; else n_zero++;
        end
      // Von Neumann
      check(vn_valid == e_vn_valid && vn_discard == e_vn_drop && vn_bit == e_vn_bit,
            $sformatf("clock %0d von Neumann valid %b/%b drop %b/%b bit %b/%b", c, vn_valid, e_vn_valid, vn_discard, e_vn_drop, vn_bit, e_vn_bit));
      n_vn_bit  += $countones(vn_valid);
      n_vn_drop += $countones(vn_discard);
      // combined output
      sel  = vn_en ? vn_bit : e_resp;
      e_out = e_lfsr ^ {32{sel}};
      mask = vn_en ? '1 : ~{32{tie}};
      check(((out ^ e_out) & mask) == '0, $sformatf("clock %0d combined output", c));
      if (vn_en) n_vn_mode++; else n_raw_mode++;
      // next clock's inputs
      seed_load = 0;
      vn_en = (c >= CYCLES / 3);
      if (c == CYCLES / 2) begin
        for (int l = 0; l < NL; l++) seed[l] = {$urandom, $urandom} | 64'h1;
        seed_load = 1;
        n_load++;
      end
      for (int l = 0; l < NL; l++) e_lfsr[l] = seed_load ? seed[l] : step64(e_lfsr[l], 64);
      if (c < 2 * CYCLES / 3) begin
        for (int p = 0; p < NP; p++) challenge[p] = {$urandom, $urandom};
      end else begin
        for (int p = 0; p < NP; p++) challenge[p] = out[N * (p % NL) +: N];
        n_feedback++;
      end
    end
    // every mechanism must have happened
    check(n_load >= 2, "seed load");
    check(n_in_phase > 0, "in-phase races");
    check(n_anti > 0, "antiphase races");
    check(n_one > 0 && n_zero > 0, "both response values");
    check(n_vn_bit > 0, "corrected bits");
    check(n_vn_drop > 0, "dropped pairs");
    check(n_vn_mode > 0 && n_raw_mode > 0, "both post-processing modes");
    check(n_feedback > 0, "output fed back as challenge");
    check(dut.g_lfsr[0].u_lfsr.FALLBACK_ROWS > 0, "rows as plain XOR present");
    $display("loads %0d in-phase %0d antiphase %0d ones %0d zeros %0d ties %0d vn bits %0d vn drops %0d vn clocks %0d raw clocks %0d feedback clocks %0d",
             n_load, n_in_phase, n_anti, n_one, n_zero, n_tie, n_vn_bit, n_vn_drop, n_vn_mode, n_raw_mode, n_feedback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
