// tb_arbiter_puf: one 16-segment PUF clocked as in the full design (racing signal = clock
// delayed by a quarter period). For random challenges and logic inputs it checks the
// response against the path-delay model (sum of the segment delays along the path each
// challenge selects; the faster lower path gives 1) and the segment levels at the clock
// edge against the running XOR of the logic inputs. Both racing phases must occur.
module tb_arbiter_puf;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 16, ID = 5, SEED = 32'h0BAD_F00D, BASE = 500, SPREAD = 100;
  localparam time T = 200_000;

  int checks = 0, failures = 0, n_in_phase = 0, n_anti = 0, n_tie = 0, n_one = 0;
  logic clk = 0, rst_n = 0, race_in = 0, response;
  logic [N-1:0] challenge, logic_a, logic_b, level;

  arbiter_puf #(.N (N), .CHAIN_ID (ID), .DEVICE_SEED (SEED), .BASE_PS (BASE), .SPREAD_PS (SPREAD))
    dut (.*);

  always #(T/2) clk = ~clk;
  always @(clk) race_in <= #(T/4) clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(T * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(logic [N-1:0] c);   // 0, 1, or -1 for a tie
    longint tu, tl, nu, nl;
    tu = 0; tl = 0;
    for (int s = 0; s < N; s++) begin
      nu = (c[s] ? tl : tu) + longint'(puf_pkg::lut_delay_ps(SEED, ID, s, 0, BASE, SPREAD));
      nl = (c[s] ? tu : tl) + longint'(puf_pkg::lut_delay_ps(SEED, ID, s, 1, BASE, SPREAD));
      tu = nu; tl = nl;
    end
    return (tl == tu) ? -1 : (tl < tu) ? 1 : 0;
  endfunction

  initial begin
    int e;
    logic par;
    challenge = '0; logic_a = '0; logic_b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1;
      challenge = N'($urandom);
      logic_a   = N'($urandom);
      logic_b   = N'($urandom);
      e = expected(challenge);
      @(posedge clk);
      par = 1'b0;
      for (int s = 0; s < N; s++) begin
        par ^= logic_a[s] ^ logic_b[s];
        check(level[s] == par, $sformatf("level %0d at clock edge", s));
      end
      if (par) n_anti++; else n_in_phase++;
      #1;
      if (e < 0) n_tie++;
      else begin
        check(response == e[0], $sformatf("challenge %h: response %0d expected %0d (phase %0d)", challenge, response, e, par));
        n_one += e;
      end
    end
    check(n_in_phase > 0 && n_anti > 0, "both racing phases seen");
    check(n_one > 0 && n_one < 400 - n_tie, "both response values seen");
    $display("in phase %0d, antiphase %0d, ties %0d, ones %0d", n_in_phase, n_anti, n_tie, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
