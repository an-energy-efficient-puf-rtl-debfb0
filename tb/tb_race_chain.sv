// tb_race_chain: races edges through a short chain and compares, for random challenges
// and logic inputs, the arrival time of each path end with the sum of the segment delays
// along the path the challenge selects, and every segment level with the racing level
// XOR the running parity of the logic inputs.
module tb_race_chain;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 12, ID = 3, SEED = 32'hCAFE_0001, BASE = 500, SPREAD = 100;

  int checks = 0, failures = 0;
  logic race_in;
  logic [N-1:0] challenge, logic_a, logic_b, level;
  logic out_top, out_bot;
  time t_top, t_bot;

  race_chain #(.N (N), .CHAIN_ID (ID), .DEVICE_SEED (SEED), .BASE_PS (BASE), .SPREAD_PS (SPREAD))
    dut (.*);


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    race_in = 0; challenge = '0; logic_a = '0; logic_b = '0;
    #50_000;
    for (int it = 0; it < 60; it++) begin
      time tu, tl, nu, nl, t0;
      logic par;
      challenge = N'({$urandom, $urandom});
      logic_a   = N'($urandom);
      logic_b   = N'($urandom);
      #50_000;
      // expected path delays
      tu = 0; tl = 0;
      for (int s = 0; s < N; s++) begin
        nu = (challenge[s] ? tl : tu) + time'(puf_pkg::lut_delay_ps(SEED, ID, s, 0, BASE, SPREAD));
        nl = (challenge[s] ? tu : tl) + time'(puf_pkg::lut_delay_ps(SEED, ID, s, 1, BASE, SPREAD));
        tu = nu; tl = nl;
      end
      for (int e = 0; e < 2; e++) begin
        t0 = $time;
        race_in = !race_in;
        fork
          begin @(out_top); t_top = $time; end
          begin @(out_bot); t_bot = $time; end
        join
        #40_000;
        check(t_top - t0 == tu, $sformatf("upper arrival %0t, expected %0t", t_top - t0, tu));
        check(t_bot - t0 == tl, $sformatf("lower arrival %0t, expected %0t", t_bot - t0, tl));
        par = race_in;
        for (int s = 0; s < N; s++) begin
          par ^= logic_a[s] ^ logic_b[s];
          check(level[s] == par, $sformatf("level of segment %0d", s));
        end
        check(out_top == out_bot, "path ends in phase");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
