// tb_lut6_2: checks the segment INIT word against the configuration rules and the LUT6_2
// model against the intended segment behaviour: path keep/swap by the challenge bit, phase
// inversion by the XOR of the two logic inputs, single-LUT6 mode with I5 = 0, and the
// per-output propagation delay.
module tb_lut6_2;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [63:0] INIT = puf_pkg::segment_init();
  localparam int unsigned D6 = 300, D5 = 410;

  int checks = 0, failures = 0;
  logic i0, i1, i2, i3, i4, i5, o5, o6;

  lut6_2 #(.INIT (INIT), .O6_DELAY_PS (D6), .O5_DELAY_PS (D5)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zero_pos[8] = '{0, 7, 11, 12, 16, 23, 27, 28};
    int one_pos[8]  = '{3, 4, 8, 15, 19, 20, 24, 31};
    time t0;
    // configuration rules
    check(INIT == 64'hC33CA55A_A55AC33C, $sformatf("INIT value %h", INIT));
    for (int n = 0; n < 8; n++)
      check(INIT[32 + 4*n +: 4] == INIT[4*(7-n) +: 4], $sformatf("mirror nibble %0d", n));
    for (int k = 0; k < 16; k++)
      check((INIT[4*k] ^ INIT[4*k+3]) == 1'b1, $sformatf("INIT[4k]^INIT[4k+3], k=%0d", k));
    for (int i = 0; i < 8; i++) begin
      check(INIT[zero_pos[i]] == 1'b0, $sformatf("table zero position %0d", zero_pos[i]));
      check(INIT[one_pos[i]] == 1'b1, $sformatf("table one position %0d", one_pos[i]));
    end
    // segment behaviour, I5 = 1
    i5 = 1'b1;
    for (int v = 0; v < 32; v++) begin
      logic up, lo;
      {i4, i3, i2, i1, i0} = 5'(v);
      #1000;
      up = (i4 ? i1 : i0) ^ i3 ^ i2;
      lo = (i4 ? i0 : i1) ^ i3 ^ i2;
      check(o6 == up, $sformatf("o6 for inputs %b", 5'(v)));
      check(o5 == lo, $sformatf("o5 for inputs %b", 5'(v)));
    end
    // I5 = 0: a single LUT6 on the lower half, both outputs equal
    i5 = 1'b0;
    for (int v = 0; v < 32; v++) begin
      {i4, i3, i2, i1, i0} = 5'(v);
      #1000;
      check(o6 == INIT[v] && o5 == INIT[v], $sformatf("LUT6 mode %b", 5'(v)));
    end
    // delays: racing edge on the upper input with challenge 0 reaches o6 only
    i5 = 1'b1; {i4, i3, i2, i1, i0} = 5'b00000;
    #1000;
    t0 = $time;
    i0 = 1'b1;
    @(o6);
    check($time - t0 == D6, $sformatf("o6 delay %0t", $time - t0));
    // lower input with challenge 0 reaches o5
    t0 = $time;
    i1 = 1'b1;
    @(o5);
    check($time - t0 == D5, $sformatf("o5 delay %0t", $time - t0));
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
