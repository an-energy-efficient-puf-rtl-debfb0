// tb_vn_corrector: feeds eight random, partly biased bit streams (with gaps where in_valid
// is low) and compares the corrector's outputs with a reference pairing model.
module tb_vn_corrector;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 8;
  localparam time T = 10_000;

  int checks = 0, failures = 0, produced = 0, dropped = 0;
  logic clk = 0, rst_n = 0, in_valid;
  logic [N-1:0] in_bit, out_bit, out_valid, discard;

  vn_corrector #(.N (N)) dut (.*);

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

  initial begin
    logic [N-1:0] first, held, ev, ed;
    bit second;
    in_valid = 0; in_bit = '0;
    held = '0; second = 0; first = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      in_valid = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < N; i++) in_bit[i] = ($urandom_range(0, 99) < 20 + 8 * i);
      // reference
      ev = '0; ed = '0;
      if (in_valid) begin
        if (!second) first = in_bit;
        else
          for (int i = 0; i < N; i++)
            if (first[i] != in_bit[i]) begin held[i] = first[i]; ev[i] = 1; end
            else ed[i] = 1;
        second = !second;
      end
      @(posedge clk); #1;
      check(out_valid == ev && discard == ed && out_bit == held,
            $sformatf("clock %0d: valid %b/%b discard %b/%b bit %b/%b", c, out_valid, ev, discard, ed, out_bit, held));
      produced += $countones(ev);
      dropped  += $countones(ed);
    end
    check(produced > 0 && dropped > 0, "both outcomes seen");
    $display("corrected bits %0d, dropped pairs %0d", produced, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
