// tb_puf_arbiter: drives the two arbiter inputs with edges in both orders, in phase with
// the racing signal (rising in the first half of the clock) and in antiphase (rising in
// the second half), and checks the registered response: 0 when the upper input rises
// first, 1 when the lower one does, one clock after the race.
module tb_puf_arbiter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam time T = 200_000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_top, in_bot, response;

  puf_arbiter dut (.*);

  always #(T/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(T * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_top = 0; in_bot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 80; it++) begin
      bit anti, lower_first;
      int unsigned d1, d2;
      anti = it[0];
      lower_first = $urandom_range(0, 1);
      d1 = $urandom_range(1000, 20_000);
      d2 = $urandom_range(1, 3000);
      @(posedge clk);
      // in phase: inputs low until the racing edge at T/4 + d1, fall again at 3T/4 + d1;
      // antiphase: inputs high, fall at T/4 + d1, rise at 3T/4 + d1 and stay high.
      #1;
      in_top = anti; in_bot = anti;
      #(T/4 + d1 - 1);
      if (anti) begin
        in_top = 0; in_bot = 0;
        #(T/2);
      end
      if (lower_first) in_bot = 1; else in_top = 1;
      #(d2);
      in_top = 1; in_bot = 1;
      if (!anti) begin
        #(T/2 - d2);
        in_top = 0; in_bot = 0;
      end
      @(posedge clk);
      #1;
      check(response == lower_first, $sformatf("it %0d anti %0d lower_first %0d got %0d", it, anti, lower_first, response));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
