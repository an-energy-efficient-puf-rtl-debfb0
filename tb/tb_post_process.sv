// tb_post_process: random LFSR words and PUF bits, both modes; each output bit is checked
// against lfsr bit XOR the PUF bit (index mod 8) it is combined with.
module tb_post_process;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [255:0] lfsr_cat, out;
  logic [7:0] puf_raw, puf_vn;
  logic vn_en;

  post_process dut (.*);

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      bit ok;
      for (int w = 0; w < 8; w++) lfsr_cat[32*w +: 32] = $urandom;
      puf_raw = 8'($urandom);
      puf_vn  = 8'($urandom);
      vn_en   = it[0];
      #10;
      ok = 1;
      for (int i = 0; i < 256; i++)
        if (out[i] != (lfsr_cat[i] ^ (vn_en ? puf_vn[i % 8] : puf_raw[i % 8]))) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL it %0d", it); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
