// vn_corrector: Von Neumann correctors for N independent bit streams (one per arbiter PUF).
//
// Each stream is cut into pairs of consecutive valid bits. A pair 0,1 yields 0 and a pair
// 1,0 yields 1 (the first bit); pairs 0,0 and 1,1 yield nothing. This removes the bias of
// a stream whose bits are independent. out_valid[i] pulses for one clock when stream i
// produced a bit; out_bit[i] keeps the latest produced bit until the next one, so that it
// can be combined every clock. Pairing starts afresh after reset; in_valid gates the input.
// discard[i] pulses when a pair was dropped.
module vn_corrector #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_bit,
  output logic [N-1:0] out_bit,
  output logic [N-1:0] out_valid,
  output logic [N-1:0] discard
);
  timeunit 1ps;
  timeprecision 1ps;

  logic         second;   // next valid bit closes a pair
  logic [N-1:0] first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second    <= 1'b0;
      first     <= '0;
      out_bit   <= '0;
      out_valid <= '0;
      discard   <= '0;
    end else begin
      out_valid <= '0;
      discard   <= '0;
      if (in_valid) begin
        second <= !second;
        if (!second) begin
          first <= in_bit;
        end else begin
          for (int i = 0; i < N; i++) begin
            if (first[i] != in_bit[i]) begin
              out_bit[i]   <= first[i];
              out_valid[i] <= 1'b1;
            end else begin
              discard[i]   <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
