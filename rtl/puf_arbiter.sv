// puf_arbiter: the arbiter at the end of a PUF chain, an SR-bar (active-low set/reset)
// latch, plus the flip-flops that turn its decision into a clocked response bit.
//
// Latch: while either input is low it is transparent (q = ~in_top); once both inputs are
// high it holds. So the first of the two paths to rise decides: upper path first gives
// q = 0, lower path first gives q = 1. A tie resolves to whichever change is seen last.
//
// Clocking (this design's choice; the published design only names the latch): racing edges rise
// at a quarter period and fall at three quarters. If the chain's XOR result is 0 the two
// inputs rise with race_in and the decision is valid at the falling clock edge, where
// q_neg samples it. If the result is 1 the inputs are inverted, rise with the falling
// racing edge and the decision is still held at the next rising clock edge. At that edge
// in_top shows which case applies (its level is the XOR result), and response takes
// either q_neg or the latch directly. response is valid one clock after the race.
// The latch is intended: it is the arbiter itself, an asynchronous storage element.
module puf_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic in_top,    // upper path end, SR-bar "set" input
  input  logic in_bot,    // lower path end, SR-bar "reset" input
  output logic response
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q, q_neg;

  always_latch begin
    if (!(in_top && in_bot)) q = !in_top;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_neg <= 1'b0;
    else        q_neg <= q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) response <= 1'b0;
    else        response <= in_top ? q : q_neg;
  end
endmodule
