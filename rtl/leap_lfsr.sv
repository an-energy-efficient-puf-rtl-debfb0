// leap_lfsr: state register of one W-bit leap-forward LFSR whose XOR network is the
// logic of PUF chain segments.
//
// The LFSR moves W steps per clock: Q' = A^W * Q (see puf_pkg::leap_rows), so all W state
// bits are new every clock. Row j of A^W is placed on the segments this LFSR owns
// (CHAINS chains of SEGS segments, puf_pkg::make_layout). seg_a/seg_b drive the two logic
// inputs of every owned segment from the current state (0 where unused); seg_level is
// the racing level after every segment. At the rising clock edge the racing signal is
// low, so seg_level equals the XOR carried by the chain, and the flip-flop of state bit j
// simply samples seg_level at the row's last segment: the same flip-flops hold the LFSR
// state and decode the racing phase. Rows that do not fit on the chains (their count is
// FALLBACK_ROWS) are computed with ordinary XOR gates.
//
// load copies seed into the state (and wins over stepping); reset loads RESET_SEED. The
// all-zero state never leaves itself, so seed must not be 0.
module leap_lfsr #(
  parameter int unsigned  W          = 64,
  parameter logic [63:0]  TAPS       = puf_pkg::TAPS64,
  parameter int unsigned  SEGS       = 64,
  parameter int unsigned  CHAINS     = 2,
  parameter logic [63:0]  RESET_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [W-1:0]             seed,
  input  logic [CHAINS*SEGS-1:0]   seg_level,
  output logic [CHAINS*SEGS-1:0]   seg_a,
  output logic [CHAINS*SEGS-1:0]   seg_b,
  output logic [W-1:0]             q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned     NSEG = CHAINS * SEGS;
  localparam puf_pkg::layout_t LAY = puf_pkg::make_layout(W, TAPS, SEGS, CHAINS);
  localparam puf_pkg::rows_t   ROWS = puf_pkg::leap_rows(W, TAPS);
  localparam int unsigned     FALLBACK_ROWS = int'(LAY.fallback);
  localparam int unsigned     USED_SEGS     = int'(LAY.used_segs);

  initial begin
    assert (W <= puf_pkg::MAXW && NSEG <= puf_pkg::MAXSEG)
      else $error("leap_lfsr: W or CHAINS*SEGS above the layout limits");
    assert (USED_SEGS <= NSEG && FALLBACK_ROWS < W)
      else $error("leap_lfsr: layout does not fit the chains");
  end

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    localparam logic [7:0]  A  = LAY.seg_a[s];
    localparam logic [7:0]  B  = LAY.seg_b[s];
    localparam int unsigned AI = int'(A);
    localparam int unsigned BI = int'(B);
    if (A == puf_pkg::NO_BIT) begin : g_a0
      assign seg_a[s] = 1'b0;
    end else begin : g_a
      assign seg_a[s] = q[AI];
    end
    if (B == puf_pkg::NO_BIT) begin : g_b0
      assign seg_b[s] = 1'b0;
    end else begin : g_b
      assign seg_b[s] = q[BI];
    end
  end

  logic [W-1:0] q_next;
  for (genvar j = 0; j < W; j++) begin : g_row
    localparam logic [8:0]  TAP = LAY.tap[j];
    localparam int unsigned TI  = int'(TAP[7:0]);
    if (TAP[8]) begin : g_xor
      assign q_next[j] = ^(q & ROWS[j][W-1:0]);
    end else begin : g_chain
      assign q_next[j] = seg_level[TI];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_SEED[W-1:0];
    else if (load) q <= seed;
    else           q <= q_next;
  end
endmodule
