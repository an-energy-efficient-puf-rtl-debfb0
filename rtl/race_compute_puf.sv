// race_compute_puf: a PUF that races and computes on the same LUTs.
//
// N_PUF arbiter PUFs of N LUT6_2 segments each race a pair of edges every clock and give
// one response bit per chain. The same segments also hold the XOR network of N_LFSR
// leap-forward LFSRs of width N: each LFSR owns N_PUF/N_LFSR consecutive chains, its
// state bits drive the spare logic inputs of those segments, and its next state is read
// back as the phase of the racing signal after chosen segments. Per clock the design thus
// gives N_PUF response bits and N_LFSR*N random bits from one set of chains, combined by
// post_process into OUT_W = N_LFSR*N bits: LFSR words XOR the responses repeated
// OUT_W/N_PUF times, optionally after Von Neumann correction (vn_en).
// Defaults: eight 64-bit PUFs, four 64-bit LFSRs, 256-bit output.
//
// Clocking (this design's choice): race_in is a square wave of the clock period that
// rises a quarter period after the rising clock edge. State and challenges change at the
// rising clock edge and settle before race_in rises; the racing edges must cross a chain
// in less than a quarter period. At rising clock edge k+1 the LFSRs take A^N * Q(k), and
// puf_resp takes the responses of the race in clock k, so out shows both in the same
// clock. out_valid rises one clock after reset (first response); seed_load reloads the
// LFSRs with seed instead of stepping.
module race_compute_puf #(
  parameter int unsigned N           = 64,
  parameter int unsigned N_PUF       = 8,
  parameter int unsigned N_LFSR      = 4,
  parameter logic [63:0] TAPS        = puf_pkg::TAPS64,
  parameter int unsigned DEVICE_SEED = 32'h1234_5678,
  parameter int unsigned BASE_PS     = 500,
  parameter int unsigned SPREAD_PS   = 100,
  localparam int unsigned OUT_W      = N_LFSR * N
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         race_in,
  input  logic [N_PUF-1:0][N-1:0]      challenge,
  input  logic                         seed_load,
  input  logic [N_LFSR-1:0][N-1:0]     seed,
  input  logic                         vn_en,
  output logic [OUT_W-1:0]             out,
  output logic                         out_valid,
  output logic [N_PUF-1:0]             puf_resp,
  output logic [N_PUF-1:0]             vn_bit,
  output logic [N_PUF-1:0]             vn_valid,
  output logic [N_PUF-1:0]             vn_discard,
  output logic [N_LFSR-1:0][N-1:0]     lfsr_q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CPL = N_PUF / N_LFSR;   // chains per LFSR

  initial begin
    assert (CPL * N_LFSR == N_PUF) else $error("race_compute_puf: N_PUF must be a multiple of N_LFSR");
  end

  logic [N_PUF-1:0][N-1:0] logic_a, logic_b, level;

  for (genvar p = 0; p < N_PUF; p++) begin : g_puf
    arbiter_puf #(
      .N (N), .CHAIN_ID (p), .DEVICE_SEED (DEVICE_SEED),
      .BASE_PS (BASE_PS), .SPREAD_PS (SPREAD_PS)
    ) u_puf (
      .clk, .rst_n, .race_in,
      .challenge (challenge[p]),
      .logic_a   (logic_a[p]),
      .logic_b   (logic_b[p]),
      .level     (level[p]),
      .response  (puf_resp[p])
    );
  end

  for (genvar l = 0; l < N_LFSR; l++) begin : g_lfsr
    leap_lfsr #(
      .W (N), .TAPS (TAPS), .SEGS (N), .CHAINS (CPL),
      .RESET_SEED (64'h0123_4567_89AB_CDEF ^ (64'(l) * 64'h9E37_79B9_7F4A_7C15))
    ) u_lfsr (
      .clk, .rst_n,
      .load      (seed_load),
      .seed      (seed[l]),
      .seg_level (level[l*CPL +: CPL]),
      .seg_a     (logic_a[l*CPL +: CPL]),
      .seg_b     (logic_b[l*CPL +: CPL]),
      .q         (lfsr_q[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= 1'b1;
  end

  vn_corrector #(.N (N_PUF)) u_vn (
    .clk, .rst_n,
    .in_valid  (out_valid),
    .in_bit    (puf_resp),
    .out_bit   (vn_bit),
    .out_valid (vn_valid),
    .discard   (vn_discard)
  );

  post_process #(.N_PUF (N_PUF), .OUT_W (OUT_W)) u_post (
    .lfsr_cat (lfsr_q),
    .puf_raw  (puf_resp),
    .puf_vn   (vn_bit),
    .vn_en,
    .out
  );
endmodule
