// race_chain: the delay line of one arbiter PUF, built from N LUT6_2 segments that also
// compute while the racing edges pass through them.
//
// One racing input feeds both paths. Segment s (0-based) swaps the two paths when
// challenge[s] = 1 and keeps them when it is 0. It also inverts both racing signals when
// logic_a[s] != logic_b[s], so the two paths always stay in phase with each other while
// their phase relative to race_in carries the running XOR of all logic inputs so far:
//   level[s] = race_in ^ (^ (logic_a[s:0] ^ logic_b[s:0]))   once the edges have settled.
// level[s] is the upper output of segment s; a flip-flop on it decodes the XOR result
// (in phase = 0, antiphase = 1). out_top/out_bot are the two path ends for the arbiter.
//
// Timing: each segment output has its own delay, from puf_pkg::lut_delay_ps (seeded by
// DEVICE_SEED and CHAIN_ID), modelling process variation; the logic inputs must be stable
// while an edge travels (see race_compute_puf for the clocking).
module race_chain #(
  parameter int unsigned N           = 64,
  parameter int unsigned CHAIN_ID    = 0,
  parameter int unsigned DEVICE_SEED = 32'h1234_5678,
  parameter int unsigned BASE_PS     = 500,
  parameter int unsigned SPREAD_PS   = 100
) (
  input  logic         race_in,
  input  logic [N-1:0] challenge,
  input  logic [N-1:0] logic_a,
  input  logic [N-1:0] logic_b,
  output logic [N-1:0] level,
  output logic         out_top,
  output logic         out_bot
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [63:0] SEG_INIT = puf_pkg::segment_init();

  logic top [N+1];
  logic bot [N+1];
  assign top[0] = race_in;
  assign bot[0] = race_in;

  for (genvar s = 0; s < N; s++) begin : g_seg
    lut6_2 #(
      .INIT        (SEG_INIT),
      .O6_DELAY_PS (puf_pkg::lut_delay_ps(DEVICE_SEED, CHAIN_ID, s, 0, BASE_PS, SPREAD_PS)),
      .O5_DELAY_PS (puf_pkg::lut_delay_ps(DEVICE_SEED, CHAIN_ID, s, 1, BASE_PS, SPREAD_PS))
    ) u_lut (
      .i0 (top[s]),
      .i1 (bot[s]),
      .i2 (logic_b[s]),
      .i3 (logic_a[s]),
      .i4 (challenge[s]),
      .i5 (1'b1),
      .o5 (bot[s+1]),
      .o6 (top[s+1])
    );
  end

  for (genvar s = 0; s < N; s++) begin : g_level
    assign level[s] = top[s+1];
  end
  assign out_top = top[N];
  assign out_bot = bot[N];
endmodule
