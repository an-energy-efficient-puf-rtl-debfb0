// post_process: combines the digital and the analog outputs into the final random word.
//
// out = {lfsr[L-1], ..., lfsr[0]} XOR {REP copies of puf}, where puf is either the raw
// arbiter responses or their Von Neumann corrected versions (vn_en = 1). With four 64-bit
// LFSRs and eight PUFs this is 256 bits per clock, each PUF bit reused 32 times.
// Purely combinational; out is valid whenever its inputs are.
module post_process #(
  parameter int unsigned N_PUF = 8,
  parameter int unsigned OUT_W = 256
) (
  input  logic [OUT_W-1:0] lfsr_cat,
  input  logic [N_PUF-1:0] puf_raw,
  input  logic [N_PUF-1:0] puf_vn,
  input  logic             vn_en,
  output logic [OUT_W-1:0] out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned REP = OUT_W / N_PUF;

  initial begin
    assert (REP * N_PUF == OUT_W) else $error("post_process: OUT_W must be a multiple of N_PUF");
  end

  logic [N_PUF-1:0] puf;
  assign puf = vn_en ? puf_vn : puf_raw;
  assign out = lfsr_cat ^ {REP{puf}};
endmodule
