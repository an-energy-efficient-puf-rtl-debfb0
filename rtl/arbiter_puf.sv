// arbiter_puf: one N-bit arbiter PUF whose segments also carry logic, i.e. a race_chain
// followed by a puf_arbiter.
//
// Each clock the racing signal crosses the chain configured by challenge; the arbiter
// reports which path was faster as response, one clock later. Independently, level[s]
// exposes the XOR result carried on the racing phase after every segment, for the
// flip-flops of the computing side (see leap_lfsr). Both outputs come from the same race.
module arbiter_puf #(
  parameter int unsigned N           = 64,
  parameter int unsigned CHAIN_ID    = 0,
  parameter int unsigned DEVICE_SEED = 32'h1234_5678,
  parameter int unsigned BASE_PS     = 500,
  parameter int unsigned SPREAD_PS   = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         race_in,
  input  logic [N-1:0] challenge,
  input  logic [N-1:0] logic_a,
  input  logic [N-1:0] logic_b,
  output logic [N-1:0] level,
  output logic         response
);
  timeunit 1ps;
  timeprecision 1ps;

  logic end_top, end_bot;

  race_chain #(
    .N (N), .CHAIN_ID (CHAIN_ID), .DEVICE_SEED (DEVICE_SEED),
    .BASE_PS (BASE_PS), .SPREAD_PS (SPREAD_PS)
  ) u_chain (
    .race_in, .challenge, .logic_a, .logic_b, .level,
    .out_top (end_top),
    .out_bot (end_bot)
  );

  puf_arbiter u_arb (
    .clk, .rst_n,
    .in_top (end_top),
    .in_bot (end_bot),
    .response
  );
endmodule
