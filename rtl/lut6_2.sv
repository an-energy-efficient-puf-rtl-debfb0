// lut6_2: behavioural model of an FPGA LUT6_2 cell (6-input look-up table with two outputs),
// with a fixed propagation delay per output standing in for the delay that manufacturing
// variation gives every real LUT. It is a model, not synthesizable logic: on an FPGA this
// is the vendor's primitive and the delays are the silicon's own.
//
// Function (that of the vendor cell): O6 = INIT[{I5..I0}], O5 = INIT[{I4..I0}] (lower 32
// bits). With I5 = 1 the cell acts as two LUT5s on the same five inputs, which is how each
// arbiter-PUF segment uses it. Every input change reaches O6 after O6_DELAY_PS and O5
// after O5_DELAY_PS (inertial: pulses shorter than the delay are swallowed).
module lut6_2 #(
  parameter logic [63:0] INIT        = 64'h0,
  parameter int unsigned O6_DELAY_PS = 500,
  parameter int unsigned O5_DELAY_PS = 500
) (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic i5,
  output logic o5,
  output logic o6
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [5:0] sel;
  assign sel = {i5, i4, i3, i2, i1, i0};

  assign #(O6_DELAY_PS) o6 = INIT[sel];
  assign #(O5_DELAY_PS) o5 = INIT[{1'b0, sel[4:0]}];
endmodule
