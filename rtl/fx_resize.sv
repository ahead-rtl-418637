// fx_resize: conversion of a signed fixed-point value between two Q formats.
//
// Every signal node of the decoder has its own signed Q(IBW,FBW) format:
// one sign bit, IBW integer bits and FBW fractional bits, so a value is
// stored in 1+IBW+FBW bits and means (stored integer) * 2^-FBW. This block
// moves a value from the format of one node to the format of the next.
// Extra fractional bits are dropped (rounding toward minus infinity) and a
// value outside the range of the output format saturates to its largest or
// smallest code. The Q-format layout follows the source; truncation and
// saturation are this design's choice, since the source gives no rounding or
// overflow mode.
//
// Purely combinational, no clock.
module fx_resize #(
  parameter int unsigned I_IN  = 7,
  parameter int unsigned F_IN  = 8,
  parameter int unsigned I_OUT = 3,
  parameter int unsigned F_OUT = 4
) (
  input  logic signed [I_IN+F_IN:0]   din,
  output logic signed [I_OUT+F_OUT:0] dout
);
  localparam int unsigned W_IN  = I_IN + F_IN + 1;
  localparam int unsigned W_OUT = I_OUT + F_OUT + 1;
  localparam int unsigned SHL   = (F_OUT > F_IN) ? F_OUT - F_IN : 0;
  localparam int unsigned SHR   = (F_IN > F_OUT) ? F_IN - F_OUT : 0;
  // Wide enough for the shifted input and for the output range.
  localparam int unsigned W_MID = ((W_IN + SHL) > W_OUT ? (W_IN + SHL) : W_OUT) + 1;

  localparam logic signed [W_MID-1:0] MAX_OUT = W_MID'((64'sd1 <<< (W_OUT - 1)) - 1);
  localparam logic signed [W_MID-1:0] MIN_OUT = -W_MID'(64'sd1 <<< (W_OUT - 1));

  logic signed [W_MID-1:0] ext;
  logic signed [W_MID-1:0] aligned;

  always_comb begin
    ext     = W_MID'(din);
    aligned = (ext <<< SHL) >>> SHR;
    if (aligned > MAX_OUT)      dout = MAX_OUT[W_OUT-1:0];
    else if (aligned < MIN_OUT) dout = MIN_OUT[W_OUT-1:0];
    else                        dout = aligned[W_OUT-1:0];
  end
endmodule
