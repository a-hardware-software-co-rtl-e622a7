// sigmoid3: three-piece linear approximation of the logistic sigmoid.
//
//   y = 0            for x <= -2
//   y = 0.5 + x / 4  for -2 < x < 2
//   y = 1            for x >= 2
// The middle piece is the tangent of 1/(1+exp(-x)) at x = 0; the break points are where it
// reaches 0 and 1. Input and output share the fixed-point format (INT_LENS integer bits with
// sign, FRAC_LENS fraction bits); INT_LENS must be at least 3 so that 2 is representable.
// Timing: combinational. The source names a 3-piecewise linear sigmoid but gives no break
// points; these are this design's choice.
module sigmoid3 #(
  parameter int INT_LENS  = 4,
  parameter int FRAC_LENS = 16
) (
  input  logic signed [INT_LENS+FRAC_LENS-1:0] x,
  output logic signed [INT_LENS+FRAC_LENS-1:0] y
);
  localparam int W = INT_LENS + FRAC_LENS;
  localparam logic signed [W-1:0] ONE  = W'(1) << FRAC_LENS;
  localparam logic signed [W-1:0] HALF = W'(1) << (FRAC_LENS - 1);
  localparam logic signed [W-1:0] TWO  = W'(2) << FRAC_LENS;

  always_comb begin
    if (x <= -TWO)     y = '0;
    else if (x >= TWO) y = ONE;
    else               y = HALF + (x >>> 2);
  end
endmodule
