// atan2_xy_stage: one regular CORDIC vectoring iteration on the x and y paths.
//
// The stage takes the sign of its y input as the rotation direction
// (d = -sign(y), reported as dir = 1 when y is negative) and applies
//   x' = x - d*y*2^-I,   y' = y + d*x*2^-I
// so that the vector is turned towards the x axis by atan(2^-I). Only the
// direction leaves the stage towards the z path; the angle itself is never
// formed here.
//
// Word lengths follow the savings that apply when atan2 is the only output:
//  - y shrinks with the iteration number: after iteration I, |y| is bounded by
//    x*2^-I, so the top bits are dropped (YOW < YIW). Two's complement
//    arithmetic modulo 2^YOW is exact as long as the true result fits; the
//    upper bits of the full-width sum are therefore left unused on purpose.
//  - the x path carries fewer fraction bits than the y path (GX < GY); the
//    shifted x enters y after GY-GX zero bits are appended, and y enters x
//    after GY-GX bits are cut off.
//  - from some iteration on x is frozen (UPDATE_X = 0): its adder is removed
//    and x is passed through, since its further growth no longer changes the
//    result beyond the accuracy target.
// Right shifts are arithmetic (rounding towards minus infinity).
//
// Interface: purely combinational. x is XW = W+2+GX bits, y_i YIW bits and
// y_o YOW bits, all two's complement; YIW and YOW are at most W+2+GY.
//
// Follows the published method (see atan2_cordic): the iteration, the
// direction rule and the four optimisations (shrinking y, frozen x, shorter
// x words, no y adder in the last iteration, the last one being realised by
// the caller). Design
// choices: the fixed-point formats, the y-width bound with one bit of margin
// and truncating (not rounding) shifts.
module atan2_xy_stage #(
  parameter int W        = 16,
  parameter int GX       = 10,
  parameter int GY       = 15,
  parameter int I        = 0,
  parameter int YIW      = W + 2 + GY,
  parameter int YOW      = W + 2 + GY,
  parameter bit UPDATE_X = 1'b1
) (
  input  logic signed [W+1+GX:0] x_i,
  input  logic signed [YIW-1:0]  y_i,
  output logic                   dir,
  output logic signed [W+1+GX:0] x_o,
  output logic signed [YOW-1:0]  y_o
);
  localparam int XW = W + 2 + GX;
  localparam int YW = W + 2 + GY;
  localparam int GD = GY - GX;

  logic signed [YW-1:0] ye, xs, yn;
  logic signed [XW-1:0] ys;

  always_comb begin
    dir = y_i[YIW-1];
    ye  = YW'(y_i);
    // x scaled to the y format, then shifted by I
    xs  = (YW'(x_i) <<< GD) >>> I;
    // y reduced to the x format, then shifted by I
    ys  = XW'(ye >>> (GD + I));
    yn  = dir ? ye + xs : ye - xs;
    y_o = YOW'(yn);
    if (UPDATE_X) x_o = dir ? x_i - ys : x_i + ys;
    else          x_o = x_i;
  end
endmodule
