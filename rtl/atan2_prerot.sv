// atan2_prerot: the +-pi/2 pre-rotation that opens the CORDIC atan2 operator.
//
// CORDIC in vectoring mode only converges for start angles within about
// +-1.74 rad, so the input vector is first turned by a quarter turn towards
// the positive x axis, which always leaves it in the right half plane:
//   d[-1] = +1 when y < 0, else -1
//   x0 = -d[-1]*y   (= |y|, never negative)
//   y0 =  d[-1]*x
// The matching start angle -d[-1]*pi/2 is not added here: it is folded into
// the first z-path look-up table together with the next directions.
// The outputs are one bit wider than the inputs, since negating -2^(W-1)
// needs W+1 bits; the caller appends the guard bits of the x and y paths.
//
// Interface: purely combinational. x_i, y_i are W-bit two's complement;
// dir is the direction bit (1 = y negative); x_o and y_o are W+1 bits, two's
// complement.
//
// Follows the published method (see atan2_cordic): the pre-rotation
// equations and the choice of a quarter-turn pre-rotation. Design choices:
// the sign convention d[-1] = -sign(y), the same rule as for the iterations
// and the only one for which the equations reach the right half plane,
// and y = 0 treated as positive.
module atan2_prerot #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  output logic                dir,
  output logic signed [W:0]   x_o,
  output logic signed [W:0]   y_o
);
  logic signed [W:0] xe, ye;

  always_comb begin
    xe  = (W+1)'(x_i);
    ye  = (W+1)'(y_i);
    dir = y_i[W-1];
    // y < 0: d = +1 -> (x0, y0) = (-y,  x)   (turn by +pi/2)
    // y >= 0: d = -1 -> (x0, y0) = ( y, -x)   (turn by -pi/2)
    x_o = dir ? -ye : ye;
    y_o = dir ? xe : -xe;
  end
endmodule
