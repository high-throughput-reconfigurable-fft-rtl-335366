// rccu: reconfigurable coordinate calculation unit (one micro-rotation).
//
// Scaling-free micro-rotation by the elementary angle 2^-s using third-order
// Taylor terms: cos/cosh ~ 1 -/+ 2^-(2s+1), sin/sinh ~ 2^-s -/+ 2^-(3s+2+T).
//   circular   (T=1): x' = x - x>>(2s+1) - d*(y>>s - y>>(3s+3))
//                     y' = y - y>>(2s+1) + d*(x>>s - x>>(3s+3))
//   hyperbolic (T=0): x' = x + x>>(2s+1) + d*(y>>s + y>>(3s+2))
//                     y' = y + y>>(2s+1) + d*(x>>s + x>>(3s+2))
// d = +1 (counter-clockwise) in rotation mode (M=0), d = -1 in vectoring
// mode (M=1). The step is taken (acc = 1) when rbit is set in rotation mode,
// or when the rotated y stays non-negative in vectoring mode; otherwise x, y
// pass unchanged. Combinational; s is a constant in the pipelined CORDIC
// (shifters become wiring) and a variable in the recursive one.
// The matrices, the T-controlled extra shift and the mode-controlled selection
// follow the document; widths are this design's.
module rccu
  import cordic_pkg::*;
(
  input  logic                 t,
  input  logic                 m,
  input  logic [3:0]           s,
  input  logic                 rbit,
  input  logic signed [IW-1:0] x_i,
  input  logic signed [IW-1:0] y_i,
  output logic signed [IW-1:0] x_o,
  output logic signed [IW-1:0] y_o,
  output logic                 acc
);
  logic signed [IW-1:0] xs, xc, x3, ys, yc, y3, cx, cy, tx, ty, xn, yn;
  logic [5:0] s1, s2, s3;

  always_comb begin
    s1 = 6'(s);
    s2 = 6'(2 * s + 1);
    s3 = 6'(3 * s + 2 + 4'(t));
    xs = x_i >>> s1;  xc = x_i >>> s2;  x3 = x_i >>> s3;
    ys = y_i >>> s1;  yc = y_i >>> s2;  y3 = y_i >>> s3;
    cx = t ? x_i - xc : x_i + xc;
    cy = t ? y_i - yc : y_i + yc;
    tx = t ? xs - x3  : xs + x3;
    ty = t ? ys - y3  : ys + y3;
    // y' = cy + d*tx ; x' = cx + dx*ty with dx = -d (circular) or d (hyperbolic)
    yn = m ? cy - tx : cy + tx;
    xn = (t ^ m) ? cx - ty : cx + ty;
    acc = m ? ~yn[IW-1] : rbit;
    x_o = acc ? xn : x_i;
    y_o = acc ? yn : y_i;
  end
endmodule
