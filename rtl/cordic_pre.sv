// cordic_pre: pre-processing unit of the reconfigurable CORDIC.
//
// Brings every request into the range the micro-rotation chain handles and
// records how to undo that (octant mapping signals, oct_t):
//   circular rotation:   theta in [-pi, pi] is reduced by quarter turns q and,
//                        above pi/4, reflected (phi = pi/2 - phi, y negated), so
//                        phi is in [0, pi/4];
//   hyperbolic rotation: negative theta uses R(-a) = J R(a) J, J = diag(1,-1);
//   circular vectoring:  (x, y) is folded into the first octant (|x|, |y|,
//                        swapped when |y| > |x|);
//   hyperbolic vectoring: y is made non-negative (x must be positive).
// Coordinates are widened to the internal format (GB more fraction bits).
// Combinational. Mapping onto [0, pi/4] follows the document; the encoding of
// the mapping signals and the hyperbolic sign symmetry are this design's.
module cordic_pre
  import cordic_pkg::*;
(
  input  logic                 t,
  input  logic                 m,
  input  logic signed [XW-1:0] x,
  input  logic signed [XW-1:0] y,
  input  logic signed [AW-1:0] theta,
  output logic signed [IW-1:0] x_o,
  output logic signed [IW-1:0] y_o,
  output logic signed [AW-1:0] phi,
  output oct_t                 oct
);
  logic signed [IW-1:0] xw, yw, ax, ay;
  logic signed [AW+1:0] a;

  always_comb begin
    xw  = IW'(x) <<< GB;
    yw  = IW'(y) <<< GB;
    ax  = x[XW-1] ? -xw : xw;
    ay  = y[XW-1] ? -yw : yw;
    oct = '0;
    a   = (AW+2)'(theta);
    x_o = xw;
    y_o = yw;
    if (!m && t) begin
      if (a < 0) a = a + PI2;
      if      (a >= PI3_2) begin oct.q = 2'd3; a = a - PI3_2; end
      else if (a >= PI_1)  begin oct.q = 2'd2; a = a - PI_1;  end
      else if (a >= PI_2)  begin oct.q = 2'd1; a = a - PI_2;  end
      if (a > PI_4) begin
        oct.refl = 1'b1;
        a        = PI_2 - a;
        y_o      = -yw;
      end
    end else if (!m) begin
      if (a < 0) begin
        oct.neg = 1'b1;
        a       = -a;
        y_o     = -yw;
      end
    end else if (t) begin
      oct.sx   = x[XW-1];
      oct.neg  = y[XW-1];
      oct.swap = ay > ax;
      x_o      = oct.swap ? ay : ax;
      y_o      = oct.swap ? ax : ay;
      a        = '0;
    end else begin
      oct.neg = y[XW-1];
      y_o     = ay;
      a       = '0;
    end
    phi = AW'(a);
  end
endmodule
