// cordic_post: post-processing unit of the reconfigurable CORDIC.
//
// Undoes the mapping of cordic_pre using its octant mapping signals:
//   circular rotation:   negate y if the angle was reflected, then add
//                        (q + refl) quarter turns by swapping / complementing
//                        x and y;
//   hyperbolic rotation: negate y for a negative angle;
//   circular vectoring:  angle -> pi/2 - angle if swapped, -> pi - angle if x
//                        was negative, -> -angle if y was negative;
//   hyperbolic vectoring: negate the angle if y was negative.
// Coordinates are rounded back to XW bits and saturated. Combinational.
// Swap/complement by octant follows the document; the rest is this design's.
module cordic_post
  import cordic_pkg::*;
(
  input  logic                 t,
  input  logic                 m,
  input  oct_t                 oct,
  input  logic signed [IW-1:0] x_i,
  input  logic signed [IW-1:0] y_i,
  input  logic signed [AW-1:0] th_i,
  output logic signed [XW-1:0] x_o,
  output logic signed [XW-1:0] y_o,
  output logic signed [AW-1:0] th_o
);
  logic signed [IW-1:0] xa, ya, xb, yb;
  logic signed [AW+1:0] a;

  function automatic logic signed [XW-1:0] narrow(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] r;
    r = (v + signed'(IW'(1) << (GB - 1))) >>> GB;
    if (r >  IW'((1 << (XW - 1)) - 1)) return XW'((1 << (XW - 1)) - 1);
    if (r < -IW'(1 << (XW - 1)))      return XW'(-(1 << (XW - 1)));
    return r[XW-1:0];
  endfunction

  always_comb begin
    xa = x_i;
    ya = y_i;
    a  = (AW+2)'(th_i);
    xb = xa;
    yb = ya;
    if (!m && t) begin
      if (oct.refl) ya = -ya;
      unique case (2'(oct.q + 2'(oct.refl)))
        2'd0: begin xb =  xa; yb =  ya; end
        2'd1: begin xb = -ya; yb =  xa; end
        2'd2: begin xb = -xa; yb = -ya; end
        default: begin xb = ya; yb = -xa; end
      endcase
    end else if (!m) begin
      yb = oct.neg ? -ya : ya;
    end else if (t) begin
      if (oct.swap) a = PI_2 - a;
      if (oct.sx)   a = PI_1 - a;
      if (oct.neg)  a = -a;
    end else begin
      if (oct.neg)  a = -a;
    end
    x_o  = narrow(xb);
    y_o  = narrow(yb);
    th_o = AW'(a);
  end
endmodule
