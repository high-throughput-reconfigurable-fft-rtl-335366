// mrsg: micro-rotation sequence generator.
//
// For basic shift 2 the 15 micro-rotations use shifts s_i = 2, 2, 2, 3, 4, ...,
// 14. In rotation mode the reduced angle theta in [0, pi/4] is decomposed as
// k*2^-2 + sum(b_s * 2^-s), s = 3..14: the three s = 2 steps are taken for
// i < k (k = the two bits of weight 2^-1 and 2^-2), and step s >= 3 is taken
// when angle bit 2^-s is set. In both modes the angle of every step taken is
// accumulated (th_o = th_i + 2^-s when acc), which is the vectoring result.
// Combinational. The shift sequence follows the document; the decomposition
// of the angle into decisions is this design's reading of alpha_i = 2^-s_i.
module mrsg
  import cordic_pkg::*;
(
  input  logic [3:0]           i,
  input  logic signed [AW-1:0] theta,
  input  logic                 acc,
  input  logic signed [AW-1:0] th_i,
  output logic [3:0]           s,
  output logic                 rbit,
  output logic signed [AW-1:0] th_o
);
  always_comb begin
    s = (i < 4'd3) ? 4'd2 : i;
    if (i < 4'd3) rbit = (2'(theta[AF-1 -: 2]) > 2'(i));
    else          rbit = theta[AF - int'(i)];
    th_o = acc ? th_i + (AW'(1) <<< (AF - int'(s))) : th_i;
  end
endmodule
