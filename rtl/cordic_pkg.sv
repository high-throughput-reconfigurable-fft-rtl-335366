// cordic_pkg: formats and constants shared by the reconfigurable CORDIC.
//
// Coordinates are XW = 16-bit two's complement with XF = 13 fraction bits
// (range +-4). Inside the micro-rotation chain they carry GB = 4 extra
// fraction bits and one extra integer bit (IW = 21). Angles are AW = 18 bits
// with AF = 15 fraction bits, in radians (range +-4, enough for +-pi).
// T = 1 selects the circular, T = 0 the hyperbolic trajectory; M = 0 selects
// rotation mode, M = 1 vectoring mode. The widths are this design's choice for
// the 16-bit case the document discusses.
package cordic_pkg;
  localparam int XW = 16;
  localparam int XF = 13;
  localparam int GB = 4;
  localparam int IW = XW + GB + 1;
  localparam int AW = 18;
  localparam int AF = 15;
  localparam int NIT = 15;                     // micro-rotations for basic shift 2

  localparam logic signed [AW+1:0] PI_4  = 20'sd25736;   // round(pi/4 * 2^15)
  localparam logic signed [AW+1:0] PI_2  = 20'sd51472;
  localparam logic signed [AW+1:0] PI_1  = 20'sd102944;
  localparam logic signed [AW+1:0] PI3_2 = 20'sd154416;
  localparam logic signed [AW+1:0] PI2   = 20'sd205887;

  // octant mapping signals from the pre- to the post-processing unit
  typedef struct packed {
    logic [1:0] q;     // circular rotation: quarter turns to add afterwards
    logic       refl;  // circular rotation: angle was reflected about pi/4
    logic       neg;   // negative angle / negative y (sign symmetry)
    logic       sx;    // circular vectoring: x was negative
    logic       swap;  // circular vectoring: |y| > |x|, coordinates swapped
  } oct_t;
endpackage
