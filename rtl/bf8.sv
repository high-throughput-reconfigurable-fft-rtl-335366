// bf8: reconfigurable radix-8 / dual radix-4 butterfly.
//
// Two radix-4 cores do all the additions. In radix-8 mode (r4 = 0) core A
// takes x0,x2,x4,x6 (E) and core B takes x1,x3,x5,x7 (O); the odd outputs are
// multiplied by W8^k (k = 0..3) and X[k] = E[k] + W8^k O[k],
// X[k+4] = E[k] - W8^k O[k]. W8^1 and W8^3 share the extracted constant
// sqrt(2)/2, applied by approximate constant multipliers; W8^2 = -j is a swap
// and negation. In radix-4 mode (r4 = 1) core A transforms x0..x3 onto
// out0..3, core B transforms x4..x7 onto out4..7, a multiplexer selects these
// outputs, and the sqrt(2)/2 multiplier inputs are held at zero so that the
// radix-8-only logic does not toggle.
//
// Interface: 8 complex 16-bit inputs, 8 complex OW-bit outputs (4 bits of
// growth). Combinational. The decomposition and the sqrt(2)/2 extraction follow
// the document; lane placement in radix-4 mode and the widths are this design's.
module bf8
  import fft_pkg::*;
#(
  parameter int OW    = DW + 4,
  parameter int TRUNC = 12
) (
  input  cplx_t [7:0]                x,
  input  logic                       r4,
  output logic signed [7:0][OW-1:0]  yr,
  output logic signed [7:0][OW-1:0]  yi
);
  typedef logic signed [OW-1:0] w_t;
  localparam logic signed [15:0] C707 = 16'sd23170; // round(2^15 * sqrt(2)/2)

  w_t ar [4], ai [4], br [4], bi [4];   // core inputs
  w_t er [4], ei [4], orr [4], oi [4];  // core outputs
  w_t m1a, m1b, m3a, m3b;               // constant multiplier operands
  logic signed [OW+15:0] p1a, p1b, p3a, p3b;
  w_t tr [4], ti [4];                   // W8^k * O[k]

  // radix-4 DFT: X1 = a - jb - c + jd, X3 = a + jb - c - jd
  task automatic dft4(input w_t xr [4], input w_t xi [4], output w_t zr [4], output w_t zi [4]);
    w_t s0r, s0i, s1r, s1i, d0r, d0i, d1r, d1i;
    s0r = xr[0] + xr[2];  s0i = xi[0] + xi[2];
    d0r = xr[0] - xr[2];  d0i = xi[0] - xi[2];
    s1r = xr[1] + xr[3];  s1i = xi[1] + xi[3];
    d1r = xr[1] - xr[3];  d1i = xi[1] - xi[3];
    zr[0] = s0r + s1r;    zi[0] = s0i + s1i;
    zr[2] = s0r - s1r;    zi[2] = s0i - s1i;
    zr[1] = d0r + d1i;    zi[1] = d0i - d1r;   // d0 - j d1
    zr[3] = d0r - d1i;    zi[3] = d0i + d1r;   // d0 + j d1
  endtask

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (r4) begin
        ar[k] = w_t'(x[k].re);     ai[k] = w_t'(x[k].im);
        br[k] = w_t'(x[k+4].re);   bi[k] = w_t'(x[k+4].im);
      end else begin
        ar[k] = w_t'(x[2*k].re);   ai[k] = w_t'(x[2*k].im);
        br[k] = w_t'(x[2*k+1].re); bi[k] = w_t'(x[2*k+1].im);
      end
    end
    dft4(ar, ai, er, ei);
    dft4(br, bi, orr, oi);
    // operands of the sqrt(2)/2 multipliers; zero in radix-4 mode
    // W8^1 * (a+jb) = ((a+b) + j(b-a)) * sqrt(2)/2
    // W8^3 * (a+jb) = ((b-a) - j(a+b)) * sqrt(2)/2
    m1a = r4 ? '0 : orr[1] + oi[1];
    m1b = r4 ? '0 : oi[1] - orr[1];
    m3a = r4 ? '0 : oi[3] - orr[3];
    m3b = r4 ? '0 : orr[3] + oi[3];
  end

  approx_mult #(.AW(OW), .BW(16), .TRUNC(TRUNC)) u_m1a (.a(m1a), .b(C707), .p(p1a));
  approx_mult #(.AW(OW), .BW(16), .TRUNC(TRUNC)) u_m1b (.a(m1b), .b(C707), .p(p1b));
  approx_mult #(.AW(OW), .BW(16), .TRUNC(TRUNC)) u_m3a (.a(m3a), .b(C707), .p(p3a));
  approx_mult #(.AW(OW), .BW(16), .TRUNC(TRUNC)) u_m3b (.a(m3b), .b(C707), .p(p3b));

  always_comb begin
    tr[0] = orr[0];           ti[0] = oi[0];
    tr[1] = w_t'(p1a >>> 15); ti[1] = w_t'(p1b >>> 15);
    tr[2] = oi[2];            ti[2] = -orr[2];
    tr[3] = w_t'(p3a >>> 15); ti[3] = -w_t'(p3b >>> 15);
    for (int k = 0; k < 4; k++) begin
      if (r4) begin
        yr[k]   = er[k];  yi[k]   = ei[k];
        yr[k+4] = orr[k]; yi[k+4] = oi[k];
      end else begin
        yr[k]   = er[k] + tr[k]; yi[k]   = ei[k] + ti[k];
        yr[k+4] = er[k] - tr[k]; yi[k+4] = ei[k] - ti[k];
      end
    end
  end
endmodule
