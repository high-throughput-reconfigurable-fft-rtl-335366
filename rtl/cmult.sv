// cmult: complex multiplication of a butterfly output by a twiddle factor.
//
// (zr + j zi) * (wr + j wi) = (zr*wr - zi*wi) + j (zr*wi + zi*wr), with the four
// real products taken from approx_mult. The twiddle is Q1.15 (full scale
// 32767 ~ 1.0), so each product is shifted right by 15. Because a twiddle of
// exactly 1 cannot be represented, the caller asserts bypass for exponent 0 and
// the input passes through unchanged. The result is saturated to AW bits.
// Combinational. Approximate multiplication follows the document; the bypass,
// the Q1.15 format and saturation are this design's choices.
module cmult #(
  parameter int AW    = 20,
  parameter int TW    = 16,
  parameter int TRUNC = 12
) (
  input  logic signed [AW-1:0] zr,
  input  logic signed [AW-1:0] zi,
  input  logic signed [TW-1:0] wr,
  input  logic signed [TW-1:0] wi,
  input  logic                 bypass,
  output logic signed [AW-1:0] yr,
  output logic signed [AW-1:0] yi
);
  localparam int PW = AW + TW;
  localparam logic signed [PW:0] MAXV = (PW+1)'((1 << (AW - 1)) - 1);
  localparam logic signed [PW:0] MINV = -(PW+1)'(1 << (AW - 1));

  logic signed [PW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [PW:0]   sr, si;

  approx_mult #(.AW(AW), .BW(TW), .TRUNC(TRUNC)) u_rr (.a(zr), .b(wr), .p(p_rr));
  approx_mult #(.AW(AW), .BW(TW), .TRUNC(TRUNC)) u_ii (.a(zi), .b(wi), .p(p_ii));
  approx_mult #(.AW(AW), .BW(TW), .TRUNC(TRUNC)) u_ri (.a(zr), .b(wi), .p(p_ri));
  approx_mult #(.AW(AW), .BW(TW), .TRUNC(TRUNC)) u_ir (.a(zi), .b(wr), .p(p_ir));

  function automatic logic signed [AW-1:0] sat(input logic signed [PW:0] v);
    if (v > MAXV) return MAXV[AW-1:0];
    if (v < MINV) return MINV[AW-1:0];
    return v[AW-1:0];
  endfunction

  always_comb begin
    sr = ((PW+1)'(p_rr) - (PW+1)'(p_ii)) >>> (TW - 1);
    si = ((PW+1)'(p_ri) + (PW+1)'(p_ir)) >>> (TW - 1);
    if (bypass) begin
      yr = zr;
      yi = zi;
    end else begin
      yr = sat(sr);
      yi = sat(si);
    end
  end
endmodule
