// bmu: butterfly multiplication unit.
//
// Cycle 1: the reconfigurable butterfly bf8 (radix-8, or two radix-4 when r4)
// is registered at OW = DW+4 bits. Cycle 2: lanes are multiplied by their
// twiddle factors (cmult, approximate), then shifted right by the block
// floating-point shift 'sh' with round-half-up and saturated to DW bits, and
// registered. Latency 2 cycles, one butterfly per cycle. The twiddle inputs
// (wr, wi, byp) must be presented one cycle after x, aligned with the
// registered butterfly output. valid travels with the data.
// The order butterfly -> twiddle multiply follows the document; the pipeline
// cut, rounding and saturation are this design's choices.
module bmu
  import fft_pkg::*;
#(
  parameter int TRUNC = 12
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          valid_i,
  input  cplx_t [LANES-1:0]             x,
  input  logic                          r4,
  input  logic signed [LANES-1:0][15:0] wr,
  input  logic signed [LANES-1:0][15:0] wi,
  input  logic [LANES-1:0]              byp,
  input  logic [2:0]                    sh,
  output logic                          valid_o,
  output cplx_t [LANES-1:0]             y
);
  localparam int OW = DW + 4;
  logic signed [LANES-1:0][OW-1:0] br, bi, br_q, bi_q, mr, mi;
  logic v1;

  bf8 #(.OW(OW), .TRUNC(TRUNC)) u_bf8 (.x, .r4, .yr(br), .yi(bi));

  for (genvar l = 0; l < LANES; l++) begin : g_tw
    cmult #(.AW(OW), .TW(16), .TRUNC(TRUNC)) u_cm (
      .zr(br_q[l]), .zi(bi_q[l]), .wr(wr[l]), .wi(wi[l]), .bypass(byp[l]),
      .yr(mr[l]), .yi(mi[l])
    );
  end

  function automatic logic signed [DW-1:0] scale(input logic signed [OW-1:0] v, input logic [2:0] s);
    logic signed [OW:0] t;
    t = (OW+1)'(v);
    if (s != 0) t = (t + signed'((OW+1)'(1) << (s - 1))) >>> s;
    if (t > (OW+1)'((1 << (DW - 1)) - 1)) return DW'((1 << (DW - 1)) - 1);
    if (t < -(OW+1)'(1 << (DW - 1)))     return DW'(-(1 << (DW - 1)));
    return t[DW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    br_q <= br;
    bi_q <= bi;
    for (int l = 0; l < LANES; l++) begin
      y[l].re <= scale(mr[l], sh);
      y[l].im <= scale(mi[l], sh);
    end
    if (rst) begin
      v1      <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      v1      <= valid_i;
      valid_o <= v1;
    end
  end
endmodule
