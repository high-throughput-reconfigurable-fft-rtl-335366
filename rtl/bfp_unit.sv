// bfp_unit: block-floating-point headroom detector.
//
// For every word written in a phase it forms v ^ (v >>> (DW-1)) for the real
// and imaginary parts (the magnitude bits without the sign) and ORs them into
// an accumulator, which clr resets at the start of the phase (a word
// written in the clr cycle starts the new measurement). The block
// headroom is the number of redundant sign bits shared by all words so far:
// leading zeros of the accumulator minus one, so 0 means some word uses the
// full range and DW-1 means all words are 0 or -1. The headroom output is
// combinational from the accumulator, which updates one cycle after a valid
// write. The document names block floating point; this detector is the
// simplest one that serves it.
module bfp_unit
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              valid,
  input  cplx_t [LANES-1:0] d,
  output logic [$clog2(DW)-1:0] headroom
);
  logic [DW-1:0] acc, mix;
  logic signed [DW-1:0] sr, si;

  always_comb begin
    mix = '0;
    for (int l = 0; l < LANES; l++) begin
      sr  = d[l].re >>> (DW - 1);
      si  = d[l].im >>> (DW - 1);
      mix = mix | (d[l].re ^ sr) | (d[l].im ^ si);
    end
  end

  always_ff @(posedge clk) begin
    if (clr)        acc <= valid ? mix : '0;   // a word written with clr counts
    else if (valid) acc <= acc | mix;
  end

  always_comb begin
    headroom = $clog2(DW)'(DW - 1);
    for (int i = 0; i < DW - 1; i++)
      if (acc[i]) headroom = $clog2(DW)'(DW - 2 - i);
  end
endmodule
