// approx_mult: signed approximate multiplier (column-truncated array).
//
// The exact product a*b is the sum of BW partial-product rows, row i being
// a shifted left by i when b[i] is set (the last row is subtracted: b is two's
// complement). This multiplier clears every partial-product bit in the TRUNC
// least significant columns before the rows are summed, which removes the
// lower triangle of the array and its carry logic. The error is negative-biased
// and bounded by BW * 2^TRUNC. The result keeps the full AW+BW bit width so the
// caller chooses the scaling. Purely combinational.
//
// The butterfly unit of the FFT uses approximate multiplication for twiddle and
// W8 constant products; the choice of truncation as the approximation, and the
// sum of rows (left to synthesis to build as a carry-save tree), are this
// design's own. TRUNC = 0 gives the exact product.
module approx_mult #(
  parameter int AW    = 20,
  parameter int BW    = 16,
  parameter int TRUNC = 12
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int PW = AW + BW;
  localparam logic [PW-1:0] KEEP = ~((PW'(1) << TRUNC) - PW'(1));

  logic signed [PW-1:0] row;
  logic signed [PW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < BW; i++) begin
      row = b[i] ? (PW'(a) <<< i) : '0;
      if (i == BW - 1) row = -row;
      row = row & KEEP;
      acc = acc + row;
    end
    p = acc;
  end
endmodule
