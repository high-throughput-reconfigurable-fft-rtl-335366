// twiddle_rom: twiddle factors W_N^e = exp(-j*2*pi*e/N) for 8 lanes.
//
// A quarter-wave table holds c[i] = round(32767*cos(2*pi*i/N)) for
// i = 0..N/4. For an exponent e the top two bits select the quadrant q and the
// rest give r: cos = c[r], sin = c[N/4-r]; the quadrant is applied as q
// multiplications by -j (a swap and a negation). Outputs are Q1.15 and
// registered: one cycle from exponent to twiddle. The table is computed when
// the memory is initialised (a constant ROM). The document names a twiddle
// factor block only; this organisation is this design's own.
module twiddle_rom #(
  parameter int N     = 4096,
  parameter int LANES = 8,
  parameter int TW    = 16
) (
  input  logic                         clk,
  input  logic [LANES-1:0][$clog2(N)-1:0] exp_i,
  output logic signed [LANES-1:0][TW-1:0] wr_o,
  output logic signed [LANES-1:0][TW-1:0] wi_o
);
  localparam int EB = $clog2(N);
  localparam int Q  = N / 4;

  logic signed [TW-1:0] ctab [0:Q];

  initial begin
    for (int i = 0; i <= Q; i++)
      ctab[i] = TW'($rtoi($floor(((2.0 ** (TW - 1)) - 1.0) *
                 $cos(2.0 * 3.14159265358979323846 * i / N) + 0.5)));
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      logic [1:0]           q;
      logic [EB-3:0]        r;
      logic signed [TW-1:0] c, s;
      q = exp_i[l][EB-1:EB-2];
      r = exp_i[l][EB-3:0];
      c = ctab[{1'b0, r}];
      s = ctab[Q - int'(r)];
      // W = c - j s, then times (-j)^q
      unique case (q)
        2'd0: begin wr_o[l] <=  c; wi_o[l] <= -s; end
        2'd1: begin wr_o[l] <= -s; wi_o[l] <= -c; end
        2'd2: begin wr_o[l] <= -c; wi_o[l] <=  s; end
        default: begin wr_o[l] <=  s; wi_o[l] <=  c; end
      endcase
    end
  end
endmodule
