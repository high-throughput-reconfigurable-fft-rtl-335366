// fft_agu: address generation for conflict-free access.
//
// Every sample carries a label: its index in the in-place decimation-in-
// frequency schedule. For 4096 points the label is four octal digits
// D3 D2 D1 D0; stage s (0..3) combines the 8 samples that differ only in digit
// D(3-s). For 2048 points the label is e3 e2 e1 (octal) and e0 (0..3); stages
// 0..2 are radix-8 on e3, e2, e1 and stage 3 runs two radix-4 butterflies on e0
// at once, paired so that they differ in the low bit of e1.
//
// Bank of a label: 4096: (D3+D2+D1+D0) mod 8; 2048: (e3+e2+e1+2*e0) mod 8.
// The 8 samples of every access (input beat, butterfly, output beat) then sit
// in 8 different banks, at bank (P(lane) + state) mod 8, so a commutator
// controlled by 'state' (and 'perm' for P) routes them. Address inside the
// bank: the label without the digit that the next reader of that memory
// selects on, so the reader finds all 8 samples at one address, and a writer
// (whose 8 samples differ in another digit) uses 8 addresses.
//
// Inputs: mode (m2k = 2048 points), phase, stage, cnt (beat / butterfly
// index). Outputs, per lane: read address, write address, twiddle exponent
// (in units of 2*pi/4096) and twiddle bypass (exponent 0); and the shared
// rotation state and perm flag. Combinational. Lane 0 always has exponent 0
// (twiddle 1), so its tw_exp bits are constant 0 and its tw_byp constant 1.
//
// The digit-sum bank rule follows the octal tables of the document; the
// address rule, the 2048-point bank rule and the radix-4 pairing are this
// design's own.
module fft_agu
  import fft_pkg::*;
(
  input  logic                    m2k,
  input  phase_t                  phase,
  input  logic [1:0]              stage,
  input  logic [AB-1:0]           cnt,
  output logic [LANES-1:0][AB-1:0] rd_addr,
  output logic [LANES-1:0][AB-1:0] wr_addr,
  output logic [LANES-1:0][LB-1:0] tw_exp,
  output logic [LANES-1:0]        tw_byp,
  output logic [2:0]              state,
  output logic                    perm
);
  typedef logic [LB-1:0] label_t;

  function automatic logic [2:0] bank_of(input label_t l, input logic m);
    if (m) return 3'(l[10:8] + l[7:5] + l[4:2] + {l[1:0], 1'b0});
    else   return 3'(l[11:9] + l[8:6] + l[5:3] + l[2:0]);
  endfunction

  // address = label without digit q (q = 3 is the most significant)
  function automatic logic [AB-1:0] addr_excl(input label_t l, input logic [1:0] q, input logic m);
    if (m) begin
      unique case (q)
        2'd3: return {1'b0, l[7:0]};
        2'd2: return {1'b0, l[10:8], l[4:0]};
        2'd1: return {1'b0, l[10:5], l[1:0]};
        default: return l[10:2];
      endcase
    end else begin
      unique case (q)
        2'd3: return l[8:0];
        2'd2: return {l[11:9], l[5:0]};
        2'd1: return {l[11:6], l[2:0]};
        default: return l[11:3];
      endcase
    end
  endfunction

  function automatic label_t label_of(input logic m, input phase_t ph, input logic [1:0] s,
                                      input logic [AB-1:0] c, input logic [2:0] v);
    label_t l;
    l = '0;
    if (ph == PH_OUT) begin
      // natural output index k = 8*c + v sits at the digit-reversed label
      if (m) l = {1'b0, v, c[2:0], c[5:3], c[7:6]};
      else   l = {v, c[2:0], c[5:3], c[8:6]};
    end else if (ph == PH_LOAD || s == 2'd3) begin
      // natural input index, and the last stage: vary the least significant digit(s)
      if (m) l = {1'b0, c[7:0], v};
      else   l = {c, v};
    end else begin
      unique case ({m, s})
        3'b0_00: l = {v, c};
        3'b0_01: l = {c[8:6], v, c[5:0]};
        3'b0_10: l = {c[8:3], v, c[2:0]};
        3'b1_00: l = {1'b0, v, c[7:0]};
        3'b1_01: l = {1'b0, c[7:5], v, c[4:0]};
        default: l = {1'b0, c[7:2], v, c[1:0]};
      endcase
    end
    return l;
  endfunction

  always_comb begin
    label_t     l;
    logic [1:0] p, q;
    logic [LB-1:0] r, f;
    p = 2'(3 - stage);
    q = (phase == PH_STAGE && stage != 2'd3) ? 2'(p - 2'd1) : 2'd3;
    perm  = m2k && (phase == PH_LOAD || (phase == PH_STAGE && stage == 2'd3));
    state = bank_of(label_of(m2k, phase, stage, cnt, 3'd0), m2k);
    for (int v = 0; v < LANES; v++) begin
      l = label_of(m2k, phase, stage, cnt, 3'(v));
      rd_addr[v] = addr_excl(l, (phase == PH_OUT) ? 2'd3 : p, m2k);
      wr_addr[v] = addr_excl(l, q, m2k);
      // twiddle W_{8*stride}^(v*r) = W_4096^(v*r*f), r = label mod stride
      unique case ({m2k, stage})
        3'b0_00: begin r = {3'b0, l[8:0]};  f = 12'd1;   end
        3'b0_01: begin r = {6'b0, l[5:0]};  f = 12'd8;   end
        3'b0_10: begin r = {9'b0, l[2:0]};  f = 12'd64;  end
        3'b1_00: begin r = {4'b0, l[7:0]};  f = 12'd2;   end
        3'b1_01: begin r = {7'b0, l[4:0]};  f = 12'd16;  end
        3'b1_10: begin r = {10'b0, l[1:0]}; f = 12'd128; end
        default: begin r = '0;              f = 12'd0;   end
      endcase
      tw_exp[v] = (phase == PH_STAGE) ? LB'(LB'(v) * r * f) : '0;
      tw_byp[v] = (tw_exp[v] == '0);
    end
  end
endmodule
