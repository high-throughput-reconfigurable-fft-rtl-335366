// cordic_pipelined: pipelined generalized reconfigurable CORDIC (basic shift 2).
//
// One request per cycle: (t, m, x, y, theta). Rotation mode (m = 0) rotates
// (x, y) by theta: circular (t = 1) for theta in [-pi, pi], hyperbolic (t = 0)
// for |theta| up to about 1 rad. Vectoring mode (m = 1) drives y to zero and
// returns the angle (atan2(y, x) circular, atanh(y/x) hyperbolic) and the
// unscaled radius in x_o. The scaling-free micro-rotations need no gain
// correction.
//
// Structure: pre-processing (registered), a chain of 15 RCCUs with fixed
// shifts 2, 2, 2, 3, ..., 14, each with its sequence-generator slice, and
// post-processing (registered). A pipeline register follows every PER-th
// RCCU and the last one: with PER = 2 the chain has 8 register stages, and
// the latency is 2 + ceil(15/PER) = 10 cycles; throughput 1 per cycle.
// The stage sequence, the combined rotation/vectoring stage and two RCCUs
// per pipeline stage (eight stages) follow the document; formats and the
// registers around pre- and post-processing are this design's.
module cordic_pipelined
  import cordic_pkg::*;
#(
  parameter int PER = 2   // RCCUs per pipeline register stage
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic                 t,
  input  logic                 m,
  input  logic signed [XW-1:0] x_i,
  input  logic signed [XW-1:0] y_i,
  input  logic signed [AW-1:0] theta_i,
  output logic                 valid_o,
  output logic signed [XW-1:0] x_o,
  output logic signed [XW-1:0] y_o,
  output logic signed [AW-1:0] theta_o
);
  typedef struct packed {
    logic                 v;
    logic                 t;
    logic                 m;
    oct_t                 oct;
    logic signed [IW-1:0] x;
    logic signed [IW-1:0] y;
    logic signed [AW-1:0] phi;   // reduced rotation angle
    logic signed [AW-1:0] th;    // accumulated angle
  } st_t;

  // stg[i]: state entering RCCU i (registered or straight from RCCU i-1)
  st_t stg [0:NIT];
  st_t pre_d, pre_q;

  cordic_pre u_pre (.t, .m, .x(x_i), .y(y_i), .theta(theta_i),
                    .x_o(pre_d.x), .y_o(pre_d.y), .phi(pre_d.phi), .oct(pre_d.oct));
  assign pre_d.v  = valid_i;
  assign pre_d.t  = t;
  assign pre_d.m  = m;
  assign pre_d.th = '0;

  always_ff @(posedge clk) begin
    pre_q <= pre_d;
    if (rst) pre_q.v <= 1'b0;
  end
  assign stg[0] = pre_q;

  for (genvar i = 0; i < NIT; i++) begin : g_stage
    logic [3:0]           s;
    logic                 rbit, acc;
    logic signed [IW-1:0] xn, yn;
    logic signed [AW-1:0] thn;
    st_t                  nxt;
    mrsg u_seq (.i(4'(i)), .theta(stg[i].phi), .acc, .th_i(stg[i].th), .s, .rbit, .th_o(thn));
    rccu u_rccu (.t(stg[i].t), .m(stg[i].m), .s, .rbit, .x_i(stg[i].x), .y_i(stg[i].y),
                 .x_o(xn), .y_o(yn), .acc);
    always_comb begin
      nxt    = stg[i];
      nxt.x  = xn;
      nxt.y  = yn;
      nxt.th = thn;
    end
    if ((i + 1) % PER == 0 || i == NIT - 1) begin : g_reg
      st_t q;
      always_ff @(posedge clk) begin
        q <= nxt;
        if (rst) q.v <= 1'b0;
      end
      assign stg[i+1] = q;
    end else begin : g_comb
      assign stg[i+1] = nxt;
    end
  end

  logic signed [XW-1:0] px, py;
  logic signed [AW-1:0] pth;
  cordic_post u_post (.t(stg[NIT].t), .m(stg[NIT].m), .oct(stg[NIT].oct), .x_i(stg[NIT].x),
                      .y_i(stg[NIT].y), .th_i(stg[NIT].th), .x_o(px), .y_o(py), .th_o(pth));

  always_ff @(posedge clk) begin
    x_o     <= px;
    y_o     <= py;
    theta_o <= pth;
    valid_o <= rst ? 1'b0 : stg[NIT].v;
  end
endmodule
