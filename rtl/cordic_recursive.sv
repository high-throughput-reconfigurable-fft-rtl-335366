// cordic_recursive: recursive generalized reconfigurable CORDIC (basic shift 2).
//
// Same function and formats as cordic_pipelined, computed by a single
// micro-rotator: start loads the pre-processed request into the working
// register; an iteration counter (0..14) drives the sequence generator, which
// gives the shift and decision for the RCCU, and the result is fed back each
// cycle. After the 15th iteration the post-processed result is registered and
// done pulses for one cycle. busy is high from the cycle after start until
// done; a start while busy is ignored. Latency: done is high 16 cycles after
// the clock edge that takes start; the next start can be taken in the cycle
// done is high, so one request every 17 cycles.
// The single micro-rotator with counter and sequence generator follows the
// document; the start/busy/done handshake is this design's.
module cordic_recursive
  import cordic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 t,
  input  logic                 m,
  input  logic signed [XW-1:0] x_i,
  input  logic signed [XW-1:0] y_i,
  input  logic signed [AW-1:0] theta_i,
  output logic                 busy,
  output logic                 done,
  output logic signed [XW-1:0] x_o,
  output logic signed [XW-1:0] y_o,
  output logic signed [AW-1:0] theta_o
);
  logic                 t_q, m_q;
  oct_t                 oct_q, oct_d;
  logic signed [IW-1:0] x_q, y_q, x_d, y_d, xn, yn;
  logic signed [AW-1:0] phi_q, phi_d, th_q, thn;
  logic [3:0]           it, s;
  logic                 rbit, acc, last;

  cordic_pre u_pre (.t, .m, .x(x_i), .y(y_i), .theta(theta_i),
                    .x_o(x_d), .y_o(y_d), .phi(phi_d), .oct(oct_d));
  mrsg u_seq (.i(it), .theta(phi_q), .acc, .th_i(th_q), .s, .rbit, .th_o(thn));
  rccu u_rccu (.t(t_q), .m(m_q), .s, .rbit, .x_i(x_q), .y_i(y_q), .x_o(xn), .y_o(yn), .acc);

  assign last = (it == 4'(NIT - 1));

  logic signed [XW-1:0] px, py;
  logic signed [AW-1:0] pth;
  cordic_post u_post (.t(t_q), .m(m_q), .oct(oct_q), .x_i(xn), .y_i(yn), .th_i(thn),
                      .x_o(px), .y_o(py), .th_o(pth));

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      it   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        it    <= '0;
        t_q   <= t;
        m_q   <= m;
        oct_q <= oct_d;
        x_q   <= x_d;
        y_q   <= y_d;
        phi_q <= phi_d;
        th_q  <= '0;
      end
    end else begin
      x_q  <= xn;
      y_q  <= yn;
      th_q <= thn;
      it   <= it + 4'd1;
      if (last) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        x_o     <= px;
        y_o     <= py;
        theta_o <= pth;
      end
    end
  end
endmodule
