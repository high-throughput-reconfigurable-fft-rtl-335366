// fft_cordic_top: the FFT processor and the two reconfigurable CORDIC units.
//
// The two designs are independent and share only clock and reset:
//   fft_*  : fft_core, 4096/2048-point approximate block-floating-point FFT,
//            8 samples per cycle in and out in natural order;
//   cp_*   : cordic_pipelined, one rotation/vectoring request per cycle,
//            10-cycle latency;
//   cr_*   : cordic_recursive, one request per 17 cycles with a single
//            micro-rotator.
// See the submodules for the interfaces and timing.
module fft_cordic_top
  import fft_pkg::*;
  import cordic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // FFT
  input  logic                 fft_m2k,
  input  logic                 fft_in_valid,
  output logic                 fft_in_ready,
  input  cplx_t [LANES-1:0]    fft_in_data,
  output logic                 fft_out_valid,
  output cplx_t [LANES-1:0]    fft_out_data,
  output logic [4:0]           fft_out_exp,
  output logic                 fft_frame_done,
  // pipelined CORDIC
  input  logic                 cp_valid_i,
  input  logic                 cp_t,
  input  logic                 cp_m,
  input  logic signed [XW-1:0] cp_x_i,
  input  logic signed [XW-1:0] cp_y_i,
  input  logic signed [AW-1:0] cp_theta_i,
  output logic                 cp_valid_o,
  output logic signed [XW-1:0] cp_x_o,
  output logic signed [XW-1:0] cp_y_o,
  output logic signed [AW-1:0] cp_theta_o,
  // recursive CORDIC
  input  logic                 cr_start,
  input  logic                 cr_t,
  input  logic                 cr_m,
  input  logic signed [XW-1:0] cr_x_i,
  input  logic signed [XW-1:0] cr_y_i,
  input  logic signed [AW-1:0] cr_theta_i,
  output logic                 cr_busy,
  output logic                 cr_done,
  output logic signed [XW-1:0] cr_x_o,
  output logic signed [XW-1:0] cr_y_o,
  output logic signed [AW-1:0] cr_theta_o
);
  fft_core u_fft (
    .clk, .rst, .m2k(fft_m2k), .in_valid(fft_in_valid), .in_ready(fft_in_ready),
    .in_data(fft_in_data), .out_valid(fft_out_valid), .out_data(fft_out_data),
    .out_exp(fft_out_exp), .frame_done(fft_frame_done)
  );

  cordic_pipelined u_cp (
    .clk, .rst, .valid_i(cp_valid_i), .t(cp_t), .m(cp_m), .x_i(cp_x_i), .y_i(cp_y_i),
    .theta_i(cp_theta_i), .valid_o(cp_valid_o), .x_o(cp_x_o), .y_o(cp_y_o), .theta_o(cp_theta_o)
  );

  cordic_recursive u_cr (
    .clk, .rst, .start(cr_start), .t(cr_t), .m(cr_m), .x_i(cr_x_i), .y_i(cr_y_i),
    .theta_i(cr_theta_i), .busy(cr_busy), .done(cr_done), .x_o(cr_x_o), .y_o(cr_y_o),
    .theta_o(cr_theta_o)
  );
endmodule
