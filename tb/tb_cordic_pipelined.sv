// tb_cordic_pipelined: checks the pipelined reconfigurable CORDIC against
// double-precision math in all four configurations (circular / hyperbolic,
// rotation / vectoring), one request per cycle, and checks the 10-cycle
// latency; a second instance with PER = 1 must give the same results 7
// cycles later. Angles cover all four quadrants in circular rotation and all
// octants in circular vectoring.
module tb_cordic_pipelined;
  import cordic_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic valid_i, t, m, valid_o;
  logic signed [XW-1:0] x_i, y_i, x_o, y_o;
  logic signed [AW-1:0] theta_i, theta_o;

  cordic_pipelined dut (.*);

  // the same chain with a register after every RCCU (PER = 1): bit-identical
  // results, 17 instead of 10 cycles after the input
  logic                 v1;
  logic signed [XW-1:0] x1, y1;
  logic signed [AW-1:0] th1;
  cordic_pipelined #(.PER(1)) dut1 (.clk, .rst, .valid_i, .t, .m, .x_i, .y_i, .theta_i,
                                    .valid_o(v1), .x_o(x1), .y_o(y1), .theta_o(th1));
  logic [XW+XW+AW:0] hist [7];
  int n_per1 = 0;
  always @(posedge clk) begin
    hist[0] <= {valid_o, x_o, y_o, theta_o};
    for (int k = 1; k < 7; k++) hist[k] <= hist[k-1];
    if (!rst && cyc > 30 && hist[6][XW+XW+AW]) begin
      checks++; n_per1++;
      if ({v1, x1, y1, th1} != hist[6]) begin failures++; $display("FAIL PER=1 result differs"); end
    end
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NT = 400;
  real ex [NT], ey [NT], eth [NT];
  logic [1:0] cfg [NT];
  int  tin [NT];
  real maxe [4];
  localparam real TOL_C = 0.003, TOL_H = 0.008, TOL_A = 0.003, TOL_AH = 0.005;

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(1000000, 0)) / 1000000.0;
  endfunction

  initial begin
    int got;
    real xr, yr, th, c, s;
    valid_i = 0; t = 0; m = 0; x_i = 0; y_i = 0; theta_i = 0;
    for (int i = 0; i < 4; i++) maxe[i] = 0.0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    fork
      begin
        for (int n = 0; n < NT; n++) begin
          @(negedge clk);
          cfg[n] = 2'(n % 4);           // {m, ~t}
          t = ~cfg[n][0];
          m = cfg[n][1];
          case (cfg[n])
            2'd0: begin xr = rnd(-1.0, 1.0); yr = rnd(-1.0, 1.0); th = rnd(-3.14, 3.14); end
            2'd1: begin xr = rnd(-1.0, 1.0); yr = rnd(-1.0, 1.0); th = rnd(-0.95, 0.95); end
            2'd2: begin xr = rnd(-1.5, 1.5); yr = rnd(-1.5, 1.5); th = 0.0; end
            default: begin xr = rnd(0.5, 1.5); yr = xr * rnd(-0.6, 0.6); th = 0.0; end
          endcase
          x_i = XW'($rtoi(xr * 8192.0));
          y_i = XW'($rtoi(yr * 8192.0));
          theta_i = AW'($rtoi(th * 32768.0));
          xr = real'(x_i) / 8192.0; yr = real'(y_i) / 8192.0; th = real'(theta_i) / 32768.0;
          case (cfg[n])
            2'd0: begin c = $cos(th); s = $sin(th); ex[n] = xr*c - yr*s; ey[n] = xr*s + yr*c; end
            2'd1: begin c = $cosh(th); s = $sinh(th); ex[n] = xr*c + yr*s; ey[n] = xr*s + yr*c; end
            2'd2: begin ex[n] = $sqrt(xr*xr + yr*yr); eth[n] = $atan2(yr, xr); end
            default: begin ex[n] = $sqrt(xr*xr - yr*yr); eth[n] = 0.5 * $ln((xr + yr) / (xr - yr)); end
          endcase
          tin[n] = cyc;
          valid_i = 1'b1;
        end
        @(negedge clk) valid_i = 1'b0;
      end
      begin
        got = 0;
        while (got < NT) begin
          @(posedge clk);
          if (valid_o) begin
            real dx, dy, dth, tol;
            dx = real'(x_o) / 8192.0 - ex[got];
            dy = real'(y_o) / 8192.0 - ey[got];
            dth = real'(theta_o) / 32768.0 - eth[got];
            if (dx < 0) dx = -dx;
            if (dy < 0) dy = -dy;
            if (dth < 0) dth = -dth;
            if (cfg[got][1]) begin
              // vectoring: angle and radius
              if (dth > 3.14) dth = 6.283185 - dth;   // +-pi wrap
              tol = cfg[got][0] ? TOL_AH : TOL_A;
              checks++;
              if (dth > tol || dx > 4.0 * tol) begin
                failures++;
                $display("FAIL vec cfg=%0d n=%0d dth=%f dx=%f", cfg[got], got, dth, dx);
              end
              if (dth > maxe[cfg[got]]) maxe[cfg[got]] = dth;
            end else begin
              tol = cfg[got][0] ? TOL_H : TOL_C;
              checks++;
              if (dx > tol || dy > tol) begin
                failures++;
                $display("FAIL rot cfg=%0d n=%0d dx=%f dy=%f", cfg[got], got, dx, dy);
              end
              if (dx > maxe[cfg[got]]) maxe[cfg[got]] = dx;
              if (dy > maxe[cfg[got]]) maxe[cfg[got]] = dy;
            end
            checks++;
            if (cyc - tin[got] != 10) begin
              failures++;
              $display("FAIL latency %0d", cyc - tin[got]);
            end
            got++;
          end
        end
      end
    join
    $display("max error: circ-rot %f hyp-rot %f circ-vec %f hyp-vec %f", maxe[0], maxe[1], maxe[2], maxe[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
