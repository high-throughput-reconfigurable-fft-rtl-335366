// tb_cordic_recursive: the recursive reconfigurable CORDIC against double
// precision in all four configurations, one request at a time; checks the
// start-to-done latency of 16 cycles, busy, and that a start while busy is
// ignored.
module tb_cordic_recursive;
  import cordic_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start, t, m, busy, done;
  logic signed [XW-1:0] x_i, y_i, x_o, y_o;
  logic signed [AW-1:0] theta_i, theta_o;

  cordic_recursive dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(1000000, 0)) / 1000000.0;
  endfunction

  initial begin
    real xr, yr, th, c, s, ex, ey, eth, dx, dy, dth;
    int cfg, t0;
    start = 0; t = 0; m = 0; x_i = 0; y_i = 0; theta_i = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cfg = n % 4;
      t = (cfg % 2 == 0);
      m = (cfg >= 2);
      case (cfg)
        0: begin xr = rnd(-1.0, 1.0); yr = rnd(-1.0, 1.0); th = rnd(-3.14, 3.14); end
        1: begin xr = rnd(-1.0, 1.0); yr = rnd(-1.0, 1.0); th = rnd(-0.95, 0.95); end
        2: begin xr = rnd(-1.5, 1.5); yr = rnd(-1.5, 1.5); th = 0.0; end
        default: begin xr = rnd(0.5, 1.5); yr = xr * rnd(-0.6, 0.6); th = 0.0; end
      endcase
      x_i = XW'($rtoi(xr * 8192.0));
      y_i = XW'($rtoi(yr * 8192.0));
      theta_i = AW'($rtoi(th * 32768.0));
      xr = real'(x_i) / 8192.0; yr = real'(y_i) / 8192.0; th = real'(theta_i) / 32768.0;
      ey = 0.0; eth = 0.0;
      case (cfg)
        0: begin c = $cos(th); s = $sin(th); ex = xr*c - yr*s; ey = xr*s + yr*c; end
        1: begin c = $cosh(th); s = $sinh(th); ex = xr*c + yr*s; ey = xr*s + yr*c; end
        2: begin ex = $sqrt(xr*xr + yr*yr); eth = $atan2(yr, xr); end
        default: begin ex = $sqrt(xr*xr - yr*yr); eth = 0.5 * $ln((xr + yr) / (xr - yr)); end
      endcase
      start = 1;
      t0 = cyc;
      @(negedge clk);
      // a second start while busy must be ignored
      x_i = 0; y_i = 0; theta_i = 0;
      checks++;
      if (!busy) failures++;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 16) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      dx = real'(x_o) / 8192.0 - ex; dy = real'(y_o) / 8192.0 - ey; dth = real'(theta_o) / 32768.0 - eth;
      if (dx < 0) dx = -dx;
      if (dy < 0) dy = -dy;
      if (dth < 0) dth = -dth;
      if (dth > 3.14) dth = 6.283185 - dth;
      checks++;
      if ((cfg == 0 && (dx > 0.003 || dy > 0.003)) || (cfg == 1 && (dx > 0.008 || dy > 0.008)) ||
          (cfg == 2 && (dth > 0.003 || dx > 0.012)) || (cfg == 3 && (dth > 0.005 || dx > 0.02))) begin
        failures++;
        $display("FAIL cfg=%0d n=%0d dx=%f dy=%f dth=%f", cfg, n, dx, dy, dth);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
