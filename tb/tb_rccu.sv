// tb_rccu: one micro-rotation against the third-order formulas evaluated in
// double precision (circular / hyperbolic, both directions), the decision bit
// in both modes, and pass-through when the step is not taken.
module tb_rccu;
  import cordic_pkg::*;
  logic t, m, rbit, acc;
  logic [3:0] s;
  logic signed [IW-1:0] x_i, y_i, x_o, y_o;
  int checks = 0, failures = 0;

  rccu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y, a, c, sn, xe, ye, d;
    bit take;
    for (int n = 0; n < 4000; n++) begin
      t = n[0]; m = n[1]; rbit = n[2];
      s = 4'($urandom_range(14, 2));
      x_i = IW'($signed($urandom_range(400000, 0)) - 200000);
      y_i = IW'($signed($urandom_range(400000, 0)) - 200000);
      #1;
      x = real'(x_i); y = real'(y_i);
      a = 1.0 / real'(1 << s);
      if (t) begin c = 1.0 - a * a / 2.0; sn = a - (a * a * a) / 8.0; end
      else   begin c = 1.0 + a * a / 2.0; sn = a + (a * a * a) / 4.0; end
      d = m ? -1.0 : 1.0;
      if (t) begin xe = c * x - d * sn * y; ye = c * y + d * sn * x; end
      else   begin xe = c * x + d * sn * y; ye = c * y + d * sn * x; end
      take = m ? (ye >= 2.0) : rbit;       // stay clear of rounding near zero
      if (m && ye > -2.0 && ye < 2.0) continue;
      checks++;
      if (acc != take) begin failures++; $display("FAIL acc t=%0d m=%0d", t, m); end
      if (!take) begin xe = x; ye = y; end
      checks++;
      if ((real'(x_o) - xe) > 6.0 || (real'(x_o) - xe) < -6.0 ||
          (real'(y_o) - ye) > 6.0 || (real'(y_o) - ye) < -6.0) begin
        failures++;
        $display("FAIL t=%0d m=%0d s=%0d got (%0d,%0d) want (%f,%f)", t, m, s, x_o, y_o, xe, ye);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
