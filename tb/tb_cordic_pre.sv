// tb_cordic_pre: the reduced angle lies in [0, pi/4] and, combined with the
// mapping signals, gives back the original angle (circular rotation); the
// folded vector lies in the first octant with the same magnitudes
// (circular vectoring); hyperbolic sign symmetry.
module tb_cordic_pre;
  import cordic_pkg::*;
  logic t, m;
  logic signed [XW-1:0] x, y;
  logic signed [AW-1:0] theta, phi;
  logic signed [IW-1:0] x_o, y_o;
  oct_t oct;
  int checks = 0, failures = 0;

  cordic_pre dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, back;
    for (int n = 0; n < 3000; n++) begin
      t = n[0]; m = n[1];
      x = XW'($urandom); y = XW'($urandom);
      theta = t ? AW'($signed($urandom_range(205886, 0)) - 102943) : AW'($signed($urandom_range(60000, 0)) - 30000);
      #1;
      if (!m && t) begin
        a = oct.refl ? 51472 - int'(phi) : int'(phi);
        back = a + int'(oct.q) * 51472;
        if (back > 102944) back -= 205887;
        checks++;
        if (phi < 0 || phi > 25736 || back - int'(theta) > 1 || back - int'(theta) < -1 ||
            y_o != (oct.refl ? -(IW'(y) <<< GB) : (IW'(y) <<< GB))) begin
          failures++; $display("FAIL circ rot theta=%0d phi=%0d q=%0d refl=%0d", theta, phi, oct.q, oct.refl);
        end
      end else if (!m) begin
        checks++;
        if (phi != (theta < 0 ? -theta : theta) || oct.neg != (theta < 0)) failures++;
      end else if (t) begin
        int ax, ay;
        ax = (x < 0) ? -int'(x) : int'(x);
        ay = (y < 0) ? -int'(y) : int'(y);
        checks++;
        if (y_o > x_o || y_o < 0 || (x_o >>> GB) != ((ax > ay) ? ax : ay) || (y_o >>> GB) != ((ax > ay) ? ay : ax) ||
            oct.sx != (x < 0) || oct.neg != (y < 0)) begin
          failures++; $display("FAIL circ vec x=%0d y=%0d", x, y);
        end
      end else begin
        checks++;
        if (y_o < 0 || oct.neg != (y < 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
