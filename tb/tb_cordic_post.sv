// tb_cordic_post: quarter-turn swap/complement for each q/refl combination,
// angle mapping back to [-pi, pi] for every octant flag combination, and
// rounding/saturation to 16 bits.
module tb_cordic_post;
  import cordic_pkg::*;
  logic t, m;
  oct_t oct;
  logic signed [IW-1:0] x_i, y_i;
  logic signed [AW-1:0] th_i, th_o;
  logic signed [XW-1:0] x_o, y_o;
  int checks = 0, failures = 0;

  cordic_post dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr, yr, xe, ye, k, a;
    for (int n = 0; n < 2000; n++) begin
      t = 1; m = n[0];
      oct = oct_t'($urandom);
      x_i = IW'($signed($urandom_range(200000, 0)) - 100000);
      y_i = IW'($signed($urandom_range(200000, 0)) - 100000);
      th_i = AW'($urandom_range(25736, 0));
      #1;
      xr = (int'(x_i) + 8) >>> 4;
      yr = (int'(y_i) + 8) >>> 4;
      if (!m) begin
        if (oct.refl) yr = (int'(-y_i) + 8) >>> 4;
        k = (int'(oct.q) + int'(oct.refl)) % 4;
        case (k)
          0: begin xe = xr; ye = yr; end
          1: begin xe = -yr; ye = xr; end
          2: begin xe = -xr; ye = -yr; end
          default: begin xe = yr; ye = -xr; end
        endcase
        checks++;
        if (int'(x_o) - xe > 1 || int'(x_o) - xe < -1 || int'(y_o) - ye > 1 || int'(y_o) - ye < -1) begin
          failures++; $display("FAIL rot k=%0d got (%0d,%0d) want (%0d,%0d)", k, x_o, y_o, xe, ye);
        end
      end else begin
        a = int'(th_i);
        if (oct.swap) a = 51472 - a;
        if (oct.sx) a = 102944 - a;
        if (oct.neg) a = -a;
        checks++;
        if (int'(th_o) != a) begin failures++; $display("FAIL vec angle %0d want %0d", th_o, a); end
      end
    end
    // saturation
    t = 1; m = 0; oct = '0; x_i = 21'sd600000; y_i = -21'sd600000; #1;
    checks++;
    if (x_o != 16'sd32767 || y_o != -16'sd32768) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
