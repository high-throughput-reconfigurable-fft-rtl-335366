// tb_cmult: approximate complex multiplication against double precision,
// the bypass path, and saturation at the output range.
module tb_cmult;
  localparam int AW = 20;
  logic signed [AW-1:0] zr, zi, yr, yi;
  logic signed [15:0] wr, wi;
  logic bypass;
  int checks = 0, failures = 0;

  cmult #(.AW(AW), .TW(16), .TRUNC(12)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real er, ei, th;
    for (int n = 0; n < 2000; n++) begin
      zr = AW'($signed($urandom_range(600000, 0)) - 300000);
      zi = AW'($signed($urandom_range(600000, 0)) - 300000);
      th = 6.2831853 * real'($urandom_range(9999, 0)) / 10000.0;
      wr = 16'($rtoi(32767.0 * $cos(th)));
      wi = 16'($rtoi(32767.0 * $sin(th)));
      bypass = (n % 10 == 0);
      #1;
      if (bypass) begin
        checks++;
        if (yr != zr || yi != zi) failures++;
      end else begin
        er = (real'(zr) * real'(wr) - real'(zi) * real'(wi)) / 32768.0;
        ei = (real'(zr) * real'(wi) + real'(zi) * real'(wr)) / 32768.0;
        checks++;
        if ((real'(yr) - er) > 8.0 || (real'(yr) - er) < -8.0 ||
            (real'(yi) - ei) > 8.0 || (real'(yi) - ei) < -8.0) begin
          failures++;
          $display("FAIL z=(%0d,%0d) w=(%0d,%0d) got (%0d,%0d) want (%f,%f)", zr, zi, wr, wi, yr, yi, er, ei);
        end
      end
    end
    // saturation: (max + j max) * (w8^-1 direction) exceeds the range
    zr = 20'sd524287; zi = 20'sd524287; wr = 16'sd23170; wi = 16'sd23170; bypass = 0;
    #1;
    checks++;
    if (yi != 20'sd524287) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
