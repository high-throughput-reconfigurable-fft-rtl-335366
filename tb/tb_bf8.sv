// tb_bf8: radix-8 mode against an 8-point DFT in double precision (within the
// approximate sqrt(2)/2 error) and radix-4 mode against two exact 4-point
// DFTs (no multiplier involved, so exact).
module tb_bf8;
  import fft_pkg::*;
  cplx_t [7:0] x;
  logic r4;
  logic signed [7:0][19:0] yr, yi;
  int checks = 0, failures = 0;

  bf8 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rr, ri, th;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 8; i++) begin
        x[i].re = 16'($urandom);
        x[i].im = 16'($urandom);
      end
      r4 = n[0];
      #1;
      for (int k = 0; k < 8; k++) begin
        rr = 0.0; ri = 0.0;
        if (!r4) begin
          for (int i = 0; i < 8; i++) begin
            th = 6.283185307179586 * ((i * k) % 8) / 8.0;
            rr += real'(x[i].re) * $cos(th) + real'(x[i].im) * $sin(th);
            ri += real'(x[i].im) * $cos(th) - real'(x[i].re) * $sin(th);
          end
        end else begin
          for (int i = 0; i < 4; i++) begin
            th = 6.283185307179586 * ((i * (k % 4)) % 4) / 4.0;
            rr += real'(x[4*(k/4)+i].re) * $cos(th) + real'(x[4*(k/4)+i].im) * $sin(th);
            ri += real'(x[4*(k/4)+i].im) * $cos(th) - real'(x[4*(k/4)+i].re) * $sin(th);
          end
        end
        checks++;
        if ((real'($signed(yr[k])) - rr) > 4.0 || (real'($signed(yr[k])) - rr) < -4.0 ||
            (real'($signed(yi[k])) - ri) > 4.0 || (real'($signed(yi[k])) - ri) < -4.0 ||
            (r4 && ((real'($signed(yr[k])) - rr) ** 2 + (real'($signed(yi[k])) - ri) ** 2 > 0.01))) begin
          failures++;
          $display("FAIL r4=%0d k=%0d got (%0d,%0d) want (%f,%f)", r4, k, $signed(yr[k]), $signed(yi[k]), rr, ri);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
