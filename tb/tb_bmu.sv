// tb_bmu: butterfly multiplication unit against double precision:
// y_k = round(DFT8(x)_k * W_k / 2^sh) (or the two DFT4 in radix-4 mode), with
// random twiddles and shifts; checks the 2-cycle latency via valid_o and the
// saturation of an overflowing result.
module tb_bmu;
  import fft_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic valid_i, r4, valid_o;
  cplx_t [7:0] x, y;
  logic signed [7:0][15:0] wr, wi;
  logic [7:0] byp;
  logic [2:0] sh;
  int checks = 0, failures = 0;

  bmu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real er [8], ei [8];
  real tw_r [8], tw_i [8];

  initial begin
    real rr, ri, th, a;
    valid_i = 0; r4 = 0; x = '0; wr = '0; wi = '0; byp = '0; sh = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      r4 = n[0];
      sh = (n < 590) ? 3'($urandom_range(4, 0)) : 3'd0;
      for (int i = 0; i < 8; i++) begin
        x[i].re = (n < 590) ? 16'($urandom) : 16'sh7fff;
        x[i].im = (n < 590) ? 16'($urandom) : 16'sh7fff;
      end
      valid_i = 1;
      for (int k = 0; k < 8; k++) begin
        rr = 0.0; ri = 0.0;
        for (int i = 0; i < 8; i++) begin
          if (!r4) th = 6.283185307179586 * ((i * k) % 8) / 8.0;
          else if (i / 4 == k / 4) th = 6.283185307179586 * (((i % 4) * (k % 4)) % 4) / 4.0;
          else continue;
          rr += real'(x[i].re) * $cos(th) + real'(x[i].im) * $sin(th);
          ri += real'(x[i].im) * $cos(th) - real'(x[i].re) * $sin(th);
        end
        er[k] = rr; ei[k] = ri;
      end
      @(negedge clk);
      valid_i = 0;
      for (int k = 0; k < 8; k++) begin
        byp[k] = (k == 0) || ($urandom_range(3, 0) == 0);
        a = 6.283185307179586 * real'($urandom_range(4095, 0)) / 4096.0;
        wr[k] = byp[k] ? 16'sd0 : 16'($rtoi(32767.0 * $cos(a)));
        wi[k] = byp[k] ? 16'sd0 : 16'($rtoi(-32767.0 * $sin(a)));
        tw_r[k] = byp[k] ? 1.0 : real'($signed(wr[k])) / 32768.0;
        tw_i[k] = byp[k] ? 0.0 : real'($signed(wi[k])) / 32768.0;
      end
      @(negedge clk);
      checks++;
      if (!valid_o) failures++;
      for (int k = 0; k < 8; k++) begin
        rr = (er[k] * tw_r[k] - ei[k] * tw_i[k]) / (2.0 ** sh);
        ri = (er[k] * tw_i[k] + ei[k] * tw_r[k]) / (2.0 ** sh);
        if (rr > 32767.0) rr = 32767.0;
        if (rr < -32768.0) rr = -32768.0;
        if (ri > 32767.0) ri = 32767.0;
        if (ri < -32768.0) ri = -32768.0;
        checks++;
        if ((real'(y[k].re) - rr) > 8.0 || (real'(y[k].re) - rr) < -8.0 ||
            (real'(y[k].im) - ri) > 8.0 || (real'(y[k].im) - ri) < -8.0) begin
          failures++;
          $display("FAIL n=%0d k=%0d r4=%0d sh=%0d got (%0d,%0d) want (%f,%f)", n, k, r4, sh, y[k].re, y[k].im, rr, ri);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
