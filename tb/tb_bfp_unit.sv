// tb_bfp_unit: headroom equals the smallest count of redundant sign bits over
// all words written since the last clear, for random magnitudes, also when a
// word is written in the same cycle as the clear.
module tb_bfp_unit;
  import fft_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic clr, valid;
  cplx_t [LANES-1:0] d;
  logic [3:0] headroom;
  int checks = 0, failures = 0;

  bfp_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hr(input logic signed [15:0] v);
    int h;
    h = 0;
    for (int i = 14; i >= 0; i--) begin
      if (v[i] != v[15]) break;
      h++;
    end
    return h;
  endfunction

  initial begin
    int want;
    clr = 1; valid = 0; d = '0;
    @(negedge clk);
    for (int blk = 0; blk < 200; blk++) begin
      // even blocks: clear cycle first; odd blocks: clear together with the
      // first word, which must then count
      if (blk % 2 == 0) begin
        clr = 1; valid = 0;
        @(negedge clk);
      end
      clr = 0;
      want = 15;
      for (int w = 0; w < 1 + blk % 7; w++) begin
        int mag;
        clr = (blk % 2 == 1) && (w == 0);
        mag = $urandom_range(15, 1);
        for (int l = 0; l < LANES; l++) begin
          d[l].re = 16'($signed($urandom) >>> (16 - mag + $urandom_range(3, 0)));
          d[l].im = 16'($signed($urandom) >>> (16 - mag + $urandom_range(3, 0)));
        end
        valid = ($urandom_range(4, 0) != 0);
        if (valid) for (int l = 0; l < LANES; l++) begin
          if (hr(d[l].re) < want) want = hr(d[l].re);
          if (hr(d[l].im) < want) want = hr(d[l].im);
        end
        @(negedge clk);
      end
      valid = 0; clr = 0;
      checks++;
      if (int'(headroom) != want) begin failures++; $display("FAIL headroom %0d want %0d", headroom, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
