// tb_twiddle_rom: every exponent 0..4095 (8 at a time) against
// round(32767*cos), round(-32767*sin) within one LSB, with 1-cycle latency.
module tb_twiddle_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0][11:0] exp_i;
  logic signed [7:0][15:0] wr_o, wi_o;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s;
    for (int b = 0; b < 512; b++) begin
      @(negedge clk);
      for (int l = 0; l < 8; l++) exp_i[l] = 12'(8 * b + l);
      @(posedge clk);
      #1;
      for (int l = 0; l < 8; l++) begin
        c = 32767.0 * $cos(6.283185307179586 * (8 * b + l) / 4096.0);
        s = -32767.0 * $sin(6.283185307179586 * (8 * b + l) / 4096.0);
        checks++;
        if (real'($signed(wr_o[l])) - c > 1.0 || real'($signed(wr_o[l])) - c < -1.0 ||
            real'($signed(wi_o[l])) - s > 1.0 || real'($signed(wi_o[l])) - s < -1.0) begin
          failures++;
          $display("FAIL e=%0d got (%0d,%0d) want (%f,%f)", 8*b+l, wr_o[l], wi_o[l], c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
