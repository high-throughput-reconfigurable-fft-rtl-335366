// tb_approx_mult: the truncated multiplier against the exact product.
// An exact instance (TRUNC = 0) must match a*b bit for bit; the default
// instance must stay within BW*2^TRUNC of a*b, never exceed it by more than the
// negative-row rounding allows, and differ from it for some operands.
module tb_approx_mult;
  localparam int AW = 20, BW = 16, TRUNC = 12;
  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic signed [AW+BW-1:0] p_apx, p_ex;
  int checks = 0, failures = 0, ndiff = 0;

  approx_mult #(.AW(AW), .BW(BW), .TRUNC(TRUNC)) u_apx (.a, .b, .p(p_apx));
  approx_mult #(.AW(AW), .BW(BW), .TRUNC(0))     u_ex  (.a, .b, .p(p_ex));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_p, d;
    for (int n = 0; n < 3000; n++) begin
      a = AW'($urandom);
      b = BW'($urandom);
      if (n == 0) begin a = -(1 <<< (AW-1)); b = -(1 <<< (BW-1)); end
      if (n == 1) begin a = 20'sd1; b = -16'sd1; end
      #1;
      ref_p = longint'(a) * longint'(b);
      checks++;
      if (longint'(p_ex) != ref_p) begin
        failures++;
        $display("FAIL exact %0d*%0d = %0d got %0d", a, b, ref_p, p_ex);
      end
      d = longint'(p_apx) - ref_p;
      if (d != 0) ndiff++;
      checks++;
      if (d > (longint'(BW) << TRUNC) || d < -(longint'(BW) << TRUNC)) begin
        failures++;
        $display("FAIL approx %0d*%0d = %0d got %0d", a, b, ref_p, p_apx);
      end
    end
    checks++;
    if (ndiff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
