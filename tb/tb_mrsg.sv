// tb_mrsg: shift sequence 2,2,2,3..14; the decisions of rotation mode
// reproduce the reduced angle (k*2^-2 + bits down to 2^-14) when accumulated.
module tb_mrsg;
  import cordic_pkg::*;
  logic [3:0] i, s;
  logic signed [AW-1:0] theta, th_i, th_o;
  logic acc, rbit;
  int checks = 0, failures = 0;

  mrsg dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int n = 0; n < 500; n++) begin
      theta = AW'($urandom_range(25736, 0));
      sum = 0;
      for (int k = 0; k < 15; k++) begin
        i = 4'(k); th_i = AW'(sum); acc = 0;
        #1;
        checks++;
        if (int'(s) != ((k < 3) ? 2 : k)) begin failures++; $display("FAIL s(%0d) = %0d", k, s); end
        acc = rbit;
        #1;
        sum = int'(th_o);
      end
      checks++;
      if (sum != (int'(theta) & ~1)) begin failures++; $display("FAIL theta %0d sum %0d", theta, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
