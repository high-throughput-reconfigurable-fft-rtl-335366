// tb_commutator: the forward commutator sends lane v to bank (P(v)+state)%8,
// the reverse one takes lane v from that bank, and reverse(forward(d)) = d,
// for all 8 states with and without the 2048-point shuffle.
module tb_commutator;
  logic [7:0][31:0] d, f, r;
  logic [2:0] state;
  logic perm;
  int checks = 0, failures = 0;

  commutator #(.W(32), .REVERSE(1'b0)) u_f (.d_i(d), .state, .perm, .d_o(f));
  commutator #(.W(32), .REVERSE(1'b1)) u_r (.d_i(f), .state, .perm, .d_o(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pv, bank;
    for (int n = 0; n < 64; n++) begin
      for (int i = 0; i < 8; i++) d[i] = $urandom;
      state = 3'(n % 8);
      perm  = n[3];
      #1;
      for (int v = 0; v < 8; v++) begin
        pv   = perm ? ((v % 4) * 2 + v / 4) : v;
        bank = (pv + state) % 8;
        checks++;
        if (f[bank] != d[v]) begin failures++; $display("FAIL fwd v=%0d s=%0d p=%0d", v, state, perm); end
        checks++;
        if (r[v] != d[v]) begin failures++; $display("FAIL rev v=%0d s=%0d p=%0d", v, state, perm); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
