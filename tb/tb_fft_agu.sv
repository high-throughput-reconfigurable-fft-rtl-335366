// tb_fft_agu: replays the address streams of a whole transform (both sizes)
// against a label-tracking memory model. Each access must use 8 distinct
// banks; a phase must never write one location twice; every read must find
// the sample the butterfly (or output beat) needs, computed here from strides;
// twiddle exponents must equal v * (n mod stride) * 4096 / (8 * stride).
module tb_fft_agu;
  import fft_pkg::*;
  logic m2k;
  phase_t phase;
  logic [1:0] stage;
  logic [8:0] cnt;
  logic [7:0][8:0] rd_addr, wr_addr;
  logic [7:0][11:0] tw_exp;
  logic [7:0] tw_byp;
  logic [2:0] state;
  logic perm;
  int checks = 0, failures = 0;

  fft_agu dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mem [2][8][512];     // label stored at group/bank/address
  bit wr_seen [8][512];

  function automatic int bank_of_lane(input int v);
    int pv;
    pv = perm ? ((v % 4) * 2 + v / 4) : v;
    return (pv + int'(state)) % 8;
  endfunction

  // sample a lane needs: n for load/stages, label of bin k for output
  function automatic int need(input bit m, input int ph, input int s, input int c, input int v);
    int stride, n;
    if (ph == 0) return 8 * c + v;                 // load
    if (ph == 2) begin                             // output bin k = 8c+v
      int k;
      k = 8 * c + v;
      if (m) return 256 * (k % 8) + 32 * ((k / 8) % 8) + 4 * ((k / 64) % 8) + k / 512;
      return 512 * (k % 8) + 64 * ((k / 8) % 8) + 8 * ((k / 64) % 8) + k / 512;
    end
    if (m && s == 3) return 8 * c + v;             // two radix-4 butterflies
    stride = m ? (256 >> (3 * s)) : (512 >> (3 * s));
    n = (c / stride) * stride * 8 + v * stride + c % stride;
    return n;
  endfunction

  task automatic do_phase(input bit m, input int ph, input int s);
    int nb, grp_r, grp_w, b, want, stride, we;
    bit used [8];
    nb = m ? 256 : 512;
    m2k = m;
    phase = (ph == 0) ? PH_LOAD : (ph == 1) ? PH_STAGE : PH_OUT;
    stage = 2'(s);
    grp_r = (ph == 1 && s % 2 == 1) ? 1 : 0;
    grp_w = (ph == 0) ? 0 : 1 - grp_r;
    foreach (wr_seen[i, j]) wr_seen[i][j] = 0;
    for (int c = 0; c < nb; c++) begin
      cnt = 9'(c);
      #1;
      foreach (used[i]) used[i] = 0;
      for (int v = 0; v < 8; v++) begin
        b = bank_of_lane(v);
        checks++;
        if (used[b]) begin failures++; $display("FAIL bank conflict ph=%0d s=%0d c=%0d", ph, s, c); end
        used[b] = 1;
        want = need(m, ph, s, c, v);
        if (ph != 0) begin
          checks++;
          if (mem[grp_r][b][rd_addr[v]] != want) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d ph=%0d s=%0d c=%0d v=%0d read %0d want %0d",
                                        m, ph, s, c, v, mem[grp_r][b][rd_addr[v]], want);
          end
        end
        if (ph == 1) begin
          stride = m ? ((s == 3) ? 1 : (256 >> (3 * s))) : (512 >> (3 * s));
          we = (v * (want % stride) * (4096 / (8 * stride))) % 4096;
          if (m && s == 3) we = 0;
          checks++;
          if (int'(tw_exp[v]) != we || tw_byp[v] != (we == 0)) begin
            failures++;
            $display("FAIL twiddle m=%0d s=%0d c=%0d v=%0d %0d want %0d", m, s, c, v, tw_exp[v], we);
          end
        end
        if (ph != 2) begin
          checks++;
          if (wr_seen[b][wr_addr[v]]) begin failures++; $display("FAIL overwrite ph=%0d s=%0d", ph, s); end
          wr_seen[b][wr_addr[v]] = 1;
        end
      end
      // in-place: a stage writes back the same samples it read
      if (ph != 2) for (int v = 0; v < 8; v++) mem[grp_w][bank_of_lane(v)][wr_addr[v]] = need(m, ph, s, c, v);
    end
  endtask

  initial begin
    for (int mm = 0; mm < 2; mm++) begin
      foreach (mem[g, b, a]) mem[g][b][a] = -1;
      do_phase(bit'(mm), 0, 0);
      for (int s = 0; s < 4; s++) do_phase(bit'(mm), 1, s);
      do_phase(bit'(mm), 2, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
