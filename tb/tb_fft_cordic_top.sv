// tb_fft_cordic_top: end-to-end test of the whole design at its default
// sizes. The FFT is fed a stream of four frames back to back: a full-scale
// 4096-point frame, a 2048-point frame (mode switch, radix-4 stage), a small
// 4096-point frame (block-floating-point shift skipped) and another full-scale
// 4096-point frame, each frame's input offered while the previous one is
// output. Every frame is checked bin by bin against a double-precision DFT and
// by SQNR; the latency of the first frame and the streaming period are
// checked in cycles. Meanwhile both CORDIC units process requests in all four
// trajectory/mode combinations, checked against double-precision math.
// Every mechanism is counted and must occur at least once: BFP shift applied
// and skipped, radix-4 butterflies, 2048-point shuffle, non-zero commutator
// rotation, overlapped load and output, and in the CORDIC quadrant turns,
// pi/4 reflection, octant swap, negative-angle symmetry and hyperbolic /
// vectoring requests.
module tb_fft_cordic_top;
  import fft_pkg::*;
  import cordic_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic fft_m2k, fft_in_valid, fft_in_ready, fft_out_valid, fft_frame_done;
  cplx_t [LANES-1:0] fft_in_data, fft_out_data;
  logic [4:0] fft_out_exp;
  logic cp_valid_i, cp_t, cp_m, cp_valid_o;
  logic signed [XW-1:0] cp_x_i, cp_y_i, cp_x_o, cp_y_o;
  logic signed [AW-1:0] cp_theta_i, cp_theta_o;
  logic cr_start, cr_t, cr_m, cr_busy, cr_done;
  logic signed [XW-1:0] cr_x_i, cr_y_i, cr_x_o, cr_y_o;
  logic signed [AW-1:0] cr_theta_i, cr_theta_o;

  fft_cordic_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_shift = 0, n_noshift = 0, n_r4 = 0, n_perm = 0, n_rot = 0, n_ovl = 0;
  int n_quad = 0, n_refl = 0, n_swap = 0, n_neg = 0, n_hyp = 0, n_vec = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_fft.phase == PH_STAGE && dut.u_fft.cnt == 0 && dut.u_fft.issue) begin
      if (dut.u_fft.sh != 0) n_shift++; else n_noshift++;
    end
    if (dut.u_fft.issue && dut.u_fft.r4) n_r4++;
    if ((dut.u_fft.issue && dut.u_fft.perm) || (dut.u_fft.ld_we && dut.u_fft.ld_perm)) n_perm++;
    if (fft_in_valid && fft_in_ready && fft_out_valid) n_ovl++;
    if (dut.u_fft.issue && dut.u_fft.state != 0) n_rot++;
    if (cp_valid_i) begin
      if (dut.u_cp.pre_d.oct.q != 0) n_quad++;
      if (dut.u_cp.pre_d.oct.refl) n_refl++;
      if (dut.u_cp.pre_d.oct.swap) n_swap++;
      if (dut.u_cp.pre_d.oct.neg) n_neg++;
      if (!cp_t) n_hyp++;
      if (cp_m) n_vec++;
    end
  end

  // ---------------- FFT ----------------
  // Frames are streamed back to back: each frame's input is offered while
  // the previous frame is being output (overlapped load and output).
  localparam int NF = 4;
  real ct [NMAX], st [NMAX];
  real xr [NF][NMAX], xi [NF][NMAX], yr [NF][NMAX], yi [NF][NMAX];
  int  fn [NF];
  int  t_in0, t_out [NF];

  task automatic make_frame(input int f, input int n, input int amp);
    real rr, ri;
    fn[f] = n;
    for (int i = 0; i < n; i++) begin
      xr[f][i] = real'($signed($urandom_range(2*amp, 0)) - amp);
      xi[f][i] = real'($signed($urandom_range(2*amp, 0)) - amp);
    end
    for (int kk = 0; kk < n; kk++) begin
      rr = 0.0; ri = 0.0;
      for (int i = 0; i < n; i++) begin
        int e;
        e = ((i * kk) % n) * (NMAX / n);
        rr += xr[f][i] * ct[e] + xi[f][i] * st[e];
        ri += xi[f][i] * ct[e] - xr[f][i] * st[e];
      end
      yr[f][kk] = rr; yi[f][kk] = ri;
    end
  endtask

  task automatic fft_feed(input int f);
    for (int b = 0; b < fn[f]/8; b++) begin
      @(negedge clk);
      fft_in_valid = 1'b1;
      fft_m2k = (fn[f] == 2048);
      for (int j = 0; j < 8; j++) begin
        fft_in_data[j].re = 16'($rtoi(xr[f][8*b+j]));
        fft_in_data[j].im = 16'($rtoi(xi[f][8*b+j]));
      end
      @(posedge clk);
      while (!fft_in_ready) @(posedge clk);
      if (f == 0 && b == 0) t_in0 = cyc;
    end
    @(negedge clk);
    fft_in_valid = 1'b0;
  endtask

  task automatic fft_collect(input int f, input real min_sqnr, input real rel_tol);
    int n, k, bad;
    real pk, sig, err, scale, er, ei, tol, sq;
    n = fn[f];
    pk = 0.0;
    for (int kk = 0; kk < n; kk++)
      if (yr[f][kk]*yr[f][kk] + yi[f][kk]*yi[f][kk] > pk) pk = yr[f][kk]*yr[f][kk] + yi[f][kk]*yi[f][kk];
    tol = $sqrt(pk) * rel_tol;
    k = 0; sig = 0.0; err = 0.0; bad = 0;
    while (k < n) begin
      @(posedge clk);
      if (fft_out_valid) begin
        scale = 2.0 ** fft_out_exp;
        for (int j = 0; j < 8; j++) begin
          er = real'(fft_out_data[j].re) * scale - yr[f][k+j];
          ei = real'(fft_out_data[j].im) * scale - yi[f][k+j];
          sig += yr[f][k+j]*yr[f][k+j] + yi[f][k+j]*yi[f][k+j];
          err += er*er + ei*ei;
          if (er > tol || er < -tol || ei > tol || ei < -tol) bad++;
        end
        k += 8;
      end
    end
    t_out[f] = cyc;
    sq = 10.0 * $log10(sig / err);
    checks++;
    if (bad != 0) begin failures++; $display("FAIL fft frame %0d n=%0d: %0d bins outside tolerance", f, n, bad); end
    checks++;
    if (sq < min_sqnr) begin failures++; $display("FAIL fft frame %0d n=%0d: SQNR %f dB", f, n, sq); end
    $display("fft frame %0d n=%0d exp=%0d SQNR=%.2f dB", f, n, fft_out_exp, sq);
  endtask

  // ---------------- CORDIC reference ----------------
  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(1000000, 0)) / 1000000.0;
  endfunction

  typedef struct { int cfg; real ex, ey, eth; } exp_t;
  exp_t cp_q [$];

  task automatic make_req(input int cfg, output logic tt, output logic mm, output logic signed [XW-1:0] xo,
                          output logic signed [XW-1:0] yo, output logic signed [AW-1:0] tho, output exp_t e);
    real x, y, th, c, s;
    tt = (cfg % 2 == 0); mm = (cfg >= 2);
    case (cfg)
      0: begin x = rnd(-1.0, 1.0); y = rnd(-1.0, 1.0); th = rnd(-3.14, 3.14); end
      1: begin x = rnd(-1.0, 1.0); y = rnd(-1.0, 1.0); th = rnd(-0.95, 0.95); end
      2: begin x = rnd(-1.5, 1.5); y = rnd(-1.5, 1.5); th = 0.0; end
      default: begin x = rnd(0.5, 1.5); y = x * rnd(-0.6, 0.6); th = 0.0; end
    endcase
    xo = XW'($rtoi(x * 8192.0)); yo = XW'($rtoi(y * 8192.0)); tho = AW'($rtoi(th * 32768.0));
    x = real'(xo) / 8192.0; y = real'(yo) / 8192.0; th = real'(tho) / 32768.0;
    e.cfg = cfg; e.ey = 0.0; e.eth = 0.0;
    case (cfg)
      0: begin c = $cos(th); s = $sin(th); e.ex = x*c - y*s; e.ey = x*s + y*c; end
      1: begin c = $cosh(th); s = $sinh(th); e.ex = x*c + y*s; e.ey = x*s + y*c; end
      2: begin e.ex = $sqrt(x*x + y*y); e.eth = $atan2(y, x); end
      default: begin e.ex = $sqrt(x*x - y*y); e.eth = 0.5 * $ln((x + y) / (x - y)); end
    endcase
  endtask

  function automatic bit cordic_ok(input exp_t e, input logic signed [XW-1:0] xo, input logic signed [XW-1:0] yo,
                                   input logic signed [AW-1:0] tho);
    real dx, dy, dth;
    dx = real'(xo) / 8192.0 - e.ex; dy = real'(yo) / 8192.0 - e.ey; dth = real'(tho) / 32768.0 - e.eth;
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    if (dth < 0) dth = -dth;
    if (dth > 3.14) dth = 6.283185 - dth;
    case (e.cfg)
      0: return dx <= 0.003 && dy <= 0.003;
      1: return dx <= 0.008 && dy <= 0.008;
      2: return dth <= 0.003 && dx <= 0.012;
      default: return dth <= 0.005 && dx <= 0.02;
    endcase
  endfunction

  int cp_sent = 0, cp_got = 0, cr_done_n = 0;
  bit cp_sender_done = 0;
  localparam int NCP = 2000, NCR = 100;

  initial begin
    for (int i = 0; i < NMAX; i++) begin
      ct[i] = $cos(2.0 * 3.14159265358979323846 * i / NMAX);
      st[i] = $sin(2.0 * 3.14159265358979323846 * i / NMAX);
    end
    make_frame(0, 4096, 16000);
    make_frame(1, 2048, 16000);
    make_frame(2, 4096, 300);
    make_frame(3, 4096, 16000);
    fft_in_valid = 0; fft_m2k = 0; fft_in_data = '0;
    cp_valid_i = 0; cp_t = 0; cp_m = 0; cp_x_i = 0; cp_y_i = 0; cp_theta_i = 0;
    cr_start = 0; cr_t = 0; cr_m = 0; cr_x_i = 0; cr_y_i = 0; cr_theta_i = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    fork
      begin
        fork
          for (int f = 0; f < NF; f++) fft_feed(f);
          begin
            fft_collect(0, 58.51, 0.004);
            fft_collect(1, 58.51, 0.004);
            fft_collect(2, 45.0, 0.02);
            fft_collect(3, 58.51, 0.004);
          end
        join
        // first frame: loaded into an idle processor, 6*N/8 + 27 cycles from
        // first input to last output; frames 2 -> 3 (both 4096 points)
        // streamed: one frame every 5*N/8 + 27 cycles
        $display("fft latency %0d cycles, period %0d cycles", t_out[0] - t_in0, t_out[3] - t_out[2]);
        checks++;
        if (t_out[0] - t_in0 != 6 * 512 + 27) begin failures++; $display("FAIL fft latency"); end
        checks++;
        if (t_out[3] - t_out[2] != 5 * 512 + 27) begin failures++; $display("FAIL fft period"); end
      end
      begin   // pipelined CORDIC stream
        exp_t e;
        for (int n = 0; n < NCP; n++) begin
          @(negedge clk);
          make_req(n % 4, cp_t, cp_m, cp_x_i, cp_y_i, cp_theta_i, e);
          cp_q.push_back(e);
          cp_valid_i = ($urandom_range(3, 0) != 0);
          if (!cp_valid_i) void'(cp_q.pop_back()); else cp_sent++;
        end
        @(negedge clk) cp_valid_i = 0;
        cp_sender_done = 1;
      end
      begin
        while (!cp_sender_done || cp_q.size() != 0) begin
          @(posedge clk);
          if (cp_valid_o) begin
            exp_t e;
            e = cp_q.pop_front();
            checks++;
            if (!cordic_ok(e, cp_x_o, cp_y_o, cp_theta_o)) begin failures++; $display("FAIL pipelined cordic cfg=%0d", e.cfg); end
            cp_got++;
          end
        end
      end
      begin   // recursive CORDIC, one request at a time
        exp_t e;
        for (int n = 0; n < NCR; n++) begin
          int t0;
          @(negedge clk);
          make_req(n % 4, cr_t, cr_m, cr_x_i, cr_y_i, cr_theta_i, e);
          cr_start = 1;
          t0 = cyc;
          @(negedge clk) cr_start = 0;
          while (!cr_done) @(negedge clk);
          checks++;
          if (cyc - t0 != 16 || !cordic_ok(e, cr_x_o, cr_y_o, cr_theta_o)) begin
            failures++; $display("FAIL recursive cordic cfg=%0d latency %0d", e.cfg, cyc - t0);
          end
          cr_done_n++;
        end
      end
    join
    $display("fft: stage shifts applied %0d skipped %0d, radix-4 issues %0d, shuffled %0d, rotated %0d, overlapped load/output %0d",
             n_shift, n_noshift, n_r4, n_perm, n_rot, n_ovl);
    $display("cordic: %0d pipelined, %0d recursive; quadrant %0d reflect %0d swap %0d negative %0d hyperbolic %0d vectoring %0d",
             cp_got, cr_done_n, n_quad, n_refl, n_swap, n_neg, n_hyp, n_vec);
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_r4 == 0 || n_perm == 0 || n_rot == 0 || n_ovl == 0 ||
        n_quad == 0 || n_refl == 0 || n_swap == 0 || n_neg == 0 || n_hyp == 0 || n_vec == 0 ||
        cp_got != cp_sent || cr_done_n != NCR) begin
      failures++; $display("FAIL: a mechanism never occurred or results are missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
