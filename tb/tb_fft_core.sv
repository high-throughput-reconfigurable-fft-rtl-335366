// tb_fft_core: end-to-end check of the FFT processor.
//
// Part 1 runs isolated frames (each loaded into an idle processor): a random
// 4096-point frame, a 2048-point frame (mode switch), a small-signal
// 4096-point frame and a full-scale single-tone 4096-point frame (largest
// growth). Each is compared bin by bin with a double-precision DFT computed
// here; the frame SQNR (at least 58.51 dB for random full-scale input) and the
// latency from first input to last output (6*N/8 + 27 cycles) are checked.
// Part 2 streams frames back to back (4096, 4096, 2048, 2048, 4096), with the
// input of each frame offered while the previous one is output, and checks
// every result and the frame period (5*N/8 + 27 cycles between frame_done
// pulses for frames of the same size). Mechanism counters check that the
// block-floating-point shift was both used and skipped, that radix-4
// butterflies, the 2048-point shuffle, non-zero rotations and overlapped
// load/output cycles all occurred.
module tb_fft_core;
  import fft_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic m2k, in_valid, in_ready, out_valid, frame_done;
  cplx_t [LANES-1:0] in_data, out_data;
  logic [4:0] out_exp;

  fft_core dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 5;   // frames in the streaming run
  real ct [NMAX], st [NMAX];
  real xr [NF][NMAX], xi [NF][NMAX], yr [NF][NMAX], yi [NF][NMAX];
  int  fn [NF];
  int n_shift = 0, n_noshift = 0, n_r4 = 0, n_perm = 0, n_rot = 0, n_overlap = 0;
  // mechanisms seen: block-floating-point shift applied / skipped at a stage
  // start, radix-4 butterflies, 2048-point shuffle, non-zero commutator
  // rotation, input accepted while output runs
  always @(posedge clk) if (!rst) begin
    if (dut.phase == PH_STAGE && dut.cnt == 0 && dut.issue) begin
      if (dut.sh != 0) n_shift++; else n_noshift++;
    end
    if (dut.issue && dut.r4) n_r4++;
    if ((dut.issue && dut.perm) || (dut.ld_we && dut.ld_perm)) n_perm++;
    if (dut.issue && dut.state != 0) n_rot++;
    if (in_valid && in_ready && out_valid) n_overlap++;
  end

  // frame f: amp < 0 is a full-scale complex tone of amplitude -amp at bin 37
  // (worst-case growth: all energy ends in one bin), otherwise uniform random
  // data in [-amp, amp]; the reference DFT is computed in double precision
  task automatic make_frame(input int f, input int n, input int amp);
    real ref_r, ref_i;
    fn[f] = n;
    for (int i = 0; i < n; i++) begin
      if (amp < 0) begin
        xr[f][i] = real'($rtoi(-amp * ct[((37 * i) % n) * (NMAX / n)]));
        xi[f][i] = real'($rtoi(-amp * st[((37 * i) % n) * (NMAX / n)]));
      end else begin
        xr[f][i] = real'($signed($urandom_range(2*amp, 0)) - amp);
        xi[f][i] = real'($signed($urandom_range(2*amp, 0)) - amp);
      end
    end
    for (int kk = 0; kk < n; kk++) begin
      ref_r = 0.0; ref_i = 0.0;
      for (int i = 0; i < n; i++) begin
        int e;
        e = ((i * kk) % n) * (NMAX / n);
        ref_r += xr[f][i] * ct[e] + xi[f][i] * st[e];
        ref_i += xi[f][i] * ct[e] - xr[f][i] * st[e];
      end
      yr[f][kk] = ref_r; yi[f][kk] = ref_i;
    end
  endtask

  // offer the beats of frame f, holding in_valid until each is accepted
  task automatic feed(input int f, output int t_first);
    int n;
    n = fn[f];
    t_first = -1;
    for (int b = 0; b < n/8; b++) begin
      @(negedge clk);
      in_valid = 1'b1;
      m2k = (n == 2048);
      for (int j = 0; j < 8; j++) begin
        in_data[j].re = 16'($rtoi(xr[f][8*b+j]));
        in_data[j].im = 16'($rtoi(xi[f][8*b+j]));
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t_first < 0) t_first = cyc;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // collect frame f and check it; returns the cycle of its last output beat
  task automatic collect(input int f, input real min_sqnr, input real rel_tol, output int t_last);
    int n, k, bad;
    real pk, sig, err, scale, er, ei, tol, sq;
    n = fn[f];
    k = 0; sig = 0.0; err = 0.0; pk = 0.0; bad = 0;
    for (int kk = 0; kk < n; kk++)
      if (yr[f][kk]*yr[f][kk] + yi[f][kk]*yi[f][kk] > pk) pk = yr[f][kk]*yr[f][kk] + yi[f][kk]*yi[f][kk];
    pk = $sqrt(pk);
    tol = pk * rel_tol;
    while (k < n) begin
      @(posedge clk);
      if (out_valid) begin
        scale = 2.0 ** out_exp;
        for (int j = 0; j < 8; j++) begin
          er = real'(out_data[j].re) * scale - yr[f][k+j];
          ei = real'(out_data[j].im) * scale - yi[f][k+j];
          sig += yr[f][k+j]*yr[f][k+j] + yi[f][k+j]*yi[f][k+j];
          err += er*er + ei*ei;
          if (er > tol || er < -tol || ei > tol || ei < -tol) bad++;
        end
        k += 8;
      end
    end
    t_last = cyc;
    sq = 10.0 * $log10(sig / err);
    checks++;
    if (bad != 0) begin failures++; $display("FAIL frame %0d n=%0d: %0d bins outside tolerance", f, n, bad); end
    checks++;
    if (sq < min_sqnr) begin failures++; $display("FAIL frame %0d n=%0d: SQNR %f dB", f, n, sq); end
    $display("frame %0d n=%0d exp=%0d SQNR=%.2f dB", f, n, out_exp, sq);
  endtask

  // part 1: one isolated frame, latency check
  task automatic run_frame(input int n, input int amp, input real min_sqnr, input real rel_tol);
    int t0, t1;
    make_frame(0, n, amp);
    feed(0, t0);
    collect(0, min_sqnr, rel_tol, t1);
    // first beat accepted at t0 (cycle counted after the edge); n/8 load beats,
    // load drain, 4 stages of n/8 with drains, n/8 output, 2-cycle read latency
    $display("  isolated: first input to last output %0d cycles", t1 - t0);
    checks++;
    if (t1 - t0 != 6 * (n/8) + 27) begin
      failures++; $display("FAIL n=%0d: frame took %0d cycles", n, t1 - t0);
    end
  endtask

  initial begin
    int tl [NF], tf;
    for (int i = 0; i < NMAX; i++) begin
      ct[i] = $cos(2.0 * 3.14159265358979323846 * i / NMAX);
      st[i] = $sin(2.0 * 3.14159265358979323846 * i / NMAX);
    end
    in_valid = 1'b0; m2k = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_frame(4096, 16000, 58.51, 0.004);
    run_frame(2048, 16000, 58.51, 0.004);
    run_frame(4096, 300, 45.0, 0.02);
    run_frame(4096, -16000, 45.0, 0.01);
    // part 2: back-to-back stream
    make_frame(0, 4096, 16000);
    make_frame(1, 4096, 8000);
    make_frame(2, 2048, 16000);
    make_frame(3, 2048, 500);
    make_frame(4, 4096, 16000);
    fork
      for (int f = 0; f < NF; f++) feed(f, tf);
      for (int f = 0; f < NF; f++) collect(f, (f == 3) ? 45.0 : 55.0, (f == 3) ? 0.02 : 0.004, tl[f]);
    join
    for (int f = 1; f < NF; f++) begin
      $display("  stream: frame %0d ended %0d cycles after frame %0d", f, tl[f] - tl[f-1], f - 1);
      if (fn[f] == fn[f-1]) begin
        checks++;
        if (tl[f] - tl[f-1] != 5 * (fn[f]/8) + 27) begin
          failures++; $display("FAIL stream period %0d for n=%0d", tl[f] - tl[f-1], fn[f]);
        end
      end
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_r4 == 0 || n_perm == 0 || n_rot == 0 || n_overlap == 0) failures++;
    $display("stage shifts applied %0d skipped %0d, radix-4 issues %0d, shuffled %0d, rotated %0d, overlapped %0d",
             n_shift, n_noshift, n_r4, n_perm, n_rot, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
