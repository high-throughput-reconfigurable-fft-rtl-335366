// tb_fft_ctrl: checks the two sequencers of the FFT controller.
//
// Eight frames of mixed size (4096 / 2048 points) are offered, first with
// random input gaps and then at full rate. A random headroom is driven every
// cycle. The monitor checks, per frame: N/8 issues in each stage and in OUT,
// radix-4 issues only in the last 2048-point stage, the shift rule
// sh = max(0, G - headroom) with headroom taken in the cycle before the
// stage starts (G = 4, or 3 for the radix-4 stage), blk_exp = sum of the
// shifts, home groups alternating from frame to frame and the stages
// starting on the group the frame was loaded into, no load beat during a
// stage, and load beats overlapping OUT. At full rate, frames of equal size
// must finish 5*N/8 + 27 cycles apart.
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, m2k_i, in_ready, ld_we, ld_m2k, ld_grp, issue, m2k, grp, r4, bfp_clr, frame_done;
  logic [3:0] headroom;
  logic [8:0] ld_cnt;
  phase_t phase;
  logic [1:0] stage;
  logic [8:0] cnt;
  logic [2:0] sh;
  logic [4:0] blk_exp;
  int checks = 0, failures = 0;

  fft_ctrl dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 8;
  bit modes [NF] = '{0, 1, 0, 0, 1, 1, 0, 1};

  int  cyc = 0, f_ld = 0, f_c = -1, n_ovl = 0;
  int  stage_issues [4], r4_issues, out_issues, sh_sum;
  bit  ld_grp_of [NF];
  int  done_at [NF];
  logic [3:0] hr_q;
  logic prev_grp_set = 0, prev_grp;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc  <= cyc + 1;
    hr_q <= headroom;
    if (!rst) begin
      // load side
      if (ld_we && ld_cnt == 0) begin
        ld_grp_of[f_ld] = ld_grp;
        if (prev_grp_set) chk(ld_grp != prev_grp, "home group did not alternate");
        prev_grp = ld_grp; prev_grp_set = 1;
        chk(ld_m2k == modes[f_ld], "load mode");
        f_ld++;
      end
      if (ld_we) begin
        chk(in_ready, "load beat without in_ready");
        chk(phase != PH_STAGE, "load beat during a stage");
        if (phase == PH_OUT) n_ovl++;
      end
      // compute side
      if (issue && phase == PH_STAGE && cnt == 0) begin
        int g;
        if (stage == 0) begin
          f_c++;
          foreach (stage_issues[i]) stage_issues[i] = 0;
          r4_issues = 0; out_issues = 0; sh_sum = 0;
          chk(grp == ld_grp_of[f_c], "stages not on the frame's home group");
          chk(m2k == modes[f_c], "compute mode");
        end
        g = (m2k && stage == 3) ? 3 : 4;
        chk(int'(sh) == ((hr_q >= g) ? 0 : g - int'(hr_q)), "shift rule");
        sh_sum += int'(sh);
        chk(int'(blk_exp) == sh_sum, "block exponent");
      end
      if (issue && phase == PH_STAGE) begin
        stage_issues[stage]++;
        if (r4) r4_issues++;
        chk(!r4 || (m2k && stage == 3), "radix-4 outside the last 2048-point stage");
      end
      if (issue && phase == PH_OUT) out_issues++;
      if (frame_done) begin
        int nb;
        nb = modes[f_c] ? 256 : 512;
        for (int s = 0; s < 4; s++) chk(stage_issues[s] == nb, $sformatf("stage %0d issues %0d", s, stage_issues[s]));
        chk(out_issues == nb, "output issues");
        chk(r4_issues == (modes[f_c] ? nb : 0), "radix-4 issues");
        chk(int'(blk_exp) == sh_sum, "exponent held through OUT");
        done_at[f_c] = cyc;
      end
    end
  end

  initial begin
    in_valid = 0; m2k_i = 0; headroom = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      for (int f = 0; f < NF; f++) begin
        int beats;
        beats = 0;
        while (beats < (modes[f] ? 256 : 512)) begin
          @(negedge clk);
          in_valid = (f >= 4) || ($urandom_range(5, 0) != 0);   // gaps in frames 0..3
          m2k_i = (beats == 0) ? modes[f] : ~modes[f];          // only the first beat counts
          @(posedge clk);
          if (in_valid && in_ready) beats++;
        end
        @(negedge clk) in_valid = 0;
      end
      forever begin
        @(negedge clk) headroom = 4'($urandom_range(6, 0));
      end
    join_any
    while (f_c < NF - 1 || !frame_done) @(posedge clk);
    @(posedge clk);
    chk(n_ovl > 0, "no load beat overlapped OUT");
    // frames 4..7 at full rate: 4 -> 5 (1->1) are both 2048 points
    $display("period 2048: %0d cycles; overlapped load beats %0d", done_at[5] - done_at[4], n_ovl);
    chk(done_at[5] - done_at[4] == 5 * 256 + 27, "streaming period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
