// fft_ctrl: phase sequencer of the FFT processor.
//
// Two sequencers share the two memory groups. The load sequencer accepts the
// N/8 input beats of a frame (in_ready high, ld_we for every accepted beat,
// ld_cnt counting beats) into the frame's home group ld_grp, which alternates
// from frame to frame. The compute sequencer takes a loaded frame through
// STAGE 0..3 and OUT (phase, stage, cnt, issue; grp is the home group of the
// frame in flight: stage s reads grp ^ s[0], and the result ends in grp).
// Each stage issues N/8 butterflies, one per cycle (the 2048-point radix-4
// stage issues two radix-4 butterflies per cycle, so it also takes N/8
// cycles), and is followed by DRAIN cycles so that its last results are in
// memory, and counted by the block-floating-point detector, before the next
// stage reads them. OUT issues N/8 reads of group grp.
//
// Overlap: a new load may start while the compute sequencer is idle or in
// OUT; OUT reads grp, the load writes the other group, so a stream of frames
// runs at one frame per 5 x N/8 cycles plus drains (2587 cycles at 4096
// points). The stages of the new frame start once its load has drained and
// the previous OUT has ended. The mode (m2k: 2048 points) is sampled with the
// first input beat of each frame; ld_m2k is the load's mode and m2k the mode
// of the frame being computed.
//
// Block floating point: when a stage starts, the shift for its results is
// sh = max(0, G - headroom), with G = 4 bits of growth for radix-8 and 3 for
// radix-4, and the detector is cleared (also when a load starts); blk_exp sums
// the shifts of the frame and holds during its OUT. frame_done pulses after
// the last OUT issue.
//
// The order load, stages through A and B, output follows the document, and
// so does the goal of no idle cycles; the two sequencers, the alternating
// home group, the drains and the shift rule are this design's own.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int DRAIN = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               m2k_i,
  input  logic [$clog2(DW)-1:0] headroom,
  // load sequencer
  output logic               in_ready,
  output logic               ld_we,
  output logic [AB-1:0]      ld_cnt,
  output logic               ld_m2k,
  output logic               ld_grp,
  // compute sequencer
  output phase_t             phase,
  output logic [1:0]         stage,
  output logic [AB-1:0]      cnt,
  output logic               issue,
  output logic               m2k,
  output logic               grp,
  output logic               r4,
  output logic [2:0]         sh,
  output logic [4:0]         blk_exp,
  output logic               bfp_clr,
  output logic               frame_done
);
  // load sequencer state
  logic               ld_on, ld_drain, ld_full, ld_m2k_q;
  logic [2:0]         ld_dcnt;
  logic [AB-1:0]      ld_last;
  // compute sequencer state
  logic               draining;
  logic [2:0]         dcnt;
  logic [AB-1:0]      last;
  logic [2:0]         sh_next;
  logic [2:0]         grow;
  logic               ld_start, c_start;

  assign in_ready = ld_on;
  assign ld_we    = ld_on && in_valid;
  assign ld_m2k   = (ld_cnt == '0) ? m2k_i : ld_m2k_q;
  assign ld_last  = ld_m2k ? AB'(255) : AB'(511);
  // a load may start when no loaded frame waits and the compute side is idle
  // or only reading its own home group
  assign ld_start = !ld_on && !ld_drain && !ld_full && (phase == PH_IDLE || phase == PH_OUT);
  assign c_start  = (phase == PH_IDLE) && ld_full;

  assign last  = m2k ? AB'(255) : AB'(511);
  assign issue = !draining && (phase == PH_STAGE || phase == PH_OUT);
  assign r4    = m2k && (phase == PH_STAGE) && (stage == 2'd3);

  // shift for the stage about to start
  always_comb begin
    logic [1:0] s_next;
    s_next  = c_start ? 2'd0 : 2'(stage + 2'd1);
    grow    = (!c_start && m2k && s_next == 2'd3) ? 3'd3 : 3'd4;
    sh_next = (headroom >= 4'(grow)) ? 3'd0 : 3'(4'(grow) - headroom);
  end

  always_ff @(posedge clk) begin
    bfp_clr    <= 1'b0;
    frame_done <= 1'b0;
    if (rst) begin
      ld_on    <= 1'b0;
      ld_drain <= 1'b0;
      ld_full  <= 1'b0;
      ld_dcnt  <= '0;
      ld_cnt   <= '0;
      ld_m2k_q <= 1'b0;
      ld_grp   <= 1'b1;
      phase    <= PH_IDLE;
      stage    <= '0;
      cnt      <= '0;
      draining <= 1'b0;
      dcnt     <= '0;
      m2k      <= 1'b0;
      grp      <= 1'b0;
      sh       <= '0;
      blk_exp  <= '0;
    end else begin
      // ---- load sequencer ----
      if (ld_start) begin
        ld_on   <= 1'b1;
        ld_grp  <= ~ld_grp;
        ld_cnt  <= '0;
        bfp_clr <= 1'b1;
      end
      if (ld_we) begin
        if (ld_cnt == '0) ld_m2k_q <= m2k_i;
        ld_cnt <= ld_cnt + AB'(1);
        if (ld_cnt == ld_last) begin
          ld_on    <= 1'b0;
          ld_drain <= 1'b1;
        end
      end
      if (ld_drain) begin
        ld_dcnt <= ld_dcnt + 3'd1;
        if (ld_dcnt == 3'(DRAIN - 1)) begin
          ld_drain <= 1'b0;
          ld_dcnt  <= '0;
          ld_full  <= 1'b1;
        end
      end
      // ---- compute sequencer ----
      if (c_start) begin
        ld_full <= 1'b0;
        grp     <= ld_grp;
        m2k     <= ld_m2k_q;
        phase   <= PH_STAGE;
        stage   <= 2'd0;
        cnt     <= '0;
        sh      <= sh_next;
        blk_exp <= 5'(sh_next);
        bfp_clr <= 1'b1;
      end else if (draining) begin
        dcnt <= dcnt + 3'd1;
        if (dcnt == 3'(DRAIN - 1)) begin
          draining <= 1'b0;
          dcnt     <= '0;
          if (stage == 2'd3) begin
            phase <= PH_OUT;
          end else begin
            stage   <= 2'(stage + 2'd1);
            sh      <= sh_next;
            blk_exp <= blk_exp + 5'(sh_next);
            bfp_clr <= 1'b1;
          end
        end
      end else if (issue) begin
        cnt <= cnt + AB'(1);
        if (cnt == last) begin
          cnt <= '0;
          if (phase == PH_OUT) begin
            phase      <= PH_IDLE;
            frame_done <= 1'b1;
          end else begin
            draining <= 1'b1;
          end
        end
      end
    end
  end

  // the load never writes while stage results are being written
  assert property (@(posedge clk) disable iff (rst) !(ld_we && phase == PH_STAGE));
endmodule
