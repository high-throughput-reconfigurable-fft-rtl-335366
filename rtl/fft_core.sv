// fft_core: memory-based 4096/2048-point FFT processor with approximate
// block-floating-point arithmetic and conflict-free 8-bank memory access.
//
// Data path: 8 natural-order input samples per cycle pass the forward
// commutator into the frame's home group (A or B, alternating from frame to
// frame). Each of four stages reads 8 samples per cycle from one group (home,
// other, home, other), unrotates them in the reverse commutator, runs them
// through the butterfly multiplication unit (radix-8, or two radix-4 in the
// last 2048-point stage; approximate twiddle multiplication; block-floating-
// point shift) and writes them, rotated again by the forward commutator, into
// the other group. After stage 3 the result is back in the home group in
// digit-reversed label order; the output phase reads it with the reverse
// commutator so that it leaves in natural order, 8 bins per cycle. While one
// frame is output from its home group, the next frame is loaded into the
// other group. fft_agu computes labels, banks and addresses (one instance for
// the compute side, one for the load); fft_ctrl sequences the phases.
//
// Interface: in_valid/in_ready/in_data accept one 8-sample beat per cycle
// (sample 8t+j on lane j); m2k is sampled with the first beat of a frame
// (1 = 2048 points). out_valid/out_data deliver bin 8t+j on lane j, no
// back-pressure; bin value = out_data * 2^out_exp, out_exp travelling with
// each beat.
//
// Timing: read issue -> butterfly input 2 cycles (SRAM + output register),
// -> write 4 cycles. A frame loaded into an idle processor takes
// 6*N/8 + 27 cycles from first input to last output (3099 at 4096 points);
// frames streamed back to back finish every 5*N/8 + 27 cycles (2587 at 4096
// points, 1307 at 2048).
// Structure (two 8-bank groups, commutators, mixed-radix butterfly,
// approximate multiplication) follows the document; the schedule with the
// alternating home group, the widths and the block-floating-point rule are
// this design's own.
module fft_core
  import fft_pkg::*;
#(
  parameter int TRUNC = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              m2k,
  input  logic              in_valid,
  output logic              in_ready,
  input  cplx_t [LANES-1:0] in_data,
  output logic              out_valid,
  output cplx_t [LANES-1:0] out_data,
  output logic [4:0]        out_exp,
  output logic              frame_done
);
  localparam int W = 2 * DW;

  phase_t         phase;
  logic [1:0]     stage;
  logic [AB-1:0]  cnt;
  logic           issue, m2k_eff, r4, bfp_clr, grp;
  logic           ld_we, ld_m2k, ld_grp, ld_perm;
  logic [AB-1:0]  ld_cnt;
  logic [2:0]     sh, state, ld_state;
  logic           perm;
  logic [3:0]     headroom;
  logic [4:0]     blk_exp;

  logic [LANES-1:0][AB-1:0] rd_addr, wr_addr, rd_bank_addr, wr_bank_addr;
  logic [LANES-1:0][AB-1:0] ld_addr, ld_rd_unused;
  logic [LANES-1:0][LB-1:0] tw_exp, ld_texp_unused;
  logic [LANES-1:0]         tw_byp, ld_tbyp_unused;

  fft_ctrl u_ctrl (
    .clk, .rst, .in_valid, .m2k_i(m2k), .headroom, .in_ready, .ld_we, .ld_cnt, .ld_m2k,
    .ld_grp, .phase, .stage, .cnt, .issue, .m2k(m2k_eff), .grp, .r4, .sh, .blk_exp,
    .bfp_clr, .frame_done
  );

  // compute side: stage reads and writes, output reads
  fft_agu u_agu (
    .m2k(m2k_eff), .phase, .stage, .cnt, .rd_addr, .wr_addr, .tw_exp, .tw_byp, .state, .perm
  );
  // load side: input beat placement (only its write addresses, state and perm
  // are used)
  fft_agu u_agu_ld (
    .m2k(ld_m2k), .phase(PH_LOAD), .stage(2'd0), .cnt(ld_cnt), .rd_addr(ld_rd_unused),
    .wr_addr(ld_addr), .tw_exp(ld_texp_unused), .tw_byp(ld_tbyp_unused), .state(ld_state),
    .perm(ld_perm)
  );

  // ---- read side (stages and output) -------------------------------------
  logic rd_en, rd_grp;           // rd_grp: 0 = group A, 1 = group B
  assign rd_en  = issue && (phase == PH_STAGE || phase == PH_OUT);
  assign rd_grp = grp ^ ((phase == PH_STAGE) && stage[0]);

  commutator #(.W(AB), .REVERSE(1'b0)) u_rd_addr_comm (
    .d_i(rd_addr), .state, .perm, .d_o(rd_bank_addr)
  );

  // pipeline from read issue: index = cycles after issue
  typedef struct packed {
    logic                     v;      // butterfly in flight
    logic                     o;      // output beat in flight
    logic                     grp;    // group read
    logic [2:0]               state;
    logic                     perm;
    logic                     r4;
    logic [4:0]               bexp;   // block exponent of an output beat
    logic [LANES-1:0][AB-1:0] waddr;
    logic [LANES-1:0][LB-1:0] texp;
    logic [LANES-1:0]         tbyp;
  } pipe_t;
  pipe_t pipe [1:4];

  always_ff @(posedge clk) begin
    pipe[1] <= '{v: rd_en && phase == PH_STAGE, o: rd_en && phase == PH_OUT, grp: rd_grp,
                 state: state, perm: perm, r4: r4, bexp: blk_exp, waddr: wr_addr, texp: tw_exp, tbyp: tw_byp};
    for (int i = 2; i <= 4; i++) pipe[i] <= pipe[i-1];
    if (rst) begin
      for (int i = 1; i <= 4; i++) begin
        pipe[i].v <= 1'b0;
        pipe[i].o <= 1'b0;
      end
    end
  end

  // ---- memory groups ------------------------------------------------------
  logic [LANES-1:0][W-1:0] a_rdata, b_rdata, rdata_sel, wdata_bank, rd_lanes;
  logic [LANES-1:0][AB-1:0] a_addr, b_addr;
  logic a_en, a_we, b_en, b_we;
  logic load_wr, bmu_wr, wr_grp;
  cplx_t [LANES-1:0] bmu_y, wr_lanes;
  logic bmu_valid;

  assign load_wr = ld_we;
  assign bmu_wr  = bmu_valid;
  assign wr_grp  = ~pipe[4].grp;   // stage results go to the other group

  // write side: lanes, addresses and rotation from the load or from the pipeline
  logic [2:0]               w_state;
  logic                     w_perm;
  logic [LANES-1:0][AB-1:0] w_addr;
  always_comb begin
    if (load_wr) begin
      wr_lanes = in_data;
      w_state  = ld_state;
      w_perm   = ld_perm;
      w_addr   = ld_addr;
    end else begin
      wr_lanes = bmu_y;
      w_state  = pipe[4].state;
      w_perm   = pipe[4].perm;
      w_addr   = pipe[4].waddr;
    end
  end

  commutator #(.W(W), .REVERSE(1'b0)) u_fwd_comm (
    .d_i(wr_lanes), .state(w_state), .perm(w_perm), .d_o(wdata_bank)
  );
  commutator #(.W(AB), .REVERSE(1'b0)) u_wr_addr_comm (
    .d_i(w_addr), .state(w_state), .perm(w_perm), .d_o(wr_bank_addr)
  );

  always_comb begin
    a_en = 1'b0; a_we = 1'b0; a_addr = rd_bank_addr;
    b_en = 1'b0; b_we = 1'b0; b_addr = rd_bank_addr;
    if ((load_wr && !ld_grp) || (bmu_wr && !wr_grp)) begin
      a_en = 1'b1; a_we = 1'b1; a_addr = wr_bank_addr;
    end else if (rd_en && !rd_grp) begin
      a_en = 1'b1;
    end
    if ((load_wr && ld_grp) || (bmu_wr && wr_grp)) begin
      b_en = 1'b1; b_we = 1'b1; b_addr = wr_bank_addr;
    end else if (rd_en && rd_grp) begin
      b_en = 1'b1;
    end
  end

  mem_group #(.BANKS(LANES), .DEPTH(DEPTH), .W(W)) u_grp_a (
    .clk, .en(a_en), .we(a_we), .addr(a_addr), .wdata(wdata_bank), .rdata(a_rdata)
  );
  mem_group #(.BANKS(LANES), .DEPTH(DEPTH), .W(W)) u_grp_b (
    .clk, .en(b_en), .we(b_we), .addr(b_addr), .wdata(wdata_bank), .rdata(b_rdata)
  );

  // ---- reverse commutator, butterfly multiplication unit --------------------
  assign rdata_sel = pipe[2].grp ? b_rdata : a_rdata;

  commutator #(.W(W), .REVERSE(1'b1)) u_rev_comm (
    .d_i(rdata_sel), .state(pipe[2].state), .perm(pipe[2].perm), .d_o(rd_lanes)
  );

  logic signed [LANES-1:0][15:0] tw_r, tw_i;
  twiddle_rom #(.N(NMAX), .LANES(LANES), .TW(16)) u_tw (
    .clk, .exp_i(pipe[2].texp), .wr_o(tw_r), .wi_o(tw_i)
  );

  bmu #(.TRUNC(TRUNC)) u_bmu (
    .clk, .rst, .valid_i(pipe[2].v), .x(rd_lanes), .r4(pipe[2].r4),
    .wr(tw_r), .wi(tw_i), .byp(pipe[3].tbyp), .sh, .valid_o(bmu_valid), .y(bmu_y)
  );

  // ---- block floating point --------------------------------------------------
  bfp_unit u_bfp (
    .clk, .clr(bfp_clr), .valid(load_wr || bmu_wr), .d(wr_lanes), .headroom
  );

  // ---- output ------------------------------------------------------------------
  assign out_valid = pipe[2].o;
  assign out_data  = rd_lanes;
  assign out_exp   = pipe[2].bexp;   // travels with the beat: the next frame's
                                     // stages may start before it leaves

  // a group is never read and written in the same cycle
  assert property (@(posedge clk) disable iff (rst) !(rd_en && (load_wr || bmu_wr) && (rd_grp == (load_wr ? ld_grp : wr_grp))));
  // load and stage results never share the write path
  assert property (@(posedge clk) disable iff (rst) !(load_wr && bmu_wr));
endmodule
