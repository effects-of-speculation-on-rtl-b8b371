// dual_issue_queue: scheduler with a main and a replay issue queue.
//
// Load-hit speculation lets the dependants of a load issue as if the load
// hits in the L1 data cache. Until the hit/miss outcome comes back, the
// issued dependants must stay in the scheduler so they can be replayed; with a
// deep issue-to-execute pipeline these post-issue instructions fill much of a
// single issue queue. Here they move to a separate replay issue queue (RIQ),
// leaving the main issue queue (MIQ) for instructions that have not issued.
//
// Data flow per cycle:
//  * Renamed instructions (`disp_*`, all or nothing, when `disp_ready`) go
//    through isq_dispatch into free MIQ entries.
//  * Either the RIQ (after a load miss has been resolved, `replay_req`) or
//    the MIQ bids to its own arbiter; isq_bid_ctrl decides which.
//  * The granted instructions' result tags update the ready status of the
//    same queue in the same cycle, and of the other queue one cycle later
//    (isq_xq_wake, cross-queue delay and multiplexer).
//  * isq_src_mux passes the issuing queue's instructions toward the register
//    file (`rf_issue`, one edge after grant); isq_delay_line adds the rest of
//    the issue-to-execute latency, so `fu_issue` appears ISSUE_EXEC_LAT edges
//    after the grant.
//  * Issued MIQ entries move to free RIQ slots, up to MOVE_W per cycle.
//  * The data cache's hit/miss outcome (`dc_verify`) reaches the queues
//    FEEDBACK_DELAY edges later. A hit clears the load's speculation bit; a
//    miss replays every issued instruction that depends on the load, in
//    either queue. `fill_in` returns the missed load's data and wakes its
//    dependants again. `wb_in` is the writeback of an issue (tag + epoch);
//    stale writebacks of replayed issues are ignored.
//  * Entries leave the queues at `*_rel_*` once written back and verified.
//
// Sizes follow the studied configuration (48-entry MIQ, 32-entry RIQ, 8-wide
// issue, 4 load/store units, issue-to-execute latency and feedback delay of 9
// cycles); the ports, lane counts for dispatch, writeback and moves, and the
// epoch/mask bookkeeping are this design's choices.
module dual_issue_queue
  import isq_pkg::*;
#(
  parameter int unsigned MIQ_DEPTH      = 48,
  parameter int unsigned RIQ_DEPTH      = 32,
  parameter int unsigned ISSUE_W        = 8,
  parameter int unsigned DISP_W         = 8,
  parameter int unsigned VER_W          = 4,
  parameter int unsigned WB_W           = 8,
  parameter int unsigned REL_W          = 8,
  parameter int unsigned MOVE_W         = 8,
  parameter int unsigned ISSUE_EXEC_LAT = 9,
  parameter int unsigned FEEDBACK_DELAY = 9
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // from the rename stage
  input  logic    [DISP_W-1:0]            disp_valid,
  input  uop_t    [DISP_W-1:0]            disp_uop,
  output logic                            disp_ready,
  // toward the register file and the functional units
  output issue_t  [ISSUE_W-1:0]           rf_issue,
  output issue_t  [ISSUE_W-1:0]           fu_issue,
  // from the functional units and the data cache
  input  wb_t     [WB_W-1:0]              wb_in,
  input  verify_t [VER_W-1:0]             dc_verify,
  input  wb_t                             fill_in,
  // to the reorder buffer
  output logic    [REL_W-1:0]             miq_rel_valid,
  output tag_t    [REL_W-1:0]             miq_rel_tag,
  output logic    [REL_W-1:0]             riq_rel_valid,
  output tag_t    [REL_W-1:0]             riq_rel_tag,
  // status
  output logic                            replay_req,
  output logic                            miq_issuing,
  output logic                            miq_xq_pending,
  output logic                            riq_xq_pending,
  output logic    [$clog2(MOVE_W+1)-1:0]  move_count,
  output logic    [$clog2(MIQ_DEPTH+1)-1:0] miq_occ,
  output logic    [$clog2(MIQ_DEPTH+1)-1:0] miq_post,
  output logic    [$clog2(RIQ_DEPTH+1)-1:0] riq_occ,
  output logic    [$clog2(RIQ_DEPTH+1)-1:0] riq_post
);
  localparam int unsigned WAKE_W = ISSUE_W + 1;  // grants + miss fill
  localparam int unsigned LOOK_N = DISP_W * NSRC;
  localparam int unsigned MC     = $clog2(MOVE_W+1);

  // ------------------------------------------------------------- dispatch
  tag_t    [LOOK_N-1:0] look_tag;
  lookup_t [LOOK_N-1:0] miq_look, riq_look;
  logic    [DISP_W-1:0] alloc_valid;
  entry_t  [DISP_W-1:0] alloc_entry;
  logic    [$clog2(MIQ_DEPTH+1)-1:0] miq_free;
  logic    [$clog2(RIQ_DEPTH+1)-1:0] riq_free;

  assign disp_ready = miq_free >= ($clog2(MIQ_DEPTH+1))'(DISP_W);

  isq_dispatch #(.W(DISP_W)) u_disp (
    .disp_valid (disp_ready ? disp_valid : '0),
    .disp_uop, .look_tag, .miq_look, .riq_look, .alloc_valid, .alloc_entry
  );

  // ------------------------------------------------------- load feedback
  verify_t [VER_W-1:0] ver;
  logic    [VER_W-1:0] miq_vmatch, riq_vmatch, ver_ok;
  ldmask_t hit_mask, miss_mask;

  isq_delay_line #(.DEPTH(FEEDBACK_DELAY), .W($bits(verify_t)*VER_W)) u_fb (
    .clk, .rst_n, .din(dc_verify), .dout(ver)
  );

  always_comb begin
    ver_ok    = miq_vmatch | riq_vmatch;
    hit_mask  = '0;
    miss_mask = '0;
    for (int l = 0; l < VER_W; l++)
      if (ver[l].valid && ver_ok[l]) begin
        if (ver[l].hit) hit_mask[ver[l].lsq]  = 1'b1;
        else            miss_mask[ver[l].lsq] = 1'b1;
      end
  end

  // ------------------------------------------------- result-tag broadcast
  wake_t [ISSUE_W-1:0] miq_wake, riq_wake, miq_wsel, riq_wsel;
  wake_t [WAKE_W-1:0]  miq_win, riq_win;
  wake_t               fill_wake;
  logic    miq_fmatch, riq_fmatch;
  ldmask_t miq_fdep, riq_fdep;
  logic    miq_bid_en, riq_bid_en, riq_any_ready, miq_any_ready;

  isq_xq_wake #(.LANES(ISSUE_W)) u_xq_miq (
    .clk, .rst_n, .own_wake(miq_wake), .other_wake(riq_wake),
    .hit_mask, .miss_mask, .wake_sel(miq_wsel), .pending(miq_xq_pending)
  );
  isq_xq_wake #(.LANES(ISSUE_W)) u_xq_riq (
    .clk, .rst_n, .own_wake(riq_wake), .other_wake(miq_wake),
    .hit_mask, .miss_mask, .wake_sel(riq_wsel), .pending(riq_xq_pending)
  );

  always_comb begin
    fill_wake.valid = fill_in.valid && (miq_fmatch || riq_fmatch);
    fill_wake.tag   = fill_in.tag;
    fill_wake.lat   = lat_t'(1);
    fill_wake.dep   = miq_fdep | riq_fdep;
    miq_win = {fill_wake, miq_wsel};
    riq_win = {fill_wake, riq_wsel};
  end

  isq_bid_ctrl u_bid (
    .riq_any_ready, .miq_pending(miq_xq_pending), .riq_pending(riq_xq_pending),
    .replay_req, .miq_bid_en, .riq_bid_en
  );
  assign miq_issuing = miq_bid_en;

  // -------------------------------------------------------------- queues
  issue_t [ISSUE_W-1:0] miq_issue, riq_issue;
  logic   [MOVE_W-1:0]  mv_valid;
  entry_t [MOVE_W-1:0]  mv_entry;
  logic   [MC-1:0]      move_limit;
  logic   [MOVE_W-1:0]  riq_mv_valid;
  entry_t [MOVE_W-1:0]  riq_mv_entry;

  assign move_limit = (riq_free >= ($clog2(RIQ_DEPTH+1))'(MOVE_W)) ? MC'(MOVE_W) : MC'(riq_free);
  always_comb move_count = MC'($countones(mv_valid));

  isq_queue #(
    .DEPTH(MIQ_DEPTH), .ALLOC_W(DISP_W), .ISSUE_W(ISSUE_W), .WAKE_W(WAKE_W),
    .VER_W(VER_W), .WB_W(WB_W), .REL_W(REL_W), .MOVE_W(MOVE_W), .LOOK_N(LOOK_N),
    .SNOOP(1'b1)
  ) u_miq (
    .clk, .rst_n,
    .alloc_valid, .alloc_entry, .free_cnt(miq_free), .occ_cnt(miq_occ), .post_cnt(miq_post),
    .bid_en(miq_bid_en), .any_ready(miq_any_ready), .issue_out(miq_issue), .wake_out(miq_wake),
    .wake_in(miq_win), .ver_in(ver), .ver_ok, .ver_match(miq_vmatch),
    .wb_in, .fill_in, .fill_match(miq_fmatch), .fill_dep(miq_fdep),
    .rel_valid(miq_rel_valid), .rel_tag(miq_rel_tag),
    .move_limit, .move_valid(mv_valid), .move_entry(mv_entry),
    .look_tag, .look_res(miq_look)
  );

  isq_queue #(
    .DEPTH(RIQ_DEPTH), .ALLOC_W(MOVE_W), .ISSUE_W(ISSUE_W), .WAKE_W(WAKE_W),
    .VER_W(VER_W), .WB_W(WB_W), .REL_W(REL_W), .MOVE_W(MOVE_W), .LOOK_N(LOOK_N),
    .SNOOP(1'b0)
  ) u_riq (
    .clk, .rst_n,
    .alloc_valid(mv_valid), .alloc_entry(mv_entry), .free_cnt(riq_free), .occ_cnt(riq_occ),
    .post_cnt(riq_post),
    .bid_en(riq_bid_en), .any_ready(riq_any_ready), .issue_out(riq_issue), .wake_out(riq_wake),
    .wake_in(riq_win), .ver_in(ver), .ver_ok, .ver_match(riq_vmatch),
    .wb_in, .fill_in, .fill_match(riq_fmatch), .fill_dep(riq_fdep),
    .rel_valid(riq_rel_valid), .rel_tag(riq_rel_tag),
    .move_limit(MC'(0)), .move_valid(riq_mv_valid), .move_entry(riq_mv_entry),
    .look_tag, .look_res(riq_look)
  );

  // ------------------------------------------------ issue -> execute path
  isq_src_mux #(.LANES(ISSUE_W)) u_mux (
    .clk, .rst_n, .replay_req, .miq_issue, .riq_issue, .rf_issue
  );

  isq_delay_line #(.DEPTH(ISSUE_EXEC_LAT - 1), .W($bits(issue_t)*ISSUE_W)) u_i2e (
    .clk, .rst_n, .din(rf_issue), .dout(fu_issue)
  );
endmodule
