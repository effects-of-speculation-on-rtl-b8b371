// isq_queue: one issue queue of the dual issue queue scheduler.
//
// The same module is instantiated as the main issue queue (MIQ), which
// receives dispatched instructions, and as the replay issue queue (RIQ), which
// receives instructions the MIQ has already issued. Instructions stay in a
// queue after they issue, because a load they depend on may turn out to miss
// in the data cache; then they must issue again (replay).
//
// Per entry, each cycle:
//  * wakeup   - every source compares its producer tag with the result-tag
//               lanes (`wake_in`); a match clears `busy` and loads a countdown
//               with the producer's latency, so dependants issue just in time
//               for the producer's result (load-hit speculation: a load
//               broadcasts its L1-hit latency before its hit is known).
//  * bid      - an entry bids when not issued, all sources woken and counted
//               down, and the queue is allowed to bid (`bid_en`); the
//               isq_class_arbiter grants up to ISSUE_W, no more per
//               functional-unit class than there are units. A granted entry drives its
//               tag on `wake_out` and its fields on `issue_out` in the same
//               cycle.
//  * verify   - every value carries a mask of the unverified loads (named by
//               load/store-queue slot) it depends on, directly or through
//               other instructions. A hit clears the load's bit everywhere; a
//               miss makes every issued entry with the bit set un-issue (new
//               epoch, so its in-flight result is ignored) and every source
//               with the bit set wait again. The missing load itself waits
//               for its fill (`fill_in`).
//  * writeback- `wb_in` marks the current issue of an entry done; the entry
//               is released (`rel_*`) once done and no longer dependent on an
//               unverified load, so entries are freed only at writeback.
// A verification lane counts only if `ver_ok` says some queue holds the
// load's current issue (stale lanes of a replayed load are dropped); the
// queue reports its own matches on `ver_match` and `fill_match`.
// `alloc_*` writes new entries into free slots; with SNOOP=1 (the MIQ) the
// entries also see this cycle's wakeups and verifications, which they would
// otherwise miss. `move_*` removes up to `move_limit` issued entries, in their
// next-cycle state, for the RIQ. `look_*` reports the state of producers for
// dispatch. Outputs come from registered state or from this cycle's grants;
// every input takes effect at the next clock edge.
//
// The mechanism (wakeup, bid/grant, entries held until writeback, replay of
// dependants of a missed load) follows the source scheme. The load-dependence
// masks, the epochs, the countdowns and the fixed-priority grant are this
// design's own way of building it.
module isq_queue
  import isq_pkg::*;
#(
  parameter int unsigned DEPTH   = 48,
  parameter int unsigned ALLOC_W = 8,   // entries written per cycle
  parameter int unsigned ISSUE_W = 8,   // grants per cycle
  parameter int unsigned WAKE_W  = 9,   // result-tag lanes seen per cycle
  parameter int unsigned VER_W   = 4,   // load verifications per cycle
  parameter int unsigned WB_W    = 8,   // writebacks per cycle
  parameter int unsigned REL_W   = 8,   // releases per cycle
  parameter int unsigned MOVE_W  = 8,   // entries moved out per cycle
  parameter int unsigned LOOK_N  = 16,  // dispatch lookup ports
  parameter bit          SNOOP   = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation
  input  logic    [ALLOC_W-1:0]         alloc_valid,
  input  entry_t  [ALLOC_W-1:0]         alloc_entry,
  output logic    [$clog2(DEPTH+1)-1:0] free_cnt,
  output logic    [$clog2(DEPTH+1)-1:0] occ_cnt,
  output logic    [$clog2(DEPTH+1)-1:0] post_cnt,
  // bid / grant
  input  logic                          bid_en,
  output logic                          any_ready,
  output issue_t  [ISSUE_W-1:0]         issue_out,
  output wake_t   [ISSUE_W-1:0]         wake_out,
  // ready-status update
  input  wake_t   [WAKE_W-1:0]          wake_in,
  // load verification
  input  verify_t [VER_W-1:0]           ver_in,
  input  logic    [VER_W-1:0]           ver_ok,     // lane matched a load in either queue
  output logic    [VER_W-1:0]           ver_match,
  // writeback and miss fill
  input  wb_t     [WB_W-1:0]            wb_in,
  input  wb_t                           fill_in,
  output logic                          fill_match,
  output ldmask_t                       fill_dep,
  // release to the reorder buffer
  output logic    [REL_W-1:0]           rel_valid,
  output tag_t    [REL_W-1:0]           rel_tag,
  // move out (MIQ -> RIQ)
  input  logic    [$clog2(MOVE_W+1)-1:0] move_limit,
  output logic    [MOVE_W-1:0]          move_valid,
  output entry_t  [MOVE_W-1:0]          move_entry,
  // dispatch lookup
  input  tag_t    [LOOK_N-1:0]          look_tag,
  output lookup_t [LOOK_N-1:0]          look_res
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  entry_t [DEPTH-1:0] q, q_nxt;

  // ---------------------------------------------------------------- helpers
  function automatic lat_t lat_m1(lat_t l);
    return (l == '0) ? '0 : l - lat_t'(1);
  endfunction

  function automatic ldmask_t deps(entry_t e);
    ldmask_t m;
    m = '0;
    for (int s = 0; s < NSRC; s++) m |= e.src[s].dep;
    return m;
  endfunction

  // masks of this cycle's verifications
  ldmask_t hit_mask, miss_mask;
  always_comb begin
    hit_mask  = '0;
    miss_mask = '0;
    for (int l = 0; l < VER_W; l++)
      if (ver_in[l].valid && ver_ok[l]) begin
        if (ver_in[l].hit) hit_mask[ver_in[l].lsq]  = 1'b1;
        else               miss_mask[ver_in[l].lsq] = 1'b1;
      end
  end

  // a source seeing the result-tag lanes and the verifications
  function automatic src_t upd_src(src_t s, wake_t [WAKE_W-1:0] wk,
                                   ldmask_t hm, ldmask_t mm);
    src_t r;
    r = s;
    for (int l = 0; l < WAKE_W; l++)
      if (r.busy && wk[l].valid && wk[l].tag == r.tag) begin
        r.busy = 1'b0;
        r.cnt  = lat_m1(wk[l].lat);
        r.dep  = wk[l].dep;
      end
    if ((r.dep & mm) != '0) begin
      r.busy = 1'b1;
      r.cnt  = '0;
      r.dep  = '0;
    end
    r.dep &= ~hm;
    return r;
  endfunction

  // ------------------------------------------------------------ bid / grant
  logic [DEPTH-1:0] ready, bid, gnt;
  logic [ISSUE_W-1:0] gl_valid;
  logic [ISSUE_W-1:0][IW-1:0] gl_idx;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ready[i] = q[i].valid && !q[i].issued;
      for (int s = 0; s < NSRC; s++)
        if (q[i].src[s].busy || q[i].src[s].cnt != '0) ready[i] = 1'b0;
    end
    bid       = bid_en ? ready : '0;
    any_ready = |ready;
  end

  fu_t [DEPTH-1:0] cls;
  always_comb for (int i = 0; i < DEPTH; i++) cls[i] = q[i].fu;

  isq_class_arbiter #(.N(DEPTH), .LANES(ISSUE_W)) u_sel (
    .req(bid), .cls(cls), .gnt(gnt), .lane_valid(gl_valid), .lane_idx(gl_idx)
  );

  always_comb begin
    for (int l = 0; l < ISSUE_W; l++) begin
      entry_t e;
      e = q[gl_idx[l]];
      issue_out[l].valid   = gl_valid[l];
      issue_out[l].tag     = e.tag;
      issue_out[l].epoch   = e.epoch;
      issue_out[l].op      = e.op;
      issue_out[l].fu      = e.fu;
      issue_out[l].lat     = e.lat;
      issue_out[l].is_load = e.is_load;
      issue_out[l].lsq     = e.lsq;
      for (int s = 0; s < NSRC; s++) issue_out[l].src_tag[s] = e.src[s].tag;
      wake_out[l].valid = gl_valid[l];
      wake_out[l].tag   = e.tag;
      wake_out[l].lat   = e.lat;
      wake_out[l].dep   = deps(e);
      if (e.is_load) wake_out[l].dep[e.lsq] = 1'b1;
    end
  end

  // ------------------------------------------------- verification matching
  always_comb begin
    for (int l = 0; l < VER_W; l++) begin
      ver_match[l] = 1'b0;
      for (int i = 0; i < DEPTH; i++)
        if (ver_in[l].valid && q[i].valid && q[i].issued && q[i].is_load &&
            q[i].own_pend && q[i].tag == ver_in[l].tag && q[i].epoch == ver_in[l].epoch)
          ver_match[l] = 1'b1;
    end
  end

  // fill of a missed load: matched only if the load is not replayed this cycle
  always_comb begin
    fill_match = 1'b0;
    fill_dep   = '0;
    for (int i = 0; i < DEPTH; i++)
      if (fill_in.valid && q[i].valid && q[i].issued && q[i].miss_wait &&
          q[i].tag == fill_in.tag && q[i].epoch == fill_in.epoch &&
          (deps(q[i]) & miss_mask) == '0) begin
        fill_match = 1'b1;
        fill_dep   = deps(q[i]) & ~hit_mask;
      end
  end

  // ---------------------------------------------------------------- release
  logic [DEPTH-1:0] can_rel, rel_gnt, can_move, mov_gnt;
  logic [REL_W-1:0][IW-1:0] rl_idx;
  logic [MOVE_W-1:0][IW-1:0] mv_idx;

  always_comb
    for (int i = 0; i < DEPTH; i++) begin
      can_rel[i]  = q[i].valid && q[i].issued && q[i].done && !q[i].own_pend &&
                    !q[i].miss_wait && deps(q[i]) == '0;
      can_move[i] = q[i].valid && q[i].issued && !can_rel[i];
    end

  isq_arbiter #(.N(DEPTH), .LANES(REL_W)) u_rel (
    .req(can_rel), .limit($clog2(REL_W+1)'(REL_W)), .gnt(rel_gnt),
    .lane_valid(rel_valid), .lane_idx(rl_idx)
  );
  always_comb for (int l = 0; l < REL_W; l++) rel_tag[l] = q[rl_idx[l]].tag;

  isq_arbiter #(.N(DEPTH), .LANES(MOVE_W)) u_mov (
    .req(can_move), .limit(move_limit), .gnt(mov_gnt),
    .lane_valid(move_valid), .lane_idx(mv_idx)
  );

  // ------------------------------------------------------- entry next state
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      entry_t e;
      logic   killed;
      e = q[i];
      // countdowns
      for (int s = 0; s < NSRC; s++)
        if (e.src[s].cnt != '0) e.src[s].cnt = e.src[s].cnt - lat_t'(1);
      if (e.res_cnt != '0) e.res_cnt = e.res_cnt - lat_t'(1);
      // grant
      if (gnt[i]) begin
        e.issued   = 1'b1;
        e.done     = 1'b0;
        e.res_cnt  = lat_m1(e.lat);
        e.own_pend = e.is_load;
      end
      // verification of this entry as a load
      for (int l = 0; l < VER_W; l++)
        if (ver_in[l].valid && q[i].issued && q[i].is_load && q[i].own_pend &&
            q[i].tag == ver_in[l].tag && q[i].epoch == ver_in[l].epoch) begin
          e.own_pend = 1'b0;
          if (!ver_in[l].hit) e.miss_wait = 1'b1;
        end
      // replay of everything depending on a missed load
      killed = (deps(e) & miss_mask) != '0;
      for (int s = 0; s < NSRC; s++) e.src[s] = upd_src(e.src[s], wake_in, hit_mask, miss_mask);
      if (killed && e.issued) begin
        e.issued    = 1'b0;
        e.done      = 1'b0;
        e.own_pend  = 1'b0;
        e.miss_wait = 1'b0;
        e.res_cnt   = '0;
        e.epoch     = e.epoch + epoch_t'(1);
      end
      // writeback / fill of the current issue
      if (!killed && q[i].issued) begin
        for (int l = 0; l < WB_W; l++)
          if (wb_in[l].valid && wb_in[l].tag == q[i].tag && wb_in[l].epoch == q[i].epoch)
            e.done = 1'b1;
        if (fill_in.valid && q[i].miss_wait && fill_in.tag == q[i].tag &&
            fill_in.epoch == q[i].epoch) begin
          e.miss_wait = 1'b0;
          e.done      = 1'b1;
        end
      end
      if (!q[i].valid || rel_gnt[i] || mov_gnt[i]) e.valid = 1'b0;
      q_nxt[i] = e;
    end
  end

  // moved entries leave in their next-cycle state
  always_comb
    for (int l = 0; l < MOVE_W; l++) begin
      move_entry[l]       = q_nxt[mv_idx[l]];
      move_entry[l].valid = move_valid[l];
    end

  // ------------------------------------------------------------- allocation
  logic [DEPTH-1:0] free_v, fr_gnt;
  logic [ALLOC_W-1:0] fr_valid;
  logic [ALLOC_W-1:0][IW-1:0] fr_idx;

  always_comb for (int i = 0; i < DEPTH; i++) free_v[i] = !q[i].valid;

  isq_arbiter #(.N(DEPTH), .LANES(ALLOC_W)) u_free (
    .req(free_v), .limit($clog2(ALLOC_W+1)'(ALLOC_W)), .gnt(fr_gnt),
    .lane_valid(fr_valid), .lane_idx(fr_idx)
  );

  entry_t [ALLOC_W-1:0] alloc_upd;
  logic   [ALLOC_W-1:0][$clog2(ALLOC_W)-1:0] alloc_slot;  // k-th valid lane
  always_comb begin
    int unsigned k;
    k = 0;
    for (int l = 0; l < ALLOC_W; l++) begin
      alloc_slot[l] = $clog2(ALLOC_W)'(k);
      if (alloc_valid[l]) k++;
      alloc_upd[l] = alloc_entry[l];
      alloc_upd[l].valid = 1'b1;
      if (SNOOP)
        for (int s = 0; s < NSRC; s++)
          alloc_upd[l].src[s] = upd_src(alloc_entry[l].src[s], wake_in, hit_mask, miss_mask);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end
    else begin
      q <= q_nxt;
      for (int l = 0; l < ALLOC_W; l++)
        if (alloc_valid[l] && fr_valid[alloc_slot[l]])
          q[fr_idx[alloc_slot[l]]] <= alloc_upd[l];
    end
  end

  // ------------------------------------------------------------ statistics
  always_comb begin
    free_cnt = '0;
    occ_cnt  = '0;
    post_cnt = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!q[i].valid) free_cnt = free_cnt + CW'(1);
      else             occ_cnt  = occ_cnt + CW'(1);
      if (q[i].valid && q[i].issued) post_cnt = post_cnt + CW'(1);
    end
  end

  // ------------------------------------------------------------- lookups
  always_comb
    for (int p = 0; p < LOOK_N; p++) begin
      look_res[p] = '0;
      for (int i = 0; i < DEPTH; i++)
        if (q[i].valid && q[i].tag == look_tag[p]) begin
          look_res[p].found  = 1'b1;
          look_res[p].issued = q[i].issued && !q[i].miss_wait;
          look_res[p].cnt    = q[i].res_cnt;
          look_res[p].dep    = deps(q[i]);
          if (q[i].own_pend) look_res[p].dep[q[i].lsq] = 1'b1;
        end
    end

  // an allocation never overflows the queue
  a_alloc_fits: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(alloc_valid) <= free_cnt);
endmodule
