// tb_dual_issue_queue: end-to-end run of the dual issue queue at its default
// size (48-entry MIQ, 32-entry RIQ, 8-wide, issue-to-execute latency and
// feedback delay of 9 cycles).
//
// The testbench plays rename stage, functional units, data cache and memory:
//  * it dispatches a random program: loads (L1 latency 3) and ALU/FP
//    operations (1 to 24 cycles) whose sources name recent in-flight
//    instructions;
//  * for each issued instance reaching `fu_issue` it decides whether every
//    source value was really available at that cycle (a load miss makes its
//    speculatively issued dependants execute on wrong data); it returns the
//    writeback, the load's hit/miss (misses with fixed probability) and,
//    after a miss, the fill from the next cache level (12 cycles);
//  * at every release it checks that the released instance executed on
//    correct data and is the instruction's last issue, and that nothing is
//    released twice.
// It counts every mechanism of the scheme and fails if one never occurs:
// speculative issue before the hit is known, load misses, replays from the
// RIQ (replay_req), moves MIQ->RIQ, cross-queue delayed tags in both
// directions, a full MIQ stalling dispatch, a full RIQ limiting moves,
// squashed instances whose writeback must be ignored, a functional-unit
// class issuing as many instructions as it has units. Every cycle it checks
// that no class issues more instructions than it has units.
module tb_dual_issue_queue;
  import isq_pkg::*;
  localparam int DISP_W = 8, ISSUE_W = 8, VER_W = 4, WB_W = 8, REL_W = 8;
  localparam int N_INSTR   = 4000;
  localparam int MISS_PCT  = 15;
  localparam int FILL_LAT  = 12;
  localparam int L1_LAT    = 3;
  localparam int INF       = 32'h3fffffff;

  logic clk = 0, rst_n = 0;
  logic    [DISP_W-1:0]  disp_valid;
  uop_t    [DISP_W-1:0]  disp_uop;
  logic                  disp_ready;
  issue_t  [ISSUE_W-1:0] rf_issue, fu_issue;
  wb_t     [WB_W-1:0]    wb_in;
  verify_t [VER_W-1:0]   dc_verify;
  wb_t                   fill_in;
  logic    [REL_W-1:0]   miq_rel_valid, riq_rel_valid;
  tag_t    [REL_W-1:0]   miq_rel_tag, riq_rel_tag;
  logic replay_req, miq_issuing, miq_xq_pending, riq_xq_pending;
  logic [3:0] move_count;
  logic [5:0] miq_occ, miq_post, riq_occ, riq_post;

  dual_issue_queue dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ program model
  int   i_tag   [N_INSTR];
  int   i_lat   [N_INSTR];
  bit   i_load  [N_INSTR];
  int   i_lsq   [N_INSTR];
  int   i_prod  [N_INSTR][NSRC];   // producer instruction, -1: none in flight
  int   i_rdy   [N_INSTR];         // cycle from which its value is correct
  bit   i_rel   [N_INSTR];
  int   i_good_ep[N_INSTR];        // epoch of last executed instance, -1 none
  bit   i_good  [N_INSTR];         // that instance had correct sources
  int   i_last_issue_ep[N_INSTR];
  int   tag2seq [256];
  bit   tag_busy[256];
  bit   lsq_busy[64];

  // scheduled returns
  typedef struct { int at; wb_t w; } wb_ev_t;
  typedef struct { int at; verify_t v; } ver_ev_t;
  wb_ev_t  wbq  [$];
  ver_ev_t verq [$];
  wb_ev_t  fillq[$];

  // mechanism counters
  int n_spec = 0, n_miss = 0, n_hit = 0, n_replay_cyc = 0, n_moves = 0, n_xq_m = 0, n_xq_r = 0;
  bit prev_replay = 0;
  int n_issued = 0, n_fu_full = 0, n_miq_full = 0, n_riq_full = 0, n_squash = 0, n_rel = 0, n_riq_issue = 0;
  longint occ_m = 0, occ_r = 0, post_m = 0;

  int next_seq = 0, next_tag = 0;

  function automatic int pick_prod(int seq);
    int p;
    if (seq == 0 || $urandom_range(0, 4) == 0) return -1;
    p = seq - $urandom_range(1, (seq < 12) ? seq : 12);
    if (i_rel[p]) return -1;
    return p;
  endfunction

  task automatic new_uop(int seq, output uop_t u);
    int r;
    r = $urandom_range(0, 99);
    i_load[seq] = (r < 30);
    i_lat[seq]  = i_load[seq] ? L1_LAT : ((r < 80) ? 1 : (r < 92) ? 2 : (r < 98) ? 4 : 24);
    i_lsq[seq]  = -1;
    if (i_load[seq])
      for (int k = 0; k < 64; k++) if (!lsq_busy[k] && i_lsq[seq] < 0) i_lsq[seq] = k;
    i_tag[seq] = next_tag;
    i_rdy[seq] = INF;
    i_rel[seq] = 0;
    i_good_ep[seq] = -1;
    i_good[seq] = 0;
    i_last_issue_ep[seq] = -1;
    u = '0;
    u.fu  = i_load[seq] ? FU_LDST : (i_lat[seq] == 1) ? FU_IALU : (i_lat[seq] == 2) ? FU_FPADD : FU_FPMUL;
    u.tag = tag_t'(next_tag);
    u.op  = op_t'(seq);
    u.lat = lat_t'(i_lat[seq]);
    u.is_load = i_load[seq];
    u.lsq = lsq_t'(i_lsq[seq] < 0 ? 0 : i_lsq[seq]);
    for (int s = 0; s < NSRC; s++) begin
      i_prod[seq][s] = pick_prod(seq);
      u.src_has[s] = (i_prod[seq][s] >= 0);
      u.src_tag[s] = tag_t'(i_prod[seq][s] >= 0 ? i_tag[i_prod[seq][s]] : 0);
    end
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------- main loop
  initial begin
    uop_t grp [DISP_W];
    int   grp_n;
    foreach (tag_busy[k]) tag_busy[k] = 0;
    foreach (lsq_busy[k]) lsq_busy[k] = 0;
    disp_valid = '0; disp_uop = '0; wb_in = '0; dc_verify = '0; fill_in = '0;
    grp_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    while (n_rel < N_INSTR) begin
      @(posedge clk); #1;
      cyc++;

      // ---- functional units: execute what arrives
      for (int l = 0; l < ISSUE_W; l++)
        if (fu_issue[l].valid) begin
          int sq;
          bit good;
          sq = tag2seq[fu_issue[l].tag];
          good = 1;
          for (int s = 0; s < NSRC; s++)
            if (i_prod[sq][s] >= 0 && i_rdy[i_prod[sq][s]] > cyc) good = 0;
          i_good_ep[sq] = fu_issue[l].epoch;
          i_good[sq] = good;
          if (!i_load[sq]) begin
            wb_ev_t e;
            i_rdy[sq] = good ? cyc + i_lat[sq] : INF;
            e.at = cyc + i_lat[sq];
            e.w.valid = 1; e.w.tag = fu_issue[l].tag; e.w.epoch = fu_issue[l].epoch;
            wbq.push_back(e);
          end else begin
            ver_ev_t v;
            bit hit;
            hit = ($urandom_range(0, 99) >= MISS_PCT);
            v.at = cyc + L1_LAT;
            v.v.valid = 1; v.v.tag = fu_issue[l].tag; v.v.epoch = fu_issue[l].epoch;
            v.v.lsq = lsq_t'(i_lsq[sq]); v.v.hit = hit;
            verq.push_back(v);
            if (hit) begin
              wb_ev_t e;
              i_rdy[sq] = good ? cyc + L1_LAT : INF;
              e.at = cyc + L1_LAT;
              e.w.valid = 1; e.w.tag = fu_issue[l].tag; e.w.epoch = fu_issue[l].epoch;
              wbq.push_back(e);
            end else begin
              wb_ev_t f;
              i_rdy[sq] = INF;
              f.at = cyc + L1_LAT + FILL_LAT;
              f.w.valid = 1; f.w.tag = fu_issue[l].tag; f.w.epoch = fu_issue[l].epoch;
              fillq.push_back(f);
            end
          end
        end

      // ---- releases at the coming edge
      for (int l = 0; l < 2 * REL_W; l++) begin
        logic v;
        tag_t t;
        v = (l < REL_W) ? miq_rel_valid[l] : riq_rel_valid[l - REL_W];
        t = (l < REL_W) ? miq_rel_tag[l]   : riq_rel_tag[l - REL_W];
        if (v) begin
          int sq;
          sq = tag2seq[t];
          check("released tag is in flight", tag_busy[t]);
          check("released once", !i_rel[sq]);
          check("released instance was executed", i_good_ep[sq] >= 0);
          check("released instance computed on correct data", i_good[sq]);
          check("released instance is the last issue", i_good_ep[sq] == i_last_issue_ep[sq]);
          if (!i_good[sq] && failures < 10) $display("  seq %0d tag %0d", sq, t);
          i_rel[sq] = 1;
          tag_busy[t] = 0;
          if (i_load[sq]) lsq_busy[i_lsq[sq]] = 0;
          n_rel++;
        end
      end

      // ---- returns due this cycle
      wb_in = '0; dc_verify = '0; fill_in = '0;
      begin
        int k, n;
        k = 0; n = 0;
        while (k < wbq.size()) begin
          if (wbq[k].at <= cyc && n < WB_W) begin wb_in[n] = wbq[k].w; n++; wbq.delete(k); end
          else k++;
        end
        k = 0; n = 0;
        while (k < verq.size()) begin
          if (verq[k].at <= cyc && n < VER_W) begin
            dc_verify[n] = verq[k].v; n++;
            if (verq[k].v.hit) n_hit++; else n_miss++;
            verq.delete(k);
          end else k++;
        end
        k = 0; n = 0;
        while (k < fillq.size()) begin
          if (fillq[k].at <= cyc && n < 1) begin
            fill_in = fillq[k].w; n++; fillq.delete(k);
            // data correct from now on if the load's address was
            if (i_good[tag2seq[fill_in.tag]] && i_good_ep[tag2seq[fill_in.tag]] == int'(fill_in.epoch))
              i_rdy[tag2seq[fill_in.tag]] = cyc;
          end else k++;
        end
      end

      // ---- rename / dispatch
      if (disp_valid != '0 && disp_ready) grp_n = 0;   // last group accepted
      if (disp_valid != '0 && !disp_ready) n_miq_full++;
      if (grp_n == 0) begin
        disp_valid = '0;
        for (int l = 0; l < DISP_W; l++) begin
          uop_t u;
          bit   room;
          room = (next_seq < N_INSTR) && !tag_busy[next_tag];
          if (room) begin
            // loads need a free load/store queue slot
            bit lsq_ok;
            lsq_ok = 0;
            for (int k = 0; k < 64; k++) if (!lsq_busy[k]) lsq_ok = 1;
            if (!lsq_ok) room = 0;
          end
          if (room) begin
            new_uop(next_seq, u);
            if (i_load[next_seq]) lsq_busy[i_lsq[next_seq]] = 1;
            tag2seq[next_tag] = next_seq;
            tag_busy[next_tag] = 1;
            disp_uop[l] = u;
            disp_valid[l] = 1;
            next_seq++;
            next_tag = (next_tag + 1) % 256;
            grp_n++;
          end
        end
      end
      #1;
      // group goes in at the coming edge if disp_ready is high now
      if (disp_valid == '0) grp_n = 0;

      // ---- statistics sampled before the edge
      for (int l = 0; l < ISSUE_W; l++)
        if (rf_issue[l].valid && i_last_issue_ep[tag2seq[rf_issue[l].tag]] != int'(rf_issue[l].epoch))
          i_last_issue_ep[tag2seq[rf_issue[l].tag]] = rf_issue[l].epoch;
      begin
        int per_cls [5];
        bit full;
        foreach (per_cls[c]) per_cls[c] = 0;
        for (int l = 0; l < ISSUE_W; l++) if (rf_issue[l].valid) per_cls[rf_issue[l].fu]++;
        full = 0;
        for (int c = 0; c < 5; c++) begin
          check("issue per class within unit count", per_cls[c] <= int'(FU_UNITS[c]));
          if (per_cls[c] == int'(FU_UNITS[c]) && c != int'(FU_IALU)) full = 1;
        end
        if (full) n_fu_full++;
      end
      for (int l = 0; l < ISSUE_W; l++)
        if (rf_issue[l].valid) begin
          n_issued++;
          if (prev_replay) n_riq_issue++;
        end
      prev_replay = replay_req;
      if (replay_req) n_replay_cyc++;
      if (miq_xq_pending) n_xq_m++;
      if (riq_xq_pending) n_xq_r++;
      n_moves += move_count;
      if (riq_occ == 6'd32 && miq_post != 0) n_riq_full++;
      occ_m += miq_occ; occ_r += riq_occ; post_m += miq_post;
    end

    // every squashed instance is one whose writeback had to be ignored
    $display("cycles %0d, instructions %0d, IPC %0.2f", cyc, N_INSTR, real'(N_INSTR) / cyc);
    $display("mean occupancy: MIQ %0.1f (post-issue %0.1f), RIQ %0.1f",
             real'(occ_m) / cyc, real'(post_m) / cyc, real'(occ_r) / cyc);
    $display("loads hit %0d miss %0d; replay cycles %0d; moves %0d; RIQ->MIQ delayed %0d; MIQ->RIQ delayed %0d",
             n_hit, n_miss, n_replay_cyc, n_moves, n_xq_m, n_xq_r);
    $display("MIQ full %0d; RIQ full %0d; speculative issues %0d; re-issues %0d",
             n_miq_full, n_riq_full, n_spec, n_squash);
    $display("cycles with a functional-unit class fully used: %0d", n_fu_full);
    $display("issues %0d, of which from the MIQ %0.1f%%", n_issued,
             100.0 * (n_issued - n_riq_issue) / n_issued);
    check("the RIQ issued", n_riq_issue > 0);
    check("a functional-unit class limit was reached", n_fu_full > 0);
    check("load hits occurred", n_hit > 0);
    check("load misses occurred", n_miss > 0);
    check("replays from the RIQ occurred", n_replay_cyc > 0);
    check("moves MIQ->RIQ occurred", n_moves > 0);
    check("RIQ->MIQ cross-queue delay occurred", n_xq_m > 0);
    check("MIQ->RIQ cross-queue delay occurred", n_xq_r > 0);
    check("MIQ full stalled dispatch", n_miq_full > 0);
    check("RIQ full limited moves", n_riq_full > 0);
    check("dependants issued before their load was verified", n_spec > 0);
    check("squashed instances occurred", n_squash > 0);
    check("all instructions released", n_rel == N_INSTR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // speculative issues and squashes, seen on the register-file port
  always @(posedge clk)
    if (rst_n)
      for (int l = 0; l < ISSUE_W; l++)
        if (rf_issue[l].valid) begin
          int sq;
          sq = tag2seq[rf_issue[l].tag];
          if (int'(rf_issue[l].epoch) != 0 && i_last_issue_ep[sq] >= 0) n_squash++;
          for (int s = 0; s < NSRC; s++)
            if (i_prod[sq][s] >= 0 && i_load[i_prod[sq][s]] && i_rdy[i_prod[sq][s]] == INF) n_spec++;
        end
endmodule
