// isq_core_model: testbench helper that surrounds one dual_issue_queue of a
// given MIQ/RIQ size with a model of the rest of a core (rename, functional
// units, L1 data cache, next cache level) and runs a synthetic program on it.
//
// The program and the cache outcomes are a fixed function of the instruction
// number (a hash, not a random stream), so every instance of this model runs
// the same instruction sequence with the same hits and misses and their
// cycle counts can be compared. Program mix: 30 % loads (L1 hit latency 3,
// 15 % misses, fill 12 cycles later), other operations of latency 1, 2, 4
// or 24; each source names one of the 12 previous instructions if still in
// flight. At every release it checks that the released issue executed on
// correct operands and was the last issue. `done` rises when all N_INSTR
// instructions are released; `cycles` then holds the run length.
module isq_core_model
  import isq_pkg::*;
#(
  parameter int MIQ     = 48,
  parameter int RIQ     = 32,
  parameter int N_INSTR = 3000
) (
  output bit  done,
  output int  cycles,
  output int  checks,
  output int  failures,
  output int  occ_miq_sum,
  output int  occ_riq_sum,
  output int  replay_cycles
);
  localparam int DISP_W = 8, ISSUE_W = 8, VER_W = 4, WB_W = 8, REL_W = 8;
  localparam int MISS_PCT = 15, FILL_LAT = 12, L1_LAT = 3;
  localparam int INF = 32'h3fffffff;

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
  logic [$clog2(MIQ+1)-1:0] miq_occ, miq_post;
  logic [$clog2(RIQ+1)-1:0] riq_occ, riq_post;

  dual_issue_queue #(.MIQ_DEPTH(MIQ), .RIQ_DEPTH(RIQ)) dut (.*);

  always #5 clk = ~clk;

  // deterministic hash of (instruction, field) -> 0..99
  function automatic int h100(int a, int b);
    int unsigned x;
    x = a * 32'h9E3779B1 + b * 32'h85EBCA77 + 32'h165667B1;
    x ^= x >> 15; x *= 32'h2C1B3C6D; x ^= x >> 12; x *= 32'h297A2D39; x ^= x >> 15;
    return int'(x % 100);
  endfunction

  int   i_tag [N_INSTR], i_lat [N_INSTR], i_lsq [N_INSTR], i_rdy [N_INSTR];
  bit   i_load[N_INSTR], i_rel [N_INSTR], i_good[N_INSTR];
  int   i_prod[N_INSTR][NSRC];
  int   i_ex_ep[N_INSTR], i_iss_ep[N_INSTR], i_nexec[N_INSTR];
  int   tag2seq[256];
  bit   tag_busy[256], lsq_busy[64];

  typedef struct { int at; wb_t w; } wb_ev_t;
  typedef struct { int at; verify_t v; } ver_ev_t;
  wb_ev_t wbq[$], fillq[$];
  ver_ev_t verq[$];

  int cyc = 0, n_rel = 0, next_seq = 0, next_tag = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d cycle %0d: %s", MIQ, RIQ, cyc, what);
    end
  endtask

  task automatic new_uop(int seq, output uop_t u);
    int r;
    r = h100(seq, 0);
    i_load[seq] = (r < 30);
    i_lat[seq]  = i_load[seq] ? L1_LAT : ((r < 80) ? 1 : (r < 92) ? 2 : (r < 98) ? 4 : 24);
    i_lsq[seq]  = -1;
    if (i_load[seq])
      for (int k = 0; k < 64; k++) if (!lsq_busy[k] && i_lsq[seq] < 0) i_lsq[seq] = k;
    i_tag[seq] = next_tag; i_rdy[seq] = INF; i_rel[seq] = 0; i_good[seq] = 0;
    i_ex_ep[seq] = -1; i_iss_ep[seq] = -1; i_nexec[seq] = 0;
    u = '0;
    u.fu  = i_load[seq] ? FU_LDST : (i_lat[seq] == 1) ? FU_IALU : (i_lat[seq] == 2) ? FU_FPADD : FU_FPMUL;
    u.tag = tag_t'(next_tag); u.op = op_t'(seq); u.lat = lat_t'(i_lat[seq]);
    u.is_load = i_load[seq]; u.lsq = lsq_t'(i_lsq[seq] < 0 ? 0 : i_lsq[seq]);
    for (int s = 0; s < NSRC; s++) begin
      int p;
      p = (seq == 0 || h100(seq, 1 + s) < 20) ? -1
          : seq - 1 - (h100(seq, 3 + s) % ((seq < 12) ? seq : 12));
      if (p >= 0 && i_rel[p]) p = -1;
      i_prod[seq][s] = p;
      u.src_has[s] = (p >= 0);
      u.src_tag[s] = tag_t'(p >= 0 ? i_tag[p] : 0);
    end
  endtask

  initial begin
    int grp_n;
    done = 0; checks = 0; failures = 0; occ_miq_sum = 0; occ_riq_sum = 0; replay_cycles = 0;
    foreach (tag_busy[k]) tag_busy[k] = 0;
    foreach (lsq_busy[k]) lsq_busy[k] = 0;
    disp_valid = '0; disp_uop = '0; wb_in = '0; dc_verify = '0; fill_in = '0;
    grp_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (n_rel < N_INSTR) begin
      @(posedge clk); #1;
      cyc++;
      // functional units and data cache
      for (int l = 0; l < ISSUE_W; l++)
        if (fu_issue[l].valid) begin
          int sq;
          bit good, hit;
          wb_ev_t e;
          ver_ev_t v;
          sq = tag2seq[fu_issue[l].tag];
          good = 1;
          for (int s = 0; s < NSRC; s++)
            if (i_prod[sq][s] >= 0 && i_rdy[i_prod[sq][s]] > cyc) good = 0;
          i_ex_ep[sq] = fu_issue[l].epoch; i_good[sq] = good;
          i_nexec[sq]++;
          e.w.valid = 1; e.w.tag = fu_issue[l].tag; e.w.epoch = fu_issue[l].epoch;
          if (!i_load[sq]) begin
            i_rdy[sq] = good ? cyc + i_lat[sq] : INF;
            e.at = cyc + i_lat[sq];
            wbq.push_back(e);
          end else begin
            hit = h100(sq, 10 + i_nexec[sq]) >= MISS_PCT;
            v.at = cyc + L1_LAT;
            v.v.valid = 1; v.v.tag = fu_issue[l].tag; v.v.epoch = fu_issue[l].epoch;
            v.v.lsq = lsq_t'(i_lsq[sq]); v.v.hit = hit;
            verq.push_back(v);
            if (hit) begin
              i_rdy[sq] = good ? cyc + L1_LAT : INF;
              e.at = cyc + L1_LAT;
              wbq.push_back(e);
            end else begin
              i_rdy[sq] = INF;
              e.at = cyc + L1_LAT + FILL_LAT;
              fillq.push_back(e);
            end
          end
        end
      // releases
      for (int l = 0; l < 2 * REL_W; l++) begin
        logic v;
        tag_t t;
        int sq;
        v = (l < REL_W) ? miq_rel_valid[l] : riq_rel_valid[l - REL_W];
        t = (l < REL_W) ? miq_rel_tag[l]   : riq_rel_tag[l - REL_W];
        if (v) begin
          sq = tag2seq[t];
          check("released tag in flight, once", tag_busy[t] && !i_rel[sq]);
          check("released issue executed on correct operands", i_ex_ep[sq] >= 0 && i_good[sq]);
          check("released issue is the last one", i_ex_ep[sq] == i_iss_ep[sq]);
          i_rel[sq] = 1; tag_busy[t] = 0;
          if (i_load[sq]) lsq_busy[i_lsq[sq]] = 0;
          n_rel++;
        end
      end
      // returns due now
      wb_in = '0; dc_verify = '0; fill_in = '0;
      begin
        int k, n;
        k = 0; n = 0;
        while (k < wbq.size())
          if (wbq[k].at <= cyc && n < WB_W) begin wb_in[n] = wbq[k].w; n++; wbq.delete(k); end
          else k++;
        k = 0; n = 0;
        while (k < verq.size())
          if (verq[k].at <= cyc && n < VER_W) begin dc_verify[n] = verq[k].v; n++; verq.delete(k); end
          else k++;
        k = 0;
        while (k < fillq.size())
          if (fillq[k].at <= cyc && !fill_in.valid) begin
            int sq;
            fill_in = fillq[k].w; fillq.delete(k);
            sq = tag2seq[fill_in.tag];
            if (i_good[sq] && i_ex_ep[sq] == int'(fill_in.epoch)) i_rdy[sq] = cyc;
          end else k++;
      end
      // dispatch
      if (disp_valid != '0 && disp_ready) grp_n = 0;
      if (grp_n == 0) begin
        disp_valid = '0;
        for (int l = 0; l < DISP_W; l++) begin
          uop_t u;
          bit room;
          room = (next_seq < N_INSTR) && !tag_busy[next_tag];
          if (room && h100(next_seq, 0) < 30) begin
            room = 0;
            for (int k = 0; k < 64; k++) if (!lsq_busy[k]) room = 1;
          end
          if (room) begin
            new_uop(next_seq, u);
            if (i_load[next_seq]) lsq_busy[i_lsq[next_seq]] = 1;
            tag2seq[next_tag] = next_seq; tag_busy[next_tag] = 1;
            disp_uop[l] = u; disp_valid[l] = 1;
            next_seq++; next_tag = (next_tag + 1) % 256; grp_n++;
          end
        end
      end
      #1;
      if (disp_valid == '0) grp_n = 0;
      for (int l = 0; l < ISSUE_W; l++)
        if (rf_issue[l].valid) i_iss_ep[tag2seq[rf_issue[l].tag]] = rf_issue[l].epoch;
      if (replay_req) replay_cycles++;
      occ_miq_sum += int'(miq_occ); occ_riq_sum += int'(riq_occ);
      check("MIQ occupancy within its size", int'(miq_occ) <= MIQ);
      check("RIQ occupancy within its size", int'(riq_occ) <= RIQ);
    end
    cycles = cyc;
    done = 1;
  end
endmodule
