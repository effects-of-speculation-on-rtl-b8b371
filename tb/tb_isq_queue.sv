// tb_isq_queue: directed scenarios on one queue whose own grants are fed
// straight back as result tags (as the multiplexer does while the queue
// issues). Checked against hand-worked cycle numbers:
//  1. back-to-back issue of a 1-cycle producer and its consumer;
//  2. a 3-cycle producer delays its consumer by exactly 3 cycles;
//  3. load-hit speculation: the dependants of a load issue 3 cycles after it,
//     before the hit is known; a miss replays the direct and the indirect
//     dependant (new epoch), writebacks of the old issue are ignored, the
//     fill wakes them again and they issue again in order;
//  4. a dependant written back before its load is verified is held until the
//     hit arrives, then released;
//  5. issued entries move out (up to move_limit), and lookups report state.
module tb_isq_queue;
  import isq_pkg::*;
  localparam int D = 8, AW = 4, IW = 4, WW = IW + 1, VW = 2, BW = 4, RW = 4, MW = 4, LN = 2;
  logic clk = 0, rst_n = 0;
  logic    [AW-1:0] alloc_valid;
  entry_t  [AW-1:0] alloc_entry;
  logic    [$clog2(D+1)-1:0] free_cnt, occ_cnt, post_cnt;
  logic    bid_en, any_ready;
  issue_t  [IW-1:0] issue_out;
  wake_t   [IW-1:0] wake_out;
  wake_t   [WW-1:0] wake_in;
  verify_t [VW-1:0] ver_in;
  logic    [VW-1:0] ver_ok, ver_match;
  wb_t     [BW-1:0] wb_in;
  wb_t     fill_in;
  logic    fill_match;
  ldmask_t fill_dep;
  logic    [RW-1:0] rel_valid;
  tag_t    [RW-1:0] rel_tag;
  logic    [$clog2(MW+1)-1:0] move_limit;
  logic    [MW-1:0] move_valid;
  entry_t  [MW-1:0] move_entry;
  tag_t    [LN-1:0] look_tag;
  lookup_t [LN-1:0] look_res;

  isq_queue #(.DEPTH(D), .ALLOC_W(AW), .ISSUE_W(IW), .WAKE_W(WW), .VER_W(VW), .WB_W(BW),
              .REL_W(RW), .MOVE_W(MW), .LOOK_N(LN), .SNOOP(1'b1)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // own grants back as result tags; a matched fill as the last lane
  always_comb begin
    for (int l = 0; l < IW; l++) wake_in[l] = wake_out[l];
    wake_in[IW].valid = fill_in.valid && fill_match;
    wake_in[IW].tag   = fill_in.tag;
    wake_in[IW].lat   = lat_t'(1);
    wake_in[IW].dep   = fill_dep;
    ver_ok = ver_match;
  end

  // record grants and releases per tag
  int     gcyc [256];
  int     gcnt [256];
  epoch_t gep  [256];
  int     rcyc [256];
  always @(posedge clk) begin
    for (int l = 0; l < IW; l++)
      if (issue_out[l].valid) begin
        gcyc[issue_out[l].tag] = cyc;
        gcnt[issue_out[l].tag]++;
        gep[issue_out[l].tag]  = issue_out[l].epoch;
      end
    for (int l = 0; l < RW; l++)
      if (rel_valid[l]) rcyc[rel_tag[l]] = cyc;
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic entry_t mk(int tag, int lat, logic ld, int lsq,
                                int s0 = -1, int s1 = -1);
    entry_t e;
    e = '0;
    e.valid = 1; e.tag = tag_t'(tag); e.lat = lat_t'(lat); e.is_load = ld;
    e.lsq = lsq_t'(lsq); e.op = op_t'(tag);
    e.src[0].busy = (s0 >= 0); e.src[0].tag = tag_t'(s0 < 0 ? 0 : s0);
    e.src[1].busy = (s1 >= 0); e.src[1].tag = tag_t'(s1 < 0 ? 0 : s1);
    return e;
  endfunction

  task automatic put(entry_t e0, entry_t e1 = '0, entry_t e2 = '0);
    alloc_entry = '0; alloc_valid = '0;
    alloc_entry[0] = e0; alloc_valid[0] = e0.valid;
    alloc_entry[1] = e1; alloc_valid[1] = e1.valid;
    alloc_entry[2] = e2; alloc_valid[2] = e2.valid;
    @(posedge clk); #1;
    alloc_valid = '0;
  endtask

  task automatic wb(int tag, epoch_t ep);
    wb_in[0].valid = 1; wb_in[0].tag = tag_t'(tag); wb_in[0].epoch = ep;
    @(posedge clk); #1;
    wb_in = '0;
  endtask

  task automatic verify(int tag, epoch_t ep, int lsq, logic hit);
    ver_in[0].valid = 1; ver_in[0].tag = tag_t'(tag); ver_in[0].epoch = ep;
    ver_in[0].lsq = lsq_t'(lsq); ver_in[0].hit = hit;
    @(posedge clk); #1;
    ver_in = '0;
  endtask

  initial begin
    int t0;
    epoch_t e_old;
    for (int i = 0; i < 256; i++) begin gcyc[i] = -1; gcnt[i] = 0; rcyc[i] = -1; end
    alloc_valid = '0; alloc_entry = '0; bid_en = 0; ver_in = '0; wb_in = '0;
    fill_in = '0; move_limit = '0; look_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("empty after reset", free_cnt == D && occ_cnt == 0);

    // ---- 1 and 2: wakeup timing
    put(mk(1, 1, 0, 0), mk(2, 1, 0, 0, 1), mk(3, 3, 0, 0));
    put(mk(4, 1, 0, 0, 3));
    check("four entries held", occ_cnt == 4);
    bid_en = 1;
    repeat (6) @(posedge clk);
    #1;
    check("1 and 3 issue together", gcyc[1] == gcyc[3] && gcyc[1] >= 0);
    check("1-cycle producer: consumer next cycle", gcyc[2] == gcyc[1] + 1);
    check("3-cycle producer: consumer 3 cycles later", gcyc[4] == gcyc[3] + 3);
    check("post-issue count", post_cnt == 4);
    wb(1, gep[1]); wb(2, gep[2]); wb(3, gep[3]); wb(4, gep[4]);
    @(posedge clk); #1;
    check("all four released", rcyc[1] >= 0 && rcyc[2] >= 0 && rcyc[3] >= 0 && rcyc[4] >= 0);
    check("queue empty again", occ_cnt == 0);

    // ---- 3: load miss replay (load 10 in LSQ slot 5, 11 uses it, 12 uses 11)
    put(mk(10, 3, 1, 5), mk(11, 1, 0, 0, 10), mk(12, 1, 0, 0, 11));
    repeat (6) @(posedge clk); #1;
    check("load dependant issues 3 cycles after load", gcyc[11] == gcyc[10] + 3);
    check("indirect dependant issues next", gcyc[12] == gcyc[11] + 1);
    look_tag[0] = 11; look_tag[1] = 10; #1;
    check("lookup: woken, depends on slot 5", look_res[0].found && look_res[0].issued &&
          look_res[0].dep[5] && !look_res[1].dep[4]);
    e_old = gep[11];
    wb(11, gep[11]);
    check("not released before verification", rcyc[11] < 0);
    t0 = cyc;
    verify(10, gep[10], 5, 1'b0);
    check("replayed entries un-issued", post_cnt == 1);
    check("no replay before the fill", gcnt[11] == 1 && gcnt[12] == 1);
    look_tag[1] = 10; #1;
    check("lookup: missed load not woken", look_res[1].found && !look_res[1].issued);
    wb(11, e_old);   // stale writeback of the squashed issue
    repeat (3) @(posedge clk); #1;
    check("still waiting for fill", gcnt[11] == 1);
    fill_in.valid = 1; fill_in.tag = 10; fill_in.epoch = gep[10];
    #1 check("fill matched", fill_match);
    t0 = cyc;
    @(posedge clk); #1; fill_in = '0;
    repeat (3) @(posedge clk); #1;
    check("dependant re-issued one cycle after the fill", gcnt[11] == 2 && gcyc[11] == t0 + 1);
    check("indirect dependant re-issued after it", gcnt[12] == 2 && gcyc[12] == t0 + 2);
    check("new epoch on re-issue", gep[11] == e_old + 1);
    check("stale writeback ignored", rcyc[11] < 0);
    check("missed load released by its fill", rcyc[10] >= 0);
    wb(11, gep[11]); wb(12, gep[12]);
    @(posedge clk); #1;
    check("replayed entries released", rcyc[11] >= 0 && rcyc[12] >= 0 && occ_cnt == 0);

    // ---- 4: hit verification after writeback
    put(mk(20, 3, 1, 7), mk(21, 1, 0, 0, 20));
    repeat (5) @(posedge clk); #1;
    wb(20, gep[20]); wb(21, gep[21]);
    repeat (2) @(posedge clk); #1;
    check("held while load unverified", rcyc[20] < 0 && rcyc[21] < 0 && occ_cnt == 2);
    t0 = cyc;
    verify(20, gep[20], 7, 1'b1);
    @(posedge clk); #1;
    check("released after the hit", rcyc[20] == t0 + 1 && rcyc[21] == t0 + 1);
    check("no replay on a hit", gcnt[21] == 1);

    // ---- 5: move out of issued entries
    bid_en = 0;
    put(mk(30, 1, 0, 0), mk(31, 1, 0, 0), mk(32, 1, 0, 0));
    bid_en = 1;
    @(posedge clk); #1;
    bid_en = 0;
    move_limit = 2; #1;
    check("two moved out", move_valid == 4'b0011 && move_entry[0].issued && move_entry[1].issued);
    @(posedge clk); #1;
    move_limit = 0;
    check("one left", occ_cnt == 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
