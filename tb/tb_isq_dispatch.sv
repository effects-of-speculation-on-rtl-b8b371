// tb_isq_dispatch: random dispatch groups and random producer states in the
// two queues; each source's ready state, countdown and mask is checked
// against an independent model of the rules.
module tb_isq_dispatch;
  import isq_pkg::*;
  localparam int W = 8;
  logic    [W-1:0]      disp_valid, alloc_valid;
  uop_t    [W-1:0]      disp_uop;
  tag_t    [W*NSRC-1:0] look_tag;
  lookup_t [W*NSRC-1:0] miq_look, riq_look;
  entry_t  [W-1:0]      alloc_entry;
  int checks = 0, failures = 0;

  isq_dispatch #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lookup_t rnd_look();
    lookup_t k;
    k.found  = ($urandom_range(0, 2) == 0);
    k.issued = $urandom_range(0, 1);
    k.cnt    = lat_t'($urandom_range(0, 5));
    k.dep    = {$urandom, $urandom};
    return k;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int l = 0; l < W; l++) begin
        disp_valid[l]       = $urandom_range(0, 3) != 0;
        disp_uop[l].tag     = tag_t'(t * W + l);
        disp_uop[l].op      = op_t'($urandom);
        disp_uop[l].lat     = lat_t'($urandom_range(1, 24));
        disp_uop[l].is_load = $urandom_range(0, 1);
        disp_uop[l].lsq     = lsq_t'($urandom);
        for (int s = 0; s < NSRC; s++) begin
          disp_uop[l].src_has[s] = $urandom_range(0, 3) != 0;
          // sometimes name a producer of the same group
          disp_uop[l].src_tag[s] = ($urandom_range(0, 3) == 0 && l > 0) ?
                                   tag_t'(t * W + $urandom_range(0, l - 1)) : tag_t'($urandom);
        end
      end
      for (int p = 0; p < W * NSRC; p++) begin
        miq_look[p] = rnd_look();
        riq_look[p] = rnd_look();
        if (miq_look[p].found) riq_look[p].found = 1'b0;
      end
      #1;
      for (int l = 0; l < W; l++) begin
        checks++;
        if (alloc_valid[l] !== disp_valid[l] || alloc_entry[l].tag !== disp_uop[l].tag ||
            alloc_entry[l].issued !== 1'b0 || alloc_entry[l].lat !== disp_uop[l].lat) failures++;
        for (int s = 0; s < NSRC; s++) begin
          int p;
          logic eb, grp;
          lat_t ec;
          ldmask_t ed;
          lookup_t k;
          p = l * NSRC + s;
          checks++;
          if (look_tag[p] !== disp_uop[l].src_tag[s]) failures++;
          grp = 0;
          for (int j = 0; j < l; j++)
            if (disp_valid[j] && disp_uop[j].tag == disp_uop[l].src_tag[s]) grp = 1;
          k = miq_look[p].found ? miq_look[p] : riq_look[p];
          eb = 0; ec = 0; ed = 0;
          if (!disp_uop[l].src_has[s]) eb = 0;
          else if (grp) eb = 1;
          else if (k.found && !k.issued) eb = 1;
          else if (k.found) begin
            ec = (k.cnt > 0) ? k.cnt - 1 : 0;
            ed = k.dep;
          end
          checks++;
          if (alloc_entry[l].src[s].busy !== eb || alloc_entry[l].src[s].cnt !== ec ||
              alloc_entry[l].src[s].dep !== ed) begin
            failures++;
            if (failures < 5) $display("t=%0d lane %0d src %0d busy %0d/%0d cnt %0d/%0d",
                                       t, l, s, alloc_entry[l].src[s].busy, eb,
                                       alloc_entry[l].src[s].cnt, ec);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
