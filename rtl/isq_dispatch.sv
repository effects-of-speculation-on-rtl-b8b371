// isq_dispatch: turns renamed instructions into main-issue-queue entries.
//
// For every source that names an in-flight producer (`src_has`), the producer
// tag is looked up in both queues. Found and already woken (granted, and not
// a load waiting for its miss fill): the source starts ready, with the
// producer's remaining latency and its load-dependence mask. Found but not
// woken: the source waits for the producer's result-tag broadcast. Not found:
// the producer has left the queues (written back and verified), so the
// source is ready. A producer earlier in the same dispatch group is always
// waited for. Combinational; the entries are written by the MIQ at the next
// edge, where they also see that cycle's broadcasts.
// The source scheme says only that dispatched instructions enter the MIQ;
// the lookup is this design's way of giving them their ready state.
module isq_dispatch
  import isq_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic    [W-1:0]           disp_valid,
  input  uop_t    [W-1:0]           disp_uop,
  output tag_t    [W*NSRC-1:0]      look_tag,
  input  lookup_t [W*NSRC-1:0]      miq_look,
  input  lookup_t [W*NSRC-1:0]      riq_look,
  output logic    [W-1:0]           alloc_valid,
  output entry_t  [W-1:0]           alloc_entry
);
  always_comb begin
    for (int l = 0; l < W; l++) begin
      entry_t e;
      e = '0;
      e.valid   = disp_valid[l];
      e.tag     = disp_uop[l].tag;
      e.op      = disp_uop[l].op;
      e.fu      = disp_uop[l].fu;
      e.lat     = disp_uop[l].lat;
      e.is_load = disp_uop[l].is_load;
      e.lsq     = disp_uop[l].lsq;
      for (int s = 0; s < NSRC; s++) begin
        lookup_t lk;
        logic    in_group;
        look_tag[l*NSRC+s] = disp_uop[l].src_tag[s];
        lk = miq_look[l*NSRC+s].found ? miq_look[l*NSRC+s] : riq_look[l*NSRC+s];
        in_group = 1'b0;
        for (int k = 0; k < l; k++)
          if (disp_valid[k] && disp_uop[k].tag == disp_uop[l].src_tag[s]) in_group = 1'b1;
        e.src[s].tag = disp_uop[l].src_tag[s];
        if (!disp_uop[l].src_has[s]) begin
          e.src[s].busy = 1'b0;
        end else if (in_group || (lk.found && !lk.issued)) begin
          e.src[s].busy = 1'b1;
        end else if (lk.found) begin
          e.src[s].busy = 1'b0;
          e.src[s].cnt  = (lk.cnt == '0) ? '0 : lk.cnt - lat_t'(1);
          e.src[s].dep  = lk.dep;
        end else begin
          e.src[s].busy = 1'b0;
        end
      end
      alloc_valid[l] = disp_valid[l];
      alloc_entry[l] = e;
    end
  end
endmodule
