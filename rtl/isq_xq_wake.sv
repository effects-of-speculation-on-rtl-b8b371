// isq_xq_wake: cross-queue delay latch and result-tag multiplexer of one queue.
//
// The two issue queues may sit far apart, so the result tags granted in one
// queue reach the other queue one cycle late, through a latch (the
// cross-queue delay). In front of each queue's ready-status update a 2:1
// multiplexer chooses between the queue's own grants of this cycle and the
// latched grants of the other queue. Its select is a register (the latch
// holds tags, that is, the other queue issued in the previous cycle), so the
// select is not on the bid/grant path. While the latch is selected the queue
// may not bid, since its own grants would have no path to its entries: the
// output `pending` tells the bid control so. This blocking rule is this
// design's own reading of how the multiplexer is shared.
//
// Latched tags whose value depends on a load that misses in the same cycle
// are dropped (their producer is being replayed), and bits of loads verified
// as hits are cleared, so a delayed tag carries the same speculation state as
// an undelayed one.
module isq_xq_wake
  import isq_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  wake_t [LANES-1:0]   own_wake,    // this queue's grants, this cycle
  input  wake_t [LANES-1:0]   other_wake,  // other queue's grants, this cycle
  input  ldmask_t             hit_mask,    // loads verified as hits this cycle
  input  ldmask_t             miss_mask,   // loads verified as misses this cycle
  output wake_t [LANES-1:0]   wake_sel,    // to the queue's ready-status update
  output logic                pending      // latch selected: queue must not bid
);
  wake_t [LANES-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= '0;
    else
      for (int l = 0; l < LANES; l++) begin
        held[l]     <= other_wake[l];
        held[l].dep <= other_wake[l].dep & ~hit_mask;
        if ((other_wake[l].dep & miss_mask) != '0) held[l].valid <= 1'b0;
      end
  end

  always_comb begin
    pending = 1'b0;
    for (int l = 0; l < LANES; l++) pending |= held[l].valid;
    wake_sel = pending ? held : own_wake;
  end
endmodule
