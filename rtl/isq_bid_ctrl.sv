// isq_bid_ctrl: chooses which of the two issue queues bids in a cycle.
//
// Only one queue may bid for the issue slots in a cycle. The replay queue has
// priority: it bids whenever it holds a ready entry, which happens only after
// a missed load's fill has woken its replayed dependants. That condition is
// `replay_req`, which also steers the source-tag multiplexer toward the
// register file. A queue whose cross-queue latch is being delivered
// (`*_pending`, see isq_xq_wake) cannot bid that cycle; when the replay queue
// is the one blocked, the main queue also holds off so that the replay queue
// wins the following cycle. All inputs come from registered state, so the
// decision is ready at the start of the cycle. Purely combinational.
// RIQ priority follows the source scheme; the blocking rule is this design's.
module isq_bid_ctrl (
  input  logic riq_any_ready,  // RIQ holds an entry ready to issue
  input  logic miq_pending,    // RIQ grants of last cycle are reaching the MIQ
  input  logic riq_pending,    // MIQ grants of last cycle are reaching the RIQ
  output logic replay_req,     // RIQ is the issuing queue
  output logic miq_bid_en,
  output logic riq_bid_en
);
  always_comb begin
    riq_bid_en = riq_any_ready && !riq_pending;
    miq_bid_en = !riq_any_ready && !miq_pending;
    replay_req = riq_bid_en;
  end
endmodule
