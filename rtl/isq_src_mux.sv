// isq_src_mux: source-tag multiplexer toward the register file.
//
// Each cycle either the main or the replay queue issues, never both. The
// multiplexer passes the issued instructions (their source tags and the
// fields the functional units need) of the queue selected by `replay_req`
// and registers them, so the multiplexer shares a cycle with the first
// pipeline latch between issue and execute instead of lengthening it.
// Latency: one clock edge. Reset clears the valid bits.
module isq_src_mux
  import isq_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                replay_req,
  input  issue_t [LANES-1:0]  miq_issue,
  input  issue_t [LANES-1:0]  riq_issue,
  output issue_t [LANES-1:0]  rf_issue
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rf_issue <= '0;
    else        rf_issue <= replay_req ? riq_issue : miq_issue;
  end

  // only the selected queue may have granted anything
  a_one_queue: assert property (@(posedge clk) disable iff (!rst_n)
    replay_req ? !(|{miq_issue[0].valid}) : !(|{riq_issue[0].valid}));
endmodule
