// isq_delay_line: fixed-latency pipeline of DEPTH register stages.
//
// Models the stages a value crosses without being changed: the register file
// access and bus transfer between issue and execute (issue-to-execute latency,
// 1 to 9 cycles in the studied machine) and the wire that carries the cache's
// hit/miss signal back to the scheduler (feedback delay, also 1 to 9 cycles).
// `din` appears on `dout` exactly DEPTH clock edges later; DEPTH = 0 is a
// plain wire. Reset clears every stage to zero, so a packed type whose top or
// any field is a valid bit comes out invalid after reset.
module isq_delay_line #(
  parameter int unsigned DEPTH = 9,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_pipe
    logic [DEPTH-1:0][W-1:0] stage;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage <= '0;
      else begin
        stage[0] <= din;
        for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign dout = stage[DEPTH-1];
  end
endmodule
