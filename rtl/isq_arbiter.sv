// isq_arbiter: multi-grant priority selector of an issue queue.
//
// Each cycle the entries that request raise their bit of `req`; the block
// grants up to `limit` of them (never more than LANES), lowest index first,
// and reports for every output lane the index it granted. Purely
// combinational. The queue uses it for the per-cycle selections other than
// issue: issued entries moving to the replay queue (`limit` = free replay
// entries), completed entries being released, and free slots for new
// entries. The issue select itself, which also counts functional units, is
// isq_class_arbiter. The fixed index priority is this design's choice.
module isq_arbiter #(
  parameter int unsigned N     = 48,   // bidders (queue entries)
  parameter int unsigned LANES = 8     // grants per cycle (issue width)
) (
  input  logic [N-1:0]                 req,
  input  logic [$clog2(LANES+1)-1:0]   limit,
  output logic [N-1:0]                 gnt,
  output logic [LANES-1:0]             lane_valid,
  output logic [LANES-1:0][$clog2(N)-1:0] lane_idx
);
  localparam int unsigned IW = $clog2(N);

  always_comb begin
    logic [N-1:0] left;
    left       = req;
    gnt        = '0;
    lane_valid = '0;
    lane_idx   = '0;
    for (int unsigned l = 0; l < LANES; l++) begin
      if (l < limit) begin
        for (int unsigned i = 0; i < N; i++) begin
          if (left[i] && !lane_valid[l]) begin
            lane_valid[l] = 1'b1;
            lane_idx[l]   = IW'(i);
          end
        end
        if (lane_valid[l]) begin
          left[lane_idx[l]] = 1'b0;
          gnt[lane_idx[l]]  = 1'b1;
        end
      end
    end
  end
endmodule
