// isq_class_arbiter: issue select that respects functional-unit counts.
//
// Grants up to LANES bidding entries per cycle, lowest index first, but no
// more entries of one functional-unit class than that class has units
// (FU_UNITS in isq_pkg: 8 integer ALUs, 2 integer multiply/divide, 4
// load/store, 8 FP add, 2 FP multiply/divide/sqrt). Units are taken as fully
// pipelined, so the counts are per cycle. A bidder that finds its class used
// up is skipped and lower-priority bidders of other classes may still issue.
// Purely combinational; it sits in the single-cycle bid/grant loop.
// The unit counts come from the studied machine; the index priority and the
// pipelined-unit assumption are this design's.
module isq_class_arbiter
  import isq_pkg::*;
#(
  parameter int unsigned N     = 48,
  parameter int unsigned LANES = 8
) (
  input  logic [N-1:0]                     req,
  input  fu_t  [N-1:0]                     cls,
  output logic [N-1:0]                     gnt,
  output logic [LANES-1:0]                 lane_valid,
  output logic [LANES-1:0][$clog2(N)-1:0]  lane_idx
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned LW = $clog2(LANES + 1);

  always_comb begin
    logic [NFU_CLASS-1:0][3:0] used;
    logic [LW-1:0] lane;
    used       = '0;
    lane       = '0;
    gnt        = '0;
    lane_valid = '0;
    lane_idx   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (req[i] && lane < LW'(LANES) && int'(cls[i]) < NFU_CLASS &&
          used[cls[i]] < FU_UNITS[cls[i]]) begin
        gnt[i]                = 1'b1;
        lane_valid[lane[$clog2(LANES)-1:0]] = 1'b1;
        lane_idx[lane[$clog2(LANES)-1:0]]   = IW'(i);
        used[cls[i]]          = used[cls[i]] + 4'd1;
        lane                  = lane + LW'(1);
      end
    end
  end
endmodule
