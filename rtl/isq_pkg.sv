// isq_pkg: types and constants shared by the dual issue queue scheduler.
//
// The dual issue queue splits the instruction scheduler of an out-of-order
// core into a main issue queue (MIQ) that holds instructions waiting to issue
// and a replay issue queue (RIQ) that holds instructions already issued but
// still exposed to a load-hit misprediction. Both queues use the same entry
// format, defined here.
//
// Sizes that come from the baseline machine: 8-wide issue, 256-entry reorder
// buffer (its index is the instruction tag), 64-entry load/store queue (its
// index names a speculative load), and the functional units 8 integer ALUs,
// 2 integer multiply/divide, 4 load/store, 8 FP add and 2 FP
// multiply/divide/sqrt units. Taking the units as fully pipelined, and the
// widths of the op field, the epoch and the latency field, are this design's
// own choices.
package isq_pkg;

  localparam int unsigned ROB_ENTRIES = 256;                 // reorder buffer size
  localparam int unsigned TAG_W       = $clog2(ROB_ENTRIES); // instruction tag = ROB index
  localparam int unsigned LSQ_ENTRIES = 64;                  // one speculation bit per LSQ slot
  localparam int unsigned LSQ_W       = $clog2(LSQ_ENTRIES);
  localparam int unsigned LAT_W       = 5;                   // latencies up to 31 (FP sqrt is 24)
  localparam int unsigned EPOCH_W     = 3;                   // issue generation, tells stale results apart
  localparam int unsigned OP_W        = 16;                  // opaque operation code for the FUs
  localparam int unsigned NSRC        = 2;                   // source operands per instruction

  // Functional-unit classes and how many units of each the machine has.
  typedef enum logic [2:0] {
    FU_IALU  = 3'd0,   // integer add/logic
    FU_IMUL  = 3'd1,   // integer multiply/divide
    FU_LDST  = 3'd2,   // load/store
    FU_FPADD = 3'd3,   // FP add
    FU_FPMUL = 3'd4    // FP multiply/divide/sqrt
  } fu_t;
  localparam int unsigned NFU_CLASS = 5;
  // units per class, indexed by fu_t: FU_UNITS[FU_LDST] = 4
  localparam logic [NFU_CLASS-1:0][3:0] FU_UNITS = {4'd2, 4'd8, 4'd4, 4'd2, 4'd8};

  typedef logic [TAG_W-1:0]       tag_t;
  typedef logic [LSQ_W-1:0]       lsq_t;
  typedef logic [LAT_W-1:0]       lat_t;
  typedef logic [EPOCH_W-1:0]     epoch_t;
  typedef logic [OP_W-1:0]        op_t;
  typedef logic [LSQ_ENTRIES-1:0] ldmask_t;   // set of unverified loads a value depends on

  // One source operand as held in a queue entry.
  typedef struct packed {
    logic    busy;   // waits for a producer that has not woken it yet
    tag_t    tag;    // producer tag
    lat_t    cnt;    // cycles until the producer's result may be consumed
    ldmask_t dep;    // unverified loads the producer's value depends on
  } src_t;

  // Renamed instruction as delivered by the rename stage.
  typedef struct packed {
    tag_t                 tag;
    op_t                  op;
    fu_t                  fu;       // functional-unit class
    lat_t                 lat;      // execution latency; loads: assumed L1 hit latency
    logic                 is_load;
    lsq_t                 lsq;      // load/store queue slot of a load
    logic [NSRC-1:0]      src_has;  // source has an in-flight producer
    tag_t [NSRC-1:0]      src_tag;
  } uop_t;

  // Issue queue entry.
  typedef struct packed {
    logic            valid;
    logic            issued;    // has been granted and not been replayed since
    logic            done;      // writeback of the current issue seen
    logic            own_pend;  // load whose hit/miss is not yet known
    logic            miss_wait; // load that missed, waits for its fill
    epoch_t          epoch;
    lat_t            res_cnt;   // cycles until its own result may be consumed
    tag_t            tag;
    op_t             op;
    fu_t             fu;
    lat_t            lat;
    logic            is_load;
    lsq_t            lsq;
    src_t [NSRC-1:0] src;
  } entry_t;

  // Result-tag broadcast lane (wakeup).
  typedef struct packed {
    logic    valid;
    tag_t    tag;
    lat_t    lat;    // dependants may issue this many cycles after the broadcast
    ldmask_t dep;    // unverified loads the result depends on
  } wake_t;

  // Issued instruction, toward register file and functional units.
  typedef struct packed {
    logic            valid;
    tag_t            tag;
    epoch_t          epoch;
    op_t             op;
    fu_t             fu;
    lat_t            lat;
    logic            is_load;
    lsq_t            lsq;
    tag_t [NSRC-1:0] src_tag;
  } issue_t;

  // Load hit/miss verification.
  typedef struct packed {
    logic   valid;
    tag_t   tag;
    epoch_t epoch;
    lsq_t   lsq;
    logic   hit;
  } verify_t;

  // Writeback, or miss fill, of one issued instruction.
  typedef struct packed {
    logic   valid;
    tag_t   tag;
    epoch_t epoch;
  } wb_t;

  // Producer state seen by dispatch.
  typedef struct packed {
    logic    found;   // producer is in this queue
    logic    issued;  // and has been granted (so it already broadcast its tag)
    lat_t    cnt;     // remaining cycles before its result can be consumed
    ldmask_t dep;     // its load dependences
  } lookup_t;

endpackage
