// ra_pkg: types shared by the reactive-associative cache and its way predictor.
//
// A reactive-associative (r-a) cache pairs a set-associative tag array with a
// single direct-mapped data array. Each access probes the data array once
// (probe0) at either the block's direct-mapped way or a predicted way. If the
// tags show the block in another way, one more data probe (probe1) follows.
// This package holds the probe-select encoding, the response kinds, the
// feedback operations sent to the block way-number table, the per-cycle event
// flags used for performance counting, and a tag-compression function.
package ra_pkg;

  // Select of the probe0 way# multiplexor: which way number indexes the data array.
  typedef enum logic [1:0] {
    SEL_P0_DM   = 2'd0,   // probe0 at the direct-mapped way
    SEL_P0_PRED = 2'd1,   // probe0 at the predicted (set-associative) way
    SEL_P1      = 2'd2    // probe1 at the way found by the tag compare
  } probe_sel_e;

  // How an access was served.
  typedef enum logic [1:0] {
    RESP_P0_HIT = 2'd0,   // hit on the first data probe (1 cycle)
    RESP_P1_HIT = 2'd1,   // hit after a second data probe (3 cycles)
    RESP_MISS   = 2'd2    // block fetched from the next level
  } resp_kind_e;

  // Operation on the misprediction counter of one block way-number table entry.
  typedef enum logic [2:0] {
    FB_NONE     = 3'd0,   // nothing
    FB_PROBE    = 3'd1,   // only report whether the entry is saturated
    FB_CORRECT  = 3'd2,   // way prediction was right: decrement
    FB_WRONG    = 3'd3,   // way prediction was wrong: increment
    FB_SATURATE = 3'd4    // inhibited instruction touched the block: saturate
  } fb_op_e;

  // Cache events, one flag per cycle each.
  typedef struct packed {
    logic p0_dm_hit;       // probe0 hit at the direct-mapped way
    logic p0_pred_hit;     // probe0 hit at a predicted way
    logic p1_hit;          // probe0 missed, probe1 hit
    logic miss;            // overall miss
    logic fill_dm;         // fill placed at the direct-mapped way
    logic fill_displaced;  // fill displaced to a set-associative way
    logic replace;         // a valid block was replaced by a fill
    logic inhibit_evict;   // inhibited access found its block displaced and evicted it
    logic wbuf_stall;      // request held back by a full write buffer
  } cache_events_t;

  // Way-predictor events, one flag per cycle each.
  typedef struct packed {
    logic pred_sa;         // a lookup produced a set-associative prediction
    logic apt_write;       // APT written with a displaced block address
    logic bwt_alloc;       // BWT entry allocated for a displaced fill
    logic bwt_way_update;  // BWT way number updated by a fill
    logic ctr_inc;         // misprediction counter incremented
    logic ctr_dec;         // misprediction counter decremented
    logic ctr_force_sat;   // counter saturated by an inhibited instruction
    logic inhibit_set;     // instruction marked unpredictable
    logic clear_inhibit;   // inhibit list cleared
    logic clear_ctrs;      // misprediction counters cleared
  } pred_events_t;

  // Tag compression: XOR-fold a value down to 16 bits; callers keep the low bits
  // they need. A cheap bit-wise function of the tag, as the tables need only a
  // compressed tag.
  function automatic logic [15:0] fold16(input logic [63:0] v);
    logic [15:0] r;
    r = v[15:0] ^ v[31:16] ^ v[47:32] ^ v[63:48];
    return r;
  endfunction

endpackage
