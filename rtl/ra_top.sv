// ra_top: reactive-associative L1 data cache with its PC-based way predictor.
//
// Two parts that work at different pipeline stages:
//   way_predictor  looked up with the instruction PC in the front end; two
//                  cycles later it delivers the way prediction (pred_*), which
//                  the processor carries with the load or store.
//   ra_cache       takes the memory request together with that prediction,
//                  makes one data probe (probe0) at the direct-mapped or the
//                  predicted way, a second probe (probe1) only if the tags show
//                  the block in another way, and fetches from L2 on a miss.
// The cache reports every access and every fill back to the predictor, which
// keeps its tables and its misprediction feedback up to date from them.
// dtlb_miss and itlb_miss clear the inhibit list and the misprediction
// counters respectively.
//
// Ports are those of the two parts; see ra_cache and way_predictor for their
// timing. The way-prediction inputs of the request (req_pred_*) must be the
// pred_* values looked up for req_pc (or all zero for a direct-mapped access).
module ra_top
  import ra_pkg::*;
#(
  parameter int unsigned ADDR_W         = 32,
  parameter int unsigned PC_W           = 32,
  parameter int unsigned CACHE_BYTES    = 8192,
  parameter int unsigned BLOCK_BYTES    = 32,
  parameter int unsigned WAYS           = 4,
  parameter int unsigned WORD_W         = 64,
  parameter int unsigned VL_ENTRIES     = 256,
  parameter int unsigned VL_WAYS        = 8,
  parameter int unsigned VICTIM_THRESH  = 5,
  parameter int unsigned APT_ENTRIES    = 128,
  parameter int unsigned APT_WAYS       = 4,
  parameter int unsigned BWT_ENTRIES    = 128,
  parameter int unsigned BWT_WAYS       = 4,
  parameter int unsigned CTAG_W         = 8,
  parameter int unsigned INHIBIT_BITS   = 2048,
  parameter int unsigned INHIBIT_THRESH = 3,
  parameter int unsigned CLEAR_INTERVAL = 0,
  // derived
  parameter int unsigned OFF_W   = $clog2(BLOCK_BYTES),
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned BLK_W   = ADDR_W - OFF_W,
  parameter int unsigned BLOCK_W = BLOCK_BYTES * 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // front-end way-prediction lookup
  input  logic               lk_valid,
  input  logic [PC_W-1:0]    lk_pc,
  output logic               pred_valid,
  output logic [PC_W-1:0]    pred_pc,
  output logic               pred_sa,
  output logic [WAY_W-1:0]   pred_way,
  output logic [BLK_W-1:0]   pred_blk,
  output logic               pred_inhibit,
  // memory request with its prediction
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [PC_W-1:0]    req_pc,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic               req_store,
  input  logic [WORD_W-1:0]  req_wdata,
  input  logic               req_pred_sa,
  input  logic [WAY_W-1:0]   req_pred_way,
  input  logic [BLK_W-1:0]   req_pred_blk,
  input  logic               req_inhibit,
  output logic               resp_valid,
  output resp_kind_e         resp_kind,
  output logic [WORD_W-1:0]  resp_rdata,
  // L2
  output logic               l2_req_valid,
  input  logic               l2_req_ready,
  output logic               l2_req_write,
  output logic [ADDR_W-1:0]  l2_req_addr,
  output logic [WORD_W-1:0]  l2_req_wdata,
  input  logic               l2_resp_valid,
  input  logic [BLOCK_W-1:0] l2_resp_data,
  // program-phase hints
  input  logic               dtlb_miss,
  input  logic               itlb_miss,
  // event flags for performance counters
  output cache_events_t      cache_events,
  output pred_events_t       pred_events
);

  logic              acc_valid, acc_displaced, acc_pred_sa, acc_p0_hit, acc_hit, acc_inhibit;
  logic [PC_W-1:0]   acc_pc;
  logic [BLK_W-1:0]  acc_blk, acc_pred_blk;
  logic              fill_valid, fill_displaced;
  logic [BLK_W-1:0]  fill_blk;
  logic [WAY_W-1:0]  fill_way;

  way_predictor #(
    .PC_W(PC_W), .BLK_W(BLK_W), .CWAY_W(WAY_W),
    .APT_ENTRIES(APT_ENTRIES), .APT_WAYS(APT_WAYS),
    .BWT_ENTRIES(BWT_ENTRIES), .BWT_WAYS(BWT_WAYS), .CTAG_W(CTAG_W),
    .INHIBIT_BITS(INHIBIT_BITS), .INHIBIT_THRESH(INHIBIT_THRESH),
    .CLEAR_INTERVAL(CLEAR_INTERVAL)
  ) u_pred (
    .clk, .rst_n,
    .lk_valid, .lk_pc,
    .pred_valid, .pred_pc, .pred_sa, .pred_way, .pred_blk, .pred_inhibit,
    .acc_valid, .acc_pc, .acc_blk, .acc_displaced, .acc_pred_sa, .acc_pred_blk,
    .acc_p0_hit, .acc_hit, .acc_inhibit,
    .fill_valid, .fill_blk, .fill_way, .fill_displaced,
    .dtlb_miss, .itlb_miss,
    .events(pred_events)
  );

  ra_cache #(
    .ADDR_W(ADDR_W), .PC_W(PC_W), .CACHE_BYTES(CACHE_BYTES), .BLOCK_BYTES(BLOCK_BYTES),
    .WAYS(WAYS), .WORD_W(WORD_W), .VL_ENTRIES(VL_ENTRIES), .VL_WAYS(VL_WAYS),
    .VICTIM_THRESH(VICTIM_THRESH)
  ) u_cache (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_pc, .req_addr, .req_store, .req_wdata,
    .req_pred_sa, .req_pred_way, .req_pred_blk, .req_inhibit,
    .resp_valid, .resp_kind, .resp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_write, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_data,
    .acc_valid, .acc_pc, .acc_blk, .acc_displaced, .acc_pred_sa, .acc_pred_blk,
    .acc_p0_hit, .acc_hit, .acc_inhibit,
    .fill_valid, .fill_blk, .fill_way, .fill_displaced,
    .events(cache_events)
  );

endmodule
