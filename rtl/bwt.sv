// bwt: block way-number table of the way predictor.
//
// One entry per displaced cache block: the way the block now occupies in the
// cache and a saturating misprediction counter. Because the way number is kept
// per block rather than per instruction, a block that moves updates one entry
// and every instruction that reaches it through the access-prediction table
// sees the new way.
//
// Organisation: ENTRIES entries, WAYS-way set associative, indexed by the low
// block-address bits, with the remaining bits XOR-folded into a CTAG_W-bit
// compressed tag. Replacement: invalid way first, else a per-set round-robin
// pointer. Counters saturate at CTR_MAX, the inhibit threshold.
//
// Ports (lookups asynchronous, writes at the rising edge):
//   lk_*  prediction lookup: block address -> hit, way number.
//   fu_*  fill update: if the block has an entry its way number is rewritten;
//         if fu_alloc is set and it has none, an entry is allocated (counter 0).
//   fb_*  feedback: fb_op (fb_op_e) on the entry of fb_blk. CORRECT decrements,
//         WRONG increments, SATURATE sets the counter to CTR_MAX, PROBE changes
//         nothing. fb_hit says the entry exists, fb_sat that its counter is at
//         CTR_MAX after the operation.
//   clear_ctrs zeroes every counter (instruction-TLB miss or periodic clearing);
//         it takes priority over a feedback update in the same cycle.
// The controller never issues fu_en and fb_op on the same block in one cycle.
module bwt
  import ra_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned BLK_W   = 27,
  parameter int unsigned CTAG_W  = 8,
  parameter int unsigned CWAY_W  = 2,
  parameter int unsigned CTR_MAX = 3,
  parameter int unsigned CTR_W   = $clog2(CTR_MAX + 1),
  parameter int unsigned SETS    = ENTRIES / WAYS,
  parameter int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BLK_W-1:0]  lk_blk,
  output logic              lk_hit,
  output logic [CWAY_W-1:0] lk_way,
  input  logic              fu_en,
  input  logic [BLK_W-1:0]  fu_blk,
  input  logic [CWAY_W-1:0] fu_way,
  input  logic              fu_alloc,
  output logic              fu_hit,
  input  fb_op_e            fb_op,
  input  logic [BLK_W-1:0]  fb_blk,
  output logic              fb_hit,
  output logic              fb_sat,
  input  logic              clear_ctrs
);

  logic              valid [SETS][WAYS];
  logic [CTAG_W-1:0] ctag  [SETS][WAYS];
  logic [CWAY_W-1:0] cway  [SETS][WAYS];
  logic [CTR_W-1:0]  ctr   [SETS][WAYS];
  logic [WAY_W-1:0]  rr    [SETS];

  function automatic logic [SET_W-1:0] set_of(input logic [BLK_W-1:0] b);
    return b[SET_W-1:0];
  endfunction

  function automatic logic [CTAG_W-1:0] ctag_of(input logic [BLK_W-1:0] b);
    return CTAG_W'(fold16(64'(b >> SET_W)));
  endfunction

  // prediction lookup
  always_comb begin
    logic [SET_W-1:0] s;
    s = set_of(lk_blk);
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[s][w] && ctag[s][w] == ctag_of(lk_blk)) begin
        lk_hit = 1'b1;
        lk_way = cway[s][w];
      end
  end

  // fill update
  logic [SET_W-1:0] fs;
  logic [WAY_W-1:0] fw;
  always_comb begin
    logic have_free;
    logic [WAY_W-1:0] free_w, hit_w;
    fs = set_of(fu_blk);
    have_free = 1'b0;
    free_w = '0;
    hit_w = '0;
    fu_hit = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[fs][w]) begin have_free = 1'b1; free_w = WAY_W'(w); end
      if (valid[fs][w] && ctag[fs][w] == ctag_of(fu_blk)) begin fu_hit = 1'b1; hit_w = WAY_W'(w); end
    end
    fw = fu_hit ? hit_w : (have_free ? free_w : rr[fs]);
  end

  // feedback
  logic [SET_W-1:0] bs;
  logic [WAY_W-1:0] bw;
  logic [CTR_W-1:0] ctr_next;
  always_comb begin
    bs = set_of(fb_blk);
    bw = '0;
    fb_hit = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[bs][w] && ctag[bs][w] == ctag_of(fb_blk)) begin fb_hit = 1'b1; bw = WAY_W'(w); end
    ctr_next = ctr[bs][bw];
    unique case (fb_op)
      FB_CORRECT:  if (ctr_next != '0) ctr_next = ctr_next - 1'b1;
      FB_WRONG:    if (ctr_next != CTR_W'(CTR_MAX)) ctr_next = ctr_next + 1'b1;
      FB_SATURATE: ctr_next = CTR_W'(CTR_MAX);
      default: ;
    endcase
    fb_sat = fb_hit && (ctr_next == CTR_W'(CTR_MAX)) && (fb_op != FB_NONE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (fu_en && (fu_hit || fu_alloc)) begin
      valid[fs][fw] <= 1'b1;
      if (!fu_hit) rr[fs] <= WAY_W'(fw + 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (fu_en && (fu_hit || fu_alloc)) begin
      ctag[fs][fw] <= ctag_of(fu_blk);
      cway[fs][fw] <= fu_way;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear_ctrs) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) ctr[s][w] <= '0;
    end else begin
      if (fu_en && fu_alloc && !fu_hit) ctr[fs][fw] <= '0;
      if (fb_hit && fb_op inside {FB_CORRECT, FB_WRONG, FB_SATURATE}) ctr[bs][bw] <= ctr_next;
    end
  end

endmodule
