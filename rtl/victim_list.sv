// victim_list: finds blocks that keep conflicting in the cache (selective displacement).
//
// Each entry holds a block address and a saturating miss counter. Every time a
// valid block is replaced from the cache its entry is found or allocated and
// the counter is incremented, saturating at THRESH. When a block is filled, the
// list is looked up: a saturated counter marks the block as persistently
// conflicting, the fill goes to a set-associative way and the counter is reset.
// Blocks that have not conflicted repeatedly stay in their direct-mapped way.
//
// Organisation: ENTRIES entries, WAYS-way set associative (the list must be
// highly associative), set index from the low block-address bits, full
// remaining address bits as tag. Replacement: invalid way first, otherwise the
// way with the lowest counter (first such way on a tie).
//
// Ports: lk_blk -> lk_sat, asynchronous. inc_en/inc_blk and clr_en/clr_blk act
// at the rising edge; both may be used in one cycle on different blocks.
// Synchronous active-low reset empties the list.
module victim_list #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned WAYS    = 8,
  parameter int unsigned BLK_W   = 27,
  parameter int unsigned THRESH  = 5,
  parameter int unsigned CTR_W   = $clog2(THRESH + 1),
  parameter int unsigned SETS    = ENTRIES / WAYS,
  parameter int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned TAG_W   = BLK_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BLK_W-1:0] lk_blk,
  output logic             lk_sat,
  input  logic             inc_en,
  input  logic [BLK_W-1:0] inc_blk,
  input  logic             clr_en,
  input  logic [BLK_W-1:0] clr_blk
);

  logic             valid [SETS][WAYS];
  logic [TAG_W-1:0] tag   [SETS][WAYS];
  logic [CTR_W-1:0] ctr   [SETS][WAYS];

  function automatic logic [SET_W-1:0] set_of(input logic [BLK_W-1:0] b);
    return b[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [BLK_W-1:0] b);
    return b[BLK_W-1:SET_W];
  endfunction

  always_comb begin
    logic [SET_W-1:0] s;
    s = set_of(lk_blk);
    lk_sat = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[s][w] && tag[s][w] == tag_of(lk_blk) && ctr[s][w] == CTR_W'(THRESH)) lk_sat = 1'b1;
  end

  // increment: find or choose the way
  logic [SET_W-1:0] is;
  logic [WAY_W-1:0] iw;
  logic             i_found;
  always_comb begin
    logic [WAY_W-1:0] hit_w, low_w;
    logic [CTR_W:0]   low_c;
    is = set_of(inc_blk);
    i_found = 1'b0;
    hit_w = '0;
    low_w = '0;
    low_c = '1;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[is][w] && tag[is][w] == tag_of(inc_blk)) begin i_found = 1'b1; hit_w = WAY_W'(w); end
      if (!valid[is][w]) begin
        if (low_c != '0) begin low_c = '0; low_w = WAY_W'(w); end
      end else if ({1'b0, ctr[is][w]} + 1'b1 < low_c) begin
        low_c = {1'b0, ctr[is][w]} + 1'b1;
        low_w = WAY_W'(w);
      end
    end
    iw = i_found ? hit_w : low_w;
  end

  // clear: find the way
  logic [SET_W-1:0] cs;
  logic [WAY_W-1:0] cw;
  logic             c_found;
  always_comb begin
    cs = set_of(clr_blk);
    cw = '0;
    c_found = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[cs][w] && tag[cs][w] == tag_of(clr_blk)) begin c_found = 1'b1; cw = WAY_W'(w); end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
    end else if (inc_en) begin
      valid[is][iw] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (clr_en && c_found) ctr[cs][cw] <= '0;
    if (inc_en) begin
      tag[is][iw] <= tag_of(inc_blk);
      if (!i_found)                          ctr[is][iw] <= CTR_W'(1);
      else if (ctr[is][iw] != CTR_W'(THRESH)) ctr[is][iw] <= ctr[is][iw] + 1'b1;
    end
  end

endmodule
