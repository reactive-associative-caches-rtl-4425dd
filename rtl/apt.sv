// apt: access-prediction table of the PC-based way predictor.
//
// Maps the PC of a memory instruction to the address of the cache block that
// instruction last touched in a displaced (set-associative) position. This is
// the first level of the two-level lookup; the block address then indexes the
// block way-number table. Several entries may hold the same block address.
//
// Organisation: ENTRIES entries, WAYS-way set associative. The set index is taken
// from PC bits above the two instruction-alignment bits; the tag is a compressed
// tag, the remaining PC bits XOR-folded to CTAG_W bits, so two PCs may alias.
// Replacement takes an invalid way first, otherwise a per-set round-robin
// pointer.
//
// Lookup is asynchronous: lk_pc -> lk_hit, lk_blk. An update (upd_en) writes
// upd_blk for upd_pc at the rising edge into the matching entry if there is
// one; if there is none, an entry is allocated only when upd_alloc is set.
// Synchronous active-low reset empties it.
module apt
  import ra_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned BLK_W   = 27,
  parameter int unsigned CTAG_W  = 8,
  parameter int unsigned SETS    = ENTRIES / WAYS,
  parameter int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PC_W-1:0]  lk_pc,
  output logic             lk_hit,
  output logic [BLK_W-1:0] lk_blk,
  input  logic             upd_en,
  input  logic             upd_alloc,
  input  logic [PC_W-1:0]  upd_pc,
  input  logic [BLK_W-1:0] upd_blk
);

  logic              valid [SETS][WAYS];
  logic [CTAG_W-1:0] ctag  [SETS][WAYS];
  logic [BLK_W-1:0]  blk   [SETS][WAYS];
  logic [WAY_W-1:0]  rr    [SETS];

  function automatic logic [SET_W-1:0] set_of(input logic [PC_W-1:0] pc);
    return pc[2 +: SET_W];
  endfunction

  function automatic logic [CTAG_W-1:0] ctag_of(input logic [PC_W-1:0] pc);
    logic [63:0] t;
    t = 64'(pc >> (2 + SET_W));
    return CTAG_W'(fold16(t));
  endfunction

  // lookup
  always_comb begin
    logic [SET_W-1:0]  s;
    logic [CTAG_W-1:0] t;
    s = set_of(lk_pc);
    t = ctag_of(lk_pc);
    lk_hit = 1'b0;
    lk_blk = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[s][w] && ctag[s][w] == t) begin
        lk_hit = 1'b1;
        lk_blk = blk[s][w];
      end
  end

  // update: way to write
  logic [SET_W-1:0]  us;
  logic [CTAG_W-1:0] ut;
  logic [WAY_W-1:0]  uw;
  logic              u_found;

  always_comb begin
    logic have_free;
    logic [WAY_W-1:0] free_w, hit_w;
    us = set_of(upd_pc);
    ut = ctag_of(upd_pc);
    have_free = 1'b0;
    free_w = '0;
    hit_w = '0;
    u_found = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[us][w]) begin have_free = 1'b1; free_w = WAY_W'(w); end
      if (valid[us][w] && ctag[us][w] == ut) begin u_found = 1'b1; hit_w = WAY_W'(w); end
    end
    uw = u_found ? hit_w : (have_free ? free_w : rr[us]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (upd_en && (u_found || upd_alloc)) begin
      valid[us][uw] <= 1'b1;
      if (!u_found) rr[us] <= WAY_W'(uw + 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en && (u_found || upd_alloc)) begin
      ctag[us][uw] <= ut;
      blk[us][uw]  <= upd_blk;
    end
  end

endmodule
