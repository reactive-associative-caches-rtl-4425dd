// tag_array: set-associative tag side of the reactive-associative cache.
//
// WAYS tag banks, each SETS entries deep, every entry a valid bit and the
// conventional set-associative tag. A read takes the set-associative index and
// reads all banks in parallel (asynchronous read, like the flop arrays it is
// built from); one comparator per bank checks the stored tag against cmp_tag and
// gives a match line per way. The stored tags and valid bits are also output so
// the controller can see which way is free and which block a fill replaces.
//
// One write port, applied at the rising clock edge: wr_en writes valid and tag
// of entry (wr_set, wr_way); writing wr_valid = 0 invalidates a block. Reset
// (active low, synchronous) clears every valid bit.
module tag_array #(
  parameter int unsigned SETS  = 64,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 21,
  parameter int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // read and compare
  input  logic [SET_W-1:0]           rd_set,
  input  logic [TAG_W-1:0]           cmp_tag,
  output logic [WAYS-1:0]            match,
  output logic [WAYS-1:0]            rd_valid,
  output logic [WAYS-1:0][TAG_W-1:0] rd_tag,
  // write
  input  logic                       wr_en,
  input  logic [SET_W-1:0]           wr_set,
  input  logic [WAY_W-1:0]           wr_way,
  input  logic                       wr_valid,
  input  logic [TAG_W-1:0]           wr_tag
);

  logic [TAG_W-1:0] tags  [WAYS][SETS];
  logic [SETS-1:0]  valid [WAYS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) valid[w] <= '0;
    end else if (wr_en) begin
      valid[wr_way][wr_set] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_way][wr_set] <= wr_tag;
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      rd_valid[w] = valid[w][rd_set];
      rd_tag[w]   = tags[w][rd_set];
      match[w]    = rd_valid[w] && (rd_tag[w] == cmp_tag);
    end
  end

endmodule
