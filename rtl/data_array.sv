// data_array: the single direct-mapped data array of the reactive-associative cache.
//
// The array holds SETS*WAYS cache blocks. It can be pictured as the WAYS data
// banks of a set-associative cache placed one below the other: row = way*SETS +
// set, so the blocks of one set lie at a stride of SETS rows. A probe supplies
// the set-associative index and a way number (from the probe0 way# mux) and
// reads one whole block; there is no way multiplexor at the output.
//
// Read is asynchronous (combinational from rd_way/rd_set). Write happens at the
// rising clock edge into row (wr_way, wr_set), one enable bit per WORD_W-bit
// word so a fill writes the whole block and a store writes one word. Contents
// are not reset: a block is only read after a fill has written it.
module data_array #(
  parameter int unsigned SETS    = 64,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned BLOCK_W = 256,
  parameter int unsigned WORD_W  = 64,
  parameter int unsigned WORDS   = BLOCK_W / WORD_W,
  parameter int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic               clk,
  input  logic [WAY_W-1:0]   rd_way,
  input  logic [SET_W-1:0]   rd_set,
  output logic [BLOCK_W-1:0] rd_data,
  input  logic               wr_en,
  input  logic [WAY_W-1:0]   wr_way,
  input  logic [SET_W-1:0]   wr_set,
  input  logic [WORDS-1:0]   wr_word_en,
  input  logic [BLOCK_W-1:0] wr_data
);

  localparam int unsigned ROWS = SETS * WAYS;
  localparam int unsigned ROW_W = WAY_W + SET_W;

  logic [BLOCK_W-1:0] mem [ROWS];

  logic [ROW_W-1:0] rd_row, wr_row;
  assign rd_row = {rd_way, rd_set};
  assign wr_row = {wr_way, wr_set};

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < WORDS; i++)
        if (wr_word_en[i]) mem[wr_row][i*WORD_W +: WORD_W] <= wr_data[i*WORD_W +: WORD_W];
    end
  end

  assign rd_data = mem[rd_row];

endmodule
