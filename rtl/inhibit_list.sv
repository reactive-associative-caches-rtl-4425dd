// inhibit_list: one "unpredictable" bit per instruction.
//
// Indexed by the instruction PC (word-aligned instructions, so the two low PC
// bits are dropped, then the low $clog2(BITS) bits are used; different PCs may
// share a bit). An instruction whose bit is set always probes the direct-mapped
// way and never causes a block to be displaced. The bit is set when the
// feedback logic finds the instruction unpredictable. clear_all empties the
// whole list in one cycle; it is used on a data-TLB miss or by periodic clearing.
//
// Read is asynchronous. set_en and clear_all act at the rising edge; if both are
// asserted, the clear wins and the new bit is dropped. Synchronous active-low
// reset clears the list.
module inhibit_list #(
  parameter int unsigned BITS  = 2048,
  parameter int unsigned PC_W  = 32,
  parameter int unsigned IDX_W = (BITS > 1) ? $clog2(BITS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] rd_pc,
  output logic            rd_inhibit,
  input  logic            set_en,
  input  logic [PC_W-1:0] set_pc,
  input  logic            clear_all
);

  logic [BITS-1:0] bits_q;

  function automatic logic [IDX_W-1:0] index(input logic [PC_W-1:0] pc);
    return pc[2 +: IDX_W];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear_all) bits_q <= '0;
    else if (set_en)         bits_q[index(set_pc)] <= 1'b1;
  end

  assign rd_inhibit = bits_q[index(rd_pc)];

endmodule
