// l2_model: behavioural model of the next cache level, for testbenches only.
//
// Serves block reads after LATENCY cycles (one response cycle carrying the whole
// block, in request order) and applies word writes when accepted. Memory starts
// with a known pattern: the 64-bit word at word address a (byte address / 8) is
// {a ^ 32'h5a5a_0000, ~a} on its low 32 address bits, so any word can be
// predicted without storing it. Written words are kept in an associative array.
// With RANDOM_READY set, l2_req_ready is dropped at random to exercise the
// requester's back-pressure handling. Not synthesizable.
module l2_model #(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned WORD_W       = 64,
  parameter int unsigned BLOCK_W      = 256,
  parameter int unsigned LATENCY      = 12,
  parameter bit          RANDOM_READY = 1'b0
) (
  input  logic               clk,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_write,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic [WORD_W-1:0]  req_wdata,
  output logic               resp_valid,
  output logic [BLOCK_W-1:0] resp_data,
  output int                 reads,
  output int                 writes
);
  localparam int unsigned WORDS = BLOCK_W / WORD_W;
  localparam int unsigned WB    = $clog2(WORD_W / 8);

  logic [WORD_W-1:0] written [logic [ADDR_W-1:0]];

  typedef struct { longint due; logic [ADDR_W-1:0] addr; } pend_t;
  pend_t queue [$];
  longint cycle = 0;

  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] wa);
    logic [31:0] a;
    a = 32'(wa);
    return WORD_W'({a ^ 32'h5a5a_0000, ~a});
  endfunction

  function automatic logic [WORD_W-1:0] word_at(input logic [ADDR_W-1:0] wa);
    if (written.exists(wa)) return written[wa];
    return init_word(wa);
  endfunction

  initial begin
    req_ready = 1'b1;
    resp_valid = 1'b0;
    resp_data = '0;
    reads = 0;
    writes = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (req_valid && req_ready) begin
      if (req_write) begin
        written[req_addr >> WB] = req_wdata;
        writes <= writes + 1;
      end else begin
        queue.push_back('{due: cycle + LATENCY, addr: req_addr});
        reads <= reads + 1;
      end
    end
    resp_valid <= 1'b0;
    if (queue.size() > 0 && queue[0].due <= cycle) begin
      pend_t p;
      p = queue.pop_front();
      for (int i = 0; i < WORDS; i++)
        resp_data[i*WORD_W +: WORD_W] <= word_at((p.addr >> WB) + ADDR_W'(i));
      resp_valid <= 1'b1;
    end
    req_ready <= RANDOM_READY ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule
