// tb_apt: self-checking test of the access-prediction table (128 entries, 4
// ways, 32 sets, 8-bit compressed tags). A reference model built from the same
// rules (set = PC[6:2], tag = XOR-fold of PC[31:7] to 8 bits, invalid way first,
// then per-set round robin) is updated alongside the table, and lookups of random
// PCs must agree in hit and block address. PCs are drawn from a small pool so
// that hits, updates of existing entries and replacements all occur.
module tb_apt;
  import ra_pkg::*;
  int checks = 0, failures = 0, hits = 0, replacements = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] lk_pc, upd_pc;
  logic        lk_hit, upd_en, upd_alloc;
  logic [26:0] lk_blk, upd_blk;

  apt dut (.clk, .rst_n, .lk_pc, .lk_hit, .lk_blk, .upd_en, .upd_alloc, .upd_pc, .upd_blk);

  logic       m_v [32][4];
  logic [7:0] m_t [32][4];
  logic [26:0] m_b [32][4];
  logic [1:0] m_rr [32];
  logic [31:0] pool [64];

  function automatic logic [7:0] ct(input logic [31:0] pc);
    logic [63:0] t;
    t = 64'(pc >> 7);
    return 8'(t[15:0] ^ t[31:16]);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_update(input logic [31:0] pc, input logic [26:0] b, input logic alloc);
    int s, w;
    s = pc[6:2];
    w = -1;
    for (int i = 0; i < 4; i++) if (m_v[s][i] && m_t[s][i] == ct(pc)) w = i;
    if (w < 0 && !alloc) return;
    if (w < 0) begin
      for (int i = 3; i >= 0; i--) if (!m_v[s][i]) w = i;
      if (w < 0) begin w = m_rr[s]; replacements++; end
      m_rr[s] = 2'(w + 1);
    end
    m_v[s][w] = 1; m_t[s][w] = ct(pc); m_b[s][w] = b;
  endtask

  task automatic check(input logic [31:0] pc);
    int s;
    logic eh;
    logic [26:0] eb;
    s = pc[6:2];
    eh = 0; eb = 0;
    for (int i = 0; i < 4; i++) if (m_v[s][i] && m_t[s][i] == ct(pc)) begin eh = 1; eb = m_b[s][i]; end
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit !== eh || (eh && lk_blk !== eb)) begin
      failures++;
      $display("FAIL pc=%h hit=%b exp=%b blk=%h exp=%h", pc, lk_hit, eh, lk_blk, eb);
    end
    if (eh) hits++;
  endtask

  initial begin
    upd_en = 0; upd_alloc = 0; upd_pc = 0; upd_blk = 0; lk_pc = 0;
    for (int s = 0; s < 32; s++) begin m_rr[s] = 0; for (int i = 0; i < 4; i++) begin m_v[s][i] = 0; m_t[s][i] = 0; m_b[s][i] = 0; end end
    for (int i = 0; i < 64; i++) pool[i] = 32'h0040_0000 | (32'($urandom_range(0, 15)) << 7) | (32'($urandom_range(0, 3)) << 2);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pool[0]);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      upd_en = 1; upd_alloc = ($urandom_range(0, 2) != 0); upd_pc = pool[$urandom_range(0, 63)]; upd_blk = 27'($urandom);
      @(posedge clk);
      model_update(upd_pc, upd_blk, upd_alloc);
      @(negedge clk);
      upd_en = 0;
      check(pool[$urandom_range(0, 63)]);
    end
    checks++;
    if (hits < 100 || replacements < 10) begin failures++; $display("FAIL too few hits (%0d) or replacements (%0d)", hits, replacements); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
