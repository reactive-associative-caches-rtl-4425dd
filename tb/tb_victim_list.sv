// tb_victim_list: directed and random test of the victim list (256 entries,
// 8 ways, threshold 5). A block must read saturated only after five
// replacements, stay saturated after more, and read unsaturated after a clear.
// A random phase compares lk_sat with a reference model that uses the same
// allocation rule (invalid way first, else the way with the lowest counter).
module tb_victim_list;
  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [26:0] lk_blk, inc_blk, clr_blk;
  logic        lk_sat, inc_en, clr_en;

  victim_list dut (.clk, .rst_n, .lk_blk, .lk_sat, .inc_en, .inc_blk, .clr_en, .clr_blk);

  logic        m_v [32][8];
  logic [21:0] m_t [32][8];
  int          m_c [32][8];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic m_inc(input logic [26:0] b);
    int s, w, lc;
    s = b[4:0]; w = -1;
    for (int i = 0; i < 8; i++) if (m_v[s][i] && m_t[s][i] == b[26:5]) w = i;
    if (w >= 0) begin
      if (m_c[s][w] < 5) m_c[s][w]++;
    end else begin
      lc = 100;
      for (int i = 0; i < 8; i++) begin
        if (!m_v[s][i]) begin if (lc != 0) begin lc = 0; w = i; end end
        else if (m_c[s][i] + 1 < lc) begin lc = m_c[s][i] + 1; w = i; end
      end
      m_v[s][w] = 1; m_t[s][w] = b[26:5]; m_c[s][w] = 1;
    end
  endtask

  task automatic m_clr(input logic [26:0] b);
    int s;
    s = b[4:0];
    for (int i = 0; i < 8; i++) if (m_v[s][i] && m_t[s][i] == b[26:5]) m_c[s][i] = 0;
  endtask

  function automatic logic m_sat(input logic [26:0] b);
    int s;
    s = b[4:0];
    for (int i = 0; i < 8; i++) if (m_v[s][i] && m_t[s][i] == b[26:5] && m_c[s][i] == 5) return 1;
    return 0;
  endfunction

  task automatic step(input logic ie, input logic [26:0] ib, input logic ce, input logic [26:0] cb);
    @(negedge clk);
    inc_en = ie; inc_blk = ib; clr_en = ce; clr_blk = cb;
    @(posedge clk);
    if (ie) m_inc(ib);
    if (ce) m_clr(cb);
    @(negedge clk);
    inc_en = 0; clr_en = 0;
  endtask

  task automatic check(input logic [26:0] b);
    lk_blk = b;
    #1;
    checks++;
    if (lk_sat !== m_sat(b)) begin failures++; $display("FAIL blk=%h sat=%b exp=%b", b, lk_sat, m_sat(b)); end
    if (lk_sat) sat_seen++;
  endtask

  logic [26:0] X;
  initial begin
    inc_en = 0; clr_en = 0; inc_blk = 0; clr_blk = 0; lk_blk = 0;
    for (int s = 0; s < 32; s++) for (int i = 0; i < 8; i++) begin m_v[s][i] = 0; m_t[s][i] = 0; m_c[s][i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    X = 27'h155_5555;
    for (int i = 1; i <= 7; i++) begin
      step(1, X, 0, 0);
      lk_blk = X; #1;
      checks++;
      if (lk_sat !== (i >= 5)) begin failures++; $display("FAIL after %0d replacements sat=%b", i, lk_sat); end
    end
    step(0, 0, 1, X);
    lk_blk = X; #1;
    checks++;
    if (lk_sat !== 1'b0) begin failures++; $display("FAIL clear"); end
    // random phase: a few blocks per set so entries get reused and replaced
    for (int i = 0; i < 20000; i++) begin
      logic [26:0] a, b;
      a = {22'($urandom_range(0, 11)), 5'($urandom_range(0, 3))};
      b = {22'($urandom_range(0, 11)), 5'($urandom_range(0, 3))};
      if (a == b) b = b ^ 27'h20;
      step($urandom_range(0, 3) != 0, a, $urandom_range(0, 7) == 0, b);
      check({22'($urandom_range(0, 11)), 5'($urandom_range(0, 3))});
    end
    checks++;
    if (sat_seen < 50) begin failures++; $display("FAIL saturation rarely seen (%0d)", sat_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
