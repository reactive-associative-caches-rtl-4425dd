// tb_bwt: directed test of the block way-number table (defaults: 128 entries,
// 4 ways, inhibit threshold 3). Checks: a lookup misses before allocation; a
// displaced fill allocates an entry with its way; a direct-mapped fill only
// updates an existing entry and never allocates; wrong predictions raise the
// counter to saturation at exactly the third one (fb_sat), correct predictions
// lower it; FB_SATURATE saturates at once; clear_ctrs zeroes the counters;
// filling five blocks of one BWT set replaces round robin.
module tb_bwt;
  import ra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [26:0] lk_blk, fu_blk, fb_blk;
  logic        lk_hit, fu_en, fu_alloc, fu_hit, fb_hit, fb_sat, clear_ctrs;
  logic [1:0]  lk_way, fu_way;
  fb_op_e      fb_op;

  bwt dut (.clk, .rst_n, .lk_blk, .lk_hit, .lk_way, .fu_en, .fu_blk, .fu_way, .fu_alloc, .fu_hit,
           .fb_op, .fb_blk, .fb_hit, .fb_sat, .clear_ctrs);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lk(input logic [26:0] b, input logic h, input logic [1:0] w, input string what);
    lk_blk = b;
    #1;
    checks++;
    if (lk_hit !== h || (h && lk_way !== w)) begin
      failures++;
      $display("FAIL %s: blk=%h hit=%b way=%0d (exp %b %0d)", what, b, lk_hit, lk_way, h, w);
    end
  endtask

  task automatic fill(input logic [26:0] b, input logic [1:0] w, input logic alloc);
    @(negedge clk);
    fu_en = 1; fu_blk = b; fu_way = w; fu_alloc = alloc;
    @(negedge clk);
    fu_en = 0;
  endtask

  // apply one feedback op; return fb_sat seen during it
  task automatic fb(input logic [26:0] b, input fb_op_e op, output logic sat);
    @(negedge clk);
    fb_op = op; fb_blk = b;
    #1;
    sat = fb_sat;
    @(negedge clk);
    fb_op = FB_NONE;
  endtask

  logic s;
  logic [26:0] A, B;
  initial begin
    fu_en = 0; fu_alloc = 0; fu_blk = 0; fu_way = 0; fb_op = FB_NONE; fb_blk = 0; lk_blk = 0; clear_ctrs = 0;
    A = (27'h1234 << 5) | 27'h3;
    B = 27'h0abcd_0 | 27'h7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_lk(A, 0, 0, "empty");
    fill(A, 2'd2, 1'b0);
    expect_lk(A, 0, 0, "d-m fill must not allocate");
    fill(A, 2'd2, 1'b1);
    expect_lk(A, 1, 2'd2, "displaced fill allocates");
    fill(A, 2'd1, 1'b0);
    expect_lk(A, 1, 2'd1, "d-m fill updates way of existing entry");
    // counter: three wrong predictions saturate at the third
    fb(A, FB_WRONG, s);   checks++; if (s) begin failures++; $display("FAIL sat after 1"); end
    fb(A, FB_WRONG, s);   checks++; if (s) begin failures++; $display("FAIL sat after 2"); end
    fb(A, FB_WRONG, s);   checks++; if (!s) begin failures++; $display("FAIL no sat after 3"); end
    fb(A, FB_WRONG, s);   checks++; if (!s) begin failures++; $display("FAIL sat lost"); end
    fb(A, FB_CORRECT, s); checks++; if (s) begin failures++; $display("FAIL dec did not leave sat"); end
    fb(A, FB_PROBE, s);   checks++; if (s) begin failures++; $display("FAIL probe sat"); end
    fb(A, FB_WRONG, s);   checks++; if (!s) begin failures++; $display("FAIL re-sat"); end
    // clear
    @(negedge clk); clear_ctrs = 1; @(negedge clk); clear_ctrs = 0;
    fb(A, FB_PROBE, s);   checks++; if (s) begin failures++; $display("FAIL clear"); end
    fb(A, FB_SATURATE, s); checks++; if (!s) begin failures++; $display("FAIL force sat"); end
    fb(A, FB_PROBE, s);   checks++; if (!s) begin failures++; $display("FAIL force sat kept"); end
    // feedback on a block with no entry
    fb(B, FB_WRONG, s);   checks++; if (s || fb_hit) begin failures++; $display("FAIL fb on absent block"); end
    // round-robin replacement in one BWT set (same low 5 bits)
    for (int i = 0; i < 5; i++) fill(27'((i + 1) << 5) | 27'h3, 2'(i), 1'b1);
    // A and the five new blocks share a set. A sits in table way 0; the first three new blocks
    // take the free ways 1..3, the fourth replaces way 0 (A), the fifth way 1 (first new block).
    expect_lk(A, 0, 0, "A replaced");
    expect_lk(27'(1 << 5) | 27'h3, 0, 0, "first new block replaced");
    expect_lk(27'(2 << 5) | 27'h3, 1, 2'd1, "second new block kept");
    expect_lk(27'(5 << 5) | 27'h3, 1, 2'd0, "fifth new block present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
