// tb_ra_cache: self-checking test of the reactive-associative cache controller
// at its default size (8 KB, 32-byte blocks, 4 ways, victim threshold 5), with
// way predictions driven directly by the testbench and an L2 model of 12-cycle
// latency that refuses requests at random.
//
// Directed part (addresses A and A2 share a direct-mapped line, set 2, d-m way 0):
//   - alternating misses of A and A2: every fill goes to the d-m way until A has
//     been replaced five times; the next fill of A is displaced to way 1;
//   - A with a d-m prediction: probe0 miss, probe1 hit, 3 cycles;
//   - A with predicted way 1: probe0 hit, 1 cycle; with a wrong way: probe1 hit;
//   - A by an inhibited instruction: the displaced copy is evicted and A is
//     refilled at its d-m way; A2 is then displaced in turn.
// Random part: loads and stores to a small pool of conflicting addresses with
// random predictions and occasional inhibited accesses. Every load is checked
// against a reference memory (a store's response carries no data); probe0 hits must take 1 cycle, probe1 load hits
// 3 cycles, misses at least 13.
module tb_ra_cache;
  import ra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req_valid, req_ready, req_store, req_pred_sa, req_inhibit;
  logic [31:0]  req_pc, req_addr;
  logic [63:0]  req_wdata, resp_rdata;
  logic [1:0]   req_pred_way;
  logic [26:0]  req_pred_blk;
  logic         resp_valid;
  resp_kind_e   resp_kind;
  logic         l2_req_valid, l2_req_ready, l2_req_write, l2_resp_valid;
  logic [31:0]  l2_req_addr;
  logic [63:0]  l2_req_wdata;
  logic [255:0] l2_resp_data;
  logic         acc_valid, acc_displaced, acc_pred_sa, acc_p0_hit, acc_hit, acc_inhibit;
  logic [31:0]  acc_pc;
  logic [26:0]  acc_blk, acc_pred_blk, fill_blk;
  logic         fill_valid, fill_displaced;
  logic [1:0]   fill_way;
  cache_events_t events;
  int l2_reads, l2_writes;

  ra_cache dut (.*);

  l2_model #(.RANDOM_READY(1'b1)) u_l2 (
    .clk, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_write(l2_req_write),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata), .resp_valid(l2_resp_valid),
    .resp_data(l2_resp_data), .reads(l2_reads), .writes(l2_writes)
  );

  // reference memory
  logic [63:0] ref_mem [logic [28:0]];
  function automatic logic [63:0] ref_word(input logic [31:0] addr);
    logic [31:0] a;
    a = addr >> 3;
    if (ref_mem.exists(a[28:0])) return ref_mem[a[28:0]];
    return {a ^ 32'h5a5a_0000, ~a};
  endfunction

  // event counters
  int n_ev [9];
  always @(posedge clk) begin
    if (events.p0_dm_hit) n_ev[0]++;
    if (events.p0_pred_hit) n_ev[1]++;
    if (events.p1_hit) n_ev[2]++;
    if (events.miss) n_ev[3]++;
    if (events.fill_dm) n_ev[4]++;
    if (events.fill_displaced) n_ev[5]++;
    if (events.replace) n_ev[6]++;
    if (events.inhibit_evict) n_ev[7]++;
    if (events.wbuf_stall) n_ev[8]++;
  end

  // last fill seen
  logic        saw_fill, last_fill_disp;
  logic [1:0]  last_fill_way;
  always @(posedge clk) if (fill_valid) begin
    saw_fill <= 1; last_fill_disp <= fill_displaced; last_fill_way <= fill_way;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  resp_kind_e k;
  int lat;
  logic [63:0] d;

  task automatic access(input logic [31:0] addr, input logic st, input logic [63:0] wd,
                        input logic psa, input logic [1:0] pway, input logic inh);
    @(negedge clk);
    req_valid = 1; req_pc = 32'h0040_0000 | (addr & 32'hffc); req_addr = addr; req_store = st;
    req_wdata = wd; req_pred_sa = psa; req_pred_way = pway; req_pred_blk = addr[31:5]; req_inhibit = inh;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    k = resp_kind;
    d = resp_rdata;
    if (st) ref_mem[addr[31:3]] = wd;
    checks++;
    if (!st && d !== ref_word(addr)) begin
      failures++;
      $display("FAIL data addr=%h got %h exp %h (kind %s)", addr, d, ref_word(addr), k.name());
    end
    checks++;
    if ((k == RESP_P0_HIT && lat != 1) || (k == RESP_P1_HIT && !st && lat != 3) ||
        (k == RESP_P1_HIT && lat < 3) || (k == RESP_MISS && lat < 13)) begin
      failures++;
      $display("FAIL latency %0d for %s addr=%h", lat, k.name(), addr);
    end
  endtask

  task automatic expect_kind(input resp_kind_e e, input string what);
    checks++;
    if (k != e) begin failures++; $display("FAIL %s: kind %s, expected %s", what, k.name(), e.name()); end
  endtask

  localparam logic [31:0] A = 32'h0001_0040, A2 = 32'h0003_0040;   // set 2, d-m way 0, same d-m line

  int nk [3];
  initial begin
    req_valid = 0; req_pc = 0; req_addr = 0; req_store = 0; req_wdata = 0; req_pred_sa = 0;
    req_pred_way = 0; req_pred_blk = 0; req_inhibit = 0; saw_fill = 0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // --- selective displacement
    for (int i = 0; i < 5; i++) begin
      access(A, 0, 0, 0, 0, 0);
      expect_kind(RESP_MISS, "A conflict miss");
      checks++; if (last_fill_disp || last_fill_way != 0) begin failures++; $display("FAIL A fill %0d not d-m", i); end
      access(A2, 0, 0, 0, 0, 0);
      expect_kind(RESP_MISS, "A2 conflict miss");
      checks++; if (last_fill_disp) begin failures++; $display("FAIL A2 fill %0d displaced", i); end
    end
    access(A, 0, 0, 0, 0, 0);                      // A replaced 5 times: displaced now
    expect_kind(RESP_MISS, "A displaced fill");
    checks++; if (!last_fill_disp || last_fill_way != 2'd1) begin failures++; $display("FAIL A not displaced to way 1 (disp=%b way=%0d)", last_fill_disp, last_fill_way); end
    access(A2, 0, 0, 0, 0, 0);
    expect_kind(RESP_P0_HIT, "A2 stays at d-m way");
    // --- probe paths
    access(A, 0, 0, 0, 0, 0);
    expect_kind(RESP_P1_HIT, "A with d-m prediction");
    access(A, 0, 0, 1, 2'd1, 0);
    expect_kind(RESP_P0_HIT, "A with correct way prediction");
    access(A + 8, 0, 0, 1, 2'd3, 0);
    expect_kind(RESP_P1_HIT, "A with wrong way prediction");
    access(A + 16, 1, 64'hdead_beef_0123_4567, 1, 2'd1, 0);
    expect_kind(RESP_P0_HIT, "store hit at predicted way");
    access(A + 16, 0, 0, 1, 2'd1, 0);
    expect_kind(RESP_P0_HIT, "load back the stored word");
    // --- inhibited instruction meets displaced A
    access(A, 0, 0, 1, 2'd1, 1);
    expect_kind(RESP_MISS, "inhibited access evicts displaced A");
    checks++; if (last_fill_disp || last_fill_way != 0) begin failures++; $display("FAIL A not refilled at d-m way"); end
    access(A + 16, 0, 0, 0, 0, 0);
    expect_kind(RESP_P0_HIT, "A at d-m way keeps stored word");
    access(A2, 0, 0, 0, 0, 0);
    expect_kind(RESP_MISS, "A2 evicted by A's refill");
    checks++; if (!last_fill_disp || last_fill_way != 2'd1) begin failures++; $display("FAIL A2 not displaced"); end

    // --- random part
    foreach (nk[i]) nk[i] = 0;
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] a;
      a = {13'(0), 3'($urandom_range(0, 7)), 3'b0, 2'($urandom), 3'($urandom_range(1, 3)), 1'b0, 2'($urandom), 3'b0};
      access(a, $urandom_range(0, 3) == 0, {$urandom, $urandom}, $urandom_range(0, 1) == 1, 2'($urandom),
             $urandom_range(0, 9) == 0);
      nk[k]++;
    end
    $display("random: p0=%0d p1=%0d miss=%0d; events p0dm=%0d p0pred=%0d p1=%0d miss=%0d filldm=%0d filldisp=%0d repl=%0d inhev=%0d wbstall=%0d",
             nk[0], nk[1], nk[2], n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8]);
    foreach (n_ev[i]) begin
      checks++;
      if (n_ev[i] == 0) begin failures++; $display("FAIL event %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
