// tb_ra_top: end-to-end test of the reactive-associative cache with its way
// predictor, every parameter at its default (8 KB, 4 ways, 32-byte blocks,
// 128-entry APT and BWT, 2048-bit inhibit list, 256-entry victim list,
// thresholds 3 and 5, TLB clearing).
//
// The testbench plays the processor: for each memory instruction it looks up
// the way prediction with the instruction's PC, waits the two cycles the
// predictor takes, then sends the load or store with that prediction. The L2
// model answers after 12 cycles and refuses requests at random.
//
// Workload: arrays X and Y lie 8 KB apart, so X[i] and Y[i] compete for the same
// direct-mapped line. Each round walks both arrays word by word with one load
// instruction per array, and stores into X every fourth word. A fourth load
// instruction touches random blocks of X and Y during the first 18 rounds and
// cannot be predicted; once inhibited it marks the blocks it touches as
// unpredictable, and that spreads to the array instructions. The marking keeps
// itself alive while the same data is reused: inhibited instructions saturate
// block counters and saturated counters inhibit instructions. A data-TLB miss
// is signalled every 1500 accesses and an instruction-TLB miss every 3000, so
// at access 3000 both are cleared together and the second half recovers. What is checked:
//   - every load returns the reference memory's value;
//   - probe0 hits take 1 cycle, probe1 load hits 3 cycles, misses at least 13;
//   - every mechanism occurs at least once: d-m and predicted probe0 hits,
//     probe1 hits, misses, d-m and displaced fills, replacements, eviction by an
//     inhibited instruction, write-buffer stalls, set-associative predictions,
//     APT writes, BWT allocation and way update, counter increments, decrements
//     and forced saturation, inhibiting, and both kinds of clearing;
//   - selective displacement pays off: in the last rounds the probe0 hit rate
//     of the two array loads is above 75 %.
module tb_ra_top;
  import ra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         lk_valid, pred_valid, pred_sa, pred_inhibit;
  logic [31:0]  lk_pc, pred_pc;
  logic [1:0]   pred_way;
  logic [26:0]  pred_blk;
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
  logic         dtlb_miss, itlb_miss;
  cache_events_t cache_events;
  pred_events_t  pred_events;
  int l2_reads, l2_writes;

  ra_top dut (.*);

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

  // mechanism counters
  localparam int NC = 9, NP = 10;
  int nc [NC];
  int np [NP];
  string cname [NC] = '{"p0_dm_hit", "p0_pred_hit", "p1_hit", "miss", "fill_dm", "fill_displaced",
                        "replace", "inhibit_evict", "wbuf_stall"};
  string pname [NP] = '{"pred_sa", "apt_write", "bwt_alloc", "bwt_way_update", "ctr_inc", "ctr_dec",
                        "ctr_force_sat", "inhibit_set", "clear_inhibit", "clear_ctrs"};
  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] c;
    logic [NP-1:0] p;
    c = cache_events;
    p = pred_events;
    for (int i = 0; i < NC; i++) if (c[NC-1-i]) nc[i]++;
    for (int i = 0; i < NP; i++) if (p[NP-1-i]) np[i]++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_access = 0;
  resp_kind_e k;

  task automatic mem_op(input logic [31:0] pc, input logic [31:0] addr, input logic st, input logic [63:0] wd);
    int lat;
    // front end: way prediction by PC
    @(negedge clk);
    lk_valid = 1; lk_pc = pc;
    @(negedge clk);
    lk_valid = 0;
    @(negedge clk);
    checks++;
    if (!pred_valid || pred_pc !== pc) begin failures++; $display("FAIL prediction missing for pc %h", pc); end
    req_valid = 1; req_pc = pc; req_addr = addr; req_store = st; req_wdata = wd;
    req_pred_sa = pred_sa; req_pred_way = pred_way; req_pred_blk = pred_blk; req_inhibit = pred_inhibit;
    n_access++;
    dtlb_miss = (n_access % 1500 == 0);
    itlb_miss = (n_access % 3000 == 0);
    #1;
    while (!req_ready) begin @(negedge clk); dtlb_miss = 0; itlb_miss = 0; #1; end
    @(posedge clk);
    @(negedge clk);
    req_valid = 0; dtlb_miss = 0; itlb_miss = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    k = resp_kind;
    if (st) ref_mem[addr[31:3]] = wd;
    else begin
      checks++;
      if (resp_rdata !== ref_word(addr)) begin
        failures++;
        $display("FAIL data pc=%h addr=%h got %h exp %h", pc, addr, resp_rdata, ref_word(addr));
      end
    end
    checks++;
    if ((k == RESP_P0_HIT && lat != 1) || (k == RESP_P1_HIT && !st && lat != 3) ||
        (k == RESP_P1_HIT && lat < 3) || (k == RESP_MISS && lat < 13)) begin
      failures++;
      $display("FAIL latency %0d for %s addr=%h", lat, k.name(), addr);
    end
  endtask

  localparam logic [31:0] X = 32'h0001_0000, Y = 32'h0001_2000;
  localparam logic [31:0] PC_X = 32'h0040_0100, PC_Y = 32'h0040_0104, PC_S = 32'h0040_0108, PC_U = 32'h0040_0200;
  localparam int ROUNDS = 40, WORDS = 64;

  int late_acc = 0, late_p0 = 0;
  initial begin
    lk_valid = 0; lk_pc = 0; req_valid = 0; req_pc = 0; req_addr = 0; req_store = 0; req_wdata = 0;
    req_pred_sa = 0; req_pred_way = 0; req_pred_blk = 0; req_inhibit = 0; dtlb_miss = 0; itlb_miss = 0;
    foreach (nc[i]) nc[i] = 0;
    foreach (np[i]) np[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < WORDS; i++) begin
        mem_op(PC_X, X + 32'(i * 8), 1'b0, 64'h0);
        if (r >= ROUNDS - 5) begin late_acc++; if (k == RESP_P0_HIT) late_p0++; end
        mem_op(PC_Y, Y + 32'(i * 8), 1'b0, 64'h0);
        if (r >= ROUNDS - 5) begin late_acc++; if (k == RESP_P0_HIT) late_p0++; end
        if (i % 4 == 1) mem_op(PC_S, X + 32'(i * 8), 1'b1, {32'(r), 32'(i)});
        if (i % 8 == 3 && r < ROUNDS / 2 - 2)
          mem_op(PC_U, ($urandom_range(0, 1) ? X : Y) + 32'($urandom_range(0, WORDS - 1) * 8), 1'b0, 64'h0);
      end
    end
    $display("accesses=%0d L2 reads=%0d writes=%0d; array loads in the last 5 rounds: %0d of %0d hit on probe0",
             n_access, l2_reads, l2_writes, late_p0, late_acc);
    for (int i = 0; i < NC; i++) begin
      $display("  %-16s %0d", cname[i], nc[i]);
      checks++;
      if (nc[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", cname[i]); end
    end
    for (int i = 0; i < NP; i++) begin
      $display("  %-16s %0d", pname[i], np[i]);
      checks++;
      if (np[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", pname[i]); end
    end
    checks++;
    if (late_p0 * 4 <= late_acc * 3) begin failures++; $display("FAIL probe0 hit rate too low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
