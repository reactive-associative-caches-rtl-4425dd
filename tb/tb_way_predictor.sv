// tb_way_predictor: directed test of the PC-based way predictor with its
// feedback and clearing. Defaults everywhere except CLEAR_INTERVAL = 16, so
// that periodic clearing also happens. The expected predictions follow from the
// rules of the mechanism, not from the tables' contents:
//   - a lookup answers exactly two cycles later;
//   - an unknown PC is predicted direct-mapped;
//   - after a displaced fill of block B into way 3 and an access by PC P that
//     reached B, P is predicted set-associative, way 3, block B;
//   - a direct-mapped fill of B into way 1 changes the predicted way to 1;
//   - three wrong predictions inhibit P (inhibit threshold 3); inhibited P is
//     predicted direct-mapped;
//   - an uninhibited PC Q that touches B afterwards is inhibited too;
//   - an inhibited PC touching block C saturates C, so PC R touching C is inhibited;
//   - a data-TLB miss clears the inhibit list, an instruction-TLB miss the
//     counters, and every 16 accesses both are cleared.
module tb_way_predictor;
  import ra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        lk_valid;
  logic [31:0] lk_pc, pred_pc;
  logic        pred_valid, pred_sa, pred_inhibit;
  logic [1:0]  pred_way;
  logic [26:0] pred_blk;
  logic        acc_valid, acc_displaced, acc_pred_sa, acc_p0_hit, acc_hit, acc_inhibit;
  logic [31:0] acc_pc;
  logic [26:0] acc_blk, acc_pred_blk;
  logic        fill_valid, fill_displaced;
  logic [26:0] fill_blk;
  logic [1:0]  fill_way;
  logic        dtlb_miss, itlb_miss;
  pred_events_t events;
  int n_clear_inh = 0, n_clear_ctr = 0;

  way_predictor #(.CLEAR_INTERVAL(16)) dut (.*);

  always @(posedge clk) begin
    if (events.clear_inhibit) n_clear_inh++;
    if (events.clear_ctrs)    n_clear_ctr++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] P = 32'h0040_1230, Q = 32'h0040_2a44, R = 32'h0041_0008, S = 32'h0042_0100;
  localparam logic [26:0] B = 27'h0123_456, C = 27'h0012_3c7;

  // look up pc; check the prediction and its two-cycle latency
  task automatic lookup(input logic [31:0] pc, input logic e_sa, input logic [1:0] e_way,
                        input logic [26:0] e_blk, input logic e_inh, input string what);
    @(negedge clk);
    lk_valid = 1; lk_pc = pc;
    @(negedge clk);
    lk_valid = 0;
    checks++;
    if (pred_valid) begin failures++; $display("FAIL %s: prediction after 1 cycle", what); end
    @(negedge clk);
    checks++;
    if (!pred_valid || pred_pc !== pc || pred_sa !== e_sa || pred_inhibit !== e_inh ||
        (e_sa && (pred_way !== e_way || pred_blk !== e_blk))) begin
      failures++;
      $display("FAIL %s: valid=%b sa=%b way=%0d blk=%h inh=%b (exp sa=%b way=%0d blk=%h inh=%b)",
               what, pred_valid, pred_sa, pred_way, pred_blk, pred_inhibit, e_sa, e_way, e_blk, e_inh);
    end
  endtask

  task automatic access(input logic [31:0] pc, input logic [26:0] blk, input logic displaced,
                        input logic psa, input logic [26:0] pblk, input logic p0, input logic h,
                        input logic inh);
    @(negedge clk);
    acc_valid = 1; acc_pc = pc; acc_blk = blk; acc_displaced = displaced; acc_pred_sa = psa;
    acc_pred_blk = pblk; acc_p0_hit = p0; acc_hit = h; acc_inhibit = inh;
    @(negedge clk);
    acc_valid = 0;
  endtask

  task automatic fill(input logic [26:0] blk, input logic [1:0] way, input logic displaced);
    @(negedge clk);
    fill_valid = 1; fill_blk = blk; fill_way = way; fill_displaced = displaced;
    @(negedge clk);
    fill_valid = 0;
  endtask

  task automatic pulse(input bit d, input bit i);
    @(negedge clk);
    dtlb_miss = d; itlb_miss = i;
    @(negedge clk);
    dtlb_miss = 0; itlb_miss = 0;
  endtask

  initial begin
    lk_valid = 0; lk_pc = 0; acc_valid = 0; acc_pc = 0; acc_blk = 0; acc_displaced = 0; acc_pred_sa = 0;
    acc_pred_blk = 0; acc_p0_hit = 0; acc_hit = 0; acc_inhibit = 0; fill_valid = 0; fill_blk = 0;
    fill_way = 0; fill_displaced = 0; dtlb_miss = 0; itlb_miss = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    lookup(P, 0, 0, 0, 0, "unknown PC");
    fill(B, 2'd3, 1'b1);                         // B displaced into way 3
    access(P, B, 1, 0, 0, 0, 0, 0);              // P missed on B, now displaced (access 1)
    lookup(P, 1, 2'd3, B, 0, "after displaced fill");
    access(P, B, 1, 1, B, 1, 1, 0);              // correct prediction (access 2)
    fill(B, 2'd1, 1'b0);                         // B back at its d-m way 1
    lookup(P, 1, 2'd1, B, 0, "way updated by fill");
    // three wrong predictions -> P inhibited (accesses 3..5)
    access(P, B, 1, 1, B, 0, 1, 0);
    lookup(P, 1, 2'd1, B, 0, "one wrong");
    access(P, B, 1, 1, B, 0, 1, 0);
    lookup(P, 1, 2'd1, B, 0, "two wrong");
    access(P, B, 1, 1, B, 0, 1, 0);
    lookup(P, 0, 0, 0, 1, "three wrong: inhibited");
    // plague: Q touches saturated B (access 6)
    lookup(Q, 0, 0, 0, 0, "Q before");
    access(Q, B, 0, 0, 0, 1, 1, 0);
    lookup(Q, 0, 0, 0, 1, "Q inhibited via B");
    // data-TLB miss clears the inhibit list
    pulse(1, 0);
    lookup(P, 1, 2'd1, B, 0, "after D-TLB clear");
    lookup(Q, 0, 0, 0, 0, "Q after D-TLB clear");
    // B still saturated: Q touching it is inhibited again (access 7); an I-TLB miss clears counters
    access(Q, B, 0, 0, 0, 1, 1, 0);
    lookup(Q, 0, 0, 0, 1, "Q re-inhibited");
    pulse(1, 1);
    access(Q, B, 0, 0, 0, 1, 1, 0);              // access 8: counter clear, no inhibit
    lookup(Q, 0, 0, 0, 0, "Q free after both clears");
    // inhibited instruction saturates another block's counter
    fill(C, 2'd2, 1'b1);
    access(P, B, 1, 1, B, 0, 1, 0);              // access 9..11 -> P inhibited again
    access(P, B, 1, 1, B, 0, 1, 0);
    access(P, B, 1, 1, B, 0, 1, 0);
    lookup(P, 0, 0, 0, 1, "P inhibited again");
    access(P, C, 0, 0, 0, 1, 1, 1);              // access 12: inhibited P touches C
    access(R, C, 1, 0, 0, 1, 1, 0);              // access 13: R touches C -> inhibited
    lookup(R, 0, 0, 0, 1, "R inhibited via C");
    // periodic clearing at the 16th access
    access(S, 27'h7, 0, 0, 0, 1, 1, 0);          // 14
    access(S, 27'h7, 0, 0, 0, 1, 1, 0);          // 15
    lookup(P, 0, 0, 0, 1, "P still inhibited before 16th access");
    access(S, 27'h7, 0, 0, 0, 1, 1, 0);          // 16 -> clear
    lookup(P, 1, 2'd1, B, 0, "P free after periodic clear");
    lookup(R, 1, 2'd2, C, 0, "R free after periodic clear");   // R reached displaced C, so the APT learned it
    checks++;
    if (n_clear_inh != 3 || n_clear_ctr != 2) begin
      failures++;
      $display("FAIL clear counts inh=%0d ctr=%0d (exp 3, 2)", n_clear_inh, n_clear_ctr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
