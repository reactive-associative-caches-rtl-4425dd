// way_predictor: PC-based way prediction with feedback for the reactive-associative cache.
//
// Lookup runs in the processor front end, well before the data address exists,
// as a two-stage pipeline:
//   stage 1  the instruction PC reads the inhibit list and the access-prediction
//            table (APT), which gives the block address the instruction last
//            touched in a displaced position;
//   stage 2  that block address reads the block way-number table (BWT), which
//            gives the block's current way.
// The prediction (pred_*) is valid two cycles after lk_valid. It is
// set-associative (pred_sa) only if the APT and the BWT both hit and the
// instruction is not inhibited; otherwise the access goes to the direct-mapped
// way. pred_blk is the APT block address, returned with the access so the
// feedback reaches the BWT entry that made the prediction.
//
// Updates from the cache:
//   acc_*   after every access. If the instruction reached a displaced block and
//           is not inhibited, the APT learns PC -> block; an instruction that
//           already has an APT entry has it rewritten with whatever block it
//           touched, so after it moves on to a block in its direct-mapped way
//           it is predicted direct-mapped again. If the prediction was
//           set-associative and the block was in the cache, the BWT counter of
//           pred_blk is decremented (right) or incremented (wrong). An inhibited
//           instruction saturates the counter of the block it touched, and an
//           uninhibited instruction that touches a block with a saturated counter
//           (or saturates it by a wrong prediction) is put on the inhibit list,
//           so unpredictability spreads from instructions to blocks and back.
//   fill_*  on every cache fill. A displaced fill allocates or updates the
//           block's BWT entry with its way; a direct-mapped fill only rewrites
//           the way of an existing entry.
// Clearing: dtlb_miss clears the inhibit list, itlb_miss clears the BWT
// counters. With CLEAR_INTERVAL > 0 both are also cleared every CLEAR_INTERVAL
// accesses (periodic clearing); 0 turns that off, and the two clear event
// flags are then simply the TLB-miss inputs.
// Table sizes and thresholds default to 128-entry APT and BWT, a 2048-bit
// inhibit list and an inhibit threshold of 3. The associativity of the APT and
// BWT and the compressed-tag width are this design's choice.
module way_predictor
  import ra_pkg::*;
#(
  parameter int unsigned PC_W           = 32,
  parameter int unsigned BLK_W          = 27,
  parameter int unsigned CWAY_W         = 2,
  parameter int unsigned APT_ENTRIES    = 128,
  parameter int unsigned APT_WAYS       = 4,
  parameter int unsigned BWT_ENTRIES    = 128,
  parameter int unsigned BWT_WAYS       = 4,
  parameter int unsigned CTAG_W         = 8,
  parameter int unsigned INHIBIT_BITS   = 2048,
  parameter int unsigned INHIBIT_THRESH = 3,
  parameter int unsigned CLEAR_INTERVAL = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lk_valid,
  input  logic [PC_W-1:0]   lk_pc,
  output logic              pred_valid,
  output logic [PC_W-1:0]   pred_pc,
  output logic              pred_sa,
  output logic [CWAY_W-1:0] pred_way,
  output logic [BLK_W-1:0]  pred_blk,
  output logic              pred_inhibit,
  // access feedback
  input  logic              acc_valid,
  input  logic [PC_W-1:0]   acc_pc,
  input  logic [BLK_W-1:0]  acc_blk,
  input  logic              acc_displaced,
  input  logic              acc_pred_sa,
  input  logic [BLK_W-1:0]  acc_pred_blk,
  input  logic              acc_p0_hit,
  input  logic              acc_hit,
  input  logic              acc_inhibit,
  // fill update
  input  logic              fill_valid,
  input  logic [BLK_W-1:0]  fill_blk,
  input  logic [CWAY_W-1:0] fill_way,
  input  logic              fill_displaced,
  // clearing
  input  logic              dtlb_miss,
  input  logic              itlb_miss,
  output pred_events_t      events
);

  // ---------------- stage 1: inhibit list and APT ----------------
  logic             il_rd;
  logic             apt_hit;
  logic [BLK_W-1:0] apt_blk;
  logic             inh_set;
  logic             clr_inh, clr_ctr;

  logic             s1_valid, s1_inhibit, s1_apt_hit;
  logic [PC_W-1:0]  s1_pc;
  logic [BLK_W-1:0] s1_blk;

  inhibit_list #(.BITS(INHIBIT_BITS), .PC_W(PC_W)) u_il (
    .clk, .rst_n, .rd_pc(lk_pc), .rd_inhibit(il_rd),
    .set_en(inh_set), .set_pc(acc_pc), .clear_all(clr_inh)
  );

  logic apt_upd, apt_alloc;
  apt #(.ENTRIES(APT_ENTRIES), .WAYS(APT_WAYS), .PC_W(PC_W), .BLK_W(BLK_W), .CTAG_W(CTAG_W)) u_apt (
    .clk, .rst_n, .lk_pc, .lk_hit(apt_hit), .lk_blk(apt_blk),
    .upd_en(apt_upd), .upd_alloc(apt_alloc), .upd_pc(acc_pc), .upd_blk(acc_blk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= lk_valid;
    s1_pc      <= lk_pc;
    s1_inhibit <= il_rd;
    s1_apt_hit <= apt_hit;
    s1_blk     <= apt_blk;
  end

  // ---------------- stage 2: BWT ----------------
  logic              bwt_hit;
  logic [CWAY_W-1:0] bwt_way;
  fb_op_e            fb_op;
  logic [BLK_W-1:0]  fb_blk;
  logic              fb_hit, fb_sat, fu_hit;

  bwt #(.ENTRIES(BWT_ENTRIES), .WAYS(BWT_WAYS), .BLK_W(BLK_W), .CTAG_W(CTAG_W),
        .CWAY_W(CWAY_W), .CTR_MAX(INHIBIT_THRESH)) u_bwt (
    .clk, .rst_n,
    .lk_blk(s1_blk), .lk_hit(bwt_hit), .lk_way(bwt_way),
    .fu_en(fill_valid), .fu_blk(fill_blk), .fu_way(fill_way), .fu_alloc(fill_displaced), .fu_hit,
    .fb_op, .fb_blk, .fb_hit, .fb_sat,
    .clear_ctrs(clr_ctr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) pred_valid <= 1'b0;
    else        pred_valid <= s1_valid;
    pred_pc      <= s1_pc;
    pred_inhibit <= s1_inhibit;
    pred_sa      <= s1_apt_hit && bwt_hit && !s1_inhibit;
    pred_way     <= bwt_way;
    pred_blk     <= s1_blk;
  end

  // ---------------- feedback ----------------
  always_comb begin
    fb_op  = FB_NONE;
    fb_blk = acc_blk;
    if (acc_valid) begin
      if (acc_inhibit) begin
        fb_op = FB_SATURATE;
      end else if (acc_pred_sa && acc_hit) begin
        fb_op  = acc_p0_hit ? FB_CORRECT : FB_WRONG;
        fb_blk = acc_pred_blk;
      end else begin
        fb_op = FB_PROBE;
      end
    end
  end

  assign apt_upd   = acc_valid && !acc_inhibit;
  assign apt_alloc = acc_displaced;
  assign inh_set = acc_valid && !acc_inhibit && fb_sat;

  // ---------------- clearing ----------------
  localparam int unsigned CNT_W = (CLEAR_INTERVAL > 1) ? $clog2(CLEAR_INTERVAL) : 1;
  logic [CNT_W-1:0] acc_cnt;
  logic             periodic;

  if (CLEAR_INTERVAL > 0) begin : g_periodic
    always_ff @(posedge clk) begin
      if (!rst_n || periodic) acc_cnt <= '0;
      else if (acc_valid)     acc_cnt <= acc_cnt + 1'b1;
    end
    assign periodic = acc_valid && (acc_cnt == CNT_W'(CLEAR_INTERVAL - 1));
  end else begin : g_no_periodic
    assign acc_cnt  = '0;
    assign periodic = 1'b0;
  end

  assign clr_inh = dtlb_miss || periodic;
  assign clr_ctr = itlb_miss || periodic;

  // ---------------- events ----------------
  always_comb begin
    events = '0;
    events.pred_sa        = pred_valid && pred_sa;
    events.apt_write      = apt_upd && apt_alloc;
    events.bwt_alloc      = fill_valid && fill_displaced && !fu_hit;
    events.bwt_way_update = fill_valid && fu_hit;
    events.ctr_inc        = fb_hit && fb_op == FB_WRONG && !clr_ctr;
    events.ctr_dec        = fb_hit && fb_op == FB_CORRECT && !clr_ctr;
    events.ctr_force_sat  = fb_hit && fb_op == FB_SATURATE && !clr_ctr;
    events.inhibit_set    = inh_set && !clr_inh;
    events.clear_inhibit  = clr_inh;
    events.clear_ctrs     = clr_ctr;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(acc_valid && fill_valid)) else $error("way_predictor: access and fill update in one cycle");
  end

endmodule
