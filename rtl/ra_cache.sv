// ra_cache: reactive-associative L1 data cache (tag side, data side, victim list, control).
//
// The tag side is set-associative (WAYS banks read in parallel with the
// set-associative index); the data side is one direct-mapped array whose row is
// {way number, set}. The direct-mapped way of an address is the low bits of its
// set-associative tag, so a block that sits in its direct-mapped way is found
// exactly as in a direct-mapped cache of the same size.
//
// Access sequence (one access at a time):
//   cycle 0  (request accepted) probe0: the probe0 way# mux picks the
//            direct-mapped way, or the predicted way when the request carries a
//            set-associative prediction and the instruction is not inhibited.
//            The data row is read while all tags are compared. The probe0 hit
//            mux gives the probe0 hit, the OR of the match lines the overall hit.
//   probe0 hit: data returned in cycle 1 (resp_valid).
//   probe0 miss, overall hit: cycle 1 encodes the probe1 way, cycle 2 reads the
//            data array at that way, data returned in cycle 3.
//   overall miss: the block is requested from L2 from cycle 1 on. When it
//            arrives the victim list decides where it goes: a block whose
//            replacement counter is saturated (and whose instruction is not
//            inhibited) is displaced to a set-associative way (an invalid way
//            other than the direct-mapped one, else round-robin over those
//            ways) and its counter is reset; any other block goes to its
//            direct-mapped way. A valid block pushed out increments its own
//            victim-list counter. The way predictor is told the fill's way.
//            Data is returned the cycle after the fill.
//   inhibited instruction, block found displaced: the block is invalidated and
//            fetched again into its direct-mapped way (reported as a miss).
// Stores write one WORD_W-bit word, write through to L2 by a one-entry write
// buffer, and allocate on a miss. The buffer drains whenever L2 accepts; a new
// request waits only while the buffer is full and L2 is not ready, and an L2
// read waits until the buffer is empty. A store's response only signals
// completion: resp_rdata then holds the word as it was before the store and
// should be ignored.
//
// The cache described in the thesis is lock-up free and holds its port for only
// one extra cycle on a probe1 hit; this controller is blocking and keeps
// req_ready low for the whole probe1, miss or buffer drain.
//
// After each response the cache reports the access to the way predictor
// (acc_*), and in the fill cycle the fill (fill_*). Each access also raises one
// or more cache_events_t flags.
//
// L2 port: valid/ready request (read of a block or write of a word, address
// byte-aligned to the block or word); a read is answered by one l2_resp_valid
// cycle carrying the whole block, in order.
//
// Timing and sizes follow the evaluated configuration: 8 KB, 32-byte blocks,
// 4 ways, 1-cycle probe0 hit, 3-cycle probe1 hit, 256-entry victim list with a
// threshold of 5. The address and word widths, the write policy, the one-access
// -at-a-time control, the victim-list associativity and the replacement choice
// are this design's own.
module ra_cache
  import ra_pkg::*;
#(
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned PC_W          = 32,
  parameter int unsigned CACHE_BYTES   = 8192,
  parameter int unsigned BLOCK_BYTES   = 32,
  parameter int unsigned WAYS          = 4,
  parameter int unsigned WORD_W        = 64,
  parameter int unsigned VL_ENTRIES    = 256,
  parameter int unsigned VL_WAYS       = 8,
  parameter int unsigned VICTIM_THRESH = 5,
  // derived
  parameter int unsigned SETS    = CACHE_BYTES / BLOCK_BYTES / WAYS,
  parameter int unsigned OFF_W   = $clog2(BLOCK_BYTES),
  parameter int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned TAG_W   = ADDR_W - OFF_W - SET_W,
  parameter int unsigned BLK_W   = ADDR_W - OFF_W,
  parameter int unsigned BLOCK_W = BLOCK_BYTES * 8,
  parameter int unsigned WORDS   = BLOCK_W / WORD_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // CPU request
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [PC_W-1:0]    req_pc,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic               req_store,
  input  logic [WORD_W-1:0]  req_wdata,
  input  logic               req_pred_sa,
  input  logic [WAY_W-1:0]   req_pred_way,
  input  logic [BLK_W-1:0]   req_pred_blk,
  input  logic               req_inhibit,
  // CPU response
  output logic               resp_valid,
  output resp_kind_e         resp_kind,
  output logic [WORD_W-1:0]  resp_rdata,
  // L2
  output logic               l2_req_valid,
  input  logic               l2_req_ready,
  output logic               l2_req_write,
  output logic [ADDR_W-1:0]  l2_req_addr,
  output logic [WORD_W-1:0]  l2_req_wdata,
  input  logic               l2_resp_valid,
  input  logic [BLOCK_W-1:0] l2_resp_data,
  // way predictor update
  output logic               acc_valid,
  output logic [PC_W-1:0]    acc_pc,
  output logic [BLK_W-1:0]   acc_blk,
  output logic               acc_displaced,
  output logic               acc_pred_sa,
  output logic [BLK_W-1:0]   acc_pred_blk,
  output logic               acc_p0_hit,
  output logic               acc_hit,
  output logic               acc_inhibit,
  output logic               fill_valid,
  output logic [BLK_W-1:0]   fill_blk,
  output logic [WAY_W-1:0]   fill_way,
  output logic               fill_displaced,
  output cache_events_t      events
);

  localparam int unsigned WB_W = $clog2(WORD_W / 8);   // byte offset within a word
  localparam int unsigned WI_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_P1_ENC, S_P1_RD, S_MISS, S_WAIT, S_FILL} state_e;
  state_e state;

  // ---------------- latched request ----------------
  logic [PC_W-1:0]   r_pc;
  logic [ADDR_W-1:0] r_addr;
  logic              r_store;
  logic [WORD_W-1:0] r_wdata;
  logic              r_pred_sa, r_inhibit, r_force_dm;
  logic [BLK_W-1:0]  r_pred_blk;
  logic [WAYS-1:0]   r_match;
  logic [WAY_W-1:0]  r_p1_way;
  logic [BLOCK_W-1:0] r_fill;

  function automatic logic [SET_W-1:0] set_of(input logic [ADDR_W-1:0] a);
    return a[OFF_W +: SET_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic logic [WI_W-1:0] word_of(input logic [ADDR_W-1:0] a);
    return WI_W'(a[OFF_W-1:0] >> WB_W);
  endfunction

  wire idle = (state == S_IDLE);

  // address of the access in flight: the request in S_IDLE, the latched one later
  logic [ADDR_W-1:0] cur_addr;
  logic [SET_W-1:0]  cur_set;
  logic [TAG_W-1:0]  cur_tag;
  logic [WAY_W-1:0]  cur_dm_way;
  assign cur_addr   = idle ? req_addr : r_addr;
  assign cur_set    = set_of(cur_addr);
  assign cur_tag    = tag_of(cur_addr);
  assign cur_dm_way = cur_tag[WAY_W-1:0];

  // ---------------- tag side ----------------
  logic [WAYS-1:0]            match, t_valid;
  logic [WAYS-1:0][TAG_W-1:0] t_tag;
  logic                       t_wr_en, t_wr_valid;
  logic [WAY_W-1:0]           t_wr_way;

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_set(cur_set), .cmp_tag(cur_tag), .match, .rd_valid(t_valid), .rd_tag(t_tag),
    .wr_en(t_wr_en), .wr_set(cur_set), .wr_way(t_wr_way), .wr_valid(t_wr_valid), .wr_tag(cur_tag)
  );

  // probe0 way selection
  probe_sel_e       sel;
  logic [2:0]       sel_onehot;
  logic [WAY_W-1:0] probe_way;
  logic             p0_use_pred;

  assign p0_use_pred = req_pred_sa && !req_inhibit;
  assign sel = !idle ? SEL_P1 : (p0_use_pred ? SEL_P0_PRED : SEL_P0_DM);

  probe0_way_mux #(.WAY_W(WAY_W)) u_way_mux (
    .sel, .dm_way(cur_dm_way), .pred_way(req_pred_way), .p1_way(r_p1_way),
    .sel_onehot, .way(probe_way)
  );

  logic p0_hit, hit;
  logic [WAY_W-1:0] enc_way, p1_way_enc;
  logic r_enc_hit_unused;

  probe0_hit_mux #(.WAYS(WAYS)) u_hit_mux (.match, .way(probe_way), .hit(p0_hit));
  probe1_way_encoder #(.WAYS(WAYS)) u_enc_now (.match, .way(enc_way), .hit);
  // the probe1 way number is encoded from the latched match lines in the cycle after probe0
  probe1_way_encoder #(.WAYS(WAYS)) u_enc_p1 (.match(r_match), .way(p1_way_enc), .hit(r_enc_hit_unused));

  // ---------------- data side ----------------
  logic [BLOCK_W-1:0] d_rd;
  logic               d_wr_en;
  logic [WAY_W-1:0]   d_wr_way;
  logic [WORDS-1:0]   d_wr_word_en;
  logic [BLOCK_W-1:0] d_wr_data;

  data_array #(.SETS(SETS), .WAYS(WAYS), .BLOCK_W(BLOCK_W), .WORD_W(WORD_W)) u_data (
    .clk, .rd_way(probe_way), .rd_set(cur_set), .rd_data(d_rd),
    .wr_en(d_wr_en), .wr_way(d_wr_way), .wr_set(cur_set), .wr_word_en(d_wr_word_en), .wr_data(d_wr_data)
  );

  // ---------------- victim list and fill placement ----------------
  logic [BLK_W-1:0] cur_blk;
  assign cur_blk = cur_addr[ADDR_W-1:OFF_W];

  logic             vl_sat, displace, evict_valid;
  logic [WAY_W-1:0] fill_way_c, rr_ptr;
  logic [BLK_W-1:0] evict_blk;

  victim_list #(.ENTRIES(VL_ENTRIES), .WAYS(VL_WAYS), .BLK_W(BLK_W), .THRESH(VICTIM_THRESH)) u_vl (
    .clk, .rst_n,
    .lk_blk(cur_blk), .lk_sat(vl_sat),
    .inc_en(state == S_FILL && evict_valid), .inc_blk(evict_blk),
    .clr_en(state == S_FILL && displace), .clr_blk(cur_blk)
  );

  assign displace = vl_sat && !r_inhibit && !r_force_dm && (WAYS > 1);

  always_comb begin
    logic have_free;
    logic [WAY_W-1:0] free_w, rr_w;
    have_free = 1'b0;
    free_w = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!t_valid[w] && WAY_W'(w) != cur_dm_way) begin have_free = 1'b1; free_w = WAY_W'(w); end
    rr_w = (rr_ptr == cur_dm_way) ? WAY_W'(rr_ptr + 1'b1) : rr_ptr;
    fill_way_c = !displace ? cur_dm_way : (have_free ? free_w : rr_w);
    evict_valid = t_valid[fill_way_c];
    evict_blk   = {t_tag[fill_way_c], cur_set};
  end

  // ---------------- write buffer ----------------
  logic              wb_valid;
  logic [ADDR_W-1:0] wb_addr;
  logic [WORD_W-1:0] wb_data;
  logic              wb_load;
  logic              wb_drain;

  assign wb_drain = wb_valid && l2_req_ready;

  // ---------------- control ----------------
  logic accept;
  logic p0_inhibit_evict;
  assign req_ready = idle && (!wb_valid || l2_req_ready);
  assign accept    = req_valid && req_ready;
  assign p0_inhibit_evict = req_inhibit && hit && (enc_way != cur_dm_way);

  logic [BLOCK_W-1:0] fill_merged;
  always_comb begin
    fill_merged = r_fill;
    if (r_store) fill_merged[word_of(r_addr)*WORD_W +: WORD_W] = r_wdata;
  end

  // array writes and write-buffer load
  always_comb begin
    t_wr_en      = 1'b0;
    t_wr_way     = enc_way;
    t_wr_valid   = 1'b0;
    d_wr_en      = 1'b0;
    d_wr_way     = probe_way;
    d_wr_word_en = '0;
    d_wr_data    = {WORDS{idle ? req_wdata : r_wdata}};
    wb_load      = 1'b0;
    unique case (state)
      S_IDLE: if (accept) begin
        if (p0_inhibit_evict) begin
          t_wr_en = 1'b1;                    // invalidate the displaced copy
        end else if (p0_hit && req_store) begin
          d_wr_en = 1'b1;
          d_wr_word_en[word_of(req_addr)] = 1'b1;
          wb_load = 1'b1;
        end
      end
      S_P1_RD: if (r_store) begin
        d_wr_en = 1'b1;
        d_wr_word_en[word_of(r_addr)] = 1'b1;
        wb_load = 1'b1;
      end
      S_FILL: begin
        t_wr_en      = 1'b1;
        t_wr_way     = fill_way_c;
        t_wr_valid   = 1'b1;
        d_wr_en      = 1'b1;
        d_wr_way     = fill_way_c;
        d_wr_word_en = '1;
        d_wr_data    = fill_merged;
        wb_load      = r_store;
      end
      default: ;
    endcase
  end

  // L2 request: the write buffer first, then a block read
  always_comb begin
    l2_req_valid = 1'b0;
    l2_req_write = 1'b0;
    l2_req_addr  = {r_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    l2_req_wdata = wb_data;
    if (wb_valid) begin
      l2_req_valid = 1'b1;
      l2_req_write = 1'b1;
      l2_req_addr  = wb_addr;
    end else if (state == S_MISS) begin
      l2_req_valid = 1'b1;
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rr_ptr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          if (p0_inhibit_evict)   state <= S_MISS;
          else if (p0_hit)        state <= S_IDLE;
          else if (hit)           state <= S_P1_ENC;
          else                    state <= S_MISS;
        end
        S_P1_ENC: state <= S_P1_RD;
        S_P1_RD:  if (!(r_store && wb_valid && !l2_req_ready)) state <= S_IDLE;
        S_MISS:   if (!wb_valid && l2_req_ready) state <= S_WAIT;
        S_WAIT:   if (l2_resp_valid) state <= S_FILL;
        S_FILL: begin
          state <= S_IDLE;
          if (displace) rr_ptr <= WAY_W'(fill_way_c + 1'b1);
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  // request latch
  always_ff @(posedge clk) begin
    if (accept) begin
      r_pc       <= req_pc;
      r_addr     <= req_addr;
      r_store    <= req_store;
      r_wdata    <= req_wdata;
      r_pred_sa  <= p0_use_pred;
      r_pred_blk <= req_pred_blk;
      r_inhibit  <= req_inhibit;
      r_force_dm <= p0_inhibit_evict;
      r_match    <= match;
    end
    if (state == S_P1_ENC) r_p1_way <= p1_way_enc;
    if (state == S_WAIT && l2_resp_valid) r_fill <= l2_resp_data;
  end

  // write buffer
  always_ff @(posedge clk) begin
    if (!rst_n) wb_valid <= 1'b0;
    else if (wb_load) wb_valid <= 1'b1;
    else if (wb_drain) wb_valid <= 1'b0;
    if (wb_load) begin
      wb_addr <= idle ? {req_addr[ADDR_W-1:WB_W], {WB_W{1'b0}}} : {r_addr[ADDR_W-1:WB_W], {WB_W{1'b0}}};
      wb_data <= idle ? req_wdata : r_wdata;
    end
  end

  // ---------------- response and access report ----------------
  logic p1_done, p0_done, fill_done;
  assign p0_done   = idle && accept && p0_hit && !p0_inhibit_evict;
  assign p1_done   = (state == S_P1_RD) && !(r_store && wb_valid && !l2_req_ready);
  assign fill_done = (state == S_FILL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      acc_valid  <= 1'b0;
    end else begin
      resp_valid <= p0_done || p1_done || fill_done;
      acc_valid  <= p0_done || p1_done || fill_done;
    end
    if (p0_done) begin
      resp_kind     <= RESP_P0_HIT;
      resp_rdata    <= d_rd[word_of(req_addr)*WORD_W +: WORD_W];
      acc_pc        <= req_pc;
      acc_blk       <= req_addr[ADDR_W-1:OFF_W];
      acc_displaced <= (probe_way != cur_dm_way);
      acc_pred_sa   <= p0_use_pred;
      acc_pred_blk  <= req_pred_blk;
      acc_p0_hit    <= 1'b1;
      acc_hit       <= 1'b1;
      acc_inhibit   <= req_inhibit;
    end else if (p1_done || fill_done) begin
      resp_kind     <= p1_done ? RESP_P1_HIT : RESP_MISS;
      resp_rdata    <= p1_done ? d_rd[word_of(r_addr)*WORD_W +: WORD_W]
                               : fill_merged[word_of(r_addr)*WORD_W +: WORD_W];
      acc_pc        <= r_pc;
      acc_blk       <= r_addr[ADDR_W-1:OFF_W];
      acc_displaced <= p1_done ? (r_p1_way != cur_dm_way) : displace;
      acc_pred_sa   <= r_pred_sa;
      acc_pred_blk  <= r_pred_blk;
      acc_p0_hit    <= 1'b0;
      acc_hit       <= p1_done;
      acc_inhibit   <= r_inhibit;
    end
  end

  assign fill_valid     = fill_done;
  assign fill_blk       = cur_blk;
  assign fill_way       = fill_way_c;
  assign fill_displaced = displace;

  // a block is never in two ways of its set
  always_ff @(posedge clk) begin
    if (rst_n && accept) assert ($onehot0(match)) else $error("ra_cache: block found in several ways");
  end

  always_comb begin
    events = '0;
    events.p0_dm_hit      = p0_done && !p0_use_pred;
    events.p0_pred_hit    = p0_done && p0_use_pred;
    events.p1_hit         = p1_done;
    events.miss           = idle && accept && (!hit || p0_inhibit_evict);
    events.fill_dm        = fill_done && !displace;
    events.fill_displaced = fill_done && displace;
    events.replace        = fill_done && evict_valid;
    events.inhibit_evict  = idle && accept && p0_inhibit_evict;
    events.wbuf_stall     = idle && req_valid && !req_ready;
  end

endmodule
