// lookup_engine: parallel TCAM IP lookup engine with logical caches.
//
// N_CHIPS TCAM chips each hold one range partition of the route table in
// their Route Entry Part and use all remaining words as a logical cache of
// other partitions' routes. Data path for every lookup:
//   indexing_logic  -> home chip of the address (2 cycles)
//   packet_tagger   -> package {ip, home, miss=0, time stamp} (1 cycle)
//   load_balancer   -> home FIFO if miss > MISS_LIMIT, else idlest FIFO
//                      (home first on ties, random otherwise)
//   input_fifo      -> one queue of FIFO_DEPTH per chip
//   search_unit +   -> home search of the partition, or cache search;
//   tcam_chip          cache misses go through feedback_logic (miss+1) back
//                      to the load balancer; persistent misses, resolved at
//                      home, trigger cache_update_ctrl, which copies the
//                      route and its neighbours into the other chips' caches
//                      one chip at a time
//   reorder_buffer  -> results in arrival order, LANES per cycle.
// Up to LANES new addresses enter per cycle when in_ready is high; in_ready
// falls when the 128-stamp re-order window could overflow. A package that
// meets a full FIFO is dropped and comes out with `dropped` set.
//
// Control plane interface: host_we/host_chip/host_wr write route entries,
// initial cache entries or the indicators of one chip (see tcam_chip);
// host writes take precedence over cache refills on that chip and pause its
// searches for the cycle. cfg_* writes the indexing logic's boundaries.
// reconstruct_req rises when a chip's Route Entry Part is full, i.e. the
// partitions must be rebuilt by the control plane.
// Status: entry_ind/cache_ind per chip, blk_en (blocks triggered by each
// chip's last search, the partition-disable power view), chip_active (chips
// that searched in the cycle), upd_busy.
//
// Latency without misses or queueing: 2 (index) + 1 (tag) + 1 (FIFO) +
// 2 (search) + 1 (re-order) = 7 cycles.
// The structure, the two balancing rules, the miss counter and limit, the
// pipelined cache refill and the chip organisation follow the scheme; lane
// count, widths, the drop policy and the re-order window are this design's.
module lookup_engine
  import tcam_pkg::*;
#(
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned LANES      = 4,
  parameter int unsigned DEPTH      = 32768,
  parameter int unsigned FIXED      = 3276,
  parameter int unsigned BLOCKS     = 8,
  parameter int unsigned FIFO_DEPTH = 10,
  parameter int unsigned MISS_LIMIT = 3,
  parameter int unsigned ADJ        = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookups
  input  logic        in_valid [LANES],
  input  ip_t         in_ip    [LANES],
  output logic        in_ready,
  output logic        out_valid[LANES],
  output result_t     out_res  [LANES],
  // control plane
  input  logic        host_we,
  input  chip_t       host_chip,
  input  chip_wr_t    host_wr,
  output logic        host_reject,
  input  logic        cfg_we,
  input  chip_t       cfg_range,
  input  ip_t         cfg_low,
  input  ip_t         cfg_high,
  input  chip_t       cfg_chip,
  // status
  output idx_t        entry_ind [N_CHIPS],
  output idx_t        cache_ind [N_CHIPS],
  output logic        reconstruct_req,
  output logic [BLOCKS-1:0] blk_en [N_CHIPS],
  output logic        chip_active [N_CHIPS],
  output logic        upd_busy
);

  localparam int unsigned ROB_DEPTH = 2**TS_W;
  localparam int unsigned N_PKT     = N_CHIPS + LANES;
  localparam int unsigned N_WR      = N_CHIPS + N_PKT;

  initial assert (N_CHIPS <= 2**CHIP_W) else $error("too many chips");

  // ---------------- admission, indexing, tagging ----------------
  ts_t  next_ts, rob_head;
  logic in_acc [LANES];

  assign in_ready = (int'(ts_t'(next_ts - rob_head)) + 3 * int'(LANES)) < int'(ROB_DEPTH);
  always_comb for (int l = 0; l < LANES; l++) in_acc[l] = in_valid[l] && in_ready;

  logic  ix_valid [LANES];
  ip_t   ix_ip    [LANES];
  chip_t ix_home  [LANES];

  indexing_logic #(.LANES(LANES), .N_RANGES(N_CHIPS)) u_index (
    .clk, .rst_n,
    .in_valid(in_acc), .in_ip,
    .out_valid(ix_valid), .out_ip(ix_ip), .out_home(ix_home),
    .cfg_we, .cfg_range, .cfg_low, .cfg_high, .cfg_chip
  );

  logic tg_valid [LANES];
  pkt_t tg_pkt   [LANES];

  packet_tagger #(.LANES(LANES)) u_tag (
    .clk, .rst_n,
    .in_valid(ix_valid), .in_ip(ix_ip), .in_home(ix_home),
    .out_valid(tg_valid), .out_pkt(tg_pkt), .next_ts
  );

  // ---------------- load balancing ----------------
  logic fb_in_valid [N_CHIPS];
  pkt_t fb_in_pkt   [N_CHIPS];
  logic fb_valid    [N_CHIPS];
  pkt_t fb_pkt      [N_CHIPS];

  feedback_logic #(.N_CHIPS(N_CHIPS)) u_fb (
    .clk, .rst_n,
    .in_valid(fb_in_valid), .in_pkt(fb_in_pkt),
    .out_valid(fb_valid), .out_pkt(fb_pkt)
  );

  logic             lb_valid [N_PKT];
  pkt_t             lb_pkt   [N_PKT];
  logic [7:0]       fifo_cnt [N_CHIPS];
  logic [N_PKT-1:0] push_valid [N_CHIPS];
  logic             drop_valid [N_PKT];
  chip_t            lb_dest    [N_PKT];
  logic             lb_forced  [N_PKT];
  logic             lb_rand    [N_PKT];

  always_comb begin
    for (int c = 0; c < N_CHIPS; c++) begin
      lb_valid[c] = fb_valid[c];
      lb_pkt[c]   = fb_pkt[c];
    end
    for (int l = 0; l < LANES; l++) begin
      lb_valid[N_CHIPS + l] = tg_valid[l];
      lb_pkt[N_CHIPS + l]   = tg_pkt[l];
    end
  end

  load_balancer #(.N_CHIPS(N_CHIPS), .N_PKT(N_PKT), .FIFO_DEPTH(FIFO_DEPTH),
                  .MISS_LIMIT(MISS_LIMIT)) u_lb (
    .clk, .rst_n,
    .in_valid(lb_valid), .in_pkt(lb_pkt), .fifo_cnt,
    .push_valid, .drop_valid, .dest(lb_dest),
    .forced_home(lb_forced), .rand_pick(lb_rand)
  );

  // ---------------- chips ----------------
  logic        su_out_valid [N_CHIPS];
  result_t     su_out_res   [N_CHIPS];
  logic        upd_req      [N_CHIPS];
  idx_t        upd_req_idx  [N_CHIPS];
  ip_t         upd_req_ip   [N_CHIPS];
  logic        rdb_en       [N_CHIPS];
  idx_t        rdb_idx;
  sram_entry_t rdb_data     [N_CHIPS];
  logic        cu_wr_en     [N_CHIPS];
  chip_wr_t    cu_wr;
  logic        cu_stall     [N_CHIPS];
  logic        chip_full    [N_CHIPS];
  logic        chip_reject  [N_CHIPS];
  logic        su_cache_hit [N_CHIPS];
  logic        su_home      [N_CHIPS];

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    logic        f_valid, f_pop, busy, wr_en;
    pkt_t        f_pkt;
    chip_wr_t    wr;
    logic        srch_en, res_valid, res_hit, rda_en;
    ip_t         srch_key;
    area_e       srch_area;
    idx_t        res_idx, rda_idx;
    sram_entry_t rda_data;

    input_fifo #(.DEPTH(FIFO_DEPTH), .N_PUSH(N_PKT)) u_fifo (
      .clk, .rst_n,
      .push_valid(push_valid[c]), .push_pkt(lb_pkt),
      .pop(f_pop), .out_valid(f_valid), .out_pkt(f_pkt), .count(fifo_cnt[c])
    );

    // host writes win the chip's write port
    assign cu_stall[c] = host_we && (int'(host_chip) == c);
    assign wr_en       = cu_stall[c] || cu_wr_en[c];
    assign wr          = cu_stall[c] ? host_wr : cu_wr;
    assign busy        = wr_en;

    search_unit #(.CHIP_ID(c), .MISS_LIMIT(MISS_LIMIT)) u_su (
      .clk, .rst_n,
      .in_valid(f_valid), .in_pkt(f_pkt), .pop(f_pop), .busy,
      .srch_en, .srch_key, .srch_area,
      .res_valid, .res_hit, .res_idx,
      .rda_en, .rda_idx, .rda_data,
      .out_valid(su_out_valid[c]), .out_res(su_out_res[c]),
      .fb_valid(fb_in_valid[c]), .fb_pkt(fb_in_pkt[c]),
      .upd_valid(upd_req[c]), .upd_idx(upd_req_idx[c]), .upd_ip(upd_req_ip[c]),
      .cache_hit(su_cache_hit[c]), .home_search(su_home[c])
    );

    tcam_chip #(.DEPTH(DEPTH), .FIXED(FIXED), .BLOCKS(BLOCKS)) u_chip (
      .clk, .rst_n,
      .wr_en, .wr, .wr_reject(chip_reject[c]),
      .srch_en, .srch_key, .srch_area,
      .res_valid, .res_hit, .res_idx, .blk_en(blk_en[c]),
      .rda_en, .rda_idx, .rda_data,
      .rdb_en(rdb_en[c]), .rdb_idx, .rdb_data(rdb_data[c]),
      .entry_ind(entry_ind[c]), .cache_ind(cache_ind[c]), .full(chip_full[c])
    );

    assign chip_active[c] = res_valid;
  end

  always_comb begin
    reconstruct_req = 1'b0;
    host_reject     = 1'b0;
    for (int c = 0; c < N_CHIPS; c++) begin
      reconstruct_req = reconstruct_req || chip_full[c];
      if (int'(host_chip) == c) host_reject = chip_reject[c];
    end
  end

  // ---------------- cache refill ----------------
  logic cu_ignored, cu_chip_done;

  cache_update_ctrl #(.N_CHIPS(N_CHIPS), .ADJ(ADJ)) u_cu (
    .clk, .rst_n,
    .req_valid(upd_req), .req_idx(upd_req_idx), .req_ip(upd_req_ip), .entry_ind,
    .rdb_en, .rdb_idx, .rdb_data,
    .wr_en(cu_wr_en), .wr(cu_wr), .wr_stall(cu_stall),
    .busy(upd_busy), .req_ignored(cu_ignored), .chip_done(cu_chip_done)
  );

  // ---------------- re-ordering ----------------
  logic    rob_wv [N_WR];
  result_t rob_wr [N_WR];
  always_comb begin
    for (int c = 0; c < N_CHIPS; c++) begin
      rob_wv[c] = su_out_valid[c];
      rob_wr[c] = su_out_res[c];
    end
    for (int p = 0; p < N_PKT; p++) begin
      rob_wv[N_CHIPS + p] = drop_valid[p];
      rob_wr[N_CHIPS + p] = '{ts: lb_pkt[p].ts, ip: lb_pkt[p].ip, found: 1'b0,
                              nh: '0, dropped: 1'b1};
    end
  end

  reorder_buffer #(.DEPTH(ROB_DEPTH), .N_WR(N_WR), .N_OUT(LANES)) u_rob (
    .clk, .rst_n,
    .wr_valid(rob_wv), .wr_res(rob_wr),
    .out_valid, .out_res, .head(rob_head)
  );

endmodule
