// tcam_chip: one TCAM chip with its associated SRAM and its two indicators.
//
// Holds a tcam_array (search), an assoc_sram (next hop and prefix data per
// word) and chip_indicators (border between the Route Entry Part and the
// logical cache, and the cache refill pointer). The single write port takes
// a chip_wr_t whose op selects:
//   WR_ROUTE  write TCAM and SRAM word `idx` of the Route Entry Part;
//             refused (wr_reject) at or above DEPTH - FIXED;
//   WR_CACHE  write TCAM and SRAM word `idx` directly (initial cache fill);
//   WR_ALLOC  write at the cache indicator, which then advances;
//   WR_SETIND set both indicators to `idx`.
// A search uses the entry indicator as area border: home searches see only
// the Route Entry Part, other searches only the cache.
//
// Timing: search result (hit, idx, blk_en) one cycle after srch_en; SRAM
// port A/B data one cycle after their read enables. A write takes the chip
// for one cycle; the caller does not search in that cycle.
module tcam_chip
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH  = 32768,
  parameter int unsigned FIXED  = 3276,
  parameter int unsigned BLOCKS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // write port
  input  logic        wr_en,
  input  chip_wr_t    wr,
  output logic        wr_reject,
  // search port
  input  logic        srch_en,
  input  ip_t         srch_key,
  input  area_e       srch_area,
  output logic        res_valid,
  output logic        res_hit,
  output idx_t        res_idx,
  output logic [BLOCKS-1:0] blk_en,
  // SRAM reads
  input  logic        rda_en,
  input  idx_t        rda_idx,
  output sram_entry_t rda_data,
  input  logic        rdb_en,
  input  idx_t        rdb_idx,
  output sram_entry_t rdb_data,
  // indicators
  output idx_t        entry_ind,
  output idx_t        cache_ind,
  output logic        full
);

  logic route_wr, set_ind, alloc, route_reject;
  idx_t alloc_idx;
  logic mem_we;
  idx_t mem_idx;

  always_comb begin
    route_wr = wr_en && (wr.op == WR_ROUTE);
    set_ind  = wr_en && (wr.op == WR_SETIND);
    alloc    = wr_en && (wr.op == WR_ALLOC);
    mem_we   = 1'b0;
    mem_idx  = wr.idx;
    if (wr_en) begin
      unique case (wr.op)
        WR_ROUTE:  mem_we = !route_reject;
        WR_CACHE:  mem_we = 1'b1;
        WR_ALLOC:  begin mem_we = 1'b1; mem_idx = alloc_idx; end
        WR_SETIND: mem_we = 1'b0;
      endcase
    end
  end

  assign wr_reject = route_reject;

  chip_indicators #(.DEPTH(DEPTH), .FIXED(FIXED)) u_ind (
    .clk, .rst_n,
    .route_wr, .route_idx(wr.idx), .route_reject,
    .set_ind, .set_val(wr.idx),
    .alloc, .alloc_idx,
    .entry_ind, .cache_ind, .full
  );

  tcam_array #(.DEPTH(DEPTH), .BLOCKS(BLOCKS)) u_tcam (
    .clk, .rst_n,
    .wr_en(mem_we), .wr_idx(mem_idx), .wr_entry(wr.tentry),
    .srch_en, .srch_key, .srch_area, .boundary(entry_ind),
    .res_valid, .res_hit, .res_idx, .blk_en
  );

  assoc_sram #(.DEPTH(DEPTH)) u_sram (
    .clk, .rst_n,
    .wr_en(mem_we), .wr_idx(mem_idx), .wr_data(wr.sentry),
    .rda_en, .rda_idx, .rda_data,
    .rdb_en, .rdb_idx, .rdb_data
  );

endmodule
