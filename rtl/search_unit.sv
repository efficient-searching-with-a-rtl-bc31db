// search_unit: the lookup pipeline of one TCAM chip.
//
// Pops one package per cycle from the chip's input FIFO, unless the chip is
// being written that cycle (busy). The package is searched in the Route
// Entry Part if this chip is its home, otherwise in the logical cache. A
// hit reads the next hop from the associated SRAM. Outcomes, two cycles
// after the pop:
//   home search        -> result (found or no route). If the package came
//                         home because its miss counter exceeded MISS_LIMIT
//                         and the search hit, a cache-update request
//                         (home chip, matched index, address) is raised.
//   cache search, hit  -> result with the cached next hop.
//   cache search, miss -> package handed to the feedback logic.
//
// Timing: pop in cycle t (combinational from in_valid and busy), TCAM
// result in t+1, SRAM data and outcome in t+2. One package per cycle.
// Outcome rules follow the scheme; the two-stage pipeline is this design's.
module search_unit
  import tcam_pkg::*;
#(
  parameter int unsigned CHIP_ID    = 0,
  parameter int unsigned MISS_LIMIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // input FIFO
  input  logic        in_valid,
  input  pkt_t        in_pkt,
  output logic        pop,
  input  logic        busy,
  // chip search port
  output logic        srch_en,
  output ip_t         srch_key,
  output area_e       srch_area,
  input  logic        res_valid,
  input  logic        res_hit,
  input  idx_t        res_idx,
  output logic        rda_en,
  output idx_t        rda_idx,
  input  sram_entry_t rda_data,
  // outcomes
  output logic        out_valid,
  output result_t     out_res,
  output logic        fb_valid,
  output pkt_t        fb_pkt,
  output logic        upd_valid,
  output idx_t        upd_idx,
  output ip_t         upd_ip,
  output logic        cache_hit,   // event: a cache search hit
  output logic        home_search  // event: a home search was made
);

  assign pop       = in_valid && !busy;
  assign srch_en   = pop;
  assign srch_key  = in_pkt.ip;
  assign srch_area = (int'(in_pkt.home) == CHIP_ID) ? AREA_ROUTE : AREA_CACHE;

  logic  v1, v2, hit2;
  pkt_t  p1, p2;
  area_e a1, a2;
  idx_t  idx2;

  assign rda_en  = res_valid && res_hit;
  assign rda_idx = res_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; hit2 <= 1'b0;
      p1 <= '0; p2 <= '0; a1 <= AREA_ROUTE; a2 <= AREA_ROUTE; idx2 <= '0;
    end else begin
      v1 <= pop;
      if (pop) begin p1 <= in_pkt; a1 <= srch_area; end
      v2 <= v1 && res_valid;
      if (v1) begin
        p2 <= p1; a2 <= a1; hit2 <= res_hit; idx2 <= res_idx;
      end
    end
  end

  always_comb begin
    out_valid   = 1'b0;
    fb_valid    = 1'b0;
    upd_valid   = 1'b0;
    cache_hit   = 1'b0;
    home_search = 1'b0;
    out_res     = '{ts: p2.ts, ip: p2.ip, found: hit2, nh: hit2 ? rda_data.nh : '0, dropped: 1'b0};
    fb_pkt      = p2;
    upd_idx     = idx2;
    upd_ip      = p2.ip;
    if (v2) begin
      if (a2 == AREA_ROUTE) begin
        out_valid   = 1'b1;
        home_search = 1'b1;
        upd_valid   = hit2 && (int'(p2.miss) > MISS_LIMIT);
      end else if (hit2) begin
        out_valid = 1'b1;
        cache_hit = 1'b1;
      end else begin
        fb_valid = 1'b1;
      end
    end
  end

endmodule
