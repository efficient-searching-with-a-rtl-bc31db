// tcam_array: one TCAM chip of the lookup engine.
//
// DEPTH ternary words, each a value/mask pair with a valid bit. A search
// compares the key with every word at once and returns the lowest matching
// index (the usual TCAM priority), but only inside one area of the chip:
//   AREA_ROUTE : indices below `boundary` (the Route Entry Part, used when
//                the chip is the package's home chip);
//   AREA_CACHE : indices at or above `boundary` (the variant and fixed cache
//                parts, used for packages from other partitions).
// `boundary` is the chip's entry indicator. The chip is split into BLOCKS
// equal blocks; `blk_en` reports which blocks a search triggered, i.e. the
// blocks that overlap the searched area (the partition-disable feature used
// to save power).
//
// Timing: one write port and one search port. A search issued in cycle t
// returns hit/idx/blk_en registered in cycle t+1. A write in the same cycle
// as a search is not seen by that search.
//
// The three-part chip organisation and the area-restricted search follow
// the scheme; the block count (8) and the lowest-index priority are this
// design's choices. Entry ordering inside the Route Entry Part (longer
// prefixes at lower indices) is the job of the control software writing it.
module tcam_array
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH  = 32768,
  parameter int unsigned BLOCKS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // write port
  input  logic        wr_en,
  input  idx_t        wr_idx,
  input  tcam_entry_t wr_entry,
  // search port
  input  logic        srch_en,
  input  ip_t         srch_key,
  input  area_e       srch_area,
  input  idx_t        boundary,
  output logic        res_valid,
  output logic        res_hit,
  output idx_t        res_idx,
  output logic [BLOCKS-1:0] blk_en
);

  localparam int unsigned BLK_SIZE = DEPTH / BLOCKS;

  logic [DEPTH-1:0] valid;
  ip_t              value [DEPTH];
  ip_t              mask  [DEPTH];

  initial begin
    assert (DEPTH % BLOCKS == 0) else $error("DEPTH must be a multiple of BLOCKS");
    assert (DEPTH < 2**IDX_W) else $error("DEPTH too large for IDX_W");
  end

  // storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (wr_en && int'(wr_idx) < DEPTH) valid[wr_idx] <= wr_entry.valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_idx) < DEPTH) begin
      value[wr_idx] <= wr_entry.value;
      mask[wr_idx]  <= wr_entry.mask;
    end
  end

  // search: lowest matching index inside the selected area
  logic found_d;
  idx_t idx_d;
  always_comb begin
    found_d = 1'b0;
    idx_d   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && (((srch_key ^ value[i]) & mask[i]) == '0) &&
          ((srch_area == AREA_ROUTE) ? (i < int'(boundary)) : (i >= int'(boundary)))) begin
        found_d = 1'b1;
        idx_d   = idx_t'(i);
      end
    end
  end

  // blocks overlapping the searched area
  logic [BLOCKS-1:0] blk_d;
  always_comb begin
    for (int b = 0; b < BLOCKS; b++) begin
      if (srch_area == AREA_ROUTE) blk_d[b] = (b * BLK_SIZE) < int'(boundary);
      else                         blk_d[b] = ((b + 1) * BLK_SIZE) > int'(boundary);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_idx   <= '0;
      blk_en    <= '0;
    end else begin
      res_valid <= srch_en;
      if (srch_en) begin
        res_hit <= found_d;
        res_idx <= idx_d;
        blk_en  <= blk_d;
      end else begin
        blk_en  <= '0;
      end
    end
  end

endmodule
