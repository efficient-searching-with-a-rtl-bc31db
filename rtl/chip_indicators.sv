// chip_indicators: entry indicator and cache indicator of one TCAM chip.
//
// The entry indicator counts the words of the Route Entry Part, which fills
// the chip from index 0 upward; everything above it is logical cache. Its
// largest value is MAX_ROUTE = DEPTH - FIXED, so the top FIXED words (the
// Fixed Cache Part) are always cache. The cache indicator is the index at
// which the next cache refill writes. It walks upward one word per refill
// write; when it passes the top of the chip it is set back to the entry
// indicator, so refills overwrite the oldest cache words first.
//
// Rules (one update per cycle, in this priority):
//   set_ind  : both indicators take set_val (after a re-partitioning).
//   route_wr : a route write at an index at or above the entry indicator
//              grows the part to idx+1; a write at idx >= MAX_ROUTE is
//              refused (route_reject, combinational).
//   alloc    : returns the cache indicator as alloc_idx (combinational) and
//              advances it, wrapping to the entry indicator at DEPTH.
//   After every update the cache indicator is raised to the entry indicator
//   if it fell below it. `full` is high while the entry indicator sits at
//   MAX_ROUTE: the partitions then have to be rebuilt.
// Reset value of both indicators is 0 (an empty chip, all cache).
//
// The two registers, their wrap rule and the full rule follow the scheme;
// growing the part by the written index and the reset value are this
// design's choices.
module chip_indicators
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned FIXED = 3276
) (
  input  logic clk,
  input  logic rst_n,
  input  logic route_wr,
  input  idx_t route_idx,
  output logic route_reject,
  input  logic set_ind,
  input  idx_t set_val,
  input  logic alloc,
  output idx_t alloc_idx,
  output idx_t entry_ind,
  output idx_t cache_ind,
  output logic full
);

  localparam int unsigned MAX_ROUTE = DEPTH - FIXED;

  initial assert (FIXED > 0 && FIXED < DEPTH) else $error("FIXED out of range");

  assign route_reject = route_wr && (int'(route_idx) >= MAX_ROUTE);
  assign alloc_idx    = cache_ind;
  assign full         = int'(entry_ind) >= MAX_ROUTE;

  idx_t e_n, c_n;
  always_comb begin
    e_n = entry_ind;
    c_n = cache_ind;
    if (set_ind) begin
      e_n = (int'(set_val) > MAX_ROUTE) ? idx_t'(MAX_ROUTE) : set_val;
      c_n = e_n;
    end else begin
      if (route_wr && !route_reject && route_idx >= entry_ind) e_n = route_idx + 1'b1;
      if (alloc) begin
        c_n = cache_ind + 1'b1;
        if (int'(c_n) >= DEPTH) c_n = e_n;
      end
      if (e_n > c_n) c_n = e_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entry_ind <= '0;
      cache_ind <= '0;
    end else begin
      entry_ind <= e_n;
      cache_ind <= c_n;
    end
  end

endmodule
