// assoc_sram: the SRAM associated with one TCAM chip.
//
// Entry i holds what the control plane knows about TCAM word i: the prefix
// itself, its length, a "parent" flag (the prefix has more specific routes
// in the table) and the next hop. A TCAM returns only a match index, so the
// engine reads this SRAM to get the next hop (lookup port A) and, when it
// refreshes the logical caches of other chips, to recover prefixes (port B).
//
// Timing: one write port, two read ports, each read registered: address in
// cycle t, data in cycle t+1. Valid bits are cleared by reset; the payload
// is not reset. Contents and purpose follow the scheme; the dual read port
// is this design's choice so that cache refills do not steal lookup cycles.
module assoc_sram
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  idx_t        wr_idx,
  input  sram_entry_t wr_data,
  input  logic        rda_en,
  input  idx_t        rda_idx,
  output sram_entry_t rda_data,
  input  logic        rdb_en,
  input  idx_t        rdb_idx,
  output sram_entry_t rdb_data
);

  logic [DEPTH-1:0] vld;
  sram_entry_t      mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en && int'(wr_idx) < DEPTH) vld[wr_idx] <= wr_data.valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_idx) < DEPTH) mem[wr_idx] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rda_data <= '0;
      rdb_data <= '0;
    end else begin
      if (rda_en) begin
        rda_data       <= (int'(rda_idx) < DEPTH) ? mem[rda_idx] : '0;
        rda_data.valid <= (int'(rda_idx) < DEPTH) && vld[rda_idx];
      end
      if (rdb_en) begin
        rdb_data       <= (int'(rdb_idx) < DEPTH) ? mem[rdb_idx] : '0;
        rdb_data.valid <= (int'(rdb_idx) < DEPTH) && vld[rdb_idx];
      end
    end
  end

endmodule
