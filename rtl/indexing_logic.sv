// indexing_logic: finds the home TCAM chip of each incoming address.
//
// The address space is cut into N_RANGES contiguous ranges, one per route
// partition. Each range has a pair of boundary registers (low, high) and a
// comparator pair; an index table maps the range to the chip that holds
// that partition. Two pipeline stages, no stall:
//   stage 1: every lane compares its address with all boundary pairs and
//            registers the hit vector;
//   stage 2: an encoder turns the hit vector into a range number (lowest
//            hit wins; no hit gives range 0) and the index table gives the
//            chip number.
// LANES addresses enter per cycle; results leave two cycles later.
// Boundaries and table entries are written through the cfg port, e.g. after
// the route table has been re-partitioned. At reset the ranges split the
// address space evenly and range r maps to chip r.
//
// The comparator pairs, boundary registers and index table follow the
// scheme; the number of lanes, the reset values and the no-hit rule are
// this design's choices.
module indexing_logic
  import tcam_pkg::*;
#(
  parameter int unsigned LANES    = 4,
  parameter int unsigned N_RANGES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid [LANES],
  input  ip_t   in_ip    [LANES],
  output logic  out_valid[LANES],
  output ip_t   out_ip   [LANES],
  output chip_t out_home [LANES],
  // configuration
  input  logic  cfg_we,
  input  chip_t cfg_range,
  input  ip_t   cfg_low,
  input  ip_t   cfg_high,
  input  chip_t cfg_chip
);

  ip_t   lo_q  [N_RANGES];
  ip_t   hi_q  [N_RANGES];
  chip_t tab_q [N_RANGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_RANGES; r++) begin
        lo_q[r]  <= ip_t'((64'(r) << IP_W) / N_RANGES);
        hi_q[r]  <= ip_t'(((64'(r + 1) << IP_W) / N_RANGES) - 1);
        tab_q[r] <= chip_t'(r);
      end
    end else if (cfg_we && int'(cfg_range) < N_RANGES) begin
      lo_q[cfg_range]  <= cfg_low;
      hi_q[cfg_range]  <= cfg_high;
      tab_q[cfg_range] <= cfg_chip;
    end
  end

  // stage 1: parallel compare
  logic                v1  [LANES];
  ip_t                 ip1 [LANES];
  logic [N_RANGES-1:0] hit1[LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        v1[l] <= 1'b0; ip1[l] <= '0; hit1[l] <= '0;
      end
    end else begin
      for (int l = 0; l < LANES; l++) begin
        v1[l]  <= in_valid[l];
        ip1[l] <= in_ip[l];
        for (int r = 0; r < N_RANGES; r++)
          hit1[l][r] <= (in_ip[l] >= lo_q[r]) && (in_ip[l] <= hi_q[r]);
      end
    end
  end

  // stage 2: encoder and index table
  chip_t home2[LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      home2[l] = tab_q[0];
      for (int r = N_RANGES - 1; r >= 0; r--)
        if (hit1[l][r]) home2[l] = tab_q[r];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        out_valid[l] <= 1'b0; out_ip[l] <= '0; out_home[l] <= '0;
      end
    end else begin
      for (int l = 0; l < LANES; l++) begin
        out_valid[l] <= v1[l];
        out_ip[l]    <= ip1[l];
        out_home[l]  <= home2[l];
      end
    end
  end

endmodule
