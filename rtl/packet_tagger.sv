// packet_tagger: turns indexed addresses into lookup packages.
//
// Each valid lane leaving the indexing logic gets a package: the address,
// its home chip, a cache-miss counter of 0 and a time stamp. Time stamps
// are handed out in lane order (lane 0 first) from a free-running counter,
// so they record the arrival order that the re-ordering logic restores.
// `next_ts` is the stamp the next package will get; together with the
// re-order buffer's head it tells how many lookups are in flight.
//
// Timing: one register stage, LANES packages per cycle, no stall.
// The package fields follow the scheme; the lane-order stamping is this
// design's choice.
module packet_tagger
  import tcam_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid[LANES],
  input  ip_t   in_ip   [LANES],
  input  chip_t in_home [LANES],
  output logic  out_valid[LANES],
  output pkt_t  out_pkt  [LANES],
  output ts_t   next_ts
);

  ts_t ts_lane[LANES];
  ts_t ts_n;
  always_comb begin
    ts_n = next_ts;
    for (int l = 0; l < LANES; l++) begin
      ts_lane[l] = ts_n;
      if (in_valid[l]) ts_n = ts_n + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_ts <= '0;
      for (int l = 0; l < LANES; l++) begin
        out_valid[l] <= 1'b0;
        out_pkt[l]   <= '0;
      end
    end else begin
      next_ts <= ts_n;
      for (int l = 0; l < LANES; l++) begin
        out_valid[l]     <= in_valid[l];
        out_pkt[l].ip    <= in_ip[l];
        out_pkt[l].home  <= in_home[l];
        out_pkt[l].miss  <= '0;
        out_pkt[l].ts    <= ts_lane[l];
      end
    end
  end

endmodule
