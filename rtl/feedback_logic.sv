// feedback_logic: returns cache-missed packages to the load balancer.
//
// Every chip can report one package per cycle that missed in its logical
// cache. Each is registered with its cache-miss counter raised by one
// (saturating at the counter's maximum) and offered to the load balancer
// on the next cycle, ahead of new packages.
//
// Timing: one register stage, N_CHIPS packages per cycle, no stall.
// Incrementing the counter on the way back follows the scheme.
module feedback_logic
  import tcam_pkg::*;
#(
  parameter int unsigned N_CHIPS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [N_CHIPS],
  input  pkt_t in_pkt   [N_CHIPS],
  output logic out_valid[N_CHIPS],
  output pkt_t out_pkt  [N_CHIPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CHIPS; c++) begin
        out_valid[c] <= 1'b0;
        out_pkt[c]   <= '0;
      end
    end else begin
      for (int c = 0; c < N_CHIPS; c++) begin
        out_valid[c] <= in_valid[c];
        out_pkt[c]   <= in_pkt[c];
        if (in_pkt[c].miss != '1) out_pkt[c].miss <= in_pkt[c].miss + 1'b1;
      end
    end
  end

endmodule
