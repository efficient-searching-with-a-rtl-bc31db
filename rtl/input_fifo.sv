// input_fifo: the input queue in front of one TCAM chip.
//
// Holds up to DEPTH packages. Several packages may be pushed in one cycle
// (push_valid is a bit per push port; set ports are stored in port order)
// and one may be popped. The head is shown ahead (out_valid/out_pkt).
// `count` is the fill level the load balancer uses to find the idlest
// queue. Pushing beyond the free space is a protocol error, flagged by an
// assertion; the load balancer never does it.
//
// Timing: pushes and pop take effect at the clock edge; a package pushed in
// cycle t can be popped in cycle t+1. Reset empties the queue.
// The depth of 10 follows the scheme; multi-port push is this design's
// choice, so that one chip can receive several packages per cycle.
module input_fifo
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH  = 10,
  parameter int unsigned N_PUSH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PUSH-1:0] push_valid,
  input  pkt_t              push_pkt [N_PUSH],
  input  logic              pop,
  output logic              out_valid,
  output pkt_t              out_pkt,
  output logic [7:0]        count
);

  pkt_t mem [DEPTH];
  int unsigned rd_q;

  assign out_valid = count != 0;
  assign out_pkt   = mem[rd_q];

  // slot of each push port: pushes are packed behind the current tail
  int unsigned slot [N_PUSH];
  int unsigned n_push;
  always_comb begin
    n_push = 0;
    for (int p = 0; p < N_PUSH; p++) begin
      slot[p] = (rd_q + int'(count) + n_push) % DEPTH;
      if (push_valid[p]) n_push++;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PUSH; p++)
      if (push_valid[p]) mem[slot[p]] <= push_pkt[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= 0;
      count <= '0;
    end else begin
      automatic int unsigned did_pop = (pop && count != 0) ? 1 : 0;
      rd_q  <= (rd_q + did_pop) % DEPTH;
      count <= 8'(int'(count) + n_push - did_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (int'(count) + $countones(push_valid) <= DEPTH)
      else $error("input_fifo overflow");
  end

endmodule
