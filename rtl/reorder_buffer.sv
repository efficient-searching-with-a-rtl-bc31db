// reorder_buffer: the re-ordering logic at the engine's output.
//
// Packages can overtake each other (different queues, cache misses sent
// round again), so results arrive out of order. Each result is stored in
// the slot named by its time stamp. Every cycle up to N_OUT results are
// released from the head, in time-stamp order, as long as their slots are
// filled; the head then advances past them. Dropped packages also fill
// their slot (with dropped set) so that they do not block the head.
// DEPTH must equal 2**TS_W; the producer must keep fewer than DEPTH stamps
// in flight, which the engine does with `head`.
//
// Timing: a result written in cycle t can leave in cycle t+1 (registered
// outputs). N_WR write ports, N_OUT output lanes.
// Ordering by time stamp follows the scheme; the slot-per-stamp buffer and
// its size are this design's choices.
module reorder_buffer
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned N_WR  = 12,
  parameter int unsigned N_OUT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_valid [N_WR],
  input  result_t wr_res   [N_WR],
  output logic    out_valid[N_OUT],
  output result_t out_res  [N_OUT],
  output ts_t     head
);

  initial assert (DEPTH == 2**TS_W) else $error("DEPTH must be 2**TS_W");

  logic [DEPTH-1:0] done;
  result_t          mem [DEPTH];

  logic        rel [N_OUT];
  always_comb begin
    logic run;
    run = 1'b1;
    for (int k = 0; k < N_OUT; k++) begin
      run    = run && done[ts_t'(head + ts_t'(k))];
      rel[k] = run;
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < N_WR; w++)
      if (wr_valid[w]) mem[wr_res[w].ts] <= wr_res[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
      head <= '0;
      for (int k = 0; k < N_OUT; k++) begin
        out_valid[k] <= 1'b0;
        out_res[k]   <= '0;
      end
    end else begin
      automatic ts_t h = head;
      for (int k = 0; k < N_OUT; k++) begin
        out_valid[k] <= rel[k];
        out_res[k]   <= mem[ts_t'(head + ts_t'(k))];
        if (rel[k]) begin
          done[ts_t'(head + ts_t'(k))] <= 1'b0;
          h = h + 1'b1;
        end
      end
      head <= h;
      for (int w = 0; w < N_WR; w++)
        if (wr_valid[w]) done[wr_res[w].ts] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) for (int w = 0; w < N_WR; w++)
      if (wr_valid[w]) assert (!done[wr_res[w].ts]) else $error("reorder_buffer: slot written twice");
  end

endmodule
