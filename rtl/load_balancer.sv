// load_balancer: the adaptive load-balance logic in front of the chip FIFOs.
//
// Up to N_PKT packages arrive per cycle (packages fed back after a cache
// miss on the low-numbered inputs, new packages after them; earlier inputs
// are served first). For each package, in input order:
//   1. if its cache-miss counter exceeds MISS_LIMIT it goes to its home
//      chip's FIFO;
//   2. otherwise it goes to the idlest FIFO (fewest entries, counting the
//      packages already placed this cycle). If several FIFOs tie, the home
//      FIFO wins when it is among them; otherwise the winner is picked at
//      random (a 16-bit LFSR chooses where a circular scan starts).
// A package whose chosen FIFO is full is dropped and reported on
// drop_valid so the re-order buffer can release its time stamp.
//
// Timing: purely combinational from inputs and fifo_cnt to push/drop; the
// LFSR advances every cycle. push_valid[c][p] tells FIFO c to take
// package p this cycle.
//
// Both rules, the home priority and the random tie-break follow the scheme;
// the order in which same-cycle packages are placed, the LFSR and dropping
// at a full FIFO are this design's choices.
module load_balancer
  import tcam_pkg::*;
#(
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned N_PKT      = 8,
  parameter int unsigned FIFO_DEPTH = 10,
  parameter int unsigned MISS_LIMIT = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid [N_PKT],
  input  pkt_t             in_pkt   [N_PKT],
  input  logic [7:0]       fifo_cnt [N_CHIPS],
  output logic [N_PKT-1:0] push_valid [N_CHIPS],
  output logic             drop_valid [N_PKT],
  output chip_t            dest       [N_PKT],
  output logic             forced_home[N_PKT],  // rule 1 applied
  output logic             rand_pick  [N_PKT]   // random tie-break applied
);

  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb begin
    int cnt [N_CHIPS];
    int minc, start, t, c;
    logic [15:0] rbits;
    minc = 0; start = 0; t = 0; c = 0; rbits = '0;
    for (int k = 0; k < N_CHIPS; k++) begin
      cnt[k] = int'(fifo_cnt[k]);
      push_valid[k] = '0;
    end
    for (int p = 0; p < N_PKT; p++) begin
      drop_valid[p]  = 1'b0;
      forced_home[p] = 1'b0;
      rand_pick[p]   = 1'b0;
      dest[p]        = '0;
      t = int'(in_pkt[p].home);
      if (in_valid[p]) begin
        if (int'(in_pkt[p].miss) > MISS_LIMIT) begin
          forced_home[p] = 1'b1;
        end else begin
          minc = cnt[0];
          for (int k = 1; k < N_CHIPS; k++) if (cnt[k] < minc) minc = cnt[k];
          if (cnt[t] != minc) begin
            rbits = lfsr ^ (16'(p) * 16'h9E37);
            start = int'(rbits) % N_CHIPS;
            rand_pick[p] = 1'b1;
            t = start;
            for (int k = N_CHIPS - 1; k >= 0; k--) begin
              c = (start + k) % N_CHIPS;
              if (cnt[c] == minc) t = c;
            end
          end
        end
        if (cnt[t] >= FIFO_DEPTH) begin
          drop_valid[p] = 1'b1;
        end else begin
          push_valid[t][p] = 1'b1;
          cnt[t] = cnt[t] + 1;
        end
      end
      if (in_valid[p]) dest[p] = chip_t'(t);
    end
  end

endmodule
