// cache_update_ctrl: refills the logical caches after a persistent miss.
//
// A package whose cache-miss counter exceeded the limit is resolved on its
// home chip; the home search unit then raises a request with the matched
// index and the address. The controller takes one request at a time
// (requests arriving while it is busy are ignored and counted on
// req_ignored) and:
//   1. reads, through the home chip's second SRAM port, the matched word and
//      up to ADJ neighbouring words of the Route Entry Part (ADJ/2 below,
//      the rest above, clipped to the part);
//   2. turns them into cache entries. The matched prefix is cached as it is
//      if it has no more specific routes; if it is a parent prefix it is
//      cached as the /32 host entry of the address, which is always
//      disjoint from more specific routes. Neighbours that are parent
//      prefixes or empty are skipped;
//   3. writes the entries into every other chip, one chip after the other,
//      one entry per cycle, each at that chip's cache indicator (WR_ALLOC).
//      Only the chip being written pauses its searches, so N-1 chips keep
//      looking up during a refill. The home chip is never written.
// A chip whose write port is taken by the host (wr_stall) delays the write.
//
// Timing: request accepted in the IDLE cycle; reads take one cycle per word
// plus one; then one cycle per entry per other chip.
// What is refilled, where and in what order follows the scheme; the choice
// of neighbours (centred on the match) and the /32 expansion of parent
// prefixes are this design's, standing in for the minimal-expansion prefix
// that needs the control plane's route trie.
module cache_update_ctrl
  import tcam_pkg::*;
#(
  parameter int unsigned N_CHIPS = 4,
  parameter int unsigned ADJ     = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid [N_CHIPS],
  input  idx_t        req_idx   [N_CHIPS],
  input  ip_t         req_ip    [N_CHIPS],
  input  idx_t        entry_ind [N_CHIPS],
  // SRAM port B of every chip
  output logic        rdb_en    [N_CHIPS],
  output idx_t        rdb_idx,
  input  sram_entry_t rdb_data  [N_CHIPS],
  // chip write ports
  output logic        wr_en     [N_CHIPS],
  output chip_wr_t    wr,
  input  logic        wr_stall  [N_CHIPS],
  // status
  output logic        busy,
  output logic        req_ignored,
  output logic        chip_done    // a chip's refill finished this cycle
);

  localparam int unsigned NBUF = ADJ + 1;
  localparam int unsigned BUF_W = $clog2(NBUF + 1);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN, S_WRITE} state_e;
  state_e state;

  chip_t home;
  idx_t  midx, j, hi;
  ip_t   mip;
  logic  cap_v;
  idx_t  cap_j;
  tcam_entry_t tbuf [NBUF];
  sram_entry_t sbuf [NBUF];
  logic [BUF_W-1:0] nbuf, k;
  chip_t tgt;

  // first chip after `from` (exclusive) that is not the home chip
  function automatic logic [CHIP_W:0] next_tgt(input int from, input chip_t h);
    logic [CHIP_W:0] r;
    r = '1;
    for (int c = N_CHIPS - 1; c > from; c--)
      if (c != int'(h)) r = (CHIP_W + 1)'(c);
    return r;
  endfunction

  // request selection
  logic  any_req;
  chip_t sel;
  always_comb begin
    any_req = 1'b0;
    sel     = '0;
    for (int c = N_CHIPS - 1; c >= 0; c--)
      if (req_valid[c]) begin any_req = 1'b1; sel = chip_t'(c); end
  end

  // count requests that cannot be taken this cycle
  always_comb begin
    int n;
    n = 0;
    for (int c = 0; c < N_CHIPS; c++) if (req_valid[c]) n++;
    req_ignored = (state != S_IDLE) ? (n > 0) : (n > 1);
  end

  assign busy = state != S_IDLE;

  always_comb begin
    for (int c = 0; c < N_CHIPS; c++) begin
      rdb_en[c] = (state == S_READ) && (c == int'(home));
      wr_en[c]  = (state == S_WRITE) && (c == int'(tgt)) && !wr_stall[c] && (nbuf != 0);
    end
    rdb_idx   = j;
    wr.op     = WR_ALLOC;
    wr.idx    = '0;
    wr.tentry = tbuf[k];
    wr.sentry = sbuf[k];
  end

  // expansion of a captured SRAM word into a cache entry
  sram_entry_t d;
  logic        keep;
  tcam_entry_t te;
  sram_entry_t se;
  always_comb begin
    d    = rdb_data[home];
    keep = 1'b0;
    te   = '{valid: 1'b1, value: d.prefix, mask: prefix_mask(d.plen)};
    se   = d;
    se.parent = 1'b0;
    se.valid  = 1'b1;
    if (cap_j == midx) begin
      keep = 1'b1;
      if (d.parent) begin
        te = '{valid: 1'b1, value: mip, mask: '1};
        se.prefix = mip;
        se.plen   = PLEN_W'(IP_W);
      end
    end else begin
      keep = d.valid && !d.parent;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      home  <= '0; midx <= '0; j <= '0; hi <= '0; mip <= '0;
      cap_v <= 1'b0; cap_j <= '0; nbuf <= '0; k <= '0; tgt <= '0;
      chip_done <= 1'b0;
    end else begin
      chip_done <= 1'b0;
      cap_v <= (state == S_READ);
      cap_j <= j;
      if (cap_v && keep && int'(nbuf) < NBUF) begin
        tbuf[nbuf] <= te;
        sbuf[nbuf] <= se;
        nbuf       <= nbuf + 1'b1;
      end
      unique case (state)
        S_IDLE: if (any_req) begin
          automatic int lo = int'(req_idx[sel]) - int'(ADJ / 2);
          automatic int h  = int'(req_idx[sel]) + int'(ADJ - ADJ / 2);
          if (lo < 0) lo = 0;
          if (h > int'(entry_ind[sel]) - 1) h = int'(entry_ind[sel]) - 1;
          if (h < int'(req_idx[sel])) h = int'(req_idx[sel]);
          home  <= sel;
          midx  <= req_idx[sel];
          mip   <= req_ip[sel];
          j     <= idx_t'(lo);
          hi    <= idx_t'(h);
          nbuf  <= '0;
          state <= S_READ;
        end
        S_READ: begin
          j <= j + 1'b1;
          if (j == hi) state <= S_DRAIN;
        end
        S_DRAIN: begin
          automatic logic [CHIP_W:0] f = next_tgt(-1, home);
          k <= '0;
          if (f[CHIP_W]) state <= S_IDLE;
          else begin tgt <= f[CHIP_W-1:0]; state <= S_WRITE; end
        end
        S_WRITE: begin
          if (nbuf == 0) state <= S_IDLE;
          else if (!wr_stall[tgt]) begin
            if (k == nbuf - 1'b1) begin
              automatic logic [CHIP_W:0] f = next_tgt(int'(tgt), home);
              k <= '0;
              chip_done <= 1'b1;
              if (f[CHIP_W]) state <= S_IDLE;
              else tgt <= f[CHIP_W-1:0];
            end else begin
              k <= k + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
