// tcam_pkg: types and constants shared by the parallel TCAM lookup engine.
//
// The engine spreads IPv4 longest-prefix-match lookups over several TCAM
// chips. A lookup travels through the engine as a "package": the address,
// its home chip (the chip whose route partition covers the address), a
// cache-miss counter and an arrival time stamp. The widths below are fixed
// for the whole design; the number of chips, the chip size and the queue
// depths are module parameters.
//
// The 32-bit key, the package fields and the use of an associated SRAM
// holding prefix, prefix length, a parent flag and forwarding data follow
// the scheme. The next-hop width (8 bits), the time-stamp width (7 bits,
// a 128-entry re-order window) and the chip-id width (4 bits, up to 16
// chips) are this design's own choices.
package tcam_pkg;

  localparam int unsigned IP_W     = 32;  // IPv4 search key
  localparam int unsigned NH_W     = 8;   // next-hop / output-port code
  localparam int unsigned TS_W     = 7;   // time stamp, re-order window 2**TS_W
  localparam int unsigned MISS_W   = 3;   // cache-miss counter
  localparam int unsigned CHIP_W   = 4;   // chip number
  localparam int unsigned IDX_W    = 16;  // TCAM entry index / indicator width
  localparam int unsigned PLEN_W   = 6;   // prefix length 0..32

  typedef logic [IP_W-1:0]   ip_t;
  typedef logic [NH_W-1:0]   nh_t;
  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [MISS_W-1:0] miss_t;
  typedef logic [CHIP_W-1:0] chip_t;
  typedef logic [IDX_W-1:0]  idx_t;

  // Lookup package as it moves between load balancer, FIFOs and chips.
  typedef struct packed {
    ip_t   ip;
    chip_t home;
    miss_t miss;
    ts_t   ts;
  } pkt_t;

  // One ternary TCAM word. A mask bit of 1 means "compare this bit".
  typedef struct packed {
    logic valid;
    ip_t  value;
    ip_t  mask;
  } tcam_entry_t;

  // Associated SRAM word, one per TCAM entry.
  typedef struct packed {
    logic                valid;
    ip_t                 prefix;
    logic [PLEN_W-1:0]   plen;
    logic                parent;  // prefix has more specific routes
    nh_t                 nh;
  } sram_entry_t;

  // Result of one lookup, delivered in arrival order.
  typedef struct packed {
    ts_t  ts;
    ip_t  ip;
    logic found;    // a route matched
    nh_t  nh;
    logic dropped;  // the package was lost at a full input queue
  } result_t;

  // Which part of a chip a search may hit (Route Entry Part or logical cache).
  typedef enum logic {AREA_ROUTE = 1'b0, AREA_CACHE = 1'b1} area_e;

  // Write operations on a chip.
  typedef enum logic [1:0] {
    WR_ROUTE = 2'd0,  // write a route entry; may grow the entry indicator
    WR_CACHE = 2'd1,  // write a cache entry at a given index (initial fill)
    WR_ALLOC = 2'd2,  // write a cache entry at the cache indicator and advance it
    WR_SETIND = 2'd3  // set entry and cache indicators (after reconstruction)
  } wr_op_e;

  typedef struct packed {
    wr_op_e      op;
    idx_t        idx;
    tcam_entry_t tentry;
    sram_entry_t sentry;
  } chip_wr_t;

  // Mask of a prefix of length plen.
  function automatic ip_t prefix_mask(input logic [PLEN_W-1:0] plen);
    ip_t m;
    for (int i = 0; i < IP_W; i++) m[IP_W-1-i] = (i < int'(plen));
    return m;
  endfunction

endpackage
