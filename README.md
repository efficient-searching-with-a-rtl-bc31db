# Parallel TCAM IP-lookup engine with logical caches

A single TCAM answers one longest-prefix-match lookup per clock. That is not
enough for a fast backbone link. This engine spreads IPv4 lookups over
several TCAM chips (four by default) and can finish up to one lookup per
chip per cycle.

The route table is cut into as many address ranges as there are chips. Each
chip holds one range, its *partition*. A lookup could simply go to the chip
that owns its address, but bursty traffic would then pile up on one chip.
The engine therefore treats every TCAM word not taken by the partition as a
**logical cache** of routes from the other partitions. A lookup can go to
whichever chip has the shortest queue:

* On its **home chip**, the chip owning its address range, it searches the
  partition and always gets a final answer.
* On **any other chip**, it searches that chip's cache. A hit is final. A
  miss sends the lookup back to the load balancer with a miss counter
  raised by one.
* Once the counter exceeds a limit (3), the lookup is forced to its home
  chip. The route it finds there, and up to 10 neighbouring routes, are then
  copied into the caches of all the other chips, one chip at a time. Only
  one chip at a time stops searching during such a refill.

Results are put back into arrival order before they leave the engine.

The RTL follows the scheme described in "Efficient Searching with a
TCAM-based Parallel Architecture". The sections below say where it makes
its own choices.

## How a lookup moves through the engine

```
in_ip[0..3] ─► indexing_logic ─► packet_tagger ─► load_balancer ─► input_fifo[c] ─► search_unit[c] ─► reorder_buffer ─► out_res[0..3]
                (home chip)       (ts, miss=0)        ▲                               │   ▲   tcam_chip[c]
                                                      │                               │   └── (TCAM + SRAM + indicators)
                                                      └──── feedback_logic ◄── miss ──┤
                                                                                      └── persistent miss resolved at home
                                                                                          ─► cache_update_ctrl ─► other chips' caches
```

| stage | module | cycles | what happens |
|---|---|---|---|
| 1 | `indexing_logic` | 2 | Compares the address with a low/high boundary register pair per range. An index table turns the matching range into the home chip number. |
| 2 | `packet_tagger` | 1 | Builds the *package* `{ip, home, miss=0, ts}`. The time stamp `ts` records the arrival order. |
| 3 | `load_balancer` | 0 | Picks a FIFO for each package. Fed-back packages are placed before new ones. |
| 4 | `input_fifo` | 1 | One queue of 10 packages per chip. It takes several pushes per cycle and gives one pop. |
| 5 | `search_unit` + `tcam_chip` | 2 | TCAM search in the allowed area of the chip, then an SRAM read of the next hop. |
| 6 | `reorder_buffer` | 1 | One slot per time stamp. Up to four results leave per cycle, in stamp order. |

An idle engine returns a result 7 clock edges after the edge that accepted
the address. `LANES`=4 addresses can enter per cycle, so the peak rate is 4
lookups per cycle. At 266 MHz that is 1.064 G lookups/s.

## Balancing rules

For every package, in this order:

1. If its miss counter is **greater than** `MISS_LIMIT`, it goes to its home
   FIFO.
2. Otherwise it goes to the FIFO with the fewest entries. Packages already
   placed in the same cycle count towards those levels.
3. On a tie, the home FIFO wins if it is among the tied FIFOs.
4. Otherwise one of the tied FIFOs is chosen at random. A 16-bit LFSR picks
   where a circular scan starts.

If the chosen FIFO is full, the package is **dropped**. It still takes its
place in the output stream, with `dropped=1` and `found=0`, so the re-order
buffer never waits for it. FIFO depth trades drops against waiting time.

A miss on a non-home chip goes through `feedback_logic`. That stage adds 1
to the counter (it stops at 7) and offers the package again one cycle later.

## Inside a chip: partition, variant cache and fixed cache

```
index 0                      entry_ind              DEPTH-FIXED            DEPTH-1
  | Route Entry Part (partition) | variant cache part    | fixed cache part    |
  |  searched by home packages   |<--- searched by packages from other ranges -->|
```

`tcam_chip` combines three parts:

* `tcam_array`: ternary words with first-match priority.
* `assoc_sram`: per word, the prefix, its length, a *parent* flag and the
  next hop. The parent flag means the table holds more specific routes
  under this prefix.
* `chip_indicators`: two registers.
  * The **entry indicator** is the size of the Route Entry Part. It is also
    the border used by every search:
    * a home search only matches words below it;
    * a cache search only matches words at or above it.
  * The **cache indicator** is where the next refill entry is written. It
    climbs by one per refill write. When it reaches the top of the chip it
    goes back to the entry indicator, so refills replace the oldest cache
    entries first.

How the indicators change:

* Route writes grow the partition upward into the variant cache part and
  overwrite any cache words there. If the cache indicator falls below the
  entry indicator, it is raised to it.
* A route write into the top `FIXED` words is refused (`host_reject`).
* When the partition reaches `DEPTH-FIXED` words, `reconstruct_req` rises.
  Control software must then re-partition the table. It reloads the chips
  and resets both indicators with a `WR_SETIND` write.

The fixed cache part means at least `FIXED` words of cache always remain.

Power: each chip is split into `BLOCKS` blocks. `blk_en[c]` shows which
blocks the last search of chip `c` used. A home search uses only the blocks
below the border. A cache search uses only the blocks from the border up.
A block that straddles the border is used by both. `chip_active[c]` shows
which chips searched in a cycle.

## Cache refill (the part that needs most care)

`cache_update_ctrl` handles one refill at a time. A request comes from a
home search by a package whose miss counter exceeded the limit, and whose
search hit. Requests that arrive while a refill is running are ignored.

1. **Read.** Through the home chip's second SRAM port, the controller reads
   the matched word and the `ADJ`=10 words around it: 5 below and 5 above,
   clipped to the Route Entry Part. That takes one cycle per word, plus one.
2. **Make cache entries.** A cache may only hold prefixes that cannot hide a
   more specific route. Otherwise a later lookup would hit the shorter
   prefix in the cache and get the wrong next hop.
   * A matched prefix that is **not** a parent is cached as it is.
   * A matched prefix that **is** a parent is cached as the /32 host route
     of the looked-up address.
   * Neighbours that are parents or empty words are skipped.
3. **Write.** The entries go to every chip except the home chip, one chip
   after the other, one entry per cycle. Each entry lands at that chip's
   cache indicator (`WR_ALLOC`). Only the chip being written pauses its
   searches, so `N_CHIPS-1` chips keep serving lookups. A host write to the
   same chip in the same cycle wins, and the refill waits.

The described scheme caches the *minimal expansion prefix* of the match.
That is the shortest extension of the prefix that contains no more specific
route. Computing it needs the control plane's route trie. The /32
expansion is always correct but covers less address space, so traffic
behind parent prefixes gets a lower hit rate than the scheme intends.

## Control-plane interface

Everything that needs the whole route table is done by control software
through these ports:

* `cfg_we`, `cfg_range`, `cfg_low`, `cfg_high`, `cfg_chip` write one
  range's boundaries and its chip into the indexing logic. At reset the
  address space is split evenly and range r belongs to chip r.
* `host_we`, `host_chip`, `host_wr` carry a `chip_wr_t` to one chip:
  * `WR_ROUTE` writes partition word `idx`. Words must be ordered so that
    longer prefixes come before the shorter prefixes that contain them.
  * `WR_CACHE` writes any word. It is used for the initial cache fill with
    other partitions' routes.
  * `WR_ALLOC` writes at the cache indicator.
  * `WR_SETIND` sets both indicators.

  Each TCAM word and SRAM word is given in full, including the parent flag.
  A write takes the chip for one cycle.
* Software also has to:
  * split the table into equal ranges;
  * write boundary-crossing prefixes into every chip they overlap;
  * keep the partition ordering during updates;
  * rebuild the partitions when `reconstruct_req` rises.

## Parameters (`lookup_engine`)

| name | default | meaning |
|---|---|---|
| `N_CHIPS` | 4 | TCAM chips, one partition each |
| `LANES` | 4 | new lookups and results per cycle |
| `DEPTH` | 32768 | words per chip (32K × 32-bit keys) |
| `FIXED` | 3276 | fixed cache words per chip (10 %); partitions may grow to 29492 words |
| `BLOCKS` | 8 | power blocks per chip |
| `FIFO_DEPTH` | 10 | input queue per chip |
| `MISS_LIMIT` | 3 | a package goes home once its miss count exceeds this |
| `ADJ` | 10 | neighbours copied with each refilled route |

Fixed widths are set in `tcam_pkg`:

* 32-bit key;
* 8-bit next hop;
* 7-bit time stamp, which gives a 128-lookup re-order window;
* 3-bit miss counter;
* 4-bit chip number, so at most 16 chips.

`in_ready` falls when accepting 4 more lookups could overflow the re-order
window.

## Files

| file | contents |
|---|---|
| `rtl/tcam_pkg.sv` | types: package, TCAM word, SRAM word, result, write command |
| `rtl/lookup_engine.sv` | top level |
| `rtl/indexing_logic.sv`, `rtl/packet_tagger.sv` | front end |
| `rtl/load_balancer.sv`, `rtl/input_fifo.sv`, `rtl/feedback_logic.sv` | balancing and queues |
| `rtl/search_unit.sv` | per-chip search pipeline and outcome decision |
| `rtl/tcam_chip.sv`, `rtl/tcam_array.sv`, `rtl/assoc_sram.sv`, `rtl/chip_indicators.sv` | one chip |
| `rtl/cache_update_ctrl.sv` | cache refill |
| `rtl/reorder_buffer.sv` | output ordering |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_lookup_engine.sv` | end-to-end test with 256-word chips |
| `tb/tb_lookup_engine_full.sv` | the same test on the default 32K-word configuration |
| `tb/tb_workload_partitions.sv` | the two evaluated table sizes (half-full and full chips) at the default configuration |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lookup_engine \
  -y rtl -y tb +libext+.sv -Irtl rtl/tcam_pkg.sv tb/tb_lookup_engine.sv
./obj_dir/Vtb_lookup_engine
```

`tb_lookup_engine_full` builds the same way. It simulates four 32K-word
chips in about 15 seconds. `tb_workload_partitions` also builds the same way
and runs in about a minute.

## What the tests show

The end-to-end test works as follows:

* It builds a random route table with nested routes, so parent prefixes
  exist, plus one boundary-crossing route.
* It programs four unequal ranges.
* It loads the partitions and pre-fills the caches.
* It checks every result against its own longest-prefix match over the
  whole table. Order is checked too; a dropped lookup only has to keep its
  place.

It runs these phases:

* an idle lookup, to check the 7-cycle latency;
* uniform random traffic;
* a small hot set, for throughput;
* bursty hot flows that all share one home chip, with a route added in the
  middle;
* filling one chip until `reconstruct_req` rises, then restoring it.

It counts each mechanism and fails if one never happens:

* cache hits, misses fed back and lookups forced home;
* home-priority ties and random picks;
* drops at a full FIFO;
* refills, cache-indicator wrap and the cache indicator raised by a route
  write;
* re-order-window backpressure and out-of-order completion;
* the reconstruct request, partition-disable blocks, and searches paused by
  writes.

Measured with 256-word chips:

* **Hot traffic:** 3.67 results per cycle with 95.5 % of searches
  succeeding. The test requires at least 0.9 × `N_CHIPS` × (success rate).
* **Uniform traffic over the whole table:** about 2.5 per cycle. The caches
  are small and keep missing, and every miss costs an extra search.

### Table sizes at full scale

`tb_workload_partitions` loads the two table sizes the scheme is evaluated
with into the default engine, using each experiment's range boundaries:

* **Half-full chips:** 16745, 16745, 16745 and 16747 routes. Each cache is
  pre-filled with 4000 routes from the other partitions.
* **Full chips:** 29491, 29491, 29491 and 29492 routes. The last chip then
  reaches its 29492-word route limit, and `reconstruct_req` must rise for
  that chip alone.

The real tables are not available. Each partition is therefore built from
disjoint /24 routes spread evenly over its range. Traffic is 85 % from 32
hot routes and 15 % from any route. Every answer is checked.

Measured over the last third of each run:

| state | cache hit rate | search success | results per cycle |
|---|---|---|---|
| half-full chips | 0.79 | 0.91 | 3.07 |
| full chips | 0.77 | 0.91 | 3.01 |

The scheme reports cache hit rates above 96 % and 90 % for these two states
on a real 1 Gbps trace. The synthetic mix here cannot reach those figures:
its random 15 % almost never hits a cache. The test therefore checks for a
cache hit rate of at least 0.7 and a search success rate of at least 0.85.

## Limits and departures

* Cache entries are not invalidated when routes change. If a more specific
  route is added under a cached prefix, the cache gives stale answers until
  the entry is overwritten. The scheme does not say how this is handled.
* A refill can copy a boundary prefix into a chip whose partition already
  holds it. This wastes a cache word but does not give a wrong answer.
* Only one refill runs at a time. Requests that arrive meanwhile are dropped
  and counted on an internal signal.
* The TCAM and its SRAM are modelled as plain registers with a full
  parallel compare. That is fine for simulation, but a real build would use
  TCAM devices or macros. Yosys's own synthesis flow does not unroll the
  32K-word search loop, so no gate count is given for the full size.
* The sweeps over queue depth and miss limit were not repeated. Both are
  parameters (`FIFO_DEPTH`, `MISS_LIMIT`), and the defaults are the chosen
  10 and 3.
* No clock frequency has been established. The 266 MHz figure is that of
  the TCAM devices the scheme assumes.
