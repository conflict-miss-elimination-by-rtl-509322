// Shared types and constants of the time-stride prefetch (TSP) memory system.
//
// Addresses are 32-bit byte addresses. The L1 cache and the miss prefetch
// buffer (MPB) both use 32-byte lines, so everything below the L1 works on
// 27-bit line addresses and 256-bit lines. The data word seen by the
// processor is 32 bits. The address size and the L1 line size follow the
// evaluated configuration; the word size is this design's choice.
package tsp_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned OFFSET_W    = $clog2(LINE_BYTES);
  localparam int unsigned LINE_ADDR_W = ADDR_W - OFFSET_W;
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);
  localparam int unsigned STAT_W      = 32;

  typedef logic [ADDR_W-1:0]      addr_t;
  typedef logic [WORD_W-1:0]      word_t;
  typedef logic [LINE_ADDR_W-1:0] line_addr_t;
  typedef logic [LINE_W-1:0]      line_t;

  // Event counters of the whole system, all counting since reset.
  typedef struct packed {
    logic [STAT_W-1:0] accesses;        // processor requests served
    logic [STAT_W-1:0] l1_hits;         // requests that hit in L1 on first lookup
    logic [STAT_W-1:0] l1_misses;       // L1 misses (each one sent to the MHT)
    logic [STAT_W-1:0] mpb_hits;        // L1 misses served from the MPB
    logic [STAT_W-1:0] l2_fetches;      // L1 misses served from L2
    logic [STAT_W-1:0] strides_found;   // misses whose address was in the MHT
    logic [STAT_W-1:0] sched_optimal;   // requests placed in the optimal PRT entry
    logic [STAT_W-1:0] sched_displaced; // placed in another empty window entry
    logic [STAT_W-1:0] sched_override;  // window full: an old request overwritten
    logic [STAT_W-1:0] pf_issued;       // prefetches taken by the prefetcher
    logic [STAT_W-1:0] pf_dropped;      // prefetches lost because its queue was full
    logic [STAT_W-1:0] pf_filled;       // prefetched lines written into the MPB
    logic [STAT_W-1:0] pf_stale;        // prefetched lines discarded after a store
    logic [STAT_W-1:0] writes;          // stores written through to L2
  } tsp_stats_t;

endpackage
