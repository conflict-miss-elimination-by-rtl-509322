// Memory system with time-stride prefetching: top level.
//
// Wires the L1 cache, the miss prefetch buffer (MPB) on its refill path and
// the time-stride prefetch (TSP) engine together, and counts events. The
// processor and the L2 cache are outside: their channels are the ports.
//
//   processor <-> l1_cache --miss line address--> tsp (MHT, scheduler, PRT,
//                    ^   \                              prefetcher)
//                    |    `--demand reads, stores--> L2     |
//                   mpb <------ prefetched lines -----------'  (from L2)
//
// Interface and timing: see l1_cache for the processor channel and the L2
// demand and store channels, and prefetcher for the L2 prefetch channel. The
// L2 channels are kept apart here; the described system shares one bus. All
// counters in `stats` reset to zero and count one-cycle events.
// The block structure follows the described system; the separate L2 channels
// and the statistics are this design's choices.
module tsp_system
  import tsp_pkg::*;
#(
  parameter int unsigned L1_BYTES = 32768,
  parameter int unsigned MHT_SIZE = 1024,
  parameter int unsigned MPB_SIZE = 8,
  parameter int unsigned PF_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // processor
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_we,
  input  addr_t      req_addr,
  input  word_t      req_wdata,
  output logic       resp_valid,
  output word_t      resp_rdata,
  // L2 demand reads
  output logic       l2_rd_req_valid,
  input  logic       l2_rd_req_ready,
  output line_addr_t l2_rd_req_addr,
  input  logic       l2_rd_resp_valid,
  input  line_t      l2_rd_resp_data,
  // L2 stores
  output logic       l2_wr_valid,
  input  logic       l2_wr_ready,
  output addr_t      l2_wr_addr,
  output word_t      l2_wr_data,
  // L2 prefetch reads
  output logic       l2_pf_req_valid,
  input  logic       l2_pf_req_ready,
  output line_addr_t l2_pf_req_addr,
  input  logic       l2_pf_resp_valid,
  input  line_t      l2_pf_resp_data,
  // statistics
  output tsp_stats_t stats
);

  line_addr_t mpb_addr, miss_addr, snoop_addr, fill_addr;
  logic       mpb_hit, miss_valid, snoop_valid, fill_valid;
  line_t      mpb_data, fill_data;
  logic       ev_hit, ev_mpb_hit, ev_l2_fetch;
  logic       ev_stride_found, ev_sched_optimal, ev_sched_displaced, ev_sched_override;
  logic       ev_pf_issued, ev_pf_dropped, ev_pf_stale;

  l1_cache #(.SIZE_BYTES(L1_BYTES)) u_l1 (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .resp_valid, .resp_rdata,
    .mpb_addr, .mpb_hit, .mpb_data,
    .miss_valid, .miss_addr,
    .rd_req_valid (l2_rd_req_valid), .rd_req_ready(l2_rd_req_ready),
    .rd_req_addr  (l2_rd_req_addr),
    .rd_resp_valid(l2_rd_resp_valid), .rd_resp_data(l2_rd_resp_data),
    .wr_valid(l2_wr_valid), .wr_ready(l2_wr_ready),
    .wr_addr (l2_wr_addr),  .wr_data (l2_wr_data),
    .snoop_valid, .snoop_addr,
    .ev_hit, .ev_mpb_hit, .ev_l2_fetch
  );

  mpb #(.ENTRIES(MPB_SIZE)) u_mpb (
    .clk, .rst_n,
    .lookup_addr(mpb_addr), .lookup_hit(mpb_hit), .lookup_data(mpb_data),
    .fill_valid, .fill_addr, .fill_data,
    .inv_valid(snoop_valid), .inv_addr(snoop_addr)
  );

  tsp #(.N(MHT_SIZE), .MPB_SIZE(MPB_SIZE), .PF_DEPTH(PF_DEPTH)) u_tsp (
    .clk, .rst_n,
    .miss_valid, .miss_addr,
    .pf_req_valid (l2_pf_req_valid), .pf_req_ready(l2_pf_req_ready),
    .pf_req_addr  (l2_pf_req_addr),
    .pf_resp_valid(l2_pf_resp_valid), .pf_resp_data(l2_pf_resp_data),
    .snoop_valid, .snoop_addr,
    .fill_valid, .fill_addr, .fill_data,
    .ev_stride_found, .ev_sched_optimal, .ev_sched_displaced, .ev_sched_override,
    .ev_pf_issued, .ev_pf_dropped, .ev_pf_stale
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      if (resp_valid)         stats.accesses        <= stats.accesses + 1'b1;
      if (ev_hit)             stats.l1_hits         <= stats.l1_hits + 1'b1;
      if (miss_valid)         stats.l1_misses       <= stats.l1_misses + 1'b1;
      if (ev_mpb_hit)         stats.mpb_hits        <= stats.mpb_hits + 1'b1;
      if (ev_l2_fetch)        stats.l2_fetches      <= stats.l2_fetches + 1'b1;
      if (ev_stride_found)    stats.strides_found   <= stats.strides_found + 1'b1;
      if (ev_sched_optimal)   stats.sched_optimal   <= stats.sched_optimal + 1'b1;
      if (ev_sched_displaced) stats.sched_displaced <= stats.sched_displaced + 1'b1;
      if (ev_sched_override)  stats.sched_override  <= stats.sched_override + 1'b1;
      if (ev_pf_issued)       stats.pf_issued       <= stats.pf_issued + 1'b1;
      if (ev_pf_dropped)      stats.pf_dropped      <= stats.pf_dropped + 1'b1;
      if (fill_valid)         stats.pf_filled       <= stats.pf_filled + 1'b1;
      if (ev_pf_stale)        stats.pf_stale        <= stats.pf_stale + 1'b1;
      if (l2_wr_valid && l2_wr_ready) stats.writes  <= stats.writes + 1'b1;
    end
  end

endmodule
