// Time-stride prefetch (TSP) engine.
//
// Predicts conflict misses from the interval between two misses to the same
// line, counted in misses (the time-stride), and schedules a prefetch so that
// the line is waiting in the miss prefetch buffer (MPB) when it is due to miss
// again. For every miss address it, in one cycle:
//   1. writes the address into the miss history table (MHT) at head;
//   2. searches the MHT for the address's previous miss, entry `last`;
//   3. if found, takes ts = head - last and has the scheduler choose a
//      prefetch request table (PRT) entry en near head + ts - MPB_SIZE/2,
//      and stores the line address there;
//   4. issues the PRT request at head, if any, to the prefetcher.
// The MHT and PRT share the head pointer, which advances once per miss.
//
// Interface and timing:
//   miss_valid/miss_addr : L1 miss line addresses, one per cycle at most,
//                          including misses served by the MPB.
//   pf_req_* / pf_resp_* : the prefetcher's L2 channel (see prefetcher).
//   snoop_*              : stores, to discard stale prefetched lines.
//   fill_*               : write port into the MPB.
//   ev_*                 : one-cycle event pulses for the statistics.
// The steps, the shared head and the sizes (MHT and PRT of N entries, MPB of
// MPB_SIZE lines) follow the described design; N defaults to 1024, the size
// given for a 32KB L1 with 32-byte lines. The single-cycle processing of a
// miss is this design's choice.
module tsp
  import tsp_pkg::*;
#(
  parameter int unsigned N        = 1024,
  parameter int unsigned MPB_SIZE = 8,
  parameter int unsigned PF_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       miss_valid,
  input  line_addr_t miss_addr,
  output logic       pf_req_valid,
  input  logic       pf_req_ready,
  output line_addr_t pf_req_addr,
  input  logic       pf_resp_valid,
  input  line_t      pf_resp_data,
  input  logic       snoop_valid,
  input  line_addr_t snoop_addr,
  output logic       fill_valid,
  output line_addr_t fill_addr,
  output line_t      fill_data,
  output logic       ev_stride_found,
  output logic       ev_sched_optimal,
  output logic       ev_sched_displaced,
  output logic       ev_sched_override,
  output logic       ev_pf_issued,
  output logic       ev_pf_dropped,
  output logic       ev_pf_stale
);

  localparam int unsigned IDX_W = $clog2(N);

  logic [IDX_W-1:0] head, ts, en;
  logic             found, en_valid;
  logic [N-1:0]     occ;
  logic             issue_valid;
  line_addr_t       issue_addr;

  mht #(.N(N)) u_mht (
    .clk, .rst_n,
    .miss_valid, .miss_addr,
    .head, .found, .ts
  );

  tsp_scheduler #(.N(N), .MPB_SIZE(MPB_SIZE)) u_sched (
    .ts_valid (found), .ts, .head, .occ,
    .en_valid, .en,
    .optimal  (ev_sched_optimal),
    .displaced(ev_sched_displaced),
    .overwrite (ev_sched_override)
  );

  prt #(.N(N)) u_prt (
    .clk, .rst_n,
    .head,
    .advance (miss_valid),
    .wr_valid(en_valid),
    .wr_idx  (en),
    .wr_addr (miss_addr),
    .occ,
    .issue_valid, .issue_addr
  );

  prefetcher #(.DEPTH(PF_DEPTH)) u_pf (
    .clk, .rst_n,
    .issue_valid, .issue_addr,
    .issued   (ev_pf_issued),
    .dropped  (ev_pf_dropped),
    .req_valid(pf_req_valid), .req_ready(pf_req_ready), .req_addr(pf_req_addr),
    .resp_valid(pf_resp_valid), .resp_data(pf_resp_data),
    .snoop_valid, .snoop_addr,
    .fill_valid, .fill_addr, .fill_data,
    .stale    (ev_pf_stale)
  );

  assign ev_stride_found = found;

endmodule
