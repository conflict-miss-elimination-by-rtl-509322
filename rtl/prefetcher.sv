// Prefetcher.
//
// Takes the prefetch requests issued from the prefetch request table, sends
// them to the L2 cache and writes each returned line into the miss prefetch
// buffer (MPB). Requests wait in a queue of DEPTH entries that also tracks
// those sent and not yet answered; a request that finds the queue full is
// dropped. A store seen on the snoop port marks every queued request for that
// line stale, and the line it returns is discarded rather than put in the
// MPB, so the MPB never holds data older than the L2.
//
// Interface and timing:
//   issue_valid/issue_addr   : a request, accepted (issued=1) or dropped
//                              (dropped=1) in the same cycle.
//   req_valid/req_ready/req_addr : request channel to L2, oldest unsent first.
//   resp_valid/resp_data     : L2 answers, in request order, one per cycle.
//   fill_valid/fill_addr/fill_data : combinational write port of the MPB.
//   stale                    : a returned line was discarded this cycle.
// Fetching from L2 into the MPB follows the described design. The queue,
// its depth, dropping when full, in-order answers and the stale marking are
// this design's choices.
module prefetcher
  import tsp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       issue_valid,
  input  line_addr_t issue_addr,
  output logic       issued,
  output logic       dropped,
  output logic       req_valid,
  input  logic       req_ready,
  output line_addr_t req_addr,
  input  logic       resp_valid,
  input  line_t      resp_data,
  input  logic       snoop_valid,
  input  line_addr_t snoop_addr,
  output logic       fill_valid,
  output line_addr_t fill_addr,
  output line_t      fill_data,
  output logic       stale
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  line_addr_t       addr_q  [DEPTH];
  logic [DEPTH-1:0] stale_q;
  logic [PTR_W-1:0] alloc_ptr_q, send_ptr_q, retire_ptr_q;
  logic [CNT_W-1:0] used_q, unsent_q;   // entries in use / of those not yet sent

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic retire, send;
  assign issued    = issue_valid && (used_q < CNT_W'(DEPTH));
  assign dropped   = issue_valid && !issued;
  assign req_valid = (unsent_q != '0);
  assign req_addr  = addr_q[send_ptr_q];
  assign send      = req_valid && req_ready;
  // An answer is only expected for a request already sent.
  assign retire    = resp_valid && (used_q != unsent_q);

  logic line_stale;
  assign line_stale = stale_q[retire_ptr_q] ||
                      (snoop_valid && snoop_addr == addr_q[retire_ptr_q]);
  assign fill_valid = retire && !line_stale;
  assign fill_addr  = addr_q[retire_ptr_q];
  assign fill_data  = resp_data;
  assign stale      = retire && line_stale;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stale_q      <= '0;
      alloc_ptr_q  <= '0;
      send_ptr_q   <= '0;
      retire_ptr_q <= '0;
      used_q       <= '0;
      unsent_q     <= '0;
    end else begin
      if (snoop_valid)
        for (int i = 0; i < DEPTH; i++)
          if (addr_q[i] == snoop_addr) stale_q[i] <= 1'b1;
      if (issued) begin
        addr_q[alloc_ptr_q]  <= issue_addr;
        stale_q[alloc_ptr_q] <= snoop_valid && snoop_addr == issue_addr;
        alloc_ptr_q          <= inc(alloc_ptr_q);
      end
      if (send)   send_ptr_q   <= inc(send_ptr_q);
      if (retire) retire_ptr_q <= inc(retire_ptr_q);
      used_q   <= used_q + CNT_W'(issued) - CNT_W'(retire);
      unsent_q <= unsent_q + CNT_W'(issued) - CNT_W'(send);
    end
  end

  // L2 must not answer a request that was never sent.
  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> used_q != unsent_q)
    else $error("prefetcher: L2 answer without an outstanding request");
  // A request offered to L2 is held, unchanged, until L2 takes it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req_addr))
    else $error("prefetcher: request dropped or changed before it was taken");

endmodule
