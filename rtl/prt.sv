// Prefetch request table (PRT).
//
// A circular table of pending prefetch requests, as long as the miss history
// table and indexed by the same head pointer. The entry at offset d from head
// holds a request that is due d misses from now. On every miss (advance) the
// entry at head is issued to the prefetcher and emptied, and the head moves
// on. A request written in the same cycle to the head entry itself is issued
// straight away instead of being stored.
//
// Interface and timing:
//   wr_valid/wr_idx/wr_addr : store a request at the clock edge; an occupied
//                             entry is overwritten.
//   advance                 : a miss this cycle; issue_valid/issue_addr are
//                             combinational and describe the issued request.
//   occ                     : occupancy of every entry, read by the scheduler.
// The table, its shared head and issue-at-head follow the described design.
// The write-through at head and reset clearing every entry are this
// design's choices.
module prt
  import tsp_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] head,
  input  logic                 advance,
  input  logic                 wr_valid,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  line_addr_t           wr_addr,
  output logic [N-1:0]         occ,
  output logic                 issue_valid,
  output line_addr_t           issue_addr
);

  logic [N-1:0] valid_q;
  line_addr_t   addr_q [N];

  logic wr_at_head;
  assign wr_at_head  = wr_valid && (wr_idx == head);
  assign occ         = valid_q;
  assign issue_valid = advance && (valid_q[head] || wr_at_head);
  assign issue_addr  = wr_at_head ? wr_addr : addr_q[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (advance) valid_q[head] <= 1'b0;
      if (wr_valid && !(advance && wr_at_head)) begin
        valid_q[wr_idx] <= 1'b1;
        addr_q[wr_idx]  <= wr_addr;
      end
    end
  end

endmodule
