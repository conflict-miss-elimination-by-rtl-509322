// Miss history table (MHT).
//
// A circular table of the most recent L1 miss line addresses, in the order
// they missed. Every miss address is written into the entry at the head
// pointer (the oldest entry, FIFO replacement) and the head advances by one.
// In the same cycle the other N-1 entries are compared with the address
// (N-1 comparators) to find its most recent earlier occurrence, entry `last`.
// Because every miss takes one entry, the time-stride in cache misses is
// ts = head - last (mod N), a value from 1 to N-1.
//
// Interface and timing:
//   miss_valid/miss_addr : one miss per cycle at most.
//   found/ts             : combinational, for the miss presented this cycle,
//                          computed on the table contents before the write.
//   head                 : the current head index, shared with the prefetch
//                          request table so that both advance together.
// The write-then-search order, the FIFO policy, the single shared head and
// ts = head - last follow the described design. Storing line addresses
// rather than full byte addresses, valid bits cleared by reset, and a table
// size that need not be a power of two are this design's choices.
module mht
  import tsp_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 miss_valid,
  input  line_addr_t           miss_addr,
  output logic [$clog2(N)-1:0] head,
  output logic                 found,
  output logic [$clog2(N)-1:0] ts
);

  localparam int unsigned IDX_W = $clog2(N);

  logic [N-1:0]     valid_q;
  line_addr_t       addr_q [N];
  logic [IDX_W-1:0] head_q;

  // Most recent earlier occurrence. Entries below head are younger the higher
  // their index; if none of them match, the most recent match lies above head
  // (written before the pointer last wrapped).
  logic             found_below, found_above;
  logic [IDX_W-1:0] last_below, last_above;
  always_comb begin
    found_below = 1'b0;
    found_above = 1'b0;
    last_below  = '0;
    last_above  = '0;
    for (int i = 0; i < N; i++) begin
      if (valid_q[i] && addr_q[i] == miss_addr) begin
        if (IDX_W'(i) < head_q) begin
          found_below = 1'b1;
          last_below  = IDX_W'(i);
        end else if (IDX_W'(i) > head_q) begin
          found_above = 1'b1;
          last_above  = IDX_W'(i);
        end
      end
    end
  end

  always_comb begin
    found = miss_valid && (found_below || found_above);
    if (found_below) ts = head_q - last_below;
    else             ts = IDX_W'(N - 32'(last_above) + 32'(head_q));
  end

  assign head = head_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      head_q  <= '0;
    end else if (miss_valid) begin
      valid_q[head_q] <= 1'b1;
      addr_q[head_q]  <= miss_addr;
      head_q <= (head_q == IDX_W'(N - 1)) ? '0 : head_q + 1'b1;
    end
  end

endmodule
