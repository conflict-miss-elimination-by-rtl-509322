// Miss prefetch buffer (MPB).
//
// A small fully-associative buffer of L1-line-sized entries that sits on the
// refill path of the L1 cache and holds prefetched lines. It is searched on
// every L1 miss; on a hit the line is copied into the L1. Lines are allocated
// in FIFO order, so the oldest prefetched line is the one replaced.
//
// Interface and timing:
//   lookup_addr -> lookup_hit / lookup_data : combinational search, same cycle.
//   fill_valid/fill_addr/fill_data          : write of a prefetched line at the
//                                             clock edge. A line already held is
//                                             rewritten in place so that no line
//                                             is held twice.
//   inv_valid/inv_addr                      : a store to that line; any copy is
//                                             dropped at the clock edge, and a
//                                             fill of the same line in the same
//                                             cycle is ignored.
// The associative search, the line size and FIFO replacement follow the
// described design. The in-place refill and the store invalidation are this
// design's choices, made to keep the buffer coherent with a write-through L1.
module mpb
  import tsp_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  line_addr_t lookup_addr,
  output logic       lookup_hit,
  output line_t      lookup_data,
  input  logic       fill_valid,
  input  line_addr_t fill_addr,
  input  line_t      fill_data,
  input  logic       inv_valid,
  input  line_addr_t inv_addr
);

  localparam int unsigned PTR_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] valid_q;
  line_addr_t         tag_q  [ENTRIES];
  line_t              data_q [ENTRIES];
  logic [PTR_W-1:0]   fifo_ptr_q;

  // Associative search for the lookup port and for the fill port.
  logic [ENTRIES-1:0] lookup_match, fill_match;
  always_comb begin
    lookup_hit  = 1'b0;
    lookup_data = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      lookup_match[i] = valid_q[i] && (tag_q[i] == lookup_addr);
      fill_match[i]   = valid_q[i] && (tag_q[i] == fill_addr);
      if (lookup_match[i]) begin
        lookup_hit  = 1'b1;
        lookup_data = data_q[i];
      end
    end
  end

  logic fill_en;
  assign fill_en = fill_valid && !(inv_valid && inv_addr == fill_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      fifo_ptr_q <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++)
        if (inv_valid && valid_q[i] && tag_q[i] == inv_addr) valid_q[i] <= 1'b0;
      if (fill_en) begin
        if (|fill_match) begin
          for (int i = 0; i < ENTRIES; i++)
            if (fill_match[i]) data_q[i] <= fill_data;
        end else begin
          valid_q[fifo_ptr_q] <= 1'b1;
          tag_q[fifo_ptr_q]   <= fill_addr;
          data_q[fifo_ptr_q]  <= fill_data;
          fifo_ptr_q <= (fifo_ptr_q == PTR_W'(ENTRIES - 1)) ? '0 : fifo_ptr_q + 1'b1;
        end
      end
    end
  end

endmodule
