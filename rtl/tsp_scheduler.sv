// Prefetch scheduler.
//
// Given the head index and a predicted time-stride ts, picks the entry of the
// prefetch request table (PRT) that will hold the new request. The entry at
// offset d from head is issued d misses from now, and a prefetched line stays
// in the MPB for about MPB_SIZE further prefetches, so the request must sit
// in the window of offsets ts-MPB_SIZE .. ts-1. The preferred (optimal) offset
// is ts-MPB_SIZE/2, which tolerates a time-stride change of MPB_SIZE/2 either
// way. If that entry is taken, the nearest empty entry of the window is used;
// if the whole window is taken, the optimal entry is overwritten.
//
// Offsets below 0 lie in the past: the window and the optimal offset are
// clipped to 0, the entry at head, which is issued in the same cycle.
// At equal distance from the optimal entry the earlier entry is preferred.
//
// Purely combinational:
//   ts_valid/ts/head/occ -> en_valid/en plus one of optimal, displaced,
//   overwrite (which rule chose the entry).
// The window, the optimal entry, the nearest-empty rule and overriding when
// the window is full follow the described design; the clipping at head and
// the tie-break are this design's choices.
module tsp_scheduler #(
  parameter int unsigned N        = 1024,
  parameter int unsigned MPB_SIZE = 8
) (
  input  logic                 ts_valid,
  input  logic [$clog2(N)-1:0] ts,
  input  logic [$clog2(N)-1:0] head,
  input  logic [N-1:0]         occ,
  output logic                 en_valid,
  output logic [$clog2(N)-1:0] en,
  output logic                 optimal,
  output logic                 displaced,
  output logic                 overwrite
);

  localparam int unsigned IDX_W = $clog2(N);

  function automatic logic [IDX_W-1:0] wrap_add(logic [IDX_W-1:0] base, int off);
    int s;
    s = int'(base) + off;
    if (s >= int'(N)) s -= int'(N);
    return IDX_W'(s);
  endfunction

  int lo, hi, opt, chosen;
  always_comb begin
    hi  = int'(ts) - 1;
    lo  = int'(ts) - int'(MPB_SIZE);
    opt = int'(ts) - int'(MPB_SIZE / 2);
    if (hi < 0)  hi  = 0;
    if (lo < 0)  lo  = 0;
    if (opt < 0) opt = 0;
    if (opt > hi) opt = hi;
    chosen    = -1;
    optimal   = 1'b0;
    displaced = 1'b0;
    overwrite  = 1'b0;
    if (!occ[wrap_add(head, opt)]) begin
      chosen  = opt;
      optimal = ts_valid;
    end else begin
      for (int k = 1; k < int'(MPB_SIZE); k++) begin
        if (chosen < 0 && opt - k >= lo && !occ[wrap_add(head, opt - k)]) chosen = opt - k;
        if (chosen < 0 && opt + k <= hi && !occ[wrap_add(head, opt + k)]) chosen = opt + k;
      end
      if (chosen < 0) begin
        chosen   = opt;
        overwrite = ts_valid;
      end else begin
        displaced = ts_valid;
      end
    end
    en_valid = ts_valid && (ts != '0);
    en       = wrap_add(head, chosen);
  end

endmodule
