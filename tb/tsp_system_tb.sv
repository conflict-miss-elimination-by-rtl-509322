// End-to-end testbench of the memory system with time-stride prefetching,
// at the default sizes (32KB L1, 1024-entry miss history and request tables,
// 8-line MPB).
//
// A processor model issues loads and stores; every load is checked against a
// reference memory, so prefetched and MPB-refilled data must be correct.
//   Phase 1, matrix addition a[i] = b[i] + c[i] with b and c mapping onto the
//     same L1 sets, so that b and c evict each other on every access. After
//     the first two misses to a line the time-stride is known and the later
//     misses to that line should be served by the MPB: the phase checks that
//     at least 60% of the misses are eliminated (the expected figure is 75%
//     for a line of eight words, less the misses at line boundaries).
//   Phase 2, the same loop with a also on the same sets, so that stores hit
//     lines with prefetches in flight, which must be discarded.
//   Phase 3, random loads and stores to 24 lines in 3 sets with periods of
//     back-pressure on the L2 prefetch channel, so that requests collide in
//     the request table and the prefetch queue overflows.
// Every mechanism counted in the statistics must have happened at least
// once, the counters must agree with each other and with the processor side,
// and a hit must be answered in the cycle after the request is taken.
module tsp_system_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid, req_ready, req_we, resp_valid;
  addr_t      req_addr;
  word_t      req_wdata, resp_rdata;
  logic       l2_rd_req_valid, l2_rd_req_ready, l2_rd_resp_valid;
  line_addr_t l2_rd_req_addr, l2_pf_req_addr;
  line_t      l2_rd_resp_data, l2_pf_resp_data;
  logic       l2_wr_valid, l2_wr_ready;
  addr_t      l2_wr_addr;
  word_t      l2_wr_data;
  logic       l2_pf_req_valid, l2_pf_req_ready, l2_pf_resp_valid;
  logic       pf_stall;
  tsp_stats_t stats;

  tsp_system dut (.*);

  l2_model #(.RD_LAT(10), .PF_LAT(10), .PF_READY_PCT(80)) u_l2 (
    .clk, .rst_n,
    .rd_req_valid(l2_rd_req_valid), .rd_req_ready(l2_rd_req_ready), .rd_req_addr(l2_rd_req_addr),
    .rd_resp_valid(l2_rd_resp_valid), .rd_resp_data(l2_rd_resp_data),
    .wr_valid(l2_wr_valid), .wr_ready(l2_wr_ready), .wr_addr(l2_wr_addr), .wr_data(l2_wr_data),
    .pf_req_valid(l2_pf_req_valid), .pf_req_ready(l2_pf_req_ready), .pf_req_addr(l2_pf_req_addr),
    .pf_resp_valid(l2_pf_resp_valid), .pf_resp_data(l2_pf_resp_data),
    .pf_stall
  );

  int checks = 0, failures = 0, n_req = 0, n_hit_lat = 0;
  word_t rmem [addr_t];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_word(addr_t a);
    if (rmem.exists(a)) return rmem[a];
    return init_word(a[ADDR_W-1:OFFSET_W], 32'(a[OFFSET_W-1:2]));
  endfunction

  // One processor access; returns the loaded word.
  task automatic access(bit we, addr_t a, word_t wd, output word_t rd);
    int lat, hits_before;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    hits_before = stats.l1_hits;
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid && lat < 200) begin @(negedge clk); lat++; end
    check(resp_valid, "answered");
    rd = resp_rdata;
    n_req++;
    if (!we) check(rd == ref_word(a), $sformatf("load %h", a));
    else rmem[a] = wd;
    @(posedge clk); #1;
    if (stats.l1_hits != hits_before && !we) begin
      n_hit_lat++;
      check(lat == 1, "hit latency");
    end
  endtask

  task automatic matrix_add(addr_t a_base, addr_t b_base, addr_t c_base, int n);
    word_t x, y, z;
    for (int i = 0; i < n; i++) begin
      access(0, b_base + addr_t'(4 * i), '0, x);
      access(0, c_base + addr_t'(4 * i), '0, y);
      access(1, a_base + addr_t'(4 * i), x + y, z);
    end
  endtask

  initial begin
    word_t     r;
    tsp_stats_t s0, s1;
    int        elim;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; pf_stall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: b and c conflict, a elsewhere.
    s0 = stats;
    matrix_add(32'h0004_1000, 32'h0010_0000, 32'h0010_8000, 512);
    s1 = stats;
    elim = 100 * (s1.mpb_hits - s0.mpb_hits) / (s1.l1_misses - s0.l1_misses);
    $display("phase 1: misses=%0d mpb hits=%0d eliminated=%0d%%",
             s1.l1_misses - s0.l1_misses, s1.mpb_hits - s0.mpb_hits, elim);
    check(elim >= 60, "matrix addition miss elimination");

    // Phase 2: a, b and c all conflict.
    matrix_add(32'h0022_0000, 32'h0020_0000, 32'h0020_8000, 256);
    $display("phase 2: stale prefetches=%0d", stats.pf_stale);

    // Phase 3: random conflicting traffic with prefetch back-pressure.
    for (int n = 0; n < 6000; n++) begin
      addr_t a;
      pf_stall = ((n / 300) % 4 == 3);
      a = 32'h0030_0000 + addr_t'($urandom_range(7)) * 32'h8000
        + addr_t'($urandom_range(2)) * 32 + addr_t'($urandom_range(7)) * 4;
      access($urandom_range(99) < 20, a, $urandom, r);
    end
    pf_stall = 0;
    repeat (100) @(posedge clk);

    $display("accesses=%0d hits=%0d misses=%0d mpb_hits=%0d l2=%0d strides=%0d",
             stats.accesses, stats.l1_hits, stats.l1_misses, stats.mpb_hits, stats.l2_fetches,
             stats.strides_found);
    $display("sched optimal=%0d displaced=%0d overwrite=%0d; pf issued=%0d dropped=%0d filled=%0d stale=%0d; writes=%0d",
             stats.sched_optimal, stats.sched_displaced, stats.sched_override, stats.pf_issued,
             stats.pf_dropped, stats.pf_filled, stats.pf_stale, stats.writes);
    check(stats.accesses == n_req, "access count");
    check(stats.l1_misses == stats.mpb_hits + stats.l2_fetches, "miss split");
    check(stats.sched_optimal + stats.sched_displaced + stats.sched_override == stats.strides_found,
          "every stride scheduled");
    check(stats.pf_issued == stats.pf_filled + stats.pf_stale, "every prefetch answered");
    check(n_hit_lat > 0, "hit latency measured");
    check(stats.l1_hits > 0,         "mechanism: L1 hit");
    check(stats.mpb_hits > 0,        "mechanism: MPB hit");
    check(stats.l2_fetches > 0,      "mechanism: L2 fetch");
    check(stats.strides_found > 0,   "mechanism: time-stride found");
    check(stats.sched_optimal > 0,   "mechanism: optimal entry");
    check(stats.sched_displaced > 0, "mechanism: displaced to empty entry");
    check(stats.sched_override > 0,  "mechanism: window full, overwrite");
    check(stats.pf_issued > 0,       "mechanism: prefetch issued");
    check(stats.pf_dropped > 0,      "mechanism: prefetch queue full");
    check(stats.pf_filled > 0,       "mechanism: MPB fill");
    check(stats.pf_stale > 0,        "mechanism: stale prefetch discarded");
    check(stats.writes > 0,          "mechanism: store written through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
