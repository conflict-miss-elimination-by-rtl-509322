// Workload testbench: dense matrix multiply through the memory system.
//
// Runs the loop nest  for i, for j { a[i][j] = 0; for k a[i][j] += b[i][k]*c[k][j]; }
// on 32-bit integers, with the accumulation held in a register as an
// optimising compiler would, so the inner loop issues two loads and each
// (i, j) one store. The matrix is 127 x 127, the size used in the
// reference study; the three arrays start 64KB apart, a multiple of the L1
// size, so they map onto the same L1 sets. The system runs at its default
// sizes (32KB L1, 1024-entry tables, 8-line MPB).
// The product is checked against one computed here from the initial memory
// contents, and the miss elimination rate (MPB hits / L1 misses) and MPB hit
// rate (MPB hits / prefetches) are reported. The run fails if no miss at all
// is eliminated.
module matmul_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;

  localparam int N = 127;
  localparam addr_t A_BASE = 32'h0100_0000, B_BASE = 32'h0101_0000, C_BASE = 32'h0102_0000;

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
  tsp_stats_t stats;

  tsp_system dut (.*);

  l2_model #(.RD_LAT(10), .PF_LAT(10)) u_l2 (
    .clk, .rst_n,
    .rd_req_valid(l2_rd_req_valid), .rd_req_ready(l2_rd_req_ready), .rd_req_addr(l2_rd_req_addr),
    .rd_resp_valid(l2_rd_resp_valid), .rd_resp_data(l2_rd_resp_data),
    .wr_valid(l2_wr_valid), .wr_ready(l2_wr_ready), .wr_addr(l2_wr_addr), .wr_data(l2_wr_data),
    .pf_req_valid(l2_pf_req_valid), .pf_req_ready(l2_pf_req_ready), .pf_req_addr(l2_pf_req_addr),
    .pf_resp_valid(l2_pf_resp_valid), .pf_resp_data(l2_pf_resp_data),
    .pf_stall(1'b0)
  );

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mem0(addr_t a);
    return init_word(a[ADDR_W-1:OFFSET_W], 32'(a[OFFSET_W-1:2]));
  endfunction

  task automatic access(bit we, addr_t a, word_t wd, output word_t rd);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    rd = resp_rdata;
  endtask

  function automatic addr_t el(addr_t base, int r, int c);
    return base + addr_t'(4 * (r * N + c));
  endfunction

  initial begin
    word_t x, y, acc, r, expect_v;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = '0;
        access(1, el(A_BASE, i, j), acc, r);
        for (int k = 0; k < N; k++) begin
          access(0, el(B_BASE, i, k), '0, x);
          access(0, el(C_BASE, k, j), '0, y);
          acc = acc + x * y;
        end
        access(1, el(A_BASE, i, j), acc, r);
      end
    // read the product back and compare
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        expect_v = '0;
        for (int k = 0; k < N; k++) expect_v += mem0(el(B_BASE, i, k)) * mem0(el(C_BASE, k, j));
        access(0, el(A_BASE, i, j), '0, r);
        check(r == expect_v, $sformatf("a[%0d][%0d]", i, j));
      end
    $display("matmul N=%0d: accesses=%0d misses=%0d mpb_hits=%0d prefetches=%0d",
             N, stats.accesses, stats.l1_misses, stats.mpb_hits, stats.pf_issued);
    $display("miss rate=%0d.%01d%%  miss elimination=%0d%%  MPB hit rate=%0d%%",
             1000 * stats.l1_misses / stats.accesses / 10, 1000 * stats.l1_misses / stats.accesses % 10,
             100 * stats.mpb_hits / stats.l1_misses,
             (stats.pf_issued == 0) ? 0 : 100 * stats.mpb_hits / stats.pf_issued);
    check(stats.mpb_hits > 0, "some misses eliminated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
