// Workload testbench: table-size and buffer-size sweep on matrix multiply.
//
// Eight copies of the memory system run the same 64 x 64 integer matrix
// multiply side by side, each with its own L2 model, in the configurations
// the scheme is usually evaluated in: a 256-, 1024- and 4096-entry history
// with an 8-line MPB, and MPBs of 1, 2, 4, 16 and 64 lines with a
// 1024-entry history. 64 is one of the power-of-two matrix sizes at which
// conflicts are severe. Each copy's product is checked against a reference
// computed here; the miss rate, miss elimination rate and MPB hit rate of
// each configuration are printed. Every configuration must eliminate some
// misses.
module tsp_sweep_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;

  localparam int N = 64;
  localparam int NCFG = 8;
  localparam int MHTS [NCFG] = '{256, 1024, 4096, 1024, 1024, 1024, 1024, 1024};
  localparam int MPBS [NCFG] = '{8,   8,    8,    1,    2,    4,    16,   64};
  localparam addr_t A_BASE = 32'h0100_0000, B_BASE = 32'h0100_8000, C_BASE = 32'h0101_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NCFG];

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

  function automatic addr_t el(addr_t base, int r, int c);
    return base + addr_t'(4 * (r * N + c));
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
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

    tsp_system #(.MHT_SIZE(MHTS[g]), .MPB_SIZE(MPBS[g])) dut (.*);

    l2_model #(.RD_LAT(10), .PF_LAT(10)) u_l2 (
      .clk, .rst_n,
      .rd_req_valid(l2_rd_req_valid), .rd_req_ready(l2_rd_req_ready), .rd_req_addr(l2_rd_req_addr),
      .rd_resp_valid(l2_rd_resp_valid), .rd_resp_data(l2_rd_resp_data),
      .wr_valid(l2_wr_valid), .wr_ready(l2_wr_ready), .wr_addr(l2_wr_addr), .wr_data(l2_wr_data),
      .pf_req_valid(l2_pf_req_valid), .pf_req_ready(l2_pf_req_ready), .pf_req_addr(l2_pf_req_addr),
      .pf_resp_valid(l2_pf_resp_valid), .pf_resp_data(l2_pf_resp_data),
      .pf_stall(1'b0)
    );

    task automatic access(bit we, addr_t a, word_t wd, output word_t rd);
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
      @(negedge clk);
      req_valid = 0;
      while (!resp_valid) @(negedge clk);
      rd = resp_rdata;
    endtask

    initial begin
      word_t x, y, acc, r, expect_v;
      req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
      done[g] = 0;
      @(posedge rst_n);
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
      for (int i = 0; i < N; i += 7)
        for (int j = 0; j < N; j++) begin
          expect_v = '0;
          for (int k = 0; k < N; k++) expect_v += mem0(el(B_BASE, i, k)) * mem0(el(C_BASE, k, j));
          access(0, el(A_BASE, i, j), '0, r);
          check(r == expect_v, $sformatf("config %0d a[%0d][%0d]", g, i, j));
        end
      $display("MHT %4d MPB %2d: misses=%0d (%0d.%01d%%) eliminated=%0d%% MPB hit rate=%0d%%",
               MHTS[g], MPBS[g], stats.l1_misses,
               1000 * stats.l1_misses / stats.accesses / 10, 1000 * stats.l1_misses / stats.accesses % 10,
               100 * stats.mpb_hits / stats.l1_misses,
               (stats.pf_issued == 0) ? 0 : 100 * stats.mpb_hits / stats.pf_issued);
      check(stats.mpb_hits > 0, $sformatf("config %0d eliminates misses", g));
      done[g] = 1;
    end
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCFG; g++) all &= done[g];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
