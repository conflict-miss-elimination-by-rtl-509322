// Self-checking testbench of the L1 cache and its miss path.
//
// A 1KB instance (32 sets) is driven with random loads and stores to a few
// lines per set, so that lines conflict constantly. The MPB is stood in for
// by the testbench: it holds every line whose address is a multiple of 3
// (lines that are never stored to). The L2 is the behavioural model.
// A reference direct-mapped tag array and a reference memory predict, per
// access, hit or miss, whether the miss is served by the MPB or by L2, the
// miss address sent to the miss history, the loaded data, and the latency:
// a hit answers in the cycle after acceptance, an MPB hit one cycle later.
module l1_cache_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned SIZE = 1024, SETS = SIZE / LINE_BYTES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid, req_ready, req_we, resp_valid;
  addr_t      req_addr;
  word_t      req_wdata, resp_rdata;
  line_addr_t mpb_addr, miss_addr, rd_req_addr, snoop_addr;
  logic       mpb_hit, miss_valid, rd_req_valid, rd_req_ready, rd_resp_valid;
  line_t      mpb_data, rd_resp_data;
  logic       wr_valid, wr_ready, snoop_valid, ev_hit, ev_mpb_hit, ev_l2_fetch;
  addr_t      wr_addr;
  word_t      wr_data;

  l1_cache #(.SIZE_BYTES(SIZE)) dut (.*);

  logic pf_req_ready, pf_resp_valid;
  line_t pf_resp_data;
  l2_model #(.RD_LAT(6)) u_l2 (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .pf_req_valid(1'b0), .pf_req_ready, .pf_req_addr('0), .pf_resp_valid, .pf_resp_data,
    .pf_stall(1'b0)
  );

  always_comb begin
    mpb_hit  = (mpb_addr % 3 == 0);
    mpb_data = init_line(mpb_addr);
  end

  int checks = 0, failures = 0;
  int n_hit = 0, n_mpb = 0, n_l2 = 0, n_miss_pulses = 0;
  line_addr_t miss_seen;

  always @(posedge clk) if (rst_n && miss_valid) begin n_miss_pulses++; miss_seen <= miss_addr; end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rvalid [SETS];
  line_addr_t rline  [SETS];
  word_t      rmem [addr_t];

  function automatic word_t ref_word(addr_t a);
    if (rmem.exists(a)) return rmem[a];
    return init_word(a[ADDR_W-1:OFFSET_W], 32'(a[OFFSET_W-1:2]));
  endfunction

  initial begin
    for (int i = 0; i < int'(SETS); i++) rvalid[i] = 0;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      line_addr_t l;
      int set, lat, pulses_before;
      bit exp_hit, exp_mpb, we;
      addr_t a;
      set = $urandom_range(3);
      l   = line_addr_t'(set + SETS * $urandom_range(4));
      a   = {l, 3'($urandom), 2'b00};
      we  = (l % 3 != 0) && ($urandom_range(99) < 30);
      exp_hit = rvalid[set] && rline[set] == l;
      exp_mpb = !exp_hit && (l % 3 == 0);
      @(negedge clk);
      check(req_ready, "ready when idle");
      req_valid = 1; req_we = we; req_addr = a; req_wdata = $urandom;
      pulses_before = n_miss_pulses;
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!resp_valid && lat < 100) begin @(negedge clk); lat++; end
      check(resp_valid, "answered");
      if (!we) check(resp_rdata == ref_word(a), "load data");
      @(posedge clk);
      #1;
      check(n_miss_pulses - pulses_before == (exp_hit ? 0 : 1), "one miss pulse per miss");
      if (!exp_hit) check(miss_seen == l, "miss address");
      if (exp_hit) begin
        n_hit++;
        if (!we) check(lat == 1, "hit latency");
      end else if (exp_mpb) begin
        n_mpb++;
        check(lat == 2, "MPB hit latency");
      end else n_l2++;
      if (we) rmem[a] = req_wdata;
      rvalid[set] = 1; rline[set] = l;
    end
    check(n_hit > 100 && n_mpb > 100 && n_l2 > 100, "coverage");
    $display("hits=%0d mpb=%0d l2=%0d", n_hit, n_mpb, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
