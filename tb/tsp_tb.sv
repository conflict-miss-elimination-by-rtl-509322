// Self-checking testbench of the time-stride prefetch engine.
//
// Each phase resets the engine and feeds a cyclic miss stream of K distinct
// lines, so every line misses again exactly K misses later. Once a line has
// missed twice its time-stride K is known and its request lands at offset
// d = max(K - MPB_SIZE/2, 0) from head, so the prefetch sent at miss u must
// be for the line that missed at miss u - d. The testbench checks the exact
// sequence of L2 prefetch addresses, the MPB fill data, the number of strides
// found, and that a stride longer than the table (K >= N) finds nothing.
module tsp_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned N = 64, MPB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       miss_valid, pf_req_valid, pf_resp_valid, snoop_valid, fill_valid;
  line_addr_t miss_addr, pf_req_addr, snoop_addr, fill_addr;
  line_t      pf_resp_data, fill_data;
  logic       ev_stride_found, ev_sched_optimal, ev_sched_displaced, ev_sched_override;
  logic       ev_pf_issued, ev_pf_dropped, ev_pf_stale;
  logic       pf_req_ready;

  tsp #(.N(N), .MPB_SIZE(MPB), .PF_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;

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

  // L2 side: always ready, answers two cycles after the request.
  line_addr_t sent[$], l2_pipe[$];
  int         found_cnt;
  assign pf_req_ready = 1'b1;
  always @(posedge clk) begin
    pf_resp_valid <= 1'b0;
    if (l2_pipe.size() > 0) begin
      pf_resp_valid <= 1'b1;
      pf_resp_data  <= init_line(l2_pipe[0]);
      void'(l2_pipe.pop_front());
    end
    if (rst_n && pf_req_valid) begin
      sent.push_back(pf_req_addr);
      l2_pipe.push_back(pf_req_addr);
    end
    if (rst_n && fill_valid) begin
      checks++;
      if (fill_data != init_line(fill_addr)) begin failures++; $display("FAIL fill data"); end
    end
    if (rst_n && ev_stride_found) found_cnt++;
    if (rst_n && ev_pf_dropped) begin failures++; $display("FAIL unexpected drop"); end
  end

  // fresh != 0: each round of the K lines ends with a miss to a line never
  // seen before, so the repeating lines have a time-stride of K+1 and some
  // requests fall due on misses that find nothing in the history.
  task automatic phase(int k, int misses, bit fresh = 0);
    line_addr_t seq[$], expect_q[$];
    line_addr_t due [int];
    int exp_found, ts, u;
    rst_n = 1'b0; miss_valid = 0; miss_addr = '0; snoop_valid = 0; snoop_addr = '0;
    sent.delete(); l2_pipe.delete(); found_cnt = 0; exp_found = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < misses; t++) begin
      @(negedge clk);
      miss_valid = 1;
      if (fresh && t % (k + 1) == k) miss_addr = line_addr_t'(500000 + t);
      else miss_addr = line_addr_t'(1000 + (t % (fresh ? k + 1 : k)) * 1024);
      // reference: previous occurrence within the last N-1 misses
      ts = 0;
      for (int d = 1; d < int'(N) && d <= t; d++)
        if (seq[t - d] == miss_addr) begin ts = d; break; end
      seq.push_back(miss_addr);
      if (ts != 0) begin
        exp_found++;
        u = t + ((ts > int'(MPB / 2)) ? ts - int'(MPB / 2) : 0);
        check(!due.exists(u), "test pattern has no request collisions");
        due[u] = miss_addr;
      end
      if (due.exists(t)) expect_q.push_back(due[t]);
      @(negedge clk);
      miss_valid = 0;
    end
    repeat (10) @(posedge clk);
    check(sent.size() == expect_q.size(), $sformatf("K=%0d prefetch count %0d vs %0d", k, sent.size(), expect_q.size()));
    for (int i = 0; i < sent.size() && i < expect_q.size(); i++)
      check(sent[i] == expect_q[i], $sformatf("K=%0d prefetch %0d address", k, i));
    check(found_cnt == exp_found, $sformatf("K=%0d strides found %0d", k, found_cnt));
    if (k >= int'(N) && !fresh) check(found_cnt == 0, "stride longer than the table");
  endtask

  initial begin
    phase(1, 40);
    phase(2, 60);
    phase(3, 60);
    phase(6, 80);
    phase(12, 100);
    phase(40, 200);
    phase(63, 300);
    phase(64, 300);
    phase(90, 300);
    phase(1, 100, 1);
    phase(5, 200, 1);
    phase(20, 300, 1);
    phase(40, 300, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
