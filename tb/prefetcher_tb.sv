// Self-checking testbench of the prefetcher.
//
// Random prefetch requests over a few lines, random L2 back-pressure, L2
// answers in order after a random delay, and random store snoops. A reference
// queue of {address, sent, stale} predicts, every cycle, acceptance or drop
// of a request, the next request offered to L2, and for each answer whether
// the line goes into the MPB (with its address and data) or is discarded as
// stale.
module prefetcher_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       issue_valid, issued, dropped, req_valid, req_ready, resp_valid;
  logic       snoop_valid, fill_valid, stale;
  line_addr_t issue_addr, req_addr, snoop_addr, fill_addr;
  line_t      resp_data, fill_data;

  prefetcher #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_fill = 0, n_stale = 0, n_drop = 0;

  typedef struct { line_addr_t a; bit sent; bit stale; } ent_t;
  ent_t       q[$];
  line_addr_t l2_q[$];
  int         l2_delay;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_unsent;
    issue_valid = 0; req_ready = 0; resp_valid = 0; snoop_valid = 0;
    issue_addr = '0; snoop_addr = '0; resp_data = '0;
    l2_delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      issue_valid = ($urandom_range(99) < 45);
      issue_addr  = line_addr_t'($urandom_range(5) + 40);
      req_ready   = ($urandom_range(99) < (((n / 1000) % 2 != 0) ? 30 : 90));
      snoop_valid = ($urandom_range(99) < 15);
      snoop_addr  = line_addr_t'($urandom_range(5) + 40);
      resp_valid  = 0;
      if (l2_q.size() > 0 && l2_delay == 0 && $urandom_range(99) < 50) begin
        resp_valid = 1;
        resp_data  = init_line(l2_q[0]);
      end
      if (l2_delay > 0) l2_delay--;
      #1;
      // acceptance
      check(issued == (issue_valid && q.size() < DEPTH), "accept");
      check(dropped == (issue_valid && q.size() >= DEPTH), "drop");
      if (dropped) n_drop++;
      // request to L2
      first_unsent = -1;
      foreach (q[i]) if (!q[i].sent && first_unsent < 0) first_unsent = i;
      check(req_valid == (first_unsent >= 0), "request valid");
      if (first_unsent >= 0) check(req_addr == q[first_unsent].a, "request order");
      // answer
      if (resp_valid) begin
        bit st;
        st = q[0].stale || (snoop_valid && snoop_addr == q[0].a);
        check(fill_valid == !st && stale == st, "fill or stale");
        if (!st) begin
          check(fill_addr == q[0].a && fill_data == init_line(q[0].a), "fill line");
          n_fill++;
        end else n_stale++;
      end else check(!fill_valid && !stale, "no fill without answer");
      // reference update for this edge
      if (snoop_valid) foreach (q[i]) if (q[i].a == snoop_addr) q[i].stale = 1;
      if (resp_valid) begin void'(q.pop_front()); void'(l2_q.pop_front()); end
      if (req_valid && req_ready) begin
        foreach (q[i]) if (!q[i].sent) begin q[i].sent = 1; break; end
        l2_q.push_back(req_addr);
        if (l2_q.size() == 1) l2_delay = $urandom_range(6);
      end
      if (issued) q.push_back('{issue_addr, 0, snoop_valid && snoop_addr == issue_addr});
    end
    check(n_fill > 50 && n_stale > 5 && n_drop > 5, "coverage");
    $display("fills=%0d stale=%0d drops=%0d", n_fill, n_stale, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
