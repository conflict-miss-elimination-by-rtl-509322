// Self-checking testbench of the prefetch request table.
//
// A head pointer driven as the miss history table would drive it advances on
// random misses while requests are written at random entries. A reference
// array predicts, each cycle, the occupancy vector and the request issued at
// head, including a request written to head in the same cycle, which must be
// issued at once and not stored.
module prt_tb;
  import tsp_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] head, wr_idx;
  logic       advance, wr_valid, issue_valid;
  line_addr_t wr_addr, issue_addr;
  logic [N-1:0] occ;

  prt #(.N(N)) dut (.*);

  int checks = 0, failures = 0, n_issue = 0, n_bypass = 0;
  logic       rv [N];
  line_addr_t ra [N];

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
    logic       ev;
    line_addr_t ea;
    head = '0; advance = 0; wr_valid = 0; wr_idx = '0; wr_addr = '0;
    for (int i = 0; i < N; i++) rv[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      advance  = ($urandom_range(99) < 60);
      wr_valid = ($urandom_range(99) < 50);
      wr_idx   = (n % 7 == 0) ? head : 4'($urandom);
      wr_addr  = line_addr_t'($urandom);
      #1;
      for (int i = 0; i < N; i++) check(occ[i] == rv[i], "occupancy");
      ev = advance && (rv[head] || (wr_valid && wr_idx == head));
      ea = (wr_valid && wr_idx == head) ? wr_addr : ra[head];
      check(issue_valid == ev, "issue valid");
      if (ev) begin
        check(issue_addr == ea, "issue address");
        n_issue++;
        if (wr_valid && wr_idx == head) n_bypass++;
      end
      if (advance) rv[head] = 0;
      if (wr_valid && !(advance && wr_idx == head)) begin rv[wr_idx] = 1; ra[wr_idx] = wr_addr; end
      @(posedge clk);
      #1;
      if (advance) head = head + 1'b1;
    end
    check(n_issue > 100 && n_bypass > 10, "issue coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
