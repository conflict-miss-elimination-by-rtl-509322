// Self-checking testbench of the miss history table.
//
// Random miss streams over a few line addresses, with idle cycles, are
// compared with a reference that keeps the whole miss sequence: the expected
// time-stride of a miss is the smallest distance d from 1 to N-1 at which the
// same address missed d misses earlier. The head pointer is checked against
// the miss count modulo N. A non-power-of-two size is also run.
module mht_tb;
  import tsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       mv16, mv12;
  line_addr_t ma16, ma12;
  logic [3:0] head16, ts16;
  logic [3:0] head12, ts12;
  logic       f16, f12;

  mht #(.N(16)) dut16 (.clk, .rst_n, .miss_valid(mv16), .miss_addr(ma16), .head(head16), .found(f16), .ts(ts16));
  mht #(.N(12)) dut12 (.clk, .rst_n, .miss_valid(mv12), .miss_addr(ma12), .head(head12), .found(f12), .ts(ts12));

  line_addr_t hist16[$], hist12[$];

  function automatic int exp_ts(ref line_addr_t h[$], input line_addr_t a, input int n);
    for (int d = 1; d < n && d <= h.size(); d++)
      if (h[h.size() - d] == a) return d;
    return 0;
  endfunction

  initial begin
    int e16, e12, found_cnt, far_cnt;
    found_cnt = 0; far_cnt = 0;
    mv16 = 0; mv12 = 0; ma16 = '0; ma12 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      mv16 = ($urandom_range(99) < 80);
      mv12 = ($urandom_range(99) < 80);
      ma16 = line_addr_t'($urandom_range(n % 500 < 250 ? 5 : 14) * 1024 + 7);
      ma12 = line_addr_t'($urandom_range(n % 500 < 250 ? 4 : 12) * 33);
      #1;
      check(head16 == 4'(hist16.size() % 16), "head N=16");
      check(head12 == 4'(hist12.size() % 12), "head N=12");
      if (mv16) begin
        e16 = exp_ts(hist16, ma16, 16);
        check(f16 == (e16 != 0), "found N=16");
        if (e16 != 0) begin
          check(ts16 == 4'(e16), "ts N=16");
          found_cnt++;
          if (e16 > 8) far_cnt++;
        end
        hist16.push_back(ma16);
      end else check(!f16, "no find when idle");
      if (mv12) begin
        e12 = exp_ts(hist12, ma12, 12);
        check(f12 == (e12 != 0), "found N=12");
        if (e12 != 0) check(ts12 == 4'(e12), "ts N=12");
        hist12.push_back(ma12);
      end
    end
    check(found_cnt > 100 && far_cnt > 10, "stride coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
