// Self-checking testbench of the prefetch scheduler.
//
// Directed cases first (empty table, optimal entry taken, full window,
// strides shorter than the buffer, wrap-around past the table end), then
// random occupancy, head and stride. The reference enumerates every offset of
// the window ts-MPB_SIZE .. ts-1 (clipped at 0), keeps the empty ones and
// picks the one closest to ts-MPB_SIZE/2, the earlier one on a tie; with none
// empty it expects the optimal entry to be overwritten.
module tsp_scheduler_tb;
  localparam int unsigned N = 32, MPB = 8;

  logic           ts_valid;
  logic [4:0]     ts, head, en;
  logic [N-1:0]   occ;
  logic           en_valid, optimal, displaced, overwrite;

  tsp_scheduler #(.N(N), .MPB_SIZE(MPB)) dut (.*);

  int checks = 0, failures = 0;
  int n_opt = 0, n_disp = 0, n_over = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s ts=%0d head=%0d occ=%h en=%0d", what, ts, head, occ, en);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(int t, int h, logic [N-1:0] o);
    int opt, best, bestd, kind;
    ts = 5'(t); head = 5'(h); occ = o; ts_valid = 1'b1;
    #1;
    opt = t - int'(MPB / 2);
    if (opt < 0) opt = 0;
    best = -1; bestd = 1000;
    for (int off = t - int'(MPB); off <= t - 1; off++) begin
      int d;
      if (off < 0) continue;
      if (o[(h + off) % N]) continue;
      d = (off > opt) ? off - opt : opt - off;
      if (d < bestd) begin bestd = d; best = off; end
    end
    if (best < 0) begin best = opt; kind = 2; end
    else kind = (best == opt) ? 0 : 1;
    check(en_valid, "en_valid");
    check(int'(en) == (h + best) % N, "entry");
    check(optimal == (kind == 0) && displaced == (kind == 1) && overwrite == (kind == 2), "rule flag");
    if (kind == 0) n_opt++; else if (kind == 1) n_disp++; else n_over++;
  endtask

  initial begin
    ts_valid = 0; ts = '0; head = '0; occ = '0;
    #1;
    check(!en_valid, "no request without a stride");
    // empty table: optimal entry head + ts - 4
    run_case(20, 3, '0);
    check(en == 5'd19, "optimal entry value");
    // optimal taken: nearest earlier entry
    run_case(20, 3, 32'h1 << 19);
    check(en == 5'd18, "displaced entry value");
    // window fully taken: overwrite the optimal entry
    run_case(20, 3, 32'hFF << 15);
    check(en == 5'd19 && overwrite, "overwrite value");
    // short strides: the window clips at head, which is issued at once
    run_case(1, 7, '0);
    check(en == 5'd7, "ts=1 goes to head");
    run_case(3, 7, '0);
    check(en == 5'd7, "ts=3 goes to head");
    // wrap-around past the end of the table
    run_case(10, 28, '0);
    check(en == 5'd2, "wrap");
    for (int n = 0; n < 20000; n++) begin
      logic [N-1:0] o;
      o = $urandom & $urandom;
      if (n % 3 == 0) o = o | $urandom;
      run_case($urandom_range(N - 1, 1), $urandom_range(N - 1), o);
    end
    check(n_opt > 0 && n_disp > 0 && n_over > 0, "all three rules seen");
    $display("optimal=%0d displaced=%0d overwrite=%0d", n_opt, n_disp, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
