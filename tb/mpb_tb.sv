// Self-checking testbench of the miss prefetch buffer.
//
// Random fills, store invalidations and lookups over 20 line addresses are
// compared every cycle with a reference model kept as a queue of resident
// lines in allocation order (oldest first): a fill of a resident line
// rewrites it in place, a fill of a new line appends it and drops the oldest
// when the buffer is full, an invalidation removes the line.
module mpb_tb;
  import tsp_pkg::*;
  import tb_mem_pkg::*;

  localparam int unsigned ENTRIES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  line_addr_t lookup_addr, fill_addr, inv_addr;
  logic       lookup_hit, fill_valid, inv_valid;
  line_t      lookup_data, fill_data;

  mpb #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;

  // Reference model: slot list in FIFO allocation order.
  typedef struct { line_addr_t tag; line_t data; logic valid; } slot_t;
  slot_t slots[ENTRIES];
  int    ptr;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  exp_hit;
    line_t exp_data;
    int    evictions;
    evictions = 0;
    fill_valid = 0; inv_valid = 0; lookup_addr = '0; fill_addr = '0; inv_addr = '0; fill_data = '0;
    for (int i = 0; i < ENTRIES; i++) slots[i].valid = 0;
    ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      lookup_addr = line_addr_t'($urandom_range(19) + 100);
      fill_valid  = ($urandom_range(99) < 40);
      fill_addr   = line_addr_t'($urandom_range(19) + 100);
      fill_data   = init_line(fill_addr) ^ line_t'(n);
      inv_valid   = ($urandom_range(99) < 10);
      inv_addr    = line_addr_t'($urandom_range(19) + 100);
      #1;
      exp_hit = 0; exp_data = '0;
      for (int i = 0; i < ENTRIES; i++)
        if (slots[i].valid && slots[i].tag == lookup_addr) begin
          exp_hit = 1; exp_data = slots[i].data;
        end
      check(lookup_hit == exp_hit, "lookup hit");
      if (exp_hit) check(lookup_data == exp_data, "lookup data");
      // update the reference for this cycle's edge
      for (int i = 0; i < ENTRIES; i++)
        if (inv_valid && slots[i].valid && slots[i].tag == inv_addr) slots[i].valid = 0;
      if (fill_valid && !(inv_valid && inv_addr == fill_addr)) begin
        bit done;
        done = 0;
        for (int i = 0; i < ENTRIES; i++)
          if (slots[i].valid && slots[i].tag == fill_addr) begin
            slots[i].data = fill_data; done = 1;
          end
        if (!done) begin
          if (slots[ptr].valid) evictions++;
          slots[ptr] = '{fill_addr, fill_data, 1'b1};
          ptr = (ptr + 1) % ENTRIES;
        end
      end
    end
    check(evictions > 0, "FIFO replacement exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
