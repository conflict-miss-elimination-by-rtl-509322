// Behavioural model of the L2 cache and the memory behind it, for testbenches.
//
// Not synthesizable logic: a stand-in for the L2 cache the system attaches
// to. It holds every line at its initial value (tb_mem_pkg) plus the stores
// it has taken. Demand reads are answered RD_LAT cycles after they are
// taken. Prefetch reads are taken when a random draw falls under PF_READY_PCT
// percent (pf_stall forces it off) and answered, in order, PF_LAT cycles
// later; data is read when the request is taken. Stores are always taken.
module l2_model
  import tsp_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned RD_LAT       = 8,
  parameter int unsigned PF_LAT       = 8,
  parameter int unsigned PF_READY_PCT = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_req_valid,
  output logic       rd_req_ready,
  input  line_addr_t rd_req_addr,
  output logic       rd_resp_valid,
  output line_t      rd_resp_data,
  input  logic       wr_valid,
  output logic       wr_ready,
  input  addr_t      wr_addr,
  input  word_t      wr_data,
  input  logic       pf_req_valid,
  output logic       pf_req_ready,
  input  line_addr_t pf_req_addr,
  output logic       pf_resp_valid,
  output line_t      pf_resp_data,
  input  logic       pf_stall
);

  word_t stored [addr_t];

  function automatic line_t read_line(line_addr_t a);
    line_t l;
    l = init_line(a);
    for (int unsigned w = 0; w < WORDS_PER_LINE; w++) begin
      addr_t wa;
      wa = {a, 5'(w * 4)};
      if (stored.exists(wa)) l[w*WORD_W +: WORD_W] = stored[wa];
    end
    return l;
  endfunction

  typedef struct { line_t data; longint due; } pend_t;
  pend_t  pf_q[$];
  longint cycle;
  longint rd_due;
  logic   rd_busy;
  line_t  rd_line;
  logic   pf_ready_draw;

  assign rd_req_ready = !rd_busy;
  assign wr_ready     = 1'b1;
  assign pf_req_ready = pf_ready_draw && !pf_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle         <= 0;
      rd_busy       <= 1'b0;
      rd_resp_valid <= 1'b0;
      pf_resp_valid <= 1'b0;
      pf_ready_draw <= 1'b1;
      pf_q.delete();
    end else begin
      cycle <= cycle + 1;
      pf_ready_draw <= ($urandom_range(99) < PF_READY_PCT);
      rd_resp_valid <= 1'b0;
      pf_resp_valid <= 1'b0;
      if (wr_valid && wr_ready) stored[{wr_addr[ADDR_W-1:2], 2'b00}] = wr_data;
      if (rd_req_valid && rd_req_ready) begin
        rd_busy <= 1'b1;
        rd_line <= read_line(rd_req_addr);
        rd_due  <= cycle + longint'(RD_LAT);
      end
      if (rd_busy && cycle >= rd_due) begin
        rd_busy       <= 1'b0;
        rd_resp_valid <= 1'b1;
        rd_resp_data  <= rd_line;
      end
      if (pf_q.size() > 0 && pf_q[0].due <= cycle) begin
        pf_resp_valid <= 1'b1;
        pf_resp_data  <= pf_q[0].data;
        void'(pf_q.pop_front());
      end
      if (pf_req_valid && pf_req_ready) pf_q.push_back('{read_line(pf_req_addr), cycle + longint'(PF_LAT)});
    end
  end

endmodule
