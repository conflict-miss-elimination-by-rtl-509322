// Direct-mapped L1 data cache with a miss prefetch buffer on its refill path.
//
// A 32KB direct-mapped cache of 32-byte lines (1024 sets). A processor access
// is looked up in the cache; on a miss the miss prefetch buffer (MPB) is
// searched in the same cycle. If the MPB holds the line it is copied into the
// cache; otherwise the line is fetched from L2. Either way the miss line
// address is sent to the time-stride prefetcher's miss history, so that a
// miss the MPB hid still yields a new time-stride and still advances the
// prefetch schedule. After the refill the access is looked up again and hits.
//
// Stores write the word into the cache and through to L2 (write-allocate,
// write-through); while a store is offered to L2 its line address is put on
// snoop_* so that stale prefetched copies are dropped.
//
// Interface and timing (one access at a time):
//   req_valid/req_ready/req_we/req_addr/req_wdata : processor request; word
//     addresses, 32-bit words. resp_valid/resp_rdata answer it (also pulsed
//     for a store once L2 has taken it).
//   Cycle after acceptance: lookup. Hit: load answered in that cycle.
//   MPB hit: one extra cycle. L2 miss: request, wait for the line, one more.
//   miss_valid/miss_addr : one pulse per miss, in the first lookup cycle.
//   ev_* : one-cycle pulses for the statistics.
// The cache size, line size, direct mapping and the miss flow (cache, then
// MPB, then L2; miss address to the miss history in both miss cases) follow
// the described design. Write-through with write-allocate, the blocking
// controller and the handshakes are this design's choices.
module l1_cache
  import tsp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  // processor
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_we,
  input  addr_t      req_addr,
  input  word_t      req_wdata,
  output logic       resp_valid,
  output word_t      resp_rdata,
  // miss prefetch buffer lookup
  output line_addr_t mpb_addr,
  input  logic       mpb_hit,
  input  line_t      mpb_data,
  // miss address to the time-stride prefetcher
  output logic       miss_valid,
  output line_addr_t miss_addr,
  // L2 demand read
  output logic       rd_req_valid,
  input  logic       rd_req_ready,
  output line_addr_t rd_req_addr,
  input  logic       rd_resp_valid,
  input  line_t      rd_resp_data,
  // L2 write-through
  output logic       wr_valid,
  input  logic       wr_ready,
  output addr_t      wr_addr,
  output word_t      wr_data,
  // store snoop for the prefetch path
  output logic       snoop_valid,
  output line_addr_t snoop_addr,
  // events
  output logic       ev_hit,
  output logic       ev_mpb_hit,
  output logic       ev_l2_fetch
);

  localparam int unsigned SETS   = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned INDEX_W = $clog2(SETS);
  localparam int unsigned TAG_W   = LINE_ADDR_W - INDEX_W;
  localparam int unsigned WSEL_W  = $clog2(WORDS_PER_LINE);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_L2_REQ, S_L2_WAIT, S_WRITE} state_e;

  state_e             state_q;
  logic               first_q;    // first lookup of this access
  logic               we_q;
  addr_t              addr_q;
  word_t              wdata_q;

  logic [SETS-1:0]    valid_q;
  logic [TAG_W-1:0]   tag_q  [SETS];
  line_t              data_q [SETS];

  line_addr_t         line;
  logic [INDEX_W-1:0] index;
  logic [TAG_W-1:0]   tag;
  logic [WSEL_W-1:0]  wsel;
  logic               hit;

  assign line  = addr_q[ADDR_W-1:OFFSET_W];
  assign index = line[INDEX_W-1:0];
  assign tag   = line[LINE_ADDR_W-1:INDEX_W];
  assign wsel  = addr_q[OFFSET_W-1:2];
  assign hit   = valid_q[index] && tag_q[index] == tag;

  assign req_ready    = (state_q == S_IDLE);
  assign mpb_addr     = line;
  assign miss_addr    = line;
  assign miss_valid   = (state_q == S_LOOKUP) && !hit;
  assign rd_req_valid = (state_q == S_L2_REQ);
  assign rd_req_addr  = line;
  assign wr_valid     = (state_q == S_WRITE);
  assign wr_addr      = addr_q;
  assign wr_data      = wdata_q;
  assign snoop_valid  = (state_q == S_WRITE);
  assign snoop_addr   = line;
  assign ev_hit       = (state_q == S_LOOKUP) && hit && first_q;
  assign ev_mpb_hit   = miss_valid && mpb_hit;
  assign ev_l2_fetch  = miss_valid && !mpb_hit;

  assign resp_rdata   = data_q[index][wsel*WORD_W +: WORD_W];
  assign resp_valid   = ((state_q == S_LOOKUP) && hit && !we_q) ||
                        ((state_q == S_WRITE) && wr_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      valid_q <= '0;
      first_q <= 1'b0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          we_q    <= req_we;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          first_q <= 1'b1;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          first_q <= 1'b0;
          if (hit) begin
            if (we_q) begin
              data_q[index][wsel*WORD_W +: WORD_W] <= wdata_q;
              state_q <= S_WRITE;
            end else begin
              state_q <= S_IDLE;
            end
          end else if (mpb_hit) begin
            valid_q[index] <= 1'b1;
            tag_q[index]   <= tag;
            data_q[index]  <= mpb_data;
          end else begin
            state_q <= S_L2_REQ;
          end
        end
        S_L2_REQ:  if (rd_req_ready) state_q <= S_L2_WAIT;
        S_L2_WAIT: if (rd_resp_valid) begin
          valid_q[index] <= 1'b1;
          tag_q[index]   <= tag;
          data_q[index]  <= rd_resp_data;
          state_q        <= S_LOOKUP;
        end
        S_WRITE:   if (wr_ready) state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  // L2 requests are held, unchanged, until L2 takes them.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr))
    else $error("l1_cache: read request dropped or changed before it was taken");
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data))
    else $error("l1_cache: store dropped or changed before it was taken");

endmodule
