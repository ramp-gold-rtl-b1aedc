// Shared lockup-free host data cache.
//
// One direct-mapped cache of SIZE_BYTES (16 KB) in LINE_BYTES (32 B) lines
// serves all threads. A lookup (load or store) presented in one host cycle is
// answered in the next:
//   * load hit    -> rsp_hit with the word;
//   * store hit   -> the word is merged into the line and written through to
//                    host memory; if the memory port is not free this cycle
//                    the answer is rsp_busy and the store is not performed;
//   * stale read  -> the line was written by a store or a fill in the cycle
//                    it was read, a fill for its index lands now, or an MSHR
//                    still waits for it: rsp_busy, retry, no request;
//   * miss        -> the thread's MSHR (one per thread, MSHRS = 64) is
//                    allocated with the line address and a line read is sent,
//                    unless an MSHR already waits for the same line, in which
//                    case the miss is merged and no request is sent. The
//                    pipeline replays the thread, which hits once the fill is in.
// A fill response writes the line and frees every MSHR waiting on it. Stores
// allocate on miss. The cache has no effect on target timing.
//
// Size, direct mapping, sharing and the 64 outstanding misses are the
// document's; the line size, write-through with allocate, and miss merging
// are this design's choices.
module host_dcache
  import rg_pkg::*;
#(
  parameter int NTHREADS   = 64,
  parameter int SIZE_BYTES = 16384,
  parameter int LINE_BYTES = 32,
  localparam int TW = $clog2(NTHREADS),
  localparam int NLINES = SIZE_BYTES / LINE_BYTES,
  localparam int IW = $clog2(NLINES),
  localparam int OW = $clog2(LINE_BYTES),
  localparam int TAGW = 32 - IW - OW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic [TW-1:0] req_tid,
  input  logic [31:0]   req_addr,
  input  logic          req_store,
  input  logic [31:0]   req_wdata,
  input  logic [3:0]    req_wmask,
  output logic          rsp_valid,
  output logic          rsp_hit,     // load returned data / store performed
  output logic          rsp_busy,    // store hit but memory port busy
  output logic [31:0]   rsp_rdata,
  output logic [NTHREADS-1:0] mshr_busy,
  // host memory
  output logic          mem_req_valid,
  output mem_req_t      mem_req,
  input  logic          mem_req_ready,
  input  logic          mem_resp_valid,
  input  mem_resp_t     mem_resp
);
  localparam int LB = LINE_BYTES * 8;

  logic [LB-1:0]   data_mem [NLINES];
  logic [TAGW-1:0] tag_mem  [NLINES];
  logic [NLINES-1:0] vld;
  logic [31-OW:0]  mshr_line [NTHREADS];

  logic            s_valid, s_store, s_vld, s_stale;
  logic [TW-1:0]   s_tid;
  logic [31:0]     s_addr, s_wdata;
  logic [3:0]      s_wmask;
  logic [LB-1:0]   s_line;
  logic [TAGW-1:0] s_tag;

  wire [IW-1:0] r_idx  = req_addr[OW+IW-1:OW];
  wire [IW-1:0] s_idx  = s_addr[OW+IW-1:OW];
  wire [TW-1:0] f_tid  = mem_resp.tag[TW-1:0];
  wire          fill   = mem_resp_valid && mem_resp.tag[7];
  wire [31-OW:0] f_line = mshr_line[f_tid];
  wire [IW-1:0] f_idx  = f_line[IW-1:0];

  logic hit, merge, store_go, stale;
  logic [LB-1:0] merged;
  logic [OW-3:0] wsel;

  // The line read may be stale (written by a store or a fill as it was read,
  // or a fill lands now) or still awaited by an MSHR: then the access is
  // retried without a miss, so no fill is ever requested for a line present.
  assign stale = s_valid && (s_stale || (fill && f_idx == s_idx) ||
                 (s_vld && s_tag == s_addr[31:OW+IW] && merge));
  assign hit   = s_valid && !stale && s_vld && (s_tag == s_addr[31:OW+IW]);

  always_comb begin
    merge = 1'b0;
    for (int t = 0; t < NTHREADS; t++)
      if (mshr_busy[t] && mshr_line[t] == s_addr[31:OW]) merge = 1'b1;
  end

  // word merge for a store
  always_comb begin
    wsel   = s_addr[OW-1:2];
    merged = s_line;
    for (int b = 0; b < 4; b++)
      if (s_wmask[3-b]) merged[LB-1 - 32*wsel - 8*b -: 8] = s_wdata[31 - 8*b -: 8];
  end

  assign store_go  = hit && s_store && mem_req_ready;
  assign rsp_valid = s_valid;
  assign rsp_hit   = hit && (!s_store || mem_req_ready);
  assign rsp_busy  = stale || (hit && s_store && !mem_req_ready);
  assign rsp_rdata = s_line[LB-1 - 32*wsel -: 32];

  always_comb begin
    mem_req       = '0;
    mem_req.tag   = {1'b1, 7'(s_tid)};
    mem_req_valid = 1'b0;
    if (hit && s_store) begin
      mem_req_valid = 1'b1;
      mem_req.write = 1'b1;
      mem_req.addr  = {s_addr[31:2], 2'b00};
      mem_req.wdata = s_wdata;
      mem_req.wmask = s_wmask;
    end else if (s_valid && !stale && !hit && !merge && !mshr_busy[s_tid]) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = {s_addr[31:OW], {OW{1'b0}}};
    end
  end

  always_ff @(posedge clk) begin
    s_line <= data_mem[r_idx];
    s_tag  <= tag_mem[r_idx];
    // a store never hits the line being filled, so both writes can happen
    if (fill) begin
      data_mem[f_idx] <= mem_resp.data;
      tag_mem[f_idx]  <= f_line[31-OW:IW];
    end
    if (store_go) data_mem[s_idx] <= merged;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0; s_store <= 1'b0; s_vld <= 1'b0; s_stale <= 1'b0; s_tid <= '0; s_addr <= '0;
      s_wdata <= '0; s_wmask <= '0;
      vld <= '0; mshr_busy <= '0;
      for (int t = 0; t < NTHREADS; t++) mshr_line[t] <= '0;
    end else begin
      s_valid <= req_valid;
      s_store <= req_store;
      s_tid   <= req_tid;
      s_addr  <= req_addr;
      s_wdata <= req_wdata;
      s_wmask <= req_wmask;
      // a store written this cycle to the line being read makes the read stale
      s_vld   <= vld[r_idx];
      s_stale <= (fill && f_idx == r_idx) || (store_go && s_idx == r_idx);
      if (fill) begin
        vld[f_idx] <= 1'b1;
        for (int t = 0; t < NTHREADS; t++)
          if (mshr_busy[t] && mshr_line[t] == f_line) mshr_busy[t] <= 1'b0;
      end
      if (mem_req_valid && mem_req_ready && !mem_req.write) begin
        mshr_busy[s_tid] <= 1'b1;
        mshr_line[s_tid] <= s_addr[31:OW];
      end
    end
  end
endmodule
