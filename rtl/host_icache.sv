// Private host instruction caches, one per thread.
//
// Every thread owns a direct-mapped cache of LINES lines of LINE_BYTES bytes
// (8 x 32 B = 256 B by default), all kept in one RAM indexed by
// {thread, line}. A lookup presented in one host cycle is answered in the
// next (synchronous, BRAM-like read): rsp_hit and the instruction word. On a
// miss the cache sends one line read to host memory for that thread, unless a
// fill for the thread is already outstanding, and the pipeline replays the
// thread. The fill response, tagged with the thread number, writes the line
// and its tag. The cache only speeds up functional simulation and has no
// effect on target timing.
//
// Size, organisation and the per-thread privacy are the document's; the
// 32-byte line (the smallest DRAM burst), one outstanding fill per thread and
// the request/response handshake are this design's choices. Stores do not
// invalidate these caches.
module host_icache
  import rg_pkg::*;
#(
  parameter int NTHREADS   = 64,
  parameter int LINES      = 8,
  parameter int LINE_BYTES = 32,
  localparam int TW = $clog2(NTHREADS),
  localparam int IW = $clog2(LINES),
  localparam int OW = $clog2(LINE_BYTES),
  localparam int TAGW = 32 - IW - OW
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup, answered next cycle
  input  logic          req_valid,
  input  logic [TW-1:0] req_tid,
  input  logic [31:0]   req_addr,
  output logic          rsp_hit,
  output logic [31:0]   rsp_inst,
  // host memory
  output logic          mem_req_valid,
  output mem_req_t      mem_req,
  input  logic          mem_req_ready,
  input  logic          mem_resp_valid,
  input  mem_resp_t     mem_resp
);
  logic [LINE_BYTES*8-1:0] data_mem [NTHREADS*LINES];
  logic [TAGW-1:0]         tag_mem  [NTHREADS*LINES];
  logic [NTHREADS*LINES-1:0] vld;
  logic [NTHREADS-1:0]     pending;
  logic [31:0]             fill_addr [NTHREADS];

  // stage registers
  logic                    s_valid;
  logic [TW-1:0]           s_tid;
  logic [31:0]             s_addr;
  logic [LINE_BYTES*8-1:0] s_line;
  logic [TAGW-1:0]         s_tag;
  logic                    s_vld;

  wire [TW+IW-1:0] r_idx = {req_tid, req_addr[OW+IW-1:OW]};
  wire [TW-1:0]    f_tid = mem_resp.tag[TW-1:0];
  wire [TW+IW-1:0] f_idx = {f_tid, fill_addr[f_tid][OW+IW-1:OW]};
  wire             fill  = mem_resp_valid && !mem_resp.tag[7];

  always_ff @(posedge clk) begin
    s_line <= data_mem[r_idx];
    s_tag  <= tag_mem[r_idx];
    if (fill) begin
      data_mem[f_idx] <= mem_resp.data;
      tag_mem[f_idx]  <= fill_addr[f_tid][31:OW+IW];
    end
  end

  logic miss;
  assign miss    = s_valid && !(s_vld && s_tag == s_addr[31:OW+IW]);
  assign rsp_hit = s_valid && !miss;
  always_comb begin
    logic [OW-3:0] w;
    w = s_addr[OW-1:2];
    rsp_inst = s_line[LINE_BYTES*8-1 - 32*w -: 32];
  end

  assign mem_req_valid = miss && !pending[s_tid];
  always_comb begin
    mem_req       = '0;
    mem_req.write = 1'b0;
    mem_req.addr  = {s_addr[31:OW], {OW{1'b0}}};
    mem_req.tag   = 8'(s_tid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0; s_tid <= '0; s_addr <= '0; s_vld <= 1'b0;
      vld <= '0; pending <= '0;
      for (int t = 0; t < NTHREADS; t++) fill_addr[t] <= '0;
    end else begin
      s_valid <= req_valid;
      s_tid   <= req_tid;
      s_addr  <= req_addr;
      s_vld   <= vld[r_idx] && !(fill && f_idx == r_idx);
      if (fill) begin
        vld[f_idx]     <= 1'b1;
        pending[f_tid] <= 1'b0;
      end
      if (mem_req_valid && mem_req_ready) begin
        pending[s_tid]   <= 1'b1;
        fill_addr[s_tid] <= mem_req.addr;
      end
    end
  end
endmodule
