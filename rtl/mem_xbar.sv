// Host memory crossbar between the host caches and the DRAM controller.
//
// Two request ports (0: host I$, 1: host D$) share one tagged request channel
// to the memory controller. Requests use a valid/ready handshake and are
// granted round-robin, one per host cycle; the memory's ready passes through to
// the granted port. Responses carry the request's tag and are returned to both
// caches, each of which keeps only those whose tag bit 7 names it. Writes are
// posted and get no response. Because requests and responses are decoupled
// and tagged, many misses can be outstanding at once.
//
// The document describes "a multiport crossbar with an asynchronous request
// interface"; the port count, round-robin grant and tag routing are this
// design's choices.
//
// rst_n is an asynchronous reset for the logic and also the disable
// condition of the assertion below; lint reports that second, clocked use as
// a net used both synchronously and asynchronously, which is harmless.
module mem_xbar
  import rg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid [2],
  input  mem_req_t  in_req   [2],
  output logic      in_ready [2],
  output logic      out_valid,
  output mem_req_t  out_req,
  input  logic      out_ready
);
  logic last;     // port granted last
  logic gnt;

  always_comb begin
    if (in_valid[0] && in_valid[1]) gnt = ~last;
    else                            gnt = in_valid[1];
    out_valid   = in_valid[0] || in_valid[1];
    out_req     = in_req[gnt];
    in_ready[0] = out_ready && (gnt == 1'b0);
    in_ready[1] = out_ready && (gnt == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= 1'b0;
    else if (out_valid && out_ready) last <= gnt;
  end

  // the shared channel carries at most one request per cycle
  a_single_grant: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_ready[0] && in_ready[1]));
endmodule
