// One station of the performance-counter ring.
//
// Holds NCNT 64-bit counters with global addresses BASE .. BASE+NCNT-1. Each
// counter adds one whenever its bit of `inc` is set. A read request travels
// the ring as {valid, addr, data, found}; every station registers it for one
// host cycle and, if the address is one of its own, puts the counter value in
// and marks it found. Stations never need a shared bus, so the placer can
// spread them over the chip.
//
// The ring interconnect for the counters is the document's; the packet
// format and one cycle per hop are this design's choices.
module perf_ring_node #(
  parameter int NCNT   = 10,
  parameter int BASE   = 0,
  parameter int ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCNT-1:0]   inc,
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [63:0]       in_data,
  input  logic              in_found,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output logic [63:0]       out_data,
  output logic              out_found
);
  logic [63:0] cnt [NCNT];
  wire  mine = int'(in_addr) >= BASE && int'(in_addr) < BASE + NCNT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCNT; i++) cnt[i] <= '0;
      out_valid <= 1'b0; out_addr <= '0; out_data <= '0; out_found <= 1'b0;
    end else begin
      for (int i = 0; i < NCNT; i++) if (inc[i]) cnt[i] <= cnt[i] + 64'd1;
      out_valid <= in_valid;
      out_addr  <= in_addr;
      out_data  <= (in_valid && mine) ? cnt[int'(in_addr) - BASE] : in_data;
      out_found <= in_found || (in_valid && mine);
    end
  end
endmodule
