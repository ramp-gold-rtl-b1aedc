// Architected integer register file for all target cores.
//
// One storage array holds the 32 integer registers of each of NTHREADS target
// cores, addressed by {thread, register}, the way a block RAM holds it: the two
// read ports are synchronous (data appears one host cycle after the address)
// and the single write port is written at the clock edge. Register 0 of every
// thread reads as zero and ignores writes.
//
// Keeping all threads' registers in one RAM instead of in flip-flops is what
// the document's functional/timing split allows; the read latency of one host
// cycle is absorbed by a pipeline stage. One register window per thread and
// the absence of BRAM ECC are this design's simplifications.
module arch_regfile #(
  parameter int NTHREADS = 64,
  parameter int NREGS    = 32,
  localparam int TW = $clog2(NTHREADS),
  localparam int RW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // read ports: data valid the cycle after the address
  input  logic [TW-1:0] rtid,
  input  logic [RW-1:0] raddr1,
  input  logic [RW-1:0] raddr2,
  output logic [31:0]   rdata1,
  output logic [31:0]   rdata2,
  // write port
  input  logic          we,
  input  logic [TW-1:0] wtid,
  input  logic [RW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [NTHREADS*NREGS];
  logic        z1, z2;
  logic [31:0] q1, q2;

  always_ff @(posedge clk) begin
    if (we && waddr != '0) mem[{wtid, waddr}] <= wdata;
    q1 <= mem[{rtid, raddr1}];
    q2 <= mem[{rtid, raddr2}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= 1'b1;
      z2 <= 1'b1;
    end else begin
      z1 <= (raddr1 == '0);
      z2 <= (raddr2 == '0);
    end
  end

  assign rdata1 = z1 ? 32'd0 : q1;
  assign rdata2 = z2 ? 32'd0 : q2;
endmodule
