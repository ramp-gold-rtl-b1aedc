// Self-checking test of arch_regfile: random writes to all threads and
// registers against a reference array, one-cycle read latency on both ports,
// and register 0 reading as zero.
`include "tb_check.svh"
module tb_arch_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] rtid, wtid;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] refm [64][32];
  arch_regfile dut (.clk, .rst_n, .rtid, .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2),
                    .we, .wtid, .waddr(wa), .wdata(wd));
  initial begin
    we = 0; rtid = 0; ra1 = 0; ra2 = 0; wtid = 0; wa = 0; wd = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 64; t++) for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wtid = 6'(t); wa = 5'(r); wd = $urandom; refm[t][r] = (r == 0) ? 0 : wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [5:0] t; logic [4:0] x, y;
      t = 6'($urandom); x = 5'($urandom); y = 5'($urandom);
      @(negedge clk);
      rtid = t; ra1 = x; ra2 = y;
      we = $urandom % 2; wtid = 6'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      if (we && wa != 0) refm[wtid][wa] = wd;
      #1;
      we = 0;
      `CHECK(rd1 == ((x == 0) ? 0 : refm_old(t, x)), "port 1")
      `CHECK(rd2 == ((y == 0) ? 0 : refm_old(t, y)), "port 2")
    end
    `TB_DONE
  end
  // value before the write of the same cycle (read-before-write)
  logic [31:0] shadow [64][32];
  always @(negedge clk) shadow = refm;
  function automatic logic [31:0] refm_old(input logic [5:0] t, input logic [4:0] r);
    return shadow[t][r];
  endfunction
  initial begin #1000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
