// Self-checking test of host_dcache with the behavioural host memory:
// random loads, word stores and byte stores from many threads, retried until
// they hit, checked against a reference memory kept here; checks write-through
// (memory holds every store), miss merging (two threads missing one line
// send one request) and that a 16 KB-conflicting address evicts a line.
`include "tb_check.svh"
module tb_host_dcache;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rv, rs, rspv, hit, busy, mv, mr, mrv;
  logic [5:0] rt;
  logic [31:0] ra, wd, rdat;
  logic [3:0] wm;
  logic [63:0] mb;
  mem_req_t mq;
  mem_resp_t mrsp;
  logic [31:0] refm [4096];
  host_dcache dut (.clk, .rst_n, .req_valid(rv), .req_tid(rt), .req_addr(ra), .req_store(rs),
    .req_wdata(wd), .req_wmask(wm), .rsp_valid(rspv), .rsp_hit(hit), .rsp_busy(busy), .rsp_rdata(rdat),
    .mshr_busy(mb), .mem_req_valid(mv), .mem_req(mq), .mem_req_ready(mr), .mem_resp_valid(mrv),
    .mem_resp(mrsp));
  dram_model #(.AW(12), .LAT(20), .BUSY_PCT(20)) u_mem (.clk, .rst_n, .req_valid(mv), .req(mq),
    .req_ready(mr), .resp_valid(mrv), .resp(mrsp));
  int reads;
  always @(posedge clk) if (mv && mr && !mq.write) reads++;

  task automatic access(input int t, input logic [31:0] a, input logic st, input logic [31:0] d,
                        input logic [3:0] m, output int tries);
    tries = 0;
    do begin
      @(negedge clk); rv = 1; rt = 6'(t); ra = a; rs = st; wd = d; wm = m;
      @(negedge clk); rv = 0; tries++;
      if (hit && !st) `CHECK(rdat == refm[a[13:2]], "load data")
      if (hit && st) for (int b = 0; b < 4; b++) if (m[3-b]) refm[a[13:2]][31-8*b -: 8] = d[31-8*b -: 8];
      if (!hit) repeat ($urandom % 4) @(negedge clk);
    end while (!hit && tries < 200);
    `CHECK(tries < 200, "access completes")
  endtask

  initial begin
    int n, r0;
    rv = 0; rt = 0; ra = 0; rs = 0; wd = 0; wm = 0; reads = 0;
    for (int i = 0; i < 4096; i++) begin refm[i] = $urandom; u_mem.mem[i] = refm[i]; end
    repeat (2) @(negedge clk); rst_n = 1;
    access(0, 32'h40, 0, 0, 0, n);     `CHECK(n > 1, "cold load miss")
    access(0, 32'h44, 0, 0, 0, n);     `CHECK(n == 1, "same line hit")
    access(5, 32'h48, 1, 32'hA1B2C3D4, 4'hF, n); `CHECK(n == 1, "store hit, shared cache")
    access(6, 32'h49, 1, 32'h00EE0000, 4'b0100, n);
    access(7, 32'h48, 0, 0, 0, n);     `CHECK(n == 1, "load sees byte store")
    // miss merge: two threads miss the same line back to back
    r0 = reads;
    @(negedge clk); rv = 1; rt = 1; ra = 32'h300; rs = 0;
    @(negedge clk); rt = 2; ra = 32'h304;
    @(negedge clk); rv = 0;
    repeat (40) @(negedge clk);
    `CHECK(reads - r0 == 1, "two misses, one request")
    access(2, 32'h304, 0, 0, 0, n);    `CHECK(n == 1, "merged miss filled")
    // conflict: 16 KB apart maps to the same line (memory wraps at 16 KB)
    access(3, 32'h4040, 0, 0, 0, n);   `CHECK(n > 1, "conflict miss")
    access(0, 32'h40, 0, 0, 0, n);     `CHECK(n > 1, "evicted")
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] a;
      int k;
      a = ($urandom % 4096) * 4;
      k = $urandom % 3;
      if (k == 0)      access($urandom % 64, a, 0, 0, 0, n);
      else if (k == 1) access($urandom % 64, a, 1, $urandom, 4'hF, n);
      else             access($urandom % 64, a + 32'($urandom % 4), 1, {4{8'($urandom)}}, 4'b1000 >> ($urandom % 4), n);
    end
    repeat (40) @(negedge clk);
    for (int i = 0; i < 4096; i++) `CHECK(u_mem.mem[i] == refm[i], "write-through memory image")
    `TB_DONE
  end
  initial begin #50000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
