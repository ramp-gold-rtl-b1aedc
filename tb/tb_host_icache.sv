// Self-checking test of host_icache with the behavioural host memory:
// random fetches from several threads over a region larger than one cache;
// every hit must return the memory word, a miss must replay until the fill
// lands, at most one fill is outstanding per thread, and a conflicting address
// evicts the line (direct mapped, 8 lines of 32 bytes per thread).
`include "tb_check.svh"
module tb_host_icache;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rv, hit, mv, mr, rspv;
  logic [5:0] rt;
  logic [31:0] ra, inst;
  mem_req_t mq;
  mem_resp_t rsp;
  host_icache dut (.clk, .rst_n, .req_valid(rv), .req_tid(rt), .req_addr(ra), .rsp_hit(hit),
    .rsp_inst(inst), .mem_req_valid(mv), .mem_req(mq), .mem_req_ready(mr), .mem_resp_valid(rspv),
    .mem_resp(rsp));
  dram_model #(.AW(12), .LAT(20), .BUSY_PCT(20)) u_mem (.clk, .rst_n, .req_valid(mv), .req(mq),
    .req_ready(mr), .resp_valid(rspv), .resp(rsp));
  int hits, misses, reqs;
  logic [63:0] outst = '0;
  int dup = 0;
  always @(posedge clk) begin
    if (mv && mr) begin reqs++; if (outst[mq.tag[5:0]]) dup++; end
    if (rspv) outst[rsp.tag[5:0]] <= 1'b0;
    if (mv && mr) outst[mq.tag[5:0]] <= 1'b1;
  end
  task automatic fetch(input int t, input logic [31:0] a, output int tries);
    tries = 0;
    do begin
      @(negedge clk); rv = 1; rt = 6'(t); ra = a;
      @(negedge clk); rv = 0; tries++;
      if (hit) `CHECK(inst == u_mem.mem[a[13:2]], "hit data")
      if (!hit) repeat ($urandom % 8) @(negedge clk);
    end while (!hit && tries < 100);
    `CHECK(tries < 100, "fill arrives")
  endtask
  initial begin
    int n, r0;
    rv = 0; rt = 0; ra = 0; hits = 0; misses = 0; reqs = 0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    fetch(1, 32'h100, n); `CHECK(n > 1, "cold miss replays")
    r0 = reqs;
    fetch(1, 32'h104, n); `CHECK(n == 1, "same line hits")
    fetch(2, 32'h104, n); `CHECK(n > 1, "private per thread")
    fetch(1, 32'h200, n); `CHECK(n > 1, "conflict miss (same index)")
    fetch(1, 32'h100, n); `CHECK(n > 1, "evicted line misses again")
    for (int i = 0; i < 400; i++) begin
      fetch($urandom % 4, ($urandom % 128) * 4, n);
      if (n == 1) hits++; else misses++;
    end
    $display("hits=%0d misses=%0d reqs=%0d", hits, misses, reqs);
    `CHECK(hits > 50 && misses > 50, "mix of hits and misses")
    `CHECK(dup == 0, "at most one fill outstanding per thread")
    `CHECK(reqs >= misses / 2, "misses fetch lines")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
