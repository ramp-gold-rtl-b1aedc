// Self-checking test of host_tlb: misses before any fill, hits after fills for
// several threads, two ways per set with round-robin replacement (a third
// page in a set evicts the oldest), per-thread privacy and flush.
`include "tb_check.svh"
module tb_host_tlb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, hit, fv;
  logic [5:0] lt, ft;
  logic [31:0] va, pa;
  logic [19:0] fvpn, fppn;
  host_tlb dut (.clk, .rst_n, .flush, .lk_tid(lt), .lk_vaddr(va), .lk_hit(hit), .lk_paddr(pa),
                .fill_valid(fv), .fill_tid(ft), .fill_vpn(fvpn), .fill_ppn(fppn));
  task automatic fill(input int t, input logic [19:0] v, p);
    @(negedge clk); fv = 1; ft = 6'(t); fvpn = v; fppn = p; @(negedge clk); fv = 0;
  endtask
  task automatic look(input int t, input logic [31:0] a, input logic eh, input logic [31:0] ep, input string m);
    lt = 6'(t); va = a; #1;
    `CHECK(hit == eh, m)
    if (eh) `CHECK(pa == ep, {m, " paddr"})
  endtask
  initial begin
    flush = 0; fv = 0; ft = 0; fvpn = 0; fppn = 0; lt = 0; va = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    look(3, 32'h0001_2345, 0, 0, "cold miss");
    fill(3, 20'h00012, 20'h0ABCD);
    look(3, 32'h0001_2345, 1, 32'h0ABC_D345, "hit after fill");
    look(4, 32'h0001_2345, 0, 0, "other thread misses");
    fill(3, 20'h00022, 20'h00777);     // same set (vpn[3:0] = 2), second way
    look(3, 32'h0001_2FFF, 1, 32'h0ABC_DFFF, "both ways held (1)");
    look(3, 32'h0002_2000, 1, 32'h0077_7000, "both ways held (2)");
    fill(3, 20'h00032, 20'h00888);     // third page in the set replaces the first
    look(3, 32'h0001_2000, 0, 0, "round robin evicted first");
    look(3, 32'h0002_2000, 1, 32'h0077_7000, "second kept");
    look(3, 32'h0003_2004, 1, 32'h0088_8004, "third present");
    for (int t = 0; t < 64; t++) fill(t, 20'(t * 16 + 5), 20'(t + 100));
    for (int t = 0; t < 64; t++) look(t, {20'(t * 16 + 5), 12'h010}, 1, {20'(t + 100), 12'h010}, "all threads");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    look(3, 32'h0002_2000, 0, 0, "flushed");
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
