// Self-checking test of l1_tm against a reference LRU model kept in the
// testbench: random reads and writes from many cores over a small address
// pool, under several runtime geometries (sets, ways, line size) with a flush
// between them; checks hit, evict_dirty and the evicted line address.
`include "tb_check.svh"
module tb_l1_tm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, rv, rw, hit, ed;
  logic [2:0] sl, ll;
  logic [2:0] ways;
  logic [5:0] core;
  logic [31:0] addr, eaddr;
  l1_tm dut (.clk, .rst_n, .flush, .sets_log2(sl), .ways, .line_log2(ll), .req_valid(rv),
    .req_core(core), .req_addr(addr), .req_write(rw), .hit, .evict_dirty(ed), .evict_addr(eaddr));

  // reference: per row, most recent first
  int unsigned lines [int][$];
  bit          dirty [int][int unsigned];
  int hits, evd;

  task automatic access(input int c, input logic [31:0] a, input bit w);
    int unsigned ln; int row; int pos; bit exp_hit, exp_ed; int unsigned vl;
    ln = a >> ll; row = c * 64 + int'(ln & ((1 << sl) - 1));
    pos = -1; exp_ed = 0; vl = 0;
    if (lines.exists(row)) foreach (lines[row][i]) if (lines[row][i] == ln) pos = i;
    exp_hit = pos >= 0;
    @(negedge clk); rv = 1; core = 6'(c); addr = a; rw = w;
    #1;
    `CHECK(hit == exp_hit, $sformatf("hit core %0d addr %h", c, a))
    if (exp_hit) begin
      lines[row].delete(pos);
      dirty[row][ln] = dirty[row][ln] | w;
    end else begin
      if (lines.exists(row) && lines[row].size() == ways) begin
        vl = lines[row].pop_back();
        exp_ed = dirty[row][vl];
        dirty[row].delete(vl);
        `CHECK(ed == exp_ed, "evict_dirty")
        if (exp_ed) begin `CHECK(eaddr == (vl << ll), "evict address") evd++; end
      end else `CHECK(ed == 0, "no eviction into a free way")
      dirty[row][ln] = w;
    end
    lines[row].push_front(ln);
    if (exp_hit) hits++;
    @(posedge clk); #1 rv = 0;
  endtask

  initial begin
    flush = 0; rv = 0; rw = 0; core = 0; addr = 0; hits = 0; evd = 0;
    sl = 6; ways = 4; ll = 7;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 6; cfg++) begin
      if (cfg > 0) begin
        sl = 3'($urandom_range(0, 6)); ways = 3'($urandom_range(1, 4)); ll = 3'($urandom_range(5, 7));
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        lines.delete(); dirty.delete();
      end
      for (int i = 0; i < 3000; i++)
        access($urandom % 4, ($urandom % 4096) * 8 << (cfg % 3), $urandom % 3 == 0);
    end
    `CHECK(hits > 1000 && evd > 100, "hits and dirty evictions exercised")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
