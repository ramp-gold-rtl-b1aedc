// Self-checking test of l2_bank_tm joined to a dram_tm channel: directed
// cases for a cold miss, a merged miss, a hit after the fill, MSHR-full
// waiting, a dirty eviction and a flush, then random traffic checked
// against invariants (latency floor, merge excludes a new DRAM request,
// full MSHRs delay the DRAM arrival until the earliest MSHR frees).
`include "tb_check.svh"
module tb_l2_bank_tm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, rv, wb, hit, merged, full, ed, dv, dwb;
  logic [3:0] sl; logic [4:0] ways; logic [2:0] ll; logic [1:0] bl; logic [7:0] lat;
  logic [31:0] addr;
  logic [63:0] now, ready, darr, ddone, qd;
  l2_bank_tm dut (.clk, .rst_n, .flush, .sets_log2(sl), .ways, .line_log2(ll), .banks_log2(bl),
    .latency(lat), .req_valid(rv), .req_addr(addr), .req_wb(wb), .now, .hit, .merged,
    .mshr_full(full), .evict_dirty(ed), .ready, .dram_valid(dv), .dram_arrival(darr),
    .dram_wb(dwb), .dram_done(ddone));
  dram_tm u_dram (.clk, .rst_n, .latency(8'd70), .service(8'd40), .req_valid(dv),
    .arrival(darr), .req_wb(dwb), .done(ddone), .queue_delay(qd));

  // drive one request; outputs are sampled before the clock edge that commits it
  task automatic req(input logic [31:0] a, input logic w, input longint t);
    @(negedge clk); rv = 1; addr = a; wb = w; now = t; #1;
  endtask
  task automatic fin(); @(posedge clk); #1 rv = 0; endtask

  initial begin
    longint r1, rd;
    int nfull, nmerge, nhit;
    flush = 0; rv = 0; wb = 0; addr = 0; now = 0;
    sl = 2; ways = 2; ll = 7; bl = 0; lat = 10;
    repeat (2) @(negedge clk); rst_n = 1;
    req(32'h1000, 0, 100);
    `CHECK(!hit && dv && !merged && !full, "cold miss goes to DRAM")
    `CHECK(darr == 110 && ready == 110 + 70, "miss ready = L2 latency + DRAM latency")
    r1 = ready; fin();
    req(32'h1040, 0, 105);
    `CHECK(merged && !dv && ready == r1, "miss to the same line merges")
    fin();
    req(32'h1000, 0, 300);
    `CHECK(hit && !dv && ready == 310, "hit after the fill")
    fin();
    // fill all eight MSHRs with misses in distinct lines at the same time
    for (int i = 0; i < 8; i++) begin
      req(32'h20000 + i * 128, 0, 1000);
      `CHECK(dv && !full, "free MSHR")
      if (i == 0) rd = ready;
      fin();
    end
    req(32'h40000, 0, 1001);
    `CHECK(full && dv && darr == rd, "ninth miss waits for the earliest MSHR")
    fin();
    req(32'h41000, 0, 100000);
    `CHECK(!full, "MSHRs free again once their fills are done")
    fin();
    // dirty eviction: write back a line, then push it out with two conflicts
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    req(32'h0000, 1, 200000); `CHECK(!dv && ready == 200010, "write-back takes the L2 latency only"); fin();
    req(32'h0200, 0, 200100); fin();
    req(32'h0400, 0, 200200);
    `CHECK(ed && dwb && dv, "conflict evicts the dirty line and writes it to DRAM")
    fin();
    req(32'h0000, 0, 300000); `CHECK(!hit, "evicted line misses"); fin();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    req(32'h0400, 0, 400000); `CHECK(!hit, "flush empties the tags"); fin();
    // random traffic with invariants
    sl = 4; ways = 4; bl = 0; ll = 7; lat = 20;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    nfull = 0; nmerge = 0; nhit = 0; now = 500000;
    for (int i = 0; i < 20000; i++) begin
      longint t;
      t = now + ($urandom % 3);
      req(($urandom % 256) * 128, $urandom % 5 == 0, t);
      `CHECK(ready >= t + lat, "latency floor")
      `CHECK(!(merged && dv), "merge never starts a DRAM access")
      `CHECK(!(hit && dv), "hit never starts a DRAM access")
      if (dv) `CHECK(ready == ddone && darr >= t + lat, "miss ready is DRAM done")
      if (full) `CHECK(darr > t + lat || darr == t + lat, "full MSHRs delay arrival")
      nfull += full; nmerge += merged; nhit += hit;
      fin();
    end
    `CHECK(nfull > 10 && nmerge > 10 && nhit > 1000, "full, merge and hit exercised")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
