// Self-checking test of perf_counters at full size (64 cores x 10 private
// counters + 17 global counters): random increments for many cycles counted
// by a reference model, then a pipelined read of every counter over the ring
// (one request per cycle, answer after NCORES+1 cycles) plus reads of
// unmapped addresses, which must come back with rsp_found low.
`include "tb_check.svh"
module tb_perf_counters;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  localparam int NC = 64, P = 10, G = 17, TOT = NC * P + G;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cev, rdv, rspv, found;
  logic [5:0] cc;
  logic [P-1:0] cinc;
  logic [G-1:0] ginc;
  logic [9:0] ra;
  logic [63:0] rspd;
  perf_counters dut (.clk, .rst_n, .core_ev_valid(cev), .core_ev_core(cc), .core_ev_inc(cinc),
    .glob_inc(ginc), .rd_valid(rdv), .rd_addr(ra), .rsp_valid(rspv), .rsp_data(rspd), .rsp_found(found));
  longint ref_cnt [1024];
  int sent [$];
  int got;
  always @(posedge clk) if (rst_n && rspv) begin
    int a;
    a = sent.pop_front();
    `CHECK(found == (a < TOT), $sformatf("found flag for %0d", a))
    if (a < TOT) `CHECK(rspd == ref_cnt[a], $sformatf("counter %0d = %0d, expected %0d", a, rspd, ref_cnt[a]))
    got++;
  end
  int lat, t0;
  initial begin
    cev = 0; cc = 0; cinc = 0; ginc = 0; rdv = 0; ra = 0; got = 0;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      cev = $urandom % 3 != 0; cc = 6'($urandom); cinc = P'($urandom); ginc = G'($urandom);
      if (cev) for (int k = 0; k < P; k++) if (cinc[k]) ref_cnt[int'(cc) * P + k]++;
      for (int k = 0; k < G; k++) if (ginc[k]) ref_cnt[NC * P + k]++;
    end
    @(negedge clk); cev = 0; ginc = 0;
    // latency of one read
    @(negedge clk); rdv = 1; ra = 10'(NC * P + 3); sent.push_back(NC * P + 3); t0 = $time;
    @(negedge clk); rdv = 0;
    wait (got == 1); lat = ($time - t0) / 10;
    `CHECK(lat == NC + 1 || lat == NC + 2, $sformatf("read latency %0d", lat))
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); rdv = 1; ra = 10'(a); sent.push_back(a);
    end
    @(negedge clk); rdv = 0;
    repeat (NC + 4) @(negedge clk);
    `CHECK(got == 1025, "every read answered")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
