// Self-checking test of thread_scheduler with a model pipeline in the
// testbench: issued threads come back after a random delay as a replay or a
// retirement with a random stall. Checks that each running core retires once
// in every target cycle it is not stalled, that after a stall of s cycles the
// core next retires exactly s+1 target cycles later, that halted cores are
// never issued, and that idle and sync events occur.
`include "tb_check.svh"
module tb_thread_scheduler;
  int checks = 0, failures = 0;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, iv, rpv, rtv, adv, sync, idl, evi, allh;
  logic [N-1:0] halted;
  logic [3:0] it, rpt, rtt;
  logic [15:0] rts;
  logic [63:0] tc;
  thread_scheduler #(.NTHREADS(N)) dut (.clk, .rst_n, .run, .halted, .issue_valid(iv), .issue_tid(it),
    .replay_valid(rpv), .replay_tid(rpt), .retire_valid(rtv), .retire_tid(rtt), .retire_stall(rts),
    .target_cycle(tc), .all_halted(allh), .ev_advance(adv), .ev_sync(sync), .ev_idle(idl), .ev_issue(evi));

  typedef struct { int tid; int due; bit replay; } fl_t;
  fl_t q[$];
  longint expect_at [N];
  int now, nret, nidle, nsync, nrep;

  always @(posedge clk) if (rst_n) begin
    now++;
    if (iv) begin
      fl_t f;
      `CHECK(!halted[it], "halted core not issued")
      foreach (q[i]) `CHECK(q[i].tid != int'(it), "one instruction in flight per thread")
      f.tid = it; f.due = now + $urandom_range(1, 12); f.replay = $urandom % 4 == 0;
      q.push_back(f);
    end
    if (adv) nidle += idl;
    nsync += sync;
  end

  initial begin
    now = 0; nret = 0; nidle = 0; nsync = 0; nrep = 0;
    run = 0; halted = '0; halted[N-1] = 1; rpv = 0; rtv = 0; rpt = 0; rtt = 0; rts = 0;
    foreach (expect_at[i]) expect_at[i] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); run = 1;
    while (tc < 3000) begin
      @(negedge clk);
      rpv = 0; rtv = 0;
      // at most one replay and one retirement per host cycle
      for (int i = 0; i < q.size(); i++)
        if (q[i].due <= now && q[i].replay && !rpv) begin
          rpv = 1; rpt = 4'(q[i].tid); q.delete(i); nrep++; break;
        end
      for (int i = 0; i < q.size(); i++)
        if (q[i].due <= now && !q[i].replay) begin
          int t; t = q[i].tid;
          rtv = 1; rtt = 4'(t);
          rts = ($urandom % 3 == 0) ? 16'($urandom % 20) : 16'd0;
          `CHECK(tc == expect_at[t], $sformatf("core %0d retires in cycle %0d, expected %0d", t, tc, expect_at[t]))
          expect_at[t] = tc + 1 + rts;
          q.delete(i); nret++; break;
        end
      if (tc == 1500 && !halted[3]) halted[3] = 1;
    end
    run = 0;
    $display("nret=%0d nrep=%0d nidle=%0d nsync=%0d", nret, nrep, nidle, nsync);
    `CHECK(nret > 5000, "many retirements")
    `CHECK(nrep > 1000 && nidle > 0 && nsync > 1000, "replays, idle and sync exercised")
    halted = '1; #1;
    `CHECK(allh, "all_halted")
    `TB_DONE
  end
  initial begin #20000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
