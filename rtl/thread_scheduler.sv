// Thread scheduler of the CPU timing model, with the target cycle count and
// the per-core scoreboard.
//
// target_cycle counts simulated (target) clock cycles. The scoreboard holds,
// for every core, the target cycle until which it is stalled (stall_until).
// At the start of a target cycle every running core that is not stalled is
// marked pending; the scheduler then issues pending cores to the functional
// pipeline, one per host cycle, round robin, never a core already in flight.
// A replayed core becomes issuable again; a retired core leaves the pending
// set and its stall_until is set to target_cycle + 1 + stall, the extra
// target cycles the timing model charged it. Only when no core of this target
// cycle is pending or in flight does the target cycle advance (one per host
// cycle), so all cores stay in lock step.
//
// Event outputs for the performance counters: ev_advance (target cycle ends),
// ev_sync (host cycle spent waiting for the cycle's last instructions),
// ev_idle (a target cycle in which no core was ready) and ev_issue.
//
// The synchronisation rule ("not until all instructions from a given target
// cycle have retired do we begin instruction issue for the next") is the
// document's; round-robin order and one advance per host cycle are this
// design's choices.
//
// rst_n is an asynchronous reset for the logic and also the disable
// condition of the assertions; lint reports that clocked use as a net used
// both synchronously and asynchronously, which is harmless.
module thread_scheduler #(
  parameter int NTHREADS = 64,
  localparam int TW = $clog2(NTHREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [NTHREADS-1:0] halted,
  output logic          issue_valid,
  output logic [TW-1:0] issue_tid,
  input  logic          replay_valid,
  input  logic [TW-1:0] replay_tid,
  input  logic          retire_valid,
  input  logic [TW-1:0] retire_tid,
  input  logic [15:0]   retire_stall,
  output logic [63:0]   target_cycle,
  output logic          all_halted,
  output logic          ev_advance,
  output logic          ev_sync,
  output logic          ev_idle,
  output logic          ev_issue
);
  logic [63:0] stall_until [NTHREADS];
  logic [NTHREADS-1:0] pending, inflight, ready_next;
  logic [TW-1:0] ptr;
  logic          advance;

  assign all_halted = &halted;

  // round-robin pick among pending cores not in flight
  always_comb begin
    logic [NTHREADS-1:0] cand;
    cand        = pending & ~inflight;
    issue_valid = 1'b0;
    issue_tid   = '0;
    for (int k = NTHREADS - 1; k >= 0; k--) begin
      logic [TW-1:0] t;
      t = ptr + TW'(k);
      if (cand[t] && run) begin issue_valid = 1'b1; issue_tid = t; end
    end
  end

  always_comb begin
    for (int t = 0; t < NTHREADS; t++)
      ready_next[t] = !halted[t] && stall_until[t] <= target_cycle + 64'd1;
  end

  assign advance    = run && !all_halted && pending == '0 && inflight == '0 && !retire_valid;
  assign ev_advance = advance;
  assign ev_idle    = advance && ready_next == '0;
  assign ev_sync    = run && !issue_valid && pending != '0;
  assign ev_issue   = issue_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target_cycle <= '0;
      pending      <= '0;
      inflight     <= '0;
      ptr          <= '0;
      for (int t = 0; t < NTHREADS; t++) stall_until[t] <= '0;
    end else begin
      if (issue_valid) begin
        inflight[issue_tid] <= 1'b1;
        ptr                 <= issue_tid + 1'b1;
      end
      if (replay_valid) inflight[replay_tid] <= 1'b0;
      if (retire_valid) begin
        inflight[retire_tid]    <= 1'b0;
        pending[retire_tid]     <= 1'b0;
        stall_until[retire_tid] <= target_cycle + 64'd1 + 64'(retire_stall);
      end
      if (advance) begin
        target_cycle <= target_cycle + 64'd1;
        pending      <= ready_next;
      end
    end
  end

  a_no_double_issue: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid |-> !inflight[issue_tid]);
  a_retire_pending: assert property (@(posedge clk) disable iff (!rst_n)
    retire_valid |-> pending[retire_tid]);
endmodule
