// Self-checking test of timing_model at default geometry, with the
// testbench standing in for the functional model: every issued thread comes
// back a few host cycles later as a retirement (with instruction and data
// addresses) or as a replay. Part 1 runs one core alone and checks exact
// target-cycle gaps: 1 cycle for an L1 hit, 1 + L2 latency + DRAM latency
// for a miss that goes to DRAM. Part 2 runs all 64 cores on random
// streams and checks the counter events against what was sent: per-core
// instructions, loads and stores, retirements and replays by cause, L1 hit
// plus miss equal to accesses, L2 accesses equal to L1 misses.
`include "tb_check.svh"
module tb_timing_model;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run, wbv, iv, allh, idle, cev;
  tm_cfg_t cfg;
  logic [63:0] halted;
  wb_event_t ev;
  logic [5:0] itid, cc;
  logic [63:0] tc;
  logic [NPRIV-1:0] cinc;
  logic [NGLOB-1:0] ginc;
  timing_model dut (.clk, .rst_n, .run, .cfg, .flush(1'b0), .halted, .wb_valid(wbv), .wb_ev(ev),
    .issue_valid(iv), .issue_tid(itid), .target_cycle(tc), .all_halted(allh), .idle,
    .core_ev_valid(cev), .core_ev_core(cc), .core_ev_inc(cinc), .glob_inc(ginc));

  // counters seen on the event outputs
  longint pc_cnt [64][NPRIV];
  longint gc_cnt [NGLOB];
  always @(posedge clk) if (rst_n) begin
    if (cev) for (int k = 0; k < NPRIV; k++) pc_cnt[cc][k] += cinc[k];
    for (int k = 0; k < NGLOB; k++) gc_cnt[k] += ginc[k];
  end

  // stand-in functional model
  typedef struct { wb_event_t e; int due; } fl_t;
  fl_t q[$];
  int now, n [64];
  bit directed;
  longint sent_inst [64], sent_ld [64], sent_st [64], sent_rp [8], sent_ret;
  longint ret_tc [$];
  function automatic wb_event_t make(int c, int k);
    wb_event_t e;
    int h;
    e = '0; e.tid = 6'(c); e.replay = RP_NONE;
    if (directed) begin
      e.pc = 32'h1000 + 32'(4 * k);
      e.is_load = (k == 2 || k == 3);
      e.paddr = 32'h8000 + 32'(4 * (k - 2));
      return e;
    end
    h = (k * 7919 + c * 104729) & 32'h7fffffff;
    e.pc = 32'h40000 + 32'(c) * 32'h1000 + 32'(4 * (k % 200));
    e.is_load  = h % 4 == 1;
    e.is_store = h % 4 == 2;
    e.is_ctrl  = h % 4 == 3;
    e.paddr = (h % 8 == 1) ? 32'h800000 + 32'(h % 1024) * 4 : 32'h100000 + 32'(c) * 32'h800 + 32'(h % 512) * 4;
    return e;
  endfunction
  always @(posedge clk) if (rst_n) begin
    now++;
    if (iv) begin
      fl_t f;
      f.e = make(itid, n[itid]);
      if (!directed && $urandom % 5 == 0) f.e.replay = replay_e'($urandom_range(1, 6));
      f.due = now + $urandom_range(2, 6);
      q.push_back(f);
    end
  end
  initial begin
    wbv = 0; ev = '0;
    forever begin
      @(negedge clk);
      wbv = 0;
      for (int i = 0; i < q.size(); i++)
        if (q[i].due <= now) begin
          wb_event_t e; e = q[i].e;
          wbv = 1; ev = e; q.delete(i);
          if (e.replay == RP_NONE) begin
            n[e.tid]++; sent_ret++; sent_inst[e.tid]++;
            sent_ld[e.tid] += e.is_load; sent_st[e.tid] += e.is_store;
          end else sent_rp[e.replay]++;
          break;
        end
    end
  end
  always @(posedge clk) if (rst_n && directed && dut.retire_valid) ret_tc.push_back(tc);

  initial begin
    int gap;
    run = 0; cfg = TM_CFG_DEFAULT; halted = ~64'd1; directed = 1; now = 0; sent_ret = 0;
    foreach (n[i]) begin n[i] = 0; sent_inst[i] = 0; sent_ld[i] = 0; sent_st[i] = 0; end
    foreach (sent_rp[i]) sent_rp[i] = 0;
    foreach (pc_cnt[i, k]) pc_cnt[i][k] = 0;
    foreach (gc_cnt[k]) gc_cnt[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // part 1: one core, exact gaps
    @(negedge clk); run = 1;
    wait (n[0] == 6);
    @(negedge clk); halted[0] = 1;
    repeat (20) @(negedge clk);
    gap = 1 + int'(cfg.l2_latency) + int'(cfg.dram_latency);
    `CHECK(ret_tc.size() >= 6, "directed retirements")
    `CHECK(ret_tc[1] - ret_tc[0] == gap, $sformatf("I-miss to DRAM gap %0d", ret_tc[1] - ret_tc[0]))
    `CHECK(ret_tc[2] - ret_tc[1] == 1, "I hit: one cycle")
    `CHECK(ret_tc[3] - ret_tc[2] == gap, $sformatf("D-miss to DRAM gap %0d", ret_tc[3] - ret_tc[2]))
    `CHECK(ret_tc[4] - ret_tc[3] == 1, "D hit: one cycle")
    `CHECK(pc_cnt[0][PC_L1I_MISS] == 1 && pc_cnt[0][PC_L1D_MISS] == 1 && pc_cnt[0][PC_L1D_HIT] == 1, "directed L1 counts")
    // part 2: all cores, random streams
    directed = 0;
    foreach (n[i]) begin n[i] = 0; sent_inst[i] = 0; sent_ld[i] = 0; sent_st[i] = 0; end
    foreach (pc_cnt[i, k]) pc_cnt[i][k] = 0;
    foreach (sent_rp[i]) sent_rp[i] = 0;
    foreach (gc_cnt[k]) gc_cnt[k] = 0;
    sent_ret = 0;
    @(negedge clk); halted = '0;
    wait (tc > 20000);
    @(negedge clk); halted = '1;
    repeat (2000) @(negedge clk);
    `CHECK(idle && q.size() == 0, "drained")
    for (int c = 0; c < 64; c++) begin
      `CHECK(pc_cnt[c][PC_INST] == sent_inst[c], "per-core instructions")
      `CHECK(pc_cnt[c][PC_LOAD] == sent_ld[c] && pc_cnt[c][PC_STORE] == sent_st[c], "per-core loads and stores")
      `CHECK(pc_cnt[c][PC_L1D_HIT] + pc_cnt[c][PC_L1D_MISS] == sent_ld[c] + sent_st[c], "L1D hit + miss = accesses")
      `CHECK(pc_cnt[c][PC_L2_HIT] + pc_cnt[c][PC_L2_MISS] == pc_cnt[c][PC_L1I_MISS] + pc_cnt[c][PC_L1D_MISS], "L2 accesses = L1 misses")
    end
    `CHECK(gc_cnt[GC_RETIRE] == sent_ret, "retirements")
    `CHECK(gc_cnt[GC_RP_ICACHE] == sent_rp[RP_ICACHE] && gc_cnt[GC_RP_DCACHE] == sent_rp[RP_DCACHE] &&
           gc_cnt[GC_RP_TLB] == sent_rp[RP_TLB] && gc_cnt[GC_RP_MULDIV] == sent_rp[RP_MULDIV] &&
           gc_cnt[GC_RP_MEM] == sent_rp[RP_MEM] && gc_cnt[GC_RP_STORE3] == sent_rp[RP_STORE3], "replays by cause")
    `CHECK(gc_cnt[GC_ISSUE] == sent_ret + sent_rp[1] + sent_rp[2] + sent_rp[3] + sent_rp[4] + sent_rp[5] + sent_rp[6], "issues = retirements + replays")
    $display("tcycles=%0d retired=%0d l2miss0=%0d merge=%0d", gc_cnt[GC_TCYCLE], sent_ret, pc_cnt[0][PC_L2_MISS], gc_cnt[GC_MSHR_MERGE]);
    `CHECK(gc_cnt[GC_MSHR_MERGE] > 0 && gc_cnt[GC_DRAM_RD] > 0, "merges and DRAM reads")
    `TB_DONE
  end
  initial begin #50000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
