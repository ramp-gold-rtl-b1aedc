// Target timing model: CPU timing model, banked L2 and DRAM channels.
//
// The functional model reports every pass of an instruction. A replay goes
// straight to the thread scheduler, which re-issues the thread; it costs no
// target time. A retired instruction enters a FIFO (NTHREADS deep, which is
// enough because a thread has at most one instruction unretired) and is then
// timed by a small sequencer, one cache model access per host cycle:
//   L1I  look up the instruction address in the core's L1 I-cache tags
//   L2I  on a miss, access the L2 bank that holds the line
//   L1D  for a load or store, look up the core's L1 D-cache tags
//   WB   if that evicts a dirty line, write it back to its L2 bank
//   L2D  on a D miss, access the L2 bank
//   DONE retire the core in the scheduler with the extra target cycles
// The target core is the document's in-order single-issue core: one
// instruction per target cycle plus the time of its cache misses. The L2
// accesses of one instruction are serial: the data access starts when the
// instruction access is done. Each L2 bank has its own DRAM channel model.
// The per-core counter events of each step, and the global events, are
// brought out for the performance counters.
//
// Structure (L1 I/D tags, thread scheduler with target cycle count and
// scoreboard, four L2 banks with MSHRs, one FCFS DRAM channel per bank) is
// from the document. Its timing pipeline is deep and does several lookups in
// one host cycle; this sequencer spends up to six host cycles per
// instruction. Blocking on store misses and write-allocate in the L1 D-cache
// are this design's choices.
//
// rst_n is an asynchronous reset for the logic and also the disable
// condition of the assertions here and in the scheduler; lint reports that
// clocked use as a net used both synchronously and asynchronously, which is
// harmless.
module timing_model
  import rg_pkg::*;
#(
  parameter int NTHREADS    = 64,
  parameter int L1_SETS     = 64,
  parameter int L1_WAYS     = 4,
  parameter int L2_SETS     = 1024,
  parameter int L2_WAYS     = 16,
  parameter int L2_BANKS    = 4,
  parameter int L2_MSHRS    = 8,
  localparam int TW = $clog2(NTHREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  tm_cfg_t       cfg,
  input  logic          flush,
  input  logic [NTHREADS-1:0] halted,
  // functional model
  input  logic          wb_valid,
  input  wb_event_t     wb_ev,
  output logic          issue_valid,
  output logic [TW-1:0] issue_tid,
  // status
  output logic [63:0]   target_cycle,
  output logic          all_halted,
  output logic          idle,
  // performance counter events
  output logic          core_ev_valid,
  output logic [TW-1:0] core_ev_core,
  output logic [NPRIV-1:0] core_ev_inc,
  output logic [NGLOB-1:0] glob_inc
);
  // ---------------- retire FIFO
  wb_event_t fifo [NTHREADS];
  logic [TW:0] wr_ptr, rd_ptr;
  wire  fifo_empty = wr_ptr == rd_ptr;
  wire  push       = wb_valid && wb_ev.replay == RP_NONE;
  logic pop;

  // ---------------- sequencer
  typedef enum logic [2:0] {S_IDLE, S_L1I, S_L2I, S_L1D, S_WB, S_L2D, S_DONE} st_e;
  st_e         st;
  wb_event_t   ev;
  logic [63:0] acc;          // extra target cycles so far
  logic [31:0] wb_addr;

  // ---------------- scheduler
  logic        retire_valid;
  logic        ev_advance, ev_sync, ev_idle, ev_issue;
  thread_scheduler #(.NTHREADS(NTHREADS)) u_sched (
    .clk, .rst_n, .run, .halted, .issue_valid, .issue_tid,
    .replay_valid(wb_valid && wb_ev.replay != RP_NONE), .replay_tid(wb_ev.tid),
    .retire_valid, .retire_tid(ev.tid),
    .retire_stall((acc > 64'hFFFF) ? 16'hFFFF : acc[15:0]),
    .target_cycle, .all_halted, .ev_advance, .ev_sync, .ev_idle, .ev_issue);
  assign retire_valid = (st == S_DONE);

  // ---------------- L1 tag models
  logic l1i_hit, l1d_hit, l1d_evd;
  logic [31:0] l1d_eva;
  l1_tm #(.NCORES(NTHREADS), .MAX_SETS(L1_SETS), .MAX_WAYS(L1_WAYS)) u_l1i (
    .clk, .rst_n, .flush, .sets_log2(cfg.l1i_sets_log2), .ways(cfg.l1i_ways),
    .line_log2(cfg.l1_line_log2), .req_valid(st == S_L1I), .req_core(ev.tid),
    .req_addr(ev.pc), .req_write(1'b0), .hit(l1i_hit), .evict_dirty(), .evict_addr());
  l1_tm #(.NCORES(NTHREADS), .MAX_SETS(L1_SETS), .MAX_WAYS(L1_WAYS)) u_l1d (
    .clk, .rst_n, .flush, .sets_log2(cfg.l1d_sets_log2), .ways(cfg.l1d_ways),
    .line_log2(cfg.l1_line_log2), .req_valid(st == S_L1D), .req_core(ev.tid),
    .req_addr(ev.paddr), .req_write(ev.is_store), .hit(l1d_hit), .evict_dirty(l1d_evd),
    .evict_addr(l1d_eva));

  // ---------------- L2 banks and DRAM channels
  localparam int BW = (L2_BANKS > 1) ? $clog2(L2_BANKS) : 1;
  logic        l2_access, l2_wb;
  logic [31:0] l2_addr;
  logic [BW-1:0] l2_sel;
  logic [63:0] l2_now;
  logic        b_hit [L2_BANKS], b_merged [L2_BANKS], b_full [L2_BANKS], b_evd [L2_BANKS];
  logic [63:0] b_ready [L2_BANKS];
  logic        d_valid [L2_BANKS], d_wb [L2_BANKS];
  logic [63:0] d_arr [L2_BANKS], d_done [L2_BANKS];

  always_comb begin
    l2_access = (st == S_L2I) || (st == S_WB) || (st == S_L2D);
    l2_wb     = (st == S_WB);
    l2_addr   = (st == S_L2I) ? ev.pc : (st == S_WB) ? wb_addr : ev.paddr;
    l2_now    = target_cycle + acc;
    l2_sel    = BW'((l2_addr >> cfg.l2_line_log2) & ((32'd1 << cfg.l2_banks_log2) - 32'd1));
  end

  for (genvar b = 0; b < L2_BANKS; b++) begin : g_bank
    l2_bank_tm #(.MAX_SETS(L2_SETS), .MAX_WAYS(L2_WAYS), .MSHRS(L2_MSHRS)) u_l2 (
      .clk, .rst_n, .flush, .sets_log2(cfg.l2_sets_log2), .ways(cfg.l2_ways),
      .line_log2(cfg.l2_line_log2), .banks_log2(cfg.l2_banks_log2), .latency(cfg.l2_latency),
      .req_valid(l2_access && l2_sel == BW'(b)), .req_addr(l2_addr), .req_wb(l2_wb),
      .now(l2_now), .hit(b_hit[b]), .merged(b_merged[b]), .mshr_full(b_full[b]),
      .evict_dirty(b_evd[b]), .ready(b_ready[b]),
      .dram_valid(d_valid[b]), .dram_arrival(d_arr[b]), .dram_wb(d_wb[b]), .dram_done(d_done[b]));
    dram_tm u_dram (
      .clk, .rst_n, .latency(cfg.dram_latency), .service(cfg.dram_service),
      .req_valid(d_valid[b]), .arrival(d_arr[b]), .req_wb(d_wb[b]), .done(d_done[b]),
      .queue_delay());
  end

  wire        sel_hit    = b_hit[l2_sel];
  wire [63:0] sel_ready  = b_ready[l2_sel];

  // ---------------- sequencer
  assign pop  = (st == S_IDLE || st == S_DONE) && !fifo_empty;
  assign idle = fifo_empty && st == S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; st <= S_IDLE; ev <= '0; acc <= '0; wb_addr <= '0;
    end else begin
      if (push) begin
        fifo[wr_ptr[TW-1:0]] <= wb_ev;
        wr_ptr <= wr_ptr + 1'b1;
      end
      unique case (st)
        S_IDLE, S_DONE: begin
          if (pop) begin
            ev     <= fifo[rd_ptr[TW-1:0]];
            rd_ptr <= rd_ptr + 1'b1;
            acc    <= '0;
            st     <= S_L1I;
          end else st <= S_IDLE;
        end
        S_L1I: st <= !l1i_hit ? S_L2I : (ev.is_load || ev.is_store) ? S_L1D : S_DONE;
        S_L2I: begin
          acc <= sel_ready - target_cycle;
          st  <= (ev.is_load || ev.is_store) ? S_L1D : S_DONE;
        end
        S_L1D: begin
          wb_addr <= l1d_eva;
          st <= l1d_hit ? S_DONE : l1d_evd ? S_WB : S_L2D;
        end
        S_WB:  st <= S_L2D;
        S_L2D: begin
          acc <= sel_ready - target_cycle;
          st  <= S_DONE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- counter events
  always_comb begin
    core_ev_valid = st inside {S_L1I, S_L2I, S_L1D, S_L2D};
    core_ev_core  = ev.tid;
    core_ev_inc   = '0;
    if (st == S_L1I) begin
      core_ev_inc[PC_INST]     = 1'b1;
      core_ev_inc[PC_LOAD]     = ev.is_load;
      core_ev_inc[PC_STORE]    = ev.is_store;
      core_ev_inc[PC_CTRL]     = ev.is_ctrl;
      core_ev_inc[PC_L1I_MISS] = !l1i_hit;
    end
    if (st == S_L1D) begin
      core_ev_inc[PC_L1D_HIT]  = l1d_hit;
      core_ev_inc[PC_L1D_MISS] = !l1d_hit;
      core_ev_inc[PC_L1D_WB]   = !l1d_hit && l1d_evd;
    end
    if (st == S_L2I || st == S_L2D) begin
      core_ev_inc[PC_L2_HIT]   = sel_hit;
      core_ev_inc[PC_L2_MISS]  = !sel_hit;
    end
  end

  always_comb begin
    glob_inc = '0;
    glob_inc[GC_TCYCLE]     = ev_advance;
    glob_inc[GC_HCYCLE]     = 1'b1;
    glob_inc[GC_ISSUE]      = ev_issue;
    glob_inc[GC_RETIRE]     = retire_valid;
    glob_inc[GC_RP_ICACHE]  = wb_valid && wb_ev.replay == RP_ICACHE;
    glob_inc[GC_RP_DCACHE]  = wb_valid && wb_ev.replay == RP_DCACHE;
    glob_inc[GC_RP_TLB]     = wb_valid && wb_ev.replay == RP_TLB;
    glob_inc[GC_RP_MULDIV]  = wb_valid && wb_ev.replay == RP_MULDIV;
    glob_inc[GC_RP_MEM]     = wb_valid && wb_ev.replay == RP_MEM;
    glob_inc[GC_RP_STORE3]  = wb_valid && wb_ev.replay == RP_STORE3;
    glob_inc[GC_SYNC]       = ev_sync;
    glob_inc[GC_IDLE]       = ev_idle;
    glob_inc[GC_L2_WB]      = (st == S_WB);
    glob_inc[GC_DRAM_RD]    = l2_access && d_valid[l2_sel];
    glob_inc[GC_DRAM_WR]    = l2_access && d_valid[l2_sel] && d_wb[l2_sel];
    glob_inc[GC_MSHR_MERGE] = l2_access && b_merged[l2_sel];
  end

  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (wr_ptr - rd_ptr) < (TW+1)'(NTHREADS));
endmodule
