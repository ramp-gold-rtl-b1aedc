// RAMP Gold simulator top level.
//
// A 64-core shared-memory target machine is simulated by two
// host-multithreaded engines:
//   * the functional model (func_model) executes the target instructions,
//     one hardware thread per target core, with its host I$/D$ and TLBs;
//   * the timing model (timing_model) decides when each core may issue its
//     next instruction, from tag-only models of the target L1 caches, the
//     banked L2 and the DRAM channels, and keeps the target cycle count.
// The timing model's scheduler issues threads into the functional pipeline;
// the pipeline reports each pass back. The host caches reach host memory
// through mem_xbar and the mem_* port, which connects to the DDR2 controller
// (not part of this RTL; requests are tagged, responses may come in any
// order and carry the tag back). Also here: the timing configuration
// registers on the I/O bus (io_*), the 657 performance counters with their
// ring (perf_*), and the front-end injector (inj_*), which starts and stops
// simulation and writes architected state. TLB misses leave on tlb_miss_* for
// the MMU's table walker, which refills through tlb_fill_*.
//
// At reset every thread starts at reset_pc and the simulation is stopped
// until the injector receives INJ_RUN.
//
// rst_n is an asynchronous reset everywhere; it is also the disable
// condition of the assertions in the crossbar, scheduler and timing model,
// which lint reports as a clocked use of the net. That warning is harmless.
module ramp_gold
  import rg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] reset_pc,
  input  logic        mmu_en,
  // front-end injector
  input  logic        inj_valid,
  input  inj_cmd_t    inj_cmd,
  output logic        inj_ready,
  output logic        inj_rsp_valid,
  output logic [31:0] inj_rsp_data,
  // I/O bus: timing model configuration registers
  input  logic        io_we,
  input  logic [3:0]  io_addr,
  input  logic [31:0] io_wdata,
  output logic [31:0] io_rdata,
  // performance counter read
  input  logic        perf_rd_valid,
  input  logic [9:0]  perf_rd_addr,
  output logic        perf_rsp_valid,
  output logic [63:0] perf_rsp_data,
  // host memory (to the DDR2 controller)
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_resp_valid,
  input  mem_resp_t   mem_resp,
  // MMU table walker
  output logic        tlb_miss_valid,
  output logic        tlb_miss_is_d,
  output logic [TID_W-1:0] tlb_miss_tid,
  output logic [31:0] tlb_miss_vaddr,
  input  logic        tlb_fill_valid,
  input  logic        tlb_fill_is_d,
  input  logic [TID_W-1:0] tlb_fill_tid,
  input  logic [19:0] tlb_fill_vpn,
  input  logic [19:0] tlb_fill_ppn,
  input  logic        tlb_flush,
  // status
  output logic [63:0] target_cycle,
  output logic [NTHREADS-1:0] halted,
  output logic        all_halted,
  output logic        running
);
  logic          issue_valid, fm_busy, tm_idle, wb_valid;
  logic [TID_W-1:0] issue_tid;
  wb_event_t     wb_ev;
  tm_cfg_t       cfg;
  logic          cfg_flush;
  logic          i_reg_we, i_pc_we, i_reg_re, i_ev;
  logic [TID_W-1:0] i_tid;
  logic [4:0]    i_rd;
  logic [31:0]   i_data, i_rdata;
  logic          x_valid [2], x_ready [2];
  mem_req_t      x_req   [2];
  logic          cev_valid;
  logic [TID_W-1:0] cev_core;
  logic [NPRIV-1:0] cev_inc;
  logic [NGLOB-1:0] glob, glob_all;

  injector u_inj (
    .clk, .rst_n, .cmd_valid(inj_valid), .cmd(inj_cmd), .cmd_ready(inj_ready),
    .rsp_valid(inj_rsp_valid), .rsp_data(inj_rsp_data), .drained(!fm_busy && tm_idle),
    .run(running), .ev_cmd(i_ev), .reg_we(i_reg_we), .pc_we(i_pc_we), .reg_re(i_reg_re),
    .tid(i_tid), .rd(i_rd), .data(i_data), .reg_rdata(i_rdata));

  func_model #(.NTHREADS(NTHREADS)) u_fm (
    .clk, .rst_n, .reset_pc, .mmu_en, .issue_valid, .issue_tid, .halted, .busy(fm_busy),
    .wb_valid, .wb_ev,
    .tlb_miss_valid, .tlb_miss_is_d, .tlb_miss_tid, .tlb_miss_vaddr,
    .tlb_fill_valid, .tlb_fill_is_d, .tlb_fill_tid, .tlb_fill_vpn, .tlb_fill_ppn, .tlb_flush,
    .inj_reg_we(i_reg_we), .inj_pc_we(i_pc_we), .inj_reg_re(i_reg_re), .inj_tid(i_tid),
    .inj_rd(i_rd), .inj_data(i_data), .inj_rdata(i_rdata),
    .imem_req_valid(x_valid[0]), .imem_req(x_req[0]), .imem_req_ready(x_ready[0]),
    .dmem_req_valid(x_valid[1]), .dmem_req(x_req[1]), .dmem_req_ready(x_ready[1]),
    .mem_resp_valid, .mem_resp);

  mem_xbar u_xbar (
    .clk, .rst_n, .in_valid(x_valid), .in_req(x_req), .in_ready(x_ready),
    .out_valid(mem_req_valid), .out_req(mem_req), .out_ready(mem_req_ready));

  tm_config u_cfg (
    .clk, .rst_n, .io_we, .io_addr, .io_wdata, .io_rdata, .cfg, .flush(cfg_flush));

  timing_model #(.NTHREADS(NTHREADS)) u_tm (
    .clk, .rst_n, .run(running), .cfg, .flush(cfg_flush), .halted, .wb_valid, .wb_ev,
    .issue_valid, .issue_tid, .target_cycle, .all_halted, .idle(tm_idle),
    .core_ev_valid(cev_valid), .core_ev_core(cev_core), .core_ev_inc(cev_inc), .glob_inc(glob));

  always_comb begin
    glob_all            = glob;
    glob_all[GC_INJECT] = i_ev;
  end

  perf_counters #(.NCORES(NTHREADS), .PRIV(NPRIV), .GLOB(NGLOB)) u_perf (
    .clk, .rst_n, .core_ev_valid(cev_valid), .core_ev_core(cev_core), .core_ev_inc(cev_inc),
    .glob_inc(glob_all), .rd_valid(perf_rd_valid), .rd_addr(perf_rd_addr),
    .rsp_valid(perf_rsp_valid), .rsp_data(perf_rsp_data), .rsp_found());
endmodule
