// End-to-end test of the simulator top: loads a SPARC program into host
// memory, gives every thread its id through the injector, starts the
// simulation and lets all 64 target cores run until they halt. The program
// exercises loops with annulled delay slots, multiply and divide (replays),
// three-register stores (replays), byte loads/stores, call/return, and a store
// loop at a 256-byte stride. Before the run the timing model is reconfigured
// to tiny caches so that L1 and L2 evictions, write-backs and DRAM traffic
// occur; the MMU is on, and this testbench answers TLB misses with an
// identity mapping. Afterwards it checks memory, registers (through the
// injector) and performance counters (through the ring) against values
// computed here, and that every mechanism occurred at least once.
`include "tb_check.svh"
module tb_ramp_gold;
  import rg_pkg::*;
  import tb_sparc_pkg::*;

  localparam int NT = NTHREADS;
  localparam logic [31:0] PROG = 32'h1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        inj_valid, inj_ready, inj_rsp_valid;
  inj_cmd_t    inj_cmd;
  logic [31:0] inj_rsp_data;
  logic        io_we;
  logic [3:0]  io_addr;
  logic [31:0] io_wdata, io_rdata;
  logic        perf_rd_valid, perf_rsp_valid;
  logic [9:0]  perf_rd_addr;
  logic [63:0] perf_rsp_data;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t    mem_req;
  mem_resp_t   mem_resp;
  logic        tlb_miss_valid, tlb_miss_is_d, tlb_fill_valid, tlb_fill_is_d;
  logic [TID_W-1:0] tlb_miss_tid, tlb_fill_tid;
  logic [31:0] tlb_miss_vaddr;
  logic [19:0] tlb_fill_vpn, tlb_fill_ppn;
  logic [63:0] target_cycle;
  logic [NT-1:0] halted;
  logic        all_halted, running;

  ramp_gold dut (
    .clk, .rst_n, .reset_pc(32'h0), .mmu_en(1'b1),
    .inj_valid, .inj_cmd, .inj_ready, .inj_rsp_valid, .inj_rsp_data,
    .io_we, .io_addr, .io_wdata, .io_rdata,
    .perf_rd_valid, .perf_rd_addr, .perf_rsp_valid, .perf_rsp_data,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_resp_valid, .mem_resp,
    .tlb_miss_valid, .tlb_miss_is_d, .tlb_miss_tid, .tlb_miss_vaddr,
    .tlb_fill_valid, .tlb_fill_is_d, .tlb_fill_tid, .tlb_fill_vpn, .tlb_fill_ppn,
    .tlb_flush(1'b0), .target_cycle, .halted, .all_halted, .running);

  dram_model #(.AW(18), .LAT(20), .BUSY_PCT(10)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp(mem_resp));

  // identity-mapping table walker: answers a TLB miss a few cycles later
  always_ff @(posedge clk) begin
    tlb_fill_valid <= 1'b0;
    if (tlb_miss_valid) begin
      tlb_fill_valid <= 1'b1;
      tlb_fill_is_d  <= tlb_miss_is_d;
      tlb_fill_tid   <= tlb_miss_tid;
      tlb_fill_vpn   <= tlb_miss_vaddr[31:12];
      tlb_fill_ppn   <= tlb_miss_vaddr[31:12];
    end
  end

  // ---------------- mechanism counters
  int n_rp [8];
  int n_merge_l2, n_mshr_full, n_idle, n_dram_wb, n_l1_wb, n_dmerge, n_sync;
  always_ff @(posedge clk) if (rst_n) begin
    if (dut.wb_valid) n_rp[int'(dut.wb_ev.replay)]++;
    if (dut.u_tm.glob_inc[GC_MSHR_MERGE]) n_merge_l2++;
    if (dut.u_tm.glob_inc[GC_IDLE]) n_idle++;
    if (dut.u_tm.glob_inc[GC_DRAM_WR]) n_dram_wb++;
    if (dut.u_tm.glob_inc[GC_L2_WB]) n_l1_wb++;
    if (dut.u_tm.glob_inc[GC_SYNC]) n_sync++;
    if (dut.u_tm.g_bank[0].u_l2.req_valid && dut.u_tm.g_bank[0].u_l2.mshr_full) n_mshr_full++;
    if (dut.u_tm.g_bank[1].u_l2.req_valid && dut.u_tm.g_bank[1].u_l2.mshr_full) n_mshr_full++;
    if (dut.u_tm.g_bank[2].u_l2.req_valid && dut.u_tm.g_bank[2].u_l2.mshr_full) n_mshr_full++;
    if (dut.u_tm.g_bank[3].u_l2.req_valid && dut.u_tm.g_bank[3].u_l2.mshr_full) n_mshr_full++;
    if (dut.u_fm.u_dcache.s_valid && !dut.u_fm.u_dcache.hit && dut.u_fm.u_dcache.merge) n_dmerge++;
  end

  task automatic inj(input inj_op_e op, input int tid, input int rd, input logic [31:0] data);
    @(negedge clk);
    inj_cmd   = '{op: op, tid: TID_W'(tid), rd: 5'(rd), data: data};
    inj_valid = 1'b1;
    #1;
    while (!inj_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    inj_valid = 1'b0;
  endtask

  task automatic rdreg(input int tid, input int rd, output logic [31:0] v);
    inj(INJ_RDREG, tid, rd, 0);
    while (!inj_rsp_valid) begin @(posedge clk); #1; end
    v = inj_rsp_data;
  endtask

  task automatic cfgw(input int a, input int v);
    @(negedge clk);
    io_we = 1'b1; io_addr = 4'(a); io_wdata = v;
    @(negedge clk);
    io_we = 1'b0;
  endtask

  task automatic perf_read(input int a, output logic [63:0] v);
    @(negedge clk);
    perf_rd_valid = 1'b1; perf_rd_addr = 10'(a);
    @(negedge clk);
    perf_rd_valid = 1'b0;
    while (!perf_rsp_valid) @(negedge clk);
    v = perf_rsp_data;
  endtask

  // ---------------- program
  logic [31:0] prog [$];
  task automatic build_prog();
    prog = {};
    prog.push_back(sethi(3, 32'h10000));            // 0  r3 = 0x10000
    prog.push_back(f3i(2, 4, SLL, 1, 4));           // 1  r4 = tid*16
    prog.push_back(f3r(2, 3, ADD, 3, 4));           // 2  r3 += r4
    prog.push_back(f3i(2, 5, OR, 0, 10));           // 3  r5 = 10
    prog.push_back(f3i(2, 2, OR, 0, 0));            // 4  r2 = 0
    prog.push_back(f3r(2, 2, ADD, 2, 5));           // 5  loop: r2 += r5
    prog.push_back(f3i(2, 5, SUBCC, 5, 1));         // 6  r5 -= 1
    prog.push_back(bicc(1, BNE, -2));               // 7  bne,a loop
    prog.push_back(f3r(2, 2, ADD, 2, 1));           // 8  (taken only) r2 += tid
    prog.push_back(f3i(2, 6, UMUL, 2, 3));          // 9  r6 = r2*3
    prog.push_back(f3i(2, 0, WRY, 0, 0));           // 10 y = 0
    prog.push_back(f3i(2, 7, UDIV, 6, 3));          // 11 r7 = r6/3
    prog.push_back(f3i(3, 7, ST, 3, 0));            // 12 [r3] = r7
    prog.push_back(f3i(2, 8, OR, 0, 4));            // 13 r8 = 4
    prog.push_back(f3r(3, 6, ST, 3, 8));            // 14 [r3+r8] = r6 (3-reg store)
    prog.push_back(f3i(3, 9, LD, 3, 4));            // 15 r9 = [r3+4]
    prog.push_back(f3i(3, 1, STB, 3, 8));           // 16 byte [r3+8] = tid
    prog.push_back(f3i(3, 10, LDUB, 3, 8));         // 17 r10 = byte [r3+8]
    prog.push_back(sethi(12, 32'h20000));           // 18 r12 = 0x20000
    prog.push_back(f3i(2, 13, SLL, 1, 11));         // 19 r13 = tid*2048
    prog.push_back(f3r(2, 12, ADD, 12, 13));        // 20
    prog.push_back(f3i(2, 14, OR, 0, 8));           // 21 r14 = 8
    prog.push_back(f3i(3, 14, ST, 12, 0));          // 22 loop2: [r12] = r14
    prog.push_back(f3i(2, 12, ADD, 12, 256));       // 23 r12 += 256
    prog.push_back(f3i(2, 14, SUBCC, 14, 1));       // 24
    prog.push_back(bicc(0, BNE, -3));               // 25 bne loop2
    prog.push_back(NOP);                            // 26
    prog.push_back(call(5));                        // 27 call f (32)
    prog.push_back(f3i(2, 10, ADD, 10, 1));         // 28 (delay) r10 += 1
    prog.push_back(f3i(3, 10, ST, 3, 12));          // 29 [r3+12] = r10
    prog.push_back(f3i(2, 11, SMUL, 11, -2));       // 30 r11 = r11 * -2
    prog.push_back(ta(0));                          // 31 halt
    prog.push_back(f3i(2, 0, JMPL, 15, 8));         // 32 f: return
    prog.push_back(f3i(2, 11, OR, 0, 7));           // 33 (delay) r11 = 7
  endtask
  localparam int INSTS = 5 + 40 + 9 + 4 + 40 + 2 + 2 + 1 + 1 + 1;  // retired per thread
  localparam int STORES = 4 + 8, LOADS = 2;

  initial begin
    logic [31:0] v;
    logic [63:0] c;
    inj_valid = 0; inj_cmd = '0; io_we = 0; io_addr = 0; io_wdata = 0;
    perf_rd_valid = 0; perf_rd_addr = 0;
    build_prog();
    foreach (prog[i]) u_mem.mem[(PROG >> 2) + i] = prog[i];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // tiny target caches: L1 1 set x 1 way, L2 1 set x 2 ways per bank
    cfgw(CFG_L1D_SETS, 0); cfgw(CFG_L1D_WAYS, 1); cfgw(CFG_L1I_SETS, 1); cfgw(CFG_L1I_WAYS, 1);
    cfgw(CFG_L2_SETS, 0);  cfgw(CFG_L2_WAYS, 2);
    io_addr = 4'(CFG_L2_WAYS); #1;
    `CHECK(io_rdata == 2, "config readback")
    for (int t = 0; t < NT; t++) begin
      inj(INJ_WRREG, t, 1, t);
      inj(INJ_WRPC, t, 0, PROG);
    end
    rdreg(5, 1, v); `CHECK(v == 5, "injected register readback")
    inj(INJ_RUN, 0, 0, 0);
    while (!all_halted) @(posedge clk);
    repeat (50) @(posedge clk);
    inj(INJ_STOP, 0, 0, 0);
    // memory results
    for (int t = 0; t < NT; t++) begin
      int s;
      s = 55 + 9 * t;
      `CHECK(u_mem.mem[(32'h10000 >> 2) + 4*t + 0] == s,            "sum stored")
      `CHECK(u_mem.mem[(32'h10000 >> 2) + 4*t + 1] == 3 * s,        "3-reg store of product")
      `CHECK(u_mem.mem[(32'h10000 >> 2) + 4*t + 2] == (t << 24),    "byte store")
      `CHECK(u_mem.mem[(32'h10000 >> 2) + 4*t + 3] == t + 1,        "call delay slot")
      for (int k = 0; k < 8; k++)
        `CHECK(u_mem.mem[(32'h20000 >> 2) + 512*t + 64*k] == 8 - k, "stride store")
    end
    for (int t = 0; t < NT; t += 9) begin
      rdreg(t, 9, v);  `CHECK(v == 3 * (55 + 9 * t), "load of stored product")
      rdreg(t, 10, v); `CHECK(v == t + 1, "ldub + add")
      rdreg(t, 11, v); `CHECK(v == 32'hFFFF_FFF2, "smul -2")
      rdreg(t, 15, v); `CHECK(v == PROG + 27*4, "call link")
      rdreg(t, 7, v);  `CHECK(v == 55 + 9 * t, "udiv")
    end
    // performance counters
    perf_read(NT*NPRIV + GC_RETIRE, c);  `CHECK(c == 64'(NT * INSTS), "global retired")
    perf_read(5*NPRIV + PC_INST, c);     `CHECK(c == 64'(INSTS), "core 5 instructions")
    perf_read(5*NPRIV + PC_STORE, c);    `CHECK(c == 64'(STORES), "core 5 stores")
    perf_read(63*NPRIV + PC_LOAD, c);    `CHECK(c == 64'(LOADS), "core 63 loads")
    perf_read(NT*NPRIV + GC_TCYCLE, c);  `CHECK(c == target_cycle, "target cycle counter")
    `CHECK(target_cycle > INSTS, "target cycles above instruction count")
    perf_read(NT*NPRIV + GC_INJECT, c);  `CHECK(c >= 64'(2*NT + 1), "injector commands counted")
    // mechanisms
    `CHECK(n_rp[RP_ICACHE] > 0, "host I$ miss replay")
    `CHECK(n_rp[RP_DCACHE] > 0, "host D$ miss replay")
    `CHECK(n_rp[RP_TLB]    > 0, "host TLB miss replay")
    `CHECK(n_rp[RP_MULDIV] > 0, "mul/div replay")
    `CHECK(n_rp[RP_MEM]    > 0, "memory busy replay")
    `CHECK(n_rp[RP_STORE3] > 0, "three-register store replay")
    `CHECK(n_dmerge > 0,    "host D$ MSHR merge")
    `CHECK(n_merge_l2 > 0,  "L2 MSHR merge")
    `CHECK(n_mshr_full > 0, "L2 MSHRs full")
    `CHECK(n_idle > 0,      "idle target cycles")
    `CHECK(n_sync > 0,      "timing synchronisation")
    `CHECK(n_l1_wb > 0,     "L1 write-back")
    `CHECK(n_dram_wb > 0,   "L2 dirty eviction")
    $display("target cycles %0d, replays icache %0d dcache %0d tlb %0d muldiv %0d mem %0d st3 %0d",
      target_cycle, n_rp[1], n_rp[2], n_rp[3], n_rp[4], n_rp[5], n_rp[6]);
    $display("l2 merge %0d mshr full %0d idle %0d sync %0d l1wb %0d dramwb %0d dmerge %0d",
      n_merge_l2, n_mshr_full, n_idle, n_sync, n_l1_wb, n_dram_wb, n_dmerge);
    `TB_DONE
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
