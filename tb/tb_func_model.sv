// Self-checking test of func_model with the crossbar, a behavioural host
// memory and an identity page-table walker in the testbench. A simple issue
// loop stands in for the timing model: it issues any thread that is not
// halted and has nothing in flight. Each of the 64 threads gets its id in r1
// through the state-injection port and runs a short program using signed
// arithmetic, Y register access, signed divide, annulled branches,
// byte and halfword loads and stores; results are compared with values computed here. Replay causes seen
// on the writeback events are counted and each must occur.
`include "tb_check.svh"
module tb_func_model;
  import rg_pkg::*;
  import tb_sparc_pkg::*;
  int checks = 0, failures = 0;
  localparam logic [31:0] PROG = 32'h1000, DATA = 32'h8000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic iv, busy, wbv;
  logic [5:0] itid;
  logic [63:0] halted;
  wb_event_t ev;
  logic tmv, tmd, tfv, tfd;
  logic [5:0] tmt, tft;
  logic [31:0] tmva;
  logic [19:0] tfvpn, tfppn;
  logic irwe, ipwe, irre;
  logic [5:0] itd; logic [4:0] ird; logic [31:0] idata, irdata;
  logic imv, imr, dmv, dmr, mv, mr, rv;
  mem_req_t imq, dmq, mq;
  mem_resp_t rsp;
  logic      xv [2]; mem_req_t xq [2]; logic xr [2];

  func_model dut (.clk, .rst_n, .reset_pc(PROG), .mmu_en(1'b1), .issue_valid(iv), .issue_tid(itid),
    .halted, .busy, .wb_valid(wbv), .wb_ev(ev),
    .tlb_miss_valid(tmv), .tlb_miss_is_d(tmd), .tlb_miss_tid(tmt), .tlb_miss_vaddr(tmva),
    .tlb_fill_valid(tfv), .tlb_fill_is_d(tfd), .tlb_fill_tid(tft), .tlb_fill_vpn(tfvpn),
    .tlb_fill_ppn(tfppn), .tlb_flush(1'b0),
    .inj_reg_we(irwe), .inj_pc_we(ipwe), .inj_reg_re(irre), .inj_tid(itd), .inj_rd(ird),
    .inj_data(idata), .inj_rdata(irdata),
    .imem_req_valid(imv), .imem_req(imq), .imem_req_ready(imr),
    .dmem_req_valid(dmv), .dmem_req(dmq), .dmem_req_ready(dmr),
    .mem_resp_valid(rv), .mem_resp(rsp));
  assign xv[0] = imv; assign xq[0] = imq; assign imr = xr[0];
  assign xv[1] = dmv; assign xq[1] = dmq; assign dmr = xr[1];
  mem_xbar u_xbar (.clk, .rst_n, .in_valid(xv), .in_req(xq), .in_ready(xr), .out_valid(mv),
    .out_req(mq), .out_ready(mr));
  dram_model #(.AW(14), .LAT(15), .BUSY_PCT(10)) u_mem (.clk, .rst_n, .req_valid(mv), .req(mq),
    .req_ready(mr), .resp_valid(rv), .resp(rsp));

  always @(posedge clk) begin
    tfv <= tmv; tfd <= tmd; tft <= tmt; tfvpn <= tmva[31:12]; tfppn <= tmva[31:12];
  end

  // issue loop
  logic [63:0] inflight;
  logic        go;
  int rp [8];
  int retired;
  logic [5:0] ptr = 0;
  always_comb begin
    iv = 0; itid = 0;
    if (go)
      for (int k = 63; k >= 0; k--)
        if (!inflight[6'(k + ptr)] && !halted[6'(k + ptr)]) begin iv = 1; itid = 6'(k + ptr); end
  end
  always @(posedge clk or negedge rst_n)
    if (!rst_n) inflight <= '0;
    else begin
      if (wbv) begin
        inflight[ev.tid] <= 1'b0;
        rp[ev.replay]++;
        if (ev.replay == RP_NONE) retired++;
      end
      if (iv) begin inflight[itid] <= 1'b1; ptr <= itid + 1'b1; end
    end

  logic [31:0] prog [$];
  initial begin
    prog = {};
    prog.push_back(f3i(2, 11, OR, 0, 0));      // r11 = 0
    prog.push_back(sethi(3, DATA));            // r3 = DATA
    prog.push_back(f3i(2, 4, SLL, 1, 5));      // r4 = tid*32
    prog.push_back(f3r(2, 3, ADD, 3, 4));
    prog.push_back(f3r(2, 5, SUB, 0, 1));      // r5 = -tid
    prog.push_back(f3i(2, 6, SRA, 5, 1));      // r6 = r5 >>> 1
    prog.push_back(f3i(2, 7, XOR, 1, 'h55));   // r7 = tid ^ 0x55
    prog.push_back(f3r(2, 8, SMUL, 5, 7));     // r8 = r5 * r7, y = high word
    prog.push_back(f3i(2, 10, RDY, 0, 0));     // r10 = y
    prog.push_back(f3i(2, 0, WRY, 0, 0));      // y = 0
    prog.push_back(f3i(2, 9, SDIV, 7, -3));    // r9 = r7 / -3
    prog.push_back(f3i(2, 0, SUBCC, 1, 32));   // tid - 32
    prog.push_back(bicc(1, BL, 3));            // bl,a +3
    prog.push_back(f3i(2, 11, OR, 0, 1));      //  delay slot, runs only if taken
    prog.push_back(f3i(2, 11, ADD, 11, 2));    // not-taken path: r11 += 2
    prog.push_back(f3i(3, 5, ST, 3, 0));
    prog.push_back(f3i(3, 6, ST, 3, 4));
    prog.push_back(f3i(3, 8, ST, 3, 8));
    prog.push_back(f3i(3, 9, ST, 3, 12));
    prog.push_back(f3i(3, 10, ST, 3, 16));
    prog.push_back(f3i(3, 11, ST, 3, 20));
    prog.push_back(f3i(3, 12, LDUB, 3, 3));    // low byte of r5
    prog.push_back(f3i(3, 12, ST, 3, 24));
    prog.push_back(f3i(3, 5, STH, 3, 30));     // halfword store of r5
    prog.push_back(f3i(3, 13, LDSH, 3, 30));   // r13 = sign-extended halfword
    prog.push_back(f3i(3, 14, LDSB, 3, 3));    // r14 = sign-extended low byte of r5
    prog.push_back(f3i(3, 15, LDUH, 3, 30));   // r15 = zero-extended halfword
    prog.push_back(ta(0));
  end

  initial begin
    go = 0; irwe = 0; ipwe = 0; irre = 0; itd = 0; ird = 0; idata = 0; retired = 0;
    foreach (rp[i]) rp[i] = 0;
    #1;
    foreach (prog[i]) u_mem.mem[(PROG >> 2) + i] = prog[i];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk); irwe = 1; itd = 6'(t); ird = 1; idata = t;
    end
    @(negedge clk); irwe = 0; irre = 1; itd = 6'd17; ird = 1;
    @(negedge clk); irre = 0;
    `CHECK(irdata == 17, "injected register reads back")
    @(negedge clk); go = 1;
    wait (&halted);
    go = 0;
    repeat (30) @(negedge clk);
    for (int t = 0; t < 64; t++) begin
      int a; int r5, r7; longint p;
      a = (DATA >> 2) + 8 * t;
      r5 = -t; r7 = t ^ 'h55; p = longint'(r5) * longint'(r7);
      `CHECK(u_mem.mem[a + 0] == 32'(r5), "sub")
      `CHECK(u_mem.mem[a + 1] == 32'(r5 >>> 1), "sra")
      `CHECK(u_mem.mem[a + 2] == p[31:0], "smul low")
      `CHECK(u_mem.mem[a + 3] == 32'(r7 / -3), "sdiv truncates toward zero")
      `CHECK(u_mem.mem[a + 4] == p[63:32], "rdy after smul")
      `CHECK(u_mem.mem[a + 5] == (t < 32 ? 1 : 2), "annulled branch")
      `CHECK(u_mem.mem[a + 6] == (r5 & 'hFF), "ldub")
      `CHECK(u_mem.mem[a + 7][15:0] == 16'(r5), $sformatf("sth %h", u_mem.mem[a + 7]))
    end
    for (int t = 0; t < 64; t += 7) begin
      @(negedge clk); irre = 1; itd = 6'(t); ird = 13;
      @(negedge clk); irre = 0; `CHECK(irdata == 32'(-t), $sformatf("ldsh sign-extends %h", irdata))
      @(negedge clk); irre = 1; itd = 6'(t); ird = 14;
      @(negedge clk); irre = 0; `CHECK(irdata == 32'(-t), "ldsb sign-extends")
      @(negedge clk); irre = 1; itd = 6'(t); ird = 15;
      @(negedge clk); irre = 0; `CHECK(irdata == {16'd0, 16'(-t)}, "lduh zero-extends")
    end
    `CHECK(retired == 64 * 28 - 32, "instruction count")
    $display("retired=%0d icache=%0d dcache=%0d tlb=%0d muldiv=%0d mem=%0d store3=%0d",
      retired, rp[RP_ICACHE], rp[RP_DCACHE], rp[RP_TLB], rp[RP_MULDIV], rp[RP_MEM], rp[RP_STORE3]);
    `CHECK(rp[RP_ICACHE] > 0 && rp[RP_DCACHE] > 0 && rp[RP_TLB] > 0 && rp[RP_MULDIV] > 0, "replay causes")
    `TB_DONE
  end
  initial begin #20000000; failures++; $display("watchdog retired=%0d halted=%h inflight=%h rp=%p", retired, halted, inflight, rp); `TB_DONE end
endmodule
