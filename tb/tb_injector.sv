// Self-checking test of injector with a register model in the testbench
// (synchronous read like the real register file): random command streams
// with random drained status; checks that state commands are refused while
// the target runs or instructions are in flight, that run follows RUN/STOP,
// that register reads answer one cycle later with the written value, and
// that ev_cmd counts every accepted non-NOP command.
`include "tb_check.svh"
module tb_injector;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cv, crdy, rspv, drained, run, evc, rwe, pwe, rre;
  inj_cmd_t cmd;
  logic [31:0] rspd, data, rdata;
  logic [5:0] tid; logic [4:0] rd;
  injector dut (.clk, .rst_n, .cmd_valid(cv), .cmd, .cmd_ready(crdy), .rsp_valid(rspv), .rsp_data(rspd),
    .drained, .run, .ev_cmd(evc), .reg_we(rwe), .pc_we(pwe), .reg_re(rre), .tid, .rd, .data,
    .reg_rdata(rdata));
  logic [31:0] regs [64][32];
  logic [31:0] pcs [64];
  always @(posedge clk) begin
    if (rwe) regs[tid][rd] <= data;
    if (pwe) pcs[tid] <= data;
    rdata <= regs[tid][rd];
  end
  initial begin
    logic [31:0] ref_regs [64][32];
    logic exp_run, want_rsp; logic [31:0] want_data;
    int accepted, nev, refused, nreads;
    cv = 0; cmd = '0; drained = 1; exp_run = 0; want_rsp = 0; want_data = 0;
    accepted = 0; nev = 0; refused = 0; nreads = 0;
    foreach (regs[t, r]) begin regs[t][r] = 0; ref_regs[t][r] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      logic take, st;
      @(negedge clk);
      `CHECK(rspv == want_rsp, "read response one cycle after the command")
      if (want_rsp) `CHECK(rspd == want_data, "read response data")
      cv = $urandom % 4 != 0;
      cmd.op = inj_op_e'($urandom % 6); cmd.tid = 6'($urandom); cmd.rd = 5'($urandom);
      cmd.data = $urandom; drained = $urandom % 4 != 0;
      #1;
      st = cmd.op inside {INJ_WRREG, INJ_WRPC, INJ_RDREG};
      `CHECK(crdy == (!st || (!exp_run && drained)), "ready only when stopped and drained")
      `CHECK(run == exp_run, "run flag")
      take = cv && crdy;
      `CHECK(evc == (take && cmd.op != INJ_NOP), "ev_cmd")
      `CHECK(rwe == (take && cmd.op == INJ_WRREG) && pwe == (take && cmd.op == INJ_WRPC), "write strobes")
      if (cv && !crdy) refused++;
      want_rsp = take && cmd.op == INJ_RDREG;
      want_data = ref_regs[cmd.tid][cmd.rd];
      nreads += want_rsp;
      if (take && cmd.op == INJ_WRREG) ref_regs[cmd.tid][cmd.rd] = cmd.data;
      if (take && cmd.op == INJ_RUN)  exp_run = 1;
      if (take && cmd.op == INJ_STOP) exp_run = 0;
      if (take) accepted++;
    end
    `CHECK(refused > 1000 && nreads > 200 && accepted > 5000, "refusals, reads and writes exercised")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
