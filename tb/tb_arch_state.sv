// Self-checking test of arch_state: reset values of all threads, random
// writes compared with a reference, combinational read, halted vector.
`include "tb_check.svh"
module tb_arch_state;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] rtid, wtid;
  logic [31:0] r_pc, r_npc, r_y, w_pc, w_npc, w_y;
  logic r_annul, w_annul, we, w_halt;
  logic [3:0] r_icc, w_icc;
  logic [63:0] halted, ref_h;
  logic [31:0] ref_pc [64], ref_npc [64], ref_y [64];
  logic [3:0]  ref_icc [64];
  logic        ref_an [64];
  arch_state dut (.clk, .rst_n, .reset_pc(32'h4000), .rtid, .r_pc, .r_npc, .r_annul, .r_icc, .r_y,
    .we, .wtid, .w_pc, .w_npc, .w_annul, .w_icc, .w_y, .w_halt, .halted);
  initial begin
    we = 0; rtid = 0; wtid = 0; w_pc = 0; w_npc = 0; w_y = 0; w_annul = 0; w_icc = 0; w_halt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      rtid = 6'(t); #1;
      `CHECK(r_pc == 32'h4000 && r_npc == 32'h4004 && !r_annul && r_icc == 0 && r_y == 0, "reset")
      ref_pc[t] = 32'h4000; ref_npc[t] = 32'h4004; ref_y[t] = 0; ref_icc[t] = 0; ref_an[t] = 0;
    end
    `CHECK(halted == 0, "none halted")
    ref_h = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom % 2; wtid = 6'($urandom); w_pc = $urandom; w_npc = $urandom; w_y = $urandom;
      w_annul = $urandom; w_icc = 4'($urandom); w_halt = ($urandom % 8) == 0;
      @(posedge clk); #1;
      if (we) begin
        ref_pc[wtid] = w_pc; ref_npc[wtid] = w_npc; ref_y[wtid] = w_y; ref_icc[wtid] = w_icc;
        ref_an[wtid] = w_annul; ref_h[wtid] = w_halt;
      end
      we = 0;
      rtid = 6'($urandom); #1;
      `CHECK(r_pc == ref_pc[rtid] && r_npc == ref_npc[rtid] && r_y == ref_y[rtid] &&
             r_icc == ref_icc[rtid] && r_annul == ref_an[rtid], "read")
      `CHECK(halted == ref_h, "halted vector")
    end
    `TB_DONE
  end
  initial begin #1000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
