// Self-checking test of tm_config: reset values equal the defaults, every
// register reads back what was written (masked to its width), geometry writes
// pulse flush for one cycle and latency writes do not.
`include "tb_check.svh"
module tb_tm_config;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, flush;
  logic [3:0] a;
  logic [31:0] wd, rd;
  tm_cfg_t cfg;
  tm_config dut (.clk, .rst_n, .io_we(we), .io_addr(a), .io_wdata(wd), .io_rdata(rd), .cfg, .flush);
  int widths [12] = '{3, 3, 3, 3, 3, 4, 5, 3, 2, 8, 8, 8};
  initial begin
    logic [31:0] shadow [12];
    we = 0; a = 0; wd = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    `CHECK(cfg == TM_CFG_DEFAULT, "reset defaults")
    for (int r = 0; r < 12; r++) begin a = 4'(r); #1 shadow[r] = rd; end
    `CHECK(shadow[CFG_L1D_SETS] == 6 && shadow[CFG_L1D_WAYS] == 4 && shadow[CFG_L2_WAYS] == 16, "Table 2 values read back")
    for (int i = 0; i < 500; i++) begin
      int r; logic [31:0] v;
      r = $urandom % 14; v = $urandom;
      @(negedge clk); we = 1; a = 4'(r); wd = v;
      @(negedge clk); we = 0;
      `CHECK(flush == (r <= CFG_L2_BANKS), "flush only after geometry write")
      if (r < 12) shadow[r] = v & ((32'd1 << widths[r]) - 1);
      @(negedge clk);
      `CHECK(flush == 0, "flush is one cycle")
      for (int k = 0; k < 14; k++) begin
        a = 4'(k); #1;
        `CHECK(rd == (k < 12 ? shadow[k] : 0), $sformatf("read back reg %0d", k))
      end
    end
    `CHECK(cfg.dram_service == shadow[CFG_DRAM_SVC][7:0] && cfg.l2_ways == shadow[CFG_L2_WAYS][4:0], "cfg struct follows registers")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
