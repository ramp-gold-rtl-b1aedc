// Self-checking test of mem_xbar: random requests on both ports and random
// memory ready; every request is delivered exactly once and in order per
// port, a port waiting under contention is served next (round robin).
`include "tb_check.svh"
module tb_mem_xbar;
  import rg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv [2], ir [2], ov, ordy;
  mem_req_t iq [2], oq;
  int sent [2], got [2];
  mem_xbar dut (.clk, .rst_n, .in_valid(iv), .in_req(iq), .in_ready(ir), .out_valid(ov), .out_req(oq),
                .out_ready(ordy));
  logic acc [2];
  initial begin
    iv[0] = 0; iv[1] = 0; iq[0] = '0; iq[1] = '0; ordy = 0; sent = '{0, 0}; got = '{0, 0};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) if (!iv[p] && ($urandom % 2)) begin
        iv[p] = 1; iq[p].tag = {p[0], 7'(sent[p] % 128)}; iq[p].addr = 32'(sent[p]);
      end
      ordy = ($urandom % 4) != 0;
      #1;
      acc[0] = iv[0] && ir[0]; acc[1] = iv[1] && ir[1];
      if (ov && ordy) begin
        int p;
        p = oq.tag[7];
        `CHECK(oq.addr == 32'(got[p]), "in order per port")
        `CHECK(ir[p] && !ir[1-p], "ready to the granted port only")
        if (iv[0] && iv[1]) `CHECK(p != int'(dut.last), "round robin under contention")
        got[p]++;
      end
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) if (acc[p]) begin iv[p] = 0; sent[p]++; end
    end
    `CHECK(sent[0] == got[0] && sent[1] == got[1], "all delivered")
    `CHECK(got[0] > 100 && got[1] > 100, "both ports served")
    `TB_DONE
  end
  initial begin #1000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
