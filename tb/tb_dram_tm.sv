// Self-checking test of dram_tm against a first-come first-served reference:
// random arrival times (bursty and sparse), random write-backs and runtime
// latency/service values; checks done and queue_delay for every request.
`include "tb_check.svh"
module tb_dram_tm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rv, wb;
  logic [7:0] lat, svc;
  logic [63:0] arr, done, qd;
  dram_tm dut (.clk, .rst_n, .latency(lat), .service(svc), .req_valid(rv), .arrival(arr),
    .req_wb(wb), .done, .queue_delay(qd));
  initial begin
    longint nf, t, st, fs; int queued;
    rv = 0; wb = 0; lat = 70; svc = 40; arr = 0; nf = 0; t = 0; queued = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      t += ($urandom % 4 == 0) ? $urandom % 400 : $urandom % 10;
      @(negedge clk);
      if (i % 1000 == 999) begin lat = 8'($urandom); svc = 8'($urandom_range(1, 255)); end arr = t; wb = $urandom % 4 == 0; rv = $urandom % 8 != 0;
      #1;
      st = (t > nf) ? t : nf;
      fs = st + (wb ? svc : 0);
      `CHECK(done == fs + lat, $sformatf("done time %0d exp %0d t=%0d nf=%0d lat=%0d svc=%0d", done, fs + lat, t, nf, lat, svc))
      `CHECK(qd == st - t, $sformatf("queue delay %0d exp %0d i=%0d", qd, st - t, i))
      if (rv) begin nf = fs + svc; if (qd > 0) queued++; end
    end
    `CHECK(queued > 100, "contention exercised")
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
