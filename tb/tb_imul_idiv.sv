// Self-checking test of imul_idiv: random and corner-case UMUL, SMUL, UDIV and
// SDIV operations, result and Y compared with a reference computed here,
// including quotient saturation and divide by zero, and the cycle count of
// each operation (MUL_CYCLES for multiplies, 64 for divides).
`include "tb_check.svh"
module tb_imul_idiv;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, dz, ack;
  logic [1:0] op;
  logic [5:0] tid_in, tid;
  logic [31:0] a, b, y_in, res, y_out;
  imul_idiv #(.TID_W(6), .MUL_CYCLES(4)) dut (.clk, .rst_n, .start, .op, .tid_in, .a, .b, .y_in,
    .busy, .done, .tid, .result(res), .y_out, .div_zero(dz), .ack);

  task automatic run(input logic [1:0] o, input logic [31:0] x, y, yy);
    logic [63:0] p, dd, q;
    logic [31:0] er, ey;
    logic edz;
    int cyc;
    edz = 0;
    unique case (o)
      0: begin p = 64'(x) * 64'(y); er = p[31:0]; ey = p[63:32]; end
      1: begin p = $unsigned(64'($signed(x)) * 64'($signed(y))); er = p[31:0]; ey = p[63:32]; end
      2: begin ey = yy; if (y == 0) begin edz = 1; er = 0; end
               else begin q = {yy, x} / 64'(y); er = (q > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : q[31:0]; end end
      default: begin
        longint sq;
        ey = yy;
        if (y == 0) begin edz = 1; er = 0; end
        else begin
          sq = $signed({yy, x}) / longint'($signed(y));
          er = (sq > 64'sh7FFF_FFFF) ? 32'h7FFF_FFFF : (sq < -64'sh8000_0000) ? 32'h8000_0000 : 32'(sq);
        end
      end
    endcase
    @(negedge clk);
    start = 1; op = o; a = x; b = y; y_in = yy; tid_in = 6'($urandom);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    `CHECK(tid == tid_in, "owner thread")
    `CHECK(dz == edz, "divide by zero flag")
    if (!edz) begin
      `CHECK(res == er, "result")
      `CHECK(y_out == ey, "Y")
      if (o < 2) `CHECK(cyc == 4 + 1, "multiply cycles")
      else       `CHECK(cyc == 64 + 1, "divide cycles")
    end
    ack = 1; @(negedge clk); ack = 0;
    `CHECK(!busy, "free after ack")
  endtask

  initial begin
    start = 0; ack = 0; op = 0; a = 0; b = 0; y_in = 0; tid_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [1:0] o;
      logic [31:0] x, y, yy;
      o = 2'(i); x = $urandom; y = $urandom; yy = (i % 3 == 0) ? 32'd0 : $urandom % 16;
      if (o == 3 && (i % 5 == 0)) yy = x[31] ? 32'hFFFF_FFFF : 0;
      if (i % 17 == 0) y = 0;
      run(o, x, y, yy);
    end
    run(2, 32'h0, 32'h1, 32'h1);            // quotient too big: saturate
    run(3, 32'h0, 32'h1, 32'h4);            // signed positive overflow
    run(3, 32'h0, 32'hFFFF_FFFF, 32'h4);    // signed negative overflow
    `TB_DONE
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
