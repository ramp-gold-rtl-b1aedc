// Self-checking test of int_alu: random operands for every operation, results
// and N Z V C flags compared with a reference written here from the SPARC V8
// rules, plus corner cases for overflow and carry.
`include "tb_check.svh"
module tb_int_alu;
  int checks = 0, failures = 0;
  logic [5:0]  op3;
  logic [31:0] a, b, r;
  logic        cin, ccwe, ok;
  logic [3:0]  icc;
  int_alu dut (.op3, .a, .b, .cin, .result(r), .icc_out(icc), .cc_we(ccwe), .valid(ok));

  task automatic ref_model(input logic [5:0] o, input logic [31:0] x, y, input logic c,
                           output logic [31:0] res, output logic [3:0] f, output logic v_ok);
    logic [63:0] wide;
    logic vv, cc;
    vv = 0; cc = 0; v_ok = 1;
    case (o & 6'h2F)
      6'h00: begin wide = 64'(x) + 64'(y);          res = wide[31:0]; cc = wide[32];
                   vv = (x[31] == y[31]) && (res[31] != x[31]); end
      6'h08: begin wide = 64'(x) + 64'(y) + 64'(c); res = wide[31:0]; cc = wide[32];
                   vv = (x[31] == y[31]) && (res[31] != x[31]); end
      6'h04: begin res = x - y; cc = x < y;  vv = (x[31] != y[31]) && (res[31] != x[31]); end
      6'h0C: begin res = x - y - 32'(c); cc = (64'(x) < 64'(y) + 64'(c));
                   vv = (x[31] != y[31]) && (res[31] != x[31]); end
      6'h01: res = x & y;  6'h02: res = x | y;  6'h03: res = x ^ y;
      6'h05: res = x & ~y; 6'h06: res = x | ~y; 6'h07: res = ~(x ^ y);
      6'h25: res = x << y[4:0];
      6'h26: res = x >> y[4:0];
      6'h27: res = $unsigned($signed(x) >>> y[4:0]);
      default: begin res = 0; v_ok = 0; end
    endcase
    f = {res[31], res == 0, vv, cc};
  endtask

  initial begin
    logic [5:0] ops [26] = '{6'h00, 6'h08, 6'h04, 6'h0C, 6'h01, 6'h02, 6'h03, 6'h05, 6'h06, 6'h07,
                             6'h10, 6'h18, 6'h14, 6'h1C, 6'h11, 6'h12, 6'h13, 6'h15, 6'h16, 6'h17,
                             6'h25, 6'h26, 6'h27, 6'h00, 6'h14, 6'h10};
    logic [31:0] er;
    logic [3:0]  ef;
    logic        eok;
    for (int i = 0; i < 2000; i++) begin
      op3 = ops[i % 26];
      a = $urandom; b = (i % 7 == 0) ? a : $urandom; cin = $urandom;
      if (i % 11 == 0) begin a = 32'h7FFF_FFFF; b = 32'd1; end
      if (i % 13 == 0) begin a = 32'h8000_0000; b = 32'h8000_0000; end
      #1;
      ref_model(op3, a, b, cin, er, ef, eok);
      `CHECK(ok == eok, "valid")
      `CHECK(r == er, "result")
      `CHECK(ccwe == (op3[5] == 0 && op3[4]), "cc write enable")
      if (ccwe) `CHECK(icc == ef, "flags")
    end
    op3 = 6'h3F; #1; `CHECK(!ok, "invalid op")
    op3 = 6'h10; a = 32'h7FFF_FFFF; b = 1; #1; `CHECK(icc == 4'b1010, "signed overflow N V")
    op3 = 6'h14; a = 0; b = 1; #1;             `CHECK(icc == 4'b1001, "borrow N C")
    op3 = 6'h14; a = 5; b = 5; #1;             `CHECK(icc == 4'b0100, "equal Z")
    `TB_DONE
  end
  initial begin #1000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
