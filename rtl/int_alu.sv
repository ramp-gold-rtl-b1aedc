// SPARC V8 integer ALU with condition-code generation.
//
// Purely combinational. The operation is selected by the instruction's op3
// field (format 3, op = 2): ADD, AND, OR, XOR, SUB, ANDN, ORN, XNOR, ADDX and
// SUBX, each also in the "cc" form (op3[4] = 1) that produces new integer
// condition codes, and the shifts SLL, SRL and SRA (op3 = 0x25..0x27, shift
// count b[4:0]). ADDX/SUBX use the carry flag cin. icc_out is {N, Z, V, C};
// logic operations clear V and C. cc_we says whether the operation writes the
// condition codes, valid says whether op3 is an operation of this unit.
//
// The document maps this ALU and its flag generation to DSP blocks; here it
// is ordinary logic. The operation set and flag rules are those of SPARC V8.
module int_alu (
  input  logic [5:0]  op3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] result,
  output logic [3:0]  icc_out,
  output logic        cc_we,
  output logic        valid
);
  logic [32:0] sum;
  logic        n, z, v, c;
  logic        arith_add, arith_sub;

  always_comb begin
    sum       = '0;
    result    = '0;
    v         = 1'b0;
    c         = 1'b0;
    arith_add = 1'b0;
    arith_sub = 1'b0;
    valid     = 1'b1;
    cc_we     = 1'b0;
    if (op3[5] == 1'b0) begin
      cc_we = op3[4];
      unique case (op3[3:0])
        4'h0: begin sum = {1'b0, a} + {1'b0, b};                 arith_add = 1'b1; end
        4'h8: begin sum = {1'b0, a} + {1'b0, b} + {32'd0, cin};  arith_add = 1'b1; end
        4'h4: begin sum = {1'b0, a} - {1'b0, b};                 arith_sub = 1'b1; end
        4'hC: begin sum = {1'b0, a} - {1'b0, b} - {32'd0, cin};  arith_sub = 1'b1; end
        4'h1: result = a & b;
        4'h2: result = a | b;
        4'h3: result = a ^ b;
        4'h5: result = a & ~b;
        4'h6: result = a | ~b;
        4'h7: result = ~(a ^ b);
        default: begin valid = 1'b0; cc_we = 1'b0; end
      endcase
      if (arith_add || arith_sub) begin
        result = sum[31:0];
        c      = sum[32];   // carry out of an add, borrow of a subtract
      end
      if (arith_add) v = (a[31] == b[31]) && (result[31] != a[31]);
      if (arith_sub) v = (a[31] != b[31]) && (result[31] != a[31]);
    end else begin
      unique case (op3)
        6'h25: result = a << b[4:0];
        6'h26: result = a >> b[4:0];
        6'h27: result = $unsigned($signed(a) >>> b[4:0]);
        default: valid = 1'b0;
      endcase
    end
    n = result[31];
    z = (result == 32'd0);
    icc_out = {n, z, v, c};
  end
endmodule
