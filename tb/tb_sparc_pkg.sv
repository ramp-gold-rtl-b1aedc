// SPARC V8 instruction encoders used by the testbenches to build programs.
//
// Functions return 32-bit instruction words: f3r / f3i for format-3
// (arithmetic, logic, shift, load/store, jump) with a register or a 13-bit
// signed immediate second operand, sethi, bicc (annul bit, condition, word
// displacement), call (word displacement) and ta (trap always, which halts a
// thread in this design). The op3 and condition constants are the SPARC V8
// encodings for the instructions the functional model implements.
package tb_sparc_pkg;
  function automatic logic [31:0] f3r(input logic [1:0] op, input logic [4:0] rd,
      input logic [5:0] op3, input logic [4:0] rs1, input logic [4:0] rs2);
    return {op, rd, op3, rs1, 1'b0, 8'd0, rs2};
  endfunction
  function automatic logic [31:0] f3i(input logic [1:0] op, input logic [4:0] rd,
      input logic [5:0] op3, input logic [4:0] rs1, input int simm);
    return {op, rd, op3, rs1, 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] sethi(input logic [4:0] rd, input logic [31:0] value);
    return {2'b00, rd, 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] bicc(input logic a, input logic [3:0] cond, input int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(input int disp);
    return {2'b01, 30'(disp)};
  endfunction
  function automatic logic [31:0] ta(input int n);
    return {2'b10, 1'b0, 4'b1000, 6'h3A, 5'd0, 1'b1, 13'(n)};
  endfunction
  localparam logic [31:0] NOP = 32'h0100_0000;
  localparam logic [3:0] BA = 4'b1000, BNE = 4'b1001, BE = 4'b0001, BL = 4'b0011, BG = 4'b1010;
  localparam logic [5:0] ADD = 6'h00, AND = 6'h01, OR = 6'h02, XOR = 6'h03, SUB = 6'h04,
                         ADDCC = 6'h10, SUBCC = 6'h14, UMUL = 6'h0A, SMUL = 6'h0B, UDIV = 6'h0E,
                         SDIV = 6'h0F, SLL = 6'h25, SRL = 6'h26, SRA = 6'h27, JMPL = 6'h38,
                         WRY = 6'h30, RDY = 6'h28, LD = 6'h00, LDUB = 6'h01, ST = 6'h04, STB = 6'h05,
                         LDUH = 6'h02, LDSB = 6'h09, LDSH = 6'h0A, STH = 6'h06;
endpackage
