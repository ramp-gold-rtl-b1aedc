// Shared multi-cycle integer multiply / divide unit (SPARC V8 UMUL, SMUL,
// UDIV, SDIV).
//
// One operation is in the unit at a time, owned by one thread. The
// functional pipeline starts it with `start` and replays the thread; when the
// thread comes round again and finds `done` with its own thread id, it takes
// the result and pulses `ack`, which frees the unit. Multiplies produce the
// 64-bit product (upper half for the Y register) after MUL_CYCLES cycles.
// Divides take the 64-bit dividend {Y, a} and a 32-bit divisor through a
// restoring divider, one quotient bit per cycle (64 cycles), then saturate the
// quotient as SPARC V8 specifies; `div_zero` flags a zero divisor.
//
// That multiply and divide run in several pipeline passes ("replays") is from
// the document; the sharing of one unit, its latencies and the
// start/done/ack protocol are this design's choices.
module imul_idiv #(
  parameter int TID_W      = 6,
  parameter int MUL_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [1:0]       op,        // 0 UMUL, 1 SMUL, 2 UDIV, 3 SDIV
  input  logic [TID_W-1:0] tid_in,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [31:0]      y_in,
  output logic             busy,      // holding an operation (running or done)
  output logic             done,
  output logic [TID_W-1:0] tid,
  output logic [31:0]      result,
  output logic [31:0]      y_out,
  output logic             div_zero,
  input  logic             ack
);
  typedef enum logic [1:0] {IDLE, MUL, DIV, DONE} st_e;
  st_e         st;
  logic [6:0]  cnt;
  logic [1:0]  op_q;
  logic [63:0] prod;
  logic [63:0] quo;       // dividend shifting into quotient
  logic [32:0] rem;
  logic [31:0] dvs;
  logic        neg_q;
  logic [32:0] rem_sh;

  assign busy = (st != IDLE);
  assign done = (st == DONE);
  assign rem_sh = {rem[31:0], quo[63]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; op_q <= '0; prod <= '0; quo <= '0; rem <= '0; dvs <= '0;
      neg_q <= 1'b0; tid <= '0; result <= '0; y_out <= '0; div_zero <= 1'b0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          tid      <= tid_in;
          op_q     <= op;
          div_zero <= 1'b0;
          cnt      <= '0;
          if (!op[1]) begin
            prod <= op[0] ? $unsigned($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}))
                          : {32'd0, a} * {32'd0, b};
            st   <= MUL;
          end else if (b == 32'd0) begin
            div_zero <= 1'b1;
            result   <= '0;
            y_out    <= y_in;
            st       <= DONE;
          end else begin
            logic [63:0] dd;
            dd  = {y_in, a};
            if (op[0]) begin
              if (dd[63]) dd = -dd;
              dvs   <= b[31] ? -b : b;
              neg_q <= y_in[31] ^ b[31];
            end else begin
              dvs   <= b;
              neg_q <= 1'b0;
            end
            quo   <= dd;
            rem   <= '0;
            y_out <= y_in;   // Y is not changed by a divide
            st  <= DIV;
          end
        end
        MUL: begin
          cnt <= cnt + 7'd1;
          if (cnt == 7'(MUL_CYCLES - 1)) begin
            result <= prod[31:0];
            y_out  <= prod[63:32];
            st     <= DONE;
          end
        end
        DIV: begin
          // one restoring step: shift in the next dividend bit, subtract if it fits
          if (rem_sh >= {1'b0, dvs}) begin
            rem <= rem_sh - {1'b0, dvs};
            quo <= {quo[62:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[62:0], 1'b0};
          end
          cnt <= cnt + 7'd1;
          if (cnt == 7'd63) st <= DONE;
        end
        DONE: if (ack) st <= IDLE;
      endcase
      // saturate the quotient the cycle the divide finishes
      if (st == DIV && cnt == 7'd63) begin
        logic [63:0] q;
        q = {quo[62:0], (rem_sh >= {1'b0, dvs})};
        if (!op_q[0]) result <= (q[63:32] != 0) ? 32'hFFFF_FFFF : q[31:0];
        else if (neg_q) result <= (q > 64'h8000_0000) ? 32'h8000_0000 : (-q[31:0]);
        else            result <= (q > 64'h7FFF_FFFF) ? 32'h7FFF_FFFF : q[31:0];
      end
    end
  end
endmodule
