// Per-thread architected control state of the target cores.
//
// For each of NTHREADS target cores this holds the SPARC program counter pair
// (PC and nPC, the delayed-branch successor), the annul flag of a pending
// annulled delay slot, the integer condition codes (N Z V C), the Y register
// used by multiply and divide, and a halted flag. The read port is
// combinational (LUTRAM style) so the issue stage sees the state of the thread
// it issues in the same host cycle; the single write port is taken at the
// clock edge. The halted flags of all threads are also brought out in
// parallel for the thread scheduler.
//
// The document names this block ("Architecture State (x64)") without detail;
// the fields follow the SPARC V8 architecture, and the reset values (every
// thread at reset_pc, running) are this design's choice.
module arch_state #(
  parameter int NTHREADS = 64,
  localparam int TW = $clog2(NTHREADS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   reset_pc,
  // read
  input  logic [TW-1:0] rtid,
  output logic [31:0]   r_pc,
  output logic [31:0]   r_npc,
  output logic          r_annul,
  output logic [3:0]    r_icc,
  output logic [31:0]   r_y,
  // write
  input  logic          we,
  input  logic [TW-1:0] wtid,
  input  logic [31:0]   w_pc,
  input  logic [31:0]   w_npc,
  input  logic          w_annul,
  input  logic [3:0]    w_icc,
  input  logic [31:0]   w_y,
  input  logic          w_halt,
  output logic [NTHREADS-1:0] halted
);
  logic [31:0] pc_q   [NTHREADS];
  logic [31:0] npc_q  [NTHREADS];
  logic [31:0] y_q    [NTHREADS];
  logic [3:0]  icc_q  [NTHREADS];
  logic [NTHREADS-1:0] annul_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) begin
        pc_q[t]  <= reset_pc;
        npc_q[t] <= reset_pc + 32'd4;
        y_q[t]   <= '0;
        icc_q[t] <= '0;
      end
      annul_q <= '0;
      halted  <= '0;
    end else if (we) begin
      pc_q[wtid]    <= w_pc;
      npc_q[wtid]   <= w_npc;
      y_q[wtid]     <= w_y;
      icc_q[wtid]   <= w_icc;
      annul_q[wtid] <= w_annul;
      halted[wtid]  <= w_halt;
    end
  end

  assign r_pc    = pc_q[rtid];
  assign r_npc   = npc_q[rtid];
  assign r_annul = annul_q[rtid];
  assign r_icc   = icc_q[rtid];
  assign r_y     = y_q[rtid];
endmodule
