// Front-end command injector.
//
// Turns commands from the front-end link into actions on the simulator:
//   INJ_RUN / INJ_STOP   start or stop the thread scheduler (target time
//                        stands still while stopped);
//   INJ_WRREG            write register rd of thread tid;
//   INJ_WRPC             set the PC of thread tid (nPC = PC + 4) and restart
//                        it if it was halted;
//   INJ_RDREG            read register rd of thread tid; the value comes back
//                        on rsp_valid/rsp_data the next cycle.
// Commands use a valid/ready handshake. State accesses are accepted only
// while the simulation is stopped and the pipeline and timing model are
// drained (`drained`), so they never disturb target timing. `ev_cmd` pulses
// for every accepted command.
//
// The document's injector drives microcode into the functional pipeline; the
// command set here covers the uses it lists (start and stop, load and modify
// state) with direct state writes. The encoding is this design's.
module injector
  import rg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  inj_cmd_t    cmd,
  output logic        cmd_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_data,
  input  logic        drained,
  output logic        run,
  output logic        ev_cmd,
  // to the functional model
  output logic        reg_we,
  output logic        pc_we,
  output logic        reg_re,
  output logic [TID_W-1:0] tid,
  output logic [4:0]  rd,
  output logic [31:0] data,
  input  logic [31:0] reg_rdata
);
  wire state_op = cmd.op inside {INJ_WRREG, INJ_WRPC, INJ_RDREG};

  assign cmd_ready = !state_op || (!run && drained);
  wire   take      = cmd_valid && cmd_ready;
  assign ev_cmd    = take && cmd.op != INJ_NOP;

  assign reg_we = take && cmd.op == INJ_WRREG;
  assign pc_we  = take && cmd.op == INJ_WRPC;
  assign reg_re = take && cmd.op == INJ_RDREG;
  assign tid    = cmd.tid;
  assign rd     = cmd.rd;
  assign data   = cmd.data;
  assign rsp_data = reg_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= reg_re;
      if (take && cmd.op == INJ_RUN)  run <= 1'b1;
      if (take && cmd.op == INJ_STOP) run <= 1'b0;
    end
  end
endmodule
