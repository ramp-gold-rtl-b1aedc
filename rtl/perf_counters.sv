// Target and host performance counters on a ring interconnect.
//
// NCORES x NPRIV private counters (10 per core) and NGLOB global counters
// (17), 64 bits each: 657 in the default configuration. Counter address
// core*NPRIV + k selects private counter k of a core, NCORES*NPRIV + g global
// counter g (numbering in rg_pkg: PC_*, GC_*). One core event per host cycle
// (core_ev_valid, core_ev_core, core_ev_inc) increments the chosen private
// counters of that core; glob_inc increments global counters. A read
// (rd_valid, rd_addr) enters the ring at station 0 and returns on rsp_valid,
// rsp_data NCORES+1 host cycles later; a new read can start every cycle.
//
// Counter count, width, the private/global split and the ring are the
// document's; the event set and the address map are this design's choices.
module perf_counters
  import rg_pkg::*;
#(
  parameter int NCORES = 64,
  parameter int PRIV   = 10,
  parameter int GLOB   = 17,
  localparam int CW = $clog2(NCORES),
  localparam int AW = $clog2(NCORES * PRIV + GLOB)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            core_ev_valid,
  input  logic [CW-1:0]   core_ev_core,
  input  logic [PRIV-1:0] core_ev_inc,
  input  logic [GLOB-1:0] glob_inc,
  input  logic            rd_valid,
  input  logic [AW-1:0]   rd_addr,
  output logic            rsp_valid,
  output logic [63:0]     rsp_data,
  output logic            rsp_found
);
  logic          r_valid [NCORES+2];
  logic [AW-1:0] r_addr  [NCORES+2];
  logic [63:0]   r_data  [NCORES+2];
  logic          r_found [NCORES+2];

  assign r_valid[0] = rd_valid;
  assign r_addr[0]  = rd_addr;
  assign r_data[0]  = '0;
  assign r_found[0] = 1'b0;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    perf_ring_node #(.NCNT(PRIV), .BASE(c * PRIV), .ADDR_W(AW)) u_node (
      .clk, .rst_n,
      .inc((core_ev_valid && core_ev_core == CW'(c)) ? core_ev_inc : '0),
      .in_valid(r_valid[c]), .in_addr(r_addr[c]), .in_data(r_data[c]), .in_found(r_found[c]),
      .out_valid(r_valid[c+1]), .out_addr(r_addr[c+1]), .out_data(r_data[c+1]),
      .out_found(r_found[c+1]));
  end

  perf_ring_node #(.NCNT(GLOB), .BASE(NCORES * PRIV), .ADDR_W(AW)) u_glob (
    .clk, .rst_n, .inc(glob_inc),
    .in_valid(r_valid[NCORES]), .in_addr(r_addr[NCORES]), .in_data(r_data[NCORES]),
    .in_found(r_found[NCORES]),
    .out_valid(r_valid[NCORES+1]), .out_addr(r_addr[NCORES+1]), .out_data(r_data[NCORES+1]),
    .out_found(r_found[NCORES+1]));

  assign rsp_valid = r_valid[NCORES+1];
  assign rsp_data  = r_data[NCORES+1];
  assign rsp_found = r_found[NCORES+1];
endmodule
