// Shared types and constants of the RAMP Gold simulator RTL.
//
// The simulator is split into a functional model, which executes the target
// SPARC V8 instructions for 64 target cores on one host-multithreaded
// pipeline, and a timing model, which decides how many target cycles each
// retired instruction costs. This package holds the types that cross between
// the blocks: the host memory request/response bundle, the writeback event
// that the functional model hands to the timing model, the runtime timing
// configuration and the performance-counter event numbering.
//
// The thread count (64), the host line size (32 bytes, the minimum DRAM burst)
// and the Table-2 target cache defaults follow the document. The field layouts,
// the configuration register map and the counter numbering are this design's
// own choices.
package rg_pkg;

  localparam int NTHREADS   = 64;
  localparam int TID_W      = 6;
  localparam int HLINE_BITS = 256;      // host cache line, 32 bytes

  typedef logic [31:0] word_t;

  // ---------------- host memory interface (asynchronous, tagged) ----------
  // tag[7] : 0 = host I$, 1 = host D$ ; tag[TID_W-1:0] : requesting thread
  typedef struct packed {
    logic        write;      // 1: word write, 0: 32-byte line read
    logic [31:0] addr;       // byte address (line aligned for reads)
    logic [31:0] wdata;
    logic [3:0]  wmask;      // byte enables, wmask[3] = byte at addr+0
    logic [7:0]  tag;
  } mem_req_t;

  typedef struct packed {
    logic [7:0]            tag;
    logic [HLINE_BITS-1:0] data;  // data[255:224] is the word at offset 0
  } mem_resp_t;

  // ---------------- functional -> timing model writeback event -------------
  typedef enum logic [2:0] {
    RP_NONE   = 3'd0,   // instruction retired
    RP_ICACHE = 3'd1,   // host I$ miss
    RP_DCACHE = 3'd2,   // host D$ miss
    RP_TLB    = 3'd3,   // host TLB miss
    RP_MULDIV = 3'd4,   // multi-pass multiply / divide
    RP_MEM    = 3'd5,   // host memory port busy
    RP_STORE3 = 3'd6    // first pass of a three-register store
  } replay_e;

  typedef struct packed {
    logic [TID_W-1:0] tid;
    replay_e          replay;    // RP_NONE when the instruction retired
    logic [31:0]      pc;        // physical address of the instruction
    logic [31:0]      paddr;     // physical data address of a load/store
    logic             is_load;
    logic             is_store;
    logic             is_ctrl;   // branch, call or jump
    logic             halt;      // thread stopped (trap instruction)
  } wb_event_t;

  // ---------------- timing model runtime configuration ---------------------
  typedef struct packed {
    logic [2:0] l1i_sets_log2;  // 0..6
    logic [2:0] l1i_ways;       // 1..4
    logic [2:0] l1d_sets_log2;
    logic [2:0] l1d_ways;
    logic [2:0] l1_line_log2;   // 5..7
    logic [3:0] l2_sets_log2;   // 0..10 (sets per bank)
    logic [4:0] l2_ways;        // 1..16
    logic [2:0] l2_line_log2;   // 5..7
    logic [1:0] l2_banks_log2;  // 0..2
    logic [7:0] l2_latency;     // target cycles
    logic [7:0] dram_latency;   // target cycles
    logic [7:0] dram_service;   // target cycles per line transfer
  } tm_cfg_t;

  // Register numbers on the I/O bus
  localparam int CFG_L1I_SETS = 0, CFG_L1I_WAYS = 1, CFG_L1D_SETS = 2, CFG_L1D_WAYS = 3,
                 CFG_L1_LINE = 4, CFG_L2_SETS = 5, CFG_L2_WAYS = 6, CFG_L2_LINE = 7,
                 CFG_L2_BANKS = 8, CFG_L2_LAT = 9, CFG_DRAM_LAT = 10, CFG_DRAM_SVC = 11;

  // Table 2 target: 32 KB 4-way 128 B L1s, 8 MB 16-way 4-bank L2 with 10 ns,
  // 3.2 GB/s channels (40 cycles per 128 B line at 1 GHz) with 70 ns latency.
  localparam tm_cfg_t TM_CFG_DEFAULT = '{
    l1i_sets_log2: 3'd6, l1i_ways: 3'd4, l1d_sets_log2: 3'd6, l1d_ways: 3'd4,
    l1_line_log2: 3'd7, l2_sets_log2: 4'd10, l2_ways: 5'd16, l2_line_log2: 3'd7,
    l2_banks_log2: 2'd2, l2_latency: 8'd10, dram_latency: 8'd70, dram_service: 8'd40};

  // ---------------- performance counters -----------------------------------
  localparam int NPRIV = 10;   // private counters per core
  localparam int NGLOB = 17;   // global counters
  // private
  localparam int PC_INST = 0, PC_LOAD = 1, PC_STORE = 2, PC_CTRL = 3, PC_L1I_MISS = 4,
                 PC_L1D_HIT = 5, PC_L1D_MISS = 6, PC_L1D_WB = 7, PC_L2_HIT = 8, PC_L2_MISS = 9;
  // global
  localparam int GC_TCYCLE = 0, GC_HCYCLE = 1, GC_ISSUE = 2, GC_RETIRE = 3, GC_RP_ICACHE = 4,
                 GC_RP_DCACHE = 5, GC_RP_TLB = 6, GC_RP_MULDIV = 7, GC_RP_MEM = 8,
                 GC_SYNC = 9, GC_IDLE = 10, GC_L2_WB = 11, GC_DRAM_RD = 12, GC_DRAM_WR = 13,
                 GC_MSHR_MERGE = 14, GC_INJECT = 15, GC_RP_STORE3 = 16;

  // ---------------- front-end injector commands ----------------------------
  typedef enum logic [2:0] {
    INJ_NOP = 3'd0, INJ_RUN = 3'd1, INJ_STOP = 3'd2,
    INJ_WRREG = 3'd3, INJ_WRPC = 3'd4, INJ_RDREG = 3'd5
  } inj_op_e;

  typedef struct packed {
    inj_op_e          op;
    logic [TID_W-1:0] tid;
    logic [4:0]       rd;
    logic [31:0]      data;
  } inj_cmd_t;

endpackage
