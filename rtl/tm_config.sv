// Timing model configuration registers on the functional model's I/O bus.
//
// Twelve word registers (numbers in rg_pkg: CFG_*) hold the runtime geometry
// of the target caches (sets, ways and line size of the L1s and the L2, the
// number of L2 banks), the L2 latency and the DRAM latency and service time.
// They reset to the Table-2 target machine. A write (io_we, io_addr,
// io_wdata) updates one register at the clock edge; a write to any geometry
// register also pulses `flush` the next cycle, emptying the tag models so
// that no tag of the old geometry survives. Reads are combinational.
//
// That these parameters are runtime registers on the I/O bus is the
// document's; the register map and the flush on reconfiguration are this
// design's choices.
module tm_config
  import rg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_we,
  input  logic [3:0]  io_addr,
  input  logic [31:0] io_wdata,
  output logic [31:0] io_rdata,
  output tm_cfg_t     cfg,
  output logic        flush
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg   <= TM_CFG_DEFAULT;
      flush <= 1'b0;
    end else begin
      flush <= io_we && (int'(io_addr) <= CFG_L2_BANKS);
      if (io_we) begin
        unique case (int'(io_addr))
          CFG_L1I_SETS: cfg.l1i_sets_log2 <= io_wdata[2:0];
          CFG_L1I_WAYS: cfg.l1i_ways      <= io_wdata[2:0];
          CFG_L1D_SETS: cfg.l1d_sets_log2 <= io_wdata[2:0];
          CFG_L1D_WAYS: cfg.l1d_ways      <= io_wdata[2:0];
          CFG_L1_LINE:  cfg.l1_line_log2  <= io_wdata[2:0];
          CFG_L2_SETS:  cfg.l2_sets_log2  <= io_wdata[3:0];
          CFG_L2_WAYS:  cfg.l2_ways       <= io_wdata[4:0];
          CFG_L2_LINE:  cfg.l2_line_log2  <= io_wdata[2:0];
          CFG_L2_BANKS: cfg.l2_banks_log2 <= io_wdata[1:0];
          CFG_L2_LAT:   cfg.l2_latency    <= io_wdata[7:0];
          CFG_DRAM_LAT: cfg.dram_latency  <= io_wdata[7:0];
          CFG_DRAM_SVC: cfg.dram_service  <= io_wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (int'(io_addr))
      CFG_L1I_SETS: io_rdata = 32'(cfg.l1i_sets_log2);
      CFG_L1I_WAYS: io_rdata = 32'(cfg.l1i_ways);
      CFG_L1D_SETS: io_rdata = 32'(cfg.l1d_sets_log2);
      CFG_L1D_WAYS: io_rdata = 32'(cfg.l1d_ways);
      CFG_L1_LINE:  io_rdata = 32'(cfg.l1_line_log2);
      CFG_L2_SETS:  io_rdata = 32'(cfg.l2_sets_log2);
      CFG_L2_WAYS:  io_rdata = 32'(cfg.l2_ways);
      CFG_L2_LINE:  io_rdata = 32'(cfg.l2_line_log2);
      CFG_L2_BANKS: io_rdata = 32'(cfg.l2_banks_log2);
      CFG_L2_LAT:   io_rdata = 32'(cfg.l2_latency);
      CFG_DRAM_LAT: io_rdata = 32'(cfg.dram_latency);
      CFG_DRAM_SVC: io_rdata = 32'(cfg.dram_service);
      default:      io_rdata = '0;
    endcase
  end
endmodule
