// Private host TLBs, one per thread (used both as ITLB and as DTLB).
//
// Each thread has SETS x WAYS entries (16 x 2 = 32) mapping a virtual page
// number to a physical page number. The lookup is combinational: the set is
// the low bits of the virtual page number of the requesting thread, both ways
// are compared, and a hit returns the physical address in the same cycle
// (LUTRAM style). Entries are written through the fill port by the MMU's
// table walker, which picks the way from a per-set round-robin bit; `flush`
// invalidates every entry.
//
// Entry count, the 2x16 two-way organisation and per-thread privacy are the
// document's; the 4 KB page, the round-robin replacement and the external fill
// port are this design's choices.
module host_tlb #(
  parameter int NTHREADS  = 64,
  parameter int SETS      = 16,
  parameter int WAYS      = 2,
  parameter int PAGE_BITS = 12,
  localparam int TW  = $clog2(NTHREADS),
  localparam int SW  = $clog2(SETS),
  localparam int VPW = 32 - PAGE_BITS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic [TW-1:0]  lk_tid,
  input  logic [31:0]    lk_vaddr,
  output logic           lk_hit,
  output logic [31:0]    lk_paddr,
  input  logic           fill_valid,
  input  logic [TW-1:0]  fill_tid,
  input  logic [VPW-1:0] fill_vpn,
  input  logic [VPW-1:0] fill_ppn
);
  localparam int NE = NTHREADS * SETS;

  logic [VPW-1:0] vpn_q [NE][WAYS];
  logic [VPW-1:0] ppn_q [NE][WAYS];
  logic [WAYS-1:0] vld_q [NE];
  logic [$clog2(WAYS)-1:0] rr_q [NE];

  wire [VPW-1:0]   vpn   = lk_vaddr[31:PAGE_BITS];
  wire [TW+SW-1:0] l_idx = {lk_tid, vpn[SW-1:0]};
  wire [TW+SW-1:0] f_idx = {fill_tid, fill_vpn[SW-1:0]};

  always_comb begin
    lk_hit   = 1'b0;
    lk_paddr = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld_q[l_idx][w] && vpn_q[l_idx][w] == vpn) begin
        lk_hit   = 1'b1;
        lk_paddr = {ppn_q[l_idx][w], lk_vaddr[PAGE_BITS-1:0]};
      end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      vpn_q[f_idx][rr_q[f_idx]] <= fill_vpn;
      ppn_q[f_idx][rr_q[f_idx]] <= fill_ppn;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NE; i++) begin
        vld_q[i] <= '0;
        rr_q[i]  <= '0;
      end
    end else if (flush) begin
      for (int i = 0; i < NE; i++) vld_q[i] <= '0;
    end else if (fill_valid) begin
      vld_q[f_idx][rr_q[f_idx]] <= 1'b1;
      rr_q[f_idx] <= rr_q[f_idx] + 1'b1;
    end
  end
endmodule
