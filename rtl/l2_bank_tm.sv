// One bank of the shared L2 cache timing model, with its miss status
// holding registers (MSHRs).
//
// The bank keeps the tags of MAX_SETS sets x MAX_WAYS ways (1024 x 16 for a
// quarter of the 8 MB, 16-way, 128 B line target L2). An access at target
// cycle `now` is answered combinationally with the absolute target cycle
// `ready` at which its data would be back:
//   * a line that an MSHR is still fetching merges with that miss:
//     ready = max(now + latency, MSHR ready);
//   * a tag hit: ready = now + latency;
//   * a miss: a DRAM request arrives at now + latency (later if all MSHRs are
//     busy: then it waits for the first to free), carrying a dirty victim
//     write-back if there is one; ready is the DRAM model's `dram_done`, and an
//     MSHR records the line until then.
// L1 write-backs (req_wb) only mark or install the line dirty and take no
// time. Geometry and latency come from the runtime configuration; the bank
// select bits sit just above the line offset, the set index above them.
//
// Banking, tags-only modelling, the MSHR and the lockup-free behaviour are
// from the document; merging rules, MSHR count and the untimed L1 write-backs
// are this design's choices. Inclusion is not enforced on L2 evictions.
module l2_bank_tm #(
  parameter int MAX_SETS = 1024,
  parameter int MAX_WAYS = 16,
  parameter int MSHRS    = 8,
  localparam int SW   = $clog2(MAX_SETS),
  localparam int TAGW = 27,
  localparam int AW   = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [3:0]  sets_log2,
  input  logic [AW:0] ways,
  input  logic [2:0]  line_log2,
  input  logic [1:0]  banks_log2,
  input  logic [7:0]  latency,
  input  logic        req_valid,
  input  logic [31:0] req_addr,
  input  logic        req_wb,
  input  logic [63:0] now,
  output logic        hit,
  output logic        merged,
  output logic        mshr_full,
  output logic        evict_dirty,
  output logic [63:0] ready,
  // to the DRAM channel model
  output logic        dram_valid,
  output logic [63:0] dram_arrival,
  output logic        dram_wb,
  input  logic [63:0] dram_done
);
  typedef struct packed {
    logic            v;
    logic [TAGW-1:0] line;
    logic [63:0]     ready;
  } mshr_t;

  mshr_t mshr [MSHRS];

  logic [31:0]   line;
  logic [SW-1:0] set;
  logic [63:0]   t_l2, min_ready, m_ready;
  logic          m_hit, have_free, tag_hit;
  logic [$clog2(MSHRS)-1:0] free_i, min_i, alloc_i;

  always_comb begin
    line = req_addr >> line_log2;
    set  = SW'(line >> banks_log2) & SW'((32'd1 << sets_log2) - 32'd1);
  end

  cache_tag_tm #(.NROWS(MAX_SETS), .WAYS(MAX_WAYS), .TAGW(TAGW)) u_tags (
    .clk, .rst_n, .flush, .req_valid, .req_row(set), .req_tag(TAGW'(line)),
    .req_write(req_wb), .ways, .hit(tag_hit), .evict_dirty, .evict_tag());

  always_comb begin
    t_l2 = now + 64'(latency);
    m_hit = 1'b0; m_ready = '0; have_free = 1'b0; free_i = '0; min_i = '0;
    min_ready = mshr[0].ready;
    for (int i = 0; i < MSHRS; i++) begin
      if (mshr[i].v && mshr[i].line == TAGW'(line) && mshr[i].ready > now) begin
        m_hit = 1'b1; m_ready = mshr[i].ready;
      end
      if (!mshr[i].v || mshr[i].ready <= now) begin
        if (!have_free) free_i = ($clog2(MSHRS))'(i);
        have_free = 1'b1;
      end
      if (mshr[i].ready < min_ready) begin min_ready = mshr[i].ready; min_i = ($clog2(MSHRS))'(i); end
    end
    alloc_i      = have_free ? free_i : min_i;
    hit          = tag_hit && !m_hit;
    merged       = m_hit && !req_wb;
    mshr_full    = 1'b0;
    dram_valid   = 1'b0;
    dram_wb      = evict_dirty;
    dram_arrival = t_l2;
    ready        = t_l2;
    if (!req_wb) begin
      if (m_hit) begin
        ready = (m_ready > t_l2) ? m_ready : t_l2;
      end else if (!tag_hit) begin
        if (!have_free) begin
          mshr_full    = 1'b1;
          dram_arrival = (min_ready > t_l2) ? min_ready : t_l2;
        end
        dram_valid = req_valid;
        ready      = dram_done;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MSHRS; i++) mshr[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < MSHRS; i++) mshr[i].v <= 1'b0;
    end else if (dram_valid) begin
      mshr[alloc_i].v     <= 1'b1;
      mshr[alloc_i].line  <= TAGW'(line);
      mshr[alloc_i].ready <= dram_done;
    end
  end
endmodule
