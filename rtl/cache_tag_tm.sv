// Set-associative tag store with LRU replacement for the cache timing models.
//
// Only metadata is kept: for each of NROWS sets and WAYS ways a line tag, a
// valid and a dirty bit, and an LRU age. The lookup is combinational on
// (row, tag) and considers only the first `ways` ways, so the associativity can
// be lowered at runtime. At the clock edge of an access the store is updated:
// a hit makes the way most recent (and dirty for a write); a miss installs the
// tag in the victim way -- the first invalid enabled way, else the least
// recently used one -- and reports whether a dirty line was evicted and its
// tag. `flush` invalidates everything (after a reconfiguration).
//
// Keeping only tags, and masking the geometry at runtime, is the document's
// approach; LRU replacement by age counters is this design's choice.
module cache_tag_tm #(
  parameter int NROWS = 4096,
  parameter int WAYS  = 4,
  parameter int TAGW  = 27,
  localparam int RW = $clog2(NROWS),
  localparam int AW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  input  logic            req_valid,
  input  logic [RW-1:0]   req_row,
  input  logic [TAGW-1:0] req_tag,
  input  logic            req_write,
  input  logic [AW:0]     ways,          // enabled ways, 1..WAYS
  output logic            hit,
  output logic            evict_dirty,
  output logic [TAGW-1:0] evict_tag
);
  typedef struct packed {
    logic [TAGW-1:0] tag;
    logic            dirty;
    logic [AW-1:0]   age;
  } way_t;

  way_t        mem [NROWS][WAYS];
  logic [WAYS-1:0] vld [NROWS];

  logic [AW-1:0] hit_way, vic_way, use_way, old_age;
  logic          have_inv;

  always_comb begin
    hit = 1'b0; hit_way = '0; have_inv = 1'b0; vic_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (w < int'(ways)) begin
        if (vld[req_row][w] && mem[req_row][w].tag == req_tag) begin
          hit = 1'b1; hit_way = AW'(w);
        end
      end
    end
    // victim: first invalid way, else the oldest
    for (int w = WAYS - 1; w >= 0; w--)
      if (w < int'(ways) && !vld[req_row][w]) begin have_inv = 1'b1; vic_way = AW'(w); end
    if (!have_inv)
      for (int w = 0; w < WAYS; w++)
        if (w < int'(ways) && mem[req_row][w].age > mem[req_row][vic_way].age) vic_way = AW'(w);
    use_way     = hit ? hit_way : vic_way;
    old_age     = (hit || !have_inv) ? mem[req_row][use_way].age : AW'(WAYS - 1);
    evict_dirty = !hit && !have_inv && mem[req_row][vic_way].dirty;
    evict_tag   = mem[req_row][vic_way].tag;
  end

  always_ff @(posedge clk) begin
    if (req_valid) begin
      for (int w = 0; w < WAYS; w++)
        if (w < int'(ways) && AW'(w) != use_way && mem[req_row][w].age <= old_age &&
            mem[req_row][w].age != AW'(WAYS - 1))
          mem[req_row][w].age <= mem[req_row][w].age + 1'b1;
      mem[req_row][use_way].age   <= '0;
      mem[req_row][use_way].tag   <= req_tag;
      mem[req_row][use_way].dirty <= hit ? (mem[req_row][use_way].dirty | req_write) : req_write;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NROWS; r++) vld[r] <= '0;
    end else if (flush) begin
      for (int r = 0; r < NROWS; r++) vld[r] <= '0;
    end else if (req_valid) begin
      vld[req_row][use_way] <= 1'b1;
    end
  end
endmodule
