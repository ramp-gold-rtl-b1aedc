// L1 cache timing model for all target cores (used once for the I-caches and
// once for the D-caches).
//
// Holds only the tags of NCORES private caches, MAX_SETS sets x MAX_WAYS ways
// each at synthesis time (64 x 4 for the 32 KB, 4-way, 128 B line target).
// The runtime configuration chooses the line size (line_log2), the number of
// sets (sets_log2) and the associativity (ways): the set index is the line
// address shifted by line_log2 and masked to sets_log2 bits, and the tag kept
// is the whole line address so that any geometry stays correct. One access
// per host cycle; hit, and for a miss the dirty victim's address, are
// combinational and the tags are updated at the clock edge.
//
// Tags-only modelling and runtime masking of the index are from the
// document; the index/tag split, LRU and the victim report are this design's.
module l1_tm #(
  parameter int NCORES   = 64,
  parameter int MAX_SETS = 64,
  parameter int MAX_WAYS = 4,
  localparam int CW = $clog2(NCORES),
  localparam int SW = $clog2(MAX_SETS),
  localparam int TAGW = 27,   // line address for lines of 32 B or more
  localparam int AW = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic [2:0]    sets_log2,
  input  logic [AW:0]   ways,
  input  logic [2:0]    line_log2,
  input  logic          req_valid,
  input  logic [CW-1:0] req_core,
  input  logic [31:0]   req_addr,
  input  logic          req_write,
  output logic          hit,
  output logic          evict_dirty,
  output logic [31:0]   evict_addr
);
  logic [31:0]     line;
  logic [SW-1:0]   set;
  logic [TAGW-1:0] vtag;

  always_comb begin
    line = req_addr >> line_log2;
    set  = SW'(line) & SW'((32'd1 << sets_log2) - 32'd1);
  end

  cache_tag_tm #(.NROWS(NCORES * MAX_SETS), .WAYS(MAX_WAYS), .TAGW(TAGW)) u_tags (
    .clk, .rst_n, .flush, .req_valid, .req_row({req_core, set}), .req_tag(TAGW'(line)),
    .req_write, .ways, .hit, .evict_dirty, .evict_tag(vtag));

  assign evict_addr = {5'd0, vtag} << line_log2;
endmodule
