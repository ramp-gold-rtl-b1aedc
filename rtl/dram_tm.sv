// DRAM channel timing model.
//
// Models one target memory channel as a first-come-first-served queue with a
// fixed service rate: a request arriving at target cycle `arrival` starts
// when the channel is free (start = max(arrival, next_free)), occupies it for
// `service` cycles per line transfer (twice when a dirty line is written back
// first) and its data is back `latency` cycles after its own transfer starts.
// The answer `done` (absolute target cycle) is combinational; next_free is
// updated at the clock edge of a valid request. With 3.2 GB/s per channel at
// 1 GHz a 128-byte line needs 40 cycles of service; the latency is 70 cycles.
//
// The FCFS queue with a fixed service rate is the document's; computing it as
// a next-free time instead of an explicit queue is this design's choice.
module dram_tm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  latency,
  input  logic [7:0]  service,
  input  logic        req_valid,
  input  logic [63:0] arrival,
  input  logic        req_wb,      // a dirty line goes out before the fill
  output logic [63:0] done,
  output logic [63:0] queue_delay  // cycles waited for the channel
);
  logic [63:0] next_free, start, fill_start;

  always_comb begin
    start       = (arrival > next_free) ? arrival : next_free;
    fill_start  = start + (req_wb ? 64'(service) : 64'd0);
    done        = fill_start + 64'(latency);
    queue_delay = start - arrival;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         next_free <= '0;
    else if (req_valid) next_free <= fill_start + 64'(service);
  end
endmodule
