// Behavioural host memory for the testbenches (stands in for the DDR2
// controller and SODIMM). Word array of 2**AW words, addresses wrap. Line
// reads return 32 bytes LAT cycles after acceptance, in order; word writes
// apply at acceptance. With BUSY_PCT > 0 the ready signal is dropped at
// random in that share of cycles.
module dram_model
  import rg_pkg::*;
#(
  parameter int AW       = 16,
  parameter int LAT      = 20,
  parameter int BUSY_PCT = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  input  mem_req_t  req,
  output logic      req_ready,
  output logic      resp_valid,
  output mem_resp_t resp
);
  logic [31:0] mem [2**AW];
  typedef struct { mem_resp_t r; longint due; } pend_t;
  pend_t q[$];
  longint cyc;
  int reads, writes;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    reads = 0; writes = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b1; resp_valid <= 1'b0; cyc <= 0; q.delete();
    end else begin
      cyc <= cyc + 1;
      req_ready <= (BUSY_PCT == 0) || (($urandom % 100) >= BUSY_PCT);
      if (req_valid && req_ready) begin
        if (req.write) begin
          logic [31:0] w;
          w = mem[req.addr[AW+1:2]];
          for (int b = 0; b < 4; b++) if (req.wmask[3-b]) w[31-8*b -: 8] = req.wdata[31-8*b -: 8];
          mem[req.addr[AW+1:2]] <= w;
          writes++;
        end else begin
          pend_t p;
          p.r.tag = req.tag;
          for (int k = 0; k < 8; k++)
            p.r.data[255-32*k -: 32] = mem[AW'((req.addr[AW+1:2] & ~AW'(7)) + AW'(k))];
          p.due = cyc + LAT;
          q.push_back(p);
          reads++;
        end
      end
      resp_valid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cyc) begin
        resp_valid <= 1'b1;
        resp       <= q[0].r;
        void'(q.pop_front());
      end
    end
  end
endmodule
