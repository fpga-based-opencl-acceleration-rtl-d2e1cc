// gmem_model: behavioural model of the accelerator card's global memory
// (DDR3 behind its controller), for simulation only.
//
// Read requests (addr, len words) are accepted when req_ready is high; the
// words are returned in order, one per cycle, no earlier than LAT cycles
// after the request. Single-word writes are accepted when wr_ready is high.
// With STALL set, req_ready and wr_ready drop at random (about one cycle in
// three) to exercise back-pressure; the counters rd_stalls and wr_stalls
// count the cycles a valid request was held off.
module gmem_model
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned LAT   = 6,
  parameter bit          STALL = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  addr_t      req_addr,
  input  logic [7:0] req_len,
  output logic       rdata_valid,
  output word_t      rdata,
  input  logic       wr_valid,
  output logic       wr_ready,
  input  addr_t      wr_addr,
  input  word_t      wr_data
);

  word_t mem [DEPTH];
  longint unsigned cycle = 0;
  int rd_stalls = 0, wr_stalls = 0, bursts = 0, max_outstanding = 0;

  typedef struct { int unsigned addr; longint unsigned due; } pend_t;
  pend_t pend [$];

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      req_ready   <= 1'b0;
      wr_ready    <= 1'b0;
      rdata_valid <= 1'b0;
      rdata       <= '0;
    end else begin
      req_ready <= STALL ? ($urandom_range(0, 2) != 0) : 1'b1;
      wr_ready  <= STALL ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (req_valid && req_ready) begin
        bursts <= bursts + 1;
        for (int k = 0; k < int'(req_len); k++)
          pend.push_back('{addr: req_addr + k, due: cycle + LAT});
      end
      if (req_valid && !req_ready) rd_stalls <= rd_stalls + 1;
      if (pend.size() > max_outstanding) max_outstanding <= pend.size();
      if (wr_valid && wr_ready && wr_addr < DEPTH) mem[wr_addr] <= wr_data;
      if (wr_valid && !wr_ready) wr_stalls <= wr_stalls + 1;
      rdata_valid <= 1'b0;
      if (pend.size() > 0 && pend[0].due <= cycle) begin
        pend_t e;
        e = pend.pop_front();
        rdata_valid <= 1'b1;
        rdata       <= (e.addr < DEPTH) ? mem[e.addr] : '0;
      end
    end
  end

endmodule
