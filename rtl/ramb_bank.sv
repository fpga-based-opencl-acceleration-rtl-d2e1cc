// ramb_bank: block-RAM buffer between global memory and one kernel.
//
// Simple dual-port memory of DEPTH words: one synchronous write port, fed
// by the burst reader, and one synchronous read port with one cycle of
// latency (rd_data is valid the cycle after rd_en), read by the kernel.
// Staging the pairs in RAMB before they go to the kernels' LUTRAM follows
// the document; one bank per kernel is this design's choice, so the kernels
// never compete for a read port.
module ramb_bank
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = 25
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  word_t                    wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output word_t                    rd_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
