// temp_cell_array: the boundary column between two strips of the PE array.
//
// When the reference is longer than the PE array, it is swept in strips of
// N_PE columns. While one strip runs, the scores leaving the last PE,
// H(i, last column of the strip), are written here at row i; during the
// next strip they are read back at row i as the west boundary of the first
// PE. One 16-bit score per row, DEPTH rows, as the document sizes it
// (sizeof(short) * ROW bits).
//
// Write is synchronous, read asynchronous (distributed RAM). Within a strip
// row i is read when it enters PE 0 and written N_PE cycles later, so one
// array serves both strips in place. The memory type and port timing are
// this design's choice.
module temp_cell_array
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  score_t                   wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output score_t                   rd_data
);

  score_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
