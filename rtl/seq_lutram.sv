// seq_lutram: distributed-RAM store of one 2-bit-coded base string.
//
// The string is written one packed word (BASES_PER_WORD bases, base k in
// bits [2k+1:2k]) per cycle at word address wr_addr. The read side is
// asynchronous, as a LUTRAM read is: it returns RD_LANES consecutive bases
// starting at base RD_LANES*rd_addr. The sample string uses one lane (one
// base per row), the reference string uses N_PE lanes (the bases of one
// strip of the PE array). DEPTH is in bases and must be a multiple of both
// BASES_PER_WORD and RD_LANES.
//
// Keeping the sample and reference strings of each kernel in LUTRAM, at
// 2 bits per base, follows the document; the port shapes are this design's.
module seq_lutram
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned RD_LANES = 1,
  localparam int unsigned WA_W = (DEPTH / BASES_PER_WORD > 1) ? $clog2(DEPTH / BASES_PER_WORD) : 1
) (
  input  logic                                    clk,
  input  logic                                    wr_en,
  input  logic [WA_W-1:0]                         wr_addr,
  input  word_t                                   wr_data,
  input  logic [$clog2(DEPTH/RD_LANES+1)-1:0]     rd_addr,
  output base_t [RD_LANES-1:0]                    rd_data
);

  localparam int unsigned WORDS  = DEPTH / BASES_PER_WORD;
  localparam int unsigned GROUPS = DEPTH / RD_LANES;

  base_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < BASES_PER_WORD; k++)
        mem[int'(wr_addr) * BASES_PER_WORD + k] <= base_t'(wr_data[k*BASE_W +: BASE_W]);
    end
  end

  always_comb begin
    for (int k = 0; k < RD_LANES; k++)
      rd_data[k] = (int'(rd_addr) < GROUPS) ? mem[int'(rd_addr) * RD_LANES + k] : BASE_A;
  end

  initial begin
    assert (DEPTH % BASES_PER_WORD == 0 && DEPTH % RD_LANES == 0 && WORDS > 0)
      else $error("seq_lutram: DEPTH must be a multiple of BASES_PER_WORD and RD_LANES");
  end

endmodule
