// sw_systolic_array: linear array of N_PE Smith-Waterman processing elements.
//
// PE k holds reference base ref_bases[k], which is column col_base + k of
// the score matrix. Sample rows enter PE 0 one per cycle on the west link,
// together with the west boundary score H(i, col_base-1); each PE passes the
// row on to the next one cycle later. PE k therefore works on row t-k at
// cycle t, so the array computes one anti-diagonal of N_PE cells per cycle
// (the wavefront of the document's figure). The east link of the last PE
// gives H(i, col_base+N_PE-1) for every row, N_PE cycles after the row
// entered, and on the last row the best cell of the strip.
//
// Each PE takes ref_bases[k], its column and the ref_len comparison when
// the first row of a strip reaches it, so the inputs of the next strip may
// be applied as soon as that strip's first row enters PE 0, while the old
// strip is still draining out of the later PEs.
//
// Columns at or beyond ref_len are computed but not counted as hits. The
// linear array of PEs A->B->C->D follows the document; the link format is
// this design's.
module sw_systolic_array
  import sw_pkg::*;
#(
  parameter int unsigned N_PE     = 32,
  parameter int unsigned MATCH    = 2,
  parameter int unsigned MISMATCH = 1,
  parameter int unsigned GAP      = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  base_t [N_PE-1:0]     ref_bases,
  input  idx_t                 col_base,
  input  idx_t                 ref_len,
  input  pe_link_t             west,
  output pe_link_t             east
);

  pe_link_t link [N_PE+1];

  assign link[0] = west;

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    idx_t col;
    assign col = col_base + idx_t'(k);
    sw_pe #(.MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .ref_base (ref_bases[k]),
      .col      (col),
      .col_valid(col < ref_len),
      .west     (link[k]),
      .east     (link[k+1])
    );
  end

  assign east = link[N_PE];

endmodule
