// sw_pe: one processing element of the linear systolic Smith-Waterman array.
//
// The PE owns one reference base (one column j of the score matrix). Each
// cycle in which its west input is valid it computes one cell:
//   H(i,j) = max( H(i-1,j-1) + s(q_i, r_j),  H(i-1,j) - GAP,
//                 H(i,j-1) - GAP,  0 )
// with s = +MATCH on equal bases and -MISMATCH otherwise.
// West H(i,j-1) arrives on the link from the previous PE in the same cycle;
// north H(i-1,j) is this PE's own previous result, and northwest H(i-1,j-1)
// is the previous west input, both kept in flip-flops. On the first row the
// north and northwest scores are the zero boundary.
//
// The PE takes its reference base, column index and column-valid flag from
// its inputs in the cycle the first row of a strip reaches it, and keeps
// them for the rest of that strip. Successive strips can therefore follow
// each other without a gap: each PE switches to the new strip's column
// exactly when the new strip's first row arrives, while PEs further down
// still finish the old strip.
//
// The PE also keeps the best cell of its column so far and forwards
// max(best arriving from the west, own column best), so that the last PE,
// on the last row, carries the best cell of the whole strip. Cells of a
// column beyond the end of the reference (col_valid low) are not counted.
//
// Timing: one cell per cycle, one cycle from west link to east link. All
// outputs are registers. The recurrence with a linear gap penalty follows
// the document; the penalty values, the link format and the best-cell
// forwarding are this design's choices.
module sw_pe
  import sw_pkg::*;
#(
  parameter int unsigned MATCH    = 2,
  parameter int unsigned MISMATCH = 1,
  parameter int unsigned GAP      = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  base_t    ref_base,
  input  idx_t     col,
  input  logic     col_valid,
  input  pe_link_t west,
  output pe_link_t east
);

  localparam int unsigned CW = SCORE_W + 2;  // signed working width
  typedef logic signed [CW-1:0] wide_t;

  score_t diag_q;      // previous west score: H(i-1, j-1)
  base_t  ref_q;       // column of the current strip, taken at its first row
  idx_t   col_q;
  logic   colv_q;
  base_t  rb;
  idx_t   cl;
  logic   cv;
  hit_t   colbest_q;   // best cell of this column so far in the strip
  pe_link_t east_q;

  score_t h_new;
  hit_t   colbest_new;
  hit_t   cand;

  always_comb begin
    wide_t nw, n, w, s, m;
    rb = west.first ? ref_base  : ref_q;
    cl = west.first ? col       : col_q;
    cv = west.first ? col_valid : colv_q;
    nw = west.first ? '0 : wide_t'(diag_q);
    n  = west.first ? '0 : wide_t'(east_q.h);
    w  = wide_t'(west.h);
    s  = (west.q == rb) ? wide_t'(MATCH) : -wide_t'(MISMATCH);
    m  = '0;
    if (nw + s > m)              m = nw + s;
    if (n - wide_t'(GAP) > m)    m = n - wide_t'(GAP);
    if (w - wide_t'(GAP) > m)    m = w - wide_t'(GAP);
    h_new = score_t'(m);

    cand = '{score: cv ? h_new : '0, row: west.row, col: cl};
    colbest_new = west.first ? cand : better(colbest_q, cand);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      east_q    <= '0;
      diag_q    <= '0;
      colbest_q <= '0;
      ref_q     <= BASE_A;
      col_q     <= '0;
      colv_q    <= 1'b0;
    end else begin
      east_q.valid <= west.valid;
      if (west.valid) begin
        east_q.first <= west.first;
        east_q.last  <= west.last;
        east_q.q     <= west.q;
        east_q.row   <= west.row;
        east_q.h     <= h_new;
        east_q.best  <= better(west.best, colbest_new);
        diag_q       <= west.h;
        colbest_q    <= colbest_new;
        ref_q        <= rb;
        col_q        <= cl;
        colv_q       <= cv;
      end
    end
  end

  assign east = east_q;

  // Each row enters a PE at most once per cycle and rows arrive in order.
  a_row_order: assert property (@(posedge clk) disable iff (!rst_n)
    (west.valid && east_q.valid && !west.first) |-> (west.row == east_q.row + 1'b1));

endmodule
