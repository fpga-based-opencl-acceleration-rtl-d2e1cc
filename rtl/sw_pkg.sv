// sw_pkg: types and constants shared by the Smith-Waterman accelerator.
//
// Bases are coded in two bits, as the LUTRAM sample array of the design
// stores them (2 bits per row). Cell scores are 16-bit unsigned values, the
// width of the temporary cell array (one short per row). Because a local
// alignment score is never negative, an unsigned score is enough.
//
// The global-memory word is 64 bits wide and holds 32 packed bases, with base
// k in bits [2k+1:2k]. A pair record is one header word followed by the packed
// sample words and then the packed reference words; see the README for the
// full layout. The base coding, the word width and the record layout are
// choices of this design.
package sw_pkg;

  localparam int unsigned BASE_W  = 2;
  localparam int unsigned SCORE_W = 16;
  localparam int unsigned IDX_W   = 16;
  localparam int unsigned WORD_W  = 64;
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned BASES_PER_WORD = WORD_W / BASE_W;

  typedef enum logic [BASE_W-1:0] {
    BASE_A = 2'd0,
    BASE_C = 2'd1,
    BASE_G = 2'd2,
    BASE_T = 2'd3
  } base_t;

  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [IDX_W-1:0]   idx_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  // A scored cell: its value and its (row, column) position, both 0-based
  // indices into the sample and the reference.
  typedef struct packed {
    score_t score;
    idx_t   row;
    idx_t   col;
  } hit_t;

  // What one PE passes to the next each cycle: one sample row on its way
  // along the array, the score of the cell just computed in that row, and
  // the best cell seen so far in this strip up to that row and column.
  typedef struct packed {
    logic   valid;
    logic   first;   // row 0 of the sample
    logic   last;    // last row of the sample
    base_t  q;       // sample base of this row
    idx_t   row;
    score_t h;       // H(row, column of the sending PE)
    hit_t   best;
  } pe_link_t;

  // Header word of a pair record.
  typedef struct packed {
    logic [WORD_W-2*IDX_W-1:0] reserved;
    idx_t ref_len;
    idx_t sample_len;
  } pair_hdr_t;

  // Result word written back per pair.
  typedef struct packed {
    logic [WORD_W-SCORE_W-2*IDX_W-1:0] reserved;
    idx_t   col;
    idx_t   row;
    score_t score;
  } result_word_t;

  // Strictly better: a tie keeps the cell already held.
  function automatic hit_t better(hit_t a, hit_t b);
    return (b.score > a.score) ? b : a;
  endfunction

endpackage
