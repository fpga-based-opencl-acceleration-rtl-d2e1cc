// sw_kernel: one Smith-Waterman kernel, aligning one sample/reference pair.
//
// On start the kernel reads the pair record from its RAMB bank (header,
// packed sample, packed reference; SLOT_WORDS words, one per cycle, one
// cycle of read latency) into two LUTRAM base stores. It then sweeps the
// reference in strips of N_PE columns. The outer loop runs over rows and
// the PEs form the pipelined inner loop: the sample is streamed through the
// array one row per cycle, so a full anti-diagonal is computed every cycle.
// The scores leaving the last PE go to the temporary cell array and are the
// west boundary of the next strip.
//
// Strips overlap. A new strip starts every P = max(sample_len, N_PE)
// cycles: right after the last row of the previous strip has entered PE 0
// when the sample is at least N_PE long, so PE 0 goes straight on to the
// next strip's first row while the other PEs finish the old one. Each PE
// takes its new reference base when the new strip's first row reaches it.
// P >= N_PE makes sure that the boundary score of row i has left the last
// PE by the time row i of the next strip enters PE 0; when they coincide
// (P = N_PE) the score is forwarded straight from the last PE, bypassing the
// array. The best cell of each strip comes out of the last PE with the last
// row and is folded into the result. A pair takes
//   SLOT_WORDS + 2 + (strips - 1) * P + sample_len + N_PE  cycles.
//
// Interface: start is a one-cycle pulse accepted when idle; done pulses for
// one cycle when result is valid; result holds the best score and its
// 0-based (sample, reference) position until the next start. Lengths above
// MAX_SAMPLE_LEN / MAX_REF_LEN are clamped; a zero length gives score 0.
//
// The strip sweep, the temporary cell array and the memory hierarchy follow
// the document, as does the overlap of strips (its figure of the sample
// array shows PE A starting the next column right after its last row); the
// record layout, the bypass, the handshake and the clamping are this
// design's choices.
module sw_kernel
  import sw_pkg::*;
#(
  parameter int unsigned N_PE           = 32,
  parameter int unsigned MAX_SAMPLE_LEN = 256,
  parameter int unsigned MAX_REF_LEN    = 512,
  parameter int unsigned MATCH          = 2,
  parameter int unsigned MISMATCH       = 1,
  parameter int unsigned GAP            = 1,
  localparam int unsigned S_WORDS    = MAX_SAMPLE_LEN / BASES_PER_WORD,
  localparam int unsigned R_WORDS    = MAX_REF_LEN / BASES_PER_WORD,
  localparam int unsigned SLOT_WORDS = 1 + S_WORDS + R_WORDS,
  localparam int unsigned SLOT_AW    = $clog2(SLOT_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output hit_t               result,
  output logic               bank_rd_en,
  output logic [SLOT_AW-1:0] bank_rd_addr,
  input  word_t              bank_rd_data
);

  localparam int unsigned STRIPS = MAX_REF_LEN / N_PE;
  localparam int unsigned S_AW   = $clog2(MAX_SAMPLE_LEN);
  localparam int unsigned S_RDW  = $clog2(MAX_SAMPLE_LEN + 1);
  localparam int unsigned R_RDW  = $clog2(STRIPS + 1);
  localparam int unsigned SWA_W  = (S_WORDS > 1) ? $clog2(S_WORDS) : 1;
  localparam int unsigned RWA_W  = (R_WORDS > 1) ? $clog2(R_WORDS) : 1;

  typedef enum logic [2:0] {ST_IDLE, ST_LOAD, ST_RUN, ST_DRAIN, ST_DONE} state_t;

  state_t state_q;
  logic [SLOT_AW:0]   issue_q;     // next bank word to read
  logic               rvalid_q;    // bank_rd_data holds word ridx_q
  logic [SLOT_AW-1:0] ridx_q;
  idx_t               slen_q, rlen_q;
  idx_t               t_q;         // row fed to PE 0 this cycle
  idx_t               strip_q;     // strip being fed into PE 0
  idx_t               period_q;    // cycles between strip starts
  idx_t               drained_q;   // strips that have left the last PE
  hit_t               best_q;

  // ---- bank read sequencing -------------------------------------------
  assign bank_rd_en   = (state_q == ST_LOAD) && (32'(issue_q) < SLOT_WORDS);
  assign bank_rd_addr = issue_q[SLOT_AW-1:0];

  // ---- LUTRAM stores ----------------------------------------------------
  logic  s_wr_en, r_wr_en;
  logic [SWA_W-1:0] s_wr_addr;
  logic [RWA_W-1:0] r_wr_addr;
  base_t [0:0]      s_rd;
  base_t [N_PE-1:0] r_rd;

  always_comb begin
    int unsigned w;
    w = int'(ridx_q);
    s_wr_en   = rvalid_q && (w >= 1) && (w <= S_WORDS);
    r_wr_en   = rvalid_q && (w > S_WORDS);
    s_wr_addr = s_wr_en ? SWA_W'(w - 1) : '0;
    r_wr_addr = r_wr_en ? RWA_W'(w - 1 - S_WORDS) : '0;
  end

  seq_lutram #(.DEPTH(MAX_SAMPLE_LEN), .RD_LANES(1)) u_sample (
    .clk(clk), .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_data(bank_rd_data),
    .rd_addr(S_RDW'(t_q)), .rd_data(s_rd)
  );

  seq_lutram #(.DEPTH(MAX_REF_LEN), .RD_LANES(N_PE)) u_ref (
    .clk(clk), .wr_en(r_wr_en), .wr_addr(r_wr_addr), .wr_data(bank_rd_data),
    .rd_addr(R_RDW'(strip_q)), .rd_data(r_rd)
  );

  // ---- PE array and boundary column ------------------------------------
  pe_link_t west, east;
  score_t   tc_rd;
  logic     feed;

  assign feed = (state_q == ST_RUN) && (t_q < slen_q);

  always_comb begin
    west       = '0;
    west.valid = feed;
    west.first = (t_q == '0);
    west.last  = (t_q == slen_q - 1'b1);
    west.q     = s_rd[0];
    west.row   = t_q;
    if (strip_q == '0)                      west.h = '0;
    else if (east.valid && east.row == t_q) west.h = east.h;   // bypass
    else                                    west.h = tc_rd;
  end

  temp_cell_array #(.DEPTH(MAX_SAMPLE_LEN)) u_tc (
    .clk(clk),
    .wr_en(east.valid), .wr_addr(S_AW'(east.row)), .wr_data(east.h),
    .rd_addr(S_AW'(t_q)), .rd_data(tc_rd)
  );

  sw_systolic_array #(.N_PE(N_PE), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) u_array (
    .clk(clk), .rst_n(rst_n),
    .ref_bases(r_rd),
    .col_base(idx_t'(strip_q * N_PE)),
    .ref_len(rlen_q),
    .west(west), .east(east)
  );

  // ---- control ----------------------------------------------------------
  logic strip_end, last_strip, last_drained, period_end;
  assign strip_end    = (state_q == ST_RUN || state_q == ST_DRAIN) && east.valid && east.last;
  assign last_strip   = (32'(strip_q) + 1) * N_PE >= 32'(rlen_q);
  assign last_drained = (32'(drained_q) + 1) * N_PE >= 32'(rlen_q);
  assign period_end   = (t_q == period_q - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_IDLE;
      issue_q  <= '0;
      rvalid_q <= 1'b0;
      ridx_q   <= '0;
      slen_q   <= '0;
      rlen_q   <= '0;
      t_q      <= '0;
      strip_q  <= '0;
      period_q <= '0;
      drained_q <= '0;
      best_q   <= '0;
    end else begin
      rvalid_q <= bank_rd_en;
      ridx_q   <= bank_rd_addr;
      unique case (state_q)
        ST_IDLE: if (start) begin
          state_q <= ST_LOAD;
          issue_q <= '0;
        end
        ST_LOAD: begin
          if (bank_rd_en) issue_q <= issue_q + 1'b1;
          if (rvalid_q && ridx_q == '0) begin
            pair_hdr_t hdr;
            hdr    = pair_hdr_t'(bank_rd_data);
            slen_q <= (hdr.sample_len > idx_t'(MAX_SAMPLE_LEN)) ? idx_t'(MAX_SAMPLE_LEN) : hdr.sample_len;
            rlen_q <= (hdr.ref_len > idx_t'(MAX_REF_LEN)) ? idx_t'(MAX_REF_LEN) : hdr.ref_len;
          end
          if (rvalid_q && int'(ridx_q) == SLOT_WORDS - 1) begin
            state_q <= (slen_q == '0 || rlen_q == '0) ? ST_DONE : ST_RUN;
            t_q       <= '0;
            strip_q   <= '0;
            drained_q <= '0;
            best_q    <= '0;
            period_q  <= (slen_q > idx_t'(N_PE)) ? slen_q : idx_t'(N_PE);
          end
        end
        ST_RUN, ST_DRAIN: begin
          if (state_q == ST_RUN) begin
            if (period_end) begin
              t_q <= '0;
              if (last_strip) state_q <= ST_DRAIN;
              else            strip_q <= strip_q + 1'b1;
            end else begin
              t_q <= t_q + 1'b1;
            end
          end
          if (strip_end) begin
            best_q    <= better(best_q, east.best);
            drained_q <= drained_q + 1'b1;
            if (last_drained) state_q <= ST_DONE;
          end
        end
        ST_DONE: state_q <= ST_IDLE;
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy   = (state_q != ST_IDLE);
  assign done   = (state_q == ST_DONE);
  assign result = best_q;

  // The next strip's row i must not enter PE 0 before the previous strip's
  // row i has left the last PE.
  a_boundary_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (feed && strip_q != '0 && east.valid && t_q < idx_t'(N_PE)) |-> (east.row >= t_q));

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state_q == ST_IDLE);

endmodule
