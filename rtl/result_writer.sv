// result_writer: sends the best cell of every pair back to global memory.
//
// On start it writes num_pairs result words, pair p at word dst_base + p,
// one word per accepted write (wr_valid held with wr_addr/wr_data until
// wr_ready). Each word holds the score in bits [15:0], the sample position
// in [31:16] and the reference position in [47:32]; bits [63:48] are zero.
// done pulses with the last accepted write. Returning score and location per
// pair follows the document; the word layout and write channel are this
// design's choices.
module result_writer
  import sw_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 16,
  localparam int unsigned NP_W = $clog2(NUM_KERNELS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  addr_t           dst_base,
  input  logic [NP_W-1:0] num_pairs,
  input  hit_t            results [NUM_KERNELS],
  output logic            busy,
  output logic            done,
  output logic            wr_valid,
  input  logic            wr_ready,
  output addr_t           wr_addr,
  output word_t           wr_data
);

  logic            busy_q;
  logic [NP_W-1:0] idx_q, n_q;
  result_word_t    rw;

  always_comb begin
    rw       = '0;
    rw.score = results[idx_q[$clog2(NUM_KERNELS)-1:0]].score;
    rw.row   = results[idx_q[$clog2(NUM_KERNELS)-1:0]].row;
    rw.col   = results[idx_q[$clog2(NUM_KERNELS)-1:0]].col;
  end

  assign wr_valid = busy_q;
  assign wr_addr  = dst_base + addr_t'(idx_q);
  assign wr_data  = word_t'(rw);
  assign done     = busy_q && wr_ready && (idx_q == n_q - 1'b1);
  assign busy     = busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      idx_q  <= '0;
      n_q    <= '0;
    end else if (!busy_q) begin
      if (start && num_pairs != '0) begin
        busy_q <= 1'b1;
        idx_q  <= '0;
        n_q    <= (num_pairs > NP_W'(NUM_KERNELS)) ? NP_W'(NUM_KERNELS) : num_pairs;
      end
    end else if (wr_ready) begin
      if (idx_q == n_q - 1'b1) busy_q <= 1'b0;
      idx_q <= idx_q + 1'b1;
    end
  end

  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_addr) && $stable(wr_data)));

endmodule
