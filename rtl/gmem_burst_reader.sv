// gmem_burst_reader: copies the batch of pair records from global memory
// into the kernels' RAMB banks.
//
// The records lie back to back in global memory from word src_base on, one
// record of SLOT_WORDS words per pair. The reader issues read requests of up
// to BURST_LEN words (req_len is the word count) until num_pairs*SLOT_WORDS
// words are requested; it may have several bursts outstanding. Read data
// returns in request order, one word per rdata_valid, and is always
// accepted. Word w of the batch is written to bank w / SLOT_WORDS at
// address w % SLOT_WORDS in the cycle it arrives (counters, no divider).
// done pulses in the cycle the last word is written.
//
// The request channel holds req_valid and req_addr/req_len until req_ready.
// A burst read of all pairs into RAMB follows the document; burst length,
// channel signalling and record layout are this design's choices.
module gmem_burst_reader
  import sw_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 16,
  parameter int unsigned SLOT_WORDS  = 25,
  parameter int unsigned BURST_LEN   = 16,
  localparam int unsigned NP_W    = $clog2(NUM_KERNELS + 1),
  localparam int unsigned SLOT_AW = $clog2(SLOT_WORDS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  addr_t                  src_base,
  input  logic [NP_W-1:0]        num_pairs,
  output logic                   busy,
  output logic                   done,
  // global memory read request channel
  output logic                   req_valid,
  input  logic                   req_ready,
  output addr_t                  req_addr,
  output logic [7:0]             req_len,
  // global memory read data channel
  input  logic                   rdata_valid,
  input  word_t                  rdata,
  // RAMB bank write side
  output logic [NUM_KERNELS-1:0] bank_we,
  output logic [SLOT_AW-1:0]     bank_waddr,
  output word_t                  bank_wdata
);

  localparam int unsigned TOT_W = $clog2(NUM_KERNELS * SLOT_WORDS + 1);
  localparam int unsigned PI_W  = $clog2(NUM_KERNELS);

  logic [TOT_W-1:0] total_q, req_off_q, rcv_q;
  logic [PI_W-1:0]  pair_q;
  logic [SLOT_AW-1:0] off_q;
  logic busy_q;

  logic [TOT_W-1:0] remain;
  assign remain    = total_q - req_off_q;
  assign req_valid = busy_q && (req_off_q < total_q);
  assign req_addr  = src_base + addr_t'(req_off_q);
  assign req_len   = (remain > TOT_W'(BURST_LEN)) ? 8'(BURST_LEN) : 8'(remain);

  logic take;
  assign take = busy_q && rdata_valid;

  always_comb begin
    bank_we = '0;
    if (take) bank_we[pair_q] = 1'b1;
  end
  assign bank_waddr = off_q;
  assign bank_wdata = rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      total_q   <= '0;
      req_off_q <= '0;
      rcv_q     <= '0;
      pair_q    <= '0;
      off_q     <= '0;
    end else if (!busy_q) begin
      if (start && num_pairs != '0) begin
        busy_q    <= 1'b1;
        total_q   <= TOT_W'(num_pairs) * TOT_W'(SLOT_WORDS);
        req_off_q <= '0;
        rcv_q     <= '0;
        pair_q    <= '0;
        off_q     <= '0;
      end
    end else begin
      if (req_valid && req_ready) req_off_q <= req_off_q + TOT_W'(req_len);
      if (take) begin
        rcv_q <= rcv_q + 1'b1;
        if (int'(off_q) == SLOT_WORDS - 1) begin
          off_q  <= '0;
          pair_q <= pair_q + 1'b1;
        end else begin
          off_q <= off_q + 1'b1;
        end
        if (rcv_q == total_q - 1'b1) busy_q <= 1'b0;
      end
    end
  end

  assign busy = busy_q;
  assign done = take && (rcv_q == total_q - 1'b1);

  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && !req_ready) |=> (req_valid && $stable(req_addr) && $stable(req_len)));
  a_no_extra_data: assert property (@(posedge clk) disable iff (!rst_n)
    rdata_valid |-> busy_q);

endmodule
