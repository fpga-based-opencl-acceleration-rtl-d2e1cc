// sw_compute_unit: the Smith-Waterman accelerator, one OpenCL compute unit
// with NUM_KERNELS kernels of N_PE processing elements each.
//
// A batch runs in three phases:
//   1. LOAD    the burst reader copies num_pairs pair records from global
//              memory (word src_base on) into one RAMB bank per kernel;
//   2. COMPUTE kernels 0..num_pairs-1 start together, each aligning its own
//              pair, and the unit waits until every started kernel is done;
//   3. WRITE   the result writer stores one result word per pair at
//              dst_base + pair.
// done pulses at the end of WRITE; busy is high from start to done.
// num_pairs above NUM_KERNELS is clamped; num_pairs = 0 ends at once.
//
// Memory: global memory (DDR3) -> RAMB banks -> per-kernel LUTRAM strings
// -> PE flip-flops, the hierarchy the document describes. The sequential
// phases follow the document's order of steps; the global-memory channels
// are simple valid/ready signals chosen by this design, to be bridged to
// the platform's memory controller.
module sw_compute_unit
  import sw_pkg::*;
#(
  parameter int unsigned NUM_KERNELS    = 16,
  parameter int unsigned N_PE           = 32,
  parameter int unsigned MAX_SAMPLE_LEN = 256,
  parameter int unsigned MAX_REF_LEN    = 512,
  parameter int unsigned BURST_LEN      = 16,
  parameter int unsigned MATCH          = 2,
  parameter int unsigned MISMATCH       = 1,
  parameter int unsigned GAP            = 1,
  localparam int unsigned NP_W = $clog2(NUM_KERNELS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  addr_t           src_base,
  input  addr_t           dst_base,
  input  logic [NP_W-1:0] num_pairs,
  output logic            busy,
  output logic            done,
  // global memory read
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output addr_t           rd_req_addr,
  output logic [7:0]      rd_req_len,
  input  logic            rd_data_valid,
  input  word_t           rd_data,
  // global memory write
  output logic            wr_valid,
  input  logic            wr_ready,
  output addr_t           wr_addr,
  output word_t           wr_data
);

  localparam int unsigned SLOT_WORDS = 1 + (MAX_SAMPLE_LEN + MAX_REF_LEN) / BASES_PER_WORD;
  localparam int unsigned SLOT_AW    = $clog2(SLOT_WORDS);

  typedef enum logic [1:0] {CU_IDLE, CU_LOAD, CU_COMPUTE, CU_WRITE} cu_state_t;
  cu_state_t state_q;

  logic [NP_W-1:0]        np_q;
  logic [NUM_KERNELS-1:0] active_q, finished_q;
  logic                   ld_start, ld_done, ld_busy;
  logic                   wb_start, wb_done, wb_busy;
  logic                   k_start;

  logic [NUM_KERNELS-1:0] bank_we;
  logic [SLOT_AW-1:0]     bank_waddr;
  word_t                  bank_wdata;

  logic [NUM_KERNELS-1:0] k_busy, k_done;
  hit_t                   k_result [NUM_KERNELS];

  // ---- phase 1: burst load ----------------------------------------------
  assign ld_start = (state_q == CU_IDLE) && start && (num_pairs != '0);

  gmem_burst_reader #(
    .NUM_KERNELS(NUM_KERNELS), .SLOT_WORDS(SLOT_WORDS), .BURST_LEN(BURST_LEN)
  ) u_reader (
    .clk(clk), .rst_n(rst_n),
    .start(ld_start), .src_base(src_base),
    .num_pairs((num_pairs > NP_W'(NUM_KERNELS)) ? NP_W'(NUM_KERNELS) : num_pairs),
    .busy(ld_busy), .done(ld_done),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready),
    .req_addr(rd_req_addr), .req_len(rd_req_len),
    .rdata_valid(rd_data_valid), .rdata(rd_data),
    .bank_we(bank_we), .bank_waddr(bank_waddr), .bank_wdata(bank_wdata)
  );

  // ---- phase 2: kernels, each with its own RAMB bank ---------------------
  assign k_start = (state_q == CU_LOAD) && ld_done;

  for (genvar p = 0; p < NUM_KERNELS; p++) begin : g_kernel
    logic               rd_en;
    logic [SLOT_AW-1:0] rd_addr;
    word_t              rd_word;

    ramb_bank #(.DEPTH(SLOT_WORDS)) u_bank (
      .clk(clk),
      .wr_en(bank_we[p]), .wr_addr(bank_waddr), .wr_data(bank_wdata),
      .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_word)
    );

    sw_kernel #(
      .N_PE(N_PE), .MAX_SAMPLE_LEN(MAX_SAMPLE_LEN), .MAX_REF_LEN(MAX_REF_LEN),
      .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)
    ) u_kernel (
      .clk(clk), .rst_n(rst_n),
      .start(k_start && (NP_W'(p) < np_q)),
      .busy(k_busy[p]), .done(k_done[p]), .result(k_result[p]),
      .bank_rd_en(rd_en), .bank_rd_addr(rd_addr), .bank_rd_data(rd_word)
    );
  end

  // ---- phase 3: write back ----------------------------------------------
  assign wb_start = (state_q == CU_COMPUTE) && ((finished_q | k_done) == active_q);

  result_writer #(.NUM_KERNELS(NUM_KERNELS)) u_writer (
    .clk(clk), .rst_n(rst_n),
    .start(wb_start), .dst_base(dst_base), .num_pairs(np_q),
    .results(k_result),
    .busy(wb_busy), .done(wb_done),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  // ---- sequencing --------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= CU_IDLE;
      np_q       <= '0;
      active_q   <= '0;
      finished_q <= '0;
    end else begin
      unique case (state_q)
        CU_IDLE: if (ld_start) begin
          state_q <= CU_LOAD;
          np_q    <= (num_pairs > NP_W'(NUM_KERNELS)) ? NP_W'(NUM_KERNELS) : num_pairs;
        end
        CU_LOAD: if (ld_done) begin
          state_q    <= CU_COMPUTE;
          finished_q <= '0;
          for (int p = 0; p < NUM_KERNELS; p++) active_q[p] <= (NP_W'(p) < np_q);
        end
        CU_COMPUTE: begin
          finished_q <= finished_q | k_done;
          if (wb_start) state_q <= CU_WRITE;
        end
        CU_WRITE: if (wb_done) state_q <= CU_IDLE;
        default: state_q <= CU_IDLE;
      endcase
    end
  end

  // A start with num_pairs = 0 is answered with done in the next cycle.
  logic empty_done_q;
  always_ff @(posedge clk) begin
    if (!rst_n) empty_done_q <= 1'b0;
    else        empty_done_q <= (state_q == CU_IDLE) && start && (num_pairs == '0);
  end

  assign busy = (state_q != CU_IDLE);
  assign done = ((state_q == CU_WRITE) && wb_done) || empty_done_q;

  a_kernels_idle_on_load: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == CU_LOAD) |-> (k_busy == '0));
  a_phases_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ld_busy && wb_busy));

endmodule
