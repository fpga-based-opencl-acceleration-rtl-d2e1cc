// tb_gmem_burst_reader: loads batches of 1..8 records of 25 words from the
// global-memory model (random request stalls, read latency) and checks
// that every word lands in the right bank at the right address, that each
// bank gets exactly its 25 words, that bursts are at most BURST_LEN words,
// that several bursts were outstanding at once and that done pulses once,
// with the last word.
module tb_gmem_burst_reader;
  import sw_pkg::*;

  localparam int NK = 8, SLOT = 25, BL = 16;
  localparam int NP_W = $clog2(NK + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  addr_t src_base;
  logic [NP_W-1:0] num_pairs;
  logic req_valid, req_ready, rdata_valid;
  addr_t req_addr;
  logic [7:0] req_len;
  word_t rdata;
  logic [NK-1:0] bank_we;
  logic [$clog2(SLOT)-1:0] bank_waddr;
  word_t bank_wdata;
  logic wr_valid = 0, wr_ready;
  addr_t wr_addr = '0;
  word_t wr_data = '0;
  word_t got [NK][SLOT];
  int cnt [NK];
  int checks = 0, failures = 0, done_pulses = 0;

  always #5 clk = ~clk;

  gmem_burst_reader #(.NUM_KERNELS(NK), .SLOT_WORDS(SLOT), .BURST_LEN(BL)) dut (.*);
  gmem_model #(.DEPTH(1024), .LAT(6), .STALL(1'b1)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_ready(req_ready), .req_addr(req_addr), .req_len(req_len),
    .rdata_valid(rdata_valid), .rdata(rdata),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) check(req_len >= 1 && int'(req_len) <= BL, "burst length");
    for (int p = 0; p < NK; p++) if (bank_we[p]) begin
      got[p][bank_waddr] <= bank_wdata;
      cnt[p] <= cnt[p] + 1;
    end
    if (done) done_pulses <= done_pulses + 1;
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = {32'(i), $urandom};
    src_base = '0; num_pairs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      int np;
      np = (b == 0) ? NK : $urandom_range(1, NK);
      foreach (cnt[p]) cnt[p] = 0;
      done_pulses = 0;
      @(negedge clk);
      src_base = addr_t'($urandom_range(0, 1024 - NK * SLOT));
      num_pairs = NP_W'(np);
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      repeat (10) @(negedge clk);
      check(done_pulses == 1, $sformatf("done pulses %0d", done_pulses));
      for (int p = 0; p < NK; p++) begin
        check(cnt[p] == ((p < np) ? SLOT : 0), $sformatf("bank %0d word count %0d", p, cnt[p]));
        if (p < np) for (int w = 0; w < SLOT; w++)
          check(got[p][w] == u_mem.mem[int'(src_base) + p * SLOT + w], $sformatf("bank %0d word %0d", p, w));
      end
    end
    check(u_mem.rd_stalls > 0, "request back-pressure happened");
    check(u_mem.max_outstanding > BL, "several bursts outstanding");
    $display("bursts %0d, stalled request cycles %0d, max outstanding words %0d",
             u_mem.bursts, u_mem.rd_stalls, u_mem.max_outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
