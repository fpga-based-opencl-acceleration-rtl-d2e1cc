// tb_result_writer: writes batches of 1..8 results into the global-memory
// model under random write back-pressure and checks every result word
// (score, row, column, zero upper bits) at dst_base + pair, that nothing
// is written past the batch and that done pulses once.
module tb_result_writer;
  import sw_pkg::*;

  localparam int NK = 8;
  localparam int NP_W = $clog2(NK + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  addr_t dst_base;
  logic [NP_W-1:0] num_pairs;
  hit_t results [NK];
  logic wr_valid, wr_ready;
  addr_t wr_addr;
  word_t wr_data;
  logic req_valid = 0, req_ready, rdata_valid;
  addr_t req_addr = '0;
  logic [7:0] req_len = '0;
  word_t rdata;
  int checks = 0, failures = 0, done_pulses = 0;

  always #5 clk = ~clk;

  result_writer #(.NUM_KERNELS(NK)) dut (.*);
  gmem_model #(.DEPTH(256), .LAT(2), .STALL(1'b1)) u_mem (
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

  always @(posedge clk) if (rst_n && done) done_pulses <= done_pulses + 1;

  initial begin
    dst_base = '0; num_pairs = '0;
    foreach (results[p]) results[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 10; b++) begin
      int np;
      np = (b == 0) ? NK : $urandom_range(1, NK);
      for (int i = 0; i < 256; i++) u_mem.mem[i] = '1;
      foreach (results[p]) results[p] = '{score: 16'($urandom), row: 16'($urandom), col: 16'($urandom)};
      done_pulses = 0;
      @(negedge clk);
      dst_base = addr_t'($urandom_range(0, 200));
      num_pairs = NP_W'(np);
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check(done_pulses == 1, "one done pulse");
      for (int p = 0; p < np; p++)
        check(u_mem.mem[int'(dst_base) + p] ==
              {16'd0, results[p].col, results[p].row, results[p].score},
              $sformatf("result word %0d", p));
      check(u_mem.mem[int'(dst_base) + np] == '1, "nothing written past the batch");
    end
    check(u_mem.wr_stalls > 0, "write back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
