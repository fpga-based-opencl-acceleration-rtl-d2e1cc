// tb_sw_compute_unit_full: the accelerator at its default size (16 kernels
// of 32 PEs, samples up to 256 bases, references up to 512), end to end.
//
// Batch 1 holds 16 pairs of the typical sizes of short-read realignment
// (reads of 50-150 bases against references of 250-500 bases); batch 2
// holds 16 pairs at the maximum lengths. Every result must match the
// reference model. The test also reports the cell updates per cycle of the
// compute phase and of the whole batch, and the equivalent GCUPS at a
// 200 MHz clock.
module tb_sw_compute_unit_full;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int NK = 16, N = 32, MAXS = 256, MAXR = 512;
  localparam int MATCH = 2, MISMATCH = 1, GAP = 1;
  localparam int SW = MAXS / 32, RW = MAXR / 32, SLOT = 1 + SW + RW;
  localparam int NP_W = $clog2(NK + 1);
  localparam addr_t SRC = 32'd0, DST = 32'd1024;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  addr_t src_base = SRC, dst_base = DST;
  logic [NP_W-1:0] num_pairs = '0;
  logic rd_req_valid, rd_req_ready, rd_data_valid;
  addr_t rd_req_addr;
  logic [7:0] rd_req_len;
  word_t rd_data;
  logic wr_valid, wr_ready;
  addr_t wr_addr;
  word_t wr_data;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0, t_kstart = 0, t_wbstart = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.k_start)  t_kstart  <= cyc;
    if (dut.wb_start) t_wbstart <= cyc;
  end

  sw_compute_unit dut (.*);

  gmem_model #(.DEPTH(2048), .LAT(8), .STALL(1'b1)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr), .req_len(rd_req_len),
    .rdata_valid(rd_data_valid), .rdata(rd_data),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_batch(input int smin, input int smax, input int rmin, input int rmax);
    int best [NK];
    int hm [NK][];
    int ls [NK], lr [NK];
    longint unsigned cells, t0, t1;
    cells = 0;
    for (int p = 0; p < NK; p++) begin
      seq_t q, r;
      word_t rec [];
      ls[p] = $urandom_range(smin, smax);
      lr[p] = $urandom_range(rmin, rmax);
      r = rand_seq(lr[p]);
      q = mutate(r, ls[p]);
      sw_matrix(q, r, MATCH, MISMATCH, GAP, hm[p], best[p]);
      pack_pair(q, r, SW, RW, ls[p], lr[p], rec);
      foreach (rec[k]) u_mem.mem[int'(SRC) + p * SLOT + k] = rec[k];
      cells += longint'(ls[p]) * lr[p];
    end
    @(negedge clk);
    num_pairs = NP_W'(NK);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);   // the last write is accepted at the clock edge after done rises
    for (int p = 0; p < NK; p++) begin
      result_word_t rw;
      rw = result_word_t'(u_mem.mem[int'(DST) + p]);
      check(int'(rw.score) == best[p], $sformatf("pair %0d score %0d exp %0d", p, rw.score, best[p]));
      check(best[p] == 0 || (int'(rw.row) < ls[p] && int'(rw.col) < lr[p] &&
            h_at(hm[p], lr[p], int'(rw.row) + 1, int'(rw.col) + 1) == best[p]),
            $sformatf("pair %0d location", p));
    end
    $display("batch: %0d cells, %0d cycles total, %0d compute; %0.1f cells/cycle compute, %0.1f overall; %0.1f GCUPS overall at 200 MHz",
             cells, t1 - t0, t_wbstart - t_kstart,
             real'(cells) / real'(t_wbstart - t_kstart), real'(cells) / real'(t1 - t0),
             real'(cells) / real'(t1 - t0) * 0.2);
    check(t_wbstart > t_kstart, "compute phase seen");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run_batch(50, 150, 250, 500);
    run_batch(MAXS, MAXS, MAXR, MAXR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
