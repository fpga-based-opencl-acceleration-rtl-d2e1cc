// tb_pe_sweep: one kernel at each array size of the PE-per-kernel sweep
// (8, 16, 32, 64 and 128 PEs), all aligning the same typical pair: a
// 150-base read against a 500-base reference window.
//
// Every size must give the reference model's best score at a cell holding
// it, in exactly SLOT_WORDS + 2 + (strips - 1) * max(M, N_PE) + M + N_PE
// cycles. The testbench prints the cycles and the single-kernel rate at
// 200 MHz of each size; the rate grows with the array but not in
// proportion, because each pair pays one fill and drain of the array, and a
// partial last strip leaves PEs idle.
module tb_pe_sweep;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int NS = 5;
  localparam int SIZES [NS] = '{8, 16, 32, 64, 128};
  localparam int MAXS = 256, MAXR = 512, M = 150, R = 500;
  localparam int SW = MAXS / 32, RW = MAXR / 32, SLOT = 1 + SW + RW;
  localparam int AW = $clog2(SLOT);

  logic clk = 0, rst_n = 0, start = 0;
  word_t bank [SLOT];
  logic [NS-1:0] done_seen;
  int cycles [NS];
  hit_t res [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_size
    logic busy, done, rd_en;
    logic [AW-1:0] rd_addr;
    word_t rd_data;
    hit_t result, res_q;
    int cnt = 0, cyc_q = 0;
    logic seen = 1'b0;
    assign done_seen[g] = seen;
    assign cycles[g] = cyc_q;
    assign res[g] = res_q;
    always_ff @(posedge clk) if (rd_en) rd_data <= bank[rd_addr];
    sw_kernel #(.N_PE(SIZES[g]), .MAX_SAMPLE_LEN(MAXS), .MAX_REF_LEN(MAXR)) u_k (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .result(result),
      .bank_rd_en(rd_en), .bank_rd_addr(rd_addr), .bank_rd_data(rd_data));
    always @(posedge clk) begin
      if (start) cnt <= 1;
      else if (cnt > 0 && !seen) cnt <= cnt + 1;
      if (rst_n && done && !seen) begin
        seen  <= 1'b1;
        cyc_q <= cnt;
        res_q <= result;
      end
    end
  end

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

  initial begin
    seq_t q, r;
    word_t rec [];
    int h [];
    int best;
    r = rand_seq(R);
    q = mutate(r, M);
    sw_matrix(q, r, 2, 1, 1, h, best);
    pack_pair(q, r, SW, RW, M, R, rec);
    foreach (rec[k]) bank[k] = rec[k];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (&done_seen);
    @(negedge clk);
    for (int g = 0; g < NS; g++) begin
      int n, strips, expc;
      n = SIZES[g];
      strips = (R + n - 1) / n;
      expc = SLOT + 2 + (strips - 1) * ((M > n) ? M : n) + M + n;
      check(int'(res[g].score) == best, $sformatf("%0d PEs: score %0d exp %0d", n, res[g].score, best));
      check(best == 0 || h_at(h, R, int'(res[g].row) + 1, int'(res[g].col) + 1) == best,
            $sformatf("%0d PEs: location", n));
      check(cycles[g] == expc, $sformatf("%0d PEs: %0d cycles, exp %0d", n, cycles[g], expc));
      $display("%3d PEs: %5d cycles, %6.2f cells/cycle, %5.2f GCUPS per kernel at 200 MHz",
               n, cycles[g], real'(M * R) / real'(cycles[g]), real'(M * R) / real'(cycles[g]) * 0.2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
