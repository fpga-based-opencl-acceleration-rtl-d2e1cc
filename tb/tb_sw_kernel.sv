// tb_sw_kernel: aligns whole pairs with one kernel and checks the results.
//
// The kernel (8 PEs, samples up to 64 bases, references up to 128) reads
// its record from a RAMB-like array in the testbench with one cycle of read
// latency. The pairs are the worked example of an alignment
// (ACTAGCAC against ATCAGCAC), random related pairs, pairs whose reference
// is longer than the array (several strips, a partial last strip), pairs
// at the maximum lengths, lengths above the maximum (clamped) and a zero
// length. For each pair the score must equal the reference model's
// maximum, the reported cell must hold that maximum, and the kernel must
// take exactly SLOT_WORDS + 2 + (strips - 1) * max(sample_len, N_PE)
// + sample_len + N_PE cycles from start to done (strips overlap). Short and
// long samples are both used, so both strip periods and the boundary bypass
// (sample_len <= N_PE) are exercised.
module tb_sw_kernel;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int N = 8, MAXS = 64, MAXR = 128;
  localparam int MATCH = 2, MISMATCH = 1, GAP = 1;
  localparam int SW = MAXS / 32, RW = MAXR / 32, SLOT = 1 + SW + RW;
  localparam int AW = $clog2(SLOT);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  hit_t result;
  logic bank_rd_en;
  logic [AW-1:0] bank_rd_addr;
  word_t bank_rd_data;
  word_t bank [SLOT];
  int checks = 0, failures = 0;
  int multi_strip = 0, partial_strip = 0, short_overlap = 0, long_overlap = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (bank_rd_en) bank_rd_data <= bank[bank_rd_addr];

  sw_kernel #(.N_PE(N), .MAX_SAMPLE_LEN(MAXS), .MAX_REF_LEN(MAXR),
              .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_pair(input seq_t q, input seq_t r, input int hs, input int hr,
                          input int exp_fixed);
    word_t rec [];
    int h [];
    int best, m, rl, strips, cycles, exp_cycles;
    seq_t qc, rc;
    m  = (hs > MAXS) ? MAXS : hs;
    rl = (hr > MAXR) ? MAXR : hr;
    qc = new[m];
    rc = new[rl];
    foreach (qc[k]) qc[k] = q[k];
    foreach (rc[k]) rc[k] = r[k];
    sw_matrix(qc, rc, MATCH, MISMATCH, GAP, h, best);
    if (exp_fixed >= 0) check(best == exp_fixed, $sformatf("model gives %0d for the worked example", best));
    pack_pair(q, r, SW, RW, hs, hr, rec);
    foreach (rec[k]) bank[k] = rec[k];
    strips = (rl + N - 1) / N;
    if (strips > 1) multi_strip++;
    if (rl % N != 0) partial_strip++;
    exp_cycles = (m == 0 || rl == 0) ? SLOT + 2 : SLOT + 2 + (strips - 1) * ((m > N) ? m : N) + m + N;
    if (strips > 1 && m <= N) short_overlap++;
    if (strips > 1 && m > N) long_overlap++;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(int'(result.score) == best,
          $sformatf("m=%0d r=%0d score got %0d exp %0d", m, rl, result.score, best));
    if (best > 0)
      check(int'(result.row) < m && int'(result.col) < rl &&
            h_at(h, rl, int'(result.row) + 1, int'(result.col) + 1) == best,
            $sformatf("location (%0d,%0d)", result.row, result.col));
    check(cycles == exp_cycles, $sformatf("m=%0d r=%0d cycles %0d exp %0d", m, rl, cycles, exp_cycles));
    @(negedge clk);
    check(!busy && int'(result.score) == best, "result held after done");
  endtask

  initial begin
    seq_t q, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Worked example: reference ACTAGCAC, sample ATCAGCAC
    // (A=0 C=1 G=2 T=3); the alignment ACT-AGCAC / A-TCAGCAC scores 7*2-2 = 12.
    r = new[8]; q = new[8];
    r = '{0, 1, 3, 0, 2, 1, 0, 1};
    q = '{0, 3, 1, 0, 2, 1, 0, 1};
    run_pair(q, r, 8, 8, 12);
    check(result.row == 16'd7 && result.col == 16'd7, "worked example ends at (7,7)");
    for (int n = 0; n < 40; n++) begin
      int m, rl;
      m  = $urandom_range(1, MAXS);
      rl = $urandom_range(1, MAXR);
      r = rand_seq(rl);
      q = (n % 4 == 3) ? rand_seq(m) : mutate(r, m);
      run_pair(q, r, m, rl, -1);
    end
    r = rand_seq(MAXR); q = mutate(r, MAXS);
    run_pair(q, r, MAXS, MAXR, -1);
    r = rand_seq(MAXR); q = mutate(r, MAXS);
    run_pair(q, r, MAXS + 5, MAXR + 9, -1);   // header lengths above the maximum
    r = rand_seq(N); q = mutate(r, 3);
    run_pair(q, r, 3, N, -1);                  // exactly one full strip
    r = rand_seq(10); q = new[0];
    run_pair(q, r, 0, 10, -1);                 // empty sample
    for (int n = 0; n < 10; n++) begin
      int m;
      m = $urandom_range(1, N);
      r = rand_seq($urandom_range(N + 1, MAXR)); q = mutate(r, m);
      run_pair(q, r, m, r.size(), -1);         // short samples: strip period N_PE, bypass
    end
    check(multi_strip > 0 && partial_strip > 0, "multi-strip and partial-strip pairs ran");
    check(short_overlap > 0 && long_overlap > 0, "both strip periods ran");
    $display("multi-strip pairs %0d, partial-strip pairs %0d", multi_strip, partial_strip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
