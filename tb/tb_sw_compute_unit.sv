// tb_sw_compute_unit: end-to-end test of the accelerator at reduced size
// (4 kernels of 4 PEs, samples up to 32 bases, references up to 64, bursts
// of 8 words), against the global-memory model with random stalls.
//
// Each batch packs random related pairs into global memory, starts the unit
// and waits for done; every result word must hold the reference model's best
// score at a cell that has that score. The compute phase must last exactly
// as long as the slowest kernel: SLOT_WORDS + 2 + (strips - 1) *
// max(len, N_PE) + len + N_PE cycles. The test counts how often each mechanism happened and fails
// if one never did: references longer than the array (several strips),
// overlapped strips with long samples and with short ones (boundary bypass),
// a partial last strip, more than one burst per batch, read and write
// back-pressure, a batch with idle kernels, a full batch, an empty batch,
// and a header length above the maximum (clamped).
module tb_sw_compute_unit;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int NK = 4, N = 4, MAXS = 32, MAXR = 64, BL = 8;
  localparam int MATCH = 2, MISMATCH = 1, GAP = 1;
  localparam int SW = MAXS / 32, RW = MAXR / 32, SLOT = 1 + SW + RW;
  localparam int NP_W = $clog2(NK + 1);
  localparam addr_t SRC = 32'd16, DST = 32'd512;

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
  int n_bypass = 0, n_overlap = 0, n_multi = 0, n_partial = 0, n_idle = 0, n_full = 0, n_empty = 0, n_clamp = 0, n_multiburst = 0;
  longint unsigned cyc = 0, t_kstart = 0, t_wbstart = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.k_start)  t_kstart  <= cyc;
    if (dut.wb_start) t_wbstart <= cyc;
  end

  sw_compute_unit #(.NUM_KERNELS(NK), .N_PE(N), .MAX_SAMPLE_LEN(MAXS), .MAX_REF_LEN(MAXR),
                    .BURST_LEN(BL), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) dut (.*);

  gmem_model #(.DEPTH(1024), .LAT(6), .STALL(1'b1)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr), .req_len(rd_req_len),
    .rdata_valid(rd_data_valid), .rdata(rd_data),
    .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_batch(input int np, input bit clamp_one);
    int best [NK];
    int hm [NK][];
    int lens_s [NK], lens_r [NK];
    int exp_compute, bursts0;
    exp_compute = 0;
    for (int p = 0; p < np; p++) begin
      seq_t q, r;
      word_t rec [];
      int m, rl, hs, hr, strips, kc;
      rl = $urandom_range(1, MAXR);
      m  = $urandom_range(1, MAXS);
      if (p == 1) m = $urandom_range(1, N);   // short sample: strip period N_PE, bypass
      hs = m; hr = rl;
      if (clamp_one && p == 0) begin m = MAXS; rl = MAXR; hs = MAXS + 3; hr = MAXR + 1; n_clamp++; end
      r = rand_seq(rl);
      q = ($urandom_range(0, 3) == 0) ? rand_seq(m) : mutate(r, m);
      sw_matrix(q, r, MATCH, MISMATCH, GAP, hm[p], best[p]);
      pack_pair(q, r, SW, RW, hs, hr, rec);
      foreach (rec[k]) u_mem.mem[int'(SRC) + p * SLOT + k] = rec[k];
      lens_s[p] = m; lens_r[p] = rl;
      strips = (rl + N - 1) / N;
      if (strips > 1) n_multi++;
      if (strips > 1 && m <= N) n_bypass++;
      if (strips > 1 && m > N) n_overlap++;
      if (rl % N != 0) n_partial++;
      kc = SLOT + 2 + (strips - 1) * ((m > N) ? m : N) + m + N;
      if (kc > exp_compute) exp_compute = kc;
    end
    for (int p = 0; p < NK; p++) u_mem.mem[int'(DST) + p] = '1;
    if (np > 0 && np < NK) n_idle++;
    if (np == NK) n_full++;
    if (np == 0) n_empty++;
    bursts0 = u_mem.bursts;
    @(negedge clk);
    num_pairs = NP_W'(np);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
    if (u_mem.bursts - bursts0 > 1) n_multiburst++;
    if (np > 0)
      check(int'(t_wbstart - t_kstart) == exp_compute,
            $sformatf("compute phase %0d cycles, slowest kernel %0d", t_wbstart - t_kstart, exp_compute));
    for (int p = 0; p < np; p++) begin
      result_word_t rw;
      rw = result_word_t'(u_mem.mem[int'(DST) + p]);
      check(int'(rw.score) == best[p], $sformatf("pair %0d score %0d exp %0d", p, rw.score, best[p]));
      if (best[p] > 0)
        check(int'(rw.row) < lens_s[p] && int'(rw.col) < lens_r[p] &&
              h_at(hm[p], lens_r[p], int'(rw.row) + 1, int'(rw.col) + 1) == best[p],
              $sformatf("pair %0d location", p));
      check(rw.reserved == '0, "reserved bits zero");
    end
    for (int p = np; p < NK; p++)
      check(u_mem.mem[int'(DST) + p] == '1, "no result for an unused kernel");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run_batch(NK, 1'b0);
    run_batch(0, 1'b0);
    run_batch(2, 1'b1);
    for (int b = 0; b < 12; b++) run_batch($urandom_range(1, NK), b == 5);
    $display("multi-strip %0d, partial strip %0d, idle-kernel batches %0d, full batches %0d, empty %0d, clamped %0d, multi-burst %0d, read stalls %0d, write stalls %0d",
             n_multi, n_partial, n_idle, n_full, n_empty, n_clamp, n_multiburst, u_mem.rd_stalls, u_mem.wr_stalls);
    $display("overlapped strips, long samples %0d, short samples with bypass %0d", n_overlap, n_bypass);
    check(n_multi > 0, "several strips happened");
    check(n_overlap > 0, "overlapped strips happened");
    check(n_bypass > 0, "boundary bypass happened");
    check(n_partial > 0, "partial strip happened");
    check(n_idle > 0, "batch with idle kernels happened");
    check(n_full > 0, "full batch happened");
    check(n_empty > 0, "empty batch happened");
    check(n_clamp > 0, "length clamp happened");
    check(n_multiburst > 0, "multi-burst load happened");
    check(u_mem.rd_stalls > 0, "read back-pressure happened");
    check(u_mem.wr_stalls > 0, "write back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
