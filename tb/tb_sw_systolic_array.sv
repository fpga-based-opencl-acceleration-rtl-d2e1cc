// tb_sw_systolic_array: checks one strip of the linear PE array.
//
// An 8-PE array is loaded with 8 reference bases; a random sample is
// streamed in one row per cycle with a west boundary of zero (first strip).
// For every row the score leaving the last PE must equal H(i, 8) of the
// reference model, it must appear exactly N_PE cycles after the row
// entered, and with the last row the best cell must carry the maximum of
// the strip at a position whose score is that maximum. A run with ref_len
// below N_PE checks that columns past the reference end are not counted.
module tb_sw_systolic_array;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int N = 8;
  localparam int MATCH = 2, MISMATCH = 1, GAP = 1;

  logic clk = 0, rst_n = 0;
  base_t [N-1:0] ref_bases;
  idx_t col_base, ref_len;
  pe_link_t west, east;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sw_systolic_array #(.N_PE(N), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    west = '0; ref_bases = '0; col_base = '0; ref_len = 16'(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      seq_t q, r;
      int h [];
      int best, m, rl, seen;
      longint unsigned t_in [];
      m  = $urandom_range(1, 40);
      rl = (run % 3 == 2) ? $urandom_range(1, N - 1) : N;
      r  = rand_seq(rl);
      q  = (run % 2) ? mutate(r, m) : rand_seq(m);
      sw_matrix(q, r, MATCH, MISMATCH, GAP, h, best);
      t_in = new[m];
      @(negedge clk);
      for (int k = 0; k < N; k++) ref_bases[k] = base_t'((k < rl) ? r[k] : 0);
      ref_len = 16'(rl);
      seen = 0;
      fork
        begin
          for (int i = 0; i < m; i++) begin
            west.valid = 1'b1; west.first = (i == 0); west.last = (i == m - 1);
            west.q = base_t'(q[i]); west.row = 16'(i); west.h = '0; west.best = '0;
            t_in[i] = cyc;
            @(negedge clk);
          end
          west.valid = 1'b0;
        end
        begin
          while (seen < m) begin
            @(posedge clk); #1;
            if (east.valid) begin
              int i;
              i = int'(east.row);
              check(i == seen, "rows in order");
              if (rl == N)
                check(int'(east.h) == h_at(h, rl, i + 1, N),
                      $sformatf("run %0d row %0d h got %0d exp %0d", run, i, east.h, h_at(h, rl, i + 1, N)));
              check(cyc - t_in[i] == longint'(N), $sformatf("latency %0d", cyc - t_in[i]));
              if (east.last) begin
                check(int'(east.best.score) == best,
                      $sformatf("run %0d best got %0d exp %0d", run, east.best.score, best));
                if (best > 0)
                  check(int'(east.best.col) < rl &&
                        h_at(h, rl, int'(east.best.row) + 1, int'(east.best.col) + 1) == best,
                        "best location");
              end
              seen++;
            end
          end
        end
      join
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
