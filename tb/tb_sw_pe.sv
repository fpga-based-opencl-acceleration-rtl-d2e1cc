// tb_sw_pe: checks one processing element against the cell recurrence.
//
// A single PE is given a reference base and fed rows of random sample
// bases and random west scores, with some idle cycles in between. The
// testbench keeps its own north and northwest scores and checks every
// output cell, the one-cycle latency, the forwarding of the row fields and
// the best-cell output (column best against a random best from the west).
// The reference base, column and column-valid inputs are changed at random
// after the first row of each run: the PE must keep the values it took at
// the first row.
module tb_sw_pe;
  import sw_pkg::*;

  localparam int MATCH = 2, MISMATCH = 1, GAP = 1;

  logic clk = 0, rst_n = 0;
  base_t ref_base;
  idx_t col;
  logic col_valid;
  pe_link_t west, east;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sw_pe #(.MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int north, diag, colbest;
    west = '0; ref_base = BASE_A; col = 16'd7; col_valid = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      int rows;
      base_t rb;
      bit cv;
      idx_t cl;
      rows = $urandom_range(1, 30);
      rb = base_t'($urandom_range(0, 3));
      cv = (run % 7) != 6;
      cl = idx_t'($urandom_range(0, 500));
      north = 0; diag = 0; colbest = 0;
      for (int i = 0; i < rows; i++) begin
        int w, s, exp_h, exp_best, wbest;
        w = $urandom_range(0, 40);
        wbest = $urandom_range(0, 60);
        @(negedge clk);
        west.valid = 1'b1;
        west.first = (i == 0);
        west.last  = (i == rows - 1);
        west.q     = base_t'($urandom_range(0, 3));
        west.row   = idx_t'(i);
        west.h     = score_t'(w);
        west.best  = '{score: score_t'(wbest), row: 16'd0, col: 16'd0};
        if (i == 0) begin
          ref_base = rb; col_valid = cv; col = cl;
        end else begin
          ref_base = base_t'($urandom_range(0, 3)); col_valid = $urandom_range(0, 1); col = idx_t'($urandom);
        end
        s = (west.q == rb) ? MATCH : -MISMATCH;
        exp_h = 0;
        if (diag + s > exp_h) exp_h = diag + s;
        if (north - GAP > exp_h) exp_h = north - GAP;
        if (w - GAP > exp_h) exp_h = w - GAP;
        if (cv && exp_h > colbest) colbest = exp_h;
        exp_best = (colbest > wbest) ? colbest : wbest;
        @(posedge clk);
        #1;
        check(east.valid, "valid");
        check(int'(east.h) == exp_h, $sformatf("h row %0d: got %0d exp %0d", i, east.h, exp_h));
        check(east.row == idx_t'(i) && east.q == west.q && east.first == (i == 0)
              && east.last == (i == rows - 1), "forwarded fields");
        check(int'(east.best.score) == exp_best, $sformatf("best got %0d exp %0d", east.best.score, exp_best));
        if (colbest > wbest)
          check(east.best.col == cl, "best column");
        north = exp_h;
        diag  = w;
        // Sometimes leave an idle cycle; the PE must hold its state.
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk);
          west.valid = 1'b0;
          @(posedge clk); #1;
          check(!east.valid, "idle cycle");
        end
      end
      @(negedge clk);
      west.valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
