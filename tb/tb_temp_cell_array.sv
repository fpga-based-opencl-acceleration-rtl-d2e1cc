// tb_temp_cell_array: writes random scores at random rows, reading other
// rows in the same cycles, and checks every read against a shadow copy,
// including a row read in the cycle it is rewritten (old value until the
// clock edge).
module tb_temp_cell_array;
  import sw_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, wr_en = 0;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0, rd_addr = '0;
  score_t wr_data = '0, rd_data;
  score_t shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  temp_cell_array #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = 16'($urandom); shadow[i] = wr_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = 6'($urandom);
      wr_data = 16'($urandom);
      rd_addr = (n % 5 == 0) ? wr_addr : 6'($urandom);
      #1;
      check(rd_data == shadow[rd_addr], $sformatf("read row %0d", rd_addr));
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
