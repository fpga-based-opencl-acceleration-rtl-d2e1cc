// tb_ramb_bank: random writes and reads of a 25-word bank; every read must
// return, one cycle after rd_en, the word last written at that address, and
// rd_data must hold while rd_en is low.
module tb_ramb_bank;
  import sw_pkg::*;

  localparam int DEPTH = 25;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0, rd_addr = '0;
  word_t wr_data = '0, rd_data;
  word_t shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ramb_bank #(.DEPTH(DEPTH)) dut (.*);

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
    word_t expd, held;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(i); wr_data = {$urandom, $urandom}; shadow[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = 5'($urandom_range(0, DEPTH - 1));
      wr_data = {$urandom, $urandom};
      rd_en = $urandom_range(0, 1);
      rd_addr = 5'($urandom_range(0, DEPTH - 1));
      expd = shadow[rd_addr];
      held = rd_data;
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      #1;
      if (rd_en) check(rd_data == expd, $sformatf("read %0d", rd_addr));
      else       check(rd_data == held, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
