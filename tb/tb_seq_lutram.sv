// tb_seq_lutram: checks the packed-word write and the one-lane and
// many-lane asynchronous reads of the base store against a shadow copy.
module tb_seq_lutram;
  import sw_pkg::*;

  localparam int DEPTH = 128, LANES = 8;
  localparam int WORDS = DEPTH / BASES_PER_WORD;

  logic clk = 0;
  logic wr_en = 0;
  logic [$clog2(WORDS)-1:0] wr_addr = '0;
  word_t wr_data = '0;
  logic [$clog2(DEPTH+1)-1:0] rd1_addr;
  logic [$clog2(DEPTH/LANES+1)-1:0] rdn_addr;
  base_t [0:0] rd1_data;
  base_t [LANES-1:0] rdn_data;
  logic [1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_lutram #(.DEPTH(DEPTH), .RD_LANES(1)) u_one (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_addr(rd1_addr), .rd_data(rd1_data));
  seq_lutram #(.DEPTH(DEPTH), .RD_LANES(LANES)) u_many (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_addr(rdn_addr), .rd_data(rdn_data));

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
    for (int pass = 0; pass < 3; pass++) begin
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = ($clog2(WORDS))'(w);
        wr_data = {$urandom, $urandom};
        for (int k = 0; k < BASES_PER_WORD; k++) shadow[w * BASES_PER_WORD + k] = wr_data[2*k +: 2];
      end
      @(negedge clk);
      wr_en = 0;
      for (int i = 0; i < DEPTH; i++) begin
        rd1_addr = ($clog2(DEPTH+1))'(i);
        #1;
        check(rd1_data[0] == shadow[i], $sformatf("one-lane read %0d", i));
      end
      for (int g = 0; g < DEPTH / LANES; g++) begin
        rdn_addr = ($clog2(DEPTH/LANES+1))'(g);
        #1;
        for (int k = 0; k < LANES; k++)
          check(rdn_data[k] == shadow[g * LANES + k], $sformatf("lane read %0d.%0d", g, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
