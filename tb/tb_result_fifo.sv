// tb_result_fifo: random 128-bit writes (eight 16-bit words: two lanes of
// phase and magnitude floats) and 16-bit reads against a model; checks the
// word order (lowest word first), the word level and the free-entry count.
module tb_result_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [127:0] wr_data;
  logic [15:0] rd_data;
  logic [4:0] wr_free;
  logic [7:0] rd_level;
  logic [15:0] model [$];
  int checks = 0, failures = 0, entries = 0;

  result_fifo #(.DEPTH(16)) dut (.clk, .rst, .wr_en, .wr_data, .wr_free, .rd_en, .rd_data, .rd_level);

  always #5 clk = !clk;

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

  initial begin
    logic [15:0] expect_q [$];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 20000; k++) begin
      int bias;
      bias = ((k / 300) % 2) ? 15 : 40;
      wr_en = ($urandom_range(0, 99) < bias) && (wr_free != 0);
      rd_en = ($urandom_range(0, 99) < 70) && (rd_level != 0);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(int'(rd_level) == model.size(), $sformatf("level %0d want %0d", rd_level, model.size()));
      check(int'(wr_free) == 16 - (model.size() + 7) / 8, "free entries");
      @(posedge clk);
      if (rd_en) expect_q.push_back(model.pop_front());
      if (wr_en) for (int q = 0; q < 8; q++) model.push_back(wr_data[16*q +: 16]);
      #1;
      if (rd_en) check(rd_data == expect_q.pop_front(), "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
