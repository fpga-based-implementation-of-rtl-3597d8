// tb_fwft_fifo: random pushes and pops against a queue model; checks that
// the head is visible without a read, the empty/full flags and the count.
module tb_fwft_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, empty, full;
  logic [7:0] din, dout;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model [$];

  fwft_fifo #(.WIDTH(8), .DEPTH(16)) dut (.clk, .rst, .wr_en, .din, .rd_en, .dout, .empty, .full, .count);

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
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 20000; k++) begin
      // bias towards filling, then towards draining
      int wbias;
      wbias = ((k / 500) % 2) ? 30 : 70;
      wr_en = ($urandom_range(0, 99) < wbias) && (model.size() < 16);
      rd_en = ($urandom_range(0, 99) < 100 - wbias) && (model.size() > 0);
      din = 8'($urandom);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 16), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h want %h", dout, model[0]));
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
