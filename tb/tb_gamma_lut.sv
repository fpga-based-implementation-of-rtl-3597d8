// tb_gamma_lut: checks the identity start-up contents, then random writes
// and reads against a model. Reads have one clock of latency; a read of the
// entry being written in the same clock returns the old value.
module tb_gamma_lut;
  logic clk = 0, wr_en = 0;
  logic [7:0] addr = 0, data, wr_addr = 0, wr_data = 0;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  gamma_lut dut (.clk, .addr, .data, .wr_en, .wr_addr, .wr_data);

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
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'(i);
      #1 addr = 8'(i);
      @(posedge clk);
      #1 check(data == 8'(i), "identity at start");
    end
    for (int k = 0; k < 20000; k++) begin
      logic [7:0] expect_v;
      wr_en = $urandom_range(0, 1);
      wr_addr = 8'($urandom);  wr_data = 8'($urandom);
      addr = ($urandom_range(0, 3) == 0) ? wr_addr : 8'($urandom);
      expect_v = model[addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1 check(data == expect_v, $sformatf("read %0d", addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
