// tb_i2c_write_master: random register writes to a slave model, some to the
// wrong device address or with acknowledges turned off (both must raise
// nack). Checks the written register and value, the done pulse, busy, the
// SCL period (4 x DIV clocks) and the transaction length: one quarter-bit
// tick is DIV clocks and a write takes 4 (start) + 36 x 4 (bits) + 4 (stop)
// = 152 ticks, and done is registered one clock later.
module tb_i2c_write_master;
  localparam int DIV = 5;
  logic clk = 0, rst = 1, start = 0, busy, done, nack, scl, sda_low, sda, ack_en = 1;
  logic [6:0] dev_addr = 7'h48;
  logic [7:0] reg_addr = 0;
  logic [15:0] data = 0;
  int checks = 0, failures = 0;

  i2c_write_master #(.DIV(DIV)) dut (.clk, .rst, .start, .dev_addr, .reg_addr, .data,
    .busy, .done, .nack, .scl, .sda_low, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h48)) slave (.scl, .master_low(sda_low), .ack_enable(ack_en), .sda);

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // SCL high-to-high period must be 4 x DIV clocks inside a transaction
  int clk_no = 0, last_rise = -1;
  always @(posedge clk) clk_no++;
  always @(posedge scl) begin
    if (busy && last_rise >= 0 && clk_no - last_rise < 8 * DIV)
      check(clk_no - last_rise == 4 * DIV, $sformatf("scl period %0d", clk_no - last_rise));
    last_rise = clk_no;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int c0, w0, kind;
      kind = $urandom_range(0, 9);           // 0: wrong address, 1: no ack
      #1;
      dev_addr = (kind == 0) ? 7'h5A : 7'h48;
      ack_en = (kind != 1);
      reg_addr = 8'($urandom);  data = 16'($urandom);
      w0 = slave.writes;
      last_rise = -1;
      start = 1;
      @(posedge clk);
      c0 = clk_no;
      #1 start = 0;
      check(busy, "busy");
      while (!done) @(posedge clk);
      check(clk_no - c0 == 152 * DIV + 1, $sformatf("length %0d clocks", clk_no - c0));
      #1;
      check(!busy, "idle after done");
      check(nack == (kind <= 1), $sformatf("nack=%0d kind=%0d", nack, kind));
      if (kind <= 1) check(slave.writes == w0, "unacknowledged write not recorded");
      else begin
        check(slave.writes == w0 + 1, "one write recorded");
        check(slave.last_reg == reg_addr && slave.last_val == data, "register and value");
      end
      check(scl && !sda_low, "bus released");
      repeat ($urandom_range(1, 30)) @(posedge clk);
    end
    check(slave.errors == 0, $sformatf("protocol errors %0d", slave.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
