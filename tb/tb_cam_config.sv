// tb_cam_config: after reset the block must write its register table to the
// slave model (device 0x48) and raise done without err. A second run started
// with acknowledges disabled must end with err set. Also checks that no
// transaction overlaps another and the bus stays legal.
module tb_cam_config;
  localparam int DIV = 4;
  logic clk = 0, rst = 1, start = 0, done, err, scl, sda_low, sda, ack_en = 1;
  int checks = 0, failures = 0;

  cam_config #(.DIV(DIV)) dut (.clk, .rst, .start, .done, .err, .scl, .sda_low, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h48)) slave (.scl, .master_low(sda_low), .ack_enable(ack_en), .sda);

  always #5 clk = !clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int s0, p0;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    s0 = slave.starts;  p0 = slave.stops;
    wait (done);
    @(posedge clk);
    check(!err, "no error");
    check(slave.writes == 4, $sformatf("writes %0d", slave.writes));
    check(slave.regs.exists(8'h07) && slave.regs[8'h07] == 16'h0388, "reg 0x07");
    check(slave.regs.exists(8'h0B) && slave.regs[8'h0B] == 16'h01E0, "reg 0x0B");
    check(slave.regs.exists(8'h35) && slave.regs[8'h35] == 16'h0010, "reg 0x35");
    check(slave.regs.exists(8'hAF) && slave.regs[8'hAF] == 16'h0000, "reg 0xAF");
    check(slave.starts - s0 == 4 && slave.stops - p0 == 4, "four transactions");
    repeat (20) @(posedge clk);
    check(done, "done holds");
    #1 ack_en = 0;  start = 1;
    @(posedge clk);
    #1 start = 0;
    @(posedge clk);
    check(!done, "done cleared on restart");
    wait (done);
    @(posedge clk);
    check(err, "error on missing acknowledge");
    check(slave.writes == 4, "nothing recorded without acknowledge");
    check(slave.errors == 0, "bus protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
