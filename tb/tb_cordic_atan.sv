// tb_cordic_atan: random and special vectors through the CORDIC arctangent,
// compared with $atan2 (error bound 2^-21 rad, about 4.8e-7), the y = 0,
// x < 0 case (-pi) and the 35-clock latency with back-to-back inputs.
module tb_cordic_atan;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, nd = 0, rdy;
  logic signed [15:0] x, y;
  logic signed [31:0] phase;
  int checks = 0, failures = 0, cycle = 0;
  int qx [$], qy [$], qt [$];

  cordic_atan dut (.clk, .rst, .nd, .x, .y, .rdy, .phase);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

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

  always @(posedge clk) begin
    if (!rst && rdy) begin
      int xx, yy, t;
      real exp_a, got;
      xx = qx.pop_front();  yy = qy.pop_front();  t = qt.pop_front();
      check(cycle - t == 35, $sformatf("latency %0d", cycle - t));
      got = q29_to_real(phase, 1);
      if (yy == 0 && xx < 0) exp_a = -PI;
      else exp_a = $atan2(real'(yy), real'(xx));
      check(rabs(got - exp_a) < 4.8e-7, $sformatf("atan2(%0d,%0d) = %.9f, want %.9f", yy, xx, got, exp_a));
    end
  end

  task automatic send(input int xx, input int yy);
    x = 16'(xx);  y = 16'(yy);  nd = 1;
    qx.push_back(xx);  qy.push_back(yy);  qt.push_back(cycle + 1);
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(-15374, 463);  send(-211, 116);  send(2, 5);
    send(-100, 0);  send(100, 0);  send(0, 100);  send(0, -100);
    send(-32768, -32768);  send(32767, -32768);  send(-1, 1);  send(1, -1);
    for (int k = 0; k < 4000; k++) begin
      int a, b;
      a = int'($urandom_range(0, 65535)) - 32768;
      b = int'($urandom_range(0, 65535)) - 32768;
      if (k % 3 == 0) begin a = a / 256; b = b / 256; end
      if (a == 0 && b == 0) a = 1;
      send(a, b);
    end
    repeat (40) @(posedge clk);
    check(qx.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
