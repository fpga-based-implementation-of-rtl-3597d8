// tb_mag_threshold: random and extreme X(1) values; the magnitude estimate
// max(|a|,|b|) + min(|a|,|b|)/2 and the keep decision are computed here
// independently and compared, together with the 2-clock latency. The
// estimate is also checked to stay within -12% / +12% of the true magnitude.
module tb_mag_threshold;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, nd = 0, dv, keep;
  logic signed [15:0] xr, xi;
  logic [16:0] threshold;
  logic [17:0] mag;
  int checks = 0, failures = 0, cycle = 0;
  int qm [$], qk [$], qt [$];
  real qtrue [$];

  mag_threshold dut (.clk, .rst, .nd, .xr, .xi, .threshold, .dv, .keep, .mag);

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
    if (!rst && dv) begin
      int m, k, t;
      real tr;
      m = qm.pop_front();  k = qk.pop_front();  t = qt.pop_front();  tr = qtrue.pop_front();
      check(cycle - t == 2, "latency");
      check(int'(mag) == m, $sformatf("mag %0d want %0d", mag, m));
      check(int'(keep) == k, $sformatf("keep %0d want %0d (mag %0d)", keep, k, m));
      if (tr > 0.0) check(real'(m) / tr > 0.88 && real'(m) / tr < 1.12, "estimate accuracy");
    end
  end

  task automatic send(input int a, input int b, input int thr);
    int aa, bb, m;
    xr = 16'(a);  xi = 16'(b);  threshold = 17'(thr);  nd = 1;
    aa = a < 0 ? -a : a;  bb = b < 0 ? -b : b;
    m = (aa > bb) ? aa + bb / 2 : bb + aa / 2;
    qm.push_back(m);  qk.push_back(m >= thr);  qt.push_back(cycle + 1);
    qtrue.push_back($sqrt(real'(a) * a + real'(b) * b));
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(-32768, -32768, 1000);  send(32767, -32768, 65535);  send(0, 0, 0);  send(0, 0, 1);
    send(100, 50, 125);  send(100, 50, 126);  send(-100, -51, 125);
    for (int k = 0; k < 5000; k++) begin
      int a, b;
      a = int'($urandom_range(0, 65535)) - 32768;
      b = int'($urandom_range(0, 65535)) - 32768;
      send(a, b, int'($urandom_range(0, 50000)));
    end
    repeat (5) @(posedge clk);
    check(qm.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
