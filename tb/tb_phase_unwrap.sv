// tb_phase_unwrap: builds phase pairs from a known absolute phase theta:
// ph_h = FH*theta wrapped to (-pi, pi], ph_u = theta plus noise, wrapped,
// and checks that the unwrapped output equals theta (to 4 LSB on the circle)
// even with noise on the unit phase below pi/FH. Also compares with the
// reference method on arbitrary pairs and checks the 4-clock latency.
module tb_phase_unwrap;
  import sli_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, nd = 0, rdy;
  logic signed [31:0] ph_u, ph_h;
  logic [31:0] phase;
  int checks = 0, failures = 0, cycle = 0;
  real qexp [$];
  int  qt [$];
  bit  qskip [$];

  phase_unwrap #(.FH(16)) dut (.clk, .rst, .nd, .ph_u, .ph_h, .rdy, .phase);

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

  function automatic logic signed [31:0] to_q(input real a);
    real w;
    w = wrap_2pi(a);
    if (w > PI) w -= 2.0 * PI;
    return 32'($rtoi(w * Q29 + (w < 0 ? -0.5 : 0.5)));
  endfunction

  always @(posedge clk) begin
    if (!rst && rdy) begin
      real e, g;
      int t;
      bit sk;
      e = qexp.pop_front();  t = qt.pop_front();  sk = qskip.pop_front();
      g = q29_to_real(phase, 0);
      check(cycle - t == 4, $sformatf("latency %0d", cycle - t));
      check(g >= 0.0 && g < 2.0 * PI, $sformatf("range %f", g));
      if (!sk) check(ang_dist(g, e) < 8.0 / Q29, $sformatf("unwrap %.9f want %.9f", g, e));
    end
  end

  task automatic send(input real u, input real h, input real e, input bit skip);
    ph_u = to_q(u);  ph_h = to_q(h);  nd = 1;
    qexp.push_back(e);  qt.push_back(cycle + 1);  qskip.push_back(skip);
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // known absolute phase, noisy unit phase
    for (int k = 0; k < 3000; k++) begin
      real th, noise;
      th = 2.0 * PI * $urandom_range(0, 1000000) / 1000001.0;
      noise = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * (PI / 16.0) * 0.9;
      send(th + noise, 16.0 * th, wrap_2pi(th), 1'b0);
    end
    // arbitrary pairs against the reference method
    for (int k = 0; k < 3000; k++) begin
      real u, h, e;
      bit uns;
      u = 2.0 * PI * $urandom_range(0, 1000000) / 1000001.0 - PI;
      h = 2.0 * PI * $urandom_range(0, 1000000) / 1000001.0 - PI;
      e = ref_unwrap(real'(to_q(u)) / Q29, real'(to_q(h)) / Q29, 16, uns);
      send(u, h, e, uns);
    end
    repeat (10) @(posedge clk);
    check(qexp.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
