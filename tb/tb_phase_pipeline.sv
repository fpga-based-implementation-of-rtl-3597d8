// tb_phase_pipeline: one lane from eight pixel samples to the float phase.
// Part 1 feeds dual-frequency samples x[n] = 128 + 60 cos(th + 2 pi n/8)
// + 60 cos(16 th + 4 pi n/8) for known th and expects th back (within
// 2e-3 rad, the effect of 8-bit pixels). Part 2 feeds random pixels and
// compares with the real-valued reference (DFT, atan2, unwrap, magnitude
// threshold), skipping the few pixels whose rounding or threshold decision
// lies too close to call. Flat pixels must come out as 0.0. The magnitude
// float must match the reference estimate max + min/2 of X(1) for every
// pixel, filtered or not. Latency: 51.
module tb_phase_pipeline;
  import tb_ref_pkg::*;

  localparam int THR = 20 * 64;   // |X(1)| >= 20
  logic clk = 0, rst = 1, nd = 0, rdy;
  logic [7:0] pix [8];
  logic [31:0] phase_f, mag_f;
  int checks = 0, failures = 0, cycle = 0;
  int zeros = 0, kept = 0;
  real qe [$], qtol [$], qm [$];
  int  qt [$];
  bit  qs [$];

  phase_pipeline #(.FH(16)) dut (.clk, .rst, .nd, .pix, .threshold(17'(THR)), .rdy, .phase_f, .mag_f);

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
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
      real e, tol, g, m;
      int t;
      bit sk;
      m = qm.pop_front();
      check(float_to_real(mag_f) - m < 0.1 && m - float_to_real(mag_f) < 0.1,
            $sformatf("magnitude %f want %f", float_to_real(mag_f), m));
      e = qe.pop_front();  tol = qtol.pop_front();  t = qt.pop_front();  sk = qs.pop_front();
      g = float_to_real(phase_f);
      check(cycle - t == 51, $sformatf("latency %0d", cycle - t));
      if (!sk) begin
        if (e == 0.0) begin
          zeros++;
          check(phase_f == 32'd0, $sformatf("filtered pixel gives %h", phase_f));
        end else begin
          kept++;
          check(ang_dist(g, e) < tol, $sformatf("phase %.7f want %.7f", g, e));
        end
      end
    end
  end

  task automatic send(input int s [8], input real e, input real tol, input bit skip);
    for (int i = 0; i < 8; i++) pix[i] = 8'(s[i]);
    nd = 1;
    qm.push_back(ref_mag(s));
    qe.push_back(e);  qtol.push_back(tol);  qt.push_back(cycle + 1);  qs.push_back(skip);
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    int s [8];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // part 1: known phases
    for (int k = 0; k < 1000; k++) begin
      real th;
      th = 2.0 * PI * (real'(k) + 0.37) / 1000.0;
      for (int n = 0; n < 8; n++)
        s[n] = int'($floor(128.0 + 60.0 * $cos(th + 2.0 * PI * n / 8.0)
                                 + 60.0 * $cos(16.0 * th + 4.0 * PI * n / 8.0) + 0.5));
      send(s, th, 2e-3, 1'b0);
    end
    // flat pixels: no modulation, must be filtered
    for (int k = 0; k < 20; k++) begin
      for (int n = 0; n < 8; n++) s[n] = 10 * k;
      send(s, 0.0, 0.0, 1'b0);
    end
    // part 2: random pixels
    for (int k = 0; k < 4000; k++) begin
      real e;
      bit uns;
      for (int n = 0; n < 8; n++) s[n] = int'($urandom_range(0, 255));
      if (k % 4 == 0) for (int n = 0; n < 8; n++) s[n] = 100 + int'($urandom_range(0, 12));
      e = ref_pixel_phase(s, 16, THR, uns);
      send(s, e, 1e-5, uns);
      if ($urandom_range(0, 7) == 0) begin @(posedge clk); #1; end
    end
    repeat (60) @(posedge clk);
    check(qe.size() == 0, "all results delivered");
    check(zeros > 100 && kept > 1000, $sformatf("both outcomes seen: %0d zero, %0d kept", zeros, kept));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
