// tb_fft8: drives the reduced FFT with a stream of pixel sets (one per
// clock, with gaps) and compares X(1), X(2) with a real-valued DFT, checks
// two sets whose results are known exactly, and checks the 6-clock latency.
module tb_fft8;
  import sli_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, nd = 0, dv;
  logic [7:0] x [8];
  fft_coef_t y;
  int checks = 0, failures = 0, cycle = 0;
  logic [63:0] qx [$];
  int qt [$];

  fft8 dut (.clk, .rst, .nd, .x, .dv, .y);

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
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // output side
  always @(posedge clk) begin
    if (!rst && dv) begin
      int s [8];
      int t;
      dft_t r;
      begin
        logic [63:0] w;
        w = qx.pop_front();
        for (int i = 0; i < 8; i++) s[i] = int'(w[8*i +: 8]);
      end
      t = qt.pop_front();
      r = ref_dft(s);
      check(cycle - t == 6, $sformatf("latency %0d", cycle - t));
      check(rabs(real'(y.xr1) - sat16r(r.xr1 * 64.0)) <= 2.0, $sformatf("xr1 %0d vs %f", int'(y.xr1), r.xr1 * 64));
      check(rabs(real'(y.xi1) - sat16r(r.xi1 * 64.0)) <= 2.0, $sformatf("xi1 %0d vs %f", int'(y.xi1), r.xi1 * 64));
      check(rabs(real'(y.xr2) - r.xr2) < 0.01, $sformatf("xr2 %0d vs %f", int'(y.xr2), r.xr2));
      check(rabs(real'(y.xi2) - r.xi2) < 0.01, $sformatf("xi2 %0d vs %f", int'(y.xi2), r.xi2));
      if (s[0] == 15 && s[1] == 55 && s[2] == 179) begin
        check(y.xr1 == -16'sd15374 && y.xi1 == 16'sd463 && y.xr2 == -16'sd211 && y.xi2 == 16'sd116,
              $sformatf("known set 1: %0d %0d %0d %0d", y.xr1, y.xi1, y.xr2, y.xi2));
      end
      if (s[0] == 11 && s[1] == 65 && s[2] == 183) begin
        check(y.xi1 == 16'sd373 && y.xr2 == -16'sd227 && y.xi2 == 16'sd78,
              $sformatf("known set 2: %0d %0d %0d", y.xi1, y.xr2, y.xi2));
      end
    end
  end

  task automatic send(input int s [8]);
    for (int i = 0; i < 8; i++) x[i] = 8'(s[i]);
    nd = 1;
    begin
      logic [63:0] w;
      for (int i = 0; i < 8; i++) w[8*i +: 8] = 8'(s[i]);
      qx.push_back(w);
    end
    qt.push_back(cycle + 1);
    @(posedge clk);
    #1 nd = 0;
  endtask

  initial begin
    int s [8];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    s = '{15, 55, 179, 198, 135, 143, 182, 116};  send(s);
    s = '{11, 65, 183, 189, 131, 152, 186, 106};  send(s);
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 8; i++) s[i] = int'($urandom_range(0, 255));
      if (k < 4) s = '{255, 255, 0, 0, 0, 0, 0, 255};   // |X(1)| beyond Q10.6: saturates
      if (k >= 4 && k < 8) s = '{0, 0, 255, 255, 255, 255, 255, 0};
      send(s);
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    repeat (20) @(posedge clk);
    check(qx.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
