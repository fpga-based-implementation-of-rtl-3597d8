// tb_vga_pattern: runs the pattern generator with a small screen (40x48
// active) so that many frames fit in a short run. For every visible pixel the
// colour must equal gamma(u + h) with
//   u = round(64 + 60 cos(2 pi ((v - n D/N) mod D) / D))
//   h = round(64 + 60 cos(2 pi ((FH v - 2 n D/N) mod D) / D)),
// where v is the line, n the pattern index and D the number of lines. The
// three colour channels must be equal. Also checks: pattern index steps once
// per frame and wraps after N, the first frame after reset shows pattern 0
// (a VSYNC comes first), proj_sync marks pattern 0, the camera
// trigger rises TRIG_DELAY+1 clocks after the vsync output rises and lasts
// TRIG_WIDTH clocks, hsync starts H_FP clocks after blank, and a gamma table
// written at run time is used from the next frame on.
module tb_vga_pattern;
  localparam int N = 8, FH = 16, HA = 40, HFP = 2, HS = 4, HBP = 3;
  localparam int VA = 48, VFP = 1, VS = 2, VBP = 3, TD = 50, TW = 8;
  localparam int D = VA;
  logic clk = 0, rst = 1, hsync, vsync, blank, proj_sync, cam_trigger;
  logic [7:0] red, green, blue;
  logic [2:0] pattern;
  logic gamma_wr_en = 0;
  logic [7:0] gamma_wr_addr = 0, gamma_wr_data = 0;
  int checks = 0, failures = 0;

  vga_pattern #(.NPAT(N), .FH(FH), .H_ACTIVE(HA), .H_FP(HFP), .H_SYNC(HS), .H_BP(HBP),
    .V_ACTIVE(VA), .V_FP(VFP), .V_SYNC(VS), .V_BP(VBP), .TRIG_DELAY(TD), .TRIG_WIDTH(TW)) dut (
    .clk, .rst, .red, .green, .blue, .hsync, .vsync, .blank, .pattern, .proj_sync, .cam_trigger,
    .gamma_wr_en, .gamma_wr_addr, .gamma_wr_data);

  always #5 clk = !clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  function automatic int rom(int a);
    return int'($floor(64.0 + 60.0 * $cos(2.0 * tb_ref_pkg::PI * real'(a) / real'(D)) + 0.5));
  endfunction
  function automatic int md(int a);
    return ((a % D) + D) % D;
  endfunction

  int frame = -1, line = -1, clk_no = 0, vs_rise_clk = -1, trig_rise = -1, blank_rise = -1000;
  int gamma_mode = 0, gamma_from_frame = 1 << 30, trig_pulses = 0;
  logic blank_d = 1, vs_d = 0, hs_d = 0, trig_d = 0;

  always @(negedge clk) if (!rst) begin
    clk_no++;
    if (vsync && !vs_d) begin frame++; line = -1; vs_rise_clk = clk_no; end
    if (!blank && blank_d) line++;
    if (blank && !blank_d) blank_rise = clk_no;
    if (hsync && !hs_d && clk_no - blank_rise < HA + HFP + HS + HBP) check(clk_no - blank_rise == HFP, "hsync follows blank by the front porch");
    if (cam_trigger && !trig_d) begin
      trig_pulses++;
      check(clk_no - vs_rise_clk == TD + 1, $sformatf("trigger delay %0d", clk_no - vs_rise_clk));
      trig_rise = clk_no;
    end
    if (!cam_trigger && trig_d) check(clk_no - trig_rise == TW, "trigger width");
    // frame 9 shows the gamma table half rewritten
    if (!blank && frame != 9) begin
      int n, s, want;
      n = frame % N;
      s = rom(md(line - n * (D / N))) + rom(md(FH * line - 2 * n * (D / N)));
      want = (frame >= gamma_from_frame) ? 255 - s : s;
      check(int'(pattern) == n, "pattern index");
      check(proj_sync == (n == 0), "proj_sync");
      check(frame >= 0, "vsync before the first visible frame");
      check(red == green && green == blue, "grey");
      check(int'(red) == want, $sformatf("frame %0d line %0d: %0d want %0d", frame, line, red, want));
    end else if (blank) check(red == 0 && green == 0 && blue == 0, "black while blanked");
    blank_d = blank;  vs_d = vsync;  hs_d = hsync;  trig_d = cam_trigger;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (frame == 9);
    // write an inverting gamma table during frame 9; check from frame 10 on
    for (int i = 0; i < 256; i++) begin
      #1 gamma_wr_en = 1;  gamma_wr_addr = 8'(i);  gamma_wr_data = 8'(255 - i);
      @(posedge clk);
    end
    #1 gamma_wr_en = 0;
    gamma_from_frame = 10;
    check(frame == 9, "gamma table written within one frame");
    wait (frame == 2 * N + 3);
    check(trig_pulses >= 2 * N + 1, "one trigger per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
