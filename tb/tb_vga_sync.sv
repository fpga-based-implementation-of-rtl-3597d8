// tb_vga_sync: runs the 800x600 at 60 Hz timing at full size for two frames
// and checks every clock against counters kept here: line length 1056, frame
// length 628 lines, hsync high exactly for hcount 840..967, vsync high for
// lines 601..604 (reset starts at line 600, the front porch), blank outside the 800x600 window, and the line_end /
// frame_end pulses on the last clock of a line / frame.
module tb_vga_sync;
  logic clk = 0, rst = 1, hsync, vsync, blank, line_end, frame_end;
  logic [10:0] hcount, vcount;
  int checks = 0, failures = 0;

  vga_sync dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank, .line_end, .frame_end);

  always #5 clk = !clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    int h = 0, v = 600, hs_rises = 0, vs_rises = 0, frames = 0;
    logic hs_d = 0, vs_d = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2 * 1056 * 628; c++) begin
      check(hcount == 11'(h) && vcount == 11'(v), $sformatf("count %0d,%0d vs %0d,%0d", hcount, vcount, h, v));
      check(hsync == (h >= 840 && h < 968), "hsync window");
      check(vsync == (v >= 601 && v < 605), "vsync window");
      check(blank == (h >= 800 || v >= 600), "blank");
      check(line_end == (h == 1055), "line_end");
      check(frame_end == (h == 1055 && v == 627), "frame_end");
      if (hsync && !hs_d) hs_rises++;
      if (vsync && !vs_d) vs_rises++;
      if (frame_end) frames++;
      hs_d = hsync;  vs_d = vsync;
      @(posedge clk);
      #1;
      h++;
      if (h == 1056) begin h = 0; v = (v == 627) ? 0 : v + 1; end
    end
    check(hs_rises == 2 * 628, "one hsync per line");
    check(vs_rises == 2, "one vsync per frame");
    check(frames == 2, "frame_end count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
