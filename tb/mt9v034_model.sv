// mt9v034_model: behavioural model of a global-shutter image sensor in
// snapshot mode looking at a flat screen lit by the projector.
//
// Exposure: a rising edge on trigger starts an exposure, which covers the
// next visible projector frame; the model records the grey value of every
// projector line (the patterns are constant along a line) from the VGA
// output. At the next VSYNC the exposure ends and a readout is queued.
// Readout (pclk domain): FRAME_VALID high for the frame, LINE_VALID high for
// each of H rows of W pixels, with LINE_BLANK idle clocks after each row.
// Camera row y looks at projector line y * PROJ_LINES / H. The 10-bit
// pixel at column x is 3 * line_value + (x mod 13), except in the shadow
// columns (x mod 32 < 3), which see a constant 40 + (x mod 3) whatever is
// projected. Every exposure is kept (by readout number) together with the
// pattern index the projector reported, so a testbench can predict any
// pixel of any frame with pix8().
module mt9v034_model #(
  parameter int W          = 752,
  parameter int H          = 480,
  parameter int PROJ_LINES = 600,
  parameter int LINE_BLANK = 16
) (
  input  logic       vga_clk,
  input  logic [7:0] vga_red,
  input  logic       vga_blank,
  input  logic       vga_vsync,
  input  logic [2:0] proj_pattern,   // bookkeeping only
  input  logic       trigger,
  input  logic       pclk,
  output logic       frame_valid,
  output logic       line_valid,
  output logic [9:0] pixel
);
  logic [7:0] hist [int];            // readout r, line v -> grey value
  int         pat_of [int];          // readout r -> pattern index
  logic [7:0] seen [PROJ_LINES];
  int exposures = 0, readouts_done = 0, triggers = 0, pending = 0;
  bit exposing = 0;
  int vline = -1;
  int seen_pat = 0;
  logic trig_d = 0, vs_d = 0, blank_d = 1;

  function automatic int pix10(input int r, input int x, input int y);
    int v;
    v = y * PROJ_LINES / H;
    if (x % 32 < 3) return 40 + x % 3;
    return 3 * int'(hist[r * PROJ_LINES + v]) + x % 13;
  endfunction
  function automatic int pix8(input int r, input int x, input int y);
    return pix10(r, x, y) >> 2;
  endfunction
  function automatic int line_value(input int r, input int v);
    return int'(hist[r * PROJ_LINES + v]);
  endfunction

  always @(posedge vga_clk) begin
    if (trigger && !trig_d) begin triggers++; exposing = 1; end
    if (vga_vsync && !vs_d) begin
      if (exposing && vline >= 0) begin
        for (int v = 0; v < PROJ_LINES; v++) hist[exposures * PROJ_LINES + v] = seen[v];
        pat_of[exposures] = seen_pat;
        exposures++;
        pending++;
        exposing = 0;
      end
      vline = -1;
    end
    if (!vga_blank && blank_d) begin
      vline++;
      if (vline < PROJ_LINES) seen[vline] = vga_red;
      seen_pat = int'(proj_pattern);
    end
    trig_d = trigger;  vs_d = vga_vsync;  blank_d = vga_blank;
  end

  initial begin
    frame_valid = 0;  line_valid = 0;  pixel = 0;
    forever begin
      @(posedge pclk);
      if (pending > 0) begin
        int r;
        r = readouts_done;
        pending--;
        #1 frame_valid = 1;
        repeat (4) @(posedge pclk);
        for (int y = 0; y < H; y++) begin
          for (int x = 0; x < W; x++) begin
            #1 line_valid = 1;  pixel = 10'(pix10(r, x, y));
            @(posedge pclk);
          end
          #1 line_valid = 0;  pixel = 10'(y);
          repeat (LINE_BLANK) @(posedge pclk);
        end
        #1 frame_valid = 0;
        readouts_done++;
      end
    end
  end
endmodule
