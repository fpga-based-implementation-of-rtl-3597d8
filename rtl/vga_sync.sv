// vga_sync: horizontal and vertical timing for the projector's VGA output,
// 800 x 600 at 60 Hz with a 40 MHz pixel clock by default.
//
// hcount counts pixels (one per clock) over a 1056-pixel line: 800 visible,
// 40 front porch, 128 sync, 88 back porch. vcount counts lines over a
// 628-line frame: 600 visible, 1 front porch, 4 sync, 23 back porch. HSYNC is
// high while hcount is in [800+40, 800+40+128), VSYNC while vcount is in
// [601, 605); blank is high outside the visible area. line_end pulses in the
// last clock of a line and frame_end in the last clock of a frame. Reset
// puts the counters at the start of the vertical front porch, so a VSYNC
// always comes before the first visible frame. The
// timing numbers and sync polarity follow the design.
module vga_sync #(
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 40,
  parameter int unsigned H_SYNC   = 128,
  parameter int unsigned H_BP     = 88,
  parameter int unsigned V_ACTIVE = 600,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_SYNC   = 4,
  parameter int unsigned V_BP     = 23
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [10:0] vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        line_end,
  output logic        frame_end
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  assign line_end  = (hcount == 11'(H_TOTAL - 1));
  assign frame_end = line_end && (vcount == 11'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= 11'(V_ACTIVE);         // start in vertical blanking
    end else if (line_end) begin
      hcount <= '0;
      vcount <= (vcount == 11'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    hsync = (hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC));
    vsync = (vcount >= 11'(V_ACTIVE + V_FP)) && (vcount < 11'(V_ACTIVE + V_FP + V_SYNC));
    blank = (hcount >= 11'(H_ACTIVE)) || (vcount >= 11'(V_ACTIVE));
  end

endmodule
