// cam_capture: receives pixels from the MT9V034 CMOS sensor in its pixel
// clock domain and writes them, two per 16-bit word, into the camera FIFO.
//
// The sensor presents one 10-bit pixel per pixel clock while FRAME_VALID and
// LINE_VALID are both high. Only the 8 most significant bits are kept. The
// first pixel of a pair goes to bits 7:0, the second to bits 15:8. Capture
// starts only at the rising edge of FRAME_VALID while arm (from the system
// clock domain, synchronised here) is high, so only whole frames are
// stored; at the falling edge of FRAME_VALID of a captured frame
// frame_toggle changes state, telling the acquisition controller (in the
// system clock domain) that a frame is complete. The 10-to-8-bit
// truncation follows the design; packing here rather than in the FIFO is
// this design's choice.
module cam_capture (
  input  logic        pclk,
  input  logic        rst,
  input  logic        arm,
  input  logic        frame_valid,
  input  logic        line_valid,
  input  logic [9:0]  pixel,
  output logic        fifo_wr_en,
  output logic [15:0] fifo_wr_data,
  output logic        frame_toggle
);
  logic arm_s1, arm_s2, fv_d, capturing, half;
  logic [7:0] low_pix;

  always_ff @(posedge pclk) begin
    if (rst) begin
      arm_s1 <= 1'b0;  arm_s2 <= 1'b0;  fv_d <= 1'b0;
      capturing <= 1'b0;  half <= 1'b0;  frame_toggle <= 1'b0;
      fifo_wr_en <= 1'b0;
    end else begin
      arm_s1 <= arm;
      arm_s2 <= arm_s1;
      fv_d   <= frame_valid;
      fifo_wr_en <= 1'b0;
      if (frame_valid && !fv_d) begin
        capturing <= arm_s2;
        half <= 1'b0;
      end else if (!frame_valid && fv_d && capturing) begin
        capturing <= 1'b0;
        frame_toggle <= !frame_toggle;
      end
      if (capturing && frame_valid && line_valid) begin
        half <= !half;
        if (!half) low_pix <= pixel[9:2];
        else begin
          fifo_wr_en   <= 1'b1;
          fifo_wr_data <= {pixel[9:2], low_pix};
        end
      end
    end
  end

endmodule
