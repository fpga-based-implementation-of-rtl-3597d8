// tb_cam_capture: drives small frames (W x H with line and frame blanking)
// with random 10-bit pixels. Frames that start while arm is high must come
// out as packed words {pixel[2n+1][9:2], pixel[2n][9:2]}, each written one
// pclk after its second pixel; frames that start while arm is low must not
// be written. frame_toggle must flip once per captured frame.
module tb_cam_capture;
  localparam int W = 24, H = 6;
  logic pclk = 0, rst = 1, arm = 0, fv = 0, lv = 0;
  logic [9:0] pixel = 0;
  logic fifo_wr_en, frame_toggle;
  logic [15:0] fifo_wr_data;
  logic [15:0] expect_q [$];
  int checks = 0, failures = 0, captured = 0, words = 0;

  cam_capture dut (.pclk, .rst, .arm, .frame_valid(fv), .line_valid(lv), .pixel,
    .fifo_wr_en, .fifo_wr_data, .frame_toggle);

  always #5 pclk = !pclk;

  initial begin
    repeat (200000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // every write must match the next expected word and must appear exactly
  // one pclk after the edge that took the pixel completing the pair
  // (checked on the falling edge, away from the design's updates)
  bit second = 0, armed_now = 0, pair_at_edge = 0;
  always @(posedge pclk) pair_at_edge <= !rst && second && lv && armed_now;
  always @(negedge pclk) if (!rst) begin
    check(fifo_wr_en == pair_at_edge, "write one pclk after second pixel");
    if (fifo_wr_en) begin
      words++;
      check(expect_q.size() != 0 && fifo_wr_data == expect_q.pop_front(), "packed word");
    end
  end

  task automatic frame(input bit armed);
    logic [7:0] lo;
    fv = 1;
    repeat (3) @(posedge pclk);
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        #1 lv = 1;  pixel = 10'($urandom);  second = (c % 2 == 1);  armed_now = armed;
        if (c % 2 == 0) lo = pixel[9:2];
        else if (armed) begin expect_q.push_back({pixel[9:2], lo}); end
        @(posedge pclk);
      end
      #1 lv = 0;  second = 0;  pixel = 10'($urandom);       // junk during blanking
      repeat ($urandom_range(2, 8)) @(posedge pclk);
    end
    #1 fv = 0;
    repeat (10) @(posedge pclk);
  endtask

  initial begin
    logic tg;
    repeat (3) @(posedge pclk);
    #1 rst = 0;
    repeat (5) @(posedge pclk);
    for (int f = 0; f < 12; f++) begin
      bit a;
      a = (f % 3 != 2);
      #1 arm = a;
      repeat (5) @(posedge pclk);
      tg = frame_toggle;
      frame(a);
      check(frame_toggle == (tg ^ a), $sformatf("toggle frame %0d", f));
      if (a) captured++;
    end
    check(expect_q.size() == 0, "all words written");
    check(words == captured * W * H / 2, $sformatf("word count %0d", words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
