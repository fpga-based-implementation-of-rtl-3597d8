// tb_frame_fifo_bank: fills the eight page buffers one after another with
// distinct data, checks all_full, reads them together and checks that word
// i of every frame appears in the same clock, one clock after rd_en, then
// clears and repeats with a second page.
module tb_frame_fifo_bank;
  localparam int N = 8, D = 32;
  logic clk = 0, rst = 1, clear = 0, wr_en = 0, rd_en = 0, rd_valid, all_full, rd_done;
  logic [2:0] wr_sel = 0;
  logic [15:0] wr_data = 0;
  logic [15:0] dout [N];
  int checks = 0, failures = 0;

  frame_fifo_bank #(.NFRAMES(N), .DEPTH(D)) dut (.clk, .rst, .clear, .wr_en, .wr_sel, .wr_data,
    .rd_en, .rd_valid, .dout, .all_full, .rd_done);

  always #5 clk = !clk;

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

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int pg = 0; pg < 2; pg++) begin
      int got;
      for (int f = 0; f < N; f++) begin
        check(!all_full, "not full while filling");
        for (int i = 0; i < D; i++) begin
          wr_en = ($urandom_range(0, 3) != 0);
          wr_sel = 3'(f);  wr_data = 16'(pg * 4096 + f * 256 + i);
          if (!wr_en) begin @(posedge clk); #1; wr_en = 1; end
          @(posedge clk);
          #1 wr_en = 0;
        end
      end
      // extra writes into a full buffer are ignored
      wr_en = 1;  wr_sel = 3'd2;  wr_data = 16'hDEAD;
      @(posedge clk);
      #1 wr_en = 0;
      check(all_full, "all full");
      got = 0;
      rd_en = 1;
      for (int c = 0; c < D + 4; c++) begin
        @(posedge clk);
        #1;
        if (rd_valid) begin
          for (int f = 0; f < N; f++)
            check(dout[f] == 16'(pg * 4096 + f * 256 + got), $sformatf("frame %0d word %0d: %h", f, got, dout[f]));
          got++;
        end
      end
      rd_en = 0;
      check(got == D, "word count");
      check(rd_done, "rd_done");
      clear = 1;
      @(posedge clk);
      #1 clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
