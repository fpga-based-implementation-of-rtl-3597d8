// tb_async_fifo: writer and reader on unrelated clocks (37 and 100 MHz-ish
// periods) with random stalls; every word must arrive once, in order. Also
// checks that the FIFO reports full at 1024 words and that the read level
// reaches a page (512) while the reader waits.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1, wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [15:0] wr_data = 0, rd_data;
  logic [10:0] wr_level, rd_level;
  int checks = 0, failures = 0, nwritten = 0, nread = 0;
  bit reader_on = 0, saw_page = 0;

  async_fifo #(.DW(16), .AW(10)) dut (.wr_clk(wclk), .wr_rst(rst), .wr_en, .wr_data, .wr_full, .wr_level,
    .rd_clk(rclk), .rd_rst(rst), .rd_en, .rd_data, .rd_empty, .rd_level);

  always #13 wclk = !wclk;
  always #5  rclk = !rclk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    #1 rst = 0;
    // fill completely with the reader off
    while (!wr_full) begin
      wr_en = 1;  wr_data = 16'(nwritten);
      @(posedge wclk);
      nwritten++;
      #1 wr_en = 0;
    end
    check(nwritten == 1024, $sformatf("full after %0d words", nwritten));
    wr_en = 1;  wr_data = 16'hFFFF;          // ignored while full
    @(posedge wclk);
    #1 wr_en = 0;
    reader_on = 1;
    while (nwritten < 6000) begin
      if (!wr_full && $urandom_range(0, 2) != 0) begin
        wr_en = 1;  wr_data = 16'(nwritten);
        @(posedge wclk);
        nwritten++;
        #1 wr_en = 0;
      end else begin @(posedge wclk); #1; end
    end
  end

  // reader: data is valid the clock after rd_en
  logic rd_q = 0;
  always @(posedge rclk) begin
    if (rd_q) begin
      check(rd_data == 16'(nread), $sformatf("word %0d got %0d", nread, rd_data));
      nread++;
    end
    if (rd_level >= 11'd512) saw_page = 1;
    rd_q <= rd_en && !rd_empty;
  end
  always @(negedge rclk) rd_en <= reader_on && ($urandom_range(0, 3) != 0);

  initial begin
    wait (nread == 6000);
    check(saw_page, "level reached a page");
    check(nwritten == 6000, "writer done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
