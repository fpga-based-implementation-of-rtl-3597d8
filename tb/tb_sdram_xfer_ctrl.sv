// tb_sdram_xfer_ctrl: the transfer controller between FIFO models and the
// SDRAM page model. Checks page writes from the camera, result and PC
// sources (data and rows, row counters advancing), the zero-padded flush
// page and flush_done, a page read for the phase controller at a given row
// and page reads to the PC output while it has room; also the priority of
// the camera over the other sources.
module tb_sdram_xfer_ctrl;
  import sli_pkg::*;

  localparam int PAGE = 16;
  logic clk = 0, rst = 1;
  logic [3:0] row_load = 0;
  logic [14:0] row_val = 0;
  logic cam_rd_en, res_rd_en, hin_rd_en, cam_flush = 0, cam_flush_done;
  logic [15:0] cam_data, res_data, hin_data, rd_word;
  logic ph_req = 0, ph_ack, ph_wr_en, ph_done, hout_req = 0, hout_wr_en;
  logic [14:0] ph_row = 0;
  logic [11:0] hout_free = 12'd2048;
  logic mem_req, mem_we, mem_ack, mem_wr_valid, mem_rd_valid;
  logic [14:0] mem_row;
  logic [15:0] mem_wr_data, mem_rd_data;
  logic [15:0] camq [$], resq [$], hinq [$];
  logic [15:0] phq [$], houtq [$];
  int checks = 0, failures = 0;

  sdram_xfer_ctrl #(.PAGE(PAGE), .LW(12)) dut (
    .clk, .rst, .row_load, .row_val,
    .cam_level(12'(camq.size())), .cam_rd_en, .cam_data, .cam_flush, .cam_flush_done,
    .res_level(12'(resq.size())), .res_rd_en, .res_data,
    .hin_level(12'(hinq.size())), .hin_rd_en, .hin_data,
    .ph_req, .ph_row, .ph_ack, .ph_wr_en, .ph_done,
    .hout_req, .hout_free, .hout_wr_en, .rd_word,
    .mem_req, .mem_we, .mem_row, .mem_ack, .mem_wr_valid, .mem_wr_data,
    .mem_rd_valid, .mem_rd_data);

  sdram_page_model #(.PAGE(PAGE)) mem (.clk, .mem_req, .mem_we, .mem_row, .mem_ack,
    .mem_wr_valid, .mem_wr_data, .mem_rd_valid, .mem_rd_data);

  always #5 clk = !clk;

  // FIFO models: data one clock after the read enable
  always @(posedge clk) begin
    if (cam_rd_en) cam_data <= camq.pop_front();
    if (res_rd_en) res_data <= resq.pop_front();
    if (hin_rd_en) hin_data <= hinq.pop_front();
    if (ph_wr_en)  phq.push_back(rd_word);
    if (hout_wr_en) houtq.push_back(rd_word);
  end

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

  task automatic load(input int ch, input int row);
    @(posedge clk);
    #1 row_load = 4'(1 << ch);  row_val = 15'(row);
    @(posedge clk);
    #1 row_load = 0;
  endtask

  initial begin
    int flush_pulses;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    load(0, 100);  load(1, 200);  load(2, 300);  load(3, 100);
    // two pages from the PC and one from results and camera; camera first
    for (int i = 0; i < 2 * PAGE; i++) hinq.push_back(16'(16'h3000 + i));
    for (int i = 0; i < PAGE; i++) resq.push_back(16'(16'h2000 + i));
    for (int i = 0; i < PAGE; i++) camq.push_back(16'(16'h1000 + i));
    wait (camq.size() == 0 && resq.size() == 0 && hinq.size() == 0);
    repeat (PAGE + 10) @(posedge clk);
    for (int i = 0; i < PAGE; i++) begin
      check(mem.peek(100, i) == 16'(16'h1000 + i), "camera page");
      check(mem.peek(200, i) == 16'(16'h2000 + i), "result page");
      check(mem.peek(300, i) == 16'(16'h3000 + i), "PC page 1");
      check(mem.peek(301, i) == 16'(16'h3000 + PAGE + i), "PC page 2, row advanced");
    end
    // flush: 5 words plus padding into row 101
    for (int i = 0; i < 5; i++) camq.push_back(16'(16'h1100 + i));
    #1 cam_flush = 1;
    flush_pulses = 0;
    while (flush_pulses == 0) begin
      @(posedge clk);
      if (cam_flush_done) flush_pulses++;
    end
    #1 cam_flush = 0;
    for (int i = 0; i < PAGE; i++)
      check(mem.peek(101, i) == ((i < 5) ? 16'(16'h1100 + i) : 16'd0), "flushed page");
    check(mem.page_writes == 5, "five page writes");
    // phase read of row 300
    #1 ph_req = 1;  ph_row = 15'd300;
    wait (ph_ack);
    @(posedge clk);
    #1 ph_req = 0;
    wait (ph_done);
    @(posedge clk);
    check(phq.size() == PAGE, "phase page size");
    for (int i = 0; i < PAGE; i++) check(phq[i] == 16'(16'h3000 + i), "phase page data");
    // PC reads from row 100: two pages
    #1 hout_req = 1;
    wait (houtq.size() == 2 * PAGE);
    #1 hout_req = 0;
    repeat (2 * PAGE) @(posedge clk);
    for (int i = 0; i < PAGE; i++) begin
      check(houtq[i] == 16'(16'h1000 + i), "PC read page 1");
      check(houtq[PAGE + i] == ((i < 5) ? 16'(16'h1100 + i) : 16'd0), "PC read page 2");
    end
    // no read while the PC FIFO has no room
    hout_free = 12'(PAGE - 1);
    #1 hout_req = 1;
    repeat (100) @(posedge clk);
    check(mem.page_reads == 3 || mem.page_reads == 4, $sformatf("reads stop without room (%0d)", mem.page_reads));
    check(mem.errors == 0, "burst protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
