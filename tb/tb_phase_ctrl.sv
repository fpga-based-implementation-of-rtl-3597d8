// tb_phase_ctrl: the phase controller with its real neighbours (result FIFO
// and SDRAM transfer controller) against the SDRAM page model, with small
// pages (32 words) so the run is short. Eight frames of known pixels are put
// in the model at rows base + f*STRIDE + p; after start, the phase of every
// pixel must appear, as IEEE single, in the result rows (eight 16-bit words
// per input word: lane 0 phase low/high, lane 0 magnitude low/high, then
// the same for lane 1) and match the reference model within 1e-5 rad, with
// pixels below the threshold exactly 0.0; every magnitude must match the
// reference estimate within the fixed-point truncation. Pixels are a mix of random values, clean dual-frequency
// patterns and nearly flat pixels. Also checks the page read and write
// counts, the done pulse and that each page's pipeline pass takes
// PAGE + 52 clocks from the first buffer read to the last result (one clock
// of buffer read latency plus the 51-clock pipeline).
module tb_phase_ctrl;
  import sli_pkg::*;
  import tb_ref_pkg::*;
  localparam int PAGE = 32, PAGES = 3, STRIDE = 5, NF = 8, RESD = 64, THR = 3000;
  localparam int BASE = 10, RES_ROW = 200;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [16:0] threshold = 17'(THR);
  logic ph_req, ph_ack, ph_done, ph_wr_en;
  logic [14:0] ph_row;
  logic [15:0] ph_data;
  logic res_wr_en, res_rd_en;
  logic [127:0] res_wr_data;
  logic [15:0] res_rd_data;
  logic [6:0] res_free;
  logic [9:0] res_level;
  logic [3:0] row_load = 0;
  logic [14:0] row_val = 0;
  logic mem_req, mem_we, mem_ack, mem_wr_valid, mem_rd_valid;
  logic [14:0] mem_row;
  logic [15:0] mem_wr_data, mem_rd_data;
  int checks = 0, failures = 0;

  phase_ctrl #(.NFRAMES(NF), .PAGE(PAGE), .PAGES(PAGES), .STRIDE(STRIDE), .FH(16), .RES_DEPTH(RESD)) dut (
    .clk, .rst, .start, .base_row(15'(BASE)), .threshold, .busy, .done,
    .ph_req, .ph_row, .ph_ack, .ph_done, .ph_wr_en, .ph_data,
    .res_wr_en, .res_wr_data, .res_free, .res_level);

  result_fifo #(.DEPTH(RESD)) u_res (.clk, .rst, .wr_en(res_wr_en), .wr_data(res_wr_data), .wr_free(res_free),
    .rd_en(res_rd_en), .rd_data(res_rd_data), .rd_level(res_level));

  sdram_xfer_ctrl #(.PAGE(PAGE), .LW(12)) u_xfer (
    .clk, .rst, .row_load, .row_val,
    .cam_level(12'd0), .cam_rd_en(), .cam_data(16'd0), .cam_flush(1'b0), .cam_flush_done(),
    .res_level(12'(res_level)), .res_rd_en, .res_data(res_rd_data),
    .hin_level(12'd0), .hin_rd_en(), .hin_data(16'd0),
    .ph_req, .ph_row, .ph_ack, .ph_wr_en, .ph_done,
    .hout_req(1'b0), .hout_free(12'd0), .hout_wr_en(), .rd_word(ph_data),
    .mem_req, .mem_we, .mem_row, .mem_ack, .mem_wr_valid, .mem_wr_data,
    .mem_rd_valid, .mem_rd_data);

  sdram_page_model #(.PAGE(PAGE)) mem (.clk, .mem_req, .mem_we, .mem_row, .mem_ack,
    .mem_wr_valid, .mem_wr_data, .mem_rd_valid, .mem_rd_data);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  // one pipeline pass per page: first buffer read to last result. The
  // buffers are read from the second clock after the eighth page read ends,
  // when the result FIFO already has room for a page; other passes are not
  // timed.
  int clk_no = 0, first_rd = -1, passes = 0, timed = 0, reads = 0, outs = 0, e0 = -10;
  always @(posedge clk) begin
    clk_no++;
    if (clk_no == e0 + 1) first_rd = (res_free >= 7'(PAGE)) ? e0 + 2 : -1;
    if (ph_done) begin
      reads++;
      if (reads % NF == 0) e0 = clk_no;
    end
    if (res_wr_en) begin
      if (outs == PAGE - 1) begin
        if (first_rd >= 0) begin
          check(clk_no - first_rd + 1 == PAGE + 52, $sformatf("page pass %0d clocks", clk_no - first_rd + 1));
          timed++;
        end
        first_rd = -1;
        passes++;
        outs = 0;
      end else outs++;
    end
  end

  localparam int NPIX = 2 * PAGE * PAGES;
  int pix [NPIX][8];

  initial begin
    int zeros = 0, kept = 0, skipped = 0;
    for (int j = 0; j < NPIX; j++) begin
      int kind;
      kind = j % 3;
      for (int n = 0; n < 8; n++) begin
        if (kind == 0) pix[j][n] = int'($urandom_range(0, 255));
        else if (kind == 1) begin
          real th;
          th = 2.0 * PI * real'(j) / real'(NPIX);
          pix[j][n] = int'($floor(128.0 + 60.0 * $cos(th + 2.0 * PI * n / 8.0)
                                  + 60.0 * $cos(16.0 * th + 4.0 * PI * n / 8.0) + 0.5));
        end else pix[j][n] = 120 + int'($urandom_range(0, 6));
      end
    end
    for (int p = 0; p < PAGES; p++)
      for (int i = 0; i < PAGE; i++)
        for (int f = 0; f < NF; f++)
          mem.poke(BASE + f * STRIDE + p, i,
                   {8'(pix[p * 2 * PAGE + 2 * i + 1][f]), 8'(pix[p * 2 * PAGE + 2 * i][f])});

    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    #1 row_load = 4'b0010;  row_val = 15'(RES_ROW);
    @(posedge clk);
    #1 row_load = 0;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    check(busy, "busy");
    while (!done) @(posedge clk);
    #1;
    check(!busy, "idle after done");
    check(passes == PAGES, "one pass per page");
    check(timed > 0, "page pass timed");
    check(mem.page_reads == NF * PAGES, $sformatf("page reads %0d", mem.page_reads));
    check(mem.page_writes == 8 * PAGES, $sformatf("page writes %0d", mem.page_writes));
    check(mem.errors == 0, "page write bursts contiguous");
    for (int j = 0; j < NPIX; j++) begin
      int a;
      logic [31:0] fv;
      real g, e;
      bit uns;
      a = 8 * (j / 2) + 4 * (j % 2);
      fv = {mem.peek(RES_ROW + (a + 3) / PAGE, (a + 3) % PAGE), mem.peek(RES_ROW + (a + 2) / PAGE, (a + 2) % PAGE)};
      g = float_to_real(fv);
      check(mag_ok(g, pix[j]), $sformatf("pixel %0d magnitude %f want %f", j, g, ref_mag(pix[j])));
      fv = {mem.peek(RES_ROW + (a + 1) / PAGE, (a + 1) % PAGE), mem.peek(RES_ROW + a / PAGE, a % PAGE)};
      g = float_to_real(fv);
      e = ref_pixel_phase(pix[j], 16, THR, uns);
      if (uns) begin skipped++; continue; end
      if (e == 0.0) begin zeros++; check(fv == 32'd0, $sformatf("pixel %0d below threshold gives %h", j, fv)); end
      else begin
        kept++;
        check(ang_dist(g, e) < 1e-5, $sformatf("pixel %0d phase %f want %f", j, g, e));
      end
    end
    check(zeros > 20 && kept > 100, $sformatf("zeroed %0d kept %0d", zeros, kept));
    $display("pixels: %0d kept, %0d zeroed, %0d near a decision edge", kept, zeros, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
