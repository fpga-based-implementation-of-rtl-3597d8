// sli_top_bench: end-to-end stimulus and checking for sli_top, shared by the
// reduced-size and the full-size testbench (each wraps the top and this
// bench). It holds the clocks, the sensor, two-wire slave and SDRAM models,
// and runs one complete measurement:
//   1. camera configuration over the two-wire bus (four register writes);
//   2. a gamma table g(i) = i/2 + 40 written while the projector is in reset;
//   3. capture: cmd_capture, then the projector is released; the capture
//      waits for the start of the pattern sequence and stores NF frames,
//      while the host pushes six pages through the PC input FIFO;
//   4. phase calculation: cmd_phase with a threshold;
//   5. read-back of all result pages through the PC output FIFO.
// Checks: the configuration registers; every word of every stored frame
// against the sensor model (frame f must be the exposure of pattern f, and
// the tail of each frame's last page must be zero padding); the host pages;
// every pixel's phase against the reference model (within 1e-5 rad, exactly
// 0.0 below the threshold) and magnitude (against the estimate max + min/2
// of X(1)) and, for lit pixels, against the geometry of the
// projected pattern; the read-back stream against SDRAM. The mechanisms the
// design has must all occur: waiting for the projector sync, flushes with
// padding, a camera page waiting while a host page is written, threshold
// zeroing, PC page writes and reads,
// the gamma table, the camera triggers and configuration. One that never
// happens is a failure. Clocks in which the phase controller waits for
// result-FIFO space are counted and reported; in this flow the results
// always drain before the next page is ready, so that count may be zero.
module sli_top_bench
  import sli_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int NF      = 8,
  parameter int FH      = 16,
  parameter int PAGES   = 353,
  parameter int CAM_W   = 752,
  parameter int CAM_H   = 480,
  parameter int V_LINES = 600,
  parameter int THR     = 1000,
  parameter longint WATCHDOG_NS = 64'd2_000_000_000
) (
  output logic        clk, rst, vga_clk, vga_rst, cam_pclk, cam_rst, host_clk, host_rst,
  output logic        gamma_wr_en,
  output logic [7:0]  gamma_wr_addr, gamma_wr_data,
  input  logic [7:0]  vga_red,
  input  logic        vga_blank, vga_vsync,
  input  logic        cam_trigger,
  output logic        cam_frame_valid, cam_line_valid,
  output logic [9:0]  cam_pixel,
  input  logic        cam_scl, cam_sda_low,
  output logic        cam_sda_in,
  input  logic        cam_cfg_done, cam_cfg_err,
  output logic        cmd_capture, cmd_phase,
  output logic [14:0] frame_base_row, result_base_row, host_row_val,
  output logic [16:0] threshold,
  output logic [1:0]  host_row_load,
  output logic        hout_req,
  input  logic        capture_busy, capture_done, phase_busy, phase_done,
  output logic        hin_wr_en,
  output logic [15:0] hin_wr_data,
  input  logic        hin_full,
  output logic        hout_rd_en,
  input  logic [15:0] hout_rd_data,
  input  logic        hout_empty,
  input  logic        mem_req, mem_we,
  input  logic [14:0] mem_row,
  output logic        mem_ack,
  input  logic        mem_wr_valid,
  input  logic [15:0] mem_wr_data,
  output logic        mem_rd_valid,
  output logic [15:0] mem_rd_data,
  // internal activity seen by the wrapper
  input  logic [2:0]  probe_pattern,
  input  logic        probe_sync_wait,     // capture waiting for the projector
  input  logic        probe_flush_done,
  input  logic        probe_res_stall,     // phase controller waiting for result space
  input  logic        probe_contention     // camera page waiting behind a host page
);
  localparam int FB = 100, RB = 4000, HB = 3000, HIN_PAGES = 6;
  localparam int NPIX = CAM_W * CAM_H;
  int checks = 0, failures = 0;

  int mag_bad;
  realtime t_phase;
  initial begin clk = 0; forever #5 clk = !clk; end
  initial begin vga_clk = 0; forever #12.5 vga_clk = !vga_clk; end
  initial begin cam_pclk = 0; forever #10 cam_pclk = !cam_pclk; end
  initial begin host_clk = 0; forever #6 host_clk = !host_clk; end

  mt9v034_model #(.W(CAM_W), .H(CAM_H), .PROJ_LINES(V_LINES)) cam (
    .vga_clk, .vga_red, .vga_blank, .vga_vsync, .proj_pattern(probe_pattern), .trigger(cam_trigger),
    .pclk(cam_pclk), .frame_valid(cam_frame_valid), .line_valid(cam_line_valid), .pixel(cam_pixel));
  logic sda;
  i2c_slave_model #(.ADDR(7'h48)) i2c (.scl(cam_scl), .master_low(cam_sda_low), .ack_enable(1'b1), .sda);
  assign cam_sda_in = sda;
  sdram_page_model #(.PAGE(PAGE_WORDS)) mem (.clk, .mem_req, .mem_we, .mem_row, .mem_ack,
    .mem_wr_valid, .mem_wr_data, .mem_rd_valid, .mem_rd_data);

  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 30) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  // mechanism counters
  int n_sync_wait = 0, n_flush = 0, n_stall = 0, n_contention = 0, n_trig = 0;
  logic trig_d = 0;
  always @(posedge clk) if (!rst) begin
    if (probe_sync_wait) n_sync_wait++;
    if (probe_flush_done) n_flush++;
    if (probe_res_stall) n_stall++;
    if (probe_contention) n_contention++;
  end
  always @(posedge vga_clk) begin
    if (cam_trigger && !trig_d) n_trig++;
    trig_d = cam_trigger;
  end

  task automatic pulse(ref logic sig);
    @(posedge clk);
    #1 sig = 1;
    @(posedge clk);
    #1 sig = 0;
  endtask

  function automatic int frame_byte(input int f, input int j);
    int p, w;
    logic [15:0] v;
    p = j / (2 * PAGE_WORDS);  w = (j % (2 * PAGE_WORDS)) / 2;
    v = mem.peek(FB + f * PAGES + p, w);
    return (j % 2) ? int'(v[15:8]) : int'(v[7:0]);
  endfunction

  logic [15:0] hin_sent [$];

  initial begin
    int r0, pad_words, kept, zeroed, geo_bad, uns_n, hin_pages0, hout_pages0;
    real geo_max;
    rst = 1;  vga_rst = 1;  cam_rst = 1;  host_rst = 1;
    gamma_wr_en = 0;  gamma_wr_addr = 0;  gamma_wr_data = 0;
    cmd_capture = 0;  cmd_phase = 0;  host_row_load = 0;  hout_req = 0;
    frame_base_row = 15'(FB);  result_base_row = 15'(RB);  host_row_val = 0;
    threshold = 17'(THR);  hin_wr_en = 0;  hin_wr_data = 0;  hout_rd_en = 0;
    // gamma table while the projector is held in reset
    for (int i = 0; i < 256; i++) begin
      @(posedge vga_clk);
      #1 gamma_wr_en = 1;  gamma_wr_addr = 8'(i);  gamma_wr_data = 8'(i / 2 + 40);
    end
    @(posedge vga_clk);
    #1 gamma_wr_en = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0;  cam_rst = 0;  host_rst = 0;

    // 1. camera configuration
    wait (cam_cfg_done);
    check(!cam_cfg_err, "configuration acknowledged");
    check(i2c.writes == 4 && i2c.regs.exists(8'h07) && i2c.regs[8'h07] == 16'h0388 &&
          i2c.regs[8'h0B] == 16'h01E0 && i2c.regs[8'h35] == 16'h0010 && i2c.regs[8'hAF] == 16'h0000,
          "sensor registers written");

    // 2./3. capture; the projector starts after the command
    @(posedge clk);
    #1 host_row_load = 2'b01;  host_row_val = 15'(HB);
    @(posedge clk);
    #1 host_row_load = 0;
    pulse(cmd_capture);
    check(capture_busy, "capture busy");
    repeat (20) @(posedge clk);
    #1 vga_rst = 0;
    // host pages pushed, one word per host clock, while a frame streams in
    wait (cam.readouts_done == 1 && cam_frame_valid);
    for (int i = 0; i < HIN_PAGES * PAGE_WORDS; i++) begin
      while (hin_full) @(posedge host_clk);
      #1 hin_wr_en = 1;  hin_wr_data = 16'($urandom);
      hin_sent.push_back(hin_wr_data);
      @(posedge host_clk);
      #1 hin_wr_en = 0;
    end
    wait (capture_done);
    repeat (2000) @(posedge clk);
    check(!capture_busy, "capture idle");

    // stored frames: frame f is exposure r0+f showing pattern f
    r0 = -1;
    for (int r = 0; r < cam.exposures; r++) if (r0 < 0 && cam.pat_of[r] == 0) r0 = r;
    check(r0 >= 0, "an exposure of pattern 0");
    pad_words = 0;
    for (int f = 0; f < NF; f++) begin
      int bad;
      bad = 0;
      check(cam.pat_of[r0 + f] == f, $sformatf("frame %0d shows pattern %0d", f, cam.pat_of[r0 + f]));
      for (int j = 0; j < PAGES * 2 * PAGE_WORDS; j++) begin
        int want;
        want = (j < NPIX) ? cam.pix8(r0 + f, j % CAM_W, j / CAM_W) : 0;
        if (frame_byte(f, j) != want) bad++;
        if (j >= NPIX && j % 2 == 0) pad_words++;
      end
      check(bad == 0, $sformatf("frame %0d: %0d bytes differ", f, bad));
    end
    for (int i = 0; i < HIN_PAGES * PAGE_WORDS; i++)
      check(mem.peek(HB + i / PAGE_WORDS, i % PAGE_WORDS) == hin_sent[i], "host page data");

    // 4. phase calculation
    pulse(cmd_phase);
    check(phase_busy, "phase busy");
    t_phase = $realtime;
    wait (phase_done);
    @(posedge clk);
    $display("phase calculation: %0d system clocks, %0d pages", int'(($realtime - t_phase) / 10.0), PAGES);
    mag_bad = 0;
    kept = 0;  zeroed = 0;  geo_bad = 0;  uns_n = 0;  geo_max = 0.0;
    for (int j = 0; j < PAGES * 2 * PAGE_WORDS; j++) begin
      int x [8], a, cls;
      logic [31:0] fv;
      real e, g;
      bit uns;
      for (int f = 0; f < NF; f++) x[f] = frame_byte(f, j);
      a = 8 * (j / 2) + 4 * (j % 2);
      fv = {mem.peek(RB + (a + 3) / PAGE_WORDS, (a + 3) % PAGE_WORDS), mem.peek(RB + (a + 2) / PAGE_WORDS, (a + 2) % PAGE_WORDS)};
      if (!mag_ok(float_to_real(fv), x)) begin
        mag_bad++;
        if (mag_bad < 5) $display("pixel %0d: magnitude %f want %f", j, float_to_real(fv), ref_mag(x));
      end
      fv = {mem.peek(RB + (a + 1) / PAGE_WORDS, (a + 1) % PAGE_WORDS), mem.peek(RB + a / PAGE_WORDS, a % PAGE_WORDS)};
      g = float_to_real(fv);
      cls = ref_below(x, THR);
      if (cls == 1) begin
        zeroed++;
        check(fv == 32'd0, $sformatf("pixel %0d: %h, expected 0.0", j, fv));
        continue;
      end
      e = ref_pixel_phase(x, FH, THR, uns);
      if (uns || cls < 0) begin uns_n++; continue; end
      begin
        real geo, d;
        kept++;
        check(ang_dist(g, e) < 1e-5, $sformatf("pixel %0d: %f want %f", j, g, e));
        geo = wrap_2pi(-2.0 * PI * real'((j / CAM_W) * V_LINES / CAM_H) / real'(V_LINES));
        d = ang_dist(g, geo);
        if (d > geo_max) geo_max = d;
        if (d > 0.05) geo_bad++;
      end
    end
    check(mag_bad == 0, $sformatf("%0d magnitudes wrong", mag_bad));
    check(geo_bad == 0, $sformatf("%0d lit pixels off the projected geometry (max %f rad)", geo_bad, geo_max));
    $display("pixels: %0d with phase, %0d zeroed, %0d at a decision edge; worst geometric error %f rad",
             kept, zeroed, uns_n, geo_max);

    // 5. read the results back through the PC output FIFO
    hout_pages0 = mem.page_reads;
    @(posedge clk);
    #1 host_row_load = 2'b10;  host_row_val = 15'(RB);
    @(posedge clk);
    #1 host_row_load = 0;  hout_req = 1;
    for (int k = 0; k < 8 * PAGES * PAGE_WORDS; k++) begin
      @(posedge host_clk);
      while (hout_empty) @(posedge host_clk);
      #1 hout_rd_en = 1;
      @(posedge host_clk);
      #1 hout_rd_en = 0;
      if (k == 8 * PAGES * PAGE_WORDS - 1 - PAGE_WORDS) hout_req = 0;
      check(hout_rd_data == mem.peek(RB + k / PAGE_WORDS, k % PAGE_WORDS), $sformatf("read-back word %0d", k));
    end
    hout_req = 0;

    // mechanisms
    check(n_sync_wait > 0, "capture waited for the projector sync");
    check(n_flush == NF, $sformatf("%0d flushes", n_flush));
    check(pad_words > 0, "frame tails padded");
    check(n_contention > 0, "camera and host competed for SDRAM");
    check(zeroed > 0 && kept > 0, "threshold zeroing and kept pixels");
    check(mem.page_writes >= NF * PAGES + HIN_PAGES + 8 * PAGES, $sformatf("page writes %0d", mem.page_writes));
    check(mem.page_reads - hout_pages0 >= 8 * PAGES, "result pages read out");
    check(cam.line_value(r0, 0) >= 40 && cam.line_value(r0, 0) <= 167, "gamma table shapes the patterns");
    check(n_trig >= NF, "camera triggers");
    check(mem.errors == 0, "SDRAM burst protocol");
    $display("sync wait %0d clk, flushes %0d, contention %0d clk, result stall %0d clk, triggers %0d",
             n_sync_wait, n_flush, n_contention, n_stall, n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
