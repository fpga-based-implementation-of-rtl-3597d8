// sli_top: single-FPGA camera-projector system for dual-frequency phase
// measuring profilometry. The projector shows NFRAMES phase-shifted
// patterns, each the sum of a unit-frequency and an FH-times-higher
// sinusoid; the camera captures one frame per pattern into SDRAM; the phase
// calculation then reads the frames back page by page and writes, for every
// camera pixel, the unwrapped phase as an IEEE-754 float (or 0.0 where the
// pattern contrast is below a threshold) and the pattern magnitude as a
// second float to a result area of the SDRAM.
//
// Clock domains: clk (100 MHz system: SDRAM side, control, phase
// calculation), vga_clk (40 MHz pixel clock of the projector output),
// cam_pclk (sensor pixel clock) and host_clk (PC interface). Data crosses
// between them only through the dual-clock FIFOs; the projector's
// proj_sync and the camera's frame toggle are synchronised where used.
//
// Blocks: vga_pattern (projector), cam_config + cam_capture + acq_ctrl
// (camera), three async_fifo (camera in, PC in, PC out), sdram_xfer_ctrl
// (page transfers), phase_ctrl with its frame buffers and two
// phase_pipeline lanes, and result_fifo. The SDRAM controller and the USB
// host interface are outside: the page-burst memory port and the host
// commands, FIFO ports and status are the top's ports.
//
// Host commands (system clock, one-clock pulses): cmd_capture stores
// NFRAMES camera frames from row frame_base_row on; cmd_phase computes the
// phases of the frames at frame_base_row into rows from result_base_row on.
// host_row_load[0]/[1] load the PC-input / PC-output row counters with
// host_row_val; while hout_req is high pages are read out to the PC FIFO.
//
// Result layout: input page p gives eight result pages from row
// result_base_row + 8p; word 8i+0/1 is the phase of pixel 2i (low, high
// half), 8i+2/3 its magnitude, 8i+4..7 the same for pixel 2i+1. The
// projector's trigger delay (TRIG_DELAY), the sensor register values, the
// result layout and the SDRAM page-port handshake are this design's
// choices.
module sli_top
  import sli_pkg::*;
#(
  parameter int unsigned NFRAMES      = 8,
  parameter int unsigned FH           = 16,
  parameter int unsigned PAGES        = 353,   // pages per frame
  parameter int unsigned H_ACTIVE     = 800,
  parameter int unsigned H_FP         = 40,
  parameter int unsigned H_SYNC       = 128,
  parameter int unsigned H_BP         = 88,
  parameter int unsigned V_ACTIVE     = 600,
  parameter int unsigned V_FP         = 1,
  parameter int unsigned V_SYNC       = 4,
  parameter int unsigned V_BP         = 23,
  parameter int unsigned TRIG_DELAY   = 4000,
  parameter int unsigned I2C_DIV      = 250
) (
  input  logic                  clk,
  input  logic                  rst,
  // projector (VGA DAC)
  input  logic                  vga_clk,
  input  logic                  vga_rst,
  output logic [7:0]            vga_red,
  output logic [7:0]            vga_green,
  output logic [7:0]            vga_blue,
  output logic                  vga_hsync,
  output logic                  vga_vsync,
  output logic                  vga_blank,
  output logic                  cam_trigger,
  input  logic                  gamma_wr_en,      // vga_clk domain
  input  logic [7:0]            gamma_wr_addr,
  input  logic [7:0]            gamma_wr_data,
  // camera
  input  logic                  cam_pclk,
  input  logic                  cam_rst,
  input  logic                  cam_frame_valid,
  input  logic                  cam_line_valid,
  input  logic [9:0]            cam_pixel,
  output logic                  cam_scl,
  output logic                  cam_sda_low,
  input  logic                  cam_sda_in,
  output logic                  cam_cfg_done,
  output logic                  cam_cfg_err,
  // host commands and status (system clock)
  input  logic                  cmd_capture,
  input  logic                  cmd_phase,
  input  logic [PAGE_ROW_W-1:0] frame_base_row,
  input  logic [PAGE_ROW_W-1:0] result_base_row,
  input  logic [16:0]           threshold,
  input  logic [1:0]            host_row_load,
  input  logic [PAGE_ROW_W-1:0] host_row_val,
  input  logic                  hout_req,
  output logic                  capture_busy,
  output logic                  capture_done,
  output logic                  phase_busy,
  output logic                  phase_done,
  // host data FIFOs (host_clk)
  input  logic                  host_clk,
  input  logic                  host_rst,
  input  logic                  hin_wr_en,
  input  logic [15:0]           hin_wr_data,
  output logic                  hin_full,
  input  logic                  hout_rd_en,
  output logic [15:0]           hout_rd_data,
  output logic                  hout_empty,
  // page-burst port of the SDRAM controller
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [PAGE_ROW_W-1:0] mem_row,
  input  logic                  mem_ack,
  output logic                  mem_wr_valid,
  output logic [15:0]           mem_wr_data,
  input  logic                  mem_rd_valid,
  input  logic [15:0]           mem_rd_data
);
  localparam int unsigned LW = 13;          // holds the result FIFO level, up to 4096 words
  localparam int unsigned RES_DEPTH = 512;

  // ---------------- projector
  logic proj_sync;
  vga_pattern #(.NPAT(NFRAMES), .FH(FH), .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC),
                .H_BP(H_BP), .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
                .TRIG_DELAY(TRIG_DELAY)) u_vga (
    .clk(vga_clk), .rst(vga_rst), .red(vga_red), .green(vga_green), .blue(vga_blue),
    .hsync(vga_hsync), .vsync(vga_vsync), .blank(vga_blank), .pattern(),
    .proj_sync, .cam_trigger, .gamma_wr_en, .gamma_wr_addr, .gamma_wr_data);

  // ---------------- camera
  cam_config #(.DIV(I2C_DIV)) u_cfg (
    .clk, .rst, .start(1'b0), .done(cam_cfg_done), .err(cam_cfg_err),
    .scl(cam_scl), .sda_low(cam_sda_low), .sda_in(cam_sda_in));

  logic        arm, cam_wr_en, frame_toggle;
  logic [15:0] cam_wr_data;
  cam_capture u_cap (
    .pclk(cam_pclk), .rst(cam_rst), .arm, .frame_valid(cam_frame_valid),
    .line_valid(cam_line_valid), .pixel(cam_pixel), .fifo_wr_en(cam_wr_en),
    .fifo_wr_data(cam_wr_data), .frame_toggle);

  logic        cam_rd_en;
  logic [15:0] cam_rd_data;
  logic [10:0] cam_level;
  async_fifo #(.DW(16), .AW(10)) u_cam_fifo (
    .wr_clk(cam_pclk), .wr_rst(cam_rst), .wr_en(cam_wr_en), .wr_data(cam_wr_data),
    .wr_full(), .wr_level(),
    .rd_clk(clk), .rd_rst(rst), .rd_en(cam_rd_en), .rd_data(cam_rd_data),
    .rd_empty(), .rd_level(cam_level));

  logic                  acq_row_load, flush, flush_done;
  logic [PAGE_ROW_W-1:0] acq_row_val;
  acq_ctrl #(.NFRAMES(NFRAMES)) u_acq (
    .clk, .rst, .start(cmd_capture), .base_row(frame_base_row), .proj_sync,
    .frame_toggle, .arm, .row_load(acq_row_load), .row_val(acq_row_val),
    .flush, .flush_done, .busy(capture_busy), .done(capture_done));

  // ---------------- PC FIFOs
  logic        hin_rd_en;
  logic [15:0] hin_rd_data;
  logic [10:0] hin_level;
  async_fifo #(.DW(16), .AW(10)) u_hin_fifo (
    .wr_clk(host_clk), .wr_rst(host_rst), .wr_en(hin_wr_en), .wr_data(hin_wr_data),
    .wr_full(hin_full), .wr_level(),
    .rd_clk(clk), .rd_rst(rst), .rd_en(hin_rd_en), .rd_data(hin_rd_data),
    .rd_empty(), .rd_level(hin_level));

  logic        hout_wr_en;
  logic [15:0] rd_word;
  logic [10:0] hout_used;
  async_fifo #(.DW(16), .AW(10)) u_hout_fifo (
    .wr_clk(clk), .wr_rst(rst), .wr_en(hout_wr_en), .wr_data(rd_word),
    .wr_full(), .wr_level(hout_used),
    .rd_clk(host_clk), .rd_rst(host_rst), .rd_en(hout_rd_en), .rd_data(hout_rd_data),
    .rd_empty(hout_empty), .rd_level());

  // ---------------- phase calculation
  logic                  ph_req, ph_ack, ph_done, ph_wr_en, res_wr_en, res_rd_en;
  logic [PAGE_ROW_W-1:0] ph_row;
  logic [127:0]          res_wr_data;
  logic [15:0]           res_rd_data;
  logic [$clog2(RES_DEPTH):0]   res_free;
  logic [$clog2(RES_DEPTH)+3:0] res_level;

  phase_ctrl #(.NFRAMES(NFRAMES), .PAGES(PAGES), .STRIDE(PAGES), .FH(FH),
               .RES_DEPTH(RES_DEPTH)) u_phase (
    .clk, .rst, .start(cmd_phase), .base_row(frame_base_row), .threshold,
    .busy(phase_busy), .done(phase_done), .ph_req, .ph_row, .ph_ack, .ph_done,
    .ph_wr_en, .ph_data(rd_word), .res_wr_en, .res_wr_data, .res_free, .res_level);

  result_fifo #(.DEPTH(RES_DEPTH)) u_res_fifo (
    .clk, .rst, .wr_en(res_wr_en), .wr_data(res_wr_data), .wr_free(res_free),
    .rd_en(res_rd_en), .rd_data(res_rd_data), .rd_level(res_level));

  // ---------------- SDRAM page transfers
  logic [3:0]            row_load;
  logic [PAGE_ROW_W-1:0] row_val;
  always_comb begin
    row_load = {host_row_load[1], host_row_load[0], cmd_phase, acq_row_load};
    if (acq_row_load)  row_val = acq_row_val;
    else if (cmd_phase) row_val = result_base_row;
    else               row_val = host_row_val;
  end

  sdram_xfer_ctrl #(.LW(LW)) u_xfer (
    .clk, .rst, .row_load, .row_val,
    .cam_level(LW'(cam_level)), .cam_rd_en, .cam_data(cam_rd_data),
    .cam_flush(flush), .cam_flush_done(flush_done),
    .res_level(LW'(res_level)), .res_rd_en, .res_data(res_rd_data),
    .hin_level(LW'(hin_level)), .hin_rd_en, .hin_data(hin_rd_data),
    .ph_req, .ph_row, .ph_ack, .ph_wr_en, .ph_done,
    .hout_req, .hout_free(LW'(11'd1024 - hout_used)), .hout_wr_en, .rd_word,
    .mem_req, .mem_we, .mem_row, .mem_ack, .mem_wr_valid, .mem_wr_data,
    .mem_rd_valid, .mem_rd_data);

endmodule
