// tb_sli_top_full: the same end-to-end test as tb_sli_top with the system
// at its default size: 800 x 600 projector at 40 MHz, 752 x 480 camera
// frames (353 SDRAM pages each), eight patterns, 100 kHz two-wire clock.
// One complete measurement: configuration, capture of the eight frames,
// phase calculation of all 360,960 pixels and read-back of the 1412 result
// pages. See sli_top_bench for the sequence and the checks.
module tb_sli_top_full;
  logic        clk, rst, vga_clk, vga_rst, cam_pclk, cam_rst, host_clk, host_rst;
  logic        gamma_wr_en;
  logic [7:0]  gamma_wr_addr, gamma_wr_data, vga_red, vga_green, vga_blue;
  logic        vga_hsync, vga_vsync, vga_blank, cam_trigger;
  logic        cam_frame_valid, cam_line_valid, cam_scl, cam_sda_low, cam_sda_in;
  logic [9:0]  cam_pixel;
  logic        cam_cfg_done, cam_cfg_err, cmd_capture, cmd_phase, hout_req;
  logic [14:0] frame_base_row, result_base_row, host_row_val;
  logic [16:0] threshold;
  logic [1:0]  host_row_load;
  logic        capture_busy, capture_done, phase_busy, phase_done;
  logic        hin_wr_en, hin_full, hout_rd_en, hout_empty;
  logic [15:0] hin_wr_data, hout_rd_data;
  logic        mem_req, mem_we, mem_ack, mem_wr_valid, mem_rd_valid;
  logic [14:0] mem_row;
  logic [15:0] mem_wr_data, mem_rd_data;
  logic [2:0]  probe_pattern;
  logic        probe_sync_wait, probe_flush_done, probe_res_stall, probe_contention;

  sli_top dut (.*);
  sli_top_bench #(.PAGES(353), .CAM_W(752), .CAM_H(480), .V_LINES(600)) bench (.*);

  // internal activity for the mechanism counters
  assign probe_pattern    = dut.u_vga.pattern;
  assign probe_sync_wait  = (int'(dut.u_acq.st) == 1);
  assign probe_flush_done = dut.flush_done;
  assign probe_res_stall  = (int'(dut.u_phase.st) == 3) && (dut.res_free < 10'd512);
  assign probe_contention = dut.cam_level >= 11'd512 && int'(dut.u_xfer.ch) == 2 &&
                            int'(dut.u_xfer.state) != 0;
endmodule
