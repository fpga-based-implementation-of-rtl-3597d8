// tb_sli_top: end-to-end test of the whole system at reduced size: a
// 64 x 48 projector picture (80 x 56 with blanking), a 64 x 24 camera frame
// (1536 bytes, so each frame takes one full and one padded 512-word page),
// two pages per frame, a fast two-wire clock and a short trigger delay. The
// page size, pipeline, pattern count and frequencies are the defaults.
// See sli_top_bench for the sequence and the checks.
module tb_sli_top;
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

  sli_top #(.PAGES(2), .H_ACTIVE(64), .H_FP(4), .H_SYNC(8), .H_BP(4),
            .V_ACTIVE(48), .V_FP(1), .V_SYNC(2), .V_BP(5), .TRIG_DELAY(100), .I2C_DIV(4)) dut (.*);
  sli_top_bench #(.PAGES(2), .CAM_W(64), .CAM_H(24), .V_LINES(48), .WATCHDOG_NS(64'd20_000_000)) bench (.*);

  // internal activity for the mechanism counters
  assign probe_pattern    = dut.u_vga.pattern;
  assign probe_sync_wait  = (int'(dut.u_acq.st) == 1);
  assign probe_flush_done = dut.flush_done;
  assign probe_res_stall  = (int'(dut.u_phase.st) == 3) && (dut.res_free < 10'd512);
  assign probe_contention = dut.cam_level >= 11'd512 && int'(dut.u_xfer.ch) == 2 &&
                            int'(dut.u_xfer.state) != 0;
endmodule
