// phase_ctrl: phase data flow controller. Turns the NFRAMES captured frames
// in SDRAM into one phase value per camera pixel, one SDRAM page at a time.
//
// For page p = 0 .. PAGES-1 it
//   1. asks the SDRAM transfer controller for row base + f*STRIDE + p of
//      every frame f in turn (frames lie STRIDE pages apart; 353 pages for a
//      752 x 480 frame of 8-bit pixels) and stores each in frame f's buffer;
//   2. waits until the result FIFO can take a whole page of results;
//   3. reads the buffers in parallel, one word per clock: the low byte of
//      word i of every frame is one pixel's eight samples for lane 0, the
//      high byte the next pixel's for lane 1;
//   4. waits until the two 51-clock pipelines have delivered all PAGE
//      results (PAGE + 52 clocks for the whole page: one clock of buffer read
//      plus the 51-clock pipeline) and goes on with p+1.
// Each clock's results of both lanes (phase and magnitude floats of two
// pixels) are written to the result FIFO as one 128-bit entry, which the
// SDRAM transfer controller writes back as eight 16-bit words: an input
// page of 512 words gives eight result pages. After the last page, done
// pulses once the result FIFO is empty,
// i.e. all results are back in SDRAM. The page-wise flow, one buffer per
// frame, the frame stride and the two parallel lanes follow the design.
// Waiting for room for a whole page of results is this design's own rule.
// The sign bits of all four floats (res_wr_data[31], [63], [95], [127]) are
// always 0 because phase and magnitude are never negative.
module phase_ctrl
  import sli_pkg::*;
#(
  parameter int unsigned NFRAMES   = 8,
  parameter int unsigned PAGE      = PAGE_WORDS,
  parameter int unsigned PAGES     = 353,
  parameter int unsigned STRIDE    = 353,
  parameter int unsigned FH        = 16,
  parameter int unsigned RES_DEPTH = 512
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [PAGE_ROW_W-1:0] base_row,
  input  logic [16:0]           threshold,
  output logic                  busy,
  output logic                  done,
  // page reads through the SDRAM transfer controller
  output logic                  ph_req,
  output logic [PAGE_ROW_W-1:0] ph_row,
  input  logic                  ph_ack,
  input  logic                  ph_done,
  input  logic                  ph_wr_en,
  input  logic [15:0]           ph_data,
  // result FIFO
  output logic                  res_wr_en,
  output logic [127:0]          res_wr_data,
  input  logic [$clog2(RES_DEPTH):0]   res_free,
  input  logic [$clog2(RES_DEPTH)+3:0] res_level
);
  typedef enum logic [2:0] {P_IDLE, P_REQ, P_LOAD, P_SPACE, P_STREAM, P_DRAIN, P_FINISH} pstate_t;

  localparam int unsigned FW = $clog2(NFRAMES);

  pstate_t st;
  logic [FW-1:0]            f;
  logic [$clog2(PAGES+1)-1:0] page;
  logic [PAGE_ROW_W-1:0]    page_row, frame_row;
  logic [$clog2(PAGE+1)-1:0] outs;
  logic                     clear, rd_en, rd_valid, rd_done, all_full;
  logic [15:0]              dout [NFRAMES];
  logic [7:0]               pix0 [8], pix1 [8];
  logic                     rdy0, rdy1;
  logic [31:0]              ph0, ph1, mag0, mag1;

  frame_fifo_bank #(.NFRAMES(NFRAMES), .DEPTH(PAGE)) u_bank (
    .clk, .rst, .clear, .wr_en(ph_wr_en), .wr_sel(f), .wr_data(ph_data),
    .rd_en, .rd_valid, .dout, .all_full, .rd_done);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      pix0[i] = (i < int'(NFRAMES)) ? dout[i % NFRAMES][7:0]  : 8'd0;
      pix1[i] = (i < int'(NFRAMES)) ? dout[i % NFRAMES][15:8] : 8'd0;
    end
  end

  phase_pipeline #(.FH(FH)) u_lane0 (.clk, .rst, .nd(rd_valid), .pix(pix0), .threshold,
                                     .rdy(rdy0), .phase_f(ph0), .mag_f(mag0));
  phase_pipeline #(.FH(FH)) u_lane1 (.clk, .rst, .nd(rd_valid), .pix(pix1), .threshold,
                                     .rdy(rdy1), .phase_f(ph1), .mag_f(mag1));

  assign res_wr_en   = rdy0;
  assign res_wr_data = {mag1, ph1, mag0, ph0};
  assign ph_req      = (st == P_REQ);
  assign ph_row      = frame_row;
  assign rd_en       = (st == P_STREAM) && !rd_done;
  assign busy        = (st != P_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_IDLE;  f <= '0;  page <= '0;  page_row <= '0;  frame_row <= '0;
      outs <= '0;  clear <= 1'b1;  done <= 1'b0;
    end else begin
      clear <= 1'b0;
      done  <= 1'b0;
      if (rdy0) outs <= outs + 1'b1;
      unique case (st)
        P_IDLE: if (start) begin
          page <= '0;  f <= '0;
          page_row <= base_row;  frame_row <= base_row;
          clear <= 1'b1;
          st <= P_REQ;
        end
        P_REQ:  if (ph_ack) st <= P_LOAD;
        P_LOAD: if (ph_done) begin
          frame_row <= frame_row + PAGE_ROW_W'(STRIDE);
          if (f == FW'(NFRAMES - 1)) st <= P_SPACE;
          else begin
            f <= f + 1'b1;
            st <= P_REQ;
          end
        end
        P_SPACE: if (res_free >= ($bits(res_free))'(PAGE)) begin
          outs <= '0;
          st <= P_STREAM;
        end
        P_STREAM: if (rd_done) st <= P_DRAIN;
        P_DRAIN: if (outs == ($bits(outs))'(PAGE)) begin
          clear <= 1'b1;
          f <= '0;
          page <= page + 1'b1;
          page_row  <= page_row + 1'b1;
          frame_row <= page_row + 1'b1;
          st <= (page == ($bits(page))'(PAGES - 1)) ? P_FINISH : P_REQ;
        end
        P_FINISH: if (res_level == '0) begin
          done <= 1'b1;
          st <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  a_lanes_in_step: assert property (@(posedge clk) disable iff (rst) rdy0 == rdy1);
  a_buffers_full:  assert property (@(posedge clk) disable iff (rst) (st == P_SPACE) |-> all_full);

endmodule
