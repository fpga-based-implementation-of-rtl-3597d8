// sdram_xfer_ctrl: moves whole SDRAM pages (512 x 16 bits) between the
// on-chip FIFOs and the SDRAM, which is only accessed in full-page bursts.
//
// Write sources, highest priority first: the camera FIFO (CAM), the phase
// result FIFO (RES) and the PC input FIFO (HIN). A source is served when it
// holds at least one page. The camera source can also be flushed: while
// cam_flush is high its remaining words are written as a last, zero-padded
// page, so that every frame starts on a page boundary; cam_flush_done
// pulses once it is empty. Read sinks: a page requested by the phase
// controller (PH, row given with the request) and, while hout_req is high
// and the PC output FIFO has room for a page, pages for the PC (HOUT).
// Every channel except PH has its own row counter that advances by one
// after each page and can be loaded with row_load/row_val.
//
// Memory side (a page-burst port of an SDRAM controller): mem_req with
// mem_we and mem_row is held until mem_ack. A write burst then streams
// PAGE words on mem_wr_valid/mem_wr_data in consecutive clocks; a read
// burst returns PAGE words on mem_rd_valid/mem_rd_data. FIFO reads return
// their word one clock after the read enable. The polling of FIFO levels,
// page bursts and row counters follow the design; the priority order and
// the port protocol are this design's own.
// rd_word is mem_rd_data passed straight on to whichever FIFO is being
// filled; ph_wr_en / hout_wr_en say which one takes it.
module sdram_xfer_ctrl
  import sli_pkg::*;
#(
  parameter int unsigned PAGE = PAGE_WORDS,
  parameter int unsigned LW   = 11            // width of the FIFO level inputs
) (
  input  logic                  clk,
  input  logic                  rst,
  // row counters: 0 CAM, 1 RES, 2 HIN, 3 HOUT
  input  logic [3:0]            row_load,
  input  logic [PAGE_ROW_W-1:0] row_val,
  // camera FIFO
  input  logic [LW-1:0]         cam_level,
  output logic                  cam_rd_en,
  input  logic [15:0]           cam_data,
  input  logic                  cam_flush,
  output logic                  cam_flush_done,
  // result FIFO
  input  logic [LW-1:0]         res_level,
  output logic                  res_rd_en,
  input  logic [15:0]           res_data,
  // PC input FIFO
  input  logic [LW-1:0]         hin_level,
  output logic                  hin_rd_en,
  input  logic [15:0]           hin_data,
  // phase controller page reads
  input  logic                  ph_req,
  input  logic [PAGE_ROW_W-1:0] ph_row,
  output logic                  ph_ack,
  output logic                  ph_wr_en,
  output logic                  ph_done,
  // PC output FIFO
  input  logic                  hout_req,
  input  logic [LW-1:0]         hout_free,
  output logic                  hout_wr_en,
  output logic [15:0]           rd_word,      // data for ph_wr_en / hout_wr_en
  // page-burst memory port
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [PAGE_ROW_W-1:0] mem_row,
  input  logic                  mem_ack,
  output logic                  mem_wr_valid,
  output logic [15:0]           mem_wr_data,
  input  logic                  mem_rd_valid,
  input  logic [15:0]           mem_rd_data
);
  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WBURST, S_WTAIL, S_RREQ, S_RBURST} state_t;
  typedef enum logic [2:0] {CH_CAM, CH_RES, CH_HIN, CH_HOUT, CH_PH} chan_t;

  localparam int unsigned CW = $clog2(PAGE) + 1;

  state_t state;
  chan_t  ch;
  logic [PAGE_ROW_W-1:0] row [4];
  logic [CW-1:0] cnt;
  logic          issued, issued_q;
  logic [LW-1:0] src_level;
  logic [15:0]   src_data;
  logic          issued_q_src;

  always_comb begin
    unique case (ch)
      CH_CAM:  begin src_level = cam_level; src_data = cam_data; end
      CH_RES:  begin src_level = res_level; src_data = res_data; end
      default: begin src_level = hin_level; src_data = hin_data; end
    endcase
  end

  // a word is read from the source while it has one; past its end the page
  // is padded with zeros (only a flush can get there)
  logic rd_now;
  assign rd_now    = (state == S_WBURST) && (src_level != '0);
  assign cam_rd_en = rd_now && ch == CH_CAM;
  assign res_rd_en = rd_now && ch == CH_RES;
  assign hin_rd_en = rd_now && ch == CH_HIN;

  assign mem_req  = (state == S_WREQ) || (state == S_RREQ);
  assign mem_we   = (state == S_WREQ);
  assign mem_row  = (ch == CH_PH) ? ph_row : row[ch[1:0]];
  assign ph_ack   = (state == S_RREQ) && ch == CH_PH && mem_ack;

  assign rd_word    = mem_rd_data;
  assign ph_wr_en   = (state == S_RBURST) && ch == CH_PH   && mem_rd_valid;
  assign hout_wr_en = (state == S_RBURST) && ch == CH_HOUT && mem_rd_valid;

  // a word read from the source in clock t is on src_data in t+1 and
  // leaves on the memory port in t+2
  assign issued = (state == S_WBURST);
  always_ff @(posedge clk) begin
    if (rst) begin
      issued_q     <= 1'b0;
      issued_q_src <= 1'b0;
      mem_wr_valid <= 1'b0;
    end else begin
      issued_q     <= issued;
      issued_q_src <= rd_now;
      mem_wr_valid <= issued_q;
    end
    mem_wr_data <= issued_q_src ? src_data : 16'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ch    <= CH_CAM;
      cnt   <= '0;
      cam_flush_done <= 1'b0;
      ph_done <= 1'b0;
      for (int i = 0; i < 4; i++) row[i] <= '0;
    end else begin
      cam_flush_done <= 1'b0;
      ph_done <= 1'b0;
      for (int i = 0; i < 4; i++)
        if (row_load[i]) row[i] <= row_val;

      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (cam_level >= LW'(PAGE) || (cam_flush && cam_level != '0)) begin
            ch <= CH_CAM;  state <= S_WREQ;
          end else if (cam_flush && !cam_flush_done) begin
            cam_flush_done <= 1'b1;
          end else if (res_level >= LW'(PAGE)) begin
            ch <= CH_RES;  state <= S_WREQ;
          end else if (hin_level >= LW'(PAGE)) begin
            ch <= CH_HIN;  state <= S_WREQ;
          end else if (ph_req) begin
            ch <= CH_PH;   state <= S_RREQ;
          end else if (hout_req && hout_free >= LW'(PAGE)) begin
            ch <= CH_HOUT; state <= S_RREQ;
          end
        end
        S_WREQ:   if (mem_ack) state <= S_WBURST;
        S_WBURST: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PAGE - 1)) state <= S_WTAIL;
        end
        S_WTAIL: begin           // last word is on its way out
          row[ch[1:0]] <= row[ch[1:0]] + 1'b1;
          state <= S_IDLE;
        end
        S_RREQ:   if (mem_ack) state <= S_RBURST;
        S_RBURST: if (mem_rd_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PAGE - 1)) begin
            if (ch == CH_PH) ph_done <= 1'b1;
            else row[ch[1:0]] <= row[ch[1:0]] + 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
