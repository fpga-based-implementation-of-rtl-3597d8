// acq_ctrl: image acquisition controller. On start it loads the camera row
// counter of the SDRAM transfer controller with base_row, waits for the
// rising edge of proj_sync (the projector has just started the first
// pattern of its sequence), arms the camera capture and then, for each of NFRAMES
// frames, waits for the end of the frame and has the camera FIFO flushed to
// SDRAM so that the next frame starts on a new page. done pulses when all
// frames are stored.
//
// frame_toggle and proj_sync come from other clock domains and are
// synchronised here (proj_sync must stay high for at least a few
// system clocks). FLUSH_WAIT clocks pass after a frame end before the flush
// so that the last pixel words have crossed the FIFO. The flow
// (capture, flush after each frame, until N frames) follows the design; the
// synchronisation details are this design's own.
// row_val is base_row passed straight on; it only matters with row_load.
module acq_ctrl
  import sli_pkg::*;
#(
  parameter int unsigned NFRAMES    = 8,
  parameter int unsigned FLUSH_WAIT = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [PAGE_ROW_W-1:0] base_row,
  input  logic                  proj_sync,
  input  logic                  frame_toggle,
  output logic                  arm,
  output logic                  row_load,
  output logic [PAGE_ROW_W-1:0] row_val,
  output logic                  flush,
  input  logic                  flush_done,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [2:0] {A_IDLE, A_SYNC, A_FRAME, A_WAIT, A_FLUSH} astate_t;

  astate_t st;
  logic [2:0] tg_s, ps_s;
  logic [$clog2(NFRAMES+1)-1:0] nfr;
  logic [$clog2(FLUSH_WAIT+1)-1:0] wcnt;
  logic frame_end;

  assign frame_end = tg_s[2] ^ tg_s[1];
  assign row_val   = base_row;
  assign busy      = (st != A_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= A_IDLE;  tg_s <= '0;  ps_s <= '0;
      arm <= 1'b0;  flush <= 1'b0;  done <= 1'b0;  row_load <= 1'b0;
      nfr <= '0;  wcnt <= '0;
    end else begin
      tg_s <= {tg_s[1:0], frame_toggle};
      ps_s <= {ps_s[1:0], proj_sync};
      done <= 1'b0;
      row_load <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          row_load <= 1'b1;
          nfr <= '0;
          st <= A_SYNC;
        end
        A_SYNC: if (ps_s[1] && !ps_s[2]) begin   // rising edge of proj_sync
          arm <= 1'b1;
          st <= A_FRAME;
        end
        A_FRAME: if (frame_end) begin
          nfr <= nfr + 1'b1;
          if (nfr == ($bits(nfr))'(NFRAMES - 1)) arm <= 1'b0;
          wcnt <= '0;
          st <= A_WAIT;
        end
        A_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($bits(wcnt))'(FLUSH_WAIT)) begin
            flush <= 1'b1;
            st <= A_FLUSH;
          end
        end
        A_FLUSH: if (flush_done) begin
          flush <= 1'b0;
          if (nfr == ($bits(nfr))'(NFRAMES)) begin
            done <= 1'b1;
            st <= A_IDLE;
          end else st <= A_FRAME;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
