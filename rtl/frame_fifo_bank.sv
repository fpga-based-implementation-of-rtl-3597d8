// frame_fifo_bank: NFRAMES page buffers, one per phase-shifted frame, that
// let the phase calculation see the same SDRAM page of every frame at once.
//
// Each buffer is a DEPTH x 16-bit block RAM used as a FIFO. The SDRAM can
// only deliver one frame's page at a time, so the buffers are filled one
// after the other (wr_sel picks the frame, each write advances that buffer's
// write pointer). When all are full they are read together: every rd_en
// returns, one clock later, word i of every frame on dout with rd_valid.
// clear rewinds all pointers for the next page. One buffer per frame
// follows the design; the pointer scheme is this design's own.
module frame_fifo_bank #(
  parameter int unsigned NFRAMES = 8,
  parameter int unsigned DEPTH   = 512
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [$clog2(NFRAMES)-1:0] wr_sel,
  input  logic [15:0]                wr_data,
  input  logic                       rd_en,
  output logic                       rd_valid,
  output logic [15:0]                dout [NFRAMES],
  output logic                       all_full,
  output logic                       rd_done
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW:0]   wcnt [NFRAMES];
  logic [AW:0]   rp;
  logic [NFRAMES-1:0] full_v;

  for (genvar f = 0; f < NFRAMES; f++) begin : g_buf
    logic [15:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_sel == f && !wcnt[f][AW]) mem[wcnt[f][AW-1:0]] <= wr_data;
      if (rd_en) dout[f] <= mem[rp[AW-1:0]];
    end
    always_ff @(posedge clk) begin
      if (rst || clear) wcnt[f] <= '0;
      else if (wr_en && wr_sel == f && !wcnt[f][AW]) wcnt[f] <= wcnt[f] + 1'b1;
    end
    assign full_v[f] = wcnt[f][AW];
  end

  assign all_full = &full_v;
  assign rd_done  = rp[AW];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      rp <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en && !rp[AW];
      if (rd_en && !rp[AW]) rp <= rp + 1'b1;
    end
  end

endmodule
