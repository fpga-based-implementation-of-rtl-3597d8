// async_fifo: dual-clock FIFO (1024 x 16 by default) that carries camera or
// PC data into the 100 MHz system clock domain, or results back out.
//
// Classic design: binary pointers one bit wider than the address, their
// Gray-coded copies crossed into the other domain through two flip-flops.
// Each side computes its fill level from its own pointer and the
// synchronised other one, so full and level on the write side, and empty and
// level on the read side, are conservative. A read returns data one clock
// after rd_en. The depth follows the design; it must exceed one SDRAM page
// (512 words) so that a full page can be moved while the source keeps
// writing.
module async_fifo #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 10
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          wr_full,
  output logic [AW:0]   wr_level,
  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          rd_empty,
  output logic [AW:0]   rd_level
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign wr_level = wbin - gray2bin(rgray_w2);
  assign wr_full  = wr_level[AW];
  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0;  wgray <= '0;  rgray_w1 <= '0;  rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign rd_level = gray2bin(wgray_r2) - rbin;
  assign rd_empty = (rd_level == '0);
  always_ff @(posedge rd_clk) begin
    if (rd_en && !rd_empty) rd_data <= mem[rbin[AW-1:0]];
  end
  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0;  rgray <= '0;  wgray_r1 <= '0;  wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
