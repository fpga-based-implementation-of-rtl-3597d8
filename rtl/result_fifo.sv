// result_fifo: output FIFO between the two phase lanes and the SDRAM.
//
// Each write stores one clock's results of both lanes: for each lane the
// phase float and the magnitude float, WORDS = 8 16-bit words in all. The
// read side hands them out as 16-bit SDRAM words, lowest word first:
// lane 0 phase (low half, high half), lane 0 magnitude, lane 1 phase,
// lane 1 magnitude, so the results of a camera pixel pair lie next to each
// other in memory. rd_level counts the 16-bit words held; a read returns
// its word one clock after rd_en, like the other FIFOs the SDRAM transfer
// controller drains. Entry width, word order and depth are this design's
// choices.
module result_fifo #(
  parameter int unsigned DEPTH = 512,     // entries
  parameter int unsigned WORDS = 8        // 16-bit words per entry, a power of 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [16*WORDS-1:0] wr_data,
  output logic [$clog2(DEPTH):0] wr_free,
  input  logic        rd_en,
  output logic [15:0] rd_data,
  output logic [$clog2(DEPTH)+$clog2(WORDS):0] rd_level
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = $clog2(WORDS);

  logic [16*WORDS-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [SW-1:0] sub;          // which 16-bit word of the head entry is next
  logic [AW:0]  count;         // entries, including a partly read one
  logic [16*WORDS-1:0] word;
  logic         last_q;

  assign last_q   = rd_en && (sub == SW'(WORDS - 1));
  assign wr_free  = (AW+1)'(DEPTH) - count;
  assign rd_level = {count, SW'(0)} - (AW+SW+1)'(sub);
  assign word     = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
    if (rd_en) rd_data <= word[16*sub +: 16];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;  rp <= '0;  sub <= '0;  count <= '0;
    end else begin
      if (wr_en)  wp <= wp + 1'b1;
      if (rd_en)  sub <= sub + 1'b1;
      if (last_q) rp <= rp + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(last_q);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> (count < (AW+1)'(DEPTH) || last_q));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> count != 0);

endmodule
