// sdram_page_model: behavioural model of an SDRAM controller plus SDR SDRAM
// as seen through the page-burst port of sdram_xfer_ctrl (not synthesizable
// logic of the design; a testbench stand-in). A request is acknowledged
// ACK_DELAY clocks after it appears. A write then takes PAGE consecutive
// mem_wr_valid words into the row; a read returns the row's PAGE words
// CAS clocks after the acknowledge, one per clock. Words are stored in an
// associative array, so unwritten words read as zero. Counts of page reads
// and writes and a protocol error count are kept for the testbench.
module sdram_page_model #(
  parameter int PAGE      = 512,
  parameter int ROW_W     = 15,
  parameter int ACK_DELAY = 2,
  parameter int CAS       = 3
) (
  input  logic             clk,
  input  logic             mem_req,
  input  logic             mem_we,
  input  logic [ROW_W-1:0] mem_row,
  output logic             mem_ack,
  input  logic             mem_wr_valid,
  input  logic [15:0]      mem_wr_data,
  output logic             mem_rd_valid,
  output logic [15:0]      mem_rd_data
);
  logic [15:0] mem [longint];
  int page_writes = 0, page_reads = 0, errors = 0;

  function automatic logic [15:0] peek(input longint row, input int col);
    longint a;
    a = row * PAGE + col;
    return mem.exists(a) ? mem[a] : 16'd0;
  endfunction
  function automatic void poke(input longint row, input int col, input logic [15:0] v);
    mem[row * PAGE + col] = v;
  endfunction

  // inputs are sampled at the falling edge, outputs change just after the
  // rising edge, so the model never races the design
  initial begin
    mem_ack = 0;  mem_rd_valid = 0;  mem_rd_data = 0;
    forever begin
      @(negedge clk);
      if (mem_req) begin
        longint row;
        bit we;
        row = longint'(mem_row);  we = mem_we;
        repeat (ACK_DELAY - 1) @(negedge clk);
        @(posedge clk);
        #1 mem_ack = 1;
        @(posedge clk);
        #1 mem_ack = 0;
        if (we) begin
          int col;
          col = 0;
          @(negedge clk);
          // words must arrive back to back once they start
          while (!mem_wr_valid) @(negedge clk);
          while (col < PAGE) begin
            if (!mem_wr_valid) errors++;
            poke(row, col, mem_wr_data);
            col++;
            if (col < PAGE) @(negedge clk);
          end
          page_writes++;
        end else begin
          repeat (CAS - 1) @(posedge clk);
          for (int col = 0; col < PAGE; col++) begin
            @(posedge clk);
            #1 mem_rd_valid = 1;  mem_rd_data = peek(row, col);
          end
          @(posedge clk);
          #1 mem_rd_valid = 0;
          page_reads++;
        end
      end
    end
  end
endmodule
