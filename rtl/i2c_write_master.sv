// i2c_write_master: two-wire (I2C-style) master that writes one 16-bit
// register of the image sensor.
//
// Transaction: START (SDA falls while SCL is high), 7-bit device address
// with the write bit 0, ACK, 8-bit register address, ACK, data bits 15:8,
// ACK, data bits 7:0, ACK, STOP (SDA rises while SCL is high). Bits change
// while SCL is low and are stable while it is high; every ACK clock the
// master releases SDA and samples it in the middle of SCL high. A high
// (missing) ACK sets nack, which stays until the next start.
//
// Each bit takes four quarter periods of DIV system clocks, so SCL runs at
// f_clk / (4*DIV): 100 kHz at 100 MHz by default. SDA is open drain:
// sda_low = 1 pulls the line low, otherwise it is released; sda_in is the
// line as read back. SCL is driven push-pull (no clock stretching). The
// frame format follows the design; the bus speed and the port style are
// this design's own.
module i2c_write_master #(
  parameter int unsigned DIV = 250
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [6:0]  dev_addr,
  input  logic [7:0]  reg_addr,
  input  logic [15:0] data,
  output logic        busy,
  output logic        done,
  output logic        nack,
  output logic        scl,
  output logic        sda_low,
  input  logic        sda_in
);
  typedef enum logic [1:0] {I_IDLE, I_START, I_BITS, I_STOP} istate_t;

  istate_t st;
  logic [$clog2(DIV)-1:0] qcnt;
  logic [1:0]  q;          // quarter within the bit
  logic [35:0] sh;         // 4 x (8 data bits + ack slot)
  logic [5:0]  nbit;
  logic        tick;

  assign tick = (qcnt == ($bits(qcnt))'(DIV - 1));
  assign busy = (st != I_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= I_IDLE;  qcnt <= '0;  q <= '0;  nbit <= '0;  sh <= '0;
      scl <= 1'b1;  sda_low <= 1'b0;  done <= 1'b0;  nack <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == I_IDLE) begin
        qcnt <= '0;  q <= '0;
        scl <= 1'b1;  sda_low <= 1'b0;
        if (start) begin
          // ack slots hold 1 = release SDA
          sh   <= {dev_addr, 1'b0, 1'b1, reg_addr, 1'b1, data[15:8], 1'b1, data[7:0], 1'b1};
          nbit <= '0;
          nack <= 1'b0;
          st   <= I_START;
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 1'b1;
        if (tick) begin
          q <= q + 1'b1;
          unique case (st)
            I_START: unique case (q)
              2'd0: begin scl <= 1'b1; sda_low <= 1'b0; end
              2'd1: sda_low <= 1'b1;           // START
              2'd2: scl <= 1'b0;
              2'd3: st <= I_BITS;
            endcase
            I_BITS: unique case (q)
              2'd0: sda_low <= !sh[35];
              2'd1: scl <= 1'b1;
              2'd2: if ((nbit % 9) == 8 && sda_in) nack <= 1'b1;
              2'd3: begin
                scl  <= 1'b0;
                sh   <= {sh[34:0], 1'b0};
                nbit <= nbit + 1'b1;
                if (nbit == 6'd35) st <= I_STOP;
              end
            endcase
            I_STOP: unique case (q)
              2'd0: sda_low <= 1'b1;
              2'd1: scl <= 1'b1;
              2'd2: sda_low <= 1'b0;           // STOP
              2'd3: begin st <= I_IDLE; done <= 1'b1; end
            endcase
            default: st <= I_IDLE;
          endcase
        end
      end
    end
  end

endmodule
