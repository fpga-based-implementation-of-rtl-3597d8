// i2c_slave_model: behavioural two-wire slave for testbenches. The bus is
// open drain: sda is high unless the master or the slave pulls it low. The
// model detects START and STOP, shifts bits in on the rising edge of scl,
// acknowledges its own address and the following bytes (unless ack_enable is
// low, in which case it neither acknowledges nor records), and records every complete register write (address byte, register
// byte, data high, data low) in regs[]. A START or STOP in the middle of a
// byte, or a transaction with a byte count other than four, counts as a
// protocol error.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h48
) (
  input  logic scl,
  input  logic master_low,
  input  logic ack_enable,
  output logic sda
);
  logic slave_low = 1'b0;
  assign sda = !(master_low || slave_low);

  logic [15:0] regs [int];
  logic [7:0]  last_reg;
  logic [15:0] last_val;
  int writes = 0, errors = 0, starts = 0, stops = 0;
  bit active = 0, addressed = 0;
  int bitcnt = 0, bytes = 0;
  logic [7:0] shreg, regaddr, hi, lo;

  always @(negedge sda) if (scl) begin
    if (active && bitcnt > 1) errors++;
    active = 1;  bitcnt = 0;  bytes = 0;  addressed = 0;  starts++;
  end

  always @(posedge sda) if (scl) begin
    if (active) begin
      if (bitcnt > 1) errors++;  // the scl rise before STOP looks like one bit
      if (addressed) begin
        if (bytes == 4) begin
          regs[int'(regaddr)] = {hi, lo};
          last_reg = regaddr;  last_val = {hi, lo};
          writes++;
        end else errors++;
      end
    end
    active = 0;  stops++;
  end

  always @(posedge scl) if (active) begin
    if (bitcnt < 8) shreg = {shreg[6:0], sda};
    bitcnt++;
  end

  always @(negedge scl) if (active) begin
    if (bitcnt == 8) begin
      unique case (bytes)
        0: addressed = (shreg[7:1] == ADDR) && !shreg[0] && ack_enable;
        1: regaddr = shreg;
        2: hi = shreg;
        3: lo = shreg;
        default: errors++;
      endcase
      bytes++;
      slave_low = addressed && ack_enable;
    end else if (bitcnt == 9) begin
      slave_low = 1'b0;
      bitcnt = 0;
    end
  end
endmodule
