// cam_config: writes the image sensor's start-up register settings.
//
// A small ROM holds (register address, 16-bit value) pairs. After reset,
// or on start, the sequencer reads one entry at a time, hands it to the
// two-wire master and waits for that write to finish before the next; done
// goes high after the last entry, err if any write was not acknowledged.
// The ROM-driven sequencing follows the design. The contents are this
// design's choice (the design names only mode, gain and exposure registers):
// MT9V034 at two-wire address 0x48; 0x07 chip control = 0x0388 (master
// mode, simultaneous readout), 0x0B shutter width = 480 rows, 0x35 analog
// gain = 16 (1x), 0xAF AEC/AGC = 0 (both off).
module cam_config #(
  parameter int unsigned DIV      = 250,
  parameter logic [6:0]  DEV_ADDR = 7'h48
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic done,
  output logic err,
  output logic scl,
  output logic sda_low,
  input  logic sda_in
);
  localparam int unsigned NREG = 4;
  typedef struct packed { logic [7:0] addr; logic [15:0] value; } reg_entry_t;
  localparam reg_entry_t ROM [NREG] = '{
    '{8'h07, 16'h0388},
    '{8'h0B, 16'h01E0},
    '{8'h35, 16'h0010},
    '{8'hAF, 16'h0000}
  };

  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT} cstate_t;
  cstate_t st;
  logic [$clog2(NREG+1)-1:0] idx;
  logic go, wbusy, wdone, wnack;

  i2c_write_master #(.DIV(DIV)) u_i2c (
    .clk, .rst, .start(go), .dev_addr(DEV_ADDR),
    .reg_addr(ROM[idx[$clog2(NREG)-1:0]].addr), .data(ROM[idx[$clog2(NREG)-1:0]].value),
    .busy(wbusy), .done(wdone), .nack(wnack), .scl, .sda_low, .sda_in);

  assign go = (st == C_ISSUE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_ISSUE;  idx <= '0;  done <= 1'b0;  err <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: if (start) begin
          idx <= '0;  done <= 1'b0;  err <= 1'b0;  st <= C_ISSUE;
        end
        C_ISSUE: st <= C_WAIT;
        C_WAIT: if (wdone) begin
          if (wnack) err <= 1'b1;
          if (idx == ($bits(idx))'(NREG - 1)) begin
            done <= 1'b1;  st <= C_IDLE;
          end else begin
            idx <= idx + 1'b1;  st <= C_ISSUE;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
