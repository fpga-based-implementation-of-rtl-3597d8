// gamma_lut: projector gamma compensation. The summed pattern value is
// looked up in a 256-entry table holding the inverse H^-1 of the measured
// projector-to-camera response, so that the light the camera sees is linear
// in the intended pattern value.
//
// The response is measured on the assembled system (project 256 uniform
// grey levels, average a patch of each capture, invert the curve), so the
// table is writable through wr_en/wr_addr/wr_data and starts as the
// identity. Lookup has one clock of latency. Table and its place after
// the sum follow the design; the write port and identity start are this
// design's own.
module gamma_lut (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] data,
  input  logic       wr_en,
  input  logic [7:0] wr_addr,
  input  logic [7:0] wr_data
);
  logic [7:0] lut [256];

  initial begin
    for (int i = 0; i < 256; i++) lut[i] = 8'(i);
  end

  always_ff @(posedge clk) begin
    if (wr_en) lut[wr_addr] <= wr_data;
    data <= lut[addr];
  end

endmodule
