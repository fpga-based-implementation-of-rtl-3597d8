// sine_rom: dual-port ROM with one period of the unit-frequency sinusoid
// used to build the projected patterns.
//
// Entry a holds round(OFFSET + AMP * cos(2*pi*a/DEPTH)). Both ports read in
// the same clock with one clock of latency; the pattern generator reads the
// unit-frequency value on port A and the high-frequency value on port B and
// adds them. By default one period spans the 600 visible lines and the
// values lie in [4, 124], so the sum of two ports, 128 +- 120 at most, fits
// eight bits. The table is computed when the design is elaborated.
// A dual-port sine table per the design; depth and amplitudes are this
// design's choice.
module sine_rom #(
  parameter int unsigned DEPTH  = 600,
  parameter int unsigned OFFSET = 64,
  parameter int unsigned AMP    = 60
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [7:0]               data_a,
  output logic [7:0]               data_b
);
  function automatic logic [7:0] entry(input int a);
    real v;
    v = real'(OFFSET) + real'(AMP) * $cos(2.0 * 3.14159265358979 * real'(a) / real'(DEPTH));
    return 8'(int'($floor(v + 0.5)));
  endfunction

  logic [7:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) rom[a] = entry(a);
  end

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end

endmodule
