// fix2float: converts an unsigned fixed-point number with FRAC fraction bits
// (Q3.29 by default) to an IEEE-754 single-precision float, rounding to
// nearest with ties to even. Zero converts to +0.0.
//
// Pipeline (LATENCY = 6, one conversion per clock): 1 input register,
// 2 leading-one position, 3 normalising shift, 4 round, 5 exponent fix-up
// when rounding carries into a new power of two, 6 pack.
// The function is that of the vendor fixed-to-float operator the design
// names; the insides and the stage count are this design's own.
// The input is unsigned, so the sign bit of dout is always 0.
module fix2float #(
  parameter int unsigned FRAC = 29
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        nd,
  input  logic [31:0] din,
  output logic        rdy,
  output logic [31:0] dout
);
  localparam int unsigned LATENCY = 6;

  logic [31:0] s1_d, s2_d;
  logic [4:0]  s2_msb, s3_msb, s4_msb;
  logic        s2_zero, s3_zero, s4_zero, s5_zero;
  logic [31:0] s3_n;          // leading one at bit 31
  logic [24:0] s4_m;          // 1.mantissa after rounding, bit 24 = carry
  logic [23:0] s5_m;
  logic [7:0]  s5_e;
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (nd) s1_d <= din;

    s2_d    <= s1_d;
    s2_zero <= (s1_d == '0);
    s2_msb  <= '0;
    for (int i = 0; i < 32; i++)
      if (s1_d[i]) s2_msb <= 5'(i);

    s3_n    <= s2_d << (5'd31 - s2_msb);
    s3_msb  <= s2_msb;
    s3_zero <= s2_zero;

    // keep 24 bits (bit 31..8); round on bit 7, sticky on bits 6..0
    s4_m    <= {1'b0, s3_n[31:8]} +
               25'(s3_n[7] && ((|s3_n[6:0]) || s3_n[8]));
    s4_msb  <= s3_msb;
    s4_zero <= s3_zero;

    s5_e    <= 8'(int'(s4_msb) - int'(FRAC) + 127 + int'(s4_m[24]));
    s5_m    <= s4_m[24] ? s4_m[24:1] : s4_m[23:0];
    s5_zero <= s4_zero;

    dout    <= s5_zero ? 32'd0 : {1'b0, s5_e, s5_m[22:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], nd};
  end
  assign rdy = vpipe[LATENCY-1];

endmodule
