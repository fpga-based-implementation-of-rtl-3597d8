// fft8: reduced, pipelined 8-point DFT that computes only the two
// coefficients the dual-frequency scheme needs, X(1) and X(2).
//
// With W = e^{-j*2*pi/8} and c = cos(45 deg):
//   Xr(1) = (x0-x4) + c*((x1-x5) + (x7-x3))
//   Xi(1) = (x6-x2) + c*((x7-x3) - (x1-x5))
//   Xr(2) = (x0+x4) - (x2+x6)
//   Xi(2) = (x3+x7) - (x1+x5)
// The butterfly sums of the first stage are shared. The constant c is the
// 15-bit value 0x5A82 (c * 2^15); a 10-bit sum times c is a Q10.15 product
// that is truncated (floor) to Q10.6. X(1) leaves as Q10.6 and X(2), which
// has no multiply, leaves as a plain integer; each arctangent only uses the
// ratio of its own pair, so the two scalings need not agree.
//
// Pipeline (6 register stages, one new sample set per clock):
//   1 input register, 2 first add/sub (9 bit), 3 second add/sub (10 bit),
//   4-5 constant multiply (3 stages together with stage 3), 6 output adders.
// The X(1) outputs saturate at the 16-bit limits (|X(1)| may reach 616, more
// than Q10.6 holds); this saturation is this design's own choice.
// nd marks a new input set; dv follows nd exactly LATENCY clocks later.
module fft8
  import sli_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                nd,
  input  logic [PIX_W-1:0]    x [8],
  output logic                dv,
  output fft_coef_t           y
);
  localparam int unsigned LATENCY = 6;
  localparam logic signed [15:0] COS45 = 16'sh5A82;

  // stage 1: input register
  logic [PIX_W-1:0] s1_x [8];
  // stage 2: first butterflies
  logic signed [PIX_W+1:0] s2_d04, s2_d15, s2_d73, s2_d62;
  logic signed [PIX_W+1:0] s2_s04, s2_s26, s2_s37, s2_s15;
  // stage 3: second butterflies, X(2) complete
  logic signed [PIX_W+2:0] s3_p, s3_q, s3_d04, s3_d62;
  logic signed [PIX_W+2:0] s3_xr2, s3_xi2;
  // stages 4, 5: multiply by cos45
  logic signed [31:0]      s4_pm, s4_qm, s5_pm, s5_qm;
  logic signed [PIX_W+2:0] s4_d04, s4_d62, s5_d04, s5_d62;
  logic signed [PIX_W+2:0] s4_xr2, s4_xi2, s5_xr2, s5_xi2;
  logic [LATENCY-1:0]      vpipe;

  function automatic logic signed [15:0] sat16(input logic signed [31:0] v);
    if (v > 32'sd32767)       return 16'sh7FFF;
    else if (v < -32'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (nd) s1_x <= x;

    s2_d04 <= signed'({2'b00, s1_x[0]}) - signed'({2'b00, s1_x[4]});
    s2_d15 <= signed'({2'b00, s1_x[1]}) - signed'({2'b00, s1_x[5]});
    s2_d73 <= signed'({2'b00, s1_x[7]}) - signed'({2'b00, s1_x[3]});
    s2_d62 <= signed'({2'b00, s1_x[6]}) - signed'({2'b00, s1_x[2]});
    s2_s04 <= signed'({2'b00, s1_x[0]}) + signed'({2'b00, s1_x[4]});
    s2_s26 <= signed'({2'b00, s1_x[2]}) + signed'({2'b00, s1_x[6]});
    s2_s37 <= signed'({2'b00, s1_x[3]}) + signed'({2'b00, s1_x[7]});
    s2_s15 <= signed'({2'b00, s1_x[1]}) + signed'({2'b00, s1_x[5]});

    s3_p   <= (PIX_W+3)'(s2_d15) + (PIX_W+3)'(s2_d73);
    s3_q   <= (PIX_W+3)'(s2_d73) - (PIX_W+3)'(s2_d15);
    s3_d04 <= (PIX_W+3)'(s2_d04);
    s3_d62 <= (PIX_W+3)'(s2_d62);
    s3_xr2 <= (PIX_W+3)'(s2_s04) - (PIX_W+3)'(s2_s26);
    s3_xi2 <= (PIX_W+3)'(s2_s37) - (PIX_W+3)'(s2_s15);

    s4_pm  <= 32'(s3_p) * 32'(COS45);
    s4_qm  <= 32'(s3_q) * 32'(COS45);
    s4_d04 <= s3_d04;  s4_d62 <= s3_d62;  s4_xr2 <= s3_xr2;  s4_xi2 <= s3_xi2;

    s5_pm  <= s4_pm;   s5_qm  <= s4_qm;
    s5_d04 <= s4_d04;  s5_d62 <= s4_d62;  s5_xr2 <= s4_xr2;  s5_xi2 <= s4_xi2;

    y.xr1 <= sat16((32'(s5_d04) <<< 6) + (s5_pm >>> 9));
    y.xi1 <= sat16((32'(s5_d62) <<< 6) + (s5_qm >>> 9));
    y.xr2 <= 16'(s5_xr2);
    y.xi2 <= 16'(s5_xi2);
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], nd};
  end
  assign dv = vpipe[LATENCY-1];

endmodule
