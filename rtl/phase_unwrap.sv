// phase_unwrap: combines the noisy but unambiguous unit-frequency phase with
// the precise but wrapped high-frequency phase into one absolute phase.
//
// With both phases moved to [0, 2*pi) and F = FH (a power of two):
//   hs = ph_h / F                              (shift)
//   t  = F * (ph_u - hs)                       (shift; the division by 2*pi
//                                               of the reference method is
//                                               dropped)
//   k  = t rounded to the nearest multiple of 2*pi, found by comparing t
//        with the odd multiples of pi (a table); exact halves round up
//   out = 2*pi*k/F + hs                        (table of 2*pi*k/F)
// k is taken modulo F so that the result stays in [0, 2*pi); that wrap is
// this design's choice.
//
// Interface: ph_u (from X(1)) and ph_h (from X(2)) are signed Q3.29 in
// [-pi, pi]; phase is unsigned Q3.29 in [0, 2*pi). nd/rdy, LATENCY = 4:
// 1 shift to [0, 2*pi) and scale, 2 difference, 3 compare, 4 add.
module phase_unwrap
  import sli_pkg::*;
#(
  parameter int unsigned FH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               nd,
  input  logic signed [31:0] ph_u,
  input  logic signed [31:0] ph_h,
  output logic               rdy,
  output logic [31:0]        phase
);
  localparam int unsigned LATENCY = 4;
  localparam int unsigned LOG2_FH = $clog2(FH);
  localparam int unsigned TW = 34 + LOG2_FH;  // width of t (signed)
  localparam int unsigned KW = (LOG2_FH > 0) ? LOG2_FH : 1;

  // odd multiple (2j-1)*pi in Q3.29, j = 0 .. FH
  function automatic logic signed [TW-1:0] odd_pi(input int j);
    return TW'(2 * j - 1) * signed'(TW'(PI_Q));
  endfunction
  // 2*pi*k/FH in Q3.29, rounded
  function automatic logic [31:0] step_q(input int k);
    return 32'((longint'(k) * longint'(TWO_PI_Q) + longint'(FH) / 2) / longint'(FH));
  endfunction

  logic [32:0]          s1_u, s1_h;
  logic [31:0]          s2_hs, s3_hs;
  logic signed [TW-1:0] s2_t;
  logic [KW-1:0]        s3_k;
  logic [LATENCY-1:0]   vpipe;

  always_ff @(posedge clk) begin
    // stage 1: map (-pi, pi] onto [0, 2*pi)
    s1_u  <= ph_u[31] ? 33'(signed'(ph_u)) + TWO_PI_Q : {1'b0, ph_u};
    s1_h  <= ph_h[31] ? 33'(signed'(ph_h)) + TWO_PI_Q : {1'b0, ph_h};
    // stage 2
    s2_t  <= (signed'(TW'(s1_u)) - signed'(TW'(s1_h >> LOG2_FH))) <<< LOG2_FH;
    s2_hs <= 32'(s1_h >> LOG2_FH);
    // stage 3: round to a multiple of 2*pi by comparison with odd multiples of pi
    begin
      logic signed [KW+1:0] k;
      k = '1;   // below -pi: k = -1
      for (int j = 0; j <= int'(FH); j++)
        if (s2_t >= odd_pi(j)) k = (KW+2)'(j);
      s3_k <= KW'(k);
    end
    s3_hs <= s2_hs;
    // stage 4
    phase <= step_q(int'(s3_k)) + s3_hs;
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], nd};
  end
  assign rdy = vpipe[LATENCY-1];

endmodule
