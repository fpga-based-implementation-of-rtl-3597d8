// mag_threshold: shadow / noise filter decision for one pixel.
//
// The magnitude of X(1) is estimated without a square root as
//   mag = max(|Xr|, |Xi|) + min(|Xr|, |Xi|) / 2
// and compared with a threshold in the same Q10.6 units. keep = 1 when
// mag >= threshold (the pixel's phase is kept), 0 when it is below (the
// phase is later forced to zero). The estimate and the comparison follow the
// design; the two-stage pipelining is this design's choice.
// The threshold is sampled together with the data.
// Interface: nd/dv with LATENCY = 2 (absolute values and compare of the
// halves, then sum and threshold compare). mag is also brought out.
module mag_threshold #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                nd,
  input  logic signed [W-1:0] xr,
  input  logic signed [W-1:0] xi,
  input  logic [W:0]          threshold,
  output logic                dv,
  output logic                keep,
  output logic [W+1:0]        mag
);
  logic [W:0] s1_max, s1_min, s1_thr, ar, ai;
  logic [1:0] vpipe;

  always_comb begin
    ar = xr[W-1] ? (W+1)'(-(W+1)'(xr)) : (W+1)'(xr);
    ai = xi[W-1] ? (W+1)'(-(W+1)'(xi)) : (W+1)'(xi);
  end

  always_ff @(posedge clk) begin
    s1_thr <= threshold;
    if (ar >= ai) begin
      s1_max <= ar;  s1_min <= ai;
    end else begin
      s1_max <= ai;  s1_min <= ar;
    end
  end

  always_ff @(posedge clk) begin
    logic [W+1:0] m;
    m    = (W+2)'(s1_max) + (W+2)'(s1_min >> 1);
    mag  <= m;
    keep <= (m >= (W+2)'(s1_thr));
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[0], nd};
  end
  assign dv = vpipe[1];

endmodule
