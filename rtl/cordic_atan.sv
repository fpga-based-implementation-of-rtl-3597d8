// cordic_atan: fully parallel (one result per clock) CORDIC in vectoring
// mode that returns the four-quadrant angle of the vector (x, y).
//
// A coarse rotation first brings the vector into the right half plane: when
// x < 0 the vector is negated and the angle starts at +pi (y > 0) or -pi
// (y <= 0), so y = 0, x < 0 yields -pi, as the vendor core this replaces
// does. Each of the ITER micro-rotations then turns the vector by
// +-atan(2^-i) towards the x axis, choosing the sign from the sign of y, and
// accumulates the angle. The gain of the rotations is not removed because
// only the angle is used. x and y carry GUARD extra fraction bits so that the
// later, very small rotations still change them.
//
// Interface: 16-bit two's complement x, y; phase is Q3.29 radians, signed,
// in [-pi, pi]. nd marks new data; rdy follows it exactly LATENCY = ITER + 3
// clocks later (input register, coarse rotation, ITER rotations, output
// register). The algorithm and the parallel single-cycle-throughput
// architecture follow the design; the stage count is this design's choice.
module cordic_atan
  import sli_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ITER  = 32,
  parameter int unsigned GUARD = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    nd,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic                    rdy,
  output logic signed [31:0]      phase
);
  localparam int unsigned LATENCY = ITER + 3;
  localparam int unsigned W = IN_W + 2 + GUARD;   // room for the CORDIC gain

  // atan(2^-i) scaled by 2^29, rounded
  function automatic logic signed [31:0] atan_q(input int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) * (2.0 ** PHASE_FRAC);
    return 32'(longint'(a + 0.5));
  endfunction

  logic signed [IN_W-1:0] xi_r, yi_r;
  logic signed [W-1:0]    xs [ITER+1];
  logic signed [W-1:0]    ys [ITER+1];
  logic signed [31:0]     zs [ITER+1];
  logic [LATENCY-1:0]     vpipe;

  always_ff @(posedge clk) begin
    if (nd) begin
      xi_r <= x;
      yi_r <= y;
    end
  end

  // coarse rotation
  always_ff @(posedge clk) begin
    if (xi_r < 0) begin
      xs[0] <= -(W'(xi_r) <<< GUARD);
      ys[0] <= -(W'(yi_r) <<< GUARD);
      zs[0] <= (yi_r > 0) ? signed'(PI_Q) : -signed'(PI_Q);
    end else begin
      xs[0] <= W'(xi_r) <<< GUARD;
      ys[0] <= W'(yi_r) <<< GUARD;
      zs[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_rot
    localparam logic signed [31:0] ANG = atan_q(i);
    always_ff @(posedge clk) begin
      if (ys[i] < 0) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ANG;
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ANG;
      end
    end
  end

  always_ff @(posedge clk) phase <= zs[ITER];

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], nd};
  end
  assign rdy = vpipe[LATENCY-1];

endmodule
