// phase_pipeline: one pixel lane of the phase calculation. Eight intensities
// of the same camera pixel, one from each phase-shifted frame, go in; one
// single-precision float, the unwrapped phase (or 0.0 for a filtered pixel),
// comes out, together with the estimated magnitude of X(1) as a second
// float (in units of the 8-bit samples, never zeroed).
//
//   fft8 --X(1)--> cordic_atan --ph_u--\
//        --X(2)--> cordic_atan --ph_h--> phase_unwrap --> zero? --> fix2float
//        --X(1)--> mag_threshold --keep,mag--> fwft_fifo --^-- fix2float (mag)
//
// The stages hand data on with nd/rdy strobes and need no controller. The
// threshold decision is ready long before the phase; it waits in a
// first-word fall-through FIFO that is read when the unwrapper's result
// appears, and a 0 there replaces the phase by zero before conversion. The
// magnitude travels in the same FIFO entry and is converted by a second
// float converter in step with the phase, so both floats leave together.
// Each arctangent takes its own coefficient pair, phase = atan2(Xi, Xr).
// Latency from nd to rdy is 6 + 35 + 4 + 6 = 51 clocks, matching the
// total the design reports; a new pixel may enter every clock.
// The sign bits of phase_f and mag_f are always 0: neither value can be
// negative.
module phase_pipeline
  import sli_pkg::*;
#(
  parameter int unsigned FH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        nd,
  input  logic [7:0]  pix [8],
  input  logic [16:0] threshold,
  output logic        rdy,
  output logic [31:0] phase_f,
  output logic [31:0] mag_f
);
  fft_coef_t    coef;
  logic         fft_dv, atan_rdy_u, atan_rdy_h, unw_rdy, mag_dv, keep;
  logic [17:0]  mag;
  logic signed [31:0] ph_u, ph_h;
  logic [31:0]  ph_abs, ph_kept;
  logic         keep_head, fifo_empty, mag_rdy;
  logic [17:0]  mag_head;

  fft8 u_fft (.clk, .rst, .nd, .x(pix), .dv(fft_dv), .y(coef));

  cordic_atan u_atan_u (.clk, .rst, .nd(fft_dv), .x(coef.xr1), .y(coef.xi1),
                        .rdy(atan_rdy_u), .phase(ph_u));
  cordic_atan u_atan_h (.clk, .rst, .nd(fft_dv), .x(coef.xr2), .y(coef.xi2),
                        .rdy(atan_rdy_h), .phase(ph_h));

  phase_unwrap #(.FH(FH)) u_unwrap (.clk, .rst, .nd(atan_rdy_u), .ph_u, .ph_h,
                                    .rdy(unw_rdy), .phase(ph_abs));

  mag_threshold u_mag (.clk, .rst, .nd(fft_dv), .xr(coef.xr1), .xi(coef.xi1),
                       .threshold, .dv(mag_dv), .keep, .mag);

  fwft_fifo #(.WIDTH(19), .DEPTH(64)) u_keep_fifo (
    .clk, .rst, .wr_en(mag_dv), .din({mag, keep}), .rd_en(unw_rdy),
    .dout({mag_head, keep_head}), .empty(fifo_empty), .full(), .count());

  assign ph_kept = keep_head ? ph_abs : 32'd0;

  fix2float u_float (.clk, .rst, .nd(unw_rdy), .din(ph_kept), .rdy, .dout(phase_f));

  // magnitude in Q12.6, the fraction bits of the FFT's X(1)
  fix2float #(.FRAC(6)) u_mag_float (.clk, .rst, .nd(unw_rdy), .din({14'd0, mag_head}),
                                     .rdy(mag_rdy), .dout(mag_f));

  a_lanes_aligned: assert property (@(posedge clk) disable iff (rst) atan_rdy_u == atan_rdy_h);
  a_floats_aligned: assert property (@(posedge clk) disable iff (rst) mag_rdy == rdy);
  a_flag_ready:    assert property (@(posedge clk) disable iff (rst) unw_rdy |-> !fifo_empty);

endmodule
