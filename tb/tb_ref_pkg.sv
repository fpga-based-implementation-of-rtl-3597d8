// tb_ref_pkg: reference arithmetic for the testbenches, written with real
// numbers and system math functions and independent of the RTL.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;
  localparam real Q29 = 536870912.0;

  typedef struct {
    real xr1, xi1, xr2, xi2;
  } dft_t;

  // X(k) = sum x[n] e^{-j 2 pi k n / 8}
  function automatic dft_t ref_dft(input int x [8]);
    dft_t r;
    r = '{0.0, 0.0, 0.0, 0.0};
    for (int n = 0; n < 8; n++) begin
      r.xr1 += x[n] * $cos(2.0 * PI * n / 8.0);
      r.xi1 -= x[n] * $sin(2.0 * PI * n / 8.0);
      r.xr2 += x[n] * $cos(4.0 * PI * n / 8.0);
      r.xi2 -= x[n] * $sin(4.0 * PI * n / 8.0);
    end
    return r;
  endfunction

  function automatic real rabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real sat16r(input real a);
    return (a > 32767.0) ? 32767.0 : (a < -32768.0) ? -32768.0 : a;
  endfunction

  function automatic real wrap_2pi(input real a);
    real r;
    r = a;
    while (r < 0.0) r += 2.0 * PI;
    while (r >= 2.0 * PI) r -= 2.0 * PI;
    return r;
  endfunction

  // distance of two angles on the circle
  function automatic real ang_dist(input real a, input real b);
    real d;
    d = wrap_2pi(a - b);
    return (d > PI) ? 2.0 * PI - d : d;
  endfunction

  // Reference unwrap (the textbook form with the division by 2*pi).
  // unsure is set when the rounding decision lies too close to a half.
  function automatic real ref_unwrap(input real pu, input real ph, input int fh,
                                     output bit unsure);
    real u, h, hs, t, fr;
    int k;
    u  = wrap_2pi(pu);
    h  = wrap_2pi(ph);
    hs = h / fh;
    t  = fh * (u - hs) / (2.0 * PI);
    k  = int'($floor(t + 0.5));
    fr = t - $floor(t);
    unsure = (fr > 0.49 && fr < 0.51);
    return wrap_2pi(2.0 * PI * k / fh + hs);
  endfunction

  // Threshold decision for a pixel: 1 when the estimated magnitude of X(1)
  // (units of 1/64) is clearly below thr, 0 when clearly above, -1 within
  // the rounding band around thr.
  function automatic int ref_below(input int x [8], input int thr);
    dft_t d;
    real ar, ai, mag;
    d   = ref_dft(x);
    ar  = (d.xr1 < 0.0 ? -d.xr1 : d.xr1) * 64.0;
    ai  = (d.xi1 < 0.0 ? -d.xi1 : d.xi1) * 64.0;
    mag = (ar > ai) ? ar + ai / 2.0 : ai + ar / 2.0;
    if (mag < thr - 4.0) return 1;
    if (mag > thr + 4.0) return 0;
    return -1;
  endfunction

  // Estimated magnitude max + min/2 of X(1), in units of the samples.
  function automatic real ref_mag(input int x [8]);
    dft_t d;
    real ar, ai;
    d  = ref_dft(x);
    ar = d.xr1 < 0.0 ? -d.xr1 : d.xr1;
    ai = d.xi1 < 0.0 ? -d.xi1 : d.xi1;
    return (ar > ai) ? ar + ai / 2.0 : ai + ar / 2.0;
  endfunction

  // True when a magnitude float read back from the hardware matches the
  // reference within the truncation of the fixed-point DFT.
  function automatic bit mag_ok(input real got, input int x [8]);
    real e;
    e = ref_mag(x);
    return (got - e < 0.1) && (e - got < 0.1);
  endfunction

  // Expected phase of a pixel from its eight samples; 0.0 when the
  // estimated magnitude of X(1) (in units of 1/64) is below thr.
  function automatic real ref_pixel_phase(input int x [8], input int fh, input int thr,
                                          output bit unsure);
    dft_t d;
    real ar, ai, mag, p;
    bit u1;
    d   = ref_dft(x);
    ar  = (d.xr1 < 0.0 ? -d.xr1 : d.xr1) * 64.0;
    ai  = (d.xi1 < 0.0 ? -d.xi1 : d.xi1) * 64.0;
    mag = (ar > ai) ? ar + ai / 2.0 : ai + ar / 2.0;
    unsure = (mag > thr - 4.0 && mag < thr + 4.0) ||
             (ar < 2.0 && ai < 2.0) ||
             (d.xr2 * d.xr2 + d.xi2 * d.xi2 < 0.5) ||
             ar > 32000.0 || ai > 32000.0;
    if (mag < thr) return 0.0;
    p = ref_unwrap($atan2(d.xi1, d.xr1), $atan2(d.xi2, d.xr2), fh, u1);
    unsure |= u1;
    return p;
  endfunction

  function automatic real q29_to_real(input logic [31:0] v, input bit is_signed);
    if (is_signed) return real'(signed'(v)) / Q29;
    else           return real'(v) / Q29;
  endfunction

  // IEEE single -> real (normal numbers and zero)
  function automatic real float_to_real(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  // positive real -> IEEE single, round to nearest, ties to even
  function automatic logic [31:0] real_to_float(input real v);
    int e;
    real m, fr;
    longint mi;
    if (v <= 0.0) return 32'd0;
    e = int'($floor($ln(v) / $ln(2.0)));
    while (v / (2.0 ** e) >= 2.0) e++;
    while (v / (2.0 ** e) < 1.0) e--;
    m  = v / (2.0 ** e) * 8388608.0;
    mi = longint'($floor(m));
    fr = m - real'(mi);
    if (fr > 0.5 || (fr == 0.5 && mi[0])) mi++;
    if (mi == 64'd16777216) begin mi = 64'd8388608; e++; end
    return {1'b0, 8'(e + 127), mi[22:0]};
  endfunction

  // IEEE single of an unsigned Q3.29 number
  function automatic logic [31:0] ref_q29_float(input logic [31:0] v);
    return real_to_float(real'(v) / Q29);
  endfunction

endpackage
