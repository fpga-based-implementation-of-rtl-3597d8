// Shared constants and types of the dual-frequency structured-light design.
//
// Phases travel through the datapath as 32-bit fixed-point numbers with 29
// fraction bits ("Q3.29"): signed out of the arctangent, in (-pi, pi], and
// unsigned after unwrapping, in [0, 2*pi). The constants below are those
// angles scaled by 2^29 and rounded. The SDRAM is addressed by page (one
// 512 x 16-bit row); a page number is PAGE_ROW_W bits wide (4 banks x 8192 rows).
package sli_pkg;

  localparam int unsigned PHASE_FRAC = 29;
  localparam logic [31:0] PI_Q       = 32'd1686629713;   // round(pi * 2^29)
  localparam logic [32:0] TWO_PI_Q   = 33'd3373259426;   // round(2*pi * 2^29)

  localparam int unsigned PAGE_WORDS = 512;   // one SDRAM page: 512 x 16 bits
  localparam int unsigned PAGE_ROW_W = 15;    // 32768 pages of 1 KiB = 32 MiB

  // Outputs of the reduced 8-point FFT: X(1) in Q10.6, X(2) in whole units.
  typedef struct packed {
    logic signed [15:0] xr1;
    logic signed [15:0] xi1;
    logic signed [15:0] xr2;
    logic signed [15:0] xi2;
  } fft_coef_t;

endpackage
