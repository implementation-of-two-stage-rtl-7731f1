// fir_pkg: shared widths, rates and coefficient sets of the two-stage
// low-pass channel filter (IFIR stage followed by a polyphase decimator).
//
// The filter specifications are the ones of the design (40 Msps input,
// IFIR prototype of order 29 with interpolation factor 3, DFIR of order 7,
// decimation by 4). The coefficient values themselves are not published
// with those specifications, so they are derived here from them with the
// Parks-McClellan (Remez) equiripple algorithm and quantized to 16-bit
// signed Q1.15 (value = round(h * 2^15)):
//   G (IFIR prototype, 30 taps, fs = 40 MHz): pass band 0..12.42 MHz,
//     stop band 14.64..20 MHz, weights 1 : 2.877 (the ratio of the 0.5 dB
//     pass-band ripple to the 40 dB stop-band ripple, as a minimum-order
//     design uses). Stretched by 3 it gives I(z) = G(z^3) with pass band
//     edge 4.14 MHz and stop band edge 4.88 MHz.
//   H (DFIR, 8 taps, fs = 40 MHz): pass band 0..4.14 MHz, stop band
//     8.42..20 MHz, weights 10 : 1.
// Both sets are symmetric (linear phase). Data widths (16-bit Q1.15
// samples) are this design's own choice.
package fir_pkg;

  // Sample and coefficient formats.
  localparam int DATA_W    = 16;   // input / inter-stage / output samples, Q1.15
  localparam int COEF_W    = 16;   // coefficients, Q1.15
  localparam int COEF_FRAC = 15;   // fractional bits of a coefficient

  // Stage 1: interpolated FIR I(z) = G(z^L).
  localparam int G_TAPS    = 30;   // order 29
  localparam int IFIR_L    = 3;    // interpolation factor

  // Stage 2: polyphase decimating FIR H(z), then decimation by M.
  localparam int H_TAPS    = 8;    // order 7
  localparam int DECIM_M   = 4;    // decimation factor

  // Look-up-table partition size of the distributed-arithmetic cores.
  localparam int DA_PART   = 4;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [DATA_W-1:0] sample_t;

  localparam coef_t G_COEF [G_TAPS] = '{
    -16'sd482,  -16'sd160,   16'sd437,  -16'sd422,   -16'sd70,
     16'sd678,  -16'sd714,  -16'sd128,  16'sd1238, -16'sd1392,
    -16'sd132,  16'sd2521, -16'sd3443,  -16'sd154, 16'sd18126,
     16'sd18126, -16'sd154, -16'sd3443,  16'sd2521,  -16'sd132,
    -16'sd1392,  16'sd1238,  -16'sd128,  -16'sd714,   16'sd678,
     -16'sd70,  -16'sd422,   16'sd437,  -16'sd160,  -16'sd482
  };

  localparam coef_t H_COEF [H_TAPS] = '{
    -16'sd3448, 16'sd2320, 16'sd6878, 16'sd10614,
     16'sd10614, 16'sd6878, 16'sd2320, -16'sd3448
  };

endpackage
