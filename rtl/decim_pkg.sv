// decim_pkg: constants shared by the sigma-delta decimation filter.
//
// The filter takes the 1-bit stream of a sigma-delta modulator sampled at
// 62.5 kHz (a 4 MHz crystal divided by 64) and produces 20-bit samples at
// 625 Hz. It does that in two stages: a 6-stage CIC decimator (R = 25, M = 1)
// down to 2.5 kHz, then a 48th-order (49-tap) FIR low-pass that decimates by 4.
// The rates, stage counts, decimation factors, the filter order and the 20-bit
// output follow the published specification. The word widths inside the FIR,
// the number of taps per split look-up table and the coefficient values are
// this design's own choices (see below).
//
// FIR_COEF: a 49-tap linear-phase equiripple (Parks-McClellan) low-pass for a
// 2500 Hz input rate, pass band 0..100 Hz, stop band 200..1250 Hz, stop-band
// weight 10. The real coefficients h[k] are scaled so that sum(h) = 1 and
// quantised as round(h[k] * 2^COEF_FRAC). The quantised set has a DC gain of
// 524287/524288, about 0.74 dB of pass-band ripple and about 47 dB of
// stop-band attenuation: with 49 taps and a 100 Hz transition band at
// 2.5 kHz, that is close to what an FIR of this order can reach.
package decim_pkg;

  // Clocking (4 MHz crystal, 62.5 kHz modulator clock).
  localparam int unsigned CLK_HZ  = 4_000_000;
  localparam int unsigned OSR_DIV = 64;

  // CIC decimator (6 sections, R = 25, M = 1, 1-bit input).
  localparam int unsigned CIC_N = 6;
  localparam int unsigned CIC_R = 25;
  localparam int unsigned CIC_M = 1;
  // Register width: ceil(N*log2(R*M)) + Bin with the input taken as a
  // 2-bit signed +1/-1: 6*log2(25) = 27.86, so 28 + 1 sign bit = 29 bits.
  // Full scale at the output is +/-25^6 = +/-244140625 < 2^28.
  localparam int unsigned CIC_W = 29;

  // FIR decimator.
  localparam int unsigned FIR_TAPS  = 49;   // order 48
  localparam int unsigned FIR_DECIM = 4;
  localparam int unsigned FIR_IN_W  = 20;   // top 20 bits of the CIC output
  localparam int unsigned COEF_W    = 18;   // signed coefficient width
  localparam int unsigned COEF_FRAC = 19;   // coefficients scaled by 2^19
  localparam int unsigned OUT_W     = 20;   // 20-bit filter output

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t FIR_COEF [FIR_TAPS] = '{
     18'sd1822,   18'sd1510,   18'sd1815,   18'sd1855,   18'sd1503,
     18'sd666,   -18'sd692,   -18'sd2520,  -18'sd4668,  -18'sd6884,
    -18'sd8828,  -18'sd10099, -18'sd10286, -18'sd9020,  -18'sd6030,
    -18'sd1193,   18'sd5425,   18'sd13554,  18'sd22730,  18'sd32329,
     18'sd41622,  18'sd49850,  18'sd56313,  18'sd60441,  18'sd61857,
     18'sd60441,  18'sd56313,  18'sd49850,  18'sd41622,  18'sd32329,
     18'sd22730,  18'sd13554,  18'sd5425,  -18'sd1193,  -18'sd6030,
    -18'sd9020,  -18'sd10286, -18'sd10099, -18'sd8828,  -18'sd6884,
    -18'sd4668,  -18'sd2520,  -18'sd692,    18'sd666,    18'sd1503,
     18'sd1855,   18'sd1815,   18'sd1510,   18'sd1822
  };

endpackage
