// fe_pkg: shared constants of the FFT interpolation frequency estimator.
//
// The estimator measures the frequency of a tone from an N-point FFT and then
// refines the coarse bin K by fitting a parabola through the log magnitudes of
// bins K-1, K, K+1. The numbers below are the default configuration: a
// 256-point FFT on 8-bit samples taken at 1350 MHz, band-pass sampling a
// 750-1250 MHz IF band, with log values and the bin offset carried with 8
// fractional bits and frequencies reported in steps of 0.25 MHz. FFT data,
// twiddle and log widths are choices of this implementation.
package fe_pkg;

  // FFT
  localparam int N_FFT       = 256;   // FFT points
  localparam int ADC_BITS    = 8;     // ADC sample width
  localparam int FFT_DW      = 18;    // FFT internal data width (no scaling: ADC_BITS + log2(N) + 2)
  localparam int TWID_W      = 16;    // twiddle width, 2 integer bits incl. sign

  // log magnitude: log2(re^2 + im^2) as unsigned fixed point
  localparam int LOG_FRAC    = 8;     // fractional bits of a log value
  localparam int LOG_LUT_BITS = 8;    // mantissa bits addressing the log2(1+m) table

  // interpolation
  localparam int P_FRAC      = 8;     // fractional bits of the bin offset p
  localparam int P_W         = 10;    // width of p (signed, saturating)

  // frequency
  localparam int FS_MHZ      = 1350;  // sampling frequency in MHz
  localparam int FREQ_FRAC   = 2;     // fractional bits of a frequency in MHz (0.25 MHz)
  localparam int FREQ_W      = 16;    // width of a frequency word
  localparam int K_MIN_DEF   = 142;   // first bin searched: floor(750 MHz * N / Fs)
  localparam int K_MAX_DEF   = 238;   // last bin searched: ceil(1250 MHz * N / Fs)

endpackage
