// fir_pkg: sizes and default coefficient sets shared by the single-multiplier
// FIR filter processor.
//
// The processor computes y[n] = sum_{k=0}^{TAPS-1} b[k] * x[n-k] with one
// multiplier and one accumulator, taking one tap per clock. Samples and
// coefficients are two's-complement; coefficients are Q1.15 (a value of 32768
// would be 1.0), so the accumulator holds a Q.15 sum and the output stage shifts
// it right by COEF_FRAC bits.
//
// The 16-tap low-pass design point (24 kHz sampling, 4.8 kHz pass band edge,
// 6 kHz stop band edge) and the 4-bit tap address come from the filter this
// design was made for. The word widths and the coefficient values are this
// design's own: the coefficients are a Hamming-windowed sinc,
//   h[n] = 2*fc*sinc(2*fc*(n-(N-1)/2)) * (0.54 - 0.46*cos(2*pi*n/(N-1))),
// with fc = 5.4 kHz / 24 kHz (midway between the band edges), scaled so that
// the taps sum to 1.0 (32768), rounded to integers, with the rounding residue
// put on the two centre taps.
package fir_pkg;

  // Design point.
  parameter int unsigned TAPS      = 16;  // filter length, one ROM/RAM word per tap
  parameter int unsigned DATA_W    = 16;  // audio sample width
  parameter int unsigned COEF_W    = 16;  // coefficient width
  parameter int unsigned COEF_FRAC = 15;  // fractional bits of a coefficient

  // Accumulator: full product plus log2(TAPS) guard bits, so no sum of TAPS
  // products can overflow.
  parameter int unsigned ACC_W = DATA_W + COEF_W + $clog2(TAPS);

  // 16-tap low-pass, fs = 24 kHz, cutoff 5.4 kHz, sum = 32768 (DC gain 1.0).
  // About -3 dB at 4.8 kHz and -10 dB at 6 kHz: 16 taps cannot make a
  // 1.2 kHz transition band at 24 kHz sharp.
  parameter logic signed [15:0] LPF16_COEFFS [16] = '{
    -16'sd103,   16'sd45,    16'sd440,   16'sd73,
    -16'sd1709, -16'sd1233,  16'sd5423,  16'sd13448,
     16'sd13448, 16'sd5423, -16'sd1233, -16'sd1709,
     16'sd73,    16'sd440,   16'sd45,   -16'sd103
  };

  // The same formula for 8 taps, for the eight-coefficient variant.
  parameter logic signed [15:0] LPF8_COEFFS [8] = '{
    -16'sd236, -16'sd411, 16'sd3875, 16'sd13156,
     16'sd13156, 16'sd3875, -16'sd411, -16'sd236
  };

endpackage
