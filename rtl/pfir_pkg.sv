// pfir_pkg: coefficient package for the two FIR stages of the ECG chain.
//
// Both filters are windowed-sinc FIR designs for a sampling rate of 300 Hz,
// Hamming window, quantised to signed 16-bit integers with 15 fractional bits
// (value = round(h[n] * 2^15)). For a filter of N taps (M = N-1, n = 0..M):
//   w[n] = 0.54 - 0.46*cos(2*pi*n/M)
//   band-stop 45-55 Hz : h[n] = w[n]*(d[n-M/2] - s(55) + s(45)), where
//   band-pass 0.05-100 Hz : h[n] = w[n]*(s(100) - s(0.05)),
//   s(f) = sin(2*pi*f/fs*(n-M/2)) / (pi*(n-M/2)) (= 2f/fs at n = M/2),
// each then scaled to unit gain at DC (band-stop) or at the pass-band centre
// (band-pass) before rounding. Both sets are symmetric (linear phase).
//
// FILTER_NOTCH (101 taps) and FILTER_BPF (51 taps) are the names the two sets
// carry in the document's package. The tap counts are not given there; they
// were chosen as the smallest orders that reach the attenuation the document
// reports (40 dB at 50 Hz for the notch, 60 dB of high-frequency noise
// removal for the band-pass): the quantised notch gives about 48 dB at 50 Hz,
// the band-pass about 84 dB at 150 Hz.
package pfir_pkg;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 15;

  localparam int unsigned FILTER_NOTCH_TAPS = 101;
  localparam logic signed [COEF_W-1:0] FILTER_NOTCH [FILTER_NOTCH_TAPS] = '{
    -14, 16, 35, 19, -21, -47, -26, 29,
    65, 35, -38, -80, -42, 42, 84, 40,
    -37, -62, -23, 13, 0, -16, 35, 115,
    83, -113, -290, -181, 220, 525, 308, -355,
    -810, -457, 509, 1126, 617, -670, -1446, -774,
    823, 1739, 913, -953, -1976, -1019, 1044, 2129,
    1079, -1088, 30555, -1088, 1079, 2129, 1044, -1019,
    -1976, -953, 913, 1739, 823, -774, -1446, -670,
    617, 1126, 509, -457, -810, -355, 308, 525,
    220, -181, -290, -113, 83, 115, 35, -16,
    0, 13, -23, -62, -37, 40, 84, 42,
    -42, -80, -38, 35, 65, 29, -26, -47,
    -21, 19, 35, 16, -14
  };

  localparam int unsigned FILTER_BPF_TAPS = 51;
  localparam logic signed [COEF_W-1:0] FILTER_BPF [FILTER_BPF_TAPS] = '{
    28, -1, -38, 45, -1, -78, 95, -3,
    -159, 191, -4, -298, 350, -6, -521, 609,
    -8, -897, 1066, -10, -1658, 2120, -11, -4462,
    8990, 21836, 8990, -4462, -11, 2120, -1658, -10,
    1066, -897, -8, 609, -521, -6, 350, -298,
    -4, 191, -159, -3, 95, -78, -1, 45,
    -38, -1, 28
  };
endpackage : pfir_pkg
