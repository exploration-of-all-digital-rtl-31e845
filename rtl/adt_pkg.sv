// adt_pkg - shared constants, fixed-point formats and table builders of the
// all-digital transmitter (ADT) and receiver.
//
// The transmitter works on PHASES parallel samples per clock (polyphase
// processing): 64 phases at 125 MHz give an equivalent rate of 8 GS/s, which
// is the serial line rate. Sample words are 16-bit two's complement:
//   * baseband I/Q, sine, cosine and receiver outputs: Q1.15
//   * the delta-sigma loop (input x, internal v, error e): Q5.11. The five
//     integer bits follow the design description of the quantizer; the
//     eleven fraction bits are this design's choice.
//   * FIR coefficients: 18 bits, Q2.16 (an 18-bit multiplier operand).
// The tables (DDS sine/cosine, FIR prototypes, quantizer error) are computed
// here by constant functions so no data files are needed. The FIR prototypes
// are Hamming-windowed sinc low-pass filters cut off at half the clock rate,
// i.e. they pass a 125 MHz wide band around DC; the number of taps per phase
// (4 in the transmitter, 1 in the receiver) is this design's choice.
package adt_pkg;

  localparam int PHASES   = 64;   // parallel phases = samples per clock
  localparam int DW       = 16;   // sample word width
  localparam int DSM_INT  = 5;    // integer bits of the delta-sigma loop words
  localparam int DSM_FRAC = 11;   // fraction bits of the delta-sigma loop words
  localparam int DSM_W    = DSM_INT + DSM_FRAC;
  localparam int DDS_AW   = 10;   // DDS table address width (one period stored)
  localparam int TX_TAPS  = 4;    // taps per phase, transmitter interpolation FIR
  localparam int RX_TAPS  = 1;    // taps per phase, receiver decimation FIR
  localparam int COEF_W   = 18;
  localparam int COEF_FRAC = 16;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [DW-1:0]     sample_t;
  typedef logic signed [DSM_W-1:0]  dsm_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Round a real to the nearest integer and saturate it to a signed width.
  function automatic longint round_sat(real r, int width);
    longint v, lim;
    v   = longint'($floor(r + 0.5));
    lim = (longint'(1) <<< (width - 1));
    if (v > lim - 1) v = lim - 1;
    if (v < -lim)    v = -lim;
    return v;
  endfunction

  // One entry of the DDS tables: round(32767 * sin or cos(2*pi*a/2^aw)).
  function automatic sample_t dds_entry(int a, int aw, bit cosine);
    real ph;
    ph = 2.0 * PI * real'(a) / real'(1 << aw);
    return sample_t'(round_sat(32767.0 * (cosine ? $cos(ph) : $sin(ph)), DW));
  endfunction

  function automatic real sinc(real t);
    if (t == 0.0) return 1.0;
    return $sin(PI * t) / (PI * t);
  endfunction

  function automatic real hamming(int j, int n);
    if (n <= 1) return 1.0;
    return 0.54 - 0.46 * $cos(2.0 * PI * real'(j) / real'(n - 1));
  endfunction

  // Interpolation prototype h[j], j = 0 .. phases*taps-1, cut-off at the input
  // Nyquist frequency; each output phase has a DC gain close to 1.
  function automatic coef_t interp_coef(int j, int phases, int taps);
    int  n;
    real c;
    n = phases * taps;
    c = real'(n - 1) / 2.0;
    return coef_t'(round_sat(sinc((real'(j) - c) / real'(phases)) * hamming(j, n)
                             * real'(1 << COEF_FRAC), COEF_W));
  endfunction

  // Decimation prototype h[j], j = 0 .. phases*taps-1, same cut-off,
  // normalised to a total DC gain of 1.
  function automatic coef_t decim_coef(int j, int phases, int taps);
    int  n;
    real c, s;
    n = phases * taps;
    c = real'(n - 1) / 2.0;
    s = 0.0;
    for (int m = 0; m < n; m++) s += sinc((real'(m) - c) / real'(phases)) * hamming(m, n);
    return coef_t'(round_sat(sinc((real'(j) - c) / real'(phases)) * hamming(j, n) / s
                             * real'(1 << COEF_FRAC), COEF_W));
  endfunction

  // Quantizer error table, addressed by the four low integer bits of v.
  // The table assumes |v| < 8, so bit 3 of the address is the sign. The
  // quantizer outputs -1 for negative v and +1 otherwise; the entry is the
  // integer part of the error e = v - y (the fraction bits pass unchanged).
  function automatic logic signed [3:0] qerr_entry(int a);
    int val;
    val = (a < 8) ? a : a - 16;
    return 4'(val < 0 ? val + 1 : val - 1);
  endfunction

endpackage
