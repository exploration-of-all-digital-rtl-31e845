// poly_interp_fir - polyphase interpolation FIR filter (interpolation by PHASES).
//
// One baseband sample x arrives per clock; PHASES output samples leave per
// clock, y[0] being the earliest in time. The prototype low-pass filter of
// PHASES*TAPS coefficients h[] is split as the design describes: output
// phase p is a TAPS-tap FIR with coefficients h[p], h[p+PHASES], ...,
// applied to the current and the TAPS-1 previous input samples:
//   y[p](t+1) = sum_j h[p + j*PHASES] * x(t - j)
// This equals upsampling by PHASES (zero insertion) followed by the full
// prototype filter, while every multiplier runs at the clock rate. The
// prototype (Hamming-windowed sinc, 125 MHz pass band at the default sizes)
// and TAPS = 4 are this design's choices. Output is registered (latency 1),
// computed in full precision and truncated to Q1.15 without saturation.
// Synchronous reset clears the sample history and the outputs.
module poly_interp_fir
  import adt_pkg::*;
#(
  parameter int PH   = PHASES,
  parameter int TAPS = TX_TAPS
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x,
  output sample_t y [PH]
);
  localparam int ACC_W = DW + COEF_W + $clog2(TAPS + 1);

  typedef coef_t ctab_t [PH*TAPS];
  function automatic ctab_t mk_coefs();
    ctab_t t;
    for (int j = 0; j < PH * TAPS; j++) t[j] = interp_coef(j, PH, TAPS);
    return t;
  endfunction
  localparam ctab_t H = mk_coefs();

  sample_t hist [TAPS];   // hist[0] = x(t), hist[j] = x(t-j)

  assign hist[0] = x;
  for (genvar j = 1; j < TAPS; j++) begin : g_hist
    always_ff @(posedge clk) begin
      if (rst) hist[j] <= '0;
      else     hist[j] <= hist[j-1];
    end
  end

  for (genvar p = 0; p < PH; p++) begin : g_phase
    logic signed [ACC_W-1:0] acc;
    always_comb begin
      acc = '0;
      for (int j = 0; j < TAPS; j++)
        acc += ACC_W'(hist[j]) * ACC_W'(H[p + j * PH]);
    end
    always_ff @(posedge clk) begin
      if (rst) y[p] <= '0;
      else     y[p] <= sample_t'(acc >>> COEF_FRAC);
    end
  end
endmodule
