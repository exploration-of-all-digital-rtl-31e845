// poly_decim_fir - polyphase decimation FIR filter (decimation by PH).
//
// PH input samples arrive per clock (x[p] is the p-th in time) and one
// filtered sample leaves per clock. The prototype low-pass filter h[] of
// PH*TAPS coefficients is dealt out to PH sub-filters as the design
// describes: sub-filter f holds h[f], h[f+PH], h[f+2*PH], ... Sub-filter f
// is fed input phase PH-1-f, so that the total is the prototype's
// convolution evaluated at the newest sample of each clock:
//   y(t) = sum_m h[m] * s[PH*t + PH-1 - m],  s = the input stream.
// The PH sub-filter outputs are then summed by a pipelined tree of PH-1
// two-input adders. Prototype (Hamming-windowed sinc, total DC gain 1) and
// TAPS = 1 are this design's choices. Timing: products registered (1 clock),
// then log2(PH) adder levels; the output is full-precision sum >>> 16,
// truncated to Q1.15. Synchronous reset.
module poly_decim_fir
  import adt_pkg::*;
#(
  parameter int PH   = PHASES,
  parameter int TAPS = RX_TAPS
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x [PH],
  output sample_t y
);
  localparam int AW = DW + COEF_W + $clog2(PH * TAPS + 1);

  typedef coef_t ctab_t [PH*TAPS];
  function automatic ctab_t mk_coefs();
    ctab_t t;
    for (int j = 0; j < PH * TAPS; j++) t[j] = decim_coef(j, PH, TAPS);
    return t;
  endfunction
  localparam ctab_t H = mk_coefs();

  logic signed [AW-1:0] part [PH];
  logic signed [AW-1:0] sum;

  for (genvar f = 0; f < PH; f++) begin : g_sub
    sample_t hist [TAPS];          // hist[j] = input phase PH-1-f, j clocks ago
    logic signed [AW-1:0] acc;
    assign hist[0] = x[PH-1-f];
    for (genvar j = 1; j < TAPS; j++) begin : g_h
      always_ff @(posedge clk) begin
        if (rst) hist[j] <= '0;
        else     hist[j] <= hist[j-1];
      end
    end
    always_comb begin
      acc = '0;
      for (int j = 0; j < TAPS; j++) acc += AW'(hist[j]) * AW'(H[f + j * PH]);
    end
    always_ff @(posedge clk) begin
      if (rst) part[f] <= '0;
      else     part[f] <= acc;
    end
  end

  adder_tree #(.N(PH), .W(AW)) u_tree (.clk(clk), .rst(rst), .din(part), .sum(sum));

  assign y = sample_t'(sum >>> COEF_FRAC);
endmodule
