// dsm_core - one error-feedback delta-sigma modulator core (1-bit output).
//
// Loop (filter in the feedback path, so STF = 1 and NTF = 1 + H(z)):
//   v[n] = x[n] - H(e)[n],   H(z) = H1 z^-1 + H2 z^-2 + H3 z^-3 + H4 z^-4
//   y[n] = sign of v[n]      (output bit 1 = level -1, bit 0 = level +1)
//   e[n] = v[n] - y[n]
// The defaults give H(z) = 2z^-2 + z^-4, i.e. NTF = (1 + z^-2)^2 with its
// noise notch at fs/4 (2 GHz at 8 GS/s); H1=-2, H2=1 gives the low-pass
// NTF 1 - 2z^-1 + z^-2 of the baseband-stage transmitter.
// Quantizer, as the design describes it: v is Q5.11; its top bit is the
// output bit; the error's integer part comes from a 16-entry table addressed
// by the four low integer bits (valid for |v| < 8, which a stable loop
// keeps), and the fraction bits pass through unchanged.
// State propagation: the filter state is the four past errors
// e[n-1..n-4], visible on st_out. When `load` is high (first sample of a
// block) the loop uses st_in, the final state of the previous core, instead
// of its own state; otherwise its own. Output bit registered: latency 1.
module dsm_core
  import adt_pkg::*;
#(
  parameter int H1 = 0,
  parameter int H2 = 2,
  parameter int H3 = 0,
  parameter int H4 = 1
) (
  input  logic clk,
  input  dsm_t x,
  input  logic load,
  input  dsm_t st_in  [4],
  output dsm_t st_out [4],
  output logic y
);
  localparam int SW = DSM_W + 4;   // headroom for |H| sums up to 15

  typedef logic signed [3:0] qe_t;
  typedef qe_t qtab_t [16];
  function automatic qtab_t mk_qtab();
    qtab_t t;
    for (int a = 0; a < 16; a++) t[a] = qerr_entry(a);
    return t;
  endfunction
  localparam qtab_t QERR = mk_qtab();

  dsm_t                 st [4];    // own state e[n-1..n-4]
  dsm_t                 s  [4];    // state used in this sample
  logic signed [SW-1:0] hsum;
  dsm_t                 v, e;

  always_comb begin
    for (int j = 0; j < 4; j++) s[j] = load ? st_in[j] : st[j];
    hsum = SW'(H1) * SW'(s[0]) + SW'(H2) * SW'(s[1])
         + SW'(H3) * SW'(s[2]) + SW'(H4) * SW'(s[3]);
    v    = dsm_t'(SW'(x) - hsum);
    e    = {{(DSM_INT-4){QERR[v[DSM_W-2:DSM_FRAC]][3]}}, QERR[v[DSM_W-2:DSM_FRAC]],
            v[DSM_FRAC-1:0]};
  end

  always_ff @(posedge clk) begin
    st[0] <= e;
    st[1] <= s[0];
    st[2] <= s[1];
    st[3] <= s[2];
    y     <= v[DSM_W-1];
  end

  assign st_out = st;
endmodule
