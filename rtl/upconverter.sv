// upconverter - digital upconversion stage of the RF-stage transmitter.
//
// Combines the interpolated I and Q streams into one real signal on the
// carrier, per phase p:  u[p] = sin[p] * i_in[p] - cos[p] * q_in[p]
// (64 multipliers for I, 64 for Q and 64 subtracters at the default size).
// Inputs are Q1.15 (I, Q and the DDS sine/cosine); the difference is formed
// at full precision (Q3.30) and reduced by an arithmetic right shift to the
// Q5.11 format of the delta-sigma loop (truncation, no saturation needed).
// Output registered: latency 1 clock.
// The equation and the 128 multipliers follow the design; the word formats
// and the shift are this design's choice.
module upconverter
  import adt_pkg::*;
#(
  parameter int PH = PHASES
) (
  input  logic    clk,
  input  sample_t i_in   [PH],
  input  sample_t q_in   [PH],
  input  sample_t sin_in [PH],
  input  sample_t cos_in [PH],
  output dsm_t    u      [PH]
);
  localparam int SH = 2 * (DW - 1) - DSM_FRAC;   // Q*.30 -> Q*.11

  for (genvar p = 0; p < PH; p++) begin : g_ph
    logic signed [2*DW:0] d;
    assign d = (2*DW+1)'(sin_in[p]) * (2*DW+1)'(i_in[p])
                 - (2*DW+1)'(cos_in[p]) * (2*DW+1)'(q_in[p]);
    always_ff @(posedge clk) u[p] <= dsm_t'(d >>> SH);
  end
endmodule
