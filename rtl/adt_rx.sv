// adt_rx - all-digital receiver of the point-to-point link.
//
// Recovers baseband I/Q (one sample per clock) from the PH received bits
// per clock delivered by the deserializer. The signal is first brought down
// to baseband with a polyphase DDS identical to the transmitter's and a
// multiplexer downconverter (rx_downconv), then low-pass filtered and
// decimated by PH with one poly_decim_fir per branch; downconverting first
// lets a low-pass filter do the job of a band-pass one.
// With the transmitter's conventions (bit 1 = negative level,
// u = sin*I - cos*Q) and the two DDS in phase, the outputs are about
// i_out = -I/4 and q_out = +Q/4 (a bit b in {0,1} equals (1 - y)/2, and
// the sin^2 and cos^2 averages contribute 1/2 each).
// Timing: DDS samples reach the downconverter 2 clocks after `en`; the
// output follows the received word by 2 + log2(PH) clocks.
module adt_rx
  import adt_pkg::*;
#(
  parameter int PH   = PHASES,
  parameter int TAPS = RX_TAPS,
  parameter int AW   = DDS_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [AW-1:0] step,
  input  logic [PH-1:0] rx_word,
  output sample_t       i_out,
  output sample_t       q_out
);
  sample_t s [PH], c [PH], di [PH], dq [PH];

  dds_poly #(.PH(PH), .AW(AW)) u_dds (.clk(clk), .rst(rst), .en(en), .step(step),
                                      .sin_o(s), .cos_o(c));

  rx_downconv #(.PH(PH)) u_mix (.clk(clk), .rst(rst), .bits(rx_word), .sin_in(s), .cos_in(c),
                                .i_o(di), .q_o(dq));

  poly_decim_fir #(.PH(PH), .TAPS(TAPS)) u_fir_i (.clk(clk), .rst(rst), .x(di), .y(i_out));
  poly_decim_fir #(.PH(PH), .TAPS(TAPS)) u_fir_q (.clk(clk), .rst(rst), .x(dq), .y(q_out));
endmodule
