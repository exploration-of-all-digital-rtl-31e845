// adt_rf_tx - RF-stage all-digital transmitter of the point-to-point link.
//
// Turns a baseband I/Q stream (one sample per clock, Q1.15) into a 1-bit
// delta-sigma stream on a carrier, PH bits per clock for a serializer
// (64 bits at 125 MHz = 8 Gbit/s by default). Chain:
//   poly_interp_fir (I and Q, x PH)  ->  upconverter with dds_poly
//   (u = sin*I - cos*Q, carrier = step/2^AW * fs)  ->  deinterleaver
//   ->  dsm_bank (PH cores with state propagation, NTF = (1 + z^-2)^2)
//   ->  interleaver  ->  tx_word
// The delta-sigma stage comes after the upconversion, so the carrier can be
// set freely by `step`; the noise notch is fixed at fs/4 (2 GHz).
// adt_ctrl raises the enables as the first data reach each stage:
// source at 0, DDS at 0, de-interleaver at 3, delta-sigma at PH+2, interleaver
// at PH+3+(PH-1)*PH and tx_valid PH-1 clocks later (4162 clocks at PH = 64).
// tx_word bit p is the p-th bit in time of the clock (bit 0 sent first);
// bit value 1 is the negative level.
// The order of the blocks follows the design; the controller latencies,
// bit order and level mapping of tx_word are this design's choice.
module adt_rf_tx
  import adt_pkg::*;
#(
  parameter int PH   = PHASES,
  parameter int TAPS = TX_TAPS,
  parameter int AW   = DDS_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic [AW-1:0] step,
  input  sample_t       i_in,
  input  sample_t       q_in,
  output logic          src_en,
  output logic [PH-1:0] tx_word,
  output logic          tx_valid
);
  localparam int L_DEINT = 3;
  localparam int L_DSM   = L_DEINT + PH - 1;
  localparam int L_INT   = L_DSM + (PH - 1) * PH + 1;
  localparam int L_VALID = L_INT + PH - 1;

  logic en_dds, en_deint, en_dsm, en_int;

  adt_ctrl #(.L_DDS(0), .L_DEINT(L_DEINT), .L_DSM(L_DSM), .L_INT(L_INT), .L_VALID(L_VALID))
  u_ctrl (.clk(clk), .rst(rst), .run(run), .en_src(src_en), .en_dds(en_dds),
          .en_deint(en_deint), .en_dsm(en_dsm), .en_int(en_int), .tx_valid(tx_valid));

  sample_t fi [PH], fq [PH], s [PH], c [PH];
  dsm_t    u  [PH];

  poly_interp_fir #(.PH(PH), .TAPS(TAPS)) u_fir_i (.clk(clk), .rst(rst), .x(i_in), .y(fi));
  poly_interp_fir #(.PH(PH), .TAPS(TAPS)) u_fir_q (.clk(clk), .rst(rst), .x(q_in), .y(fq));

  dds_poly #(.PH(PH), .AW(AW)) u_dds (.clk(clk), .rst(rst), .en(en_dds), .step(step),
                                      .sin_o(s), .cos_o(c));

  upconverter #(.PH(PH)) u_up (.clk(clk), .i_in(fi), .q_in(fq), .sin_in(s), .cos_in(c), .u(u));

  logic [DSM_W-1:0] di [PH], dd [PH];
  dsm_t             dx [PH];
  logic [PH-1:0]    yb;
  logic [0:0]       ib [PH], ob [PH];

  for (genvar p = 0; p < PH; p++) begin : g_conv
    assign di[p]      = u[p];
    assign dx[p]      = dsm_t'(dd[p]);
    assign ib[p]      = yb[p];
    assign tx_word[p] = ob[p][0];
  end

  deinterleaver #(.PH(PH), .W(DSM_W)) u_deint (.clk(clk), .rst(rst), .en(en_deint), .din(di), .dout(dd));

  dsm_bank #(.PH(PH), .K(PH), .H1(0), .H2(2), .H3(0), .H4(1)) u_dsm (
    .clk(clk), .rst(rst), .en(en_dsm), .x(dx), .y(yb));

  interleaver #(.PH(PH), .W(1)) u_int (.clk(clk), .rst(rst), .en(en_int), .din(ib), .dout(ob));
endmodule
