// adt_bb_tx - baseband-stage all-digital transmitter (fs/4 upconversion).
//
// Here the delta-sigma modulation is done at baseband, separately on I and
// Q, and the upconversion comes last; the carrier is fixed at a quarter of
// the serial rate, where upconversion needs no multipliers and keeps the
// two-level signal two-level. Per clock (200 MHz by default):
//   i_in, q_in (Q1.15, one sample per clock)
//   -> zero-order-hold interpolation: the sample is copied to PH phases
//      (x16 -> 3.2 GS/s) and scaled to the Q5.11 loop format
//   -> deinterleaver -> dsm_bank (PH cores, state propagation, H(z) =
//      -2z^-1 + z^-2, NTF = (1 - z^-1)^2, low-pass noise shaping)
//   -> interleaver, separately for I and Q
//   -> fs/4 upconversion: every I/Q bit pair becomes the four serial bits
//      [I, ~Q, ~I, Q], i.e. multiplication by cos/sin = [1,0,-1,0] /
//      [0,1,0,-1] and summation.
// tx_word therefore carries 4*PH bits per clock, bit 0 first; bit value 1 is
// the negative level. Replicating each I/Q pair into four bits (serial rate
// 4 x 3.2 = 12.8 Gbit/s, carrier 3.2 GHz) is this design's reading of the
// description. Timing: the enables follow adt_ctrl; tx_valid rises
// 2 + (PH-1) + (PH-1)*PH + 1 + (PH-1) clocks after run (273 at PH = 16).
module adt_bb_tx
  import adt_pkg::*;
#(
  parameter int PH = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            run,
  input  sample_t         i_in,
  input  sample_t         q_in,
  output logic            src_en,
  output logic [4*PH-1:0] tx_word,
  output logic            tx_valid
);
  localparam int L_DEINT = 2;
  localparam int L_DSM   = L_DEINT + PH - 1;
  localparam int L_INT   = L_DSM + (PH - 1) * PH + 1;
  localparam int L_VALID = L_INT + PH - 1;

  logic en_dds, en_deint, en_dsm, en_int;

  adt_ctrl #(.L_DDS(0), .L_DEINT(L_DEINT), .L_DSM(L_DSM), .L_INT(L_INT), .L_VALID(L_VALID))
  u_ctrl (.clk(clk), .rst(rst), .run(run), .en_src(src_en), .en_dds(en_dds),
          .en_deint(en_deint), .en_dsm(en_dsm), .en_int(en_int), .tx_valid(tx_valid));

  // zero-order hold, Q1.15 -> Q5.11
  dsm_t zi, zq;
  always_ff @(posedge clk) begin
    if (rst) begin
      zi <= '0;
      zq <= '0;
    end else begin
      zi <= dsm_t'(i_in >>> (DW - 1 - DSM_FRAC));
      zq <= dsm_t'(q_in >>> (DW - 1 - DSM_FRAC));
    end
  end

  logic [DSM_W-1:0] hi [PH], hq [PH], di [PH], dq [PH];
  dsm_t             xi [PH], xq [PH];
  logic [PH-1:0]    yi, yq;
  logic [0:0]       bi [PH], bq [PH], oi [PH], oq [PH];

  for (genvar p = 0; p < PH; p++) begin : g_ph
    assign hi[p] = zi;
    assign hq[p] = zq;
    assign xi[p] = dsm_t'(di[p]);
    assign xq[p] = dsm_t'(dq[p]);
    assign bi[p] = yi[p];
    assign bq[p] = yq[p];
    assign tx_word[4*p]   =  oi[p][0];
    assign tx_word[4*p+1] = ~oq[p][0];
    assign tx_word[4*p+2] = ~oi[p][0];
    assign tx_word[4*p+3] =  oq[p][0];
  end

  deinterleaver #(.PH(PH), .W(DSM_W)) u_deint_i (.clk(clk), .rst(rst), .en(en_deint), .din(hi), .dout(di));
  deinterleaver #(.PH(PH), .W(DSM_W)) u_deint_q (.clk(clk), .rst(rst), .en(en_deint), .din(hq), .dout(dq));

  dsm_bank #(.PH(PH), .K(PH), .H1(-2), .H2(1), .H3(0), .H4(0)) u_dsm_i (
    .clk(clk), .rst(rst), .en(en_dsm), .x(xi), .y(yi));
  dsm_bank #(.PH(PH), .K(PH), .H1(-2), .H2(1), .H3(0), .H4(0)) u_dsm_q (
    .clk(clk), .rst(rst), .en(en_dsm), .x(xq), .y(yq));

  interleaver #(.PH(PH), .W(1)) u_int_i (.clk(clk), .rst(rst), .en(en_int), .din(bi), .dout(oi));
  interleaver #(.PH(PH), .W(1)) u_int_q (.clk(clk), .rst(rst), .en(en_int), .din(bq), .dout(oq));
endmodule
