// p2p_link - FPGA side of the delta-sigma optical point-to-point link.
//
// Transmit path: bb_rom -> adt_rf_tx -> mgt_tx_word (PH bits per clock to
// the serializer; an electro-optical transceiver, fibre and photodiode sit
// outside). Receive path: mgt_rx_word (from the deserializer) -> adt_rx ->
// rx_i / rx_q (to a logic analyser). A processor sets the DDS Step and the
// run bit through step_reg (cpu_* ports); transmitter and receiver use the
// same Step and are started by the same run bit, so at step*PH = 0 mod
// 2^AW (e.g. the 2 GHz carrier) the two DDS stay in phase whatever the
// link delay is a whole number of clocks.
// The chain of blocks follows the design; the register map of step_reg and
// sharing one run bit between transmitter and receiver are this design's
// choices.
module p2p_link
  import adt_pkg::*;
#(
  parameter int PH       = PHASES,
  parameter int TX_T     = TX_TAPS,
  parameter int RX_T     = RX_TAPS,
  parameter int AW       = DDS_AW,
  parameter int ROM_DEPTH = 4096,
  parameter int QAM_BITS = 4,
  parameter int SPS      = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cpu_we,
  input  logic          cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic [31:0]   cpu_rdata,
  output logic [PH-1:0] mgt_tx_word,
  output logic          mgt_tx_valid,
  input  logic [PH-1:0] mgt_rx_word,
  output sample_t       rx_i,
  output sample_t       rx_q
);
  logic [AW-1:0] step;
  logic          run, src_en;
  sample_t       bi, bq;

  step_reg #(.AW(AW)) u_reg (.clk(clk), .rst(rst), .we(cpu_we), .addr(cpu_addr),
                             .wdata(cpu_wdata), .rdata(cpu_rdata), .step(step), .run(run));

  bb_rom #(.DEPTH(ROM_DEPTH), .QAM_BITS(QAM_BITS), .SPS(SPS)) u_rom (
    .clk(clk), .rst(rst || !run), .en(src_en), .i_out(bi), .q_out(bq));

  adt_rf_tx #(.PH(PH), .TAPS(TX_T), .AW(AW)) u_tx (
    .clk(clk), .rst(rst || !run), .run(run), .step(step), .i_in(bi), .q_in(bq),
    .src_en(src_en), .tx_word(mgt_tx_word), .tx_valid(mgt_tx_valid));

  adt_rx #(.PH(PH), .TAPS(RX_T), .AW(AW)) u_rx (
    .clk(clk), .rst(rst || !run), .en(run), .step(step), .rx_word(mgt_rx_word),
    .i_out(rx_i), .q_out(rx_q));
endmodule
