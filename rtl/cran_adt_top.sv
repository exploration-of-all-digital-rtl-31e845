// cran_adt_top - the two all-digital transmitter designs side by side.
//
//  * Point-to-point link (p2p_link), clock clk (125 MHz): RF-stage
//    delta-sigma transmitter with a 64-phase datapath (8 Gbit/s serial
//    stream, carrier set by the DDS Step, 2 GHz nominal) and the matching
//    receiver. The serializer/deserializer words, the processor register
//    port and the receiver output are brought out as ports.
//  * Baseband-stage transmitter for optical upconversion (adt_bb_tx with
//    bb_ram), clock clk_bb (200 MHz): 16-phase baseband delta-sigma for I and
//    Q and fs/4 upconversion, 64 bits per clock to its serializer; the host
//    loads the baseband RAM through the host_* ports.
// The two share nothing but this wrapper; each has its own clock and reset.
// Putting both designs in one top with separate ports is this design's
// choice; each half follows its own description.
module cran_adt_top
  import adt_pkg::*;
(
  // point-to-point link
  input  logic        clk,
  input  logic        rst,
  input  logic        cpu_we,
  input  logic        cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic [63:0] mgt_tx_word,
  output logic        mgt_tx_valid,
  input  logic [63:0] mgt_rx_word,
  output sample_t     rx_i,
  output sample_t     rx_q,
  // baseband-stage transmitter
  input  logic        clk_bb,
  input  logic        rst_bb,
  input  logic        bb_run,
  input  logic        host_we,
  input  logic [11:0] host_waddr,
  input  logic [31:0] host_wdata,
  input  logic [12:0] host_len,
  output logic [63:0] bb_tx_word,
  output logic        bb_tx_valid
);
  p2p_link u_link (
    .clk(clk), .rst(rst), .cpu_we(cpu_we), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .cpu_rdata(cpu_rdata), .mgt_tx_word(mgt_tx_word), .mgt_tx_valid(mgt_tx_valid),
    .mgt_rx_word(mgt_rx_word), .rx_i(rx_i), .rx_q(rx_q));

  logic    bb_en;
  sample_t bb_i, bb_q;

  bb_ram #(.AW(12)) u_ram (
    .clk(clk_bb), .rst(rst_bb || !bb_run), .we(host_we), .waddr(host_waddr), .wdata(host_wdata),
    .len(host_len), .en(bb_en), .i_out(bb_i), .q_out(bb_q));

  adt_bb_tx #(.PH(16)) u_bb_tx (
    .clk(clk_bb), .rst(rst_bb || !bb_run), .run(bb_run), .i_in(bb_i), .q_in(bb_q),
    .src_en(bb_en), .tx_word(bb_tx_word), .tx_valid(bb_tx_valid));
endmodule
