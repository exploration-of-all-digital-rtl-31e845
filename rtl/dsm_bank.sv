// dsm_bank - polyphase delta-sigma modulator with state propagation.
//
// PH dsm_core instances run in parallel, each on its own contiguous block of
// K samples (as delivered by the deinterleaver: at clock g*K + i phase c
// holds sample c*K + i of group g). Core c's input is delayed by c*K clocks,
// so core c starts its block exactly when core c-1 has finished the
// preceding block; in that first clock core c takes over core c-1's filter
// state, which makes the PH cores act like one modulator running through
// the samples in order. Core 0 has no predecessor in time and starts every
// block from a zero state, so the modulator state is broken once every
// K*PH samples (once per group). Core c's output bit is then delayed by
// (PH-1-c)*K clocks so that the phases line up again for the interleaver.
// Timing: `en` high from the first clock that carries group 0. A block
// counter (0..K-1) marks the first clock of each block. Output y[c] of
// group g, sample i, appears at clock g*K + i + (PH-1)*K + 1.
// The alignment delay is the smallest that lines the phases up; it differs
// from the description's formula by a constant. Delays are circular buffers.
module dsm_bank
  import adt_pkg::*;
#(
  parameter int PH = PHASES,
  parameter int K  = PHASES,
  parameter int H1 = 0,
  parameter int H2 = 2,
  parameter int H3 = 0,
  parameter int H4 = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  dsm_t          x [PH],
  output logic [PH-1:0] y
);
  localparam int KW = (K > 1) ? $clog2(K) : 1;

  logic [KW-1:0] bcnt;
  logic          load;
  dsm_t          st [PH+1][4];

  always_ff @(posedge clk) begin
    if (rst)     bcnt <= '0;
    else if (en) bcnt <= (bcnt == KW'(K - 1)) ? '0 : bcnt + 1'b1;
  end
  assign load = en && (bcnt == '0);

  for (genvar j = 0; j < 4; j++) begin : g_zero
    assign st[0][j] = '0;            // core 0 starts each block from zero
  end

  for (genvar c = 0; c < PH; c++) begin : g_core
    dsm_t xd;
    logic yc;
    delay_line #(.W(DSM_W), .DEPTH(c * K)) u_in (.clk(clk), .din(x[c]), .dout(xd));
    dsm_core #(.H1(H1), .H2(H2), .H3(H3), .H4(H4)) u_core (
      .clk(clk), .x(xd), .load(load), .st_in(st[c]), .st_out(st[c+1]), .y(yc));
    delay_line #(.W(1), .DEPTH((PH - 1 - c) * K)) u_out (.clk(clk), .din(yc), .dout(y[c]));
  end
endmodule
