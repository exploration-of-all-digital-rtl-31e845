// dds_poly - polyphase direct digital synthesis (DDS).
//
// Produces, every clock, PH consecutive samples of a sine and a cosine wave:
// sin_o[i] = sin(2*pi*n*step/2^AW) for sample n = PH*t + i, cos_o likewise.
// The output frequency is f = step / 2^AW * fs (fs = PH * f_clk); with the
// default sizes step = 256 gives the 2 GHz carrier of an 8 GS/s stream.
// As in the design description there are PH sub-blocks, each with its own
// sine ROM, cosine ROM (one full period, 2^AW entries) and control logic: a
// phase accumulator advanced by PH*step per clock plus the sub-block's own
// offset idx*step, so sub-block idx reads address idx*step + acc.
// A Step register loads `step` while `en` is high and the accumulators and
// ROMs run one clock later; the first samples (n = 0 .. PH-1) appear at the
// outputs two clocks after `en` first rises. Accumulators reset to zero.
// The ROM depth (2^10) and the 16-bit Q1.15 amplitude are this design's
// choices.
module dds_poly
  import adt_pkg::*;
#(
  parameter int PH = PHASES,
  parameter int AW = DDS_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [AW-1:0] step,
  output sample_t       sin_o [PH],
  output sample_t       cos_o [PH]
);
  typedef sample_t tab_t [2**AW];
  function automatic tab_t mk_tab(bit cosine);
    tab_t t;
    for (int a = 0; a < 2**AW; a++) t[a] = dds_entry(a, AW, cosine);
    return t;
  endfunction
  localparam tab_t SIN_TAB = mk_tab(1'b0);
  localparam tab_t COS_TAB = mk_tab(1'b1);

  logic [AW-1:0] step_q;   // Step register
  logic          run;

  always_ff @(posedge clk) begin
    if (rst) begin
      step_q <= '0;
      run    <= 1'b0;
    end else begin
      run <= en;
      if (en) step_q <= step;
    end
  end

  for (genvar i = 0; i < PH; i++) begin : g_sub
    logic [AW-1:0] acc, addr;
    assign addr = AW'(i) * step_q + acc;   // modulo 2^AW
    always_ff @(posedge clk) begin
      if (rst) begin
        acc      <= '0;
        sin_o[i] <= '0;
        cos_o[i] <= '0;
      end else if (run) begin
        acc      <= acc + AW'(PH * int'(step_q));
        sin_o[i] <= SIN_TAB[addr];
        cos_o[i] <= COS_TAB[addr];
      end
    end
  end
endmodule
