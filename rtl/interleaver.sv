// interleaver - inverse corner turn after the polyphase delta-sigma modulator.
//
// Input: over PH clocks, phase c carries samples c*PH .. c*PH+PH-1 of a
// group of PH*PH samples (k = PH contiguous samples per phase). Output: the
// same samples in time order, PH per clock (dout[p] is sample PH*t + p).
// Structure as in the design description: input phase c is delayed by c
// clocks, a wrapping counter 0..PH-1 drives the multiplexer selects with one
// clock of extra delay per multiplexer (computed as (count - m) mod PH), and
// output phase m is delayed by PH-1-m clocks to align the phases.
// Timing: the counter starts at 0 in the first clock with `en` high, which
// must carry the first word of a group. Output word g*PH + i appears at
// clock g*PH + PH-1 + i (latency PH-1).
// Delays, counter and multiplexers follow the design; the start-up behaviour
// (counter reset, enable) is this design's choice.
module interleaver #(
  parameter int PH = 64,
  parameter int W  = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] din  [PH],
  output logic [W-1:0] dout [PH]
);
  localparam int CW = (PH > 1) ? $clog2(PH) : 1;

  logic [CW-1:0] cnt;
  logic [W-1:0]  skew [PH];
  logic [W-1:0]  mx   [PH];

  always_ff @(posedge clk) begin
    if (rst)     cnt <= '0;
    else if (en) cnt <= (cnt == CW'(PH - 1)) ? '0 : cnt + 1'b1;
  end

  for (genvar p = 0; p < PH; p++) begin : g_ph
    logic [CW:0]   sum;
    logic [CW-1:0] sel;
    delay_line #(.W(W), .DEPTH(p)) u_skew (.clk(clk), .din(din[p]), .dout(skew[p]));
    assign sum   = {1'b0, cnt} + (CW+1)'(PH - p);            // (cnt - p) mod PH
    assign sel   = (sum >= (CW+1)'(PH)) ? CW'(sum - (CW+1)'(PH)) : CW'(sum);
    assign mx[p] = skew[sel];
    delay_line #(.W(W), .DEPTH(PH - 1 - p)) u_align (.clk(clk), .din(mx[p]), .dout(dout[p]));
  end
endmodule
