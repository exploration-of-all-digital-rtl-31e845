// deinterleaver - corner turn that gives every delta-sigma core k = PH
// consecutive samples.
//
// Input: PH samples per clock in time order (din[p] is sample PH*t + p).
// Output: over PH clocks, output phase c carries samples c*PH .. c*PH+PH-1
// of a group of PH*PH samples, one per clock, so that each core of the
// polyphase delta-sigma modulator sees a contiguous stretch of the signal.
// Structure as in the design description: input phase p is delayed by p
// clocks; a counter running 0..PH-1 drives the select of every multiplexer,
// delayed by one clock per multiplexer (computed here as (count - c) mod PH,
// which is the same value); multiplexer c picks input phase sel; output
// phase c is then delayed by PH-1-c clocks so that all phases line up.
// Timing: the counter starts at 0 in the first clock with `en` high, which
// must carry the first word of a group. Output group g begins PH-1 clocks
// after input group g began: at clock g*PH + PH-1 + i, dout[c] holds sample
// g*PH*PH + c*PH + i.
// Delays, counter and multiplexers follow the design; the word width is a
// parameter and the start-up behaviour (counter reset, enable) is this
// design's choice.
module deinterleaver #(
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
