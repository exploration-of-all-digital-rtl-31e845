// delay_line - fixed delay of DEPTH clocks for a W-bit word.
//
// Used for the skew and alignment delays of the de-interleaver, the
// interleaver and the polyphase delta-sigma modulator, where delays reach
// thousands of clocks. It is a circular buffer: one memory word is read and
// overwritten per clock, so dout(t) = din(t - DEPTH). On an FPGA this maps
// to distributed (LUT) memory or shift-register LUTs. DEPTH = 0 is a wire.
// Neither buffer nor pointer is reset (the pointer wraps with >=, so any
// start value is harmless): for the first DEPTH clocks the output is stale
// data, which the surrounding blocks ignore because their enables start only
// when valid data arrive.
// The delays are those the design asks for; building them as circular
// buffers is this design's choice.
module delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else if (DEPTH == 1) begin : g_reg
    always_ff @(posedge clk) dout <= din;
  end else begin : g_ring
    localparam int PW = $clog2(DEPTH);
    logic [W-1:0]  mem [DEPTH];
    logic [PW-1:0] ptr;
    always_ff @(posedge clk) begin
      mem[ptr] <= din;
      ptr      <= (ptr >= PW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
    assign dout = mem[ptr];
  end
endmodule
