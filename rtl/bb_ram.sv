// bb_ram - run-time loadable baseband source of the baseband-stage ADT.
//
// A simple dual-port RAM of 2^AW words {I, Q} (Q1.15 each). The host writes
// words through the write port at any time; while `en` is high the read
// side streams words 0 .. len-1 in a loop, one per clock, with one clock of
// latency (len = 0 means the whole RAM). Depth and the host port are this
// design's choices; the point of the RAM, new data without rebuilding the
// design, follows the design description. Synchronous reset of the read
// address and output register; the memory itself is not reset.
module bb_ram
  import adt_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW:0]   len,
  input  logic          en,
  output sample_t       i_out,
  output sample_t       q_out
);
  logic [31:0]   mem [2**AW];
  logic [AW-1:0] raddr;
  logic [31:0]   rd;
  logic [AW:0]   last;

  assign last = (len == '0) ? (AW+1)'(2**AW - 1) : len - 1'b1;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      raddr <= '0;
      rd    <= '0;
    end else if (en) begin
      rd    <= mem[raddr];
      raddr <= ((AW+1)'(raddr) >= last) ? '0 : raddr + 1'b1;
    end
  end

  assign i_out = sample_t'(rd[31:16]);
  assign q_out = sample_t'(rd[15:0]);
endmodule
