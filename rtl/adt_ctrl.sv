// adt_ctrl - enable controller of the transmitter pipeline.
//
// After `run` rises, a cycle counter raises each block's enable in the
// clock where the first valid data reach that block, and keeps it high:
//   en_src   (source read),   at count 0
//   en_dds   (DDS / upconversion), at count L_DDS
//   en_deint (de-interleaver counter start), at count L_DEINT
//   en_dsm   (delta-sigma block counter start), at count L_DSM
//   en_int   (interleaver counter start), at count L_INT
//   tx_valid (first valid word to the serializer), at count L_VALID
// The latencies are parameters set by the transmitter that instantiates the
// controller. Dropping `run` (or reset) returns everything to idle.
// The design has a controller block that starts the pipeline blocks in
// turn; its counter-based form and the latency values are this design's
// own, derived from the latencies of the blocks.
module adt_ctrl #(
  parameter int L_DDS   = 0,
  parameter int L_DEINT = 3,
  parameter int L_DSM   = 66,
  parameter int L_INT   = 4099,
  parameter int L_VALID = 4162
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  output logic en_src,
  output logic en_dds,
  output logic en_deint,
  output logic en_dsm,
  output logic en_int,
  output logic tx_valid
);
  localparam int CW = $clog2(L_VALID + 1) + 1;
  logic [CW-1:0] cyc;

  always_ff @(posedge clk) begin
    if (rst || !run)               cyc <= '0;
    else if (cyc != CW'(L_VALID))  cyc <= cyc + 1'b1;
  end

  assign en_src   = run;
  assign en_dds   = run && (cyc >= CW'(L_DDS));
  assign en_deint = run && (cyc >= CW'(L_DEINT));
  assign en_dsm   = run && (cyc >= CW'(L_DSM));
  assign en_int   = run && (cyc >= CW'(L_INT));
  assign tx_valid = run && (cyc >= CW'(L_VALID));
endmodule
