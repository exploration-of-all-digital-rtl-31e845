// rx_downconv - downconverter of the all-digital receiver.
//
// The received signal is one bit per sample, so the multiplications by the
// local sine and cosine reduce to multiplexers, as the design describes:
// for each phase p, i_o[p] = bits[p] ? sin_in[p] : 0 and
// q_o[p] = bits[p] ? cos_in[p] : 0. The same received phases feed both
// branches. Outputs registered: latency 1 clock. Synchronous reset.
module rx_downconv
  import adt_pkg::*;
#(
  parameter int PH = PHASES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PH-1:0] bits,
  input  sample_t       sin_in [PH],
  input  sample_t       cos_in [PH],
  output sample_t       i_o    [PH],
  output sample_t       q_o    [PH]
);
  for (genvar p = 0; p < PH; p++) begin : g_ph
    always_ff @(posedge clk) begin
      if (rst) begin
        i_o[p] <= '0;
        q_o[p] <= '0;
      end else begin
        i_o[p] <= bits[p] ? sin_in[p] : '0;
        q_o[p] <= bits[p] ? cos_in[p] : '0;
      end
    end
  end
endmodule
