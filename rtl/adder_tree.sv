// adder_tree - pipelined sum of N signed words.
//
// Two-input adders arranged in ceil(log2 N) levels, each level registered,
// so the sum of the inputs presented at clock t appears at clock
// t + ceil(log2 N). N is padded with zeros to a power of two (N - 1 adders
// do real work). Words are W bits wide and the caller sizes W so that no
// level overflows. N = 1 is a wire. Synchronous reset clears the pipeline.
// The design calls for a pipelined tree of adders after the decimation
// sub-filters; its register placement (one per level) is this design's choice.
module adder_tree #(
  parameter int N = 64,
  parameter int W = 40
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din [N],
  output logic signed [W-1:0] sum
);
  localparam int L  = (N > 1) ? $clog2(N) : 0;
  localparam int NP = 1 << L;

  logic signed [W-1:0] t [L+1][NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i < N) begin : g_d
      assign t[0][i] = din[i];
    end else begin : g_z
      assign t[0][i] = '0;
    end
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < NP; i++) begin : g_add
      if (i < (NP >> l)) begin : g_a
        always_ff @(posedge clk) begin
          if (rst) t[l][i] <= '0;
          else     t[l][i] <= t[l-1][2*i] + t[l-1][2*i+1];
        end
      end else begin : g_u
        assign t[l][i] = '0;
      end
    end
  end

  assign sum = t[L][0];
endmodule
