// tb_upconverter - self-checking test of the upconversion stage.
//
// Random Q1.15 I, Q, sine and cosine values on all 64 phases; one clock
// later each phase must hold floor((sin*I - cos*Q) / 2^19), the Q5.11
// result, computed here in 64-bit integers.
// Provenance: the equation follows the design; the formats are this design's.
module tb_upconverter;
  import adt_pkg::*;
  localparam int NCYC = 2000;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_t i_in [64], q_in [64], s [64], c [64];
  dsm_t    u [64];
  longint  expv [64];

  upconverter dut (.clk(clk), .i_in(i_in), .q_in(q_in), .sin_in(s), .cos_in(c), .u(u));

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NCYC; t++) begin
      for (int p = 0; p < 64; p++) begin
        longint d;
        i_in[p] = sample_t'($urandom); q_in[p] = sample_t'($urandom);
        s[p]    = sample_t'($urandom); c[p]    = sample_t'($urandom);
        if (t % 3 == 0) begin             // in-range values too
          i_in[p] = sample_t'($urandom_range(0, 32767) - 16384);
          q_in[p] = sample_t'($urandom_range(0, 32767) - 16384);
        end
        d = longint'(s[p]) * longint'(i_in[p]) - longint'(c[p]) * longint'(q_in[p]);
        expv[p] = d >>> 19;
      end
      @(posedge clk); #1;
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (u[p] !== dsm_t'(expv[p])) begin
          failures++;
          if (failures < 10) $display("t=%0d p=%0d u=%0d exp %0d", t, p, u[p], expv[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
