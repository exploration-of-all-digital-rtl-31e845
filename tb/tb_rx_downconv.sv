// tb_rx_downconv - self-checking test of the multiplexer downconverter.
//
// Random received bits and random sine/cosine words on all 64 phases; one
// clock later each I output must equal the sine word where the bit is 1 and
// 0 where it is 0, and likewise Q with the cosine word.
// Provenance: the mixer follows the design.
module tb_rx_downconv;
  import adt_pkg::*;
  localparam int NCYC = 2000;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0, ones = 0;
  always #5 clk = ~clk;

  logic [63:0] bits;
  sample_t s [64], c [64], io [64], qo [64], es [64], ec [64];

  rx_downconv dut (.clk(clk), .rst(rst), .bits(bits), .sin_in(s), .cos_in(c), .i_o(io), .q_o(qo));

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      bits = {$urandom, $urandom};
      for (int p = 0; p < 64; p++) begin
        s[p] = sample_t'($urandom); c[p] = sample_t'($urandom);
        es[p] = bits[p] ? s[p] : 16'sd0;
        ec[p] = bits[p] ? c[p] : 16'sd0;
        if (bits[p]) ones++;
      end
      @(posedge clk); #1;
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (io[p] !== es[p] || qo[p] !== ec[p]) begin
          failures++; if (failures < 10) $display("t=%0d p=%0d", t, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
