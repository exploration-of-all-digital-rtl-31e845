// tb_dds_poly - self-checking test of the polyphase DDS.
//
// The default 64-phase DDS is enabled with Step = 256 (fs/4, the 2 GHz
// carrier) and, after a reset, with Step = 37. Two clocks after `en`
// rises, output phase i of the m-th word must be round(32767 * sin/cos(
// 2*pi*(n*step mod 1024)/1024)) for sample n = 64*m + i. The model computes
// the phase from the absolute sample number, not by accumulation.
// Provenance: the polyphase phase arrangement follows the design; the table size is
// this design's.
module tb_dds_poly;
  import adt_pkg::*;
  localparam int NW = 300;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [9:0] step;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_t s [64], c [64];
  dds_poly dut (.clk(clk), .rst(rst), .en(en), .step(step), .sin_o(s), .cos_o(c));

  function automatic int ref_val(longint n, int st, bit cosine);
    real ph;
    ph = 2.0 * PI * real'((n * st) % 1024) / 1024.0;
    return int'($floor(32767.0 * (cosine ? $cos(ph) : $sin(ph)) + 0.5));
  endfunction

  task automatic run_step(int st);
    rst = 1'b1; en = 1'b0; step = 10'(st);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    en = 1'b1;                       // en high during clock 0
    @(posedge clk); #1;              // clock 1
    @(posedge clk); #1;              // clock 2: word 0
    for (int m = 0; m < NW; m++) begin
      for (int i = 0; i < 64; i++) begin
        checks += 2;
        if (int'(s[i]) != ref_val(64 * m + i, st, 1'b0) || int'(c[i]) != ref_val(64 * m + i, st, 1'b1)) begin
          failures++;
          if (failures < 10) $display("step=%0d m=%0d i=%0d sin=%0d cos=%0d exp %0d %0d", st, m, i, s[i], c[i],
                                      ref_val(64 * m + i, st, 1'b0), ref_val(64 * m + i, st, 1'b1));
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2 * NW + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_step(256);
    run_step(37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
