// tb_bb_rom - self-checking test of the baseband ROM.
//
// An independent model regenerates the symbol sequence (16-bit Fibonacci
// LFSR, taps 16/14/13/11, seed 0xACE1, QAM_BITS shifts per symbol, I from
// the upper bits) and the square-QAM levels. The ROM is read for more than
// one full period (checking the wrap) with 16-QAM, SPS 64 (defaults) and
// 64-QAM, SPS 8; output follows `en` by one clock and holds while en is
// low.
// Provenance: the ROM contents are this design's own test signal.
module tb_bb_rom;
  import adt_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_t i16, q16, i64, q64;
  bb_rom                                        dut16 (.clk(clk), .rst(rst), .en(en), .i_out(i16), .q_out(q16));
  bb_rom #(.DEPTH(1000), .QAM_BITS(6), .SPS(8)) dut64 (.clk(clk), .rst(rst), .en(en), .i_out(i64), .q_out(q64));

  function automatic void ref_sample(int n, int depth, int qb, int sps, output int ri, output int rq);
    logic [15:0] l;
    int sym, lv, mi, mq, nn;
    l  = 16'hACE1;
    lv = 1 << (qb / 2);
    nn = n % depth;
    sym = 0;
    for (int s = 0; s <= nn / sps; s++) begin
      sym = 0;
      for (int b = 0; b < qb; b++) begin
        sym = (sym << 1) | l[0];
        l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
      end
    end
    mi = sym >> (qb / 2);
    mq = sym % lv;
    ri = int'($floor(real'(2 * mi - (lv - 1)) / real'(lv - 1) * 0.5 * 32768.0 + 0.5));
    rq = int'($floor(real'(2 * mq - (lv - 1)) / real'(lv - 1) * 0.5 * 32768.0 + 0.5));
    if (ri > 32767) ri = 32767;
    if (rq > 32767) rq = 32767;
  endfunction

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ri, rq, n;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    for (int t = 0; t < 4300; t++) begin
      en = (t % 97 != 50);               // a few idle clocks
      @(posedge clk); #1;
      if (en) begin
        ref_sample(n, 4096, 4, 64, ri, rq);
        checks++;
        if (int'(i16) != ri || int'(q16) != rq) begin
          failures++; if (failures < 10) $display("16QAM n=%0d got %0d,%0d exp %0d,%0d", n, i16, q16, ri, rq);
        end
        ref_sample(n, 1000, 6, 8, ri, rq);
        checks++;
        if (int'(i64) != ri || int'(q64) != rq) begin
          failures++; if (failures < 10) $display("64QAM n=%0d got %0d,%0d exp %0d,%0d", n, i64, q64, ri, rq);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
