// tb_poly_decim_fir - self-checking test of the polyphase decimator.
//
// Random Q1.15 samples, PH per clock, into an 8-phase/2-tap and the default
// 64-phase/1-tap filter. Reference: the full-rate convolution with the
// prototype evaluated at the newest sample of each clock,
// y(t) = floor(sum_m h[m] * s[PH*t + PH-1 - m] / 2^16), which must appear
// 1 + log2(PH) clocks after the input word (4 and 7 clocks). A constant
// input must come out with a gain within 3% of 1.
// Provenance: the sub-filter structure follows the design; the prototype is this
// design's.
module tb_poly_decim_fir;
  import adt_pkg::*;
  localparam int NCYC = 400;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_t x8 [8], x64 [64], y8, y64;
  int      s8 [], s64 [];

  poly_decim_fir #(.PH(8), .TAPS(2)) dut8  (.clk(clk), .rst(rst), .x(x8), .y(y8));
  poly_decim_fir                     dut64 (.clk(clk), .rst(rst), .x(x64), .y(y64));

  function automatic int ref_out(int ph, int taps, int t, const ref int s []);
    longint acc;
    acc = 0;
    for (int m = 0; m < ph * taps; m++) begin
      int k;
      k = ph * t + ph - 1 - m;
      if (k >= 0) acc += longint'(decim_coef(m, ph, taps)) * longint'(s[k]);
    end
    return int'(16'(acc >>> COEF_FRAC));
  endfunction

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s8 = new[NCYC * 8]; s64 = new[NCYC * 64];
    for (int n = 0; n < NCYC * 8; n++)  s8[n]  = (n >= (NCYC - 20) * 8)  ? 12000 : int'($urandom_range(0, 40000)) - 20000;
    for (int n = 0; n < NCYC * 64; n++) s64[n] = (n >= (NCYC - 20) * 64) ? 12000 : int'($urandom_range(0, 40000)) - 20000;
    for (int p = 0; p < 8; p++)  x8[p]  = '0;
    for (int p = 0; p < 64; p++) x64[p] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      for (int p = 0; p < 8; p++)  x8[p]  = sample_t'(s8[8 * t + p]);
      for (int p = 0; p < 64; p++) x64[p] = sample_t'(s64[64 * t + p]);
      @(posedge clk); #1;
      // output now reflects input clock t+1-(1+log2 PH)
      if (t >= 3) begin
        checks++;
        if (int'(y8) != ref_out(8, 2, t - 3, s8)) begin
          failures++; if (failures < 10) $display("PH8 t=%0d y=%0d exp %0d", t, y8, ref_out(8, 2, t - 3, s8));
        end
      end
      if (t >= 6) begin
        checks++;
        if (int'(y64) != ref_out(64, 1, t - 6, s64)) begin
          failures++; if (failures < 10) $display("PH64 t=%0d y=%0d exp %0d", t, y64, ref_out(64, 1, t - 6, s64));
        end
      end
    end
    checks++;
    if (y64 < 11640 || y64 > 12360) begin failures++; $display("DC gain: %0d", y64); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
