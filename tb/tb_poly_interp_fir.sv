// tb_poly_interp_fir - self-checking test of the polyphase interpolator.
//
// Random Q1.15 input, one sample per clock, into an 8-phase/4-tap and the
// default 64-phase/4-tap filter. The reference is the textbook form:
// upsample by PH with zero insertion, convolve with the full prototype, and
// compare output sample n = PH*t + p with y[p] one clock after x(t).
// The per-phase DC gain is also checked (a constant input must come out
// within 3% on every phase).
// Provenance: the polyphase structure follows the design; the prototype is this
// design's.
module tb_poly_interp_fir;
  import adt_pkg::*;
  localparam int NCYC = 600;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sample_t x, y8 [8], y64 [64];
  int      xs [NCYC];

  poly_interp_fir #(.PH(8), .TAPS(4)) dut8  (.clk(clk), .rst(rst), .x(x), .y(y8));
  poly_interp_fir                     dut64 (.clk(clk), .rst(rst), .x(x), .y(y64));

  // reference output sample n of the upsampled-and-filtered stream
  function automatic int ref_out(int ph, int n);
    longint acc;
    acc = 0;
    for (int m = 0; m < ph * 4; m++) begin
      int k;
      k = n - m;
      if (k >= 0 && k % ph == 0) acc += longint'(interp_coef(m, ph, 4)) * longint'(xs[k / ph]);
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
    for (int t = 0; t < NCYC; t++) xs[t] = (t >= NCYC - 20) ? 16000 : int'($urandom_range(0, 40000)) - 20000;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      x = sample_t'(xs[t]);
      @(posedge clk); #1;
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (int'(y8[p]) != ref_out(8, 8 * t + p)) begin
          failures++; if (failures < 10) $display("PH8 t=%0d p=%0d y=%0d exp %0d", t, p, y8[p], ref_out(8, 8 * t + p));
        end
      end
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (int'(y64[p]) != ref_out(64, 64 * t + p)) begin
          failures++; if (failures < 10) $display("PH64 t=%0d p=%0d y=%0d exp %0d", t, p, y64[p], ref_out(64, 64 * t + p));
        end
      end
    end
    // constant input for the last 20 samples: DC gain about 1 on every phase
    for (int p = 0; p < 64; p++) begin
      checks++;
      if (y64[p] < 15520 || y64[p] > 16480) begin
        failures++; $display("DC gain phase %0d: %0d", p, y64[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
