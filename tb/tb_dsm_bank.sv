// tb_dsm_bank - self-checking test of the polyphase delta-sigma modulator.
//
// A test signal (sine of amplitude 0.45 plus small noise, Q5.11) is fed in
// the de-interleaved order the bank expects: at clock g*K + i, phase c gets
// stream sample g*PH*K + c*K + i. The reference is ONE sequential
// error-feedback modulator (H = 2z^-2 + z^-4) running through the stream in
// time order, whose state is cleared every PH*K samples (where core 0 starts
// from zero). With correct state propagation the bank must reproduce it bit
// for bit: y[c] at clock (PH-1)*K + 1 + g*K + i equals reference bit
// g*PH*K + c*K + i. Checked for a 4-phase bank and the default 64-phase
// bank, over several groups; this also checks the latency. State hand-overs
// are counted.
// Provenance: state propagation between cores follows the design.
module tb_dsm_bank;
  import adt_pkg::*;
  localparam int NG   = 3;                 // groups at the default size
  localparam int NCYC = NG * 64 + 63 * 64 + 4;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  int   checks = 0, failures = 0, handovers = 0;
  always #5 clk = ~clk;

  dsm_t          x4 [4], x64 [64];
  logic [3:0]    y4;
  logic [63:0]   y64;

  dsm_bank #(.PH(4), .K(4)) dut4 (.clk(clk), .rst(rst), .en(en), .x(x4), .y(y4));
  dsm_bank                  dut64 (.clk(clk), .rst(rst), .en(en), .x(x64), .y(y64));

  int xs [];
  bit r4 [], r64 [];

  function automatic void ref_model(int ph, int k, ref bit r []);
    int e [4], v;
    for (int n = 0; n < xs.size(); n++) begin
      if (n % (ph * k) == 0) for (int j = 0; j < 4; j++) e[j] = 0;
      v = xs[n] - (2 * e[1] + e[3]);
      r[n] = (v < 0);
      e[3] = e[2]; e[2] = e[1]; e[1] = e[0];
      e[0] = (v < 0) ? v + 2048 : v - 2048;
    end
  endfunction

  always @(posedge clk) if (!rst && dut64.load) handovers++;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs  = new[NCYC * 64];
    r4  = new[NCYC * 64];
    r64 = new[NCYC * 64];
    for (int n = 0; n < xs.size(); n++)
      xs[n] = int'($floor(0.45 * 2048.0 * $sin(2.0 * PI * 0.2371 * n) + 0.5)) + $urandom_range(0, 40) - 20;
    ref_model(4, 4, r4);
    ref_model(64, 64, r64);
    for (int c = 0; c < 4; c++)  x4[c]  = '0;
    for (int c = 0; c < 64; c++) x64[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      en = 1'b1;
      for (int c = 0; c < 4; c++)  x4[c]  = dsm_t'(xs[(t / 4) * 16 + c * 4 + t % 4]);
      for (int c = 0; c < 64; c++) x64[c] = dsm_t'(xs[(t / 64) * 4096 + c * 64 + t % 64]);
      @(posedge clk); #1;
      // outputs now show the result for clock t (latency (PH-1)*K + 1)
      if (t + 1 >= 3 * 4 + 1 && t + 1 < 3 * 4 + 1 + 40 * 4) begin
        int tp;
        tp = t + 1 - (3 * 4 + 1);
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (y4[c] !== r4[(tp / 4) * 16 + c * 4 + tp % 4]) begin
            failures++; if (failures < 10) $display("PH4 t=%0d c=%0d", t, c);
          end
        end
      end
      if (t + 1 >= 63 * 64 + 1) begin
        int tp;
        tp = t + 1 - (63 * 64 + 1);
        for (int c = 0; c < 64; c++) begin
          checks++;
          if (y64[c] !== r64[(tp / 64) * 4096 + c * 64 + tp % 64]) begin
            failures++; if (failures < 10) $display("PH64 t=%0d c=%0d", t, c);
          end
        end
      end
    end
    if (handovers < NG) failures++;
    $display("handovers=%0d", handovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
