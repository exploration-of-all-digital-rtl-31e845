// tb_adt_bb_tx - bit-exact test of the baseband-stage transmitter.
//
// Two transmitters (4 phases, and the default 16) get the same random I/Q
// stream, presented like the RAM source does: sample k is on the inputs in
// the clock after the k-th `src_en` clock. The independent model repeats
// each sample PH times (zero-order hold), scales it by 1/16 into the loop
// format, runs a sequential error-feedback modulator v = x + 2e[n-1] -
// e[n-2], bit = (v < 0), restarted every PH*PH samples, separately for I and
// Q, and builds the four serial bits [I, ~Q, ~I, Q] of every sample. Every
// bit of tx_word is compared, and tx_valid must rise exactly
// 2 + (PH-1) + (PH-1)*PH + 1 + (PH-1) clocks after run.
// Provenance: the structure it models (zero-order hold, x16, NTF (1 - z^-1)^2, the
// [I, ~Q, ~I, Q] word) follows the design; the word bit order and the
// input scaling are this design's.
module tb_adt_bb_tx;
  import adt_pkg::*;
  localparam int T = 1500;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  sample_t xi = '0, xq = '0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [15:0] w4;
  logic [63:0] w16;
  logic        v4, v16, se4, se16;
  adt_bb_tx #(.PH(4)) dut4  (.clk(clk), .rst(rst), .run(run), .i_in(xi), .q_in(xq),
                             .src_en(se4), .tx_word(w4), .tx_valid(v4));
  adt_bb_tx           dut16 (.clk(clk), .rst(rst), .run(run), .i_in(xi), .q_in(xq),
                             .src_en(se16), .tx_word(w16), .tx_valid(v16));

  int in_i [T], in_q [T];
  bit exp4 [], exp16 [];

  task automatic build(int ph, ref bit bits []);
    int v, e [2][2], y [2];
    bits = new[T * ph * 4];
    for (int n = 0; n < T * ph; n++) begin
      if (n % (ph * ph) == 0) e = '{'{0, 0}, '{0, 0}};
      for (int c = 0; c < 2; c++) begin
        v = ((c == 0) ? in_i[n / ph] : in_q[n / ph]) >>> 4;
        v = v + 2 * e[c][0] - e[c][1];
        y[c] = (v < 0);
        e[c][1] = e[c][0];
        e[c][0] = v - ((v < 0) ? -2048 : 2048);
      end
      bits[4 * n]     =  y[0][0];
      bits[4 * n + 1] = !y[1][0];
      bits[4 * n + 2] = !y[0][0];
      bits[4 * n + 3] =  y[1][0];
    end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k4 = 0, k16 = 0, first4 = -1, first16 = -1;
  initial begin
    for (int k = 0; k < T; k++) begin
      in_i[k] = int'($urandom_range(32768)) - 16384;   // +-0.5 full scale
      in_q[k] = int'($urandom_range(32768)) - 16384;
    end
    build(4, exp4);
    build(16, exp16);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; run = 1'b1;
    for (int t = 1; t < T; t++) begin
      @(posedge clk); #1;
      xi = sample_t'(in_i[t - 1]); xq = sample_t'(in_q[t - 1]);
      if (v4) begin
        if (first4 < 0) first4 = t;
        for (int b = 0; b < 16; b++) begin
          checks++;
          if (w4[b] !== exp4[k4 * 16 + b]) begin
            failures++; if (failures < 10) $display("PH4 word %0d bit %0d", k4, b);
          end
        end
        k4++;
      end
      if (v16) begin
        if (first16 < 0) first16 = t;
        for (int b = 0; b < 64; b++) begin
          checks++;
          if (w16[b] !== exp16[k16 * 64 + b]) begin
            failures++; if (failures < 10) $display("PH16 word %0d bit %0d", k16, b);
          end
        end
        k16++;
      end
    end
    $display("tx_valid after %0d / %0d clocks, %0d / %0d words", first4, first16, k4, k16);
    checks += 2;
    if (first4 != 2 + 3 + 12 + 1 + 3)       failures++;
    if (first16 != 2 + 15 + 240 + 1 + 15)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
