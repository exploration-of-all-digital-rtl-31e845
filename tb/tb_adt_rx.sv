// tb_adt_rx - self-checking test of the receiver of the point-to-point link.
//
// Random 1-bit words are fed to two receivers (8 phases with 2 taps per
// phase, and the default 64 phases with 1 tap). An independent model forms
// the mixed stream s[n] = bit[n] ? sin/cos(2*pi*((n - 2*PH)*step mod 1024)/1024)
// : 0 (the carrier generator starts 2 clocks after `en`, its outputs are
// zero before), filters it with the prototype h and keeps one output per
// clock: y(k) = (sum_m h[m] * s[PH*k + PH-1 - m]) >> 16. Both I and Q
// outputs are compared every clock; the latency from an input word to its
// output is checked to be 2 + log2(PH) clocks.
// Provenance: the mixer (bit ? sine : 0) and the decimation structure follow the
// design; taps and formats are this design's.
module tb_adt_rx;
  import adt_pkg::*;
  localparam int T    = 600;
  localparam int STEP = 256;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [9:0]  step = 10'(STEP);
  logic [7:0]  b8  = '0;
  logic [63:0] b64 = '0;
  sample_t i8, q8, i64, q64;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  adt_rx #(.PH(8), .TAPS(2)) dut8  (.clk(clk), .rst(rst), .en(en), .step(step), .rx_word(b8),
                                    .i_out(i8), .q_out(q8));
  adt_rx                     dut64 (.clk(clk), .rst(rst), .en(en), .step(step), .rx_word(b64),
                                    .i_out(i64), .q_out(q64));

  logic [63:0] words [T];

  function automatic int mixed(int ph, int n, bit q);
    int k, a;
    if (n < 0) return 0;
    k = n / ph;
    if (k < 2 || !words[k][n % ph]) return 0;
    a = (n - 2 * ph) * STEP % 1024;
    return int'($floor(32767.0 * (q ? $cos(2.0 * PI * a / 1024.0) : $sin(2.0 * PI * a / 1024.0)) + 0.5));
  endfunction

  function automatic int expect_y(int ph, int taps, int k, bit q);
    longint acc;
    logic signed [15:0] r;
    acc = 0;
    for (int m = 0; m < ph * taps; m++)
      acc += longint'(decim_coef(m, ph, taps)) * longint'(mixed(ph, ph * k + ph - 1 - m, q));
    r = 16'(acc >>> 16);
    return int'(r);
  endfunction

  task automatic cmp(string tag, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s k=%0d got %0d exp %0d", tag, k, got, exp);
    end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < T; k++) words[k] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; en = 1'b1;
    b8 = words[0][7:0]; b64 = words[0];
    for (int t = 1; t < T; t++) begin
      @(posedge clk); #1;
      if (t - 2 - 3 >= 0) begin
        cmp("I8", int'(i8), expect_y(8, 2, t - 5, 1'b0), t - 5);
        cmp("Q8", int'(q8), expect_y(8, 2, t - 5, 1'b1), t - 5);
      end
      if (t - 2 - 6 >= 0) begin
        cmp("I64", int'(i64), expect_y(64, 1, t - 8, 1'b0), t - 8);
        cmp("Q64", int'(q64), expect_y(64, 1, t - 8, 1'b1), t - 8);
      end
      b8 = words[t][7:0]; b64 = words[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
