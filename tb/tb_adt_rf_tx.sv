// tb_adt_rf_tx - bit-exact end-to-end test of the RF-stage transmitter.
//
// Two transmitters, one with 8 phases and one at the default 64 phases, are
// fed the same random baseband I/Q stream (amplitude 1/4 of full scale) and
// carrier step. A behavioural model written independently of the RTL
// structure recomputes, for every output bit:
//   * the interpolation filter output (prototype h, 4 taps per phase),
//   * the carrier from sin/cos of 2*pi*(n*step mod 1024)/1024,
//   * u = (sin*I - cos*Q) >> 19,
//   * a plain sequential error-feedback modulator, v = x - (2e[n-2]+e[n-4]),
//     bit = (v < 0), restarted from zero state every PH*PH samples (the
//     block structure of the parallel modulator),
// and compares tx_word with it bit by bit. It also checks that tx_valid
// rises exactly PH*PH + PH + 2 clocks after run.
// Provenance: the chain and the NTF follow the design; formats, taps and carrier
// table size are this design's.
module tb_adt_rf_tx;
  import adt_pkg::*;
  localparam int T    = 4600;           // clocks simulated
  localparam int STEP = 37;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [9:0] step = 10'(STEP);
  sample_t xi = '0, xq = '0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [7:0]  w8;
  logic [63:0] w64;
  logic        v8, v64, se8, se64;
  adt_rf_tx #(.PH(8)) dut8  (.clk(clk), .rst(rst), .run(run), .step(step), .i_in(xi), .q_in(xq),
                             .src_en(se8), .tx_word(w8), .tx_valid(v8));
  adt_rf_tx           dut64 (.clk(clk), .rst(rst), .run(run), .step(step), .i_in(xi), .q_in(xq),
                             .src_en(se64), .tx_word(w64), .tx_valid(v64));

  int in_i [T], in_q [T];
  bit exp8 [], exp64 [];

  function automatic int xat(int k, bit q);
    if (k < 0 || k >= T) return 0;
    return q ? in_q[k] : in_i[k];
  endfunction

  function automatic int wrap16(longint v);
    logic signed [15:0] r;
    r = 16'(v);
    return int'(r);
  endfunction

  // Expected bit stream, in time order, for a transmitter of ph phases.
  task automatic build(int ph, ref bit bits []);
    int m_max, frame, v, e [4], fi, fq, a, s, c;
    longint acc_i, acc_q;
    m_max = T - 8;
    frame = ph * ph;
    bits  = new[m_max * ph];
    for (int m = 0; m < m_max; m++) begin
      for (int p = 0; p < ph; p++) begin
        acc_i = 0; acc_q = 0;
        for (int j = 0; j < TX_TAPS; j++) begin
          acc_i += longint'(xat(m + 1 - j, 0)) * longint'(interp_coef(p + j * ph, ph, TX_TAPS));
          acc_q += longint'(xat(m + 1 - j, 1)) * longint'(interp_coef(p + j * ph, ph, TX_TAPS));
        end
        fi = wrap16(acc_i >>> 16);
        fq = wrap16(acc_q >>> 16);
        a  = (m * ph + p) * STEP % 1024;
        s  = int'($floor(32767.0 * $sin(2.0 * PI * a / 1024.0) + 0.5));
        c  = int'($floor(32767.0 * $cos(2.0 * PI * a / 1024.0) + 0.5));
        v  = wrap16((longint'(s) * fi - longint'(c) * fq) >>> 19);   // u, Q5.11
        if ((m * ph + p) % frame == 0) for (int j = 0; j < 4; j++) e[j] = 0;
        v  = wrap16(longint'(v) - 2 * e[1] - e[3]);
        bits[m * ph + p] = (v < 0);
        e[3] = e[2]; e[2] = e[1]; e[1] = e[0];
        e[0] = v - ((v < 0) ? -2048 : 2048);
      end
    end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k8 = 0, k64 = 0, t = 0, first8 = -1, first64 = -1;
  initial begin
    for (int k = 0; k < T; k++) begin
      in_i[k] = int'($urandom_range(16384)) - 8192;
      in_q[k] = int'($urandom_range(16384)) - 8192;
    end
    build(8, exp8);
    build(64, exp64);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; run = 1'b1;
    xi = sample_t'(in_i[0]); xq = sample_t'(in_q[0]);
    for (t = 1; t < T; t++) begin
      @(posedge clk); #1;
      if (v8) begin
        if (first8 < 0) first8 = t;
        if (k8 * 8 + 8 <= exp8.size()) begin
          for (int p = 0; p < 8; p++) begin
            checks++;
            if (w8[p] !== exp8[k8 * 8 + p]) begin
              failures++;
              if (failures < 10) $display("PH8 word %0d bit %0d got %b", k8, p, w8[p]);
            end
          end
        end
        k8++;
      end
      if (v64) begin
        if (first64 < 0) first64 = t;
        if (k64 * 64 + 64 <= exp64.size()) begin
          for (int p = 0; p < 64; p++) begin
            checks++;
            if (w64[p] !== exp64[k64 * 64 + p]) begin
              failures++;
              if (failures < 10) $display("PH64 word %0d bit %0d got %b", k64, p, w64[p]);
            end
          end
        end
        k64++;
      end
      if (!se8 || !se64) failures++;
      xi = sample_t'(in_i[t]); xq = sample_t'(in_q[t]);
    end
    $display("tx_valid after %0d / %0d clocks, %0d / %0d words", first8, first64, k8, k64);
    checks += 2;
    if (first8 != 8 * 8 + 8 + 2)    failures++;
    if (first64 != 64 * 64 + 64 + 2) failures++;
    if (k64 < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
