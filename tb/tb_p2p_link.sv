// tb_p2p_link - loopback test of the point-to-point link (transmitter,
// receiver, step register, baseband ROM) at 16 phases.
//
// The serial words of the transmitter are fed straight back into the
// receiver. The control port writes the carrier step (256 = a quarter of
// the equivalent sample rate) and sets the run bit, and reads both back.
// The testbench regenerates the transmitted 16-QAM symbols with its own
// LFSR model, then searches the loop delay and the complex gain g that best
// explain the received symbols (each the mean of the samples over the
// middle half of a symbol) as g * conj(s): the
// receiver mixes with the sine on the I path and the cosine on the Q path
// and the modulator's bit 1 is the negative level, so g is expected near
// -1/4 up to a carrier phase. It checks the error vector magnitude, the
// gain magnitude and the delay (that tx_valid rose after PH*PH + PH + 2
// clocks). With 16 phases the signal band is 1/16 of the sample rate and
// the one-tap-per-phase receive filter leaves much of the shaped noise in,
// so the bound here is 25 % (about 17 % is reached); the 64-phase default
// is measured in the top-level test, where the bound is 5 %.
// Provenance: the loopback arrangement mirrors the design's electrical test.
module tb_p2p_link;
  import adt_pkg::*;
  localparam int PH = 16, DEPTH = 1024, SPS = 16, T = 3200;

  logic clk = 1'b0, rst = 1'b1, we = 1'b0, addr = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [PH-1:0] txw;
  logic txv;
  sample_t ri, rq;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  p2p_link #(.PH(PH), .ROM_DEPTH(DEPTH), .SPS(SPS)) dut (
    .clk(clk), .rst(rst), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata), .cpu_rdata(rdata),
    .mgt_tx_word(txw), .mgt_tx_valid(txv), .mgt_rx_word(txw), .rx_i(ri), .rx_q(rq));

  real si [DEPTH], sq [DEPTH];
  real yi [T], yq [T];
  real avg_i [T/SPS], avg_q [T/SPS];
  int  ns [T/SPS];
  bit  ok [T/SPS];

  task automatic cpu_write(logic a, logic [31:0] d);
    we = 1'b1; addr = a; wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  task automatic cpu_check(logic a, logic [31:0] d);
    addr = a; #1;
    checks++;
    if (rdata !== d) begin failures++; $display("read %0d got %h exp %h", a, rdata, d); end
  endtask

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] l;
    int   sym, first_valid, best_d;
    real  best_e, gr, gi, num_r, num_i, den, er, ei, e2, evm, gmag;
    l = 16'hACE1;
    for (int n = 0; n < DEPTH; n++) begin
      if (n % SPS == 0) begin
        sym = 0;
        for (int b = 0; b < 4; b++) begin
          sym = (sym << 1) | l[0];
          l = {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
        end
      end
      si[n] = (2.0 * (sym >> 2) - 3.0) / 6.0;
      sq[n] = (2.0 * (sym % 4) - 3.0) / 6.0;
    end

    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cpu_write(1'b0, 32'd256);
    cpu_check(1'b0, 32'd256);
    cpu_write(1'b1, 32'd1);
    cpu_check(1'b1, 32'd1);
    first_valid = -1;
    for (int t = 0; t < T; t++) begin
      @(posedge clk); #1;
      if (txv && first_valid < 0) first_valid = t + 1;
      yi[t] = real'(ri) / 32768.0;
      yq[t] = real'(rq) / 32768.0;
    end

    // delay and gain search on symbol estimates: each estimate is the mean
    // of the received samples over the middle half of a symbol
    best_e = 1.0e9; best_d = -1; gr = 0.0; gi = 0.0;
    for (int d = 0; d < 700; d++) begin
      int nsym;
      nsym = (T - 1000) / SPS;
      for (int k = 0; k < nsym; k++) begin
        int t0;
        t0 = 1008 + k * SPS + d;            // first clock of a symbol
        avg_i[k] = 0.0; avg_q[k] = 0.0;
        for (int o = SPS / 4; o < 3 * SPS / 4; o++) begin
          avg_i[k] += yi[t0 + o] / real'(SPS / 2);
          avg_q[k] += yq[t0 + o] / real'(SPS / 2);
        end
        ns[k] = ((t0 - d) % DEPTH);
        ok[k] = (t0 + SPS < T);
        if (!ok[k]) continue;
      end
      num_r = 0.0; num_i = 0.0; den = 0.0;
      for (int k = 0; k < nsym; k++) begin
        if (!ok[k]) continue;
        num_r += avg_i[k] * si[ns[k]] - avg_q[k] * sq[ns[k]];   // y * s = y * conj(conj(s))
        num_i += avg_i[k] * sq[ns[k]] + avg_q[k] * si[ns[k]];
        den   += si[ns[k]] * si[ns[k]] + sq[ns[k]] * sq[ns[k]];
      end
      num_r /= den; num_i /= den;
      e2 = 0.0;
      for (int k = 0; k < nsym; k++) begin
        if (!ok[k]) continue;
        er = avg_i[k] - (num_r * si[ns[k]] + num_i * sq[ns[k]]);   // g * conj(s)
        ei = avg_q[k] - (num_i * si[ns[k]] - num_r * sq[ns[k]]);
        e2 += er * er + ei * ei;
      end
      e2 /= den * (num_r * num_r + num_i * num_i) + 1.0e-30;
      if (e2 < best_e) begin best_e = e2; best_d = d; gr = num_r; gi = num_i; end
    end
    evm  = $sqrt(best_e);
    gmag = $sqrt(gr * gr + gi * gi);
    $display("link: delay %0d clocks, gain %f, %fj (|g| = %f), EVM %0.2f %%, tx_valid after %0d",
             best_d, gr, gi, gmag, 100.0 * evm, first_valid);
    checks += 3;
    if (evm > 0.25) failures++;
    if (gmag < 0.15 || gmag > 0.35) failures++;
    if (first_valid != PH * PH + PH + 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
