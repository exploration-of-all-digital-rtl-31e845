// tb_cran_adt_top - end-to-end test of the whole design at its default size.
//
// Point-to-point link (64 phases): the serial output is looped back to the
// receiver; the control port programs a 2 GHz carrier (step 256) and the
// run bit. The testbench regenerates the 16-QAM ROM symbols, finds the loop
// delay and complex gain g that best explain the received symbol estimates
// (mean over the middle half of each symbol) as g * conj(s), and checks the
// error vector magnitude and |g|.
// Baseband-stage transmitter (16 phases): the host loads 512 words of
// random 16-QAM symbols (32 samples each) into the RAM, sets the loop
// length and starts; the testbench recovers I and Q from the serial words
// (bit 4p is I, bit 4p+3 is Q, 1 = negative level) by averaging over the
// middle of each symbol and checks them against the loaded levels.
// Mechanisms counted (each must happen): control writes, run start,
// delta-sigma state hand-overs and core-0 zero starts, corner-turn counter
// wraps in both directions, RAM host writes and loop wraps, valid words of
// both transmitters, receiver output activity.
// Provenance: the 2 GHz carrier, 8 Gbit/s and 3.2 GS/s rates follow the design;
// the test signals and the bounds are this testbench's.
module tb_cran_adt_top;
  import adt_pkg::*;
  localparam int DEPTH = 4096, SPS = 64, T = 13000;
  localparam int BB_LEN = 512, BB_SPS = 32, TB = 3000;

  logic clk = 1'b0, rst = 1'b1, we = 1'b0, addr = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [63:0] txw, bbw;
  logic txv, bbv;
  sample_t ri, rq;
  logic clk_bb = 1'b0, rst_bb = 1'b1, bb_run = 1'b0, hwe = 1'b0;
  logic [11:0] hwa = '0;
  logic [31:0] hwd = '0;
  logic [12:0] hlen = '0;
  int   checks = 0, failures = 0;
  always #4 clk = ~clk;        // 125 MHz
  always #2.5 clk_bb = ~clk_bb; // 200 MHz

  cran_adt_top dut (
    .clk(clk), .rst(rst), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata), .cpu_rdata(rdata),
    .mgt_tx_word(txw), .mgt_tx_valid(txv), .mgt_rx_word(txw), .rx_i(ri), .rx_q(rq),
    .clk_bb(clk_bb), .rst_bb(rst_bb), .bb_run(bb_run), .host_we(hwe), .host_waddr(hwa),
    .host_wdata(hwd), .host_len(hlen), .bb_tx_word(bbw), .bb_tx_valid(bbv));

  // mechanism counters
  int n_cpu_wr = 0, n_run = 0, n_handover = 0, n_zero = 0, n_deint_wrap = 0, n_int_wrap = 0;
  int n_host_wr = 0, n_ram_wrap = 0, n_tx_words = 0, n_bb_words = 0, n_rx_active = 0;
  logic run_d = 1'b0;
  always @(posedge clk) begin
    if (we) n_cpu_wr++;
    if (dut.u_link.run && !run_d) n_run++;
    run_d <= dut.u_link.run;
    if (dut.u_link.u_tx.u_dsm.load) begin
      n_zero++;                                    // core 0 starts a block from zero state
      n_handover += 63;                            // cores 1..63 take their neighbour's state
    end
    if (dut.u_link.u_tx.u_deint.cnt == 6'd63 && dut.u_link.u_tx.en_deint) n_deint_wrap++;
    if (dut.u_link.u_tx.u_int.cnt == 6'd63 && dut.u_link.u_tx.en_int) n_int_wrap++;
    if (txv) n_tx_words++;
    if (ri != 0 || rq != 0) n_rx_active++;
  end
  always @(posedge clk_bb) begin
    if (hwe) n_host_wr++;
    if (dut.u_bb_tx.src_en && dut.u_ram.raddr == 12'(BB_LEN - 1)) n_ram_wrap++;
    if (bbv) n_bb_words++;
  end

  real si [DEPTH], sq [DEPTH];
  real yi [T], yq [T];
  real avg_i [T/SPS], avg_q [T/SPS];
  int  ns [T/SPS];
  bit  ok [T/SPS];
  int  bb_i [BB_LEN], bb_q [BB_LEN];
  real acc_i [BB_LEN], acc_q [BB_LEN];
  int  cnt_b [BB_LEN];

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
    repeat (T + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- point-to-point link ----------------
  bit link_done = 0, bb_done = 0;
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
    best_e = 1.0e9; best_d = -1; gr = 0.0; gi = 0.0;
    for (int d = 4000; d < 4400; d++) begin
      int nsym;
      nsym = (T - 4480) / SPS;
      for (int k = 0; k < nsym; k++) begin
        int t0;
        t0 = 4480 + k * SPS + d;
        ok[k] = (t0 + SPS < T);
        avg_i[k] = 0.0; avg_q[k] = 0.0;
        if (!ok[k]) continue;
        for (int o = SPS / 4; o < 3 * SPS / 4; o++) begin
          avg_i[k] += yi[t0 + o] / real'(SPS / 2);
          avg_q[k] += yq[t0 + o] / real'(SPS / 2);
        end
        ns[k] = (4480 + k * SPS) % DEPTH;
      end
      num_r = 0.0; num_i = 0.0; den = 0.0;
      for (int k = 0; k < nsym; k++) begin
        if (!ok[k]) continue;
        num_r += avg_i[k] * si[ns[k]] - avg_q[k] * sq[ns[k]];
        num_i += avg_i[k] * sq[ns[k]] + avg_q[k] * si[ns[k]];
        den   += si[ns[k]] * si[ns[k]] + sq[ns[k]] * sq[ns[k]];
      end
      num_r /= den; num_i /= den;
      e2 = 0.0;
      for (int k = 0; k < nsym; k++) begin
        if (!ok[k]) continue;
        er = avg_i[k] - (num_r * si[ns[k]] + num_i * sq[ns[k]]);
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
    if (evm > 0.05) failures++;
    if (gmag < 0.15 || gmag > 0.35) failures++;
    if (first_valid != 4162) failures++;
    link_done = 1;
  end

  // ---------------- baseband-stage transmitter ----------------
  initial begin
    int lv, mi, mq;
    real ei, eq, worst;
    repeat (3) @(posedge clk_bb);
    #1 rst_bb = 1'b0;
    for (int a = 0; a < BB_LEN; a++) begin
      if (a % BB_SPS == 0) begin
        mi = $urandom_range(3); mq = $urandom_range(3);
      end
      bb_i[a] = (2 * mi - 3) * 16384 / 3;
      bb_q[a] = (2 * mq - 3) * 16384 / 3;
      hwe = 1'b1; hwa = 12'(a); hwd = {16'(bb_i[a]), 16'(bb_q[a])};
      @(posedge clk_bb); #1;
    end
    hwe = 1'b0;
    hlen = 13'(BB_LEN);
    bb_run = 1'b1;
    for (int a = 0; a < BB_LEN; a++) begin acc_i[a] = 0.0; acc_q[a] = 0.0; cnt_b[a] = 0; end
    // word k (k-th valid clock) carries RAM sample k mod BB_LEN
    for (int t = 0, k = 0; t < TB; t++) begin
      @(posedge clk_bb); #1;
      if (bbv) begin
        int a, o;
        a = k % BB_LEN;
        o = a % BB_SPS;
        if (o >= BB_SPS / 4 && o < 3 * BB_SPS / 4) begin
          for (int p = 0; p < 16; p++) begin
            acc_i[a] += bbw[4 * p]     ? -1.0 : 1.0;
            acc_q[a] += bbw[4 * p + 3] ? -1.0 : 1.0;
            cnt_b[a] += 1;
            checks++;
            if (bbw[4 * p + 2] != !bbw[4 * p] || bbw[4 * p + 1] != !bbw[4 * p + 3]) failures++;
          end
        end
        k++;
      end
    end
    // per symbol: compare the mean level with the loaded one
    worst = 0.0;
    for (int s0 = 0; s0 < BB_LEN; s0 += BB_SPS) begin
      real si_m, sq_m;
      int  c;
      si_m = 0.0; sq_m = 0.0; c = 0;
      for (int a = s0; a < s0 + BB_SPS; a++) begin si_m += acc_i[a]; sq_m += acc_q[a]; c += cnt_b[a]; end
      if (c == 0) continue;
      ei = si_m / c - real'(bb_i[s0]) / 32768.0;
      eq = sq_m / c - real'(bb_q[s0]) / 32768.0;
      if ($sqrt(ei * ei + eq * eq) > worst) worst = $sqrt(ei * ei + eq * eq);
      checks++;
      if ($sqrt(ei * ei + eq * eq) > 0.03) failures++;
    end
    $display("baseband tx: worst symbol error %f of full scale", worst);
    bb_done = 1;
  end

  initial begin
    wait (link_done && bb_done);
    $display("mechanisms: cpu writes %0d, run starts %0d, state hand-overs %0d, zero starts %0d,",
             n_cpu_wr, n_run, n_handover, n_zero);
    $display("  corner-turn wraps in %0d out %0d, host writes %0d, RAM loop wraps %0d,",
             n_deint_wrap, n_int_wrap, n_host_wr, n_ram_wrap);
    $display("  link words %0d, baseband words %0d, receiver active clocks %0d",
             n_tx_words, n_bb_words, n_rx_active);
    checks += 11;
    if (n_cpu_wr == 0)     failures++;
    if (n_run == 0)        failures++;
    if (n_handover == 0)   failures++;
    if (n_zero == 0)       failures++;
    if (n_deint_wrap == 0) failures++;
    if (n_int_wrap == 0)   failures++;
    if (n_host_wr == 0)    failures++;
    if (n_ram_wrap == 0)   failures++;
    if (n_tx_words == 0)   failures++;
    if (n_bb_words == 0)   failures++;
    if (n_rx_active == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
