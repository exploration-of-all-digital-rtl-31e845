// bb_rom - baseband source of the point-to-point link transmitter.
//
// A ROM of DEPTH I/Q samples read one per clock while `en` is high, wrapping
// at the end, with one clock of read latency. The link carries 16-QAM or
// 64-QAM test signals; the exact contents are this design's choice: square
// QAM symbols (QAM_BITS bits per symbol, 4 -> 16-QAM, 6 -> 64-QAM) drawn
// from a 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed 0xACE1,
// QAM_BITS shifts per symbol, I from the upper half of the symbol bits),
// each held for SPS samples, with levels (2m - (L-1)) / (L-1) * 0.5 of full
// scale, L = 2^(QAM_BITS/2). The table is computed by a constant function.
module bb_rom
  import adt_pkg::*;
#(
  parameter int DEPTH    = 4096,
  parameter int QAM_BITS = 4,
  parameter int SPS      = 64
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  output sample_t i_out,
  output sample_t q_out
);
  localparam int AW = $clog2(DEPTH);
  typedef logic [2*DW-1:0] word_t;
  typedef word_t tab_t [DEPTH];

  function automatic tab_t mk_tab();
    tab_t        t;
    logic [15:0] lfsr;
    int          half, lv, mi, mq, sym_bits;
    real         li, lq;
    lfsr = 16'hACE1;
    half = QAM_BITS / 2;
    lv   = 1 << half;
    mi = 0; mq = 0;
    for (int n = 0; n < DEPTH; n++) begin
      if (n % SPS == 0) begin
        sym_bits = 0;
        for (int b = 0; b < QAM_BITS; b++) begin
          sym_bits = (sym_bits << 1) | int'(lfsr[0]);
          lfsr = {lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[5], lfsr[15:1]};
        end
        mi = sym_bits >> half;
        mq = sym_bits & (lv - 1);
      end
      li = real'(2 * mi - (lv - 1)) / real'(lv - 1) * 0.5;
      lq = real'(2 * mq - (lv - 1)) / real'(lv - 1) * 0.5;
      t[n] = {DW'(round_sat(li * 32768.0, DW)), DW'(round_sat(lq * 32768.0, DW))};
    end
    return t;
  endfunction

  localparam tab_t TAB = mk_tab();

  logic [AW-1:0] addr;
  word_t         rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      rd   <= '0;
    end else if (en) begin
      rd   <= TAB[addr];
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
    end
  end

  assign i_out = sample_t'(rd[2*DW-1:DW]);
  assign q_out = sample_t'(rd[DW-1:0]);
endmodule
