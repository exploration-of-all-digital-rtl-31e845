# All-digital delta-sigma transmitters for radio-over-fibre fronthaul

An all-digital transmitter (ADT) replaces the DAC, mixer and much of the analog
chain of a radio transmitter with logic. The baseband I/Q signal is brought to
the carrier digitally and then turned into a two-level (1-bit) stream by a
delta-sigma modulator. That stream is simply the output of an FPGA's
multi-gigabit serializer. Delta-sigma noise shaping pushes the quantization
noise away from the carrier, so a band-pass filter after the serializer (or
the optical link it drives) recovers the RF signal. A two-level signal also
survives a cheap on/off optical link without linearity problems, which is
what makes the idea attractive for C-RAN fronthaul.

The hard part is speed. The serializer runs at 8 Gbit/s, but the logic runs
at 125 MHz, so the datapath handles **64 samples per clock**. A delta-sigma
modulator is a feedback loop: each sample needs the error of the previous
ones, and that cannot simply be split into 64 parallel copies. How this
design does it is described under "The parallel delta-sigma modulator" below.

The RTL contains two transmitters that do not share anything:

| | point-to-point link (`p2p_link`) | baseband-stage transmitter (`adt_bb_tx`) |
|---|---|---|
| clock | 125 MHz | 200 MHz |
| phases (samples per clock) | 64 | 16 |
| equivalent sample rate | 8 GS/s | 3.2 GS/s |
| where delta-sigma sits | after digital upconversion (RF stage) | at baseband, on I and Q separately |
| carrier | programmable by a DDS step, 2 GHz nominal | fixed at fs/4 of the serial stream |
| noise transfer function | (1 + z^-2)^2, notch at fs/4 = 2 GHz | (1 - z^-1)^2, notch at DC |
| source | ROM with a QAM test signal | RAM loaded by a host at run time |
| receiver | yes (`adt_rx`) | no |

`cran_adt_top` puts both side by side, each with its own clock, reset and ports.

## Point-to-point link: the transmit chain

```
bb_rom ──I,Q──► poly_interp_fir (x64, I and Q) ──► upconverter ◄── dds_poly (sin, cos)
                                                        │ u = sin·I − cos·Q   (Q5.11)
                                                        ▼
                         deinterleaver ──► dsm_bank (64 cores) ──► interleaver ──► 64-bit word
```

* **Interpolation filter** (`poly_interp_fir`). Each 125 MHz baseband sample
  becomes 64 output samples, one per phase, in the same clock. Phase p is a
  4-tap FIR using prototype coefficients h[p], h[p+64], h[p+128] and h[p+192].
  The 256-tap prototype is a Hamming-windowed sinc with its cut-off at half
  the input rate. It is computed by a constant function in `adt_pkg`, so no
  coefficient file exists.
* **DDS** (`dds_poly`). There are 64 sub-blocks, each with a full-period sine
  table and a cosine table of 1024 entries. Sub-block i reads address
  `i·step + acc`, and the shared accumulator advances by `64·step` per clock.
  Output sample n of the stream therefore reads address `n·step mod 1024`, and
  the carrier is `step/1024 × 8 GHz`. Step 256 gives 2 GHz.
* **Upconverter** (`upconverter`). It uses 128 multipliers. The full-precision
  result is shifted down to the Q5.11 format of the delta-sigma loop.
* **Corner turn, delta-sigma bank and inverse corner turn**: see the next
  section.
* **Output**. `tx_word[p]` is the p-th bit in time of the clock, so bit 0 is
  sent first. A value of 1 is the negative level.

## The parallel delta-sigma modulator

A single modulator would have to take one sample per 125 ps. Instead, the
stream is cut into **blocks of k = 64 consecutive samples**. Each of 64
identical cores (`dsm_core`) processes one block sequentially, one sample per
clock. Three mechanisms make this work:

1. **Corner turn** (`deinterleaver`). The datapath delivers 64 samples of one
   instant per clock. A core needs 64 successive samples of one block instead.
   - Input phase p is delayed by p clocks.
   - A counter running 0..63 selects, in multiplexer c, input phase
     `(count − c) mod 64`.
   - Output c is then delayed by `63 − c` clocks.
   - After 63 clocks of latency, for a group of 64×64 = 4096 samples, output c
     carries samples `64c … 64c+63` of the group, one per clock.

   `interleaver` is the same structure, used backwards.
2. **Staggered start.** Core c's input is delayed by `c·k` clocks, so core c
   starts its block just as core c−1 finishes the block before it.
3. **State propagation** (`dsm_bank`). In the first sample of each block, core
   c takes the four filter states (the last four quantization errors) of core
   c−1 instead of its own. The 64 blocks of a group are therefore processed as
   one unbroken sequential modulation. Core 0 starts each group from zero state.

   The output of core c is delayed by `(63 − c)·k` clocks, so that all 64
   outputs line up again for the interleaver.

The result is bit-identical to a plain sequential modulator whose state is
reset every 4096 samples (0.5 µs). The testbenches check exactly that. The
cost is the delay lines: `(63·64/2)·64` words on each side of the bank. They
are written as circular buffers (`delay_line`). The bank's latency is
`63·64 + 1` clocks.

**Each core** is an error-feedback modulator with the filter in the feedback
path:

* `v = x − H(e)` and `y = sign(v)`, with `e = v − y`.
* The noise transfer function is therefore `1 + H(z)`.
* The link uses `H = 2z^-2 + z^-4`, which gives NTF `(1 + z^-2)^2`. Its double
  zero sits at a quarter of the sample rate, which is the 2 GHz carrier.

The quantizer needs no comparator and no subtracter:

* The sign bit of v is the output bit.
* The error is v ∓ 1. Its integer part comes from a 16-entry table indexed by
  the four low integer bits of v, and the 11 fraction bits pass straight
  through.

The loop word is 16 bits: Q5.11, with 5 integer bits and 11 fraction bits.

## Timing of the transmitter

`adt_ctrl` counts clocks after `run` rises and raises each enable when the
first valid data reach that block:

| event | clock after run (64 phases) | general |
|---|---|---|
| source, DDS start | 0 | 0 |
| corner-turn counter start | 3 | 3 |
| delta-sigma bank start | 66 | PH + 2 |
| interleaver start | 4099 | PH·PH + 3 |
| first valid `tx_word` | **4162** | PH·PH + PH + 2 |

Every start begins from a clean state, because `p2p_link` holds the datapath
in reset while `run` is low.

## The receiver

`adt_rx` is the test receiver of the link. It uses the same DDS and step. A
received bit selects either the carrier sample or zero (`rx_downconv`), so the
mixer has no multipliers. A polyphase decimating FIR (`poly_decim_fir`) then
turns 64 samples per clock back into one:

* It has 64 sub-filters with one tap each, followed by a pipelined adder tree.
* The latency is 2 + log2(64) clocks.

With a 1 meaning the negative level, the recovered baseband is about
(−I/4, +Q/4), plus a constant phase set by the link delay.

## Baseband-stage transmitter

`adt_bb_tx` runs at 200 MHz with 16 phases:

1. **Zero-order hold.** Each sample from the host-loaded `bb_ram` is copied to
   all 16 phases, which gives 3.2 GS/s.
2. **Delta-sigma on I and Q.** Each of I and Q passes through its own
   deinterleaver, 16-core bank and interleaver. Here `H = −2z^-1 + z^-2` gives
   NTF `(1 − z^-1)^2`, a low-pass noise shape.
3. **Upconversion by fs/4.** Every I/Q bit pair becomes the four serial bits
   `[I, ~Q, ~I, Q]`. This is a multiplication by the cos and sin sequences
   `1, 0, −1, 0` and `0, 1, 0, −1`, followed by a sum, and it keeps the signal
   two-level.

The result is 64 bits per clock. The first valid word comes 273 clocks after
`run`. The RAM plays `host_len` words in a loop, where 0 means all 4096 words.

## Fixed-point formats

| signal | format |
|---|---|
| baseband I/Q, DDS sine/cosine, receiver output | Q1.15 (16 bits) |
| delta-sigma input and states | Q5.11 (16 bits) |
| FIR coefficients | Q2.16 (18 bits) |

Carrier tables, filter prototypes and the quantizer table are all computed at
elaboration by constant functions in `adt_pkg`.

## Where this RTL departs from, or fills in, the original design

* **Filter taps and prototypes.** The original design gives neither the taps
  per phase nor any coefficients.
  - This RTL uses 4 taps per phase in the transmitter and 1 in the receiver.
    That is the split consistent with a fully used DSP budget of 768
    multipliers: 128 + 512 + 128.
  - Both prototypes are windowed sincs.
* **Word widths.** The fraction width of the loop (11 bits), 16-bit samples
  and the 1024-entry carrier tables are choices made here.
* **Test source.** The ROM contents are a square 16-QAM test signal. The
  symbols come from a 16-bit LFSR (seed 0xACE1), and each symbol lasts 64
  samples. Set `QAM_BITS = 6` for 64-QAM.
* **Output alignment delay.** The bank aligns outputs with delays of
  `(63 − c)·k`, the smallest that works. The original text gives a delay
  larger by a constant.
* **Receiver mixer depth.** The receiver's mixer is registered once, where the
  original pipeline is deeper. Only latency changes.
* **Four-bit word.** Mapping the baseband-stage transmitter to four serial bits
  per I/Q sample (12.8 Gbit/s) is a reading of its fs/4 upconversion. The
  serial rate is not given.
* **Control register.** The register map (address 0 step, address 1 run) is
  invented here. The processor that writes it is not part of this RTL.
* **Outside the RTL.** The multi-gigabit transceivers, the processor and UART,
  the logic analyser, the optical transceivers and the optical mm-wave
  upconversion are not included. Their signals are the top-level ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The main results:

* **`tb_adt_rf_tx`** compares the whole transmitter bit by bit with an
  independent sequential model, at 8 phases and at 64. The model covers the
  filter, carrier, upconversion and a plain delta-sigma loop reset every PH²
  samples. The test also checks the 4162-clock start-up.
* **`tb_adt_bb_tx`** does the same for the baseband-stage transmitter, at 4
  and 16 phases.
* **`tb_cran_adt_top`** runs the whole top at its default size.
  - The link's serial words are looped back into the receiver. The received
    16-QAM symbols are compared with the transmitted ones. The measured EVM is
    about 0.14 %, with gain −0.25.
  - The baseband RAM is loaded by the host and the transmitted levels are
    recovered from the serial words.
  - It counts each mechanism: register writes, state hand-overs, zero starts,
    corner-turn wraps, RAM loop wraps and valid words. A mechanism that never
    occurs counts as a failure.
* **`tb_p2p_link`** runs the link loopback at 16 phases. There, only 16×
  oversampling and a one-tap-per-phase receive filter limit the EVM to about
  17 %.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/adt_pkg.sv tb/tb_cran_adt_top.sv \
          --top-module tb_cran_adt_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

The full-size top takes about two minutes to build and a second to run. Most
unit testbenches instantiate a small and a default-size copy of their block.
To change the size, edit the parameters `PH` (phases), `TAPS`, `AW` (carrier
table address width) and the `H1`…`H4` filter coefficients of `dsm_bank`.
The latencies in `adt_rf_tx` and `adt_bb_tx` follow from `PH`.
