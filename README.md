# PSK modems on a multiplier-less digital frequency synthesizer

This is synthesizable SystemVerilog for five phase-shift-keying modems: BPSK,
pi/2 BPSK, pi/2 DBPSK, QPSK and pi/4 QPSK. Each one modulates and demodulates.
All five take their carriers from the same kind of digital frequency
synthesizer (DFS), which has no multiplier and no sine ROM. The synthesizer
builds a sine from a phase accumulator, a one's-complement quadrant fold and an
8-segment piecewise-linear curve. Each segment of that curve is one
multiplexer-selected constant plus two shifted copies of the phase. Shifting
the synthesizer's phase gives a cosine or any multiple of 45 degrees. Each
modem then sends a symbol by choosing one of these waveforms, or its negation,
for the length of the symbol. The demodulators do not multiply either: they
correlate the received signal with the sign of the local reference carriers.

The modems follow an FPGA software-defined-radio design. Its published
description gives the synthesizer architecture in detail, but it says only
what each modem does. The modem internals (symbol timing, decision logic,
handshakes) are therefore this implementation's own. The sections below mark
which parts are which.

## The frequency synthesizer (`dfs`)

```
delta_p[15:0] -> phase_accumulator --phase[11:0]--+-- [11] MSB1 ---------------------------+
omega[15:0]  ->        |                          +-- [10] MSB2 --> quadrant_complementer  |
                       | wrap                     +-- [9:0] ------^         | 10 bits       |
                                                                           v               v
                                                 pwl_sine_converter -> mag -> format_converter -> reg -> sample[14:0]
```

* **Phase accumulator.** A 16-bit frequency register loads `delta_p`. A 16-bit
  phase register adds that register to itself on every clock. The phase offset
  `omega` is added after the register. The sum is truncated to its top 12 bits.
  The carrier frequency is `f_clk * delta_p / 65536`, and `omega = 0x4000`
  shifts the carrier by 90 degrees. `wrap` marks the first sample of each
  carrier period and is computed without `omega`.
* **How the 12-bit phase is used.** Bit 11 (MSB1) is the sign: the second half
  of the period is negative. Bit 10 (MSB2) marks the second and fourth
  quadrants, where the curve runs backwards. Bits 9:7 select one of eight
  segments. Bits 6:0 are the sub-angle within the segment.
* **Quadrant fold.** When MSB2 is set, the 10 in-quadrant bits are
  one's-complemented, so offset `q` becomes `1023 - q`. If each phase code
  stands for the centre of its interval, this is an exact mirror about pi/2.
* **Piecewise-linear quarter sine.** Let `X = sub_angle << 3`, a 13-bit word.
  The `<< 3` keeps the `>> 3` path exact. Then

  `mag = Y[s] + (X >> a[s]) + (X >> b[s])`

  A shift of "-" in the table below selects the constant 0. One adder sums the
  three terms. The slopes are the sums of two powers of two nearest to each
  segment's chord slope. Each start value centres the error inside its
  segment: with `e(p) = 7800*sin((p+0.5)*pi/2048) - (slope term)`, `Y[s]` is
  `round((max e + min e) / 2)` over the segment, and 0 for segment 0:

  | segment s | Y[s] | upper mux (a) | middle mux (b) | slope |
  |---|---|---|---|---|
  | 0 | 0    | X    | X>>1 | 1.5 |
  | 1 | 1491 | X    | X>>1 | 1.5 |
  | 2 | 3025 | X    | X>>2 | 1.25 |
  | 3 | 4359 | X    | X>>3 | 1.125 |
  | 4 | 5497 | X    | -    | 1.0 |
  | 5 | 6472 | X>>1 | X>>2 | 0.75 |
  | 6 | 7180 | X>>1 | -    | 0.5 |
  | 7 | 7676 | -    | X>>3 | 0.125 |

  The peak is about 7800. The worst error against `7800*sin` is 40, about
  0.5 % of full scale. At segment boundaries the curve can step by up to 64
  (down by at most 54), so it is not strictly monotonic.
* **Format converter.** When MSB1 is set, the magnitude is negated in two's
  complement.
* **Output register.** There is one pipeline stage: `sample` appears one clock
  after the phase-register value it was computed from.

The published architecture fixes the bus widths: 16-bit `delta_p` and `omega`,
a 12-bit phase, 10 in-quadrant bits, 3 segment bits, 7 sub-angle bits, 13-bit
multiplexer outputs, a 15-bit sum and a 15-bit output. It also fixes the
shift-and-add structure, with shifts by 1, 2 and 3 and eight constants. It does
not give the constants' values or which shift each segment uses: the table
above is this design's own fit. Where the offset is added, the output format
(two's complement) and the position of the pipeline register are also this
design's own choices.

## Modems

All modems share the same framing. A symbol lasts `CYCLES_PER_SYM` whole
carrier periods (default 1) and starts at carrier phase 0. Several synthesizer
instances with the same `delta_p` and reset stay phase-locked. They differ
only in `omega`.

| modem | synthesizers (omega) | bits/symbol | what is sent |
|---|---|---|---|
| `bpsk_modem` | sine (0) | 1 | 1: sine, 0: -sine |
| `pi2_bpsk_modem` | cosine (90 deg) | 1 | 1: cosine, 0: -cosine |
| `pi2_dbpsk_modem` | cosine (90 deg) | 1 | d = bit XOR previous d; d=0: cosine, d=1: -cosine |
| `qpsk_modem` | sine, cosine | 2 | 00 sine, 01 cosine, 11 -sine, 10 -cosine |
| `pi4_qpsk_modem` | 0, +45, +90, -45 deg | 3 | phase k*45 deg, where the symbol is the Gray code of k |

A few points about the modems:

* **pi/2 BPSK.** This is BPSK on a cosine carrier, which is how the published
  modem was built. It is not the textbook scheme that rotates the
  constellation by 90 degrees on every symbol.
* **pi/4 QPSK.** This is also the published variant: three bits per symbol on
  eight phases. The four waveforms are the sine, the cosine, and the cosine
  delayed by 45 and by 135 degrees; their negations give the other four
  phases. The textbook pi/4-QPSK, with two bits per symbol and the
  constellation rotated on alternate symbols, is not what is built.
* **Bit mappings.** The dibit and tribit mappings are Gray codes of this
  design's choosing.

### Demodulation without multipliers (`sign_correlator`)

The received signal is compared with a reference by summing `+rx` where the
reference is positive and `-rx` where it is negative, over one symbol. For a
sinusoid of the same frequency, that sum is proportional to the cosine of the
phase difference.

* **BPSK and pi/2 BPSK.** The sign of the sum is the bit.
* **QPSK and pi/4 QPSK.** Two (or four) correlators run in parallel. The
  reference with the largest absolute sum gives the phase, and the sign of
  that sum says whether the waveform or its negation was sent.
* **pi/2 DBPSK.** Demodulation is differential. The signs of the previous
  received symbol are kept in a buffer of `MAX_SPS` (2048) 2-bit entries,
  indexed by the sample number within the symbol. The current symbol is
  correlated with that buffer: a negative sum means the phase flipped, which
  decodes as bit 1. The first symbol after reset has no predecessor, so it is
  compared with the local cosine, which is the waveform of the encoder's
  initial state 0.

Limits of the demodulators:

* A DBPSK symbol can hold at most `MAX_SPS` samples
  (`CYCLES_PER_SYM * 65536 / delta_p`); samples beyond that are ignored.
* Differential detection compares a symbol with the one before it. After
  `delta_p` changes, the first symbol at the new frequency can therefore
  decode wrongly. The coherent modems decode correctly across a frequency hop.

### Interface and timing of each modem

| port | dir | meaning |
|---|---|---|
| `delta_p[15:0]` | in | carrier phase increment |
| `data_in[N-1:0]` | in | symbol, taken in the cycle `sym_req` is high |
| `sym_req` | out | one-cycle pulse at the start of each symbol |
| `mod_out[14:0]` | out | modulated carrier, signed, registered |
| `rx_in[14:0]` | in | received signal, with the same timing as `mod_out` |
| `demod_out[N-1:0]`, `demod_valid` | out | decoded symbol, valid during the pulse |

* **Symbol request.** `sym_req` is decoded from the registered period flag of
  the synthesizer. `data_in` must be valid during the cycle in which `sym_req`
  is high; it is sampled at the clock edge that ends that cycle.
* **Modulator output.** The first sample of a symbol appears on `mod_out` one
  clock after its `sym_req`.
* **Decoded symbol.** `demod_valid` pulses two clocks after the `sym_req` that
  ends the symbol, which is one symbol plus two clocks after the symbol was
  taken. With `rx_in = mod_out`, the receiver needs no timing recovery.
  Carrier, phase and symbol timing are shared with the local synthesizer.
  There is no synchronizer for a delayed or frequency-offset channel.
* **Reset.** `rst_n` is active low and synchronous. After reset, a new symbol
  starts immediately at phase 0.

## Top level (`psk_modems_top`)

The top places the five modems side by side. They share `clk`, `rst_n` and
`delta_p`. Each modulator output is looped back into its own demodulator. The
ports are the modem ports with the prefixes `bpsk_`, `pi2_bpsk_`, `pi2_dbpsk_`,
`qpsk_` and `pi4_qpsk_`; `rx_in` is internal. Parameters are `CYCLES_PER_SYM`
(default 1) and `MAX_SPS` (default 2048).

To put a channel model between a modulator and its demodulator, instantiate
the modem directly and drive `rx_in` yourself.

## Files

* `rtl/psk_pkg.sv`: widths, the segment table, the sample type, and the sign
  enum and its function.
* Synthesizer: `rtl/phase_accumulator.sv`, `rtl/quadrant_complementer.sv`,
  `rtl/pwl_sine_converter.sv`, `rtl/format_converter.sv`, `rtl/dfs.sv`.
* Modem helpers: `rtl/symbol_timer.sv`, `rtl/sign_correlator.sv`.
* Modems: `rtl/bpsk_modem.sv`, `rtl/pi2_bpsk_modem.sv`,
  `rtl/pi2_dbpsk_modem.sv`, `rtl/qpsk_modem.sv`, `rtl/pi4_qpsk_modem.sv`.
* Top: `rtl/psk_modems_top.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module above (the two
  helpers are covered through the modems).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/psk_pkg.sv tb/tb_psk_modems_top.sv --top-module tb_psk_modems_top
./obj_dir/Vtb_psk_modems_top
```

Replace the testbench name to run another one. All testbenches finish in well
under a second.

What the testbenches check:

* **Synthesizer blocks.** The quadrant fold and the piecewise-linear curve are
  checked exhaustively; the curve is compared with `$sin` to within 1.5 % of
  full scale. The phase accumulator is checked cycle by cycle against a model,
  with random `delta_p`/`omega` changes. `dfs` is checked sample by sample
  against `$sin` for a sine, a cosine and a fast carrier, and every quadrant
  and segment is visited.
* **Modems** (each at 32 samples per period and 2 periods per symbol). Every
  `mod_out` sample is compared with the expected waveform, and every decoded
  symbol with the one sent. The `sym_req` spacing and the decode latency are
  checked to the cycle, and every symbol value must occur.
* **Top** (at its default parameters). All five modems run on random data
  while `delta_p` hops through 2048, 1024, 63 and 4096. At 63 a symbol holds
  1041 samples, close to the DBPSK buffer limit. About 400 symbols per modem
  are decoded and checked. The bench counts, and requires, frequency hops
  crossed, DBPSK phase flips and holds, and the first-symbol rule.

## Departures and open points

* **Modem internals.** Symbol length, bit mappings, correlator-based decisions,
  the DBPSK sign buffer and all handshakes are this design's own. The
  published description says only that the received signal is "compared" with
  the reference.
* **Segment table.** The constants and slopes of the quarter-sine curve were
  fitted here; see the table above.
* **Scheme definitions.** pi/2 BPSK and pi/4 QPSK follow the published
  implementation (a cosine carrier; 8 phases with 3 bits per symbol), not the
  textbook schemes.
* **Not built.** A quarter-wave sine ROM, which the published synthesizer
  replaces with the segment network. Also not built: any RF front end, ADC/DAC,
  filtering, or carrier and symbol synchronization for a real channel.
* **Amplitude.** The synthesizer's output amplitude is fixed, with a peak of
  about 7800. Frequency (`delta_p`) and phase (`omega`) can be changed on any
  clock; amplitude cannot.
* **Verification.** Everything was checked in noise-free simulation only; no
  bit-error rate under noise has been measured.
