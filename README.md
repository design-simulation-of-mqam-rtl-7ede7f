# Zigbee-style DSSS / 4-QAM baseband transceiver

This is the digital baseband of a short-range 2.4 GHz link in the style of
Zigbee (IEEE 802.15.4). Data goes out as 4-bit symbols. Each symbol is
spread into a sequence of 8 pseudo-noise chips. The chips are split
alternately onto an in-phase (I) and a quadrature (Q) channel. Each chip
becomes a half-sine pulse, 8 samples long. Every chip pair is therefore one
point of a 4-point QAM constellation, and the pulse shape keeps the spectrum
compact. The receiver reverses the chain: matched filter, one sample per
chip, chip decisions, then despreading by nearest-codeword search. The RF
part, an off-the-shelf 2.4 GHz transceiver chip, is outside this RTL. The
baseband reaches it over a serial link, or as parallel 10-bit I/Q samples.

```
            DIGITAL TRANSMITTER                                   (RF chip, external)
tx_symbol -> chip_generator -+-> up_sampler(I) -> fir_filter(I) -+-> tx_i_out
 (4 bit)      8 chips/symbol  '-> up_sampler(Q) -> fir_filter(Q) -+-> tx_q_out
                                                                  '-> piso -> tx_ser_data/frame

            DIGITAL RECEIVER
rx_i_in/rx_q_in --+                                   +-> down_sampler(I) -+
                  +-(rx_serial_sel)-> fir_filter(I/Q) |                    +-> sign -> chip_decoder -> rx_sym_out
rx_ser_data -> sipo                                   +-> down_sampler(Q) -+
```

## Clocks, rates and reset

| clock       | rate                   | role |
|-------------|------------------------|------|
| `clk_1_mhz` | 1 MHz                  | chip-pair rate: one I chip and one Q chip per period |
| `clk_8_mhz` | 8 MHz                  | sample clock of all filtering and control |
| `clk_ser`   | 160 MHz (20 x 8 MHz)   | bit clock of the serial link to the RF chip |

All datapath logic runs on `clk_8_mhz`. The 1 MHz clock is not a second
clock domain. It passes through a two-flop synchronizer, and its rising edge
becomes a one-cycle *chip tick* (`chip_tick_gen`). The tick follows each
rising edge by 2 to 3 cycles of `clk_8_mhz`. The design relies on
`clk_1_mhz` and `clk_8_mhz` coming from one source. Then ticks are exactly 8
sample clocks apart, which is what the up-sampler asserts. `clk_ser` must be
phase locked to `clk_8_mhz` at exactly 20x (see *Serial link*).

Resulting rates: 8 chips per 4 µs symbol, so 2 Mchip/s (1 Mchip/s on each of
I and Q), 1 Mbit/s of user data, and 8 samples per chip.

`rst` is synchronous and active high. Every register that is read has a
reset value.

## The spreading code

There are 16 codewords of 8 chips each (`zigbee_pkg::chip_code`). The
codebook follows the structure of the 802.15.4 one:

* symbols 0–7: the cyclic left rotation of the base sequence `8'b0001_1101`
  by *s* positions;
* symbols 8–15: the bitwise complement of the rotation by *s*−8.

| s | code | s | code | s | code | s | code |
|---|------|---|------|---|------|---|------|
| 0 | 1D | 4 | D1 | 8 | E2 | 12 | 2E |
| 1 | 3A | 5 | A3 | 9 | C5 | 13 | 5C |
| 2 | 74 | 6 | 47 | 10 | 8B | 14 | B8 |
| 3 | E8 | 7 | 8E | 11 | 17 | 15 | 71 |

Chip *j* of a codeword is bit *j*, and *j* = 0 goes out first. Even chips
(0, 2, 4, 6) go on I and odd chips (1, 3, 5, 7) on Q, so a symbol is four
chip pairs. All 16 codes are distinct. The minimum Hamming distance is 2,
the best any rotation-and-complement codebook of length 8 achieves. With
distance 2, a single wrong chip is detected, and it is corrected whenever
exactly one codeword lies at distance 1 from the received word. This base
sequence, and the 8-chip length rather than the standard's 32, are what make
this codebook differ from 802.15.4's.

## Transmit pulses

`up_sampler` turns each chip into a bipolar impulse: chip 1 becomes +1,
chip 0 becomes −1. Seven zeros follow, so one chip occupies 8 samples.
`fir_filter` convolves the impulse train with an 8-tap half-sine:

    h[k] = round(511 · sin(π (k + 0.5) / 8)),  k = 0..7
         = 100, 284, 425, 501, 501, 425, 284, 100

The filter is exactly one chip long, and only one impulse per chip is
non-zero. So the pulses never overlap: `tx_i_out`/`tx_q_out` carry exactly
±h[k], with a peak of 501 in the 10-bit signed range. The FIR is general
(direct form, full-precision sum, saturation to `OUT_W`). The transmit
instance has a 2-bit input and a 10-bit output. I and Q are sent aligned. No
half-chip offset as in O-QPSK is applied.

Timing: a symbol is taken from `tx_symbol` on the chip tick at a symbol
boundary, if `tx_start` is high. This is signalled by a `tx_symbol_load`
pulse. The generator samples `tx_symbol` only at symbol boundaries, so the
next symbol must be on `tx_symbol` within 31 clocks after a
`tx_symbol_load`. The first sample of the
symbol is on the outputs 2 clocks after `tx_symbol_load`. Symbols follow
every 32 clocks with no gap. If `tx_start` falls in the middle of a symbol,
that symbol is completed. With `tx_start` low the outputs are 0.

## Receiving: acquisition, matched filter, decimation, despreading

This is the least obvious part of the design.

**Acquisition.** The receiver has to know where chips begin. While
`rx_start` is high and it is not yet locked, it treats the first non-zero
sample on `rx_i_in` or `rx_q_in` as sample 0 of chip 0. In that cycle it
restarts both down-samplers and the chip decoder's symbol framing, and sets
`rx_locked`. The lock holds until `rx_start` falls, which re-arms
acquisition for the next burst. This works because the transmitter sends
exact zeros between bursts, and every sample inside a burst is non-zero
(|h[k]| ≥ 100). A channel that is noisy before the burst would need a real
preamble/correlation detector instead.

**Matched filter.** The same `fir_filter` with the same half-sine taps is
used, with a 10-bit input and a 23-bit full-precision output. Its output
peaks at ±Σh² = ±1 044 564 when the 8 samples of a chip fill its delay line.

**Decimation.** `down_sampler` keeps one sample in 8. It keeps the one 8
clocks after the acquisition cycle (`PHASE` = 7 on a counter restarted by
sync), which is exactly the peak. The chip decision is the sign of that
sample (> 0 means chip 1).

**Despreading.** `chip_decoder` collects 4 chip pairs into an 8-bit word.
It compares the word against all 16 codewords in one combinational search
and outputs the symbol at the smallest Hamming distance. A tie goes to the
lowest symbol number. `rx_distance` reports that distance: 0 means a clean
symbol, 1 means one chip was wrong.

Timing: `rx_sym_valid` comes 34 clocks after the first sample of a symbol
reaches `rx_i_in`/`rx_q_in`. Connecting `tx_i_out` straight to `rx_i_in`
gives 36 clocks from `tx_symbol_load` to `rx_sym_valid`. The decoder keeps
producing a symbol every 32 clocks until `rx_start` is dropped. After the
end of a burst these are decodes of silence, so drop `rx_start` within 32
clocks of the last valid symbol.

## Serial link to the RF chip

`piso` packs each sample pair into a 20-bit word `{I[9:0], Q[9:0]}`. It
shifts the word out MSB first on `tx_ser_data`. `tx_ser_frame` is high with
the first bit of each word. With `clk_ser` at 20 × 8 MHz, exactly one word
goes out per sample. `sipo` rebuilds words from `rx_ser_data`/`rx_ser_frame`.
The receiver then takes the latest word into the `clk_8_mhz` domain. Set
`rx_serial_sel` = 1 to feed the receiver from the serial link instead of
`rx_i_in`/`rx_q_in`.

The words cross between `clk_ser` and `clk_8_mhz` as whole registers,
without a synchronizer or FIFO. This is correct only when `clk_ser` is
phase locked to `clk_8_mhz` at exactly 20x, as from one PLL. With unrelated
clocks, this crossing must be replaced. The serial path adds 2 clocks of
latency in the loopback test: 38 clocks from `tx_symbol_load` to
`rx_sym_valid`.

## Top-level ports (`zigbee_transceiver`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_1_mhz`, `clk_8_mhz`, `clk_ser` | in | 1 | clocks, see above |
| `rst` | in | 1 | synchronous reset, active high |
| `tx_symbol` | in | 4 | symbol to send, sampled at symbol boundaries |
| `tx_start` | in | 1 | transmit while high |
| `tx_i_out`, `tx_q_out` | out | 10 | signed baseband samples, 8 MHz |
| `tx_symbol_load`, `tx_busy` | out | 1 | symbol taken / symbol in progress |
| `tx_ser_data`, `tx_ser_frame` | out | 1 | serial link to the RF chip |
| `rx_start` | in | 1 | receive enable; a rising edge re-arms acquisition |
| `rx_serial_sel` | in | 1 | 0: parallel inputs, 1: serial link |
| `rx_i_in`, `rx_q_in` | in | 10 | signed baseband samples |
| `rx_ser_data`, `rx_ser_frame` | in | 1 | serial link from the RF chip |
| `rx_sym_out`, `rx_sym_valid` | out | 4, 1 | decoded symbol |
| `rx_distance` | out | 4 | chip errors in the decoded symbol |
| `rx_locked` | out | 1 | chip timing acquired |

## What is given and what is chosen here

These parts follow the source description of the transceiver:

* the block chain (chip generator, up-sampler, FIR, PISO / SIPO, FIR,
  down-sampler, chip decoder);
* 4-bit symbols spread to 8 chips, even chips on I and odd chips on Q;
* a sine-shaped pulse-shaping filter;
* the 1 MHz and 8 MHz clocks;
* the port names and widths `tx_symbol[3:0]`, `tx_i_out/tx_q_out[9:0]`,
  `rx_i_in/rx_q_in[9:0]`, `rx_sym_out`, `tx_start`, `rx_start` and `rst`.

These are this design's own choices:

* the codebook values;
* the exact half-sine taps and the filter length;
* the zero-stuffing up-sampler with bipolar mapping;
* the 1 MHz clock used as a strobe;
* how the receiver acquires timing and decides chips;
* minimum-distance decoding;
* the serial word format, the 160 MHz bit clock and the receive-path
  select;
* the added status outputs.

The following are not implemented:

* channel selection (16 channels, 5 MHz apart) and carrier modulation
  belong to the RF chip;
* multi-level amplitudes of general M-QAM: the described chain only ever
  produces binary chips, so each chip pair is one 4-QAM point;
* any FPGA-specific resource mapping.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
reference values computed independently in the testbench: a hand-written
codebook table, its own convolution, its own nearest-code search. Each ends
with a `TB_RESULT checks=N failures=M` line.

| testbench | what it covers |
|-----------|----------------|
| `tb_chip_generator` | every symbol's chips, pair timing, idle, completion after `tx_start` falls |
| `tb_up_sampler` | impulse values, zero stuffing, phase count |
| `tb_fir_filter` | transmit and receive configurations against a reference convolution, saturation |
| `tb_piso`, `tb_sipo` | bit order, frame marker, word timing, ignored idle bits |
| `tb_down_sampler` | kept-sample phase after sync, re-sync, stop |
| `tb_chip_decoder` | clean and single-chip-error words, tie rule, re-framing |
| `tb_digital_transmitter` | every output sample of 60 symbols, 32-clock symbol period, 2-clock latency |
| `tb_digital_receiver` | 8 noisy bursts with random start times, re-acquisition, chip errors, 34-clock latency |
| `tb_zigbee_transceiver` | end-to-end loopback at default parameters, one burst over the parallel path and one over the serial link |
| `tb_symbol_sequence` | the basic operating sequence: reset, `rx_start` and `tx_start` raised, symbols 0000, 0001, 0101 looped back at default parameters |

In `tb_zigbee_transceiver`, each burst carries all 16 symbols plus random
ones, with injected chip errors and `tx_start` falling mid-symbol. The
testbench counts each mechanism and fails if one never happens.

Run any of them with Verilator 5:

```
verilator --binary --timing -Irtl rtl/zigbee_pkg.sv tb/tb_zigbee_transceiver.sv \
          --top-module tb_zigbee_transceiver
./obj_dir/Vtb_zigbee_transceiver
```

## Files

`rtl/zigbee_pkg.sv` holds the shared constants, types, codebook and filter
taps. Each other file in `rtl/` is one module named like the file. The
design top is `zigbee_transceiver`; `digital_transmitter` and
`digital_receiver` are its two halves.

The sizes live in the package (`UPSAMPLE`, `N_TAPS`, `SAMPLE_W`,
`CHIPS_PER_SYMBOL`) and in the parameters of `fir_filter`, `up_sampler`,
`down_sampler`, `piso` and `sipo`. They are not independent:

* `HALF_SINE` is written out for 8 taps; a new `N_TAPS` or `UPSAMPLE` needs
  new taps from the formula above;
* the half-sine pulse must span one chip, so `N_TAPS` = `UPSAMPLE`;
* the `down_sampler` `PHASE` must equal `N_TAPS` − 1;
* the serial word is 2 × `SAMPLE_W` bits, and `clk_ser` must run at that
  many times the sample clock;
* `chip_code` assumes 8-chip codes and 4-bit symbols.
