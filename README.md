# G.Lite ADSL downstream receiver in SystemVerilog

An ADSL modem sends downstream data as DMT (discrete multitone) symbols: each
symbol is an inverse FFT of 127 usable tones, each tone carrying a QAM point of
0 to 16 bits. The line smears every symbol into the next; a short cyclic prefix
and a time-domain equaliser (TEQ) absorb that smear, so that a plain FFT at the
receiver recovers the tone values. Bytes are protected by Reed-Solomon coding
spread over time by a convolutional interleaver, whitened by a scrambler, and
checked once per 69-frame superframe by an 8-bit CRC.

This RTL is the receiver half of that link, from digitised line samples to
user bytes, in the G.Lite geometry: 256-sample symbols, a 16-sample cyclic
prefix, a synchronisation frame as the 69th frame of every superframe, and a
pilot on tone 64.

```
 s_data ──► TEQ ──► CP removal ──► sync-frame ──► FFT ──► bit ──► de-       ──► RS      ──► de-       ──► CRC ──► m_data
 (ADC)      FIR     (16 of 272)    drop (1/69)    256     decoder  interleaver  decoder     scrambler     check
            teq_fir cp_remove      sync_frame_drop fft_r2 bit_decoder deinterleaver rs_decoder descrambler crc8_check
```

The top level is `adsl_rx_top`. The last five blocks, from the bit decoder to
the CRC check, form their own module, `adsl_decoder`, which turns FFT bins
into user bytes. The analog front end and the ADC are not part of the RTL; the
top takes 24-bit signed samples.

## How data moves: rates and back-pressure

Every block connects to the next through a `valid`/`ready` pair. A transfer
happens on a clock edge where both are high. Nothing in the chain runs at a
fixed rate; the slowest block sets the pace and the others wait.

The slowest block is the FFT. It takes 256 cycles to load a symbol, 1024 to
compute it (8 stages of 128 butterflies) and 256 to unload it. While it
computes, `s_ready` falls and the sample source must hold. The source must
therefore be a buffer that can wait, not a free-running ADC. Cyclic-prefix
samples and sync-frame samples are accepted even while the FFT is busy,
because they are thrown away. One 272-sample symbol costs about 1550 clock
cycles, so at the G.Lite symbol rate of about 4 kHz a clock of 7 MHz or more
keeps up.

Rates per block:

| block | consumes | produces | latency / cost |
|---|---|---|---|
| `teq_fir` | 1 sample | 1 sample | 1 cycle |
| `cp_remove` | 272 samples | 256 samples | combinational |
| `sync_frame_drop` | 69 frames | 68 frames | combinational |
| `fft_r2` | 256 real samples | 256 complex bins | 256 + 1024 + 256 cycles |
| `bit_decoder` | 256 bins | sum of the bit table / 8 bytes | 1 tone or 1 byte per cycle |
| `deinterleaver` | 1 byte | 1 byte (after a (D-1)(N-1)-byte fill) | 1 cycle |
| `rs_decoder` | N bytes | N-R bytes | N + 2R + N + (N-R) cycles, one codeword at a time |
| `descrambler` | 1 byte | 1 byte | 1 cycle |
| `crc8_check` | 1 byte | 1 byte | combinational |

The design has no symbol-timing recovery. The first sample after reset must be
the first cyclic-prefix sample of frame 0 of a superframe. Counters in
`cp_remove`, `sync_frame_drop`, `deinterleaver`, `rs_decoder` and `crc8_check`
hold the alignment from then on.

## Configuration

The link parameters are set once after reset and then held, as they would be
after modem training. There is no adaptive update.

| port | meaning | range |
|---|---|---|
| `teq_we`, `teq_addr`, `teq_coef` | write TEQ tap `teq_addr` (Q2.14; 16384 = 1.0) | 16 taps; after reset tap 0 = 1.0, the rest 0 |
| `bt_we`, `bt_tone`, `bt_bits` | bits on tone `bt_tone` | 0..16; tones 0 and 64 always carry 0 |
| `cfg_n` | RS codeword length N, also the interleaving block | up to 255 |
| `cfg_r` | RS parity bytes R | 0, 2, 4, 8, 16 |
| `cfg_d` | interleave depth D | 1..16 |
| `cfg_log2s` | log2 of S, the DMT frames per codeword | 0..4 |

The configuration must be consistent:

- The bit table must load exactly 8·N/S bits per symbol.
- S must divide N.
- A data frame then holds (N−R)/S user bytes. The CRC block counts 68 of
  these frames per superframe.

## The bit decoder: from a complex bin to bits

The FFT scales its result by 1/256, so bin k holds the transmitted
constellation point of tone k. Each coordinate is measured in units of
2^`UNIT_SHIFT` LSBs (16 by default). A tone with b bits v[b−1..0] uses the ADSL
square-grid rule:

- X carries v[b−1], v[b−3], … and Y carries v[b−2], v[b−4], …, most
  significant bit first.
- Each coordinate is read as a two's-complement number with an implied LSB of
  1. Its value is therefore the odd integer 2q+1.
- X takes ⌈b/2⌉ bits and Y takes ⌊b/2⌋ bits.

The slicer computes q = floor(coordinate / 2^(UNIT_SHIFT+1)). It clamps q to
the coordinate's bit width, so points pushed beyond the edge of the grid still
decode to the outermost point. It then takes the low bits of q and interleaves
them back into v.

Tones are handled in ascending order. Each tone's bits go into a shift
accumulator, v[0] first. Bytes leave from bit 0 up. Bits left over at the end of
a symbol (fewer than 8) are dropped.

The ADSL standard maps odd b ≥ 3 onto a cross-shaped constellation. This design
uses a rectangular grid for odd b instead: X gets one bit more than Y. A
transmitter built to the standard's odd-b mapping will not interoperate on
those tones. Even b matches the standard's rule.

There is no frequency-domain equaliser: the design applies no per-tone gain or
phase correction. The channel must therefore be fully equalised in the time
domain, or be flat, for bins to land on the grid. The test bench models a
channel that the 16-tap TEQ inverts.

## The de-interleaver

The transmitter delays byte i of every N-byte block by (D−1)·i bytes. The
de-interleaver delays it by (D−1)·(N−1−i), so every byte sees the same total
delay of (D−1)(N−1), and the original order returns.

- **Buffer.** All bytes share one ring buffer. The byte for block position i
  is read (D−1)(N−1−i) entries behind the write pointer.
- **Start-up.** The first (D−1)(N−1) input bytes only fill the buffer and
  produce no output. The first output byte is byte 0 of the first codeword, so
  the RS decoder needs no separate codeword-alignment logic.
- **Buffer size.** The worst case is D = 16 and N = 255. That needs 3811 bytes,
  rounded up to 4096. Fully loaded 252-byte frames (126 tones × 16 bits) need
  3766 bytes.
- **Constraint on N and D.** For the transmitter's interleaving to be
  collision-free, N and D must be coprime. In practice this means an odd N, or
  D = 1.

## The Reed-Solomon decoder

The code works over GF(256) built on x^8+x^4+x^3+x^2+1. Its generator has the
roots α^0 … α^(R−1), and the first codeword byte is the highest-degree
coefficient. These are the ADSL choices. Codewords shorter than 255 bytes are
decoded as shortened codes.

The decoder keeps one codeword at a time and works through five phases:

1. **LOAD** (N cycles): store the bytes and update all R syndromes by Horner's
   rule, S_j ← S_j·α^j + byte.
2. **BM** (R cycles): one Berlekamp–Massey iteration per cycle. The
   discrepancy uses 17 parallel GF multipliers. The correction term is divided
   by the previous discrepancy through an inverse computed as a^254.
3. **OMEGA** (R cycles): the same multiplier row forms the error evaluator
   Ω(x) = S(x)Λ(x) mod x^R, one coefficient per cycle.
4. **CHIEN** (N cycles): positions are tested from the last to the first.
   Each Λ and Ω term is stepped by α^(−i). With these roots Forney's formula
   reduces to e = Ω(x) / (odd part of Λ)(x). The decoder keeps up to R/2
   (position, value) pairs.
5. **OUT** (N−R cycles): stream the data bytes, XORing in any recorded error
   value.

If the number of roots found differs from the degree of Λ, or exceeds R/2, the
decoder sets `rs_fail` and passes the codeword unchanged. `rs_done`
pulses after CHIEN, with `rs_nerr` and `rs_fail` valid until the next
codeword. With R = 0 the decoder skips straight from LOAD to OUT.

## Descrambler and CRC

The descrambler inverts the ADSL self-synchronising scrambler:
d(n) = d′(n) ⊕ d′(n−18) ⊕ d′(n−23), over received bits, bit 0 of each byte
first. It needs no synchronisation. A line error spreads to at most three
output bits.

The first byte of frame 0 of every superframe carries the CRC of the previous
superframe. The CRC covers all bytes of that superframe's 68 frames except its
own CRC byte. The generator is x^8+x^4+x^3+x^2+1, the register is cleared per
superframe, and bits are taken bit 0 first.

When the CRC byte arrives, `crc_check` pulses and `crc_error` shows whether the
byte differs from the computed CRC. The first superframe after reset is not
checked. Data keep flowing after an error.

## Fixed-point formats

| signal | format |
|---|---|
| samples in and out of the TEQ | 24-bit signed (`DW`); the TEQ rounds and saturates |
| TEQ taps | 16-bit Q2.14 |
| FFT data | `DW` bits signed, halved and rounded in every stage (result = DFT / 256), saturating |
| FFT twiddles | Q2.14, computed from `$cos`/`$sin` at elaboration |

The sample width follows from the heaviest loading. With 16 bits on every tone
and a constellation unit of 16 LSBs, the time signal of a symbol peaks near
2^18. The 24-bit default holds that with margin. A 16-bit build (`DW` = 16)
saves area but clips above an average of roughly 8 to 10 bits per tone. The
bit decoder and the rest of the decoder see only the FFT bins, which are 256
times smaller, so `adsl_decoder` on its own defaults to 16 bits.

## Where this design departs from a standard receiver

- Only the interleaved data path is built. There is no fast (non-interleaved)
  path, and no handling of the fast byte or of overhead channels.
- The sync frame is discarded, not used for timing or frame recovery.
- There is no frequency-domain equaliser, no pilot-tone tracking and no
  adaptive TEQ.
- Odd bit counts use a rectangular grid (see the bit-decoder section).
- The RS decoder is not pipelined across codewords. It is far faster than the
  FFT, so this costs nothing in the full chain.

## Files

- Design, in `rtl/`:
  - `adsl_pkg.sv`: shared constants (frame geometry, limits) and the GF(256)
    multiply, inverse and power functions.
  - One file per block, as named in the chain above, plus `adsl_decoder.sv`
    and `adsl_rx_top.sv`.
  - The registered stream outputs carry an assertion that an offered output
    holds until it is taken. The RS decoder also asserts that R is even, at
    most 16 and below N.
- Test benches, in `tb/`: `tb_<module>.sv` for every block and for the top. Each
  one prints `TB_RESULT checks=N failures=M`. Each computes its expected values
  independently: a double-precision DFT for the FFT, a table-based GF(256)
  encoder for the RS decoder, polynomial long division for the CRC.

`tb_adsl_rx_top` models a complete transmitter and line:

- CRC insertion, scrambler, RS encoder, interleaver, bit loading, inverse DFT
  with cyclic prefix, and a random sync frame.
- A two-tap line y = 0.8x[n] + 0.4x[n−1], which the TEQ undoes with the taps
  1.25·(−0.5)^k.
- Injected byte bursts and a corrupted CRC byte.

It runs two configurations back to back through a reset:

| | N | R | D | S |
|---|---|---|---|---|
| A | 127 | 16 | 16 | 1 |
| B | 66 | 4 | 1 | 2 |

It checks every output byte, the frame markers, and the RS and CRC status. It
also counts sync-frame drops, input stalls, RS corrections, RS failures, CRC
passes and CRC errors; each must occur. All top-level parameters stay at their
defaults.

`tb_adsl_decoder` runs the same two configurations on `adsl_decoder` alone,
fed with constellation points plus noise instead of time samples.

`tb_adsl_decoder_sweep` covers the supported parameter ranges:

- every R in {0, 2, 4, 8, 16};
- every D in {1, 2, 4, 8, 16};
- every S in {1, 2, 4, 8, 16};
- the heaviest bit loading: N = 251 bytes per symbol, 16 bits on almost every
  tone.

Each configuration gets a correctable burst and one corrupted CRC byte.

`tb_adsl_rx_top_full_load` runs the heaviest loading through the whole
receiver: N = 251, R = 16, D = 16, S = 1, with 2008 bits over the 126 data
tones. Every parameter keeps its default.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/adsl_pkg.sv tb/tb_adsl_rx_top.sv \
          -y rtl --top tb_adsl_rx_top -o sim
./obj_dir/sim
```

Use the same command with another test bench name (`tb_fft_r2`,
`tb_adsl_decoder_sweep`, …) for a single block. The full
receiver test takes about 650 000 clock cycles and runs in a few seconds. The
package must be listed first, since `-y` only finds modules.
