# Concatenated single-parity coding for two-dimensional magnetic recording

In two-dimensional magnetic recording (TDMR) the tracks are written as
overlapping shingles without guard bands. A read head therefore picks up its
own track plus a fraction of the neighbouring track (inter-track interference,
ITI) on top of the usual along-track inter-symbol interference (ISI). This RTL
protects such a sector with the simplest code there is, the odd single parity
check (three data bits plus one parity bit with an odd number of ones), used
twice, and decodes it with soft-output MAP (BCJR) detectors that fold the
parity checks into their trellises. Two ways of concatenating the two parity
codes are implemented and can be chosen per sector:

| scheme | first parity | between | second parity | user bits per sector |
|---|---|---|---|---|
| `SCHEME_ALONG` | along the track, every 3 bits | DRP interleaver | along the track, every 3 interleaved bits | 8 tracks x 2304 |
| `SCHEME_ACROSS` | along the track, every 3 bits | nothing | across the tracks, every 3 tracks | 6 tracks x 3072 |

Both produce the same recorded sector: 8 tracks of 4096 bits. The along-only
scheme pays for its interleaver with latency and a frame buffer and is the
better one when ITI is strong; the along-and-across scheme is the better one
when ITI is weak.

A third setting, `SCHEME_UNCODED`, writes 8 x 4096 user bits without any
parity and runs the same detectors with the parity constraint switched off
(`multitrack_map.parity_en` low). It is the reference that shows what the
two parity codes gain.

## Sector and reader geometry

A sector has `NT = 8` recorded tracks of `NB = 4096` positions. Zeros (the
-1 magnetisation level) are assumed on both sides of it, in the guard bands.
`NT + 1 = 9` readers cover it. Reader `r` has track `r` as its *main* track
and track `r-1` as its *side* track, so it sees the two-bit symbol
`{x[r-1][i], x[r][i]}` at position `i`. Reader 0's side track is the leading
guard band, and reader 8's main track is the trailing guard band. Every track
pair is seen by exactly one reader. The across-track detector can then start
from a known state (the leading guard) and end in one (the trailing guard).

The equalized sample of reader `r` is modelled as

    y[i] = sum_{k=0..3} T_k * ( w_main * a_r[i-k] + w_side * a_{r-1}[i-k] ),   a = 2x - 1,
    T = [0.4 1 1 0.4]

`w_main` and `w_side` are run-time inputs (Q6, so 1.0 = 64); the design is
meant for ITI levels [1.0 0.25], [1.0 0.5] and [1.0 1.0]. Samples are 8-bit
signed with 4 fraction bits (1.0 = 16). The worst case, 5.6 at full ITI, fits.

## Write side (`tdmr_encoder`)

* `spc_encoder` is a bit-serial valid/ready stage. It passes three data bits
  and then emits their odd parity while holding its input, so it runs at
  4/3 of the input rate.
* `drp_interleaver` is a one-frame buffer (L = 3072 entries). It applies the
  dithered relative prime permutation `pi = W o P o R`:
  * read dither: `r = 8*floor(i/8) + (M + N*i) mod 8`
  * relative prime step: `q = (M2 + B2*r) mod L`
  * write dither: `j = 8*floor(q/8) + (S + P*q) mod 8`

  The constants are `M=3, N=5, M2=17, B2=1897, S=1, P=3`, and the write dither
  length is 8. They are this design's choice: N and P are odd and B2 is prime
  to 3072, so every stage is a permutation. All of them are parameters. As an
  interleaver the buffer writes entry `i` to address `pi(i)` and reads addresses
  in order. As a de-interleaver it writes in order and reads address `pi(a)` for
  output position `a`.
* `across_parity_encoder` turns a column of 6 data bits into 8 recorded bits.
  The parities go on tracks 3 and 7. A parity track is again made of odd words
  of four along the track, so the along-track detector can treat all 8 tracks
  the same way.

The encoder collects the coded sector in an 8 x 4096-bit buffer. It then
streams the sector out track by track, tagged with track and position. User
bits also enter track by track. In `SCHEME_ACROSS`, user track `d` is
recorded on track `d + d/3`.

## Read side (`tdmr_decoder`)

Soft information between stages is a **cost**: a max-log negative
log-probability. 0 is the most likely value, and 255 (8 bits, saturated)
means impossible. Multiplying probabilities becomes adding costs. Summing
over alternatives becomes taking the minimum. Normalising by the total becomes
subtracting the best cost. Decisions are taken by the smallest cost. The four
costs of a symbol `{side, main}` are called APP[00..11] below.

For each reader in turn, 4096 samples pass through:

1. **`fir_equalizer`**: 12 taps with run-time coefficients (signed Q7). The
   coefficients are computed offline from the channel response so that the
   output matches the target T. The delay line is cleared at the start of
   each reader.
2. **`multitrack_map`**: the core of the design, a 64-state max-log BCJR
   over the two-track symbol alphabet.
   * *State* = the last three symbols (6 bits), so 4 branches leave and
     4 enter every state. The branch metric is
     `min(GMAX, (y - y_ideal)^2 >> 7)`, where `y_ideal` comes from the state,
     the new symbol, the target and the two ITI weights.
   * *Parity in the trellis*: at every position `i mod 4 = 3`, the new bit of
     each track must complete the odd parity of its three predecessors. Those
     predecessors are in the state. Only one branch per state survives there.
     This is how detection and decoding of the outermost along-track parity
     happen in one pass.
   * *Guard readers*: for reader 0 the side bit, and for reader 8 the main
     bit, is forced to 0 and is not parity-checked. Only 8 states with
     2 branches stay reachable.
   * *Schedule*: the forward pass runs as samples arrive, one per cycle. It
     stores all 4096 forward-metric vectors (64 x 12 bits each) and the
     samples. The backward pass then runs from position 4095 down to 0 and
     emits the four normalised symbol costs of one position per cycle.
     Positions before 0 are taken as zeros. The end of the frame is left open.
3. **Parity removal**: outputs at positions `i mod 4 = 3` are dropped. The
   remaining 3072 go to index `3*(i/4) + i mod 4`. In `SCHEME_UNCODED` all
   4096 positions are kept at index `i`.
4. `SCHEME_ALONG` only:
   * the `drp_interleaver`, used as a de-interleaver with 32-bit entries (four
     costs), restores the pre-interleaving order;
   * **`spc_app_decoder`** decodes the first parity. For a word of four
     positions it scores all 64 symbol sequences in which both tracks have odd
     parity. For each data position and symbol value it keeps the best one.
     The parity position is dropped, leaving 2304 positions.
5. The resulting symbol costs are written into the column store,
   `app_ram[column][reader]`.

After all 9 readers, each column goes through:

6. **`across_track_map`**: a 2-state max-log BCJR across the 8 tracks of the
   column. The state is one track's bit. The branch `x[r-1] -> x[r]` uses
   reader `r`'s APP[x[r-1] x[r]]. The trellis starts from the leading guard
   state, opens into two states, and closes into the trailing guard state. It
   outputs the bit costs and decisions of all 8 tracks.
7. `SCHEME_ACROSS` only: **`across_spc_decoder`** decodes each group of
   3 data tracks + 1 parity track by max-log over its 8 odd code words. It
   outputs the 6 data bits.

The decoded bits come out as one column per cycle:

* `out_col` is the user-bit index within a track.
* `out_bits[t]` is track `t` in `SCHEME_ALONG` and `SCHEME_UNCODED`.
* `out_bits[5:0]` are the six data tracks in `SCHEME_ACROSS`; the upper bits
  are 0.

## Interfaces and timing

`tdmr_spc_codec` is the top. It places the encoder (`enc_*` ports) and the
decoder (`dec_*` ports) side by side. The recording channel between
`enc_out_*` and `dec_in_*` is outside the logic.

| stage | throughput | latency |
|---|---|---|
| `spc_encoder` | 3 in / 4 out bits per 4 cycles | combinational |
| `drp_interleaver` | 1 entry/cycle in and out | read-out starts the cycle after `rd_start` |
| `fir_equalizer` | 1 sample/cycle | 1 cycle |
| `multitrack_map` | NB samples in NB cycles | backward pass: NB cycles; `2*NB + 1` cycles from `start` to `done` |
| `spc_app_decoder`, `across_track_map`, `across_spc_decoder` | 1 word/column per cycle | 1 cycle |
| `tdmr_decoder`, whole sector | | 103,736 cycles (`SCHEME_ALONG`), 76,839 cycles (`SCHEME_ACROSS`), 77,862 cycles (`SCHEME_UNCODED`) |

The decoder's `in_ready` is low during each reader's backward pass and
de-interleaving. The sample source must stall then. Decoded columns have no
back-pressure. Every block resets asynchronously with `rst_n` low. A sector
is started by a one-cycle `start` with the `scheme` (type
`tdmr_pkg::scheme_e`) alongside. Shared types, the cost width and the DRP
index function are in `rtl/tdmr_pkg.sv`.

Storage at the default size:

| memory | size |
|---|---|
| encoder sector buffer | 32 kbit |
| encoder interleaver | 3 kbit |
| detector forward metrics | 4096 x 768 bit (3.1 Mbit) |
| detector sample buffer | 32 kbit |
| de-interleaver | 98 kbit |
| column store | 4096 x 9 x 32 bit (1.2 Mbit; 3072 or 2304 rows used by the coded schemes) |

## What is specified and what is chosen here

Taken from the method this RTL implements:

* odd parity with 3 data bits;
* sector 8 x 4096, and the bit counts 2304 -> 3072 -> 4096 and 6 -> 8 tracks;
* the DRP structure, with R = 8 and L = 3072;
* 12-tap equalizer and target [0.4 1 1 0.4];
* the 64-state / 4-branch trellis with one branch at parity positions;
* the 64-sequence first-parity decoder;
* the 2-state across-track trellis and the order of the stages in both
  schemes.

Choices made here:

* max-log cost arithmetic instead of probabilities, 8-bit costs and 12-bit
  state metrics, with the noise variance dropped as a common scale;
* the DRP constants other than R and L;
* the reader/guard geometry above. The original setup is described as "first
  track partly -1s, last track twice as wide"; here that becomes two guard
  readers;
* one shared equalizer and detector processing the 9 readers in turn, with
  whole-frame (not windowed) BCJR;
* an along-track equalizer only, with the ITI handled by the detectors rather
  than by a second equalizer across the tracks;
* all handshakes, buffering and sample formats.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* The small decoders (`spc_app_decoder`, `across_track_map`,
  `across_spc_decoder`) are compared exactly against brute-force enumeration
  of all sequences.
* `drp_interleaver` is checked against an independent permutation at
  L = 3072, interleaved and then de-interleaved.
* `multitrack_map` (at NB = 64) must recover random two-track data from
  noisy samples, also with guard tracks, and its cycle count is checked.
* `tdmr_encoder` runs at full size against a reference encoder.
* `tdmr_decoder` runs at full size against a reference encoder and channel
  model, including a run at full ITI and one where the equalizer must remove
  an extra post-cursor.
* `tb_tdmr_spc_codec` runs the top at its default size, end to end. It covers
  both coded schemes and the uncoded one at ITI 0.25 and 0.5, and counts decoder stalls, encoder
  back-pressure, guard readers, de-interleaver passes, across-track parity
  decoding and scheme switches.
* `tb_tdmr_iti_workloads` runs one full sector per ITI level (0.25, 0.5, 1.0)
  and scheme, coded and uncoded, through the top. Its noise is roughly
  Gaussian, with a standard deviation of 0.25 of the unit amplitude. It
  prints the bit error rate of each run. It fails if a coded rate reaches 1 %,
  an uncoded rate reaches 10 %, or a coded scheme does worse than uncoded at
  the same ITI. A typical run sees 0 to 5 errors per 18,432 bits for the
  coded schemes. Uncoded, it sees about 3 % at ITI 0.25, 6 % at ITI 0.5 and
  0 at ITI 1.0. Full ITI doubles the signal amplitude relative to the noise.

The channel model in the testbenches is an idealised equalized channel with
additive noise. None of them measures bit error rates on a physical channel
model with jitter (T50 = 1.0 / 2.0, SNR sweeps).

Simulate with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_tdmr_spc_codec \
        -y rtl -y tb +libext+.sv -Irtl rtl/tdmr_pkg.sv tb/tb_tdmr_spc_codec.sv
    ./obj_dir/Vtb_tdmr_spc_codec

The full-size end-to-end run takes a few seconds.

## Files

| file | contents |
|---|---|
| `rtl/tdmr_pkg.sv` | cost types, scheme enum, odd parity, DRP index function |
| `rtl/spc_encoder.sv` | along-track odd parity encoder |
| `rtl/drp_interleaver.sv` | DRP interleaver / de-interleaver frame buffer |
| `rtl/across_parity_encoder.sv` | across-track parity for one column |
| `rtl/tdmr_encoder.sv` | sector encoder, all three schemes |
| `rtl/fir_equalizer.sv` | 12-tap FIR equalizer |
| `rtl/multitrack_map.sv` | 64-state two-track joint detector / parity decoder |
| `rtl/spc_app_decoder.sv` | soft decoder of the first along-track parity |
| `rtl/across_track_map.sv` | 2-state across-track detector |
| `rtl/across_spc_decoder.sv` | across-track parity decoder |
| `rtl/tdmr_decoder.sv` | sector detector/decoder, all three schemes |
| `rtl/tdmr_spc_codec.sv` | top: encoder and decoder |
| `tb/tb_*.sv` | one self-checking testbench per module |
