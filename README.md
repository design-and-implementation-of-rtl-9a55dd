# VPLC modem cores: pipelined 4096/512-point FFT and quasi-cyclic LDPC codec

A very-high-rate power-line modem (up to about 400 Mbit/s in a 75 MHz band)
sends DMT/OFDM symbols of 4096 samples (data frames) and 512 samples
(preamble and control frames), and protects its data with an LDPC code of
rate 1/2 up to 7/8. Two signal-processing cores carry most of the work:

* **MOD** (`fft_mod`): a streaming FFT that takes one complex sample per
  clock. It transforms 4096 or 512 points and also runs as the IFFT of the
  transmitter.
* **FEC** (`ldpc_enc`, `ldpc_dec`): an encoder and a min-sum decoder for a
  family of quasi-cyclic LDPC codes. The codes share one base matrix. Only
  the number of information blocks changes with the rate.

A third, small block, `cp_insert`, puts the cyclic prefix in front of each
time-domain symbol that the IFFT produces.

`vplc_core` instantiates these cores side by side. Each has its own
ports; only clock and reset are shared. The modem chain between them
(scrambler, constellation mapper and LLR demapper, synchronisation,
channel estimation) is not part of this RTL.

All files are SystemVerilog-2017. `rtl/vplc_pkg.sv` holds the shared
types, the sizes and the base matrix of the code.

## MOD: radix-4 single-path FFT

### Decomposition

A decimation-in-frequency radix-4 step splits an N-point DFT into four
N/4-point DFTs. It works on the inputs `x[n], x[n+N/4], x[n+N/2], x[n+3N/4]`:

```
g1 = x0 +   x1 + x2 +   x3        -> X[4r]   = DFT_N/4( g1[n] )
g2 = x0 - j*x1 - x2 + j*x3        -> X[4r+1] = DFT_N/4( g2[n] W_N^n  )
g3 = x0 -   x1 + x2 -   x3        -> X[4r+2] = DFT_N/4( g3[n] W_N^2n )
g4 = x0 + j*x1 - x2 - j*x3        -> X[4r+3] = DFT_N/4( g4[n] W_N^3n )
```

Six such steps make the 4096-point transform. The stages have frame
lengths 4096, 1024, 256, 64, 16 and 4.

### One stage (`fft_r4_stage`)

The stage sees a frame of NS samples as four quarters of NS/4 samples
each. Its delay buffer is one RAM of three banks, each NS/4 words:

| quarter of the arriving frame | buffer                                     | stage output |
|---|---|---|
| 0, 1, 2 | the arriving sample goes into bank q; the old word of bank q is read out | old word × W_NS^((q+1)·n): this is g2, g3 or g4 of the previous frame |
| 3 | banks 0..2 and the arriving sample feed the butterfly; g2, g3, g4 are written back into banks 0..2 | g1, with no twiddle |

So each stage sends out g1, g2·W^n, g3·W^2n, g4·W^3n, which are the four
sub-frames of the next stage. The stage needs only one complex
multiplier, and that multiplier is busy three clocks out of four. The
first output of a frame leaves 3·NS/4 + 1 clocks after the frame's first
sample.

The other parts of a stage:

* `fft_bf4`: the butterfly. It uses two levels of complex adders and
  scales the result by 1/4.
* `fft_twiddle`: the twiddle generator. It stores a quarter-wave cosine
  table of 1025 Q1.14 words, computed at elaboration. The other three
  quadrants come from symmetry.
* `fft_cmult`: the complex multiplier. It rounds and saturates its result
  and has one register stage.
* The output selector picks g1, the twiddled buffer word, or the bypassed
  sample.

**Draining.** A stage must empty itself after the last frame of a burst.
If no sample arrives at a frame boundary while results are still
buffered, the stage steps through quarters 0..2 on its own. `in_ready` is
low while it does so, and an assertion checks that nothing is fed in
during that time.

### 512 points and the inverse

512 is not a power of four. When `nsel = 1`:

* stage 1 is bypassed: the sample is only registered;
* stage 2 runs in radix-2 mode on 512-sample frames:
  `x[n]+x[n+256]` leaves at once, and `(x[n]-x[n+256])·W_512^n` leaves
  during the next half frame;
* stages 3 to 6 then do 256, 64, 16 and 4 points.

`inverse = 1` swaps the real and imaginary parts at the input and at the
output, which turns the FFT into the IFFT.

### Reorder and scaling

The pipeline delivers bins in digit-reversed order. `fft_reorder` writes
each sample to address k(p) of one bank of a 2 × 4096 buffer. It then
reads that bank out in natural order while the other bank fills.

| N | stream position p | bin k(p) |
|---|---|---|
| 4096 | base-4 digits d0 … d5 | k = d0 + 4·d1 + … + 1024·d5 |
| 512 | radix-2 digit b0, then base-4 digits d1 … d4 | k = b0 + 2·d1 + 8·d2 + 32·d3 + 128·d4 |

Every radix-4 step divides by 4 and the radix-2 step divides by 2. The
forward output is therefore X[k]/N, and the inverse output is the
ordinary (1/N) inverse DFT. Samples are 16 + 16 bits; the measured error
is within ±3 LSB of the exact scaled DFT. The core has no input-dependent
(block-floating-point) scaling. A modem needs a gain stage between IFFT
and FFT; the end-to-end testbench uses ×32.

### MOD interface (`fft_mod`)

Send `in_valid` and `in_data` one sample per clock, N samples per symbol.
Symbols may follow each other back to back. Start a new burst only while
`in_ready` is high. Change `nsel` and `inverse` only when `busy` is low.
The output comes out in natural order, one bin per clock with
`out_valid` high. The first bin appears 8198 clocks after the first input for 4096
points, and 1030 clocks after it for 512 points. That delay is 3/4 of
every enabled stage's frame, one symbol in the reorder buffer, and a
few register clocks.

## Cyclic prefix (`cp_insert`)

Each symbol on the line starts with a copy of its own last P samples. A
multipath echo shorter than the prefix then stays inside one symbol, and
the receiver's FFT window sees a cyclic signal.

| symbol | N (IFFT) | P (prefix) | on the line |
|---|---|---|---|
| `CP_DATA` (long symbol, header, data) | 4096 | 448 | 4544 |
| `CP_CONTROL` | 512 | 128 | 640 |
| `CP_PREAMBLE` | 512 | 0 | 512 |

The block stores a whole symbol in one half of a two-bank buffer, then
reads it back from sample N-P to N-1 and then from 0 to N-1. The other
bank fills meanwhile. Because a symbol leaves in N+P clocks but arrives in
N, `in_ready` drops when both banks are waiting. An upstream source that
streams continuously must then pause, so `vplc_core` does not chain the
MOD output straight into it. `fmt` is sampled with the first input sample
of a symbol. `out_first` marks the first prefix sample. Output starts two
clocks after the last input sample of a symbol.

The 16-sample roll-off window of preamble and control symbols is not applied.
Its shape is not specified, and with it a control symbol would be 624
samples instead of 640.

## FEC: the code

H is built from 24 × 24 circulants I^s. Row i of I^s has its single 1 in
column (i+s) mod 24, so multiplying a 24-bit vector by I^s is a cyclic
rotation. H has 12 block rows (M = 288 check rows). For rate n/(n+1),
n = 1..7, it has 12·(n+1) block columns:

```
          n x 12 block columns       1      11
block rows 0..10:  [ A_1 ... A_n  |  B  |  T ]      T: identities on the diagonal
block row  11:     [ C_1 ... C_n  |  D  |  E ]         and just below it
                                                  E = [0 ... 0 I]
```

Information length is 288·n and the codeword is 288·(n+1) bits (576,
864, …, 2304). All rates share the same A/C columns: a lower rate simply
leaves out the higher information groups.

Every information block column has three circulants. B has I^1 in block
row 0 and I^0 in block row 5, and D = I^1. With this choice
Φ = E·T⁻¹·B + D is the identity, so Richardson's encoding reduces to:

```
p1 = C·u + Σ_rows (A·u)                 (24 bits)
p2_r = p2_(r-1) + (A·u)_r + (B·p1)_r    (running XOR, 11 x 24 bits)
```

The shift values are this design's own (`hb_shift` in `vplc_pkg`). The
layout and the sizes are those of the original design. The shift values
were not designed for girth or decoding threshold. To use another code of
the same layout, replace `hb_shift`. Keep Φ = I, or the encoder's p1 step
must change.

## FEC: encoder (`ldpc_enc`)

The encoder is a four-stage pipeline. Each stage takes 24 clocks and
handles bit t of every 24-bit sub-block per clock:

1. **Load.** 84 input bits per clock are shifted into the information
   registers.
2. **Tap.** The registers become circular shift registers that rotate
   once per clock. A fixed tap at position s therefore reads bit
   (t+s) mod 24, so each circulant costs one wire. XOR trees form bit t
   of the 12 block-row products and of p1.
3. **Add B·p1.** p1 is now complete, so its rotation can reach any bit.
   This stage forms bit t of A·u + B·p1.
4. **Solve T.** A running XOR down the block rows gives bit t of p2_0 to
   p2_10. These bits are the output.

Each stage hands its registers to the next at the end of a slot. A new
codeword can therefore start every 24 clocks, and the last parity bit
leaves 96 clocks after the first information bit.

Interface:

* Slots are fixed; `slot_start` marks their first clock.
* Hold `in_valid` for a whole slot. `rate_n` is sampled at the slot start.
* `u_in[k][j]` carries information bit k·288 + j·24 + t.
* `p1_out` is codeword bit n·288 + t.
* `p2_out[r]` is codeword bit n·288 + 24 + 24·r + t.

## FEC: decoder (`ldpc_dec`)

The decoder is row-serial: it handles one check row per clock, so every
stage lasts 288 clocks. A check row touches at most one variable of each
of the 96 block columns: element (row mod 24 + s) mod 24. Each column's
LLRs therefore sit in a 24-word array with one read port and one write
port.

| stage | work per row |
|---|---|
| LOAD | 8 channel LLRs per clock (7 information groups and the parity group) |
| INIT | clear the check-message record of the row |
| MIN | Z = Q − L_old, then minimum, second minimum, position of the minimum and signs. These replace L_old as a compressed record. The row's parity over sign(Q) is checked in the same pass. |
| ADD | Q_new[n] += L_new[m,n]. Q_new starts from the channel LLRs. Q has an odd and an even bank, which swap after each ADD. |
| TCHK | final parity check |
| OUT | 7 decided information bits per clock |

Without early stop, decoding takes 288·(2·max_iter + 4) clocks from the
first LLR to the last decided bit. With `early_stop`, a MIN pass that
finds every check satisfied jumps straight to TCHK.

`checksum` is `{stopped_early, parity_ok}`. LLRs are 6-bit, with positive
meaning bit 0. Posterior LLRs are 8-bit and messages 6-bit, both
saturating. The check-node rule is plain min-sum, without scaling.

The decoder handles one codeword at a time. The original architecture
overlaps codewords across its 288-clock stages and reaches one codeword
per 288 clocks. At 8 iterations and rate 7/8, this decoder gives
2016 bits per 5760 clocks, which is far below 400 Mbit/s at any
realistic clock.

## Where this RTL departs from the original design, or fills gaps

* **Code.** The circulant shift values are new. They were chosen so that
  Φ = I.
* **FFT scaling.** Each step scales by a fixed 1/radix. The original
  chooses the fixed-point scaling from the input magnitude through a
  look-up table, which is not reproduced here.
* **512 points.** The 512-point transform uses a radix-2 step inside
  stage 2. The original only says that the FFT size is selectable.
* **Delay buffer.** The buffer is a delay-feedback RAM. Its draining rule
  and the control signals are this design's own.
* **Decoder.** It is not overlapped across codewords (see above). Z
  messages are formed on the fly and not stored. Word widths are this
  design's own.
* **Stage count.** The decoder follows "2(n+1)+2 stages, 288(2n+4) clocks".
  A figure of the original numbers its last stages 2(n+2)+1 and
  2(n+2)+2.
* **Not built.** The rest of the modem is absent: scrambler, mappers
  (BPSK to 1024-QAM, DBPSK, 16-PSK), the roll-off window,
  synchronisation, channel estimation, the RS(5,3) control-frame code and
  the MCU.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what is compared |
|---|---|
| `tb_fft_twiddle` | all 4096 twiddles against floating-point cos/sin (±1 LSB) |
| `tb_fft_cmult` | products against exact integer arithmetic |
| `tb_fft_bf4` | butterfly against a 4-point DFT (radix-2 mode too) |
| `tb_fft_r4_stage` | NS = 16 stage in radix-4, radix-2 and bypass modes against the DIF equations; first-output delay; draining |
| `tb_fft_reorder` | digit-reversal for 512 and 4096 points, back-to-back symbols |
| `tb_fft_mod` | 512-point (forward and inverse) and 4096-point symbols against a direct floating-point DFT (±6 LSB tolerance) |
| `tb_ldpc_enc` | 12 codewords of all rates in consecutive slots; every row of H checked; 96-clock latency |
| `tb_ldpc_dec` | own reference encoder, LLRs with weak wrong bits, every rate 1/2..7/8; decoded bits, parity flag, early stop, iterations used, latency 288·(2n+4); a word with many confidently wrong bits must leave the parity flag low |
| `tb_cp_insert` | data, control and preamble symbols in a row: prefix content, symbol lengths, `out_first`, back-pressure through `in_ready` |
| `tb_vplc_core` | full size, end to end: 16-QAM through IFFT then FFT (4096 and 512 points, every subcarrier decided correctly); the IFFT output given a prefix (448 and 128 samples); encoder then decoder at rates 7/8 and 1/2. It counts the inverse mode, the 512-point mode, stage draining, prefixed symbols, full and early-stopped decoding. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vplc_pkg.sv tb/tb_vplc_core.sv \
          --top-module tb_vplc_core -o sim && ./obj_dir/sim
```

The full-size end-to-end test builds in about a minute and runs in under
a second.
