# Turbo coder for 8-bit blocks: encoder, channel and iterative MAP decoder

This is a complete turbo coding chain in synthesizable SystemVerilog. A turbo
code sends each data block three times over: once as is, and twice as parity
streams from two recursive convolutional encoders. The second encoder sees the
block in a scrambled order. The receiver runs two soft-in soft-out (SISO)
decoders, one per parity stream. They trade what each has learned
("extrinsic information") through an interleaver and a deinterleaver. After a
few rounds both agree on the data, even when some received bits are wrong.

The design works on 8-bit blocks and sends a 24-bit codeword: rate 1/3. The
top level encodes a word, passes the codeword through a channel model that can
flip chosen bits and add noise, and decodes it. It then reports each decoder's
decision and whether that decision is wrong.

```
 input_data[7:0] ──► turbo_encoder ──► enc_data[23:0] ──► channel ──► 24 soft values ──► turbo_decoder ──► dec_data1, dec_data2
                                                          ▲ err_mask, noise                               └─► error_s1, error_s2
```

## The code

### Constituent encoder (`rsc_encoder`)

Each of the two encoders is a 4-state recursive systematic convolutional (RSC)
encoder with two registers, `s[0]` (newest) and `s[1]`. For each input bit `u`:

```
a      = u ^ s[1]          feedback polynomial 1 + D^2
parity = a                 the parity bit is the register input
s      = {s[0], a}
```

The parity stream is therefore `p_k = u_k ^ p_(k-2)`. It is the input divided by
`1 + D^2`. The register sequence for the inputs `1 0 1` is `00 → 10 → 01 → 00`,
printed as [newest, older]. Both encoders start every block in state 0. No tail
bits are sent, so the trellis ends in whatever state the data leaves it.

The tap values are parameters (`FB_TAPS`, `FF_TAPS` in `turbo_pkg`). They are
not the 8-state 3GPP LTE constituent code. They are the two-register code that
reproduces the source design's worked encoder example (next section).

### Interleaver (`interleaver`, `deinterleaver`)

The permutation is a fixed 8-entry table. It lists, for each output position,
the input position the element is taken from:

```
PERM = 4 1 2 7 8 3 5 6        x1 x2 ... x8  →  x4 x1 x2 x7 x8 x3 x5 x6
```

The deinterleaver applies the inverse permutation, `2 3 6 1 7 8 4 5` in the same
"take from" form. Both are one-block register buffers: a block presented with
`load` appears, permuted, one clock later and holds there. The element width
`W` is a parameter. The same modules carry bits in the encoder and 6- or 8-bit
soft values in the decoder.

### Codeword layout (`turbo_encoder`, `data_assembler`)

Words are sent most significant bit first. Bit 7 of `input_data` is trellis
step 0. The 24-bit codeword is

```
enc_data = { data[7:0], parity1[7:0], parity2[7:0] }
```

Here `parity1` comes from the natural order and `parity2` from the interleaved
order, each with its first step in the top bit. Worked example:

```
data      11111000
interl.   11100110        (bits 4 1 2 7 8 3 5 6 of the word)
parity1   11001010
parity2   11010010
enc_data  111110001100101011010010
```

The encoder is bit-serial. On `start` the word goes into a shift register, and
its permuted copy into the interleaver buffer. The next 8 clocks feed one bit
of each into RSC 1 and RSC 2. The data assembler shifts the systematic bit and
the two parity bits into three 8-bit registers and presents the 24-bit word.
`done` pulses **K+1 = 9 clocks** after the edge that samples `start`.

## The decoder

### SISO decoder (`siso_decoder`): MAP in the log domain

Each SISO decoder computes, for every bit, the a-posteriori log-likelihood
ratio (LLR) with the BCJR / MAP algorithm:

```
gamma_t(s,u) = [u==0]·(Ls_t + La_t) + [p(s,u)==0]·Lp_t            branch metric
alpha_t+1(s') = max*  over (s,u)→s'   of alpha_t(s) + gamma_t(s,u)       forward
beta_t(s)     = max*  over u          of gamma_t(s,u) + beta_t+1(s')     backward
Lapp_t = max*_{u=0}(alpha_t + gamma_t + beta_t+1) − max*_{u=1}(same)
Lext_t = Lapp_t − Ls_t − La_t                                           extrinsic
```

`Ls`, `Lp` and `La` are the systematic, parity and a-priori LLRs.
`max*(a,b) = max(a,b) + ln(1 + e^-|a-b|)` is the Jacobian logarithm. With it the
recursion is the exact MAP algorithm, not the max-log approximation; only the
correction term is rounded. Its integer form, for a difference `d` in LSBs of
0.25, is

```
round(4·ln(1 + e^(−d/4))) = 3 (d = 0), 2 (d = 1..3), 1 (d = 4..8), 0 (d ≥ 9)
```

Other details of the recursion:

- `gamma` keeps only the `u==0` and `p==0` terms, since per-step constants
  cancel.
- `alpha_0` is 0 in state 0 and "−∞" (−512) elsewhere.
- `beta_8` is 0 in every state, because the trellis is open-ended.
- Every step, the state metrics are renormalised by subtracting the metric of
  state 0.

Number formats (two's complement, LSB = 0.25, positive means "0 more likely"):

| quantity | width | range |
|---|---|---|
| channel soft value | 6 bits | −8 … +7.75 |
| a-priori / extrinsic / a-posteriori | 8 bits, saturating | −32 … +31.75 |
| state metrics | 12 bits | |

The architecture handles one trellis step per clock. On `start` the 24 input
LLRs are registered. Then come 8 forward cycles that fill a 9 × 4 alpha memory,
and 8 backward cycles that update beta and write `Lapp`, `Lext` and the hard
decision for steps 7 down to 0. `done` pulses **2K = 16 clocks** after the
start edge.

### Iteration (`turbo_decoder`)

One iteration is a pass of SISO 1 followed by a pass of SISO 2:

```
SISO 1:  Ls,              Lp1,  La = deinterleave(Lext2)     (zero in iteration 1)
SISO 2:  interleave(Ls),  Lp2,  La = interleave(Lext1)
```

The systematic values are interleaved once per block, when decoding starts.
The extrinsic buffers capture each SISO's output on its `done` pulse, one edge
before the other SISO samples them. The deinterleaver buffer is cleared with
`start`, so the first SISO 1 pass has no a-priori input. After `N_ITER = 4`
iterations the decoder presents:

- `dec_data1`: SISO 1's decisions, natural order. This is the decoded word.
- `dec_data2`: SISO 2's decisions, in SISO 2's own interleaved order.

Each pass takes 2K+2 = 18 clocks. That is the start pulse, 16 trellis steps
and the hand-over. `done` therefore follows `start` by
**N_ITER·2·(2K+2) = 144 clocks**. The two SISOs never run at the same time.

### Error flags (`top_turbo_encoder_decoder`)

- `error_s1` is set when `dec_data1` differs from the transmitted word.
- `error_s2` is set when `dec_data2` differs from the interleaved transmitted
  word.

They check the chain end to end, using the word captured at `start`. The
decoder cannot compute them on its own.

## Top-level interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | encode, transmit and decode `input_data` (ignored while `busy`) |
| `input_data` | in | 8 | data word, bit 7 sent first |
| `err_mask` | in | 24 | code bits to flip in the channel (bit i ↔ `enc_data[i]`) |
| `noise` | in | 24 × 6 signed | added to each soft value, LSB = 0.25 |
| `enc_data` | out | 24 | the codeword |
| `busy`, `done` | out | 1 | frame in progress; one-cycle pulse when results update |
| `dec_data1`, `dec_data2` | out | 8 | decisions of SISO 1 (natural order) and SISO 2 (interleaved order) |
| `error_s1`, `error_s2` | out | 1 | the matching decision word is wrong |

The channel maps a 0 to +2.0 and a 1 to −2.0 (±8 LSB). It flips the bits in
`err_mask`, adds `noise`, and saturates. The decoder samples the result 11
clocks after the edge that samples `start`, so `err_mask` and `noise` must be
held from `start` until then. A frame takes **156 clocks** from the edge that samples `start` to
`done`. The breakdown is 9 for encoding, 2 for launching the decoder, 144 for
decoding and 1 for the flag register. One frame is processed at a time.

## Files

| file | contents |
|---|---|
| `rtl/turbo_pkg.sv` | block length, permutation table, RSC taps, soft-value widths, iteration count |
| `rtl/rsc_encoder.sv` | bit-serial RSC encoder |
| `rtl/interleaver.sv`, `rtl/deinterleaver.sv` | block buffers with the permutation and its inverse |
| `rtl/data_assembler.sv` | serial-to-parallel packer for the 24-bit codeword |
| `rtl/turbo_encoder.sv` | two RSCs + interleaver + assembler |
| `rtl/channel.sv` | BPSK soft-value channel with error injection and noise |
| `rtl/siso_decoder.sv` | log-MAP SISO decoder |
| `rtl/turbo_decoder.sv` | two SISOs, two interleavers, one deinterleaver, iteration control |
| `rtl/top_turbo_encoder_decoder.sv` | encoder → channel → decoder, error flags |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares against a model written independently of the RTL,
ends with a `TB_RESULT checks=N failures=M` line, and has a watchdog.

- `tb_rsc_encoder` checks the parity against the recurrence
  `p_k = u_k ^ p_(k-2)`, the register sequence `00 → 10 → 01 → 00`, the
  one-clock latency and idle cycles.
- `tb_interleaver` and `tb_deinterleaver` check against literal tables, all
  256 bit blocks and random soft blocks. They also check hold behaviour and
  `clear`, the round trip, and a 6-element instance (table `3 4 5 1 6 2`,
  `1 1 0 0 1 1 → 0 0 1 1 1 1`).
- `tb_data_assembler` and `tb_channel` check the word order, pulse timing,
  restart, and the mapping with saturation.
- `tb_turbo_encoder` checks all 256 words and the worked example above, plus
  the 9-clock latency.
- `tb_siso_decoder` builds an exact reference. It enumerates all 256 input
  sequences and computes the true MAP LLR in floating point. The hardware must
  match it within 0.75 for `Lapp` and `Lext`, on clean, noisy, a-priori-loaded
  and weak inputs, and must take 16 clocks.
- `tb_turbo_decoder` tests error-free words, and every single flipped code
  bit in all 24 positions of all 256 words. All 6144 such frames decode
  correctly. It also tests single errors with noise, and the
  144-clock latency. Double-error patterns are counted, not required; typically
  about 58 of 60 are corrected.
- `tb_top_turbo_encoder_decoder` runs the whole chain at default parameters.
  The frames are the example word and the consecutive words `01011011` …
  `01100011`, decoded both clean and with a flipped bit, then random clean,
  single-error, noisy and heavily corrupted (5 flips) frames. It checks
  `enc_data`, both flags against their definitions, the 156-clock latency and
  a `start` while busy. It requires that each of these happens at least once:
  clean decode, error corrected, noisy frame corrected, start ignored, error
  flag raised.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/turbo_pkg.sv tb/tb_top_turbo_encoder_decoder.sv \
          --top-module tb_top_turbo_encoder_decoder
./obj_dir/Vtb_top_turbo_encoder_decoder
```

Replace the testbench name to run the others. Each one takes well under a
second.

## Where this design departs from, or interprets, its source

- **Constituent code.** The source names LTE but gives no polynomials. Its
  worked examples show a two-register RSC and an 8-entry interleaver. The
  taps here (feedback 1+D², parity = register input) are the only 4-state
  choice that reproduces its printed 24-bit example. A second, shorter example
  of a lone RSC agrees on the register sequence but not on its printed output
  bits. The 3GPP code (8 states, QPP interleaver, tail bits) is not
  implemented.
- **MAP arithmetic.** The source calls for the original MAP algorithm. It is
  realised here in the log domain with a 3-level correction term, which is
  exact up to that rounding. All widths, the scaling (LSB = 0.25), the
  normalisation and the serial forward-then-backward schedule are this
  design's own choices.
- **Schedule.** Passes run strictly in turn, SISO 1 then SISO 2. The source
  describes it that way in one place and as "simultaneous" in another.
- **Iteration count.** The source does not give one. Four is used.
- **`dec_data2`.** This design presents it in interleaved order. The source's
  simulation shows a second decoder output that differs from the input while
  its error flag is clear, but the mapping behind the printed values could not
  be reproduced. The error flags' definition is also this design's own.
- **Channel.** The source adds errors deliberately but gives no channel model.
  The BPSK mapping, amplitude, noise input and saturation are assumptions.
- **Handshakes, reset, latencies.** All are this design's own.
- **Not covered.** The physical implementation (synthesis to standard cells,
  layout, timing and power) depends on a cell library and is outside this RTL.

## Changing it

- `K` (block length) is a parameter throughout. A different `K` also needs a
  matching `PERM` table of `K` entries, passed to `turbo_encoder`,
  `turbo_decoder` and the top's reference interleaver. The testbenches assume
  `K = 8`.
- `N_ITER` sets the number of iterations and the latency. The decoder does not
  stop early.
- The RSC taps (`M`, `FB_TAPS`, `FF_TAPS`) are parameters of `rsc_encoder` and
  `siso_decoder`. The SISO trellis is derived from them, so another RSC only
  needs the same values in both. The testbench reference models hard-code the
  default code.
- Soft-value widths are in `turbo_pkg`. `MET_W` must leave room for the −∞
  value (−2^(MET_W−3)) plus a block's worth of branch metrics.
