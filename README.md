# GELP speech coder at 1.6 kbit/s in SystemVerilog

This is a complete hardware speech codec that fits telephone-band speech
into 1600 bit/s. Every 25 ms (200 samples at 8 kHz, 8-bit), the encoder
measures four things about the sound:

- whether it is voiced, and if so its pitch period;
- its loudness;
- the shape of its spectrum, as an 8th-order all-pole filter.

These are packed into one 40-bit packet. The decoder rebuilds speech from
each packet. It drives a synthesis filter with either a glottal-pulse train
(voiced sounds) or pseudo-random noise (unvoiced sounds), and interpolates
the parameters over four subframes so that frame boundaries are not audible.
The model is glottal-excited linear prediction (GELP). It is a classical LPC
vocoder whose voiced excitation is a glottal-flow-like pulse instead of a
bare impulse.

The arithmetic is built to be cheap in hardware:

- The autocorrelation is computed by ten multiply-accumulators in one pass.
- The pre-emphasis filter is applied to the autocorrelation, not to the samples.
- The spectrum is turned into line spectral pairs (LSPs) in closed form, by solving two quartic equations.
- Pitch is found from the sign bits of the signal, with XNOR and counting ones instead of multiplications.
- The decoder filters directly with the LSP cosines, using a regular lattice of identical second-order sections.

## Packet

| bits   | field | meaning |
|--------|-------|---------|
| 39:33  | `vp`  | 0 = unvoiced; otherwise pitch period = `vp` + 20 samples (21..147) |
| 32:28  | `gain`| index into a 32-entry gain table |
| 27:0   | `lsp` | eight scalar-quantised LSP cosines, bits {4,3,4,3,4,3,4,3}, first parameter in 27:24 |

`gelp_pkg::packet_t` is this struct. The 7/5/28 split is the one the coder
was designed around. Putting voicing and pitch into one 7-bit field is this
implementation's encoding: 127 pitch lags plus "unvoiced" fill exactly 128
codes.

## Encoder (`gelp_analyzer`)

```
 in_sample ─► sample_buffer ─► autocorr ──► acf_emphasis ─► levinson_durbin ─► sqrt_unit ─► gain_quantizer ─┐
             (2 x 200 B)     (10 MACs)  │   (Ryy from Rss)   (a1..a8, E)        (G = √E)                     ├─► packet
                                        │                        └──────────► lpc_to_lsp ─► lsp_quantizer ───┤
                                        └──► pitch_detector (sign bits, lags 21..147, voicing) ──────────────┘
```

### Double buffer and framing

`sample_buffer` is 400 bytes used as two 200-sample halves written in
rotation. When a half fills, the analysis frame is the last 56 samples of the
other half followed by the 200 new ones: a 256-sample window with a
200-sample hop. `rd_addr` is frame-relative (0 = oldest sample). For the very
first frame, which has no earlier half, the first 56 samples read as zero.

### Autocorrelation with pre-emphasis moved after it

`autocorr` streams the frame once, one sample per clock, through a 9-deep
delay line feeding ten MACs. This gives raw sums Rss(0..9). Since
y(n) = s(n) − 0.925·s(n−1), the autocorrelation of the pre-emphasised signal
follows from that of the raw signal:

    Ryy(k) = (1 + 0.925²)·Rss(k) − 0.925·(Rss(k−1) + Rss(k+1))

`acf_emphasis` computes this with Q14 constants (30403, 15155). This is why
ten lags are computed for an 8th-order analysis. The same sample stream also
feeds the pitch detector.

### Levinson–Durbin and gain

`levinson_durbin` first shifts Ryy so that Ryy(0) sits in [2³⁰, 2³¹), keeps
16 bits of each lag, and then runs the textbook recursion. It uses one
multiplier, one divider and one subtractor, one operation per clock:

- k is in Q14, clamped to |k| < 1.
- a is in Q12, saturated to 16 bits.
- E is 32-bit, updated as E·(2²⁸ − k²)/2²⁸.

It takes about 100 clocks. The prediction error E gives the gain
G = √E (in Q4, after undoing the normalisation shift). G comes from
`sqrt_unit`, a non-restoring square root that produces one result bit per
clock. `gain_quantizer` picks the nearest of 32 levels.

### LPC to LSP in closed form (hardest part)

From A(z) = 1 + a1·z⁻¹ + … + a8·z⁻⁸, `lpc_to_lsp` forms the symmetric and
antisymmetric polynomials:

    P(z) = A(z) + z⁻⁹·A(1/z)
    Q(z) = A(z) − z⁻⁹·A(1/z)

It divides out their fixed roots (z = −1 for P, z = +1 for Q). Each quotient
is then symmetric of degree 8. With x = z + 1/z = 2·cos ω, each quotient
becomes a quartic x⁴ + a·x³ + b·x² + c·x + d, whose four real roots in
(−2, 2) are the LSP cosines. The decoder's filter uses these cosines
directly.

`quartic_solver` solves the quartic by Ferrari's method:

1. Find the largest root y1 of the resolvent cubic
   y³ − b·y² + (ac − 4d)·y − a²d + 4bd − c² = 0.
   It uses Newton's method started at y = 9, which is above every root that
   can occur, with 16 fraction bits. It stops when the Newton step becomes
   zero, or after 40 steps.
2. Compute E = a/2, A = √(E² − b + y1) and B = (E·y1 − c)/A.
3. Solve two quadratics:

       z1,2 = (−(A+E) ∓ √((A+E)² − 2(y1+B))) / 2
       z3,4 = ( (A−E) ∓ √((A−E)² − 2(y1−B))) / 2

   Note the opposite sign of B in the second quadratic. Writing y1 + B in
   both, as is sometimes seen, does not factor the quartic.
4. Clamp the roots to ±1.9 and sort them in decreasing order with a
   five-comparator network.

All four square roots share one 48-bit `sqrt_unit`. One solver is used
twice, for P and then Q. The results are interleaved as
clsp = {P0, Q0, P1, Q1, …}, largest first. That is the ordering of the LSP
frequencies, and the order the synthesis filter expects.

### Pitch and voicing from sign bits

`pitch_detector`:

1. Low-pass filters the frame with a 4-tap moving sum and keeps only the sign
   of each sample. The result is a 256-bit word.
2. For each lag k = 21..147 (one lag per clock), XNORs the word with itself
   shifted by k and counts the ones, giving m(k).
3. Scales the count by (1 + 0.002k) to undo the bias from the shrinking
   overlap.
4. Takes the pitch as the lag with the largest scaled count.

The frame is declared unvoiced if any of these holds:

1. The energy is low: Rss(0) < 240 per sample.
2. The spectrum is not low-pass: Rss(1) < 0.3·Rss(0), and the best score is
   below 185.
3. The pitch jumped more than 15% from the previous frame, and the best score
   is below 160.

`lsp_quantizer` codes each cosine against its own table of 16 or 8 levels.
Odd-numbered parameters get the extra bit.

The encoder needs 532 clocks per frame, and a frame arrives every 200
samples. Any clock above about 22 kHz keeps up in principle. A frame that
arrives while the previous one is still being analysed is dropped and
counted in `overruns`.

## Decoder (`gelp_synthesizer`)

```
packet ─► hold reg ─► lsp_decoder ─► interpolator (8 LSPs) ─────────────────────────────┐
                  ├─► gain_codebook ─► interpolator (gain) ─┐                           ▼
                  └─► pitch ─► interpolator (period) ─► glottal_pulse ─┐   ×gain ─► lsp_synth_filter ─► s_out
                                                     noise_gen ────────┴─(voiced?)─┘
```

A packet is accepted (`pkt_valid`/`pkt_ready`) into a one-deep holding
register. Playback of a frame takes 200 `tick`s. Each frame is split into
four 50-sample subframes k = 0..3. In subframe k, every parameter is:

    ((7 − 2k)·previous + (2k + 1)·current) / 8

This is built from shifts and adds only (`interpolator`). The pitch period is
interpolated only when both frames are voiced.

The excitation is one of two sources:

- Voiced: `glottal_pulse` stretches or compresses a single stored pulse
  w(i) of length L = 64 to the wanted period N by overlap-add.
  - If N ≤ L, v(i) = ((N−1−i)·w(i) + i·w(L−N+i)) / (N−1).
  - If N > L, the pulse is tapered by a falling ramp at the start and a
    rising ramp at the end, and zero-padded between.
  - A new period is read at each period boundary.
  - At an unvoiced-to-voiced change the pulse restarts with the new frame's
    pitch.
- Unvoiced: `noise_gen` is a 16-bit maximal-length LFSR
  (x¹⁶+x¹⁴+x¹³+x¹¹+1, seed 0xACE1), whose top byte is the sample.

The excitation is scaled by the interpolated gain and filtered by
`lsp_synth_filter`. This is the all-pole filter 1/A(z) built directly from
the eight cosines c_i = 2·cos ω_i:

- Two chains of four "trunks" each. Each trunk is 1 − c_i·z⁻¹ + z⁻², with
  odd-numbered cosines in the P chain and even-numbered ones in the Q chain.
- Each chain is closed by one extra delay.
- Output: s(n) = e(n) − ½·(ΣtrunksP + ΣtrunksQ + P_end(n−1) − Q_end(n−1)).

Internally it keeps 8 extra fraction bits and saturates to 16 bits.

## Top level (`gelp_coder`)

Encoder and decoder side by side on one clock:

- `in_valid`/`in_sample` come from an AD converter.
- `packet_out` goes to a channel.
- `packet_in` comes from the channel.
- `dac_tick`/`speech_out` feed a DA converter.

Connect `packet_out` to `packet_in`, through a FIFO, for a loop-back codec. The
converters and the channel are not part of the RTL.

## Fixed-point formats

| signal | format |
|--------|--------|
| input samples | signed 8-bit |
| Rss, Ryy | 32-bit raw sums |
| LP coefficients a | Q12, 16-bit |
| reflection coefficient k | Q14 |
| LSP cosines (2cos ω) | Q12, 16-bit, range ±1.9 |
| gain | Q4, 12-bit |
| speech output | signed 16-bit |

## Where this implementation makes its own choices

The coder's structure is followed closely. The following are this
implementation's own, because the original tables and some details are not
available:

- **Gain table.** 0.5·2^(i/4), in Q4 (`gelp_pkg::gain_level`), not a trained
  table.
- **LSP quantiser levels.** Uniform levels over a hand-chosen range per
  parameter (`gelp_pkg::lsp_level`). The original used tables trained with
  the generalised Lloyd algorithm. Expect more spectral distortion than a
  trained quantiser.
- **Glottal prototype.** A formula-generated 64-sample pulse
  (`glottal_pulse::proto`). The original was a whitened residual of a
  sustained vowel.
- **Resolvent cubic.** Solved by Newton iteration. The second quadratic uses
  y1 − B, as explained above.
- **Low-pass filter before the sign bits.** A 4-tap moving sum.
- **Voicing energy threshold.** Read as a per-sample mean of 240.
- **LFSR.** Its length, taps and seed are chosen here.
- **Q formats, the normalisation in Levinson–Durbin, the serial schedules,
  the handshakes, the packet bit order and the start-up behaviour.** All
  chosen here.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gelp_pkg.sv tb/tb_gelp_coder.sv \
          --top-module tb_gelp_coder -o sim && obj_dir/sim
```

`tb_gelp_coder` runs the whole codec at its real sizes. Ten hops of
synthetic speech are looped back through the decoder: a resonant pulse train
at pitch 60, then at pitch 45, then noise, then silence. The testbench checks
that:

- each hop gives one packet;
- pitch and voicing are right;
- silence gives gain code 0;
- the decoder gives 200 samples per packet;
- analysis finishes within a hop.

It also counts that every mechanism occurred: both buffer halves, the
zero-filled first frame, both voicing outcomes and both kinds of unvoiced
criterion, a zero-energy frame, all four subframes, pitch interpolation,
both excitation sources, and an onset restart.

The block testbenches compare against floating-point models:

- `tb_quartic_solver` uses a reference root finder.
- `tb_lpc_to_lsp` starts from known LSP sets.
- `tb_lsp_synth_filter` compares with a direct-form 1/A(z).
- `tb_gelp_analyzer` checks the packet against a floating-point analysis.

## Files

`rtl/gelp_pkg.sv` holds the shared constants, the packet type and the level
formulas. Each other `rtl/*.sv` file is one module, named after its file.
`tb/tb_<module>.sv` is that module's testbench.
