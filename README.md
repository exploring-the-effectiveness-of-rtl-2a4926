# SDM-SC FIR filter: sigma-delta encoding followed by stochastic-computing filtering

A conventional FIR filter needs one multi-bit multiplier per tap. This design
avoids that. A first-order digital sigma-delta modulator (SDM) turns each
multi-bit input sample into one bit. Over time, the density of ones in that bit
stream carries the signal. With the bit read as +1 or -1, multiplying it by a
coefficient needs only one XNOR gate, provided the coefficient is also a random
bit stream of the right density. One LFSR produces all the coefficient streams.
Each tap gets a circularly shifted copy of the LFSR word and compares it with the
tap's coefficient word. A small binary adder counts how many of the M products
are 1.

With the default sizes (15-bit input, 15-bit coefficients, 5 taps) the whole
filter has 35 flip-flops, a 16-bit adder, five 15-bit comparators, five XNOR
gates and a 3-bit ones counter.

```
            +-------------- sdm ---------------+
 u[14:0] -->|  Y <= Y + u - (v ? +2^14 : -2^14) |--- v ---+-----------+--- z^-1 ---+--- ... z^-1
            |  v  = ~Y[15]   (1: +1, 0: -1)     |         |           |            |
            +-----------------------------------+       XNOR        XNOR   ...   XNOR
                                                           |  w_0       |  w_1       |  w_{M-1}
   lfsr --+--> sng(R<W_0) --> w_0                          +-----> ones count -----> z (0..M)
          +--> rotr s --+--> sng(R<W_1) --> w_1
                        +--> rotr s --> ...  --> w_{M-1}
```

## Number coding: what the bits mean

This is the part that needs the most care when using the design.

| Signal | Coding | Value |
|---|---|---|
| `u` (m bits) | two's complement | `u / 2^(m-1)`, in [-1, 1) |
| `v` (1 bit) | bipolar stochastic bit | 1 means +1, 0 means -1 |
| `w_coef[i]` (k bits) | unsigned word, bipolar stream | weight `w = 2*W/2^k - 1`, so `W = round((w + 1) * 2^(k-1))` |
| `z` (ceil(log2(M+1)) bits) | count of XNOR products that are 1 | bipolar output sample `2*z - M` |

- Each clock, `2*z - M` is an unbiased but very noisy estimate of
  `sum_i w_i * u_{n-1-i}`. The extra clock of delay comes from the modulator.
- The useful output appears only after averaging, i.e. low-pass filtering and
  decimating `2*z - M` down to the signal band. That averaging is not part of
  this RTL.
- A larger OSR gives the averaging more samples per signal period.
- A longer LFSR gives the coefficient streams a finer resolution.

Example: the weights 0.7, 0.6, 0.9, 0.6, 0.7 become the words 27853, 26214,
31130, 26214, 27853 at k = 15.

## The modulator (`sdm`)

- The register `Y` is c = m + 1 bits wide.
- Each clock it adds the input sample and subtracts the current output,
  scaled to the input's full scale: `Y <= Y + u - (v ? 2^(m-1) : -2^(m-1))`.
- The quantiser is just the register's sign bit: `v = 1` when `Y >= 0`.
- The +-2^(m-1) feedback word is formed by sign extension, without an adder
  or a multiplexer: `{~v, ..., ~v, 1, 0, ..., 0}`.
- For any input in range, `Y` stays within [-2^m, 2^m). This is why m + 1 bits
  are enough. An assertion flags an overflow if a narrower register is ever
  configured.
- Over any window, the number of ones in `v` tracks `(1 + u/2^(m-1))/2`. The
  error stays within a couple of counts, whatever the window length.

## Coefficient streams (`lfsr`, `sng`, `sng_bank`)

- **LFSR.** The `lfsr` is a Fibonacci LFSR (x^15 + x^14 + 1 by default). Its
  feedback is inverted whenever all bits except the MSB are zero. This splices
  the all-zero word into the cycle, so the register passes through every value
  0 .. 2^k - 1 exactly once in 2^k clocks.
- **Sequence length.** The stream length is therefore N = 2^k. In every
  period, the comparator of a tap emits exactly W ones.
- **Taps.** Tap 0 compares the LFSR word itself. Tap i compares the word of
  tap i-1 rotated right by `SHIFT` bits. The rotation is a fixed
  rewiring inside `sng_bank`, with no gates.
- **Why rotate right.** The LFSR shifts left, so the rotated word equals the
  LFSR word from `SHIFT` clocks earlier, except in its top `SHIFT` bits. Each
  tap therefore sees a different point of the same sequence.
- **Correlation.** Without the rotations, all taps would compare the same
  word, and streams with equal weights would be identical. The rotations avoid
  that.
- **Exact counts.** Rotation is a bijection, so every tap still emits exactly
  W ones per period.
- **Comparator.** `sng` is the comparator `R < B`, with both operands
  unsigned.

## The filter core (`sc_fir`)

- A shift register of M-1 flip-flops holds V_{n-1} .. V_{n-M+1}.
- Tap i XNORs its bit with the coefficient stream w_i.
- A binary adder counts the ones among the M products.
- There is no output register: `z` is combinational from the register state.
- The sum can reach M, so `z` is ceil(log2(M+1)) bits wide. That is 3 bits
  for 5 taps.

## Interface and timing (`sdm_sc_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock f_s (the oversampled rate) |
| `rst_n` | in | 1 | asynchronous active-low reset: Y = 0, LFSR = `SEED`, delay line = 0 |
| `u` | in | `M_BITS` | input sample, taken on every rising edge |
| `w_coef[TAPS]` | in | `K_BITS` each | coefficient words; keep them constant (or tie them to constants) |
| `v` | out | 1 | modulator bit, one clock after its sample |
| `z` | out | `Z_BITS` | ones count of the XNOR products |
| `y` | out | `C_BITS` | modulator register (observation) |
| `r_word` | out | `K_BITS` | LFSR word (observation) |

- The design takes one sample per clock and has no handshake.
- For a tone at f_B and an oversampling ratio OSR, the clock is
  f_s = 2 * OSR * f_B.

| Parameter | Default | Meaning |
|---|---|---|
| `M_BITS` | 15 | input resolution m |
| `C_BITS` | 16 | modulator register c (at least m + 1) |
| `K_BITS` | 15 | LFSR and coefficient resolution k (2..20) |
| `TAPS` | 5 | number of taps M (at least 2) |
| `SHIFT` | 1 | rotation between taps s, 0 < s < k |
| `SEED` | 1 | LFSR reset value |
| `Z_BITS` | `$clog2(TAPS+1)` | width of `z` |

## Which parts are design choices

These follow the published SDM-SC scheme:

- a first-order SDM whose register is m + 1 bits and whose MSB is the
  quantiser;
- XNOR multipliers;
- a binary adder in place of the usual stochastic multiplexer adder;
- one LFSR shared through circular shifts;
- the sizes m = k = 15, M = 5.

These are choices of this implementation:

- two's complement input;
- the sign-extension form of the feedback;
- the LFSR polynomial, seed and zero-state splice;
- rotation to the right, with s = 1;
- coefficients as input ports rather than registers, and their (w+1)·2^(k-1)
  coding;
- asynchronous active-low reset;
- a `z` width of ceil(log2(M+1)).

Things that are not included:

- the decimation or averaging that turns `z` into output samples;
- any coefficient storage.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=F`.

| Testbench | What it checks |
|---|---|
| `tb_sdm` | Cycle-by-cycle against a model of the recurrence, at m = 15, c = 16 and at m = 8, c = 10. Also the density of ones for constant inputs, including both full-scale ends, and the one-clock latency. |
| `tb_lfsr` | A full period at k = 15 and k = 4, against a next-state model. Every value must occur exactly once, and the register must return to its seed after exactly 2^k clocks. |
| `tb_sng` | Exhaustive at k = 4, plus edge and random values at k = 15. |
| `tb_sng_bank` | One full period at the defaults: every tap bit against a model, exactly W ones per tap per period, and no two equal-weight taps identical. Also a k = 8, M = 4, s = 3 bank over two periods. |
| `tb_sc_fir` | 5 and 7 taps against a model of the delay line and the ones count, including the output extremes 0 and M. |
| `tb_sdm_sc_top` | The whole design at its default sizes (see below). |

`tb_sdm_sc_top` runs the whole design at its default sizes:

- The input is a sine of amplitude 0.99, with the weights 0.7 0.6 0.9 0.6 0.7.
- It is run at OSR = 32, 64, 128, 256, 512 and 1024, each for one LFSR period
  (2^15 clocks).
- Every clock, `v`, `z`, `y` and `r_word` are compared with an independent
  model.
- The amplitude of `2*z - 5` at the input frequency must be within 0.1 of
  0.99·|H(f_B)|. Near DC, |H| is close to the weights' sum of 3.5.
- The in-band SNR is measured and must improve with OSR.

Measured amplitudes:

| OSR | 32 | 64 | 128 | 256 | 512 | 1024 |
|---|---|---|---|---|---|---|
| measured | 3.452 | 3.434 | 3.449 | 3.461 | 3.463 | 3.460 |
| expected | 3.433 | 3.457 | 3.463 | 3.464 | 3.465 | 3.465 |
| in-band SNR (dB) | 15.2 | 17.9 | 22.2 | 26.8 | 29.3 | 33.0 |

The testbench also counts how often each mechanism occurs and fails if one
never does:

- both modulator output values;
- the LFSR wrapping back to its seed;
- `z` reaching 0 and M.

The in-band SNR is measured as follows:

- Signal: the power of the DFT bin of the tone.
- Noise: the summed power of all other bins from DC up to f_B.
- The testbench requires the SNR to rise by at least 1 dB with each doubling
  of OSR, and by at least 10 dB from OSR 32 to 1024.

The published evaluation of this scheme reports 38 to 48 dB over the same OSR
range. It does not say how that was measured, and it uses its own model of the
random sources. The lower values here are what white stochastic noise
predicts. Each of the five XNOR products has a variance near 1 per sample, and
1/(2·OSR) of that noise falls in band. Changing `SHIFT` moves the figures by
about 2 dB.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl rtl/sdm_sc_pkg.sv tb/tb_sdm_sc_top.sv \
          --top-module tb_sdm_sc_top -o sim && ./obj_dir/sim
```

Each testbench takes well under a second.

## Files

- `rtl/sdm_sc_pkg.sv`: default sizes and the LFSR polynomial table.
- `rtl/sdm.sv`: the modulator.
- `rtl/lfsr.sv`: the shared random source.
- `rtl/sng.sv`: the comparator.
- `rtl/sng_bank.sv`: the coefficient stream generator, including the
  rotations between taps (fixed wiring).
- `rtl/sc_fir.sv`: the delay line, XNOR gates and adder.
- `rtl/sdm_sc_top.sv`: the top level.
- `tb/tb_*.sv`: one testbench per module.
