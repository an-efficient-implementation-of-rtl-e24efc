# Folded (partially parallel) polar encoder

A polar encoder computes the codeword `x = u · G_N` over GF(2). `G_N` is the
n-fold Kronecker power of the 2×2 kernel `F = [[1,0],[1,1]]` (with `N = 2^n`),
combined with a bit-reversal permutation. Written as a circuit, this is an
FFT-like network of `log2 N` stages. Each stage has `N/2` kernels, and each
kernel maps a bit pair `(a, b)` to `(a XOR b, b)`. A fully parallel encoder
builds that network directly: 32 XORs for N = 16, and `(N/2)·log2 N` in
general. It finishes in one cycle, but its cost grows fast with N.

This encoder folds the network in time instead. The input vector `u` enters
**P bits per clock**, in natural order. Each stage has only **P/2 kernels**,
and each kernel works through the operations of its "folding set" one after
another. The default configuration is **N = 16, P = 4**. It uses 8 kernels
(2 per stage) and 12 delay registers. It delivers the 16-bit codeword over 4
clocks, with a latency of 3 clocks.

## Structure

```
u_in[P] ──► polar_par_stages ──► polar_fold_stage L=1 ──► polar_fold_stage L=2 ──► ... ──► x_out[P]
             (stages 1..log2P,     (stage log2P+1)          (stage log2P+2)          L = N/(2P)
              no registers)             ▲ sel[0]                 ▲ sel[1]
                                        └──────── polar_fold_ctrl ┘ (beat counter, valid / first / last)
```

| file | role |
|---|---|
| `rtl/polar_pkg.sv` | `bitrev()` and `fold_delay()` helpers |
| `rtl/polar_kernel.sv` | the kernel `(a, b) -> (a^b, b)`, combinational |
| `rtl/polar_par_stages.sv` | the first `log2 P` stages, combinational |
| `rtl/polar_fold_stage.sv` | one folded stage: P/2 kernels with delay commutators |
| `rtl/polar_fold_ctrl.sv` | beat counter and select/valid delay line |
| `rtl/polar_encoder_pp.sv` | top level, parameters `N` (16) and `P` (4) |

### Stages inside a beat

A beat holds `u[Pt] .. u[Pt+P-1]`. The first `log2 P` stages pair bits that
are 1, 2, …, P/2 apart, so both bits of every pair are in the same beat.
These stages are plain kernels with no registers. After them, line `l`
carries lane `bitrev(l)`. For P = 4 the order is `[0, 2, 1, 3]`, which is
the line crossing between stages 1 and 2 of the 4-parallel architecture.

### Folded stages: the delay commutator

This is the part that needs the most care. Stage `s > log2 P` pairs bits
whose indices differ by `D = 2^(s-1)`. Such bits arrive on the same line,
`L = D/P` beats apart. So the folded stages have L = 1, 2, 4, … up to
`N/(2P)`. Each kernel unit `k` of a folded stage reads lines `2k` (upper)
and `2k+1` (lower) and has:

* **R1**: a shift register of L bits on the lower line.
* **R2**: a shift register of L bits in front of the kernel's upper input.
  It loads the upper line when `sel = 0` and R1's output when `sel = 1`.
* the kernel's lower input, which is the upper line when `sel = 1` and R1's
  output when `sel = 0`.

`sel` is 0 for the first L beats of every 2L-beat window and 1 for the last
L beats. Take L = 1 with upper-line bits `a0, a4` and lower-line bits
`a2, a6` as an example:

| cycle | sel | R2 out | kernel lower | kernel output |
|---|---|---|---|---|
| 0 (a0, a2 arrive) | 0 | – | – | – |
| 1 (a4, a6 arrive) | 1 | a0 | a4 (line) | (a0^a4, a4) |
| 2 | 0 | a2 (came via R1) | a6 (R1) | (a2^a6, a6) |

Every window therefore comes out L cycles after it went in, still one beat
per cycle. Cycles without input are driven with `sel = 0`. That lets the
registers drain the second half of the last window, so codewords may be
separated by any number of idle cycles. For 16/4 this gives one-register
delays in stage 3 (R1–R4) and two-register delays in stage 4 (R5–R12).

### Control

`polar_fold_ctrl` counts the input beats of each codeword (0 … N/P−1). It
passes `(valid, beat)` down a delay line that follows the data. Folded stage
`f` sees its data `2^f − 1` cycles after the input, and its `sel` is bit `f`
of the beat number found at that point in the delay line. `out_valid`,
`out_first` and `out_last` come from the end of the delay line, N/P − 1
cycles after the input.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears the counter and all delay registers) |
| `in_valid` | in | 1 | `u_in` holds a beat |
| `u_in` | in | P | `u_in[j] = u[P·t + j]` at beat t of the codeword |
| `out_valid` | out | 1 | `x_out` holds a beat |
| `out_first`, `out_last` | out | 1 | first / last output beat of a codeword |
| `x_out` | out | P | codeword bits, order below |

* The N/P beats of a codeword must arrive **on consecutive cycles**, and
  an assertion in `polar_fold_ctrl` checks this. Codewords can follow each
  other directly or after idle cycles.
* Frozen positions of `u` must already be zero. The encoder does not know
  the information set, so a (16, k) code for any k uses the same hardware.
* Latency: the first output beat comes **N/P − 1 cycles** after the first
  input beat (3 for 16/4). The output is combinational from the last stage's
  registers and the current input. Throughput is P bits per clock.
* **Output order.** At output beat k (0 … N/P−1), line `2m + o` (m = kernel
  unit, o = 0 upper, 1 lower) holds row
  `r = (P/2)·k + bitrev(m, log2P − 1) + (N/2)·o` of `v = u·F^{⊗n}`, and
  `v[r] = x[bitrev(r, n)]`. For 16/4 this gives:

  | beat | line 0 | line 1 | line 2 | line 3 |
  |---|---|---|---|---|
  | 0 | x0 | x1 | x8 | x9 |
  | 1 | x4 | x5 | x12 | x13 |
  | 2 | x2 | x3 | x10 | x11 |
  | 3 | x6 | x7 | x14 | x15 |

  Each last-stage kernel yields two consecutive codeword bits. The pairs
  appear in bit-reversed order (0, 4, 2, 6, 1, 5, 3, 7 for the 8 pairs).

## Parameters

`N` (code length, power of two) and `P` (parallelism, power of two,
2 ≤ P < N). The defaults N = 16, P = 4 are the configuration this design
was made for. Other values are this design's generalisation. They are tested
at (32, 2), (64, 4), (256, 8) and (1024, 16). Hardware cost is
`(P/2)·log2 N` kernels and `P·(N/P − 1)` delay registers.

## Where this follows its source and where it does not

Taken from the source architecture:

* the kernel operation;
* combinational stages inside a beat, with the line crossing for P = 4;
* two kernels per stage for 16/4;
* the folded stages built from a lower-line delay, an upper-line delay before
  the kernel and two multiplexers, with one register per delay in stage 3
  and two in stage 4;
* natural-order input and bit-reversed output.

Choices made here:

* the multiplexer select encoding and the control that drives it;
* the valid/first/last handshake and the rule that beats are back to back;
* the synchronous reset;
* the exact line order at the output. No final line crossing after the last
  stage is built;
* the general-N/P form: bit-reversed line order after the parallel stages,
  and L = 2^f for folded stage f.

Left out:

* The **fully parallel encoder** (one cycle, 32 XORs for N = 16). It is the
  comparison baseline, not part of this design. `polar_par_stages` with
  `P = N` computes the same network.
* A **pipeline cut** after the kernels, which would raise the clock rate.
  The kernels here are not pipelined. When `sel = 1`, a kernel's lower input
  is its incoming line, so the longest combinational path runs from `u_in`
  through the parallel stages and one kernel of every folded stage to
  `x_out`: log2 N XORs in series.
* A **reconfigurable multi-radix mode**. It is mentioned for this family of
  encoders, but its function and structure are not defined, so it is not
  built.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>`. The reference codeword is always taken
from the generator matrix (`v[r]` = XOR of `u[i]` over every `i` whose
binary digits include those of `r`), not from a butterfly model.

| testbench | what it covers |
|---|---|
| `tb_polar_kernel` | all 4 input pairs against `F` |
| `tb_polar_par_stages` | exhaustive, P = 4 and P = 8 |
| `tb_polar_fold_stage` | L = 1 and L = 2, random windows and idle gaps |
| `tb_polar_fold_ctrl` | select timing, valid/first/last, reset |
| `tb_polar_encoder_pp` | top at default 16/4: unit vectors, 400 random codewords back to back and with gaps, a reset inside a codeword, latency on every beat; counts each of these events and fails if one never happens |
| `tb_polar_encoder_long` | top at (32,2), (64,4), (256,8), (1024,16) through `tb_polar_enc_run` |

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/polar_pkg.sv tb/tb_polar_encoder_pp.sv --top-module tb_polar_encoder_pp
./obj_dir/Vtb_polar_encoder_pp
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.
