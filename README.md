# 28-point DFT on systolic arrays

This is a streaming 28-point complex discrete Fourier transform written as
synthesizable SystemVerilog. It takes one complex 8-bit sample per clock and
returns X(0)..X(27) as 17-bit complex values, also one per clock. Successive
frames can follow each other with no gap.

The design does not use an FFT butterfly network. It uses the symmetries of
the cosine and sine kernels to fold the transform into a few small
constant-matrix products. Because 28 = 4·7 and 7 is prime, all of
these products are 3-point circular convolutions. Each product runs on a
grid of identical processing elements (PEs). A PE multiplies, then adds or
subtracts according to a fixed tag bit. The structure follows a published
systolic DFT architecture for FPGAs. Where that architecture leaves details
open, this implementation fills them in; those choices are listed under
[Departures and open points](#departures-and-open-points).

## How the transform is folded

Write the input as y(n), n = 0..27, with N = 28 and M = N/4 = 7. The DFT is
X(k) = A(k) − jB(k), where

    A(k) = Σ y(n) cos(2πkn/N)      B(k) = Σ y(n) sin(2πkn/N)

The input is complex, so A and B are complex too. Then
X.re = A.re + B.im and X.im = A.im − B.re.

**Step 1: fold the input around N/2.** Let a(n) = y(n) + y(N−n) and
b(n) = y(n) − y(N−n) for 1 ≤ n ≤ 13. Set a(0) = y(0) and a(14) = y(14). A
now needs only a(0..14) and B only b(1..13).

**Step 2: split by parity.** The even indices are a1(n) = a(2n) and
b1(n) = b(2n). The odd indices are a2(n) = a(2n+1) and b2(n) = b(2n+1).
Then A = A1 + A2 and B = B1 + B2, where

    A1(k) = Σ_{n=0..7} a1(n) cos(πkn/7)        B1(k) = Σ_{n=1..6} b1(n) sin(πkn/7)
    A2(k) = Σ_{n=0..6} a2(n) cos(πk(2n+1)/14)  B2(k) = Σ_{n=0..6} b2(n) sin(πk(2n+1)/14)

Only k = 0..7 is needed. All 28 outputs follow from these:

    A(k) = A1(k) + A2(k)        A(14+k) = A1(k) − A2(k)      k = 0..7
    B(k) = B1(k) + B2(k)        B(14+k) = B1(k) − B2(k)
    A(14−k) = A(14+k)   A(28−k) = A(k)   B(14−k) = −B(14+k)   B(28−k) = −B(k)

**Step 3: turn every sum into 3-point circular convolutions.** Fold a1 once more:
s(n) = a1(n) + a1(7−n) and d(n) = a1(n) − a1(7−n), for n = 1..3. Then

    A1(2k)   = a1(0) + a1(7) + S(k),   S(k) = Σ_{n=1..3} s(n) cos(2πkn/7)
    A1(2k−1) = a1(0) − a1(7) + D(k),   D(k) = Σ_{n=1..3} d(n) cos(π(2k−1)n/7)

for k = 1..3. The two remaining values are A1(0) = a1(0) + a1(7) + Σ s(n)
and A1(7) = a1(0) − a1(7) + Σ (−1)^n d(n). These use adders only.

B1 is folded the same way. Let sb(n) = b1(n) − b1(7−n) and
db(n) = b1(n) + b1(7−n). Then B1(2k) = Σ sb(n) sin(2πkn/7) and
B1(2k−1) = Σ db(n) sin(π(2k−1)n/7). B1(0) = B1(7) = 0.

A2 and B2 are folded about their middle sample a2(3), b2(3). For n = 0..2
let a2e(n) = a2(n) + a2(6−n), a2o(n) = a2(n) − a2(6−n), b2e(n) =
b2(n) − b2(6−n) and b2o(n) = b2(n) + b2(6−n). Then, for k = 1..3,

    A2(2k)   = A2E(k) + (−1)^k a2(3),       A2E(k) = Σ_{n=0..2} a2e(n) cos(πk(2n+1)/7)
    A2(2k−1) = A2O(k),                      A2O(k) = Σ_{n=0..2} a2o(n) cos(π(2k−1)(2n+1)/14)
    B2(2k)   = B2E(k),                      B2E(k) = Σ_{n=0..2} b2e(n) sin(πk(2n+1)/7)
    B2(2k−1) = B2O(k) + (−1)^(k−1) b2(3),   B2O(k) = Σ_{n=0..2} b2o(n) sin(π(2k−1)(2n+1)/14)

The end values need adders only: A2(0) = Σ a2(n), A2(7) = 0, B2(0) = 0 and
B2(7) = Σ (−1)^n b2(n).

With β = π/7, the S product is a 3×3 matrix whose entries are ±cos β,
±cos 2β and ±cos 3β. With its rows taken in the order S(1), S(3), S(2), the
magnitudes are constant along every diagonal (Toeplitz). That is the 3-point
circular convolution. The same holds for D, DB, A2E and B2E in natural row
order, and for SB, A2O and B2O in the order 1, 3, 2. The whole transform
therefore needs eight 3×3 arrays.

## The systolic array

`systolic_array` computes out = C·v for a constant matrix C. A new vector v
can enter every clock. Each cell (r, c) holds one coefficient and works as
follows:

* The data value v(c) enters at the top of column c and moves down one row
  per clock.
* The partial sum enters each row from the left as 0 and moves right one
  column per clock. In each cell it gains `+ v·|C(r,c)|` if the tag is 1, or
  `− v·|C(r,c)|` if the tag is 0. The tag is the sign of C(r,c).
* The coefficient magnitude Z enters at the top row and the left column
  only. It then moves diagonally, from the upper-left to the lower-right
  neighbour. Every diagonal therefore carries one value, and only
  2·3−1 = 5 distinct coefficients enter each array. This works because all
  eight matrices are Toeplitz in magnitude; an assertion at the start of
  simulation reports any cell where this would not hold.

For S, the published layout is:

| row → output | Z entering (left) | tags | Z entering (top, per column) |
|---|---|---|---|
| S(1) | cos 2β | 1 0 0 | cos 2β, cos 3β, cos β |
| S(3) | cos β  | 0 1 0 | |
| S(2) | cos 3β | 0 0 1 | |

Every cell registers its three outputs, so a value spends one clock in each
cell. To keep a vector together, column c is delayed c clocks on entry. Row r
reaches the right edge 3 + r clocks after entry. It is then delayed
`LAT − 3 − r` more clocks, so all rows of one vector leave together
exactly `LAT` clocks after they entered. All eight arrays use
`LAT = 3 + 3 − 1 = 5`. `out_valid` is `in_valid` delayed by the
same amount.

The PE (`pe`) works on complex data with a real coefficient. It has two
multipliers and two adder/subtractors, one pair for each of the real and
imaginary parts. Y and Z pass through it unchanged.

## Data path and timing

```
x_r,x_i ─► sp_conv ─► pre_add ─► dft_core ─────────────► post_combine ─► ps_conv ─► y_r,y_i,out_k
 (serial)  (28 → ║)  (a,b and    eight 3×3 circular arrays  (A,B, X=A−jB, (║ → serial)
                      foldings) S D SB DB A2E A2O B2E B2O    ÷512)
```

| stage | clocks | notes |
|---|---|---|
| `sp_conv` | 1 after the 28th sample | collects while the previous frame is held; `in_valid` low pauses collection |
| `pre_add` | 1 | all folding adders |
| `dft_core` | 5 | eight arrays in parallel; the adder-only terms travel through a matching delay |
| `post_combine` | 1 | builds the 28 outputs and rescales them |
| `ps_conv` | 1, then 28 outputs | X(0) first; `out_k` gives the index |

X(0) appears 9 clocks after the last sample of its frame. One frame is
accepted per 28 input clocks, so the array hardware is busy 1 clock in 28.
That is the price of keeping the serial interface. `ps_conv` asserts if a
new frame arrives before the previous one has been sent, which the input
rate rules out. Reset is synchronous and active high. It clears every
register.

Top-level ports of `dft28`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `in_valid`, `x_r`, `x_i` | in | 1, 8, 8 | input sample (two's complement) |
| `out_valid`, `out_k`, `y_r`, `y_i` | out | 1, 5, 17, 17 | X(out_k) |
| `tw_x_in`, `tw_y_in`, `tw_c_in` | in | 10 | twiddle multiplier X, Y, C |
| `tw_cps_in`, `tw_cms_in` | in | 11 | C + S, C − S |
| `tw_r_out`, `tw_i_out` | out | 10 | R, I |

## Number format and accuracy

All coefficients are cos(mπ/14) or sin(mπ/14). They come from one
quarter-wave table, `COS_Q[m] = round(512·cos(mπ/14))` for m = 0..7, which
gives 512, 499, 461, 400, 319, 222, 114 and 0. Each is an unsigned 10-bit
magnitude on a scale of 2⁹; its sign is the cell's tag.

Data widths:

* Folded data in the arrays: 12 bits.
* Array sums: 26 bits. Neither the sums nor the pre-adders can overflow for
  any 8-bit input.
* Output: the terms that bypass the arrays are shifted up by 2⁹ to the same
  scale. X is then divided by 512 with an arithmetic shift (rounding toward
  −∞) and cut to 17 bits. The largest possible |X| is 2·28·128 = 7168.

Each coefficient is rounded by at most 1/1024. The worst-case error
therefore stays within 28·2·128/1024 + 1 = 8 LSB of the exact DFT. On random
frames the observed error is at most 2.

## Twiddle multiplier

`cmul3` computes (X + jY)(C + jS) = R + jI with three multipliers:

    R = Y(C − S) + (X − Y)C        I = X(C + S) − (X − Y)C

The product (X − Y)C is shared. C, C + S and C − S arrive precomputed, on a
scale of 2⁹. The result is divided by 2⁹ again, rounding toward −∞, and
saturated to 10 bits. The block is combinational.

The unit is in the top level with its own `tw_*` ports, next to the
transform, and is tested on its own. The transform path does not use it,
because the architecture does not fix where a twiddle multiplication would
enter this decomposition. The table that would hold C, C ± S for it is not
included either, because its contents are not defined.

Reference vectors (C = C + S = C − S = 0x1CD = 461, i.e. cos(π/7)·512):

| X, Y | R, I |
|---|---|
| −134, −43 | −121, −39 |
| 34, 149 | 30, 134 |
| 85, −43 | 76, −39 |

## Departures and open points

These points follow from the original architecture as described:

* The folding into a, b, a1, a2, b1, b2, s and d, the S and D circular
  convolutions, and the aim of computing every sum that way.
* The S array layout.
* The PE function.
* The serial/parallel structure.
* The 8-bit input, 17-bit output and 10-bit coefficient widths.
* The ×2⁹ scaling.

These are choices of this implementation:

* **The circular forms of B1, A2 and B2.** The original states that these
  sums are converted into circular convolutions but does not show how. The
  sb/db, a2e/a2o and b2e/b2o foldings above were derived here in the same
  way as s/d. The total is 8 × 9 = 72 PEs, or 144 real multipliers plus 3 in
  `cmul3`. The original reports 168 hard multipliers and does not say how
  they are divided up.
* **The D, SB, DB, A2E, A2O, B2E and B2O arrays** are not drawn in the
  original. They are built on the S pattern.
* **A1(0), A1(7), A2(0) and B2(7)** are formed with adders as shown above.
* **Handshake and framing** are additions: `in_valid`, `out_valid`,
  `out_k`, the frame double buffer and the input skew and output deskew that
  let a vector enter every clock.
* **Reset, pipeline registers, the final rounding mode and saturation in
  `cmul3`** are choices of this implementation.
* **Adders.** The original uses ripple-carry adders for area. Here the
  adders are written as `+` and `−`, and the synthesis tool picks the
  structure (on an FPGA, the carry chain).
* **Length.** The length is fixed at N = 28. The coefficient table and the
  row orders in `dft_pkg` are specific to M = 7.

## Verification

Every stage has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pe` | add and subtract cells against X ± Y·Z, including extreme values |
| `tb_systolic_array` | all eight matrices against coefficients computed with `$cos`/`$sin`, streamed with gaps; exact values and a latency of exactly 5; the S array's tags and coefficient flow |
| `tb_pre_add` | every folded value against the decomposition equations |
| `tb_dft_core` | all array outputs and the carried terms, back-to-back blocks, latency |
| `tb_post_combine` | all 28 outputs within 8 of a floating-point DFT (1000 frames) |
| `tb_sp_conv`, `tb_ps_conv` | frame assembly with pauses, output order, tight frame spacing |
| `tb_cmul3` | the reference vectors above plus 2000 random twiddles |
| `tb_dft28` | full design at its real size: random, impulse, constant, tone and full-scale frames, back to back and with pauses; the accuracy bound, output order, 9-clock latency, and the twiddle ports |

`tb_dft_ref.sv` (package) and `sa_harness.sv` are testbench helpers.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dft_pkg.sv tb/tb_dft_ref.sv tb/tb_dft28.sv --top-module tb_dft28 -o sim
./obj_dir/sim
```

Use the same command for any other testbench, with its name in place of
`tb_dft28`. `tb_dft_ref.sv` is needed only by `tb_pre_add`, `tb_dft_core`
and `tb_post_combine`. To lint the design alone:
`verilator --lint-only -Wall -y rtl rtl/dft_pkg.sv rtl/dft28.sv`.

## Files

`rtl/dft_pkg.sv` holds the sizes, types, coefficient table and matrix
definitions. `rtl/dft28.sv` is the top level. `rtl/sp_conv.sv`,
`rtl/pre_add.sv`, `rtl/dft_core.sv`, `rtl/post_combine.sv` and
`rtl/ps_conv.sv` are the stages. `rtl/systolic_array.sv`, `rtl/pe.sv` and
`rtl/delay_line.sv` form the array. `rtl/cmul3.sv` is the twiddle
multiplier.
