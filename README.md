# Multiplierless constant rotators for signal-processing transforms

Transforms such as the DFT, FFT and DCT spend most of their arithmetic on
rotating complex samples by angles that are known in advance (the twiddle
factors). A general complex multiplier needs four real multipliers for each
rotation. This RTL does the same job with shifts and adders only, using two
methods:

* **CCSSI constant rotators** (combined coefficient selection and
  shift-and-add implementation). Each angle alpha gets a small
  Gaussian-integer coefficient `P = C + jS`, chosen off line so that every
  coefficient of a *kernel* lies close to one common radius `R` (fixed
  scaling) and costs few adders. The rotation is then `(x + jy)(C + jS)`,
  built as canonic-signed-digit (CSD) shift-and-add networks. Only the
  angles in `[0, pi/4]` need coefficients. All the other twiddle angles come
  from those by swapping and negating components.
* **Enhanced MSR-CORDIC** (mixed scaling and rotation). A few
  micro-rotation stages each multiply by `A + jB`, where `A` and `B` are
  short sums of signed powers of two. The rotation angle and the scaling
  are applied in the same step, and the parameters are chosen so that the
  product of the stage norms is close to 1. The "weighted amplifying factor"
  of the enhanced scheme changes how the parameters are searched. It adds no
  hardware, so the datapath is the same as for the plain MSR-CORDIC.

The top level, `mtr_top`, puts one of each side by side.

```
mtr_top
├── ccssi_twiddle_rotator      N-point twiddle rotator, latency 1
│   └── ccssi_kernel_rotator   one constant rotator per kernel coefficient + mux
│       └── ccssi_rotator      (x+jy)(C+jS) with 4 CSD products and 2 adders
│           └── csd_const_mult constant multiplier, CSD shift-and-add
└── msr_cordic                 N_ROT pipelined micro-rotations, latency N_ROT
    └── msr_stage              x' = A x - B y, y' = B x + A y, A,B = SPT sums
mtr_pkg                        SPT term type, CSD recoding functions
```

The two parameter searches that feed this hardware are software and are
not part of this RTL. One selects the CCSSI kernels; the other searches the
MSR parameters exhaustively. Their results enter the RTL as parameters (the
CCSSI kernel) or as per-sample inputs (the MSR terms).

## CCSSI twiddle rotator

### Constant multiplication in CSD form

`csd_const_mult` recodes its constant when the design is elaborated, using
the functions `csd_digit`/`csd_adders` in `mtr_pkg`. The digits are in
{-1, 0, +1}, and no two adjacent digits are non-zero. Each non-zero digit at
weight `2^i` contributes `±(x << i)`, so the network needs one adder per
non-zero digit after the first. For example, `7x = (x << 3) - x` takes one
adder instead of the two that plain binary needs.

### One coefficient: `ccssi_rotator`

```
X = C*x - S*y
Y = S*x + C*y
```

The four products are CSD networks, and two more adders combine them. This
is the adder cost used to rank coefficients: `AR(P) = 2*AM(C,S) + 2`. For a
purely real `P` (S = 0) the combining adders and the S networks disappear,
and only `2*AM(C)` is left. When `|C| = |S|` (45-degree coefficients such as
5+5j) the C and S products are the same network, so `AM(C,S) = AM(C)`. The output keeps full precision:
`IN_W + COEF_W + 1` bits, with no rounding and no saturation.

### A kernel: `ccssi_kernel_rotator`

A kernel is one coefficient per angle, all at nearly the same radius. The
default is the kernel for 0, 22.5 and 45 degrees:

| angle | coefficient | angle of P | \|P\| |
|-------|-------------|------------|-------|
| 0     | 7           | 0          | 7     |
| 22.5  | 7 + 3j      | 23.20 deg  | 7.62  |
| 45    | 5 + 5j      | 45         | 7.07  |

The nominal radius is R = 7.31. Each coefficient lies within 0.044·R of
`R·e^{j·alpha}` (error bound e_max = 0.05), and no rotation needs more than
six adders. In this implementation each coefficient has its own full
rotator, and an output multiplexer driven by `sel` picks the result. The
adder graphs of different coefficients are not shared. That costs area but
keeps the structure obvious.

### All N angles from N/8 + 1 coefficients: `ccssi_twiddle_rotator`

The rotator turns by `theta_k = 2*pi*k/N`, counter-clockwise. It uses the
`[C -S; S C]` convention, and the result is scaled by R. To apply an FFT
twiddle `W_N^k = e^{-j2*pi*k/N}`, drive the index `(N - k) mod N`. The index
is split as follows:

```
k = q*(N/4) + r        q = quadrant 0..3, r = 0 .. N/4-1
r <= N/8 : use coefficient m = r directly                    (direct)
r >  N/8 : use m = N/4 - r and mirror it about 45 degrees     (mirrored)
```

Mirroring relies on `e^{j(90° - beta)} = j·conj(e^{j·beta})`, so for any
input `z`:

```
z · j·conj(P_m) = j · conj( P_m · conj(z) )
```

The hardware therefore negates `y` (conjugates the input), rotates by `P_m`,
negates the imaginary output (conjugates again) and turns by +90 degrees.
Each quadrant adds a further 90-degree turn, where `(a + jb)·j = -b + ja`.
All of these steps are sign changes and swaps. The only real arithmetic is
the kernel.

Example, N = 16 and k = 3 (67.5 degrees): q = 0, r = 3 > 2, so the mirrored
path is taken with m = 1 (7 + 3j). The effective coefficient is
`j·conj(7 + 3j) = 3 + 7j`, whose angle is 66.8 degrees.

The index split, the mirror and the quadrant turn are combinational. One
output register gives a latency of one cycle, at one sample per cycle. A
corner case: on the mirrored path, `y = -2^(IN_W-1)` cannot be negated and
wraps, so keep inputs inside the symmetric range.

## MSR-CORDIC rotator

### One stage: `msr_stage`

```
A = sum_i eta_i · 2^(-s_i)      (I_TERMS terms)
B = sum_j mu_j  · 2^(-t_j)      (J_TERMS terms)
x' = A·x - B·y
y' = B·x + A·y
```

Each term is an `mtr_pkg::spt_term_t`, made of `sign` and `shift`:

| `sign`  | code  | meaning          |
|---------|-------|------------------|
| SPT_OFF | 2'b00 | term absent      |
| SPT_ADD | 2'b01 | +2^-shift        |
| SPT_SUB | 2'b11 | -2^-shift        |

`shift` is 4 bits wide (0..15). The code 2'b10 is illegal, and an assertion
flags it on a valid sample. Shifts are arithmetic (truncating) and are
applied at run time, so every sample can use a different angle. The stage
has one output register.

### The pipeline: `msr_cordic`

The pipeline has `N_ROT` stages, one cycle each. Every sample carries its
whole parameter set down the pipeline, and stage n uses `eta[n]`/`mu[n]`.
The fixed-point layout is as follows:

* The input is extended by `HEAD_W = 2` integer bits. This allows
  intermediate norms of up to about twice the input; parameter sets
  normally keep them within 1.5.
* `GUARD_W = 4` fractional guard bits absorb the truncation of the shifted
  terms.
* The output drops the guard bits with round-half-up and is `IN_W + HEAD_W`
  bits wide.

There is no final scaling multiplier: a good parameter set already has a
total norm `V = prod sqrt(A_n^2 + B_n^2)` close to 1. Two searched sets are
used in the tests (two stages, two plus two terms):

| target  | stage 1 A, B                    | stage 2 A, B                     | angle error | V        |
|---------|---------------------------------|----------------------------------|-------------|----------|
| 45 deg  | 1 - 2^-3,  2^-2 + 2^-5          | 1 - 2^-5,  2^-1 - 2^-8           | 0.064 deg   | 1.0003   |
| 22.5 deg| 2^-3,  1 - 2^-6                 | 2^-1,  2^-3 - 1                  | 0.008 deg   | 1.000002 |

Negating every B term gives the opposite angle.

## Interfaces and timing

Both datapaths use a rising-edge `clk` and an active-low synchronous
`rst_n`. The reset clears the valid pipelines and the twiddle output
registers. Neither datapath has back-pressure: a sample is accepted on every
cycle in which its `in_valid` is high.

| port group (mtr_top) | width | meaning |
|---|---|---|
| `tw_in_valid, tw_k, tw_x, tw_y` | 1, log2 N, 16, 16 | sample and twiddle index |
| `tw_out_valid, tw_X, tw_Y` | 1, 22, 22 | `R·e^{j2πk/N}·(x+jy)`, one cycle later |
| `msr_in_valid, msr_x, msr_y` | 1, 16, 16 | sample |
| `msr_eta, msr_mu` | `[N_ROT][I_TERMS]`, `[N_ROT][J_TERMS]` × 6 bits | SPT terms per stage |
| `msr_out_valid, msr_x_o, msr_y_o` | 1, 18, 18 | rotated sample, N_ROT cycles later |

### Parameters

| parameter | default | notes |
|---|---|---|
| `N_POINTS` | 16 | power of two ≥ 8 |
| `NK`, `KC`, `KS` | 3, {7,7,5}, {0,3,5} | kernel for angles m·2π/N, m = 0..N/8; `NK` must be N/8+1 |
| `COEF_W` | 5 | signed width of C and S |
| `IN_W` | 16 | input width of both datapaths |
| `N_ROT`, `I_TERMS`, `J_TERMS` | 2, 2, 2 | MSR configuration N = 2, N_SPT = 4 |
| `HEAD_W`, `GUARD_W` | 2, 4 | MSR fixed-point headroom and guard bits |

Other kernels come from the same coefficient selection and work through the
parameters. For the 8-point transform use `N_POINTS=8, NK=2, KC='{7,5},
KS='{0,5}` (radius 7.04). Another 16-point kernel is 13, 12+5j, 9+9j (radius
12.87). Kernels found with more coefficient bits need a larger `COEF_W`; for
example, 120, 111+46j, 85+85j needs 8. The 3-stage and (1;3) MSR
configurations need `N_ROT=3` and `J_TERMS=3` respectively.

## What follows the method and what is this design's own choice

These parts follow the method:

* the CSD shift-and-add multiplication
* the constant rotator and its adder count
* the kernels and their fixed scaling
* the multiplexer-selected combined rotator
* deriving angles above π/4 by swapping and negating
* the MSR stage equations and the default MSR configuration

These are this design's own choices:

* All word widths, the full-precision CCSSI output, the MSR guard bits and
  the rounding.
* All registers, valid signals and resets: the method gives no timing.
* Run-time MSR parameters travelling with each sample, rather than
  hard-wired constants.
* The sign of `B` in the stage matrix. It is taken as `[A -B; B A]`,
  matching the rotator form `[C -S; S C]`.
* One rotator per kernel coefficient behind an output multiplexer. The
  multiplexers could instead sit inside a shared adder graph, which would
  need fewer adders.
* The rotation direction (counter-clockwise).

Between different constants C and S (such as 7 and 3) no partial products
are shared. Each constant is a separate CSD network, so `AM(C,S)` is taken
as `AM(C) + AM(S)`. Only equal magnitudes share a network. A
multiple-constant-multiplication (MCM) network could save more adders.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* `tb_csd_const_mult`: eight constants (negative, zero, power of two,
  extremes) against integer products, plus hand-derived CSD adder counts.
* `tb_ccssi_rotator`: five coefficients against exact complex products; the
  22.5-degree rotator against a real rotation.
* `tb_ccssi_kernel_rotator`: every `sel` against exact products; the kernel
  coefficients against R = 7.31 and e_max = 0.05.
* `tb_ccssi_twiddle_rotator`: three rotators (16-point radius 7.31,
  16-point radius 12.87, 8-point). Every index is checked against a
  reference that builds the effective coefficient from the symmetry rules,
  and against the ideal angle. It also checks latency, back-to-back
  streaming and reset.
* `tb_msr_stage`: random terms, bit-exact against an integer
  floor-division model.
* `tb_msr_cordic`: random parameter sets against a floating-point product
  (±2 LSB), and the searched 45/22.5-degree sets against ideal rotations.
  Latency must be exactly 2 cycles.
* `tb_msr_configs`: the other MSR configurations against floating point,
  with random parameter sets. It covers three stages of 2+1 terms, two
  stages of 1+3 terms and two stages of 2+1 terms. The stimulus comes from
  the helper `msr_config_run`.
* `tb_mtr_top`: uses default parameters throughout. It runs two 16-point
  DFTs with every twiddle product done by the CCSSI rotator, checked against
  a floating-point DFT after dividing by R. It also rotates by +45 and -45
  degrees and by 22.5 degrees through the MSR rotator. It counts that the
  following each happened at least once:
  * direct and mirrored kernel paths, each coefficient and each quadrant
  * back-to-back samples and bubbles
  * SPT terms that are off, added and subtracted
  * a reset during traffic

Running with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mtr_pkg.sv tb/tb_mtr_top.sv --top-module tb_mtr_top
./obj_dir/Vtb_mtr_top
```

Replace `tb_mtr_top` with any other testbench name. All testbenches finish
in seconds.

## Limits

* The rotators are accurate only to the quality of their coefficients. The
  CCSSI output carries the kernel's rotation error (up to 0.044·R for the
  default kernel) and the scale R. The MSR output carries the angle and norm
  errors of whatever parameter set is applied.
* No kernel is built in for 32- or 64-point transforms. The structure
  supports them (`N_POINTS=32/64`, `NK=5/9`), but their coefficients must
  come from the selection procedure.
* The MSR headroom assumes sensible parameter sets (norm per stage well
  below 2). Arbitrary SPT terms can overflow the 2-bit headroom.
