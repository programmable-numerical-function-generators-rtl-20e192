# Programmable numerical function generator with non-uniform segments

This is a pipelined circuit that evaluates an elementary function such as
sin(πx), 1/x, √x or √(−ln x) on a fixed-point input. It returns one result
per clock, and the result is within one output LSB of the true value. The
function is approximated by straight-line pieces:

    y = c1_i · (x − s_i) + (f(s_i) + v_i)        for s_i ≤ x < s_{i+1}

The segments `[s_i, s_{i+1})` are **not** of equal width. They are narrow
where f bends sharply and wide where it is nearly straight. For functions
with a steep or singular end (√x near 0, 1/x near 1/8, √(−ln x) near 0)
this needs from 2× to over 100× fewer segments than uniform segmentation. The cost is
that the segment index can no longer be read from the top bits of x. A
small pipelined **LUT cascade** computes it instead.

The datapath does not depend on the function. Which function is computed
depends only on the contents of the cascade LUTs and of the coefficients
table. Both are synchronous memories with a write port, so one build can be
reprogrammed from one function to another.

The design follows a published NFG architecture: the variant that stores
`−s_i` and computes `x − s_i` before multiplying. That choice keeps the
multiplier small, because `x − s_i` is short. The unit list, the pipeline
depth per unit, the sign-magnitude slope and the scaling shift all come from
that architecture. The following are this implementation's own choices, and
are marked as such below:

- the word widths;
- the encoding of the cascade rails;
- the table-loading port;
- the rounding;
- the absence of back-pressure.

## Pipeline

| stage | unit | module | cycles |
|---|---|---|---|
| 1 | segment index encoder (LUT cascade) | `nfg_lut_cascade` | `N_CAS` |
| 2 | coefficients table | `nfg_coef_table` | 1 |
| 3 | offset adder `x + (−s_i)` | `nfg_offset_adder` | 1 |
| 4 | unsigned multiplier `|c1_i|·2^−l_i · (x − s_i)` | `nfg_multiplier` | 1 |
| 5 | shifter `<< l_i` (optional, `USE_SHIFT`) | `nfg_shifter` | 0 or 1 |
| 6 | two's complementer (optional, `USE_SIGN`) | `nfg_twos_complementer` | 0 or 1 |
| 7 | output adder `+ c0`, rounding | `nfg_output_adder` | 1 |

The latency is `N_CAS + 4 + USE_SHIFT + USE_SIGN` cycles
(`nfg_pkg::nfg_latency`). At the defaults (4 LUTs, both optional units) it
is 10 cycles. A new x can enter every cycle. `in_valid` travels with the
data and comes out as `out_valid`. There is no stall input: the pipeline
always advances.

`nfg_top` wires the units together. Between the coefficients table and the
output adder, the sign, the shift amount and `c0` ride along in registers
beside the datapath (`side_t`), one register per stage. This keeps each
value aligned with its own x.

The two optional units exist for two cases:

- **Scaling shift.** A steep slope would need many bits. It is stored as
  `|c1_i|·2^−l_i`, which fits `C1_W` bits, together with `l_i`. The product
  is shifted left by `l_i` afterwards. The shift comes before the product is
  truncated, so the truncation error does not grow with `l_i`.
- **Sign.** The slope is stored as a magnitude plus a sign bit. The
  multiplier is therefore unsigned, and a two's complementer applies the sign
  afterwards.

Set `USE_SHIFT = 0` for function sets whose slopes all fit without scaling.
Set `USE_SIGN = 0` for function sets whose slopes are all non-negative. Each
setting removes a unit and a pipeline stage.

## Number formats (defaults)

| quantity | format | bits |
|---|---|---|
| x | two's complement, 1 integer + 15 fraction bits, range [−1, 1) | `X_W = 16`, `X_FRAC = 15` |
| `−s_i` | same as x | 16 |
| `x − s_i` | unsigned, 15 fraction bits | 16 |
| scaled slope `|c1_i|·2^−l_i` | unsigned, 1 integer + 15 fraction bits | `C1_W = 16`, `C1_FRAC = 15` |
| shift `l_i` | 0…15 | `L_W = 4` |
| product | unsigned, 30 fraction bits | 32 |
| shifted product, `c0 = f(s_i)+v_i` | 19 fraction bits (`Y_FRAC + GUARD`) | `A_W = 24` |
| y | two's complement, 4 integer + 15 fraction bits, range [−16, 16) | `Y_W = 20`, `Y_FRAC = 15` |

Precision follows from these choices:

- The product and `c0` carry `GUARD = 4` extra fraction bits.
- The output adder rounds half-up to 15 fraction bits.
- The approximation error of the segments (2^−17) and the output rounding
  (2^−16) together use most of the one-LSB budget (2^−15).
- The quantisation of the slope and of `c0`, and the truncation of the
  product, add well under 2^−18.

Across ten functions, simulation measured a worst-case error of 0.62 to
0.82 LSB (see below).

The published architecture chooses every width per function by error
analysis. Here the widths are fixed. They are large enough that one build
holds every function of the 16-bit evaluation set, including 1/x up to 8
and √(−ln x), whose slope near 0 needs `l_i = 12`.

## The segment index encoder

The encoder computes `seg_func(x) = #{ j ≥ 1 : s_j ≤ x }`: how many segment
starts other than the first are at or below x. It is a chain of `N_CAS`
LUTs:

- **LUT 0** is addressed by the `FIRST_W` least significant bits of x.
- **LUT k (k > 0)** is addressed by `{rails from LUT k−1, next REST_W bits of x}`,
  where `REST_W = (X_W − FIRST_W)/(N_CAS − 1)`.
- The bits of x that a later LUT needs are delayed to arrive with the rails
  for the same x.
- The rails of the last LUT are the segment index.

At the defaults there are 4 LUTs with 4 x bits each. The rails between
them are 4, 8 and 10 bits wide (see below why early rails can be narrow):

| LUT | address | words | word width | bits |
|---|---|---|---|---|
| 0 | 4 x bits | 16 | 4 | 64 |
| 1 | 4 rails + 4 x bits | 256 | 8 | 2,048 |
| 2 | 8 rails + 4 x bits | 4,096 | 10 | 40,960 |
| 3 | 10 rails + 4 x bits | 16,384 | 10 | 163,840 |

**What the rails mean.** The LUTs see the bits of x least significant first.
This order keeps the rails narrow. Let `u = x XOR 2^(X_W−1)`: inverting the
sign bit makes the bit order match the numeric order of two's complement
values. Let `b_j` be `s_j` transformed the same way. After a LUT has seen
the low K bits of x, its rails carry

    rank_K(x) = #{ j ≥ 1 : (b_j mod 2^K) ≤ (u mod 2^K) }

For every boundary j, `(u mod 2^(K+n)) ≥ (b_j mod 2^(K+n))` depends on two
things only:

- how the next n bits of u compare with those of `b_j`;
- if those are equal, whether `(u mod 2^K) ≥ (b_j mod 2^K)`.

The rank alone answers the second question for every j. So the next LUT can
form `rank_{K+n}` from `rank_K` and its own n bits. For K = X_W the rank is
the segment index. A rank never exceeds t − 1 for t segments, so ⌈log2 t⌉
rails are enough.

Only which rank a low part has matters, not its value. After K bits of x
at most 2^K different ranks occur, so an inner LUT stores a dense code for
the rank instead: the ranks that occur, numbered 0, 1, 2, … in order. Its
rails then need only `min(K, SEG_W)` bits. Only the last LUT outputs the
rank itself, which is the segment index.

**Filling LUT k.** For each code c of the previous LUT's rails, pick one
low part ℓ of K bits with that code. For each value q of the LUT's own x
bits, find `r = rank_{K+n}(q·2^K + ℓ)` and write the code of r (or r
itself in the last LUT) at address `{c, q}`. In the last LUT, q has its
top bit inverted. Unused codes are written as 0. The testbench package `tb/nfg_tb_pkg.sv` (`build_cascade`) implements
exactly this.

Every LUT after the first has the same number of x bits, and the rail
widths follow from `FIRST_W`, `REST_W` and `SEG_W` alone, not from the
function loaded. A generator that picks the bit split per function would
use less memory. At the defaults the cascade holds 207 kbit and the
coefficients table 62 kbit.

## Coefficients table and configuration port

Each coefficients-table word is `{−s_i, sign(c1_i), l_i, |c1_i|·2^−l_i, c0}`,
most significant field first: 16 + 1 + 4 + 16 + 24 = 61 bits.

All tables are written through one port:

| `cfg_sel` | target | `cfg_addr` | `cfg_data` |
|---|---|---|---|
| k < `N_CAS` | cascade LUT k | `{rails, x bits}`, right-aligned (LUT 0: low `FIRST_W` bits) | rail code, right-aligned |
| `N_CAS` | coefficients table | segment index | 61-bit word |

Write one entry per clock with `cfg_we` high. Load the tables while no x is
in flight. An x that passes during loading sees a mixture of old and new
contents. An assertion flags a `cfg_sel` that selects no table. The memories
are not reset, so they must be written before use.

## Making the table contents

Each function needs its tables computed once, off-line. `nfg_tb_pkg`
(`class nfg_program`) is a complete reference flow.

1. **Segmentation.** Start with one segment over the whole domain. For a
   segment [s, e], take the chord through (s, f(s)) and (e, f(e)). Over every
   representable x in [s, e] (for domains over 2^22 points: on a grid of
   4,097 points), find the largest positive deviation `max` and
   the largest negative deviation `min` of f from the chord. The segment's
   error is `(max − min)/2`, and `v = (max + min)/2` shifts the chord to
   centre that error. If the error exceeds the target (2^−17 here), split the
   segment at the point of the larger |deviation| and repeat on both halves.
2. **Coefficients.** The slope is `c1 = (f(e) − f(s))/(e − s)` and
   `c0 = f(s) + v`. `l` is the smallest shift for which
   `round(|c1|·2^(15−l)) < 2^16`. Store `round(|c1|·2^(15−l))`, `l`, the sign
   of c1, `round(c0·2^19)` and `−s` as X_W-bit two's complement.
3. **Cascade.** As described above.

`nfg_program::model_y` is a bit-exact model of the datapath. It is written
from the number formats above, not from the RTL.

## Results in simulation

Default build (input 16 bits with 15 fraction bits), target 2^−17:

| function | domain | segments | worst error (LSB) |
|---|---|---|---|
| sin(πx) | [0, 1/2] | 127 | 0.75 |
| cos(πx) | [0, 1/2] | 127 | 0.76 |
| tan(πx) | [0, 1/4] | 112 | 0.73 |
| 1/x | [1/8, 1) | 702 | 0.80 |
| 1/√x | [1/32, 1) | 623 | 0.82 |
| √x | [0, 1) | 232 | 0.74 |
| √(−ln x) | (0, 1) | 584 | 0.81 |
| 2^x | [0, 1) | 128 | 0.62 |
| sigmoid 1/(1+e^(−4x)) | [0, 1) | 126 | 0.69 |
| gaussian e^(−x²/2)/√(2π) | [0, 1/2] | 32 | 0.74 |

Every representable x of each domain was run. The segment counts agree with
those published for this segmentation method, within three segments. With
`X_FRAC = 14`, `C1_FRAC = 13` and no optional units, log2(x) on [1, 2)
needs 128 segments and ln(x) on (1, 2) needs 89; both are also within one
LSB. With a 16-bit input of 16 fraction bits, an output of 8 fraction bits
(`X_FRAC = 16`, `Y_W = 10`, `Y_FRAC = 8`) and a target of 2^−10,
sin(2πx) and cos(2πx) on [0, 1/4] need 15 segments each and stay within
0.73 LSB.

**Coarse target.** `tb_nfg_top` also runs the same ten functions on the
default build at a target of 2^−9. sin, cos, tan, 2^x, sigmoid and the
gaussian need 8, 8, 7, 8, 8 and 2 segments, as published for this method.
1/x, 1/√x, √x and √(−ln x) need 44, 39, 15 and 44 against the published
39, 31, 12 and 23. Those four are steep or singular at one end, and the
16-bit input resolves that end finely, which takes more segments. All
results lie within the target plus one LSB.

**Fine target, 2^−25.** This needs a finer build: `X_W = 26`,
`X_FRAC = 24`, `SEG_W = 14`, `N_CAS = 11`, `FIRST_W = 6`, `C1_W = 24`,
`C1_FRAC = 23`, `L_W = 5`, `Y_W = 31`, `Y_FRAC = 26`
(`tb_nfg_top_fine`). The output LSB is 2^−26, so the target is 2 LSB.

| function | domain | segments | published | worst error (LSB) |
|---|---|---|---|---|
| 2^x | [0, 1] | 2048 | 2048 | 1.29 |
| 1/x | [1/8, 1] | 11233 | 11218 | 2.45 |
| 1/√x | [1/32, 1] | 9962 | 9946 | 2.48 |
| √x | [0, 1] | 3968 | 3941 | 2.46 |
| √(−ln x) | (0, 1] | 12711 | 12089 | 2.56 |
| log2(x) | [1, 2) | 2048 | 2048 | 1.39 |
| ln(x) | (1, 2) | 1430 | 1437 | 2.50 |
| sin(πx) | [0, 1/2] | 2027 | 2027 | 2.38 |
| cos(πx) | [0, 1/2] | 2027 | 2027 | 2.37 |
| tan(πx) | [0, 1/4] | 1788 | 1787 | 2.38 |
| sigmoid | [0, 1] | 2016 | 2020 | 2.33 |
| gaussian | [0, 1/2] | 512 | 512 | 2.02 |

The domains have 2^22 to 2^24 points each, so segment errors are estimated
on a grid (see "Making the table contents"). The hardware runs every segment start and its two
neighbours, both ends, and 5,000 random x per function. All results were
bit-exact and within the target plus one LSB.

**33-bit input.** √(−ln x) on (0, 1] with 1 integer and 32 fraction input
bits and 3 integer and 5 fraction output bits was run with `X_W = 34` (the
extra bit is the sign), `X_FRAC = 32`, `N_CAS = 14`, `FIRST_W = 8` (then 2
x bits per LUT), `SEG_W = 6`, `C1_W = 10`, `C1_FRAC = 9`, `L_W = 5`,
`Y_W = 9` and `Y_FRAC = 5`, with a target of 2^−7. The slope is unbounded
at both ends of the domain, so shifts reach 28. The function needs 41
segments, and the pipeline is 14 + 6 = 20 stages. Only a sample of the
2^32 inputs can be simulated: every segment start and its neighbours, both
ends, and 100,000 random x. All were bit-exact and within 0.75 LSB. In a
domain this large the generator estimates each segment's error on a grid
of 4,097 points instead of at every x.

## Limits and departures

- **Input range.** At the defaults x lies in [−1, 1), so x = 1 and the
  domain [1, 2] of log2 and ln are not representable. Use `X_FRAC = 14` for
  those; at `X_FRAC = 14` the point x = 2 is still excluded. Targets of
  2^−25 need thousands of segments and a finer input and output: larger
  `X_W`, `SEG_W` and `Y_W`. The 2^−25 and 33-bit builds above were
  simulated on samples of their inputs only.
- **Table size.** `SEG_W = 10` allows up to 1024 segments.
- **Fixed widths.** The widths are fixed rather than derived per function.
  The cascade's bit split is fixed, not minimised per function. Both give larger
  memories than a per-function generator would.
- **Rounding.** The output rounds half up. The product is truncated.
- **No back-pressure.** There is no ready or stall signal.
- **Reset.** Only the valid bits are reset (asynchronous, active low).

## Parameters of `nfg_top`

`X_W`, `X_FRAC`, `SEG_W`, `N_CAS`, `FIRST_W`, `C1_W`, `C1_FRAC`, `L_W`,
`Y_W`, `Y_FRAC`, `GUARD`, `USE_SHIFT`, `USE_SIGN`. The defaults are in
`rtl/nfg_pkg.sv`. `X_W − FIRST_W` must be divisible by `N_CAS − 1`, and
`C1_FRAC + X_FRAC ≥ Y_FRAC + GUARD`. Violating either stops elaboration. The
parameters listed after them in the module header are derived and must not
be overridden.

## Files and simulation

`rtl/` holds one module per file, plus `nfg_pkg.sv` with the defaults.
`tb/` holds one self-checking testbench per module, plus:

- `tb_nfg_top`: the default build, ten functions at targets 2^−17 and
  2^−9, every x of each domain,
  bit-exact and accuracy checks, latency of every result, counts of shifted
  results, negative slopes, back-to-back results, idle cycles and
  reprogramming;
- `tb_nfg_top_noopt`: the build without shifter and complementer, with a
  2-integer-bit input, including log2 and ln on [1, 2);
- `tb_nfg_top_frac16`: 16 fraction input bits and 8 fraction output bits,
  sin(2πx) and cos(2πx);
- `tb_nfg_top_wide`: the 33-bit-precision √(−ln x) build with a
  14-LUT cascade, on sampled inputs;
- `tb_nfg_top_fine`: the 2^−25 build, twelve functions on sampled inputs
  (about 15 s of wall-clock time);
- `nfg_tb_pkg.sv`: the table generator and the reference model.

Each testbench prints `TB_RESULT checks=… failures=…` and stops by itself.
For example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/nfg_pkg.sv tb/nfg_tb_pkg.sv tb/tb_nfg_top.sv --top-module tb_nfg_top
    ./obj_dir/Vtb_nfg_top

The full `tb_nfg_top` run takes about a second of wall-clock time after
compilation.
