# Parallel FIR filters for symmetric coefficients, built on the fast FIR algorithm

A parallel FIR filter takes L input samples per clock and produces L output
samples per clock, so it can run at 1/L of the sample rate. Written out
directly, an L-parallel N-tap filter needs L² sub-filters of N/L taps, i.e.
L·N multipliers. The fast FIR algorithm (FFA) cuts this to 3 sub-filters for
L = 2 and 6 for L = 3 by sharing products between the outputs, at the cost
of a few adders before and after the sub-filters.

This design goes one step further for **linear-phase filters**, whose
coefficients are even-symmetric, h(i) = h(N−1−i). A sub-filter whose own
coefficients are symmetric (or antisymmetric) needs only half its
multipliers: the two samples that meet the same coefficient are added (or
subtracted) first and multiplied once. The FFA equations are rearranged so
that as many of the sub-filters as possible inherit that symmetry. The price
is a handful of extra adders before and after the sub-filters, and that
number does not grow with N, while the multipliers saved grow with N.

Three filters are provided, side by side in `ffa_sym_top`:

| filter | taps | sub-filters | (anti)symmetric sub-filters | multipliers | pre/post adders |
|---|---|---|---|---|---|
| `ffa2_fir_sym`, 2-parallel | multiple of 2 | 3 × N/2 taps | 2 | N | 6 |
| `ffa3_fir_sym`, 3-parallel | multiple of 3 | 6 × N/3 taps | 4 | 4N/3 | 15 |
| `ffa4_fir_sym`, 4-parallel | multiple of 4 | 9 × N/4 taps | 4 | 7N/4 | 30 |

For N = 24, 72 and 144 that is 24/72/144, 32/96/192 and 42/126/252
multipliers. Each filter module computes its own count from its sub-filter
list in the localparam `MULTS`. The plain FFA structures, counting the one or two sub-filters
whose symmetry they already have, need 5N/4, 5N/3 and 17N/8 (30, 40 and 51
at 24 taps).

## Polyphase parts and which symmetry survives

Split h into its L polyphase parts, H_j = {h(j), h(j+L), h(j+2L), …}, each
N/L taps long, and the input likewise into X_j = x(Lk+j). When N is a
multiple of L the mirror image of tap j of h lands in part L−1−j:

* **L = 2:** H0 reversed is H1. So H0+H1 is symmetric and H0−H1 is
  antisymmetric, while H0 and H1 alone are neither.
* **L = 3:** H0 reversed is H2, and H1 is symmetric by itself. So H1,
  H0+H2, H0+H1+H2 are symmetric and H0−H2 is antisymmetric.

The plain FFA uses H0, H1, H0+H1 (L = 2) or H0, H1, H2, H0+H1, H1+H2,
H0+H1+H2 (L = 3): only one or two of these are symmetric. The structures
below pick sub-filters from the symmetric list instead.

## The 2-parallel structure

With products written as sub-filter outputs (H·X means "filter stream X by
H"), and z⁻² being one block (one clock) of delay:

```
a = (H0+H1)(X0+X1)   symmetric,     N/4 multipliers
b = (H0−H1)(X0−X1)   antisymmetric, N/4 multipliers
p = H1·X1            general,       N/2 multipliers

y(2k)   = (a+b)/2 − p + z⁻²p        = H0X0 + z⁻²H1X1
y(2k+1) = (a−b)/2                   = H0X1 + H1X0
```

a+b = 2(H0X0 + H1X1) and a−b = 2(H0X1 + H1X0) hold exactly, so the halving
is an arithmetic shift with no rounding. Two preprocessing adders
(`ffa2_pre`), four postprocessing adders and one register (`ffa2_post`).
`ffa2_core` holds this datapath for any P-tap filter g and takes a
`KIND` parameter: for a symmetric g it is as above, for an antisymmetric g
the roles swap (G0+G1 antisymmetric, G0−G1 symmetric), and for a general g
all three sub-filters are general. `ffa2_fir_sym` is the core with
symmetric coefficients plus the output register.

## The 3-parallel structure

```
a  = (H0+H2)(X0+X2)        symmetric
b  = (H0−H2)(X0−X2)        antisymmetric
c  = (H0+H1+H2)(X0+X1+X2)  symmetric
p1 = H1·X1                 symmetric
p2 = H2·X2                 general
e  = (H1+H2)(X1+X2)        general

y(3k)   = (a+b)/2 − p2 + z⁻³(e − p1 − p2)    = H0X0 + z⁻³(H1X2 + H2X1)
y(3k+1) = c − e − a + p2 + z⁻³p2             = H0X1 + H1X0 + z⁻³H2X2
y(3k+2) = (a−b)/2 + p1                       = H0X2 + H1X1 + H2X0
```

z⁻³ is one block. Four preprocessing adders (`ffa3_pre`: X0+X2, X0−X2,
X1+X2 and X0+X1+X2 reusing X0+X2) and eleven postprocessing adders with two
block registers (`ffa3_post`). The check of the middle line is the least
obvious: c holds all nine cross products HiXj, e holds H1X1, H1X2, H2X1,
H2X2, and a holds H0X0, H0X2, H2X0, H2X2; what is left after c−e−a is
H0X1 + H1X0 − H2X2, and +p2 restores the H2X2.

## The 4-parallel cascade

`ffa4_fir_sym` applies the 2-parallel structure twice. The outer stage
splits h into even and odd parts H'0, H'1 (N/2 taps) and the input into its
even and odd streams, which arrive two samples at a time:
X'0 = {x(4k), x(4k+2)}, X'1 = {x(4k+1), x(4k+3)}. It then needs three N/2-tap
filters, each of which must itself take two samples per clock, so each is
an inner `ffa2_core`:

* (H'0+H'1) on X'0+X'1: symmetric, its inner stage has 2 halved sub-filters;
* (H'0−H'1) on X'0−X'1: antisymmetric, its inner stage also has 2;
* H'1 on X'1: general, 3 full sub-filters.

That makes nine N/4-tap sub-filters, four of them at half cost. The outer
recombination, `ffa4_post`, is the 2-parallel postprocessing applied to the
two-lane decimated streams. Its one subtle point is the delay: "one sample
back" in the decimated stream is, for lane 1, lane 0 of the same clock, and
for lane 0, lane 1 of the previous accepted clock. So only one register is
needed. Outputs are ordered y(4k) = Y'0(2k), y(4k+1) = Y'1(2k),
y(4k+2) = Y'0(2k+1), y(4k+3) = Y'1(2k+1).

## Sub-filters

`ffa_subfilter` is a direct-form FIR of length M fed one value per accepted
block. Its delay line shifts only when `en` is high. Its output is
combinational from the current input and the delay line. With
`KIND = SUB_SYMMETRIC` it takes ceil(M/2) coefficients and pre-adds
mirrored taps. With `SUB_ANTISYMMETRIC` it takes the same number of
coefficients, pre-subtracts, ignores the middle one for odd M, and uses
floor(M/2) multipliers. With `SUB_GENERAL` it takes M coefficients and uses
M multipliers. The sub-filter coefficients (H0+H1, H0−H2, …) are formed from
the coefficient input by adders that lie off the sample path. If the
coefficients are tied to constants, synthesis folds these adders away.

## Interface and timing

Every filter has the same shape (L = 2, 3 or 4):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, one block per clock |
| `rst_n` | in | 1 | asynchronous, active low; clears all delay registers and the outputs |
| `in_valid` | in | 1 | `x` holds a block; the filter state advances only on such clocks |
| `x[L]` | in | DW each | x[j] = x(Lk+j) |
| `coef[]` | in | CW each | first half of h: N/2 values, or ceil(N/2) for the 3-parallel filter |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `y[L]` | out | DW+CW+clog2(N) each | y[j] = y(Lk+j) of the block accepted on the previous clock |

Latency is one clock. Throughput is L samples per clock. Gaps in `in_valid`
simply pause the filter, and `y` keeps its last value during them.
Coefficients must be steady while filtering. The block registers in the
postprocessing hold products of the previous block, so a coefficient
change takes effect cleanly only after reset (or after the filter has been
fed N/L blocks of zeros). `ffa_sym_top` brings the three filters out with
prefixes `p2_`, `p3_`, `p4_` and parameters `N2`, `N3`, `N4`, `DW`, `CW`.

## Number formats

Samples and coefficients are signed two's complement, 16 bits by default
(`ffa_pkg::DEF_DATA_W`, `DEF_COEF_W`). Each pre-adder widens by one bit. All
internal sums are carried a few bits wider than the output. The outputs are
the exact, unrounded convolution: |y| ≤ N·2^(DW−1)·2^(CW−1) fits
DW+CW+clog2(N) bits. Nothing saturates or rounds. Scaling and truncation are
left to the user.

## Where this departs from the published structure, and how far to trust it

* The published 2-parallel structure gives N multipliers and 6 adders; the
  structure here matches both.
* The published 3-parallel structure uses four symmetric sub-filters and
  4N/3 multipliers, as here. Its quoted adder count is 17; the
  decomposition here, derived to meet the same sub-filter and multiplier
  counts, needs 15, so its grouping of the post-additions differs from the
  published one.
* The 4-parallel structure was only quoted by its cost (7N/4 multipliers,
  31 adders), not described. The two-level cascade here is one
  construction that reproduces the multiplier count exactly, with 30 adders.
* The input/output handshake, the output register, the coefficient input
  port, the word lengths and the reset are choices made here.
* Published area and power figures (e.g. a 24-tap 2-parallel filter at
  22356 area units against 22726 for plain FFA) depend on a cell library
  and were not reproduced.
* Every block is checked against an independent direct convolution in
  simulation: 2-, 3- and 4-parallel filters at 24, 72 and 144 taps and
  at small odd sizes, with full-scale inputs, random gaps in `in_valid`
  and resets mid-stream. No timing closure has been attempted. The datapath
  has no pipeline registers between the pre-adders, the multipliers, the
  sub-filter adder chain and the postprocessing, so a fast clock needs
  pipelining added (see below).

## Files

| file | contents |
|---|---|
| `rtl/ffa_pkg.sv` | `sub_kind_e`, default widths, coefficient/multiplier/width helpers |
| `rtl/ffa_subfilter.sv` | general / symmetric / antisymmetric sub-filter |
| `rtl/ffa2_pre.sv`, `rtl/ffa2_post.sv` | 2-parallel pre- and postprocessing |
| `rtl/ffa2_core.sv` | 2x2 datapath for any coefficient symmetry |
| `rtl/ffa2_fir_sym.sv` | 2-parallel filter |
| `rtl/ffa3_pre.sv`, `rtl/ffa3_post.sv`, `rtl/ffa3_fir_sym.sv` | 3-parallel filter and its parts |
| `rtl/ffa4_post.sv`, `rtl/ffa4_fir_sym.sv` | 4-parallel cascade |
| `rtl/ffa_sym_top.sv` | the three filters side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/subfilter_checker.sv`, `tb/core_checker.sv`, `tb/fir_checker.sv` | reference models used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, the end-to-end test of all three filters at their default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ffa_pkg.sv tb/tb_ffa_sym_top.sv --top-module tb_ffa_sym_top
obj_dir/Vtb_ffa_sym_top
```

Replace `tb_ffa_sym_top` with any other `tb_*` module to test one block.
`tb_ffa{2,3,4}_fir_sym` run 24-, 72- and 144-tap filters against a direct
convolution. `tb_ffa_sym_top` also counts the gaps, resets and full-scale
blocks it produced and fails if any kind never occurred. All run in well
under a second.

## Changing it

* **Tap count and widths:** parameters `N`, `DW`, `CW` (and `N2`, `N3`,
  `N4` on the top). N must be even, a multiple of 3 and a multiple of 4
  respectively. An elaboration-time assertion reports violations.
* **Fixed coefficients:** tie `coef` to constants. The coefficient adders
  and the multipliers then reduce to constant multipliers.
* **Pipelining:** the natural cut points are the outputs of the
  preprocessing modules and of each `ffa_subfilter`. Register all values
  at a cut together and delay the enable of everything after the cut by
  the same number of clocks. The block registers in the postprocessing
  then still see consistent blocks. Each cut adds one clock of latency,
  so update the testbenches' one-clock latency check.
