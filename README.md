# Parallel linear-phase FIR filters with symmetric fast-FIR structures

A linear-phase FIR filter has symmetric coefficients, h(i) = h(N-1-i), so a single
filter needs only N/2 multipliers: each product serves two taps. Parallel (L samples
per clock) filters are normally built with fast FIR algorithms (FFA), which split the
filter into polyphase sub-filters of length N/L and need about 2L-1 of them instead of
L². The catch is that polyphase sub-filters of a symmetric filter are mostly *not*
symmetric, so the classic FFA loses the factor of two that symmetry offers.

The structures here rearrange the FFA so that as many sub-filters as possible keep a
symmetric or antisymmetric coefficient set. Those are built with half the multipliers.
The price is a few extra adders before and after the sub-filters. That cost does not grow
with N, while the saving in multipliers grows with N.

This RTL provides the 2-, 3-, 4-, 6- and 8-parallel forms for an even-symmetric 24-tap
filter with 16-bit samples and coefficients. Four sub-filter adder styles can be selected. All
outputs are the exact full-precision convolution.

## The rearranged 2x2 structure (L = 2)

Split the filter into its even phase H0 = h(0), h(2), … and odd phase H1 = h(1), h(3), ….
Split the input the same way into X0 = x(2k) and X1 = x(2k+1). The 2-parallel filter
must compute:

    Y0 = H0X0 + z⁻¹ H1X1          Y1 = H0X1 + H1X0          (z⁻¹ = one block = 2 samples)

The classic FFA uses the sub-filters H0, H1 and H0+H1. The rearranged form uses the two
products A = (H0+H1)(X0+X1) and B = (H0−H1)(X0−X1). Since A + B = 2(H0X0 + H1X1) and
A − B = 2(H0X1 + H1X0):

    Y1 = (A − B)/2
    Y0 = (A + B)/2 − H1X1 + z⁻¹ H1X1

For a symmetric h of even length N:

- H0+H1, with taps h(2j)+h(2j+1), is **symmetric**.
- H0−H1 is **antisymmetric**.
- H1 has no symmetry.

So two of the three length-N/2 sub-filters need only N/4 multipliers. If h is
antisymmetric instead, the two roles swap: H0+H1 becomes antisymmetric and H0−H1
symmetric. The 4-parallel cascade uses this case. `ffa2_proposed` handles both cases
through its `PSYM` parameter.

The halvings are exact. A + B and A − B are always even, so an arithmetic shift by one
loses nothing. No rounding happens anywhere.

## The 3-parallel structure (L = 3, N a multiple of 3)

The filter is split into three phases: H0 = h(3i), H1 = h(3i+1) and H2 = h(3i+2). The
structure uses six length-N/3 sub-filters:

| sub-filter | input | symmetry of its coefficients |
|---|---|---|
| H0+H1 | X0+X1 | none |
| H0−H1 | X0−X1 | none |
| H1 | X1 | even |
| H0+H1+H2 | X0+X1+X2 | even |
| H0+H2 | X0+X2 | even |
| H0−H2 | X0−X2 | odd |

The sub-filter outputs are called A01, B01, C, S, A02 and B02, in table order. Define
P01 = (A01+B01)/2, Q01 = (A01−B01)/2, P02 = (A02+B02)/2 and Q02 = (A02−B02)/2. Then:

    Y0 = P01 − C + z⁻¹ (S − A02 − Q01 − C)      [the delayed term is H1X2 + H2X1]
    Y1 = Q01     + z⁻¹ (P02 − P01 + C)          [the delayed term is H2X2]
    Y2 = Q02 + C

Each line follows from Y0 = H0X0 + z⁻¹(H1X2+H2X1), Y1 = H0X1+H1X0 + z⁻¹H2X2 and
Y2 = H0X2+H1X1+H2X0. The delayed term of Y1 enters with a plus sign, because it is
exactly H2X2. Four of the six sub-filters are symmetric. The classic 3x3 FFA has only
two symmetric sub-filters out of six.

## The 4-parallel cascade (L = 4)

`ffa4_proposed` applies the 2x2 idea twice.

**First level.** The input is treated as two streams of sample pairs:
X0′ = {x(4k), x(4k+2)} and X1′ = {x(4k+1), x(4k+3)}. The rearranged 2x2 equations are
applied to these streams with the length-N/2 sub-filters H0′+H1′, H0′−H1′ and H1′.

**Second level.** Each first-level sub-filter is itself a 2-parallel filter, and each
one gets the 2x2 structure that suits it:

- H0′+H1′ is even-symmetric. It uses `ffa2_proposed` with PSYM = SYM_EVEN.
- H0′−H1′ is odd-symmetric. It uses `ffa2_proposed` with PSYM = SYM_ODD.
- H1′ has no symmetry. It uses the classic FFA, `ffa2_existing`:
  Y0 = H0X0 + z⁻¹H1X1 and Y1 = (H0+H1)(X0+X1) − H0X0 − H1X1.
  Using the rearranged form here would add adders and save no multipliers.

This gives nine sub-filters of length N/4, four of them with symmetry. The classic
4-parallel FFA has only one.

**The first-level z⁻¹.** Here z⁻¹ delays a 2-parallel signal by one sample pair.
{s(2k), s(2k+1)} becomes {s(2k−1), s(2k)}: the first element comes from a register, and
the second is the current first element.

The outputs come out as Y0′ = {y(4k), y(4k+2)} and Y1′ = {y(4k+1), y(4k+3)}.

## The 6- and 8-parallel cascades

`ffa6_proposed` and `ffa8_proposed` use the same first level as the 4-parallel form.
The difference is that X0′ and X1′ are now 3-parallel or 4-parallel streams, with
P = L/2.

For a P-parallel signal, z⁻¹ rotates the vector by one element:
{s(Pk), …, s(Pk+P−1)} becomes {s(Pk−1), s(Pk), …, s(Pk+P−2)}. Only the wrapped element
needs a register.

The second level uses the P-parallel structures:

| L | H0′+H1′ (even) | H0′−H1′ (odd) | H1′ (none) | sub-filters | symmetric | classic FFA |
|---|---|---|---|---|---|---|
| 6 | `ffa3_proposed` | `ffa3_proposed`, PSYM odd | `ffa3_existing` (3x3 FFA) | 18 of length N/6 | 8 | 2 |
| 8 | `ffa4_proposed` | `ffa4_proposed`, PSYM odd | `ffa4_existing` (2x2 FFA twice) | 27 of length N/8 | 8 | 1 |

For an antisymmetric parent filter, `ffa3_proposed` and `ffa4_proposed` swap the
symmetries of their sub-filters. For example, H1 of an antisymmetric filter is
antisymmetric.

At 24 taps, the innermost sub-filters of the 8-parallel form have length 3. The
symmetric ones use two multipliers. The antisymmetric ones have a zero centre
coefficient by construction.

`ffa3_existing` is the classic 3x3 FFA. It uses six sub-filters: H0, H1, H2, H0+H1,
H1+H2 and H0+H1+H2. With D = H0X0 − z⁻¹H2X2, E = (H0+H1)(X0+X1) − H1X1 and
F = (H1+H2)(X1+X2) − H1X1:

    Y0 = D + z⁻¹F      Y1 = E − D      Y2 = (H0+H1+H2)(X0+X1+X2) − E − F

## Sub-filters

`subfilter_sym` builds a length-M sub-filter from ⌈M/2⌉ multipliers. It uses a
transposed direct form: products go into a chain of adders and registers. Product i is
added at tap i and again at the mirrored tap M−1−i. For an antisymmetric set it is
subtracted at the mirrored tap instead, by adding the inverted word with carry-in 1.
The chain still has M−1 adders. Only the multipliers are halved.

For an odd M, one multiplier serves the centre tap. For an antisymmetric set the centre
coefficient must be zero, and the caller supplies it. In this design, only the
8-parallel form at 24 taps has odd-length (3-tap) sub-filters. There the zero centre
holds by construction.

`subfilter_fir` is the general sub-filter: M multipliers and the same chain.
`tdf_chain` is the chain shared by both.

## Adder styles

`KIND` selects the adder used in every sub-filter chain. It is a parameter of the top
and of every structure.

| KIND | chain adders |
|---|---|
| `ADD_BEC` (default) | carry-select adder (CSLA) in which each block's carry-in = 1 result comes from a binary-to-excess-1 converter applied to the carry-in = 0 result (`bec_csla_adder`) |
| `ADD_SQRT_CSLA` | carry-select adder with block sizes 2, 2, 3, 4, 5, … (`sqrt_csla_adder`) |
| `ADD_CSLA` | carry-select adder with uniform 4-bit blocks (`csla_adder`) |
| `ADD_CSA` | carry-save: each chain register holds a sum word and a carry word, each tap is a 3:2 compressor (`csa_3to2`), and a ripple-carry adder merges the pair at the sub-filter output |

All four give identical results; only area and delay differ. The pre- and
post-processing adders, and the multipliers, are written as `+`, `-` and `*` and left to
synthesis.

Some of these details are this design's own choices:

- the block sizes of the three carry-select adders;
- the square-root grouping used inside the BEC adder;
- the ripple-carry merge adder of the carry-save chain;
- the choice of BEC as the default adder.

## Word widths

Samples and coefficients are 16-bit two's complement (`DATA_W`, `COEF_W` in
`symfir_pkg`).

Each pre-adder widens its operand by one bit. Examples: X0+X1 is 17 bits, and in the
4-parallel second level the coefficients reach 18 bits. Each multiplier is exactly as
wide as its operands, and products are sign-extended to `ACC_W` = 40 bits.

Every intermediate value of all the structures fits in 40 bits for 24 taps (checked at
full scale by the testbenches). The arithmetic is modulo 2⁴⁰ and the halvings are exact,
so the outputs are the true convolution. For a much longer filter, `ACC_W` must grow by
about log2 of the length.

## Interface and timing

`symfir_top` holds the five filters (L = 2, 3, 4, 6, 8) side by side. All five use one
coefficient input,
`h_half[0:11]` = h(0..11); the top mirrors it to h(12..23).

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset, which clears all delay lines |
| `h_half[12]` | coefficients h(0..11), signed 16-bit, held steady while filtering |
| `enL`, `xL[L]` | L = 2, 3, 4, 6, 8: when `enL` is high, block {x(Lk) … x(Lk+L−1)} is taken on the rising edge |
| `yL[L]`, `vldL` | one cycle later: the 40-bit block {y(Lk) … y(Lk+L−1)} with `vldL` high |

While `enL` is low, that filter's state and outputs hold and `vldL` is low. The
sub-filter chains, the multipliers and the post-processing form one combinational path
from `xL` to the output register. The design has no pipelining beyond that register.

The structure modules (`ffa2_proposed`, `ffa3_proposed`, `ffa4_proposed`,
`ffa6_proposed`, `ffa8_proposed`, and the classic `ffa2_existing`, `ffa3_existing`,
`ffa4_existing`) have the same interface with a full coefficient vector `g[N]`. With
`OUT_REG = 0` their outputs are combinational, which is how the cascades use the
smaller structures.

`ffa2_proposed` checks with an assertion that `g` has the symmetry it relies on.
The cascades assert that their three branches run in lock step.

## Cost at 24 taps

Multipliers of the built structures compared with the classic FFA. The classic FFA
column already takes advantage of the symmetric sub-filters it does have.

| L | sub-filters (length) | symmetric | multipliers built | classic FFA |
|---|---|---|---|---|
| 2 | 3 (12) | 2 | 6+6+12 = 24 | 30 |
| 3 | 6 (8) | 4 | 4·4 + 2·8 = 32 | 40 |
| 4 | 9 (6) | 4 | 4·3 + 5·6 = 42 | 51 |
| 6 | 18 (4) | 8 | 8·2 + 10·4 = 56 | 68 |
| 8 | 27 (3) | 8 | 8·2 + 19·3 = 73 | 80 |

For an N-tap filter, the savings over the classic FFA are:

| L | multipliers saved | at 24 taps | at 72 taps |
|---|---|---|---|
| 4 | 3N/8 | 9 | 27 |
| 6 | N/2 | 12 | 36 |
| 8 | 7N/16 for even N/8 | 7 | 28 |

When N/8 is odd, each symmetric sub-filter saves (N/8 − 1)/2 multipliers instead of
N/16. That is why the 8-parallel form saves 7 at 24 taps and 28 at 72 taps.

Every sub-filter keeps M−1 chain adders. The extra cost is in the pre- and
post-processing adders only, and it does not depend on N.

## How far it is checked

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **Adders:** corner cases and random operands against integer sums.
- **Sub-filters and structures:** outputs are compared against a direct convolution
  computed in the testbench:
  - all four adder kinds;
  - antisymmetric (PSYM odd) instances of the 2-, 3- and 4-parallel structures;
  - random enables, so held cycles occur;
  - restarts from reset;
  - a full-scale phase with every input and coefficient at −32768.
- **Top (`tb_symfir_top`):** runs all five filters at default parameters.
- **`tb_ffa4_72tap`:** runs the 4-parallel structure at 72 taps.

The structures were not synthesised to gates or timed, so no area, delay or power
figures are claimed.

To simulate, for example, the top:

    verilator --binary --timing --assert -Irtl -y rtl rtl/symfir_pkg.sv \
        tb/tb_symfir_top.sv --top-module tb_symfir_top -o sim && obj_dir/sim

Each simulation ends in well under a second. Compiling the larger testbenches takes a few
minutes.

## Changing it

- **Filter length:** `N` on `symfir_top` must be a multiple of 24 so that all five
  structures apply. The structures alone need N to be a multiple of 2, 3, 4, 6 or 8
  (for L = 2, 3, 4, 6, 8), with N/2 divisible by P for the cascades.
- **Widths:** `W` and `AW` on the top; keep `AW` ≥ 2·W + log2(N) + 4.
- **Adder style:** `KIND` on the top, or on any structure.

## Files

- `rtl/symfir_pkg.sv`: the adder-kind and symmetry enums, default sizes, and the
  square-root grouping functions.
- Adders: `rtl/rca_adder.sv`, `csla_adder.sv`, `sqrt_csla_adder.sv`,
  `bec_csla_adder.sv`, `csa_3to2.sv`, and `cpa_adder.sv` (the selector).
- Sub-filters: `rtl/tdf_chain.sv`, `subfilter_fir.sv`, `subfilter_sym.sv`.
- Structures: `rtl/ffa2_proposed.sv`, `ffa3_proposed.sv`, `ffa4_proposed.sv`,
  `ffa6_proposed.sv`, `ffa8_proposed.sv`.
- Classic FFA building blocks for the branches without symmetry: `ffa2_existing.sv`,
  `ffa3_existing.sv`, `ffa4_existing.sv`.
- Top: `rtl/symfir_top.sv`.
- `tb/tb_<module>.sv`: the testbench of each block. `tb/tb_ffa4_72tap.sv` runs the
  72-tap 4-parallel configuration.
