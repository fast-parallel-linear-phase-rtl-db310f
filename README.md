# Parallel linear-phase FIR filters with fewer multipliers

An L-parallel FIR filter takes L input samples per clock and produces L output
samples per clock. Replicating the filter L times costs L·N multipliers for an
N-tap response. A fast FIR algorithm (FFA) brings that down: it splits the
response into L polyphase components and computes the block convolution with
about 2L−1 sub-filters of N/L taps each. The sub-filters are fed and combined
by small adder networks, the pre- and post-processing.

A linear-phase filter has a symmetric response, h(n) = h(N−1−n). In a
symmetric sub-filter, tap k and tap K−1−k share one multiplier, so the
sub-filter needs only half its multipliers. In a plain FFA, though, most
sub-filters lose the symmetry. The structures here rearrange the FFA
equations. They use sums and differences of polyphase components, such as
H0+H2 and H0−H2, which stay symmetric or antisymmetric. More sub-filters then
run at half cost. The price is a few more pre- and post-adders. That adder
count is fixed, while the number of multipliers saved grows with N.

The RTL contains six filters of this kind. They share two transposed-form
sub-filter modules:

| module          | parallelism | default N | what it is |
|-----------------|-------------|-----------|------------|
| `fir3a`         | 3           | 27        | **structure 3A**, the main design: odd length, N mod 3 = 0 |
| `fir3_proposed` | 3           | 27        | three-parallel variant, N mod 3 = 0 |
| `fir2_proposed` | 2           | 24        | two-parallel, even length |
| `fir4_cascaded` | 4           | 24        | two-parallel structures cascaded in two levels, N mod 4 = 0 |
| `fir6_cascaded` | 6           | 24        | two-parallel outside, three-parallel inside, N mod 6 = 0 |
| `fir8_cascaded` | 8           | 24        | two-parallel structures cascaded in three levels, N mod 8 = 0 |
| `fir2_ffa`      | 2           | 12        | plain two-parallel FFA, used inside `fir4_cascaded` |
| `fir3_ffa`      | 3           | 12        | plain three-parallel FFA, used inside `fir6_cascaded` |
| `fir4_ffa`      | 4           | 12        | plain four-parallel FFA cascade, used inside `fir8_cascaded` |
| `sym_tdf_fir`   | 1           | K = 9     | symmetric/antisymmetric sub-filter with ceil(K/2) multipliers |
| `tdf_fir`       | 1           | K = 9     | general sub-filter with K multipliers |
| `pfir_top`      | —           | —         | the six filters side by side, with registered inputs and outputs |
| `fir_pkg`       | —           | —         | shared word widths |

## Notation

The response h is split into polyphase components. For a three-parallel
filter, H0 = {h(0), h(3), h(6), …}, H1 = {h(1), h(4), …} and
H2 = {h(2), h(5), …}, each with K = N/3 taps. An input block is
X0, X1, X2 = x(3k), x(3k+1), x(3k+2), and an output block is
Y0, Y1, Y2 = y(3k), y(3k+1), y(3k+2). A product such as (H0+H2)(X0+X2) is one
sub-filter. Its coefficients are H0+H2, tap by tap, and its input stream is
X0+X2. The delay z⁻¹ is one block, that is L samples.

Now let N = 3K. Mirroring h maps phase 0 onto phase 2 and phase 1 onto itself.
So H2 is H0 reversed, and H1 is symmetric. From that:

* H1 and H0+H1+H2 are symmetric.
* H0+H2 is symmetric.
* H0−H2 is antisymmetric (it equals minus its reverse). Its mirrored taps
  share a multiplier with a sign change.

## Structure 3A (`fir3a`)

Six sub-filters, four of them symmetric:

| sub-filter                | coefficients | input       | kind |
|---------------------------|--------------|-------------|------|
| F = H0·X0                 | H0           | X0          | general (`tdf_fir`) |
| Q = H1·X1                 | H1           | X1          | symmetric |
| P = (H0+H2)(X0+X2)        | H0+H2        | X0+X2       | symmetric |
| M = (H0−H2)(X0−X2)        | H0−H2        | X0−X2       | antisymmetric |
| S = (H0+H1+H2)(X0+X1+X2)  | H0+H1+H2     | X0+X1+X2    | symmetric |
| C = (H1+H2)(X1+X2)        | H1+H2        | X1+X2       | general |

Post-processing:

```
A = (P + M) / 2          = H0X0 + H2X2
B = (P − M) / 2          = H0X2 + H2X0
T = A − F                = H2X2
Y0 = F + z⁻¹ (C − Q − T)          C − Q − T = H1X2 + H2X1
Y1 = S − C − F − B + z⁻¹ T        S − C − F − B = H0X1 + H1X0
Y2 = B + Q
```

Expand the brackets and these give exactly the three-phase convolution. With
N = 27 (K = 9), each symmetric sub-filter needs 5 multipliers and each general
one 9, so the filter has 4·5 + 2·9 = **38 multipliers**. A plain
three-parallel FFA needs 46, since only two of its six sub-filters are
symmetric. The adder network has 4 pre-adders and 11 post-adders (15),
against 10 for the plain FFA. These numbers scale as stated in the
introduction: 110, 198 and 790 multipliers at N = 81, 147 and 591.

The sub-filter set and its symmetry argument are the published structure. The
post-processing equations above were derived for this RTL from that
sub-filter set. They reach the published multiplier and adder counts.

### The factor ½

The published sub-filters carry the factor ½ in their coefficients:
½(H0+H2) and ½(H0−H2). With integer coefficients this loses the LSB whenever
a coefficient sum is odd. Here both products use the unscaled coefficients.
The shift comes after P+M and P−M, which are formed at full precision.
P+M = 2(H0X0 + H2X2) and P−M = 2(H0X2 + H2X0) are always even, so the
arithmetic right shift is exact. The multiplier count is the same. The output
is then bit-exact with a direct-form convolution of the integer response.

## The sub-filters

Both sub-filters use the transposed direct form. The new sample is multiplied
by every coefficient at once. Product k is added to a partial-sum register and
moves one register towards the output:

```
y = c0·x + d0,    d_k ← c_{k+1}·x + d_{k+1},    d_{K−2} ← c_{K−1}·x
```

`sym_tdf_fir` forms only ceil(K/2) products. Tap k and tap K−1−k take the
same product. With `ANTI = 1` the mirrored tap takes its negative, for
antisymmetric coefficients, whose middle tap is zero when K is odd. It reads
only the first ceil(K/2) coefficients. A concurrent assertion checks, on every
enabled cycle, that the rest of `c` mirrors them.

## The other structures

**`fir3_proposed`** (three-parallel, N mod 3 = 0) uses the sub-filters
H0+H1, H0−H1, H1, H0+H2, H0−H2 and H0+H1+H2. Four of them are symmetric;
H0±H1 are not:

```
a01 = (P01+M01)/2, b01 = (P01−M01)/2, a02 = (P02+M02)/2, b02 = (P02−M02)/2
r0 = a01 − Q1                                  (= H0X0)
Y0 = r0  + z⁻¹ (S − P02 − b01 − Q1)
Y1 = b01 + z⁻¹ (a02 − r0)
Y2 = b02 + Q1
```

It has 38 multipliers at N = 27, like 3A, but 17 pre/post adders (5 + 12)
against 3A's 15.

**`fir2_proposed`** (two-parallel) splits h into even and odd phases H0 and
H1:

```
P = (H0+H1)(X0+X1), M = (H0−H1)(X0−X1), Q = H1·X1
Y0 = (P+M)/2 − Q + z⁻¹ Q
Y1 = (P−M)/2
```

For a symmetric response of even length, H1 is H0 reversed. So H0+H1 is
symmetric and H0−H1 antisymmetric, and only Q needs a full sub-filter. Setting
`ANTI = 1` swaps the two roles for an antisymmetric response.

**`fir4_cascaded`** (four-parallel, N mod 4 = 0) has two levels. At the outer
level, h splits into E = h(2m) and O = h(2m+1). The input splits into two
half-rate streams, U = (X0, X2) and V = (X1, X3). Each stream is carried as a
two-sample block. The two-parallel equations above are applied to these
streams:

* P = (E+O)(U+V) uses `fir2_proposed` with `ANTI = 0`, since E+O is symmetric.
* M = (E−O)(U−V) uses `fir2_proposed` with `ANTI = 1`, since E−O is
  antisymmetric.
* Q = O·V uses the plain FFA, `fir2_ffa`. O has no symmetry, and the plain
  FFA needs fewer adders.

The outer delay z⁻¹ acts on a half-rate stream. On a block (q0, q1) it gives
(q1 of the previous block, q0). That is why y(4k+2) uses q0 of the current
block, while y(4k) uses q1 of the previous block. Nine sub-filters of N/4 taps
result, four of them symmetric or antisymmetric. A plain FFA cascade has only
one. At N = 24 this gives 42 multipliers against 51: 3N/8 saved.

`fir4_cascaded` also has an `ANTI` parameter. For an antisymmetric response,
E+O is antisymmetric and E−O symmetric, so the two inner filters swap roles.
`fir8_cascaded` needs this for one of its inner blocks.

## Larger block sizes: six- and eight-parallel

The same recipe extends to larger L. The outer level is always the proposed
two-parallel form, applied to half-rate streams carried as blocks of L/2
samples. Its three inner filters are:

* E+O, symmetric: the best proposed L/2-parallel structure.
* E−O, antisymmetric: the same structure with `ANTI = 1`.
* O, no symmetry: the plain FFA, whose adder network is smallest.

The outer delay z⁻¹ of Q rotates the L/2-sample block by one position. The
last element of the previous block enters at the front.

| module          | E+O / E−O inner            | O inner     | sub-filters | (anti)symmetric | plain-FFA cascade |
|-----------------|----------------------------|-------------|-------------|-----------------|-------------------|
| `fir4_cascaded` | `fir2_proposed`            | `fir2_ffa`  | 9           | 4               | 1                 |
| `fir6_cascaded` | `fir3a` (`ANTI` = 0 / 1)   | `fir3_ffa`  | 18          | 8               | 2                 |
| `fir8_cascaded` | `fir4_cascaded` (0 / 1)    | `fir4_ffa`  | 27          | 8               | 1                 |

The symmetric sub-filters gained over the plain cascade are 3, 6 and 7. That
matches the published counts for four-, six- and eight-parallel filters. So
do the multipliers saved, 3N/8, N/2 and 7N/16, when the sub-filter length N/L
is even. With an odd sub-filter length a symmetric sub-filter saves
(K−1)/2 multipliers instead of K/2. At the 24-tap defaults:

* `fir6_cascaded`: 4-tap sub-filters, 56 multipliers against 68.
* `fir8_cascaded`: 3-tap sub-filters, 73 multipliers against 80.

`fir3a` has an `ANTI` parameter for the antisymmetric inner block. With
`ANTI = 1`, H1, H0+H2 and H0+H1+H2 are antisymmetric and H0−H2 symmetric.

`fir3_ffa` is the plain three-parallel FFA. It has 3 pre-adders, 7
post-adders and the sub-filters H0, H1, H2, H0+H1, H1+H2, H0+H1+H2:

```
T  = H0X0 − z⁻¹ H2X2
Y0 = T + z⁻¹ [(H1+H2)(X1+X2) − H1X1]
Y1 = [(H0+H1)(X0+X1) − H1X1] − T
Y2 = (H0+H1+H2)(X0+X1+X2) − [(H0+H1)(X0+X1) − H1X1] − [(H1+H2)(X1+X2) − H1X1]
```

`fir4_ffa` is a plain two-parallel FFA applied at both levels.

## Interface and timing

All filter modules share one interface:

```
clk, rst_n, en
h [N]   full response, signed CW bits
x [L]   input block,  x[i] = x(Lk+i), signed W bits
y [L]   output block, y[i] = y(Lk+i), signed AW bits
```

* **Zero latency.** The filter cores are combinational from `x` to `y`. The
  sub-filter and block-delay registers advance on a rising `clk` edge with
  `en` high.
* **Stall.** A cycle with `en` low moves no state.
* **Reset.** `rst_n` is synchronous and active low. It clears all history, so
  the filter starts from x(n) = 0 for n < 0.
* **Coefficients.** They are input ports. The coefficient sums (H0+H2 and so
  on) are combinational, and synthesis folds them to constants when the ports
  are tied.

`pfir_top` registers the input blocks with `en`, runs the six filters, and
registers their output blocks. Each output appears with `vld` two rising edges
after its input block. While `vld` is low the outputs hold. Each filter's port
(`h2`, `h3`, `h3a`, `h4`, `h6`, `h8`) takes only the unique half of its response,
h(0)…h(ceil(N/2)−1). The top mirrors it, so every filter sees an exactly
symmetric response.

### Word widths

Samples and coefficients are 16-bit two's complement. Every accumulator and
output is 40 bits wide (`fir_pkg`: DATA_W, COEF_W, GUARD_W). Pre-adders widen
their operands by one bit per addition, so no pre-sum is truncated. 40 bits
cover full-scale inputs and coefficients at the default lengths with margin.
The halving step needs every sub-filter sum to fit in `AW` bits. For
structure 3A that holds up to about N = 380. For longer filters, raise
`GUARD_W` or the `AW` parameter. The outputs are the exact integer
convolution. Rounding and scaling are left to
the user.

## Departures and open points

* **Structure 3A's post-processing** is derived here from its six
  sub-filters, as described above, not copied from a published figure. It is
  exact, and its counts match the published 38 multipliers and 15 adders at
  27 taps.
* **Halving after the sum** instead of scaling the coefficients: see
  "The factor ½".
* **The four-parallel cascade** follows the published rule: the proposed
  structure for blocks with symmetry, the plain FFA for the others. It reaches
  the stated "three more symmetric sub-filters" and 3N/8 multiplier saving.
  But it uses 8 more adders than the plain cascade, where 11 are quoted, so
  the published figure's exact wiring may differ.
* **Lengths.** The two-, four-, six- and eight-parallel filters default to
  24 taps. Their symmetry argument needs an even length that is a multiple
  of L. They cannot take the 27-, 81-, 147- and 591-tap lengths without zero
  padding, which breaks the symmetry.
* **The six- and eight-parallel filters** are built by the same rule. Their
  symmetric sub-filter counts and multiplier savings match the published
  ones, but their adder overheads do not. The six-parallel filter uses 16
  adders more than the plain cascade (58 against 42); the published text
  quotes 32. The 2×3 order and the use of structure 3A inside are choices
  of this design.
* **This design's own choices:** word widths, the enable/stall handshake,
  the synchronous reset, coefficients as ports, and the register stages in
  `pfir_top`.

## Verification

Each module has a self-checking testbench in `tb/`. Every one compares the
outputs with a direct convolution y(n) = Σ h(k)·x(n−k), computed in the
testbench from the sample history. Each testbench does two runs:

* random coefficients with the required symmetry, random samples, and random
  stall cycles (during stalls the inputs carry garbage);
* after a reset, full-scale samples and coefficients, to catch word overflow.

The cores are checked in the same cycle as their input block, which confirms
their zero latency.

* `tb_fir3a`, `tb_fir3_proposed`, `tb_fir2_proposed`, `tb_fir4_cascaded`,
  `tb_fir6_cascaded` and `tb_fir8_cascaded` check one filter each.
* `tb_fir2_ffa`, `tb_fir3_ffa` and `tb_fir4_ffa` check the plain-FFA
  filters with unconstrained coefficients.
* `tb_fir2_proposed_anti`, `tb_fir3a_anti` and `tb_fir4_cascaded_anti` check
  the `ANTI = 1` variants with antisymmetric responses. The 27-tap one has a
  zero middle tap.
* `tb_sym_tdf_fir` checks symmetric K = 9, antisymmetric K = 9 (zero middle
  tap) and antisymmetric K = 6. `tb_tdf_fir` checks K = 9 and K = 6.
* `tb_fir3a_workloads` runs structure 3A at 81, 147 and 591 taps. These are
  the other lengths of the published multiplier comparison. The 591-tap
  instance uses `AW = 48`.
* `tb_pfir_top` runs the whole top at its default sizes. It checks every
  output block, its two-cycle latency with `vld`, output hold during stalls,
  and a reset in the middle of a stream. It fails if stalls, holds or
  mid-stream resets never occurred.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_fir3a.sv --top-module tb_fir3a
./obj_dir/Vtb_fir3a
```

Swap in any other testbench. The package must come first on the command line.
To build a different length, override `N` on the filter, or `N2`, `N3`, `N3A`
and `N4` on `pfir_top`. Elaboration checks the divisibility each structure
needs. The testbenches take their lengths from local parameters at the top of
each file.
