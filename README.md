# DSP array with discriminate weight approximation (DWA)

FPGA accelerators for large language models spend most of their area on DSP slices.
DSP packing makes one slice compute several low-precision products at once. Several
weights, separated by guard zeros, go into the wide port, and one activation goes into
the other port. Each product then lands in its own bit field of the result.

With 8-bit activations and 4-bit weights (A8W4), three weights need
`3*4 + 2*8 = 28` bits, one bit more than the 27-bit weight port of a DSP48E2 slice.
Two weights per slice fit easily. Fitting three gives 1.5 times fewer slices, but only
if one bit can be saved.

Indiscriminate weight approximation rounds every weight so that it needs fewer bits.
It then needs pre- and post-processing logic for every weight, and it perturbs every
weight of the model. **Discriminate weight approximation** does less:

* **Intra-DSP approximation.** A snippet is the group of `m` weights that shares one
  slice. A snippet is changed only if it does not fit. A weight whose low bit is zero
  can be stored shifted right by one bit, so it fits in 3 bits, exactly. A snippet
  fits the slice if at least one of its weights is even. Offline, a snippet whose
  weights are all odd gets its first weight rounded to the nearest even value. In
  hardware, each DSP unit needs only one pre/post pair: it picks an even weight,
  shifts it into the 3-bit slot, and shifts the product back.
* **Inter-DSP approximation.** Some rows of the array are built without approximation
  (DSP-o). They use a cheaper encoding that is exact for every weight. An offline
  search picks how many rows need this to keep model accuracy. For OPT-6.7B that is
  40 of 128 rows. Offline, the rows of each weight tile are sorted by how often their
  snippets violate, so the worst rows land on the exact rows. A Benes network applies
  the same row order to the activations on the fly. A tile's dot product is a sum over
  rows, so the result does not change.

This repository holds synthesizable SystemVerilog for the on-chip side of this scheme,
at the configuration above: WOP-A8W4 (weight-only packing: one activation, three
weights per slice), a 128 x 128 weight tile, and 40 exact rows. The offline steps are
described under "What the weight stream must satisfy". Those steps are the
approximation, the row sort, the routing-signal computation and the accuracy search.
They are software, and the testbenches contain reference versions.

## Block structure

```
 act[R] ──► benes_net (R inputs, cfg = rout) ──► routed activation snippet per row
                                                   │
 w_tile[R][C] ─────────────────────────────────────┤
                                                   ▼
 dsp_array:  rows 0 .. R-N_EXACT_ROWS-1 : ceil(C/M) x dsp_unit_w   (approximating)
             rows R-N_EXACT_ROWS .. R-1 : ceil(C/M) x dsp_unit_o   (exact)
             column sums over all rows ──► dot[c] = Σ_r a_r · w_r,c
```

| module | role |
|---|---|
| `dwa_pkg` | configuration constants; packing-layout and Benes-size functions |
| `dwa_top` | top level: routing network and DSP array |
| `benes_net` | R-input Benes network for the activation snippets |
| `dsp_array` | R rows of DSP units, with a registered column sum over the rows |
| `dsp_unit_w` | DSP unit with intra-DSP approximation (DSP-w) |
| `dwa_pre_w`, `dwa_post_w` | DSP-w input reordering + pre-processing; post-processing + output reordering |
| `dsp_unit_o` | DSP unit without approximation (DSP-o) |
| `dwa_pre_o`, `dwa_post_o` | DSP-o pre-processing of one weight; post-processing of one product |
| `dwa_wpack`, `dwa_apack` | weight and activation packing with guard bits |
| `dsp_slice` | the DSP slice as used here: unsigned `P = A*B + C`, 2-cycle pipeline |

## Packing layouts (A8W4, 27-bit weight port)

A packed weight word holds `M` slots, and slot 0 sits at the most significant end.
Guard zeros, `b^a` = 8 of them, separate neighbouring slots. The product of the
activation with the word is then the concatenation of the separate products.

**DSP-w.** Two 4-bit slots hold weights unchanged. The last slot holds a 3-bit
`s = p >> f`, where `f` is the number of trailing zeros of the chosen even weight `p`:

```
bit 26            19 18   11 10    7 6     0     (packed weight word, 27 bits)
    [ p_x (4) ] [ 0 x8 ] [ p_y (4) ] [ 0 x8 ] [ s (3) ]
result fields:  a·p_x at [34:23]   a·p_y at [22:11]   a·s at [10:0]
```

`dwa_pre_w` picks the lowest-index even weight, so the order is fixed. The other two
weights keep their original order in the upper slots. The unit keeps the source
index of every slot. `dwa_post_w` shifts `a·s` left by `f` and writes every product
back to the index of its weight.

Example with 4-bit activations and a 19-bit port. Activation 2 and weights
{11, 15, 3} do not fit, because all three weights are odd. Offline, 11 becomes 10.
The word is `1111 0000 0011 0000 101`, that is 15, 3 and `s = 5` with `f = 1`. The
products are {20, 30, 6}. `tb_dsp_unit_w` checks this example.

**DSP-o.** Every non-zero weight is written as `w = 2^f (1 + 2 s')`, with
`s' = ((w >> f) - 1) / 2`, which has 3 bits. Then:

```
a · w = 2^f · ( 2·( a[7:1] + a·s' ) + a[0] )
```

The slice multiplies `a` by the packed `s'` values, which take `3*3 + 2*8 = 25` bits.
Its post-adder (C port) adds `a >> 1` into every product field, so each field holds
`a[7:1] + a·s'`. That sum stays below `2^11` and never carries into the next field.
`dwa_post_o` appends `a[0]` and shifts left by `f`. The result is exact for all
weights, with no offline preparation. The weight 0 is coded as `f = b^w` and gives
0. This costs one pre/post pair per weight. It still avoids the wider rounding logic
of the two-factor encoding of indiscriminate approximation.

## Routing signals

`benes_net` is the standard recursive Benes network, built as flat stages. It has
`2·log2 R − 1` switch stages and `R·log2 R − R/2` switches, which is 832 for R = 128.
It computes `dout[k] = din[perm[k]]`.

Switch semantics:

* Input switch `i` takes `din[2i]` and `din[2i+1]`. When its bit is 0, it sends
  `din[2i]` to the upper half-network; when its bit is 1, it crosses.
* Output switch `j` takes output `j` of both halves. When its bit is 0, it drives
  `dout[2j]` from the upper half and `dout[2j+1]` from the lower half.

The `cfg` bits nest, starting at bit 0:

```
[R/2 input-switch bits][upper half's bits][lower half's bits][R/2 output-switch bits]
```

The testbench package `tb/dwa_tb_pkg.sv` contains `benes_route()`, which computes
these bits with the looping algorithm. An offline tool must produce the same layout.

## What the weight stream must satisfy

The array is correct only for data prepared this way:

1. **Row order.** Sort the rows of each weight tile by their number of snippet
   violations, in ascending order. A snippet violates when
   `Σ B*(w_i) + (m−1)·b^a > D^w`, where `B*(w) = b^w − (trailing zeros of w)`. Feed
   the sorted tile as `w_tile`. Pass the permutation's switch settings as `rout`:
   remapped row `k` came from original row `perm[k]`. The activation tile `act` stays
   in the original order.
2. **Approximating rows** (the first `R − N_EXACT_ROWS` rows). Every violating
   snippet must have its first `G = excess` weights with `B* = b^w` rounded to a
   value with at least one trailing zero. This design picks the value nearest in
   Bray-Curtis distance between binary codes, `popcount(u^w) / (popcount(u) +
   popcount(w))`, breaking ties toward the smaller value. `approx_snippet()` in the
   testbench package implements this.
3. **Exact rows** (the last `N_EXACT_ROWS` rows) take weights unchanged.
4. `N_EXACT_ROWS` comes from the offline accuracy search. That search adds rows to the
   exact set, in order of their measured effect on perplexity, until perplexity is
   within 1 % of the unapproximated model.

If a DSP-w unit receives a snippet with no even weight, it raises `apx_err` for that
tile, and the products of that unit are not exact.

## Interface and timing of `dwa_top`

| port | width (defaults) | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset |
| `in_valid` | 1 | a tile is presented |
| `act[R][N]` | 8 bits each | activation tile, one snippet per tile row, original order |
| `w_tile[R][C]` | 4 bits each | remapped (and approximated) weight tile |
| `rout` | 832 | routing signals of this weight tile |
| `out_valid` | 1 | `dot` valid |
| `dot[N][C]` | 19 bits each | `Σ_r act[perm[r]] · w_tile[r][c]` |
| `apx_err` | 1 | an approximating row received an unprepared snippet |

The top takes one tile per cycle and has no stalls. Results appear 4 cycles after
their tile:

* 2 cycles in the slice;
* 1 output register in each DSP unit;
* 1 register on the column sums.

The routing network is combinational. With `N_EXACT_ROWS = 0` there is no remapping,
so the routing network is not built and `rout` is ignored.

Parameters of every module default to the values in `dwa_pkg`:

* `BA = 8`, `BW = 4`, `M = 3`, `N = 1`: the A8W4 weight-only packing.
* `DW = 27`: the DSP48E2 weight port.
* `DA = 18`, `PW = 48`: the DSP48E2 B port and result widths.
* `R = C = 128`.
* `N_EXACT_ROWS = 40`.

The DSP units check at elaboration that their packed words fit `DW`, `DA` and `PW`.

## Configurations

* **WOP-A8W4** (default). This is the configuration above. It uses 5504 DSP units,
  43 per row; the last unit of each row has one empty slot, tied to zero.
* **WOP-A4W4.** Set `BA = 4, M = 4`. The DSP-w word becomes `4+4+4+4+4+4+3 = 27`
  bits and the DSP-o word 24 bits. Both unit types are tested in this configuration.
  The default build also computes A4W4 data correctly, but with 3 weights per slice
  instead of 4.
* **Weight-activation packing (`N > 1`)** is supported by the packers and units, and
  is tested with `N = 2, M = 2`, 4-bit operands. The published WAP-A4W4 setting
  (n = 3, m = 2) does not fit the slice ports with this packing: its activation word
  would be 36 bits. Its packing is not reproduced here.
* **Larger arrays.** `R` must be a power of two, because of the Benes network;
  `R = C = 256` is a parameter setting.
* **All rows approximating** (`N_EXACT_ROWS = 0`). No routing network; used when the
  model tolerates approximation everywhere.

## Departures and choices of this implementation

* **Summation.** The column sum over rows is this design's. The published method only
  states that the array computes a tile dot product per cycle. The sum is what makes
  the row permutation invisible. Accumulation over the tiles of a longer reduction
  dimension is left to the surrounding accelerator.
* **Activation distribution.** Each row's activation snippet is broadcast to its
  units. The published figure draws the activation passing from unit to unit along a
  row; a systolic version would add one register per unit and skew the timing.
* **Exact rows.** They are the last rows of the array. The row sort puts the most
  violating rows there; which physical rows are exact is not otherwise specified.
* **Even-weight selection.** The hardware takes the lowest-index even weight. It uses
  the full trailing-zero count as `f`, which is exact for any even weight.
* **Reduced slots (`G`).** Exactly `G = m·b^w + (m−1)·b^a − D^w` reduced slots are
  built, one bit narrower each; `G = 1` in every published configuration. For
  `G > 1`, a snippet that gains its bits from a single weight with several trailing
  zeros would not fit this fixed layout.
* **DSP-o summation.** DSP-o forms `a[7:1] + a·s'` with the slice's post-adder. Only
  the sum is specified, not how it is formed.
* **Shift direction in DSP-o.** The published formula for the exact units marks its
  shifts as right shifts, and writes the weight as `2^f·(1 + s')`. The algebra needs
  `w = 2^f·(1 + 2s')`, with `s' = ((w >> f) − 1) / 2`, and a left shift by `f`. The RTL
  follows the algebra, and `tb_dwa_post_o` checks it exhaustively against `a·w`.
* **Pipeline depths.** They are choices; the real slice's registers are
  configurable.
* **Arithmetic.** All arithmetic is unsigned, as in the packing formulation. The
  `dsp_slice` model is a plain multiply-add that a synthesis tool maps to a DSP slice;
  the DSP48E2 multiplier itself is signed 27 x 18.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. A run needs the two packages first. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dwa_top \
    -y rtl -y tb +libext+.sv rtl/dwa_pkg.sv tb/dwa_tb_pkg.sv tb/tb_dwa_top.sv
./obj_dir/Vtb_dwa_top
```

| testbench | what it shows |
|---|---|
| `tb_dsp_slice` | multiply-add with 2-cycle latency |
| `tb_dwa_wpack`, `tb_dwa_apack` | packing layouts, including `{11,15}` → `1011_0000_1111` |
| `tb_dwa_pre_w` | all 4096 three-weight snippets: selection, shift, order, `err` |
| `tb_dwa_post_w`, `tb_dwa_pre_o`, `tb_dwa_post_o` | post-processing and the DSP-o identity, exhaustively |
| `tb_dsp_unit_w` | streamed random prepared snippets, exact products at 3 cycles, the 4-bit example, unprepared snippets, `N = 2` |
| `tb_dsp_unit_o` | any weights exact, at A8W4, A4W4 (`M = 4`) and `N = 2` |
| `tb_benes_net` | the 4-input example (`a0 a1 a2 a3` → `a0 a2 a3 a1`) and random permutations of 8 and 128 |
| `tb_dsp_array` | 8 x 10 array (last unit partial), mixed rows, `err` |
| `tb_dwa_top` | the whole offline flow and the array at 8 x 12 with 3 exact rows, plus the no-routing build; it counts each mechanism |
| `tb_dwa_top_a4w4` | the same flow with 4-bit activations and four weights per slice (`M = 4`, `BA = 4`), 8 x 16 with 3 exact rows |
| `tb_dwa_top_mid` | the same flow at 16 x 48 (16 units per row) with 5 exact rows, 40 tiles |

In the end-to-end tests, the testbench first generates tiles whose rows differ in how
many violations they hold. It then sorts the rows, approximates the approximating rows
and computes the routing bits. Finally it compares every dot product with a plain
sum, which must match exactly, at the 4-cycle latency. The test fails if any of these
mechanisms never occurs:

* an approximated snippet;
* a violating snippet in an exact row;
* a zero weight in an exact row;
* a non-identity routing;
* a tile whose result equals the unapproximated dot product even though it had
  violations;
* a flagged unprepared snippet;
* the build without routing.

`tb_dwa_top_mid` checks the same list except the tile whose result matches the
unapproximated one, which is too rare at that size to rely on.

The largest size simulated is 16 rows x 48 columns. The default 128 x 128 build
(5504 DSP units) passes lint and elaboration, but Verilator's C++ model of it is
about half a gigabyte of source. Compiling that takes far longer than a practical
test run, so no test instantiates the top at its defaults. The array is a regular
tiling of the same unit, and every unit, row and column path is covered by the
smaller builds. Nothing in the RTL depends on the size except the widths, which
come from the parameters.
