# 64-bit magnitude comparator in GDI logic: serial, parallel and tree

A magnitude comparator takes two n-bit unsigned numbers A and B and raises
exactly one of three flags: A>B, A=B or A<B. Hardware sorters and
sorting networks need many of these, so a comparator must be fast and use
little power. This design builds a 64-bit comparator from one 4-bit cell in
three ways:

* **serial**: a ripple of cascadable cells, like chained 7485 parts;
* **parallel**: sixteen cells working at once, with combining gates after them;
* **tree**: sixteen cells, then four, then one. This is the recommended
  organisation, because it has the fewest gates in series.

Two ideas carry through the design:

1. **Gate Diffusion Input (GDI) logic.** Every gate is built from one
   primitive, a pMOS/nMOS pair that works as a 2:1 multiplexer. A GDI gate
   needs far fewer transistors than a static CMOS gate.
2. **Logic shut-down.** Inside a cell the most significant bit pair is
   compared first. A lower bit is compared only while every bit above it is
   equal. Once a decision is made, the gates of the lower bits stop
   switching, which saves dynamic power.

Everything is combinational. There is no clock, no reset and no state.

## The GDI primitive (`gdi_cell`)

The cell has a common gate input G. The nMOS passes N when G is high, and
the pMOS passes P when G is low. At logic level it is therefore
`out = g ? n : p`. Each gate comes from tying the three inputs:

| gate | N  | P  | G | out       | module                |
|------|----|----|---|-----------|-----------------------|
| OR   | 1  | B  | A | A+B       | `gdi_or2`             |
| AND  | B  | 0  | A | AB        | `gdi_and2`            |
| MUX  | C  | B  | A | A'B + AC  | (`gdi_cell` directly) |
| NOT  | 0  | 1  | A | A'        | `gdi_inv`             |

This design makes XOR from the MUX tie-off, with N=B', P=B, G=A
(`gdi_xor2`, 2 cells). It makes NOR as an OR followed by a NOT
(`gdi_nor2`, 2 cells). The model has full logic levels. In silicon, a GDI
AND or OR passes a level one threshold drop short of full swing for some
inputs. That is analog behaviour and is not modelled.

## The shut-down cell (`mag_comp4`): parallel and tree

This cell compares two nibbles, with bit 3 the most significant. It has
only two outputs, `a_gt_b` and `a_lt_b`. Equal nibbles leave both low, so
"equal" means neither flag is high. The cell has three parts.

* **Shut-down.** Let `x_i = a_i ^ b_i`. The enables are:
  * `en3 = 1`
  * `en2 = ~x3`
  * `en1 = ~(x3 | x2)`
  * `en0 = ~(x3 | x2 | x1)`
* **Compare.** Bit i decides when `d_i = en_i & x_i`. Then
  `gt_i = d_i & a_i` and `lt_i = d_i & b_i`.
* **Select.** At most one `d_i` is high. So `a_gt_b` is the OR of the
  `gt_i`, and `a_lt_b` is the OR of the `lt_i`.

An assertion checks that the two outputs are never high together. The
cell has 31 GDI cells, which is 62 transistors.

## The cascade cell (`mag_comp4_cascade`): serial

This cell carries a `cmp_result_t {gt, eq, lt}` cascade input `cin` and
output `cout`. It is a chain of four one-bit stages (`mag_cmp_bit_stage`).
Each stage computes its own result:

* `gt = a & ~b`
* `lt = ~a & b`
* `eq = ~(gt | lt)`

It then applies these rules:

```
cout.eq = cin.eq & eq
cout.gt = (cin.gt & eq) | gt
cout.lt = (cin.lt & eq) | lt
```

A stage keeps the incoming result while its own bits are equal, and
replaces it when they differ. **The cascade must therefore flow from less
significant to more significant.** `cin` enters the bit-0 stage, and the
bit-3 stage drives `cout`. The cell has 44 GDI cells.

## The three 64-bit architectures

All three take `a` and `b` of `WIDTH` bits (default 64, bit 63 most
significant) and return `res` as a `cmp_result_t`.

**`mag_comp64_serial`** chains `WIDTH/4` cascade cells. Cell 0 is the least
significant and is fed `CASCADE_INIT`, which means A>B=0, A=B=1, A<B=0.
The result is the `cout` of the top cell. The worst case ripples through
all 64 bit stages. `WIDTH` must be a multiple of 4. Size: 704 GDI cells.

**`mag_comp64_parallel`** feeds all nibbles at once to `WIDTH/4`
shut-down cells. The combining gates repeat the shut-down idea, one level
up:

* nibble k counts as equal when `~(gt_k | lt_k)`;
* nibble k is enabled when every nibble above it is equal;
* A>B is the OR of `en_k & gt_k`, and A<B is the OR of `en_k & lt_k`;
* A=B is `~(A>B | A<B)`.

Each enable has its own balanced AND tree (`gdi_and_tree`), and the two
final ORs are balanced trees (`gdi_or_tree`). All nibbles therefore
resolve at once, about log2(WIDTH/4) gate levels after the cells. The
price is more gates than a ripple chain would need. `WIDTH` must be a
multiple of 4 and at least 8. Size: 693 GDI cells.

**`mag_comp64_tree`** is the subtle one. Stage 0 has `WIDTH/4` cells on
the operand nibbles. Each cell of the next stage takes four neighbouring
results:

* their four `a_gt_b` bits form its A nibble;
* their four `a_lt_b` bits form its B nibble;
* the most significant child goes in bit 3.

A child never raises both flags. So the highest bit where this A nibble
and B nibble differ is the highest child that found a difference, and that
child's direction is the answer. A 4-bit magnitude comparison of these two
nibbles therefore gives exactly the comparison of the wider operands. At
64 bits there are 16 + 4 + 1 cells, and A=B is `~(A>B | A<B)` after the
last cell. `WIDTH` must be a power of 4 (4, 16, 64, 256, ...). Each stage
keeps its outputs in its own vectors (`g_stage[l].gt/lt`). Size: 653 GDI
cells.

**`mag_comp64_top`** drives all three architectures with the same operands
and brings out `res_serial`, `res_parallel` and `res_tree`. `WIDTH` must be
a power of 4 because the tree requires it, and at least 16 because the
parallel version requires at least 8.

## What follows the source and what is this design's choice

Taken from the source architecture:
* the GDI primitive and its four tie-offs;
* the three-part 4-bit cell with MSB-first shut-down, built from XOR, AND
  and NOR gates;
* the per-bit AND/OR cascade of the serial cell and its initial cascade
  values;
* sixteen cells for serial and parallel, and the 16-4-1 cell tree.

Chosen here:
* the exact gate netlists of both 4-bit cells (the enable equations, and
  AND gating in place of the pass-transistor switches);
* the GDI forms of XOR and NOR;
* the bit order of the cascade chain;
* the combining gates of the parallel version (the source says only that
  "gates" finish the result);
* feeding gt as A and lt as B in the tree;
* deriving equality from the other two flags;
* putting all three architectures side by side in the top, rather than
  choosing one.

Gate counts differ from the published transistor counts (3328 serial, 2172
parallel, 1730 tree, in 180 nm). Those counts describe different
transistor-level netlists. Here, at 2 transistors per GDI cell, the counts
are 1408 (serial), 1386 (parallel) and 1306 (tree). The ranking is the
same, tree smallest and serial largest, but the gaps are much smaller.
Delay and power figures are analog results and nothing in this RTL models
them.

## Files

| file | contents |
|------|----------|
| `rtl/mag_comp_pkg.sv` | `cmp_result_t`, `CASCADE_INIT`, `tree_levels()` |
| `rtl/gdi_cell.sv`, `gdi_inv`, `gdi_and2`, `gdi_or2`, `gdi_xor2`, `gdi_nor2` | GDI primitive and gates |
| `rtl/gdi_and_tree.sv`, `rtl/gdi_or_tree.sv` | N-input balanced AND/OR trees of GDI gates |
| `rtl/mag_comp4.sv` | shut-down 4-bit cell |
| `rtl/mag_cmp_bit_stage.sv`, `rtl/mag_comp4_cascade.sv` | serial cascade cell |
| `rtl/mag_comp64_serial.sv`, `_parallel.sv`, `_tree.sv` | the three architectures |
| `rtl/mag_comp64_top.sv` | all three side by side |
| `tb/tb_cmp_pkg.sv` | operand generator and reference model for the 64-bit tests |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_pulse_workload` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

* The primitive and both 4-bit cells are tested exhaustively. The cascade
  cell is tested with each of its three legal cascade inputs.
* Random 64-bit operands almost always differ in the top bits. The 64-bit
  tests therefore build operand pairs that first differ at a chosen bit,
  for every bit from 0 to 63, in both directions. They add equal pairs and
  fully random pairs.
* `tb_mag_comp64_top` runs at the default parameters. It checks all three
  architectures on every vector and requires each flag to be one-hot. It
  also fails if some mechanism was never exercised: a decision at each of
  the 64 bit positions, a decision in each of the tree's four
  second-stage groups, and each of the three outcomes.
* `tb_pulse_workload` replays the pulse-train stimuli used to
  characterise the three architectures. Every bit is a 5 ns pulse with a
  10 ns period, and one MSB differs: B[63] with a 15 ns period, A[63]
  inverted, or A[63] inverted with a 15 ns period. Each profile is sampled
  every 1 ns for 100 ns, and all three architectures are checked at each
  sample.
* `tb_width_variants` instantiates the top at `WIDTH` = 16 and 256
  (two-stage and four-stage trees). It applies first-difference pairs at
  every bit position, plus equal pairs.

To run a test with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mag_comp_pkg.sv tb/tb_cmp_pkg.sv tb/tb_mag_comp64_top.sv \
    --top-module tb_mag_comp64_top
./obj_dir/Vtb_mag_comp64_top
```

Swap in another `tb/tb_<module>.sv` and top-module name to run the other
tests. `tb_gdi_cell`, `tb_mag_comp4`, `tb_mag_comp4_cascade` and
`tb_width_variants` do not need `tb_cmp_pkg.sv`, but passing it does no harm. Each test runs in well under a second.
