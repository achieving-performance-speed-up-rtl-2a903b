# Bit-parallel array multipliers built from FPGA primitives

A bit-parallel multiplier takes a whole W-bit operand pair every clock cycle
and produces the 2W-bit product combinationally. How fast and how small it is
on an FPGA depends less on the textbook architecture than on which parts of
the device carry the logic: general look-up tables, the dedicated carry chain,
or a DSP slice. This RTL builds three classic array multipliers and, for each,
five "primitive styles", each of which describes the circuit as explicit
instances of small primitive cells (LUTs, carry multiplexers, carry XORs,
flip-flops, an arithmetic slice) rather than leaving the mapping to synthesis
inference. All fifteen variants compute the same products and can be compared
side by side.

The primitive cells here are portable, synthesizable SystemVerilog models with
the function of the corresponding Xilinx primitives (LUT4_L, LUT6_2, CARRY4,
MULT_AND, MUXCY_L, XORCY, FDSE, and the add/multiply core of a DSP48). They are
named `prim_*` so they do not collide with a vendor library. To target a real
device, replace each `prim_*` module by the vendor primitive; the ports are
chosen so that the mapping is one to one, except `prim_dsp48`, which is a much
reduced slice.

## The three multiplier structures

All three are purely combinational, W x W -> 2W bits, default W = 16.

**Ripple-carry array (`rca_mult`, unsigned).** Partial product row j is
`A AND b_j`, shifted j places. Row 0 is just the AND terms. Each later row is
a W-bit carry-propagate adder (`row_adder`) that adds `A AND b_j` to the W
bits handed down from the row above. Its lowest sum bit is product bit j. Its
carry out and the other W-1 sum bits go to the next row. The last row gives
the top W product bits. Every row ripples its carry all the way across, so the
critical path crosses about 2W cells. That is why the fast-carry styles help
this structure most.

**Carry-save array (`csa_mult`, unsigned).** Row j is W processing cells
(`pc_cell`). Cell i adds `a_i b_j` to two bits of the row above: the sum of
cell i+1 and the carry of cell i. Both have the same weight i+j, so carries
move down and never sideways, and the array has no ripple path. Sum bit 0 of
row j is product bit j. The last row leaves a sum vector and a carry vector.
A W-bit **vector merging adder** (VMA, again a `row_adder`) adds them into the
top half of the product. The VMA is the only carry-propagate part, so it is
the only part that the fast-carry and DSP styles change.

**Baugh-Wooley (`bw_mult`, two's complement).** For signed operands the
product modulo 2^{2W} is the sum of all `a_i b_j`, with two changes:

- the 2(W-1) terms with exactly one sign bit (i = W-1 xor j = W-1) are
  inverted (NAND instead of AND);
- the constants 2^W and 2^{2W-1} are added.

The array is the carry-save array with those cells inverted (`pc_cell` with
`INV=1`). The constant 2^W enters as the otherwise-zero carry into the last
cell of row 1. The constant 2^{2W-1} enters as the otherwise-zero top bit of
the VMA's first operand. The VMA's carry out is dropped.

Indexing, useful when reading the code: in `csa_mult`/`bw_mult`, `sm[j][i]`
has weight i+j and `cy[j][i]` weight i+j+1. In `rca_mult`, `acc[j]` is the
W-bit value row j hands down, with weights j+1 .. j+W.

## The five primitive styles

`mult_pkg::style_e` selects the style per instance:

| index | style        | processing cells (arrays)           | carry-propagate adder (RCA rows, VMA) |
|-------|--------------|-------------------------------------|----------------------------------------|
| 0 | `ST_LUT4_L`  | two 4-input LUTs: sum, carry            | chain of those cells |
| 1 | `ST_LUT6_2`  | one dual-output LUT: sum on O6, carry on O5 | chain of those cells |
| 2 | `ST_CARRY4`  | one dual-output LUT                     | per bit a 4-input LUT giving the propagate `(a&b)^x`; `x` as the generate value; ceil(N/4) `prim_carry4` blocks |
| 3 | `ST_MULTAND` | two 4-input LUTs (this older family has no dual-output LUT) | per bit a propagate LUT, `prim_mult_and` as the generate value, `prim_muxcy_l` carry, `prim_xorcy` sum |
| 4 | `ST_DSP48`   | one dual-output LUT                     | one `prim_dsp48` in add mode per adder, AND gating in plain logic ahead of it |

A processing cell computes `pp = (a & b) ^ INV`, `s = pp ^ y ^ z` and
`c = maj(pp, y, z)`. Its LUT contents are not typed in. The functions in
`mult_pkg` (`cell_sum_init4`, `cell_carry_init4`, `cell_init6`,
`prop_init4`) compute them from these equations at elaboration time. The
LUT address is `{z, y, b, a}`; the dual-output LUT has I5 tied high and I4
unused.

The fast-carry adders rest on one identity. When a bit does not propagate
(`(a&b) ^ x = 0`), `x` and `a&b` are equal, so either can drive the carry
multiplexer's data input. `ST_CARRY4` uses `x`; `ST_MULTAND` uses the MULT_AND
output, which is what that dedicated gate is for.

In the DSP style row 0 of the ripple-carry array also passes through a slice
(adding zero), so a W-bit RCA uses W slices. The carry-save arrays use one
slice, for the VMA. The slice adds operands of up to 35 bits, so the DSP style
needs W <= 35.

## Top level: `mult_suite`

`mult_suite #(W=16)` instantiates all three structures in all five styles on
shared operands `a`, `b`. Each of the fifteen products goes through its own
2W-bit capture register `fdse_reg`, a bank of `prim_fdse` flip-flops. For
W=16 that is 32 flip-flops per multiplier.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `ce`  | in | 1 | clock enable of all product registers |
| `set` | in | 1 | synchronous set: loads all ones, overrides `ce` |
| `a`, `b` | in | W | operands (unsigned for RCA/CSA, two's complement for BW) |
| `p_rca[s]`, `p_csa[s]`, `p_bw[s]` | out | 2W each, s = 0..4 | registered products, index = style |

Timing: operands that are stable before a rising edge with `ce=1` appear on
every output after that edge. A new pair can be applied every cycle
(throughput one product per clock, latency one edge). The multiplier path
from `a`/`b` to the registers is purely combinational, so the maximum clock
rate is set by the slowest structure and style you keep.

## Leaf cells

| module | function |
|--------|----------|
| `prim_lut4_l` | `lo = INIT[{i3,i2,i1,i0}]` |
| `prim_lut6_2` | `o6 = INIT[i]`, `o5 = INIT[{0, i[4:0]}]` |
| `prim_mult_and` | `lo = i0 & i1` |
| `prim_muxcy_l` | `lo = s ? ci : di` |
| `prim_xorcy` | `o = li ^ ci` |
| `prim_carry4` | four `prim_muxcy_l` + four `prim_xorcy` chained from `ci`; `co[k]` of every stage is brought out so a chain can end mid-block |
| `prim_fdse` | D flip-flop; on a rising edge `s` sets to 1, else `ce` loads `d`; power-up value `INIT` |
| `prim_dsp48` | combinational `p`: `C + A:B + cin`, `C - (A:B + cin)`, signed `A*B`, `p_q + A:B + cin` (accumulate), or `C` and/or/xor `A:B`; 48-bit output register `p_q` (load on `ce`, clear on `rst`); `pattern_detect` when `p` matches `PATTERN` outside `MASK` |

## How far this follows the reference design, and where it departs

Taken from the reference design:

- the three structures;
- the primitive each style uses, and which part of each structure the style
  changes: the cells in the LUT styles, the rows of the RCA and only the VMA
  of the carry-save arrays in the fast-carry and DSP styles;
- the FDSE priority (set over enable);
- the one-word-per-cycle operation;
- the 32 registers per 16-bit multiplier;
- the word lengths 4, 8, 16 and 32.

Choices of this design:

- **Unsigned RCA and CSA arrays.** The reference states that all operands are
  two's complement, but its partial-product table for the parallel arrays
  shows plain AND terms. The RCA and CSA arrays follow the table and are
  unsigned. Signed operands are handled by the Baugh-Wooley multiplier.
- **Product register only.** The registers sit on the product; there is no
  input register. This matches a count of 2W registers per multiplier.
- **DSP slices in the carry-save arrays.** The reference's DSP builds of the
  carry-save and Baugh-Wooley arrays are reported to use 16 slices. Here they
  use one, for the VMA, because only the VMA is a carry-propagate adder.
- **Reduced DSP slice.** `prim_dsp48` has add, subtract, multiply,
  accumulate, bitwise logic and pattern detection. It has no shifter, no
  cascade ports and no input pipeline registers. Its single output register
  is the accumulator. The multipliers use only its combinational add path, and
  hold that register in reset.
- **Primitive details.** The carry-init input of the four-bit carry block is
  not modelled. The LUT pin assignment and INIT bit order are the usual
  conventions. The propagate/generate pairing in the fast-carry adders is
  described above.
- **No global clock buffer.** None is instantiated; `clk`, `ce` and `set`
  are plain ports.
- **No inferential baseline.** The plain behavioural (`a * b`) baseline that
  the styles are compared with is not part of this RTL.

What the RTL cannot reproduce: the reference's results are device
measurements (slices, LUTs, maximum clock, offsets, dynamic power, energy per
operation) on specific FPGA families. They depend on mapping the `prim_*`
cells to real primitives and running vendor place and route. Simulation of
this RTL shows only that every variant computes the right products.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that ends by
printing `TB_RESULT checks=N failures=M`. All include `tb/tb_check.svh`, so
run them from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
        tb/tb_mult_suite.sv --top-module tb_mult_suite -Mdir obj
    ./obj/Vtb_mult_suite

- `tb_mult_suite` runs the top at its default size (W=16). It applies 4000
  random and extreme operand pairs back to back and checks all fifteen
  registered products one edge later against reference products, and checks
  that no output moves before that edge (latency exactly one cycle). It also
  checks `ce`-low holds and `set` (including set with `ce` low). It counts
  each of these events and fails if one never happened.
- `tb_mult_wordlengths` checks every structure and style at W=4 and W=8 for
  all operand pairs, and at W=32 for 2016 pairs.
- `tb_rca_mult`, `tb_csa_mult` and `tb_bw_mult` check W=16 (random and
  extreme operands) and W=5 (all operand pairs).
- The leaf-cell testbenches are exhaustive, or random against a reference
  model for the sequential cells and the slice.

To change the word length, set `W` on `mult_suite` (or on a single
multiplier). To keep only one style, instantiate `rca_mult`, `csa_mult` or
`bw_mult` with `.STYLE(mult_pkg::ST_CARRY4)` and so on.
