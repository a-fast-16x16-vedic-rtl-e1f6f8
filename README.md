# 16x16 Vedic multiplier with carry select adders

A combinational unsigned multiplier, 16 x 16 -> 32 bits. It is built by the
"vertically and crosswise" rule (Urdhva Tiryakbhyam) of Vedic arithmetic, and it
adds up its partial products with carry select adders.

The rule makes a wide multiplication into four half-width multiplications and
a few additions. It applies again to each half-width multiplication, down to
a 2 x 2 cell of four AND gates and two half adders. All partial products are
formed at the same time, so the delay is set by the adders. That is why those
adders are carry select adders rather than ripple carry adders.

```
vedic_16x16                          a[15:0], b[15:0] -> c[31:0]
 ├─ 4 x vedic_8x8
 │   ├─ 4 x vedic_4x4
 │   │   ├─ 4 x vedic_2x2            AND gates + 2 half adders
 │   │   └─ 3 x carry_select_adder   4, 6, 6 bits
 │   └─ 3 x carry_select_adder       8, 12, 12 bits
 └─ 3 x carry_select_adder           16, 24, 24 bits
        └─ csa_block (per block)
            └─ 2 x ripple_carry_adder
                └─ full_adder
```

The multiplier has no clock, no reset and no register. The product is valid
one combinational delay after the operands change.

## The 2x2 cell (`vedic_2x2`)

For `A = a1 a0` and `B = b1 b0`:

| bit | how it is formed |
|-----|------------------|
| q0  | vertical product `a0·b0` |
| q1  | sum of the crosswise products `a1·b0 + a0·b1` (half adder) |
| q2  | vertical product `a1·b1` plus the carry of q1 (second half adder), sum |
| q3  | carry of that second half adder |

## One level of the tree (`vedic_4x4`, `vedic_8x8`, `vedic_16x16`)

This part needs the most care. All three levels have the same structure. For
an N-bit level, let H = N/2. Split the operands into halves `A = AH:AL` and
`B = BH:BL`. Four H x H multipliers produce:

```
pp_ll = AL*BL    pp_hl = AH*BL    pp_lh = AL*BH    pp_hh = AH*BH     (each N bits)
A*B   = pp_ll + (pp_hl + pp_lh) << H + pp_hh << N
```

The low H bits of `pp_ll` are already final. Three adders sum everything
above them:

| adder   | width | adds                               |
|---------|-------|------------------------------------|
| `u_add_a` | N     | `pp_ll >> H` + `pp_lh`             |
| `u_add_b` | 3N/2  | `pp_hl` + `pp_hh << H`             |
| `u_add_c` | 3N/2  | `sum_a` + `sum_b`                  |

The product is `c = {sum_c, pp_ll[H-1:0]}`. Adders `u_add_a` and `u_add_b` are
independent, so the critical path is two adders deep at each level.

None of the three sums can carry out of its adder:

- `sum_a ≤ (2^H − 1) + (2^H − 1)^2 = 2^H(2^H − 1) < 2^N`
- `sum_b ≤ (2^H − 1)^2 (2^H + 1) < 2^(3H)`
- `sum_c = (A*B) >> H < 2^(3H)`

Every carry-in is therefore tied to 0 and every carry-out is unused. An
immediate assertion in each level module checks in simulation that the
carry-outs stay 0.

At 16x16 the widths are 16, 24 and 24 bits. At 8x8 they are 8, 12 and 12
bits, and at 4x4 they are 4, 6 and 6 bits.

## Carry select adders (`carry_select_adder`, `csa_block`)

A `csa_block` adds its two operand slices twice, in parallel, with two ripple
carry adders. One adder assumes a carry-in of 0 and the other a carry-in of 1.
When the real carry-in arrives, multiplexers choose the matching sum and
carry-out. The carry therefore crosses each block through one multiplexer
instead of through the block's full adders.

`carry_select_adder #(WIDTH, BLOCK)` chains blocks of `BLOCK` bits, least
significant first. If `BLOCK` does not divide `WIDTH`, the last block is
shorter. `BLOCK` defaults to `floor(sqrt(WIDTH))` (`vedic_pkg::csa_block_size`).
That uniform block size balances the ripple inside a block against the chain of
multiplexers. In this multiplier the blocks are:

| adder width | 4 | 6 | 8 | 12 | 16 | 24 |
|-------------|---|---|---|----|----|----|
| block size  | 2 | 2 | 2 | 3  | 4  | 4  |

The least significant block is a carry select block too, although its
carry-in is a constant 0 and a plain ripple adder would do. Synthesis removes
the unused half.

The block-carry vector `carry` is a named signal in `carry_select_adder`.
`carry[k]` is the carry into block k, so a testbench can see which blocks chose
their carry-in-1 result.

## Interfaces

| module | parameters | ports |
|--------|-----------|-------|
| `vedic_16x16` (top) | none | `a[15:0]`, `b[15:0]` in; `c[31:0]` out |
| `vedic_8x8` | none | `a[7:0]`, `b[7:0]` in; `c[15:0]` out |
| `vedic_4x4` | none | `a[3:0]`, `b[3:0]` in; `c[7:0]` out |
| `vedic_2x2` | none | `a[1:0]`, `b[1:0]` in; `q[3:0]` out |
| `carry_select_adder` | `WIDTH` = 16, `BLOCK` = floor(sqrt(WIDTH)) | `a`, `b`, `cin` in; `sum`, `cout` out |
| `csa_block` | `WIDTH` = 4 | `a`, `b`, `cin` in; `sum`, `cout` out |
| `ripple_carry_adder` | `WIDTH` = 4 | `a`, `b`, `cin` in; `sum`, `cout` out |
| `full_adder` | none | `a`, `b`, `cin` in; `sum`, `cout` out |

`vedic_pkg` holds the block-size function. Compile it before the modules that
import it.

## Where this RTL departs from, or fills in, the reference design

The reference design describes the composition and the adder type. It does
not give every net. These points are this implementation's own reading or
choice:

- **No clock.** The reference shows its stand-alone 2x2 and 4x4 cells with a
  clock input and an output register. Its 16x16 top has only `a`, `b` and `c`,
  and it calls the multiplier independent of the processor clock. Every level
  here is combinational, and the registered stand-alone variants are not
  provided. To pipeline the multiplier, register `c`, or register the level
  outputs.
- **Adder assignment.** The 16x16 level has one 16-bit and two 24-bit adders,
  as in the reference. Which partial product goes into which adder follows the
  arithmetic above. The reference does not show those nets in readable detail.
- **Same adder widths at every level.** The N, 3N/2, 3N/2 pattern of the 16x16
  level is used at every level. The reference's 4x4 drawing shows adders of 4,
  4 and 6 bits. This design uses 4, 6 and 6 bits there.
- **Adder type.** The block drawings of the 8x8 and 16x16 levels label the
  adders "carry save". The text and the title say carry select. Carry select
  adders are used.
- **Unsigned only.** The reference compares the design with an unsigned
  multiplier. Signed operands are not supported.
- **Delay and area.** On a Spartan-3 FPGA the reference reports 88 ns and 1240
  slices for this design. That figure is a property of that implementation and
  is not reproduced here. A generic yosys synthesis of `vedic_16x16` gives about
  2300 gate-level cells: AND, OR, XOR and 2:1 MUX. These numbers are not
  comparable.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_vedic_2x2` | all 16 operand pairs |
| `tb_vedic_4x4` | all 256 pairs, plus reference waveform values (5·12 = 60, 12·9 = 108, 7·10 = 70, ...) |
| `tb_vedic_8x8` | all 65 536 pairs, plus reference waveform values (2·145 = 290, 4·234 = 936, ...) |
| `tb_vedic_16x16` | reference waveform values (24359·51263 = 1248715417, 51263·65535 = 3359520705, ...), all combinations of 10 corner operands and 200 000 random pairs. For each top-level adder it counts the vectors on which a block selected its carry-in-1 result, and fails if that never happens. |
| `tb_carry_select_adder` | widths 4, 6, 8, 12, 16 and 24 with the default blocks, plus 10 bits with 3-bit blocks (short last block). Full-propagate cases and 3000 random additions. |
| `tb_csa_block` | all 512 inputs of a 4-bit block. Also requires a carry to propagate through the carry-in-1 path. |
| `tb_ripple_carry_adder` | all 512 inputs at 4 bits and 2000 random inputs at 24 bits |

Every testbench compares against arithmetic computed in the testbench itself.
Each also has a time-out that reports a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vedic_pkg.sv tb/tb_vedic_16x16.sv --top-module tb_vedic_16x16 -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl`, because each
module lives in a file of its own name. Replace the testbench name to run
another one. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/<module>.sv`.

## Changing it

- **Block size.** Set `BLOCK` on a `carry_select_adder` instance to change
  one adder. Edit `csa_block_size` to change them all.
- **Ripple carry instead of carry select.** To compare against the same tree
  with ripple carry adders, replace the `carry_select_adder` instances by
  `ripple_carry_adder` with the same `WIDTH`. Both modules have the same ports.
- **Wider multipliers.** For a 32x32 multiplier, copy `vedic_16x16` and set
  `H = 16`, four `vedic_16x16` instances, and adders of 32, 48 and 48 bits.
