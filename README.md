# 4x4 Vedic multiplier built from two 4x2 blocks

This is a combinational multiplier for two 4-bit unsigned numbers. It gives an
8-bit product. It is based on the *Urdhva-Tiryagbhyam* ("vertically and
crosswise") rule of Vedic arithmetic. In that rule each product bit is a
column of bit products `A[i]·B[j]` with `i + j` equal to the column number,
plus the carry from the column before.

A full 4x4 Urdhva-Tiryagbhyam array has seven columns, and some of them hold
four bit products. This design avoids those wide columns. It splits the
multiplier `B` into two 2-bit halves and multiplies `A` by each half with a
small **4x2 Vedic multiplier**. A short ripple row of adders then adds the two
6-bit partial results, with one of them shifted two places. Only four cell
types are used: 2-input AND, 2-input OR, half adder and full adder. In the
original work these are full-custom 180 nm transistor cells: a 10-transistor
half adder and a 20-transistor full adder. The published goal was a low
transistor count, 302 transistors for the whole multiplier. The RTL here
keeps the original block structure and cell-level netlist. Each transistor
cell is written as its logic function.

```
            A[3:0]  B[3:2]          A[3:0]  B[1:0]
               |      |                |      |
          +----v------v----+      +----v------v----+
          |  vedic_mul4x2  |      |  vedic_mul4x2  |
          |   hi = A*B[3:2]|      |   lo = A*B[1:0]|
          +-------+--------+      +-------+--------+
                  | hi[5:0]               | lo[5:0]
                  |                       +------------- lo[1:0] -> O1 O0
                  v                       v
    O7 <- OR <- HA <- FA <- FA <- FA <- HA      (carry ripples right to left)
                 O6    O5    O4    O3    O2
```

## The 4x2 block (`vedic_mul4x2`)

The multiplier has only two bits here. Think of it as a 4-bit number whose
top two bits are always zero. Then every crosswise product that involves
those bits is zero and needs no hardware. What remains is eight AND gates
and a four-cell carry chain:

| output | column sum                    | cell        | carry out |
|--------|-------------------------------|-------------|-----------|
| Y0     | A0·B0                         | (AND only)  | –         |
| Y1     | A1·B0 + A0·B1                 | half adder  | C0        |
| Y2     | A2·B0 + A1·B1 + C0            | full adder  | C1        |
| Y3     | A3·B0 + A2·B1 + C1            | full adder  | C2        |
| Y4     | A3·B1 + C2                    | half adder  | C3        |
| Y5     | C3                            | (wire)      | –         |

`y = a * b`. The largest result is 15·3 = 45, so six bits are enough.

## Combining the halves (`vedic_mul4x4`)

`A·B = lo + (hi << 2)`, where `lo = A·B[1:0]` and `hi = A·B[3:2]`. Bits O0
and O1 come from `lo` alone. From O2 up, each column adds `lo[k]` and
`hi[k-2]` plus the carry from the column before:

| output | inputs                 | cell       |
|--------|------------------------|------------|
| O2     | lo[2], hi[0]           | half adder |
| O3     | lo[3], hi[1], carry    | full adder |
| O4     | lo[4], hi[2], carry    | full adder |
| O5     | lo[5], hi[3], carry    | full adder |
| O6     | hi[4], carry           | half adder |
| O7     | hi[5], carry           | OR gate    |

**Why an OR gate is enough for O7.** Column 7 could need a half adder. But
the product is at most 15·15 = 225, which is below 256. So `hi[5]` and the
carry out of O6 are never both 1, and OR gives the same bit as the sum would.
A deferred `assert final` in `vedic_mul4x4` states this invariant.

The original design gives the block structure: two 4x2 blocks on `B[1:0]` and
`B[3:2]`, the half-full-full-full-half row, and the OR for O7. The exact
bit-to-adder connections are derived here from the shifted sum, because no
other wiring produces the product.

## The cells

| module       | function                            | original cell                 |
|--------------|-------------------------------------|-------------------------------|
| `and_gate`   | `y = a & b`                         | static CMOS AND               |
| `or_gate`    | `y = a \| b`                        | static CMOS OR                |
| `half_adder` | `sum = a^b`, `carry = a&b`          | 10-transistor hybrid logic    |
| `full_adder` | `sum = a^b^cin`, `cout = maj(a,b,cin)` | 20-transistor custom cell  |

These are deliberately separate modules, not expressions inlined into the
multipliers. This keeps the netlist cell-for-cell the same as the original
schematic: 16 AND, 2+2 half adders and 2+2 full adders inside the two 4x2
blocks, then 2 half adders, 3 full adders and 1 OR in the row. A
transistor-level or standard-cell flow can therefore swap in custom cells
under the same names.

## Interface and timing

`vedic_mul4x4` (top):

| port | dir | width | meaning          |
|------|-----|-------|------------------|
| `a`  | in  | 4     | multiplicand A   |
| `b`  | in  | 4     | multiplier B     |
| `o`  | out | 8     | product A·B      |

The design has no clock, reset, handshake or state. The output follows the
inputs after the combinational delay. The critical path is about 4 carry
cells in a 4x2 block, then 5 cells in the row. The original 180 nm
transistor implementation reports a 2.931 ns delay and was exercised with
inputs toggling at 500 MHz. Those figures belong to that cell library, and
the RTL makes no timing claim. If the multiplier is used in a clocked
design, register its inputs and outputs outside it.

Operands and product are **unsigned**. There are no parameters: the
architecture is specific to 4x4. Scaling it up (for example 8x8 from four
4x4 blocks) is not part of this design.

Shared widths and types (`operand_t`, `half_t`, `partial_t`, `product_t`)
are in `vedic_pkg`.

## Files

- `rtl/vedic_pkg.sv`: widths and types
- `rtl/and_gate.sv`, `rtl/or_gate.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv`: cells
- `rtl/vedic_mul4x2.sv`: 4x2 Vedic block
- `rtl/vedic_mul4x4.sv`: top, 4x4 multiplier
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and then stops. A
watchdog ends the run with a failure if it hangs.

- Cells: exhaustive truth tables. The expected values come from integer
  addition or a literal truth table.
- `tb_vedic_mul4x2`: all 64 operand pairs against `a*b`. It also checks
  that each carry C0..C3 of the chain occurs at least once.
- `tb_vedic_mul4x4`: all 256 operand pairs plus 256 random pairs against
  `a*b`. From a reference model of the row, it counts how often each of the
  five row cells carries, and how often O7 is set by `hi[5]` or by the final
  carry. It fails if any of these never happens. The top has no parameters,
  so this is also the full-size end-to-end test.

Each testbench was also run against a copy of its module with one deliberate
bug (for example the O7 OR losing its carry input, or a half adder fed the
wrong carry), and each reported failures.

Running with Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/vedic_pkg.sv tb/tb_vedic_mul4x4.sv --top-module tb_vedic_mul4x4
./obj_dir/Vtb_vedic_mul4x4
```

Use the other `tb_*` files the same way. Lint with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/vedic_pkg.sv rtl/vedic_mul4x4.sv`.

## How far this follows the original design

- **Same as the original:** the split of B into B3 B2 and B1 B0, the 4x2
  column equations, the eight AND gates, the HA-FA-FA-HA chain in the 4x2
  block, the HA-FA-FA-FA-HA row and the OR gate for O7 in the 4x4 block,
  and the port names (A, B, O0..O7, Y0..Y5, Sum, Carry).
- **Chosen here:** the exact bit-to-cell wiring of the 4x4 row (fixed by
  the arithmetic), unsigned operands, purely combinational behaviour, the
  type names, and the O7 exclusivity assertion.
- **Not modelled:** transistor-level detail of the 10T half adder, 20T full
  adder and CMOS gates, and with it the area, power and delay figures.
  Those come from the circuit implementation, not from the logic.
