# 16-bit arithmetic unit on a Kogge-Stone adder

This is a 16-bit combinational arithmetic unit. It adds, subtracts, increments,
decrements and moves data using one adder. Its speed comes from that adder, a
radix-2 Kogge-Stone parallel prefix adder. The adder computes every carry in
log2(16) = 4 levels of two-input cells, and no node drives more than two cells
of the next level. The operations differ only in what reaches the adder's second
input. A bank of 4-to-1 multiplexers feeds it B, ~B, all zeros or all ones, and
the carry-in input supplies the remaining +1.

```
            A[15:0] ─────────────────────────────► P ┐
                                                      │  ks_adder      ├─► D[15:0]
  B[15:0] ─┬──────────► I0 ┐                          │  D = P + Q + Cin
           └──[NOT]───► I1 │ operand_mux  ─────► Q ──┤                ├─► Cout
   0 ──────┬──────────► I2 │ (16 x mux4x1)            │
           └──[NOT]───► I3 ┘                          │
   S1,S0 ──────────────────┘            Cin ──────────┘
```

## Function table

Every operation is D = A + Q + Cin, where Q is picked by {S1,S0}:

| S1 S0 Cin | Q  | D            | operation                      | Cout            |
|-----------|----|--------------|--------------------------------|-----------------|
| 0 0 0     | B  | A + B        | add                            | carry           |
| 0 0 1     | B  | A + B + 1    | add with carry                 | carry           |
| 0 1 0     | ~B | A − B − 1    | subtract with borrow           | 1 when A > B    |
| 0 1 1     | ~B | A − B        | subtract                       | 1 when A ≥ B    |
| 1 0 0     | 0  | A            | transfer                       | 0               |
| 1 0 1     | 0  | A + 1        | increment                      | 1 when A = FFFF |
| 1 1 0     | 1s | A − 1        | decrement                      | 1 when A ≠ 0    |
| 1 1 1     | 1s | A            | transfer                       | 1               |

For subtraction, Cout is the inverted borrow. The unit has no overflow flag.

Register-level operations on three registers R1, R2 and R3 map onto these rows.
The register file is not part of this RTL, so whoever drives the unit must do
that routing:

| operation           | A  | B  | S1 S0 Cin |
|---------------------|----|----|-----------|
| R3 ← R1 + R2        | R1 | R2 | 0 0 0     |
| R3 ← R1 − R2        | R1 | R2 | 0 1 1     |
| R2 ← ~R2            | 0  | R2 | 0 1 0     |
| R2 ← ~R2 + 1        | 0  | R2 | 0 1 1     |
| R2 ← R1 + ~R2 + 1   | R1 | R2 | 0 1 1     |
| R1 ← R1 + 1         | R1 | –  | 1 0 1     |
| R1 ← R1 − 1         | R1 | –  | 1 1 0     |
| R1 ← R2             | R2 | –  | 1 0 0     |

Both complement operations and the move need a particular value on A: zero, or
R2. The unit only sees its two operand ports, so this routing is an assumption
about the surrounding datapath.

## The prefix adder (`ks_adder`)

The adder has three layers.

1. **Bit generate and propagate** (`pg_cell`, one per bit):
   g_i = a_i & b_i and p_i = a_i ^ b_i.
2. **Prefix network.** A cell combines the group terms of bits i..k with those
   of the adjacent lower bits k−1..j:

       G_i:j = G_i:k | P_i:k & G_k-1:j        P_i:j = P_i:k & P_k-1:j

   At level l the span is d = 2^(l−1). Every bit i ≥ d combines with bit i − d,
   and bits below d pass straight through. If the lower group already reaches
   bit 0 (d ≤ i < 2d), only G_i:0 is needed afterwards. That cell is then a
   `grey_cell`, which forms only the generate. Every other cell is a
   `black_cell`, which forms both terms. At 16 bits the tree has these cells:

   | level | span | grey cells (→ G_i:0)   | black cells        |
   |-------|------|------------------------|--------------------|
   | 1     | 1    | 1:0                    | 15:14 … 2:1 (14)   |
   | 2     | 2    | 3:0, 2:0               | 15:12 … 4:1 (12)   |
   | 3     | 4    | 7:0 … 4:0              | 15:8 … 8:1 (8)     |
   | 4     | 8    | 15:0 … 8:0             | –                  |

   That makes 34 black and 15 grey cells. `au_pkg::ks_black_cells` and
   `ks_grey_cells` compute these counts for any width from the same rule that
   `ks_adder`'s generate loops use. The adder testbench checks that they give 34
   and 15 at 16 bits. It does not count the instances in the generated
   netlist.
3. **Sums** (`sum_cell`, one per bit): S_i = p_i ^ G_i−1:0. Cout = G_15:0.

**Carry in.** The published prefix tree has no carry-in input. Here one extra
grey cell ahead of the tree merges Cin into bit 0:
G_0:0 = g_0 | p_0 & Cin. After that, every G_i:0, and Cout too, already
includes the carry in, and S_0 = p_0 ^ Cin. This adds a 50th cell and one cell
delay on bit 0's path only. It is this design's choice.

The black and grey cells write their generate as a NAND of complemented terms,
~(~G_i:k & ~(P_i:k & G_k−1:j)). This mirrors a two-gate-level CMOS cell. It is
logically the AND-OR above.

`WIDTH` defaults to 16. The generate loops work for any power of two ≥ 2, but
only 16 bits has been simulated.

## Operand selector (`operand_mux`, `mux4x1`)

The selector holds one `mux4x1` per bit, and all share S1 and S0. The inputs of
bit i are I0 = B_i, I1 = ~B_i, I2 = a ground-bus bit and I3 = its inverted copy,
a 1. The output is I[{S1,S0}]. `au_pkg::qsel_e` names the four codes.

## Timing and interface

Every module is purely combinational, with no clock, reset or state. The
longest logic path is one bit-level cell, the carry-in merge cell on bit 0,
four prefix levels and one XOR. If the unit goes into a clocked datapath, it
needs registers around it.

`arith_unit` ports: `a[15:0]`, `b[15:0]`, `s1`, `s0`, `cin` in; `d[15:0]`,
`cout` out.

## Files

| file | contents |
|------|----------|
| `rtl/au_pkg.sv` | width, operand-select enum, cell-count functions |
| `rtl/arith_unit.sv` | top: operand selector plus adder |
| `rtl/operand_mux.sv`, `rtl/mux4x1.sv` | operand selector |
| `rtl/ks_adder.sv` | Kogge-Stone adder, built with generate loops |
| `rtl/pg_cell.sv`, `rtl/black_cell.sv`, `rtl/grey_cell.sv`, `rtl/sum_cell.sv` | adder cells |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module with values it computes independently. It
prints `TB_RESULT checks=N failures=M` at the end.

- The cells and `mux4x1` are checked exhaustively.
- `operand_mux`: every select code with corner values and 500 random values of B.
- `ks_adder`: the cell-count functions; corner cases, including a carry rippling
  from every bit position to the top; and 200,000 random operand and carry-in
  triples against integer addition.
- `arith_unit` (default size, end to end):
  - Every function-table row with corner values and 5,000 random operands. The
    expected values come from each row's meaning, such as A − B or A > B, and
    not from A + Q + Cin.
  - A random program of 4,000 register operations against a reference model.
  - It counts carries, borrows, increment wrap-around and decrement wrap-around,
    plus every row and register operation. A case that never occurs counts as
    a failure.

Run one testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/au_pkg.sv tb/arith_unit_tb.sv \
          --top-module arith_unit_tb -o sim && ./obj_dir/sim
```

## What is not modelled

- **Transistor-level behaviour.** The original unit was built as static CMOS
  transistor circuits in a 0.15 µm process. At 1.5 V it had a carry-out delay
  of about 0.3 ns, about 0.045 ns per prefix cell, and 8.4 µW average power.
  This RTL keeps only the logic. The delay and power figures do not carry over,
  and none of the testbenches checks them.
- **Registers.** The unit holds no R1–R3 registers and no write-back. The
  register operations above run only through the testbench model.
