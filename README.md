# 64-bit ALU on a modified square-root carry-select adder

Long adds in an ALU are slow because the carry has to ripple through every bit.
A carry-select adder splits the word into groups. Each group works out its sum
for carry-in 0 and for carry-in 1 in parallel, and the real carry from the group
below only has to pick one of the two. A *square-root* carry-select adder sizes
the groups so that each one finishes computing just as its select carry arrives.
That means small groups at the bottom and larger ones towards the top.

The *modified* version removes the second (carry-in 1) adder from each group.
The carry-in-1 result is simply the carry-in-0 result plus one. A **binary to
excess-1 converter (BEC)** computes that +1 with one inverter plus one AND and
one XOR per bit, which is cheaper than a second ripple adder.

The ALU on top of this adder uses the adder for every operation, logic ones
included:

* a small operand stage feeds the adder with `X` and `Y` built from `A`, `B` and
  the 3-bit select `P`;
* for logic operations every carry in the adder is forced to zero, so the adder
  outputs `X ^ Y`;
* the operand stage chooses `X` and `Y` so that `X ^ Y` is the wanted logic
  function.

## Operations

`P[2]` selects arithmetic (0) or logic (1). In arithmetic mode `Cin` also takes
part. `msc_pkg::alu_sel_e` names the codes.

| P   | Cin = 0                      | Cin = 1                  | X, Y fed to the adder  |
|-----|------------------------------|--------------------------|------------------------|
| 000 | transfer `A`                 | increment `A+1`          | `A`, `0`               |
| 001 | add `A+B`                    | add with carry `A+B+1`   | `A`, `B`               |
| 010 | subtract with borrow `A-B-1` | subtract `A-B`           | `A`, `~B`              |
| 011 | decrement `A-1`              | transfer `A`             | `A`, all ones          |
| 100 | `A \| B`                     | same                     | `A\|B`, `0`            |
| 101 | `A ^ B`                      | same                     | `A`, `B`               |
| 110 | `A & B`                      | same                     | `A\|~B`, `~B`          |
| 111 | `~A`                         | same                     | `A`, all ones          |

That gives seven arithmetic operations (transfer appears twice) and four logic
ones. In logic mode `Cin` is ignored and `Cout` is 0. For subtraction `Cout` is
the inverted borrow: it is 1 when `A >= B`.

The *list* of operations and the use of `P[2]` to kill the carries come from the
original design. It gives no code table, so the assignment above is this
design's choice. It is the textbook one for an ALU whose logic functions are
derived from its arithmetic circuit.

## How the carry kill works

`carry_en = ~P[2]` is ANDed into three places:

1. the external carry into group 0;
2. the carry between each pair of full adders inside every ripple adder
   (`rca`); in the lookahead adder (`cla`) it gates the generate terms instead;
3. the select input of every group multiplexer.

With `P[2] = 1` each sum bit therefore reduces to `X ^ Y` and `Cout` to 0.
With `P[2] = 0` the adder is an ordinary adder.

## Adder groups

The default 64-bit partition, least significant group first:

| group | bits    | size | carry-in-0 adder | BEC    | mux   |
|-------|---------|------|------------------|--------|-------|
| 0     | [1:0]   | 2    | RCA with `Cin`   | –      | –     |
| 1     | [3:2]   | 2    | 2-bit            | 3-bit  | 6:3   |
| 2     | [6:4]   | 3    | 3-bit            | 4-bit  | 8:4   |
| 3     | [10:7]  | 4    | 4-bit            | 5-bit  | 10:5  |
| 4     | [15:11] | 5    | 5-bit            | 6-bit  | 12:6  |
| 5     | [20:16] | 5    | 5-bit            | 6-bit  | 12:6  |
| 6     | [30:21] | 10   | 10-bit           | 11-bit | 22:11 |
| 7     | [47:31] | 17   | 17-bit           | 18-bit | 36:18 |
| 8     | [63:48] | 16   | 16-bit           | 17-bit | 34:17 |

Group 0 is a plain ripple-carry adder that takes the external carry. In every
other group (`csla_group`):

* the carry-in-0 adder produces `{c0, s0}`;
* the BEC turns `{c0, s0}` into `{c0, s0} + 1`. The BEC is one bit wider than
  the group so that it also yields the carry-in-1 carry out;
* the mux picks one of the two results, using the gated carry out of the group
  below as its select.

The BEC is `q[0] = ~r[0]` and `q[i] = r[i] ^ (r[i-1] & … & r[0])`, with the AND
built as a chain.

Departures from the original partition and sizes:

* **Group 7.** The original block diagram labels group 7 with a 17-bit BEC and
  a 34:17 mux, although the group spans 17 bits. This design follows the rule
  "BEC = group size + 1" and uses 18 bits.
* **Widest ripple adder.** The original prose says the ripple adders go up to
  11 bits, but its bit ranges need 17. The bit ranges are followed.

The 8-bit configuration (`msc_pkg::MSC8_GSIZE`) uses groups [1:0], [3:2] and
[7:4]. Any partition can be passed through `NGROUPS`/`GSIZE`. Elaboration stops
with an error if the group sizes do not add up to `WIDTH`. No partitions are
provided for 16 or 32 bits.

`USE_CLA = 1` replaces the carry-in-0 ripple adders of groups 1 to 8 with
carry-lookahead adders. This is the higher-speed variant. `cla` is a flat,
single-level lookahead over the whole group: each carry is a sum of products of
the generate and propagate terms and `cin`. Group 0 keeps its ripple adder. The
default is the ripple version, which is the area-efficient design.

## Timing

The datapath from `a`, `b`, `cin`, `p` to the adder output is combinational.
`msc_alu` registers `f` and `cout` on the rising edge of `clk`, so a result is
visible one clock after its inputs. The register has no reset: it is loaded on
every cycle. The output register matches the original's 64-register ALU
implementation with a clock input, but where that register sits is this
design's choice. All lower-level modules are purely combinational.

## Modules

| file | role |
|------|------|
| `rtl/msc_pkg.sv` | select-code enum, 64- and 8-bit group partitions |
| `rtl/msc_alu.sv` | top: operand logic, adder, output register |
| `rtl/alu_operand_logic.sv` | builds `X`, `Y` from `A`, `B`, `P` |
| `rtl/msc_adder.sv` | modified square-root carry-select adder with carry kill |
| `rtl/csla_group.sv` | carry-in-0 adder + BEC + mux |
| `rtl/bec.sv` | binary to excess-1 converter |
| `rtl/csla_mux.sv` | 2n:n group multiplexer |
| `rtl/rca.sv`, `rtl/full_adder.sv` | gated ripple-carry adder |
| `rtl/cla.sv` | gated carry-lookahead adder (variant) |

Top ports: `clk`, `a[63:0]`, `b[63:0]`, `cin`, `p[2:0]` (`alu_sel_e`),
`f[63:0]`, `cout`.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/msc_pkg.sv tb/alu_ref_pkg.sv tb/tb_msc_alu.sv --top-module tb_msc_alu
./obj_dir/Vtb_msc_alu
```

The other testbenches (`tb_<module>.sv`) run the same way.

* **`tb_msc_alu`** runs the 64-bit ALU at its default parameters. It covers:
  * the operand pair 55/45 (add 100, subtract 10, AND 37, OR 63);
  * every code with both carry values on edge-case operands;
  * increment and decrement carry chains to every bit;
  * 4000 random operations.

  It checks the one-clock latency: the output must still show the previous
  result just before the edge. It also counts each of the eleven operations,
  carry out, a BEC result selected in each of the eight select groups, and logic
  operations whose carries were killed. Any of these that never happens counts
  as a failure.
* **`tb_msc_alu_variants`** runs two other configurations:
  * the 8-bit ALU, exhaustively over all `A`, `B`, `Cin` and `P`;
  * the 64-bit lookahead variant, on random operands.
* **`tb_msc_adder`** checks:
  * the 8-bit adder exhaustively;
  * the 64-bit ripple and lookahead adders on random operands, on directed
    carry chains and with the carry kill;
  * the sequence A = 0…9, B = 555, 553, 552, 568, 569, 571, 570, 574, 575, 573,
    with sums 555, 554, 554, 572, 573, 576, 576, 582, 584, 583.
* **The unit testbenches** cover `full_adder`, `rca`, `cla`, `bec`, `csla_mux`,
  `csla_group` and `alu_operand_logic`, exhaustively where the input space is
  small.

Expected values come from plain integer arithmetic (`tb/alu_ref_pkg.sv` for the
ALU), not from the operand equations. All testbenches pass. Each one was also
shown to fail against a deliberately broken copy of its module.

## What is not here

* **The regular square-root carry-select adder** (two ripple adders per group).
  It is the baseline the modified adder is compared against and is not part of
  this design.
* **A multiplier and other operations.** The original 64-bit ALU simulation
  also shows a product (55 × 45 = 2475) and a few more results. They are
  selected by an operation coding that does not match the operation list above,
  and several of them cannot be identified, so they are not implemented.
* **Gate counts and timing.** The area and delay figures quoted for the original
  FPGA implementation are not reproduced; the RTL is written at the level of
  full adders, BECs and multiplexers, and the final gate structure is left to
  synthesis.
