# 16-bit square-root carry-select adder with excess-1 groups and a carry-selected full adder

A carry-select adder splits the operands into groups and, for every group above the lowest,
computes the group's sum twice: once assuming the carry coming in is 0 and once assuming it is
1. When the real carry arrives, a multiplexer picks the right result, so the carry crosses each
group through one multiplexer instead of rippling through every bit. The price is area: a
conventional carry-select adder has two ripple-carry adders per group.

This design removes the second adder. A group's carry-in-1 result is always exactly one more
than its carry-in-0 result, so it is derived from the carry-in-0 result by a
**binary-to-excess-1 converter (BEC)**, a small "+1" circuit of one inverter, a chain of AND
gates and one XOR per bit. The converter is cheaper than a ripple-carry adder but slower, so
the full adder cell inside the ripple-carry adders is also changed: it computes XOR/XNOR and
AND/OR of its operand bits in parallel and uses the **carry input as the select** of two
multiplexers, which shortens the carry path through each cell.

The RTL is combinational: no clock, no reset, no registers.

## Structure

```
   a[15:11] b[15:11]   a[10:7] b[10:7]    a[6:4] b[6:4]     a[3:2] b[3:2]     a[1:0] b[1:0]
        |                  |                  |                 |                 |
   +---------+        +---------+        +---------+       +---------+       +---------+
   | 5b RCA  |        | 4b RCA  |        | 3b RCA  |       | 2b RCA  |       | 2b RCA  |<- cin
   | cin = 0 |        | cin = 0 |        | cin = 0 |       | cin = 0 |       +---------+
   +---------+        +---------+        +---------+       +---------+         |    |
   | 6b BEC  |        | 5b BEC  |        | 4b BEC  |       | 3b BEC  |         |    c[1]
   +---------+        +---------+        +---------+       +---------+         |    |
   | mux 12:6|<-c[4]- | mux 10:5|<-c[3]- | mux 8:4 |<-c[2]-| mux 6:3 |<--------+----'
   +---------+        +---------+        +---------+       +---------+     sum[1:0]
    |      |             |                  |                 |
   cout  sum[15:11]    sum[10:7]          sum[6:4]          sum[3:2]
```

| Group | Bits  | Ripple-carry adder           | BEC   | Multiplexer |
|-------|-------|------------------------------|-------|-------------|
| 0     | 1:0   | 2 full adders, takes `cin`   | none  | none        |
| 1     | 3:2   | half adder + 1 full adder    | 3-bit | 6:3         |
| 2     | 6:4   | half adder + 2 full adders   | 4-bit | 8:4         |
| 3     | 10:7  | half adder + 3 full adders   | 5-bit | 10:5        |
| 4     | 15:11 | half adder + 4 full adders   | 6-bit | 12:6        |

The widths grow by about one bit per group ("square-root" sizing). A wider group needs longer
to form its local result, but the carry also reaches it later, so both are ready at about the
same time.

## Module hierarchy

| File | Contents |
|------|----------|
| `rtl/csla_pkg.sv` | `WIDTH = 16`, `NUM_GROUPS = 5`, `GROUP_W = '{2,2,3,4,5}`, and `group_lsb(g)` |
| `rtl/sqrt_csla16.sv` | top: group 0 plus four `csla_group`s, chained by the carries `c[1..5]` |
| `rtl/csla_group.sv` | one carry-select group: ripple-carry adder, BEC, multiplexer |
| `rtl/ripple_carry_adder.sv` | `W`-bit ripple adder; `HAS_CIN` picks a half adder or a full adder for bit 0 |
| `rtl/bec.sv` | `W`-bit binary-to-excess-1 converter |
| `rtl/carry_select_mux.sv` | `2W:W` multiplexer, select = incoming carry |
| `rtl/mux_full_adder.sv` | full adder with carry-selected outputs |
| `rtl/half_adder.sv` | half adder |
| `rtl/mux2.sv` | 1-bit 2:1 multiplexer used in the full adder |

Top-level ports of `sqrt_csla16`: `a[15:0]`, `b[15:0]`, `cin` in; `sum[15:0]`, `cout` out, with
`{cout, sum} = a + b + cin`.

## The excess-1 group

Inside a group of width `W`, the ripple-carry adder adds the slices with carry in 0. Its lowest
cell is a half adder, since there is no carry to absorb. Its `W + 1`-bit result
`r0 = {carry, sum}` feeds both inputs of the multiplexer: `r0` directly on input 0, and
`r1 = r0 + 1` from the BEC on input 1. The carry from the group below selects between them, and
the top bit of the selected word is the carry into the next group.

The BEC of width `n` computes

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])      for i = 1 .. n-1
```

with the AND terms formed as a chain: `b0&b1`, then `(b0&b1)&b2`, and so on. For the 4-bit BEC of
group 2 that is one inverter, two AND gates and three XOR gates. The sum of a `W`-bit slice with
carry in 0 is at most `2^(W+1) - 2`, so `r0 + 1` never overflows the `W + 1` bits. The case that
exercises the whole converter is carry 1 into a slice whose carry-in-0 sum is all ones
(`a + b = 2^W - 1`): the +1 then ripples through every bit into the group's carry out.

## The carry-selected full adder

For one bit:

| `ci` | sum        | carry     |
|------|------------|-----------|
| 0    | `a ^ b`    | `a & b`   |
| 1    | `~(a ^ b)` | `a \| b`  |

`mux_full_adder` computes the four right-hand values from `a` and `b` alone and selects with
`ci`. No signal made inside the cell drives a multiplexer select. In the usual cell, by
contrast, the internal `a ^ b` signal steers the sum and carry logic. In a ripple chain the
carry is the late signal, so here it passes through only one multiplexer per bit.

The cell was originally meant for dual-pass-transistor-logic XOR/XNOR gates and a
pass-transistor multiplexer. Those are transistor-level circuit styles. This RTL keeps the logic
structure only: synthesis maps it to whatever cells the target library has, and may restructure
it.

## Timing and cost (reference numbers, not modelled)

The design was first analysed with a unit-gate model, where every AND, OR and inverter costs 1
delay unit and 1 area unit. In that model an XOR is 3/3 (delay/area), a 2:1 mux 3/4, a half
adder 3/6 and a full adder 6/13. The carries into groups 1 to 4 were estimated to arrive at
units 7, 13, 16 and 19. The per-group estimates were:

| Group (bits) | Delay | Gate count |
|--------------|-------|------------|
| 1 (3:2)      | 13    | 43         |
| 2 (6:4)      | 16    | 61         |
| 3 (10:7)     | 19    | 84         |
| 4 (15:11)    | 22    | 107        |

That is 113 gates fewer than the two-adder carry-select adder, at a cost of 11 more delay units
summed over the groups. An FPGA implementation of the original was reported at 6344
equivalent gates and 124 µW, against 8149 gates and 184 µW for the version with a conventional
full adder cell.

None of these figures is reproduced by this RTL. The simulation is zero-delay, and the
synthesised netlist depends on the tool and the library. Treat the numbers as the design's
motivation, not as properties of this code.

## Design choices not fixed by the original description

- The group 0 adder (bits 1:0) takes `cin` and is built from two full adders. The original only
  shows it as a 2-bit ripple-carry adder fed by the carry input.
- The half adder is one XOR and one AND. Only its function and unit costs are given.
- The multiplexers, including the one in the full adder, are written as behavioural `?:`
  selects.
- Input 0 of every group multiplexer is the ripple-carry result and input 1 the BEC result.
  The top bit of the selected word is the group's carry out.
- No registers or reset were added. The adder is a combinational block to be embedded in a
  clocked design.
- The package holds the 16-bit size and the group widths. `sqrt_csla16` stops elaboration with
  an error if the widths do not add up to `WIDTH`. To build another size, edit `GROUP_W`
  and `WIDTH` together.
- When `HAS_CIN = 0`, the `cin` port of `ripple_carry_adder` is unused. It is kept so that both
  variants have the same interface.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog that stops a hung run.

| Testbench | What it does |
|-----------|--------------|
| `tb_mux2`, `tb_half_adder`, `tb_mux_full_adder` | all input combinations against integer arithmetic |
| `tb_ripple_carry_adder` | exhaustive, 5-bit with carry in and 4-bit with constant carry 0 (its `cin` driven randomly, which must not matter) |
| `tb_bec` | exhaustive at 3, 4 and 6 bits, including the wrap of the all-ones word |
| `tb_carry_select_mux` | random words, both select values, 12:6 size |
| `tb_csla_group` | exhaustive (all `a`, `b`, `cin`) at widths 2, 3, 4 and 5; requires full-ripple cases |
| `tb_sqrt_csla16` | the full 16-bit adder: corner cases, targeted vectors and 200,000 random operand pairs |

`tb_sqrt_csla16` checks `{cout, sum}` against `a + b + cin`. It also compares each carry between
groups with the carry of the low part of the operands. For every group it counts three events,
and each must occur at least once:

- the multiplexer picked the ripple-carry result;
- it picked the BEC result;
- the +1 rippled through the whole group.

A full 16-bit ripple from `cin` to `cout` must also occur. It runs at the design's only size and
takes well under a second.

To run a testbench with Verilator, list the package first and give both source directories:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv tb/tb_sqrt_csla16.sv \
          --top-module tb_sqrt_csla16 -Mdir obj_tb
./obj_tb/Vtb_sqrt_csla16
```

Lint the design with `verilator --lint-only -Wall -Irtl rtl/csla_pkg.sv rtl/sqrt_csla16.sv`.
