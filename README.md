# Area-efficient carry select adder in a small ALU

A conventional carry select adder (CSLA) computes every block of the sum
twice, once for a carry-in of 0 and once for a carry-in of 1, and then uses
multiplexers to pick the right copy when the real carry arrives. That
duplication costs area and power. This design removes it at the level of a
single bit: the half sum and half carry of `a` and `b` already contain
everything needed to know the carry-out for *both* possible carry-ins, so one
extra OR gate replaces the second adder, and an AND-OR pair replaces the
multiplexer. The resulting adder is then used as the arithmetic core of an
8-bit ALU.

Everything is combinational SystemVerilog with no clock and no reset.

## The adder cell

For one bit with inputs `a`, `b` and incoming carry `c`:

| signal | formula            | meaning                               |
|--------|--------------------|---------------------------------------|
| `s0`   | `a ^ b`            | half sum                              |
| `c0`   | `a & b`            | carry-out if the carry-in is 0        |
| `c1`   | `s0 \| c0`          | carry-out if the carry-in is 1 (= `a \| b`) |
| carry out | `c0 \| (c & c1)` | selection of `c1` or `c0` by `c`       |
| `sum`  | `s0 ^ c`           | final sum                             |

The carry-out expression is a 2:1 selection in disguise: since `c0` implies
`c1`, `c0 | (c & c1)` equals `c ? c1 : c0`. No inverter and no multiplexer
are needed for it. Both XORs are built in AND-OR-INVERT form,
`(~x & y) | (x & ~y)`, so a bit costs 4 inverters, 6 AND gates and 4 OR
gates: two XORs for the sum, two ANDs and two ORs for the carry.

For the 8-bit default that is 48 AND, 32 NOT and 32 OR gates; a coarse,
unoptimized synthesis of `alu_top` keeps exactly these single-bit gates for
the adder part. A published
count for this adder gives 48 AND, 32 NOT and 24 OR; the 8 missing ORs are
not explained by the cell, and this RTL follows the cell.

## Two units: generation and selection

The cell is split along the line between work that does not depend on any
carry and work that does:

* **`csla_scg`**, the sum and carry generator, produces `s0`, `c0` and `c1`
  for all bits in parallel, directly from the operands.
* **`csla_scs`**, the sum and carry selection unit, walks the carry from
  `cin` upward: `c[0] = cin`, `c[i+1] = c0[i] | (c[i] & c1[i])`, and forms
  `sum[i] = s0[i] ^ c[i]`. It has one selection stage per bit, WIDTH stages
  for a WIDTH-bit adder rather than WIDTH+1.

**`proposed_csla`** connects the two. The critical path is one AOI XOR plus
one OR in the generator, then one AND-OR pair per bit in the selector, then
the last AOI XOR. The carry therefore still ripples bit by bit: the cells are
chained with each bit's carry-out feeding the next bit's carry-in. That
chaining is this implementation's reading of how single cells form a wider
adder; grouping bits into larger select blocks is not done here.

## The ALU

`alu_top` wraps one `proposed_csla` and adds bitwise logic operations. The
operation set, its encoding and the flags are choices of this RTL, since
only the idea "the adder sits inside an ALU" is fixed:

| `op` (`alu_pkg::alu_op_e`) | code | `result`          | `cout`                    |
|----------------------------|------|-------------------|---------------------------|
| `OP_ADD`  | 0 | `a + b + cin`        | adder carry-out           |
| `OP_SUB`  | 1 | `a - b` (`a + ~b + 1`) | 1 = no borrow, 0 = borrow |
| `OP_AND`  | 2 | `a & b`              | 0 |
| `OP_OR`   | 3 | `a \| b`              | 0 |
| `OP_XOR`  | 4 | `a ^ b`              | 0 |
| `OP_XNOR` | 5 | `~(a ^ b)`           | 0 |
| `OP_NAND` | 6 | `~(a & b)`           | 0 |
| `OP_NOR`  | 7 | `~(a \| b)`           | 0 |

`zero` is 1 when `result` is all zeros. `cin` is used only by `OP_ADD`.
Subtraction shares the adder: `b` is inverted and the carry-in forced to 1.

## Files

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | `ALU_WIDTH` (8) and the `alu_op_e` operation type |
| `rtl/aoi_xor.sv` | XOR from inverters, two ANDs and an OR |
| `rtl/csla_scg.sv` | sum and carry generator, parameter `WIDTH` |
| `rtl/csla_scs.sv` | sum and carry selection, parameter `WIDTH` |
| `rtl/proposed_csla.sv` | the adder, parameter `WIDTH` |
| `rtl/alu_top.sv` | the ALU (top level), parameter `WIDTH` |
| `tb/tb_*.sv` | one self-checking testbench per module |

All `WIDTH` parameters default to 8. Any width of 1 or more works; the
testbenches also use 1 and 32.

## Verification

Each testbench compares the block against values it computes on its own
(integer addition, SystemVerilog bitwise operators) and prints
`TB_RESULT checks=N failures=M`:

* `tb_aoi_xor`: all four input pairs.
* `tb_csla_scg`: every 8-bit operand pair, each bit's `s0`, `c0`, `c1`.
* `tb_csla_scs`: every 8-bit operand pair and both carry-ins, with the
  generator outputs formed by the testbench.
* `tb_proposed_csla`: the 8-bit adder exhaustively (131,072 cases), the
  1-bit cell on all 8 cases, a 32-bit adder on the all-ones carry chain and
  2,000 random cases.
* `tb_alu_top`: the ALU at its default parameters, every operation on every
  operand pair with both carry-ins (about a million checks). It counts how
  often carry-out, a carry-in that changes the sum, a carry rippling through
  all 8 bits, subtraction with and without borrow, and the zero flag occur,
  and fails if any of them never does.

To run one, for example the ALU test:

    verilator --binary --timing --assert -Irtl rtl/alu_pkg.sv tb/tb_alu_top.sv \
        --top-module tb_alu_top -Mdir obj_alu
    ./obj_alu/Vtb_alu_top

Each finishes in well under a second of simulation time on a desktop.

## Limits and departures

* Gate-level intent is expressed as continuous assignments of AND, OR and NOT
  on single bits. A synthesis tool is free to restructure them, so area,
  delay and power of a synthesized netlist will not match a hand-drawn gate
  count or a transistor-level simulation.
* The ALU's operation set, encoding, subtract path and flags are this RTL's
  own. If a different operation set is needed, extend `alu_op_e` and the
  result `case` in `alu_top`; the adder is unaffected.
* The OR-gate count per bit is 4, not 3 (see above).
* Nothing is registered. To pipeline the ALU, add registers around
  `alu_top`; the adder has no internal state.
