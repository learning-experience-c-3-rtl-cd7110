# An 8-bit function unit with a four-register transfer system

This is a small register-transfer datapath of the kind used to teach how a
CPU's execute stage works. An 8-bit **function unit** performs one of thirteen
operations on two operands and reports four status bits. Four 8-bit
**registers** supply those operands and take the result back. Everything is
driven by hand from ten slide switches and two push buttons:

* choose two registers as operands A and B;
* choose an operation;
* press a button to store either the result or a value typed on the switches
  into a chosen register.

The function unit is purely combinational. Its result and status bits follow
the switches and the registers at once. The only state is the four registers
and a small button synchroniser.

```
            SW[9:8]          SW[7:6]                SW[5:2]
               |                |                      |
   +-----------v----------------v----+           +-----v--------------+
   | registers  -> operand mux A ----+--- A ---->|                    |--> result[7:0]
   | val0..val3 -> operand mux B ----+--- B ---->|   function unit    |--> {V,C,N,Z}
   |     ^                           |           +--------------------+
   |     | load decoder (SW[1:0])    |                     |
   |     | 2x1 mux: SW[9:2] on KEY[0], result on KEY[1] <--+
   +----------------------------------+
```

## Using it

| Input      | Meaning                                                   |
|------------|-----------------------------------------------------------|
| `sw[9:8]`  | register placed on operand bus A                          |
| `sw[7:6]`  | register placed on operand bus B                          |
| `sw[5:2]`  | function select code (table below)                        |
| `sw[1:0]`  | destination register of the next store                    |
| `sw[9:2]`  | the 8-bit value stored by `KEY[0]` (the same switches)    |
| `key_n[0]` | active low: store `sw[9:2]` into register `sw[1:0]`       |
| `key_n[1]` | active low: store the function unit result into `sw[1:0]` |
| `rst_n`    | active low, asynchronous: clear all four registers        |

The outputs are the four registers (`regs[0]` to `regs[3]`), both operand
buses, the result and the status `vcnz` = {V, C, N, Z}.

Because the switches double as load data and as control, typing a value sets
the operand selects and the operation too. This has no effect on the stored
value.

Example: to compute 0xC4 + 0x91, first load the two values. Set
`sw = 11_00_0100_11` and press KEY[0]: register 3 gets 0xC4. Set
`sw = 10_01_0001_00` and press KEY[0]: register 0 gets 0x91. Then set
`sw = 11_00_0000_00`: A is register 3 and B is register 0. The result shows
0x55 with VCNZ = 1100, meaning signed overflow and carry. Press KEY[1] to
write 0x55 into register 0.

## The function select code

| Code | Operation | Result              | Block      | V, C          |
|------|-----------|---------------------|------------|---------------|
| 0000 | add       | A + B               | arithmetic | from adder    |
| 0001 | subAB     | A - B               | arithmetic | from adder    |
| 0010 | A+2       | A + 2               | arithmetic | from adder    |
| 0011 | -A        | -A                  | arithmetic | from adder    |
| 0100 | AND       | A & B               | logic      | 0             |
| 0101 | notB      | ~B                  | logic      | 0             |
| 0110 | notA      | ~A                  | logic      | 0             |
| 0111 | NAND      | ~(A & B)            | logic      | 0             |
| 1000 | unused    | 0                   | logic      | 0             |
| 1001 | NOR       | ~(A \| B)           | logic      | 0             |
| 1010 | mova      | A                   | arithmetic | from adder    |
| 1011 | -B        | -B                  | arithmetic | from adder    |
| 1100 | unused    | 0                   | shifting   | 0             |
| 1101 | rem4      | B rem 4 (signed)    | shifting   | 0             |
| 1110 | mult8     | B * 8 (mod 256)     | shifting   | 0             |
| 1111 | unused    | 0                   | shifting   | 0             |

The layout of this table is the central idea of the function unit. Two design
rules shape it.

1. **The top three bits pick the block.** The arithmetic block has six
   operations and the logic block five. Two bits could not name a block and
   still leave enough codes inside it. Instead `fsel[3:1]` alone selects the
   block:
   * 000, 001 and 101 select the arithmetic block;
   * 010, 011 and 100 select the logic block;
   * 110 and 111 select the shifting block.

   The groups overlap with the rest of the code, so all sixteen codes stay
   usable. A 3-to-3 decoder (`unit_select_decoder`) turns these three bits into
   a one-hot select. A 3x1 AND-OR mux per result bit then passes that block's
   output.
2. **For arithmetic codes, the last bit is the adder's carry-in.** add, A+2 and
   mova end in 0. subAB, -A and -B need a carry-in of 1, and they end in 1. No
   extra logic computes the carry-in.

Each block also decodes the full four-bit code into one enable per operation.
If no enable is active, the block outputs 0. This is how the unused codes give
result 0, and therefore Z = 1.

## Inside the arithmetic block

All six arithmetic operations share one 8-bit ripple carry adder. Two operand
muxes in front of it set its inputs, and the carry-in comes from the code:

| Op    | X input | Y input | carry-in |
|-------|---------|---------|----------|
| add   | A       | B       | 0        |
| subAB | A       | ~B      | 1        |
| A+2   | A       | 0x02    | 0        |
| -A    | ~A      | 0       | 1        |
| mova  | A       | 0       | 0        |
| -B    | 0       | ~B      | 1        |

X therefore has three sources. Y has three sources on most bits and four on
bit 1, where the constant 2 needs its one set bit. The adder brings out its
carry out and the carry into bit 7. C is the carry out, and V is their XOR,
the usual two's-complement overflow test. mova passes A through the adder,
which keeps C and V at 0.

## The shifting block: mult8 and rem4

Both operations act on **operand B**, not A.

* **mult8** shifts B left by three bits and drops the bits shifted out.
  For example, 0xAA becomes 0x50.
* **rem4** is the signed remainder of B divided by 4, truncated toward zero.
  The result has the sign of B and a magnitude of at most 3. For example,
  0xAA (-86) gives 0xFE (-2), 0xFF (-1) gives 0xFF, and 0x07 gives 0x03.

rem4 is built from a ripple carry adder and eight XOR gates. It uses a
conditional two's complement: s = B[7] and m = |B| mod 4. The two bits of m
are found directly:

```
m[0] = B[0]
m[1] = B[1] ^ (s & B[0])
result = ({6'b0, m} ^ {8{s}}) + s
```

For a negative B whose low two bits are 00, the sum overflows to 0, which is
the correct remainder.

## Status bits

* **N** is bit 7 of the result.
* **Z** is the NOR of all eight result bits.
* **C** and **V** come from the arithmetic block's adder, as described above.
  They are forced to 0 while the logic or shifting block is selected.

## Register transfer and load timing

* The 2x1 input mux stores `sw[9:2]` for KEY[0] and the result for KEY[1].
* A 2-to-4 load decoder with an enable turns `sw[1:0]` into one load strobe.
* Each operand bus is a 2-to-4 decoder followed by a 4x1 AND-OR mux per bit.
  There are two of them: `operand_mux` is instantiated once for A and once
  for B.

Buttons are asynchronous and are held for many clocks. Two choices follow from
that:

* Each button goes through a two-flip-flop synchroniser.
* A register loads **once per press**, on the clock edge after the
  synchronised button is first seen low.

Loading on every clock while a button is held would break any operation
whose destination is also one of its sources. For example, -A from register
1 into register 1 would flip between the value and its negation.

If a button reaches the first synchroniser flop at clock edge *k*, the
register holds the new value after edge *k+2*. The testbenches check this
latency. If both buttons are first seen pressed in the same cycle, the
switch value is stored.

## Module map

```
function_unit_and_bus            top: datapath loop
  register_transfer_system       registers, synchroniser, input mux
    load_decoder                 2-to-4 with enable
    operand_mux  (x2)            2-to-4 decoder + 4x1 mux per bit
  function_unit                  block select + 3x1 output mux
    arith_unit                   4-to-6 op decoder, operand muxes
      ripple_carry_adder
        full_adder  (x8)
    logic_unit                   4-to-5 op decoder, 5x1 mux per bit
    shift_unit                   4-to-2 op decoder, rem4 adder, 2x1 mux
      ripple_carry_adder
    unit_select_decoder          fsel[3:1] -> {shift, logic, arith}
    status_logic                 V, C, N, Z
fu_pkg                           word type, opcode enum, status struct
```

The data width is the package constant `fu_pkg::DATA_W` = 8. The opcode
semantics (A+2, mult8, rem4) and the four-register select fields are written
for that width. `ripple_carry_adder` has its own `WIDTH` parameter.

## How closely this follows the original circuit

The following are taken from the original design: the operations and their
codes, the split into three blocks selected by `fsel[3:1]`, the carry-in rule,
the status-bit equations, the switch and button roles, and the mux/decoder
structure of both halves.

The following are choices made in this RTL:

* **Gate level.** The original was hand-mapped to NAND gates to reduce its
  transistor count (about 3,300 transistors in total). Its gate-level critical
  path was 2.0 ns, from the load decoder's input to the function unit's
  output. This RTL describes the same muxes and decoders in AND-OR form and
  leaves gate mapping to synthesis. Neither the transistor counts nor the
  delays apply to it.
* **-A and -B.** Which adder input carries the operand for -A and for -B is
  chosen here. The mux sizes come out as in the original.
* **rem4.** Its internal formula is this design's own. Only its inputs and
  outputs are pinned down by recorded values.
* **C and V for logic and shift operations** are 0. Every recorded logic or
  shift result shows them so.
* **Storage and timing.** The reset, the button synchroniser and the
  once-per-press load timing are added here. The original's storage timing is
  not described beyond "the button being pressed".
* **Board I/O.** The original ran on an FPGA board. Pin assignments, LEDs and
  seven-segment displays are not part of this RTL. The top exposes the
  registers, buses, result and status as plain ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. The reference model
`tb/fu_ref_pkg.sv` computes every operation from its arithmetic meaning. It
uses integer sums, signed ranges and the `%` operator, not the gate structure.

* `tb_function_unit` runs all 16 codes on corner values and 500 random
  operand pairs per code. It also checks 20 recorded operand/code/result/status
  combinations from the original circuit.
* `tb_shift_unit` checks all 256 values of B for each code.
* `tb_register_transfer_system` checks these points:
  * the two-edge load latency;
  * one load per press, while the result input changes every clock;
  * the both-buttons case;
  * the operand buses.
* `tb_function_unit_and_bus` runs the whole design at its default size, in
  two parts:
  * It replays a recorded session of the original circuit: six loads, then
    all thirteen operations, each stored back. Every bus, result, status and
    register value matches.
  * It runs 3,000 random switch settings and presses against a model. It
    counts each mechanism: every code stored, loads, stores, stores into a
    source register, long holds, and each status bit set. Any mechanism that
    never occurs counts as a failure.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_function_unit_and_bus \
    -y rtl -y tb +libext+.sv rtl/fu_pkg.sv tb/fu_ref_pkg.sv \
    tb/tb_function_unit_and_bus.sv -o sim
./obj_dir/sim
```

Replace the top module and the last file name for the other testbenches.
`fu_pkg.sv` and `fu_ref_pkg.sv` must come first because the others import
them.
