# A bit-sliced ALU built from one programmable cell

This ALU uses the same small cell for every bit. Each cell holds a
four-entry programmable truth table, the **LFU** (Logical Function Unit).
The two operand bits of the cell pick one entry. The picked entry is the
cell's *propagate* signal P, and it serves two purposes:

- For a logic instruction, P is the result bit. The carry chain is switched
  off and the sum equals P.
- For an arithmetic instruction, the truth table is set to exclusive-OR.
  P is then the propagate term of a full adder. A carry chain built from
  generate and propagate, plus one more EXOR, turns it into a sum.

So the instruction decode does not choose between an adder and a logic unit.
It loads a four-bit truth table into every cell at once and decides whether
the carry chain is live. A zero detector is built into the same cell and
ripples alongside the carry, so the Z condition code is ready with the sum.

The original cell is a 47-transistor CMOS design that uses pass-gate
("mux logic") circuits. This RTL gives the logic function of each part of
that cell, then the rows, the carry-select carry chain of the 64-bit version,
the ALU's share of the instruction decode, and a Z/C/S condition-code
register.

## The cell (`alu_bit_cell`)

Each bit has four parts. Each part is its own module:

| part | module | function |
|---|---|---|
| LFU mux | `alu_lfu` | `P = LFU[{M,S}]`: {M,S}=11 → L3, 10 → L2, 01 → L1, 00 → L0 |
| carry cell | `alu_carry_cell` | `G = M & S & !CRY_KILL`; `carry_out = (P & carry_in) \| G` |
| sum EXOR | `alu_sum_xor` | `SUM = P ^ carry_in` (the carry acts as a "controlled inverter" of P) |
| zero stage | `alu_zero_cell` | `ZO = !SUM & ZI` |

M and S are the two operand bits. `x` of the top drives M and `y` drives S.

The carry logic is simpler than it looks at first:

- **Generate** forces the carry out high and ignores the carry in. The
  ripple stops there.
- **Propagate** passes the carry in straight through. In silicon this is a
  transmission gate, not a gate stage.
- **Otherwise** the carry out is low.

Because generate uses M & S directly rather than the LFU output, a logic
instruction could still produce carries. `CRY_KILL` prevents that, and the
decode gives logic instructions a carry in of 0. With both in place, no
carry appears anywhere in the row and `SUM = P`.

Truth-table codes used by the instructions:

| LFU[3:0] | P | used by |
|---|---|---|
| 0110 | M xor S | ADD, ADDC, SBC, CP (with carry chain), XOR (killed) |
| 1000 | M and S | AND, TM |
| 1110 | M or S | OR |

Any other code works too. The cell has no notion of "valid" codes, and the
row testbenches exercise all 16.

## Carry polarity (`alu_ripple`)

In the original cell the carry lines are **active low**. A long row needs
its carry rebuffered. The cells therefore come in two variants, one with an
active-low carry and one with an active-high carry, selected by the
`CARRY_ACTIVE_LOW` parameter. A row alternates groups of each variant. One
plain inverter between two groups then buffers the carry and converts its
polarity in the same step.

`alu_ripple` builds a WIDTH-bit row with groups of `POL_GROUP` = 8 cells:
groups 0, 2, 4, … are active low and groups 1, 3, 5, … are active high. The
row's own `cin` and `cout` ports are active high, so a user never sees the
internal polarity. The sum EXOR always receives the active-high carry.

## Carry select (`alu_select_group`, `alu_carry_select`)

For the 64-bit datapath, a bit-by-bit ripple is too slow. The chain is split
into groups:

- The **lowest group** is an ordinary ripple row (`alu_ripple`) that works
  with the real carry in.
- **Every higher group** (`alu_select_group`) holds two copies of the carry
  chain. One copy assumes a carry of 0 into the group and the other assumes
  1. Both copies ripple in parallel while the lower groups are still working.
- When the real carry reaches a group, it only drives a multiplexer. The
  multiplexer picks, bit by bit, which pre-computed carry feeds the sum EXOR,
  and which chain's carry out goes on to the next group.

Only the carry chain is duplicated. The LFU, the sum EXOR and the zero stage
exist once per bit. Groups get wider towards the MSB, because higher groups
have longer to wait for their real carry. The default split is
`GROUP_W = '{4, 4, 8, 16, 16, 16}` (LSB first, 6 groups). Both the sizes and
the number of groups are parameters, and the sizes must add up to `WIDTH`.
An elaboration-time assertion checks the sum. In silicon, the best split
depends on circuit simulation. This RTL is functionally the same for any
split.

The zero-detect chain runs through every group, after the carry has been
selected.

## Instruction decode (`alu_lfu_decode`) and the top (`alu_top`)

| opcode | mnemonic | LFU | CRY_KILL | y complemented | carry in | writes result | C updated |
|---|---|---|---|---|---|---|---|
| 0x60 | ADD  | 0110 | 0 | no  | 0      | yes | yes |
| 0x64 | ADDC | 0110 | 0 | no  | C flag | yes | yes |
| 0x68 | SBC  | 0110 | 0 | yes | C flag | yes | yes |
| 0x6C | CP   | 0110 | 0 | yes | 1      | no  | yes |
| 0x70 | AND  | 1000 | 1 | no  | 0      | yes | no  |
| 0x74 | TM   | 1000 | 1 | no  | 0      | no  | no  |
| 0x78 | OR   | 1110 | 1 | no  | 0      | yes | no  |
| 0x7C | XOR  | 0110 | 1 | no  | 0      | yes | no  |

The opcodes and LFU codes are those of the original instruction set. CP is a
subtract that writes no result, and TM is an AND that writes no result. Both
exist only to set the condition codes. Z and S are updated by every legal
instruction. Any other opcode raises `illegal` and does nothing.

Subtraction uses the same LFU code as addition, so the subtrahend has to be
complemented ahead of the cell. `alu_top` does this with `invert_y`, and
computes `x - y` as `x + ~y + cin`. The carry means "no borrow", as on ARM or
6502:

- CP uses cin = 1, so C = 1 means `x >= y` (unsigned).
- SBC uses the C flag, so SBC computes `x - y - !C`.

`alu_top` port timing:

- `opcode`, `x`, `y` and `valid` go in.
- `result`, `result_we`, `illegal`, `carry_out` and `zero` are combinational
  in the same cycle.
- The flags `{Z, C, S}` (`alu_pkg::flags_t`) are loaded at the next rising
  edge of `clk` when `valid` is high.
- `rst_n` is an asynchronous, active-low reset that clears the flags.
- ADDC and SBC read the registered C flag, so a multi-word add is ADD then
  ADDC on consecutive cycles.

At the default `WIDTH = 64` the datapath is `alu_carry_select`. At any other
width it is a single `alu_ripple` row, which suits a small processor where
ripple delay is acceptable.

## Where this RTL makes its own choices

The following are design decisions here, not properties of the original ALU:

- **Operand complement for SBC/CP, and carry = not-borrow.** The original
  ALU gives subtracts the add truth table but does not show where the operand
  is inverted or which carry convention is used.
- **Carry-in sources.** ADDC takes the C flag, CP takes 1, and logic
  instructions take 0.
- **Flags.** Logic instructions leave C unchanged. Only Z, C and S are built.
  A processor around this ALU would add a greater-than flag and external
  conditions, but their definitions are not available, so they are left out.
- **Illegal opcodes.** Any opcode other than the eight is illegal and has no
  effect.
- **Group sizes.** Both the polarity-group size of 8 and the carry-select
  split `{4,4,8,16,16,16}` are choices made here.
- **Register and reset.** The flag register and its asynchronous reset are
  choices made here. The ALU datapath itself has no state.
- **Transistor-level detail is not modelled.** The RTL does not model
  pass-gate structure, device sizes or the zero chain's mux-logic AND. Only
  their logic function is modelled.

## Files

`rtl/`:

- `alu_pkg.sv`: opcodes, LFU codes, the decode bundle `alu_ctrl_t`, `flags_t`.
- `alu_lfu.sv`, `alu_carry_cell.sv`, `alu_sum_xor.sv`, `alu_zero_cell.sv`:
  the four parts of a cell.
- `alu_bit_cell.sv`: one complete bit.
- `alu_ripple.sv`: ripple row with alternating carry polarity.
- `alu_select_group.sv`, `alu_carry_select.sv`: carry-select datapath.
- `alu_lfu_decode.sv`, `alu_flags.sv`, `alu_top.sv`: decode, condition
  codes, top.

`tb/`:

- Each module has a self-checking testbench `tb_<module>.sv`.
- `alu_ref_pkg.sv` is a bit-level reference model plus a random-operand
  generator that favours long carry runs.
- `tb_alu_row_common.svh` is shared by the three row testbenches.
- `tb_alu_top.sv` is the end-to-end test at the default 64 bits.
- `tb_alu_top_ripple.sv` is the same test at 16 bits (ripple datapath).
- `tb_alu_top_body.svh` holds the body shared by the two end-to-end tests.

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_alu_top.sv --top-module tb_alu_top
./obj_dir/Vtb_alu_top
```

Replace `tb_alu_top` with any other testbench name. Verilator finds the
remaining modules through `-Irtl -Itb`.

What the end-to-end test does:

- It runs about 20,000 random and directed instructions.
- It checks results, carry, zero and the registered flags against the
  `+ - & | ^` operators.
- It counts how often each mechanism happened: every opcode, carry kill,
  carry generate, a carry rippling the full width, each carry-select group
  taking its carry-0 and its carry-1 chain, zero detect, use of the C flag,
  the no-write instructions, illegal opcodes and reset.
- A mechanism that never happens counts as a failure.

The leaf-cell testbenches cover every input combination. The row
testbenches compare about 20,000 random vectors with a bit-by-bit model of
the cell equations, and compare add codes with `+` as well.

## How far to trust it

- All modules lint cleanly under Verilator `-Wall` and elaborate in Yosys
  with the slang front end. No circuit warnings are reported.
- Every testbench passes. Each one was also shown to fail against a
  deliberately broken copy of its module.
- The RTL models logic function only. It says nothing about the delay or
  power advantages that motivate the transistor-level cell, or about
  carry-select group sizes optimised for speed.
