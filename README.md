# Low-power, compact 8-bit ALU

This is a purely combinational 8-bit arithmetic logic unit for small embedded cores and
FPGA soft processors. Its goal is low switching activity and small area. It relies on
three ideas:

- **One adder for every arithmetic operation.** All eight arithmetic operations share a
  single ripple-carry adder. A small operand network in front of the adder turns each
  operation into an addition.
- **A carry chain of hybrid full adders.** Each full adder is split in two. An XOR/XNOR
  stage forms the propagate rails, and those rails steer the carry and sum selections.
  This is the same split an FPGA makes between a LUT and its dedicated carry chain. The
  8-bit adder is two 4-bit carry groups (bits 0–3 and 4–7) linked by the carry C4.
- **Operand isolation.** Only the unit the opcode selects sees the live operands. The
  inputs of the other units are held at zero, so their internal nodes do not toggle.

The ALU holds no state: no clock, no reset and no flip-flops. Outputs settle one
combinational delay after the inputs change. With registers around it, each operation
takes one clock cycle.

## Block structure

```
 a,b ──► operand_isolation ──► arith_unit ──► hybrid_rca ──► carry4 ×2 ──► hybrid_fa ×4 ──► xor_xnor
           │   (per-unit AND gating)   │ sum, C8, C7
           ├──────────────► logic_unit ──┐ AND OR XOR NOT XNOR
           └──────────────► shift_unit ──┤ SHL SHR SAR
                                         ▼
 opcode ──────────────────────────► output_mux16 ──► result
                                         │
                         flag_logic ◄────┘ (plus C8, C7 and "arithmetic selected") ──► Z C V N
```

| File | Role |
|---|---|
| `rtl/alu_pkg.sv` | Opcode enum, arithmetic sub-op enum, unit-select helper functions |
| `rtl/alu8_top.sv` | Top level: wires the blocks together |
| `rtl/operand_isolation.sv` | Decodes the opcode into unit enables and gates the operands |
| `rtl/arith_unit.sv` | Shared operand network and the adder |
| `rtl/hybrid_rca.sv` | Adder built from cascaded `carry4` groups; brings out C8 and C7 |
| `rtl/carry4.sv` | 4-bit carry group of four `hybrid_fa` slices; brings out every carry |
| `rtl/hybrid_fa.sv` | One-bit hybrid full adder |
| `rtl/xor_xnor.sv` | Complementary XOR/XNOR pair, the input stage of `hybrid_fa` |
| `rtl/logic_unit.sv` | Bitwise operations |
| `rtl/shift_unit.sv` | One-bit shifts |
| `rtl/output_mux16.sv` | 16-to-1 result multiplexer |
| `rtl/flag_logic.sv` | Z, C, V and N |

Every module with a width takes the parameter `WIDTH` (default 8). `hybrid_rca` needs
`WIDTH` to be a multiple of 4, and an elaboration-time assertion checks this.

## Operations

The opcode is 4 bits wide. Bit 3 selects between the arithmetic unit and the
logic/shift side.

| Opcode | Name | Result | C | V |
|---|---|---|---|---|
| 0 | ADD | A + B | carry out | signed overflow |
| 1 | SUB | A − B | 1 = no borrow (A ≥ B unsigned) | signed overflow |
| 2 | INC | A + 1 | A = FF | A = 7F |
| 3 | DEC | A − 1 | A ≠ 00 | A = 80 |
| 4 | NEG | −A | A = 00 | A = 80 |
| 5 | RSB | B − A | 1 = no borrow (B ≥ A unsigned) | signed overflow |
| 6 | TFA | A | 0 | 0 |
| 7 | TFB | B | 0 | 0 |
| 8 | AND | A & B | 0 | 0 |
| 9 | OR | A \| B | 0 | 0 |
| A | XOR | A ^ B | 0 | 0 |
| B | NOT | ~A | 0 | 0 |
| C | XNOR | ~(A ^ B) | 0 | 0 |
| D | SHL | A << 1, zero fill | 0 | 0 |
| E | SHR | A >> 1, zero fill | 0 | 0 |
| F | SAR | A >> 1, sign fill | 0 | 0 |

For every operation, Z = (result == 0) and N = result[7].

## How the shared adder covers eight operations

`arith_unit` feeds the adder X + Y + cin. It picks X from {A, ~A, 0}, Y from
{B, ~B, 0, FF}, and cin from {0, 1}:

| Op | X | Y | cin |
|---|---|---|---|
| ADD | A | B | 0 |
| SUB | A | ~B | 1 |
| INC | A | 0 | 1 |
| DEC | A | FF | 0 |
| NEG | ~A | 0 | 1 |
| RSB | ~A | B | 1 |
| TFA | A | 0 | 0 |
| TFB | 0 | B | 0 |

Because every arithmetic result is a true adder output, the carry and overflow rules
need no special cases. C is the adder's carry out, C8. V is C8 xor C7, where C7 is the
carry into bit 7. `hybrid_rca` brings out C7 for this purpose. For subtraction, C follows
the "carry = not borrow" convention.

## The hybrid full adder and the carry groups

`hybrid_fa` computes x = a ^ b and xn = ~x in `xor_xnor`, then uses them as select
lines:

```
sum  = xn ? cin : ~cin
cout = x  ? cin : a        // a != b: carry propagates; a == b: carry = a (= b)
```

In a transistor implementation these are pass-transistor selections driven by
complementary rails. In an FPGA, the XOR/XNOR stage lands in a LUT, and the two
selections match the carry multiplexer and sum XOR of the dedicated carry chain.

`carry4` chains four such slices and brings out all four carries, as a vendor's 4-bit
carry primitive does. Its ports take the operand bits a and b instead of a primitive's
select/data inputs. The module is therefore portable RTL, not an instantiation of a
vendor cell. Whether a synthesis tool actually places the chain on the carry hardware is
up to the tool.

## Operand isolation

`operand_isolation` derives one enable per unit from the opcode. The three enables are
one-hot, and a simulation assertion checks this. Each unit's operands are ANDed with its
enable:

- **Arithmetic unit:** opcodes 0–7.
- **Logic unit:** opcodes 8–C.
- **Shift unit:** opcodes D–F. This unit takes only A.

When a unit is idle, its inputs are constant zero. As long as the opcode stays within
one unit, the idle units do not switch, however the operands change. Gating to zero was
chosen over latching the previous operand so that the design keeps no storage elements.
The gates sit outside the carry path. Only `arith_en` leaves the block, because the flag
logic needs it to mask C and V.

## Departures and open points

- **Opcode encoding and operation list.** These are this design's own. The original
  description fixes only the categories: eight arithmetic operations (add, subtract,
  increment, decrement among them) and eight logic/shift operations (AND, OR, XOR, NOT,
  logical and arithmetic shifts). NEG, RSB, TFA, TFB and XNOR fill the remaining slots.
- **Shift distance.** Shifts move by one bit, and the shifted-out bit is dropped rather
  than sent to C.
- **C and V outside arithmetic.** Both are forced to 0 for logic and shift operations.
- **An alternative variant.** A circuit diagram and waveforms published with the design
  show a smaller variant: a 3-bit select, eight operations, separate adder and
  subtractor instances, a Parity output and no overflow flag. This RTL follows the
  16-operation, Z/C/V/N description instead. It has no parity output.
- **Unreproduced results.** The reported implementation results were not reproduced
  here: 32 LUTs, 12 slices, a 4.21 ns critical path and 1.3 mW. The same report lists 30
  I/O buffers, but the ports here need 32 (8 + 8 + 4 + 8 + 4).
- **Circuit-level properties.** Full-swing output levels, transistor counts and
  switching energy are properties of the circuit. RTL cannot express them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference values come from `tb/alu_ref_pkg.sv`. It
models the ALU in integer arithmetic and derives overflow from operand and result signs,
not from internal carries, so it is independent of the RTL structure.

| Testbench | Coverage |
|---|---|
| `tb_alu8_top` | All 16 opcodes × all 65,536 operand pairs, one vector per clock cycle. Checks result and flags, and checks that each idle unit's inputs are zero. Counts each opcode, each flag being set, and isolation of each unit; one that never occurs is a failure. Also checks that 1,048,576 operations take exactly 1,048,576 cycles. Runs at default parameters in about half a second. |
| `tb_arith_unit` | All 8 operations × all operand pairs |
| `tb_hybrid_rca` | All operand pairs × both carry-in values, including C7 |
| `tb_carry4`, `tb_hybrid_fa`, `tb_xor_xnor` | Exhaustive truth tables |
| `tb_logic_unit`, `tb_shift_unit`, `tb_flag_logic` | Exhaustive |
| `tb_output_mux16`, `tb_operand_isolation` | Every select/opcode with random data |

To run one, for example the top level:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_alu8_top.sv --top-module tb_alu8_top -o sim
./obj_dir/sim
```

The same command works for any other `tb_<module>.sv`.
