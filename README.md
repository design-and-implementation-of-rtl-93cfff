# A 32-bit ALU with a Vedic multiplier

The multiplier is usually the slowest and largest part of an ALU, so this ALU
builds it from the Urdhva Tiryakbhyam ("vertically and crosswise") rule of
Vedic arithmetic. A 2 x 2 product is formed in three short steps, and each
wider product is four half-width products added by three carry select
adders. The tree goes 2 → 4 → 8 → 16 → 32 bits. The same carry select adder
also does addition, subtraction (two's complement) and the trial subtraction
of a shift-and-subtract divider, so one adder design serves every arithmetic
unit.

Everything is synthesizable SystemVerilog. Only the divider holds state. The
other units are combinational and work side by side. A 4-bit opcode picks one
of their results onto a 64-bit output.

## Top level: `alu_top`

```
          a[31:0] b[31:0]
             │       │
   ┌─────────┼───────┼──────────────────────────────┐
   │  csa_adder      → add, cout                    │
   │  sub_unit       → sub                          │
   │  vedic_mul32    → multi[63:0]                  │   sel[3:0]
   │  divider_fsm    → div, mod   (clocked)         │──► 16-way mux ──► o[63:0]
   │  logic_unit     → and or not nand nor xnor xor │
   └────────────────────────────────────────────────┘
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock and asynchronous active-low reset (used only by the divider) |
| `a`, `b` | in | 32 | operands (unsigned) |
| `sel` | in | 4 | opcode, see below |
| `o` | out | 64 | selected result; 32-bit results are zero-extended |
| `add`, `sub`, `multi`, `div`, `mod`, `cout` | out | 32/32/64/32/32/1 | each unit's own result, always visible |
| `div_busy`, `div_valid` | out | 1 | the divider is working / `div` and `mod` belong to the present `a`, `b` |

Opcodes (`alu_pkg::alu_op_e`):

| `sel` | result | `sel` | result |
|---|---|---|---|
| 0000 | a + b | 0111 | a \| b |
| 0001 | a − b | 1000 | ~a |
| 0010 | a × b (64 bit) | 1001 | ~(a & b) |
| 0011 | 0 (unused) | 1010 | ~(a \| b) |
| 0100 | a / b | 1011 | ~(a ^ b) |
| 0101 | a mod b | 1100 | a ^ b |
| 0110 | a & b | 1101–1111 | 0 (unused) |

Only the remainder code 0101 is fixed by the reference simulation this
design follows. The other code points are this design's choice. To change
them, edit `alu_pkg.sv`. The multiplexer in `alu_top.sv` uses the names only.

Timing: `o` depends combinationally on `a`, `b` and `sel` for every opcode
except 0100 and 0101. The divider's results follow a change of `a` or `b`
33 rising edges later (see the divider section). Until then, `div` and `mod`
still show the previous result and `div_valid` is low.

Reference vector: a = 2569 and b = 25 give add 2594, sub 2544, multi 64225,
div 102 and mod 19.

## Carry select adder: `csa_adder`

An N-bit adder made of four units (N = 32 in the ALU; the multiplier and
divider use it at 4 to 33 bits):

1. **H unit** (`csa_h_unit`): one half adder per bit. `ci = a & b` is the
   carry a bit produces by itself. `si = a ^ b` is its carry-free sum.
2. **CG0 and CG1** (`csa_cg_unit`, parameter `CIN` = 0 or 1): each ripples
   a carry through the shared half-adder outputs, starting from a fixed
   carry-in. The rule is `c(i) = ci(i) | si(i) & c(i-1)` and
   `s(i) = si(i) ^ c(i-1)`. Both candidate sums exist before the real carry-in
   is known.
3. **Mx unit** (`csa_mx_unit`): the real carry-in selects the CG1 result
   (carry-in 1) or the CG0 result (carry-in 0), for the sum and the carry out.

Compared with two independent ripple carry adders, the half adders are
built once and shared. The carry-in reaches the output through the
multiplexer only. The whole width is one select stage. The adder is not cut
into groups, so the carry still ripples across N bits inside CG0 and CG1.

## Vedic multiplier: `vedic_mul2` … `vedic_mul32`

### The 2 x 2 cell

For a = a1a0 and b = b1b0:

```
vertical    C0 S0 = a0·b0                 (C0 = 0)
crosswise   C1 S1 = a0·b1 + a1·b0
vertical    C2 S2 = C1 + a1·b1
product     C2 S2 S1 S0
```

This is four AND gates and two half adders (`vedic_mul2.sv`).

### One level of the tree

An N x N level (N = 4, 8, 16, 32) splits `a = aH:aL` and `b = bH:bL` into
halves of H = N/2 bits. Four H x H multipliers give N-bit partial products:

```
q0 = aL·bL    q1 = aH·bL    q2 = aL·bH    q3 = aH·bH
a·b = q0 + (q1 + q2)·2^H + q3·2^N
```

`vedic_combine` adds them with three N-bit carry select adders:

```
csa1:  t = q1 + q2                          carry ca1
csa2:  u = t + (q0 >> H)                    carry ca2
csa3:  v = q3 + {0…0, ca1|ca2, u[N-1:H]}    carry unused
p    = { v , u[H-1:0] , q0[H-1:0] }
```

This is the hardest part of the design to follow:

* The low H bits of `q0` are final product bits as they stand. No addition
  touches them.
* `csa2` aligns the rest of `q0` with the cross-product sum. Its low H bits
  are final product bits H … 2H−1.
* `ca1` and `ca2` both carry weight 2^(N+H), which is bit H of the third
  adder's second operand. They can never both be 1:
  `t + (q0 >> H) ≤ 2(2^H−1)² + 2^H − 1 < 2^(N+1)`. So a plain OR places
  them exactly. Because the carries enter through the operand, no third
  carry-in is needed.
* `csa3`'s carry out is always 0, because a·b < 2^(2N). It is left
  unconnected on purpose. Verilator reports it as an unused signal.

`vedic_mul4` uses `vedic_mul2` cells. `vedic_mul8` uses `vedic_mul4`, and so
on up to `vedic_mul32`, which holds 256 2 x 2 cells and 3 + 12 + 48 + 192
adders. Each level is its own module, so each can be used and tested
alone.

## Subtraction: `sub_unit`

`a − b = a + ~b + 1` on a carry select adder with carry-in 1. The adder's
carry out is 1 when there is no borrow. `sub_unit` also has a `borrow`
output, but the ALU leaves it unused because no opcode selects it.

## Divider: `divider_fsm`

This is a restoring shift-and-subtract divider, one quotient bit per clock.

* Working registers `{rem, qr}` start as `{0, dividend}`.
* Each step forms `s = {rem, qr[N-1]}`, an N+1-bit value, and computes
  `s − divisor` on an (N+1)-bit carry select adder.
* A carry out of 1 means `s ≥ divisor`. The difference becomes `rem` and a
  1 is shifted into `qr`. Otherwise `s` is kept and a 0 is shifted in.
* After N steps, `qr` is the quotient and `rem` the remainder.

The FSM has three states: IDLE (after reset, no result yet), RUN (N steps)
and DONE. It has no start input. In IDLE, or in DONE when `dividend` or
`divisor` differ from the operands it last divided, it latches the inputs
and starts. So the unit behaves like a slow combinational block:

* Operands present before rising edge k are loaded at edge k.
* The result is written at edge k + N, which is 33 edges for the 32-bit ALU.
* If the operands change during RUN, that division completes. `valid` stays
  low, and the next edge starts the division of the new operands.
* Division by zero has no special case. The algorithm gives quotient = all
  ones and remainder = dividend.

An assertion checks that the partial remainder stays below the divisor
between steps.

## Logic unit: `logic_unit`

It computes AND, OR, NOT (of `a`), NAND, NOR, XNOR and XOR in parallel.

## Where this RTL departs from, or fills in, the source design

* **CG0/CG1 carry-in.** The adder block diagram labels the carries into the
  two generation units "Cin" and "Cin_bar". The prose, and the basic
  carry select block, use the constants 0 and 1 and select with the real
  carry-in. This RTL follows the prose.
* **Multiplier structure.** The 4 x 4 bit equations in the source repeat
  one term and belong to a 3-bit pattern. The multiplier instead follows the
  4 x 4 and 32 x 32 schematics: four sub-multipliers and three adders per
  level. The OR of `ca1` and `ca2` is this design's way of entering both
  carries into the third adder.
* **Subtractor.** The source's synthesized netlist shows an inferred
  subtractor. This RTL follows the source's prose instead, which builds
  subtraction from the addition unit.
* **Resource sharing in the divider.** The divider has its own instance of
  the carry select adder, 33 bits wide. It does not time-share the ALU's
  32-bit addition unit.
* **Divider interface.** The start rule, the 33-edge latency, `busy`/`valid`,
  the asynchronous active-low reset and the divide-by-zero result are this
  design's own. The source shows the divider with clock, dividend, divisor,
  quotient and remainder, and no handshake.
* **Opcode map and zero extension.** Both are this design's own, apart from
  0101 for the remainder.
* **Status.** The generic ALU symbol has status in and status out, but no
  flags are defined. Only the adder's carry out is provided, as `cout`. The
  source's top-level netlist also shows an inverter on a clock-related net
  whose purpose is not given. Here the divider uses the rising edge of
  `clk`.
* **"XAND"** is taken to mean XNOR.
* **Signed arithmetic** is not supported. All operations are unsigned.
* **Delay and area.** The source reports FPGA results: about 19.6 ns against
  52.9 ns for a conventional ALU, at similar LUT counts. These figures were
  not reproduced here.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_alu_top rtl/alu_pkg.sv tb/tb_alu_top.sv
./obj_dir/Vtb_alu_top
```

Replace `tb_alu_top` with any other testbench name. `tb_alu_top` runs the
full-size ALU. It applies the reference vector under each opcode, then random
operands under all 16 codes. It checks the 33-edge divider latency, and
checks that carry out, subtraction with borrow, a product wider than 32 bits,
division by zero and a divider restart each happen at least once. The
multiplier testbenches are exhaustive at 4 and 8 bits and random at 16 and
32 bits. Building the full 32-bit multiplier takes Verilator about a minute.

## Files

* `rtl/alu_pkg.sv`: the operand width `ALU_W` and the opcodes.
* `rtl/alu_top.sv`: the ALU.
* `rtl/csa_adder.sv`: the carry select adder, with `csa_h_unit.sv`,
  `csa_cg_unit.sv` and `csa_mx_unit.sv`.
* `rtl/vedic_mul2.sv`, `rtl/vedic_mul4.sv` … `rtl/vedic_mul32.sv` and
  `rtl/vedic_combine.sv`: the multiplier.
* `rtl/sub_unit.sv`, `rtl/divider_fsm.sv`, `rtl/logic_unit.sv`: the other
  function units.
* `tb/tb_<module>.sv`: one testbench per module.
