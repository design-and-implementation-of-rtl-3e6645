# A 16-bit ALU built from reversible gates

A reversible gate has as many outputs as inputs, and it maps each input vector
to a different output vector. So the inputs can always be recovered from the
outputs, and in principle no information is destroyed. This matters because
erasing a bit costs a minimum amount of heat (kT ln 2). Reversible circuits are
studied as a route to very-low-power logic and for quantum, optical and
quantum-dot computing.

This repository holds a 16-bit arithmetic logic unit in which every logic gate
is one of four reversible gates: NOT, Feynman, Fredkin and a 5x5 JRC gate. The
JRC gate is a full adder or a full subtractor, depending on one control line. The
ALU performs eight operations. All of them are computed at the same time, and a
3-bit select picks the one that appears at the output.

| `sel` (S2 S1 S0) | operation | `f` | `f_hi` | `cout` |
|---|---|---|---|---|
| 000 `OP_ADD`  | addition       | A + B + Cin (low 16 bits) | 0 | carry out |
| 001 `OP_SUB`  | subtraction    | A - B - Cin (low 16 bits) | 0 | borrow out |
| 010 `OP_MUL`  | multiplication | low 16 bits of A * B      | high 16 bits of A * B | 0 |
| 011 `OP_AND`  | AND            | A & B    | 0 | 0 |
| 100 `OP_OR`   | OR             | A \| B   | 0 | 0 |
| 101 `OP_NOT`  | NOT            | ~A       | 0 | 0 |
| 110 `OP_XOR`  | XOR            | A ^ B    | 0 | 0 |
| 111 `OP_NAND` | NAND           | ~(A & B) | 0 | 0 |

Operands are unsigned. The whole unit is combinational: it has no clock, no
reset and no registers.

## The gate set

| gate | size | mapping | quantum cost | used for |
|---|---|---|---|---|
| NOT (`rev_not_gate`) | 1x1 | P = A' | 0 | NOT, NAND |
| Feynman / CNOT (`rev_feynman_gate`) | 2x2 | P = A, Q = A xor B | 1 | XOR; with B = 0, copying a line |
| Fredkin (`rev_fredkin_gate`) | 3x3 | P = A, Q = A'B xor AC, R = A'C xor AB | 5 | AND, OR, partial products, 2:1 multiplexers |
| JRC (`rev_jrc_gate`) | 5x5 | see below | - | one bit of add/subtract |

The Fredkin gate is a controlled swap. When A = 1, lines B and C change places.
It also keeps the number of ones. Tying one of its lines to a constant gives the
ordinary gates that the datapath needs:

- AND: B and C = 0 give R = AB.
- OR: B and C = 1 give Q = A'B + A = A + B.
- 2:1 multiplexer: Q is C when A = 1, and B when A = 0.

Two terms borrowed from reversible logic appear in the comments:

- A *constant input* is a line tied to 0 or 1 to make a function reversible.
- A *garbage output* is a gate output that nothing reads.

Plain fan-out is not reversible: one line cannot drive two gates. So where a
signal is needed twice, the logic unit copies it with a Feynman gate whose B
input is 0.

## The JRC gate: one add/subtract bit

The JRC gate has inputs A, B, C, D and Sel, and outputs P, Q, R, S and T. With
D = 0 it acts as:

- a full adder for Sel = 0: the sum bit on Q and the carry on S;
- a full subtractor for Sel = 1: the difference bit on Q and the borrow on S.

The gate's output equations are not published with it. This implementation uses
its own:

```
P = A
Q = A xor B xor C                    sum or difference bit
R = C
S = D xor MAJ(A xor Sel, B, C)       carry or borrow out (when D = 0)
T = Sel
```

Why these equations work:

- The sum bit of A + B + C and the difference bit of A - B - C are the same
  (A xor B xor C).
- The carry is MAJ(A, B, C) and the borrow is MAJ(A', B, C). Flipping A by Sel
  inside the majority therefore gives whichever one the mode needs.
- The mapping is reversible because it is a sequence of controlled XORs:
  A ^= Sel, then D ^= MAJ(A, B, C), then B ^= A xor Sel xor C, then A ^= Sel.
  Each step writes a line that none of its own controls depends on. The
  testbench also checks exhaustively that all 32 output vectors are distinct.

P, R and T are garbage outputs when the gate is used in the adder/subtractor.
If you have the gate's published equations, only `rtl/rev_jrc_gate.sv` needs to
change. The adder/subtractor uses Q as the sum, S as the carry and D = 0.

## Datapath

```
 A, B ──┬──> rev_addsub (16 JRC gates, ripple) ── sum, carry/borrow ─┐
 Cin ───┤      sel line = (S == SUB)                                 │
        ├──> rev_multiplier (Fredkin ANDs + 15 rows of rev_addsub) ──┤──> rev_result_select ──> F, F_HI, Cout
        └──> rev_logic_unit (AND, OR, NOT, XOR, NAND) ───────────────┘     (Fredkin mux tree on S2..S0)
```

**Adder/subtractor (`rev_addsub`).** This is one JRC gate per bit, 16 in all,
with the carry (or borrow) rippling from bit 0 upwards. `sub` drives every
gate's Sel line. The ALU sets `sub` only for the SUB code, so during every other
operation the unit adds. Cin is the carry in for ADD and the borrow in for SUB.
In SUB, `cout` is 1 when A < B + Cin.

**Multiplier (`rev_multiplier`).** This is an unsigned array multiplier:

- Each partial-product bit A[j]·B[i] comes from a Fredkin gate with control
  B[i], data A[j] and a constant 0.
- Fifteen `rev_addsub` rows, held in add mode, sum the rows. Row i adds partial
  product i to the upper 16 bits of the running sum, including the previous
  carry.
- The lowest bit of each running sum is a finished product bit.
- The full 32-bit product leaves the ALU as `{f_hi, f}`.

This is the longest combinational path in the design. It has about 2 × 16
stages of JRC gates.

**Logic unit (`rev_logic_unit`).** Each bit is built from these gates:

- three Feynman gates copy A into four lines, and two copy B into three lines;
- AND is a Fredkin gate with C = 0;
- OR is a Fredkin gate with C = 1;
- XOR is a Feynman gate;
- NOT is a NOT gate on A;
- NAND is a NOT gate after the AND.

**Result selection (`rev_result_select`).** Each of the eight operations gives a
33-bit word `{cout, f_hi, f}`. For every bit, a tree of seven Fredkin
multiplexers picks one word by S0, then S1, then S2.

## What is reversible and what is not

Every gate in the datapath is one of the four reversible gates. The
garbage outputs are left unconnected inside each module. They are not brought
out as ports, so the ALU as a whole is not a reversible function of its ports.
A conventional synthesis flow also turns each gate back into ordinary logic. The
RTL therefore describes the reversible structure and gets its function right,
but it makes no claim about power. Two pieces of glue are ordinary logic:

- the compare that derives `sub` from the select code;
- the wiring that assembles the eight result words.

## Where this design is its own

What comes from the design description:

- the 16-bit width;
- the eight operations;
- the S2..S0 select, Cin and Cout;
- the NOT, Feynman and Fredkin mappings;
- the JRC gate's ports and add/subtract behaviour;
- the adder/subtractor as a ripple chain of one JRC gate per bit.

Choices made here:

- the operation codes;
- the JRC output equations;
- unsigned multiplication with a full-width product on the extra `f_hi` port;
- the structure of the multiplier, the logic unit and the result selector;
- NOT acting on operand A;
- Cout being 0 outside ADD and SUB.

The design description pictures the ALU block with 4-bit operands but specifies
16 bits. `WIDTH` (default 16) sets the operand width of every unit.

Division is not included. It appears once in a list of operations, but it is
otherwise described as a later extension. The eight select codes are fully used
by the operations above.

## Files

- `rtl/rev_alu_pkg.sv`: the operation-code enum `alu_op_e`.
- `rtl/rev_alu.sv`: the top level.
- `rtl/rev_addsub.sv`, `rtl/rev_multiplier.sv`, `rtl/rev_logic_unit.sv` and
  `rtl/rev_result_select.sv`: the four datapath units.
- `rtl/rev_jrc_gate.sv`, `rtl/rev_fredkin_gate.sv`, `rtl/rev_feynman_gate.sv`
  and `rtl/rev_not_gate.sv`: the gates.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_rev_addsub_4bit.sv`: an exhaustive test of the adder/subtractor at 4
  bits (four JRC gates).

## Verification

Each testbench compares the unit with values computed from SystemVerilog
operators. It prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Gates:** all input vectors, checking the mapping and that the outputs are
  one-to-one. The Fredkin test also checks that the number of ones is kept.
- **Adder/subtractor, multiplier, logic unit:** corner operands (0, 1, all ones,
  the top bit alone) plus a few thousand random pairs. The 4-bit
  adder/subtractor is tested exhaustively.
- **`tb_rev_alu`:** runs the full-size ALU with default parameters over every
  operation code, Cin value and corner operand, plus 8000 random operations. It
  counts each mechanism and fails if any never occurred. The mechanisms are:
  - each of the eight operations;
  - a carry out of addition;
  - a borrow out of subtraction;
  - a carry in;
  - a borrow in;
  - a product with a non-zero upper half.

To simulate, for example the whole ALU:

```
verilator --binary --timing --assert -y rtl rtl/rev_alu_pkg.sv tb/tb_rev_alu.sv \
          --top-module tb_rev_alu -Mdir obj_alu -o sim && ./obj_alu/sim
```

Swap in another `tb/tb_*.sv` and its module name to test a single unit.
Verilator warns that the garbage outputs are unused; those lines are
intentionally unread.

## Changing it

- **Width:** set `WIDTH` on `rev_alu`. The multiplier grows as WIDTH² gates.
- **Operation codes:** edit `alu_op_e` in the package. The result words in
  `rev_alu.sv` are indexed by the enum, so they follow automatically.
- **JRC gate:** change only `rev_jrc_gate.sv`. Keep Q as the sum/difference and
  S as the carry/borrow with D = 0, or rewire `rev_addsub.sv` to match.
