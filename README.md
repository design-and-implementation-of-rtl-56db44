# A 4-bit ALU from reversible gates with a Vedic multiplier

This is a small clocked ALU whose datapath is built only from reversible
logic gates: gates with as many outputs as inputs, where every input pattern
maps to its own output pattern. Such gates lose no information, which is the
basis for low-power and quantum-style logic. Five gate types (Feynman, Peres,
HNG, TSG and BJN) make up an adder/subtractor, a multiplier and a logic unit.
The multiplier follows the Urdhva Tiryagbhyam ("vertically and crosswise")
method of Vedic arithmetic: it splits each operand into halves, multiplies
the halves in parallel and adds the partial products.

The ALU takes two 4-bit operands `a` and `b` and a 4-bit code `control`. It
returns an 8-bit result `y` one clock later. There are 13 operations.

In synthesis the reversible gates reduce to ordinary AND/XOR/OR logic. They
are kept as separate modules so that the netlist shows the reversible
structure. The unused "garbage" outputs of each gate are left open on purpose.

## Operation codes

| `control` | operation | `y` |
|---|---|---|
| 0000 | add | `{000, carry, a+b}` |
| 0001 | subtract | `{000, carry, a-b}`, carry = 1 when a >= b |
| 0010 | multiply | `a*b`, 8 bits |
| 0011 | increment | `{000, carry, a+1}` |
| 0100 | decrement | `{000, carry, a-1}`, carry = 1 when a >= 1 |
| 0101 | AND | `{0000, a & b}` |
| 0110 | XOR | `{0000, a ^ b}` |
| 0111 | XNOR | `{0000, ~(a ^ b)}` |
| 1000 | NOT B | `{0000, ~b}` |
| 1001 | NAND | `{0000, ~(a & b)}` |
| 1010 | NOT A | `{0000, ~a}` (this design's assignment, see below) |
| 1011 | OR | `{0000, a | b}` |
| 1100 | NOR | `{0000, ~(a | b)}` |
| 1101-1111 | none | `0` |

The encoding is defined once, as the enum `alu_op_e` in `rtl/alu_pkg.sv`.

**Subtraction and decrement need care.** The adder/subtractor does not
produce a signed result. It computes `a + ~b + 1` in 4 bits and puts the raw
carry out of the top bit into `y[4]`. With two's-complement subtraction that
carry is the inverse of a borrow. Some examples:

- 5 - 3 gives `y = 0001_0010`: bit 4 set (no borrow), difference 2.
- 3 - 5 gives `y = 0000_1110`: bit 4 clear (borrow), difference -2 in 4-bit two's complement.
- 5 - 1 (decrement) gives `y = 0001_0100`.

To read a signed difference, use `y[3:0]` as a 4-bit two's-complement value
and `!y[4]` as the borrow. Addition and increment use the same bit 4 as a
normal carry: 15 + 1 gives `0001_0000`.

## Structure

```
           a,b                                   control
            |                                       |
   +--------+-----------------+                     |
   |                          |                     |
 arith_unit                logic_unit <-------------+
   add   rev_addsub4 (s=0)    4 x (TSG + BJN)       |
   sub   rev_addsub4 (s=1)        |                 |
   inc   rev_addsub4 (b=1,s=0)    |                 |
   dec   rev_addsub4 (b=1,s=1)    |                 |
   mul   vedic_mult4              |                 |
   |                              |                 |
   +----------> alu_mux <---------+-----------------+
                   |
                out_reg (rising edge, sync reset)
                   |
                   y
```

The arithmetic unit and the logic unit both run on every operand pair.
`control` goes only to the multiplexer and to the logic unit's gate
controls. The arithmetic unit holds five independent datapaths: four
adder/subtractor instances and one multiplier. This costs area but keeps the
control out of the arithmetic paths. Sharing one adder/subtractor for add,
subtract, increment and decrement is an easy change if area matters more.

## The gate library

| module | size | outputs | used for |
|---|---|---|---|
| `feynman_gate` | 2x2 | P=A, Q=A^B | complementing B when subtracting (A is the mode line) |
| `peres_gate` | 3x3 | P=A, Q=A^B, R=AB^C | with C=0: AND on R, half adder (sum Q, carry R) |
| `hng_gate` | 4x4 | P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D | with D=0, C=carry in: full adder (sum R, carry S) |
| `tsg_gate` | 4x4 | P=A, Q=A'C'^B', R=Q^D, S=QD^(AB^C) | logic operations picked by C and D |
| `bjn_gate` | 3x3 | P=A, Q=B, R=(A+B)^C | OR (C=0), NOR (C=1) |

(`'` is complement, `^` XOR, `+` OR.)

## Adder/subtractor (`rev_addsub4`)

Four HNG gates form a ripple-carry chain. A mode line `s` drives two things:

- four Feynman gates, which XOR each bit of `b` with `s`;
- the carry into bit 0.

With `s = 0` the chain adds `a + b`. With `s = 1` it computes `a + ~b + 1`.
The 5-bit output is the 4-bit sum plus the final carry. `rev_rca` is the same
chain without the complement stage. It is parameterised by width and feeds
the multiplier.

## Vedic multiplier (`vedic_mult2`, `vedic_mult4`)

**2x2 (`vedic_mult2`).** This multiplier uses six Peres gates, all with C = 0:

- Four gates form the partial products a0b0, a1b0, a0b1 and a1b1 on their R outputs.
- The vertical term a0b0 is bit 0 of the product.
- The two crosswise terms a1b0 and a0b1 go into a Peres half adder. Its sum is bit 1.
- Its carry and the vertical term a1b1 go into a second half adder. That gives bits 2 and 3.

**4x4 (`vedic_mult4`).** Each operand is split into a high half and a low
half. Four 2x2 multipliers form:

    p0 = a[1:0]*b[1:0]   p1 = a[1:0]*b[3:2]
    p2 = a[3:2]*b[1:0]   p3 = a[3:2]*b[3:2]

Then:

- `q[1:0] = p0[1:0]`.
- Adder 1 (4 bits) computes `p0[3:2] + p1`, at most 12.
- Adder 2 (6 bits) computes `p2 + (p3 << 2)`, at most 45.
- Adder 3 (6 bits) adds the two sums. The result is `q[7:2]`, at most 57.

Together this is `a*b = p0 + 4*(p1 + p2) + 16*p3`. The adders are HNG
ripple-carry chains. Their widths are the smallest that cannot overflow, so
the carry outs of adders 2 and 3 are always 0 and go unused.

## Logic unit (`logic_unit`)

Each of the four bit positions has one TSG gate and one BJN gate. Their
control pins come from the operation code:

| operation | gate | C | D | output |
|---|---|---|---|---|
| AND | TSG | 0 | 0 | S |
| XOR | TSG | 0 | 0 | Q |
| XNOR | TSG | 0 | 1 | R |
| NOT B | TSG | 1 | 0 | Q |
| NAND | TSG | 1 | 0 | S |
| NOT A | TSG, A and B swapped | 1 | 0 | Q |
| OR | BJN | 0 | - | R |
| NOR | BJN | 1 | - | R |

These settings follow from the gate equations. With C=1 the TSG's Q output
becomes NOT of its B input, so swapping the operands in front of the gate
gives NOT A. A 4-bit select then picks the right gate output. For codes that
are not logic operations, the unit outputs 0.

## Timing and reset

All logic is combinational up to `out_reg`:

- `a`, `b` and `control` present at a rising `clk` edge produce their `y` right after that edge.
- That is one cycle of latency, and a new operation can start every cycle.
- `rst_n` is active low and synchronous. It clears `y` to 0.

## Where this RTL departs from or adds to its source description

The source describes the structure of each unit, the gate equations, the
operation table, the widths and the output register. The following are this
design's own choices:

- **Code 1010 is NOT A.** The source counts eight distinct logic operations,
  including a NOT, but lists NAND as the operation of both 1001 and 1010.
  This design uses 1010 for the missing complement, the partner of NOT B on 1000.
- **Reset.** `rst_n` is an addition. The source shows only a positive-edge
  output stage.
- **Result formats.** Narrow results are zero-extended to 8 bits. The raw
  carry is kept in bit 4 for add, subtract, increment and decrement (see above).
- **Unused codes.** Codes 1101-1111 give 0.
- **Unspecified internals.** These were not given by the source and are
  built the simplest way that fits it:
  - increment and decrement, as the adder/subtractor with B = 1;
  - the complement stage, as Feynman gates;
  - the 2x2 multiplier, as Peres gates;
  - the multiplier's three adders, as HNG ripple chains.
- **Not modelled.** The source's FPGA figures (about 6 ns delay, 37 slices on
  a Zynq-7020) are implementation results. The RTL does not model them.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each compares the module against an independent integer or truth-table model:

- the gates: all input patterns;
- the adders, multipliers and logic unit: all operand pairs;
- the multiplexer and register: random data.

`tb_rev_alu` is the end-to-end test. It does the following:

- resets the ALU and checks that `y` clears;
- runs both worked examples from the source: `0101 + 0110 = 00001011` and `0010 + 0011 = 00000101`;
- applies all 4096 combinations of `control`, `a` and `b` back to back, one per clock, and checks each result one cycle later;
- checks that every code was exercised, along with an add with carry out, a subtract with borrow, a decrement of 0 and a reset.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl rtl/alu_pkg.sv tb/tb_rev_alu.sv --top-module tb_rev_alu
./obj_dir/Vtb_rev_alu
```

Swap in any other `tb_<module>` to test one block. The package file must come
first on the command line. `-Irtl` lets Verilator find the other modules by
their file names.
