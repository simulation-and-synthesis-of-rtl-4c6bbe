# Reversible combinational shifter

A combinational shifter sits between an ALU and the output bus and, in the
same clock cycle, either passes the ALU word through, shifts it one place
right or left, or blocks it with zeros. The usual way to build it is one 4:1
multiplexer per output bit, all sharing a two-bit select. This design builds
those multiplexers out of *reversible* gates: gates with as many outputs as
inputs whose outputs always determine their inputs uniquely, so that no
information (and, in principle, no Landauer energy kT ln 2 per bit) is
destroyed. Two variants are provided:

* **Design-1**: every multiplexer is one Feynman (CNOT) gate and three Fredkin
  gates, with one constant-0 input.
* **Design-2**: every multiplexer is three Fredkin gates and needs no
  constant input. It has the lower gate count.

Both have the same function. The top module puts them side by side so they
can be compared.

## Operation

The select is `h = {H1, H0}`. Bit 0 is the least significant bit.

| `h` | operation    | result `s`                 |
|-----|--------------|----------------------------|
| 00  | transfer     | `f`                        |
| 01  | shift right  | `{ir, f[N-1:1]}`           |
| 10  | shift left   | `{f[N-2:0], il}`           |
| 11  | zero         | `0`                        |

`ir` and `il` are serial inputs for the bit left empty by a shift. Tie them to
0 for a logical shift. For an arithmetic right shift, drive `ir` with
`f[N-1]`. The codes are the `shift_op_e` enum in `rtl/shifter_pkg.sv`.
Multiplexer input *k* of every bit is the source for operation *k*, so the
enum values also serve as the multiplexer input indices.

The circuit is purely combinational: no clock and no state. The result
settles after the delay through two levels of Fredkin gates. In Design-1 there
is also a Feynman gate in front of one of them.

## The two gates

**Feynman (CNOT)**, `feynman_gate`: (A, B) → (A, A⊕B). With B = 0 it copies
A. Reversible logic allows no plain fan-out, so this is how a signal is used
twice. Quantum cost 1.

**Fredkin (controlled swap)**, `fredkin_gate`: (A, B, C) → (A, A'B+AC,
AB+A'C). When A = 1 it swaps B and C. Read as a 2:1 multiplexer, Q = A ? C : B
is the selected bit, R is the rejected bit, and P hands the select on to the
next gate. The gate is its own inverse. It is also conservative: it keeps the
number of ones. Quantum cost 5.

## The reversible 4:1 multiplexer: where the lines go

This is the part that takes some reading. A 4:1 multiplexer is a tree of
three 2:1 multiplexers. The first level, controlled by H0, picks `d[0]`/`d[1]`
and `d[2]`/`d[3]`. The second level, controlled by H1, picks between those two
results. Each 2:1 multiplexer is one Fredkin gate. The difficulty is that H0
must control two gates without fanning out.

* **Design-2** (`rev_mux4_fredkin`) chains H0: the P output of gate `f1` is
  the control input of gate `f2`.
  Inputs (6): H0, H1, `d[3:0]`.
  Outputs (6): `y`, H0 and H1 passed on, and the R outputs of `f1`, `f2` and
  `f3` (3 garbage).
* **Design-1** (`rev_mux4_feynman_fredkin`) copies H0 with a Feynman gate
  whose second input is the constant `anc = 0`. Each first-level gate gets
  its own copy.
  Inputs (7): H0, H1, `anc`, `d[3:0]`.
  Outputs (7): `y`, H0 (from `f1`'s P) and H1 passed on, and 4 garbage: the
  spare H0 copy from `f2`'s P and the three R outputs.

In both cells the whole output vector is a one-to-one function of the whole
input vector. The cell testbenches check this exhaustively. For Design-1 this
holds for `anc = 1` too, but the select is correct only when `anc = 0`.

**The select chain.** In the shifter, H0 and H1 do not fan out to the N
multiplexers either. They enter multiplexer 0, and each multiplexer's
pass-through outputs feed the next. Only the pair leaving the last
multiplexer is left over, and it counts as garbage. This gives the garbage
counts of the two designs:

| per N-bit shifter      | Design-1     | Design-2     |
|------------------------|--------------|--------------|
| gates                  | N Feynman + 3N Fredkin | 3N Fredkin |
| constant inputs        | N            | 0            |
| garbage outputs        | 4N + 2       | 3N + 2       |
| quantum cost           | 16N          | 15N          |
| N = 4 / 8 / 16 garbage | 18 / 34 / 66 | 14 / 26 / 50 |

The garbage bus of each shifter is brought out as a port. The multiplexer
garbage comes first, multiplexer 0 in the lowest bits, and the final H0 then
H1 are in the top two bits. That way nothing is dropped silently, and a tool
counting reversible lines sees them all.

**What is not reversible.** The data bits: `f[i]` feeds up to three
multiplexers (its own bit, the bit below for shift right and the bit above
for shift left) as ordinary wires. Input 3 of every multiplexer is a tied 0.
The gate counts above include no copying gates for the data. A fully
reversible shifter would need 2 more Feynman gates per bit to copy the data
and would produce more garbage. This design follows the lower counts.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/shifter_pkg.sv` | package | `shift_op_e` operation codes |
| `rtl/feynman_gate.sv` | `feynman_gate` | CNOT gate |
| `rtl/fredkin_gate.sv` | `fredkin_gate` | controlled-swap gate |
| `rtl/rev_mux4_feynman_fredkin.sv` | `rev_mux4_feynman_fredkin` | Design-1 4:1 multiplexer |
| `rtl/rev_mux4_fredkin.sv` | `rev_mux4_fredkin` | Design-2 4:1 multiplexer |
| `rtl/rev_shifter_d1.sv` | `rev_shifter_d1 #(N)` | Design-1 N-bit shifter |
| `rtl/rev_shifter_d2.sv` | `rev_shifter_d2 #(N)` | Design-2 N-bit shifter |
| `rtl/rev_shifter_top.sv` | `rev_shifter_top #(N)` | both shifters on shared inputs |

`N` (word width) defaults to 4 and works for any N ≥ 2. In each shifter,
`mux[i].m` is the multiplexer of output bit i. Inside it, `f1`, `f2` and `f3`
are the Fredkin gates and `fy` is the Feynman gate (Design-1 only).

Top-level ports of `rev_shifter_top`: `f[N-1:0]`, `h[1:0]`, `ir`, `il` in;
`s_d1[N-1:0]`, `garbage_d1[4N+1:0]`, `s_d2[N-1:0]`, `garbage_d2[3N+1:0]` out.

Synthesis tools see through the gate structure. A standard-cell flow turns
each Fredkin gate into a pair of 2:1 multiplexers, and the pass-through P
outputs become plain wires. The RTL describes the reversible netlist. It does
not produce reversible hardware from a conventional library. For that, map
`fredkin_gate` and `feynman_gate` onto the cells of a reversible or adiabatic
logic family.

## Design choices

These points are not fixed by the gate counts and function table above. They
were decided here:

* Bit order and direction: bit 0 is the LSB, and shift right moves towards
  it (a divide by two).
* The serial inputs `ir` and `il`. The alternative is to shift in zeros.
* The gate-level wiring inside each multiplexer, as described above. H0
  drives the first level and H1 the second.
* The select chain from multiplexer to multiplexer.
* The zero operation uses a tied-0 multiplexer input in both designs.
  "No constant inputs" for Design-2 refers to ancilla lines entering a gate
  as a control or target constant, of which it has none.
* Design-1's quantum cost is 16 per bit (one CNOT plus three Fredkin gates),
  so 64 at 4 bits. A figure of 96 for 4 bits is also quoted for this
  design; it does not match this gate mix.
* Both designs sit in one top on shared inputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_feynman_gate` and `tb_fredkin_gate` run exhaustively. They check the
  mapping, that the map is one-to-one, and for Fredkin that it is
  conservative and self-inverse.
* `tb_rev_mux4_fredkin` (64 vectors) and `tb_rev_mux4_feynman_fredkin` (128
  vectors) check the selected bit, the pass-through of the selects, and that
  no output vector repeats.
* `tb_rev_shifter_d1` and `tb_rev_shifter_d2` each test their shifter at
  N = 4 exhaustively, and at N = 8 and 16 with walking ones and random words.
  They also check the width of the garbage bus and the end of the select
  chain.
* `tb_rev_shifter_top` runs the top at its default size with no parameter
  changed, over all 256 input combinations. It checks both designs against
  the table and against each other, and compares every multiplexer's garbage
  lines with the inputs its Fredkin gates rejected. It counts each operation
  and each serial input actually shifted in, and fails if any count is zero.
* `tb_rev_shifter_table6` builds the top at 4, 8 and 16 bits. It compares the
  garbage-output counts with 18/34/66 and 14/26/50, then tests the function
  at each size.

Run any of them with plain Verilator from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/shifter_pkg.sv tb/tb_rev_shifter_top.sv --top-module tb_rev_shifter_top
./obj_dir/Vtb_rev_shifter_top
```

Each testbench finishes in well under a second.

Not covered: the area and power of a 45 nm standard-cell implementation, and
any transistor-level or adiabatic-circuit behaviour. The RTL is logic only.
