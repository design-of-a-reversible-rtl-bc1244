# Reversible bidirectional arithmetic/logical barrel shifter

This is an (n,k) barrel shifter built only from *reversible* gates. Every gate
maps its inputs one-to-one onto its outputs, so the circuit as a whole is a
bijection and in principle erases no information. It does four operations in
a single combinational pass:

| `sra` | `sla` | `left` | operation              | result `o`                          |
|:-----:|:-----:|:------:|------------------------|-------------------------------------|
| 0     | 0     | 0      | logical right shift    | `i >> s`                            |
| 1     | 0     | 0      | arithmetic right shift | `i >>> s` (signed)                  |
| 0     | 0     | 1      | logical left shift     | `i << s`                            |
| 0     | 1     | 1      | arithmetic left shift  | `{i[n-1], (i << s)[n-2:0]}`         |

The default size is n = 8 data bits and k = 3 select lines (shift 0..7). Both
are parameters (`N`, `K`), and sizes from (4,2) up to (64,6) have been
simulated.

The RTL is a gate-level netlist: each reversible gate is a module instance.
Being synthesizable, it also gives an ordinary irreversible implementation
of the same function. What it really is, though, is an exact executable model
of the reversible circuit. That model includes the circuit's *ancilla* inputs
(constant-0 helper inputs) and its *garbage* outputs (outputs kept only so the
mapping stays one-to-one).

## The two gates

* **Feynman gate** (`feynman_gate`, CNOT): `(a, b) -> (a, a ^ b)`. Reversible
  logic forbids fan-out, so a wire cannot drive two gate inputs. With `b`
  tied to a constant 0 the gate yields two copies of `a`. That is its only use
  here, and each use costs one ancilla input.
* **Fredkin gate** (`fredkin_gate`, controlled swap):
  `(a, b, c) -> (a, a ? c : b, a ? b : c)`. Each data output is a 2:1 mux.
  The shifter uses one output as its mux and usually throws the other away
  as garbage. The control `a` comes out unchanged on `p`, so one select line
  can be threaded from gate to gate along a whole row with no fan-out.

Both gates are their own inverse. The cost model counts a Feynman gate as 1
and a Fredkin gate as 5 quantum primitives (NOT, controlled-V, controlled-V+).
Those primitives are not modelled: V on a basis state gives a superposition,
which has no two-valued logic function.

## Data path

```
 i ──► data reversal I ──► [ARS control] ──► Stage I ──► Stage II ──► Stage III ──► [ALS control] ──► data reversal II ──► o
        (left)               (sra)           >>4 (S2)    >>2 (S1)     >>1 (S0)        (sla)             (left)
```

Only the core can shift, and only to the right. The other units adapt it to
the four operations.

### Left shifts by mirroring (`data_reversal_unit`)

A left shift by s equals: reverse the bit order, shift right by s, reverse
again. Each reversal unit is a row of n/2 Fredkin gates. Gate j takes the
mirrored pair `(d[n-1-j], d[j])` and swaps it when `left = 1`. The `left`
line threads through unit I and then goes on to unit II. It leaves unit II
as a garbage bit. The same module is used for both units.

### Shifter core (`shifter_unit`, `shifter_stage`)

This is a logarithmic shifter. Stage t shifts right by 2^(k-1-t) when its
select bit `s[k-1-t]` is 1, so the largest shift comes first. A stage that
shifts by w is one row of n Fredkin gates on its select line. Gate j picks
`d[j]` ("stay") or `d[j+w]` ("move"). A bit at position j ≥ w is needed by two
gates, so a Feynman gate copies it first. That is n − w copiers per stage. The
top w gates get their "move" input from fill bits. Each stage has n + 1
garbage outputs: one unused mux output per gate, plus the select line leaving
the last gate.

### Sign handling: the subtle part

* **Arithmetic right shift control (`ars_control_unit`).** A Feynman gate
  copies the MSB, which is the sign bit. One copy goes on into the shifter.
  The other meets a Fredkin gate controlled by `sra` whose other data input is
  a constant 0, so one output is `sra & sign`. A chain of 2^k − 2 Feynman gates
  then makes 2^k − 1 copies of this fill bit. That is one per position any
  stage can vacate (4 + 2 + 1 for k = 3), and the stage shifting by w takes
  `fill[w-1 +: w]`. So a logical shift fills with 0 and an arithmetic one with
  the sign.
* **Arithmetic left shift control (`als_control_unit`).** In the mirrored
  word, the original sign bit sits at bit 0. After the right shift, bit 0
  becomes the result's MSB once mirrored back. A Feynman gate copies bit 0
  before the shift. After the shift, a Fredkin gate controlled by `sla` puts
  that copy back in the LSB. The net effect: the sign stays in place, and bits
  `n-2..0` shift left, filling with 0. Note that this is *not* `<<<`, which in
  SystemVerilog is the same as `<<`.

### Control settings outside the table

`sra = 1` with `left = 1`, or `sla = 1` with `left = 0`, are not operations of
the design, and there is no decoder to block them. The circuit still gives a
well-defined, reversible result, which the testbench checks against a
step-by-step model of the data path. Example: with `sra = 1, left = 1`, the
vacated bits at the bottom fill with copies of the word's LSB.

### Rotation

Rotation is not supported. Background descriptions of barrel shifters
mention left and right rotate. But this structure has no path that takes the
bits shifted out and feeds them back in, since fill bits come only from the
ARS control unit. Adding rotation would take another mux row or a different
fill source.

## Ancillas, garbage and cost

The top module exposes the reversible circuit's full interface. `anc` are the
ancilla inputs, which must be held at 0. `garbage` are the garbage outputs.
Their widths come from functions in `rbs_pkg`:

| quantity          | formula                                   | (8,3) |
|-------------------|-------------------------------------------|------:|
| Feynman gates     | 2^k + Σ_{m=0}^{k-1} (n − 2^m)              | 25    |
| Fredkin gates     | n(k+1) + 2                                | 34    |
| garbage outputs   | k(n+1) + 5                                | 32    |
| ancilla inputs    | Feynman gates + 1                         | 26    |
| quantum cost      | 5·Fredkin + Feynman                       | 195   |

At (8,3) the circuit has 8 + 3 + 3 + 26 = 40 inputs and 8 + 32 = 40 outputs.
Synthesizing the (8,3) top gives 25 XOR cells (the Feynman gates) and
136 AND plus 68 OR cells. That is 34 Fredkin gates at 4 AND and 2 OR cells
each, so the netlist matches the formulas.

Ancilla bit order, LSB first: ARS control (2^k bits: sign copier, Fredkin
constant, then the fill copiers), shifter stages (first stage lowest), ALS
control (1 bit). Garbage order: shifter stages (n+1 each, first stage
lowest), ARS control (2), ALS control (2), `left` line leaving reversal
unit II (1).

## Timing

The circuit has no clock, reset or state. `o` is a combinational function of
the inputs, so one shift completes per cycle of any clocked logic around it.
The longest path runs through the two reversal rows, the k shifter rows and the ALS gate, plus the copiers. Note that a
row's select line ripples through its n gates' pass-through outputs, which is
only wiring in CMOS.

## Files

`rtl/` (one module or package per file):

* `rbs_pkg.sv`: cost and port-width functions, operation encoding
* `fredkin_gate.sv`, `feynman_gate.sv`: the two reversible gates
* `data_reversal_unit.sv`: n/2-gate conditional bit reversal
* `ars_control_unit.sv`: sign copy and fill-bit generation
* `shifter_stage.sv`: one conditional right shift by a constant
* `shifter_unit.sv`: k stages
* `als_control_unit.sv`: sign-preserving LSB patch
* `rev_barrel_shifter.sv`: top, parameters `N` (default 8) and `K` (default 3)

`tb/`: each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_<module>.sv` for each module, mostly exhaustive.
* `tb_rev_barrel_shifter.sv`: the top at its defaults. It tries all 16384
  combinations of data, shift amount and control. It checks the four
  operations against SystemVerilog shift operators, and it checks that no two
  inputs produce the same {o, garbage}. It also checks the ancilla and garbage
  counts and the cost formulas, and counts how often each mechanism fired.
* `tb_rbs_tables.sv` (with checker `tb_rbs_config.sv`): runs all fifteen
  sizes from (4,2) to (64,6). At each size it checks random operations and
  compares the garbage, ancilla and quantum-cost numbers with tabulated
  values. It also proves that the (4,2) circuit is a bijection on all 2^19
  input patterns, including the ancillas.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rbs_pkg.sv \
    tb/tb_rev_barrel_shifter.sv --top-module tb_rev_barrel_shifter -Mdir obj -o sim
./obj/sim
```

For another size, instantiate `rev_barrel_shifter #(.N(n), .K(k))` and size
`anc` and `garbage` with `rbs_pkg::ancilla_count(n,k)` and
`rbs_pkg::garbage_count(n,k)`. The top requires n even, n ≥ 4 and
2^(k-1) < n, and checks this at elaboration.

## Where this RTL makes its own choices

These follow from the structure rather than being stated for it:

* **Port interface.** Ancillas and garbage are exposed as ports, and their
  bit order is a choice made here. Port names are also chosen here.
* **ARS fill copiers.** They are chained linearly instead of as a fan-out
  tree. This gives the same number of gates and ancillas but a longer chain.
* **Fredkin pin assignments in the ARS and ALS units.** The gate's function
  fixes what each unit must compute, but not which data pin carries what.
* **Arithmetic left shift.** It is taken as "keep the sign bit, shift the
  rest", as described above.
