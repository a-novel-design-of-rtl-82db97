# Reversible 4×4 multiplier from Peres gates

A reversible gate maps its inputs to its outputs one-to-one, so no information
is erased. Landauer's principle says that every erased bit costs at least kT·ln2 of
energy, and a circuit built only from such gates avoids that cost. It pays
instead with extra *constant inputs* (ancilla lines tied to 0) and *garbage
outputs* (results that are kept only so that the mapping stays reversible).
Designs of this kind are compared by gate count, quantum cost (the number of
1×1/2×2 quantum primitives needed to build each gate), depth, constant inputs
and garbage outputs.

This RTL describes a 4×4 unsigned multiplier that uses only two gate types,
both derived from the 3×3 **Peres gate**:

* the partial products come from 16 Peres gates and no copying gates;
* the four shifted partial-product rows are added by a **carry-save tree**
  followed by a short ripple **carry-propagate adder**. The full adders in it
  are **Peres full adder gates (PFAG)** and the half adders are Peres gates.

| figure                       | value                        |
|------------------------------|------------------------------|
| gates                        | 28 (16 + 4 Peres, 8 PFAG)    |
| constant-0 inputs            | 28 (one per gate)            |
| quantum cost (PG 4, PFAG 6)  | 16·4 + 8·6 + 4·4 = 128       |
| depth (PG 2, PFAG 4)         | 2+4+4+2+4+4+4 = 24           |
| garbage outputs in this RTL  | 40 (see *Garbage*)           |

In hardware terms the whole thing is combinational: `prod = x * y` settles
after the inputs change. There is no clock, reset or handshake. The
simulation and synthesis view is ordinary two-valued logic; reversibility
shows up in the structure (every gate is a bijection) and can be checked
on the outputs (no two input pairs give the same `{prod, garbage}`).

## The two gates

**Peres gate (PG)**, `rtl/peres_gate.sv`, 3 inputs → 3 outputs:

    P = A        Q = A ^ B        R = (A & B) ^ C

It is a Toffoli gate followed by a CNOT from A to B, and its quantum cost is 4
where the Toffoli's is 5. With `C = 0` it gives `A & B` on R and `A ^ B` on Q,
so it works both as an AND for a partial product and as a half adder
(Q = sum, R = carry).

**Peres full adder gate (PFAG)**, `rtl/pfag.sv`, 4 → 4:

    P = A    Q = A ^ B    R = A ^ B ^ C    S = ((A ^ B) & C) ^ (A & B) ^ D

It is two Peres gates in cascade. The first, on (A, B, D), makes A^B and
AB^D. The second, on (A^B, C, AB^D), makes the sum and the carry. With
`D = 0`, R is the full-adder sum and S the carry-out; P and Q are garbage. Its
optimized quantum realization costs 6 with depth 4. Those figures are used in the
tallies; the RTL models the gate's logic, not its quantum circuit.

## Partial products without copying gates

`rtl/ppgc.sv` (partial product generation circuit) makes the N² products
`x[i] & y[j]` with one Peres gate each, constant input `C = 0`:

    gate (i, j) = PG(A = y[j] line, B = x[i], C = 0)
        R -> pp[j*N+i] = x[i] & y[j]
        Q -> garbage    = x[i] ^ y[j]
        P -> y[j] line, on to gate (i+1, j)

A Peres gate passes A through unchanged, so each `y[j]` runs as one line through
the four gates of its row and leaves as garbage at the end. No Feynman (copy)
gate is used, which is where this design saves quantum cost over Peres/Fredkin
arrays that copy each operand bit first.

This is the subtle part. A Peres gate rewrites its B line to `A ^ B`, and
the product of a Peres gate with `C = 0` is exact only when its A and B lines
carry a bare `x[i]` and a bare `y[j]`. So with 16 Peres gates and no copying,
both operands cannot be passed along intact. Each gate uses up one bare
operand line, and eight lines cannot supply sixteen products. One operand therefore drives
several gates. Here each `x[i]` feeds the B input of one gate per row. That
is a fan-out of a primary input. It is fine in CMOS, but a strictly reversible
(quantum) realization would need either copies of `x` or a different gate
arrangement. The gate count and cost figures above assume no copies, as the
design intends.

`N` is a parameter (default 4). The PPGC is regular and works at any size.
The adder below is written for 4×4 only.

## The adder: carry-save tree, then carry-propagate

`rtl/rpa.sv` (reversible parallel adder) sums four shifted rows. By weight 2^0
to 2^6, the columns hold 1, 2, 3, 4, 3, 2, 1 partial products. Write `pp_ij` for
`x[i] & y[j]`, FA for a PFAG with `D = 0` and HA for a Peres gate with `C = 0`:

| weight | carry-save cells                                       | CPA cell                                     | product |
|--------|--------------------------------------------------------|----------------------------------------------|---------|
| 2^0    | –                                                      | –                                            | P0 = pp_00 |
| 2^1    | ha1(pp_10, pp_01)                                      | –                                            | P1 |
| 2^2    | fa2(pp_20, pp_11, pp_02); ha2(fa2.s, ha1.c)            | –                                            | P2 |
| 2^3    | fa3a(pp_30, pp_21, pp_12); fa3b(pp_03, fa3a.s, fa2.c)  | ha3(fa3b.s, ha2.c)                           | P3 |
| 2^4    | fa4(pp_31, pp_22, pp_13); ha4(fa4.s, fa3a.c)           | cpa4(ha4.s, fa3b.c, ha3.c)                   | P4 |
| 2^5    | fa5(pp_32, pp_23, fa4.c)                               | cpa5(fa5.s, ha4.c, cpa4.c)                   | P5 |
| 2^6    | –                                                      | cpa6(pp_33, fa5.c, cpa5.c)                   | P6, carry = P7 |

The carry-save part reduces each column to at most two bits. Columns 2^0–2^2
finish inside it. The ripple CPA over 2^3–2^6 (one half adder, three
PFAGs) adds the two remaining rows, and its carry-out is P7. The total is
8 PFAGs and 4 half adders: each full adder removes one bit, and 16 partial
products must become 8 product bits.

With Peres depth 2 and PFAG depth 4, the longest path runs partial product →
fa3a → fa3b → ha3 → cpa4 → cpa5 → cpa6, which is 2+4+4+2+4+4+4 = 24. Every other
input of the CPA arrives before the ripple carry reaches it: col 2^4 inputs at 8
and 10 against a carry at 12, and col 2^5 at 8 and 10 against 16.

The cell placement in the table is this implementation's own. What it is built to
meet is the design's: gate types, 8 + 4 gate counts, a carry-save tree down to two
operands followed by a CPA, and a critical path made of a partial-product gate, two
full-adder levels, a half adder and three rippling full adders.

## Garbage

`rev_mult4x4.garbage` brings out every gate output that is neither a product
bit nor used by another gate. Together with `prod`, it is a one-to-one
function of `{x, y}`:

| bits        | source | content |
|-------------|--------|---------|
| `[15:0]`    | PPGC   | Q of gate (i,j) = `x[i] ^ y[j]`, index `j*4+i` |
| `[19:16]`   | PPGC   | `y[j]` line after row j |
| `[35:20]`   | RPA    | P, Q of fa2, fa3a, fa3b, fa4, fa5, cpa4, cpa5, cpa6 |
| `[39:36]`   | RPA    | P of ha1, ha2, ha3, ha4 |

The RPA's 20 garbage bits match the count expected of this structure (two
per PFAG, one per half adder). The PPGC leaves 20 rather than the 8 that
a total of 28 garbage outputs implies. The count depends on how the
partial-product gates are wired to lines, and this wiring (above) is not
the only possible one.

## Where this RTL departs from, or adds to, the reference design

* **PPGC wiring.** The exact line assignment of the 16 Peres gates is this
  implementation's, and it relies on fanning out `x` (see above). As a result
  the garbage count is 40, not 28.
* **RPA cell placement.** Its own, chosen to meet the stated gate counts and
  the depth of 24 (see above).
* **Circuit cost.** Built as two Peres gates, a PFAG has 4 XOR and 2 AND
  terms. The reference tallies 5 XOR + 2 AND per PFAG (80 XOR + 36 AND for the
  whole multiplier), so this build's count is 72 XOR + 36 AND. The function is
  the same.
* **Size.** Only the 4×4 multiplier is built. The structure extends to n×n
  (the PPGC already takes `N`), but no n×n adder tree is given here.
* **Timing.** Quantum depth is a gate-level measure, not a clock count. The
  RTL has no registers.

## Files

| file | contents |
|------|----------|
| `rtl/rev_pkg.sv`      | widths, gate costs, tallies of the 4×4 multiplier |
| `rtl/peres_gate.sv`   | 3×3 Peres gate |
| `rtl/pfag.sv`         | Peres full adder gate, two Peres gates |
| `rtl/ppgc.sv`         | partial products, N² Peres gates (parameter `N`, default 4) |
| `rtl/rpa.sv`          | 4×4 carry-save tree + ripple CPA, 8 PFAG + 4 PG |
| `rtl/rev_mult4x4.sv`  | top: `ppgc` → `rpa` |
| `tb/tb_*.sv`          | one self-checking testbench per module |

Top ports: `x[3:0]`, `y[3:0]` in; `prod[7:0]`, `garbage[39:0]` out.

## Simulating

Each testbench is self-checking and exhaustive. It ends by printing
`TB_RESULT checks=<n> failures=<m>`:

* `tb_peres_gate`, `tb_pfag`: all input patterns, outputs against integer
  arithmetic, and all outputs distinct (the gate is reversible);
* `tb_ppgc`: all 256 operand pairs, every product and garbage bit, plus
  500 random pairs on a 6×6 instance;
* `tb_rpa`: all 2^16 partial-product patterns, including ones no
  multiplication produces, against the weighted bit sum;
* `tb_rev_mult4x4`: all 256 operand pairs through the whole multiplier. It
  checks `prod == x*y`, the PPGC garbage, that `{prod, garbage}` never repeats,
  and the structure tallies. It also counts how often each carry-save carry
  fires, how often a carry ripples through the whole CPA, and how often P7 is
  set, and fails if any of them never happens.

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv \
        tb/tb_rev_mult4x4.sv --top-module tb_rev_mult4x4 -y rtl
    ./obj_dir/Vtb_rev_mult4x4

Replace the testbench name to run the others. Each finishes in well under a
second.
