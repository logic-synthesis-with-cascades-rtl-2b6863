# Reversible cascades from generalized Feynman gates and a new k*k gate family

A reversible gate has as many outputs as inputs and maps input vectors
one-to-one onto output vectors, so nothing it computes is ever lost. A
circuit built only from such gates has three constraints an ordinary netlist
does not have: every signal drives exactly one gate input (no fan-out), the
gates form a loop-free chain, and a function that is not itself a
permutation can only be produced with extra *constant inputs* and extra
unused *garbage outputs*. The simplest structure that respects all three is
a **cascade**: a bundle of lines that runs from left to right, each gate
taking some lines in and handing the same number of lines on.

This RTL implements two reversible gate families and the cascades that
realize sum-of-products (SOP), factorized SOP, EXOR-of-SOPs, ESOP and
factorized ESOP functions with them, plus a three-gate full adder. It follows
the synthesis method published as *Logic Synthesis with Cascades of New
Reversible Gate Families*; which parts are taken from there and which are
choices made here is listed in [Departures and choices](#departures-and-choices).

Everything is combinational: no clock, no reset, no state. Each module is a
logic function of its input lines.

## The two gate families

**Generalized Feynman gate, `feynman_kk`.** k lines; the first k-1 pass
through, the last becomes the EXOR of all k:

    P_i = A_i (i < k),    P_k = A_1 ^ A_2 ^ ... ^ A_k

For k = 2 this is the ordinary controlled-NOT. It is reversible because
A_k = P_k ^ P_1 ^ ... ^ P_{k-1}. Its use here is to EXOR any number of
signals onto one line.

**New gate family, `newgate_kk`.** k lines; the first k-2 (A_1..A_{k-2})
pass through and feed a *control function* f = f_{k-2} of them. The last
two lines, A_{k-1} and A_k, are control lines and are transformed by
`newgate_core`:

    P_{k-1} = f A_{k-1} ^ A_k
    P_k     = f' A_k' ^ A_{k-1}'

For f = 0 the pair (A_{k-1}, A_k) = 00, 01, 10, 11 goes to 00, 11, 01, 10;
for f = 1 to 01, 11, 10, 00. Both are permutations of the four values, so
every gate of the family is reversible whatever f is. f may be any
function; the cascades need three forms, selected by the `KIND` parameter:
a product (`F_AND`), a sum (`F_OR`) or an EXOR (`F_XOR`) of literals. The
literals are given by two masks over the pass-through lines: `CARE` (which
lines take part) and `INV` (which enter complemented).

### Operating modes

What makes the gate useful is what it does with constants or one signal G on
its control lines. The input pair (A_{k-1}, A_k) is the *mode*:

| mode | P_{k-1}   | P_k        | used for |
|------|-----------|------------|----------|
| 00   | 0         | f          | start a cascade; the 0 is handed on as a constant |
| 01   | 1         | 1          | |
| 10   | f         | f'         | |
| 11   | f'        | 0          | |
| 0G   | G         | f + G      | OR a product into a running sum; P_{k-1} copies the sum |
| 1G   | f ^ G     | (f + G)'   | |
| G0   | f G       | f ^ G      | EXOR into a running sum; or AND with a factor |
| G1   | (f G)'    | G'         | |

Two of these carry the whole method:

- In **0G** the gate ORs its product into the running sum on A_k *and*
  leaves an exact copy of the incoming sum on P_{k-1}. That copy is the only
  way to fan a signal out in a reversible circuit, and the SOP cascades use
  it to let one partial sum feed two output branches.
- In **G0** the gate EXORs its term into the running sum (P_k) and the
  product of its term with the sum appears on P_{k-1}. If the two can never
  be 1 together, that line is a constant 0 and can stand in for the next
  gate's constant input, saving a constant and a garbage line at once.

## The cascades

All cascades keep every line as a port. `zero_in` are the constant lines
and must be driven 0 in normal use; `garbage` are the outputs the function
does not need; the primary lines come back out unchanged (`*_o`). Driven
with arbitrary values on *all* inputs, each cascade is a bijection, which
the testbenches check.

| module              | function                                          | gates | constants | garbage |
|---------------------|---------------------------------------------------|-------|-----------|---------|
| `mosop_cascade`     | F1 = BC'+AB'+A'B'C, F2 = BC'+AB'+A'BC, F3 = AB'+A'BC+AC' | 6 | 6 | 3 |
| `fsop_cascade`      | (x1+x2)(x3+x4) + x1x2 + x3x4 (two or more of four) | 4    | 4         | 3       |
| `exor_sops_cascade` | F1 ^ F2 ^ F3                                      | 6 + Feynman | 6   | 5       |
| `esop_cascade`      | BC' ^ AB' ^ A'B'C                                 | 3     | 2         | 1       |
| `fesop_cascade`     | (x1^x2)(x3^x4) ^ x1x2 ^ x3x4 (pairwise EXOR)       | 4     | 4         | 3       |
| `rev_full_adder`    | S = A^B^Ci, Co = (A^B)Ci ^ AB                      | 2 + Feynman | 2   | 1       |
| `sop_graph_cascade` | any multi-output SOP, given its implementation graph | N_GATES | N_GATES (see below) | unread outputs |
| `sop_chain`         | OR of N_PROD products                             | N_PROD | N_PROD   | N_PROD-1 |
| `esop_chain`        | EXOR of N_PROD products, R zero lines reused      | N_PROD | N_PROD-R | N_PROD-1-R |

Pass-through primary lines are not counted as garbage.

### Multi-output SOP with shared products (`mosop_cascade`)

A classical SOP network simply lets the gate for AB' drive all three OR
gates. Here it cannot, so the products are arranged in a *connectivity
tree*: the product used by most outputs at the root, then the others in
decreasing order of use, so that OR-ing the products along each path gives
one output. A node may have only one incoming edge, so a product needed on
two paths is duplicated (A'BC appears twice). The tree becomes an
*implementation graph* of gates, all in mode 0G except the first (00):

    AB' --> BC' --+--(P_k:  BC'+AB')------> A'B'C --(P_k)-------> F1
                  |                              \--(P_{k-1} copy)--> A'BC --> F2
                  +--(P_{k-1} copy: AB')--> A'BC --> AC' ----------------------> F3

The first gate's P_{k-1} is a constant 0 and serves as the A_{k-1} of the
second gate. Where a tree node has two children, the P_{k-1} copy of the
gate feeds the second child. The three copies that nobody reads are the
garbage lines.

### Any implementation graph (`sop_graph_cascade`)

`sop_graph_cascade` takes the implementation graph itself as parameters,
so one module covers every multi-output SOP cascade of this kind. Gates are
listed in cascade order; for gate g:

- `CARE[g]`, `INV[g]`: its product;
- `SRC[g]`: the parent gate, or a negative value for a root (mode 00);
- `SIDE[g]`: 1 to hang on the parent's running sum (P_k), 0 to hang on the
  parent's copy line (P_{k-1});
- `OUT_GATE[o]`: the gate whose P_k is output o.

A root's constant-0 P_{k-1} becomes the A_{k-1} of the next gate in cascade
order. Every gate output that nothing reads is brought out as garbage, and
the numbers of constant and garbage lines (`N_CONST`, `N_GARB`) are derived
from the graph; with each root followed by another gate there are exactly as
many constants as gates. Elaboration fails if a parent is listed after its
child or one output is read twice. The defaults are the graph above. The
testbench also builds the 2-bit adder (3 outputs) from 11 products in three
chains (11 gates, 11 constants, 8 garbage lines) and the 5-input ones
counter from 31 products (31 gates, 31 constants, 28 garbage lines).

`sop_chain` is the single-output case: the graph is a path, so N products
take N gates, N constants and leave N-1 garbage lines. Its products are
parameters (`CARE[i]`, `INV[i]` per gate).

### Factorized SOP (`fsop_cascade`)

With a sum as the control function a gate can produce a factor. The first
gate (mode 00, f = x1+x2) puts x1+x2 on P_k; the second (f = x3+x4) takes
it on A_{k-1} with the first gate's 0 on A_k, i.e. mode G0, and its
P_{k-1} is the product (x1+x2)(x3+x4). Two more gates in mode 0G OR in x1x2
and x3x4.

### EXOR of SOPs (`exor_sops_cascade`)

The three SOP outputs of `mosop_cascade` go into one 3*3 generalized
Feynman gate, whose last line carries F1 ^ F2 ^ F3. Since the Feynman gate
can have any number of lines, any number of SOPs can be summed the same way.

### ESOP and the reused zero line (`esop_cascade`, `esop_chain`)

In an ESOP cascade every gate after the first runs in mode G0: the running
EXOR travels on A_{k-1}, constant 0 on A_k. For BC' ^ AB' ^ A'B'C the second
gate's P_{k-1} is BC' AB', which is always 0 (B and B'), so it is wired to
the third gate's A_k in place of a fresh constant. Ordering the products to
create such zero lines is how the ESOP cascades save constants and garbage.
`esop_chain` generalizes this: `ZREUSE[i]` marks the gates whose product
line is known to be 0 and is reused; the port widths follow from the mask
(`N_CONST`, `N_GARB` are derived parameters). Both modules assert that every
reused line is 0 whenever the constant inputs are 0. The parity of five
inputs, written as the EXOR of its 16 disjoint odd-weight minterms, reuses
all 15 product lines and needs only 2 constants and 1 garbage line.

### Factorized ESOP (`fesop_cascade`)

The same as the factorized SOP with EXOR control functions: x1^x2 (mode 00),
x3^x4 (mode G0 gives the product), then x1x2 and x3x4 EXORed in by mode G0.

### Full adder (`rev_full_adder`)

Two 3*3 new gates with f = B and f = Ci, both in mode G0, followed by a 2*2
Feynman gate:

    gate 1: A on A_{k-1}, 0 on A_k  ->  P_{k-1} = AB,         P_k = A^B
    gate 2: A^B on A_{k-1}, 0 on A_k ->  P_{k-1} = (A^B)Ci,   P_k = S
    Feynman: Co = AB ^ (A^B)Ci, AB passes through as garbage

Three gates, two constants, one garbage output; B and Ci pass through.

## Module hierarchy

    rev_cascades_top            all cascades side by side, each with its own ports
    |- mosop_cascade            6 x newgate_kk
    |- fsop_cascade             4 x newgate_kk
    |- exor_sops_cascade        mosop_cascade + feynman_kk (K=3)
    |- esop_cascade             3 x newgate_kk
    |- fesop_cascade            4 x newgate_kk
    |- rev_full_adder           2 x newgate_kk (K=3) + feynman_kk (K=2)
    |- sop_chain                N_PROD x newgate_kk
    |- esop_chain               N_PROD x newgate_kk
    '- sop_graph_cascade        N_GATES x newgate_kk
    newgate_kk                  control function f + newgate_core
    rev_pkg                     f_kind_e (F_AND, F_OR, F_XOR)

The cascades are independent examples; they share no lines, and the top
only gathers them with prefixed ports (`mo_`, `fs_`, `xs_`, `es_`, `fe_`,
`fa_`, `sc_`, `ec_`, `sg_`).

Bit conventions: in a `K`-line gate, `a_thru[i-1]` is A_i; in the A, B, C
cascades, bit 0 is A, bit 1 is B, bit 2 is C; in the x1..x4 cascades,
`x[i-1]` is x_i.

## Simulating

Every gate and cascade module has a self-checking testbench in `tb/` named `tb_<module>`
that prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/rev_pkg.sv tb/tb_rev_cascades_top.sv --top-module tb_rev_cascades_top
    ./obj_dir/Vtb_rev_cascades_top

Replace the testbench name for any other module. The testbenches apply every
input value (the designs are small enough), compare the function outputs
with references computed independently in the testbench (integer sums,
counts of ones, literal-by-literal products), check the number of constant
and garbage lines, and, for all but the largest instances, drive all lines
including the constants to check that the outputs are all different. `tb_rev_cascades_top` runs the top at
its default parameters, also adds 8-bit numbers through the full adder one
bit at a time, and counts that each mechanism (shared product, fan-out copy,
sum factor, EXOR of three SOPs, cancelling ESOP terms, carry ripple, reused
zero line) actually happened. `tb_sop_chain` and `tb_esop_chain` include the
five-input parity function (16 products) as a larger instance, and
`tb_sop_graph_cascade` the 2-bit adder and the 5-input ones counter.

To build a new cascade, instantiate `sop_chain` or `esop_chain` with your
own `N_VARS`, `N_PROD`, `CARE` and `INV` (packed arrays, element i is
product i, gate order = element order), give `sop_graph_cascade` an
implementation graph (see `tb_sop_graph_cascade` for two worked graphs), or
wire `newgate_kk` instances by hand following the mode table.

## Departures and choices

- **Inverters on the primary lines.** The published cascade drawings place
  1*1 NOT gates on the lines A, B, C between gates so that each gate sees
  the literals it needs, with the lines restored at the end. Here that
  inversion is folded into each gate's `INV` mask, which computes the same
  control function and leaves the primary lines unchanged through every
  gate.
- **Gate internals.** `newgate_core` is written from the two output
  equations, not from a gate-level drawing; the equations agree with the
  gate's truth table and with all eight operating modes.
- **Control function forms.** The gate family allows any f; only products,
  sums and EXORs of literals are provided, the three forms the synthesis
  methods use.
- **Wiring choices.** Which of F1, F2, F3 enters the last line of the Feynman
  gate in `exor_sops_cascade` is a choice made here, and in the full adder AB
  is taken as the product that passes through the Feynman gate; swapping
  either changes only which line is garbage, not the functions or the line
  counts.
- **No graph builder.** The published results for 36 MCNC benchmark
  functions come from a software program that turns minimized SOP covers
  into connectivity trees and implementation graphs. That program is not
  hardware and is not reproduced, and the benchmark covers are not included.
  `sop_graph_cascade` realizes any graph it is given; only the 2-bit adder,
  the 5-input ones counter and the 5-input parity function, whose covers are
  easy to write down, are simulated here, and all three reproduce the
  published gate, constant and garbage counts.
- **Factorized multi-output forms.** Multi-output factorized SOPs and EXORs
  of factorized SOPs are only built as the fixed examples; the graph module
  handles product nodes in mode 0G, not sum factors.
- **Zero-line detection.** `esop_chain` does not find which product lines are
  identically 0; the `ZREUSE` mask says so, and assertions check it in
  simulation.
- **No timing.** The gates are treated as ideal logic functions; there is no
  delay model, clock or pipelining.
