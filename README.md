# Multi-output ESOP functions as cascades of reversible k*k gates

In a reversible circuit every gate maps its input vector one-to-one onto its
output vector. Two rules follow that do not apply to ordinary logic: no
signal may fan out, and the circuit must be an acyclic chain of gates. This
RTL realizes multi-output ESOP functions (EXOR-sums of products) under those
rules. It uses a single family of k*k gates connected in a cascade. Products
shared between outputs are reused by copying partial sums inside the gates
themselves, so no signal ever needs a second fan-out.

Everything here is combinational. There is no clock and no reset, and the
outputs settle after one pass through the gate chain.

## The gate (`rev_gate`)

A k*k gate has k inputs and k outputs:

    P_1 .. P_{k-2} = A_1 .. A_{k-2}            (pass-through lines)
    P_{k-1}        = f  & A_{k-1}  ^ A_k
    P_k            = f' & A'_{k-1} ^ A'_k

Here f is a function of the pass-through lines. This RTL provides the two
forms the synthesis method needs:

* a product (AND) of selected lines, `F_TYPE = F_AND`;
* an EXOR-sum of selected lines, `F_TYPE = F_XOR`.

`F_MASK` selects the lines. Whatever f is, the pair (A_{k-1}, A_k) is mapped
one-to-one onto (P_{k-1}, P_k), so the gate is reversible. The testbench
checks this exhaustively.

The two control inputs choose the gate's role in a cascade. G is a signal
coming from an earlier gate:

| A_{k-1} A_k | P_{k-1} | P_k      | used for                                        |
|-------------|---------|----------|-------------------------------------------------|
| 0 0         | 0       | f        | starting a chain with a product                 |
| 0 1         | 1       | f'       |                                                 |
| 1 0         | f       | 1        |                                                 |
| 1 1         | f'      | 0        |                                                 |
| 0 G         | G       | f ^ G    | adding a product to a chain; P_{k-1} copies G   |
| 1 G         | f ^ G   | G'       |                                                 |
| G 0         | f & G   | f \| G   | multiplying a chain by f (factorized forms)     |
| G 1         | (f&G)'  | (f\|G)'  |                                                 |

The row that matters most is **0G**. There P_k is the running EXOR-sum with
the new product added, and P_{k-1} is an exact copy of the chain *before*
the product. That copy is the only way to fan out in this design: one
partial sum can continue along two branches.

## From ESOP to cascade (`esop_cascade`)

The synthesis method works in three steps. Only the last one is hardware and
is built here.

1. **Product sharing.** Count how many outputs use each product.
2. **Connectivity tree.** Place the most-shared products at the top, with
   edges down toward the outputs, so that EXOR-ing the products along a
   root-to-leaf path gives an output function. A node may have only one
   incoming edge. A product that must be entered from two places is
   therefore duplicated, which is why a cascade often has more gates than
   the ESOP has products.
3. **Implementation graph.** Each tree node becomes one gate.
   * A_{k-1} is tied to 0 and the chain enters on A_k.
   * A root gate has both control inputs at 0.
   * Where a node has two children, the gate's P_k feeds one child and its
     P_{k-1} (the copy) feeds the other.
   * The constant-0 P_{k-1} of a root gate can be passed to the next gate's
     A_{k-1}, which saves a constant and a garbage output.

`esop_cascade` takes an implementation graph as parameters and builds the
gates from it:

* `GATES[g]` (`gate_desc_t`) gives, for each gate:
  * the function type;
  * the lines f reads (`vars`) and which of them it reads complemented
    (`neg`);
  * the source of A_{k-1} and the source of A_k. A source (`src_t`) is
    `SRC_ZERO`, or `SRC_PKM1`/`SRC_PK` of an earlier gate.
* `OUTS[o]` names the gate output that carries function output o.

Elaboration stops with an error in these cases:

* a source refers to the same gate or a later one (not a cascade);
* a gate output is read twice (fan-out above one);
* `N_GARB` or `N_CONST` disagrees with the graph.

Every control output that is neither read by a later gate nor a function
output is a *garbage* output. Garbage outputs leave on `garbage` in gate
order, with P_{k-1} before P_k. Pass-through lines are not counted as
garbage.

**Complemented literals.** Gates see the variables only through the
pass-through lines, so a literal such as B' comes from a 1*1 inverter
(`rev_inv_column`) placed on line B. The cascade tracks the polarity of each
line as it elaborates:

* in front of gate g, the lines that gate g reads are set to the polarity it
  asks for;
* lines that gate g does not read keep their current polarity;
* after the last gate, one column of inverters returns every line to true
  polarity.

The module inserts an inverter column only where the polarity changes.

The helper functions `mk_gate`, `zero()`, `pkm1(g)` and `pk(g)` in
`rev_esop_pkg` keep descriptions short. Gate indices in a description start
at 0.

## The worked examples

### Five outputs sharing five products (`mo_esop_fig3`)

    F1 = AB' ^ AB'C        F2 = AC ^ A'B'C        F3 = AB' ^ AB'C ^ BC'
    F4 = AC                F5 = AB' ^ AC ^ BC'

| gate | f     | A_{k-1}     | A_k          | P_{k-1}            | P_k                 |
|------|-------|-------------|--------------|--------------------|---------------------|
| 1    | AB'   | 0           | 0            | 0 → gate 2         | AB' → gate 2        |
| 2    | AB'C  | gate 1 (0)  | AB'          | AB' → gate 3       | AB'^AB'C → gate 5   |
| 3    | AC    | 0           | AB'          | garbage            | AB'^AC → gate 4     |
| 4    | BC'   | 0           | AB'^AC       | garbage            | **F5**              |
| 5    | BC'   | 0           | AB'^AB'C     | **F1**             | **F3**              |
| 6    | AC    | 0           | 0            | 0 → gate 7         | AC → gate 7         |
| 7    | A'B'C | gate 6 (0)  | AC           | **F4**             | **F2**              |

The cascade has 7 gates, 2 garbage outputs and 7 constant inputs. The
inverter columns fall in these places: B before gate 1; B and C before
gate 4; C before gate 6; A and B before gate 7; A and B at the end.

### A factorized symmetric function (`fesop_e24`)

E_2^4 is the EXOR of x_i x_j over all six pairs i < j. It is 1 when two or
three of x1..x4 are 1. Factorized, it is

    E_2^4 = (x1 ^ x2)(x3 ^ x4) ^ x1x2 ^ x3x4

The cascade has four gates:

1. f = x1 ^ x2, inputs 00.
2. f = x3 ^ x4, in mode **G0**: gate 1's P_k drives A_{k-1}, and gate 1's
   constant-0 P_{k-1} drives A_k. P_{k-1} is then the product of the two
   factors. P_k is their OR, which becomes garbage.
3. f = x1x2, mode 0G.
4. f = x3x4, mode 0G.

This gives 3 garbage outputs and 4 constant inputs.

## Top level (`rev_esop_top`)

The two examples share no signals and sit side by side. For each one the top
brings out:

* the primary inputs;
* the function outputs;
* the garbage outputs;
* the restored variable lines;
* P_{k-1} and P_k of every gate (`f_p_km1`, `f_p_k`, `e_p_km1`, `e_p_k`,
  bit g = gate g+1).

The per-gate outputs are there for observation: in a reversible circuit
every gate output is a physical output.

## Files

| file | contents |
|------|----------|
| `rtl/rev_esop_pkg.sv` | description types, helper constructors, the two example graphs |
| `rtl/rev_gate.sv` | the k*k gate |
| `rtl/rev_inv_column.sv` | column of 1*1 inverters |
| `rtl/esop_cascade.sv` | cascade built from an implementation graph, with elaboration checks |
| `rtl/mo_esop_fig3.sv`, `rtl/fesop_e24.sv` | the two example cascades |
| `rtl/rev_esop_top.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `single_esop_tb` and `multi_esop_tb` |
| `tb/single_esop_chk.sv` | builds and checks a random single-output ESOP chain |
| `tb/multi_esop_chk.sv` | builds the sharing tree and cascade of a random multi-output ESOP and checks it |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

    verilator --binary --timing --assert --top-module rev_esop_top_tb \
      -y rtl -y tb +libext+.sv rtl/rev_esop_pkg.sv tb/rev_esop_top_tb.sv
    ./obj_dir/Vrev_esop_top_tb

The testbenches cover the following:

* `rev_gate_tb`: k = 3, 5 and 6, products and EXOR-sums. Every input vector
  is checked against the mode table, and the testbench checks that no two
  input vectors give the same output vector.
* `esop_cascade_tb`: three graphs, checked exhaustively:
  * the default five-output example;
  * xor5 as five one-literal products;
  * a four-product ESOP that flips line polarity back and forth.
* `mo_esop_fig3_tb` and `fesop_e24_tb`: every input, and every intermediate
  value named in the tables above.
* `rev_esop_top_tb`: all 128 input combinations of both examples together.
  It rebuilds each gate's control inputs from the per-gate outputs. It counts
  how often each mechanism occurs: mode 00, mode 0G with G = 1 (and the copy
  it makes), mode G0, reuse of a constant 0, a product of complemented
  literals being 1, and a garbage output being 1. A mechanism that never
  occurs counts as a failure. This test runs the top at its default (and
  only) size.
* `single_esop_tb`: random single-output ESOPs of 9 inputs / 52 products,
  16 inputs / 13 products and 5 inputs / 5 products, checked exhaustively.
  A single-output chain of n products must have n gates, n − 1 garbage
  outputs and n constants, and the testbench checks that it does.
* `multi_esop_tb`: random multi-output ESOPs with the input, output and
  product counts of small benchmark functions (4/3/7, 7/2/9, 5/3/15,
  5/8/20), checked exhaustively. `multi_esop_chk` builds the graph at
  elaboration:
  * it ranks products by how many outputs use them;
  * it shares common prefixes of the outputs' product sequences;
  * it chains the children of a node through the P_{k-1} copies, as in the
    five-output example.

  It shows how to turn an arbitrary multi-output ESOP into `GATES`/`OUTS`.
  In every case built, the number of constants equals the number of gates.

## Limits and departures

* **The synthesis steps are not in hardware.** Building the product sharing
  table, the connectivity tree and the implementation graph from a minimized
  ESOP is a software task. Graphs are given as parameters. `multi_esop_chk`
  contains one simple construction, written as constant functions. The rule
  it uses for more than two children is this design's reading of the
  five-output example. None of the larger benchmark functions the method
  was evaluated on (MCNC circuits such as 5xp1, alu4 or seq, from 7 to
  1742 gates) can be run, because their minimized ESOPs are not available. Only xor5, whose ESOP is the
  five single literals, is run.
* **Forms of f.** The gate family allows any
  function f. Only products and EXOR-sums of lines are built, since these
  are the only forms the method uses.
* **Description limits.** `rev_esop_pkg` sets 64 lines (`MAX_V`) and 4096
  gates (`GIDX_W = 12`).
* **Elaboration time.** Verilator's elaboration time grows about with the
  cube of the gate count. Measured for single-output chains on 41 lines:
  about 14 s for 100 gates, 45 s for 200 gates and 4.5 minutes for 400
  gates. A graph with well over a thousand gates is not practical to build
  this way.
* **Own choices.** These are this design's own, not part of the method:
  * the description format;
  * the bit order of the ports (bit 0 = first variable);
  * bringing out every gate's control outputs;
  * placing inverters by polarity tracking. For the five-output example
    this gives the same inverter positions as the published cascade.
* **Counts.** The garbage and constant counts of both examples match the
  published figures: 2 and 7 for the five-output example, 3 and 4 for
  E_2^4.
