# Baugh-Wooley signed array multiplier from reversible full adders

This design multiplies two M-bit two's-complement numbers (M = 4 by
default) with a Baugh-Wooley array. Each adder in the array is a
*reversible* full adder (RFA) built from multiple-control Toffoli (MCT)
gates. The circuit is purely combinational: operands in, 2M-bit signed
product out, no clock. Every garbage line the reversible adders leave
behind is also brought out, so the whole reversible netlist can be seen
at the ports.

## The idea: a signed product with only positive terms

For two's-complement operands

    C = -c[M-1]·2^(M-1) + Σ c[j]·2^j,     D = -d[M-1]·2^(M-1) + Σ d[i]·2^i

the partial products c[j]·d[i] that pair exactly one sign bit with a non-sign
bit have negative weight. A plain array of adders cannot subtract. Baugh and
Wooley's trick is to write each negative term -x·2^k as
(1 - x)·2^k - 2^k = ~x·2^k - 2^k. This turns the term into a positive,
complemented bit. The -2^k pieces sum to a constant. For the variant built
here that constant is cancelled by adding 1 at bit M and 1 at bit 2M-1,
working modulo 2^(2M):

    P = c[M-1]d[M-1]·2^(2M-2)
      + Σ_{i,j<M-1} c[j]d[i]·2^(i+j)
      + Σ_{j<M-1} ~(c[j]d[M-1])·2^(j+M-1)
      + Σ_{i<M-1} ~(c[M-1]d[i])·2^(i+M-1)
      + 2^M + 2^(2M-1)                                (mod 2^(2M))

For M = 4 the two corrections are +16 and +128. Modulo 256, +128 is the same
as -128. This exact form is the one built and tested.

The complemented bits are the product of a NAND gate. So the array needs two
kinds of cell, told apart only by the gate that forms the partial product:

* **white cell**: `pp = c & d`
* **pink cell**: `pp = ~(c & d)`, used where exactly one of the two bits is a sign bit

## The reversible full adder (`rfa`)

The RFA has four lines in: A, B, an ancilla that must be 0, and Cin. It has
four lines out. Four MCT gates act on them in this order:

| step | gate | controls | target | line afterwards |
|------|------|----------|--------|-----------------|
| 1 | Toffoli | A, B | ancilla | A·B |
| 2 | Feynman (1 control) | A | B | A ⊕ B |
| 3 | Toffoli | A ⊕ B, Cin | ancilla | (A⊕B)·Cin ⊕ A·B = **carry** |
| 4 | Feynman (1 control) | A ⊕ B | Cin | A ⊕ B ⊕ Cin = **sum** |

The A and A ⊕ B lines are garbage. They come out as the packed struct
`bw_pkg::rfa_garbage_t` (`{a, axb}`). The map from the four inputs to the
four outputs is a bijection, so the adder is reversible. Only a 0 ancilla
makes line 3 the carry.

`mct_gate` is the gate primitive. Its target output is `tgt_i ^ &ctrl_i`,
and the number of controls is a parameter. The control lines pass through
unchanged, so the module does not repeat them as outputs.

## The array (`bw_multiplier`)

```
            c3     c2     c1     c0
   row 0   [P]    [W]    [W]    [W]   <- d0      sum of rightmost cell -> P0
   row 1   [P]    [W]    [W]    [W]   <- d1                            -> P1
   row 2   [P]    [W]    [W]    [W]   <- d2                            -> P2
   row 3   [W]    [P]    [P]    [P]   <- d3                            -> P3
          1 -> [ final row: 4 RFAs, ripple carry ] <- 1
                P7     P6     P5     P4
```

Cell (i, j) sits in row i (multiplier bit d[i]) and column j (multiplicand
bit c[j]). Its weight is 2^(i+j). It adds three bits:

* its partial product;
* the **sum** of cell (i-1, j+1), which has the same weight and arrives diagonally;
* the **carry** of cell (i-1, j), which has weight 2^(i-1+j+1) and arrives vertically.

Row 0 gets 0 on both the sum and carry inputs. The leftmost column (j = M-1)
gets 0 on its sum input. The sum of the rightmost cell of row i is product
bit P[i].

`bw_pkg::cell_kind(row, col, m)` decides where the pink cells go, and a
`generate` loop places them. The sign-by-sign cell (M-1, M-1) is white
because its term has positive weight.

**Final row.** The last array row leaves two sets of bits:

* sums at weights 2^M … 2^(2M-2), from columns 1 … M-1;
* carries at weights 2^M … 2^(2M-1).

`rfa_ripple_adder` adds these. It is a chain of M RFAs in which each bit's
carry feeds the next bit. The two correction constants enter here:

* the **right-hand 1** is the chain's carry in, at weight 2^M;
* the **left-hand 1** is the top bit of operand A, at weight 2^(2M-1).

The chain's sums are P[M] … P[2M-1]. Its carry out has weight 2^(2M). That
bit lies outside the product and is discarded, but it is still brought out
as `carry_drop_o` because a reversible circuit does not lose lines. The
testbench sees it set for 144 of the 256 operand pairs at M = 4.

**Timing.** The longest path runs down the right-hand column and then
through the final carry chain, about 2M cell delays. The module has no
registers. Add registers around it if it must run at a clock rate.

## Ports and parameters

`bw_multiplier #(parameter int unsigned M = 4)`, M >= 2:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `c_i` | in | M | multiplicand C, two's complement |
| `d_i` | in | M | multiplier D, two's complement |
| `p_o` | out | 2M | product C·D, two's complement |
| `cell_garbage_o` | out | [M][M] `rfa_garbage_t` | garbage lines of array cell [row][col]; `.a` is that cell's partial product |
| `final_garbage_o` | out | [M] `rfa_garbage_t` | garbage lines of final-row bit k (weight 2^(M+k)) |
| `carry_drop_o` | out | 1 | carry out of the final row, discarded from the product |

You can leave the garbage outputs unconnected if you only want the product.

Module hierarchy: `bw_multiplier` → `bw_white_cell` / `bw_pink_cell` →
`rfa` → `mct_gate`, and `bw_multiplier` → `rfa_ripple_adder` → `rfa`.
`bw_pkg` holds the cell-kind enum, the placement function and the
garbage struct.

## Where this design departs from, or goes beyond, its source

The drawn source design is a 4 x 4 array. The following points are this
implementation's own reading or choice.

* **Printed product formula.** The formula as usually printed for this
  design pairs the complemented sign bit with the plain operand bit
  (`~d3·c_j`, `~c3·d_i`). With only the +2^4 and -2^7 corrections, that
  formula gives the wrong product for most operand pairs. The array of NAND
  cells does not: it implements the form shown above, which is exact. The
  NAND form is built.
* **RFA gate 2.** In the source drawing the second gate of the RFA also
  seems to touch the Cin line. Its output is labelled A ⊕ B, so it is built
  as a one-control Feynman gate from A onto B.
* **Fredkin gates.** The design is described as using both Toffoli and
  Fredkin (controlled-swap) gates. No circuit with a swap is given, and a
  swap cannot produce the labelled adder outputs. So only Toffoli-family
  gates are used. The sum and carry functions are exactly the specified ones.
* **Cell garbage lines.** The multiplier cells are described as 5-in/5-out
  reversible cells with 3 garbage outputs. The gate-level content of such a
  cell is not given. Each cell here is one ordinary AND or NAND gate in
  front of a 4 x 4 RFA, and it brings out the RFA's 2 garbage lines. So the
  array as a whole is not fully reversible: only the adders are.
* **RFA inputs in a cell.** The partial product drives RFA input A, the
  incoming sum drives B, and the incoming carry drives Cin. The sum and
  carry are symmetric in these three, so the choice does not change them.
* **Final-row adder.** The final row is specified only as "a row of
  reversible full adders". It is built as a plain ripple chain.
* **Any width.** The generalisation to any M is this implementation's own.
  It is tested at M = 2, 4, 6 and 8.
* **Cost figures.** Gate count, quantum cost and FPGA LUT, power and delay
  figures for the source design are not reproduced here. How they were
  counted is not known. At M = 4 this netlist has:
  * 80 MCT gates (4 per RFA, 20 RFAs) and 16 AND/NAND gates;
  * 20 zero ancillas;
  * 40 garbage lines.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against values it works out independently and ends by printing
`TB_RESULT checks=N failures=F`.

| testbench | what it covers |
|-----------|----------------|
| `tb_mct_gate` | all inputs for 1, 2 and 3 controls |
| `tb_rfa` | all 16 input patterns: sum/carry with the ancilla at 0, garbage lines, and reversibility (no output pattern repeats) |
| `tb_bw_white_cell`, `tb_bw_pink_cell` | all 16 input patterns of each cell |
| `tb_rfa_ripple_adder` | 4-bit exhaustive (512 cases) and 8-bit random |
| `tb_bw_multiplier` | default M = 4; details below |
| `tb_bw_multiplier_wide` | M = 2 and M = 6 exhaustive; M = 8 corner cases plus 20 000 random pairs |

`tb_bw_multiplier` runs at the default M = 4 and covers all 256 operand
pairs. It also checks:

* -2 × 3 = -6;
* each cell's partial product and its white/pink placement;
* the dropped carry;
* the constant 1 on the final row.

It counts how often each case occurs: negative, positive and zero products,
-8 × -8, and the final carry both set and clear. It fails if any of these
never happens.

Run a test with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_bw_multiplier rtl/bw_pkg.sv tb/tb_bw_multiplier.sv
./obj_dir/Vtb_bw_multiplier
```

Every testbench finishes in well under a second.

## Changing it

* **Width:** set `M`. The placement rule, the edge zeros and the two
  constants all follow from it.
* **Faster final row:** replace the ripple chain in `rfa_ripple_adder` with
  another adder that keeps the same ports.
* **Different gate realisation inside the RFA:** edit the four `mct_gate`
  instances in `rfa.sv`. `tb_rfa` checks the function and reversibility.
