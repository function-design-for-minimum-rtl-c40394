# Minimum reversible adder/subtractors and 1-bit ALUs in MCT gates

A reversible circuit computes a bijection: every output pattern comes from
exactly one input pattern, so no information is erased. Such circuits are
built as a cascade of multiple-control Toffoli (MCT) gates on a fixed set of
lines, with no fan-out and no feedback. Adders, subtractors and ALUs are not
bijective, so they must be *embedded* in a reversible function: garbage
outputs are added until every output pattern is unique, and constant inputs
are added only where the line count would otherwise differ.

This RTL contains six such circuits, each with the smallest possible number
of MCT gates:

| block          | lines | constant inputs | garbage outputs | MCT gates                 | operations |
|----------------|-------|-----------------|-----------------|---------------------------|------------|
| `half_addsub`  | 4     | 1               | 2               | 3 (2 CNOT, 1 Toffoli)     | a+b, a-b |
| `full_addsub`  | 4     | 0               | 2               | 5 (4 CNOT, 1 Toffoli)     | a+b+c, a-b-c |
| `rev_alu`      | 4     | 0               | 2               | 5 (2 CNOT, 3 Toffoli)     | ADD, OR, SUB, AND |
| `mini_alu`     | 4     | 0               | 2               | 5 (2 CNOT, 3 Toffoli)     | OR, ADD, AND, ID |
| `gupta_lu`     | 5     | 0               | 4               | 3 (3 Toffoli)             | 0/1, AND/NAND, XOR/XNOR, OR/NOR |
| `lu`           | 4     | 0               | 3               | 3 (1 CNOT, 2 Toffoli)     | XOR, OR, AND |

Everything is combinational. In CMOS it is ordinary logic; its point is the
reversible structure, which maps directly to a quantum or other reversible
technology gate by gate.

## Where the small gate counts come from

The gate count of a reversible circuit depends on more than the operations
it must perform. Two choices are free once the operations are fixed, and the
circuits here are the minimum over both:

* **Operation assignment.** Which selector code runs which operation is
  arbitrary. With two selector bits there are 4! = 24 assignments, and they
  lead to circuits of different size. This is why the selector codes in
  `rev_pkg` are not in a "natural" order: the revised ALU runs ADD on 00,
  OR on 01, SUB on 10 and AND on 11 because that assignment admits a
  five-gate circuit, while ADD/OR/AND/SUB on 00/01/10/11 needs seven gates with the
  results on fixed lines, or six when the output lines are free as well.
* **Output permutation.** Which line carries a result and which carries
  garbage is also free. Results therefore leave on different line numbers in
  different circuits (see each module's header).

A third freedom is that rows and columns the embedding does not constrain
are don't-cares. For example, the half adder/subtractor's rows with the
constant line at 1, and the carry line of the ALUs during OR and AND, take
whatever value the minimum circuit gives them.

## Line and gate conventions

Every circuit module has the same interface: `in_lines[0:N-1]` and
`out_lines[0:N-1]`, with line *i* on index *i*. Because the buses are declared
ascending, line 0 is the most significant bit of the packed value. The
packed input and output therefore read as the integers of the circuit's
permutation table. For example, the half adder/subtractor maps 1 to 3,
2 to 6 and 3 to 13.

A gate is written `(c1 c2 ... t)`: the last number is the target line, the
others are control lines. `(2 1)` is a CNOT from line 2 onto line 1, and
`(1 3 0)` flips line 0 when lines 1 and 3 are both 1. `mct_gate` implements one
gate: `y = x`, with `y[TGT]` inverted when all lines in the `CTRL` mask are 1.
Each circuit module is a chain `w[0] -> gate 1 -> w[1] -> ... -> w[G]`.

## The circuits

### Half adder/subtractor (`half_addsub`)

Lines (c, S, A, B); c must be 0. Gates `(2 1) (3 2) (1 3 0)`:

    line1 = S ^ A                  garbage
    line2 = A ^ B                  sum / difference
    line0 = (S ^ A) & B            carry (S=0: A.B) / borrow (S=1: ~A.B)

The trick is that `S ^ A` is A for addition and ~A for subtraction, so one
Toffoli gate serves for both the carry and the borrow. Outputs are
(carry/borrow, S^A, sum/difference, B).

### Full adder/subtractor (`full_addsub`)

Lines (S, A, B, C), with no constant line. Gates `(1 0) (3 2) (2 1) (3 0) (0 2 3)`:

    line2 = B ^ C                            garbage
    line1 = A ^ B ^ C                        sum / difference
    line0 = S ^ A ^ C                        garbage
    line3 = C ^ (S^A^C)(B^C)                 carry = maj(A,B,C) / borrow = maj(~A,B,C)

It uses four lines, no constant input, two garbage outputs and one Toffoli
gate. Its quantum cost is 8 with the published NCV realisation, against 9 to
21 for earlier reversible full adder/subtractors.

### Revised ALU (`rev_alu`)

This is a 1-bit ALU with add and subtract, for use where both are needed.
Lines are (S1, S2, A, B). O1, the carry or borrow, leaves on line 1. O2, the
result, leaves on line 3. Gates `(2 0) (2 3) (0 3 2) (1 2 3) (0 2 1)`.

| S1 S2 | operation | O1      | O2      |
|-------|-----------|---------|---------|
| 00    | ADD       | A.B     | A^B     |
| 01    | OR        | –       | A\|B    |
| 10    | SUB       | ~A.B    | A^B     |
| 11    | AND       | –       | A.B     |

### Mini-ALU (`mini_alu`)

This is a well-known four-operation benchmark, rebuilt in five gates instead
of its original six. Lines are (S1, S2, A, B), with O1 on line 2 and O2 on
line 3. Gates `(2 0) (3 1) (1 3 2) (0 2 3) (1 3 2)`. The codes are 00 OR,
01 ADD (O1 carry, O2 sum), 10 AND, and 11 ID (O1 = A, O2 = B).

### Gupta's logic unit (`gupta_lu`)

These are eight logic operations on five lines (S1, S2, S3, A, B), in three
gates instead of the original eighteen. (S1 S2) selects constant, AND, XOR
or OR, and S3 inverts the result. The result leaves on line 2:
`Output = S3 ^ S1.A ^ (S1 ^ S2.A).B`. Gates `(0 3 2) (1 3 0) (0 4 2)`.

### Compact logic unit (`lu`)

This is Gupta's unit reduced to XOR, OR and AND on four lines. NOT is XOR
with one operand at 1. Codes are 00 XOR, 01 OR, 10 unused and 11 AND. The
result leaves on line 2. Gates `(3 0) (1 2 3) (0 3 2)`.

### Top level (`rev_arith_top`)

The six circuits are independent alternatives, so the top places them side
by side. Each gets named ports (`has_*`, `fas_*`, `alu_*`, `mini_*`, `glu_*`,
`lu_*`), and the garbage lines are brought out as `*_g`. Inside the top, the
half adder/subtractor's constant line is tied to 0. The selector codes are
the enums of `rev_pkg`.

## How far to trust it, and where it departs from the published design

* **Taken exactly from the published design:** the MCT gate definition, and
  the gate lists, line orders and operation assignments of the half and full
  adder/subtractors. Their testbenches compare all 16 input patterns against
  the published permutation tables as well as against plain arithmetic.
* **Derived from the function:** the four ALU circuits here were derived
  from their operation sets by an exhaustive search
  over all MCT circuits on four lines (five lines for Gupta's unit), allowing
  any operation assignment and any output permutation. The search reaches the
  published minimum size in every case: 5 gates for the revised ALU and the
  Mini-ALU, 3 for both logic units. Where several minimum circuits exist, one
  made only of CNOT and Toffoli-3 gates was picked. The operation codes of
  these four blocks belong to the circuits picked here, so they may differ
  from the published figures. The compact LU and Gupta's unit use the
  published assignments.
* **Mini-ALU identity operation:** ID is taken to pass both operands,
  O1 = A and O2 = B. The
  published results support this reading: with it, the search gives the
  published minimum of 5 gates and the published count of 266 minimum
  functions. With a single-output ID the minimum would be 4 gates.
* **Revised ALU count:** the search finds 48 distinct minimum (5-gate)
  functions. The published count is 19. The minimum gate count agrees, and
  the circuit used here meets the specification on every care row, but the
  reason for the difference in the count is not known.
* **Quantum realisations are not included.** The NCV circuits (NOT, CNOT,
  controlled-V and controlled-V†) are used only for quantum-cost figures.
  Controlled-V gates have no Boolean equivalent, and at the Boolean level
  they compute exactly what the MCT circuits here compute.

## Verification

Each module has a self-checking testbench in `tb/` that sweeps every input
pattern. Each testbench checks three things:

* the named results, against arithmetic or logic computed in the testbench;
* for the adder/subtractors, the published permutation table;
* that no output pattern repeats, which is reversibility.

`tb_rev_arith_top` does the same through the top's ports, with the top at
its default configuration. It counts each mechanism: addition, subtraction,
carry out, borrow out, and every operation code of every ALU. It fails if
any count is zero. Each testbench prints `TB_RESULT checks=N failures=M`. A
watchdog ends the run if it hangs.

`tb_min_circuits` goes further for the adder/subtractors. For each one, the
published tables list every reversible function of minimum size, each with
one gate list: 6 for the half adder/subtractor with the adder on S=0, 3 with
the subtractor on S=0, and 30 for the full adder/subtractor. The testbench
builds all 39 gate lists from `mct_gate` and checks each against its listed
function. It also checks that each function is a valid embedding, with
carry/borrow and sum/difference on some pair of lines. Finally it checks
that `half_addsub` and `full_addsub` match the first entry of their lists.
Any of the 39 could replace the circuit used. The circuit used was picked
for its low quantum cost.

To simulate one block with Verilator (the package must come first):

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv tb/tb_rev_alu.sv \
        --top-module tb_rev_alu
    ./obj_dir/Vtb_rev_alu

Linting with `-Wall` gives only ASCRANGE warnings. These come from the
intentionally ascending `[0:N-1]` line buses.

## Changing it

You can change a circuit by editing its list of `mct_gate` instances. Each
instance's `CTRL` mask is written in line order, so `4'b1001` means lines 0
and 3. `mct_gate` refuses at elaboration a gate whose target is also one of
its controls. If you change a gate list or an operation assignment, update
the enum in `rev_pkg` and the port mapping in `rev_arith_top` to match.
