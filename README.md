# Parallel-prefix magnitude comparator

A magnitude comparator tells whether unsigned A is greater than, less than or
equal to unsigned B. The answer is set by the most significant bit position
where the two operands differ. A ripple comparator walks from the MSB to the
LSB, so its delay grows with the width. This design finds that position with
a shallow tree of small gates instead. Every cell has a fan-in of at most five
and a fan-out of at most four, whatever the operand width. Only the winning
bit position is allowed to toggle the output buses, which keeps switching
activity low.

The RTL is fully combinational: there is no clock and no reset. It is
parameterised by the operand width `N`. The default is 8 bits, and the same
code is verified at 4, 8, 13, 32 and 64 bits.

## The left and right buses

The comparator has two stages: a **comparison resolution module** and a
**decision module**. They talk through two N-bit buses:

| condition at bit k                                       | left_k | right_k |
|----------------------------------------------------------|--------|---------|
| A_k = 1, B_k = 0, and every more significant bit is equal | 1      | 0       |
| A_k = 0, B_k = 1, and every more significant bit is equal | 0      | 1       |
| any other case                                            | 0      | 0       |

At most one bit is high across the two buses. It sits at the first differing
position, on the left bus if A wins and on the right bus if B wins. The
decision module ORs each bus down to a single bit:

| {Lb, Rb} | meaning |
|----------|---------|
| 00       | A = B   |
| 10       | A > B   |
| 01       | A < B   |
| 11       | cannot occur |

Example with 4-bit operands, A = 1000 and B = 0101. The MSBs already differ
(1 against 0), so the left bus is 1000, the right bus is 0000, and
{Lb, Rb} = 10, meaning A > B. The lower bits of A and B do not matter, and
they never reach the buses.

## The five cell sets of the resolution module

Bits are numbered N-1 (MSB) down to 0. The operands are cut into 4-bit
**partitions**, ranked from the MSB end. Rank 0 holds bits N-1..N-4. If N is
not a multiple of four, the least significant partition is the short one.
Four partitions form a 16-bit **cluster**.

Data flows through five sets of cells. Set 1 feeds both Set 2 and Set 4.

```
 A,B ──► Set 1 ψ ──D──► Set 2 Σ2 ──peq──► Set 3 Σ3 ──en──┐
            │                                            ▼
            └─────────────────D─────────────────────► Set 4 Ω ──sel──► Set 5 φ ──► left/right bus
 A,B ────────────────────────────────────────────────────────────────────┘
```

* **Set 1, ψ cells** (`cmp_set1_psi`): one cell per bit. Each cell raises
  the *termination flag* D_k when A_k ≠ B_k, meaning that every bit below k
  is irrelevant. The cell is built only from AND and NOT gates. It forms
  A_k·¬B_k and ¬A_k·B_k, and D_k is their OR. That OR equals the XOR of the
  two bits, because the two terms are never both high.
* **Set 2, Σ2 cells** (`cmp_set2_sigma`): one NOR of four flags per
  partition. Its output `peq[r]` is 1 when the whole partition is equal
  ("continue") and 0 when a decision falls inside the partition.
* **Set 3, Σ3 cells** (`cmp_set3_sigma`): these cells do no comparing. For
  each partition they compute `en[r]`, which is 1 when every more significant
  partition is equal. A single AND over all higher partitions would need a
  fan-in that grows with N, so the set is built in two levels:
  1. Inside each cluster, cells AND the first one, two, three and four
     partition flags. The last of these says "this whole cluster is equal".
  2. Across clusters, the "cluster equal" results of all higher clusters are
     ANDed and joined with the local prefix. In a 32-bit comparator this
     adds one two-input cell: "the 16 MSBs are equal" AND "the partitions
     above me in cluster 1 are equal".

  Up to 64 bits (four clusters), level 2 also stays within fan-in four. For
  wider operands the RTL writes level 2 as one wide AND and leaves the extra
  tree level to synthesis. At the default 8 bits there are only two
  partitions, so Set 3 reduces to `en[0] = 1` and `en[1] = peq[0]`.
* **Set 4, Ω cells** (`cmp_set4_omega`): one cell per bit. The cell decides
  whether bit k is *the* first differing bit. It ANDs three things:
  * D_k;
  * the Set 3 enable of its partition;
  * the inverted flags of the bits above it in the same partition.

  Fan-in is therefore 2, 3, 4 and 5 from a partition's MSB to its LSB. This
  is where the fan-in limit of five comes from.
* **Set 5, φ cells** (`cmp_set5_phi`): one 2-bit-wide 2:1 multiplexer per
  bit. When selected, it puts (A_k, B_k) onto (left_k, right_k); otherwise
  it drives 00. A cell is selected only where the bits differ, so the pair
  it passes is always 10 or 01.

`cmp_resolution` wires the five sets together. It also carries immediate
assertions for the bus rules: at most one high bit per bus, and never a high
bit on both buses.

## Decision module

`cmp_decision` reduces each bus with a NOR-NAND network. Each 4-bit group of
the bus is NORed (fan-in four), and the group results are NANDed, which gives
the OR of the whole bus. The module outputs Lb and Rb, the code
`{lb, rb}` as the enum `cmp_pkg::cmp_code_e`, and the decoded flags
`a_gt_b`, `a_lt_b` and `a_eq_b`. It asserts that code 11 never occurs. The
NAND stage has N/4 inputs: 2 at the default width, 8 at 32 bits.

## Top level

`prefix_comparator #(N)` connects the resolution module to the decision
module.

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `a`, `b`    | in  | N     | unsigned operands |
| `left_bus`, `right_bus` | out | N | encoded partial results (see the bus table above) |
| `lb`, `rb`  | out | 1     | decision bits |
| `code`      | out | 2     | `{lb, rb}` as `cmp_code_e` (`CMP_EQ`, `CMP_GT`, `CMP_LT`) |
| `a_gt_b`, `a_lt_b`, `a_eq_b` | out | 1 | decoded result |

The outputs settle one propagation delay after the operands change. No
register stage is included. If the comparator sits in a pipeline, put it
between your own flops.

## How faithful this is, and the choices made here

Follows the original description:
* the left/right bus encoding and the {Lb, Rb} decision code;
* the five cell sets and the role of each;
* the 4-bit partitions and the NOR/NAND decision network;
* the fan-in of the Ω cells;
* the two-level Set 3 for operands wider than 16 bits;
* the 8-bit default and the 32-bit variant.

Choices made in this RTL:
* **The ψ cell.** The improved 8-bit variant is described only as a
  comparison resolution module built from "one AND gate and a NOT gate",
  working on two 4-bit sets. Here that is read as: each Set 1 cell is built
  from AND/NOT terms, and the two sets are the two 4-bit partitions of an
  8-bit operand. The lower partition is gated by the complement of the upper
  partition's termination result, through Sets 2 and 3. Any transistor-level
  saving of that variant cannot be expressed in RTL. Functionally, both
  readings give the same comparator.
* **Cell polarity.** Set 3 is written as ANDs of active-high "equal" flags.
  This is the same function as the NORs of active-high "terminate" flags in
  the original description.
* **Widths that are not a multiple of four.** They are supported, with a
  short least significant partition.
* **Wide operands.** Beyond 64 bits, the extra Set 3 levels are not written
  out explicitly.
* **Decoded outputs.** `a_gt_b`, `a_lt_b` and `a_eq_b` are a convenience
  decode of {Lb, Rb}.
* **Fan-in and fan-out limits.** One passage states fan-in five and fan-out
  four, and another swaps them. Fan-in five is what the Ω cells need, so the
  RTL follows that.
* **Timing is not modelled.** The gate-level structure is written to mirror
  the cells, but synthesis is free to restructure it. The speed, power and
  area claims of the original circuit are not something this RTL can
  reproduce.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
against a reference model in `tb/cmp_ref_pkg.sv`, which scans from the MSB
for the first differing bit and is independent of the cell structure. Each
testbench prints `TB_RESULT checks=<n> failures=<n>` and has a time-based
watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_cmp_set1_psi`   | all 8-bit pairs, random and single-bit-difference 32-bit pairs |
| `tb_cmp_set2_sigma` | all 8-bit and 10-bit flag patterns (short partition), sparse random 32-bit patterns |
| `tb_cmp_set3_sigma` | every flag pattern at 8, 32 and 64 bits (2, 8, 16 partitions) |
| `tb_cmp_set4_omega` | all 8-bit flag patterns × enables, random 32-bit patterns |
| `tb_cmp_set5_phi`   | all 8-bit pairs with random selects |
| `tb_cmp_resolution` | all 8-bit pairs, random and near-equal pairs at 32 and 13 bits |
| `tb_cmp_decision`   | every legal bus state at 8 and 32 bits |
| `tb_prefix_comparator` | end to end at 4 bits (the worked example and all pairs), 8 bits (all pairs), 32 and 64 bits (random, directed, equal) |
| `tb_prefix_comparator_full` | the default 8-bit top, all 65,536 pairs |

The end-to-end testbench counts how often each mechanism is used, and fails
if any count is zero:
* each outcome (>, <, =);
* a first difference in every partition rank, up to rank 15;
* a first difference at every position inside a partition, i.e. every Ω
  fan-in;
* a first difference below the first 16-bit cluster, i.e. the second Set 3
  level.

To run a testbench with plain Verilator, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmp_pkg.sv tb/cmp_ref_pkg.sv tb/tb_prefix_comparator.sv \
    --top-module tb_prefix_comparator -o sim
./obj_dir/sim
```

Replace the last testbench file and the top-module name to run any other
testbench. Each one finishes in well under a second.

## Files

* `rtl/cmp_pkg.sv`: partition and cluster sizes, the decision code enum, and
  bit-to-partition index functions.
* `rtl/cmp_set1_psi.sv` … `rtl/cmp_set5_phi.sv`: the five cell sets.
* `rtl/cmp_resolution.sv`: the comparison resolution module (Sets 1–5).
* `rtl/cmp_decision.sv`: the decision module.
* `rtl/prefix_comparator.sv`: the top level.
* `tb/cmp_ref_pkg.sv`: the reference model; `tb/tb_*.sv`: the testbenches.

To change the width, override `N` on `prefix_comparator`. Every submodule
derives its partition count from it.
