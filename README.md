# Parallel prefix tree magnitude comparator

A combinational N-bit unsigned comparator (default N = 16) that answers
A > B, A = B or A < B by finding the **most significant bit at which the
operands differ**. Only that bit matters: whichever operand has a 1 there is
the larger one. The circuit finds it with a shallow prefix tree of small
gates (no cell has more than five inputs), so the same structure scales to
wide operands without long carry-like chains or wide gates, and it is built
only from ordinary logic cells: XOR, NOR/AND, 2:1 multiplexers and ORs.

```
      A[N-1:0]   B[N-1:0]
          |         |
  +-----------------------------+
  |  comparison resolution      |   Sets 1..5
  +-----------------------------+
       | left bus     | right bus   (N bits each)
  +-----------------------------+
  |  decision module            |   two OR-scans + one NOR
  +-----------------------------+
     A>B        A=B        A<B
```

## The bus encoding

The core idea is the pair of N-bit buses between the two halves.

* If A = B, both buses are all zero.
* Otherwise, let p be the most significant differing bit. At position p the
  left bus carries A[p] and the right bus carries B[p]; every other bit of
  both buses is 0. Since A[p] ≠ B[p], exactly one bus has a single 1.

So a 1 on the left bus means A > B and a 1 on the right bus means A < B, and
the decision module only has to OR each bus. Everything below the first
difference is forced to zero, whatever those bits are: lower bits cannot
change the answer, and forcing them to 0 also keeps them from toggling the
output logic.

Worked example (8 bits): A = 0101 1101, B = 0110 1001. Bits 7 and 6 agree;
bit 5 is the first difference (A = 0, B = 1). The left bus is 0000 0000 and
the right bus 0010 0000, so A < B. Bits 3 and 2 also differ, but they are
below bit 5 and are suppressed.

## Comparison resolution: five sets of cells

Operands are cut into 4-bit partitions; partition q holds bits 4q+3..4q, so
partition N/4-1 is the most significant. Each set is one module.

| Set | Cells | Per | Output | Function |
|-----|-------|-----|--------|----------|
| 1 | Psi | bit | `d[k]` | `a[k] ^ b[k]`: the bits differ |
| 2 | Sigma-2 | partition | `c2[q]` | NOR of the partition's four `d`: the partition is equal |
| 3 | Sigma-3 | partition, per level | `c3[q]` | partition q and every partition above it are equal |
| 4 | Omega | bit | `y[k]` | bit k is the first difference |
| 5 | Phi | bit | `left_bus[k]`, `right_bus[k]` | `y[k] ? {a[k], b[k]} : 2'b00` |

### Set 4: picking the first difference

Omega for bit k in partition q is an AND of at most five terms:

```
y[k] = above_eq(q) & d[k] & ~d[k+1] & ... & ~d[4q+3]
above_eq(q) = c3[q+1]        (constant 1 for the top partition)
```

The `~d` terms look only at the more significant bits inside the bit's own
partition. Everything above the partition is summarised by a single
Sigma-3 flag. That split is what bounds the fan-in: a partition's lowest bit
needs `c3`, its own `d` and three `~d`, which is five inputs, and no cell
ever needs more however wide N is. At most one `y` bit can be 1.

### Set 3: the prefix over partitions

`c3[q]` must be the AND of `c2[q]` and every `c2` above it. That is a prefix
AND across N/4 partitions, and the one place where width has to be handled.
Here it is built as a radix-4 prefix network of N/4 cells per level: at
level l each cell ANDs its own previous-level value with those found
4^(l-1), 2·4^(l-1) and 3·4^(l-1) partitions higher up. That is four inputs
at most. After `ceil(log4(N/4))` levels every cell covers all partitions
above it.

| N | partitions | Sigma-3 levels |
|---|-----------|----------------|
| 8, 16 | 2, 4 | 1 |
| 32, 64 | 8, 16 | 2 |
| 128, 256 | 32, 64 | 3 |

At the default N = 16 this is a single level of four cells. Their fan-ins
are 1, 2, 3 and 4. Only `c3[1..N/4-1]` are used by Set 4. `c3[0]` (all
partitions equal) is computed but unused, since the decision module takes
equality from the buses.

## Decision module

`a_gt_b` is the OR of the left bus and `a_lt_b` is the OR of the right bus.
`a_eq_b` is the 2-input NOR of the two. Each OR is built in two levels: a
4-input OR per partition, then one OR over the N/4 partition results. That
second gate has N/4 inputs, which is 4 at the default width. It is the one
gate whose fan-in grows with N. A wide build could replace it with an OR
tree without changing anything else.

## Timing

There is no clock and no reset. All outputs are combinational functions of
`a` and `b`. The critical path runs Psi → Sigma-2 → Sigma-3 (levels) →
Omega → Phi → partition OR → final OR → NOR. It grows only with the
Sigma-3 level count and the final OR, so roughly as log4 N.

## Interface of `ppt_comparator`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `a`, `b` | in | N | unsigned operands |
| `a_gt_b`, `a_eq_b`, `a_lt_b` | out | 1 | exactly one is 1 |
| `left_bus`, `right_bus` | out | N | the encoded buses, for observation |

Parameter `N` (`int unsigned`, default 16) must be a positive multiple of 4.
Other values stop elaboration with an error. Each sub-block takes the same
`N`. `cmp_pkg` holds the default width, the partition width and the
function that gives the Sigma-3 level count.

## Where this RTL departs from, or fills in, the source design

* **Bit numbering.** The source equations number bits from the MSB. All
  vectors here are numbered by bit weight (bit N-1 is the MSB). Its bit k
  is bit N-1-k here.
* **Sigma-3 level count.** The source gives `ceil(log16 N)` levels and also
  a fan-in limit of four. The two agree up to N = 64 and disagree above that
  (2 levels against the 3 a fan-in-4 prefix needs at N = 128 and 256). This
  RTL keeps the fan-in limit. How cells are wired between levels is this
  design's choice. The function is the same.
* **Sigma-3 polarity.** Read literally, the source formula for the Sigma-3
  cell inverts the sense of the flag. It is implemented with the meaning the
  rest of the circuit needs: "this partition and all above are equal".
* **Existing vs proposed circuit.** The source compares its circuit with an
  earlier one that has the same logic plus extra inverters between the sets.
  Removing inverters is a transistor-level saving. At RTL both are the same
  function, so only one version exists here.
* **Characterisation figures.** The source reports power, delay and
  transistor counts for an FPGA/CMOS implementation at 1 GHz. None of these
  are modelled or checked here.
* **Added:** buses brought out as ports, the N % 4 elaboration check, and
  simulation assertions on the bus rule (at most one bus bit set, and none
  exactly when A = B) and on one-hot results.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_cmp_set1_psi` | every flag bit against a per-bit inequality |
| `tb_cmp_set2_sigma2` | partition flags on sparse random patterns; both outcomes seen |
| `tb_cmp_set3_sigma3` | prefix flags at N = 16, 64, 256 (1, 2, 3 levels) |
| `tb_cmp_set4_omega` | selects at N = 16, 64 against a top-down scan; every bit selected at least once |
| `tb_cmp_set5_phi` | multiplexer outputs for random selects |
| `tb_cmp_decision` | flags for every single-bit bus pattern and random one-bus patterns |
| `tb_cmp_resolution` | exact buses at N = 8, 16, 64, including the worked example |
| `tb_ppt_comparator` | the top at its default width: results against the simulator's unsigned compare, exact buses, the worked example zero-extended |
| `tb_ppt_comparator_widths` | the top at N = 8 (all 65,536 operand pairs), 32, 64, 128, 256 |

`tb_ppt_comparator` also counts these events and fails if any of them
never happens:

* termination at each of the 16 bit positions, once with A > B and once
  with A < B;
* the equal case;
* a lower differing bit suppressed inside the same partition (the Omega
  in-partition terms);
* a differing bit suppressed in a lower partition (the Sigma-2/Sigma-3
  path).

Stimulus is random operand pairs that share a top part of random length and
then differ at a chosen bit, so every termination position is hit often.
At 16 bits the 2^32 pairs are not checked exhaustively. At 8 bits, where the structure is the same with fewer partitions, every pair is checked.

## Simulating

Each file holds one module or package, named after the file. The package
has to be read first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmp_pkg.sv tb/tb_ppt_comparator.sv --top-module tb_ppt_comparator
./obj_dir/Vtb_ppt_comparator
```

Swap in any other testbench name. To lint the design alone:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/cmp_pkg.sv rtl/ppt_comparator.sv
```

## Files

* `rtl/cmp_pkg.sv`: shared constants and the Sigma-3 level function
* `rtl/cmp_set1_psi.sv` … `rtl/cmp_set5_phi.sv`: the five sets
* `rtl/cmp_resolution.sv`: Sets 1–5 wired together
* `rtl/cmp_decision.sv`: OR-scans and NOR
* `rtl/ppt_comparator.sv`: top level
* `tb/`: the testbenches listed above
