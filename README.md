# Look-behind and ripple comparators, pipelined for 64-bit operands

An unsigned comparison of two n-bit numbers A and B comes down to one
question: where is the most significant bit at which they differ, and which
operand has the 1 there? If no such bit exists, A = B. This repository holds
synthesizable SystemVerilog for two comparator circuits built around that
question, plus a two-stage pipelined arrangement that combines narrow
comparators into wide ones:

* **Ripple (low-power) comparator.** A chain of per-bit "A is bigger here"
  conditions. A lower bit is only let through when all bits above it are
  equal. Small, but the decision ripples through the whole word.
* **Look-behind (high-speed) comparator.** Every bit works out at once
  whether it is the deciding bit: "B has the 1 here" (LT_i) and "everything
  above me is equal" (EQ_i). A wide OR of LT_i & EQ_i then gives A < B.
  Almost all of the work goes into the EQ_i signals, and they can be computed
  before the result is needed.
* **Hierarchical comparator.** Stage 1 compares 4-, 8- or 16-bit groups in
  parallel. Stage 2 compares the group outcomes as if they were the digits
  of a narrower number. The two stages are separated by flip-flops, so a
  64-bit comparison takes two clock cycles and a new one can start every
  cycle.

The top level, `comparator_top`, is a 64-bit comparator unit with two
realizations on the same operands:

| instance  | stage 1                        | stage 2                   | aim             |
|-----------|--------------------------------|---------------------------|-----------------|
| `u_fast`  | 8 x 8-bit look-behind          | 1 x 8-bit look-behind     | lowest latency  |
| `u_small` | 16 x 4-bit ripple              | 1 x 16-bit look-behind    | smallest area   |

Both give a one-hot result `{lt, eq, gt}` two cycles after the operands.
A user normally keeps one of them; the unit carries both so that both circuit
styles are present and checked against each other.

## Circuit origin and what the RTL models

The two comparators come from dynamic CMOS designs. In those designs the
output node is precharged while the clock is low and conditionally
discharged while it is high. The look-behind design uses the precharge half
of the clock to compute LT_i, Equal_i and EQ_i with static gates. Only the
final wide NOR, a precharged gate followed by an inverter, is left for the
evaluate half. The ripple design computes its XNOR gates during precharge
for the same reason: the pass transistors must not change state during
evaluation.

RTL has no precharged node. Each comparator here is the combinational logic
function of its circuit, written with the same signals (LT_i, Equal_i, EQ_i,
the pass-transistor chain, the NAND/NOR trees). In a synthesized design the
precharge/evaluate split becomes the ordinary timing path inside a clock
cycle. Transistor sizing, clock duty cycle, the buffering of high-fanout
gates, and all delay, power and area figures belong to the circuit. None of
them is represented here.

## The ripple comparator (`lowpower_comparator`)

The circuit has one output node and one pulldown stack per bit. Stack i can
discharge the node when `A_i & ~B_i`. The most significant stack sits at the
node. Each lower stack reaches the node through a pass transistor for every
bit above it, and the transistor for bit j conducts when
`Equal_j = A_j XNOR B_j`. So the node discharges exactly when A > B, and the
output (`le_o`) stays high exactly when A <= B.

The RTL walks this chain from the top bit down. `path` records whether all
pass transistors so far conduct, and `discharge` whether some reachable
stack has pulled down. Equality comes from a separate NAND/NOR tree over the
Equal bits (`eq_o`).

The ripple is the circuit's long path: its delay grows with the width.
This is why the design uses it mainly as a narrow (4- or 8-bit) stage-1
element.

## The look-behind comparator (`highspeed_comparator`)

For each bit i (0 = least significant here):

```
LT_i    = ~A_i & B_i
Equal_i = ~(A_i ^ B_i)
EQ_i    = Equal_{n-1} & ... & Equal_{i+1}      (EQ_{n-1} = 1)
A < B   = OR over i of (LT_i & EQ_i)
A = B   = EQ_0 & Equal_0
```

Worked example (8 bits, most significant bit on the left):

```
A       1 1 1 0 0 0 1 0
B       1 1 1 1 0 1 0 1
LT      0 0 0 1 0 1 0 1
Equal   1 1 1 0 1 0 0 0
EQ      1 1 1 1 0 0 0 0
```

Only bit 4 has both LT and EQ set, so A < B. The vectors LT, Equal and EQ
are brought out as ports (`lt_bits_o`, `equal_o`, `eq_bits_o`). The
testbench checks them against this example.

### How EQ_i is built (`eq_suffix_tree`, `nand_nor_and_tree`)

This is the part of the design that takes the most care to read.

1. **One AND tree over all Equal bits.** `nand_nor_and_tree` is a balanced
   tree of 2-input gates. Odd levels are NAND gates. Even levels are NOR
   gates, because NOR of two inverted signals is the AND of the true ones.
   The tree alternates polarity and never needs an inverter between levels.
   If the number of levels is odd, the root is inverted once at the end. The
   inputs are padded with ones up to a power of two. The module also outputs
   every node in true polarity: `nodes_o[L][j]` is the AND of the aligned
   block of 2^L inputs that starts at bit j*2^L.

2. **Each EQ_i from a few tree nodes.** The bits above i, from i+1 up to the
   top, can always be split into aligned power-of-two blocks. Each block is
   exactly one node of the tree. The split is found by walking up from
   s = i+1: at level L, if bit L of s is set, take node `[L][s >> L]` and
   add 2^L to s. For 8 bits and i = 4 (s = 5), that gives node [0][5]
   (bit 5) and node [1][3] (bits 6 and 7). The choice is made at
   elaboration (`node_index()`). A second, small NAND/NOR tree per bit,
   with clog2(n) inputs, ANDs the chosen nodes.

So every EQ_i costs at most clog2(n) gate levels in the first tree and
clog2(clog2(n)) in the second. The whole word settles in logarithmic depth,
rather than rippling as in the ripple comparator.

## The hierarchical comparator (`hier_comparator`)

```
            cycle k                    cycle k+1                 cycle k+2
 a_i,b_i -> [GROUPS x cmp_core] -> FF -> [1 x cmp_core] -> FF -> res_o, valid_o
            (S1_WIDTH bits each)        (GROUPS bits)
```

* **Stage 1.** `GROUPS = WIDTH / S1_WIDTH` comparators of kind `S1_KIND`.
  Each compares one group of bits, and group GROUPS-1 is the most significant.
* **Between the stages.** Each group result is stored one-hot as
  `{lt, eq, gt}` (`cmp_pkg::cmp_result_t`). `cmp_core` does the conversion:
  the look-behind comparator gives lt and eq, so gt = ~(lt | eq); the ripple
  comparator gives le and eq, so lt = le & ~eq and gt = ~le.
* **Stage 2.** Group j becomes the bit pair A'_j = gt_j and B'_j = lt_j. An
  equal group therefore looks like two equal bits (0, 0), and a decided
  group like a differing bit pair. Comparing A' with B' finds the most
  significant decided group, which settles the full comparison. Stage 2 is a
  GROUPS-bit comparator of kind `S2_KIND`.
* **Timing.** Operands presented with `valid_i` in cycle k produce `res_o`
  with `valid_o` in cycle k+2. A pair can be presented every cycle. The
  clock period is set by the slower of the two stage comparators.
* **Control.** Only the two valid flags are reset (asynchronous, active low).
  The data flip-flops load only when their stage holds valid data, so idle
  cycles do not toggle them. Immediate assertions check that every stored
  result is one-hot.

Arrangements that have been evaluated for this scheme, and are all
simulated in `tb_table_configs`:

| width | stage 1        | stage 2        |
|-------|----------------|----------------|
| 64    | 8-bit HS       | 8-bit HS       |
| 64    | 16-bit HS      | 4-bit LP       |
| 64    | 4-bit LP       | 16-bit HS      |
| 64    | 16-bit HS      | 4-bit HS       |
| 64    | 4-bit HS       | 16-bit HS      |
| 128   | 16-bit HS      | 8-bit HS       |
| 128   | 8-bit HS       | 16-bit HS      |
| 128   | 16-bit HS      | 8-bit LP       |
| 128   | 8-bit LP       | 16-bit HS      |

(HS = look-behind, LP = ripple.) WIDTH must be a multiple of S1_WIDTH.
Elaboration stops with an error otherwise.

## Files

| file | contents |
|------|----------|
| `rtl/cmp_pkg.sv` | `cmp_kind_e` (which comparator), `cmp_result_t {lt, eq, gt}`, one-hot check function |
| `rtl/nand_nor_and_tree.sv` | alternating NAND/NOR AND tree with node taps |
| `rtl/eq_suffix_tree.sv` | EQ_i for every bit from the tree nodes |
| `rtl/highspeed_comparator.sv` | look-behind comparator |
| `rtl/lowpower_comparator.sv` | ripple comparator |
| `rtl/cmp_core.sv` | one stage comparator of either kind plus its `{lt,eq,gt}` adapter |
| `rtl/hier_comparator.sv` | two-stage pipelined comparator |
| `rtl/comparator_top.sv` | 64-bit unit with the fast and the small realization |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_table_configs` |

## Simulating

Each testbench is self-contained. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog counts a failure
if a run hangs. From the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cmp_pkg.sv tb/tb_comparator_top.sv --top-module tb_comparator_top
./obj_dir/Vtb_comparator_top
```

Replace the testbench name to run another one. All of them finish in
seconds.

* `tb_nand_nor_and_tree`: every input pattern for 4- and 5-input trees,
  checking each node; random 64-input patterns.
* `tb_eq_suffix_tree`: every pattern for 6 and 8 bits, the worked example,
  and random 64-bit patterns with long runs of ones.
* `tb_highspeed_comparator`: the worked example; all 65,536 8-bit operand
  pairs, checking lt/eq and the LT, Equal and EQ vectors; random 64-bit
  pairs that share long prefixes.
* `tb_lowpower_comparator`: every 4-bit and 8-bit pair; random 64-bit pairs.
* `tb_hier_comparator`: a random stream with bubbles through the default
  arrangement and through a 16-bit HS / 4-bit LP one. It checks every result,
  the two-cycle latency and back-to-back output.
* `tb_comparator_top`: the full 64-bit unit at its default parameters. It
  checks both realizations against the reference and against each other,
  together with latency and reset flush. It counts how often each situation
  arises: deciding group at the top, deciding group lower down, decision
  inside a group, all equal, bit 0 only, lt, gt, back-to-back results,
  bubbles, reset with results in flight. It fails if any of them never
  happens.
* `tb_table_configs`: all nine arrangements in the table above, on one
  operand stream.

The simulator used for these runs is two-state, so flip-flops that are not
reset start at arbitrary values. The testbenches only look at results whose
valid flag is set.

## Changing the design

* **Width and split.** To change the width or the split, override `WIDTH`,
  `S1_WIDTH`, `S1_KIND` and `S2_KIND` on `hier_comparator`, or add another
  instance to `comparator_top`. Non-power-of-two widths work in both
  comparators, because the trees pad with ones.
* **Deeper hierarchies.** These would chain more stages in the same way, with
  each stage's `{lt, eq, gt}` groups turned into (gt, lt) bit pairs for the
  next. They are not provided.
* **Handshake.** The interface is a plain valid pipeline with no
  back-pressure. A stall would need an enable on both register stages.

## Choices made in this implementation

These are decisions the circuit description leaves open:

* The stage-to-stage encoding (gt_j, lt_j) and the one-hot result type.
* The valid flags, the reset scheme and the load enables.
* 2-input gates in the NAND/NOR trees, padding with ones, and the final
  inverter for an odd number of levels.
* Which tree nodes form each EQ_i. The scheme is the aligned-block split
  described above.
* Bit numbering from 0 at the least significant bit.
* Putting both 64-bit realizations side by side in the top.
