# A 32-bit parallel-prefix binary adder

Adding two words with a ripple-carry chain takes time proportional to the word
width, because bit *i* cannot settle until the carry from bit *i-1* has. A
parallel-prefix adder avoids this wait. It first reduces every bit pair to two
signals that say what the bit does to a carry:

* **generate** `G = a AND b`: the bit creates a carry whatever comes in;
* **propagate** `P = a XOR b`: the bit passes an incoming carry on.

It then combines those pairs over larger and larger groups of bits in a
logarithmic tree of small cells. After the tree, every bit knows its incoming
carry and the sum is one XOR away. This RTL implements such an adder:
`sum = a + b + c0` for 32-bit `a` and `b`, with carry out `c32`, in
`ceil(log2(33)) = 6` levels of prefix cells.

The whole adder is combinational. It has no clock, no reset and no pipeline
registers.

## The three stages

```
 a[31:0] b[31:0] c0
      |      |     |
 +----------------------+   P_i = a_i ^ b_i, G_i = a_i & b_i   (one gate)
 |    pre_processing    |   c0 becomes position 0: (G,P) = (c0, 0)
 +----------------------+
      | gp[0..32]     \ p_bit[31:0]
 +----------------------+        \
 |      adder_tree      |  black and grey cells, 6 levels
 +----------------------+          \
      | carry[0..32]                \
 +----------------------+   sum_i = p_bit_i ^ carry_i
 |   post_processing    |   c32   = carry[32]
 +----------------------+
      |            |
   sum[31:0]      c32
```

Operand bits enter as pairs: bit *i* of `a` goes with bit *i* of `b`. This
pairing is just the indexing of the vector ports, so there is no separate
block for it.

## Group generate and propagate, and the two cells

Write `(G,P)_i:j` for the generate and propagate of the bits from *j* up to
*i*. The group generates a carry if its upper part generates one, or if the
upper part propagates and the lower part generates. The group propagates only
if both parts propagate:

```
P_i:j = P_i:k AND P_k-1:j
G_i:j = G_i:k OR (P_i:k AND G_k-1:j)
```

* `black_cell` evaluates both equations. It is used wherever the merged
  group's propagate is still needed by a later level.
* `grey_cell` evaluates only the `G` equation. It is used where the lower
  group already reaches down to the carry in. The merged `G` is then the
  final carry out of bit *i*, and its `P` is never needed.

The operator is associative, so the tree may group the bits in any order and
still reproduce exactly the ripple-carry result.

## The adder tree (Kogge-Stone, carry in at position 0)

This is the part that needs the most care when it is modified.

**Positions.** The tree works on `N = WIDTH+1` positions. Position 0 holds the
carry in, as `(G,P) = (c0, 0)`. Position *k* = *i*+1 holds bit *i*. Once the
tree has run, the group generate at position *k* covers every position from 0
to *k*. That value is the carry into bit *k*, so the output `carry[k]` is
taken directly from it. `carry[0]` is `c0` and `carry[WIDTH]` is the carry out.
Placing `c0` inside the prefix problem, rather than adding it afterwards,
costs at most one extra level. For 32 bits it costs exactly one: 33 positions
need 6 levels, where 32 would need 5.

**Levels.** Level *l* (1 … `LEVELS`, where `LEVELS = ceil(log2(N))`) uses the
distance `D = 2^(l-1)`. Every node *k* is treated according to its position:

| node position         | action at level *l*                     | why                                                           |
|-----------------------|-----------------------------------------|---------------------------------------------------------------|
| `k < D`               | passed through unchanged                | its span already reaches position 0                           |
| `D <= k < 2D`         | grey cell with partner `k-D`            | the partner's span reaches position 0, so only `G` is needed  |
| `k >= 2D`             | black cell with partner `k-D`           | both `G` and `P` of the merged span are still needed          |

After level *l*, node *k* covers positions `max(0, k-2^l+1) … k`. The
partner `k-D` reaches position 0 exactly when `k-D < D`, which gives the
grey/black split in the table. A grey cell's output propagate is set to 0.
This is its true value, because any span that includes position 0 has
`P = 0`.

For the 32-bit default the counts are:

| level | D  | passed | grey | black |
|-------|----|--------|------|-------|
| 1     | 1  | 1      | 1    | 31    |
| 2     | 2  | 2      | 2    | 29    |
| 3     | 4  | 4      | 4    | 25    |
| 4     | 8  | 8      | 8    | 17    |
| 5     | 16 | 16     | 16   | 1     |
| 6     | 32 | 32     | 1    | 0     |

That is 103 black and 32 grey cells, one grey cell ending at each bit. In
the RTL, each level is its own generate block (`g_lvl[l]`) with its own node
array. No single variable is both read and written inside one level, and the
structure matches the table above line for line.

## Interface and timing

| port       | dir | width   | meaning                          |
|------------|-----|---------|----------------------------------|
| `a`        | in  | `WIDTH` | operand                          |
| `b`        | in  | `WIDTH` | operand                          |
| `c0`       | in  | 1       | carry in                         |
| `sum`      | out | `WIDTH` | `(a + b + c0) mod 2^WIDTH`       |
| `c32`      | out | 1       | carry out of the top bit         |

`WIDTH` defaults to 32, and any `WIDTH >= 1` works. The port keeps the name
`c32` at every width. Outputs follow the inputs after one propagation delay.
The critical path is one pre-processing gate, `LEVELS` cells of AND-OR, and
one sum XOR.

## Files

| file                     | contents                                                       |
|--------------------------|----------------------------------------------------------------|
| `rtl/adder_pkg.sv`       | `gp_t` (a packed `{g, p}` pair) and `prefix_levels()`           |
| `rtl/pre_processing.sv`  | stage 1: bit generate/propagate, carry-in position             |
| `rtl/black_cell.sv`      | full (G,P) merge                                               |
| `rtl/grey_cell.sv`       | generate-only merge                                            |
| `rtl/adder_tree.sv`      | stage 2: Kogge-Stone network of the two cells                  |
| `rtl/post_processing.sv` | stage 3: sum XOR and carry out                                 |
| `rtl/binary_adder.sv`    | top level                                                      |
| `tb/tb_*.sv`             | one self-checking testbench per module, plus `tb_binary_adder_widths` |

## Where this implementation makes its own choices

The stage structure, the generate/propagate split, the merge equations, the
black/grey cell names and the 32-bit interface (`a`, `b`, `c0`, `sum`, `c32`)
come from the design this RTL follows. The following points are choices made
here:

* **Generate is an AND.** One description of the first stage calls its gates
  "XOR and OR". An OR generate gives wrong sums (1 + 0 would generate a carry),
  and the merge equations above need `G = a AND b`. So generate is an AND and
  propagate an XOR.
* **Tree arrangement.** The source says the carries are computed in parallel
  by black and grey cells, but it does not say how the cells are arranged.
  Kogge-Stone was chosen for its minimum depth and regular wiring. Brent-Kung,
  Sklansky or Han-Carlson trees would use the same two cells and fewer of
  them, at the cost of more levels or more fanout. To change the tree, rewrite
  `adder_tree.sv` only. Its ports and its testbench do not depend on the
  topology.
* **Carry in as a prefix position** (see above). It costs one extra level at
  32 bits.
* **No registers.** One description says that the result is "saved" in the
  last stage. The published block symbol of the adder, however, has no clock
  or reset, so the adder is built purely combinational. If you need a
  registered output, add a flop stage around `binary_adder`.

The reference implementation was reported on an FPGA at 53 LUTs and
9.6 ns total delay, against 68 LUTs and 14.4 ns for an earlier design. The
device and tool behind those numbers are not known. They have not been
reproduced here, and they say nothing definite about this RTL's area or speed
on other targets.

## Verification

Each testbench computes its expected values independently of the RTL and
prints `TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure
if it hangs.

* `tb_black_cell`, `tb_grey_cell`: exhaustive. A `(G,P)` pair is treated as a
  carry function, and the merged pair must act like the composition of its
  two parts for both values of the incoming carry.
* `tb_pre_processing`, `tb_post_processing`: corner and random vectors,
  checked bit by bit.
* `tb_adder_tree`: arbitrary `(G,P)` patterns, including ones no real operand
  pair produces, with frequent long all-propagate runs. The trees are
  compared with a serial ripple recurrence at widths 32 and 13.
* `tb_binary_adder`: the top at its default width, with no parameter
  override. About 5,000 directed and random additions are compared with
  33-bit integer addition. The testbench also counts how often each carry
  behaviour occurred, and fails if any count is zero:
  * a carry in that changed the result;
  * a carry out;
  * a carry that crossed all 32 bits;
  * a carry that ran through 16 or more propagating bits;
  * an addition with no carries at all.
* `tb_binary_adder_widths`: widths 1–4 exhaustively, and widths 7, 16 and 64
  at random.

All seven pass. Each of the six module testbenches was also run against a
deliberately broken copy of its module, and each reported failures.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/adder_pkg.sv tb/tb_binary_adder.sv \
          --top-module tb_binary_adder -y rtl
./obj_dir/Vtb_binary_adder
```

For the other testbenches, replace the file and the top-module name with
theirs. `verilator --lint-only -Wall` is clean on every RTL file.
