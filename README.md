# Fully binary clustered associative memory (GBNN) in SystemVerilog

This is an associative memory: you store a set of messages, and later you
give it a message with some parts missing and it fills them in. It is built
as a small neural network whose weights and neuron states are all single
bits. Retrieval uses no adders and no comparators. Each neuron takes a
unanimous AND/OR vote, which keeps the hardware small and fast.

The network has `C` clusters of `L` neurons. A message is `C` symbols, and
each symbol is a value in `0..L-1`, so it needs `SYM_W = log2(L)` bits.
Symbol `j` of a message is represented by switching on exactly one neuron in
cluster `j`.

- **Learning** a message connects every pair of its selected neurons, which
  forms a *clique*. A connection is one bit, and it is only ever set, never
  cleared.
- **Retrieving** starts from a partial message and runs a few iterations of
  the vote below. The neurons that remain on in each cluster are the answer.

Two hardware organisations are provided. They behave the same at the
interface and differ in how the clusters exchange neuron values:

| | neuron-serial (default) | cluster-serial |
|---|---|---|
| each cycle | every cluster sends one of its neurons | one cluster sends all of its neurons |
| cycles per iteration | `L` | `C` |
| weight storage | each connection stored once, shared by both clusters: `C(C-1)/2 · L²` bits | each cluster keeps its own copy: `C(C-1) · L²` bits |
| wires between clusters | 1 bit per cluster | one `L`-bit bus |

With the defaults (`C=8`, `L=16`, 32-bit messages) that is 7168 weight bits
for neuron-serial and 14336 for cluster-serial.

## 1. The retrieving rule

Write `v(c,l)` for the state of neuron `l` in cluster `c`, and `W` for the
connection bits. One iteration computes, for every neuron at once:

```
new v(c,l) = AND over every other cluster c' of
               ( OR over l' of ( W(c,l ; c',l') AND v(c',l') )   -- some active neuron of c' is connected to me
                 OR  NOT ( OR over l' of v(c',l') ) )            -- c' has no active neuron, so it abstains
```

In words, a neuron switches on when every other cluster that has something
active has at least one active neuron connected to it. The second line is
the **transparency** term. Without it, a cluster whose symbol was erased
(all of its neurons off) would veto every neuron in the network.

**Given symbols are held.** A cluster whose symbol was supplied keeps its
input neuron for the whole retrieval. Only the erased clusters are updated.
This follows the statement that the unselected clusters are the ones to be
filled in.

It also matters in practice. Suppose that after a few iterations an erased
cluster has several candidates switched on. If the given clusters were also
updated by the vote, those candidates could switch on extra neurons in the
given clusters too. With three clusters of three neurons, that already makes
the answer ambiguous within four iterations.

**Number of iterations.** Retrieval always runs a fixed `ITER` iterations
(4 by default). It does not stop early when the state becomes stable.

**Reading the answer.** After a retrieval, each cluster reports:

- all of its neuron bits (`neurons`);
- the lowest active neuron, as its symbol (`sym_out`);
- a flag when it does not have exactly one active neuron (`ambiguous`).

## 2. Neuron-serial organisation: shared weights in rotating rings

This is the harder of the two schemes, and the default.

### Storage cost and the access problem

Between clusters `j < g` there are `L×L` connection bits. Storing them once
per pair, rather than once per cluster, halves the storage. The price is
that two clusters must read the same bits at the same time, and they need
different bits.

At cycle `t` of an iteration, every cluster broadcasts its neuron `t`
(one bit per cluster). So:

- cluster `j` needs, for each of its neurons `a`, the bit `W(a, t)`. That is
  a *column* of the pair's matrix.
- cluster `g` needs, for each of its neurons `b`, the bit `W(t, b)`. That is
  a *row*.

A plain register file would need `L` row read ports and `L` column read
ports on every pair matrix.

### Wrapped diagonals in shift rings

Instead, the `L²` bits of each pair sit in `L` flip-flop rings of `L` cells
each (`pair_mem_ns`). Ring `M` holds the `M`-th wrapped diagonal:

```
RING(M, N) = W((M + N) mod L, N)        ring M, cell N
```

Every ring shifts by one cell per cycle, toward cell 0. After `t` shifts:

- **cell 0 of ring `M`** holds `W((M+t) mod L, t)`. Across all rings, cell 0
  is one column of the matrix: the connections from broadcast neuron `t` of
  cluster `g` to every neuron of cluster `j`. Cluster `j` reads its weights
  from here.
- **cell `s` of ring `(L−s) mod L`** holds `W(t, (s+t) mod L)`. This is one
  row: the connections from broadcast neuron `t` of cluster `j` to every
  neuron of cluster `g`. Cluster `g` reads its weights from here.

Both clusters read **fixed cells**, so nothing is multiplexed. The catch is
that the neuron each read belongs to moves by one every cycle. Slot `s`
belongs to neuron `(s+t) mod L`, not to neuron `s`.

### Rotating clusters to match

Each cluster (`cluster_ns`) keeps its neuron register in a ring too, and
rotates it by one slot each cycle in the same direction.

- Slot `s` of the register always holds neuron `(s+t) mod L`, the same
  labelling the weight taps use.
- Slot 0 is the neuron being broadcast, so the cluster sends neuron `t` at
  cycle `t` with no address logic.

The vote accumulators in the computing unit (`computing_ns`) rotate in step
with the register. Every cycle, for each other cluster `g` and slot `s`:

```
acc[g][s] <= acc[g][s+1]  OR  (w[g][s+1] AND bcast[g])
```

That is, the accumulator shifts and ORs in one more term of the inner OR of
the rule. A separate bit per `g` records whether cluster `g` ever sent a 1,
and that bit drives the transparency term. On the last cycle of an
iteration, the new neuron vector is the AND over `g` of `acc OR NOT active`.

After `L` cycles, every ring has made a full turn and is back in neuron
order. So between operations, the neuron register reads directly as the
answer.

In the top level (`gbnn_ns_top`), cluster `c` takes its weights from pair
`(c,g)`'s column taps when `g > c`, and from pair `(g,c)`'s row taps when
`g < c`.

### Learning in the same rings

Learning uses the same rotation, in one revolution of `L` cycles. The bit
leaving cell 0 of ring `M` re-enters the ring as:

```
din = dout OR (v_j[slot M] AND bcast_g)
```

- `v_j[slot M]` is cluster `j`'s selected-neuron bit for neuron `(M+t) mod L`.
- `bcast_g` is cluster `g`'s broadcast bit for neuron `t`.

That is exactly `W((M+t) mod L, t)`, the bit that is passing through. A bit
is set only when both of its neurons are selected, and existing bits are
kept, so earlier messages are never erased.

For `L = 3`, the cell order matches the document's worked example: rings
`{0,4,8}`, `{3,7,2}` and `{6,1,5}`. The testbench checks this exact layout.

## 3. Cluster-serial organisation

In `gbnn_cs_top`, on cycle `t` cluster `t` places all `L` of its neuron bits
on a shared bus. The bus is the OR of each cluster's turn-gated output. Every
other cluster then:

1. looks up the `L×L` connection block for "cluster `t` → me";
2. forms its `L` vote bits, each an OR of the matching row of that block
   ANDed with the bus;
3. folds them into its accumulator: `acc &= vote | ~active`.

`active` is "the bus carried at least one 1". This is the transparency
term again.

**Weight storage.** Each cluster (`cluster_cs`) stores its `C−1` blocks in a
ring of `C−1` words, each `L²` bits wide.

- The word for the current sender is always in the output cell.
- On its own turn, the cluster does not shift its ring, so it has no slot
  for itself.

**Learning** is one pass of `C` cycles. On each cycle, the listening clusters
OR the bus, crossed with their own selected neuron, into the passing word.

**Why the weights are not shared here.** Storing each pair once (a
triangular layout) does not work for this scheme with more than three
clusters. With one sender per cycle and one read per cluster per cycle, two
different pairs would need the same storage slot on the same cycle. This
variant is therefore not built.

## 4. Control and timing

`gbnn_ctrl` is one small state machine shared by both schemes. `STEPS` is
`L` (neuron-serial) or `C` (cluster-serial).

- **idle:** `ready` is high. A `start` pulse loads the message and moves to
  learning or retrieving, according to `op`.
- **learn:** one revolution of `STEPS` cycles with `store` high.
- **retrieve:** `ITER` revolutions. `last` marks the final cycle of each
  revolution, when the clusters take their new neuron values.
- **done:** pulses for one cycle and returns to idle.

## 5. Top-level interface

`gbnn_top` has these parameters:

- `ARCH`: `ARCH_NEURON_SERIAL` (default) or `ARCH_CLUSTER_SERIAL`.
- `C = 8`, `L = 16`, `ITER = 4`.
- `SYM_W = log2(L)`.

`L` need not be a power of two. Symbol values must then stay below `L`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears all weights) |
| `start` | in | one-cycle request, accepted while `ready` is high |
| `op` | in | `OP_LEARN` or `OP_RETRIEVE` |
| `msg[C*SYM_W]` | in | symbol `j` in bits `j*SYM_W +: SYM_W` |
| `known[C]` | in | bit `j` low means symbol `j` is erased (ignored when learning) |
| `ready` | out | idle, can accept `start` |
| `done` | out | one-cycle pulse at the end of the operation |
| `neurons[C][L]` | out | all neuron states |
| `sym_out[C*SYM_W]` | out | lowest active neuron of each cluster |
| `ambiguous[C]` | out | cluster does not have exactly one active neuron |

**Timing.** The message is captured on the clock edge that accepts `start`.

- Learning ends `STEPS` edges later with `done`.
- Retrieving ends `ITER·STEPS` edges later with `done`. The outputs are valid
  from then until the next `start`.
- At the defaults, neuron-serial learning takes 16 cycles and retrieving 64.
  Cluster-serial learning takes 8 cycles and retrieving 32.

## 6. Files

**Design (`rtl/`):**

- `gbnn_pkg.sv`: enumerations for operation, architecture and state, and
  `sym_w()`.
- `ff_ring.sv`: the flip-flop ring. A shift register with a feedback/store
  input mux and a `valid` enable.
- `neuron_select.sv`: symbol → one-hot neuron (all zeros when erased).
- `pair_mem_ns.sv`, `computing_ns.sv`, `cluster_ns.sv`, `gbnn_ns_top.sv`:
  the neuron-serial scheme.
- `cluster_cs.sv`, `gbnn_cs_top.sv`: the cluster-serial scheme.
- `gbnn_ctrl.sv`: the controller.
- `gbnn_top.sv`: the top, which selects the scheme.

**Testbenches (`tb/`):** one self-checking testbench per module, each
printing `TB_RESULT checks=… failures=…`.

- The top-level testbenches compare against a bit-exact reference model of
  the rule in section 1, including the hold rule.
- They run the document's three-cluster example, plus random
  learn/retrieve sequences with erased symbols.
- They count that each behaviour actually occurred: learning, retrieval,
  transparency, several iterations, ambiguous answers and exact answers.
- `tb_gbnn_top` also runs both schemes at 16×16, and cluster-serial at 5×8
  with `ITER=3`.
- `tb_gbnn_full` runs the top at its default parameters.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/gbnn_pkg.sv tb/tb_gbnn_full.sv --top-module tb_gbnn_full
./obj_dir/Vtb_gbnn_full
```

## 7. What comes from the document and what was decided here

**From the document:**

- the binary connection matrix learnt as cliques;
- the unanimous-vote retrieving rule with transparency;
- the neuron-serial and cluster-serial communication schemes;
- the flip-flop ring memories;
- the wrapped-diagonal storage of shared weights;
- the default network size (8 clusters × 16 neurons) and 4 iterations.

**Decided here:**

- **Read taps and rotation.** The fixed read cells for the second cluster of
  each pair, and the rotating neuron register and accumulators that match
  them.
- **Learning input.** The OR-based read-modify-write learning input.
- **Hold rule.** Given clusters are held, as discussed in section 1.
- **Control.** The controller's handshake (`start`/`ready`/`done`) and the
  lowest-index symbol readout.
- **No stopping criterion.** A fixed number of iterations is always run.
- **Cluster-serial word size.** Cluster-serial weights are stored as one
  `L²`-bit word per sender. The document's figure shows the same square
  arrangement, but does not give a word width.

**Not built:**

- the shared (triangular) weight layout for the cluster-serial scheme, for
  the reason given in section 3;
- the software simulations of error rate and the area/delay studies at
  large sizes (up to 512 neurons per cluster). These are parameter settings
  of the same RTL, but were not simulated at those sizes.
