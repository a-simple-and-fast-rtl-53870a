# Parallel round-robin arbiter (PRRA)

An N-input arbiter that grants at most one of N requests per cell slot. The
priority rotates: the input just after the last granted one has the
highest priority, and the granted input drops to the lowest. Arbiters like
this one sit at every input and output port of a crossbar scheduler (iSLIP
and similar matching algorithms), so they have to be fast and fair.

The main idea is to arbitrate with a **binary tree** instead of a
programmable priority encoder. Each of the N leaves holds one bit of a
one-hot *head* vector that marks the highest-priority input. Going up the
tree, every internal node reduces its subtree to a **two-bit code**. Going
down, a single grant bit is steered from the root along one path to the
winning leaf. The request-to-grant delay is therefore O(log N) gate levels
and the area O(N) gates. The grant follows strict round-robin order for
**any** request pattern, not only when all inputs request.

```
                 r-node                      level 0
              /          \
         i2-node        i2-node              levels 1 .. log2N-2
         /    \         /    \
     i1-node i1-node i1-node i1-node         level log2N-1
      /  \    /  \    /  \    /  \
     L0  L1  L2  L3  L4  L5  L6  L7          leaves, chained in a ring
     ^-----------------------------'         (grant of Li sets head of Li+1)
```

## The head ring (leaf nodes)

Leaf `i` (`prra_lnode`) holds one flip-flop, `Head_i`, and at any time
exactly one of them is 1. Requests `R_i` and heads `H_i` go up into the
tree, and the tree's grant `G_i` comes back down to the requester. The
leaves also form a ring: the grant of leaf `i-1` feeds the head input of
leaf `i`, and leaf N-1 feeds leaf 0. At the end of a slot in which *some*
input was granted, every head flip-flop loads its ring input, so the leaf
after the granted one becomes the head and the old head clears. In a slot
with no request at all, the heads keep their values. After reset, `Head_0`
is 1.

The rotation is therefore decided entirely by the grant of the current
slot, and no separate pointer arithmetic is needed.

## Subtree codes {S1,S0}

This is the part that makes the tree work. Every internal node sends its
parent a code `{S1,S0}` describing the leaves below it:

| S1 S0 | meaning for the subtree |
|-------|-------------------------|
| 0 0 | head not here; no request |
| 0 1 | head not here; at least one request |
| 1 0 | head here (leaf k); no request at index >= k in this subtree |
| 1 1 | head here (leaf k); a request at index >= k in this subtree |

If the head lies outside a subtree, ring order from the head enters the
subtree at its leftmost leaf. The subtree then behaves like a plain linear
priority chain, and "any request" is all that matters. If the head lies
inside, requests left of the head come *last* in ring order (after the
wrap-around), so the code separates the requests "at or after the head"
from the rest.

Type-1 nodes (`prra_i1node`) build the code from two leaves:

```
S0 = R_R | ~H_R & R_L          S1 = H_L | H_R
```

Type-2 nodes (`prra_i2node`) merge two codes. A request in the right
subtree always counts. A request counted in the left subtree counts unless
the head is on the right, because left-of-head requests come after the
wrap:

```
S0 = S0_R | S0_L & ~S1_R       S1 = S1_L | S1_R
```

## Steering the grant

The root (`prra_rnode`) decides which half of the ring holds the winner:

```
G_L = S1_L&S0_L | ~S1_R&~S0_R | S0_L&~S0_R
G_R = S1_R&S0_R | ~S1_L&~S0_L | ~S0_L&S0_R
```

The left half wins if (a) it holds the head and a request at or after it,
(b) the right half has neither head nor request, so the ring wraps back
into the left half, or (c) the head is on the right with nothing at or
after it, and the left half has a request. Otherwise the right half wins.
With exactly one head, `G_L` and `G_R` are always complementary.

A type-2 node uses the same rule, gated by the grant `G` from its parent.
It adds one case, (d): when the head is outside the node's subtree and
both children have requests, the left child wins.

```
G_L = G & ( S1_L&S0_L | ~S1_R&~S0_R | S0_L&~S0_R | S0_L&~S1_R )
G_R = G & ( S1_R&S0_R | ~S1_L&~S0_L | ~S0_L&S0_R )
```

The type-1 node finally picks one of its two leaves. It grants a leaf only
if that leaf requests:

```
G_L = G & R_L & ( H_L | H_R&~R_R | ~H_L&~H_R )
G_R = G & R_R & ( H_R | H_L&~R_L | ~H_L&~H_R&~R_L )
```

A subtree that has neither head nor request can receive `G = 1` on both
children (both terms `~S1_R&~S0_R` and `~S1_L&~S0_L` are true). This is
harmless: no leaf below requests, so no grant comes out.

**The second term of G_L** in the root and type-2 equations tests the
*right* subtree for being idle (`~S1_R&~S0_R`). Some renderings of these
equations show `~S1_L&~S0_R` instead. That variant loses the grant when
the head's own half holds only requests before the head and the other half
is idle. For example, with N=8, head at 1 and only input 0 requesting, it
grants nothing. The form used here agrees with the case analysis (a)-(d)
above and with the node's full input/output table.

### Worked example (N=8)

The head is at input 5, and only inputs 1 and 3 request. The leaf pairs
report (0,1)=01, (2,3)=01, (4,5)=10 and (6,7)=00. The left type-2 node
reports 01 and the right one 10. At the root, term (c) `S0_L&~S0_R` is
true, so the grant goes left. The left type-2 node sees two subtrees with
requests and no head (case d), so the grant goes to pair (0,1). There,
with no head and only `R_1`, `G_R` is 1: input 1 is granted. That is the
first requester in the ring order 5, 6, 7, 0, 1. At the clock edge the
head moves to input 2.

## Timing and interface (`prra`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one arbitration (cell slot) per cycle |
| `rst_n` | in | 1 | asynchronous, active low; head = input 0 |
| `req` | in | N | request of each input |
| `grant` | out | N | at most one bit set; only to a requester; some bit set whenever `req != 0` |
| `head` | out | N | one-hot, current highest-priority input |
| `load`, `load_idx` | in | 1, log2 N | programmable variant only (see below) |

`grant` is purely combinational from `req` and the head flip-flops, so it
is valid in the same cycle as the request (zero cycles of latency). The
head updates on the rising edge that ends the slot. Concurrent assertions
in `prra` check that the head is one-hot, that at most one grant is set,
that a grant goes only to a requester, and that a request is never left
ungranted.

Parameters:

* `N` (default 8): number of inputs. It must be a power of two and at
  least 4. With N=4 there is no type-2 level.
* `PROGRAMMABLE` (default 0): selects how the head is stored (see below).

## Programmable variant (`PROGRAMMABLE = 1`, `prra_prog_head`)

The N head flip-flops can be replaced by an encoder, a log2 N-bit register
and a decoder. The tree is unchanged. The encoder turns the one-hot grant
into an index, the register takes `index + 1 mod N` after a grant, and the
decoder produces the one-hot head for the tree. In round-robin operation
this behaves exactly like the flip-flop ring. In addition, `load` writes
`load_idx` into the register, so any input can be given the highest
priority. This implementation makes these choices of its own:

* a load wins over a grant in the same cycle;
* reset gives index 0.

In the default ring mode `load` and `load_idx` are unused.

## Size and depth

Yosys generic synthesis of `prra` (flattened, mapped to 2-input AND/OR and
NOT gates) gives:

| N | gates (AND+OR+NOT) | flip-flops | longest path (gate levels, incl. ends) |
|---|---|---|---|
| 8 | 104 | 8 | 13 |
| 16 | 237 | 16 | 17 |
| 32 | 497 | 32 | 21 |
| 64 | 1018 | 64 | 25 |

Gate count grows linearly, about 16 gates per input, and depth grows by 4
levels per doubling of N. Both match the O(N) area and O(log N) delay of
the tree. No FPGA timing figures are given here; those depend on the
target.

## Departures and own choices

* Head flip-flops: conceptually set/reset flip-flops. Here each is an
  ordinary clocked flip-flop with enable = "some grant this slot" and data
  = previous leaf's grant. This gives the same set-next/clear-old rule.
* Clocking, reset style (asynchronous, active low) and the zero-latency
  combinational grant are this design's choices.
* Leaf 0 is the leftmost leaf, and ring order runs from left to right.
* N=4 is accepted as well as N >= 8.
* The programmable variant's load priority and reset value are this
  design's choices (see above).
* The crossbar scheduler around the arbiters (request state memory, grant
  and accept arbiter banks, decision registers) is not part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/prra_pkg.sv` | `scode_t`, the {S1,S0} subtree code |
| `rtl/prra_lnode.sv` | leaf: head flip-flop, ring link |
| `rtl/prra_i1node.sv` | type-1 node (over two leaves) |
| `rtl/prra_i2node.sv` | type-2 node |
| `rtl/prra_rnode.sv` | root node |
| `rtl/prra_tree.sv` | generated tree of N-1 nodes, heap-numbered (root 1, children 2j/2j+1, leaf i = node N+i) |
| `rtl/prra_prog_head.sv` | encoder / register / decoder head for the programmable variant |
| `rtl/prra.sv` | top: head storage + tree + assertions |

Testbenches in `tb/` are self-checking and print
`TB_RESULT checks=<n> failures=<n>`:

* `tb_prra_i1node`, `tb_prra_rnode`: exhaustive over all legal inputs.
* `tb_prra_i2node`: the node's full table of legal inputs with G=1, plus
  G=0.
* `tb_prra_lnode`, `tb_prra_prog_head`: random stimulus against a register
  model.
* `tb_prra_tree`: all 256 request vectors × 8 head positions at N=8,
  exhaustive at N=4, and random at N=16 and N=64, against a round-robin
  reference.
* `tb_prra`: end-to-end test of both variants at N=8 against a cycle model.
  It checks fairness (no input that keeps requesting waits N slots) and
  requires each of these to occur: advance, idle, wrap-around, grant to the
  head itself, full load, and priority load.
* `tb_prra_full`: the top at its default parameters through 20 000 slots.
* `tb_prra_sizes` (with helper `prra_size_run`): N = 8, 16, 32 and 64 side
  by side. It runs random traffic, persistent requester sets, and
  saturation. One persistent set has N/2+1 members (inputs 0, 1, 2, 4, 6,
  ...). A set of m members must give each member exactly 4 grants in 4m
  slots.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/prra_pkg.sv \
    tb/tb_prra.sv --top-module tb_prra -o sim
./obj_dir/sim
```

Replace `tb_prra` with any of the testbench names above. Verilator's lint
(`-Wall`) reports unused `load`/`load_idx` in ring mode. It also reports
`rst_n` being used both as an asynchronous reset and in the assertions'
`disable iff`; both reports are expected.
