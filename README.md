# Clock-gating logic simplified by factored-form matching

A clock-gating function says when a group of flip-flops may stop receiving
clock edges. Written out as its own logic, such a function can cost as many
gates as it saves power. The idea behind this design is to build as little of
it as possible. The gating function is written as a factoring tree, a tree of
AND (`*`) and OR (`+`) nodes. Each subtree of it is compared with the nodes the
combinational circuit already has. Where a subtree computes the same function
as an existing node (a *strong match*), the node's output is wired in and only
the glue gates around it are added.

The same tree also gives the shape of the clock network. The AND nodes with
the control variables become clock gates, and the remaining nodes become clock
buffers. This is *delay matching*: the gates sit where buffers of the same
depth would sit, so the gated clock reaches every leaf with matched latency.
The gated leaf clocks drive the ISCAS-89 benchmark circuit s27.

The RTL has four parts:

| part | modules | what it is |
|---|---|---|
| strong-matched gating function | `sm_gating_logic`, `existing_nodes` | F of eight variables a..h, reusing three existing nodes |
| match checker | `sm_match_checker` (with `gating_fn_orig`, `existing_nodes`) | proves, over 17 clock cycles, that each subtree equals its node |
| delay-matched clock tree | `dm_clock_tree`, `icg_cell` | one root clock, four enables, three gated subtrees N1, N2, N3 |
| benchmark load | `s27` | s27 with each flip-flop on a clock from a different subtree |

`cg_matching_top` wires the four parts together. Shared types are in
`cg_pkg`.

## The gating function and its matches

The variables a..h are bundled in the packed struct `cg_pkg::gvars_t`, with a
in bit 0 and h in bit 7. The three existing nodes are:

    n1 = c(a+b)        n2 = (b+a)c + ba        n3 = (a+b)(c+d)

The gating function F contains three subtrees that correspond to these nodes:

    sb1 = (b+a)c        same tree as n1 with its children swapped   (syntactically equivalent)
    sb2 = ab + c(a+b)   different tree, same function as n2          (equivalent)
    sb3 = (a+b)(c+d)    same tree, same child order as n3            (identical)

    F = h*sb2 + f*( e*(b*d + a*sb1) + g*(d*e + sb3) )

All three kinds of equality count as strong matches. After matching,
`sm_gating_logic` computes

    F = h*n2 + f*( e*(b*d + a*n1) + g*(d*e + n3) )

This needs only the AND/OR glue gates. The three subtrees are not built
again. `gating_fn_orig` keeps the unmatched form, with dedicated subtree
gates. It is used only as the reference side of the match checker, and its
testbench confirms that both forms give the same F on all 256 inputs
(F = 1 on 98 of them).

The positions of h, f, e, g and of the three subtrees are fixed by the tree
this design is based on. The operators of the glue nodes between them
(`b*d + a*sb1` and `d*e + sb3`) are a reading of a small drawing. If your
tree differs, change the `always_comb` blocks of `gating_fn_orig` and
`sm_gating_logic`, and the reference functions `ref_f` in the two
testbenches and in `tb_cg_matching_top`.

## Proving a match: `sm_match_checker`

A match is decided by comparing outputs: the subtree and the node are fed the
same inputs, and their outputs must agree. The checker does this
exhaustively, for `K` pairs at once.

* A `start` pulse, sampled on a rising edge while the checker is not busy,
  clears the pattern counter and the mismatch flags.
* For the next `2**NIN` cycles, `pattern` steps from 0 to all-ones. The
  subtree outputs return combinationally on `sub_val` and the node outputs
  on `node_val`. Any pair that differs has its mismatch flag set.
* After the last pattern, `match[k]` is set for every pair that never
  differed, and `done` rises. This is `2**NIN + 1` rising edges after the
  edge that sampled `start`: 17 cycles at the defaults `NIN = 4` and `K = 3`.
  `done` and `match` hold until the next start. `busy` is high during the
  scan.
* Two assertions check the handshake: `busy` and `done` are never high
  together, and `done` follows the last pattern.

In the top, the pattern drives a..d of a private copy of `gating_fn_orig` and
of `existing_nodes` (e..h are 0). The pairs are (sb1,n1), (sb2,n2) and
(sb3,n3). All three report a match.

Checking by exhaustive scan is this design's choice. The original method
labels tree nodes and compares outputs, but gives no circuit for the check.
An exhaustive scan is the simplest circuit that decides equivalence of trees
this small. Its cost doubles with every added variable.

## The delay-matched clock tree

`dm_clock_tree` has one root clock and four enables. `cg_pkg::en_t` bundles
them as en1..en4, with en1 in bit 0. In the top they are the gating variables
themselves: en1 = h, en2 = f, en3 = e, en4 = g (`cg_pkg::enables_of`).

    clk ──[gate en1]──────────────────── N2 (5 leaves)
        └─[gate en2]──┬──[gate en3]───── N1 (6 leaves)
                      └──[gate en4]───── N3 (6 leaves)

| subtree | runs when | leaves | leaves of the original tree |
|---|---|---|---|
| N2 | en1 | `N2_LEAVES` = 5 | the leaves of sb2 |
| N1 | en2 and en3 | `N1_LEAVES` = 6 | the leaves of the e branch |
| N3 | en2 and en4 | `N3_LEAVES` = 6 | the leaves of the g branch |

Setting en1 alone runs only N2. Setting all four enables runs the whole tree.

Each gate is an `icg_cell`: a latch that is transparent while its input clock
is low, followed by an AND. An enable that changes while the clock is high
therefore takes effect only at the next rising edge, and never cuts or
creates a pulse. Drive enables during the low phase, or at least before the
rising edge they should affect. en3 and en4 are gated off the en2 branch
clock, so their latches stay transparent while en2 is off. This is harmless:
the branch clock is then low.

The gate described originally is a plain AND of clock and enable. The latch
is added here because a bare AND gate can produce glitches on the clock.

Inside a subtree, the gated clock is fanned out through buffer stages. N2
follows a buffer chain p1 → p2 → {p3, p4 → p5}, and its leaves are taken at
depths p3, p3, p4, p5, p5. In RTL a buffer is a wire. Equal leaf delays, the
point of delay matching, must be achieved in clock-tree synthesis and layout,
with gate cells whose delay matches the buffers they replace. The RTL only
fixes which leaves are gated by what.

## s27 on gated clocks

`s27` is the standard ISCAS-89 benchmark: inputs G0..G3, output G17 and three
flip-flops y0 = G5, y1 = G6, y2 = G7. The gate list is in the file header.
Each flip-flop has its own clock port:

* y0 is clocked by leaf 0 of N1 (runs when f & e);
* y1 is clocked by leaf 0 of N2 (runs when h);
* y2 is clocked by leaf 0 of N3 (runs when f & g).

When an enable is clear, its flip-flop keeps its value, and the next state of
the others uses that held value. Which flip-flop goes on which subtree, and
the asynchronous active-low reset to 0, are this design's choices: the plain
benchmark has one clock and no reset.

## Top level: `cg_matching_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | root clock |
| `rst_n` | in | 1 | asynchronous active-low reset (checker and s27) |
| `v` | in | 8 (`gvars_t`) | a..h; h, f, e, g are also en1..en4 |
| `chk_start` | in | 1 | start a match check |
| `g_in` | in | 4 | s27 inputs {G3,G2,G1,G0} |
| `f_out` | out | 1 | gating function F (combinational from `v`) |
| `n_out` | out | 3 | existing nodes {n3,n2,n1} |
| `chk_busy`, `chk_done` | out | 1 each | checker scanning / result valid |
| `chk_match` | out | 3 | {sb3≡n3, sb2≡n2, sb1≡n1} |
| `n1_clk`, `n2_clk`, `n3_clk` | out | 6, 5, 6 | leaf clocks of N1, N2, N3 |
| `g17` | out | 1 | s27 output |
| `s27_state` | out | 3 | s27 flip-flops {y2,y1,y0} |

`f_out` is an output only. It is not wired back into the clock tree. The
tree's gating comes directly from the variables h, f, e, g. This follows the
original construction, where those variables become the enables.

The checker runs on the ungated root clock. s27 runs on the gated leaves.
The design has no parameters of its own. Its sizes come from `cg_pkg` and
from the checker's defaults.

## How far to trust it

* Taken from the original design and followed closely: the three node
  expressions; the three subtrees and their kinds of match; the positions of
  h, f, e, g in F and their role as en1..en4; the gating hierarchy of the
  clock tree; the N2 buffer chain and the leaf counts; the s27 circuit.
* This design's own choices: the glue operators inside F (see above); the
  latch in the clock gate; the exhaustive match checker, its handshake and
  its 4-variable width; which leaf clock drives which s27 flip-flop; the
  resets.
* Not reproduced: the reported power (0.423 W strong matching, 0.102 W delay
  matching) and delay (1.463 ns, 0.912 ns) were measured on an FPGA flow.
  They depend on the target and tools, not on this RTL. The matching
  *algorithm*, meaning the search of a large netlist for matches, is a
  synthesis-tool step, not hardware. This RTL is its result for one example
  tree.

## Simulating

Every testbench in `tb/` is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_cg_matching_top \
        rtl/cg_pkg.sv rtl/*.sv tb/tb_cg_matching_top.sv
    ./obj_dir/Vtb_cg_matching_top

| testbench | checks |
|---|---|
| `tb_existing_nodes` | n1..n3 on all 256 inputs |
| `tb_gating_fn_orig`, `tb_sm_gating_logic` | F and the subtrees/nodes on all 256 inputs against an independent reference |
| `tb_sm_match_checker` | three scans with single-pattern differences (first, middle, last pattern), result, `busy`, latency of 17 cycles |
| `tb_icg_cell` | 200 random enables: pulse count, low output while gated, no pulse cut when the enable drops mid-pulse |
| `tb_dm_clock_tree` | all 16 enable settings: edge count on every leaf against the gating rule |
| `tb_s27` | 2000 steps with random inputs and random subsets of the three clocks against a reference model |
| `tb_cg_matching_top` | whole design at its default sizes: exhaustive F, one checker scan, 3000 cycles of random enables and s27 inputs |

`tb_cg_matching_top` also counts each mechanism: F = 1 and F = 0, strong
matches found, each of N1, N2 and N3 gated off, the en2 branch gated off,
and the whole tree running. It fails if any count is zero. The whole suite
runs in well under a second.

`verilator -Wall` reports only harmless warnings:

* unused bits, where a block receives the whole `gvars_t` struct but reads
  only part of it;
* the reset used both asynchronously and in the `disable iff` of the
  checker's assertions.

Synthesis infers one latch per `icg_cell`, as intended.
