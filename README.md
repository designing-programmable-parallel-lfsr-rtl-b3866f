# Programmable parallel LFSR built from parallel prefix trees

A linear feedback shift register (LFSR) takes one input bit per clock. Many uses
(CRC over a 32-bit bus, stream ciphers, pattern generators) need many bits per
clock, and some also need the generating polynomial to be chosen at run time.
This RTL computes, in one clock, the state that a programmable Galois LFSR of
degree `n` would reach after `j` serial clocks, for any polynomial presented on
an input bus.

The main idea: every bit of the `j`-step state is a GF(2) sum of products
`D·F`. Here `D` is a polynomial bit and `F` is a state or feedback bit. Each
such sum is evaluated as the last output of a prefix computation. The prefix
computation is a tree of AND-XOR nodes. The tree can be a log-depth
Brent-Kung or Kogge-Stone tree, or a plain chain. The topology can be picked separately for
every equation, which gives a designer many area/delay trade-off points for one
function. The default configuration is a 32-bit LFSR taking 32 input bits per
clock, built as a ring of 8 registered sections of 4 bits each, with Brent-Kung
trees throughout.

The method, its equations, the three-stage structure and the 32 = 8 × 4
pipelined configuration follow the article "Designing programmable parallel
LFSR using parallel prefix trees" (B. Zolfaghari, M. Sedighi, M. S. Fallah). The
choices this RTL makes on its own are listed in the last section.

## The serial LFSR being parallelised

State bits `F_1..F_n`, generating sequence `D_0..D_{n-1}` (`D_n = 1` is
implied), serial input `M_0, M_1, ...` with `M_0` first. One serial clock does:

```
F_1 <- D_0·F_n + M_k
F_i <- D_{i-1}·F_n + F_{i-1}        i = 2..n          (+ is XOR, · is AND)
```

`F_n` is the feedback bit. In shift-register terms, the state moves up one place,
the input bit enters at the bottom, and the polynomial is XORed in when the bit
leaving the top was 1. With `M = 0` the circuit is a sequence generator. With
data on `M` it divides the input by the polynomial, as a CRC does.

Bit packing on every port:

| bus | bit | meaning |
|---|---|---|
| `state`, `in_seed`, `out_state` | `[i-1]` | `F_i`, so `[n-1]` is the feedback bit |
| `poly`, `in_poly` | `[i]` | `D_i`, `i = 0..n-1` |
| `msg`, `in_msg` | `[k]` | `M_k`, so `[0]` enters first |

For CRC-32 the polynomial is `32'h04C11DB7`. The input enters at the bottom of
the register, so the register divides without augmentation. A standard
(MSB-first) CRC is obtained by the usual framing:

- start from state 0;
- XOR the CRC's initial value into the first 32 message bits;
- append 32 zero bits.

Leading zero bits before the message change nothing, so they can pad a message
to whole words. `tb_pplfsr_crc32` shows this framing.

## Unrolling j steps: two families of equations

Write `F_i^k` for bit `i` after `k` serial steps. Unrolling the serial
recurrence gives two families. Terms whose `D` index would be negative are
dropped. An "old state" bit with index `<= 0` is an input bit: `F_{-i}^0 = M_i`.

**Feedback-bit equations**, `k = 1..j-1`. The feedback bit at each
intermediate step:

```
F_n^k = F_{n-k}^0 + Σ_{t=1..k} D_{n-t} · F_n^{k-t}
```

**State equations**, `i = 1..n`. The final state:

```
F_i^j = Σ_{t=1..min(j,i)} D_{i-t} · F_n^{j-t}   +   F_{i-j}^0
        '------ polynomial-dependent sum ------'     '- free term -'
```

The free term `F_{i-j}^0` is the old state shifted up by `j` places. For
`i <= j` it is the input bit `M_{j-i}` instead.

For the 8-bit, 5-parallel case, for example:

```
F_8^2 = F_6^0 + D_7·F_8^1 + D_6·F_8^0
F_3^5 = D_2·F_8^4 + D_1·F_8^3 + D_0·F_8^2 + M_2
F_8^5 = D_7·F_8^4 + D_6·F_8^3 + D_5·F_8^2 + D_4·F_8^1 + D_3·F_8^0 + F_3^0
```

Each right-hand side is a fold of product terms into a running sum. That fold
is a "last output only" (LOO) prefix problem. A LOO prefix network is an
ordinary prefix network with every node removed that does not feed the
right-most output.

## AX nodes and LOO trees (`ax_cell`, `ax_loo_tree`)

`ax_cell` is the AND-XOR node `y = a ^ (d & b)`. It folds one product `d·b` into
a sum `a`. With `d` tied to 1 it merges two partial sums. It is the only
operator in the trees.

`ax_loo_tree #(M, TOPO)` computes `c ^ d[1]&f[1] ^ ... ^ d[M]&f[M]` over the
`M+1` elements `c, (d[1],f[1]), ..., (d[M],f[M])`:

| `TOPO` (`pplfsr_pkg::ppt_topo_e`) | structure | AX levels |
|---|---|---|
| `PPT_SERIAL` | chain `acc <- acc ^ d[t]&f[t]` | `M` |
| `PPT_BRENT_KUNG` | Brent-Kung up-sweep, pairs aligned to the first element (details below) | `ceil(log2(M+1))` |
| `PPT_KOGGE_STONE` | the tree behind a Kogge-Stone network's last output, pairs aligned to the last element | `ceil(log2(M+1))` |

In the Brent-Kung tree, level 1 pairs element `2i` with element `2i+1` through an
AX node, and the right element's `D` bit drives that node's `d` input. Higher
levels merge pairs of partial sums. An element left without a partner moves up
one level unchanged. For 5 elements this is 3 levels with 2 nodes on the first.

Kogge-Stone pairs from the other end. When a level has an odd count, the
element left over is element 0, the free term, so the free term joins late.
With Brent-Kung, the late elements are the last products instead. A Sklansky
network reduced to its last output gives the Brent-Kung tree, so it is not a
separate option.

The choice only changes structure, depth and which inputs are near the output,
never the function. The testbenches check all three topologies against the same
reference.

## The three stages (`pplfsr_core`)

`pplfsr_core #(N, J)` is purely combinational. It has three stages:

1. **Stage 1, `pplfsr_stage1`.** One LOO tree per feedback-bit equation,
   `k = 1..J-1`. The old-state or input bit is the tree's free term. Equation
   `k` consumes the results of equations `1..k-1`, so the trees are cascaded.
   With Brent-Kung trees the depth grows as a sum of logarithms rather than as
   `k`. `fn[0]` is the old `F_n`.
2. **Stage 2, `pplfsr_stage2`.** One LOO tree per state bit, giving the
   polynomial-dependent sum from `F_n^0..F_n^{J-1}`. Its free term is zero.
3. **Post-processing, `pplfsr_postproc`.** A row of `N` XORs with fixed wiring.
   It adds the free term (old state shifted by `J`, or the reversed input bits).
   It does not depend on the polynomial.

`F_n^J` is not produced by stage 1. It is the last state equation of stage 2.

`S1_TOPO[k]` picks the tree of feedback equation `k` (entry 0 unused).
`S2_TOPO[i-1]` picks the tree of state bit `i`. Both are packed arrays of
`ppt_topo_e`, with Brent-Kung as the default. This gives `n + j` independent
choices per core.

## The pipelined ring (`pplfsr_section`, `pplfsr_pipelined`)

A 32-parallel core in one clock has a long path. The top level instead splits
`J = E·F` and cascades `E` sections. Each `pplfsr_section` is an `F`-parallel
core followed by a row of pipeline registers. The defaults are `N = 32`,
`J = 32`, `F = 4`, `E = 8`.

The feedback loop of an LFSR cannot be pipelined for a single stream: the next
word needs the full result of the previous word. The sections therefore form a
ring. The state leaving section `E-1` re-enters section 0, `E` clocks after it
started. The ring holds `E` independent LFSR contexts, called *slots*, that take
turns:

```
            in_load ? in_seed : ring
 in_msg ──►┌──────┐  ┌──────┐        ┌──────┐
 in_poly ─►│ sec 0│─►│ sec 1│─► … ─► │sec E-1│──┬──► out_state, out_valid
 in_valid ►│ +reg │  │ +reg │        │ +reg  │  │
           └──────┘  └──────┘        └──────┘  │
              ▲   in_msg[F +: F] delayed 1 clk, in_msg[2F +: F] 2 clks, …
              └───────────────────── ring ─────┘
```

### Timing, per clock

- `slot` names the context whose state is on `out_state` now. That same context
  enters section 0 at the next edge.
- `out_valid = 1` means that context absorbed a word on its previous pass.
  `out_valid = 0` means it was a bubble or a bare seed load.
- The caller gives that context's next operation in the same cycle:
  - `in_load` replaces its state with `in_seed` before the word.
  - `in_valid` with `in_msg` absorbs `J` bits. With `in_valid = 0` the state
    passes the ring unchanged (a bubble).
  - `in_poly` is the polynomial for this word. It travels with the word, so each
    slot, and each word, can use a different polynomial.
- The result appears on `out_state` exactly `E` clocks later, when `slot` comes
  round again.
- `in_msg[k]` is used by section `k/F`. The top delays it internally by `k/F`
  clocks, so the caller presents the whole word at once.
- `rst_n` is a synchronous, active-low reset. It sets every slot to state 0 and
  clears the valid flags.

### Throughput

The aggregate rate is `J` bits per clock: one word completes every clock. One
stream gets `J` bits every `E` clocks. A single-stream user who wants `J` bits
per clock should instantiate `F = J` (`E = 1`). That is the plain `J`-parallel
LFSR with its state register, and the depth of one core.

Every section can have its own tree choices:

- `S1_TOPO[p*F +: F]` for section `p`'s stage 1.
- `S2_TOPO[p*N +: N]` for section `p`'s stage 2.

That gives `e·(n+f)` choices instead of `n+j`.

At the defaults, coarse synthesis gives about 1024 AND and 1024 XOR word cells
and 715 flip-flop bits:

- 8 × 32 state bits
- 8 × 32 polynomial bits
- the input-skew registers
- valid flags and the slot counter

The polynomial register of the last section has no reader.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pplfsr_pipelined` | `N` | 32 | LFSR degree |
| | `J` | 32 | bits per word |
| | `F` | 4 | bits per section, `J % F == 0` |
| | `S1_TOPO` | all Brent-Kung | `E·F` entries, stage-1 tree per section and equation |
| | `S2_TOPO` | all Brent-Kung | `E·N` entries, stage-2 tree per section and state bit |
| `pplfsr_section` | `N`, `F`, `S1_TOPO`, `S2_TOPO` | 32, 4, all Brent-Kung | one section |
| `pplfsr_core`, `pplfsr_stage1/2`, `pplfsr_postproc` | `N`, `J` | 8, 5 | the 8-bit 5-parallel worked example |
| `ax_loo_tree` | `M`, `TOPO` | 5, Brent-Kung | terms, topology |

`N` and `J` are otherwise free. `J > N` works: input bits then appear as free
terms of the feedback equations. The testbench reference model limits checked
sizes to 64 bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference for
everything above the AX node is `tb_lfsr_ref_pkg`. It is a bit-serial,
shift-based model of the LFSR, written independently of the equations above.

| testbench | what it checks |
|---|---|
| `tb_ax_cell` | truth table |
| `tb_ax_loo_tree` | 9 sizes × 3 topologies against a direct sum of products |
| `tb_pplfsr_stage1` | `F_n^k` against the serial model; 8/5, 4/7 (`J > N`), 32/4 with mixed trees |
| `tb_pplfsr_stage2` | the sums against their definition, random feedback bits |
| `tb_pplfsr_postproc` | the shifted-state and reversed-input terms |
| `tb_pplfsr_core` | `J` serial steps; 8/5, 32/32, 4/7, 16/8 with mixed trees; zero input; CRC-32 polynomial |
| `tb_pplfsr_section` | reset, one-clock latency, hold before the edge, bubbles |
| `tb_pplfsr_pipelined` | default 32/32/4 top end to end (details below) |
| `tb_pplfsr_configs` | other sizes of the top (details below); uses the helper `tb_pplfsr_pipe_env` |
| `tb_pplfsr_crc32` | CRC-32/MPEG-2 of `"123456789"` = `0x0376E6E7` in all 8 slots of the default top; 1024 bits issued in 32 clocks, results 8 clocks later |

`tb_pplfsr_pipelined` runs 8 interleaved streams for 4000 clocks with words,
bubbles, bare loads, load-with-word, polynomial switches, zero-input words and
CRC-32 words. It counts each of these and fails if any never happens. It checks
every slot's state when it leaves the ring, which also checks the `E`-clock
latency.

`tb_pplfsr_configs` runs three other sizes of the top:

- 8/5/5: one section, unpipelined.
- 16/12/3: four sections, each with a different mix of the three trees.
- 4/8/4: `J > N`.

To run one with Verilator 5:

```
verilator --binary --timing --top-module tb_pplfsr_pipelined \
    -y rtl -y tb +libext+.sv -Irtl rtl/pplfsr_pkg.sv tb/tb_lfsr_ref_pkg.sv \
    tb/tb_pplfsr_pipelined.sv -o sim && ./obj_dir/sim
```

Each testbench runs in well under a second. Timing (clock frequency), area and
power of a real implementation have not been measured. Only function and
cycle-level latency are verified.

## What follows the article and what is this design's own

The following follow the article:

- the Galois LFSR and its unrolled equations
- the AX node
- one LOO tree per equation, with per-equation topology choice
- stage 1, stage 2, and a post-processing stage that adds the polynomial-free
  terms
- Brent-Kung as the default tree
- 32-bit 32-parallel built from 8 cascaded 4-parallel sections with registers
  between them

These are this design's own choices:

- **Ring of slots.** How the cascade closes its feedback loop is this design's
  own. The `E`-slot interleaving reaches 32 bits per clock in aggregate, the
  rate of the article's 32-parallel design, but a single stream gets 4 bits
  per clock.
- **Registers between sections.** The article calls the storage between
  sections latches. Here they are edge-triggered flip-flops.
- **Interface and control.** The following are not specified by the article:
  - the interface: seed load, valid/bubble, polynomial carried per word, `slot`
    output
  - the input skew registers
  - the reset behaviour
  - all bit packings
- **Brent-Kung LOO tree shape.** The tree is taken as the Brent-Kung up-sweep
  toward the last output. The node that merges two partial sums is an AX node
  with `d = 1`. Brent-Kung, Kogge-Stone and the serial chain are offered.
  Knowles, Han-Carlson and Ladner-Fischer are not built as separate options.
- **Stage 1 ends at `J-1`.** It computes `F_n^1..F_n^{J-1}`. `F_n^J` comes from
  stage 2.
- **`D_0` is programmable.** `D_n = 1` is implied, but `D_0` is kept as an
  input rather than forced to 1.
