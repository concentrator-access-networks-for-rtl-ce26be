# Concentrator access network for an embedded programmable logic core

An SoC that embeds a programmable logic core (an FPGA-like fabric) needs a
way to bring a chosen handful of the chip's thousands of signals to the
core's pins, and to send the core's results back out. Before the core is
programmed all of its pins are equivalent: the circuit mapped into it can be
placed to match any assignment of signals to pins. So the network does not
have to be a permutation network, which can put any input on any named
output. It only has to be a **concentrator**: given any set of at most `m`
active inputs out of `n`, connect each of them to *some* output, all
different. That weaker requirement allows a cheaper and shallower network.

This repository holds synthesizable SystemVerilog for such an access
network:

* an input-side **(n, m) concentrator** (`conc_net`) built recursively from
  2x2 crossbars and two half-size concentrators, with single-stage sparse
  crossbars at the bottom;
* the **output side** (`dist_net`), the same network run backwards, which
  fans the core's `m` output pins out to any `m` of `n` sinks;
* a **router** (`conc_router`) that turns "these inputs are active" into the
  network's switch settings;
* a top level (`access_net_top`) that holds both sides' settings in
  registers, loaded in one clock from a request, and refuses requests that
  do not fit.

Default size: 5000 sources, 1024 core pins, 5000 sinks, one wire per
signal. The data paths are purely combinational multiplexer trees, 13 2:1
multiplexers deep at the default size: a fixed-latency, fixed-bandwidth
connection, with no clock, no packets and no flow control.

## The recursive concentrator

One level of an (n, m) concentrator:

```
 inputs 0,1   --[2x2]--+---> upper (ceil(n/2), ceil(m/2)) concentrator --> outputs 0 .. ceil(m/2)-1
 inputs 2,3   --[2x2]--|
   ...                 |
 input  n-2   ---------+     (direct, upper half)
                       +---> lower (floor(n/2), floor(m/2)) concentrator --> outputs ceil(m/2) .. m-1
 input  n-1   ---------      (direct, lower half)
```

* Crossbar `i` takes inputs `2i` and `2i+1` and sends one to each half;
  setting bit 1 means crossed (input `2i` to the lower half).
* The two inputs left over are wired straight into one half each.
* Each half is built the same way. Once a sub-network has at most two
  outputs it becomes a **sparse crossbar** (`sparse_conc`): output `j` can
  take any input in the window `j .. j+n-m`, the minimum `(n-m+1)·m`
  crosspoints for a single-stage concentrator, realised as one multiplexer
  tree per output.

### Why it works: balancing

A level is correct as long as neither half is handed more active inputs
than it has outputs. The first stage can always arrange that:

* a crossbar with two active inputs gives one to each half; one with none
  does not matter; both stay straight;
* the directly wired inputs go where they are wired;
* a crossbar with exactly one active input sends it to the half that has
  received fewer active inputs so far, the upper half on a tie. After the
  direct inputs this simply alternates.

At the end the two halves differ by at most one, so with `k <= m` active
inputs the upper half gets `ceil(k/2) <= ceil(m/2)` and the lower half
`floor(k/2) <= floor(m/2)`. The leaves then place their (at most two)
active inputs greedily: in increasing index order, each input takes output
`max(previous output + 1, i - (n-m))`, the first output whose window still
contains it.

`conc_router` is exactly this procedure as combinational logic. Its `fail`
output is 1 when some active input found no output; with this balancing
that happens exactly when more than `m` inputs are active (the top level
asserts this).

### Odd sizes (a deliberate variation)

The construction is simplest with even sizes. This implementation handles
odd ones as follows:

| case | first-stage crossbars | direct inputs |
|---|---|---|
| n odd | (n-1)/2 | input n-1 to the upper half |
| n even, m even | n/2 - 1 | n-2 to the upper, n-1 to the lower half |
| n even, m odd | n/2 | none |

and the halves always get `ceil`/`floor` of `n/2` and `m/2`. The obvious
alternative, padding an odd output count by one and ignoring the extra
output, is not safe: a leaf with one active input on its last input must
use its last output, and if that output is the ignored one the signal is
lost. Splitting the outputs unevenly is safe only if the balancing can
always favour the upper half, which a directly wired lower input prevents;
hence the extra crossbar when `n` is even and `m` is odd (two more
multiplexers on such a level).

### Cost and depth

`conc_pkg` computes, from the same recursion the RTL uses:

* `cfg_bits(n, m)`: setting bits (25 981 for (5000, 1024));
* `mux_cost(n, m)`: 2:1 multiplexers, two per crossbar plus `n-m` per leaf
  output (52 202 for (5000, 1024));
* `mux_depth(n, m)`: multiplexers on the longest path (13 for 5000 inputs
  and 1, 2, 64, 512 or 1024 outputs; 12 from 2048 outputs up).

For comparison, a rearrangeable permutation network (an asymmetric Benes
network) of 5000 inputs needs 16 to 25 multiplexers of depth over the same
range of outputs, and more multiplexers for most output counts. These
permutation and earlier concentrator networks are not part of this RTL.
The multiplexer counts here are lower than published plots of the
same construction for large `m` (about 55 000 to 81 000 there for 1024 to
5000 outputs, against 52 000 to 56 000 here), presumably because of the
uneven split for odd sizes and the leaf accounting; this has not been
reconciled.

## The output side

The core's outputs must reach a larger number of sinks. Running the
concentrator backwards does this: every crossbar and every crosspoint is
kept and signals flow from the `m` pins to the `n` sinks. `dist_net` takes
its settings in the same format as `conc_net`, computed by the same router
from the set of active sinks. With identical settings the mapping is the
exact inverse of the concentrator's: sink `i` receives pin `j` whenever the
concentrator would deliver input `i` to output `j`. In the mirrored leaf
(`sparse_dist`) sink `i` listens to every pin whose window contains it and
picks the one whose offset points at it. Sinks that are not selected carry
some pin's value and must be ignored.

## Top level: `access_net_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock of the settings registers; synchronous active-low reset |
| `cfg_load` | in | 1 | take the request on `src_active` / `sink_active` at this clock edge |
| `src_active` | in | N_SRC | sources to connect |
| `sink_active` | in | N_SINK | sinks to connect |
| `src_overflow`, `sink_overflow` | out | 1 | last request for that side had more than M_PLC signals and was refused |
| `src_sel`, `sink_sel` | out | N_SRC, N_SINK | sets currently connected |
| `cfg_in`, `cfg_out` | out | `cfg_bits` | current settings, for reading back the pin assignment |
| `src_data` → `plc_in` | in → out | N_SRC×W → M_PLC×W | input side (concentrator) |
| `plc_out` → `sink_data` | in → out | M_PLC×W → N_SINK×W | output side (mirror) |

Timing: while `cfg_load` is high the routers compute both sides' settings
combinationally; at the rising edge each side whose request fits loads its
settings and selection mask, and from then on its data path follows them.
A side whose request is too large keeps its previous settings and raises
its overflow flag until the next load. Reset clears all settings (all
crossbars straight, all leaf offsets 0), masks and flags. The network is
meant to be configured once per application, so the routers' long
combinational ripple (one step per crossbar of a level) is not on any data
path. For a high clock rate the request can be held for several cycles,
or the routers replaced by settings computed off-chip and loaded into
`cfg_in`/`cfg_out` registers; neither is provided here.

Parameters: `N_SRC` (5000), `M_PLC` (1024), `N_SINK` (5000), `W` (1, the
width of one routed signal). Any `M_PLC <= N_SRC, N_SINK` elaborates.

## Files

| file | contents |
|---|---|
| `rtl/conc_pkg.sv` | sizing functions shared by all modules (split rule, setting layout, cost, depth) |
| `rtl/xbar2x2.sv` | 2x2 crossbar, two 2:1 multiplexers |
| `rtl/sparse_conc.sv` | single-stage sparse crossbar concentrator (leaf) |
| `rtl/sparse_dist.sv` | its mirror for the output side |
| `rtl/conc_net.sv` | recursive (n, m) concentrator |
| `rtl/dist_net.sv` | recursive output-side network |
| `rtl/conc_router.sv` | settings from the active set, with overflow detection |
| `rtl/access_net_top.sv` | both networks, routers and settings registers |
| `tb/conc_model_pkg.sv` | reference model of the concentrator for testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_access_net_full` |

Setting layout of a level (bit 0 first): one bit per first-stage crossbar,
then the upper half's settings, then the lower half's. A leaf stores one
`clog2(n-m+1)`-bit offset per output.

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself
after a fixed time if it hangs.

* `tb_xbar2x2`: both settings, random data.
* `tb_sparse_conc`: the window rule under random settings; every set of at
  most `m` active inputs reaches the outputs, for (7,2) and (5,1).
* `tb_conc_net`: the wiring against an independent level-by-level model
  (`conc_model_pkg`) under random settings for (23,7), (20,7) and (40,12),
  covering all three split cases; and the depth of 13 at 5000 inputs.
* `tb_conc_router`: router plus network, all 256 input sets of (8,4) and
  random sets of every size for the three sizes above; every active input
  must reach an output, and `fail` must be set exactly for oversize sets.
* `tb_dist_net`: each active sink gets its own pin, and it is the pin the
  concentrator would route that index to under the same settings.
* `tb_access_net_top`: 600 requests through the top level at (37, 9, 29):
  acceptance one clock after `cfg_load`, refusal of oversize requests with
  the old settings kept, holding while `cfg_load` is low, routing on both
  sides. It counts crossed and straight crossbars, use of the direct input,
  full, empty and oversize requests on both sides and reconfigurations, and
  fails if any never happened.
* `tb_access_net_full`: the default size, no parameter overrides. A full
  request of 1024 sources and 1000 sinks is loaded; the routing is then
  identified one index bit at a time (13 passes) and all 1024 sources must
  reach distinct pins and all 1000 sinks distinct pins; a request of 1025
  sources must be refused.

To run one with Verilator (packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/conc_pkg.sv tb/conc_model_pkg.sv rtl/xbar2x2.sv rtl/sparse_conc.sv \
  rtl/sparse_dist.sv rtl/conc_net.sv rtl/dist_net.sv rtl/conc_router.sv \
  rtl/access_net_top.sv tb/tb_access_net_top.sv --top-module tb_access_net_top
./obj_dir/Vtb_access_net_top
```

The full-size build takes about seven minutes and a few GB of memory; the
simulation itself is instantaneous.

## Known limitations and departures

* The odd-size handling above differs from simply padding to the next even
  size; it is what makes every split provably fit.
* Multiplexer counts differ from the published cost plot (see Cost and
  depth); the depth matches it (13) for the checked sizes up to 1024
  outputs and is one lower from 2048 outputs up.
* The output side, the on-chip router, the settings registers with their
  overflow check, the 1024-pin default and the 5000-sink default are this
  design's own choices; the construction itself only defines the input
  side network and its balancing rule.
* Verilator's `-Wall` lint, run with one of the recursive modules
  (`conc_net`, `dist_net`, `conc_router`) as its top, reports the generic
  recursive body as undriven or unused. Elaborated under any parent the
  networks are complete, as the testbenches show.
* No buffering, placement or timing constraints are provided; at 5000
  sources each level's fan-in and the long wires of the interleaving need
  physical design attention.
