# Asynchronous race logic for DNA sequence alignment

Race logic represents a number as the time at which a signal rises. It does
not use a voltage level. With that encoding, two operations become almost free:

* **add a constant**: pass the edge through a delay element of that length;
* **minimum**: an OR gate rises when the *first* of its inputs rises
  (an AND gate, which waits for the *last* input, would give the maximum).

A dynamic-programming problem whose cells take "minimum over predecessors plus
an edge weight" can therefore be solved with one OR gate per cell and one delay
element per edge. Raise a single input and wait. The time at which the last cell
rises is the answer. No clock is involved, and each node switches exactly once
per computation.

This repository holds SystemVerilog for such an aligner. It compares two DNA
strings of N = 50 nucleotides. The delays are not built from flip-flops. Each one
is an analog *current-starved inverter* whose delay is set by a bias current, so
the score matrix can be reprogrammed by changing three resistors.

## The computation: shortest path through an edit graph

For a reference string `p` and a query string `q`, both N long, the edit graph
has (N+1) x (N+1) nodes. Node (i, j) means "the first i query symbols and the
first j reference symbols have been aligned". Each node has three outgoing
edges:

| edge       | meaning                         | cost (delay units) |
|------------|---------------------------------|--------------------|
| right      | deletion (skip a reference symbol) | 3 |
| down       | insertion (skip a query symbol)    | 3 |
| diagonal   | align `p[j]` with `q[i]`: match    | 1 |
| diagonal   | align `p[j]` with `q[i]`: mismatch | 4 |

The similarity score is the cost of the cheapest path from node (0,0) to node
(N,N):

    S[0][0] = 0
    S[i][j] = min( S[i-1][j] + 3,  S[i][j-1] + 3,
                   S[i-1][j-1] + (q[i-1] == p[j-1] ? 1 : 4) )

Low scores mean similar strings. Two identical strings score N. Two strings that
never agree score 4N: the all-mismatch diagonal (4 per step) is cheaper than
going round by 2N indels (6 per step). A pair of random strings lands between
these two values. At N = 50 that is roughly 120 to 140.

## The array (`race_array`, `race_cell`)

`race_array` builds the graph literally. Each node is a `race_cell`, and the
edge injected at node (0,0) by `start` spreads over the mesh. Node (i,j) rises
at time `S[i][j]` x (delay unit), and `finish` is node (N,N). Inputs that would
come from outside the graph are tied low. The cells in the last row and column
are ordinary cells whose spare outputs end at the border.

A unit cell contains:

* `race_or3`, the first-arrival gate over the top, left and diagonal inputs.
  In silicon it is a NOR with three series PMOS stacks and a shared output
  inverter. Each stack takes the inputs in a different order, so all three
  inputs see the same delay. In RTL it is an ideal OR.
* two **indel delay elements** (right and down), on the indel bias;
* two **diagonal delay elements**, one on the match bias and one on the
  mismatch bias, both driven by the node;
* `match_ctrl`, an equality comparator on the cell's two 2-bit symbols. Its
  output `M_ij` drives a 2:1 multiplexer that chooses which diagonal
  element's output leaves the cell.

The symbols are static during a race, so `M_ij` has settled before any edge
arrives. When `start` falls, every node returns to 0. The fall of each delay
element is fast, so clearing takes about 2N fall delays (≈2 ns at N = 50).

## The delay element and its bias (`delay_element`, `current_source`)

These two blocks are **behavioural models** of analog circuits. They
simulate, but they do not synthesize.

**Delay element.** The first stage is an inverter whose current-control
transistor sits between the PMOS and NMOS switches. When the input rises, the
NMOS switch discharges the small internal node at once while the output is
still at VDD. The output then discharges at the constant bias current until
the second, plain inverter trips. The result is a non-inverting element with:

    rising edge:  t = C * dV / I_bias     (model: t[ns] = CV_FF_MV / bias_na)
    falling edge: fast (PMOS switch)      (model: T_FALL_PS = 20 ps)

The model is inertial: a pulse shorter than the pending delay is swallowed.
`SIGMA_PERMIL` adds an approximately normal relative error. It is drawn anew
on every rising edge, so each race behaves like one Monte Carlo run.

**Current source.** An op-amp holds a fixed voltage across an off-chip
resistor. That resistor alone sets the current, independent of process and
supply, and the current is mirrored onto bias lines shared by the whole array.
There are three replicas, one per delay class, so three resistors define the
score matrix:

    bias_na = VREF_MV * 1000 / res_kohm

With the default values (VREF = 450 mV, C·dV = 4500 fF·mV), the delay in ns
equals R / 100 kOhm:

| class    | resistor | current  | delay |
|----------|----------|----------|-------|
| match    | 100 kOhm | 4.5 uA   | 1 ns  |
| indel    | 300 kOhm | 1.5 uA   | 3 ns  |
| mismatch | 400 kOhm | 1.125 uA | 4 ns  |

Resistors from 100 kOhm to 1 MOhm cover the intended tenfold dynamic range.
In the models, the resistor is a 16-bit kOhm value and the bias voltage is
represented by the current it sets, in nA. These are digital stand-ins for
analog nodes. The bias network is the *global* scheme: one set of bias lines,
stiffened by large MIM capacitors over the array. Those capacitors are not
modelled, so the bias is taken as ideal.

## Reading out a race (`race_ctrl`)

The array has no clock. `race_ctrl` is a small clocked wrapper that runs one
comparison at a time:

1. **IDLE** (`ready` = 1): on `go`, it latches `p_in` and `q_in` onto the array
   symbol inputs.
2. **LAUNCH**: one cycle for the match selects to settle. The race edge
   `race_start` then rises from a *falling-edge* flop.
3. **RUN**: it counts clock cycles. `race_finish` passes through a two-flop
   synchronizer, and the score is the count minus the synchronizer latency.
   The falling-edge launch places an arrival after a whole number of clock
   periods in the middle of a cycle, so with **clock period = one delay unit
   (1 ns by default) the score is reported exactly**.
4. **Threshold**: if the count passes `threshold` first, the race is
   abandoned. `result_hit` = 0 and `result_score` = `threshold`. Most pairs
   in a screening run are unrelated and score high, so this bounds the time
   they cost.
5. **CLEAR**: `race_start` falls, and the controller waits at least
   `CLEAR_CYCLES` and until the synchronized finish is low.

Timing, counting the cycle in which `go` is accepted as 0:

* hit (score S ≤ threshold): `result_valid` pulses at cycle S + 4;
* rejected: `result_valid` pulses at cycle threshold + 5;
* `ready` returns at least `CLEAR_CYCLES` (16) cycles after the result.

If the clock is not one delay unit, `result_score` is the arrival time in
clock periods, rounded.

## Top level (`race_logic_top`)

The top level contains three `current_source` instances (indel, match and
mismatch), one `race_array` and one `race_ctrl`.

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | controller clock and asynchronous active-low reset |
| `go` / `ready` | in / out | 1 | start a comparison / controller idle |
| `p_in`, `q_in` | in | N x `nt_e` | reference and query (A=0, C=1, T=2, G=3) |
| `threshold` | in | 12 | similarity threshold in delay units |
| `r_indel_kohm`, `r_match_kohm`, `r_mismatch_kohm` | in | 16 | resistor settings |
| `result_valid`, `result_score`, `result_hit` | out | 1, 12, 1 | result |

The parameters are `N` (50), `CNT_W` (12), `CLEAR_CYCLES` (16) and
`SIGMA_PERMIL` (0). The shared types and the default score matrix live in
`race_pkg`.

## Delay variation

With random delay errors, an OR-type array does not report the exact score
on average: it reports a little **less**. Every node passes the fastest of its
competing paths, so delays that come out short win and delays that come out
long are ignored. `tb_race_variation` shows this on a 12-symbol pair with an
exact score of 34:

| sigma | mean score | range | runs below the exact score |
|---|---|---|---|
| 5 %  | 33.3 | 31.7 – 34.5 | 285 / 300 |
| 10 % | 32.7 | 30.3 – 34.8 | 286 / 300 |

In screening, raising the threshold a few percent above the score of interest
therefore recovers nearly every true hit. The cost is a few extra candidates.

## Simulating

All files use `timescale 1ns/1ps`. The delay models need Verilator's timing
support. A typical build of one testbench:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/race_pkg.sv tb/race_ref_pkg.sv tb/tb_race_logic_top.sv --top-module tb_race_logic_top
    ./obj_dir/Vtb_race_logic_top

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. `race_ref_pkg`
holds the dynamic-programming reference used to check scores.

| testbench | what it checks |
|---|---|
| `tb_race_or3`, `tb_match_ctrl` | exhaustive truth tables |
| `tb_delay_element` | rise delay vs. bias over a 10x range, fall delay, inertial filtering |
| `tb_current_source` | I = VREF/R after settling, open resistor |
| `tb_race_cell` | edge timing on all outputs, match/mismatch selection, first-arrival behaviour, clearing |
| `tb_race_array` | N = 7: the pair ACTGAGA / GATTCGA, perfect match, complete mismatch, 20 random pairs, all delays x3 |
| `tb_race_ctrl` | score, hit flag, latency, threshold edge cases and clear phase, with a delayed-edge stand-in for the array |
| `tb_race_logic_top` | end to end at N = 10: hits, threshold aborts, clears, resistor reprogramming, perfect and complete mismatch, each counted |
| `tb_race_logic_top_full` | the same at the default N = 50, top level untouched |
| `tb_race_variation` | the variation study above |
| `tb_race_screening` | shotgun-read screening, described below |

`tb_race_screening` cuts a random 64-nucleotide section into 80 reads of 16
symbols, which covers the section 20 times. It then compares one read against
all of them through the top level, with a threshold of 2N = 32. The read
matched against itself scores 16. Reads that overlap it with small shifts
score 21 to 32 and are kept, 19 hits in all. The unrelated reads form a hump
around 40 and are abandoned at the threshold, 61 in all, in a typical run. Every result is
checked against the reference.

Simulation is fast: the full 50-symbol run takes about 2 s. The **C++ build**
is not. At N = 50 the array holds 2601 cells and 10 404 delay-element
processes, and building that model took about 9 minutes on a single core.
Build in parallel (`-j`), or use a smaller `N` while experimenting.

## Synthesis

`race_or3`, `match_ctrl` and `race_ctrl` are ordinary synthesizable RTL.
`race_cell`, `race_array` and `race_logic_top` contain the delay-element
model. They are meant for simulation: in a real implementation each
`delay_element` and `current_source` becomes a full-custom analog cell with
the same ports, and the bias ports become analog nets.

## Design choices and departures

Taken from the original design: the edit-graph mesh and its orientation; the
unit cell (OR gate, two indel and two diagonal delay elements, multiplexer
driven by `M_ij`); the symmetric OR; the current-starved delay element with
the split output; the three resistor-programmed current sources with a global
bias; the 1/4/3 score matrix; the 50-symbol size; and a threshold that
abandons dissimilar pairs.

Choices made here, where the original design gives nothing:

* the 2-bit nucleotide code and the equality comparator for `M_ij`;
* the multiplexer polarity;
* the clocked controller, which covers sequence latching, the falling-edge
  launch, the synchronizer, the time-to-count conversion, the hit condition
  `score <= threshold` and the clear phase;
* the absolute scales: VREF, C·dV, the 1 ns unit, the fall delay and the
  settling time;
* zero delay in the OR gate and the multiplexer;
* a fresh random draw per edge in the variation model.

The unit cell has two diagonal delay elements, one per bias, and the
multiplexer selects between their outputs. The cell could also be read as
having a single diagonal element. This design keeps one element per diagonal
cost, so `M_ij` only chooses a path and never switches a bias line during a
race.

Not modelled: MIM bypass capacitors and charge injection onto the bias lines;
the alternative local-bias scheme, which regenerates the bias per 5x5 block;
cascode biasing; power and area.

One point to check: the all-mismatch pair scores 4N with this score matrix
(N mismatching diagonals). It does not cost 2N indels (6N), because the
diagonal is cheaper. The testbenches expect 4N.
