# Relative-timed asynchronous controllers

Unclocked handshake controllers are usually designed to work whatever the
gate and wire delays are (speed-independent design). That safety is
expensive. Each controller has to wait for every acknowledge before it can
move on, so it ends up with more logic levels, more transistors and longer
latency than the job needs.

*Relative timing* keeps the unbounded-delay view but adds a few named
assumptions about event order, such as "a falls before b" or "the right-hand
handshake has finished before the next request arrives on the left". Each
assumption removes some interleavings the controller would otherwise have to
handle, and with them some logic. The price is that each assumption becomes a
constraint the physical circuit or its environment must meet. Those
constraints are written down and checked later.

This repository holds SystemVerilog models of three families of such
controllers. Each family starts from a speed-independent circuit and applies
stronger and stronger ordering assumptions:

| family | circuits | module(s) |
|---|---|---|
| set-reset flop as domino gate | footed and unfooted | `domino_gate` |
| C-element | domino gC, two RT reductions; static majority, locally timed, speed-independent complex gate, two RT reductions | `c_*` |
| FIFO cell | speed-independent → burst-mode → aggressive RT → aggressive RT with forward wires only → pulse-mode, plus chains and a token ring | `fifo_*` |
| tag unit (one position of a variable-length instruction decoder) | speed-independent; pulse-mode | `tag_*` |

`rt_top` instantiates all of them side by side. The families do not connect
to one another.

## How the circuits are modelled

These are asynchronous circuits: there is no clock anywhere.

* **State-holding gates** (domino gates with keepers, C-elements, the
  burst-mode state) are `always_latch` blocks. Each one sets on its set
  function, resets on its reset function and holds otherwise. Static gates
  that hold state through feedback, such as the majority-gate C-element, are
  written as the feedback equation itself. Lint tools report these as
  combinational loops. The loops are the storage of the circuit, and each
  module header says so.
* **Gates have zero delay.** Outputs respond in the same time step as their
  inputs. This models what each circuit does. It does not model how fast it
  is.
* **Delays that a timing constraint relies on are explicit.** Some circuits
  only work because one path is slower than another: the `lo` buffer of the
  aggressive FIFO cell, the self-reset inverter of the pulse cell, the `tl`
  inverter of the pulse-mode tag unit, and the output buffer of the locally
  timed C-element. These are instances of `delay_line`, a behavioural model
  with an inertial delay `DELAY_PS` (default 100 ps, in `rt_pkg`). Synthesis
  keeps only their logic function, a wire or an inverter. In silicon they are
  sized cells. In simulation, drive a delay line's input with changes at
  least 1 ps apart; a change in the same time step as a zero-delay wait can
  be lost.
* **Reset.** Where idle inputs do not force the state low, the module has an
  asynchronous active-high `rst` input. This applies to `fifo_si`, `fifo_bm`,
  `fifo_rt_agr`, `fifo_rt_shuffled`, the two aggressive chains, the ring and
  `tag_pb`.
  This reset is a choice of this design. A `delay_line` output is undefined
  until its first input edge has passed through, so hold `rst` for longer
  than the delays inside the loop it clears. The testbenches hold it for
  three times `DELAY_PS`.
* **Timing rules are assertions.** Each circuit that relies on an ordering
  of its inputs states that ordering as an immediate assertion on the edge
  concerned. For example, `c_gc_rt_fall` checks that `a` is already low
  when `b` falls, and `fifo_si` checks the four-phase rules on both of its
  channels. A broken rule stops the simulation with an error that names the
  instance. Some outputs answer their request in the same time step. Where a
  check would read such an output, it reads a copy delayed by 1 ps, which
  still holds the value from before the answer. Synthesis ignores the
  assertions. A testbench that breaks a rule on purpose, to show what the
  rule prevents, turns the instance's assertions off with `$assertoff`
  for that part of the test.

All files use `timescale 1ps/1ps`. Delays are in picoseconds.

## Domino gates (`domino_gate`)

A set-reset flop whose reset function is a single variable `x`: the output
resets while `x` is low. The footed form evaluates
`f_s = x & a & (b | c)`. The unfooted form evaluates `f_s = a & (b | c)` and
relies on the environment never making `x` low while `f_s` is true. Most of
the controllers below are built from this gate.

## C-elements

A C-element output rises when both inputs are high, falls when both are low,
and holds in between. All eight variants compute this function. They differ
in which input orderings they tolerate:

| module | equation / set, reset | environment it needs |
|---|---|---|
| `c_gc` | domino: set `a&b`, reset `~a&~b` | any |
| `c_gc_rt_fall` | domino: set `a&b`, reset `~b` | a falls before b |
| `c_gc_rt_rise` | domino on inverted signals: z rises on b, falls when both low; ports `a_n`, `b_n`, `z_n` | a rises before b |
| `c_sc` | `z = ab | bz | az` | slow environment (zero-delay here) |
| `c_sc_lt` | `c = ab | bc | ac`, `z` = `c` through a buffer of `BUF_PS` | buffer slower than the AND gates |
| `c_sic` | `z = a&b | z&(a|b)` | any |
| `c_sic_rt_fall` | `z = b & (a | z)` | a falls before b |
| `c_sic_rt_rise` | `z = b | (a & z)` | a rises before b |

The reduced versions are about half the size of their parents. If their
ordering assumption is broken, they do not behave as C-elements. The static
majority gate `c_sc` has a hazard when the environment answers faster than
the internal AND gates settle. Zero-delay simulation cannot show that hazard.
`c_sc_lt` fixes it locally: because the feedback is taken before the output
buffer, the circuit is safe as long as the buffer is slower than the AND
gates, whatever the environment does.

## FIFO cells

A FIFO cell connects two four-phase handshakes. On the left, the request
`li` comes in and the acknowledge `lo` goes out. On the right, the request
`ro` goes out and the acknowledge `ri` comes in. Specification:

```
LEFT  = li+ . sync . lo+ . li- . lo-
RIGHT = sync . ro+ . ri+ . ro- . ri-
```

`sync` needs `li` high and the right side idle, with `ro` and `ri` both low.
It raises `lo` and `ro` together.

* **`fifo_si`** implements exactly this, with no timing assumption.
* **`fifo_bm`** assumes the environment is slower than the cell: `lo` rises
  before `ri` rises, and `ro` rises before `li` falls. The cell is then a
  burst-mode state machine:

  | from | to | input burst | output burst |
  |---|---|---|---|
  | 0 | 1 | li+ | lo+ ro+ |
  | 1 | 2 | li- | lo- |
  | 1 | 3 | ri+ | ro- |
  | 2 | 4 | ri+ | ro- |
  | 3 | 5 | li- | lo- |
  | 4 | 1 | ri- li+ | lo+ ro+ |
  | 5 | 1 | ri- li+ | lo+ ro+ |

  The state is a latch of type `rt_pkg::bm_state_e`.
* **`fifo_rt_agr`** assumes the cell sits in a large ring, so the right
  handshake always finishes before the next left request arrives
  (`ri` falls before `li` rises). The cell then stops waiting for the right
  side:
  * `lo` is `li` delayed by a buffer of `LO_DELAY_PS`.
  * `ro` is a footed domino gate that is set by `li & ~lo`, which is the
    rising edge of `li`, and precharged by `ri`.

  The environment must also keep `ri` high until `lo` has risen. Otherwise the
  gate would be set again.
* **`fifo_pulse`** goes one step further. The backward signals `lo` and `ri`
  are gone, and a pulse on `li` produces a pulse on `ro`. `ro` is a domino
  gate that is set by `li` and precharged by `y`, which is `ro` inverted and
  delayed by `Y_DELAY_PS`. The output pulse is therefore exactly one inverter
  delay wide. The input pulse has to obey the timing rules of a four-phase
  handshake:
  * it must last until `ro` rises;
  * it must end before `y` returns high. The testbench shows that an overlong
    pulse gives a second output pulse.
  * the next pulse may come only after `ro` has fallen.
* **`fifo_rt_shuffled`** is the aggressive cell with its wiring rearranged
  so that nothing points backwards. In a chain of aggressive cells, the
  next cell's `lo` buffer copies this cell's `ro` and returns it as `ri`.
  Move a copy of that buffer into this cell and `ri` becomes a local
  signal: `ro` delayed, which precharges `ro` one buffer delay after it
  rose. The `~lo` input of the domino AND moves the other way. It now
  arrives from the previous cell as `li_n`, which is `li` inverted and
  delayed. Each cell sends two wires forward: `ro`, and `ro_n` (`ro`
  inverted and delayed), which becomes the next cell's `li_n`. The delays are
  the same as in the aggressive chain, so the timing is the same. The only
  difference is at the right end: the last stage no longer waits for an
  acknowledge, so it also emits a pulse. Rule: when `li` rises, `li_n` must
  be high and the cell must have recovered. This is the ring assumption
  again.
* **`fifo_agr_chain`**, **`fifo_shuffled_chain`** and **`fifo_pulse_chain`**
  wire `STAGES` (default 3) cells in series.
  * In the aggressive chain, each cell's `lo` acknowledges the previous cell.
    Inner stages therefore emit pulses one buffer delay wide. The last stage
    holds `ro` until the right side answers.
  * The shuffled chain makes the first stage's `li_n` itself with one
    inverting delay of `li`, so it is driven from a single wire. Its
    testbench runs an aggressive chain alongside it on the same input and
    checks that the inner stages of the two chains agree at every check
    point.
  * In the pulse chain, only forward signals remain.

  With zero-delay gates, a token reaches every stage in the same time step.

### The ring (`fifo_agr_ring`)

The aggressive cell is correct only because of where it sits: in a ring
that is large compared with its delays, a single circulating token always
finds the next cell idle. `fifo_agr_ring` closes `RING_SIZE` (default 8)
aggressive cells into such a ring. Each cell's `lo` is the previous cell's
`ri`. Each `ro` reaches the next `li` through a `delay_line` of `HOP_PS`
(default 100 ps), because the gates themselves take no time. A pulse on
`inject` puts the token into cell 0, and from then on it circulates with a
period of `RING_SIZE * HOP_PS`.

The ring assumption can be worked out in closed form. Write `H` for the hop
delay and `D` for the `lo` buffer delay. Cell `i` raises `ro` at time `t`.
Cell `i+1` sees it at `t + H`, and its `lo` rises `D` later and precharges
cell `i`. That `lo`, which is cell `i`'s `ri`, falls again at `t + 2H + 2D`.
The token comes back to cell `i` at `t + RING_SIZE * H`. So the cell's rule
"`ri` falls before `li` rises" needs

```
RING_SIZE * H  >  2H + 2D
```

At `H = D` that means more than four cells. The default ring has 400 ps of
slack, and its testbench measures that slack on every arrival. Every cell
asserts the rule, so a ring that is too small, for example 3 cells, stops the
simulation with an assertion error.

`rst` empties the ring if it is held for `HOP_PS + LO_DELAY_PS`. The token
must then be injected again.

## Tag units

In a variable-length instruction decoder, each byte position has a tag unit.
The tag marks where the next instruction starts:

* The unit receives the tag from the position 1 to 7 bytes back, on
  `ti[k]`.
* It waits until its own instruction is decoded (`irdy`) and an output
  buffer slot is free.
* It then sends the instruction to the buffer (`bufreq`) and passes the tag
  on to the position `L` bytes ahead (`to[L]`). The length comes one-hot on
  `l`.

This unit is on the critical serial path of the decoder, which is why it
receives the most aggressive timing.

**`tag_unit_si`** uses four-phase handshakes throughout. Four processes each
offer a synchronisation request `go0..go3` to a tree of three C-elements
(`tag_c4`):

* IRDY (`irdy`/`irdyack`) and TAGIN (merged `ti`/`tia`) are active
  synchronisers (`tag_pa`). They wait for a request, synchronise, then
  acknowledge.
* BUFREQ (`bufreq`/`bufack`) and TAGOUT (`to`/`toa`) are passive ones
  (`tag_pb`). They synchronise first, then run their own request.

Tag inputs are merged by an OR. Each `tia[k]` is a C-element of `ti[k]` and
the merged acknowledge. `to[k] = to & l[k]`. Only one `ti` handshake may be
active at a time. The equations inside `tag_pa` and `tag_pb` are derived from
their process specifications:

* `tag_pa`: `a = C(r, sa)`, `sr = r & ~a & ~sa`
* `tag_pb`: `r = C(sa, ~a)`, `sr = ~sa & ~r & ~a`

**`tag_unit_rappid`** removes the backward acknowledges of the tag path.
Tags arrive and leave as pulses, and so do `irdyack` and `bufreq`. `irdy` and
`bufack` remain four-phase levels.

```
ba = ~bufack      rdy = irdy & ba      taglocal = |ti
tl = ~taglocal delayed by TL_DELAY_PS
fire: footed domino, precharged while rdy is low, set by taglocal & tl
bufreq = irdyack = fire      to[k] = fire & l[k]
```

A tag pulse that arrives while `rdy` is high sets `fire`. The three output
pulses then last until the buffer answers `bufreq` by raising `bufack`. That
drops `rdy` and precharges the gate, so all three pulses end together. The
decoder lowers `irdy` only after the `irdyack` pulse has ended. After that,
`irdy` and `bufack` may return low in either order. `tl` restricts setting to
the first `TL_DELAY_PS` of the tag pulse. This is the hardest part to read.
The exact set function (`taglocal & tl` under foot `rdy`) is this design's
reading of the published node names. The circuit depends on these
orderings, and the module asserts the ones that concern its inputs:

* the tag pulse arrives only while `rdy` is high. A tag that arrives while
  the buffer is busy is lost, and the testbench checks this;
* the tag pulse ends before the output pulses do;
* `irdy` falls only after `irdyack` has fallen. Because of this, the pulse
  is always ended by `bufack` and never by `irdy`. The gate would also
  precharge if `irdy` fell first, but the environment never does that;
* `rdy` rises again only after the tag pulse has ended. This is why nothing
  fires a second time when `bufack` falls while `irdy` is still high;
* `tl` is high again, and the outputs are low, before the next tag arrives.

## Top level (`rt_top`)

Parameters:

* `DELAY_PS` (100) for every timed buffer or inverter;
* `STAGES` (3) for the three chains;
* `RING` (8) for the ring;
* `N` (7) for the tag lines.

Ports are grouped by prefix:

| prefix | circuit |
|---|---|
| `dom_` | domino gates |
| `c_a`, `c_b`, `c_z` | C-elements; `c_z` is the packed struct `rt_pkg::c_elem_out_t` with one bit per variant |
| `si_` | speed-independent FIFO cell |
| `bm_` | burst-mode FIFO cell |
| `agr_` | aggressive chain |
| `shf_` | shuffled aggressive chain |
| `ring_` | ring of aggressive cells (`ring_inject`, `ring_ro`) |
| `pls_` | pulse chain |
| `tsi_` | speed-independent tag unit |
| `trp_` | pulse-mode tag unit |

`rst` is shared.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one also
has a watchdog. The testbenches use `$urandom` to create legal environments,
and they compare against reference behaviour written from the
specifications rather than the gate equations. `tb_rt_top` runs every family
at once at the top's default parameters. It also checks that every mechanism
occurred at least once: C-element hold, FIFO synchronisation stall, both
burst-mode return paths, a token through each chain, a token round the ring, SI tag-unit stalls on a
busy buffer, and the pulse-mode tag unit released in both orders (irdy
first, bufack first).

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
  rtl/rt_pkg.sv tb/tb_rt_top.sv --top-module tb_rt_top -o sim
./obj_dir/sim
```

Replace `tb_rt_top` with any other testbench name. `--timing` is required
because the delay models and testbenches use delays. Expect `UNOPTFLAT`
warnings: they are the intended feedback loops.

## Departures and limits

* Gate-level structure is reproduced where the names and equations are
  known: the node names of the static C-elements, the C-element tree, the
  steering gates, and the domino forms. `fifo_si` is written as set/reset
  functions of its specification, not as its original complex gates.
  `fifo_bm` is written as its state machine, not as its synthesised gates
  with the internal state signal `y`.
* Zero-delay gates mean that latency, cycle time, energy, transistor count
  and stuck-at testability cannot be measured here. The published figures
  are transistor-level measurements, for example a 350 ps pulse cell against
  a 2160 ps worst-case speed-independent cell, and 1.27 ns against 4.75 ns
  tag latency. Races that depend on real gate delays are not reproduced,
  such as the hazard of `c_sc`.
* The relative-timing constraints are documented in each module header. The
  ones that concern a module's inputs are asserted in simulation. The
  constraints inside a cell are covered only by the choice of delay
  parameters. An example is the race between the `lo` buffer and the
  setting of the domino gate. Nothing verifies them against real delays.
* The ring's hop delay `HOP_PS` stands for the forward delay of a real cell
  and its wire. With zero-delay gates it is the only thing that makes the
  token take time to go round. The ring size of 8 is this design's choice.
* Two C-element variants have no module. If both orderings hold (`a` rises
  before `b` and `a` falls before `b`), the C-element reduces to a wire from
  `b`, which needs no RTL. A C-element that tolerates a request `b` being
  withdrawn is described only by its behaviour, not by a circuit.
* The decoder's 4 × 16 torus of tag units is not built. Which `to[k]` of
  which unit drives which `ti[k]` is not specified, and neither are the
  length decoders and output buffers around the units.
* The process `MUTEX` of the pulse-mode tag unit specification, which orders
  a tag's arrival against instruction readiness, is represented only by the
  rule that a tag must arrive while `rdy` is high.
