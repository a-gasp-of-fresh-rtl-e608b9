# GasP distributed FIFO for long on-chip wires

A global wire on a chip can be several millimetres long. Driving a signal
across it takes far longer than one gate delay, and adding repeaters speeds it
up but never lets more than one value be on the wire at a time. This design
instead cuts the wire into short segments and puts a FIFO stage at each cut.
Each stage has a small self-timed controller and one column of data latches.
A word moves to the next stage as soon as that stage is free, with no clock.
Several words can be on the wire at once, so the rate at which words enter
does not depend on the wire's length. When the receiver stops taking words,
the wire itself stores them.

The controller of each stage is a GasP cell, a fast asynchronous FIFO
control that relies on matched gate delays rather than full handshakes and
takes six gate delays per word: four to pass a word forward and
two to free the stage behind it. At both ends the FIFO connects to modules
that use a *wave-pipelined clock*: a clock edge that travels with the data
instead of being distributed globally. The two ends need not share a clock,
so the FIFO also bridges two clock domains.

The RTL models a 16-stage, 32-bit FIFO with a gate delay of 100 ps. That is a
600 ps cycle (1.67 GHz), the figure reported for the original 0.25 µm
circuit.

## The chain: state conductors and firing rule

```
 sender                                                        receiver
 snd_wp_clk ─►[limiter]─┐                               ┌─[limiter]◄─ rcv_wp_clk
                        ▼                               ▼
            state[0] ──► cell 0 ──► state[1] ──► ... ──► cell n-1 ──► state[n]
                          │enable                         │enable
 snd_data ─►[out latch]─►[column 0]──────────► ... ──►[column n-1]─►[in latch]─► rcv_data
```

Between two neighbouring cells sits a *state conductor* (`gasp_state_node`).
It is a single wire with a keeper, and its level tells whether the boundary
holds a word:

| level | name    | meaning                                        |
|-------|---------|------------------------------------------------|
| low   | `FULL`  | the column before the node holds a word that has not moved on |
| high  | `EMPTY` | the boundary is free                           |

The upstream side only ever pulls a node low and the downstream side only
ever pulls it high. Master reset drives every node high.

Cell *k* fires when `state[k]` is FULL and `state[k+1]` is EMPTY. Firing
does three things:
- it pulses `stage_enable[k]`, which copies the word into column *k*;
- it pulls `state[k]` EMPTY, so the previous stage may send again;
- it pulls `state[k+1]` FULL, which starts cell *k+1*.

`state[0]` is the sender's write node and `state[STAGES]` is the receiver's
read node.

## Inside one control cell

`gasp_ctrl` models the cell's transistor structure one node at a time, with
every gate and every pull transistor costing one delay `T_INV`:

- **Ā**: an inverter on node A, the state node behind the cell.
- **B**: a self-resetting NAND. It is pulled low through N2 (gate Ā) in
  series with N3 (gate C, the node ahead of the cell).
- **Enable**: inverter R on B.
- **Precharge**: inverter S on the enable drives P2, which recharges B.
- **P1** (gate B) pulls A high, i.e. EMPTY.
- **N4** (gate Enable) pulls C low, i.e. FULL.

The timeline below starts when node A turns FULL:

| time     | event |
|----------|-------|
| 0        | A falls (a word arrives) |
| 1 T      | Ā rises; N2 and N3 both conduct and pull B down |
| 2 T      | B is low: P1 starts pulling A back to EMPTY |
| 3 T      | Enable rises (column opens) and N4 starts pulling C; A reads EMPTY |
| 4 T      | C reads FULL, so the next cell starts: the word has moved one stage. S falls and P2 starts recharging B |
| 5 T      | B is high again |
| 6 T      | Enable falls |
| 7 T      | P2 turns off |

So the enable pulse is 3 T wide and a word advances one stage every 4 T.
With fast neighbours a cell fires every 6 T: the next word reaches A by the
time B has recovered. Neighbouring enables overlap by one gate
delay: the next cell's enable rises while this one's is still high.

Node B keeps its charge when neither the pull-down nor the precharge
conducts. That is why it is written as a latch. Synthesis tools report the
loops B → R → S → P2 → B and node → cell → node as combinational loops. They
are the self-timed circuit itself, so the control parts are behavioural
models with delays and not synthesizable logic.

## Data columns and why their delay matters

`fifo_data_latch` is one column of buffer cells. Each bit is a pass
transistor feeding two inverters. A second pass transistor on the inverted
enable closes the feedback loop. The column is transparent while its enable
is high and holds while it is low. Because the feedback is a switch rather
than a weak inverter, a driver a millimetre away never has to overpower it.

The column's output follows its input two gate delays later. This is more
than a modelling detail. Adjacent enables overlap by one gate delay, so for
that moment both column *k* and column *k+1* are transparent. If the data
passed through a column faster than the overlap, a word would run through
two columns in one step and overwrite the word waiting ahead. The
end-to-end test catches exactly this when the delay is shortened.

The same latch is used as the sender's output latch and the receiver's input
latch.

## The two ends

**Pulse limiter.** If a wave-pipelined clock stays high, a cell would take a
word every time it resets. `wp_pulse_limiter` prevents this. It passes the
clock through a switch that a chain of three inverters turns off three gate
delays after the rising edge. Each rising edge therefore gives exactly one
pull pulse of 3 T, however long the clock stays high. The clock must then
stay low for at least 3 T so the chain re-arms.

**Sender rules.**
- The sender puts its word on `snd_data` and raises `snd_wp_clk`.
- Its output latch is transparent while the clock is high, so the word must
  be stable during the high phase.
- The limiter pulls `state[0]` FULL.
- The sender may raise its clock again once `snd_empty` (`state[0]` EMPTY)
  has been high for 2 T.
- `buffer_state` is `state[1]`, the status of the first stage's output side.

Running flat out, the sender issues a word every 6 T.

**Receiver rules.**
- `rcv_full` goes high when the last stage holds a word.
- The last column settles one gate delay after that, so the receiver raises
  `rcv_wp_clk` no sooner than 2 T after `rcv_full` rises.
- Its input latch is transparent while the clock is low and closes on the
  rising edge. `rcv_data` is valid 2 T after the edge.
- The limiter pulls `state[STAGES]` EMPTY, which lets the last cell deliver
  the next word.

`gasp_dfifo` checks these rules with assertions in simulation:
- a sender edge while the write node is FULL is an error;
- a receiver edge while the read node is EMPTY is an error;
- any state node pulled FULL and EMPTY at the same time is an error. This
  is what a sender overrunning the chain produces.

If the receiver stops, the chain fills. The chain holds `STAGES + 1` words:
one per column plus the sender's output latch. After that every state node is
FULL and `snd_empty` stays low until the receiver resumes.

## Timing of the model

With `T_INV` = 100 ps and the default 16 stages:

| quantity | model | original circuit |
|---|---|---|
| cycle (any length) | 6 T = 600 ps | 600 ps (1.67 GHz), 0.25 µm |
| lone-word latency, edge to `rcv_full` | (4·STAGES + 1)·T = 6.5 ns | 8 ns (500 ps per stage) |
| latency at a slower input rate | unchanged | unchanged |
| activity when idle | none | none |

The wire-length test uses 1 to 6 stages with 16-bit words (0 to 5 mm in 1 mm
sections). It gives a constant 600 ps cycle, and a latency of 500 ps plus
400 ps per extra stage. The original 0.18 µm circuit gives 500 ps, and
500 ps plus 350 ps per mm.

## Where this model departs from the original circuit

- **Gate delays.** Every gate and pull counts as one `T_INV`. The original
  circuit has unequal, load-dependent delays. Its own account is inconsistent:
  it counts four forward gate delays per stage, which at 100 ps gives
  400 ps, but it quotes 500 ps per stage. The model follows the gate count,
  so its latency is shorter than the quoted one.
- **Wires.** The delay of the wire segment between stages is not modelled.
  Only the latch delay separates columns.
- **Handshake details at the ends.** The 2 T rules for both clocks, the
  receiver latch polarity, and the separate `snd_empty` output are this
  design's own choices. The original circuit shows only the first-stage
  status line (`buffer_state`) to the sender.
- **Pulse polarity.** The receiver's pull-up transistor is driven by an
  active-high request from the limiter. In the circuit it is a pMOS gate
  seeing the inverse.
- **Pulse width.** The limiter produces a 3 T pulse. The original text also
  asks for a write pulse of one inverter delay, to avoid short-circuit
  current with the first cell's pull-up. The model follows the three-inverter
  circuit, which is safe because that pull-up turns on only when the pulse
  ends.
- **Not modelled.** Power, energy, supply-voltage and temperature behaviour
  have no counterpart here beyond scaling `T_INV`.
- **Not included.** The clocked shift-register FIFO and plain repeater
  insertion, which served only as points of comparison, are not part of this
  design.

## Files

| file | contents |
|---|---|
| `rtl/gasp_pkg.sv` | state encoding `state_e`, default gate delay and size |
| `rtl/gasp_state_node.sv` | state conductor with keeper (behavioural) |
| `rtl/gasp_ctrl.sv` | GasP control cell (behavioural) |
| `rtl/wp_pulse_limiter.sv` | edge-to-pulse converter (behavioural) |
| `rtl/fifo_data_latch.sv` | one column of data latches (RTL latch plus delay) |
| `rtl/gasp_dfifo.sv` | the distributed FIFO: top level |
| `tb/*_tb.sv` | one self-checking test per module |
| `tb/gasp_dfifo_tb.sv` | end to end at the default size |
| `tb/gasp_wire_length_tb.sv`, `tb/gasp_link_bench.sv` | 1 to 6 stages, 16 bits |
| `tb/gasp_multiplier_link_tb.sv`, `tb/wp_multiplier_model.sv` | products of an 8×8 wave-pipelined multiplier, one every 450 ps, carried through a 16-stage FIFO |

The multiplier test runs at `T_INV` = 70 ps, a 420 ps cycle, roughly the
speed of a 0.18 µm process. At the default 100 ps the FIFO's 600 ps cycle
cannot keep up with one product every 450 ps. The multiplier itself is only
a timing model of a data source.

## Simulating

Verilator 5 with timing support is enough. Each test prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module gasp_dfifo_tb \
    rtl/gasp_pkg.sv rtl/*.sv tb/gasp_dfifo_tb.sv
./obj_dir/Vgasp_dfifo_tb
```

For the wire-length test, add `tb/gasp_link_bench.sv`. For the multiplier
test, add `tb/wp_multiplier_model.sv`. Verilator warns about the zero-delay
and latch constructs; these warnings are expected. All times are in
picoseconds (`` `timescale 1ps/1ps ``).

## Changing it

- `STAGES` and `WIDTH` are parameters of `gasp_dfifo`.
- `T_INV` scales every delay in the chain at once. The cycle is always
  6·`T_INV` and a stage always adds 4·`T_INV` of latency.
- Modules that drive the FIFO must keep to the sender and receiver rules
  above. They are the only timing assumptions the chain makes about the
  outside world.
- For silicon, the control parts (`gasp_ctrl`, `gasp_state_node`,
  `wp_pulse_limiter`) must be built as custom cells with sized transistors.
  Only the data columns map onto standard latches.
