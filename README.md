# Railroad grade-crossing controller

A road crosses two railway tracks, one west-bound and one east-bound. One set
of bells and one set of crossing arms protects the road for both tracks. The
controller watches four track indicators and decides when the bells ring and
when the arms are down:

- the bells must start within 5 s of a train entering the signalling block
  around the crossing;
- the arms must come down 5 s after the bells start, so that a car already
  under an arm gets clear;
- the bells stop as soon as the train has cleared the crossing, and the arms
  rise shortly after.

The key idea is to not build one big four-input machine. A controller for a
single track is small and easy to get right. Two of them run side by side, and
the crossing warns whenever either track asks for it: the bell is the OR of the
two track bells, and the arm is that OR delayed by one clock. With a 5 s clock,
that one-clock delay is exactly the required 5 s gap between bell and arm.

## Track indicators

Each track has two indicators, produced by track circuits (gaps in one rail,
shorted to the other rail by a train's wheels):

| signal | port     | meaning                                                      |
|--------|----------|--------------------------------------------------------------|
| BLK1   | `blk[0]` | a train is in the block on the west-bound track              |
| GCR1   | `gcr[0]` | a west-bound train is in, or very close to, the crossing     |
| BLK2   | `blk[1]` | a train is in the block on the east-bound track              |
| GCR2   | `gcr[1]` | an east-bound train is in, or very close to, the crossing    |

On the track these are "asserted" by being pulled to ground. The RTL takes
them as active-high logic levels, already synchronous to `clk`. Any level
inversion and synchronisation happen outside the design.

## The single-track controller (`track_ctrl`)

A four-state Moore machine with one flip-flop per state (one-hot):

| state           | meaning                                   | bell |
|-----------------|-------------------------------------------|------|
| `NO_TRAIN`      | no train in the block                     | off  |
| `IN_BLOCK`      | train in the block, approaching           | on   |
| `AT_CROSSING`   | train occupies the crossing               | on   |
| `PAST_CROSSING` | crossing cleared, train still in block    | off  |

Transitions (in any other case the machine holds its state):

| from            | condition        | to              | why                                   |
|-----------------|------------------|-----------------|---------------------------------------|
| `NO_TRAIN`      | `blk`            | `IN_BLOCK`      | train arrives                         |
| `IN_BLOCK`      | `!blk`           | `NO_TRAIN`      | train backed out, e.g. onto a siding  |
| `IN_BLOCK`      | `blk && gcr`     | `AT_CROSSING`   | train reaches the crossing            |
| `AT_CROSSING`   | `!gcr`           | `PAST_CROSSING` | train clears the crossing             |
| `PAST_CROSSING` | `blk && gcr`     | `AT_CROSSING`   | train backs into the crossing again   |
| `PAST_CROSSING` | `!blk`           | `NO_TRAIN`      | train leaves the block                |

Points worth knowing:

- **Two recovery paths.** The backing-out transition from `IN_BLOCK` and the
  re-entry transition from `PAST_CROSSING` handle trains that do not move
  straight through. A train that backs out of the crossing and comes back in
  silences the bell while it is in `PAST_CROSSING`. The bell starts again only
  when the train is back on the crossing. This is a known weakness of the
  scheme, not a bug in the RTL.
- **Priority.** In `IN_BLOCK` and `PAST_CROSSING`, `!blk` wins over `gcr`.
  `AT_CROSSING` leaves on `!gcr` whatever `blk` says. A very short train whose
  `gcr` and `blk` drop in the same clock goes through `PAST_CROSSING` for one
  clock and then to `NO_TRAIN`.
- **Latency.** `bell` is decoded from the state register only. It rises one
  rising edge after `blk` is first seen high. With a 5 s clock this is the
  "within 5 s" requirement.
- **Reset and illegal states.** A synchronous active-high `rst` forces
  `NO_TRAIN`. Any state that is not one-hot also returns to `NO_TRAIN`. An
  assertion checks that the register stays one-hot.

## The crossing controller (`two_track`, top level)

```
blk[0],gcr[0] --> track_ctrl --bell--+
                                     +--OR--+--------------> bellout
blk[1],gcr[1] --> track_ctrl --bell--+      |
                                            +--[D  Q]------> arm
```

`NUM_TRACKS` (default 2) sets the number of `track_ctrl` instances. The
bells are the OR of all per-track requests. `arm` is that OR registered once.
The timing from a train first seen on `blk` is:

| rising edge after `blk` rises | 1        | 2          |
|-------------------------------|----------|------------|
| `bellout`                     | rises    | high       |
| `arm`                         | low      | rises      |

When the last train clears its crossing, `bellout` drops at that edge and
`arm` drops one edge later. The arms are never down while the bells are
silent, except for that one clock when they rise.

Ports:

| port          | dir | width          | meaning                                   |
|---------------|-----|----------------|-------------------------------------------|
| `clk`         | in  | 1              | controller clock, 5 s period intended     |
| `rst`         | in  | 1              | synchronous reset, active high            |
| `blk`         | in  | NUM_TRACKS     | block occupied, per track                 |
| `gcr`         | in  | NUM_TRACKS     | crossing occupied, per track              |
| `bellout`     | out | 1              | ring the bells                            |
| `arm`         | out | 1              | lower the arms                            |
| `track_bell`  | out | NUM_TRACKS     | per-track bell requests (observation)     |
| `track_state` | out | NUM_TRACKS x 4 | per-track one-hot state (observation)     |

The design has 9 flip-flops in its default build: four per track plus the arm
register.

## Where this RTL departs from the original design, and what it adds

The state machine, its Moore bell output, the OR of the track bells and the
one-clock register on the arm follow the original design. The following are
this implementation's own choices:

- A synchronous reset. The original has none and assumes the machines start in
  `NO_TRAIN`.
- Non-one-hot states recover to `NO_TRAIN`, and an assertion checks the
  one-hot property.
- `NUM_TRACKS` as a parameter, where the original has two fixed instances.
- The `track_bell` and `track_state` observation ports.
- The description of the original controller says the gate comes down when a
  train enters the block. Its timing specification and its top-level
  structure put the arm one clock after the bell. This RTL follows the latter.

Not part of the RTL: the track circuits, the bells and arm mechanisms, and the
5 s clock source. They connect to the top-level ports.

## Files

| file                         | contents                                         |
|------------------------------|--------------------------------------------------|
| `rtl/grade_crossing_pkg.sv`  | `track_state_t`, the one-hot state enum          |
| `rtl/track_ctrl.sv`          | single-track controller                          |
| `rtl/two_track.sv`           | top level: track controllers, bell OR, arm register |
| `tb/tb_track_ctrl.sv`        | testbench for `track_ctrl`                       |
| `tb/tb_two_track.sv`         | end-to-end testbench for `two_track`, default parameters |

## Verification

Both testbenches are self-checking. They compare against reference models that
are written differently from the RTL. `tb_track_ctrl` uses one
sum-of-products equation per state flip-flop. `tb_two_track` uses a
next-state table per track plus a one-clock arm model. Inputs change on the
falling edge. Every output is compared after every rising edge.

Stimulus is the same in both. First come the directed train movements: normal
passage, backing out of the block, leaving and re-entering the crossing, and
two overlapping trains on the two tracks. Then come random trains and fully
random indicator values. Each testbench counts every transition of the state
diagram. For the top it also counts both tracks ringing together, each track
ringing alone, and the arm lowering and rising one clock after the bell. A
mechanism that never happens counts as a failure. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

Running with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/grade_crossing_pkg.sv \
    rtl/track_ctrl.sv rtl/two_track.sv tb/tb_two_track.sv --top-module tb_two_track
./obj_dir/Vtb_two_track

verilator --binary --timing --assert -Irtl rtl/grade_crossing_pkg.sv \
    rtl/track_ctrl.sv tb/tb_track_ctrl.sv --top-module tb_track_ctrl
./obj_dir/Vtb_track_ctrl
```

Each run finishes in well under a second. The top-level testbench runs the
design at its default parameters. To build a crossing over more tracks, set
`NUM_TRACKS`. The testbenches cover only the two-track build.
