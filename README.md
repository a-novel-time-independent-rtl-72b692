# Data generator with wait: a polled sender made safe by one flip-flop

This RTL solves a small problem that catches out many polled (software-style)
interfaces. A receiver samples a data line on every rising edge of its clock.
It also drives a `wait` line. If `wait` is high at a rising edge, the receiver
is not ready. The data must then stay where it is until after the next rising
edge at which `wait` is low. Only then may the next value appear.

A sender that only polls its inputs, as a software thread or a slow state
machine does, cannot meet this rule reliably. The fix is to capture `wait`
with a D flip-flop clocked by the receiver's clock. The polled logic then reads
the captured level instead of the live line. This repository gives that fix as
synthesizable SystemVerilog, with testbenches that drive the cases where a
polled-only sender fails.

The example comes from work on *time independent asynchronous* (TIA)
signalling. In TIA signalling only the order of signal changes matters, never
their timing. Each side may run as fast or as slow as it likes. The data
generator is the worked example used to show why a polled implementation must
be modelled one atomic test at a time.

## The rule, and why polling breaks it

```
clock   ____/‾‾‾‾\____/‾‾‾‾\____/‾‾‾‾\____
wait    ______________/‾‾‾‾‾\_____________
edge        1         2         3
            sample    wait      sample
            data      forces    data
                      delay
```

At edge 1 `wait` is low, so the receiver takes the data and the sender may then
present the next value. At edge 2 `wait` is high, so the data must not change.
At edge 3 `wait` is low again, so the same value is taken at edge 3. After that
the sender may move on. The drawing shows only the order of events. The rule
itself sets no timing.

A polled sender tests `clock` and `wait` one after the other, with gaps in
between. Two races follow:

- **Wait just before the clock.** The sender reads `wait` low. Then `wait`
  rises and the clock rises. The sender then sees the clock high and moves to
  new data. The wait request is missed and a value is lost.
- **Wait just after the clock.** The sender reads the clock as still low. Then
  the clock rises and `wait` goes high. The sender sees `wait` high and holds
  the data. The hold comes one edge too early.

No ordering of the polls fixes this. The decision needs the level of `wait` at
the exact instant of the clock edge, and a poll cannot see that instant. A
flip-flop clocked by `clock` with `wait` on its D input records exactly that
level.

## Structure

```
              link_clock ──┬──────────────► bit_sync ──► clock_hi ─┐
                           │                                       │
link_wait ──► wait_sampler (D-FF on link_clock)                    ▼
                 wait_at_edge ─────────────► bit_sync ──► wait_hi ─► datagen_fsm ──► data
                                                                     ▲     │
                                              src_data ──────────────┘     ├──► src_next
                                                                           └──► held
```

| Module | File | Role |
|---|---|---|
| `datagen_wait` | `rtl/datagen_wait.sv` | Top level; wires the parts below |
| `wait_sampler` | `rtl/wait_sampler.sv` | D flip-flop on `link_clock` with `link_wait` on D |
| `bit_sync` | `rtl/bit_sync.sv` | Flip-flop synchronizer into the local `clk` domain (two instances) |
| `datagen_fsm` | `rtl/datagen_fsm.sv` | Polled source state machine and data register |
| `datagen_pkg` | `rtl/datagen_pkg.sv` | State type shared by the machine and its testbench |

### The polled state machine

The machine runs on a local clock `clk`. Each state makes one atomic test or
one atomic action. This follows the rule that a polled machine tests only one
input at a time.

| State | Action or test | Next state |
|---|---|---|
| `S0_OUTPUT` | load `src_data` into `data`; pulse `src_next` | `S1_CLOCK_LO` |
| `S1_CLOCK_LO` | is the clock low? | yes: `S2_CLOCK_HI`; no: stay |
| `S2_CLOCK_HI` | is the clock high? | yes: `S3_TEST_WAIT`; no: stay |
| `S3_TEST_WAIT` | was `wait` high at that edge? | yes: pulse `held`, go to `S1_CLOCK_LO`; no: `S0_OUTPUT` |

Passing through S1 and then S2 proves that one rising edge has happened. By
then the flip-flop holds the `wait` level of that edge, and the level stays put
until the next edge. So S3 can read it at leisure. S3 comes one `clk` after S2
saw the clock high. The two synchronizers may resolve one cycle apart, and this
extra cycle lets the slower one catch up.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | local clock of the polled machine |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `link_clock` | in | 1 | receiver's clock; data is sampled on its rising edge |
| `link_wait` | in | 1 | receiver's wait request |
| `src_data` | in | `DATA_W` | next value of the local data source |
| `src_next` | out | 1 | one-`clk` pulse: `src_data` was taken, present the next value |
| `held` | out | 1 | one-`clk` pulse: an edge with wait high kept the data |
| `data` | out | `DATA_W` | value presented to the receiver |

| Parameter | Default | Meaning |
|---|---|---|
| `DATA_W` | 1 | width of the data; the example sends a single bit |
| `SYNC_STAGES` | 2 | synchronizer depth (this design's choice) |

- After reset the machine starts in S0. The first source value is therefore
  on `data` before the first clock edge.
- After a rising edge with `wait` low, the new value is loaded on the
  `SYNC_STAGES+3`-th `clk` edge. With the defaults that is the 5th edge.
  `src_next` pulses in the following cycle.
- After a rising edge with `wait` high, `data` does not change, and `held`
  pulses `SYNC_STAGES+2` `clk` edges after the link edge.
- **Constraint:** each high and each low phase of `link_clock` must last at
  least `SYNC_STAGES+4` `clk` periods. Otherwise the polling can miss a phase.
  This is the one timing assumption in the design. The clock of this example
  is free-running, so the sender has to keep up with it. Beyond that, neither
  side's speed matters, and the clock may change speed at any time.
- `wait` must meet the flip-flop's setup and hold times at `link_clock`. If it
  does not, the flip-flop may go metastable. The synchronizer on its output
  absorbs that, and the edge is then treated as either held or consumed.

## Where this departs from the original example

- **A different S3.** In the original polled graph, S3 waits for `wait` to
  fall. That graph also tests the live `wait` in S2, in either order of tests.
  Both versions fail in the two races above. Here S3 tests the captured
  level instead, and nothing waits for `wait` to fall. S0, S1 and S2 keep
  their original meaning. The original adds a place S2b when it splits S2's
  clock and wait tests. It is not needed here, because the wait test moved to
  S3.
- **Reset.** The original starts in S2 and assumes valid data is already
  present. Here reset enters S0 and loads the first value itself. The data
  register resets to zero, and the flip-flop resets to "no wait".
- **The data source is outside the block.** The original only says the data
  comes from "some internal source". Here it is the `src_data`/`src_next`
  pair.
- **Synchronizers.** The original notes the metastability risk but gives no
  circuit. The two-stage synchronizers are this design's choice.
- **`held` and the `state` output** of `datagen_fsm` exist only for
  observation.

## What is not here

The data generator is the example in the larger TIA work. That work's main
result is a bidirectional link that uses only two IO pins. It has a master with
13 states, including a time-out that breaks a deadlock, and a slave with
10 states. It ran in software between a PC and a small microcontroller. Its
wire-level signalling and state graphs were never published. RTL for it would
therefore be invention, and none is given. The clock and wait generators of
the example exist only as simulation stimulus. The end-to-end testbench
plays their part.

## Verification

Each testbench checks the design against values it works out for itself. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb/tb_wait_sampler.sv` moves `wait` 1 ns before and after rising edges and
  in mid-phase. The output must equal the level at the edge and hold it until
  the next edge. It also checks reset.
- `tb/tb_datagen_fsm.sv` drives the synchronized inputs directly, with 8-bit
  random data. It checks which value is on `data` at every edge, and the exact
  cycle of S3, `held`, `src_next` and the data load. It lets `wait_hi` lag
  the clock by one cycle. It also runs held edges back to back.
- `tb/tb_datagen_wait.sv` tests the top level at its default parameters. It
  runs 3000 link clock periods, from the minimum phase length up to 150 `clk`
  periods. The receiver model checks `data` at every edge. Between edges it
  counts exactly one source step after a consuming edge and none after a held
  one. It checks the step's latency. It counts how often each case occurs and
  fails if one never does. The cases are: consumed, held, held twice in a
  row, wait rising or falling 1 ns before or after an edge, fast clock and
  slow clock.

A variant with `link_wait` fed straight to the synchronizer is the polled-only
design that the flip-flop fixes. In the end-to-end test it fails thousands of
checks, as it should.

Running with Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/datagen_pkg.sv tb/tb_datagen_wait.sv --top-module tb_datagen_wait -o sim
./obj_dir/sim
```

Replace `tb_datagen_wait` with `tb_datagen_fsm` or `tb_wait_sampler` to run
the unit tests. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/datagen_pkg.sv rtl/datagen_wait.sv`.
Verilator reports that `rst_n` is used both asynchronously (the flip-flop
resets) and synchronously (the `disable iff` of the assertions in
`datagen_fsm`). That is intended.
