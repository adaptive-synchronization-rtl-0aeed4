# Adaptive synchronization of multi-synchronous on-chip links

A large, fast chip cannot keep one zero-skew clock everywhere. This design
splits it into clock domains that all run at the **same frequency** but with
**unknown, slowly changing phases** ("multi-synchronous" clocking). Data that
crosses from one domain to another is therefore not truly asynchronous: its
arrival time relative to the receiver's clock is stationary, changing only
with fixed manufacturing skew and slow drift (temperature, supply). Short-term
jitter is small against the cycle.

Instead of a chain of synchronizer flip-flops (one or more cycles of latency
and a failure risk that repeats cycle after cycle once data and clock collide),
each receiving input bus gets an **adaptive synchronizer (A/S)**. It measures
where the incoming Rdy edges fall relative to the local clock and delays the
whole bus through a programmable delay line until those edges sit close to the
middle of the clock cycle. A single register then samples the bus safely, with
about half a cycle of waiting.

The RTL is SystemVerilog (IEEE 1800-2017). The digital parts (counter,
controller, sender, receive register, top) are synthesizable. The mutual
exclusion elements and the delay elements are analog cells in silicon; they are
written here as behavioural models with `#` delays so the whole link can be
simulated in picoseconds.

## System view

```
 sending module i (clk_tx[i])                receiving module (clk_rx)
 +----------------+   Rdy, data     wire     +-----------------------------+
 | as_transmitter |--ch_*_out ---> delay --->| ch_*_in -> adaptive_sync[i] |--> rx_valid/rx_data
 +----------------+                          |             ...  x NBUS     |
        ^  suspend, train (2-flop synced)    |  training_controller        |
        +------------------------------------+-----------------------------+
```

`as_system` (the top) holds NBUS = 10 sender/receiver pairs and one
`training_controller`. The wire delay between the sender pins (`ch_rdy_out`,
`ch_data_out`) and the receiver pins (`ch_rdy_in`, `ch_data_in`) is left
outside the top so that a testbench or floorplan model can supply it. The
clocks are ports too: the global clock network and the per-module clock
regeneration (buffers, optional frequency multiplier) are analog and not part
of this RTL.

### The channel

Each bus is bundled data with a **two-phase Rdy** line: a sender puts a word on
the data wires and toggles Rdy in the same clock edge, so every Rdy edge,
rising or falling, is one word. The receiver registers the delayed Rdy and data
at each rising edge of its clock; a change of the registered Rdy produces
`rx_valid` for one cycle with the word on `rx_data`. Because the phase is
unknown, a word cannot be expected in any particular cycle; users of the link
must work with valid flags (or tags), not with fixed cycle counts.

## The adaptive synchronizer

`adaptive_synchronizer` has three parts:

1. **`digital_delay_line`**: WIDTH+1 wires (data and Rdy together, so the
   bundle stays aligned) through TAPS = 16 stages of 8 ps. The tap `sel` gives
   a delay of (sel + 1) x 8 ps, 8 to 128 ps, more than the 100 ps period.
2. **`conflict_detector`**: watches the *delayed* Rdy against the local clock.
3. **`adapt_counter`**: holds the tap. It is cleared at the start of a
   training session and steps up by one on every conflict.

Because the step (8 ps) is smaller than the conflict-free span (see below),
the upward sweep cannot jump over it. The sweep stops at the first tap whose
Rdy edges are clear of the window. After each tap change the synchronizer waits
4 cycles (SETTLE_CYCLES) before it acts on a conflict again. This lets the tap
multiplexer's glitches and the flags from the old setting die out. A full sweep
takes at most 16 x 5 = 80 cycles; in simulation the worst case seen was 57.

### The conflict window: the part that needs care

A conflict is a Rdy edge within **d = 40 ps** of a rising clock edge, that is
|t(data) - t(clock)| <= d, at a 100 ps period (a 10 GHz local clock). Since d
is just under half a period, the edges can only be outside the window in the
20 ps span from tC + 40 to tC + 60 around mid-cycle. Once the sweep lands an
edge there, it is at least 40 ps from either sampling edge, far more than the
jitter.

The detector divides time into **frames** that run from one falling clock edge
to the next. Each frame therefore holds exactly one rising edge tC, which is
the rising edge nearest to any data edge in that frame. Every edge sets a
request level, and the frame's closing falling edge clears all of them, so a
grant cannot change hands within a frame. Four mutual exclusion (ME) elements
decide the outcome, two for rising and two for falling Rdy edges:

| ME | request 1 | request 2 | request 1 wins when |
|----|-----------|-----------|---------------------|
| A  | data edge delayed by d | clock edge | t(data) + d < tC: the edge is safely early |
| B  | clock edge delayed by d | data edge | tC + d < t(data): the edge is safely late |

The frame has a conflict when the clock wins A and the data edge wins B. A
frame with no data edge never reports a conflict. The result (`conflict`) is
registered at the falling edge, and the counter reads it at the next rising
edge. `conflict_early` (the edge came before tC) is a sample of the edge
requests at tC. Only continuous tracking uses it.

An ME element (`me_element`) grants whichever request rose first and holds the
grant while that request stays high. Requests that arrive in the same
simulation step are a tie; the model picks a winner at random, standing in for
the real cell's metastable resolution. It does not model the time the real
cell needs to resolve.

### Tracking and monitoring in normal operation

- **Tracking** (continuous mode): the counter works as an up/down counter. A
  conflict with an edge just before the clock (the edge drifted late, toward
  the next clock edge) steps the delay down. A conflict just after the clock
  steps it up. The tap changes at the rising clock edge. At that moment the
  only edge inside the line is far from the output tap, so normal traffic
  keeps flowing without glitches.
- **Monitoring** (triggered mode): conflicts seen in normal traffic are
  counted. After TRIG_THRESH = 4 of them, `drift_alarm` stays high until the
  next session starts.

Either way, the detector only learns something when Rdy edges occur, that is
when words are sent.

## Training sessions and adaptation modes

`training_controller` runs in the receiver's clock domain. A session has three
phases:

| phase | cycles | what happens |
|-------|--------|--------------|
| DRAIN | 16 | `suspend` high. Senders stop accepting words; words already in flight are still received |
| TRAIN | 1000 | `train` high. Senders toggle Rdy and invert the data every cycle (dummy transmissions). Receivers clear their counters in the first cycle and then sweep |
| QUIESCE | 16 | `train` low. The last dummy edges drain while receivers still drop them |

Normal operation resumes after this fixed time. The controller does not check
whether every synchronizer converged; the 1000-cycle training phase is far
longer than the 80-cycle worst-case sweep. Senders see `suspend` and `train`
through two-flop synchronizers, and the drain phases cover that lag plus the
wire and delay-line latency. `suspend` is also high from reset until the first
session ends.

`mode` (`as_pkg::adapt_mode_e`, held stable out of reset) selects when sessions
run:

| mode | sessions | corrects |
|------|----------|----------|
| `MODE_ONE_TIME` | only on `burnin_start` (test / burn-in) | skew |
| `MODE_POWER_UP` | once after reset | skew |
| `MODE_PERIODIC` | after reset, then every 8000 cycles (1.25 MHz at 10 GHz, just above a 1 MHz drift bandwidth) | skew and drift |
| `MODE_TRIGGERED` | after reset, then when any receiver raises its drift alarm | skew and drift, only when needed |
| `MODE_CONTINUOUS` | after reset, then none; the counters track | skew and drift, no interruptions |

In one-time mode the real design would keep the tap in permanent storage such
as fuses. Here the counter register stands in for that storage, so a reset
clears it.

## Interfaces and timing

`as_system` ports, by clock domain:

- sender i (`clk_tx[i]`): `tx_valid`, `tx_data` and `tx_ready`. A word is
  taken at a rising edge when `tx_valid && tx_ready`, at most one per cycle.
  It leaves on `ch_rdy_out[i]`/`ch_data_out[i]` right after that edge.
- receiver (`clk_rx`): `rx_valid[i]` and `rx_data[i]`. After the input pins,
  the latency is the delay-line setting ((sel+1) x 8 ps), then the wait to the
  next rising edge (40 to 60 ps once adapted, about half a cycle), then one
  register.
- control and status (`clk_rx`): `mode`, `burnin_start`, `suspend`,
  `training`, `adapted`, `session_count`, `drift_alarm`, and per bus
  `delay_sel` and `conflict`.
- `rst_n`: active-low asynchronous reset, shared by all domains. Release it
  synchronously to each clock.

Default parameters: NBUS = 10 buses of WIDTH = 32 bits, TAPS = 16, STEP_PS = 8,
WINDOW_PS = 40, TRAIN_CYCLES = 1000, PERIOD_CYCLES = 8000,
DRAIN_CYCLES = 16. Every file uses `timescale 1ps/1ps`. The time constants
are in `as_pkg`.

If you change the timing, keep these two rules:

- TAPS x STEP_PS must be at least one clock period, so every phase can be
  reached.
- STEP_PS must be smaller than period - 2 x WINDOW_PS, so the sweep cannot
  skip the conflict-free span.

## Where this design makes its own choices

The overall method is taken as published: a same-frequency multi-synchronous
clock, one A/S per input bus, a conflict window just under half a cycle, a
delay line set by a counter that a training session clears and each collision
steps up, dummy Rdy traffic during sessions, the five adaptation modes, an
up/down counter for continuous tracking, ten buses per module and
1000-cycle sessions. The following are this design's own choices:

- All sizes other than the 10 GHz clock, the ten buses and the 1000-cycle
  session: the 32-bit word, the 40 ps window, the 16 x 8 ps delay line, the
  settle time, the alarm threshold of 4, the 8000-cycle period and the
  16-cycle drain phases.
- How the four ME elements are paired, the frame-based clearing of their
  requests, and the early/late flag that decides the tracking direction.
- The two-phase Rdy protocol, the dummy pattern, the drain/quiesce sequence
  and the sender-side synchronizers.
- Continuous mode starts with one power-up session, so tracking begins from a
  conflict-free tap.
- Cost: the published estimate is about 1000 transistors per synchronizer.
  Delaying all 32 data wires as well as Rdy costs several times that. The
  estimated 0.1 % time overhead for periodic sessions does not match
  1000-cycle sessions at a 1 MHz rate, which comes to about 10 %. With this
  design's 8000-cycle period the overhead is 1032 / 9032 cycles, about 11 %.
  A slower drift bandwidth allows a longer period.

Limits of the models: the ME model resolves ties instantly. The delay stages
are ideal transport delays without jitter or process spread. Metastability of
the sampling register is not modelled.

## Files

| file | what it is |
|------|-----------|
| `rtl/as_pkg.sv` | adaptation-mode enum, default time constants |
| `rtl/as_system.sv` | top: NBUS senders and synchronizers, one controller |
| `rtl/adaptive_synchronizer.sv` | per-bus A/S |
| `rtl/conflict_detector.sv` | four-ME conflict detector (behavioural) |
| `rtl/me_element.sv` | mutual exclusion element (behavioural) |
| `rtl/digital_delay_line.sv` | tapped delay line with multiplexer (behavioural stages) |
| `rtl/adapt_counter.sv` | saturating up/down tap counter |
| `rtl/training_controller.sv` | session sequencing for the five modes |
| `rtl/as_transmitter.sv` | sender side: two-phase Rdy, dummy traffic |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs. The testbenches need Verilator 5 with
`--timing`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/as_pkg.sv tb/tb_as_system.sv --top-module tb_as_system
./obj_dir/Vtb_as_system
```

- `tb_as_system`: the whole design at default parameters (about 20 s). It
  sets up ten buses arriving at different phases and sends random traffic that
  it checks for order and content. It runs every mode in turn: drift on one
  wire raises the alarm in triggered mode, all wires drift +30 ps and back
  under full traffic in continuous mode, and traffic runs straight through
  periodic sessions. After each session it checks every bus's tap against the
  window it works out from the known wire delay. It also counts that each
  mechanism occurred: conflicts, tap steps, held senders, periodic, triggered
  and burn-in sessions, and tracking steps in both directions.
- `tb_adaptive_synchronizer`: training at 15 phases around the cycle, and
  again at 11 phases with +-4 ps of random jitter on every edge. It checks that
  the chosen tap clears the window, that training converges in under 1000
  cycles, and that every received word waited 40 to 60 ps (widened by the
  jitter) before being sampled. It also covers tracking through drift without losing a word, and
  the drift alarm.
- `tb_conflict_detector`: data-edge offsets from -50 to +49 ps against the
  window.
- `tb_me_element`, `tb_digital_delay_line`, `tb_adapt_counter`,
  `tb_training_controller` (all five modes, with exact phase lengths) and
  `tb_as_transmitter`: unit tests.
