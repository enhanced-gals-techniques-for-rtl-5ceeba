# Request-driven GALS wrapper with external clock and blockwise clock jitter

A globally-asynchronous, locally-synchronous (GALS) datapath splits a
synchronous design into blocks that talk to each other by handshakes instead of
sharing one clock. In the *request-driven* style implemented here, a block's
locally synchronous module (LSM) receives no free-running clock at all: each
data token arriving on the input handshake produces exactly one clock pulse.
A clock is needed only when the input stream pauses and words are still stuck
in the LSM's pipeline; then the wrapper lets a few cycles of a clock through
("time-out mode") to push them out.

This RTL takes that clock from an **external oscillator** shared by all blocks
(no per-block ring oscillator to tune), which means the wrapper must gate a
clock it cannot stop at the source. The heart of the design is therefore a
**clock arbiter** that starts and stops the clock only in its low phase, so the
LSM never sees a shortened pulse. Optionally (dual mode) a local ring
oscillator can replace the external clock. Each block also has its own
**jitter generator** that delays every clock pulse by a pseudo-random amount,
so that blocks running from the same external clock do not switch in lockstep;
this spreads the supply-current spectrum and lowers current peaks.

## One wrapped block

```
          DATA_IN ──► data latch ──DATA_L──────────────► ┌──────────────┐
 REQ_A ──► input port ─REQ_INT──┐                        │     LSM      │ DATA_OUT ─►
 ACK_A ◄──   │ REQI/ACKI        OR ──INT_CLK───────────► │ (user logic) │ DATAV_OUT
             │                  ▲                        └──────────────┘    │
             ▼                  │ LCLKM                                      ▼
 time-out generator ──run──► clock control ──STOPI──► arbiter ──CLK──► jitter gen.
                                              stretch ◄── output port ──► REQ_B / ◄── ACK_B
 external clock ─────────────────────────────────────► arbiter
```

`gals_wrapper` holds the following parts:

* **Input port** (`input_port`). This is an asynchronous state machine with the
  states IDLE → GRANT → VALID → PULSE.
  * On `REQ_A`↑ it opens the data latch and raises `REQI`, which asks the
    arbiter to hold the clock.
  * It waits for three things: `ACKI` (the clock is held low), `ACK_INT`
    (the output port is ready) and `LCLKM` low (no jittered pulse is still
    on its way).
  * It then closes the latch, raises `DATAV_IN`, and raises `REQ_INT` together
    with `ACK_A`. `REQ_INT` is the LSM clock edge.
  * On `REQ_A`↓ everything falls.
* **Output port** (`output_port`). After an LSM clock pulse has ended (falling
  edge), it looks at `DATAV_OUT`. The LSM must have settled its outputs by
  then.
  * If data is valid, it raises `stretch`, which holds the clock low and so
    keeps `DATA_OUT` stable. Then it runs a four-phase `REQ_B`/`ACK_B`
    handshake.
  * `stretch` falls only after `ACK_B`↓.
  * Three one-bit toggles track the pulses: one flips on every rising edge,
    one on every falling edge, and one marks each pulse as consumed. So each
    pulse is sent at most once, and pulses without valid data are skipped.
  * `ACK_INT` is high only when every pulse has been consumed and no transfer
    is running.
* **Time-out generator** (`timeout_gen`). Each request clears and arms it.
  * After `TIMEOUT_CYCLES` cycles of the source clock with no new request, it
    raises `run`.
  * It then counts `FLUSH_CYCLES` rising edges of the gated clock and drops
    `run` again.
  * `FLUSH_CYCLES` must be at least the LSM's pipeline depth.
  * A new request at any point ends time-out mode at once. The arbiter makes
    that stop glitch-free.
* **Clock control** (`clock_control`). It drives `STOPI = !run | ACKI`.
  * It passes `clk_select` on only while the wrapper is idle, so the clock
    source never changes in the middle of activity.
  * It stops the ring oscillator when the ring is not needed.
* **Data latch** (`data_latch`). A transparent latch on `DLE`.
* **Arbiter** and **jitter generator**: see below.

`INT_CLK = REQ_INT | LCLKM`. The two never overlap. A request pulse is fired
only while the arbiter holds the clock, and only after any jittered local
pulse has ended.

## The clock arbiter

`arbiter` is built from three MUTEX elements, three C-elements (one of them
asymmetric), an AND gate and two clock multiplexers:

| element | inputs | role |
|---|---|---|
| MUX1 | external clock / ring clock | source `src_clk` |
| M1 | `REQI` vs. `src_clk` | grants `ACKI` only while the clock is low. While `ACKI` is held, the clock is not passed on (`clk1` = 0) |
| OR2, M2 | `STOPI \| stretch` vs. `clk1` | stop grant (→ `ste` = inverted); other grant `clk_grant` = clock passed while not stopped |
| C1 | `ste` (both), `!sti` (rise only) | `cout` |
| M3 | `cout` vs. `src_clk` | grants only while the clock is low: release happens in the low phase |
| C2 | M3 grant (both), `cout` (rise), `ste` (fall) | `sti` |
| C3 | `sti` (both), `!clk_grant` (rise) | `cg` |
| AND2 | `clk_grant & cg` | `ECLK` |
| MUX2 | `ECLK` / ring-branch C-element of `ECLK` and `rclk` | `CLK` |

The arbiter stops and releases the clock like this:

* **Stop.** `STOPI` or `stretch` rises. M2 grants the stop only once the
  clock is low. Then `ste`↓ → `cout`↓ → M3 lets go → `sti`↓ → `cg`↓.
  From the grant on, `clk_grant` stays low, so a pulse that is already running
  finishes at full width and no new one starts.
* **Release.** Both requests are low. Then `ste`↑ → `cout`↑ → M3 grants in the
  clock's low phase → `sti`↑ → `cg`↑, and `cg` may rise only while `clk_grant`
  is low.

If the release comes in the clock's high phase, `clk_grant` rises right away,
but `cg` stays low until the low phase. So the first pulse the LSM sees is a
whole one.

All gates have zero delay in this model. This meets the arbiter's one timing
requirement: the clock must pass through M2 faster than a stop request can
reach `cg`.

## Jitter generator

`jitter_generator` is a 16-bit LFSR (`pn_generator`, polynomial
x¹⁶+x¹⁴+x¹³+x¹¹+1, period 65535) plus a delay element.

* The delay element (`delay_element`) is an 8-tap delay line with 250 ps
  between taps and a multiplexer.
* Each clock pulse is delayed by k·250 ps, with k = 0..7 taken from the LFSR.
* The LFSR steps when a pulse's falling edge leaves the end of the line. At
  that moment all taps agree, so the multiplexer cannot glitch, and both edges
  of one pulse get the same delay. The pulse width is therefore kept.
* The generator sits between the arbiter and the LSM clock, with one generator
  per block.
* The clock half period must be longer than the full line delay, 7 × 250 ps =
  1.75 ns.

## The datapath top

`gals_top` chains `N_BLOCKS` = 10 wrappers.

* The handshake of block *i* feeds block *i+1*.
* All blocks share `external_clock` and `clk_select`.
* Each block gets its own LFSR seed.
* The handshake wires between blocks carry `LINK_PS` = 1 ns of delay. This is
  a model of the interconnect that synthesis ignores. It also sets the width
  of each request-driven clock pulse, which lasts one handshake round trip.
* The LSMs are not part of this RTL. Their clock, inputs and outputs are
  brought out as arrays indexed by block (`lsm_clk`, `lsm_data_in`,
  `lsm_valid_in`, `lsm_data_out`, `lsm_valid_out`).

## Modelling and timing assumptions

* Each controller is an asynchronous state machine, written as an
  `always_latch` loop. Lint tools report these loops as combinational loops,
  and that is intended.
* The parts whose behaviour depends on physical delay are behavioural models,
  written with `#` delays that synthesis ignores:
  * the MUTEX (its metastability filter is analog);
  * the ring oscillator (its frequency is set by a delay line);
  * the delay line of the jitter generator.
* Handshakes are four-phase with bundled data. The sender must keep its data
  stable while its request is high.
* The LSM samples on the rising edge of `INT_CLK` and must settle
  `DATA_OUT`/`DATAV_OUT` before the falling edge.
* Every storage element has the active-low asynchronous reset `rst_n`. The
  simulator is two-state and starts at random values, so a testbench must give
  `rst_n` a real falling edge (1 → 0) before releasing it.

## Departures from the original description and own choices

The wrapper's block diagram, the arbiter's element list, the stop/release
sequences, the dual-mode clock selection and the jitter generator structure
are taken from the original description. The following are this design's own
choices:

* All controller behaviour: the input and output port state machines, the
  time-out generator's counters and the clock-control equations.
* The arbiter's pin assignment, and the ring branch taking the gated clock.
* The ring oscillator is stopped by the clock control rather than directly by
  `STOPI`, so that the time-out count can run on the ring clock in dual mode.
* The jitter generator's trigger is the end of the delay line rather than its
  output, to avoid glitches.
* All numeric defaults other than `N_BLOCKS`:
  * `DATA_W` = 16;
  * `TIMEOUT_CYCLES` = 8;
  * `FLUSH_CYCLES` = 4;
  * 8 taps × 250 ps, close to the ±1 ns jitter of the original study at a
    20 ns clock;
  * ring half period 5.75 ns, about 87 MHz.

Some signals of the reference wrapper structure are simplified:

* The time-out generator has a single clear-and-arm input (`REQ_A1`) and
  ends time-out mode by itself. There are no separate reset/start lines from
  the input port and no hold line (`STOPH`) from the clock control.
* The second gate in front of the LSM clock is left out. `LCLKM` is simply
  the jittered arbiter clock, and the arbiter already gates it.
* The input port also waits for `LCLKM` to be low before it fires a request
  pulse. This is needed because the jitter generator sits after the arbiter:
  a clock pulse that was granted just before `ACKI` can still be travelling
  through the delay line.

The following are not modelled:

* the alternative placement with one jitter generator on each block's
  incoming request line and another on the external clock (here a single
  generator sits in front of the LSM clock);
* a true random number generator;
* per-block clock phase offsets;
* the supply-current spectrum.

## Files

| file | content |
|---|---|
| `rtl/gals_top.sv` | 10-block chain (top) |
| `rtl/gals_wrapper.sv` | one wrapped block |
| `rtl/arbiter.sv`, `rtl/mutex.sv`, `rtl/c_element.sv`, `rtl/ring_oscillator.sv` | clock arbiter and its cells |
| `rtl/input_port.sv`, `rtl/output_port.sv`, `rtl/timeout_gen.sv`, `rtl/clock_control.sv`, `rtl/data_latch.sv` | wrapper control |
| `rtl/jitter_generator.sv`, `rtl/pn_generator.sv`, `rtl/delay_element.sv` | jitter generator |
| `rtl/gals_pkg.sv` | controller state types |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/lsm_model.sv` | 4-stage pipeline used as LSM in the tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Verilator 5 with timing support is needed, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/gals_pkg.sv tb/tb_gals_top.sv --top-module tb_gals_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Replace `tb_gals_top` with any other testbench name.

* `tb_gals_top` runs the full 10-block chain at its default parameters.
  * It sends 30 random words with random gaps, some shorter than the time-out
    and some long enough to flush. A slow sink causes back-pressure.
  * Two thirds of the way through it switches to the ring oscillators.
  * It checks every word's value and order, and every LSM clock pulse's width.
  * It also checks that each of these happened at least once: a request pulse,
    a time-out, a stretch during time-out mode, a request that interrupts
    time-out mode, back-pressure, a time-out on the ring clock, and jitter
    between blocks.
* `tb_gals_wrapper` does the same for a single block.
* `tb_burst_50msps` sends one burst of 64 words at 50 Msps (one word per
  20 ns slot) through a wrapper at its default parameters. It does this once
  on the external clock and once on the ring oscillator. It checks that every
  word is accepted and delivered within its slot, and that the pipeline tail
  is flushed by time-out mode in time.
* The unit testbenches check each part against an independent reference:
  * the arbiter: no runt pulse, no pulse while held, `ACKI` only in the low
    phase, restart after every release, in both clock modes;
  * the LFSR: its sequence and its full period;
  * the delay and jitter: exact delays and kept pulse widths;
  * the handshake orderings of both ports;
  * the exact time-out and flush counts.
