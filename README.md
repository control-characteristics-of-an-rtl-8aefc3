# All-digital PID compensator (ADPID)

A PID speed controller made only of counters and a little logic. There is no ADC, no
multiplier and no sampled error value. The controller compares two square waves directly:
- the **reference**, which is the encoder waveform the motor would produce at the desired speed;
- the **feedback**, one channel of the motor's incremental encoder.

While the two waves disagree, an *error interval* is in progress. Three up/down counters run
during each error interval, at three different counting clocks:

| term | counter | cleared | what it holds at the end of an interval |
|------|---------|---------|------------------------------------------|
| P | `p_cnt` | at the start of every interval | width of this interval × f_P |
| I | `i_cnt` | never | sum of all interval widths so far × f_I |
| D | `d_cnt` minus `d_latch` | at the start of every interval (`d_latch` keeps the previous value) | change in interval width × f_D |

The counters count up when the reference leads and down when the feedback leads. The signed
count therefore carries the sign of the error as well as its size.

A fourth counter, the **accumulator** A, turns the combined count into a pulse width. At the
start of each interval, A is loaded with P + I + ΔD as computed at the end of the previous
interval. It then counts down at a base rate f_A. The output `pwm_out` is high while A is
above zero, so the drive pulse lasts (P + I + ΔD) / f_A seconds. Every gain is a ratio of
frequencies:

    K_P = f_P / f_A     K_I = f_I / f_A     K_D = f_D / f_A

Tuning the controller means choosing four counting frequencies. Grounding a clock removes its
term: f_D = 0 gives a PI controller, and f_I = f_D = 0 gives a P controller.

## One control cycle, step by step

This is the part that takes longest to absorb. Take the motor running slightly slow: the
feedback edges arrive a little after the reference edges.

1. **The reference rises; the feedback is still low.** The error logic (`sig_err`) sees the
   two signals differ and knows from its history that the reference moved first. It outputs
   *count up*.
   - The *begin* edge detector fires.
   - P and D are cleared to zero.
   - A is loaded from the A latch, so the drive pulse for this interval starts now.
2. **During the interval.** P, I and D count up at f_P, f_I and f_D. A counts down at f_A,
   and `pwm_out` stays high while A > 0.
3. **The feedback rises too; the signals agree.** Counting stops.
   - The *end* edge detector fires.
   - In the first clock of that pulse, the A latch takes the saturated sum
     P + I + (D − D_latch).
   - The D latch takes D.
   - Nothing else happens until the next disagreement, which is normally the next falling
     edge of the reference.
4. At the next interval start, A is loaded from the new latch value and step 1 repeats.

The pulse that starts at an interval was computed from the *previous* interval. That is one
half-period of delay, which is inherent in the method.

If the motor runs fast, the feedback leads:
- the counters count down;
- the latched sum usually becomes zero or negative;
- A is loaded with a value ≤ 0, and no pulse follows.

A pulse that is still running when the next interval starts is cut short by the reload.

## Error formation (`sig_err`)

A plain XOR of the two waves says *that* they differ but not *which one leads*. `sig_err`
keeps the previous reference, the previous feedback and the previous direction in registers.
A 32-row table, indexed by {previous direction, previous ref, previous fdbk, ref, fdbk}, then
gives a two-bit code:

| code `{esgn, emag_n}` | meaning |
|-------|---------|
| 10 | count up (reference leads) |
| 00 | count down (feedback leads) |
| 11 | hold, last direction was up |
| 01 | hold, last direction was down |

`emag_n` is active low and equals NOT(ref XOR fdbk). `esgn` is the remembered direction:
- whichever signal changed first, away from agreement, sets it;
- it is kept through the hold states;
- it flips when one signal overtakes the other.

The rows are written out one by one in `rtl/sig_err.sv`, with a comment on each row.

## Edge detectors and the sampling clock (`pedge_det`)

Each edge detector is two flip-flops in series with an AND-NOT, clocked by a sampling clock.
The pulse appears at the first sampling tick after a rising edge of its input and lasts one
sampling period.
- One detector watches `emag_n`. It rises when the signals come back into agreement, marking
  the end of an interval.
- The other watches its inverse, marking the start of an interval.

The sampling clock rate is a tuning input (`inc_s`); the examples use 100 kHz. During the
begin pulse, the loads of P, D and A are held active. The latches load only in the first
clock of the end pulse.

After reset the end detector sees `emag_n` already high and fires once. This loads zeros into
the latches, which is harmless.

## Counters (`updown_counter`, `counter_74x169`, `counter16_cascade`)

All counters share the interface of a 74LS169-style synchronous up/down counter:

| signal | meaning |
|--------|---------|
| `u_d` | direction |
| `en_p_n`, `en_t_n` | two active-low enables |
| `load_n` | active-low parallel load |
| `din` | parallel data |
| `cout_n` | active-low carry |

`cout_n` is low at terminal count (all ones counting up, zero counting down) while `en_t_n`
is low.

There are two implementations:
- **`updown_counter`** is a behavioural N-bit counter. It is the default.
- **`counter16_cascade`** is four `counter_74x169` cells. Each cell's `_T` enable is the
  ripple carry of the cell below, as on the discrete part. Each cell is four J-K flip-flops
  (`jk_ff`). Each flip-flop's J and K are the OR of two terms:
  - a load term: J = data bit, K = its complement;
  - a count term: J = K = toggle, where a bit toggles when all lower bits are ones (up) or
    zeros (down).

Set `IMPL = CNT_CASCADE` on `adpid_top` or `adpid_core` to build P, I and D from the
cascade. The latches and A keep the behavioural counter; the helper `adpid_counter` makes
this choice.

The two forms are checked against the same integer model. A closed-loop test also runs both
builds of the whole controller side by side and finds them identical on every clock.

Counts are 16-bit two's complement (`CNT_W`):
- P, I and D wrap on overflow.
- The sum P + I + ΔD is formed two bits wider and saturated to 16 bits before the A latch.
- A stops at zero instead of wrapping.

For all the tunings below, P never exceeds about 1,400 counts per interval.

## Counting clocks (`rate_gen`)

All logic runs on one system clock `clk`. A counting "clock" is a one-cycle enable strobe
from a 32-bit phase accumulator:

    rate = f_clk × inc / 2^32

Compute `inc` with `adpid_pkg::freq_to_inc(f_hz, clk_hz)`. Every rate must be below `f_clk`.
The package holds the example tuning for a 1 MHz clock:

| constant | value |
|----------|-------|
| `FA_HZ` | 20 kHz |
| `FP_HZ` | 32 kHz |
| `FI_HZ` | 12 kHz |
| `FD_HZ` | 800 Hz |
| `FS_HZ` | 100 kHz |

These give K_P = 1.6, K_I = 0.6 and K_D = 0.04.

## Top level (`adpid_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock, asynchronous active-low reset |
| `ref_in`, `fdbk_in` | in | 1 | reference and encoder waves, asynchronous (two-flop synchronised) |
| `inc_p`, `inc_i`, `inc_d`, `inc_a` | in | 32 | phase increments for f_P, f_I, f_D, f_A |
| `inc_s` | in | 32 | phase increment for the edge-detector sampling clock |
| `pwm_out` | out | 1 | drive to the power stage |
| `cnt_out` | out | 16 | accumulator count (signed) |
| `err_sgn`, `err_mag_n` | out | 1 | counting direction and active-low count enable |

Parameters:
- `CNT_W` (default 16) is the counter width.
- `IMPL` (default `CNT_FUNCTIONAL`) selects the P/I/D counter form.

Latency from an input edge to the error logic is three clocks: two synchroniser flops, then
the history register. `pwm_out` is registered.

## Closed-loop behaviour

The testbenches close the loop around a motor model with a 360-line encoder and compare the
result with reported speeds for the same tunings.

The unloaded motor model is θ/V = (50/3) / (s(0.001 s + 1)(0.1 s + 1)), driven at 1 V.

| tuning | this design | reported |
|--------|-------------|----------|
| 60 rpm PID, f_A 20 kHz, K = 1.6 / 0.6 / 0.04 | 5.30 rad/s | 5.33 rad/s (15 % below 6.28) |
| same PID at 120 rpm | 12.0 rad/s, below setpoint | below setpoint |
| same PID at 240 rpm | saturates at 16.7 rad/s | cannot be reached with 1 V |
| same PID at 30 rpm | 2.4 rad/s, **below** setpoint | above setpoint |
| P-only, f_A 20 kHz, K_P = 1.6 … 8 | 5.36 – 5.66 rad/s | ≈ 5.6 rad/s |
| P-only, f_A 20 kHz, K_P = 0.8 | **4.2 rad/s** | ≈ 5.6 rad/s |
| P-only, f_A 20 kHz, K_P = 16 … 50 | **≈ 7.9 rad/s** | ≈ 5.6 rad/s |
| P-only, f_A 5 kHz, K_P ≤ 10 | 5.6 rad/s | ≈ 5.7 rad/s |
| P-only, f_A 5 kHz, K_P > 10 | 7.9 rad/s | ≈ 7.85 rad/s |

The loaded motor model is θ/V = (5/12) / (s(s + 5/3)) with an actuator gain of 10. The
target is 10 rpm (1.047 rad/s) and f_A is 1.2 kHz.

| tuning | this design | reported |
|--------|-------------|----------|
| K = 16 / 1.6 / 1.5 | 0.88 rad/s (14 % **below**) | 1.20 rad/s (14 % above) |
| P-only K_P = 16 | 1.26 rad/s | 1.21 rad/s |
| K = 7 / 0.16 / 4.5 | 1.35 rad/s | 1.41 rad/s |

The bold entries are real differences that remain unexplained. The most visible is that a
proportional gain above about 10 gives the same high speed at f_A = 20 kHz as at 5 kHz.

A likely cause, which has not been verified, lies in the long drive pulses that high gains
produce. A new interval start cuts each such pulse, so the duty cycle is capped near 50 %.
Details not fixed by the design description could decide exactly when this cap takes effect:
- the sampling clock of the edge detectors;
- whether A may run below zero;
- the simulation step of the original model.

The method itself is known to leave a steady speed offset and ±5–8 % ripple. The reported
results show the same.

## Where this RTL departs from, or adds to, the original design

- **One clock domain.** The original counters have separate counting clocks. Here they are
  enable strobes on one system clock, and loads take effect on the next system clock edge.
  The original describes asynchronous loads.
- **Finite counts.** The original model's counters were unbounded signed integers. Here they
  are 16-bit, and the sum is saturated before the A latch. P, I and D wrap.
- **Integrator limit.** Limiting the integrator against wind-up is suggested in the original
  only as future work. It is not built.
- **Accumulator stops at zero.** It does not run on below zero. The PWM output is the same.
- **Latch order.** Both latches load in the first clock of the end pulse. The A latch
  therefore uses the D latch value from the previous interval.
- **Added:** registered PWM output, two-flop input synchronisers, and the phase-accumulator
  rate generators. The original takes its counting clocks from outside.
- **Cascade cells.** The 74x169 cell uses J-K flip-flops with the usual load and toggle
  terms. It is a functional copy of the discrete part, not a gate-exact one.
- **Not part of this RTL:**
  - the motor and the encoder, which exist only as models in the testbenches;
  - an earlier, simpler form of the controller, which is superseded by the one built here. It
    used an XOR-based error with a separate ±1 sign stage and an accumulator loaded with the
    magnitude of the sum.

## Files

| file | content |
|------|---------|
| `rtl/adpid_pkg.sv` | widths, example rates, error codes, `freq_to_inc` |
| `rtl/adpid_top.sv` | synchronisers, rate generators, core |
| `rtl/adpid_core.sv` | error logic, edge detectors, P/I/D counters, latches, accumulator, PWM |
| `rtl/sig_err.sv` | history-based error table |
| `rtl/pedge_det.sv` | sampled rising-edge detector |
| `rtl/rate_gen.sv` | phase-accumulator strobe generator |
| `rtl/adpid_counter.sv` | selects the behavioural or cascaded counter |
| `rtl/updown_counter.sv` | behavioural N-bit up/down counter |
| `rtl/counter_74x169.sv` | 4-bit 74x169-style cell |
| `rtl/jk_ff.sv` | positive-edge J-K flip-flop with clock enable |
| `rtl/counter16_cascade.sv` | four cells cascaded to 16 bits |
| `tb/tb_<module>.sv` | self-checking unit test of each module |
| `tb/tb_adpid_top.sv` | 1 s closed loop at 60 rpm, all defaults; counts every mechanism |
| `tb/tb_adpid_cascade.sv` | behavioural and cascaded-counter builds in lockstep, 0.3 s closed loop |
| `tb/tb_adpid_workloads.sv` | all the tunings in the tables above (4 MHz clock) |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each has a
watchdog.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -y rtl rtl/adpid_pkg.sv tb/tb_adpid_top.sv \
        --top-module tb_adpid_top -o sim
    ./obj_dir/sim

To run another test, use the same command with another testbench. The closed-loop top test
takes well under a second. The workload test simulates about 30 s of motor time and takes
about 40 s.
