# GPS-disciplined 1PPS and 10 MHz timing generator

A time-driven optical switch cuts every UTC second into a fixed number of
time frames. Each node must know where a second starts (a 1PPS pulse). It
also needs a fast clock (10 MHz) whose cycles are locked to that pulse:
exactly 10,000,000 cycles per second, with the first one starting on the
pulse. Laboratory GPS timing boards with oven-controlled oscillators and
analog PLLs provide both, but they are costly. This design gets both from
an inexpensive GPS receiver and the ordinary crystal clock of a small FPGA,
using only counters, shifts and adders.

The idea fits in two lines. The crystal is stable over seconds but drifts
over hours. The GPS pulse is accurate over hours but jitters by tens of
nanoseconds from one second to the next. So the FPGA counts its own clock
between GPS pulses to learn how many master clocks make a second. It builds
its outputs from that count, and it follows the GPS pulse only through a
slow control loop, which filters out the jitter.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in one clock
domain. The defaults are a 50 MHz master clock, a 10 MHz output and a 1 Hz
reference.

## Block structure

```
 gps_pps ──► pps_sampler ──strobe──► clock_manager ─────────────────────────┐
 (async pin)  (sync + hysteresis      ├ divider         period, quotient,    │
              Moore FSM)              ├ bounds_memory   remainder, acquire   │
                                      ├ synchronizer                         │
                                      └ lengths_memory                       │
                                                                             ▼
        ┌──────────── delay_meter ◄── internal 1PPS edge ◄── clock_builder (1PPS) ──► pps_out
        │  signed delay e[n]                                   ▲  len            │ wrap
        ▼                                                      │                 ▼
   pid_controller ── round_half_even ──────────────────────────┘   clock_builder (10 MHz) ──► clk_out
```

| Module | Role |
|---|---|
| `gps_timing_pkg` | Shared widths (32-bit counts), `len_t`, `delay_t`, the `lengths_t` record, default frequencies |
| `pps_sampler` | Turns the slow, noisy, asynchronous GPS pulse into one master-clock strobe |
| `divider` | Counts master clocks between strobes and divides by 10,000,000 while it counts |
| `bounds_memory` | Time window in which the next pulse must arrive (static or dynamic) |
| `synchronizer` | Accepts or rejects each pulse, freezes the counters on a missing pulse, decides when to store |
| `lengths_memory` | Last accepted period, quotient and remainder |
| `clock_manager` | Groups the four blocks above |
| `clock_builder` | Generic period generator with fraction recovery and a period budget; used twice |
| `delay_meter` | Signed delay from the internal 1PPS edge to the GPS edge |
| `pid_controller` | Sets the length of the next internal second from that delay |
| `round_half_even` | Rounds the fixed-point length to whole clocks, ties to even |
| `gps_timing_top` | Wires everything together |

## Measuring a second without a divider

A second at 50 MHz is about 50,000,000 clocks. An output cycle is that
number divided by 10,000,000. A 26-bit divider would cost area and a
result latency. Here `divider` runs three counters side by side instead:

* the **dividend** counts clocks since the last GPS strobe;
* the **remainder** counts the same clocks modulo 10,000,000;
* the **quotient** goes up by one each time the remainder wraps.

When the next strobe comes, the three registers already hold the period,
period / 10,000,000 and period mod 10,000,000. In the strobe cycle the
dividend equals the number of clock edges since the previous strobe.

## Deciding whether a GPS pulse can be believed

A receiver with a bad antenna can give extra pulses or skip some.
`bounds_memory` gives a window `centre ± centre/2^DELTA_SHIFT` (±12,207
clocks, about ±244 ppm, by default):

* in **static** mode the centre is the nominal period `F_CLK/F_REF`;
* in **dynamic** mode (`dyn_bounds = 1`) it is the last stored period.

`synchronizer` checks the dividend against the window in every strobe cycle:

* A pulse inside the window is **valid**. Nothing is stored until
  `MIN_GOOD` (3) valid pulses have come in a row. The first pulse after
  reset is never valid, because no period has been measured yet.
* A pulse outside the window is **rejected** (`gps_rejected`) and restarts
  the run of good pulses.
* If the count passes the upper bound with no pulse, the pulse is
  **missing** (`gps_missing`). The divider's counters are frozen, so they
  cannot overflow and start over, and the next pulse is treated as the
  first one again. The frozen dividend stops at `hi + 2`.

The save that ends a run of bad pulses, or the start-up wait, raises
`acquire`.

## Building the outputs and recovering the lost fraction

`clock_builder` counts master clocks from 0 to `len-1` and wraps. In pulse
mode the output is high for `pulse_width` clocks. Otherwise it is high for
the first half of the period, rounded up.

The fast clock is the delicate part. With a period of P clocks and
N = 10,000,000 output cycles per second, each cycle is P div N clocks long,
and P mod N clocks would be lost every second. The builder keeps a modulo-N
accumulator. At the start of every output period it adds the remainder; if
the accumulator overflows, that period is one clock longer. Over N periods
the accumulator overflows exactly `P mod N` times, so the N periods fill P
clocks exactly.

Small example: 10 clocks per second and 3 output cycles give 3, 3 and 4
clocks. With 999 clocks and 100 cycles, 99 periods of 10 clocks and one of
9 make up the second. At 50 MHz with a real period of 50,000,150 clocks,
the 10 MHz output has periods of 5 clocks, and 150 of them are stretched
to 6.

Two rules keep the fast clock tied to the 1PPS:

* It is restarted on every internal 1PPS edge, so its rising edges coincide
  with the 1PPS edge, and it keeps one quotient/remainder pair for the whole
  second.
* It has a budget of N periods per restart. If the 1PPS second is a few
  clocks longer than the stored period, the fast clock stays low for those
  few clocks. It does not start an extra, short cycle.

The 1PPS builder uses the same block, with a pulse of `PULSE_WIDTH` clocks
(100 µs) and no remainder. Its budget is `HOLDOVER` seconds. Every stored
GPS measurement renews the budget (`rearm`) without touching the phase. If
the receiver fails, the 1PPS keeps running on its last length for 60 s by
default, with `holdover` high, and then stops together with the fast
clock. When the receiver is accepted again (`acquire`), the outputs restart
on that GPS pulse.

## The control loop

If each second were simply built from the last measured period, the GPS
jitter would be counted twice. Take a pulse 45 ns late followed by one 45 ns
early: at 50 MHz that second is measured 4 clocks (80 ns) short. A moving
average of the periods reduces this, but it still lets the output phase
wander. So the internal 1PPS runs free on its own length, and a
proportional-integral loop steers that length:

* `delay_meter` measures `e[n]`, the signed number of master clocks from
  the internal 1PPS edge to the GPS edge. It is positive when GPS comes
  later. A state machine enables a counter at the first of the two edges
  and stops it at the second. A measurement with no second edge within a
  quarter second is dropped. Only GPS pulses inside the window are used.
* `pid_controller` sets the length of the following internal seconds to

  ```
  len = base + e[n]·2^-KP_SHIFT + (Σ e)·2^-KI_SHIFT [+ (e[n]-e[n-1])·2^-KD_SHIFT]
  ```

  `base` is the period measured on the acquiring pulse. All weights are
  powers of two, so the products are arithmetic shifts. The sum is kept
  with `FRAC` = 8 fraction bits. The proportional term pulls the phase in.
  The integral term takes up the crystal's frequency error and its drift.
  The derivative term is built but disabled (`KD_EN = 0`), because it
  feeds the GPS jitter straight into the output.
* `round_half_even` turns the fixed-point length into whole clocks. A
  fraction below ½ rounds down, above ½ rounds up, and exactly ½ rounds to
  the even integer. This avoids a systematic bias.

Defaults: P = 2^-3 and I = 2^-5. Per second, the error obeys
`(z-1+P)(z-1) + I·z = 0`, with poles at |z| ≈ 0.935. The phase settles
within tens of seconds, with a slight overshoot. A bigger P or I reacts
faster but passes more jitter through. The sweep testbench prints the
trade-off for each weight pair.

The internal 1PPS is held one master clock behind the sampled GPS strobe.
That makes the phase error exactly zero on the acquiring pulse. The 1PPS
edge therefore settles about 4 clocks after the pin is first sampled high:
2 synchronizer stages, the state register, and the alignment clock.

## Input sampling

The receiver's pulse has an 800 ns rise time with noise on it. A plain
sampler would see several threshold crossings. `pps_sampler` synchronizes
the pin with two flops. A Moore state machine then emits a one-cycle strobe
on the first high sample and ignores the pin for `HOLDOFF` clocks (64, i.e.
1.28 µs at 50 MHz). It does the same after the falling edge. Sampling costs
up to one clock (20 ns at 50 MHz) of resolution. A faster master clock
improves both the sampling and the loop.

## Top-level interface (`gps_timing_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | master clock, synchronous active-low reset |
| `gps_pps` | in | 1 | raw receiver 1PPS (asynchronous) |
| `dyn_bounds` | in | 1 | 1 = dynamic time window |
| `pps_out` | out | 1 | internal 1PPS, `PULSE_WIDTH` clocks high |
| `clk_out` | out | 1 | `F_OUT` clock, rising with `pps_out` |
| `locked` | out | 1 | the last `MIN_GOOD` GPS pulses were valid |
| `running` | out | 1 | outputs are being built |
| `holdover` | out | 1 | running without a locked receiver |
| `period` | out | 32 | last stored GPS period (clocks) |
| `phase_err` | out | 32 | last internal-to-GPS delay (signed clocks) |
| `pps_len` | out | 32 | current internal second length |
| `gps_rejected`, `gps_missing` | out | 1 | one-cycle event strobes |

| Parameter | Default | Meaning |
|---|---|---|
| `F_CLK`, `F_OUT`, `F_REF` | 50,000,000 / 10,000,000 / 1 | master, output and reference frequencies (Hz) |
| `HOLDOFF` | 64 | sampler suspension after each edge (clocks) |
| `DELTA_SHIFT` | 12 | window half-width = centre / 2^12 |
| `MIN_GOOD` | 3 | consecutive valid pulses before storing |
| `KP_SHIFT`, `KI_SHIFT` | 3, 5 | loop weights 2^-3, 2^-5 |
| `KD_SHIFT`, `KD_EN` | 0, 0 | derivative weight, disabled |
| `FRAC` | 8 | fraction bits of the length |
| `HOLDOVER` | 60 | seconds of 1PPS after the last stored measurement |
| `PULSE_WIDTH` | `F_CLK/F_REF/10000` (5,000) | 1PPS pulse width, 100 µs (the width of the receiver's own pulse) |

For a 70 MHz master clock, set `F_CLK = 70_000_000`. The 32-bit counters
and 8 fraction bits cover the weights from 2^-2 down to 2^-8.

Timing, from the acquiring strobe (cycle t): the 1PPS and fast-clock edges
come at t+1, a stored measurement is visible at t+1, and a new loop length
is available 2 clocks after each GPS edge. The length takes effect at the
next internal second.

## Where this RTL departs from, or adds to, the original design

The original was written in VHDL for a Spartan-3 FPGA. The text describes
its blocks but not every detail. These are the choices made here:

* **Final configuration only.** The first sampler was an asynchronous Mealy
  reset generator; it was replaced by the synchronous hysteresis sampler,
  which is built here. A 32-tap moving-average FIR filter, and a running-sum
  variant of it, were tried and abandoned for lack of FPGA area and because
  of drift. Neither is included; the PI loop replaces them.
* **Error signal.** The loop uses the measured edge-to-edge delay as its
  error, and adds the controller output to the period measured at
  acquisition. How the loop output was combined with the stored length in
  the original is not fully specified.
* **Rounding and remainder.** In the original, rounding took the place of
  the remainder recovery for the 1PPS length. Here rounding is applied to
  the loop's 1PPS length, and the 10 MHz builder keeps the remainder
  recovery, since it still divides a period by 10,000,000.
* **Values chosen here:** `HOLDOFF`, `DELTA_SHIFT`, `MIN_GOOD`, `HOLDOVER`,
  `FRAC`, the delay-meter timeout, the two-flop synchronizer, the duty-cycle
  rule, the one-clock alignment delay, and feeding the loop only with pulses
  inside the window.
* **Clocking.** The lengths memory is clocked by the master clock with an
  enable, not by the gated reset pulse, which keeps everything in one clock
  domain.
* **Not included:** the GPS receiver module, the board oscillator and the
  FPGA clock manager (the master clock is a port).

Each source file begins with a comment on what it does, its interface and
its timing, and says which parts are this design's own choices.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.
The sampler, synchronizer, clock builder and delay meter also carry
clocked assertions on their strobes and counters. They are active when
simulating with `--assert`.

| Testbench | What it shows |
|---|---|
| `tb_pps_sampler` | one strobe per bouncing pulse, 3-clock latency, 1-cycle width |
| `tb_divider` | period/quotient/remainder against integer division, including the 10-clock/3 and 100-clock/10 examples; freeze |
| `tb_bounds_memory` | static and dynamic windows, reset to nominal |
| `tb_synchronizer` | window test, consecutive-good rule, missing-pulse freeze, against a reference model |
| `tb_lengths_memory` | write only on save |
| `tb_clock_manager` | stored lengths, acquire point, rejects, missing pulse, dynamic window |
| `tb_clock_builder` | period sequence against the fraction-recovery formula, exact totals, duty cycle, budget, rearm, enable |
| `tb_delay_meter` | signed delays, latency, timeout |
| `tb_round_half_even` | exhaustive and random rounding against a reference |
| `tb_pid_controller` | open-loop formula check; closed-loop response to a 1 µs (50-clock) length step |
| `tb_pid_sweep` | closed loop for all 12 weight pairs from the 50 MHz and 70 MHz measurements; stability and jitter variance |
| `tb_gps_timing_top` | end to end at 10 kHz/1 kHz scale, about 85 s of model time: lock, reject, holdover, expiry, restart, dynamic window, phase and exact cycle counts; each mechanism is counted |
| `tb_gps_timing_full` | the top at its defaults (50 MHz, 10 MHz): acquisition and two full seconds, checking 10,000,000 fast cycles per second; about 300 M clocks, 1-2 minutes |
| `tb_gps_timing_70mhz` | the same run with a 70 MHz master clock and weights 2^-4, 2^-5: fast periods of 7 or 8 clocks, 10,000,000 fast cycles per second; about 420 M clocks, 2-3 minutes |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/gps_timing_pkg.sv tb/tb_clock_builder.sv --top-module tb_clock_builder
./obj_dir/Vtb_clock_builder
```

The GPS receiver in the testbenches is a model: jitter uniform or a sum of
uniforms over a few clocks, a fixed frequency offset, and bounces on the
rising edge. It is not a recording of a real receiver. So the loop results
show stability and the direction of the trade-off, not nanosecond figures
for any particular receiver.
