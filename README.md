# Programmable digital PLLs for a timing receiver

A timing receiver has to rebuild a clean, stable clock from a reference that
arrives over a cable: a clock signal, or a data stream whose edges carry the
timing. An analogue PLL does this well, but its bandwidth, lock time and
capture range are fixed by components on the board. This RTL moves the whole
loop except the oscillator into logic. Every loop parameter is a register, and
software can watch the loop state while it runs.

The design follows the paper *PLL Usage in the General Machine Timing System
for the LHC*. It describes two configurations, and both are here:

* **Hybrid PLL (HPLL, `rtl/hpll.sv`)**: the main configuration, used in the
  receiver cards. A digital phase detector and a digital PI controller set the
  code of an external DAC. The DAC tunes a VCXO, and the VCXO's 40 MHz clean
  clock is divided down to the 1 MHz Recovered Clock. The output jitter
  depends on the VCXO, not on the sampling clock.
* **All Digital PLL (ADPLL, `rtl/adpll.sv`)**: the PI controller sets the
  period of a *numeric oscillator*, a downcounter plus a sigma-delta modulator
  clocked by the Fast Clock. No analogue part is involved. The output edges
  lie on Fast Clock edges, so the jitter is at least one Fast Clock period.

`rtl/gmt_pll_top.sv` puts both side by side, each with its own ports. It
contains no parts from outside the FPGA: no quartz oscillator, no clock
multiplier, no DAC, no VCXO and no bus master.

```
          HPLL                                         ADPLL
 ref ──► phase detector ─► decimator ─┐      ref ──► phase detector ─► decimator ─┐
          ▲ (Fast Clock, 160 MHz)     │               ▲ (Fast Clock)               │
          │                           ▼               │                            ▼
   Recovered Clock            PI controller ◄─ bus   divider ◄─ numeric ◄── PI controller ◄─ bus
          │                   (VCXO clock)            (FC)     oscillator   (System Clock)
     divider ÷40 ◄─ VCXO 40 MHz ◄─ DAC ◄──┘                       (FC)
```

## Measuring phase: Start, Stop, validate

`phase_detector` counts Fast Clock ticks between two events:

1. A rising edge of the Recovered Clock is the **Start**. It clears the
   counter and opens a window.
2. The first rising edge of the Reference inside the window is the **Stop**.
   The count is held. Any later Reference edges in the same window are ignored.
3. The next Recovered Clock edge **validates** the held count and outputs it
   (`phase`, `phase_valid`). The same edge is also the Start of the next window.

If a window has no Reference edge, nothing is sent on and the loop sees no
error. The detector raises a one-cycle `lost` pulse, which is used only for
monitoring. This rule is what lets the loop lock directly to an encoded data
stream. A 500 kbit/s Manchester stream has rising edges only on a 1 µs grid,
and some grid slots are empty. A 1 MHz Recovered Clock therefore gets a valid
sample in about 37.5 % of its windows; the other windows report `lost`.

The phase lies in `[0, period)`. It is the delay from the Recovered edge to the
Reference edge. The setpoint is chosen in the middle of the period (80 ticks at
160 MHz for 1 MHz), which keeps the loop away from the wrap-around at 0 and
at one full period.

Both inputs pass through two-flop synchronizers. In the HPLL the Recovered
Clock comes from the VCXO domain (`SYNC_REC = 1`). Both paths have the same
latency, so the latency cancels out of the measurement. In the ADPLL the
Recovered Clock is a pulse that is already in the Fast Clock domain
(`SYNC_REC = 0`).

### Decimation and sub-tick resolution

`pd_decimator` adds up N_Av validated samples (2000 in the paper's tests) and
outputs the **sum**. It does not output the mean. The setpoint is given in the
same summed units, so it can be set in steps of T_FC / N_Av. The loop can hold
the phase between two Fast Clock ticks, and the average of the samples lands
on the setpoint.

This works only if the quantisation errors of successive samples are not
correlated. If the detector were clocked by the VCXO, the Reference would
stay at the same place between two VCXO edges once the loop is locked, and
the phase would drift within that window without being seen. The HPLL avoids
this by clocking the detector from an **independent** free-running Fast Clock.
The testbenches show the remaining effect: a Fast Clock 3.3 ppm away from
exactly 160 MHz slips past the Reference very slowly. The error stays
correlated over one decimation period, so individual sums scatter by about
one tick × N_Av around the setpoint, while their mean stays on the setpoint.

## The PI controller

`pi_controller` is a 32-bit signed fixed-point controller. It updates once per
decimated sample:

```
err   = setpoint - phase_sum
integ = integ + (Ki * err) >>> GAIN_FRAC
ctrl  = integ + (Kp * err) >>> GAIN_FRAC
```

* Every addition, subtraction and scaled 64-bit product **saturates** at the
  32-bit limits instead of wrapping. The output `saturated` pulses when an
  update clipped, and `STATUS[1]` keeps it (sticky) for software.
* Stage 1 registers the error and both products. Stage 2 integrates and sums.
  `ctrl_valid` comes two cycles after the measurement.
* The integrator initial value is loaded once after reset and again whenever
  software writes `CTRL` with bit 2 set.
* A positive error (the Reference edge comes too early after the Recovered
  edge) raises `ctrl`.

**What `ctrl` means in each loop:**

* **HPLL**: `dac_code` is the top 16 bits of `ctrl` in offset binary.
  `ctrl = 0` gives mid-scale, which is the VCXO's nominal frequency. This
  assumes a VCXO whose frequency rises with voltage. The gains are positive.
  `GAIN_FRAC = 8`.
* **ADPLL**: `ctrl` is the oscillator period in Fast Clock ticks, unsigned,
  with 16 integer and 16 fractional bits. A longer period means a lower
  frequency, so this loop uses **negative** gains. `GAIN_FRAC = 24`, because
  the gains needed are far below 1.

### Choosing gains

The paper describes its loops by damping ratios (250 for a slow loop, 16 for
a fast one) from a linear model. It does not give that model's constants, so
the default gains here were set from the proportional loop gain per update
instead:

* HPLL: `G = Kp · N_Av · (N_Av / r) · f_FC · (2·pull / 2^32)`, with `r` the
  rate of valid samples (0.375 per µs for Manchester) and `pull` the VCXO's
  relative pull range.
* ADPLL: `G = |Kp| · N_Av · (N_Av / 0.375) / 2^16`.

The defaults give G ≈ 0.16 with Ki = Kp/16. The testbenches compute their
gains from the same formulas when they shorten N_Av.

The integrator has no anti-windup beyond saturation. A loop that starts far
from lock clips for a while before it settles. In the HPLL testbench this
takes about 13 ms at N_Av = 64.

## Numeric oscillator (ADPLL)

`numeric_oscillator` reloads a downcounter with `integer + tick` whenever the
counter expires. `tick` is the carry out of a first-order sigma-delta
accumulator (`sigma_delta_modulator`) that adds the fractional period once
per RMClk. Over 2^16 periods exactly `frac` extra ticks are added. For
example, from a 40.333 MHz Fast Clock the period 40 + 1/3 gives the pattern
40, 40, 41 ticks: 1 MHz on average, with 25 ns of short-term jitter. A new
period takes effect at the next reload.

`freq_divider` turns RMClk (ADPLL) or the VCXO clock (HPLL) into the Recovered
Clock (`clk_out`, high for the first half of each period) and a time base
pulse. Its ratio is programmable: 40 in the HPLL, 1 in the ADPLL.

## Clock domains

| Domain | HPLL | ADPLL |
|---|---|---|
| Fast Clock | phase detector, decimator | phase detector, decimator, numeric oscillator, divider |
| slow clock | VCXO clock: PI, registers, divider, DAC code | System Clock: PI, registers |

* The decimated sum, the lost-edge count and (in the ADPLL) the new period
  cross between domains through `word_sync`. This is a toggle handshake that
  holds the data word steady. It is safe because the words come thousands of
  cycles apart.
* The run bit, N_Av and the ADPLL divider ratio cross through plain two-flop
  synchronizers (`sync_2ff`). **Change them only while the loop is stopped**
  (`CTRL[0] = 0`).
* A single asynchronous active-low reset serves all domains. The board must
  release it cleanly.

## Register port

The port is a generic synchronous one: `bus_addr[3:0]`, `bus_wr`,
`bus_wdata[31:0]`, `bus_rd`, and `bus_rdata[31:0]`, which is valid the cycle
after `bus_rd`. It runs on the PI controller's clock. The paper uses VME;
a VME slave interface would sit in front of this port.

| Addr | Name | Access | Content |
|---|---|---|---|
| 0 | CTRL | rw | [0] run, [1] interrupt enable, [2] load integrator (write 1) |
| 1 | STATUS | r/w1c | [0] interrupt pending, [1] saturated (sticky) |
| 2 | NAV | rw | decimation factor N_Av |
| 3 | SETPOINT | rw | decimated phase setpoint (ticks × N_Av) |
| 4 | KP | rw | proportional gain, GAIN_FRAC fractional bits |
| 5 | KI | rw | integral gain |
| 6 | INTEG_INIT | rw | integrator initial value |
| 7 | DIV | rw | divider ratio |
| 8 | PHASE | ro | last decimated phase sum |
| 9 | INTEG | ro | integrator |
| A | CTRL_OUT | ro | control value (DAC value or period) |
| B | UPDATES | ro | number of PI updates |
| C | LOST | ro | number of windows without a Reference edge |
| D | ERR | ro | last PI error |

When the interrupt is enabled, every PI update sets STATUS[0], which drives
`irq` until software clears it. Software can use this to trace the loop state
update by update.

## Defaults

The HPLL defaults (`hpll` parameters) match the paper's test set-up:

* N_Av = 2000
* 160 MHz Fast Clock, 40 MHz VCXO, divider 40, 1 MHz Recovered Clock
* setpoint 160000 (80 ticks × 2000)
* Kp = 4000.0, Ki = 250.0
* integrator starting at 0 (DAC mid-scale)

The ADPLL defaults follow the oscillator example:

* integrator initial value 0x0028_5555 (40 + 1/3)
* divider 1
* N_Av = 2000, setpoint 40000
* Kp = −2^−10, Ki = −2^−14

The setpoints, gains, all widths (16-bit counters, 16-bit DAC, Q16.16
period) and the register map are choices of this design. The paper gives
only the 32-bit signed saturating PI arithmetic and the frequencies.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The closed-loop testbenches use behavioural
models that are for simulation only: `dac_model`, `vcxo_model` (linear
tuning, crystal offset), `clock_src`, and `manchester_src` (random
Manchester data with uniform edge jitter).

* `tb_phase_detector`, `tb_pd_decimator`, `tb_pi_controller`,
  `tb_sigma_delta_modulator`, `tb_numeric_oscillator`, `tb_freq_divider` and
  `tb_pll_bus_regs` compare each block with an independent model, including
  latencies, lost pulses, saturation corners and interrupt behaviour.
* `tb_hpll` runs the closed loop with a 500 kbit/s Manchester Reference,
  300 ps edge jitter, a 20 ppm crystal error and a ±50 ppm VCXO, at
  N_Av = 64. After lock:
  * every decimated phase is within 3 ticks × N_Av of the setpoint, and the
    worst seen was within 1 tick;
  * the mean is within half a tick;
  * the Recovered Clock is within 2 ppm of 1 MHz (about 0.02 ppm was
    measured);
  * the DAC code is within 1 % of the value that cancels the crystal error.
* `tb_adpll` does the same for the ADPLL with a Fast Clock 30 ppm off. The
  oscillator period settles within 0.01 tick of the needed value, and every
  RMClk interval is 40 or 41 ticks.
* `tb_gmt_pll_top` runs both loops with all parameters at their defaults
  (about 10 s of simulation):
  1. With N_Av = 2000 it checks the first PI update against a model of the
     PI law.
  2. It reprograms faster loops through the bus and checks lock for both.
  3. It forces saturation.
  4. It checks that every mechanism happened at least once: validated and
     lost samples, decimation, PI updates, interrupts, software integrator
     loads, sigma-delta ticks and saturation.

The full lock transient at N_Av = 2000 (seconds of real time) was not
simulated.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gmt_pll_pkg.sv \
          tb/tb_gmt_pll_top.sv --top tb_gmt_pll_top -o sim
./obj_dir/sim
```

All RTL is synthesizable SystemVerilog (IEEE 1800-2017), with the shared
types and the register map in `gmt_pll_pkg`. Lint with
`verilator --lint-only -Wall -y rtl rtl/gmt_pll_pkg.sv rtl/gmt_pll_top.sv`.
The warnings that remain are unused package constants, an unused divider
counter output, and the mixed synchronous/asynchronous use of `rst_n` that
comes from the assertions' `disable iff`.

## Limits and departures

* Not included: the quartz oscillator, the clock multiplier that makes the
  Fast and System Clocks, the DAC, the VCXO and the VME interface. Their
  signals are ports.
* Output jitter (90 ps rms for 180 ps rms at the input in the paper's lab
  test) and free-running drift are properties of the analogue parts. This
  RTL cannot reproduce them. When the Reference disappears, the loop simply
  stops updating and holds its last control value.
* The divider gives one time base pulse per period, plus the Recovered
  Clock. The paper shows several time base outputs without saying what they
  are.
* The default gains are not derived from the paper's damping ratios (see
  *Choosing gains*).
