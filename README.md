# Self-calibrating relaxation DAC for FPGAs

A relaxation DAC (ReDAC) turns an N-bit word into a voltage using only a
digital output pin, one resistor and one capacitor. The pin drives the RC
network with the word's bits for one clock period T each, least significant
bit first. Each period pulls the capacitor voltage halfway toward the current
bit's level, provided that

    exp(-T/RC) = 1/2,   i.e.  T = T* = RC·ln2.

When that holds, the earlier bits are halved again and again, and after N
periods the capacitor holds

    V_C = VDD · n / 2^N.

The pin then goes to high impedance and the capacitor holds the value. No
component matching is needed. The one condition is the ratio T/RC, and this
design enforces it in two ways:

* **Self-calibration.** The FPGA measures its own analog output and tunes T,
  which is generated from the system clock, until T = RC·ln2.
* **Parasitic error suppression.** After the MSB the pin is not released at
  once. It is driven low for a short time T_del first. This removes the error
  that the resistor's distributed parasitic capacitance adds.

The RTL is the FPGA part of the converter. Outside the FPGA you need a
three-state buffer (or a GPIO pin), R and C, a discharge resistor R_disch
switched by an open-drain output, and a comparator with threshold
V_T (VDD/4 works).

The defaults are a 13-bit converter on a 50 MHz clock with R = 180 kΩ and
C = 1 nF. That gives m0 = 3119, T ≈ 124.8 µs and about 534 conversions/s
at N + 2 clock periods per conversion. An 11-bit variant uses
R = 4.7 kΩ and C = 2.2 nF (about 10.7 kS/s) and is built by changing three
parameters (see *Parameters*).

## Generating T: the clock divider (`redac_clock_divider`)

A free-running counter counts the system clock from 0 to m−1. Each time it
wraps, a toggle flip-flop flips, so the ReDAC clock has period T = 2m/f_clk.

A second toggle flip-flop flips when the counter passes M_DEL−1. This gives
the same clock delayed by T_del = M_DEL/f_clk. It is used only to end the
drive-low phase after a conversion.

The division factor m is a register:

* it resets to M0 = floor(f_clk·RC_nominal·ln2/2);
* the calibration control moves it by ±1.

The time resolution of T is therefore 2/f_clk. With m ≈ 3119 this is about
1.8 LSB of mid-scale DNL per step of m. With m ≈ 179 (the 11-bit variant) it
is about 8 LSB per step, which limits how accurately that variant can be
calibrated.

Everything in the design runs on the single system clock. The divider also
outputs two one-cycle strobes, `tick` and `tick_del`. Each is high in the
cycle before its divided clock rises. The other blocks use them as clock
enables, so the pin edges land on the same system-clock edges as they would
if those blocks were clocked by the divided clocks.

## Streaming a word: the control block (`redac_control`)

The control block starts a conversion at the first ReDAC clock edge at which
`convert` is high. It then:

* loads `data` into a shift register;
* drops `ready`;
* enables the buffer (`enable_n = 0`) and drives bit b0.

Every further edge shifts the register right, so bit b_i occupies period i.
The edge that ends the MSB period does not release the buffer. It drives the
pin **low**, and only at the next rising edge of the delayed clock (T_del
later) does `enable_n` go high and `ready` come back.

    edge:   0     1     2    ...   N-1     N          N + T_del
    pin :  b0  | b1  | b2 | ... | bN-1 |  0  ..... |  Z (hold)
    ready: ‾‾\________________________________________/‾‾‾‾

Why drive low? A long resistor's distributed parasitic capacitance adds fast
poles (τ1, τ2, …, much shorter than RC). Their contribution at the end of
the MSB period depends on the recent bits. If the pin were released at that
moment, this contribution would be frozen on the capacitor as a
code-dependent error. Holding the pin low for a few τ1 lets those modes decay
to almost nothing. The main RC mode changes only by the common factor
exp(−T_del/RC). That factor is a small gain error and does not affect
linearity (for 2.4 µs against 180 µs it is 0.987).

T_del does not have to be precise. It only has to be several times τ1 and
much shorter than RC. The defaults are 2.4 µs (13-bit board) and 0.6 µs
(11-bit board).

The hold time between conversions is set by whoever requests them. The
synthesizer requests one every N + 2 periods.

## Tuning T: the calibration loop (`redac_cal_control`, `redac_updown_counter`)

If T is off by ΔT, the largest linearity error appears between the two
mid-scale codes 2^(N−1)−1 and 2^(N−1). The step between their outputs is

    ΔV = 1 LSB · (1 + 2^N·ln2·ΔT/T*).

So ΔV = 0 (the two voltages are equal) marks T = T* to within one LSB.
A period that is too short makes the larger code give the smaller voltage.

The FPGA compares the two voltages without an ADC. It discharges the
capacitor through R_disch and counts system clocks until the comparator
reports V_C ≤ V_T. The discharge time τ_disch·ln(V/V_T) increases
monotonically with V, so comparing the two times compares the two voltages.
Each iteration of the FSM does four steps:

| step | action | counter |
|------|--------|---------|
| 1 | convert 2^(N−1)−1 (with the T_del low phase) | — |
| 2 | `discharge` on, from the system-clock edge after the buffer is released, until `comp_stop_n` falls | q counts **up** |
| 3 | convert 2^(N−1) | — |
| 4 | discharge again | q counts **down** |

After step 4, q = t_disch(2^(N−1)−1) − t_disch(2^(N−1)):

* **q = 0:** the calibration is done.
* **q > 0:** the larger code gave the smaller voltage, so T is too short and
  m goes up by one.
* **q < 0:** T is too long and m goes down by one.

q is then cleared and the steps repeat. The number of iterations is
|m0 − m*|. Each takes about 2·[(N+1)·T + t_disch], roughly 4.6 ms at the
defaults.

With a time resolution of one system clock, q changes by many counts per
step of m (about 18 at the defaults), so it may never be exactly zero.
The FSM therefore also stops when the sign of q reverses between two
iterations. At that point m has just crossed the ideal value m*, so m* lies
between the last two values of m. The FSM compares |q| of the two: if the
new |q| is larger, it takes the last step back. It thus ends on whichever
value gives the smaller |q|, which is within about half a step of m*.
Output `cal_reversed` tells which of the two conditions ended the run.
The FSM reads the full q for this comparison, not only its sign.

The counter is 18 bits, signed. This holds the longest discharge of either
board (R_disch = 820 kΩ, C up to 2.2 nF), even from a full-scale voltage.
It saturates instead of wrapping. Its sign bit drives the direction of the
m update.

Discharge size rule: R_disch·C must exceed 2^(N−1)/f_clk, so that a 1-LSB
voltage difference is at least one count. With 820 kΩ both boards meet this
by a wide margin.

V_T does not need to be accurate, but it must be stable and below both
mid-scale voltages.

## Test patterns: the synthesizer (`redac_synth`) and the input mux (`redac_mux`)

In normal operation (`sel = 0`) the conversions are requested by a
programmable synthesizer with these patterns:

* `SYN_CONST`: repeat one code.
* `SYN_RAMP`: all codes in order, for INL/DNL measurement.
* `SYN_SINE`: 2^(N−1) + A·sin(2π·k·phase_inc/2^16), for spectral tests.
  A 90 % swing sine at 16 Hz on the 13-bit default is
  A = 0.9·4096 and phase_inc ≈ 16/534·65536.
* `SYN_OFF`: no requests.

The sine needs no table. The top two phase bits select the quadrant. The rest
is folded into [0, π/2] and fed to a 9th-order Taylor polynomial in Q30 fixed
point. The result is clamped to the code range. The polynomial is
combinational and has a whole sample period (tens of thousands of clocks) to
settle. If timing closure matters, constrain it as a multicycle path.

With `sel = 1` the mux gives the converter to the calibration FSM instead.

## Top level (`redac_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | system clock, asynchronous active-low reset |
| `cal` / `end_cal` | in / out | hold `cal` high to calibrate. `end_cal` rises when done and stays high until `cal` is released. The first calibration after reset starts from m = M0, later ones from the current m. |
| `sel` | in | 0: synthesizer drives the converter, 1: calibration does |
| `syn_mode`, `syn_const_code`, `syn_amplitude`, `syn_phase_inc` | in | synthesizer settings |
| `buf_data`, `buf_enable_n` | out | three-state buffer data and active-low enable (1 = Z) |
| `discharge` | out | 1: open-drain output pulls the node through R_disch |
| `comp_stop_n` | in | comparator: 1 while V_C > V_T |
| `ready`, `clk_redac`, `clk_redac_del`, `m`, `q`, `cal_state`, `cal_reversed` | out | status and observation |

On an FPGA, `buf_data` and `buf_enable_n` map onto a tristate I/O, and
`discharge` onto an open-drain I/O. The comparator can be an LVDS input
pair with V_T on the other leg.

Typical sequence:

1. Reset.
2. Set `sel = 1` and `cal = 1`, then wait for `end_cal`.
3. Release `cal` and set `sel = 0`.
4. Choose a pattern. Repeat the calibration now and then to follow
   temperature drift of R and C.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 13 | resolution |
| `M_W` | 12 | width of m (12-bit tuning of the ReDAC clock) |
| `M0` | 3119 | initial m = floor(f_clk·R·C·ln2/2); 179 for R = 4.7 kΩ, C = 2.2 nF |
| `M_DEL` | 120 | T_del in system clocks (2.4 µs); 30 (0.6 µs) for the 11-bit board |
| `Q_W` | 18 | discharge counter width, signed |
| `HOLD` | 2 | hold periods per conversion (sample period N + HOLD) |
| `PH_W` | 16 | synthesizer phase width |

The constants for both boards are in `redac_pkg`. The 11-bit converter is
`redac_top #(.N(11), .M0(179), .M_DEL(30))`. Constraints:

* 1 ≤ M_DEL < M0;
* M0 < 2^M_W;
* m stays within M_DEL+1 … 2^M_W−1.

## Where this design makes its own choices

* **One clock domain.** The blocks run on the system clock with enables
  instead of being clocked by the divided clocks.
* **Terminal count.** The divider's terminal count test is `>=`, so lowering
  m while the counter sits at the old terminal value is safe.
* **Stop condition.** The calibration stops on q = 0 and also on a sign
  reversal of q. On a reversal it keeps the m with the smaller |q|
  (see above).
* **Start of calibration.** m is loaded with M0 only for the first
  calibration after reset. A repeated calibration continues from the current
  m, so following a slow drift takes only a few iterations. q is cleared
  before every iteration.
* **`zero` flag.** The counter has a `zero` flag, which the FSM reads. The
  FSM also reads the comparator directly to end each discharge.
* **Hold phase.** The hold phase comes from the synthesizer's request timing.
  The control block does not enforce it.
* **Synthesizer.** The patterns and the sine generator are an illustration
  of "a programmable test-pattern generator". Replace them freely.
* **No extended-precision calibration.** Calibration at N + E bits (converting
  longer calibration words to shrink the residual error) is not built.

Expected accuracy: after calibration, m is within about half a step of m*.
The remaining mid-scale INL is at most 2^(N−1)·ln2·|m − m*|/m* LSB, under
0.5 LSB at the 13-bit defaults. For the 11-bit board this integer-divider
limit is up to about 2 LSB, depending on where m* falls between two
integers. A finer period needs a fractional divider or PLL,
which this design does not include.

## Files

`rtl/`:

* `redac_pkg.sv`: shared constants and enums.
* `redac_clock_divider.sv`
* `redac_control.sv`
* `redac_updown_counter.sv`
* `redac_cal_control.sv`
* `redac_mux.sv`
* `redac_synth.sv`
* `redac_top.sv`

`tb/`:

* `tb_<block>.sv`: self-checking testbench of each block.
* `tb_redac_top.sv`: end-to-end test at the default (13-bit) parameters.
* `tb_redac2_workload.sv`: the same test for the 11-bit configuration.
* `tb_redac2_static.sv`: full-ramp INL/DNL of the 11-bit configuration,
  with and without the drive-low phase.
* `redac_rc_model.sv`: behavioural model (not synthesizable) of the buffer,
  RC network and discharge path. It updates the capacitor voltage exactly
  once per system clock and can include one fast parasitic pole.
* `redac_comparator_model.sv`: behavioural model of the comparator.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

* **Divider:** period 2m, duty cycle and an exact lag of M_DEL, including
  after m changes.
* **Control block:** bit-exact pin sequence for random words, the T_del low
  phase, and the Ready/Enable timing.
* **Counter:** checked against a reference count.
* **Synthesizer:** request spacing of N + 2 periods, ramp continuity, and
  sine samples within 1 LSB of a floating-point reference.
* **Calibration FSM (8-bit closed loop):** checked in both directions,
  including the predicted discharge counts.
* **End-to-end tests:**
  * run two calibrations, one where m must rise and one where it must fall;
    the final m is checked within 1 of m* = f_clk·RC·ln2/2;
  * drive constant, ramp and sine patterns, decode each converted word from
    the pins and compare the held voltage with the ideal value (tolerance
    1.5 LSB plus the bound above);
  * check that the parasitic mode's error, large at the end of the MSB
    period, is below 0.5 LSB when the pin is released.

  The full 13-bit run simulates about 3.5 million system clocks in a few
  seconds.
* **Static test (11-bit):** two converters run side by side on the same
  RC model with a 1 % parasitic pole at 0.1 µs. One uses T_del = 0.6 µs,
  the other T_del = 20 ns (suppression practically off). Both calibrate and
  then convert all 2048 codes. Endpoint INL/DNL from the held voltages:

  | | max \|INL\| | max \|DNL\| |
  |---|---|---|
  | T_del = 0.6 µs | 0.85 LSB | 1.46 LSB |
  | T_del = 20 ns | 4.35 LSB | 7.13 LSB |

  The test requires the first row to stay within 1 LSB plus the m-residual
  bound and the second row to be at least three times worse.

The RC model reproduces ideal RC behaviour plus one parasitic pole. It does
not model buffer transition times, leakage, comparator offset or noise, and
no hardware measurement is implied.

Simulating with Verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/redac_pkg.sv \
        tb/tb_redac_top.sv -y rtl -y tb +libext+.sv --top-module tb_redac_top
    ./obj_dir/Vtb_redac_top

Any other `tb_*.sv` runs the same way with its own `--top-module`.
