# Hybrid PFM-PWM controller for a half-bridge LLC converter

This is synthesizable SystemVerilog for the digital controller of a small,
isolated half-bridge LLC resonant converter running at 0.7–1.8 MHz. It
regulates the output voltage with **two control variables at once**:

* **Switching frequency (PFM).** This is the fast, coarse loop, as in any LLC controller.
* **Duty cycle (PWM).** The two half-bridge switches are driven asymmetrically. This is the slow, fine loop.
  It removes the residual error that frequency steps alone cannot reach.

Both variables go to one delay-line modulator. It places both edges of the gate signal with the
resolution of a single delay element (390 ps here). Its only clock is about 20 MHz, and it
comes from the delay line itself.

The design follows the controller described in the article *"PFM-PWM Digital
Controller for Miniaturized High-Frequency Isolated LLC Converters Integrated
in Advanced IoT Devices"*. The block structure, the modulator's pointer
arithmetic and the main numbers come from that description. Many widths,
gains and routines are not given there and were chosen here; the section
"Where this design departs or fills gaps" lists them.

## Why two loops, and how one ADC word feeds both

The output voltage is sampled with a 10-bit ADC once per switching cycle. The
word is cut in two (`error_split`):

| section | bits | compared with | error | drives |
|---|---|---|---|---|
| MSB | `v[9:3]` (M = 7) | `ref_m` | `v_err` (8-bit signed) | frequency PI (`freq_pi`) |
| LSB | `v[2:0]` (L = 3) | `ref_l` | `v_err_res` (4-bit signed) | duty PI (`duty_pi`) |

The sign convention is `error = measured − reference`, so a positive error means the output is too high.

* **Frequency loop.** This loop works whenever `v_err ≠ 0`. A positive error shortens the period,
  which raises the frequency and lowers the LLC gain.
* **Duty loop.** This loop works only inside the coarse zero-error bin (`v_err = 0`). It updates only every
  `DUTY_DIV` = 4th sample, so it is much slower.
  * A positive residual error raises D above 50 %, and the gain drops.
  * That holds only while the load is heavier than the critical load.
  * At light load, the gain of an asymmetrically driven LLC stage is **not monotonic** in D, so a linear
    PI loop on D can run away. The override logic handles that case.

The frequency compensator works on the **switching period in delay-element units** (`t_sw`), not on a
frequency word, because the modulator takes on-times. `digital_logic` turns (`t_sw`, `d`) into two
on-time commands:

    hs = round(t_sw · d / 4096),   ls = t_sw − hs      (units: delay elements)

Period limits (390 ps per element):

| frequency | role | period (elements) |
|---|---|---|
| 1.8 MHz | f_max | 1424 |
| 1 MHz | f_r, resonance | 2564 |
| 700 kHz | f_min | 3663 |

The duty window is 50 % to 80 %. `d` is a 12-bit word, with 4096 = 100 %.

## The delay-line modulator (`vfvdm`)

This is the least obvious part of the design.

### Resources

* **Ring oscillator** (`dl_ring_osc`). It has 2^P = 128 delay elements and makes `clk_base`, with a period of
  128 × 390 ps = 49.92 ns (20.03 MHz). It also exposes 128 taps, each a copy of `clk_base` shifted by a
  further element.
* **Four 128:1 multiplexers** (`tap_mux`). They pick four of those taps, `p1..p4`, using pointers `s1..s4`.
* **Two counter/comparator units** (`vfvdm_cnt_cmp`), called Mode0 and Mode1.
  * Mode0 makes the falling edge of `hs` on `p1` and the next rising edge on `p2`.
  * Mode1 does the same with `p3` and `p4`.
  * The two modes take turns, one switching cycle each.
* **Output stage** (`vfvdm_out`). This is a flip-flop clocked by any trigger. It loads 1 on an on-trigger and 0 on an
  off-trigger; `hs = Q` and `ls = ~Q`.

### Splitting a command

An on-time command is 13 bits. The top 6 bits (`_c`) count base-clock cycles. The low 7 bits
(`_f`) count delay elements. Because the taps cover one whole clock period, an edge
can land anywhere. Its position is the previous edge's tap plus the fine part,
modulo 128, and the coarse count of the next edge gains one cycle when that sum
wraps past 128.

### Pointer update

Let `R` be the tap of the previous rising edge. The pointers move as:

    s1 = s4 + hs_f          s2 = s4 + hs_f + ls_f       (Mode0, from Mode1's rise)
    s3 = s2 + hs_f          s4 = s2 + hs_f + ls_f       (Mode1, from Mode0's rise)

### Counter thresholds

Counting from the cycle after the previous rise:

    thr_off = hs_c + carry(R + hs_f)
    thr_on  = thr_off + ls_c + carry(s_fall + ls_f)

### Example: hs = 664, ls = 644

The fine parts are 24 and 4, and the coarse parts are 5 and 5.

* Each switching cycle moves the pointers by 28. One Mode0/Mode1 pair moves them by 56.
* The period is 1308 elements (510.1 ns) and D = 664/1308 = 50.8 %.
* When the commands jump to 5664/1644 (fine parts 32 and 108), the change is taken at the next rising edge. Full cycles of the new timing follow: 7308 elements, D = 77.5 %.
  There is no glitch and no cycle with a mixed or odd length.

### Why two modes

A mode's pointers and thresholds are recomputed while the *other* mode runs. The update happens in
the clock cycle of the other mode's falling edge. So the mode that is producing an edge never sees its
operands change, and new commands can be accepted every cycle. Commands are registered in the
clock cycle of each rising edge of `hs`, which is the start of a switching cycle.

### How the sub-clock comparison is done

This part is this design's own choice.

* The counters and comparators run on `clk_base`. When the count reaches a threshold they raise a one-cycle
  flag (`fire_off` / `fire_on`).
* A trigger flip-flop clocked by the selected tap samples that flag. The trigger therefore rises on that tap inside the
  flagged base cycle, with one-element resolution.
* Every tap lags `clk_base` by `(i + ½)` elements. Because of this half-element offset, no tap edge coincides with a `clk_base` edge, and the
  tap-clocked flops never race the flags.

### Minimum phase

A trigger pulse lasts one base period, so each output phase must be longer than that. Commands below
129 elements (2^P + 1) are raised to 129. The published modulator claims no duty limit.
In this design, the shortest phase is about 9 % of a 1.8 MHz period.

### Run and stop

* `run` high: the first rising edge comes two base cycles later.
* `run` low: the modulator stops after the next falling edge, with `hs` low.
* `cyc` is a one-clock strobe in the cycle of each rising edge. The rest of the controller uses it as the sample strobe.

## Governor, soft start and operating modes (`sys_governor`)

The governor has four states: `IDLE → STARTUP → CLOSED` (or `OPEN` when `cntrl.loop_en` is low).

**`IDLE`.** The modulator is stopped and both compensators are preset. The frequency compensator is preset to f_r and the duty compensator to 50 %.

**`STARTUP` (soft start).** The governor drives the modulator directly. It ramps the two on-times
linearly in 64 steps:

* The high-side time goes from 129 to 1282 (T_r/2). 129 elements is the modulator's minimum phase; the published sequence starts at zero duty.
* The low-side time goes from 1295 to 1282.

The period therefore starts exactly at 1424 (1.8 × f_r) and rises to 2564 (f_r). The duty cycle rises from 9 % to 50 %. Both change monotonically.
The high frequency at the start keeps the first current peaks low. Each step lasts `ss_cycles`
switching cycles, so the length can be programmed: 64 × `ss_cycles` cycles, up to about 12.7 ms. The
end point equals the compensators' preset, so the hand-over to closed loop needs no bump.

**`OPEN`.** Fixed at f_r and 50 %.

**`CLOSED`.** Both loops run:

* The frequency PI updates every sample.
* The duty PI updates every fourth sample, and only when:
  * `cntrl.duty_en` is high, and
  * either `v_err = 0` or an override routine drives it.
* With `duty_en` low, D stays where it is.

## Override and optimisation routines (`override_logic`)

In `CLOSED`, one routine at a time may replace a compensator's input with a fixed
value of known sign. `mux_f` selects `err_or` into the frequency PI. `mux_d` selects
`res_or` into the duty PI.

| routine | entry | forced value | effect | exit |
|---|---|---|---|---|
| OPT (optimisation) | `v_err ≠ 0`, D above 50 % | `res_or = −2` | duty walks back to 50 % while the frequency loop recovers the output | D reaches 50 % |
| DMIN | `v_err = 0`, `v_err_res < 0`, D at 50 % | `err_or = −1` | frequency creeps down, output rises | residual error turns positive, or `v_err ≠ 0` |
| DMAX | `v_err = 0`, `v_err_res > 0`, D at 80 % | `err_or = +1` | frequency creeps up, output falls | residual error turns negative, or `v_err ≠ 0` |
| FMAX | `v_err > 0` with the frequency at 1.8 MHz | `res_or = +2` | duty rises, gain falls further | `v_err ≤ 0`, or D reaches 80 % |

FMAX takes priority over OPT. OPT is what drives the converter back toward symmetric,
50 % operation after every coarse disturbance. D above 50 % is then only used to fine-tune inside the
coarse bin.

## Dead time (`deadtime`)

`c1 = hs & hs_delayed` and `c2 = ls & ls_delayed`. Each rising edge is delayed by `dt_sel` delay elements
(0–63 × 390 ps), and each falling edge passes at once. So both switches are off for `dt_sel` elements
around every transition. During that time the half-bridge node can swing and the switches turn on at zero voltage. `mod_en`
low forces both gates off.

## Clocking and timing of the whole controller

There is one clock: `clk_base` from the modulator's ring. The ring runs whenever `rst_n` is high.

Per switching cycle:

1. In the cycle of the rising edge of `hs`, `adc_smp` is high and `adc_data` is registered.
2. One clock later, the error split, the override logic and the governor act, and the compensators update.
3. `digital_logic` registers the new on-times.
4. The modulator takes them at the next rising edge.

So a new sample affects the gate signals one switching cycle later.
The ADC must deliver its word by the `clk_base` edge that ends the `adc_smp` cycle. An external ADC that
converts at the start of a cycle and presents its result at the next `adc_smp` works. In that case the
control law sees a sample one cycle old.

## Top-level interface (`llc_pfm_pwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | asynchronous reset, active low; also enables the ring oscillator |
| `cntrl` | in | 3 | `{start, loop_en, duty_en}` (`llc_pkg::cntrl_t`) |
| `ref_m`, `ref_l` | in | 7, 3 | reference, as an ADC code split into MSB and LSB parts |
| `adc_data` | in | 10 | ADC code of the divided output voltage |
| `ss_cycles` | in | 8 | switching cycles per soft-start step |
| `dt_sel` | in | 6 | dead time in delay elements |
| `clk_base` | out | 1 | internal clock, about 20 MHz |
| `adc_smp` | out | 1 | sample strobe, one `clk_base` cycle per switching cycle |
| `c1`, `c2` | out | 1 | high- and low-side gate drives |
| `t_sw`, `duty` | out | 13, 12 | current period (elements) and duty (4096 = 100 %) |
| `err_m`, `err_l` | out | 1 | coarse / residual error nonzero |
| `gov_state`, `or_mode` | out | 2, 3 | governor state, active override routine |

## Parameters (defaults)

| name | default | where from |
|---|---|---|
| ADC width | 10 | published design (10-bit ADC) |
| on-time command width | 13 bits, split 6 coarse + 7 fine | published design (13-bit modulator, 128-element line) |
| delay element `TDE_PS` | 390 ps | chosen so that 128 elements give the ~20 MHz internal clock of the published design |
| f_r / f_max / f_min | 1 MHz / 1.8 MHz / 700 kHz (2564 / 1424 / 3663 elements) | published design |
| soft-start start point | 1.8 × f_r, duty 9 % | frequency published; the published duty is zero, 9 % is the modulator's minimum phase |
| M / L split | 7 / 3 | chosen |
| D_min / D_max | 50 % / 80 % | 50 % published; 80 % chosen |
| PI gains | frequency KP 16, KI 8; duty KP 8, KI 16 (4 fractional bits) | chosen |
| override magnitudes | `err_or` ±1, `res_or` ±2 | chosen |
| soft-start steps, `DUTY_DIV` | 64, 4 | chosen |

The constants live in `rtl/llc_pkg.sv`.

## Where this design departs or fills gaps

* **Minimum phase.** Each output phase is at least 129 delay elements, so the modulator has a duty
  limit. The soft start begins at 9 % duty at 1.8 MHz, not at 0 %.
* **Which multiplexer forces the optimisation error.** The published description says the
  optimisation routine forces a negative error on the duty compensator "by setting mux_f".
  Its block diagram, however, places mux_f at the frequency compensator. This design follows the
  block diagram:
  * `mux_f` selects `err_or` into the frequency PI;
  * `mux_d` selects `res_or` into the duty PI;
  * OPT uses `mux_d`.
* **DMAX and FMAX routines.** The published design says they exist but not what they do. Here they
  mirror DMIN.
* **Chosen values.** Gains, the M/L split, D_max, the override magnitudes, the ramp shape, the
  governor's states and the host control bits are all choices of this design.
* **Governor inputs.** The published block diagram feeds the period to the governor. Here the limit
  flags of both compensators go to the override logic instead.
* **Governor control outputs.** The governor's numbered control outputs in the published diagram are
  not built, because their meaning is not given.
* **Clock and sampling.** The controller runs on the modulator's ring clock and samples once per
  switching cycle. The published design does not state either.
* **Error sign.** `measured − reference` was inferred from the direction in which each routine moves
  the output.
* **Delay models.** `dl_ring_osc` and `delay_chain` are behavioural models with `#` delays.
  * Synthesis drops their delays. In hardware they must be hand-placed, matched delay cells.
  * The ring model's half-element tap offset is what the tap-clocked flops rely on. A real layout
    must keep the same margin.
  * Timing closure of the tap-clocked trigger flops is not addressed by this RTL.
* **Not included.** The ADC and the power stage are outside the design. The end-to-end test models
  them with an averaged first-order gain curve.
* **Size.** Coarse synthesis of the controller (everything except the delay line and
  multiplexer trees) gives about 300 cells and 263 flip-flop bits. The published figure is about
  2500 standard-cell gates. The two numbers are not directly comparable.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_vfvdm`
  * Drives the 664/644 → 5664/1644 example.
  * Checks every high and low time to the picosecond (command × 390 ps).
  * Checks the duty (50.8 % and 77.5 %), the new timing within two cycles of a mid-cycle change, the pointer
    relation above, `ls = ~hs`, a clean stop with `hs` low, and restart with clamped commands.
* `tb_vfvdm_ptr_calc`, `tb_vfvdm_cnt_cmp`, `tb_vfvdm_out`, `tb_tap_mux`, `tb_dl_ring_osc`, `tb_delay_chain`
  * Check the modulator's pieces: pointer advance of 56 per cycle pair, exact flag cycles, trigger
    instants, tap offsets.
* `tb_error_split`
  * Exhaustive over all ADC codes.
* `tb_freq_pi`, `tb_duty_pi`, `tb_digital_logic`
  * Compared against reference models on random inputs.
* `tb_sys_governor`
  * Checks ramp values and state sequencing.
* `tb_override_logic`
  * Walks through every routine.
* `tb_deadtime`
  * Checks exact dead time, no overlap, and gates off when disabled.
* `tb_llc_pfm_pwm_top`
  * Runs the full-size controller with no parameter changes, closed around a power-stage model:
    soft start, regulation at 1.8 V, load steps, duty loop off and on, light load, high input
    voltage with a lowered reference, and opening and closing the loop.
  * Every mechanism happens and is counted: soft start, open loop, closed loop, OPT, DMIN, DMAX,
    FMAX, duty held, and stop.
  * It also checks the dead time and that the gates never overlap.
  * It takes about 3–5 minutes.
* `tb_llc_startup`
  * Runs the full-size controller through a 5 ms and a 2.5 ms soft start.
  * `ss_cycles` is worked out from the mean ramp period (100 and 50).
  * Checks that the first period is exactly 1.8 × f_r, with the minimum high time of 129 elements.
  * Checks that period and high time never shrink.
  * Checks that it ends exactly at f_r and 50 %, and that the duration is within 2 % of the target.
  * It takes about 3 minutes.

All testbenches pass. For each block, a deliberately broken copy of its module was run against its
testbench, and the testbench failed in every case.

Run any testbench with plain Verilator 5. Delays need `--timing`; every file sets its own
`timescale` of 1 ps:

    verilator --binary --timing -Wno-fatal rtl/llc_pkg.sv tb/tb_vfvdm.sv -y rtl \
              --top-module tb_vfvdm -o sim
    ./obj_dir/sim

Replace `tb_vfvdm` with any other testbench name.
`verilator --lint-only -Wall rtl/llc_pkg.sv rtl/llc_pfm_pwm_top.sv -y rtl` lints the top. The remaining
warnings are unused package constants and unused status signals (pointers, `at_fmin`).

## Files

| file | contents |
|---|---|
| `rtl/llc_pkg.sv` | constants, `cntrl_t`, governor and override enums |
| `rtl/llc_pfm_pwm_top.sv` | the controller |
| `rtl/error_split.sv`, `freq_pi.sv`, `duty_pi.sv`, `digital_logic.sv` | loop arithmetic |
| `rtl/sys_governor.sv`, `override_logic.sv` | modes, soft start, overrides |
| `rtl/vfvdm.sv`, `vfvdm_ptr_calc.sv`, `vfvdm_cnt_cmp.sv`, `vfvdm_out.sv`, `tap_mux.sv` | modulator |
| `rtl/dl_ring_osc.sv`, `delay_chain.sv` | behavioural delay-line models |
| `rtl/deadtime.sv` | dead-time generator |
| `tb/tb_*.sv` | one self-checking testbench per module |
