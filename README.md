# Buck regulator PWM controller with a multiple-access table look-up PID

This is a digital controller for a DC-DC buck converter. The PID compensator uses
no multipliers and no adders. It is two small table look-ups, done one after the
other within each 1 MHz switching period.

A full table look-up would take the whole PID state as a single address: three error
samples of 4 bits and the previous 8-bit duty word, 20 bits in all, so 2^20 x 8 bits.
That is too large. This design uses two facts to cut it down:

* The error signal moves by at most one step per period. Of the 4096 possible
  {e(n), e(n-1), e(n-2)} histories only 71 can occur, and they yield only a few
  distinct PID sums.
* So the first table (Memory-A) reduces the error history to a short *code* for the
  sum e'(n). The second table (Memory-B) adds that sum to d(n-1) and clamps the
  result.

Both tables are RAMs with a write port, so the control law can be reprogrammed. They
start preloaded with the coefficients of the reference design: a = 12.5, b = -23.5,
c = 11.5.

## Signal chain

```
 vout, vref ──► hyst_comparators ──► error_voltage[1:0]
                                         │
 clk (4 MHz) ─► timing_gen ── step ─►  epu ──► e(n) ∈ −4..+4, enable
                                         │
                        pid_compensator: error_delay ─► memory_controller
                                         │      (Memory-A, Memory-B)
                                         ▼
                                      d(n) ∈ 1..254
                                         │
                        dpwm: ring_oscillator ─► hybrid_dpwm ──► duty (1 MHz, d/256)
```

| Module | Role |
|---|---|
| `pwm_controller` | Top level: the whole controller. |
| `hyst_comparators` | Behavioural model of the two analog comparators. Uses `real` inputs and is not synthesizable. |
| `timing_gen` | Divides 4 MHz down to the 1 MHz loop strobe and the 2 MHz and 1 MHz stage waveforms. |
| `epu` | Error process unit: a saturating up/down state machine for e(n). |
| `error_delay` | Holds e(n), e(n-1) and e(n-2). |
| `memory_a`, `memory_b` | The two look-up RAMs. Their contents are computed at start-up. |
| `memory_controller` | Runs the three look-up stages and holds d(n-1). |
| `pid_compensator` | `error_delay` plus `memory_controller`. |
| `ring_oscillator` | Behavioural model of the 8-phase ring oscillator. Uses delays and is not synthesizable. |
| `hybrid_dpwm` | Synthesizable counter / phase-select PWM. |
| `dpwm` | `ring_oscillator` plus `hybrid_dpwm`. |
| `pwm_pkg` | Widths, coefficients, types and the functions that generate the tables. |

## The comparator code and the EPU

Let diff = vref − vout. The comparators report three cases on a 2-bit bus:

| Case | Code |
|---|---|
| diff ≥ Vq (output too low) | `11` |
| diff ≤ −Vq (output too high) | `00` |
| otherwise (in band) | `01` |

Vq is the output resolution, 10 mV here (parameter `VQ`). Bit 0 is a plain comparator
with its threshold at −Vq. Bit 1 has its threshold at +Vq and 2 mV of hysteresis
(`VHYS`), so that ripple does not make it chatter. The code `10` would mean "in band"
too, but this model never produces it.

Once per 1 MHz period the EPU applies the code to e(n):

* `11` adds one.
* `00` subtracts one.
* `01` or `10` holds.

e(n) saturates at +4 and −4. It is a 4-bit two's complement register (`0100` = +4,
`1100` = −4). The comparator bus is asynchronous to the 4 MHz clock, so it passes two
synchronising flip-flops first. One cycle after each update the EPU raises `enable`
for one cycle, which starts the compensator.

## How two small tables replace the PID arithmetic

The control law is

    d(n) = d(n-1) + e'(n),   e'(n) = a·e(n) + b·e(n-1) + c·e(n-2)

Write the history as e(n-1) = m, e(n) = m + p and e(n-2) = m + q, with p and q in
{−1, 0, +1}. This gives 71 reachable histories. With a, b, c as above,
e'(n) = 0.5·m + 12.5·p + 11.5·q. d(n) is an integer, so e'(n) is rounded half away
from zero. The rounded values form five clusters around 0, ±12 and ±24. There are 27
distinct values in all:

    −26..−22, −14..−10, −3..3, 10..14, 22..26

**Memory-A** (4096 × 5 bits)
- Address: {e(n), e(n-1), e(n-2)}.
- Data: the *code* of e'(n), which is its index in the ascending list above. For
  example, code 13 means 0 and code 26 means +26.
- The 4025 addresses the EPU can never produce hold the code of 0.

**Memory-B** (8192 × 8 bits)
- Address: {code, d(n-1)}.
- Data: the clamped sum clamp(d(n-1) + value(code), 1, 254). The clamp to 1..254
  lives in the table contents, so no comparator or adder is needed.
- Codes 27 to 31 decode to a sum of 0.

Together the tables hold 84 kbit, against 8 Mbit for a single 2^20-word table.

The contents come from `pwm_pkg::reachable_values`, `eprime` and `clamp_duty`, which
the `initial` blocks of `memory_a` and `memory_b` call. To change the control law,
either change `KA2`, `KB2` and `KC2` (the coefficients ×2) in `pwm_pkg`, or write
new words through the table port at run time. If new coefficients give more than 32
distinct sums, widen `CODE_W`.

## Look-up timing

The compensator uses the same 4 MHz clock as the rest of the controller. One 1 MHz
period is four clock cycles. `timing_gen` counts them (cnt = 0..3):

| Clock edge at the end of | Action |
|---|---|
| cnt = 3 (`step` high) | The EPU updates e(n). `enable` is high during the next cycle. |
| cnt = 0 | Stage (i): `error_delay` shifts in e(n), and d(n-1) is latched from the d(n) register. |
| cnt = 1 | Stage (ii): Memory-A is read. |
| cnt = 2 | Stage (iii): Memory-B is read. d(n) is updated and `d_valid` is high for the next cycle. |

`clk_1m` is high from stage (i) to stage (iii). `clk_2m` toggles at every stage.
d(n) is ready three cycles (750 ns) after `enable`. A new look-up cannot start before
the last one finishes, and an assertion checks this.

## The hybrid DPWM

A PWM with 256 steps at 1 MHz needs a resolution of 3.9 ns. This design does not use
a 256 MHz counter. The ring oscillator runs at 32 MHz and has 8 phases, spaced one
stage delay (`TD_PS` = 3906 ps) apart. The duty word is split:

* The upper 5 bits of d are matched by a counter clocked by phase 0.
* The lower 3 bits pick the phase whose edge ends the pulse.

There is no clock multiplexer, so the output cannot glitch when the phase selection
changes:

1. A *start* flip-flop in the phase-0 domain toggles when the counter wraps, unless
   d = 0.
2. Each phase k has its own *stop* flip-flop, clocked by that phase. It toggles when
   k equals the low bits of d and the counter equals the high bits of d.
3. The output is start XOR all stops. Only one of these flip-flops changes at a time.

Phase 0 is a special case. Its edge sees the count from before it increments, so it
compares against the high bits minus one.

d(n) comes from the 4 MHz domain. It passes two flip-flops in the phase-0 domain and
is accepted only when both agree. It is loaded at each period start, so a pulse
always uses one consistent word. With the default delay the period is
256 × 3.906 ns = 999.9 ns, and the high time is exactly d × 3.906 ns.

The ring oscillator and the controller clock are not related. d(n) therefore takes
effect between 0 and about 1.1 µs after `d_valid`.

## The table port

With `tbl_we` high at a rising `clk`, `tbl_wdata` is written:

* `tbl_sel = 0` writes Memory-A at `tbl_addr[11:0]`, using data bits [4:0].
* `tbl_sel = 1` writes Memory-B at `tbl_addr[12:0]` = {code, d(n-1)}.

Both RAMs read synchronously. A write to the word being read returns the old word.

## Behaviour in closed loop

`tb_pwm_controller` runs the controller at its default parameters against a
behavioural buck stage: Vg = 3.3 V, L = 98 µH, C = 125 nF, load 18 Ω, reference
1.8 V.

| Scenario | Mean vout |
|---|---|
| Steady state at 18 Ω | 1.79 V |
| Load step 18 → 9 Ω | 1.80 V |
| Line step 3.3 → 4.0 V | 1.83 V |
| Line step 3.3 → 2.6 V | 1.81 V |
| Reference 1.0 V | 1.01 V |

At power-up, e(n) saturates at +4 and d(n) climbs by 2 per period. vout first comes
within 50 mV of 1.8 V after about 75 µs.

With these coefficients the loop does not settle to a constant e(n). The ±12 and
±24 jumps of the PID sum are large compared with the 10 mV band. The output
therefore keeps a limit cycle around the reference, with peaks about 50 to 150 mV
from the target, and e(n) sweeps between its limits. The mean stays on target. A smaller proportional
gain, or a wider Vq, would reduce the ripple. Both can be changed through the table
port or the parameters.

## Where this design fills gaps or departs from the reference

Taken from the reference design:
- the block structure, the names of the signals and stages
- the 4 MHz clock with three look-up stages per 1 MHz period
- the EPU transition table
- the ranges of e(n) and d(n)
- the coefficients
- the 1 MHz, d/256 PWM
- the hybrid counter / multi-phase DPWM with an embedded ring oscillator

Choices made here:
- **Memory-A word width.** The reference word is 4 bits, on the grounds that fewer
  than 16 sums occur. With the stated coefficients there are 27 after rounding (47
  before), so the word is 5 bits (`CODE_W`). Memory-B grows to 8192 words to match.
- **Rounding and codes.** Rounding e'(n) half away from zero, and coding the sums by
  their rank, are choices of this design.
- **Stage alignment.** Stages (i) to (iii) fall on the three clock edges after the
  EPU update.
- **EPU Enable.** The EPU output is a one-cycle pulse one clock after the update.
- **Comparators.** Which of the two comparators has hysteresis is a choice here, as
  are Vq = 10 mV and the 2 mV hysteresis. Inside the narrow window
  Vq − 2 mV ≤ diff < Vq a code of `11` is held, which departs slightly from the
  strict rule.
- **DPWM split.** The duty word splits into 5 counter bits and 3 phase bits. The
  falling edge comes from toggle flip-flops, and d(n) is resynchronised into the
  oscillator domain.
- **Resets.** e(n) resets to 0 and d(n) to 1 (`D_INIT`).
- **No complementary PWM output.** The reference simulation model also shows an
  inverted PWM output. The power stage here drives both switches from the one
  `duty`, so no second output exists.
- **Steady state.** The reference reports a constant e(n) at steady state. In this
  model the limit cycle described above remains.

The comparators, the ring oscillator and the buck stage are behavioural. Comparator
offset, oscillator delay variation, dead time and switch losses are not modelled.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pwm_controller \
    rtl/pwm_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/buck_model.sv tb/tb_pwm_controller.sv
./obj_dir/Vtb_pwm_controller
```

For another block, replace the testbench file and the top module name. All files use
`timeunit 1ns; timeprecision 1ps`. Asynchronous resets react to a falling edge of
`rst_n`. The testbenches therefore start with `rst_n` high and pull it low at 1 ns,
so that the phase-clocked flip-flops of the DPWM are reset too.

| Testbench | What it checks |
|---|---|
| `tb_pwm_controller` | The closed loop at default parameters (about 2 ms of simulated time). Every d(n) against a floating-point PID model; every PWM pulse width and period; regulation in each scenario; that each mechanism occurred (EPU up/down/hold, both saturations, both clamps, a rewritten table word). |
| `tb_pid_compensator`, `tb_memory_controller` | Random error walks against the floating-point model, with 3-cycle latency and both clamps. |
| `tb_memory_a`, `tb_memory_b` | Every table word against an independently computed list of sums; the write port. |
| `tb_epu`, `tb_error_delay`, `tb_timing_gen` | Against cycle models. |
| `tb_hybrid_dpwm` | Every duty word 1..255 with ideal phases; d = 0. |
| `tb_dpwm`, `tb_ring_oscillator` | Periods and phase lags of the oscillator-driven DPWM. |
| `tb_hyst_comparators` | Thresholds and hysteresis on up and down sweeps. |

`tb_ref_pkg` holds the shared reference model. `buck_model` is the power stage, an
Euler integration with a 1 ns step.
