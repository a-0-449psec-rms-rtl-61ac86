# Dividerless injection-assisted ADPLL (5-bit counter loop, LC DCO)

This is an all-digital phase-locked loop for clock generation between about
415 MHz and 1 GHz, aimed at very low jitter. Its main idea is to leave out
almost everything that usually adds noise or power to a digital PLL:

* **No feedback divider.** The DCO runs at the reference frequency, and the
  detectors compare the two clocks directly.
* **No time-to-digital converter.** A three-state phase/frequency detector
  (PFD) acquires the frequency. A one-flip-flop bang-bang phase detector
  (BBPD) then tracks the phase.
* **A plain counter as the loop filter.** A 5-bit up/down counter, preset to
  mid-range (`10000`), steps the DCO one capacitor at a time.
* **An LC oscillator.** The DCO is an LC tank tuned by switched capacitors,
  and a comparator squares its output. It has much lower phase noise than a
  ring oscillator.
* **Injection.** Once the loop is close, the reference is delayed by a
  digitally controlled delay line (DCDL), shaped into a narrow pulse and
  injected into the oscillator. This pulls the DCO phase straight onto the
  reference every cycle.

The digital parts are synthesizable SystemVerilog. The analog parts (the LC
DCO, the comparator, the delay line and the pulse generator) are behavioural
models with real-valued signals and delays. As a result the full loop can be
simulated in Verilator with `--timing`. The top level is a simulation model,
not a synthesis target.

## Signal flow

```
            +-----------+  up/dn  +----------+ slow/fast
 ref_clk -->|   pfd     |-------->| pfd_slip |-----------+
   |   +--->| (a,b)     |         +----------+           v
   |   |    +-----------+                          +----------+  inc/dec  +-------------+
   |   |    +-----------+  lead                    | loop_mux |---------->| dlf_counter |-- code[4:0]
   +---)--->|   bbpd    |------------------------->|  (mode)  |           | clk = ~ref  |
   |   |    +-----------+                          +----------+           +-------------+
   |   |                                                 ^                       |
   |   |    +-----------+  mode, pfd_en, inj_en          |                 +-----------+
   +---)--->| mode_ctrl |--------------------------------+                 | bin2therm |
   |   |    +-----------+                                                  +-----------+
   |   |                                                                        | therm[31:0]
   |   |    +------+ ref_dly +-----------+ inj_pulse   +--------+  v_osc  +------------+
   +---)--->| dcdl |-------->| pulse_gen |------------>| lc_dco |-------->| comparator |--+
   |   |    +------+         +-----------+             +--------+         +------------+  |
   |   +--------------------------------------------------------------- dco_clk ---------+
```

`dco_clk` is the PLL output. It feeds the `b` input of the PFD and the data
input of the BBPD.

## The three loop phases

`mode_ctrl` counts reference cycles after reset and moves the loop through
three phases: `MODE_PFD` → `MODE_BBPD` → `MODE_INJ`. It stays in `MODE_INJ`
for good. The order comes from the source design. The phase lengths
(`PFD_CYCLES = 256`, `BBPD_CYCLES = 16`) are this design's own, because the
switching condition is not specified.

### 1. Frequency acquisition with the PFD

The PFD is the usual three-state machine. The states are UP/DN = 00, 10 and
01. A reference edge sets UP, a DCO edge sets DN, and the two together clear
both through an asynchronous reset.

The counter does **not** step on every UP or DN pulse. That is the part of
this design that is hardest to see from the block list alone. A counter is a
pure integrator. A PFD that steps it every cycle gives a double-integrator
loop, which hunts across many codes.

Instead, `pfd_slip` watches for the two self-loops of the PFD state diagram:

* A second reference edge while UP is still set means the DCO lost a whole
  cycle. This is reported as `slow`.
* A second DCO edge while DN is still set means the DCO gained a cycle. This
  is reported as `fast`. It happens in the DCO clock domain, so it is
  carried over by a toggle flag and a two-flop synchroniser.

Each slip moves the counter by one code. Slips come at the difference
frequency, so the counter moves fast while far off and slows as it nears the
right code. It then dithers slowly between the two codes on either side of
the reference. At 625 MHz the nearest code is reached after about 100
reference cycles (160 ns), starting from the `10000` preset.

### 2. Bang-bang tracking

Here the PFD is held cleared (`pfd_en = 0`). The multiplexer hands the
counter to the BBPD. The BBPD is one flip-flop: on the reference edge it
samples `dco_clk`.

* If `dco_clk` is already high, the DCO edge was early, so `lead = 1` and the
  counter counts up, which slows the DCO.
* Otherwise the counter counts down.

With only a counter as filter, this loop has no proportional path, and on
its own it hunts. For that reason this phase is kept short in the default
configuration.

### 3. Injection

`dcdl` delays the reference by `2 ns + dcdl_sel × 44 ps`. `pulse_gen` turns
each rising edge of the delayed reference into a 30 ps pulse, which goes into
the DCO. In the model, each pulse pulls the oscillator phase halfway toward a
rising zero crossing. The injection therefore acts as the missing
proportional path:

* The phase is re-aligned every reference cycle.
* The BBPD now effectively sees only the frequency error that built up since
  the last pulse.
* The code settles into a small hunt around the right value: ±2 codes at
  625 MHz, ±3 at the low end, where one code is a smaller frequency step.

**Setting `dcdl_sel`.** The delay is meant to be about **two reference
periods**: the 2.0–4.77 ns range matches 2·T at 1 GHz and at 415 MHz. Choose
`dcdl_sel = ceil((2·T_ref − 2 ns) / 44 ps)`, clamped to 63. `dcdl_sel` is a
top-level input because nothing in the design computes it.

## Oscillator tuning law

The DCO has two identical 32-element switched-capacitor arrays, one on each
side of the tank. Both are driven by the same thermometer word. Every element
that is switched on adds the same capacitance, so from f = 1/(2π√(LC)):

    T² = T0² + n·K,   T0² = 1.848830 ns²,  K = 0.123280 ns²

Here n is the number of elements switched on. The decoder always keeps
element 32 on, so n = code + 1. The two constants are fitted to two measured
points of the oscillator: 5 elements give 636.9 MHz and 9 elements give
581.4 MHz. With all 32 elements on, the same law gives 415.4 MHz, which is
the stated bottom of the range. With one element on it gives only 712 MHz.

**The model therefore covers 415–712 MHz, not the full 415 MHz–1 GHz.**
References above 712 MHz (715 and 736 MHz in the table below) hold the code
at 0. Only injection pulling drags the DCO up to the reference.

More elements means more capacitance and a lower frequency. So "count up"
always means "slow the DCO down".

## Blocks

| Module | Kind | What it is |
|---|---|---|
| `adpll_pkg` | package | widths (`CODE_W=5`, `THERM_W=32`, `DCDL_W=6`), preset `10000`, `loop_mode_e` |
| `adpll_top` | top (simulation) | wires the loop; parameters `PFD_CYCLES`, `BBPD_CYCLES` |
| `pfd` | RTL | three-state PFD, two set-only flops with a shared asynchronous clear, enable |
| `pfd_slip` | RTL | cycle-slip detector on the PFD state (frequency information for the counter) |
| `bbpd` | RTL | bang-bang phase detector (one flop) |
| `loop_mux` | RTL | selects slip-based or bang-bang count direction by mode |
| `mode_ctrl` | RTL | phase sequencer counted in reference cycles |
| `dlf_counter` | RTL | 5-bit up/down counter with asynchronous active-low parallel load; saturates at 0 and 31 |
| `bin2therm` | RTL | 5-bit to 32-bit thermometer decoder; bit 31 tied high |
| `lc_dco` | behavioural | LC oscillator, tuning law above, injection as a phase pull |
| `comparator` | behavioural | `out = vin > vth` |
| `dcdl` | behavioural | 64 × 44 ps mux delay line, 2 ns minimum, transport delay |
| `pulse_gen` | behavioural | pulse one inverter delay wide (30 ps) per rising edge, gated by `en` |

## Clocking and timing

* **Reference domain.** The PFD `up` flop, the BBPD, `pfd_slip` and
  `mode_ctrl` update on the rising edge of `ref_clk`.
* **Counter.** `dlf_counter` is clocked on the **falling** edge of `ref_clk`
  (`dlf_clk = !ref_clk`). It therefore acts half a period after the detectors
  and the mode change. The new code reaches the DCO within the same reference
  cycle.
* **DCO domain.** The PFD `dn` flop and the `fast` toggle in `pfd_slip` run
  on `dco_clk`. The synchroniser adds two to three reference cycles of
  latency to `fast`.
* **Reset.** `rst_n` is asynchronous and active low. It clears the
  detectors, sets `mode_ctrl` to the PFD phase, and holds the counter at the
  `10000` preset. The parallel load is asynchronous and keeps holding while
  low.
* **PFD reset path.** The PFD's internal reset is combinational with zero
  delay, so the flag of the later input is a zero-width glitch in simulation.
  In silicon it is a short pulse set by the reset-path delay.

## Where this RTL departs from the source design

* **Counter stepping in the PFD phase.** The counter steps on PFD cycle slips
  rather than directly on UP/DN (`pfd_slip`). This was added because a
  counter-only loop driven by the PFD flags every cycle hunted over 8 codes.
* **Phase switching.** Switching is by fixed reference-cycle counts. The
  source switches "after stabilizing", with no circuit given.
* **Saturation.** The counter saturates instead of wrapping. The counter it
  is based on is a 74-series-style presettable counter.
* **Load polarity.** The description contradicts itself on the load
  polarity. This design loads while `pl_n` is low.
* **Loop-filter clock.** The counter is clocked on the falling reference
  edge. The source does not say how the counter is clocked.
* **DCO range.** The oscillator model tops out at 712 MHz, not 1 GHz (see
  above).
* **Lock codes differ from the source's system simulation.** The source's own
  simulation reports code `01000` at 625 MHz. This model locks at code 5
  (`00101`), because its oscillator law comes from the measured oscillator
  points and not from that simulation's model.
* **Lock time.** The source states about 70 ns. This loop reaches the
  nearest code in about 160 ns at 625 MHz, from the mid-range preset.
* **Analog behaviour not modelled.** Phase noise, jitter, supply behaviour,
  and the BBPD's 20 ps resolution and 10 GHz limit are not modelled. The DCO
  model steps every 10 ps, so its edges carry up to ±10 ps of quantisation.
  Nothing in this RTL says anything about the 0.449 ps RMS jitter figure.
* **Injection strength.** Injection is a simple phase pull of strength 0.5
  per pulse (`INJ_PULL`). The real injection mechanism is not described.
* **No dividers.** The feedback divider and delta-sigma modulator of
  conventional ADPLLs are absent on purpose: this loop is dividerless.

## Simulating

Every testbench is self-checking. `dlf_counter` and `mode_ctrl` also carry concurrent assertions: the code never moves by more than one step per clock or wraps, and the injection phase is never left. Add `--assert` to enable them. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The analog models
need `--timing`. For example:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv rtl/adpll_pkg.sv \
          tb/tb_adpll_top.sv --top-module tb_adpll_top
./obj_dir/Vtb_adpll_top
```

| Testbench | What it checks |
|---|---|
| `tb_adpll_top` | Whole loop at default parameters and 625 MHz, end to end. Checks the preset, PFD-phase lock code and lock time, the code band and measured frequency under injection. Then runs a second acquisition from reset at 422.2 MHz, where the counter must climb. Counts every mechanism: UP and DN pulses, slow and fast cycle slips, counter up and down steps, both mode switches, BBPD early and late decisions, and injection pulses. |
| `tb_adpll_sweep` | Whole loop at 625, 715, 500, 422.2, 736 and 525 MHz, each from reset. |
| `tb_pfd` | UP/DN pulse width equals the phase offset. UP/DN majority and slips under a frequency error. The enable. |
| `tb_bbpd` | Early/late decision over ±0.7 ns offsets. Reset. |
| `tb_dlf_counter` | Asynchronous preset, hold while loading, 2000 random steps against a model, both saturation limits. |
| `tb_bin2therm` | All 32 codes, exhaustively. |
| `tb_loop_mux` | All modes × inputs. |
| `tb_mode_ctrl` | Exact switch cycles with short phases. |
| `tb_lc_dco` | 636.9 and 581.4 MHz at 5 and 9 elements; 415 MHz at 32; monotonic tuning; edge shift from injection. |
| `tb_comparator` | Output level and duty cycle. |
| `tb_dcdl` | Delay for several words to 1 ps; no lost edges. |
| `tb_pulse_gen` | Width, edge alignment, gating. |

Results of the sweep with default parameters:

| Reference | `dcdl_sel` | Nearest code | Code with injection | DCO average |
|---|---|---|---|---|
| 625 MHz | 28 | 5 | 3..6 | 618.8 MHz |
| 715 MHz | 19 | 0 (out of range) | 0 | 715.0 MHz (pulled) |
| 500 MHz | 46 | 16 | 14..18 | 500.0 MHz |
| 422.2 MHz | 63 | 30 | 27..30 | 422.2 MHz |
| 736 MHz | 17 | 0 (out of range) | 0 | 736.0 MHz (pulled) |
| 525 MHz | 42 | 13 | 11..14 | 519.8 MHz |

At 625 and 525 MHz the average is a little below the reference. Under
injection the DCO still slips an occasional cycle, because a code step of
2–3 % is large against the 0.5 pull.

## Changing it

* **Acquisition time.** Lengthen or shorten the phases with `PFD_CYCLES` and
  `BBPD_CYCLES` on `adpll_top`. `PFD_CYCLES` must cover acquisition from the
  preset; 256 cycles covers 422–712 MHz.
* **Counter width.** `CODE_W` and `THERM_W` in `adpll_pkg` set the counter
  and array sizes. `bin2therm` keeps its top bit tied high.
* **Oscillator.** To match a different oscillator, refit `T0SQ_NS2` and
  `KSQ_NS2` in `lc_dco` from two measured (elements, frequency) points:
  K = (T2² − T1²)/(n2 − n1) and T0² = T1² − n1·K.
