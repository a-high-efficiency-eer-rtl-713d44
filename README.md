# Digital core of an EER transmitter with a dual-mode buck supply

An envelope-elimination-and-restoration (EER) transmitter splits a
baseband I/Q signal into a magnitude (envelope) and a phase. The phase
modulates a constant-amplitude carrier that drives a switching, highly
efficient class-E power amplifier. The envelope is put back by modulating
the amplifier's drain supply. Most of that supply comes from an efficient
buck DC-DC converter that follows the slow (DC) part of the envelope. A
linear amplifier adds the fast (AC) remainder.

This RTL is the digital part of such a transmitter:

* **Polar conversion.** Each I/Q sample becomes a 12-bit envelope code,
  scaled so that the signal peak maps to 4095, and a 5-bit phase code in
  steps of π/16.
* **Envelope split.** The envelope is divided into a DC part and an AC
  part. The DC part becomes the reference command of the buck converter.
* **Dual-mode converter controller:**
  * Under heavy load it runs in CCM (continuous conduction). At a fixed
    1 MHz, a three-level window ADC feeds a table-driven PID compensator,
    which feeds a 9-bit hybrid counter/delay-line DPWM.
  * Under light load it runs in DCM (discontinuous conduction). A
    pulse-frequency-modulation (PFM) pulse generator fires a charge and
    discharge pulse only when the output drops below the reference.

Everything analog stays outside the RTL and meets it as ports:

* the envelope DAC, filter and linear amplifier;
* the summing node;
* the RF phase shifter and the class-E amplifier;
* the buck power stage;
* the reference DAC and the comparators.

The testbenches contain real-valued models of the buck stage and the
comparators, so the control loops can be simulated closed.

```
 I/Q ──► polar_extract ──► env_code (12b) ─────────────────────────► envelope DAC / linear amp
  (38.4 MS/s)   │                 │
                │           envelope_split ──► env_ac, env_dc
                │                                   │ cdc_word (clk_s → clk_c)
                └────► phase_code (5b) ──► phase    ▼
                                          shifter  vref_code ─► reference DAC ─► comparators
                                                    │                               │
                                                    ▼                               │
                              dcdc_controller ◄─────────── x, y, Vout>Vtr, cycle_start,
                      ┌── error_gen → pid_comp → dpwm ──┐   peak, zero, forced
                      └── pfm_pulse_gen ────────────────┴──► G1, G2 (buck switches), S1 (sense switch)
```

## Polar conversion (`polar_extract`)

The magnitude and angle come from a pipelined CORDIC in vectoring mode:

* One stage maps the vector into the right half-plane.
* 14 micro-rotation stages follow, with 6 guard bits below the input LSB.
* One pipeline stage per iteration, so the block accepts one sample per
  clock.

The magnitude is corrected for the CORDIC gain with the constant
39797/2^16. It is then scaled by `env_gain`, an unsigned Q4.14 factor that
the host sets to `4095 / peak`, where peak is the largest expected
magnitude. The result is rounded and saturated at 4095. Each sample
carries its own gain value down the pipeline, so a gain change applies
exactly from the sample where it was made.

The angle is a 16-bit binary fraction of a turn. The phase code is that
angle rounded to the nearest 1/32 turn, modulo 32:

    phase_code = round(angle / (π/16)) mod 32

Each bit of the code enables one stage of a 5-stage digital phase shifter,
MSB first: 180°, 90°, 45°, 22.5°, 11.25°. Code k therefore means k·11.25°.
Both codes leave `CORDIC_ITER + 4` = 18 clocks after the input sample.

## Envelope split (`envelope_split`)

The DC part is a first-order exponential average of the envelope:

    acc += ((env << 12) − acc) >> 12

Its time constant is 4096 samples, about 107 µs at 38.4 MS/s. The
average is rounded to 12 bits and output as `env_dc`. The AC part is
`env − env_dc`, computed from the same sample's updated average, so
`env_code = env_dc + env_ac` holds exactly for every sample. `env_ac` is
13-bit signed. The block adds one clock of latency. In the top, the phase
code is delayed by one more register so that all four outputs leave
together, 19 clocks after the I/Q sample.

The original design used an analog low-pass filter at this point and gives
no cutoff. The digital average is this design's own choice. `LPF_SHIFT`
sets its time constant.

The DC part then crosses from the sample clock to the controller clock
through `cdc_word`:

* A toggle request/acknowledge handshake with two-flip-flop synchronizers.
* The word is held stable while it crosses.
* A new value is picked up as soon as the previous transfer completes,
  so the reference follows the DC part with a delay of a few cycles of
  each clock.

## CCM loop: window ADC, table PID and hybrid DPWM

### Three-level error (`error_gen`)

Two comparators place the output voltage against a window of width
Vq = 30 mV around the reference:

* `x` is high when Vout is below the window.
* `y` is high when Vout is above the window.

Once per switching period, at the DPWM's `sample_strobe`, the pair is
turned into e(n):

| x | y | e(n) | meaning |
|---|---|------|---------|
| 1 | 0 | +1 | output too low, raise the duty |
| 0 | 0 | 0 | inside the window |
| 0 | 1 | −1 | output too high, lower the duty |
| 1 | 1 | 0 | impossible with a correct window; treated as inside |

### Table PID (`pid_comp`)

The incremental PID law is:

    d(n) = d(n−1) + a·e(n) + b·e(n−1) + c·e(n−2)

with a = 0.29199, b = −0.56787 and c = 0.27734. Because e can only be −1,
0 or +1, the three products collapse into a single 27-entry table:

* The index is `9·(e(n)+1) + 3·(e(n−1)+1) + (e(n−2)+1)`.
* Each entry is `round(256·(a·e(n) + b·e(n−1) + c·e(n−2)))` as a signed
  9-bit number.

Three exceptions apply to the formula:

* **Impossible histories are zeroed.** If the error jumps straight from
  one side of the window to the other (+1 next to −1), that history cannot
  happen in a real transient, so its entry is 0. These are entries 2, 6,
  7, 8, 11, 15, 18, 19, 20 and 24 (0-based).
* **Steady-error entries are forced to ±1.** For (−1,−1,−1) and
  (+1,+1,+1) the formula gives ∓0.37, which would round to 0. The entries
  are −1 and +1, so a steady error still moves the duty one step per
  period.
* **The table is antisymmetric about its centre.**

The sum is saturated to 1..511, which is 0.2% to 99.8% duty. After reset,
d = 1, which gives a soft start.

The table entries, 0-based:

```
 0: -1    1:  71    2:   0    3:-146    4: -75    5:  -4    6:   0    7:   0    8:   0
 9: 74   10: 145   11:   0   12: -71   13:   0   14:  71   15:   0   16:-145   17: -74
18:  0   19:   0   20:   0   21:   4   22:  75   23: 146   24:   0   25: -71   26:   1
```

A `preset` input loads a duty value and clears the error history. The
controller uses it on the return from DCM (see below).

### Hybrid DPWM (`dpwm`)

The 9-bit duty command splits into two parts:

* The upper 5 bits are counted by a 5-bit counter at the 32 MHz system
  rate, 32 counts per 1 µs period.
* The lower 4 bits come from a ring of 16 delay units, Q0..Q15, which
  divides every system-clock period into 16 equal slots.

Here the ring is a one-hot token passed along 16 flip-flops by a 512 MHz
slot tick (`clk`). The whole controller is therefore synchronous. In
silicon, a calibrated delay line would take the ring's place. A tap
encoder turns the token position into a slot number: Q15 gives 0, Qk
gives k+1. Q15 opens every system-clock period and advances the counter.

An S-R flip-flop produces the gate pulse:

* **Set** fires when the counter is 0 and Q15 holds the token, i.e. slot 0
  of the switching period.
* **Reset** fires when the counter equals `d[8:4]` and the slot number
  equals `d[3:0]`.
* Reset wins if both fire together (d = 0).

G1 is the flip-flop output and G2 its complement. G1 is therefore high for
exactly d slots of 1.953 ns, so the duty is d/512.

A command that changes mid-period waits for the next period's slot 0.
`sample_strobe` marks slot 256, the middle of the period. The command
computed from that sample is then applied half a period later, which is
the Ts/2 loop delay the PID coefficients assume.

`NC` and `ND` are parameters. The testbench also runs the 4-bit
illustration configuration: a 2-bit counter, a 2-bit ring and 16 slots.

## DCM: PFM pulse generator (`pfm_pulse_gen`)

At light load the converter is switched only when needed. Two S-R
flip-flops make the pulses:

| flip-flop | drives | set by | reset by |
|-----------|--------|--------|----------|
| FF1 | G1 (high-side switch) | `cycle_start` (Vout < Vref) | `peak` OR `forced_discharge` |
| FF2 | G2 (low-side switch) | `peak` OR `forced_discharge` | `zero` OR `cycle_start` |

* **S1 = NOR(G1, G2)** closes the current-sense switch whenever both power
  switches are off. This holds the sense ramp at zero between pulses.
* **Sensing.** While S1 is open, an analog circuit turns the inductor
  current into a ramp voltage. `peak` and `zero` are comparators on that
  ramp.
* **Forced discharge.** `forced_discharge` (Vout well above Vref) starts a
  discharge through the low side without a charge pulse. This lets the
  output follow a falling reference.

The flip-flops are clocked by the 512 MHz tick and are reset-dominant.
This adds about 2 ns to each comparator decision. The original scheme was
unclocked.

## Mode selection and the two loops together (`dcdc_controller`)

The controller is in CCM when either of these holds; otherwise it is in
DCM:

* the output is above the transition level Vtr = 1.1 V (comparator input
  `vout_above_vtr`);
* the reference command is above Vtr (`vref_code > VTR_CODE`).

`VTR_CODE = 901` assumes the reference code is converted with a 5 V full
scale.

Timing and gate routing:

* The mode register changes only at the start of a DPWM period, so a CCM
  pulse is never cut short.
* In CCM the gates come from the DPWM and S1 is held closed.
* In DCM the gates and S1 come from the PFM generator.
* All comparator inputs pass through two-flip-flop synchronizers.

### Loop behaviour and its limits

This is the part of the design that needs the most care in use:

* **Slew limit.** The CCM loop is a three-level bang-bang-like loop.
  Outside the ±15 mV window it moves the duty by at most about one table
  step per period, and in a sustained error only ±1 LSB per period. With
  Vin = 5 V, that limits how fast the output can follow the reference to
  roughly 10 mV/µs.
  * A cold start to 3 V takes about 300 µs; the testbench measures 303 µs.
  * A reference that moves faster than the slew limit leaves the loop
    behind.
* **Light damping.** The output filter (10 µH, 10 µF, 50 Ω load) has a
  quality factor of about 50. A sudden duty step of more than a few LSB
  makes it ring for milliseconds, and the three-level loop cannot damp
  that. Two of this design's own measures keep the loop out of that state:
  1. **The PID is frozen in DCM.** Otherwise the window errors seen during
     PFM would wind the duty command down to its minimum.
  2. **The duty is preset on every DCM→CCM change** to the steady-state
     duty of the output the PFM loop was holding: d = vref/8, taken from
     the reference of the last DCM period. With a 5 V full scale and
     Vin = 5 V, that is Vout/Vin. For a different supply, set
     `PRESET_NUM / 2^PRESET_SHIFT` to the ratio full-scale/Vin.
* **Reference bandwidth.** Because the envelope's DC part drives the
  reference, a real signal whose average level changes faster than
  ~10 mV/µs (after the 107 µs average) leaves the converter behind. The
  linear amplifier then has to supply the difference.
  * The end-to-end testbench ramps the mean envelope level over 400–500 µs
    for that reason.
  * `LPF_SHIFT` trades reference bandwidth against this limit.
* **DCM ripple.** In DCM the output stays within a few tens of mV of the
  reference, just above it: each pulse starts when Vout dips below Vref.
  * The testbench sees 1.000–1.021 V at a 1 V reference.
  * A falling reference is followed through the forced-discharge path.

## Departures from the original description and open points

* **Error polarity.** The original text once says "+1 or −1 means Vout
  above or below the window". Its error table and its start-up
  description both use +1 for "below", and that is what is built.
* **Phase quantisation.** The phase is quantised to the nearest multiple
  of π/16 (code k = k·11.25°). A worked example in the original
  description scales by 31/π instead, which does not match its own
  phase-code table.
* **PID table zeros.** Entry 8 is zero, as printed in the original table,
  although a list in the accompanying text omits it.
* **DPWM Set condition.** Set uses Q15 holding the token, as in the
  original logic diagram; one sentence there says "last delay unit is 0".
* **Own choices.** All the measures named under *Loop behaviour* (PID
  freeze, duty preset, period-aligned mode change) are this design's own.
  So are:
  * the clocked PFM flip-flops;
  * the digital envelope average;
  * the two-clock structure with `cdc_word`;
  * the CORDIC;
  * the Q4.14 peak-scaling input.
* **Delay matching outside the FPGA** (DAC, filters, phase shifter) is not
  compensated. Only the digital outputs are aligned with each other.
* **Hysteresis.** Hysteresis on the Vout > Vtr comparison is expected
  from the analog comparator; the RTL has none of its own.

## Clocks, resets and ports of the top (`eer_tx_top`)

| clock | rate | drives |
|-------|------|--------|
| `clk_s` | 38.4 MHz | polar conversion and envelope split, one sample per clock while `in_valid` |
| `clk_c` | 512 MHz | the controller; the 32 MHz system rate and 1 MHz switching period are derived from it |

* Each clock has its own asynchronous, active-low reset (`rst_s_n`,
  `rst_c_n`).
* The controller starts in CCM at minimum duty.
* `mode`, `e`, `d`, `dc`, `period_start` and `sys_tick` are status
  outputs for observation.

## Files

| file | content |
|------|---------|
| `rtl/eer_pkg.sv` | widths (12-bit envelope, 5-bit phase, 9-bit duty), `err_t`, `mode_t` |
| `rtl/eer_tx_top.sv` | top: signal path, clock crossing, controller |
| `rtl/polar_extract.sv` | CORDIC envelope/phase |
| `rtl/envelope_split.sv` | DC/AC split |
| `rtl/cdc_word.sv`, `rtl/sync_2ff.sv` | clock-domain crossing helpers |
| `rtl/dcdc_controller.sv` | mode selection, CCM/DCM gate switch, synchronizers |
| `rtl/error_gen.sv`, `rtl/pid_comp.sv`, `rtl/dpwm.sv` | CCM loop |
| `rtl/pfm_pulse_gen.sv` | DCM pulse generator |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end one |
| `tb/buck_model.sv` | real-valued synchronous buck model (5 V, 10 µH, 10 µF, 50 Ω), including diode conduction in DCM |
| `tb/sense_model.sv` | reference DAC, window / transition / cycle-start / forced comparators, current-sense ramp |

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/eer_pkg.sv tb/tb_dpwm.sv --top-module tb_dpwm
./obj_dir/Vtb_dpwm
```

Replace `tb_dpwm` with any other testbench name. Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends it
with a failure if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_polar_extract` | envelope (±1 LSB) and phase codes against floating-point values for random samples, gaps and peak levels; exact 18-clock latency; two worked cases (0.7235 of peak → 2963, 0.7356 rad → code 4) |
| `tb_envelope_split` | every output against an independent model of the average; step response (63% after one time constant, final value); one-clock latency |
| `tb_error_gen` | the error table, the one-clock latency, and that e holds between samples |
| `tb_pid_comp` | every table entry via random error sequences against an independently computed table, saturation at 1 and 511, preset |
| `tb_dpwm` | 512-slot period, G1 high for exactly d slots, mid-period command changes, G2 = ~G1, strobe positions; the same for a 4-bit instance |
| `tb_pfm_pulse_gen` | the flip-flop set/reset rules and S1 against a reference model under random comparator inputs |
| `tb_dcdc_controller` | closed loop with the buck model: start-up to 3 V (window reached after ~300 µs), regulation within ±50 mV, DCM at 1 V, forced discharge on a falling reference, return to CCM at 2.5 V; in every whole CCM period G1 high for exactly d slots; S1 and G2 rules in both modes; counts each mechanism |
| `tb_wcdma_stream` | the signal path of the top on 20,000 samples of a WCDMA-like signal (QPSK at 3.84 Mchip/s, root-raised-cosine shaped, 10× oversampled): every envelope and phase code, peak scaling, the DC average against a floating-point model, the reference handed to the controller |
| `tb_eer_tx_top` | end to end at default parameters, about 2.8 ms of signal, some 100,000 samples |

`tb_eer_tx_top` feeds a synthetic I/Q stream whose mean envelope rises to
a 3 V reference level, falls to 1 V (DCM), rises again, and briefly
overdrives the envelope. It checks:

* the codes and their alignment;
* the reference crossing;
* CCM and DCM regulation.

It also requires each mechanism to occur at least once: reference
transfers, both mode changes, PFM cycles, forced discharges, envelope
saturation, phase wrap-around, and duty corrections of both signs. It
runs in a few seconds.
