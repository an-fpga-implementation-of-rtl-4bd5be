# FPGA controller for an LLC resonant converter

An LLC resonant converter regulates its output by changing its switching
frequency. Near resonance (500 kHz in this design) a small frequency step
gives a large change in gain. The pulses must therefore be placed much more
finely than one FPGA clock allows. The controller must also close its loop
once in every switching period, up to 1.2 MHz. This RTL does both on one
FPGA:

* a **high-resolution DPWM** places every edge on a 0.96 ns grid. That is
  one eighth of a 130 MHz cycle, reached with four 130 MHz clocks 45° apart.
  It drives four gates: the primary half bridge (channels 0/1) and the
  synchronous rectifier on the secondary side (channels 2/3).
* a **control-law state machine** runs at 100 MHz. It turns one set of
  samples into a new set of commands in 44 clock cycles (440 ns). A
  conversion (about 360 ns) plus this pass fits in the 833 ns period at
  1.2 MHz.
* **small floating-point units** serve that state machine: subtract,
  multiply, reciprocal estimate and integer conversion. They compute the
  secondary-side phase from a closed formula for the resonant tank.

The DPWM raises a sampling flag at a programmed point of each period. The
converters sample. The state machine computes, then pulses `control_done`,
and the DPWM takes over all new commands at once. That is one loop per
switching period.

```
           100 MHz clk
               │
      ┌────────┴─────────┐  4 × 130 MHz, 0/45/90/135°  ┌──────────────────────────┐
      │ pll_4phase_model ├────────────────────────────►│ dpwm                     │
      └──────────────────┘                             │  pwm_counter (CLK_0)     │
                                                       │   └ pwm_carrier × 4      ├──► gate[3:0]
  adc_ready, samples  ┌────────────────────┐ commands  │  pwm_phase_path × 8      │
  ───────────────────►│ llc_control_fsm    ├──────────►│   └ pwm_mux8             │
                      │  fp_sub fp_mul     │ control_  │  pwm_sr_latch × 4        │
  adc_start ◄──sync───│  fp_recip          │ done      │  shoot_through_guard × 2 │
         ▲            │  fp_convert        │           └────────────┬─────────────┘
         └────────────┴────────────────────┴───────── adc_flag ◄────┘
```

## Command words

The DPWM takes 14-bit unsigned fixed-point words with 11 integer and 3
fraction bits. The unit is one CLK_0 cycle (7.69 ns), so the LSB is one
0.96 ns step. For example, period 2080 is 260.000 cycles, which is 500 kHz.
`dpwm_pkg` holds the widths and the reset commands:

| command | reset value | meaning |
|---|---|---|
| period | 650 cycles (200 kHz) | shared by all channels |
| duty[i] | 291 cycles | pulse width of channel i |
| sync[i] | 649 cycles | phase of channel i (see below); entry 0 unused |
| adc_time | 377 (cycles, integer) | sampling point, coarse only |
| force_off[i] | 0 | suppress the pulses of channel i |

Limits:

* A duty at or above the period gives a constantly high output. A zero
  duty gives a constantly low one.
* A sync command above the period is cut to the period.
* Two limits are this design's own: the period is at least 4 cycles
  (`MIN_PERIOD`), and a pulse leaves at least 3 cycles of off time
  (`MIN_OFF`).

## How the DPWM places an edge to 0.96 ns

This is the least obvious part of the design. It has three layers.

**1. Middle points.** Each channel's carrier (`pwm_carrier`) is a CLK_0
counter that restarts at the valley between two pulses. Each run of the
counter holds one pulse, centred on a *middle point* `m`.

* `m` is kept in eighths of a cycle, measured from the start of the run.
* When the counter reaches the coarse part of `m`, the next middle point is
  `m + period`.
* The run length L is the CLK_0 edge at or before the half-way point
  between the two middle points. `8·L` is then subtracted, so the next
  middle point is in the next run's frame.

A period of 315.125 cycles thus gives runs of 315 and 316 cycles. The middle
points stay exactly 315.125 cycles apart.

**2. Set and reset instants.**

* set = `m − duty/2`, reset = set + duty, both in eighths.
* An instant `p` becomes a one-cycle pulse (SETD or CLRD) in coarse cycle
  `(p−1) >> 3`.
* It also gets a 3-bit select `sel = (−p) mod 8`.

**3. The phase path** (`pwm_phase_path`, one each for set and reset of
every channel) moves the pulse by `8 − sel` eighths.

1. The pulse passes two CLK_0 flip-flops.
2. A first rank of flip-flops samples it on the rising edges of CLK_45,
   CLK_90 and CLK_135 and on the falling edge of CLK_0.
3. A second rank samples it on the falling edges of the 45/90/135 clocks and
   on the next rising edge of CLK_0.
4. The asynchronous 8:1 multiplexer `pwm_mux8` picks one of the eight taps.

`sel = 4` is the falling edge of CLK_0, half a cycle late. `sel = 0` is the
next rising edge, a whole cycle late. The set and reset paths drive an
edge-triggered latch (`pwm_sr_latch`), which is built from two toggle
flip-flops and an XOR, so it has no combinational loop.

Every edge therefore comes out a fixed 3 cycles + 1 eighth after its
instant. The same delay applies to set and reset, so widths and periods are
exact. `tb_dpwm` measures them to 20 ps.

**Synchronization of the channels.** Channel 0 is the master. The command
`sync[i] = S` means: *when the master is at its middle point, channel i is
at position S of its own cycle.* A channel's position is the time since its
own middle point plus half a period.

At each master middle point every other channel measures its position. The
difference from S, wrapped into ± half a period, shortens or lengthens that
channel's next period. A large phase step is spread over several periods,
so no period drops below duty + `MIN_OFF`.

The resulting rising-edge delay of channel i after channel 0, in steps of
0.96 ns, is

    (period/2 − S + duty0/2 − duty_i/2)  mod period

Two examples:

* S = 0 puts the two pulses half a period apart (the primary half bridge).
* S = 1.5 cycles puts them 1.5 cycles closer. The document's example uses
  this.

**ADC flag.** `adc_flag` is high from master count `adc_time` to the end of
the master run. The top synchronizes it into the 100 MHz domain and turns
its rising edge into `adc_start`. The point is taken over in the first cycle
of each run, so a new command never gives two triggers in one run.

**Loading commands.** `control_done` (100 MHz) is registered and passed
through a two-flip-flop synchronizer. Its rising edge in the CLK_0 domain
copies all command words at once. A period or duty change takes effect at
the channel's next middle point.

**Shoot-through guard.** When `guard_en` is set, channels 0/1 and 2/3 are
paired. Each output is passed only while the other of its pair is low
(`a & (a ^ b)`). Overlapping commands then never turn both switches on.

## The control pass (`llc_control_fsm`)

One pass starts on `adc_ready`. Each state is one 100 MHz step:

1. **Filter** the output voltage and the reference (first order, shift
   `FILT_SHIFT`).
2. **Over-current** (`oc_in`, or a current sample above `I_LIMIT`): skip the
   loops and go straight to the highest frequency (`P_MIN`).
3. **Voltage loop:** error, PI (Q8 gains `KP_V`, `KI_V`), limit to a current
   reference.
4. **Current loop:** error, PI (`KP_I`, `KI_I`). The output is the period
   command, limited to 375 kHz … 1.2 MHz (`P_MAX`, `P_MIN`).
5. **Over-frequency:** if the loop asks for more than 1.2 MHz, the period is
   held at `P_MIN` and `force_off` is set on all channels. The converter
   stops switching (pulse skipping) until a later pass asks for a lower
   frequency.
6. **Primary commands:**
   * duty = period/2 − dead time (14 cycles);
   * ADC point = period/8 − 40 cycles;
   * primary sync = 0 (half a period).
7. **Secondary synchronization** (28 steps). The rectifier must conduct in
   phase with the secondary current. That current leads the primary pulse by
   an angle the tank sets:

       φ = atan( (K1 − K2·ts²) / (K3·ts − K4·ts³) ),   ts = switching period

   with K1 = 8π³·Cr·Lm·Lr, K2 = 2π·Lm, K3 = 4π²·Cr·Rac·(Lm+Lr), K4 = Rac.
   The computation:
   * The period command p stands in for ts directly. The 0.96 ns step and
     the Q12 scaling of the arctangent argument are folded into four
     single-precision constants (`KN0`, `KN2`, `KD1`, `KD3`).
   * p² is formed exactly in integer and converted.
   * The chain is: two products → two differences → denominator product →
     reciprocal estimate → quotient → integer.
   * The arctangent is a 16-segment piecewise-linear table over 0 … 8,
     saturating above.
   * The offset `φ/2π·period` places the rectifier channels.
   * Their duty is limited to the resonant half period less the dead time
     (933 steps). Below resonance the secondary current ends early.
8. **Publish:** all commands change together, and `control_done` pulses.

The floating-point units are issued back to back where the data allow.
Waiting for their pipelines takes most of step 7.

### Where the numbers come from

| item | value | source |
|---|---|---|
| frequency range | 375 kHz … 1.2 MHz | document |
| start frequency | 750 kHz (P_START = 1387) | document |
| clocks | 100 MHz control, 130 MHz × 4 phases | document |
| step count | 44 (document: 47 = 18 + 29) | this design |
| tank: Lr, Lm, Cr, transformer ratio 3.75, 1.5 Ω load | as given | document |
| Rac | 17.1 Ω, fixed at the nominal load (8n²/π² · 1.5 Ω) | this design |
| PI gains, filter, current limit, dead time, ADC lead | parameters | this design |

The document gives the flowchart and the formula but no loop coefficients.
It mentions *dynamic* loop coefficients and a special start-up routine
without describing them. Neither exists here: the gains are fixed, the
controller simply starts at 750 kHz, and Rac does not follow the load. The
loop was tuned only far enough to regulate the converter stand-in in the
top-level testbench. Treat the gains as placeholders for a real power
stage.

## Floating-point units

Single-precision format (1/8/23), with these simplifications:

* exponent 0 reads as zero;
* no denormals, infinities or NaN;
* results are truncated;
* overflow saturates to the largest magnitude.

| module | what | latency | notes |
|---|---|---|---|
| `fp_sub` | a − b | 5 clocks, one new operation per clock | align, subtract, normalize in 4 stages after the input register |
| `fp_mul` | a × b | 3 clocks | mantissas truncated to 18 bits (`MANT_BITS`) before the product, to fit one hardware multiplier |
| `fp_recip` | ≈ 1/x | 1 clock | 16-point table indexed by the 4 top mantissa bits, 7-bit linear interpolation, 11-bit result mantissa; worst relative error 0.098 % |
| `fp_convert` | u32 ↔ float | 1 clock | float → integer ignores the sign and saturates above 2³² |

The reciprocal table is computed, not stored as a file:

* the points are `P[i] = round(4096·(16−i)/(16+i))`, which is
  `2·4096/(1+i/16) − 4096` in Q12;
* each segment subtracts a bias of `round(131072/(33+2i)³)`;
* the bias centres the chord error of the 1/x curve.

## Departures from the document

* **Channel synchronization.** The document loads each channel's counter
  from its sync word when the master reaches its middle point. This design
  measures the channel's position and corrects its next period. The meaning
  of the sync word is the same. The gain is that a fractional period never
  makes a channel's counter jump.
* **Select encoding.** The multiplexer select follows the prose: select 4
  is the falling edge of CLK_0, and select k delays by 8−k eighths. A
  listing the document prints orders its inputs differently.
* **Period example.** One example in the document pairs the period word
  2080 with 507.8125 kHz. 2080 is 260 cycles, which is 500 kHz. This design
  uses 11.3 fixed point throughout, which matches the word and its 260
  count.
* **Control steps.** The pass takes 44 steps rather than 47. Its
  state-by-state split is this design's own.
* **Not built:**
  * the ADCs themselves;
  * the DSP / communication link of other partitioning options;
  * gate drivers and the power stage.

  The top brings their signals out as ports.
* **The PLL** is a behavioural model (`pll_4phase_model`, ports named like
  the vendor primitive). It makes the four phases from a fixed 130 MHz
  period and raises LOCK after 8 input edges. Replace it with the FPGA's
  PLL for synthesis. Yosys' coarse synthesis does not take the model (or
  the top that contains it); both lint and elaborate cleanly.

## Top level (`llc_controller_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 100 MHz clock, asynchronous active-low reset |
| `adc_start` | out | one-cycle conversion request (rising edge of the synchronized DPWM flag) |
| `adc_ready`, `v_out`, `v_ref`, `i_pri` | in | samples, valid during the `adc_ready` pulse (12 bits, `ADC_BITS`) |
| `oc_in` | in | over-current comparator, sampled with the data |
| `guard_en` | in | shoot-through guard on |
| `gate[3:0]` | out | 0/1 primary half bridge, 2/3 synchronous rectifier |
| `pll_lock`, `state`, `overcurrent_evt`, `overfreq_evt` | out | status |

Reset and timing:

* The DPWM is held in reset until two CLK_0 edges after PLL lock.
* The converter must answer `adc_start` within about 360 ns to keep the
  loop within one period at 1.2 MHz.
* It must not send new samples while a pass runs (`state` ≠ 0).

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`tb_fp_util.sv` is a package of real ↔ float helpers shared by the
testbenches. With verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_llc_controller_top \
  rtl/dpwm_pkg.sv rtl/fp_pkg.sv tb/tb_fp_util.sv tb/tb_llc_controller_top.sv
obj_dir/Vtb_llc_controller_top +verilator+rand+reset+2
```

Swap the top module and file for any other testbench. The design is
written for two-state simulation with random initial values.

| testbench | covers |
|---|---|
| `tb_pwm_mux8`, `tb_pwm_sr_latch`, `tb_pwm_phase_path` | every select, latch edge orders, the 8 delays in eighths |
| `tb_pwm_counter` | rebuilds every instant from SETD/CLRD and selects: exact widths, exact fractional periods, sync phases, limits, FORCE_OFF, ADC flag |
| `tb_pll_4phase_model` | period, 45° offsets, lock |
| `tb_dpwm` | gate edges timed in ns: the 315.125 / 143.5 / sync 1.5 example, a fractional period on all channels, phases, guard, FORCE_OFF, ADC rises |
| `tb_fp_sub`, `tb_fp_mul`, `tb_fp_recip`, `tb_fp_convert` | random and directed operands against real arithmetic, latencies, saturation, the document's multiplication example |
| `tb_llc_control_fsm` | pass length (44 cycles), every command against an independent real-number evaluation of the phase formula, loop direction, over-current, pulse skipping in and out |
| `tb_llc_controller_top` | the whole design at its default parameters (see below) |

`tb_llc_controller_top` closes the loop with a crude converter stand-in: the
output moves towards a level proportional to the switching period, and
falls when pulses stop. A 360 ns ADC stand-in feeds it. The run:

1. regulates at a reference;
2. applies over-current;
3. drops the reference until pulses are skipped;
4. recovers.

It counts each mechanism and fails if one never occurred: ADC triggers,
control passes, period changes, over-current, over-frequency, skip gaps and
rectifier pulses. It also checks that the primary pair never overlaps, that
no sample arrives during a pass, and that the gate period stays within the
frequency range. It simulates about 1 ms in under a second.
