# A radiation-hardened digital phase-locked loop

A conventional charge-pump PLL keeps its loop state as an analog voltage on a
filter capacitor. Total ionising dose shifts the transistor thresholds, so the
charge-pump currents and the oscillator tuning curve drift. A single particle
strike on the filter node kicks the oscillator far off frequency, and nothing
can vote that voltage back.

This design moves almost all of the loop into digital logic:

- a time-to-digital converter (TDC) measures the phase error as a number;
- a digital proportional-integral filter turns that number into a control word;
- the control word tunes a ring oscillator.

Only the oscillator and a delay line stay analog. Every sequential element
whose upset would disturb lock is triplicated, with a 2-of-3 majority vote:

- the last three divider stages;
- the phase/frequency detector;
- the TDC's sign and upper latches;
- the ten upper bits of the filter's accumulator.

The RTL here is the digital core, plus behavioural models of the two analog
parts, so that the whole loop can be simulated. The models are:

- the digitally controlled oscillator;
- the TDC delay line.

## The loop

```
            +-----------+   UP/DN   +-------------------------+   PE (10b, signed)
 ref_clk -->| TMR PFD   |---------->| TDC: OR, latches, sign, |-----------+
        +-->| (3 PFDs + |           | pseudo-thermometer enc. |           |
        |   |  2 votes) |           +-----------^-------------+           v
        |   +-----------+         or_pulse |    | taps (9)      +-----------------+
        |                                  v    |               | PI loop filter  |
        |                         +-------------------+          | alpha=1,        |
        |                         | matching delay +  |          | beta=2^-5,      |
        |                         | exp. delay chain  | (model)  | Gn=0.5          |
        |                         +-------------------+          +--------+--------+
        |                                                                 | ctrl (10b, unsigned)
        |   +-------------------------+  out_clk   +----------------+     |
        +---| divider /8 /16 /32 /64  |<-----------| DCAO (model)   |<----+ coarse = ctrl[9:4]
  div_clk   | stages 4-6 triplicated  |            | 3-stage ring   |       fine = {ctrl[3:0],00}
            +-------------------------+            +----------------+
```

Once per reference cycle, the loop does the following:

1. The PFD pulses UP (the reference is ahead) or DN (the divided clock is
   ahead).
2. The TDC converts the pulse width into a signed number of unit delays.
3. The filter updates the accumulator and the control word.
4. The oscillator frequency follows the new control word at once.

At lock the phase error sits at 0 to ±2 unit delays. The output is
N × f_ref, where N is set by `div_sel`.

| `div_sel` (DIV1:DIV0) | ratio |
|---|---|
| 00 | 8 |
| 01 | 16 |
| 10 | 32 |
| 11 | 64 |

## Measuring phase: the TDC

This is the least obvious part of the design.

**The PFD.** It is the classic two-flip-flop detector. A reference edge sets
UP, a divided-clock edge sets DN, and both clear as soon as both are high.
The wider of the two pulses equals the time between the two edges.

**Width to taps.** The OR of UP and DN enters a delay line. It first passes a
matching delay, then nine buffer stages of 1, 1, 2, 4, 8, 16, 32, 64 and 128
unit delays (dT ≈ 80–100 ps in the original process; the model uses 90 ps).
Tap *i* therefore lags the pulse by 2^i dT. The nine taps span 1 to 256 dT,
fine at the short end and coarse at the long end. This is why an exponential
line beats a linear one: nine stages instead of 256.

**Capture.** On the falling edge of the OR pulse, nine latches capture the
taps. Latch *i* is high exactly when the pulse lasted longer than 2^i dT, so
the latches hold a thermometer code.

**Sign.** A separate flip-flop samples DN on the rising edge of UP. It is 1
(a negative error) when DN started first, that is, when the divided clock
leads the reference.

**Encoder.** The "pseudo-thermometer" encoder reports the delay of the last
high tap. Magnitude bit *i* = latch *i* AND NOT latch *i+1*, so the magnitude
is a one-hot power of two. The sign then negates it. The result is a 10-bit
two's-complement word in −256 … +256.

| pulse width w | latches high | phase error |
|---|---|---|
| w < 1 dT | 0 | 0 |
| 1 ≤ w < 2 dT | 1 | ±1 |
| 2^i ≤ w < 2^(i+1) dT | i + 1 | ±2^i |
| w ≥ 256 dT | 9 | ±256 |

The quantisation is logarithmic. Large errors are reported coarsely, which is
enough to steer acquisition, and small errors finely.

In `rtl/`, the digital part (the OR gate, latches, sign flip-flop and encoder)
is `tdc`. The delay line is the behavioural model `tdc_delay_chain`, connected
through `or_pulse` and `taps`.

## The loop filter arithmetic

The phase error `pe` feeds two paths.

- **Integral path.** A 16-bit saturating accumulator adds the sign-extended
  `pe`. Its adder output, the value about to be stored (all past errors plus
  the present one), is scaled by β = 2^-5 by keeping its upper 11 bits.
- **Proportional path.** α = 1: `pe` is only sign-extended to 11 bits.

An 11-bit saturating adder sums the two paths. The normalising gain Gn = 0.5
drops the LSB. The sign bit is then inverted, so zero error gives mid-scale:

```
acc'  = clamp16(acc + pe)                      stored on each TDC sample edge
sum   = clamp11(pe + floor(acc' / 32))
ctrl  = floor(sum / 2) + 512                   0 ... 1023
```

**Gains as shifts.** Every gain is a power of two, so it is wiring, not
multiplication.

**Saturation.** Both adders saturate. Overflow is "both operands non-negative,
sum negative"; underflow is "both negative, sum non-negative". Operands of
opposite sign cannot overflow. On either event a multiplexer substitutes
0111…1 or 1000…0.

**Structure.** The accumulator is built as sixteen one-bit slices (`acc_bit`).
Each slice is a full adder plus a register, chained by carry. The saturation
multiplexer sits in front of each slice's register. The ten upper slices keep
their bit in a triplicated register, and the voted value is what feeds back
into the adder.

**Clocking.** The filter is clocked by the TDC's own sample clock, the
inverted OR pulse. That gives exactly one accumulation per phase comparison.
The control word is combinational from `pe` and the accumulator, with no
output register, so the proportional path acts within the same reference
cycle.

## Oscillator and divider

**Oscillator.** The DCAO is a three-stage differential ring. Its delay cells
have a coarse and a fine tuning input, each driven by a binary-weighted
current-mirror DAC from a 6-bit word. The model reduces this to:

`f = 195.2 MHz + 6.4 MHz · coarse + 0.1 MHz · fine`

The core drives `coarse = ctrl[9:4]` and `fine = {ctrl[3:0], 2'b00}`. One
coarse step therefore equals the full fine range, and the frequency is linear
in `ctrl`: 195.2 MHz at 0, 400 MHz at 512, 604.4 MHz at 1023.

**Divider.** Six toggle flip-flops form a ripple chain. A 4:1 multiplexer
picks the /8, /16, /32 or /64 tap.

## Single-event hardening

`tmr_reg` is the building block: three flip-flops with common D and clock and
a `majority_voter` on their outputs. A strike on one copy is outvoted
immediately. Because all three copies reload the common D, the struck copy is
also repaired at the next clock edge.

| where | what is triplicated | why |
|---|---|---|
| divider stages 4–6 (/16, /32, /64) | the toggle flip-flop; the voted output is inverted and fed back as the common D | a flip there shifts the divided clock by 8–32 oscillator cycles |
| divider stages 1–3 | nothing | a flip moves the divided clock by only 1, 2 or 4 oscillator cycles (≤ 1/8 of a reference cycle at /32 and /64), and these fast stages burn most of the divider's power |
| PFD | three whole PFDs; UP voted, DN voted | a flipped PFD state is a false phase error |
| TDC | sign flip-flop and latches 3–9 | these carry the large-magnitude bits |
| accumulator | upper 10 of 16 bits | a flip there moves the control word by up to half its range |

Simulation bears out the table:

- With the loop locked, striking one copy of any triplicated element leaves
  the phase error at 0 for the next 100 reference cycles.
- A strike on the unprotected first three divider stages gives a phase error
  of 16, 32 and 64 dT at /64 (7 MHz reference), and the loop recovers.
- Flipping all three copies of the last stage at once drives the TDC to its
  256 limit. This is the damage that triplication prevents.

## Simulating

The testbenches use `force`/`release` on one copy of a triplicated register to
model a strike. Verilator reports the resulting multiple drivers as warnings,
hence `-Wno-fatal`. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/dpll_pkg.sv tb/tb_dpll_top.sv --top-module tb_dpll_top
./obj_dir/Vtb_dpll_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

`tb_dpll_top` runs the complete loop at its default sizes in well under a
second:

1. It locks at /32 from reset. With a 10 MHz reference this takes about 200
   reference cycles, and the control word settles at 312.
2. It strikes every hardened element and one unprotected divider stage.
3. It switches to ratios whose targets lie outside the oscillator range. The
   control word pins at 1023 or 0, with both adders saturating.
4. It locks at /8 (45 MHz reference), /16 (25 MHz) and /64 (7 MHz), checking
   exactly N output cycles per reference cycle.

Every mechanism is counted, and a failure is counted for any that never
happens. `tb_divider_strikes` covers the divider strike experiments above.

Each block has its own testbench, `tb/tb_<module>.sv`. They check against
independent reference models:

- integer models of the saturating adders, accumulator and filter;
- measured pulse widths for the PFD and TDC;
- oscillator-cycle counts for the divider;
- frequency measurement for the oscillator model.

File map:

| file | role |
|---|---|
| `dpll_pkg` | widths, gains, types, divider-select enum |
| `dpll_top` | full loop: `dpll_core` + `dcao` + `tdc_delay_chain` (simulation top) |
| `dpll_core` | all synthesizable logic |
| `freq_divider`, `div2_stage`, `tmr_div2_stage` | programmable divider |
| `tmr_pfd`, `pfd` | phase/frequency detector |
| `tdc`, `thermo_encoder` | TDC digital part |
| `loop_filter`, `accumulator`, `acc_bit`, `sat_adder` | PI filter |
| `tmr_reg`, `majority_voter` | triple redundancy |
| `dcao`, `tdc_delay_chain` | behavioural models (not synthesizable) |

## What is modelled, and what is this design's own choice

The following come from the original design:

- the block structure;
- every width: 10-bit phase error, 16-bit accumulator, 11-bit adder, 10-bit
  control word, 6-bit tuning words;
- the gains α = 1, β = 2^-5 and Gn = 0.5;
- the saturating-adder circuit;
- the exponential delay line and its ±256 range;
- the four division ratios and their select code;
- the list of triplicated elements.

The following are this implementation's choices, because the original leaves
them open:

- **Delay stages.** The nine stages are taken as 1, 1, 2, 4, … 128 dT. This is
  the one reading that gives nine stages spanning exactly 256 dT. A drawing of
  the same line shows three 1 dT stages before the 4 dT stage; that version
  would top out at 255 dT, and its taps would not be powers of two.
- **Encoder rule.** The last high tap gives ±2^i.
- **Signed to unsigned.** The control word is converted by inverting its MSB
  (offset binary).
- **Control word to tuning words.** The mapping onto the two 6-bit words is
  this design's own.
- **Oscillator numbers.** All frequencies and gains of the oscillator model
  are assumptions: 195–605 MHz, linear.
- **Filter clock.** The filter is clocked by the TDC sample edge.
- **Divider feedback.** Each hardened divider stage takes its feedback from
  the voted output.
- **Reset.** An asynchronous active-low reset is added on all state.
- **PFD reset delay.** The PFD has no reset delay, so aligned edges give
  zero-width glitches and the model's matching delay is 0. A real PFD has a
  minimum pulse width; set `MATCH_PS` in `tdc_delay_chain` to cancel it.

Not modelled at all:

- transistor-level behaviour: the TSPC flip-flop, the Lee/Kim delay cell, the
  current-mirror DACs and the off-chip resistor that sets the oscillator gain;
- total-dose drift;
- jitter.

The oscillator and delay-line models exist only so that the loop can be
simulated. They are not a characterisation of silicon.
