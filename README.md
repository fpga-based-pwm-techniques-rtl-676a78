# Counter-based digital PWM generators for a single-phase inverter

A full-bridge inverter turns a DC supply into AC by switching four power
transistors. If the two diagonals of the bridge are switched with a
pulse-width-modulated signal, the PWM duty cycle sets the RMS output voltage,
and a slower rectangular wave that chooses which diagonal conducts sets the
output frequency and polarity. This RTL generates that PWM signal digitally,
with counters and comparators instead of an analog triangle-versus-reference
comparator. Digital generators do not drift with temperature, noise or
component tolerances.

Three classic digital PWM generator topologies are implemented side by side:

| generator | module | duty word | period | PWM at 50 MHz |
|---|---|---|---|---|
| high frequency counter based | `hf_pwm_gen` | 8 bit | 256 clocks | 195.3 kHz |
| counter based (down counter) | `counter_pwm_gen` | 4 bit | 16 clocks | 3.125 MHz |
| cascaded counter based | `cascaded_pwm_gen` | 8 bit (2 x 4-bit counters) | 256 clocks | 195.3 kHz |

The counter based generator also drives the inverter gate logic
(`inverter_gate_drive`). The widths are those of the reference design. The
50 MHz clock is that of the board it was run on.

## How each generator makes a pulse

All three share one idea. A counter defines the PWM period, a comparison with
the duty word marks the end (or start) of the pulse, and an RS latch holds the
output between the two events. Each RS latch is written as a clocked
flip-flop (`pwm_pkg::rs_next`). If set and reset arrive in the same cycle,
**reset wins**. This is why a duty word of 0 gives a constant low output.
Every generator has a `period_start` output that is high in the first cycle
of each period. Call that cycle k = 0. In every generator the PWM output
changes one clock after the event that causes the change.

### Counter based generator (`counter_pwm_gen`)

- A free-running 4-bit up counter divides the clock down to the switching
  frequency. Its overflow is the *Load* pulse at k = 0.
- On Load, the 4-bit down counter is loaded with the duty word K, and the
  latch is set.
- The down counter counts down and stops at zero. A zero detector (true when all
  count bits are zero) resets the latch.
- The zero detector looks at the value the counter will take at the next
  clock edge. The set/reset latch and its output D flip-flop are folded into
  one flip-flop. Together, these two choices make the output **high for
  exactly K cycles**, at k = 1 ... K.
- Duty cycle = K/16, from 0 to 15/16 (93.75 %). K is sampled only at Load,
  so changing it mid-period is glitch free.

### High frequency counter based generator (`hf_pwm_gen`)

- An 8-bit free-running counter is compared with an 8-bit duty register.
- The register loads the duty input when the counter wraps, so a new word
  takes effect at a period boundary. Exactly, the register loads in the last
  cycle of a period, so the new word is compared from k = 0 onward.
- The comparator's EQUAL output and the counter overflow drive the latch.
  The reference description is inconsistent about which of the two sets the
  latch, so the parameter `MATCH_SETS` selects:
  - `MATCH_SETS = 1` (default). EQUAL sets the latch and overflow resets it.
    This is the wiring of the block description and block diagram. The
    output goes high after the match and stays high up to and including the
    next k = 0. That is **256 − D high cycles per period for D ≥ 1**, and
    always low for D = 0. So a larger word gives a *narrower* pulse.
  - `MATCH_SETS = 0`. Overflow sets the latch and EQUAL resets it. This is
    the wiring of the synthesized schematic. The output is high at
    k = 1 ... D, so duty = D/256.

### Cascaded counter based generator (`cascaded_pwm_gen`)

- Two 4-bit counters share the clock. The low counter's overflow enables the
  high counter, so {high, low} is one 8-bit count.
- An 8-bit comparator matches the count against the duty word.
- The high counter's overflow (k = 0) sets the latch and the match resets
  it. The output is high at k = 1 ... D, so duty = D/256.
- This generator has no duty register: the word goes straight into the
  comparator. Change it near the start of a period. A change in mid-period
  can shorten one pulse, or, if the new word has already been passed, stretch it into the next period.

### Shared counter (`up_counter`)

`up_counter` is an N-bit up counter with an enable. It has two outputs for
the wrap:

- `carry` is combinational. It is high in the enabled cycle that holds all
  ones, and cascades the counters.
- `overflow` is the registered carry. It is high in the first cycle of the
  next period.

Reset sets `overflow`, so the first cycle after reset starts a period.

## Driving the bridge (`inverter_gate_drive`, `pulse_wave_gen`)

```
S1 = S3 = pwm AND pulse        (+Vdc across the load during a PWM pulse)
S2 = S4 = pwm AND NOT pulse    (-Vdc across the load during a PWM pulse)
```

S1/S2 and S4/S3 are the two legs of the bridge. Because the two diagonals
use `pulse` and `NOT pulse`, the two switches of one leg are never on
together. A concurrent assertion (`a_no_shoot_through`) checks this in simulation.
No dead time is added, so real power switches with slow turn-off would need
it added.

`pulse_wave_gen` makes the rectangular wave. It counts PWM periods (the
generator's `period_start`) and toggles after `HALF_PERIODS` of them. Each
half cycle of the AC output therefore holds exactly `HALF_PERIODS` PWM
pulses. The toggle happens at k = 1, while the counter based generator's
output is low, so no pulse is split between two half cycles.

The output frequency is f_pwm / (2 · HALF_PERIODS). The default of 31250
gives 50 Hz with the 4-bit generator at 50 MHz. The reference design does
not give this value; it is a choice of this RTL. The volt-seconds per half
cycle are the sum of the duty words used in that half, times one clock
period of Vdc.

## Top level (`pwm_inverter_top`)

The top instantiates the three generators, each with its own duty input
(`hf_duty`, `cb_duty`, `cc_duty`) and outputs (`*_pwm`, `*_period_start`).
It feeds `cb_pwm` into the gate logic, whose outputs are `pulse` and
`gates`, a packed `gate_t` struct `{s1, s2, s3, s4}` from `pwm_pkg`. On the
original board the 4-bit word came from slide switches, the PWM went to an
LED, and a push button reset the design.

Several parts are not in this RTL and sit outside the chip, connected
through the top's ports:

- the power bridge;
- an A/D converter that would measure the output;
- a DSP or microcontroller that would choose the duty words.

Reset is synchronous and active high. It stops every generator with its
output low and clears the pulse wave.

Parameters of the top are `HF_WIDTH` (8), `HF_MATCH_SETS` (1), `CB_WIDTH` (4),
`CC_DIGIT_WIDTH` (4) and `HALF_PERIODS` (31250).

## Files

| file | contents |
|---|---|
| `rtl/pwm_pkg.sv` | default sizes, `gate_t`, reset-dominant latch function |
| `rtl/up_counter.sv` | N-bit counter with carry and registered overflow |
| `rtl/hf_pwm_gen.sv` | high frequency counter based generator |
| `rtl/counter_pwm_gen.sv` | down-counter based generator |
| `rtl/cascaded_pwm_gen.sv` | cascaded 2 x 4-bit counter generator |
| `rtl/pulse_wave_gen.sv` | rectangular wave locked to the PWM period |
| `rtl/inverter_gate_drive.sv` | AND gating for S1..S4 |
| `rtl/pwm_inverter_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench compares the outputs, cycle by cycle, with values it works
out itself. It ends by printing `TB_RESULT checks=N failures=M`. A watchdog
stops a hung run and counts it as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pwm_pkg.sv tb/tb_pwm_inverter_top.sv \
          --top-module tb_pwm_inverter_top -Mdir obj && obj/Vtb_pwm_inverter_top
```

Use the same command for any other `tb/tb_<module>.sv`. Verilator finds the
modules in `rtl/` through `-Irtl`.

- `tb_counter_pwm_gen` applies the 4-bit words measured on the original board
  (0100, 0110, 1100, 1000, 1111, 0010, 1001), plus 0 and random words.
- `tb_hf_pwm_gen` runs both latch wirings at 8 bits.
- `tb_cascaded_pwm_gen` includes the words whose match falls on a
  low-counter wrap.
- `tb_pwm_inverter_top` runs the top at its default parameters through two
  full 50 Hz output cycles, which is about two million clocks and takes a few
  seconds. It checks:
  - every generator's period length and high time;
  - the gate logic;
  - the +Vdc and −Vdc volt-seconds of each half cycle;
  - that reset stops everything.

  It also counts zero and full-scale words, duty register reloads, polarity
  switches and reset, and fails if any of these never happened.

## Where this RTL departs from, or fills in, the reference design

- **Latch implementation.** Each RS latch is a clocked flip-flop with reset
  priority, not a level-sensitive latch.
- **Counter based generator.** The reference shows the zero detector feeding
  a D flip-flop that resets the latch. Here the zero detector looks one count
  ahead, and latch and flip-flop are one register. This gives exactly K high
  cycles. The divider that makes the Load pulse is not drawn in the
  reference; here it is a 4-bit up counter, which makes the period 16
  clocks. That divider adds five flip-flops, so this generator uses ten
  flip-flops, where the reference reports five for its counter and latch.
- **High frequency generator.** The default wiring (`MATCH_SETS = 1`) follows
  the block description, in which the high time is 2^N − D. The formula
  duty = K/2^N quoted for the 4-bit test holds for the other wiring.
- **Overflow timing, reset behaviour and duty register load timing.** These
  are not given by the reference and are chosen as described above.
- **Pulse wave.** Its frequency and its locking to the PWM period are this
  design's choices.
- **Not implemented.**
  - The analog PWM methods (single pulse, multiple pulse, sinusoidal and
    modified sinusoidal PWM made with a triangle carrier and a comparator).
    They are analog circuits.
  - The half-bridge inverter.
  - The power stage, the A/D converter and the controller.
  - FPGA resource figures for the original device. They are vendor-tool
    results and are not reproduced.
