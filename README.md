# On-chip ramp test for ADC static errors

This is SystemVerilog for a built-in self-test (BIST) structure. It checks
the static specifications of an n-bit analog-to-digital converter on the
chip: offset error, gain error, integral nonlinearity (INL) and differential
nonlinearity (DNL). It follows the structure published as *"An on Chip ADC
Test Structure"*.

The main idea is to test an ADC without measuring any voltage. An
integrator produces a linear ramp from V_il to V_ih. An (n+1)-bit
reference counter runs in step with the ramp, so each counter value stands
for one half-LSB slice of the input range. Whenever the ADC's code changes,
the counter's value at that moment says where on the ramp the change
happened. A few gates then decide whether that position is acceptable. A
full test takes 2^(n+1) counter clocks: 4096 µs for the 11-bit example at
1 MHz.

The digital half (counter, analyzer, output multiplexer) is synthesizable.
The analog half (integrator, comparators, analog switches) is given as
behavioural models with `real` ports, so that the whole loop can be
simulated. The ADC under test is not part of the design. Its input and its
code are ports of the top module.

## How one transition is judged

Take LSB = (V_ih − V_il) / 2^n. The counter is preset to **2** and starts
counting when the ramp crosses V_il. Counter value 2 + j is therefore shown
while the ramp is in the j-th half-LSB slice above V_il. The counter wraps
modulo 2^(n+1), so after the full ramp it is back at 2.

An ideal ADC changes from code k−1 to k at V_il + (k − ½) LSB. An accuracy
of ±½ LSB allows that change anywhere in [V_il + (k−1) LSB, V_il + k LSB].
That interval is exactly the two counter values 2k and 2k+1. So the INL
check needs no arithmetic: **the new code must equal the counter's upper n
bits, C[n:1]**. The preset of 2 is what makes this true. The first
transition (0→1) is also the offset check, and the last one is the gain
check.

| transition (2-bit ADC) | new code | counter values accepted |
|---|---|---|
| 0 → 1 (offset, INL) | 01 | 010, 011 |
| 1 → 2 (INL) | 10 | 100, 101 |
| 2 → 3 (gain, INL) | 11 | 110, 111 |

Every code change flips the LSB D0. So a detector on D0 alone (D0 XOR
delayed D0, giving the pulse **Tran**) sees every transition.

**DNL.** The distance between two neighbouring transitions should be
between ½ and 3/2 LSB. The counter clock splits each counter value into two
quarter-LSB halves: clock high first, then low. Within an INL window
{2k, 2k+1}, C0 and the clock level give the quarter:

| quarter of the INL window | C0 | clock level |
|---|---|---|
| first (earliest) | 0 | 1 |
| second | 0 | 0 |
| third | 1 | 1 |
| fourth (latest) | 1 | 0 |

Suppose both transitions passed the INL check. Then two patterns are
certainly bad:

* first quarter, then fourth quarter of the next window: the distance is
  more than 3/2 LSB.
* fourth quarter, then first quarter of the next window: the distance is
  less than ½ LSB.

The DNL detector stores (clock level, C0) at each Tran. It drops **Ti**
when the previous and the current pair form either pattern. Because of the
quarter-LSB resolution, a DNL error that is only slightly out of range is
not caught. Only the "certain" cases are flagged.

**Completion.** A healthy ramp makes D0 rise 2^(n−1) times. An n-bit
counter counts these rises, and its MSB (C_tn) becomes 1 at that count.
When EN-cnt falls at the end of the ramp, flip-flop FF2 loads C_tn into
**Fi**. Fi = 0 means missing codes or a stuck LSB.

**Pass.** FF1 registers Ri & Ti on every clock, and `pass = FF1 & Fi`.
Pass is therefore *not sticky* within a test:

* It drops two clk ticks after a faulty transition.
* It comes back after the next good one.

To catch every fault, watch `pass` during the whole ramp. After the ramp,
`pass` shows the result of the last transition and of the completion check.

## Ramp generator and calibration

`adc_bist_itpg` is the input test pattern generator. It has three parts:

* **Calibration control.** `inte` is the flip-flop on (Cali | Test),
  clocked at the counter clock's rising edge. `init` is the inverse of
  (Cali | Test). With Cali = Test = 0, the capacitor is tied to V_init.
* **Integrator (OTA-C).** The slope is g_m·V_gm/C_out, so a full swing ΔV
  in time T needs V_gm = C_out·ΔV / (g_m·T). Example: for 5 V in 4096 µs
  with C_out = 3 pF and g_m = 1 µA/V, V_gm = 3.66 mV.
* **Window comparator and chopper.** EN-cnt = (V_out > V_il) AND
  (V_out < V_ih). Inside the window the ramp is passed to V_ts. Outside it,
  V_ts is held at the nearer bound, so the ADC reads code 0 before a ramp
  and full scale after it.

Synchronization is the user's job: choose V_init (and trim V_gm) so that the
counter leaves 2 just after the ramp passes V_il. With `cali = 1` the
integrator runs and `dout` shows the counter's low n bits in place of the
ADC code, so the start and end of counting can be watched.

In the models, the ramp advances once per clk tick, by 1/(2·TICKS_PER_CLOCK)
LSB: a quarter LSB with the defaults. Integration always starts on a
counter clock rising edge. Putting V_init = V_il − (TICKS_PER_CLOCK − ½)
steps then places the ramp samples at V_il + (m + ½) steps. That is
exactly the alignment the analyzer assumes, and it is what the testbenches
use.

## Clocking in this implementation

The published circuit is partly asynchronous: flip-flops clocked by Tran,
a delay line in the transition detector, and the counter clock sampled as
data. Here everything runs on one clock, `clk`. It is `TICKS_PER_CLOCK`
(default 2) times faster than the counter clock f = 2·f_oper.
`adc_bist_clk_phase` derives two signals from it:

* `clk_state`: the counter clock level, high in the first half of a period.
* `rise`: a strobe in the last tick of each period. The clk edge that ends
  this tick is the counter clock's rising edge.

Other consequences of the single clock:

* Tran is one clk tick wide.
* Ri and Ti change one tick after Tran.
* The ADC code must be synchronous to `clk`. A real asynchronous ADC output
  would need a synchronizer, which is not included.

## Files

| file | contents |
|---|---|
| `rtl/adc_bist_pkg.sv` | defaults (n = 11, preset 2), the (clock level, C0) struct and the quarter positions |
| `rtl/adc_bist_top.sv` | the complete structure; the ADC under test is outside it |
| `rtl/adc_bist_digital.sv` | all synthesizable logic in one module |
| `rtl/adc_bist_clk_phase.sv` | counter clock level and rising-edge strobe |
| `rtl/adc_bist_ref_counter.sv` | (n+1)-bit reference counter |
| `rtl/adc_bist_tra.sv` | test response analyzer: FF1, FF2 and Pass around the four detectors below |
| `rtl/adc_bist_tran_detector.sv` | Tran = D0 XOR delayed D0 |
| `rtl/adc_bist_inl_detector.sv` | Ri: code == C[n:1] at Tran |
| `rtl/adc_bist_dnl_detector.sv` | Ti: the two quarter patterns |
| `rtl/adc_bist_tran_counter.sv` | count of D0 rises, C_tn |
| `rtl/adc_bist_dmux.sv` | D_out = ADC code or counter (Cali) |
| `rtl/adc_bist_cal_ctrl.sv` | Inte / Init switch control (synthesizable) |
| `rtl/adc_bist_itpg.sv` | ramp generator, behavioural |
| `rtl/adc_bist_integrator.sv` | OTA-C integrator, behavioural |
| `rtl/adc_bist_window_comp.sv` | window comparator and chopper, behavioural |
| `rtl/adc_bist_amux.sv` | analog input multiplexer (V_Ain or V_ts by Test), behavioural |
| `tb/adc_cut_model.sv` | ADC model with movable transition voltages and a stuck-LSB option |
| `tb/adc_bist_harness.sv` | one structure plus ADC model at a chosen size, with a checking ramp task |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two system tests |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 11 | ADC bits; the counter has N+1 bits and the transition counter N |
| `TICKS_PER_CLOCK` | 2 | clk ticks per counter clock period (even, at least 2) |
| `VIL`, `VIH` | 0.0, 5.0 | test range in volts |
| `GM` | 1e-6 | transconductance in A/V (assumed value) |
| `COUT` | 3e-12 | integration capacitor in F |
| `T_TICK` | 0.5e-6 | clk period in s (1 MHz counter clock, 2 ticks) |

The defaults follow the paper's 11-bit example (f_oper = 0.5 MHz,
V_il = 0 V, V_ih = 5 V), except the g_m value and `TICKS_PER_CLOCK`. The
synthesizable logic at the defaults is about 36 word-level cells and 32
flip-flops.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/adc_bist_pkg.sv tb/tb_adc_bist_top.sv --top-module tb_adc_bist_top
./obj_dir/Vtb_adc_bist_top
```

Replace the testbench name to run any other. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/adc_bist_pkg.sv rtl/adc_bist_top.sv`.

The system tests are:

* **`tb_adc_bist_top`**: the full-size design (11-bit ADC, defaults
  untouched). It runs eight complete ramps:
  * an ideal ADC;
  * an INL fault at code 009h;
  * a DNL fault at 7F3h (code only ¼ LSB wide);
  * a DNL fault at 100h (code 7/4 LSB wide);
  * an offset error;
  * a gain error;
  * a missing code;
  * an LSB stuck at 0.

  Then it checks calibration mode and the normal signal path. For every
  transition it predicts Ri and Ti on its own, from the model's thresholds.
  It checks the test time (2^12 counter clocks) and counts that each fault
  mechanism happened. It runs in about one second.
* **`tb_adc_bist_top_small`**: the small examples used to explain the
  method.
  * A 3-bit ADC with V_il = 1 V, V_ih = 4 V and a 2 µs counter clock. The
    counter must run 2…15, 0, 1 and rest at 2.
  * A 2-bit ADC, with both DNL patterns and an INL error.
  * The 3-bit case again with `TICKS_PER_CLOCK = 4`, with DNL and INL
    faults.

## Where this departs from the paper, and limits

* **Single synchronous clock.** See "Clocking in this implementation". The
  published circuit's Tran-clocked flip-flops and delay line become clk
  flip-flops with enables.
* **FF1 is clocked by clk.** Its clock source in the published schematic is
  not clear. With clk, Pass drops right after a bad transition and recovers
  after the next good one, as in the published waveforms.
* **Ti is held.** Ti is registered and holds its value until the next
  transition. In the published waveforms it is only a short pulse.
* **Reset values are this design's own.** Ri = Ti = Fi = 1, and the stored
  DNL position is a value that matches neither pattern, so the first
  transition is never judged for DNL.
* **INL compares all n code bits with C[n:1].** This is what the
  description and the 2-bit table require. The published INL schematic
  draws the pairs only up to D_{n−2}/C_{n−1}.
* **Calibration output uses C[n−1:0].** In calibration mode `dout` carries
  the low n counter bits; which bits to show is not specified.
* **V_ts outside the window.** It is held at the nearer bound, V_il or
  V_ih. What V_ts does while S1 is open is not specified. Holding the last
  value instead would leave the ADC at full scale when the next test
  starts, and that gives false INL faults.
* **Analog parts are ideal.** The integrator is perfectly linear and never
  saturates, and the comparators have no offset or delay. The paper notes
  that the method is only as good as the integrator's linearity and its
  synchronization with the counter. Those effects are not modelled here.
  Neither are the compensation techniques (current conveyor, phase
  compensation) that the paper mentions for the real OTA.
* **The ADC model converts continuously.** A real ADC sampling at f_oper
  would change its code only on its own sampling edges. The quarter-LSB
  DNL positions assume changes can occur in either half of the counter
  clock.
* **Pass is not sticky.** As noted above, watch it during the ramp.
