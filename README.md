# Small time-delay digital controller for a point-of-load buck converter

A point-of-load (POL) converter sits next to a low-voltage, high-current load and has to
react to load steps within microseconds. A conventional digital controller loses time in two
places: the A/D converter that samples the output voltage, and the arithmetic that turns the
sample into a duty ratio. This design removes both.

* **No ADC.** A stored waveform is played out through a DAC once per switching period and
  compared with the output voltage by an analog comparator. The moment the comparator flips
  is a time, and the counter value at that moment *is* the digitised output voltage. This is
  called ATC (analog-to-timing conversion) below.
* **No arithmetic.** Pre-computed duty ratios sit in a table that is read out in lock-step
  with the same counter. When the comparator flips, the word on the table's output is already
  the duty ratio for the voltage just sensed. A register captures it, and the DPWM uses it
  in the same switching period.

The RTL is the digital part of that controller. Everything analog stays outside: the DAC,
the comparator, the clock-doubling PLL, the gate driver and the power stage. For simulation
they are covered by a behavioural model in the testbench directory.

## Numbers

| quantity | value |
|---|---|
| system clock f_CLK | 33.3 MHz |
| waveform counter / memory1 | 8 bits, 256 x 8 |
| switching period | 256 clocks = 7.69 us (130 kHz) |
| DPWM clock | 2 x f_CLK = 66.6 MHz, 9-bit counter, duty step 1/512 |
| duty table (memory2) | 1024 x 9, addressed by a 10-bit PC |
| coefficient tables (memory3, memory4) | 256 x 11 each |
| DAC span | V-ref = 0.75 V (= Vref/2) to V+ref = 1.7 V, 8 bits, 3.7 mV per step |
| output reference | 1.5 V (DAC code 202) |
| proportional gain K_P | 1, 3, 5, 7 or 9 (default table: 5) |

The DAC does not span 0 V to full scale. Its bottom reference is half the output reference,
so its 256 steps cover only the upper half of the range, where the output voltage can be.
That gives roughly one extra bit of resolution for the same DAC.

The 130 kHz switching frequency is not a separate setting. It is 33.3 MHz / 256, one sweep
of the 8-bit counter. The 9-bit DPWM counter at twice the clock has the same period.

## How one switching period runs

```
            +-----------+  c(m)  +-----+ V'ref  +------+
 count m -->| memory1   |------->| DAC |------->| cmp  |<---- e_o
 (8 bit)    | waveform  |        +-----+        +------+
    |       +-----------+                          | v_comp
    |                                              v
    |   a-b  +----+ addr' +-----------+ word  +-----------------+
    +--------| PC |------>| memory2   |------>| latch register  |--> u(k) --> DPWM --> pwm
    |  load  | +1 |       | duty LUT  |       | Dff1 y2(k)=m    |
    |        +----+       +-----------+       | Dff2 n1(k-1)    |--> memory3 --> a
    |                                         | Dff3 y2(k-1)    |--> memory4 --> b
    +---------------------------------------->| Dff4 u(k)       |
                                              +-----------------+
```

1. **Waveform sweep.** At count 0 memory1 jumps to full scale (1.7 V at the DAC), which is
   above the output voltage, so the comparator output `v_comp` is low. The waveform then falls
   one step per clock.
2. **Sensing.** When the DAC level drops below e_o, `v_comp` goes high. The latch register
   takes the first clock in the period with `v_comp` high as the sensing instant. It loads the
   count m into Dff1 as y2(k), the current duty-table word into Dff4 as u(k), the old y2 into
   Dff3 as y2(k-1), and the input n1 into Dff2.
3. **Table sweep.** The PC was loaded with a - b at the start of the period and has counted
   up with m ever since. So memory2 is being read at address (a - b) + m, and the word
   captured at the sensing instant is the entry for the sensed level. With the default tables,
   a - b = 256.
4. **DPWM.** The 9-bit counter on the doubled clock drives `pwm` high while its count is
   below u(k). u(k) feeds the comparator directly, with no shadow register. Sensing happens
   early in the period, so the new duty word already shortens or lengthens the pulse that is
   in progress.
5. **Next period.** memory3[n1(k-1)] and memory4[y2(k-1)] give a and b. They set where the
   next sweep of memory2 starts. This shifts the operating point along the duty table without
   any arithmetic on the duty word itself.

### Alignment and latency

This is the part that needs care when changing the RTL. `v_comp` is asynchronous, so it
passes a two-stage synchronizer. Pieces of information arrive at the latch register with
these delays:

| signal | delay after count m is on the address bus |
|---|---|
| DAC word c(m) | 1 clock (synchronous memory1 read) |
| synchronized comparator result for c(m) | 1 + `SYNC_STAGES` = 3 clocks |
| memory2 word for PC = (a-b) + m | 1 clock, delayed `SYNC_STAGES` more inside the latch |

The latch register therefore works on an *aligned* count, m_al = count - 3. Its sensing window
is one aligned period, from 0 to 255. If e_o is above the top of the waveform, the sensing
happens at aligned count 0. If e_o is below the bottom, for example during start-up, there is
no transition. The latches then load at aligned count 255 and `miss` pulses. Either way there
is exactly one load per period.

The sensing-to-duty delay is 3 system clocks (90 ns). It adds to the memory read time and
sets the controller's whole computational delay.

### Clocks and reset

`clk2x` must come from the same PLL as `clk`, with a rising edge on every rising edge of
`clk`. No synchronizer sits between the two domains. Reset is asynchronous and active low.
On the first `clk` edge after release, a `run` flag rises and
enables both counters. The DPWM counter takes its first step on the next `clk2x` edge, half a
system clock before the waveform counter takes its first. From then on the DPWM count is
2m in the first half of each `clk` cycle and 2m + 1 in the second, where m is the waveform
count, so both periods begin on the same edge. The top module asserts
this (`a_locked`).

## Default table contents

The controller's behaviour is entirely in its four memories. All four can be rewritten at run
time through the `mem_wr` port (one word per clock: `sel` picks memory1..4). The defaults
are computed at elaboration by functions in `dpwm_pol_pkg`:

* **memory1 (waveform):** c(m) = 255 - m for m < 128, then 127 - 4(m - 128) down to 0, then
  0. This is a piecewise-linear fall. The fine first segment covers 1.7 V down to 1.22 V, and
  so the 1.5 V region, at one DAC step (3.7 mV) per clock. The steep second segment finishes
  the sweep quickly.
* **memory2 (duty):** u(i) = clamp(128 + K_P (202 - c(i - 256)), 0, 511). This is a
  proportional law around the nominal duty 128/512 (1.5 V out of 6 V in). K_P is in duty
  steps per DAC step.
* **memory3 / memory4:** every word is 256 / 0, which gives a - b = 256. The controller is
  then purely proportional. Integral or derivative action can be added by filling these
  tables, which turns the previous samples into shifts of the table sweep.

## Where this RTL departs from, or adds to, the original description

* **Latches:** the original shows the four latch flip-flops clocked by the comparator output
  itself. Here they are clocked by the system clock, with a load enable from the synchronized
  comparator output. The cost is the 3-clock latency above. The gain is a single clock domain
  with no metastability.
* **No-transition case:** forcing a load at the end of a window with no transition, and the
  `miss` flag, are additions.
* **Start address:** the clamp of a - b to 0..768 is an addition. It keeps a whole sweep
  inside memory2, and the `clamped` output reports it.
* **n1(k):** its source is not defined in the original description. It is an 8-bit input
  port here.
* **Table contents:** the waveform knee and slopes, the proportional duty law and the
  coefficient tables are this design's choices. The original specifies only what each memory
  is for.
* **Detection compensation:** the original mentions a compensation technique that removes
  the trade-off between detection accuracy and delay in the piecewise-linear detection, but
  does not describe it. It is not implemented.
* **Parts not included:** the DAC, comparator, PLL, gate driver and power stage are not
  implemented in RTL.

## Files

| file | contents |
|---|---|
| `rtl/dpwm_pol_pkg.sv` | widths, reference levels, write-port struct, default-table functions |
| `rtl/dpwm_pol_controller.sv` | top level: the whole digital controller |
| `rtl/up_counter.sv` | free-running counter with wrap strobe (8-bit time base, 9-bit DPWM) |
| `rtl/wave_mem.sv` | memory1, reference waveform |
| `rtl/duty_lut_mem.sv` | memory2, duty table |
| `rtl/coef_lut_mem.sv` | memory3 and memory4 |
| `rtl/sense_latch.sv` | synchronizer, sensing window, Dff1..Dff4 |
| `rtl/pc_addr_gen.sv` | a - b and the PC |
| `rtl/dpwm.sv` | DPWM counter and digital comparator |
| `tb/pol_plant_model.sv` | behavioural DAC, comparator and buck stage (L = 10 uH, C = 470 uF; 20 mOhm winding and 50 mOhm ESR assumed) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two closed-loop benches |

The top's ports are: `clk`, `clk2x`, `rst_n`, `c_m` (to the DAC), `v_comp` (from the
comparator), `n1_k`, `mem_wr`, `pwm`, and the observation outputs `count`, `y2_k`, `u_k`,
`sense`, `miss`, `clamped` and `pwm_wrap`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. To build and run one:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/dpwm_pol_pkg.sv tb/tb_dpwm_pol_controller.sv --top-module tb_dpwm_pol_controller
./obj_dir/Vtb_dpwm_pol_controller
```

* `tb_dpwm_pol_controller` runs the top module at its default parameters in closed loop. It
  covers 10 ms of converter time: start-up from 0 V, load steps from 0.5 A to 5 A and back,
  input voltages of 3, 6 and 8 V, a run-time rewrite of the duty table for K_P = 9, and
  start-address shifts through memory3, one of which is clamped. On every latch it checks u(k)
  against an independently computed duty law for the sensed count. On every undisturbed PWM
  period it checks that the high time equals u(k). It also checks regulation at each
  operating point and counts each mechanism. It runs in well under a second.
* `tb_pol_characteristics` measures the static characteristics: output voltage against load
  current (0 to 6 A) for K_P = 1, 3, 5, 7, 9, and against input voltage (3 to 8 V) for
  K_P = 5, 7, 9. For K_P above 3 it requires the output to stay within 5 % over the load
  range. For K_P of 5 and above it requires within 10 % over the input range. These are the
  experimental claims the design was published with.

Results with the plant model and the default waveform: at 6 V in, the output is 1.481 to
1.489 V across 0 to 6 A for every K_P of 5 or more. At 3 V in with K_P = 5 it is 1.413 V, the
largest deviation (-5.8 %), because a purely proportional law needs a larger error to reach
the 50 % duty. A 0.5 A to 5 A step dips to about 1.17 V in the model, and most of that is the
assumed capacitor ESR. These figures depend on the plant model, not only on the RTL.
