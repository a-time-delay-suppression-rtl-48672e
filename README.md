# ADC-less digital PWM controller with an analog-timing converter

This is a digital controller for a point-of-load buck converter that needs no
A/D converter. An ADC in the feedback path costs money and adds delay, and
that delay limits how fast the loop can respond. Here, a D/A converter plays a
falling staircase once per switching period, and an analog comparator reports
the moment the staircase passes the output voltage. The staircase step at that
moment *is* the digitised output voltage. The PID law is evaluated by table
look-up. The table address is prepared one period ahead and runs in step with
the staircase, so the new duty word is ready in the clock after the crossing.
The crossing normally happens while the PWM pulse of the same period is still
on, so the measurement reaches the pulse it was taken in.

The RTL follows the block structure and bus widths of the paper "A
Time-Delay Suppression Technique for Digital PWM Control Circuit". The paper
gives no gain values, no reset behaviour, no handshake details and no PLL
ratio. Those choices are this design's own and are listed under
[Departures and choices](#departures-and-choices).

## Signal flow

```
            f_S (clk_s)                                      external parts
 +--------------------------------------------------------+
 | atc                                                    |
 |  sys_up_counter --address(8)--> memory1_staircase      |   dac_code(8)   +-----+ V_ref'
 |        |                           | c(m)              |---------------->| DAC |-------+
 |        |                       [DAC-code reg]----------|                 +-----+       |
 |        |                                               |                              (-)
 |        +--address--> atc_latch <--2-FF sync-- vcomp <--|----------------------- comparator
 |                          | capture, y2_next, addr_d    |                              (+)
 +--------------------------|-----------------------------+                               |
                            v                                                      e_o (output)
 +--------------------------------------------------------+
 | pid_lut_controller                                     |
 |  n_I reg --> memory3_integral --> a --+                |
 |  y2(k-1) reg --> memory4_derivative --> b --+-- preset |
 |  prog_counter (preset at step 0, +1 per clock)         |
 |        | address'(10)                                 |
 |  memory2_pid_lut --> u reg (loaded on capture) --------|--> u(9)
 +--------------------------------------------------------+
                                                             f_S' (clk_sp, 2 x f_S, external PLL)
 +--------------------------------------------------------+
 | dpwm: 9-bit up counter, digital comparator with u      |--> pwm --> gate driver
 +--------------------------------------------------------+
```

`dpwm_controller_top` holds these three blocks. The DAC, comparator, PLL, gate
driver and power stage are outside it. The top brings out `dac_code`, takes
`vcomp` and `clk_sp` in, and drives `pwm`.

## One switching period, step by step

A period is 2^8 = 256 system clocks (f_S). The DPWM counter runs at
f_S' = 2 f_S with 9 bits, so it wraps at the same instants.

1. **Step 0.** The address counter wraps to 0. The programmable counter (PC)
   is preset to a value derived from `a - b`, which was computed during the
   previous period. The DPWM counter wraps at the same edge and the PWM output
   goes high (unless u = 0).
2. **Steps 0..255.** Memory1 turns the address into the staircase code c(m).
   The code is registered and goes to the DAC pins one clock later. The DAC
   and comparator settle in real time. The comparator output passes a
   two-flop synchroniser. The latch therefore sees the comparison for step m
   three clocks after the counter showed m. It delays the address and code by
   the same three clocks (`addr_d`), so everything it does is counted in
   staircase steps, not in raw clocks. The PC counts +1 per clock on the same
   delayed time base.
3. **The crossing.** In the first step of the period at which the
   synchronised comparator is high (output voltage above the staircase), the
   latch raises `capture` for one clock. It presents y2(k), the staircase code
   of that step, on `y2_next`. In the same clock, Memory2 is already being
   read at the PC address, which equals y2(k) + a - b (see below). At the
   clock edge that ends this cycle:
   - u(k) is loaded from Memory2;
   - the integrator becomes n_I(k) = sat(n_I(k-1) + y2(k) - r);
   - y2(k) is kept as the previous sample.
4. **Same period, DPWM side.** The digital comparator ends the pulse when the
   DPWM count reaches the current u. If u(k) arrives before the count reaches
   it, the pulse of this very period has length u(k) / f_S'. A set/reset
   output stage makes sure that a late change of u can shorten a pulse but
   never start a second one.
5. **Rest of the period.** Memory3 and Memory4 turn the new n_I and the
   stored sample into a and b for the preset at the next step 0. These are
   combinational reads, so their results are ready well before then.

If the output voltage is above the top of the staircase, the comparator is
already high at step 0. The sample is then full scale, and `sat_high` flags
it. If it never goes high, the last step is taken as the sample and `sat_low`
flags it. Either way, every period produces exactly one sample and one duty
word.

With the default numbers (1.2 V target, 0..1.7 V staircase), the target is
code 181. It is crossed at step 74, which is 154 f_S' counts into the period
including latency. The nominal on-time is about 186 counts. So in steady
state the sample lands inside the pulse it controls.

## The look-up PID

The control law is the position-form PID

    u(k) = u_Ref + K_P e(k) + K_I n_I(k) + K_D (e(k) - e(k-1)),
    e(k) = y2(k) - r,   n_I(k) = n_I(k-1) + e(k).

With A = K_P + K_I + K_D, this rearranges to

    u(k) = u_Ref - (K_P + K_I) r + A * ( y2(k) + a - b ),
    a = (K_I / A) n_I(k-1),   b = (K_D / A) y2(k-1).

Only y2(k) is new in period k. The tables are:
- **Memory3**: a, indexed by n_I(k-1).
- **Memory4**: b, indexed by y2(k-1).
- **Memory2**: u as a function of address' = y2(k) + a - b.

The PC is what removes the addition from the critical moment. The staircase
*falls* one code per clock, while the PC *rises* one count per clock. Their
sum is constant along the ramp. Memory2 is therefore stored in reverse: word
p holds the duty for address' = 767 - p. The PC is preset at step 0 to

    init = 512 + 255 - OFFSET - (a - b)

where OFFSET = 255 for the plain staircase. At step m, the PC holds init + m.
Its Memory2 word is then exactly the duty for y2 + a - b, for whatever y2 the
crossing at step m turns out to mean. So u(k) is valid in every clock of the
period, and the crossing only has to latch it.

Number formats:
- Gains are signed Q8.8 integers, in duty codes per voltage code.
- a and b are rounded to whole voltage codes and clamped to 11-bit signed.
- The preset is clamped to 0..1023, and the PC saturates at 1023.
- Memory2 words are rounded and clamped to 0..511.
- n_I is an 8-bit two's-complement value that saturates.

Because a and b are rounded before the look-up, u deviates from the exact PID
law by at most about |A| + 1 codes. The unit test checks this bound.

All four tables are computed at elaboration from the parameters; there are no
data files. Memory2 is linear in its address until it clamps, and Memory3 and
Memory4 are linear too. A synthesis tool that maps them to logic rather than
memory therefore gets a small adder or multiplier-by-constant, not a ROM.

The default gains are K_P = -0.5, K_I = -0.1875, K_D = -0.25, with r = 181
and u_Ref = 186. They are negative because e = y2 - r rises with the output
voltage. These values are not from the paper: they were tuned to the buck
model in the testbench (3.3 V to 1.2 V, 4.7 uH, 100 uF). Re-tune them for
any real power stage.

## Sensing range, resolution and the modified staircase

One code is (V_ref+ - V_ref-) / 256 at the DAC. The DAC references are an
analog setting and not part of the RTL.

- **Default.** 0 V to 1.7 V, so one code is 6.64 mV. The plain staircase is
  c(m) = 255 - m.
- **Finer resolution.** Raising V_ref- to half of V_ref+ (0.85 V) halves the
  code size to 3.32 mV. That is the resolution of a 9-bit converter over the
  full range, from the same 8-bit hardware. The target (1.2 V, now code 105)
  then sits low in the range: a plain staircase would cross it at step 150,
  after the PWM pulse has ended.
- **Modified staircase.** The `HEAD` and `C_START` parameters fix this. The
  staircase holds full scale for `HEAD` steps, jumps to `C_START`, and falls
  one code per clock from there, flat at `C_FLOOR` at the bottom. With
  HEAD = 1 and C_START = 160 (1.38 V), 1.2 V is crossed at step 56,
  112 f_S' counts into the period.
  - Voltages between 1.38 V and 1.7 V all read as code 160.
  - Voltages above 1.7 V read as 255.
  - The latch captures the staircase code itself, not the inverted address,
    so the sample is correct for either shape. The PC preset uses
    OFFSET = C_START + HEAD.

## Clocks and reset

- `clk_s` (f_S) runs the ATC and the PID controller. `clk_sp` (f_S') runs the
  DPWM and must be phase-locked to clk_s at twice its frequency, with rising
  edges aligned. The duty word crosses from clk_s to clk_sp without
  synchronisation, which is only safe for these related clocks.
- `rst_n` is synchronous and active low. Release it so that both clocks first
  see it high at the same clk_s rising edge. The DPWM counter leaves reset at 1
  so that it stays exactly twice the ATC address.
- After reset, u = 0 (no pulses), n_I = 0 and the previous sample is r. The
  first sample is taken in the first full period.
- `vcomp` is asynchronous. It goes through a two-flop synchroniser, which
  adds two clocks of fixed, compensated latency.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `KP`, `KI`, `KD` | -128, -48, -64 | PID gains, Q8.8 (-0.5, -0.1875, -0.25) |
| `R` | 181 | reference voltage code r |
| `UREF` | 186 | nominal duty u_Ref (of 512) |
| `HEAD` | 0 | staircase steps held at full scale |
| `C_START` | 255 | first code of the falling ramp |

Widths are fixed in `dpwm_pkg`:
- 8-bit staircase address, DAC code and voltage sample;
- 8-bit integrator;
- 11-bit a and b;
- 10-bit Memory2 address;
- 9-bit duty word and DPWM counter.

These are the widths of the paper's block diagram. Lower-level modules expose
their widths and gains as parameters too.

## Files

| File | Contents |
|---|---|
| `rtl/dpwm_pkg.sv` | widths, default gains, rounding helpers |
| `rtl/sys_up_counter.sv` | 8-bit staircase address counter |
| `rtl/memory1_staircase.sv` | staircase ROM (plain or modified) |
| `rtl/atc_latch.sv` | comparator synchroniser, delay matching, sample latch |
| `rtl/atc.sv` | analog-timing converter: counter, Memory1, DAC register, latch |
| `rtl/memory3_integral.sv` | table a = (K_I/A) n_I |
| `rtl/memory4_derivative.sv` | table b = (K_D/A) y2(k-1) |
| `rtl/prog_counter.sv` | preset +1 counter addressing Memory2 |
| `rtl/memory2_pid_lut.sv` | reversed PID table, address' to u |
| `rtl/pid_lut_controller.sv` | integrator, delay registers, tables, PC, u latch |
| `rtl/dpwm.sv` | 9-bit counter and comparator, PWM output |
| `rtl/dpwm_controller_top.sv` | the controller |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two closed-loop tests |
| `tb/dac_model.sv`, `tb/comparator_model.sv`, `tb/buck_stage_model.sv` | behavioural models of the external analog parts, for simulation only |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, for example:

    verilator --binary --timing --assert -y rtl -y tb rtl/dpwm_pkg.sv \
        tb/tb_dpwm_controller_top.sv --top-module tb_dpwm_controller_top
    ./obj_dir/Vtb_dpwm_controller_top

Swap in any other testbench name the same way.

**`tb_dpwm_controller_top`** is the closed-loop test at the top's default
parameters. It runs 900 switching periods:
- soft start at 0.5 A;
- a 0.5 A to 2.5 A load step, then the step back;
- the sensed voltage forced above and below the DAC range for four periods
  each.

It checks:
- every latched sample against the model's output voltage, to within 2 codes;
- every PWM on-time against u;
- settling to within 3 codes of r after each event;
- that at least 90% of steady-state samples fall inside the PWM pulse.

It also counts crossings, both saturation cases, integrator saturation and
mid-pulse duty updates, and fails if any of them never happened. In the model,
the step up settles in 16 periods and the step down in 46.

**`tb_dpwm_resolution_mode`** repeats the same run with:
- the DAC's lower reference at 0.85 V;
- the modified staircase (HEAD = 1, C_START = 160);
- r = 105, K_I = -0.125 and u_Ref = 195.

Both closed-loop tests take under a second.

## Departures and choices

- **Sample latch.** The paper clocks a flip-flop directly from the comparator
  and stores the inverted address. Here the comparator is synchronised to
  f_S, the address and code are delayed to match, and the staircase code is
  stored. For the plain staircase, the code equals the inverted address. The
  cost is three clocks of latency, which is accounted for in the timing above.
- **Comparator polarity.** The comparator is taken as high while the output
  voltage is above the DAC voltage (output voltage on the + input). The sample
  is the first step at which it is high. This follows the paper's schematic
  and waveforms; one sentence of its text states the opposite polarity.
- **Reversed Memory2 and preset offset.** The paper's PC is preset from
  "a - b" and counts up, while the staircase falls. The reversed table order
  and the preset 767 - OFFSET - (a - b) are this design's way of making
  address' = y2 + a - b hold at the crossing.
- **The paper gives no numbers for:** the gains, r, u_Ref, integrator
  saturation, table rounding and clamping, out-of-range samples, reset
  behaviour, or the PLL ratio. The ratio f_S' = 2 f_S is inferred from the
  8-bit staircase and 9-bit DPWM counter sharing one period.
- **Finer-resolution setting.** The paper gets 3.32 mV per code, half the
  8-bit step over 0..1.7 V, from its 8-bit system by moving the DAC's lower
  reference to half of the upper one. That is how it is read here: the same
  8-bit hardware with V_ref- = 0.85 V and the target moved to code 105. The
  resolution-mode test covers this setting.
- **Modified staircase.** The paper shows the modified staircase only as a
  sketch. The HEAD / C_START / C_FLOOR form is one concrete reading of it. In
  the paper's measured waveform, the staircase reaches its floor about halfway
  through the period. With one code per clock and 256 clocks per period, the
  slope here is fixed, so that shape is not reproduced.
- **Experimental figures.** The paper's prototype fits the controller in 149
  logic elements and one PLL of a Stratix FPGA. After a 0.5 A / 2.5 A load
  step, its output voltage moves for about 1 us and then returns to the
  reference. Neither figure is reproduced here: the tables are
  written as arrays and not size-optimised, and the power stage in the
  testbench is a generic model, not the paper's hardware.
- **Not included:** the DAC, comparator, PLL, gate driver and power stage are
  analog or vendor parts. Simple models of the DAC, comparator and buck stage
  exist only for the testbenches.
