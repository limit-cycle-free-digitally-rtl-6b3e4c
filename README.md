# Limit-cycle-free digital control of a boost converter with a dyadic DPWM

A digitally controlled DC-DC converter sees its output voltage only through an ADC
and sets its switch only through a digital PWM (DPWM). Both are quantized. If the
smallest duty step moves the output voltage by more than one ADC step, there may be
no duty value whose output lands in the ADC's *zero-error bin* (the code equal to
the reference). The integrating controller then hunts between two duty values for
ever. The result is a low-frequency **limit-cycle oscillation (LCO)**. The usual fix
is a DPWM finer than the ADC. At MHz switching frequencies that needs either a very
fast counter clock or delay-line hardware.

This design gets the finer DPWM cheaply. A 4-bit counter DPWM runs at
50 MHz / 16 = 3.125 MHz. A 4-bit **dyadic digital pulse modulator (DDPM)** adds one
extra clock of on-time in chosen switching periods. Over 16 periods, the average
duty then has 8-bit resolution. The PID compensator can find a duty level inside
the zero-error bin of the 4-bit ADC, its integrator stops there, and the duty
command stays constant.

The controller regulates a boost converter from 7–10 V in to 12 V out, into a
25–30 Ω load (L = 900 nH, Co = 3 µF). It uses voltage-mode PID control.

```
             adc_sample (every 16 clk)
          +---------------------------------------------------+
          v                                                   |
 vout -> [ADC 4b] --adc_code--> (-) --e--> [PID] --duty_cmd(8b)--> [DDPWM] --gate--> boost stage
                       vref_code -^                                   |
                                                  duty[7:4] -> 4-bit counter DPWM  (dH clocks)
                                                  duty[3:0] -> 4-bit DDPM          (+1 clock in
                                                                                    cmd[3:0] of 16 periods)
```

## The dyadic DPWM (`ddpwm`, `dpwm`, `ddpm`)

This is the core of the design and the part that needs the most explanation.

**Counter DPWM (`dpwm`).** A free-running 4-bit counter gives a 16-clock switching
period. The gate is high while `count < duty`. `duty` is 5 bits wide (0..16), so that
a level of 16 (always on) can also be reached. The on-time comes first in each period
(trailing-edge modulation). The gate output is registered, so it is one clock behind
the counter. `period_last` marks clock 15 of each period. Assertions check that the
level never exceeds 16 and changes only at a period boundary.

**Dyadic modulator (`ddpm`).** A 4-bit slot counter `p` advances once per switching
period. A *frame* is 16 periods. Every slot except slot 0 is owned by exactly one bit
of the 4-bit input code. The owner is set by the number of trailing zeros `t` of `p`:
slot `p` outputs code bit `3 - t`.

| slots                    | trailing zeros | code bit | slots per frame |
|--------------------------|----------------|----------|-----------------|
| 1,3,5,7,9,11,13,15       | 0              | bit 3    | 8               |
| 2,6,10,14                | 1              | bit 2    | 4               |
| 4,12                     | 2              | bit 1    | 2               |
| 8                        | 3              | bit 0    | 1               |
| 0                        | –              | none (0) | –               |

As a result, bit *k* produces 2^k ones per frame, and the frame holds exactly `code`
ones. The ones of each bit are evenly spaced, so the sum over any 8 consecutive slots
is always ⌊code/2⌋ or ⌈code/2⌉. The energy of the dither therefore lies mostly at high
frequencies (fsw/2, fsw/4, …), where the LC filter removes it. Only the LSB's share is
as low as fsw/16. The hardware is a counter plus a priority select on the lowest set
bit of `p`.

**Putting them together (`ddpwm`).** The 8-bit command is latched at the end of each
frame. In every period of the next frame, the DPWM level is `cmd[7:4] + ddpm_bit`.
Each period therefore has either dH or dH + 1 clocks of on-time, and `cmd[3:0]` of the
16 periods get the extra clock. The on-time over the 256-clock frame is exactly `cmd`.
`extra_clock` marks the periods that carry the extra clock. `period_start` and
`frame_start` mark the first clock of a period and of a frame.

Timing of a command change: if `duty_cmd` changes anywhere inside frame *k*, the new
value takes effect from the first clock of frame *k+1*. The gate waveform of that
frame starts one clock later, because the gate output is registered.

## PID compensator (`pid_compensator`)

This is a parallel PID in integer arithmetic. The error `e` is in ADC LSBs (5-bit two's
complement, reference minus sample). Each new sample is processed as follows:

```
I[n]  = clamp(I[n-1] + Ki*e[n], 0, 2^20 - 1)        (integrator kept inside the duty range)
u[n]  = Kp*e[n] + I[n] + Kd*(e[n] - e[n-1])
duty  = clamp(floor(u[n] / 2^12), 0, 255)
```

The coefficients are the specification's binary words, read as two's-complement
integers:

- Kp = `0110111` = 55
- Ki = `01001011101` = 605
- Kd = `010100001111` = 1295

The specification does not give their binary point. This design puts it 12 bits up
for all three (`COEF_FRAC`), which makes Kp ≈ 0.013, Ki ≈ 0.148 and Kd ≈ 0.32 duty
LSBs per ADC LSB. With the boost stage below, the loop is then essentially integral.
It crosses over well below the LC resonance (about 70 kHz) and settles without
overshoot that leaves the bin. The result is ready one clock after `err_valid`.
`sat_hi` and `sat_lo` report output clamping. All the coefficients and the binary
point are parameters.

## Controller top (`ddpwm_controller_top`)

This module connects the error subtractor, the PID and the DDPWM.

- **ADC side.** `adc_sample` pulses in the first clock of each switching period and
  asks for a conversion. The ADC answers with `adc_code` and a one-clock `adc_valid`
  pulse before the next request. An assertion checks that `adc_valid` never stays
  high for two clocks.
- **Control rate.** The PID runs once per sample, at 3.125 MHz. The modulator takes
  the newest `duty_cmd` once per frame, at 195 kHz.
- **Monitoring outputs.** The top also brings out `duty_cmd`, `duty_update`,
  `duty_frame`, `frame_start`, `extra_clock`, `sat_hi` and `sat_lo`.
- **Outside the controller.** The ADC and the power stage are analog and are not part
  of the RTL.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ADC`   | 4 | ADC resolution |
| `N_DPWM`  | 4 | counter DPWM bits (16 clocks per switching period) |
| `M_DDPM`  | 4 | dyadic modulator bits (16 periods per frame) |

Reset (`rst_n`, asynchronous, active low) clears every register. The gate is low,
the command is zero, and the integrator and the error history are empty.

## How far it can be trusted, and where it is this design's own choice

The following come from the specification:

- the controller structure: ADC, voltage-mode PID, DPWM on the 4 MSBs and DDPM on the
  4 LSBs;
- the sizes: 4-bit ADC, 4 + 4 bit modulator, 50 MHz clock, 3.125 MHz switching;
- the PID coefficient words;
- the power-stage component values used by the testbenches.

The following are this design's own choices:

- **The slot assignment of the DDPM.** It uses trailing zeros, with slot 0 idle and a
  slot of one switching period. This is one standard way to realise dyadic pulse
  modulation.
- **The coefficient binary point** (12 fractional bits).
- **The PID form.** It is a parallel PID with clamping anti-windup and truncation of
  the output.
- **Frame-wise latching of the command.** A variant that lets the DDPM take a new
  code in every period would react faster, but its frame average would no longer be
  exact.
- **The ADC handshake and the sampling instant** (start of period).
- **Reset behaviour.**
- **The testbench ADC.** It has a 1 V LSB, so 12 V is code 12 and the zero-error bin
  runs from 11.5 V to 12.5 V. The real converter's sensing gain is not known. This
  choice sets where the 4-bit-only comparison loop limit-cycles, but it does not
  change the controller RTL.
- **ADC resolution.** The controller is sized for a 4-bit converter. A 5-bit
  converter is a parameter change (`N_ADC = 5`); the reference and the ADC code then
  become 5 bits wide.

Other limits:

- No upper duty limit is imposed. The command can reach 255/256, where most periods
  are fully on. That is unsafe for a real boost stage; add a clamp in
  `pid_compensator` if the plant needs one.
- The closed-loop results depend on the testbench plant model. It is a switched Euler
  model with an ideal source, no diode forward drop and no input capacitor.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it shows |
|-----------|---------------|
| `tb_dpwm` | for every duty 0..16: exactly that many on-clocks per 16-clock period, one contiguous pulse, `period_last` once per period |
| `tb_ddpm` | for every code: the slot-by-slot output against the trailing-zero rule, `code` ones per frame, every 8-slot window within ⌊code/2⌋..⌈code/2⌉ |
| `tb_ddpwm` | for all 256 commands plus random ones: one-frame latency, every period at dH or dH+1, exactly `cmd[3:0]` extended periods, frame on-time = command |
| `tb_pid_compensator` | about 12 000 samples against a 64-bit integer model, one hand-worked sample, both clamps, one-clock latency |
| `tb_ddpwm_controller_top` | closed loop at the default sizes with a switched boost model (values above) and a 4-bit ADC model: start-up at 8 V, line step to 10 V, reference below Vin (clamp at zero), then 7 V with 30 Ω. In each steady window every ADC sample is in the zero-error bin and the duty command is constant. The gate on-time of every frame matches its command. Dithered periods, fractional frames, frame updates and clamping are each counted and must occur |
| `tb_lco_sweep` | Vin from 7 to 10 V in 0.25 V steps. The dyadic loop is compared with the same PID driving only a 4-bit DPWM. The dyadic loop settles in the bin with a constant duty at all 13 points. The 4-bit loop oscillates between duty levels, with the output swinging about 11.1–13.3 V, at 5 of them |

Steady-state duty commands found by the dyadic loop: 102/256 at 7 V, 80/256 at 8 V and
36/256 at 10 V, all into 25 Ω.

Behavioural models used only by the testbenches:

- `tb/boost_power_stage_model.sv`: a real-valued switched boost stage;
- `tb/adc_model.sv`: a rounding, clipping ADC with a latency.

## Simulating

Use Verilator 5. Read the package first, and let `-y` find the other modules:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ddpwm_pkg.sv \
          tb/tb_lco_sweep.sv --top-module tb_lco_sweep -o sim
./obj_dir/sim
```

Replace `tb_lco_sweep` with any other testbench name. All of them finish in
seconds.

## Changing it

- **Resolution.** `N_DPWM` sets the counter size and therefore fsw = fclk / 2^N_DPWM.
  `M_DDPM` sets the extra resolution and the frame length of 2^M_DDPM periods. The
  PID output width follows N_DPWM + M_DDPM.
- **Loop gains.** Edit `KP`, `KI`, `KD` and `COEF_FRAC` in `pid_compensator` or in
  `rtl/ddpwm_pkg.sv`. The integrator width follows the output width and `COEF_FRAC`.
- **Sampling instant.** `adc_sample` is `period_start`. To sample elsewhere in the
  period, decode another value of the DPWM counter inside `ddpwm`.
