# Look-up-table PID regulator for a 1 MHz digitally controlled buck converter

A digital controller for a high-frequency DC-DC converter has to compute a
new duty ratio every switching period, here every microsecond, and it has to
be small and low-power. A textbook PID regulator needs several
multiplications per period. This design has none. In a working feedback loop the
output voltage stays close to its reference, so the A/D converter needs only
a narrow window around the reference: nine levels of 40 mV (±160 mV). With so few
possible error values, every product "coefficient × error" can be computed in
advance and kept in a tiny table. The regulator then only reads
tables and adds.

The RTL implements the regulator, its sequencing and a digital PWM for the
design example: a synchronous buck converter, 4–6 V in, 2.7 V out, 3 W,
switching at 1 MHz, with an 8 MHz system clock.

## The control law

```
d[n] = d[n-1] + a·e[n] + b·e[n-1] + c·e[n-2]
     = d[n-1] + 12.5·(e[n] − 1.88·e[n-1] + 0.92·e[n-2])
```

`e` is the error in A/D LSBs. It is positive when the output is below the reference.
`d` is the duty ratio in DPWM LSBs (1/256 of the period). This is a PID
law with a pole at zero frequency, which gives zero steady-state error, and two zeros.
It comes from the continuous-time regulator
`C(s) = K·(1 + s/(Qω_z) + s²/ω_z²)/s`, mapped to the z-domain by pole-zero
matching:

```
a = K_I,   b = −2·K_I·r·cos(2π f_z/f_s),   c = K_I·r²,   r = exp(−π f_z / (Q f_s))
```

With K_I = 12.5, 2r·cos = 1.88 and r² = 0.92, the zeros sit near 32 kHz with Q ≈ 2.4.
This places them close to the 35 kHz resonance of the LC filter (1 µH, 22 µF). The
loop crosses over near 50 kHz at light load.

The previous duty ratio d[n-1] is never multiplied. It varies over the whole
range and could not be tabulated. Only the three error terms go through tables.

## Number format: why 8, 9 and 8 bits

Everything inside the regulator is two's-complement fixed point with **one
fractional bit**. A value of 1.0 is the code 2. The width of the fraction follows from
the smallest change the law must still be able to make:

```
N_d = ceil(log2(1 / (K_I·(1 − 2r·cos + r²)))) = ceil(log2(1 / (12.5·0.04))) = 1
```

If the fraction were shorter, a constant one-LSB error could get stuck without moving d. That would
lose the zero-steady-state-error property. The integer part of each
table must hold coefficient × 4, plus a sign:

| table | coefficient | largest entry | code (×2) | word |
|---|---|---|---|---|
| a·e[n]   | 12.5  | ±50 | ±100 | 8 bit |
| b·e[n-1] | −23.5 | ±94 | ±188 | 9 bit |
| c·e[n-2] | 11.5  | ±46 | ±92  | 8 bit |

Each table has nine words, 225 bits in all. d[n-1] is held in 10 bits: 8 integer
bits, one fractional bit and a sign bit. The sign bit is always 0, because d is limited
to 0..255.5. d[n], sent to the DPWM, is the 8-bit integer part. All three coefficients
are exact at one fractional bit: 25, −47 and 23 in table codes.

The tables are filled when the design is elaborated: entry k of a table is
`COEF × (k − E_MAX)`, with address = e + 4. To retune the regulator, compute
the new a, b and c, multiply them by 2, set `COEF_A/B/C` in `pid_pkg`, and
check the word lengths. `pid_lut` stops elaboration if an entry does not fit.

## One adder, eight clock cycles

The regulator has only one adder. The 8 MHz clock gives 8 cycles per 1 MHz
period, and `pid_sequencer` uses five of them:

| phase | action |
|---|---|
| 0 | `adc_sample`: the A/D code enters e[n], older errors shift to e[n-1] and e[n-2]; acc ← d[n-1] |
| 1 | acc ← acc + c·e[n-2] |
| 2 | acc ← acc + b·e[n-1] |
| 3 | acc ← acc + a·e[n] |
| 4 | d[n-1] ← limit(acc); d_out ← integer part; `d_valid` next cycle |
| 5–7 | idle |

The accumulator is 11 bits wide, enough for 511 + 100 + 188 + 92 without
overflow. d_out changes on the 4th clock edge after the sampling edge, which is the middle of
the period. The DPWM takes it at its next period start. The total processing delay
is therefore one switching period. The loop design assumes exactly this delay.

## Soft start and limits

At reset d = 0. While the output is far below the reference, the A/D window
clips the error to +4. With a constant error the law reduces to

```
Δd = 12.5·(1 − 1.88 + 0.92)·4 = +2 LSB per period
```

after the first two periods, which give +50 and then −44. The output voltage therefore ramps up
without overshoot, with no separate soft-start circuit. From 6 V input it takes
about 60 µs, from 4 V about 90 µs.

`pid_error_history` limits the incoming code to ±4 as well, so any A/D
code addresses a valid table word (`e_limited` flags this). `pid_accumulator`
limits d to 0..255.5 (`sat_lo`, `sat_hi`), so the integrator can neither
wind up past the DPWM range nor wrap around. Note that the derivative terms
make d jump when the error changes sign. For example, e stepping from 0 to −4 at d = 0
first gives −50 (limited to 0) and then +44.

## Digital PWM

`dpwm` is an 8-bit counter clocked at 256 × f_s (256 MHz) with a comparator.
The output is high for `duty` counter cycles out of 256. A new command is taken
only at the counter wrap, so each period uses one stable value. An
integrated controller at these rates would normally use a delay-line or hybrid
counter/delay-line modulator. This counter version has the same function and
resolution and is easy to simulate.

`clk_pwm` must come from the same source as `clk` and start together with it
after reset. The regulator changes `d_out` only in the middle of a period, so the
DPWM never samples it while it changes. No synchroniser is used.

## Modules

| file | role |
|---|---|
| `rtl/pid_pkg.sv` | widths, coefficients, cycle count, `step_e` enum |
| `rtl/pid_lut.sv` | one coefficient table (ROM, combinational read) |
| `rtl/pid_error_history.sv` | e[n], e[n-1], e[n-2] registers with window limiter |
| `rtl/pid_accumulator.sv` | the adder, accumulator, d[n-1] and d[n] registers, duty limits |
| `rtl/pid_sequencer.sv` | period counter; sampling strobe and step schedule |
| `rtl/pid_regulator.sv` | error history + three tables + operand mux + accumulator |
| `rtl/dpwm.sv` | counter-comparator DPWM |
| `rtl/pid_controller.sv` | top: sequencer, regulator, DPWM |

Top-level ports of `pid_controller`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, 8 MHz |
| `clk_pwm` | in | 1 | DPWM clock, 256 MHz, aligned with `clk` |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `e_code` | in | 4 | signed error code from the window A/D converter, valid at the end of the `adc_sample` cycle |
| `adc_sample` | out | 1 | one `clk` cycle at the start of each period |
| `pwm` | out | 1 | switch drive d(t) |
| `pwm_period_start` | out | 1 | DPWM counter at zero (`clk_pwm` domain) |
| `d_out`, `d_prev`, `d_valid` | out | 8, 10, 1 | duty command, stored d[n-1], update strobe |
| `e_limited`, `sat_hi`, `sat_lo` | out | 1 each | error outside the window; duty limited |

The A/D converter, including the analog subtraction of Vout from Vref, and the power stage
are outside this RTL. The A/D converter only has to deliver a signed code
`round((Vref − Vout)/40 mV)`, clipped to ±4, once per period.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_pid_controller \
    -Irtl rtl/pid_pkg.sv rtl/pid_lut.sv rtl/pid_error_history.sv \
    rtl/pid_accumulator.sv rtl/pid_sequencer.sv rtl/pid_regulator.sv \
    rtl/dpwm.sv rtl/pid_controller.sv tb/tb_pid_controller.sv
./obj_dir/Vtb_pid_controller
```

- `tb_pid_lut`: all 27 table entries against the real-valued coefficients.
- `tb_pid_error_history`: random codes, including out-of-window codes, against a shift model.
- `tb_pid_accumulator`: random operands, and runs that hit both duty limits.
- `tb_pid_sequencer`: the 8-cycle schedule and period length.
- `tb_pid_regulator`: the regulator against a real-arithmetic model of the law. It covers
  the +2 LSB/period soft-start ramp, both limits and the update latency.
- `tb_dpwm`: high time per period for commands 0, 1, 128, 254, 255 and random
  values, and that a command changed mid-period waits for the next period.
- `tb_pid_controller`: the whole controller at its default parameters, in a
  closed loop with an averaged buck-converter model and a window A/D model inside
  the testbench. The model uses L = 1 µH, C = 22 µF, a 50 mΩ winding and a 10 mΩ ESR. The
  test covers the duty limits in open loop, then soft start and 0.3 A ↔ 1 A load steps at
  6 V and at 4 V input. Every duty update is checked against the law, and every DPWM period against
  its command. It requires the output to reach 2.7 V ± 40 mV without 5 % overshoot. For the load steps
  it requires less than 5 % deviation and a return inside ± 40 mV within 50 µs.
  Typical results: soft start 58 µs at 6 V and 88 µs at 4 V; load steps 3.0–3.5 %
  deviation, settling in 17–21 µs.

The converter model's resistances are assumed values. The closed-loop numbers
show that the regulator behaves as designed, but they do not predict a particular board.

## Where this RTL makes its own choices

- The sequencing schedule, the 11-bit accumulator, the 4-bit error code and
  the asynchronous reset to zero are not fixed by the design example. The
  same holds for the limit of d to 0..255.5 and for truncating d[n-1] to d[n].
- The three adders of the data-flow diagram become one adder with an
  accumulator, as in the built example.
- d[n-1] is 10 bits wide, including an always-zero sign bit. Nine magnitude bits would
  be enough.
- The DPWM is a plain counter-comparator, so its full scale is 256 rather
  than 255. The 0.4 % difference in loop gain is negligible.
- The error sign is e = Vref − Vout.
- The tables are fixed at elaboration. There is no port for reprogramming them at
  run time.
