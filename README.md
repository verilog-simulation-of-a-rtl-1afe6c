# A PID control loop evaluated as one 8-bit ARMA filter

This design puts a complete discrete-time PID control loop into a very small
ASIC slot: a 16-bit input word, a 16-bit output word, a 10 MHz clock and a
budget of roughly a thousand gates. The controller and the plant it controls
are not kept apart. They are multiplied into one open-loop transfer function,
which the hardware evaluates as a third-order ARMA (auto-regressive moving
average) difference equation in 8-bit fixed point. The loop is closed inside
the chip: the error fed to the filter is the setpoint minus the filter's own
previous outputs. The output word therefore shows how the controlled plant
responds to the setpoint that is programmed. The design is a hardware
emulation of a closed loop, not a controller wired to an external plant.

## The loop being emulated

The plant is a second-order system with an integrator,
`Gp(s) = η² / (s (s + η))`, with η = 100 rad/s. It is sampled every T = 4 ms
behind a zero-order hold. The controller is a discrete PID with trapezoidal
integration and a backward-difference derivative:

    D(z) = Kp + Ki·(T/2)·(z+1)/(z−1) + Kd·(z−1)/(T·z)

Kp = 1.1665, Ki = 0.1 and Kd = 0.0031 place the closed-loop poles for about
15 % overshoot and a 70 ms settling time. The product of controller and
sampled plant is

    D(z)G(z) = (0.1361 z² + 0.06508 z − 0.04732) / (z³ − 1.67 z² + 0.67 z)

Written as a difference equation in the error e and output c:

    c(k) = a1·e(k−1) + a3·e(k−2) + a4·e(k−3) + b2·c(k−1) + b3·c(k−2)
    e(k) = r − c(k)

    a1 = 0.1361   a3 = 0.06508   a4 = −0.04732   b2 = 1.67   b3 = −0.6703

b2 + b3 ≈ 1 is the integrator of the plant. It is what gives the loop zero
steady-state error in exact arithmetic, and the fixed-point format has to
preserve it (next section). The names a1, a3, a4, b2, b3 are the register
names of the input interface. Here a1 multiplies the newest stored error,
e(k−1). Writing that term as a1·e(k) would make c(k) depend on itself.

## Fixed-point arithmetic

This is the part that decides how the loop behaves.

| quantity | format | notes |
|---|---|---|
| coefficients a1…b3 | 8-bit two's complement, Q2.6 (value × 64) | range −2.0 … +1.984, so b2 = 1.67 fits |
| setpoint r | 5-bit two's complement, −16 … 15 | |
| setpoint sample r8 | `r << 3`, 8-bit | fills the signed byte exactly |
| error e8, fed-back output c8 | 8-bit two's complement | the only state kept |
| products | 8 × 8 → 16 bits, then `>>> 6` each | truncated one by one |
| c16 | sum of the five truncated products, 16 bits | the chip's output word |
| c8 | `c16[7:0]` | upper bits dropped, no saturation |

The published coefficients round to a1 = 9, a3 = 4, a4 = −3, b2 = 107 and
b3 = −43 (÷ 64). Here b2 + b3 = 64 is exactly 1.0, so the integrator survives
the quantisation.

Every product is shifted right arithmetically by 6 before the five are added.
Each shift rounds toward −∞ and loses up to one LSB. Inside a loop with an
integrator, that loss must be balanced by a standing error. The error terms
have a small total gain ((9 + 4 − 3)/64 ≈ 0.16), so the standing error is
large. With the reset coefficients, a step of the setpoint to 8 (sample value
64) gives this response, one value per 4 ms sample:

    0 9 26 41 52 58 59 58 55 52 49 47 46 46 47 49 51 52 51 50 48 47 47 48 50 51 51 50 48 ...

It rises with about 20 % overshoot and settles within about 40 ms into a
limit cycle between 46 and 52. The steady-state level is about 49 instead of
64. The same loop in floating point settles at 64 with about 18 % overshoot.
This bias and limit cycle are the price of truncating each 8-bit product.
Summing the full-width products and truncating once would reduce the bias
(the level becomes 60), but that is not the arithmetic specified for this
design.

Because c8 is just the low byte of the sum, a large output wraps around: a
sum of 130 is fed back as −126. With the published coefficients a setpoint of
15 still peaks at 125 and does not wrap. High-gain coefficient sets do wrap.
The engine raises a `wrap` flag whenever c16 does not fit in c8.

The specified arithmetic is "shift the setpoint left by 4 (3 bits to make an
8-bit value, plus a factor of 2) and shift every product right by 7". With
Q2.6 coefficients that literal reading makes b2 + b3 equal 0.5 and removes the
integrator. This design merges the factor of 2 into the product shift instead
(`PROD_SHIFT = 6`, `R_SHIFT = 3`). Doubling a product and shifting it by 7
gives the same result.

## Programming through the input word

The 16-bit input word is `{sel[2:0], coef[7:0], r[4:0]}`, from the MSB down.
While `sel` holds a code, the register it names is loaded on every clock:

| sel | register | from |
|---|---|---|
| 000 | a1 | coef (Q2.6) |
| 001 | a3 | coef |
| 010 | a4 | coef |
| 011 | b2 | coef |
| 100 | b3 | coef |
| 101 | divider[7:0] | coef |
| 110 | divider[15:8] | coef |
| 111 | setpoint r | r field |

Reset loads the published coefficients, divider 0x9C40 and setpoint 0. After
reset the chip runs the published controller at 4 ms: hold `sel = 111` and
drive the setpoint in the low five bits. A new coefficient set is taken as it
is written. If a sample is computed while a set is half written, that sample
mixes old and new coefficients. To change a set cleanly, first write the
divider MSB to a large value, wait for the sample in flight to finish, then
write the coefficients and the real divider. The end-to-end testbench does
this.

## Timing

- Sampling period: `divider` clocks. At 10 MHz, 0x9C40 = 40000 gives
  T = 4 ms. The counter restarts at divider−1, so reprogramming takes effect
  within one period. Divider 0 means 65536.
- One sample: the sampling strobe starts `arma_engine`. One shared 8×8
  multiplier then computes the five products in five clocks (a1, a3, a4, b2,
  b3). A sixth clock writes c16, c8 and e8, computes e8 = r8 − c8 and shifts
  the delay lines. The output word changes 6 clocks after the strobe is seen
  and holds its value until the next sample.
- A strobe that arrives while a sample is being computed is dropped and
  flagged as `overrun`. Dividers of 7 or more never overrun.

## Modules

| file | role |
|---|---|
| `rtl/arma_pkg.sv` | widths, the `sel_e` field codes, the `arma_coefs_t` record, reset values |
| `rtl/coef_regfile.sv` | input-word decoder and configuration registers |
| `rtl/sample_divider.sv` | sampling-strobe generator |
| `rtl/arma_engine.sv` | the ARMA evaluation: multiplier, accumulator, delay lines, error |
| `rtl/arma_pid_top.sv` | the chip: `clk`, `rst_n`, `io_in[15:0]`, `io_out[15:0]` |

Reset is asynchronous and active low everywhere. The engine's `c8`, `e8`,
`valid`, `busy`, `overrun` and `wrap` are not routed out of the top, because
the slot has only one 16-bit output. Testbenches observe them
hierarchically, which is why lint reports them as unused in the top.

## Verification

Each testbench checks its results itself and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb/tb_coef_regfile.sv` | reset contents; 2000 random input words against a register model |
| `tb/tb_sample_divider.sv` | the 4 ms default period; exact periods for dividers 2 … 300; one-clock strobes |
| `tb/tb_arma_engine.sv` | about 360 samples with the published and with random coefficients, compared with an integer reference model; 6-clock latency; wrap flag; overrun drops the extra strobe |
| `tb/tb_arma_pid_top.sv` | whole chip programmed only through `io_in`: step, skyline, ramp over all 32 setpoints, a wrapping high-gain set, a 4-clock divider that overruns, divider changes; every sample and every sample spacing checked; the output must hold between samples |
| `tb/tb_arma_pid_full.sv` | the chip as it comes out of reset, at the real 4 ms period: a 40-sample step, then a 125-sample (500 ms) skyline; every sample checked, every period checked as 40000 clocks; prints overshoot and settling |

`tb/arma_ref_pkg.sv` is the reference model that the testbenches share. It
is written with plain integer arithmetic (floor division by 64, byte
wrapping), separate from the RTL.

To run one, for example the full-size test (about 3 s of wall time for
6.6 million clocks):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        --top-module tb_arma_pid_full rtl/arma_pkg.sv tb/arma_ref_pkg.sv \
        tb/tb_arma_pid_full.sv -o sim
    ./obj_dir/sim

## Where this RTL departs from the published design, or fills gaps

- **Product shift 6, setpoint shift 3.** The stated version is "shift by 4,
  then shift each product by 7". This is equivalent in intent, and the
  literal reading does not work (see "Fixed-point arithmetic").
- **Error taps e(k−1), e(k−2), e(k−3).** They follow the transfer function.
  The difference equation as printed names e(k), e(k−2) and e(k−3).
- **Output word = c16.** The output is the 16-bit sum, so one setpoint step is
  8 output units. A published waveform shows output 3 next to setpoint 3.
  That does not match this scaling or any scaling stated for the design, so
  it is not reproduced.
- **Choices the source leaves open:** the order of the three fields in the
  input word, the signed setpoint, the Q2.6 coefficient format, the reset
  values, the extra reset pin, the single shared multiplier with its
  five-plus-one clock schedule, and the overrun and wrap flags.
- **Gate budget.** The design has 156 flip-flops, an 8×8 multiplier and a
  16-bit adder. That is probably somewhat more than the 1,300 gates quoted
  for the slot. It has not been mapped to a cell library. The 16-bit
  registered output and the observation-only engine registers are the first
  candidates for trimming.
- **Steady-state accuracy.** As shown above, per-product truncation leaves a
  standing error of about a quarter of the setpoint with the published
  coefficients. The RTL reproduces the specified arithmetic. It does not
  correct the error.
