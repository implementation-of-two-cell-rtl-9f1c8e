# Two-cell chaotic CNN core in Q3.12 fixed point

This core solves a tiny cellular neural network (CNN) in hardware: two cells,
coupled with weights of opposite sign and driven by a sinusoid. With the
reference parameters, the network is chaotic. Its trajectory wanders over a
bounded, roughly point-symmetric attractor and never repeats. A chaotic
signal like this can serve as the entropy source or seed of a random number
generator. The core iterates a discretised version of the network's
differential equations once per tick of a slow clock. It keeps the recent
trajectory in block RAM and talks to a host PC over RS232. The host loads
the parameters, starts and pauses the run, and reads the states back.

## The model

The continuous network is

    dx1/dt = -x1 + p f(x1) - s f(x2) + g(t)
    dx2/dt = -x2 + s f(x1) + p f(x2)
    f(x)   = 0.5 (|x+1| - |x-1|)          (a clamp to [-1, 1])
    g(t)   = A sin(2 pi t / 4)

The reference values are p = 2, s = 1.2 and A = 4.04, starting from
x(0) = (0.14, -0.1). Cell 1 feeds cell 2 with weight +s, and cell 2 feeds
cell 1 with weight -s. Each cell also feeds itself with weight p. Only cell 1
receives the drive g.

The core uses the semi-implicit Euler form of these equations, with step T:

    x_i[n+1] = ( x_i[n]/T + c_i1 f(x1[n]) + c_i2 f(x2[n]) + u_i[n] ) / (1 + 1/T)
    g[n]     = A sin(2 pi n T / 4)

The coefficients are (c11, c12) = (p, -s) and (c21, c22) = (s, p). The inputs
are u1 = g and u2 = 0. With T = 0.005, the divisor is a = 1 + 1/T = 201.

The hardware evaluates each update in an equivalent form. Multiplying the
numerator and the denominator by T gives:

    x_i[n+1] = ( x_i[n] + T (c_i1 f1 + c_i2 f2 + u_i) ) / (1 + T)

This costs one multiplication and one division per cell, instead of two
divisions.

## Number format

Every stored value is 16-bit signed two's complement in Q3.12 format: a sign
bit, 3 integer bits and 12 fraction bits. The range is -8 to 7.99976, and the
resolution is 2^-12 = 0.000244. The parameters become the nearest codes:

| quantity | value  | Q3.12 code | represented |
|----------|--------|-----------:|------------:|
| p        | 2      | 8192       | 2.0         |
| s        | 1.2    | 4915       | 1.19995     |
| A        | 4.04   | 16548      | 4.04004     |
| T        | 0.005  | 20         | 0.00488     |
| x1(0)    | 0.14   | 573        | 0.13989     |
| x2(0)    | -0.1   | -410       | -0.10010    |

The coarsest rounding is that of T. The core therefore integrates with a step
of 0.00488, about 2.3 % smaller than 0.005. This changes the time scale a
little but not the character of the attractor. Over the 80,000-iteration
reference run, x1 stays within ±5.08 and x2 within -2.60 to 2.80.

## Arithmetic inside a cell (`cnn_cell`)

This is the part that decides how far the fixed-point result can be trusted.

1. `f1` and `f2` come from `cnn_pwl`, a clamp to ±4096. For Q3.12 codes this
   equals the |x+1| - |x-1| formula exactly.
2. The weighted sum `c1*f1 + c2*f2 + (u << 12)` is formed exactly in Q.24
   with 34 bits.
3. The sum is multiplied by T and rounded back to Q.24. This is the only
   rounding before the division.
4. The numerator is `(x << 12) + T*sum`, in Q.24 with 39 bits, and the
   divisor is `4096 + T`. The magnitude of the numerator is doubled and then
   divided in a bit-serial restoring divider (`cnn_divider`, 39 cycles). The
   extra quotient bit rounds the result to the nearest Q3.12 code.
5. The sign is reapplied, and the result saturates to the 16-bit range.

Compared with the same step in double precision, one update is within 1 LSB.
A full iteration, including the table-based sine, is within 2 LSB. Because
the system is chaotic, these tiny differences grow over many iterations. A
long fixed-point run follows a different path than a floating-point run, but
on the same attractor. The testbenches therefore check every single step from
the hardware's own previous state, not a whole trajectory.

## The sinusoidal drive (`cnn_sine_gen`)

A 14-bit phase register holds the time t = nT modulo 4, in the same Q.12
units as T. Each iteration adds T to it, so it wraps at exactly t = 4.0, one
period of the drive, whatever T is. The top two phase bits select the
quadrant, and the next eight bits index a quarter-wave table. The table has
257 entries, round(32767 sin(pi/2 · k/256)) for k = 0 … 256, and is stored in
`rtl/cnn_sine_rom.hex`. Quadrant symmetry gives the full wave. The table value
is multiplied by the amplitude register A and rounded to Q3.12. The lookup
takes the nearest lower table entry, so g is at most about 40 LSB off the
ideal sine at A = 4.04. After the division by 1 + 1/T, that is 0.2 LSB in the
state.

## Blocks and data flow

```
 uart_rxd ─► uart_rx ─► cnn_host_if ─► registers / start / stop / resume ─► cnn_circuit
 uart_txd ◄─ uart_tx ◄─┘   ▲  cache reads, status                          │  ▲
                           └──────────────── cnn_cache (2 x cnn_bram) ◄────┘  │
                                                                        tick  │
                                              cnn_clock_gen ──────────────────┘
```

| module          | role |
|-----------------|------|
| `cnn_pkg`       | Q3.12 type, reset values, register numbers, command codes |
| `cnn_clock_gen` | 32-bit counter. Gives a one-cycle `tick` every `DIV` = 50 board clocks (1 MHz at 50 MHz) and a divided square wave `clk_slow` |
| `cnn_circuit`   | The eight parameter registers, the iteration FSM, the sine generator, two `cnn_pwl`, two `cnn_cell` |
| `cnn_cell`      | One cell's update, 40 cycles from `start` to `done` |
| `cnn_divider`   | Restoring divider, one quotient bit per cycle |
| `cnn_pwl`       | f(x) |
| `cnn_sine_gen`  | g[n] |
| `cnn_cache`     | Two `cnn_bram` of 5120 × 16 bits (10 KB each, 20 KB in all). They hold x1 and x2 at address n mod 5120 |
| `cnn_bram`      | Simple dual-port RAM: one write port and one registered read port, usable in the same cycle |
| `uart_rx`, `uart_tx` | RS232 at 8N1, 434 clocks per bit (115200 baud at 50 MHz) |
| `cnn_host_if`   | Byte-command decoder |
| `cnn_top`       | Wires everything together on the one board clock |

### One iteration

The whole core runs on the board clock, and `tick` is a clock enable. No logic
runs on the divided clock. On a tick, while a run is active, `cnn_circuit`
goes through these steps:

1. It reads x[n] from cache address n.
2. It clamps both states and starts both cells in parallel with the current
   g[n].
3. After 40 cycles, it writes x[n+1] to address n+1.
4. It advances the sine phase and increments the 32-bit iteration count.

`iter_done` pulses 44 board clocks after the tick, so the tick period must be
at least 45 clocks. The default is 50. If a tick arrives while an iteration is
still in flight, it is dropped and the sticky `overrun` status bit is set. A
`start` clears the bit.

`start` writes the initial-value registers x1(0) and x2(0) into cache
address 0. It also clears the count and the sine phase. `stop` lets the
current iteration finish and then pauses. `resume` continues without
reinitialising. Registers can be written at any time, and a new value is used
from the next iteration on.

The cache's read port is shared. The circuit's read always wins. A host read
waits at most one cycle and is served in a cycle without a circuit read.

## Host protocol

Multi-byte values are big-endian. Registers and states are Q3.12.

| bytes sent            | action | reply |
|-----------------------|--------|-------|
| `0x10+r, hi, lo`      | write register r | – |
| `0x20`                | start: x(0) to address 0, count and phase to 0, run | – |
| `0x21`                | stop after the current iteration | – |
| `0x22`                | resume | – |
| `0x30, ahi, alo`      | read cache address a | x1 hi, x1 lo, x2 hi, x2 lo (zeros if a ≥ 5120) |
| `0x40`                | status | n[31:24], n[23:16], n[15:8], n[7:0], {6'b0, overrun, running} |

The registers are: r = 0 x1(0), 1 x2(0), 2 A11 (p), 3 A12 (-s), 4 A21 (s),
5 A22 (p), 6 T and 7 A. Their reset values are the reference network, so
after reset a single `0x20` runs the reference experiment. The cache keeps
only the last 5120 states. To collect a longer series, the host stops the run
before the cache wraps, reads the new entries and resumes. Bytes that arrive
while a reply is being sent are ignored.

## What follows the reference design and what is this design's own

These points follow the reference design:

- the two-cell model, its discretisation and its parameters
- the 16-bit Q3.12 format of the states and of every parameter register
- the split into clock generator, CNN circuit and CNN cache
- a cache of two dual-port 10 KB block RAMs that the circuit iterates on
- the 50 MHz board clock
- the RS232 link to a host that loads initial values and parameters

These are choices of this design:

- The iteration rate: 50 clocks per iteration. The reference names no
  frequency.
- Keeping the whole core on the board clock and using the divided clock only
  as an enable.
- The rearranged update formula, the internal widths, rounding and
  saturation, and the bit-serial divider.
- The phase-accumulator sine with a 257-entry quarter table. The drive is
  sampled as g(nT), with a period of 4 time units.
- The register set: two initial states, four coupling weights, T and A.
- The one-write/one-read port split and the read-port arbitration.
- The command set, the baud rate and the 8N1 frame.
- The start, stop, resume and overrun controls.
- The observation ports `clk_slow`, `running`, `iter_done`, `x1` and `x2`.

Known departures:

- The time step is 0.00488 instead of 0.005, because of Q3.12 rounding.
- The reference implementation reports a maximum clock of 24.67 MHz on a
  Spartan-3E. This RTL has not been timed on any device. The divider and the
  wide multiply-add in `cnn_cell` are combinational paths that may need
  pipelining to close timing at 50 MHz.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5, run for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cnn_pkg.sv tb/tb_cnn_ref_pkg.sv tb/tb_cnn_top_full.sv --top-module tb_cnn_top_full
./obj_dir/Vtb_cnn_top_full
```

Run it from the directory that holds `rtl/` and `tb/`, because the sine
table is loaded from `rtl/cnn_sine_rom.hex`. `tb_cnn_ref_pkg` is a
double-precision reference of the model, and the checks compare against it.

| testbench | what it shows |
|-----------|---------------|
| `tb_cnn_pwl` | f(x) for all 65536 codes |
| `tb_cnn_divider` | random and corner divisions, 39-cycle latency |
| `tb_cnn_sine_gen` | g against the ideal sine and the table formula, period 4, clear, hold |
| `tb_cnn_cell` | single updates within 1 LSB of the real formula, saturation, 40-cycle latency |
| `tb_cnn_bram`, `tb_cnn_cache` | memory contents, same-cycle read and write, port priority |
| `tb_cnn_clock_gen` | tick spacing, `clk_slow`, enable |
| `tb_uart_rx`, `tb_uart_tx` | 8N1 framing, frame error, glitch rejection |
| `tb_cnn_host_if` | every command, with a stalling transmitter and a busy cache port |
| `tb_cnn_circuit` | every iteration within 2 LSB; start, stop, resume, register changes, cache contents, overrun, the 44-cycle latency |
| `tb_cnn_top` | end-to-end over the serial link with a 64-word cache: every iteration checked, and each mechanism counted (register write, start, cache wrap, saturation of f, read while running, stop, status, resume, restart) |
| `tb_cnn_top_full` | default sizes: the 80,000-iteration reference run, loaded and read over the link at 115200 baud. Every iteration is checked, and the attractor's extent must match the published plots (x1 peaks 4.5–5.5, x2 peaks 2–3, both signs). It takes a few seconds |

## Changing it

- Parameters of `cnn_top`: `CLK_DIV` (≥ 45), `CLKS_PER_BIT` and `DEPTH`.
  `DEPTH` sets the words per cache memory; host addresses are 16 bits, so
  keep it below 65536.
- Another network: write the registers. Couplings, T and A are all
  run-time values.
- A faster iteration: shorten the divider with a radix-4 step, or share one
  divider and reuse the 1/(1+T) reciprocal. The 40-cycle cell latency is what
  bounds `CLK_DIV`.
