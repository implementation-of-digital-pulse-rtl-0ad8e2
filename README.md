# Hybrid digital PWM: counter, clock-manager phases and an SR latch

A plain counter-based digital PWM has a time resolution of one clock period. For a
given resolution, the switching frequency of the power converter is therefore the
counter clock divided by 2^bits. This design gets finer steps without a faster
clock. An FPGA clock manager (DCM) supplies four copies of the clock, shifted by 0,
90, 180 and 270 degrees. The counter sets the whole-cycle part of the pulse width.
The choice of clock phase that ends the pulse adds a quarter-cycle part. The pulse
is formed by an SR latch. Both of its inputs come from flip-flops, so the end of the
pulse is synchronous to a DCM clock, never to a combinational delay chain. That
keeps the design inside normal static timing analysis.

With the default sizes (8-bit counter, four phases, 20 ns clock):

| quantity | value |
|---|---|
| PWM period | 2^8 x 20 ns = 5.12 us (195.3 kHz) |
| duty command `dc` | 10 bits, 0 .. 1023 |
| high time | `dc` x 20 ns / 4 = `dc` x 5 ns |
| resolution | 5 ns, 1/1024 of the period |
| largest duty | 1023/1024 |

## Block structure

```
           +-------+  CLK0 ------------------+-----------------------------+
 clk_in -->|  DCM  |  CLK90, CLK180, CLK270 --|------------------+          |
           +-------+                         v                  v          |
                               +--------------------------+ +---------+    |
                        dc --->| frequency divider        | | DFF2    |    |
                               |  counter (N bits)        | | reset_  |-R--+
                               |  comparators -> set, clr |-| register|    |
                               |  dc holding register     | +---------+    v
                               +--------------------------+           +--------+
                                        | set    +------+             |SR latch|--> pwm_out
                                        +------->| DFF1 |------S----->|        |
                                                 +------+             +--------+
```

| module | role |
|---|---|
| `dcm_model` | behavioural model of the clock manager: the four phases, fixed phase shift, CLK2X/CLKDV/CLKFX, LOCKED |
| `pwm_counter` | N-bit synchronous counter on CLK0, counts 0 .. PERIOD-1 (default PERIOD = 2^N) |
| `pwm_comparators` | `set = (count == 0) && (dc != 0)`, `clr = (count == dc[N+1:2])` |
| `frequency_divider` | counter + comparators + a register that holds `dc` for a whole period |
| `set_register` | DFF1: SET registered on CLK0, drives S |
| `reset_register` | DFF2: CLR registered on CLK0, re-timed onto the selected phase, drives R |
| `sr_latch` | reset-dominant SR latch, its output is the PWM |
| `dpwm_top` | everything wired together, plus a reset synchronizer |
| `dpwm_pkg` | default sizes (`COUNTER_BITS = 8`, `PHASE_BITS = 2`) |

## The duty command

`dc` has N + 2 bits. Its N most significant bits are compared with the counter.
Its 2 least significant bits, `p`, choose the DCM phase:

```
dc = 4 * c + p        high time = c clock cycles + p quarter cycles
```

If the divider ratio `PERIOD` is set below 2^N, commands whose whole-cycle part c
is `PERIOD` or more never end the pulse. The output then stays high for the full
period.

`dc` may change at any time. The divider samples it during reset and in the last
cycle of each period (count = PERIOD-1). A new value therefore applies from the next
period, and a period never mixes two commands.

## Timing of one period

Edges are CLK0 rising edges, numbered so that the count becomes 0 on edge 0.
Take `dc = 4c + p`.

1. During count 0, `set` is high if `dc != 0`. DFF1 passes it to S on edge 1.
   S is high from edge 1 to edge 2, and the latch output rises on **edge 1**.
2. During count `c`, `clr` is high. On edge c+1 DFF2's first stage (`clr_q`)
   captures it, together with `p`. `clr_q` is high from edge c+1 to edge c+2.
3. For p = 1, 2 or 3, a flip-flop clocked by CLK90, CLK180 or CLK270 samples
   `clr_q`. Its copy rises p/4 of a cycle after edge c+1. For p = 0, `clr_q` is
   used directly.
4. `R = clr_q AND (selected copy)`. R is high from edge c+1 + p/4 to edge c+2.
   The latch falls at **edge c+1 + p/4**.

The pulse is therefore high for c + p/4 cycles, exactly `dc` quarter cycles.

Two corner cases decide the details.

- **Pulses shorter than one cycle (c = 0, p > 0).** R rises p/4 of a cycle
  after S, while S is still high. The latch is reset-dominant, so the overlap
  ends the pulse after p/4 cycle, as required. A set-dominant latch would stretch
  every such pulse to a full cycle.
- **The largest commands (c = PERIOD-1).** The re-timed copy of `clr_q` stays high
  until edge c+2 + p/4. The next period's S pulse rises on that edge c+2. R is
  gated with `clr_q`, which falls exactly on edge c+2, so R has ended before S
  rises. Without the gate, the start of the next pulse would be delayed.

`dc = 0` never raises S, and R fires in the first cycle, so the output stays low.

## The clock manager model

`dcm_model` is not synthesizable. It stands for the FPGA's hard DCM, and a real
design instantiates the vendor primitive in its place. The model keeps the
primitive's port names. After reset it counts `LOCK_CYCLES` input edges, raises
LOCKED and aligns once to a CLKIN rising edge, delayed by the fixed phase shift
`PHASE_SHIFT`/256 of a period (-255 .. +255). From then on it produces the four
phases at `CLKIN_PERIOD`. It does not measure CLKIN, so `CLKIN_PERIOD` must match
the clock that drives it. CLKFB is accepted and ignored. CLK2X, CLKDV and CLKFX
are modelled for completeness. The PWM does not use them.

## Reset

`rst` (active high, asynchronous) resets the DCM. The PWM logic is held in reset
by a 3-stage synchronizer on CLK0 while `rst` is high or the DCM is not locked.
It is released three CLK0 cycles after lock. The latch is cleared by the same
reset. In reset, `pwm_out` is 0.

## Relation to the original design

These parts follow the original design: the chain DCM -> counter/comparator
frequency divider -> DFF1/DFF2 -> SR latch, the 8-bit counter, division of the
clock by an integer, the SET rule (count zero and duty non-zero), the CLR rule
(count equals the N MSBs of the duty command), the four DCM phases with fixed
phase shift, and a synchronous latch reset.

These are this implementation's own choices, because the original does not fix
them:

- the duty-command format (N MSBs + 2 phase-selection LSBs);
- the way DFF2 uses the phases (two-stage re-timing, selection and the `clr_q`
  gate);
- the latch priority (reset-dominant);
- the duty-command holding register;
- the reset scheme and the 20 ns default clock.

Not implemented:

- An earlier variant that splits the comparators by counter range (0..M/2 and
  M/2+1..M-1). The counter-zero and counter-equals rules above are used instead.
- The DCM's variable (dynamic) phase shifting. The design uses fixed shifting
  only.
- The DCM's internals (delay-locked loop, delay taps). The model reproduces only
  their outputs.

## How far to trust it

- Everything except `dcm_model` is synthesizable. `sr_latch` infers a latch
  on purpose. Expect the synthesis tool to report it.
- `R` is a small combinational function (mux + AND) of flip-flop outputs on
  different clocks. In simulation it is clean. In hardware, place it next to the
  latch and constrain the paths from the phase flip-flops. The quarter-cycle
  accuracy then depends on how well the four clock paths are matched.
- `pwm_counter` and `frequency_divider` carry assertions: the count stays in
  range and returns to 0 after a wrap, SET occurs only at count 0, and the held
  command changes only at a period boundary. They are checked whenever the
  testbenches run with assertions enabled (`--assert`).
- Timing was checked in zero-delay simulation only. No FPGA timing closure or
  power measurement was done.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpwm_pkg.sv tb/tb_dpwm_top.sv \
          --top-module tb_dpwm_top
./obj_dir/Vtb_dpwm_top
```

| testbench | what it checks |
|---|---|
| `tb_dpwm_top` | whole design at default sizes: zero, sub-cycle, all phases, full scale, mid-period command change, reset with relock, then all 1024 commands, each measured as high time in simulated time (to 1 ps) and pulse start on edge 1 |
| `tb_dpwm_n4_sweep` | whole design with a 4-bit counter, three configurations side by side (period 16, period 12, two phases only), every command of each (helper: `pwm_sweep_lane`) |
| `tb_pwm_counter`, `tb_pwm_comparators`, `tb_frequency_divider`, `tb_set_register`, `tb_reset_register`, `tb_sr_latch`, `tb_dcm_model` | one module each, against reference values computed in the testbench |

The full sweep at default sizes takes about 2 seconds.

## Changing it

- `N` (counter bits) sets the counter width. `PERIOD` sets the divider ratio,
  any integer from 2 to 2^N, default 2^N. `PHASE_BITS` is 2 for four
  phases. `PHASE_BITS = 1` uses CLK0 and CLK180 only, for half-cycle steps.
  Both are parameters of `dpwm_top`, with defaults in `dpwm_pkg`.
- `CLKIN_PERIOD` and `PHASE_SHIFT` of `dpwm_top` go to the clock-manager model.
- For hardware, replace `dcm_model` by the vendor's clock primitive with the same
  connections.
