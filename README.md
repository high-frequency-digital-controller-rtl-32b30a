# Sigma-delta DPWM controller for high-frequency buck converters

A digitally controlled buck converter needs a digital pulse-width modulator
(DPWM) with fine duty-ratio steps. Without them the output voltage cannot be
held inside the error window of the A/D and the loop limit-cycles. A
conventional 10-bit DPWM needs 1024 time steps per switching period. At a
switching frequency of several MHz that means a GHz-class counter or a
1024-tap delay line, and it costs power in proportion to frequency ×
resolution.

This design avoids that with two ideas, taken from the paper *High-Frequency
Digital Controller for DC-DC Converters Based on Multi-Bit Σ-Δ Pulse-Width
Modulation*:

1. **Multi-bit Σ-Δ DPWM.** A fast but coarse 4-bit DPWM has 16 time steps per
   period. A first-order sigma-delta loop in front of it changes its command
   from period to period, so that the average duty over a few periods has 10
   bits of resolution. The converter's LC filter does the averaging.
2. **Dual-sampling compensator.** In steady state the output is sampled only
   every 6th switching period. This saves power and gives the Σ-Δ
   dithering time to average. When the error leaves a ±2-step window, the
   controller switches at once to a dynamic mode: it samples every period,
   uses a more aggressive control law, and drives the coarse DPWM directly,
   bypassing the Σ-Δ loop. It switches back when the error is small again.

All of it is synthesizable SystemVerilog, apart from a behavioural model of
the windowed A/D converter. It is verified in closed loop against a
behavioural buck converter (8 V → 3.3 V at 2 MHz, 0.1 A ↔ 1 A load steps,
4 V to 10 V input).

## Signal flow

```
            v_sense (H*v_out)                              +--------------------------------+
                 |                                         |            sd_dpwm             |
          +--------------+  e[n]   +--------------+ d_ss   |  +---------+  d_LR  +---------+ |  c   +-----------+  C
 v_ref -->| windowed_adc |--+----->|lut_compensator|------>|->| sd_loop |------->|ring_dpwm|-+----->| dead_time |----> high side
          +--------------+  |      +--------------+ d_dy   |  |  (+mux) |        +---------+ |      +-----------+----> low side
                            |          ^   ^  |----------->|->|         |                    |                    C_n
                            |          |   |               |  +---------+                    |
                            |   sample_en  mode            +--------------------------------+
                            |      (clk1)   |                      ^ mode         | period_tick
                            +----->+--------------+----------------+              |
                                   | mode_control |<-------------------------------+
                                   +--------------+
```

| Module | What it is |
|---|---|
| `sd_controller` | Top: `windowed_adc` + `sd_core`. Simulation model, because its A/D input is `real`. |
| `sd_core` | Everything digital: `mode_control`, `lut_compensator`, `sd_dpwm`, `dead_time`. Synthesizable. |
| `sd_dpwm` | The Σ-Δ DPWM: `sd_loop` feeding `ring_dpwm`. |
| `sd_loop` | Σ-Δ loop: two adders, one delay register, truncation, and the dynamic-mode multiplexer. |
| `ring_dpwm` | Low-resolution DPWM: a token circulating in a ring of 2^LR_BITS delay cells. |
| `mode_control` | Hysteretic mode logic and the clk1 divider (÷6 in steady state, ÷1 in dynamic mode). |
| `lut_compensator` | Table-based incremental PID with a steady-state and a dynamic coefficient set. |
| `dead_time` | Produces the complementary gate drives C / C_n with a dead time. |
| `windowed_adc` | Behavioural model: 9-level error (−4..+4) of the sensed voltage against the reference. |
| `sd_pkg` | Shared types: `err_t` (4-bit signed error), `mode_e` (`MODE_SS`, `MODE_DY`), limits. |

## How the Σ-Δ DPWM reaches 10 bits with a 4-bit modulator

Let `d[n]` be the 10-bit duty command, a fraction of the period, and let
`d_LR[n]` be the 4-bit command sent to the coarse DPWM. `sd_loop` keeps one
10-bit register `x`:

```
d_LR[n] = x[n] >> 6                   (truncate to the 4 MSBs)
e_D[n]  = d[n] - (d_LR[n] << 6)       (first adder: what the coarse DPWM missed)
x[n+1]  = x[n] + e_D[n]               (second adder + delay register)
```

The register integrates the truncation error. Whatever one period loses is
carried into the next. Over N periods,

```
sum_{n<N} d_LR[n]·64 = N·d − x[N]      with 0 ≤ x < 1024,
```

so the average duty of `c` equals `d` to within one full-scale step divided by
N. In z-domain terms `D_LR = z⁻¹·D + (1 − z⁻¹)·E_q`. The command passes with
one period of delay, and the quantization error is pushed to high frequencies,
where the LC filter removes it. The usual rule of thumb is that each period
added to the averaging window gains about 1.5 bits. A 4-bit modulator then
gives 10 effective bits over 5 periods, provided the LC corner frequency is
well below f_sw / 5.

Example with 9 bits on a 3-bit DPWM: for d = 0.3 (154/512) and everything
starting at zero, the first commands are 0, 0.25, 0.25, 0.375, 0.25, … and
their running average converges to 0.3.

Two details are this design's own:

- **Input limit.** `d` is clamped to 15/16, the largest duty the 16-step DPWM
  can produce. With the clamp, `x` stays below 1024, so the register never
  overflows and `d_LR` never exceeds 15. An assertion in `sd_loop` checks this.
- **Bypass.** In dynamic mode the multiplexer sends `d_dy` to the DPWM and the
  integrator is held at zero. When steady state resumes, the loop restarts
  from a clean state.

### The ring DPWM

`ring_dpwm` has 16 delay cells of `CELL_STAGES` flip-flops each, and one token
circulates through them. The output is set when the token enters cell 0. A tap
multiplexer clears it when the token enters cell `d_LR`. The duty therefore
takes the values k/16, k = 0..15, and a duty of 0 gives no pulse. One trip
round the ring is one switching period.

`period_tick` is high in the last cycle of the period, which is the cycle
where the token sits in the last flip-flop. The whole controller advances on
it: the DPWM latches its next command, the Σ-Δ register updates, and the
divider counts.

In the original design the ring is a free-running ring oscillator whose cells
are D flip-flops used as delay elements, with no clock. Here the ring is a
synchronous one-hot shift register clocked by `clk`, so one clock period
plays the part of one flip-flop delay. This keeps every block ordinary
synthesizable logic with a single clock. The cost is that `clk` must run at
16 × `CELL_STAGES` × f_sw.

## Dual-sampling compensation

### Modes (`mode_control`)

| Error | Mode | clk1 (`sample_en`) | DPWM fed by |
|---|---|---|---|
| \|e\| ≤ 2 and steady state before | steady state (`MODE_SS`) | every 6th period | Σ-Δ loop, from `d_ss` (10 bit) |
| \|e\| > 2 | dynamic (`MODE_DY`), entered in the same clock cycle | every period | `d_dy` (4 bit), loop bypassed |
| \|e\| = 2 | keeps the current mode | | |
| \|e\| < 2 at a dynamic-mode sample | back to steady state | | |

The mode bit is set combinationally from the A/D error, so the bypass acts
within the current clock cycle, without waiting for a sample. clk1 is a
one-cycle clock enable aligned with `period_tick`, not a divided clock.
Entering dynamic mode restarts the divide-by-6 count.

### The LUT compensator

The windowed A/D reports the error as one of only nine values, −4..+4. Every
coefficient × error product can therefore be a nine-entry table look-up, and
no multiplier is needed. The control law is the incremental PID:

```
u[n] = sat( u[n-1] + A(e[n]) + B(e[n-1]) + C(e[n-2]) )
A(e) = KA·e,  B(e) = KB·e,  C(e) = KC·e,   with  KA = Kp+Ki+Kd,  KB = −(Kp+2Kd),  KC = Kd
```

The tables are built at elaboration by a constant function from the
parameters, and the `mode` input selects one set of three tables or the
other. Both laws update one accumulator `u`, which has 4 guard bits below the
DPWM LSB, so a mode change causes no bump. The outputs are:

- `d_ss = u` truncated to 10 bits;
- `d_dy = u` rounded to 4 bits, saturating at 15.

| Law | Kp | Ki | Kd (DPWM LSBs per error step) | KA, KB, KC (parameters, ×1/16 LSB) |
|---|---|---|---|---|
| steady state | 2 | 1 | 12 | 240, −416, 192 |
| dynamic | 2 | 0.125 | 16 | 290, −544, 256 |

The original design prescribes a table-based PID with two control laws. The
coefficients above are this design's own. They were tuned for the converter
model below, for settling from any initial state over 4–10 V input and
0.1–1 A load, with a dead time of 31 ns (1/16 of the period). They are not
universal. With the same gains but a dead time of 1/64 period, the 8 V / 1 A
point settles into a limit cycle across the ±2 window. Re-tune the gains for
another power stage or dead time.

### Dead time (`dead_time`)

C (high side) is on while `c` and its last `DT` samples are all 1. C_n (low
side) is on while all of them are 0. A switch therefore turns on only after
`c` has been steady for `DT` cycles. The two drives can never overlap, even
when a pulse or gap is shorter than `DT`; such a pulse is simply swallowed.
`DT` = 1 clock cycle by default, which is 1/16 of a period at the defaults.
The converter sees that as a duty loss that the integral action absorbs.

## Timing

- One clock, `clk`. One switching period is 2^`LR_BITS` × `CELL_STAGES`
  cycles, which is 16 at the defaults. For f_sw = 2 MHz, `clk` = 32 MHz.
- All registers reset asynchronously on `rst_n` low, to zero.
- Command latency: the compensator updates at a clk1 edge. The Σ-Δ loop
  reads `d_ss` at the next `period_tick` and outputs it one period later, the
  loop's z⁻¹. In dynamic mode `d_dy` is used from the period after the next
  `period_tick`.
- `c` is a register output, high for exactly `d_LR` × `CELL_STAGES` cycles at
  the start of each period.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `D_BITS` | 10 | effective resolution of the command |
| `LR_BITS` | 4 | resolution of the ring DPWM (2^LR_BITS cells) |
| `CELL_STAGES` | 1 | flip-flops per ring cell; 4 lowers f_sw by 4 for the same clock |
| `DIV` | 6 | steady-state undersampling ratio |
| `DT` | 1 | dead time in clock cycles |
| `KA_SS`…`KC_DY`, `G_BITS`, `D_INIT` | see above, 4, 0 | compensator tables, guard bits, initial command |
| `REF_BITS`, `V_LSB` | 8, 0.01 V | A/D reference width and step |

The 9-bit / 3-bit configuration of the FPGA experiment is `D_BITS = 9,
LR_BITS = 3`. The slower configuration used in closed loop is
`CELL_STAGES = 4`.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against a
reference written independently of the RTL and ends with a
`TB_RESULT checks=N failures=M` line.

| Testbench | What it checks |
|---|---|
| `tb_sd_loop` | every command against a reference model, for 9/3 and 10/4 bits; the first commands of the d = 0.3 example; the running average; the bypass; clearing of the integrator |
| `tb_ring_dpwm` | pulse position and width on every cycle, the period length, and the command hand-over, with 1 and 4 flip-flops per cell |
| `tb_sd_dpwm` | the width of every period against the loop model; average duty equal to `d` within one step over 256 periods; dynamic mode |
| `tb_mode_control` | cycle-exact mode and strobe against a reference; 6-period and 1-period spacing; hysteresis at \|e\| = 2 |
| `tb_lut_compensator` | both outputs against a multiply-based PID model; both saturation limits |
| `tb_dead_time` | both drives against a reference history; no overlap; DT-cycle hand-over |
| `tb_windowed_adc` | all nine codes, by counting the decision levels crossed |
| `tb_sd_core` | assembled core, open loop: mode entry in the same cycle, sampling rates, first PID step, dynamic pulse widths, average duty |
| `tb_sd_controller` | closed loop at all default parameters with `buck_model` |
| `tb_closed_loop_cs4` | the same closed loop with four flip-flops per ring cell: 64 cycles per period, 128 MHz clock for 2 MHz, dead time 4 cycles |
| `tb_fpga_dpwm_9b` | 9-bit command on a 3-bit ring at 60 MHz (480 MHz clock): period, the 8 pulse widths, and the average duty in 40-period windows while the command alternates |

The closed-loop test runs a 2 MHz buck (L = 4.7 µH, C = 47 µF, 30 mΩ ESR,
50 mΩ DCR) with H = 0.5 and 20 mV of output voltage per A/D step. It covers
start-up, load steps of 1 A → 0.1 A → 1 A, and input steps to 4 V and 10 V.
After each event the output averages 3.296–3.306 V and stays inside the
±2-step window, and the controller is back in steady state. Dynamic mode lasts
about 106 µs after the load drop and 35 µs after the load rise. The test
counts every mechanism and fails if one never occurs: entering and leaving
dynamic mode, 6-period and 1-period sampling, bypassed periods, dithered
periods and dead-time intervals. The power stage values are this design's
own.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sd_pkg.sv tb/tb_sd_controller.sv \
          --top-module tb_sd_controller -Mdir obj && ./obj/Vtb_sd_controller
```

The same command works for any `tb_*`; use the testbench's name in both
places. The closed-loop run takes well under a second.

## Where this departs from the original, and what to trust

- **Ring oscillator → clocked ring.** As described above, the DPWM needs a
  clock of 16 × f_sw (× `CELL_STAGES`). That is fine for the 2 MHz converter
  (32 or 128 MHz) and plausible for 60 MHz on an FPGA with a 3-bit ring
  (480 MHz). The 115 MHz switching reported for a 0.35 µm chip relies on a
  free-running ring oscillator and would need a 1.84 GHz clock here. This RTL
  does not reproduce that operating point.
- **Asynchronous mode entry** is approximated by a combinational set inside
  the clock domain. It reacts within one `clk` cycle, 1/16 of a period.
- **Compensator structure and coefficients**, the dead-time circuit, the A/D
  step size and sign, the input clamp and the clearing of the integrator in
  dynamic mode are this design's choices where the original gives only a
  block's function or name.
- **The A/D** is an ideal, continuous-time model: no offset, no delay. The
  power stage is a forward-Euler model and exists only in the testbench.
- **Not included:** the power stage, the gate drivers, the output divider and
  any physical implementation (FPGA board, chip layout).
