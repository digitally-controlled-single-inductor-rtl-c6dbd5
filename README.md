# One control loop for two boost outputs: a digital SIMO controller

A single-inductor multiple-output (SIMO) boost converter charges one inductor
from the input and then hands the stored energy to one output after another.
This RTL is the digital side of a two-output converter: 1.8 V in, 2.0 V and
2.2 V out, 5 MHz switching. A single feedback path serves both outputs, and
the loop is shared in time. In switching period 1 (phase Φ1) the
ADC reads output 1, the compensator updates output 1's duty word and the
PMOS switch of output 1 delivers the inductor energy. In period 2 (Φ2) the
same happens for output 2, and so on alternately. Each output is therefore
sampled at fs/2 = 2.5 MHz. The NMOS switch and the duty cycle are common
to both; only the destination changes.

Everything is 6 bits wide: ADC code, reference, compensator output, limiter
and DPWM word. The DPWM has no counter. It is a tapped delay line, so a 5 MHz
clock is the fastest clock in the design.

```
 vref ─┐
 ad  ──┴─► type3_compensator ─D_T3─► digital_limiter ─LIM─► dpwm ─V_DPWM─┐
             (per-output state)        (4..57 window)      (delay line)  │
                                                                         ▼
 clk ────────────────────────────────────────────────────────────► slh_block ──► s0 ──► (level shifter, off-chip here)
             clock_divider ─phi─► phase_control ◄── v_ls ◄───────────────────────────┘
                                    │ v_hg_pre
                                    ▼
                              dead_time_control ──► v_lg1 (NMOS), v_hg[k] (PMOS k), v_sel (ADC mux)
```

## Operating sequence

1. `reset` (active high, asynchronous) clears every register.
2. Until `start` is seen, the compensator output is simply `vref`.
3. **Masking period.** For 100 switching periods (20 µs) after `start`,
   the switch drive `S0` is the raw 50 % clock, whatever the DPWM produces.
   The converter ramps up open loop at a fixed 50 % duty. The compensator
   already runs and follows the outputs during this time, but its words do
   not reach the power stage.
4. **Handover.** At the clock edge where `V_SLH` rises, `S0` switches to
   the inverted DPWM output. Both sources start their high time at the same
   rising clock edge, so the handover happens on a period boundary and leaves
   no runt pulse.
5. **Closed loop.** Each period: `S0` is high (NMOS on, inductor charging)
   for `LIM · Δt0`, then the active output's PMOS conducts for the rest of
   the period.

## Compensator (`type3_compensator`)

A third-order IIR (Type III) filter acts on the error `e = vref − ad`:

```
D_T3 = vref + z⁻¹ · H(z) · e
H(z) = (2.985 − 2.696 z⁻¹ − 2.9785 z⁻² + 2.7031275 z⁻³)
     / (1 − 1.962301 z⁻¹ + 1.193807 z⁻² − 0.231506 z⁻³)
y[k] = Σ b_i e[k−i] − Σ a_i y[k−i]
```

The denominator has a root at z = 1, which is an integrator, plus a
near-double pole at 0.481. The coefficients are quantised to 14 fractional
bits (`simo_pkg`). The state `y` keeps 8 fractional bits and is clamped to
±64 codes (`Y_LIM`). The clamp bounds wind-up during the masking period,
when the error is large and the loop is open. `D_T3` saturates to 0..63.

**Interleaved state.** Each output has its own filter history. The
registers form chains 3·N_CH deep that rotate every period. In the period
of output k, the "previous" samples are the ones output k produced
N_CH, 2·N_CH and 3·N_CH periods earlier. The output register holds the
result computed one period before for the same output, so `D_T3` at an
edge is the word for the phase that starts there.

A single shared state is cheaper, but it averages the two errors. In
closed-loop simulation it settles both outputs at one voltage (about 2.1 V)
instead of 2.0 V and 2.2 V. With separate state, each output has its own
integrator.

The reference model in `tb_type3_compensator` recomputes the filter in
integer and real arithmetic for N_CH = 2 and 3. It also checks that one
output's error never leaks into the other's words.

## Limiter (`digital_limiter`)

`LIM = D_T3` if `lo_lim ≤ D_T3 ≤ hi_lim`, otherwise the violated limit. The
limits are ports. The top ties them to 4 and 57, which are the codes inside
a 5 %–90 % duty window (5 % of 64 = 3.2, 90 % of 64 = 57.6). A word equal to
a limit passes unchanged.

## DPWM (`dpwm` and its parts)

The 6-bit word is split into three 2-bit fields. Each field picks one of four
taps in a delay segment:

| segment  | select     | tap spacing      | cells                           |
|----------|------------|------------------|---------------------------------|
| coarse   | `LIM[5:4]` | Δt2 = 16 Δt0     | `delay_group` level 2 (16 units) |
| moderate | `LIM[3:2]` | Δt1 = 4 Δt0      | `delay_group` level 1 (4 units)  |
| fine     | `LIM[1:0]` | Δt0              | `unit_delay_cell`                |

Coarse feeds moderate and moderate feeds fine, so an edge entering the line
leaves the fine mux `LIM · Δt0` later. An output latch is cleared at the
rising clock edge and set by the delayed edge, so `V_DPWM` is low for
`LIM · Δt0` and `S0 = ~V_DPWM` is high for `LIM/64` of the period. Δt0 is
Ts/64 = 3.125 ns. `delay_group` builds every group from the single unit
cell, recursively, four per level.

**Why the line carries a pulse, not the clock.** If the 50 % clock itself
ran down a line 3/4 of a period long, some coarse taps would be high and
others low at every instant. Changing a select would then either drop the
period's edge or create a false one, and this really happens whenever the
word crosses a 16-code boundary. So the line input is a 2 Δt0 pulse made
from each rising clock edge (`clk & ~clk delayed by 2 Δt0`). That pulse has
left the coarse and moderate segments well before the next edge, so:

* coarse and moderate selects load on the rising clock edge. Only tap 0,
  which carries the new edge itself, is active at that instant.
* the fine select loads at 63.5 Δt0, after the latest possible set edge
  (code 63 arrives at 63 Δt0). A step it causes at the fine output can
  only reach a latch that is already set, so nothing can be seen.

The word present at the edge that starts a period sets that period's pulse.
The strobe at 63.5 Δt0 comes from the same cells on a fixed chain.

**Latch.** `dpwm_sr_latch` is a flip-flop clocked by the delayed edge (D = 1)
whose asynchronous clear is a Δt0/2 pulse made from the rising clock edge.
Code 0 arrives while the clear is still active, so `V_DPWM` stays low for
the whole period. Codes 0..3 are outside the limiter window anyway.

**Delay cell.** `unit_delay_cell` stands for an RC-loaded inverter pair. It
is an inertial delay: pulses shorter than the delay disappear, as they
would on a slow RC node. The test bench checks this. The DPWM is designed
so that no pulse on the line is shorter than 2 Δt0.

## Handover and timing command (`slh_block`, `t_cmd`)

`t_cmd` counts switching periods from the first clock edge that sees
`start`, and raises `V_SLH` after exactly `TCMD_CYCLES` = 100 periods
(20 µs at 5 MHz). In an analog implementation this would be a delay chain or
RC timer; a 7-bit counter does the same with an exact length. `slh_block`
holds the mux `S0 = V_SLH ? ~V_DPWM : clk`.

## Phases, gate signals and dead time

* `clock_divider`: an N_OUT-bit one-hot ring clocked by `clk`. `phi[k]` is
  high during the periods of output k+1; phase 1 comes first after reset. An
  assertion checks that the ring stays one-hot.
* `phase_control`: the active phase's PMOS pre-drive follows `V_LS` (the
  level-shifted `S0`). It is high (PMOS off) while the NMOS is on and low
  (PMOS on) for the rest of the period. Every other pre-drive is held at 1,
  which keeps its PMOS off.
* `dead_time_control`: `v_lg1 = v_ls & v_ls delayed`, so the NMOS turns on
  1 ns after the PMOS turned off. `v_hg[k] = pre | pre delayed`, so a PMOS
  turns on 1 ns after the NMOS turned off. Turn-offs are immediate. `v_sel`
  is the active phase index and drives the sense multiplexer in front of the
  ADC.

In the top, `s0` leaves the chip boundary and `v_ls` comes back. A test bench
ties them together; a real system puts the level shifter between them.

## Parameters (top: `simo_controller_top`)

| parameter      | default | meaning                                  |
|----------------|---------|------------------------------------------|
| `N_OUT`        | 2       | number of outputs / phases               |
| `HI_LIM`       | 57      | limiter upper code (≈ 89 %)              |
| `LO_LIM`       | 4       | limiter lower code (≈ 6 %)               |
| `TCMD_CYCLES`  | 100     | masking length in switching periods      |
| `UNIT_DELAY`   | 3125 ps | Δt0; Ts = 64 · Δt0                       |
| `DEAD_TIME_PS` | 1000    | gate dead time                           |

Word width (6), coefficient and state formats, and Ts are in `simo_pkg`.
The DPWM and dead-time parts use `#` delays and real time, so they are
behavioural models of analog delay elements. Synthesis ignores those delays.
The other blocks are plain synchronous RTL.

## Departures from the reference design and open points

* **Compensator poles.** The coefficients used are those of the difference
  equation above. The pole list that accompanies the reference design's
  Bode plot (0.823, 0.4812 ± 0.0006i) does not match them: the denominator
  has an integrator pole at 1. The difference equation was followed.
* **Per-output compensator state** (see above); whether the original
  shares one state is not stated.
* **DPWM line input and select timing**, the **flip-flop latch**, and the
  omission of the fourth cell of each segment. That cell would only load the
  last tap and drive nothing.
* **Clock divider input.** The divider is clocked by the switching clock.
  The block diagram seems to draw it from S0, but the description derives
  fs/n from fs.
* **Values not given by the source**: Δt0, dead time, limiter codes, state
  width, ADC scaling (test bench: 1 V full scale, Vref code 31 ≈ 0.48 V).
* **Not built:** the level shifter, ADC, sense divider and multiplexer,
  clock generator, gate drivers and power stage. They are analog. Their
  signals are ports of the top. `tb/simo_power_stage_model.sv` is a
  simple behavioural plant used only for testing.

## Test benches

Each block has a self-checking bench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=… failures=…` and has a watchdog.

`tb_simo_controller_top` runs the whole controller at its default
parameters for 3000 periods (600 µs). It is closed around
`simo_power_stage_model`: a 600 nH / 0.19 Ω inductor, two 2 µF capacitors
with 45 Ω loads, and a 6-bit ADC sampled at mid-period. Along the way it
forces the ADC to 0 and then to 63 to drive both limiter clamps. Every
period it checks the limiter, the exact `S0` width (`LIM · 3125 ps`),
phase/`V_SEL` order and break-before-make. It counts masking periods, the
handover, DPWM pulses, both clamps, in-window words, deliveries to each
output and dead-time gaps, and fails if any of them never happened. In
closed loop the outputs settle near 2.0 V and 2.25 V.

`tb_simo_workloads` runs the same closed loop through the reference
toggling between 0.46 V and 0.50 V (codes 29 and 32) and through 45 Ω → 33 Ω
load steps, one output at a time. It checks that each output regulates to
within 1.5 ADC codes, follows the reference by about 0.2 V, and holds within
0.1 V under its own load step.

**Cross-regulation limit.** When output 2 steps to 33 Ω, output 1 rises
by about 0.45 V in this plant model. Output 1's word sits at the lower clamp
(code 4) the whole time, so the excess does not come from the loop. It is
energy carried over by the inductor current from output 2's phase. The
bench bounds the rise at 0.6 V and reports it.

`tb_dpwm` checks all 64 codes and a new random code every period.

Simulate with Verilator 5 (the design uses `--timing` delays). `-y rtl`
finds each module in `rtl/<module>.sv`:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/simo_pkg.sv \
  tb/simo_power_stage_model.sv tb/tb_simo_controller_top.sv \
  --top-module tb_simo_controller_top -o sim
./obj_dir/sim
```

For a block bench, replace the last two files with `tb/tb_<block>.sv` and
the top module name. The full-size run takes about 15 s.
