# Temperature-compensated clock distribution over FPGA transceivers — leader logic

A leader FPGA sends its system clock to a follower over the serial link of a
multi-gigabit transceiver (MGT), and the follower sends its recovered clock
back. This is a common way to distribute a clock with picosecond precision.
The transceivers' delays change with temperature, though. The TX path moves
by about 1.4 ps/°C and the RX path by about 0.6 ps/°C, so a 45 °C swing moves
the loop by about 90 ps. This RTL is the fabric logic of the leader node. It
keeps those delays still in three steps:

1. **Measure on chip.** A dual-mixer time-difference (DDMTD) phase detector
   measures the TX delay (system clock against the TX output clock
   `TXOUTCLKPCS`) and the loop delay (system clock against the loop-back
   clock `RXOUTCLKPCS`). The RX delay is the difference of the two.
2. **Make the DDMTD reference without extra parts.** The slightly offset
   reference clock that a DDMTD needs comes from a spare transceiver
   channel. That channel's TX PLL runs from the system clock, and its phase
   interpolator (PI) is rotated at a steady rate. The reference therefore
   follows every drift of the system clock, and the frequency difference,
   and with it the resolution, stays constant.
3. **Compensate on both nodes.** A servo steps the leader's TX PI against
   the drift of the TX delay. A second servo produces PI steps for the
   follower's TX PI against the drift of the RX delay. Together they hold
   the whole loop still.

The scheme follows the published work *Temperature Effects Characterization
and Compensation of FPGA MGTs for Clock Distribution and Synchronization*.
That work gives the measurement plan, the way the reference is made and what
the compensation adjusts. It does not give the logic. The sampling and
deglitching, the averaging and number formats, the control law, the clock
crossings and the port details are this design's own. They are listed below
with the reasons.

## The link and where this logic sits

```
 oscillator ── clk_sys ─┬─────────────── data_controller ──► channel 1 TX ──► downlink ──► follower RX
                        │                                     (PLL, PI, ÷D,                 │ recovered clock
                        │                                      ÷N, PISO)                    ▼
                        │   pi_ppm_driver ──ch2_pi──► channel 2 TX (PLL, PI, ÷D, ÷N)    follower TX (PI)
                        │                                 │ TXOUTCLKPCS = clk_ref            │
                        │                                 ▼                                  ▼
                        ├──► ddmtd ◄── txoutclkpcs (channel 1 TX)                        uplink
                        │     ▲  ◄──── rxoutclkpcs (channel 1 RX) ◄─────────────────────────┘
                        │     ▼
                        │   delay_calc ─► pi_compensator (leader)   ─► pi_step_sync ─► ch1_pi
                        │               └► pi_compensator (follower) ─► pi_step_sync ─► follower_pi
```

`mgt_sync_leader` is the top. The transceivers, the oscillator, the fibres
and the follower board are hardware outside the fabric. Their clocks enter
as ports, and the PI controls leave as ports. `follower_pi` is the PI
control the follower's TX needs. How it reaches the follower (a spare field
in the downlink words, a separate channel, software) is left to the
integrator.

## Measuring picoseconds with the DDMTD

This is the part of the design that takes the most thought.

**Beat and magnification.** `clk_ref` runs slightly slower than the system
clock: `f_sys = f_ref·(N+1)/N`. A clock sampled as data by `clk_ref` turns
into a slow square wave, the *beat*, with a period of N reference cycles.
Delay a clock by d, and its beat is delayed by `d·N/T_sys` reference
cycles. The time difference is magnified N times, and one count of
`clk_ref` stands for `T_sys/N`. With the reference rotated by one PI code
per system-clock cycle, N = 40 × 64 = 2560: a 40-bit internal word, times
64 PI codes per unit interval. At T_sys = 6.25 ns one count is then 2.44 ps.

**Deglitching.** Close to a beat transition, jitter makes successive samples
flip back and forth. `ddmtd_deglitch` flips its output only after
`THRESH` consecutive samples that disagree with it. Every real transition
then gives exactly one edge, which lags by a fixed amount. The lag is the
same for all three channels, so it cancels in a difference.

**Tags.** A free-running counter of `clk_ref` cycles is captured at every
rising beat edge. The phase of the TX (or loop) channel is its tag minus the
tag of the latest system-clock edge, and it lies in `[0, N)`. The
system-clock channel is shared by both measurements. N is measured
continuously as the distance between successive system-clock edges
(`beat_period`).

**Unwrapping and averaging** (`phase_avg`, inside `delay_calc`). A phase is
known only modulo N. A delay close to a whole clock period therefore reads
close to 0 one time and close to N the next. The first accepted sample of
each channel becomes a reference r. Later samples are folded into
`[r − N/2, r + N/2)`, and 2^`AVG_LOG2` of them are summed. The results are
signed fixed-point numbers in counts, with `AVG_LOG2` fraction bits. They
stay continuous as a drifting delay crosses the wrap point. Their absolute
value is only meaningful modulo one clock period; their changes are what
the compensation uses. `cfg_meas_clear` re-fixes the references.

**Converting to time.** `delay_ps = delay · T_sys / (beat_period · 2^AVG_LOG2)`.
The hardware leaves this to the consumer (the testbench does it). Only the
ratio to a baseline matters for compensation.

**RX delay.** `rx_delay = loop_delay − tx_delay`. It covers everything in
the loop except the leader's TX path: fibres, the follower's RX and TX, and
the leader's RX. When only the leader heats up, the change comes from the
leader's RX.

## The reference channel: `pi_ppm_driver`

A phase accumulator adds `cfg_ref_rate` every system-clock cycle. Each carry
issues one PI step of `cfg_ref_step` codes in the retarding direction, and
there is at most one step per cycle (`cfg_ref_rate = 2^16`). Steadily
retarding the phase lengthens the period, which produces the slower
reference. N is `2560 / cfg_ref_step` at full rate, and proportionally
larger at lower rates. It must stay below 2^`CNT_W`.

## Compensation: `pi_compensator`, `pi_step_sync`

Each servo takes the first measurement after it is enabled as its baseline.
For each later measurement:

- error > +`cfg_deadband`: one step that advances the clock (less delay);
- error < −`cfg_deadband`: one step that retards it;
- after a step, the next `SETTLE` measurements are skipped. The averaging
  windows that straddle the step do not yet show all of it.

`pi_pos` is the net number of steps applied. The leader's servo watches
`tx_delay`; a leader step moves TX and loop by the same amount and leaves
the RX delay alone. The follower's servo watches `rx_delay`; a follower step
moves only the loop. The two loops are therefore independent. The steady
residual is within the deadband plus one PI step. With a deadband of 12
units (0.75 count) and one code per step (2.44 ps), that is about 4 ps.

`pi_step_sync` carries a request from `clk_ref` to `clk_sys` with a toggle
synchroniser. It emits `ppm_en` for one cycle with
`stepsize = {direction, STEP_CODES}`. The PI bundle `pi_ctrl_t` (package
`mgt_sync_pkg`) mirrors the TXPIPPM* controls of UltraScale+ GTY
transceivers: `ppm_en`, `ovrd_en`, `sel`, `pd` and `stepsize[4:0]`. Here
`stepsize[4] = 1` means retard. Check both the polarity and the
port-clock requirement against the transceiver you use. If the real
polarity is the opposite, swap `PI_DIR_RETARD`/`PI_DIR_ADVANCE` in the
package.

## Data controller

The downlink words only have to keep the follower locked and aligned. Every
`COMMA_PERIOD` words a K28.5 comma goes out in byte 0, flagged as a control
byte for the transceiver's 8b/10b encoder. All other words carry a running
counter. While `cfg_data_en` is low, only commas are sent.

## Clock domains

| domain | logic | outputs |
|---|---|---|
| `clk_sys` | data_controller, pi_ppm_driver, PI bundles out of pi_step_sync | `tx_data`, `tx_charisk`, `tx_is_comma`, `ch1_pi`, `ch2_pi`, `follower_pi` |
| `clk_ref` | ddmtd, delay_calc, both pi_compensators | `tx_delay`, `loop_delay`, `rx_delay`, `beat_period`, `meas_valid`, `*_pi_pos`, `*_error`, `ddmtd_beat` |

`clk_sys`, `txoutclkpcs` and `rxoutclkpcs` are also *sampled as data* by
`clk_ref`. Sampling them is the whole point, so the first flops of `ddmtd`
see deliberate metastability, and a second flop follows them. In an FPGA,
keep these sampling flops close to the clock sources, and constrain the
paths as false paths. `arst_n` is synchronised separately into each domain.
The `cfg_*` inputs are quasi-static. `cfg_meas_clear`, `cfg_deadband` and
the two compensation enables are read in `clk_ref`; the others in `clk_sys`.

## Parameters (top)

| name | default | meaning |
|---|---|---|
| `DATA_W` | 32 | transceiver user data width (bytes get 8b/10b in the transceiver) |
| `COMMA_PERIOD` | 256 | words between commas (power of two) |
| `CNT_W` | 16 | DDMTD tag counter width; N must be below 2^CNT_W |
| `THRESH` | 16 | deglitcher threshold in reference cycles |
| `AVG_LOG2` | 4 | log2 of beat periods averaged per measurement |
| `ACC_W` | 16 | reference-rotation accumulator width |
| `POS_W` | 12 | width of the net PI step counters |
| `SETTLE` | 1 | measurements skipped after a compensation step |

At the defaults one measurement set takes 16 × 2560 reference cycles, about
256 µs.

## Verification

Every block has a self-checking testbench in `tb/`, and each ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | checks |
|---|---|
| `tb_data_controller` | comma positions and counter words against a reference model, across disable and re-enable |
| `tb_pi_ppm_driver` | step counts equal accumulator carries for several rates, spacing, clamping above full rate, no steps when disabled |
| `tb_ddmtd` | with real-valued clock delays and jitter, the phases equal d·N/T within one count (including wrap-around), and the period equals N |
| `tb_delay_calc` | averages of wrapped samples against sums of the true continuous values; RX = loop − TX; clear re-fixes the reference |
| `tb_pi_compensator` | the step decisions, direction, `pi_pos` and error against a reference of the rule, with a plant closing the loop up and down |
| `tb_pi_step_sync` | one step per request, in order, right direction and size, bounded latency, idle bundle otherwise |
| `tb_mgt_sync_leader` | end to end at default parameters, against `tb/link_model.sv` |

`link_model` is a behavioural model of the oscillator (6.25 ns), the
transceivers and the follower. TX delay = 3644.53 + 1.42·T ps and
RX delay = 4159.29 + 0.59·T ps, the linear fits of the published
measurements. PI steps are T/40/64 = 2.44 ps, and every edge carries ±2 ps
of jitter. All derived clocks take their edge times from the oscillator, so
they follow its frequency drift as PLL-derived clocks do. The end-to-end
test runs in about 15 s and does the following:

- With compensation off, it sweeps 35 → 80 °C while the oscillator drifts
  by −0.5 ppm/°C (22.5 ppm in all). The beat period stays at 2560 ± 3
  cycles, the spread that jitter alone causes. A free-running reference
  offset by 2.44 ps per cycle would have seen N move by about 6 %. The
  measured drifts come out as TX 62–66 ps, RX 26–28 ps and loop 89–92 ps,
  depending on the random seed; the model's values are 63.9, 26.6 and
  90.5 ps. The fitted slopes are within ±0.03 ps/°C of 1.42, 0.59 and 2.01.
  The checks allow ±4 ps on the drifts and ±0.1 ps/°C on the slopes.
- With both servos on, it sweeps 35 → 80 → 35 °C. The peak deviation of the
  true delays was 1.8–2.9 ps for TX and 3.0–4.0 ps for the loop; the check
  limit is 8 ps.
- It counts comma and data words, reference steps, measurement sets, and
  leader and follower steps in each direction, and fails if any of them
  never happened. Counting starts when reset is released, because before
  reset the two-state simulator starts flops at random values.

Run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mgt_sync_pkg.sv tb/tb_mgt_sync_leader.sv --top-module tb_mgt_sync_leader
./obj_dir/Vtb_mgt_sync_leader
```

Replace the testbench name to run another one. Unit testbenches override
parameters to stay short (for example N = 256 in `tb_ddmtd`).

## How far to trust it, and where it departs from the source

- **Own choices, not from the source.** The whole inner structure of the
  DDMTD (sampler, synchroniser, deglitcher, tags), averaging and unwrapping,
  every width and format, and the data word format. Also the closed-loop
  bang-bang control law, which is driven by the DDMTD measurement rather
  than by a temperature sensor and the fitted coefficients. The source
  characterises the coefficients but does not say which of the two it
  uses. Last, the clock-domain split and the PI port bundle.
- **Loop clock.** The source's block diagram takes the loop measurement
  from the leader's RX output clock (`RXOUTCLKPCS`). Its text speaks of
  "the loop-backed recovered clock". This design samples the RX output
  clock of the leader's link channel, which is that loop-backed clock.
- **Follower side.** Only the PI commands for the follower are produced;
  carrying them to the follower is not designed.
- **Reference direction.** The reference is made slower than the system
  clock, so a positive delay reads as a positive phase. A faster reference
  would invert the sign of every measurement.
- **Numbers assumed from outside the source.** A 160 MHz system clock
  (6.25 ns). The TX+RX and loop fits of the published measurements differ
  by 6250.6 ps, which matches one period of that clock. Also a 40-bit
  internal width and 1/64-UI PI resolution. They enter only through the
  testbench model and the derived value of N. The RTL itself works for any
  N below 2^`CNT_W`.
- **Not modelled.** Transceiver start-up and reset sequencing, the PI's
  internal update timing, and metastability in the DDMTD samplers (the
  simulator has two states).
