# Frequency-ratio PVT sensing and temperature-aware DRAM refresh

Ring oscillators that run at very low supply voltage change frequency with
temperature. They also change with supply voltage and with process corner.
The design here turns that into digital readings with counters only, and it
deals with the voltage and process errors in two ways:

* **Measure and compensate** (the PVT sensor). One 31-stage ring has a
  temperature-neutral ("zero temperature coefficient", ZTC) operating point,
  so its count depends only on process and supply. Sampled once after reset,
  it gives the process corner. Sampled before every conversion, it gives the
  supply range.
  - The supply range picks which of six temperature-sensing rings (TSROs) to
    run. There is one TSRO per 50 mV step between 0.25 V and 0.5 V.
  - The raw temperature count is then corrected with offsets chosen by the
    process corner and the supply range.
* **Cancel by ratio** (the process-invariant sensor). Two rings are biased so
  that process and voltage move both frequencies alike, but temperature does
  not:
  - a near-threshold ring of 51 stages;
  - a sub-threshold ring of 13 stages.

  A counter on the near-threshold ring sets a pulse 512 of its periods long.
  The sub-threshold ring is counted during that pulse. The result is
  `TS = 512 · f_sub / f_near`, which leaves mostly temperature.

The second sensor drives an application: a **refresh controller for a small
DRAM block**. DRAM cells leak faster when hot. Instead of refreshing at the
worst-case rate all the time, the controller:
- reads the temperature;
- maps it to one of four ranges;
- divides a 20 MHz clock by 1, 2, 4 or 8 for the refresh clock;
- steps a 7-bit row counter through the 128 word lines.

## Block map

```
pvt_thermal_top
├── pvt_sensor                    adaptive-voltage PVT sensor (8 CLK cycles per sample)
│   ├── pvt_fsm                   sequencer
│   ├── pv_sensor                 31-stage ZTC ring (ring_osc) + 9-bit counter -> PV[8:0]
│   ├── process_register          P[4:0] = PV[8:4] captured once after RESET
│   ├── voltage_mapping           PV + shift(P) -> V[2:0] (supply range 0.25..0.5 V)
│   ├── tsro_temp_sensor          six TSROs (ring_osc), decoder on V, mux, 12-bit counter -> T[11:0]
│   └── pv_compensation           T_OUT[12:0] = T + process term - voltage term
└── dram_refresh_ctrl             one DRAM sub-block
    ├── pi_temp_sensor            process-invariant sensor -> TS[10:0], RDY
    │   ├── pi_control_unit       S_rst / PW / N_rst / RDY sequencing on CLK
    │   ├── fixed_pulse_gen       pulse of 2^(N-1) near-threshold periods
    │   ├── ring_osc  x2          near-threshold (51) and sub-threshold (13) rings
    │   └── osc_counter           11-bit counter on the sub-threshold ring
    ├── temp_mapping_table        TS -> Ctrl[1:0]
    ├── refresh_clk_gen           CLK_IN / 1, 2, 4, 8 -> CLK_REF
    ├── refresh_counter           Row[6:0], +1 per CLK_REF
    └── row_decoder               Row -> one-hot WL[127:0]
```

`pvt_pkg` holds the shared types and constants:
- the refresh code `ctrl_e`;
- the supply code `vcode_e`;
- the corner codes `P_SS = 7`, `P_TT = 11` and `P_FF = 16`;
- the process shift function `vs_shift`.

The two sensors are independent circuits. The top places them side by side,
and each keeps its own ports: `pvt_*` for the PVT sensor and `ref_*` for the
refresh controller.

## The oscillators are models

`ring_osc` is the only part that is not synthesizable. It is a behavioural
model of an enable-gated ring of inverters:
- It has a `STAGES` parameter and takes the delay of one stage, in
  picoseconds, on the `tpd_ps` input.
- Its half period is `STAGES · tpd_ps`.
- Its output is low while disabled. The first rising edge comes one half
  period after enable.

In silicon, the stage delay is set by temperature, supply and process. In
simulation, the testbench sets it, so the `*_tpd_ps` ports stand for "the
physical condition". A synthesis flow should replace `ring_osc` with the real
oscillator cells. The rest of the design is ordinary synchronous or ripple
logic:
- counters clocked by the oscillators;
- a small amount of control clocked by the system clock.

Every oscillator counter (`osc_counter`) has:
- an asynchronous clear;
- a count enable, so it counts only rising oscillator edges inside its window.

## PVT sensor: one sample, cycle by cycle

`pvt_fsm` is built from two parts:
- three flip-flops that delay RESET;
- a 3-bit counter that runs while EN is high.

The temperature-ring enable is simply bit 2 of the counter, so a sample is
always 8 CLK cycles.

| cycle | what happens | strobes |
|------:|--------------|---------|
| after RESET falls | process sensing: ZTC ring counts for one CLK cycle | `en_ztc`, `p_done` low |
| next | P[4:0] ← PV[8:4] | `p_load` |
| 1 | both counters cleared | `reset_ctr` |
| 2 | voltage sensing: ZTC ring counts for one CLK cycle | `en_ztc` |
| 3 | V[2:0] latched from PV and P | `v_load` |
| 4–7 | TSRO for V counts for four CLK cycles | `en_tsro` |
| 0 | compensation: T_OUT latched, `t_valid` the next cycle | `t_load` |

The compensation load is a registered flag set in state 7. The state 0 the
counter passes through before the first measurement therefore loads nothing.
EN low resets the counter at once, and the sensor idles. If EN falls during
state 0, a conversion that has completed its four temperature cycles is still
compensated. While EN stays high, the loop repeats. At a 400 kHz CLK, a
sample takes 20 µs, which gives 50 k samples/s. Because the result is flagged
in state 1, the ZTC ring is idle at that moment, so a change of conditions
then applies cleanly to the next sample.

**Process code.** Over one 2.5 µs CLK cycle, PV[8:4] reads 7 at the slow
corner, 11 at typical and 16 at fast. P is captured once after reset.

**Voltage mapping.** V is chosen in three steps:
1. A shift is added to the PV count to cancel the process corner. The shift
   is +90 at P=7 and falls by 10 per code to 0 at P=16. Codes outside that
   range are clamped.
2. The 9-bit sum saturates at 511.
3. V is the number of thresholds (60, 90, 120, 160, 200) that the sum reaches.
   V = 0…5 stands for 0.25, 0.30 … 0.50 V and enables one of EN025…EN05.

**Compensation.**
`T_OUT = T + P_STEP·(11 − P) − V_OFFS[V]`, in 13-bit two's complement. The
defaults are `P_STEP = 40` and `V_OFFS = {0, 24, 48, 72, 96, 120}`. The
process term is added and the supply term is subtracted. A slower process
corner or a lower supply gives a smaller raw count, so both terms push T_OUT
back toward the typical reading.

## Process-invariant sensor: the pulse and the handshake

A conversion runs like this:

1. A rising edge on START sets the flip-flop in `fixed_pulse_gen`, which
   raises pulse Q.
2. `pi_control_unit` sees Q through a two-flop synchronizer. It pulses S_rst
   to clear the output counter, then raises PW to start both rings.
3. The 10-bit counter on the near-threshold ring counts while Q is high.
   When its MSB sets, after 512 periods, it clears the flip-flop and Q falls.
4. The 11-bit output counter counted sub-threshold edges while Q was high, so
   `TS ≈ 512 · f_sub / f_near`.
5. When the control unit sees Q low, it drops PW. It then pulses N_rst to
   clear the pulse counter, and raises RDY three CLK cycles later.

The CLK only sequences the conversion; it does not time the measurement. It
must be fast enough to catch Q (above 500 kHz). The testbenches use 5 MHz.

After reset, the control unit spends three cycles in a power-on state that
holds S_rst and N_rst high, so every counter starts cleared.

## Refresh controller

**Mapping.** `temp_mapping_table` compares TS with three thresholds. A code
exactly on a threshold goes to the hotter range.

| TS | range | Ctrl | CLK_REF | one row refreshed every |
|----|-------|------|---------|-------------------------|
| ≥ 453 | 75–100 °C | 11 | 20 MHz | 6.4 µs |
| 402–452 | 50–75 °C | 10 | 10 MHz | 12.8 µs |
| 351–401 | 25–50 °C | 01 | 5 MHz | 25.6 µs |
| < 351 | 0–25 °C | 00 | 2.5 MHz | 51.2 µs |

The TS thresholds are not known from silicon. They assume 300 at 0 °C and a
slope of about 2.04 codes per °C (0.49 °C per code). They are parameters
(`TS_25C`, `TS_50C`, `TS_75C`), so a calibrated part can override them.

**Clock crossing.** RDY comes from the sensor's CLK domain. It goes through a
three-flop synchronizer into CLK_IN. Ctrl is loaded on the rising edge of RDY
as seen there. Until the first conversion finishes, Ctrl stays at 11, the
fastest and safest rate.

**Clock generator.** `refresh_clk_gen` is built from:
- a ripple chain of three toggle flip-flops (÷2, ÷4, ÷8);
- a multiplexer that also passes CLK_IN straight through.

Ctrl is copied into the multiplexer select only on a falling CLK_IN edge
where all three divided clocks are low. A change of rate therefore never
produces a short CLK_REF pulse.

**Rows and word lines.** `refresh_counter` advances Row on each rising
CLK_REF edge, wrapping 127 → 0. `row_decoder` drives the word line of Row
only while CLK_REF is low, which gives two guarantees:
- the counter has settled before the line opens;
- two word lines never overlap.

Each word line is therefore pulsed once every 128 CLK_REF periods.

## Where this departs from, or goes beyond, the source description

Some parts are firm; others are reasonable choices, not measured facts.

**Firm** (stated in the description the design follows):
- the sensing principle;
- the counter widths: 9-bit PV, 12-bit T, 13-bit T_OUT, 10-bit pulse counter,
  11-bit TS, 7-bit row;
- the ring stage counts: 31, 51 and 13;
- the order of the PVT sequence;
- the process codes 7/11/16 and the +90…0 process shift;
- the four refresh codes and rates;
- the 128-period row cycle.

**This design's choices:**
- The voltage-mapping thresholds and the compensation constants (`TH`,
  `P_STEP`, `V_OFFS`).
  - The source shows only the shape of these tables. Their contents have to
    come from calibrating the real oscillators.
- The TS thresholds of the mapping table.
- The stage count of the six TSROs (21, a parameter). Only the need to match
  their slopes is stated.
- Which counter value serves which step of the PVT loop. Only the order of
  the steps and the use of counter bit 2 as the TSRO enable are given.
- The explicit load strobes (`p_load`, `v_load`, `t_load`) and `t_valid`.
- Synchronizers, reset values, the power-on clear of the control unit and the
  three-cycle RDY delay.
- Glitch-free refresh-rate switching and the low-phase word-line pulse.

**Not built:**
- The level shifter between the 0.4 V sensor and the 1.2 V DRAM logic. It is
  a wire here.
- The sense-amplifier and precharge control.
- The DRAM cells themselves.
- The surrounding DVFS and 3D-stack system.

Only one DRAM sub-block controller is built. A chip would instantiate one per
sub-block, with sub-blocks sharing sensors as needed.

Retention limits (simulated, not from this RTL): the source puts the data
retention time at 10 to 45 µs. The 6.4 µs interval of the hottest range is
safe against the 10 µs worst case. The 51.2 µs interval of the coolest range
exceeds 45 µs. Whether that holds depends on the retention at 0–25 °C, which
is not given. If it does not hold, change the ÷8 setting or move `TS_25C`.

## Simulating

Everything runs with Verilator 5 in timing mode. Name the package first and
let Verilator find the other modules in `rtl/`:

```
verilator --binary --timing -Wno-fatal -y rtl --top-module pvt_thermal_top_tb \
    rtl/pvt_pkg.sv tb/pvt_thermal_top_tb.sv
./obj_dir/Vpvt_thermal_top_tb +verilator+rand+reset+2
```

Use the same command for a block testbench: give its module name and its
file. `-Wno-fatal` is needed only for the ZERODLY warning on the oscillator
model's delay. That delay is known only at run time, and it is never zero.

**Testbenches.** Each block has a self-checking testbench `tb/<block>_tb.sv`.
Each one:
- works out its expected values independently;
- ends with a line `TB_RESULT checks=N failures=M`;
- has a watchdog that fails the run if it hangs.

**Random start state.** The designs are written to start from random register
contents. The `+verilator+rand+reset+2` argument above tests this. Reset is raised
shortly after time zero, so the asynchronous clears see a real edge.

**End-to-end test.** `pvt_thermal_top_tb` runs the whole design at its default
parameters, about 0.34 ms of simulated time:
- The PVT sensor samples at the typical and the slow corner, with the supply
  swept so that every supply code and every TSRO is used, plus an EN pause.
  Each T_OUT is checked against a value worked out from the ring periods.
- The refresh controller converts at four temperatures, one in each range.
  Each run checks:
  - the chosen code;
  - the interval between two refreshes of one word line;
  - that rows step by one;
  - that only the addressed word line is ever high.
- Each mechanism is counted, and any mechanism that never happened fails the
  run: process sensing, supply codes 0–5, EN pause, the four refresh codes,
  rate switches, row wrap and word-line refresh.

**Changing the design.** Sizes are parameters with the source's numbers as
defaults:
- `N`, `S`, `NEAR_STAGES` and `SB_STAGES` on `pi_temp_sensor`;
- `ROWS_LOG2` on the refresh blocks;
- `W` and `STAGES` on the counters and rings.

If you change a ring's stage count, also change the stage delays the
testbenches use, or their expected counts will no longer match.
