# Event-driven mode-switching control for a SiC synchronous boost converter

This is the FPGA control for a bidirectional 400 V to 800 V, 10 kW synchronous
boost converter built with SiC MOSFETs. It aims to keep the efficiency high
from full load down to light load. It does this by running the converter in
one of two conduction modes, picked from the measured inductor current:

* **CCM-HS** (continuous conduction, hard switching) at high load. The
  frequency is fixed at 60 kHz, the current ripple is low and the inductor
  current stays positive. Peak current and conduction loss are low, but every
  turn-on is hard-switched.
* **QSW-ZVS** (quasi-square wave, zero-voltage switching) at light and medium
  load. Each period, the inductor current is allowed to swing slightly
  negative. That negative current discharges the switch capacitance before
  S1 turns on, so S1 switches at zero voltage. The price is a large ripple
  and a switching frequency that depends on the load (20-200 kHz).

QSW-ZVS cannot be timed from a formula. The controller watches the inductor
current instead: an analog comparator flags the moment the current crosses
zero, and the period is built around that event. This event-driven timing is
what the design is about.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is checked
with Verilator and with Yosys (slang front end).

## Block structure

```
                 vo ──► voltage_regulator ──D_reg──► ol_cl_mux ──D──┐
                                                     (D_user)       │
  il ──► il_avg_meas ──I_L_avg──► conduction_mode ──mode──┐         ▼
            ▲  ▲                                         ▼      ┌──────┐──► g1 (S1)
            │  └──────── T/4, 3T/4 strobes ──────── frequency ──►│ dpwm │
            │                                        selector   └──────┘──► g2 (S2)
  zcd_cmp ──► zcd_event_sync ──event──────────────────►  │ T_selec  ▲
                                                          ▼         │
                                                      ol_cl_mux ──T─┘
                                                      (T_user)
```

| File | Role |
|---|---|
| `rtl/boost_ctrl_pkg.sv` | Types (`period_t`, `duty_t`, `current_t`, `volt_t`, `cmode_e`) and the clock constant |
| `rtl/dpwm.sv` | Gate generator: S1 on-time, dead-time td1, S2 on-time, dead-time td2; sampling strobes |
| `rtl/ol_cl_mux.sv` | Closed-loop value or user value, one instance for D and one for T |
| `rtl/voltage_regulator.sv` | PI loop on the output voltage, gives D |
| `rtl/il_avg_meas.sv` | Average inductor current from samples at T/4 and 3T/4 |
| `rtl/conduction_mode.sv` | CCM-HS / QSW-ZVS decision with hysteresis |
| `rtl/zcd_event_sync.sv` | Synchronizer and edge detector for the zero-current comparator |
| `rtl/frequency_selector.sv` | Period: fixed in CCM-HS, event-timed in QSW-ZVS |
| `rtl/boost_ctrl_top.sv` | Wires everything together (top) |

Everything runs in a single 100 MHz clock domain. The only asynchronous input
is the comparator output, `zcd_cmp`. The sensor words `vo` and `il` are
expected from free-running ADCs and are sampled when the controller needs
them.

## How a QSW-ZVS period is timed

This is the least obvious part of the design. One period in QSW-ZVS
(`cnt` is the DPWM counter, which restarts at 0 when S1 turns on):

```
 cnt: 0            ton   ton+TD1                 e      e+T_QSW-TD2  e+T_QSW
      |── S1 on ────|─td1─|──────── S2 on ─────────┼───────|── td2 ──|
      iL rises            iL falls ......... crosses 0 ... goes negative
                                            ▲
                                  event detected (comparator + sync delay)
```

1. At the start of the period the DPWM loads T, the length of the previous
   period. It computes the S1 on-time as `ton = D·T / 2^16`, where D comes
   from the voltage regulator.
2. After S1 turns off and td1 passes, S2 conducts and the current falls. The
   end of the period is not known yet: the DPWM holds S2 on, with a time-out
   of `T_MAX` (20 kHz).
3. The comparator output falls when the current goes below zero. It reaches
   the FPGA after a constant delay t_det: sensor and comparator delay, plus
   the synchronizer. The frequency selector time-stamps the first such event
   after S1 turned off (counter value `e`). It then publishes
   `t_selec = e + T_QSW`, limited to the 200 kHz-20 kHz range, and raises
   `evt_valid`.
4. From that cycle on, the DPWM ends the period at `t_selec`. S2 turns off
   `TD2` cycles before that, and S1 turns on at `t_selec`. During the
   `T_QSW` interval the current keeps going negative and discharges the
   switch node, so S1 turns on at zero voltage.
5. The measured length `e + T_QSW` stays in `t_selec`. It becomes T for the
   next period, and so scales the next S1 on-time.

Because each period ends a fixed time after its own zero crossing, the valley
current is the same every period. That is the ZVS condition. The frequency
then settles wherever the output-voltage loop needs it: lighter load means a
shorter on-time, hence a higher frequency. With the behavioural converter
model in `tb/` the controller settles at about 49 kHz at 3.5 kW, 56 kHz at
3 kW and 66 kHz at 2.5 kW. The prototype's published measurements at the same
loads are 45, 54 and 69 kHz.

The detection delay adds to every period equally, so it does not matter as
long as it is shorter than `T_QSW`.

In CCM-HS the selector outputs the fixed `T_CCM`, and the DPWM runs
`period` cycles with the same on-time/dead-time pattern. In open loop the
user's `t_user` and `d_user` are used as a fixed-frequency PWM.

## Mode selection

`il_avg_meas` samples the current word at T/4 and 3T/4 of every period and
averages the two samples. For a triangle with D = 0.5 (400 V to 800 V) this
average is exact. `conduction_mode` applies:

* `il_avg > IL1` → CCM-HS
* `il_avg < IL1 − HYST` → QSW-ZVS
* otherwise keep the present mode.

It starts in CCM-HS after reset. IL1 is 13 A, the boundary used on the
prototype. Above it, the QSW peak current would exceed the CCM-HS full-load
peak (about 33 A). A new mode takes effect at the next period boundary.

**Known limitation: returning to CCM-HS.** Leaving QSW-ZVS for CCM-HS after
a load increase is not smooth. The first CCM-HS period starts from the
negative QSW valley, and it has much less ripple than the QSW periods before
it. So its average current is far below IL1 (about 7.5 A at D = 0.5), and
with a 1 A hysteresis band the selector goes straight back to QSW-ZVS. The
inductor's DC current only builds up over several periods. In simulation the
mode toggles for a few milliseconds and the output sags before CCM-HS holds.
The switch from CCM-HS down to QSW-ZVS, the direction the published
measurements show, is clean. A wider band, a minimum dwell time in CCM-HS or
a filtered current would remove the toggling; none of them is part of this
design.

## Number formats and defaults

| Quantity | Format | Default |
|---|---|---|
| Clock | — | 100 MHz (all times in 10 ns cycles) |
| Period / time (`period_t`) | 16-bit unsigned cycles | CCM 1667 (60 kHz), QSW 500…5000 (200…20 kHz) |
| Duty (`duty_t`) | Q0.16 | limits 0.05…0.90, start 0.5 |
| Current (`current_t`) | 16-bit signed, 10 mA/LSB | IL1 = 1300 (13 A), HYST = 100 (1 A) |
| Voltage (`volt_t`) | 16-bit unsigned, 0.1 V/LSB | reference 8000 (800 V) |
| Dead-times td1, td2 | cycles | 20 each (200 ns) |
| `T_QSW` (event to S1 turn-on) | cycles | 50 (500 ns) |
| PI gains | `KP/2^8`, `KI/2^16` duty-LSB per volt-LSB | KP = 166, KI = 450 |

The PI regulator updates once per switching period. Its integrator and its
output are both clamped to the duty limits, which prevents wind-up. The gains
give a deliberately slow response, so that the high-voltage stage recovers
smoothly from disturbances. In the converter model, the output is back
within 1 % of 800 V about 26 ms after the input drops from 400 V to 350 V.
The prototype's regulator was designed for about 35 ms.

## What follows the published strategy and what is this design's choice

Taken from the strategy:

* the set of blocks and how they connect;
* the two modes, and the hysteresis rule with I_L,1 = 13 A;
* the 60 kHz CCM frequency and the 20-200 kHz range;
* current sampling at T/4 and 3T/4;
* fixed dead-times;
* the S2 conduction time ended by the zero-current event, with the measured
  period carried into the next cycle;
* open-loop override of D and T;
* a slow PI voltage loop.

Chosen here, because no values are published:

* the 100 MHz clock and all number formats;
* dead-time, `T_QSW` and hysteresis values;
* PI gains and limits;
* D as a fraction of the previous period in QSW-ZVS;
* the 2-flip-flop synchronizer and the falling-edge event polarity;
* accepting only the first event after S1 turns off, and only in QSW-ZVS;
* the 20 kHz time-out when no event arrives.

The period could also be read as being fixed one cycle ahead from the
previous event, with S2 always held to T − td2. That variant was simulated
and does not settle: the valley current and the period drift from cycle to
cycle. The event-terminated period described above does settle.

Not included: the power stage, the current and voltage sensors, their ADCs
and the comparator, and the optical links to the gate driver. The driver's
error signal is carried over the same links, but what the controller should do
with it is not specified, so it has no input here. These are analog or
bought-in parts. The top module brings their signals out as ports (`vo`, `il`,
`zcd_cmp`, `g1`, `g2`).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

* `dpwm_tb` measures whole periods from the outputs:
  * period length, G1 and G2 widths, both dead-times and the strobe
    positions;
  * in event mode, the event-ended period and the time-out.
* `frequency_selector_tb` plays the DPWM. It checks the CCM period, event
  time-stamping, the limits, rejection of events during S1 on-time and of
  second events, and the 45/54/69 kHz operating points.
* `conduction_mode_tb` checks the band edges exactly, load steps and a
  random walk.
* `il_avg_meas_tb` uses triangular currents, including negative valleys.
* `voltage_regulator_tb` compares against a reference PI, checks
  saturation and anti-windup, and closes the loop around an averaged
  converter model.
* `zcd_event_sync_tb` uses asynchronous edges, checks one pulse per falling
  edge and the latency.
* `ol_cl_mux_tb` checks both selections.
* `boost_ctrl_top_tb` runs the whole controller at its default parameters
  against `tb/boost_plant_model.sv`. That model is not synthesizable. It is
  a cycle-by-cycle model of the 200 µH / 12 µF converter with a resistive
  load, a lumped 0.2 Ω loss and a 300 ns comparator delay. The test:
  * runs 5.5 kW in CCM-HS at exactly 60 kHz;
  * steps to 3.5, 3 and 2.5 kW in QSW-ZVS, checking the frequency rises
    as the load falls;
  * checks on every QSW period that it ended at event + `T_QSW` and that
    S1 turned on at negative current;
  * steps the input from 400 V to 350 V, where the regulator raises D, and
    measures the time until the output is back within 1 % of 800 V
    (about 26 ms; it must lie between 10 and 60 ms);
  * steps the output reference from 800 V to 750 V, where the regulator
    lowers D and the output is within 15 V of it after 16 ms;
  * steps the load to 8 kW (return to CCM-HS);
  * finishes with an open-loop stretch.

  It fails if any of these mechanisms never occurs. It simulates 7 million
  clock cycles (70 ms) in a few seconds.

To simulate a block with plain Verilator, from the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/boost_ctrl_pkg.sv rtl/dpwm.sv \
          tb/dpwm_tb.sv --top-module dpwm_tb
./obj_dir/Vdpwm_tb
```

and for the whole controller:

```
verilator --binary --timing --assert rtl/*.sv tb/boost_plant_model.sv \
          tb/boost_ctrl_top_tb.sv --top-module boost_ctrl_top_tb
./obj_dir/Vboost_ctrl_top_tb
```

To use a different clock, rescale the cycle-count parameters (`T_CCM`,
`T_MIN`, `T_MAX`, `TD1`, `TD2`, `T_QSW`) of `boost_ctrl_top`.
`period_cycles()` in the package converts a frequency to cycles.
