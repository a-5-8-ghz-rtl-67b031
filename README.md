# Intelligent digital controller for a 5.8 GHz DSRC wake-up receiver

An electronic-toll on-board unit (OBU) spends nearly all its life asleep. A
small always-on wake-up receiver listens for the roadside unit's wake-up call:
a 5.8 GHz carrier switched on and off (OOK) at about 14 kHz for 15 to 17
cycles. An envelope detector, an amplifier and a comparator turn this into a
digital square wave. If every pulse on that line woke the power-hungry main
transceiver, noise, other OBUs' traffic and distant toll gates would drain the
battery.

The **intelligent digital controller (IDC)** sits after the comparator. It
wakes the transceiver only when the signal really is a wake-up tone:

* its frequency lies inside a configurable window;
* the frequency stays there for a configurable number of **consecutive**
  periods.

It replaces the analog band-pass filter or ADC that older receivers use for
this job. Around this core it has:

* self-hibernation, which slows its own RC oscillator between wake-ups;
* a watchdog, which recovers from half-finished measurements;
* a periodic "wake-on" mode;
* a self-test pattern generator;
* a manual interrupt override.

The RTL here is the IDC, plus a behavioural model of its configurable RC
oscillator so that the pair can be simulated as a closed loop. In that loop
the controller sets its own clock frequency.

## Signal path

```
 WU_SIG ──►┌─────┐          ┌──────┐  wu_pe   ┌──────┐ fm_det  ┌──────┐ int_r ┌────┐
           │ SSM ├─────────►│ SPEG ├────────►│ AFMU ├───────►│      ├──────►│ OM ├─┐
 st_sig ──►└──▲──┘          └──────┘         └──▲───┘ fm_en,  │      │WU_EXT►│    │ │  ┌────┐
   ▲          │st_en                            └──── WU_N ───┤ FSMC │m_ctrl►└────┘ └─►│ OR ├─► WK_INT
 ┌─┴──┐    ┌──┴───┐ int/mode/monitor_ctrl                     │      │ wo_en/clr ┌───┐ ┌►└────┘
 │STPG│    │ CDEC ├──────────────────────────────────────────►│      ├─────────►│WOG├─┘ WO_INT
 └────┘    └──▲───┘                           ┌──────┐ en/clr │      │◄─ wo_dn ──└───┘
            CTRL                              │ CWDT │◄───────┤      │
                                              └──┬───┘ wdt_dn │      ├─► DONE, OSC_CTRL ─► rc_osc ─► clk
                                                 └───────────►└──────┘◄── EN, WUO, SILENT, HOLD
```

| Block | File | Job |
|---|---|---|
| SSM  | `rtl/idc_ssm.sv`  | Selects the comparator output `WU_SIG`, or the self-test pattern while `st_en` is set. |
| SPEG | `rtl/idc_speg.sv` | Toggle flop clocked by the signal, then a two-flop synchronizer and a one-cycle pulse `wu_pe` per rising edge. |
| AFMU | `rtl/idc_afmu.sv` | Counts clock cycles per period and checks each period against `[NXFN, NNFX]`. Raises `fm_det` after `WU_N` valid periods in a row. |
| CWDT | `rtl/idc_cwdt.sv` | Watchdog. Runs while a measurement is in progress and fires after `WDTN` cycles. |
| WOG  | `rtl/idc_wog.sv`  | Wake-on generator: `WO_INT` high for `T_WOI` cycles, low for `T_WOS`, repeating. |
| STPG | `rtl/idc_stpg.sv` | Self-test: `STN` periods of a square wave that is `STM` cycles high and `STM` cycles low. |
| CDEC | `rtl/idc_cdec.sv` | Synchronizes the `CTRL` word and splits it into the mode controls. |
| FSMC | `rtl/idc_fsmc.sv` | Controller state machine. Drives all of the above and chooses the oscillator code. |
| OM   | `rtl/idc_om.sv`   | Selects the internal or the external wake-up interrupt, then ORs in `WO_INT`. |
| IDC  | `rtl/idc.sv`      | Wires the blocks together. This is the synthesizable design. |
| OSC  | `rtl/rc_osc.sv`   | Behavioural model of the 8-bit-tunable RC oscillator (simulation only). |
| top  | `rtl/wurx_top.sv` | Oscillator and IDC in a loop: the digital core of the receiver. |

Shared widths, the configuration struct `idc_cfg_t`, the decoded-control
struct and the state enum are in `rtl/idc_pkg.sv`.

## How a wake-up tone is recognised

All times below are in controller clock cycles. At the wake-up clock of about
140 kHz, a 14 kHz tone has a period of 10 cycles.

1. **Listening.** The FSMC waits in `S_LISTEN`. With self-hibernation on
   (`mode_ctrl = 1`), it sets `OSC_CTRL` to the hibernation code (220,
   about 14 kHz). The first rising edge only wakes the controller: the FSMC
   moves to `S_MEAS` and switches the oscillator to the wake-up code
   (14, about 140 kHz).
2. **Measuring.** In `S_MEAS` the AFMU is enabled. The next rising edge
   starts a period count, and every later edge closes one period of `p`
   cycles.
   * If `NXFN <= p <= NNFX`, the run of valid periods grows by one.
   * Otherwise the run drops to zero, and that edge starts the next period.
   * The period counter saturates, so a signal that stops never wraps back
     into the window.

   The window is the controller's *digital hysteresis*: a tone may drift
   anywhere inside it and still be accepted. With `NXFN = 8` and `NNFX = 13`
   at 140 kHz, that is roughly 11 to 18 kHz.
3. **Deciding.** When the run reaches `WU_N`, `fm_det` rises and the FSMC
   enters `S_INT`. A tone therefore needs `WU_N + 2` rising edges: one to
   wake, one to start the count, and `WU_N` to close valid periods. When the
   call arrives during hibernation, add three or four more (see the limits
   below).
4. **Watchdog.** The watchdog runs for the whole of `S_MEAS`. If `fm_det` has
   not come within `WDTN` cycles, the FSMC goes back to `S_LISTEN`.
   Examples are a tone of the wrong frequency, a burst that is too short, or
   noise. The FSMC also goes back to `S_LISTEN` at once when `SILENT` is
   raised.
5. **Interrupt.** `int_r` is high for exactly `HOLD` cycles. After that the
   FSMC either returns to listening (`monitor_ctrl = 1`) or stops in `S_DONE`
   with `DONE` high until `EN` is dropped (`monitor_ctrl = 0`).

**Edge capture.** The hibernation clock (about 14 kHz) is no faster than
the tone. Sampling the tone with it would alias it into a slow beat, and the
controller could sleep through a whole call. The SPEG therefore does not
sample the signal. A toggle flop clocked by the signal's own rising edge flips
on every edge, and only the toggle is synchronized to the controller clock.
Every rising edge produces one `wu_pe`, provided successive edges are more
than one clock period apart. A tone at the hibernation frequency is caught on
its first edge.

**Latency.** `WK_INT` rises on the fifth clock edge, counting from the edge
that first samples the rising edge completing the `WU_N`-th valid period. The
five edges are two synchronizer stages and the edge register in the SPEG, then
the AFMU and the FSMC registers.

**Wake-on mode** (`WUO = 1`) replaces tone detection with a periodic
interrupt: `T_WOI` cycles high, then `T_WOS` cycles low, starting high. The
oscillator uses the wake-on code (220 by default). When `WUO` falls, the FSMC
waits for the end of the current period (`wo_dn`) before it returns to
listening, so a wake-on pulse is never cut short.

**Self-test** (`CTRL[0] = 1`) feeds the STPG pattern into the SSM in place of
`WU_SIG`. The pattern starts when `st_en` rises. With `STM = 5` the pattern is
a 10-cycle period, which is accepted. With `STM = 2` it is a 4-cycle period,
which is rejected. This checks the whole detection path without RF.

**Manual interrupt** (`CTRL[1] = 1`) makes `WK_INT` follow the external input
`WU_EXT`.

### Interface of `idc`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock from the oscillator; asynchronous active-low reset. |
| `wu_sig_i` | in | 1 | Comparator output. Asynchronous; its rising edges are captured by a toggle flop and synchronized inside. |
| `wu_ext_i` | in | 1 | External manual interrupt. |
| `ctrl_i` | in | 4 | Bit 0: self-test. Bit 1: manual interrupt. Bit 2: self-hibernation. Bit 3: keep monitoring after a wake-up. Synchronized inside, so a change takes effect 2 cycles later. |
| `en_i`, `wuo_i`, `silent_i` | in | 1 | Enable, wake-on mode, mute. Expected to be static or synchronous. |
| `cfg_i` | in | `idc_cfg_t` | `wu_n` (4 bits); `nxfn`, `nnfx` (8 bits); `wdtn`, `hold`, `twoi`, `twos` (16 bits); `stm`, `stn` (8 bits). All are in cycles. |
| `wk_int_o` | out | 1 | Wake-up or wake-on interrupt. |
| `done_o` | out | 1 | Wake-up delivered and monitoring stopped. |
| `osc_ctrl_o` | out | 8 | Capacitor code for the RC oscillator. |

Module parameters `OSC_CODE_WU`, `OSC_CODE_SH` and `OSC_CODE_WO` (defaults
14, 220, 220) set the oscillator code for each mode.

`wurx_top` has the same ports without the `_i`/`_o` suffixes. It does not
take `clk` as an input: it brings the oscillator output out as `clk`, and adds
`osc_enb`, the oscillator's active-low enable.

## The oscillator model

The real oscillator is a sub-threshold analog circuit. Its timing capacitor
is an 8-bit binary-weighted bank. It was measured at 362.37 kHz with all
`OSC_CTRL` bits low and 12.16 kHz with all bits high. `rc_osc` assumes the
frequency is inversely proportional to the total capacitance:

    f(code) = F_MAX / (1 + code * (F_MAX/F_MIN - 1) / 255)

With that law, code 14 gives 140.4 kHz and code 220 gives 14.0 kHz. Those are
the nominal wake-up and hibernation clock frequencies, and they are where the
FSMC's default codes come from. If the real bank follows a different curve,
only those three parameters change. `ENB` low enables the model. A new code
takes effect at the next half period.

Synthesis reads the model's free-running `always` block as a combinational
loop (an inverter feeding itself). That is expected for a ring-oscillator
model; `rc_osc` and `wurx_top` are for simulation only.

## Where this RTL departs from, or goes beyond, what is specified

The block structure, the signal names and the roles of the blocks follow the
published design. The following are this implementation's own choices,
because no detail was available:

* **State machine.** The states and transitions of the FSMC, including "the
  first edge only wakes" and "leave wake-on only at a period end".
* **Control signals.** The meanings of `EN`, `WUO`, `SILENT`, `HOLD` and
  `DONE`, and of `mode_ctrl` (self-hibernation on or off) and `monitor_ctrl`
  (re-arm after a wake-up).
* **CTRL encoding**, the synchronizer on `CTRL`, and the toggle-capture edge
  detector on `WU_SIG`.
* **Window limits.** `NXFN` is taken as the lower and `NNFX` as the upper
  period limit, both inclusive.
* **Digital hysteresis.** It is implemented as that acceptance window only.
  There are no separate enter and leave thresholds.
* **Self-test settings.** `STM` is the half period, `STN` the number of
  periods.
* **Widths** of all configuration fields.
* **Configuration path.** The configuration is a plain struct port. The
  original is programmed over SPI, but no register map is available, so no
  SPI slave is included.
* **Oscillator.** The 1/C frequency law, the per-mode codes, and the wake-on
  code being equal to the hibernation code. The oscillator's resistor trim and
  its second enable (`ENT`) are not modelled.

The analog front end is not modelled: matching networks, RF envelope
detector, baseband amplifier and comparator. Neither are the MCU and the main
transceiver. `WU_SIG` is the boundary.

## Limits to know before use

* **Waking from hibernation costs three or four tone periods.** The slow
  clock needs three to four and a half of its cycles to notice the first edge
  and switch the oscillator. While the controller hibernates, a call must
  therefore last up to `WU_N + 6` periods instead of `WU_N + 2`; `WU_N + 5`
  was enough at the phases simulated. With `WU_N <= 8`, that fits a 15-period
  DSRC call.
* **Reset needs a real edge.** The SPEG's toggle flop is clocked by the
  wake-up signal, not by the controller clock, so only the falling edge of the
  asynchronous reset clears it. In simulation, drive `rst_n` high and then
  low; a reset that is low from time zero leaves the toggle at its initial
  value, and a spurious edge can appear after reset.
* **Edge quantisation.** Periods are measured in whole clock cycles, so a
  tone whose period is not an integer number of cycles alternates between the
  two neighbouring counts. Set the window one cycle wider than the nominal
  limits if the edge frequencies must always pass. For example, 18 kHz at
  140.4 kHz is 7.8 cycles and needs `NXFN = 7`.
* **Frequency range.** At the default 140 kHz wake-up clock, the 8-bit period
  counter covers tones from about 0.55 kHz (255 cycles) to 70 kHz (2 cycles).
  Higher tones need a faster `OSC_CODE_WU`.
* **Tone length.** A DSRC burst of 15 to 17 cycles allows `WU_N` up to 13.
  5 to 8 is the intended range.
* **Watchdog.** `WDTN` must be longer than `(WU_N + 2)` periods, or every tone
  is cut off. `WDTN = 0` disables the watchdog.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has its own watchdog. The package must be
read first. For example:

    verilator --binary --timing --assert -Irtl rtl/idc_pkg.sv tb/tb_idc_afmu.sv --top-module tb_idc_afmu
    ./obj_dir/Vtb_idc_afmu

| Testbench | What it establishes |
|---|---|
| `tb_idc_afmu` | Directed and random period sequences against a reference model: exact `fm_det` cycle, window edges inclusive, a glitch restarting the count. |
| `tb_idc_fsmc` | Every transition, the output decode, the `HOLD` length, latching of `WU_N`, and the oscillator code per state. |
| `tb_idc` | The whole IDC on a fixed clock: the 5-edge latency, `WK_INT` held for exactly `HOLD` cycles, rejection of too fast, too slow and too short tones, watchdog recovery, `SILENT`, valid and invalid self-test, external interrupt, wake-on duty cycle, hibernation code, `DONE` and re-arm. |
| `tb_wurx_top` | The oscillator and IDC loop with default parameters, in real time. It measures the hibernation clock (about 14 kHz) and the switch to about 140 kHz. It accepts 14 kHz tones (hibernating and not) and 16 kHz tones and rejects 30 kHz, 7 kHz and a 5-period burst. It also checks `T_WOI`/`T_WOS` in microseconds and counts that every mechanism occurred. |
| `tb_wurx_workload` | The DSRC workload at default parameters, with and without hibernation: every combination of 11 to 18 kHz, 15 to 17 periods and `WU_N` 5 and 8 is accepted. 9 kHz, 24 kHz and bursts one period short are rejected. The shortest accepted burst is checked (`WU_N + 2`, or `WU_N + 6` while hibernating). |
| others | The SSM and OM exhaustively; the SPEG, CDEC, CWDT, WOG and STPG cycle by cycle against their specification; the oscillator's end points, mid-codes, monotonicity and `ENB`. |

`tb_wurx_top` is a complete run at default parameters and finishes in well
under a second.
