# Redundant dead-man's vigilance device for rail vehicles

This is the RTL of a train safety unit with two jobs:

- **Zero-velocity detection (ZVD).** It decides from wheel-speed pulses whether the vehicle is standing still. The result controls the door locks and switches driver supervision on and off.
- **Operator alertness detection (OAD), the "dead-man" function.** While the vehicle moves, it watches the driver's pedal. If the driver stops operating the pedal for too long, it sounds an alarm. If the driver still does not react, it triggers the emergency brake.

There is no processor and no software. Everything is clocked logic meant for an FPGA running at 20 MHz.

The unit has two independent **safety channels, A and B**, that do the same work in parallel. They exchange status flags and test themselves every 500 ms. Their safety relays are wired in series. The brake stays released and the doors stay unlocked only while both channels agree that this is safe. Any disagreement or detected fault ends in the **safe state**: doors locked and emergency brake applied. This scheme is known as one-out-of-two with diagnostics (1oo2D).

## Files

| file | contents |
|---|---|
| `rtl/safemod_pkg.sv` | shared types: configuration `cfg_t`, field inputs `field_in_t`, relay coils `coil_t`, cross-channel flags `xchan_t`, `fault_t`, `status_t`, OAD state enum, default configuration |
| `rtl/safemod_unit.sv` | top: two channels, flag cross-over, series/parallel output combination |
| `rtl/safety_channel.sv` | one channel, wiring of everything below |
| `rtl/timebase.sv` | 100 ms sample, 400 ms window and 500 ms self-test strobes |
| `rtl/sync2.sv` | two-flop input synchroniser |
| `rtl/abf.sv` | anti-bounce filter bank for contact inputs |
| `rtl/speed_counter.sv` | pulse count per 400 ms window, one per speed sensor |
| `rtl/zvd.sv` | zero-velocity flag with hysteresis |
| `rtl/oad.sv` | dead-man state machine (T1/T2/T3) |
| `rtl/speed_check.sv`, `contact_check.sv`, `relay_monitor.sv`, `xchan_monitor.sv`, `input_test.sv` | the self-tests |
| `rtl/diag_collector.sv` | latched fault register, failure flag |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_safemod_full.sv` | full-size run of the top at 20 MHz with the default settings |
| `tb/tb_workload_sweep.sv`, `tb/tb_workload_t3.sv` | full-size bench tests of one channel: speed sweep across V1/V2, and the T3 case |
| `tb/field_model.sv` | testbench model of relays, pull-up/pull-down stage and stuck lines |

## Signal conventions and safe state

- **Relay coils.** An energised coil is the permissive state. `coil.brake_release = 1` releases the emergency brake. `coil.door_unlock = 1` unlocks the doors.
  - A coil that is not driven is pulled down on the board. So a dead, reset or unconfigured FPGA always gives the safe state.
  - All coil outputs reset to 0.
- **Series wiring.** The top combines the two channels' coils with AND. Either channel alone can apply the brake or lock the doors. The dead-man and failure alarms are combined with OR, so either channel can sound them.
- **Field inputs.** The `field_in_t` bits use 1 = contact closed or line high. They come from the analog front-end, after its Schmitt triggers:
  - `spd1`, `spd2`: wheel encoders. Each rising edge is one tooth.
  - `pedal_no` / `pedal_nc`: the two contacts of the driver's pedal. They must always be complementary. `pedal_no = 1` means pressed.
  - `ign_a`, `ign_b`: the two contacts of the ignition key. The ignition counts as on only when both are closed.
  - `alarm_dis`: the driver's alarm-disable switch.
  - `rb_brake_nc`, `rb_door_nc`: read-back of each relay's normally-closed contact. It reads 1 while the coil is off.
- **Separate inputs per channel.** Each channel gets its own copy of the field inputs (`in_a`, `in_b`). This is because each channel has its own acquisition front-end and its own test stage, `force_hi_x` / `force_lo_x`.
- **Configuration.** `cfg_a` and `cfg_b` are plain inputs, so the values can be set at maintenance without changing the logic.
  - `v1`, `v2`: speed thresholds, in pulses per 400 ms window.
  - `t1`, `t2`, `t3`: dead-man times, in units of 100 ms.
  - `safemod_pkg::CFG_DEFAULT` holds V1 = 10, V2 = 22, T1 = 2 s, T2 = 2 s, T3 = 10 s.

## Time base

Every time in the design is a count of one 10 Hz sample strobe. The strobe is divided down from `CLK_HZ`, which is 20 MHz by default.

| period | strobe | used for |
|---|---|---|
| 100 ms | `sample_tick` | sampling the contacts, dead-man timing, heartbeat |
| 400 ms | `window_tick` (every 4th sample) | end of a speed-counting window |
| 500 ms | `selftest_tick` (every 5th sample) | start of the input test, latching of all check results |

The window and self-test strobes always fall on a sample strobe.

## Zero-velocity detection

Each speed sensor has its own counter of rising edges, reset every 400 ms. At the end of a window, the larger of the two counts is taken as the speed `v`. The flag S (1 = still) is then updated:

```
S := 1   if S = 0 and v <= V1
S := 0   if S = 1 and v >= V2
S unchanged otherwise
```

Because V1 < V2, any speed between the thresholds leaves the flag as it was, so vibration near one threshold cannot make it flip back and forth.

- **Speeds.** An 80-tooth wheel of 711 mm diameter gives 10 pulses per window at about 2.5 km/h and 22 pulses at about 5.5 km/h.
- **Larger count.** Using the larger count means one sensor that reads low can never declare a standstill. A large difference between the two counts is a fault in its own right (see `speed_check` below).
- **After reset.** S starts at 0 (moving, doors locked). It becomes 1 after the first quiet window.

With S = 1, and no failure, the door relay is energised. OAD supervision runs only while S = 0 and the ignition is on.

## Dead-man timing

This is the part with the most behaviour to understand. `oad.sv` is a four-state machine that moves only on sample strobes.

```
            enable (ignition on, moving)
   IDLE ─────────────────────────────► WATCH ◄──────────────┐
    ▲                                   │  pedal unchanged    │ pedal changes
    │ still and                         │  T1 (released) or   │
    │ alarm-disable                     ▼  T3 (pressed)       │
  BRAKE ◄──────── T2 without change ── ALARM ────────────────┘
```

- **WATCH.** Any change of the pedal restarts the timer. The limit depends on the pedal's present state:
  - T1 if the pedal is released: the driver has let go.
  - T3 if it is pressed: the driver may be slumped on it.
- **ALARM.** The dead-man audio alarm sounds. Any pedal change returns to WATCH. If T2 passes without a change, the machine moves to BRAKE.
- **BRAKE.** The brake relay is dropped. The machine now stays in BRAKE even if supervision is switched off. The alarm-disable switch silences the audio alarm. The brake is given back (return to IDLE) only when both hold:
  - the vehicle is detected as still, and
  - the switch is operated.
- **Leaving supervision.** When the vehicle stops or the ignition goes off, WATCH and ALARM fall back to IDLE.

**Latency.** A pedal movement first passes the anti-bounce filter, which needs the new level on two consecutive samples. The machine then sees it at the next sample. So the alarm comes between T1 + 0.1 s and T1 + 0.3 s after the pedal was physically released. With the default T1 = 2 s the full-size simulation measures 2.30 s. The brake then follows exactly T2 after the alarm.

**Anti-bounce filter.** The filter (`abf.sv`) takes a new level only after seeing it on 2 consecutive 100 ms samples. A contact that changes on every sample, which is switching at 5 Hz or faster, never gets through. The same filter cleans up the ignition contacts, the alarm-disable switch and the relay read-back contacts. The speed sensors bypass it.

## Self-tests and fault reaction

Each channel runs six checks. Every 500 ms, `diag_collector` ORs their present results into a fault register.

| check (module) | fault when | tolerance |
|---|---|---|
| relay read-back (`relay_monitor`) | a relay's NC contact does not show the opposite of its coil | 4 samples after each coil change |
| speed consistency (`speed_check`) | the two sensor counts differ by more than 4 + 25 % of the larger | 3 windows in a row |
| contact plausibility (`contact_check`) | the pedal contacts are not complementary, or the ignition contacts differ | 3 samples in a row |
| pull-up/pull-down test (`input_test`) | an input does not read 1 while forced high, or 0 while forced low | none |
| sensor supply (`sensor_alarm` input) | the analog monitor reports over-current, under-voltage or an open line | none |
| other channel (`xchan_monitor`) | see the list below | see the list below |

The other-channel check raises a fault when:

- the peer's heartbeat has not toggled for more than 3 samples;
- the peer's zero-velocity flag differs from ours on 3 self-tests in a row, which allows for the two channels' windows not lining up;
- the peer reports a failure.

**Input test.** Every 500 ms, `input_test` drives `force_hi` for 200 clock cycles and checks that all nine synchronised inputs read 1. It then does the same with `force_lo` and 0. It releases the lines and waits another 200 cycles, about 30 µs in all. While it runs:

- the anti-bounce filter skips samples;
- the speed counters ignore edges;
- the relay check is suspended.

**Fault reaction.** A latched fault does all of the following until reset:

- de-energises both relays of the channel;
- turns on the failure alarm;
- raises the channel's `failure` flag towards the peer.

The peer then latches `peer_failed` at its next self-test, so a single fault ends with both channels in the safe state.

`status_a` and `status_b` carry what an event recorder would log:

- the fault register and the failure flag;
- the zero-velocity flag;
- the last speed count;
- the OAD state.

## How far to trust it

**Simulated.** Every module has a self-checking testbench.

- `tb_safemod_unit` runs the two-channel top end to end at a 1 kHz clock, so 100 cycles stand for 100 ms. It uses T1/T2/T3 = 0.5/0.4/0.9 s. It counts each of 20 mechanisms and fails if one never occurs:
  - standstill and start;
  - the hysteresis band held in both directions;
  - the T3, T1 and T2 timings, and a cancelled alarm;
  - silencing and brake release;
  - an attentive driver, and a filtered pedal glitch;
  - the periodic input test;
  - each of the six fault classes;
  - a fault spreading to the peer;
  - the series output.
- `tb_safemod_full` runs the unchanged top at 20 MHz with the default configuration through one dead-man event, about 9 s of train time. That takes about 1.5 minutes in Verilator.
- Two more full-size testbenches drive one channel the way a bench signal generator would:
  - `tb_workload_sweep` steps the speed pulses from 0 up to 30 per window and back down through V1 and V2, checking the count and the hysteresis rule at every window.
  - `tb_workload_t3` holds the pedal pressed for the 10 s T3 case.
- Each module's testbench was also run against a deliberately broken copy of that module, and each one caught it.
- Concurrent assertions in `timebase`, `input_test` and `safety_channel` stop any simulation that breaks their rules:
  - strobes stay aligned;
  - the pull stage is never driven both ways;
  - a failure de-energises both relays on the next cycle;
  - a brake request always drops the brake relay.

**Not verified.** Nothing has been run on hardware or checked against a real relay or front-end.

**Both channels use the same RTL.** A real installation would build the two channels differently, on different FPGA families, written by separate teams. That diversity cannot be captured in one RTL source.

**Design choices not fixed by the functional description.** These are decisions made here, not taken from the functional description:

- using the larger sensor count as the speed;
- resetting the zero-velocity flag to "moving";
- cancelling an alarm on any pedal change;
- releasing the brake on "still + alarm-disable";
- ignition handling (both contacts = on; brake held applied while off);
- the heartbeat as the vitality signal;
- all persistence and tolerance values of the checks;
- the input-test timing;
- latching faults until reset;
- combining the alarms with OR.

Each is stated in the opening comment of the module concerned, and each can be changed in one place.

## Not included

- **Event-recorder serial link.** The event recorder reads channel information over a serial link with a proprietary protocol, which is not available. The information it would carry is on the `status_x` ports.
- **Analog and power parts.** These have no logic to write and appear only as ports:
  - voltage supervisors: `rst_n`;
  - the speed-sensor supply monitor: `sensor_alarm_x`;
  - the front-end filters and Schmitt triggers: the `in_x` inputs;
  - the pull-up/pull-down transistors: `force_*`;
  - power converters, relays and the configuration flash.

## Simulating and changing it

All sources are plain IEEE 1800-2017. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/safemod_pkg.sv tb/tb_safemod_unit.sv --top-module tb_safemod_unit
./obj_dir/Vtb_safemod_unit
```

Use the same command with any other `tb/tb_*.sv`. Each testbench ends by printing `TB_RESULT checks=N failures=M`, and has a watchdog that stops it if it hangs.

Parameters worth knowing:

- `CLK_HZ` on `safemod_unit` / `safety_channel` / `timebase`: all periods follow it. Lower it to shorten simulations, as the testbenches do.
- `SAMPLE_HZ`, `WINDOW_SAMPLES`, `SELFTEST_SAMPLES` on `safety_channel`: sample rate, window length and self-test period.
- `TEST_SETTLE_CYC`: length of each input-test phase. Keep 3 × this below one sample period.
- `CNT_W` and `TMR_W` in the package: counter widths. 12 bits give up to 4095 pulses per window. 10 bits give times up to 102.3 s.
- The tolerances of the checks (`PERSIST`, `ABS_TOL`, `REL_SHIFT`, `HB_TIMEOUT`, `ZV_PERSIST`, `SETTLE_SAMPLES`) are parameters of their modules. `safety_channel` leaves them at their defaults.
