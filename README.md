# Switch-selected digital multimeter: FPGA logic

A bench multimeter built around one 16-bit ADC. Every quantity it measures
(DC voltage, DC current, resistance, transistor beta) is first turned into a
voltage by an analog front end. Reed relays route the front end of the chosen
meter to an AD976 ADC (±10 V input, 16-bit two's complement result). The FPGA
logic here starts each conversion and collects its result, scales the code
into the reading of the selected meter, and shows it on the board's
seven-segment displays, 4½ digits plus sign and a two-letter unit. The meter
is chosen with four slide switches. The same FPGA outputs drive the relays, so
the switches both reconfigure the analog path and change how the digits are
interpreted.

Adding a meter means adding one front end that produces a voltage, plus one
entry (factor, offset, unit, decimal point) in the logic.

## Signal chain

```
 switches ─┐                                              ┌─> relay_v/a/o/b (to reed relays)
           v                                              │
 adc_data ─> meter_fsm ──value, neg, mode──> bin2bcd ──digits──> display_driver ─> hex[5:0]
 adc_busy ─>  (meter_convert inside)   │       │                                  hex_dp
 adc_rc   <─                           │       └─ decimal point per mode
                                       └─ unit characters ──────────────────────> hex[7:6]
```

| Module | File | Role |
|---|---|---|
| `dmm_top` | `rtl/dmm_top.sv` | wires the chain, puts the sign on HEX5 |
| `meter_fsm` | `rtl/meter_fsm.sv` | three-state ADC sequencer, registers readings, relays, unit |
| `meter_convert` | `rtl/meter_convert.sv` | combinational per-meter scaling and lookup |
| `bin2bcd` | `rtl/bin2bcd.sv` | binary to six BCD digits, display hold timer, decimal point |
| `display_driver` | `rtl/display_driver.sv` | BCD to seven-segment |
| `dmm_pkg` | `rtl/dmm_pkg.sv` | state and mode encodings, relay and segment constants |

## The ADC handshake

The AD976 has one control input, R/C. A falling edge starts a conversion.
BUSY goes low shortly after that and returns high when the result is on
D15..D0. `meter_fsm` runs the converter continuously with three states,
encoded as two bits:

| State | Code | What happens | Leaves when |
|---|---|---|---|
| ACQUIRE | `00` | R/C is driven low, which starts the next conversion. The result of the previous conversion is read, scaled and registered (`value_valid` pulses). Mode, unit and relay drive are loaded from the switches. | always, after one cycle |
| TIMING | `01` | R/C is held low while a timer counts `TIMER_LIMIT` cycles. R/C goes high as the state ends. | timer reaches `TIMER_LIMIT` |
| CONVERSION | `10` | wait | BUSY reads 1 |

The data bus is read in ACQUIRE. That is safe because the FSM only gets
there after seeing BUSY high, and the bus stays valid until the conversion
just started drives it to high impedance. The very first ACQUIRE after reset
pushes nothing, since no conversion has run yet.

Two timing constraints decide `TIMER_LIMIT`:

* R/C must stay low for at least 50 ns, which is 3 cycles at 50 MHz.
* CONVERSION exits on BUSY = 1. When it starts, BUSY must therefore already
  have gone low for the new conversion, or the FSM would take the old "done"
  level for the new one. The AD976 takes up to 83 ns to pull BUSY low, and
  BUSY passes a two-flop synchroniser here, so 8 cycles (160 ns) are used.

One sample therefore takes 1 + 8 cycles plus the conversion time (about 8 µs
on the AD976), a little over 100 kSa/s. Readings arrive far faster than a
person can read them. The display stage keeps its own slower refresh, below.

Relays and unit change only in ACQUIRE, so they hold still during a
conversion. The catch: the conversion started in the ACQUIRE that switches
the relays samples the input while the relays are still moving. The reading
pushed after a meter change is therefore stale (old input, new scale factor).
From the next one on, readings are clean. Real reed relays also need a few
milliseconds to settle; the display hold covers that.

## Scaling a code into a reading

For every meter the reading is an integer in the meter's display unit:

```
reading = (code * INC) / 100 - OFFSET        ('/' truncates toward zero)
neg     = reading < 0,  value = |reading|   (saturated to 16 bits)
```

The multiply / divide-by-100 / subtract-offset form is the original
firmware's. The constants below are derived in this design from the front-end
values, because no calibration constants are known. Each is a `meter_convert`
parameter, so a calibrated instrument can override them.

| Meter | Switch | Mode | Unit chars | Display unit | Front end (ADC input) | INC | OFFSET | Shown as |
|---|---|---|---|---|---|---|---|---|
| Voltmeter | `sw_voltmeter` | `000` | `dc` | 1 mV | ÷2 divider (220 Ω/220 Ω), 0.61035 mV per code | 61 | 0 | `19.741` |
| Ammeter | `sw_ammeter` | `001` | `nA` (mA) | 10 µA | 50 mV per mA: 6.1035 µA per code. Inverse of the measured response (reading = 0.8164·I + 0.127 mA) | 75 | 16 | `010.02` |
| Ohmmeter | `sw_ohmmeter` | `010` | `oh` | 100 Ω | 5 µA current source: 61.035 Ω per code | 61 | 0 | `0.9994` (MΩ) |
| Beta meter | `sw_betameter` | `011` | `bE` | 1 | assumed 10 µA base current, 50 Ω emitter sense | 61 | 0 | `150` |
| none / several | | `111` | blank | | all relays open | | | `0` |

Relay drive per meter is 2 bits: `01` closes that meter's relay, `00` leaves
it open. Because INC is the integer 61 for 0.61035, voltages read about
0.06 % low: 19.753 V shows as 19.741. Use a finer factor (for example
`INC=6104` and a divisor of 10000) if that matters. The divisor is fixed at
100 here, as in the original firmware.

## Display

* **Digits.** `bin2bcd` splits the 16-bit magnitude by successive division
  and remainder (÷100000, rem, ÷10000, …), as the original firmware did, into
  BCD5..BCD0. The result is registered only every `HOLD_CYCLES` cycles
  (default 12,500,000, i.e. 0.25 s), so the last digits do not flicker. The
  sign is captured on the same clock edge.
* **Sign.** HEX5 shows `-` for a negative reading and is blank otherwise.
  BCD5 is always 0 for a 16-bit value, so HEX5 is free. `neg_led` gives the
  live sign.
* **Decimal point.** The point is fixed per meter: voltmeter on HEX3
  (`20.000` V), ammeter on HEX2 (`200.00` mA), ohmmeter on HEX4 (`2.0000` MΩ),
  none for beta. `hex_dp[3:0]` are the points of HEX5..HEX2, active low.
* **Unit.** HEX7 and HEX6 take the two unit characters straight from the
  controller.
* **Segment order.** All segment vectors are active low with segment **a in
  bit 6** down to g in bit 0. Under that order the original unit codes
  `10000101110010` and `11010100001000` spell `dc` and `nA`. The DE2 board
  numbers its HEX pins the other way (a = bit 0), so reverse the bits in the
  pin assignment.

## Where this departs from the specification it was built for

* **No automatic range change.** The instrument was specified with three
  ranges per quantity and automatic switching. The logic uses one fixed format
  per meter. At the ADC's 0.61 mV step the lower voltage ranges (0.1 mV and
  10 µV digits) would only show noise. Likewise, the ohmmeter cannot resolve
  10 Ω (one code is 61 Ω) and the ammeter cannot fill a 2.0000 mA range.
* **Beta meter.** Its front end was dropped from the finished instrument. The
  mode remains, with assumed constants, because the controller and relay
  outputs provide for it.
* **Choices made in this design.** The following are not given by the
  original: the scale factors, the 8-cycle timer, the BUSY synchroniser, the
  0.25 s hold, the decimal point per meter, the `oh`/`bE` unit letters and
  mode codes `010`/`011`, the blank state for no or several meters, the sign
  on HEX5, and the asynchronous active-low reset.

## Outside the FPGA

The power supply, the voltage divider, the ammeter's current-to-voltage
converter, the ohmmeter's current source, the beta front end, the reed
relays and the AD976 itself are analog or bought-in parts. They appear only
as ports of `dmm_top`. For simulation, `tb/ad976_model.sv` models the ADC
behaviourally: R/C, BUSY and the data bus, with a junk value on the bus while
converting. It also counts protocol violations. The testbenches model the
front ends as simple formulas.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_meter_convert` | all 16 switch combinations × extreme, near-zero and random codes against an independent reference model; hand-worked points |
| `tb_meter_fsm` | 200 samples with random inputs and switch changes. Each reading matches the code actually converted. R/C is low for exactly `TIMER_LIMIT` cycles. No ADC protocol violation. Sample period within bounds. Only legal state transitions. Relays and unit load in ACQUIRE. |
| `tb_bin2bcd` | 1000 refreshes against decimal text formatting; hold period; decimal point per mode; digits frozen between refreshes; reset |
| `tb_display_driver` | all 16 codes in all 6 positions against patterns built from segment names |
| `tb_dmm_top` | end to end through an analog front-end model, reading only the segment outputs. Covers every meter, both signs, no meter and two meters. Each reading must match exactly and lie within 0.3 % of full scale of the physical input. Counts conversions, refreshes, modes, minus sign, blank display and relay changes. `HOLD_CYCLES` is cut to 500. |
| `tb_dmm_full` | `dmm_top` with all defaults and the 8 µs ADC. 19.753 V shows `19.741`, then −5 V shows `-4.997`. Refreshes are 12,500,000 cycles apart. About 0.5 s of board time, ~10 s of simulation. |

Run one with Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/dmm_pkg.sv tb/dmm_tb_pkg.sv tb/tb_dmm_top.sv --top-module tb_dmm_top
./obj_dir/Vtb_dmm_top
```

`meter_fsm` carries two assertions on the R/C level in TIMING and
CONVERSION. Add `--assert` to check them.

The models are idealised, so what the tests show is that the logic does what
is described above. They do not show that the constants match real hardware:
the scale factors assume nominal component values, and the only calibration
data used is the ammeter's measured line.
