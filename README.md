# Parallel I²C reader for two sensors

This design reads two I²C sensors at the same time from an FPGA: an AHT10
(temperature and humidity) and an SGP30 (air quality). Each sensor gets its
own SDA/SCL pair and its own I²C master. The SGP30 needs 12 ms to convert a
measurement and the AHT10 less than 1 ms, so with two buses the slow sensor
never holds up the fast one, and each bus can run at its own rate. The AHT10
temperature is shown in degrees Celsius on the four-digit seven-segment
display of a Digilent Basys 3 board (100 MHz clock). The other readings
(humidity, CO2-equivalent, TVOC) come out as parallel outputs.

The block structure, port names, sensor command sequence, AHT10 address and
command, conversion pauses and bus rates follow the original published design.
The original was written in VHDL. This is a fresh SystemVerilog version. The
original description gives only the blocks and their ports for the I²C
master, the display converter and the display driver. Their insides, the
handshake between the blocks and the sensor data formats are this design's
own. The last section lists every such choice.

## Block structure

```
             reset ─────┬──────────────┐
                        │              │
 sda_i/sda_oe/scl_oe ◄─► master1 ◄───► │            temperature2[19:0]
   (AHT10 bus)                    controller ──────────────► display_converter ─dd1..dd4─► seven_segment_display ─► an_0, CA_0..CG_0
 sda2_i/sda2_oe/scl2_oe ◄─► master2 ◄─►│
   (SGP30 bus)          │              ├──► humidity, aht_valid
             reset_m ───┴──────────────┘──► co2eq, tvoc, sgp_valid
```

| file | module | role |
|---|---|---|
| `rtl/i2c_parallel_top.sv` | `i2c_parallel_top` | top: wires the five blocks together |
| `rtl/i2c_master.sv` | `i2c_master` | one I²C bus master; used twice |
| `rtl/controller.sv` | `controller` | measurement sequence for both sensors, unpacks the readings |
| `rtl/sensor_sequencer.sv` | `sensor_sequencer` | the sequence for one sensor; `controller` uses two |
| `rtl/display_converter.sv` | `display_converter` | raw temperature code to four decimal digits |
| `rtl/seven_segment_display.sv` | `seven_segment_display` | four-digit multiplexed display driver |
| `rtl/i2c_pkg.sv` | `i2c_pkg` | clock rate, bus rates, sensor addresses and commands, sequencer state type |

Master 1 and the AHT10 half of the controller are reset by `reset`. Master 2
and the SGP30 half are reset by `reset_m`. Both resets are active low and
asynchronous. Holding `reset_m` low leaves a one-sensor system that reads
only the AHT10.

## The measurement sequence

Each sensor has its own `sensor_sequencer` and runs this loop on its own:

```
ready ─(master idle)─► start ─► trigger ──NACK──► stop ─► ready
                                  │ ok
                                  ▼
                         pause (conversion time)
                                  ▼
                     read command ──NACK──► stop ─► ready
                                  │ ok
                                  ▼
             read data: every byte ACKed, the last one NACKed, then STOP
                                  ▼
                   affichage (publish) ─► stop ─► pause (repeat gap) ─► ready
```

| step | AHT10 (bus 1) | SGP30 (bus 2) |
|---|---|---|
| trigger | START, 0x38 + W, 0xAC, STOP | START, 0x58 + W, 0x20, 0x08, STOP |
| pause | `AHT_ACQ_CYCLES` = 100 000 (1 ms) | `SGP_ACQ_CYCLES` = 1 200 000 (12 ms) |
| read | START, 0x38 + R, 6 bytes, STOP | START, 0x58 + R, 6 bytes, STOP |
| result | status, humidity {b1,b2,b3[7:4]}, temperature {b3[3:0],b4,b5} | CO2eq {b0,b1}, CRC, TVOC {b3,b4}, CRC |
| repeat gap | `REP_CYCLES` = 10 000 000 (100 ms) | same |

The conversion pause starts when the last command byte has been
acknowledged. The STOP bit (10 µs at 100 kHz) therefore falls inside the
pause. A NACK to the address or to a command byte ends the transaction with
STOP and sends the sequencer straight back to ready, so it tries again at
once. There is no repeat gap after a NACK.

The read loop uses a down-counter, as in the original flow chart. It is
loaded with 5 (the read length minus one) and decremented as each byte
starts. The byte that starts with the counter at zero is the last one and
gets the NACK. One measurement therefore reads six bytes: five ACKs and one
NACK.

Three clocks after the last byte arrives, `aht_valid` or `sgp_valid` pulses for
one clock, and `temperature2`/`humidity` or `co2eq`/`tvoc` hold the new
values. With the defaults, the first AHT10 result appears 1.8 ms after reset
and the first SGP30 result after 12.9 ms. After that, each sensor gives a new
result about every 100 ms.

## The master and its byte handshake

`i2c_master` has the ports of a classic VHDL I²C master: `ena`, `addr`, `rw`
and `data_wr` in, and `busy`, `data_rd` and `ack_error` out. It works one byte
at a time, and `busy` is what paces the controller. This handshake is the
least obvious part of the design:

```
ena      ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______   (dropped after busy rises on the last byte)
busy     ___/‾‾‾‾‾‾‾‾‾ byte 0 ‾‾‾‾‾‾\_/‾‾‾‾‾‾ byte 1 ‾‾‾‾‾‾‾‾\________
                 ▲ controller sets up byte 1    ▲ data_rd valid, master samples ena:
                                                   0 → NACK (read) / STOP
```

* While the master is idle, `ena = 1` starts a transaction. The master
  latches `addr`, `rw` and `data_wr` and raises `busy` on the next clock.
* `busy` falls at the end of each data byte: after the ACK bit of a write
  byte, or after the eighth bit of a read byte. `data_rd` is valid from then
  on. On that clock the master decides what comes next:
  * `ena = 0`: STOP. For a read, the byte is NACKed first.
  * `ena = 1` with the same `addr` and `rw`: another byte. For a read, the
    byte just received is ACKed.
  * `ena = 1` with a different `addr` or `rw`: repeated START.
  If the transaction goes on, `busy` rises again one clock later.
* So the controller sets up the next byte, or drops `ena` for the last byte,
  when it sees `busy` rise. It collects `data_rd` when `busy` falls.
* If the slave NACKs the address or a write byte, the master sets
  `ack_error`, sends STOP and lets `busy` fall. `ack_error` stays set until
  the next transaction starts.

The sequencer never uses repeated START: trigger and read are separate
transactions with the pause between them. The master supports it anyway, and
its testbench exercises it.

## Bus timing

Each bit takes four quarter periods of `ceil(CLK_HZ / (4*BUS_HZ))` clocks.
SCL is low for quarters 0–1 and high for quarters 2–3. SDA holds its level
during quarter 0, so it never changes on the clock edge where SCL falls, and
takes the new bit at the start of quarter 1. SDA is read at the end of
quarter 2, the middle of the SCL high time, through a two-flop synchroniser.
START is SDA falling while SCL is high, and STOP is SDA rising while SCL is
high.

| `BUS_HZ` | clocks per quarter | actual rate |
|---|---|---|
| 100 000 (default) | 250 | 100.0 kHz |
| 400 000 | 63 | 396.8 kHz |
| 700 000 | 36 | 694.4 kHz |

The divider rounds up, so the bus never runs faster than requested. The
original design ran at 100, 400 and 700 kHz. 700 kHz is above the 400 kHz
fast-mode limit in the sensor datasheets. Lines are open drain: the top
brings out each line's level (`sda_i`, `sda2_i`) and a drive-low enable
(`sda_oe`, `scl_oe`, `sda2_oe`, `scl2_oe`). On the board, each enable drives
a tri-state pad buffer whose output is tied to 0, with pull-ups on the lines:

```systemverilog
assign sda = sda_oe ? 1'b0 : 1'bz;  assign sda_i = sda;   // likewise scl, sda2, scl2
```

A START from idle holds SDA low for two quarters (5 µs at 100 kHz) before SCL
falls. A repeated START holds it for only one quarter, which is short of the
4 µs standard-mode minimum at 100 kHz. The sequencer never issues one.
Slaves cannot stretch the clock: the master never reads SCL back.

## Temperature on the display

`display_converter` turns the AHT10's 20-bit code S into hundredths of a
degree, `tc = floor(S * 20000 / 2^20) - 5000`. This is the datasheet formula
T = S/2²⁰·200 − 50 °C. The result is clamped to 0…9999 and converted to BCD
by shift-and-add-3. `dd1`…`dd4` are tens, units, tenths and hundredths of a
degree, so 24.34 °C shows as `2434`. Readings below 0 °C show `0000`, and
readings above 99.99 °C show `9999`. No decimal point is driven.

`seven_segment_display` lights one digit at a time. `an[3]` (leftmost) shows
`dd1` and `an[0]` shows `dd4`. Each digit stays on for `2^DIGIT_LOG2` clocks:
0.66 ms by default, or 2.6 ms for the whole display. Anodes and segments
`CA`…`CG` are active low, as on the Basys 3. Digit values 10–15 show as A–F.

## Size

Generic synthesis (not FPGA-mapped) of the top gives about 540 flip-flops and
820 word-level cells. The Basys 3 has 41 600 flip-flops and 20 800 LUTs. The
original VHDL build of the parallel design used 246 registers and 18 bonded
I/Os. This design's pins also come to 18: clk, two resets, four SDA/SCL pads
and eleven display pins. The extra reading outputs are meant for logic inside
the FPGA.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. The I²C sensors are replaced by
`tb/i2c_sensor_model.sv`, a behavioural slave. It ACKs its address, records
written bytes, shifts out a fixed set of read bytes while the master ACKs,
and counts STARTs, STOPs, ACKs and NACKs.

| testbench | what it runs | simulated time |
|---|---|---|
| `tb_i2c_master` | master at 100 kHz from 4 MHz: write, 6-byte read, address NACK, repeated START, SCL period | < 1 s |
| `tb_controller` | controller + two masters + two sensor models: commands, readings, pauses, parallel progress, NACK recovery, `reset_m` | < 1 s |
| `tb_display_converter` | 2508 codes against the floating-point formula | < 1 s |
| `tb_seven_segment_display` | scan order, timing and segment patterns | < 1 s |
| `tb_i2c_parallel_top` | whole design at 4 MHz with shortened pauses; counts every mechanism (parallel traffic, both bus rates, ACK/NACK, pauses, address NACK on a read command and on a trigger with recovery, display scan, `reset_m`) | < 1 s |
| `tb_i2c_parallel_top_full` | whole design at its default parameters: one complete measurement of each sensor and a full display scan | about 1 s wall clock |
| `tb_i2c_bus_rates` | as above with the buses at 400 kHz and 700 kHz | about 1 s |

With plain Verilator (5.x), for example:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/i2c_pkg.sv rtl/i2c_master.sv rtl/sensor_sequencer.sv rtl/controller.sv \
  rtl/display_converter.sv rtl/seven_segment_display.sv rtl/i2c_parallel_top.sv \
  tb/i2c_sensor_model.sv tb/tb_i2c_parallel_top_full.sv \
  --top-module tb_i2c_parallel_top_full -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` to run another one. The package
must come first.

## Changing it

* Bus rates: `BUS_HZ1` (AHT10) and `BUS_HZ2` (SGP30) on `i2c_parallel_top`.
* Timing: `AHT_ACQ_CYCLES`, `SGP_ACQ_CYCLES` and `REP_CYCLES`, in clocks.
  The real AHT10 datasheet asks for about 75 ms of conversion time, much more
  than the 1 ms used here. Raise `AHT_ACQ_CYCLES` if a real sensor returns
  stale data (status bit 7 set).
* Other sensors: `sensor_sequencer` takes the address, up to three command
  bytes (`CMD_LEN`, `CMD`) and a read length of up to six bytes (`RD_LEN`).

## What follows the original design and what is this design's own

Taken from the original design:

* The block split and port names (master, controller, display converter,
  seven-segment display, `reset_m`, the `*2` ports of the second master).
* The sequence: idle, trigger with address + write and command, pause, read
  with address + read bit 1, ACK after each byte, NACK and STOP at the end,
  display, and back to ready on NACK or reset.
* The AHT10 address 0x38 and trigger 0xAC.
* The 12 ms and under-1 ms conversion times.
* The 100 MHz clock and the 100/400/700 kHz bus rates.
* One master per sensor on separate wires.

This design's own choices:

* Master:
  * the SCL generator sits in each master, so each bus has its own rate
    (the original text places it in the controller)
  * the byte handshake
  * the four-quarter bit timing and the rounded-up divider
  * the SDA synchroniser
  * stopping on a NACK
  * no clock stretching
* Sequencer:
  * "start condition" means the master is idle
  * a 100 ms repeat gap
  * six bytes per read (the original flow chart's counter, read literally,
    gives seven)
  * the AHT10 trigger sent as the single byte 0xAC, without the datasheet's
    two parameter bytes 0x33 0x00, which a real AHT10 may need
* From the sensor datasheets:
  * the SGP30 address 0x58 and command 0x2008
  * the byte layouts
  * the temperature formula
  * the SGP30 initialisation command and the CRC check are not implemented
* Outputs: `humidity`, `co2eq`, `tvoc` and the valid pulses are additions.
  The original shows only the temperature path to the display.
* I/O and resets: the split of each open-drain line into level and
  drive-low enable; both resets taken as active-low asynchronous.
* Display: the scaling, clamping, digit order and scan rate.

Left out: the earlier single-bus version that put both sensors on one SDA/SCL
pair.
