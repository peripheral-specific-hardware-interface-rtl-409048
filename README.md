# Peripheral-specific hardware interfaces for SPI sensors

A CPU that reads a digital sensor normally runs a driver: it clocks bytes over
SPI one at a time, fetches the sensor's factory calibration constants and
evaluates the vendor's correction formulas in software. The hardware here
moves that whole driver into logic. Software writes one bit to start an
acquisition and then reads finished values — temperature in 0.01 °C,
pressure in Pa, humidity in 0.001 %RH, gas resistance in Ω — from a small
register file. It never sees raw ADC words or calibration data.

Each interface is built from three interchangeable layers:

| layer | module | depends on |
|---|---|---|
| Comm Unit: drives the bus pins | `spi_comm_unit` | the bus standard (SPI) |
| Control Units: what to send, how much to read | `ctrl_unit` (one per function) | the peripheral's register map |
| Correction units: turn raw data into physical values | `hls_bme280_temp`, `hls_bme280_press`, `hls_bme680_data` | the peripheral's math |

A memory-mapped register block, `mmr`, connects each interface to the CPU.
All interfaces use the same register layout.

In the original architecture, the cycle-exact layers (Comm and Control) are
written as RTL, and the correction layer is generated by high-level synthesis
from C. Here the correction units are hand-written RTL state machines with
one C statement per state, which is the kind of schedule an HLS tool
produces.

Two complete interfaces are provided, one for each sensor the architecture
was demonstrated on:

* **`bme280_if`**: Bosch BME280, temperature and pressure. It has two
  separate correction units. The pressure unit needs the intermediate
  temperature value `t_fine`, so the temperature unit passes it over a
  dedicated port.
* **`bme680_if`**: Bosch BME680, temperature, pressure, humidity and gas
  resistance. One correction unit computes all four results in turn.

`epoc_hw_if_top` places both interfaces behind one CPU register port. Each
has its own SPI pins.

## One acquisition, step by step

1. The CPU writes `CTRL[0]=1`. `mmr` pulses `start`, unless the interface is
   busy.
2. The interface's sequencer starts the Control Units one after another:
   * **calibration** (`u_cal`): reads the calibration bytes. This happens only
     on the first acquisition after reset, or when the CPU also sets `CTRL[1]`.
     Otherwise the constants from the last read are reused.
   * **configure and poll** (`u_cfg`): writes the measurement set-up, which
     starts a forced-mode conversion. It then reads the status register until
     the sensor reports the conversion finished.
   * **data** (`u_dat`): reads the raw ADC bytes in one burst.
3. The sequencer pulses the handshake `hs_start` to the correction layer. The
   Control Units' byte buffers (`cd` for calibration, `sd` for sensor data)
   are its inputs.
4. The correction units compute and write each result into its MMR data
   register. When the last one is done, the interface pulses `irq`, sets
   `STATUS[1]` (data valid) and increments `STATUS[15:8]`.

`STATUS[0]` (busy) stays high until the data-valid bit is set. A CPU that
polls busy therefore never reads stale data.

## Control Units: a program per function

A Control Unit holds the data its function needs: register addresses, the
values to write and the number of bytes to read. This data is a small
parameter array of `epoc_pkg::ctrl_cmd_t` entries:

| entry | SPI traffic | effect |
|---|---|---|
| `cmd_wr(addr, data)` | `{0,addr[6:0]}`, `data` | write one register |
| `cmd_rd(addr, n, dst)` | `{1,addr[6:0]}`, then n dummy bytes | received bytes go to `rdata[dst..dst+n-1]` |
| `cmd_poll(addr, mask, val)` | `{1,addr[6:0]}`, one dummy byte | repeat until `(byte & mask) == val` |
| `cmd_end()` | none | pulse `done` |

Each command is one SPI transaction: chip select stays low from the address
byte to the last data byte. Bit 7 of the first byte is the read flag used by
the BME280/BME680 family.

**Sharing one Comm Unit.** The three Control Units of an interface all drive
the same Comm Unit. An idle Control Unit drives an all-zero request, so the
interface ORs the three requests together. All three units receive the Comm
Unit's response, and only the running unit acts on it. The sequencer starts
one unit at a time. Assertions check this (`a_one_cu`) and check that an idle
unit drives only zeros (`a_idle_quiet`). To support a different peripheral,
change these programs. The Comm Unit stays the same.

The programs used:

| interface | unit | program |
|---|---|---|
| BME280 | cal | read 0x88 ×24 |
| BME280 | cfg | write 0xF4 ← 0x25 (T and P oversampling ×1, forced); poll 0xF3 until bits 3 and 0 are clear |
| BME280 | dat | read 0xF7 ×6 |
| BME680 | cal | write 0x73 ← 0x00 (SPI page 0); read 0x89 ×25; read 0xE1 ×16; write 0x73 ← 0x10 (page 1); read 0x04 ×1 |
| BME680 | cfg | page 1; 0x72 ← `CTRL_HUM`; 0x5A ← `RES_HEAT`; 0x64 ← `GAS_WAIT`; 0x71 ← 0x10 (run gas, heater profile 0); 0x74 ← `CTRL_MEAS`; poll 0x1D until bit 7 (new data) is set |
| BME680 | dat | read 0x1F ×13 |

The BME680 shows only 128 registers at a time over SPI. Bit 4 of register
0x73 selects the page, and 0x73 can be reached from either page. The
calibration program switches to page 0 and then back to page 1. The
configuration program selects page 1 again, in case something else changed
the page.

## The Comm Unit link and SPI timing

`comm_req_t {valid, last, tx}` goes from the Control Units to the Comm Unit.
`comm_rsp_t {done, rx}` comes back. The Comm Unit accepts `valid` when it is
idle, or between two bytes of the same transaction. It pulls CS low, shifts
8 bits in SPI mode 0, MSB first, and pulses `done` with the received byte. If
`last` was set, CS rises afterwards. The requester updates `req` on the cycle
it sees `done`, and the Comm Unit waits for `done` to fall before it reads
`req` again.

With the defaults (`SCK_HALF = 5`), a 100 MHz clock gives a 10 MHz SCK. One
byte takes 80 clocks from acceptance to `done`. Each further byte of a burst
adds 2 clocks, and each transaction adds about 12 clocks for CS hold, CS gap
and the Control Unit's fetch. The run time is therefore close to the limit
set by the number of SPI bits. `tb_bme280_if` checks that a whole acquisition
stays within 25 % of that limit. `tb_bme680_if` allows 30 %, because the
BME680 correction unit takes 511 clocks.

The testbenches measured the following times. The sensor models report
"converting" for 2 (BME280) or 3 (BME680) status reads. A real sensor
converts for milliseconds, so the poll loop repeats until the conversion
ends. That adds polls but does not change how the other phases compare.

| acquisition | clocks | SPI-only clocks | µs at 100 MHz |
|---|---|---|---|
| BME280, calibration cached | 1357 | 1200 | 13.6 |
| BME280, with calibration read | 3416 | 3200 | 34.2 |
| BME680, calibration cached | 3398 | 2720 | 34.0 |
| BME680, with calibration read | 7461 | 6640 | 74.6 |

## Correction units

The arithmetic is the sensor vendor's integer compensation: the 32-bit
temperature and 64-bit pressure code from the BME280 data sheet, and the
fixed-point code of the BME680 reference driver. The datapath is 64 bits
wide. Where the C code casts to `int32_t`, the RTL truncates in the same
place, so results match the C code bit for bit when no intermediate value
overflows. Divisions use `seq_div`, a restoring divider that produces one bit
per clock. Its quotient is truncated toward zero, as in C, and a zero divisor
gives 0.

| unit | starts on | latency | output |
|---|---|---|---|
| `hls_bme280_temp` | `hs_start` | 5 clocks | DATA0 = T (0.01 °C); `t_fine` to the pressure unit (`hw_valid`, `hw_t_fine`) |
| `hls_bme280_press` | `hw_valid` from the temperature unit | 77 clocks | DATA1 = p in Pa, unsigned Q24.8 |
| `hls_bme680_data` | `hs_start` | 511 clocks | DATA0 T (0.01 °C), DATA1 p (Pa), DATA2 RH (0.001 %, clamped to 0–100000), DATA3 gas (Ω) |

All of these latencies are small next to the SPI traffic: one BME280
acquisition moves at least 15 bytes, or 1200 clocks.

The BME680 gas calculation uses two 16-entry constant tables indexed by the
gas range. They are written out as `case` statements in `hls_bme680_data`.
The heater target resistance code (`RES_HEAT`) is a raw register value passed
as a parameter. Computing it from a target temperature is left to software.

## Register map

Each interface has eight 32-bit words (see `epoc_pkg`). In `epoc_hw_if_top`,
`bus_addr[3]` selects the interface (0 = BME280, 1 = BME680) and
`bus_addr[2:0]` selects the word. Writes take effect on the clock edge. Reads
are combinational.

| word | name | contents |
|---|---|---|
| 0 | CTRL | write `[0]=1`: start; `[1]`: reload calibration at the next start (held) |
| 1 | STATUS | `[0]` busy, `[1]` data valid, `[15:8]` completed acquisitions |
| 2 | DEVICE | `[7:0]` 0x60 (BME280) or 0x61 (BME680) |
| 4–7 | DATA0–3 | temperature, pressure, humidity, gas resistance |

## Departures from the original system

* **Dynamic reconfiguration is not modelled.** In the original concept, an
  FPGA loads each interface on demand through its reconfiguration port. Here
  both interfaces are instantiated permanently.
* **Correction units are hand-written RTL**, not HLS output. Their schedule,
  and so their latency, is this design's own.
* **The CPU bus is a plain register port**, not the SoC's on-chip bus.
  Wrapping `mmr` for AXI4-Lite or a similar bus is straightforward.
* **Every interface here has a correction layer.** The architecture also
  allows an interface without one, where the Control Units feed the register
  block directly. No such variant is provided, because both sensors need
  correction.
* **BME280 humidity is not processed.** The BME280 interface covers
  temperature and pressure only, matching the two correction units of that
  interface.
* **These are this design's own choices:** the command encoding, the
  sequencer, calibration caching with CPU-requested reload, status polling,
  the register layout and all sensor configuration values
  (`CTRL_MEAS = 0x25`, `CTRL_HUM = 0x01`, `RES_HEAT = 0x80`,
  `GAS_WAIT = 0x59`).

## How far it is verified

Every module has a self-checking testbench. Each testbench prints
`TB_RESULT checks=N failures=M`.

* **Comm Unit (`tb_spi_comm_unit`):** tested against an independent mode-0
  slave. It checks the bytes in both directions, CS framing and the 80-clock
  byte time.
* **Control Unit (`tb_ctrl_unit`):** tested against a BME280 bus model. It
  checks writes, burst reads into buffer offsets and poll retries.
* **Correction units:** compared with straight-line reference code in
  `tb/tb_ref_pkg.sv`, using random raw values and calibration sets, and checked
  for fixed latency.
  * The BME280 units also reproduce the data sheet's worked example:
    25.08 °C and 100653 Pa.
  * The BME680 test covers all 16 gas ranges and both humidity clamps.
* **Interfaces and top:** run against behavioural SPI models of both sensors
  (`tb/bme280_model.sv`, `tb/bme680_model.sv`) at default parameters. The top
  test runs both interfaces at once. It counts every mechanism and fails if
  one never happens: calibration read, skip and reload; poll retries; page
  switches; each Control Unit driving the Comm Unit; the `t_fine` hand-over;
  and the four result writes of the BME680 unit.

The sensor models implement only what the interfaces use:

* SPI framing and auto-increment;
* the BME680 page bit;
* a conversion that reports "busy" for a set number of status reads.

The models were written from the same reading of the data sheets as the RTL.
A misread register address would therefore pass simulation and fail only on
silicon. The correction formulas were checked against the BME280 data sheet
example, but no BME680 sample from real silicon was available.

## Simulating

All files are SystemVerilog-2017. Packages must be compiled first. For
example, to run the whole-system test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/epoc_pkg.sv tb/tb_ref_pkg.sv tb/tb_epoc_hw_if_top.sv \
    --top-module tb_epoc_hw_if_top -o sim
./obj_dir/sim
```

To run any other testbench, replace the `tb_` name. Verilator finds the
remaining modules through `-Irtl -Itb`. The simulations take well under a
second each.

## Files

* `rtl/epoc_pkg.sv`: link types, Control Unit command type and constructors,
  register map.
* `rtl/spi_comm_unit.sv`, `rtl/ctrl_unit.sv`, `rtl/mmr.sv`, `rtl/seq_div.sv`:
  the shared building blocks.
* `rtl/hls_bme280_temp.sv`, `rtl/hls_bme280_press.sv`,
  `rtl/hls_bme680_data.sv`: correction units.
* `rtl/bme280_if.sv`, `rtl/bme680_if.sv`: complete interfaces.
* `rtl/epoc_hw_if_top.sv`: both interfaces behind one register port.
* `tb/`: one testbench per module, the reference formulas (`tb_ref_pkg`) and
  the two sensor models.
