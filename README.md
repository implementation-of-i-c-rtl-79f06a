# I2C master bus controller

A small FPGA-side controller that lets a design talk to slow peripheral chips
(here a real-time clock and a serial EEPROM) over the two-wire I2C bus. The
controller is the only master on the bus: it generates the clock on SCL, frames
each transfer with START and STOP conditions, sends the slave address and a
register address, and then either writes data bytes to the slave or, after a
repeated START, reads data bytes from it. Every byte is followed by an
acknowledge bit, and a slave that answers "not acknowledged" makes the
controller end the transfer at once.

```
                    SDA  <------------------+------------------+
 +----------------+ SCL  ---------------+   |              +---+---+
 | i2c_master     |------------------+  |   |              |       |
 | (bus           |                  v  v   v              v       v
 |  controller)   |               Slave 1 (real-time     Slave 2 (EEPROM)
 +----------------+                        clock)
```

## Files

| file | contents |
|---|---|
| `rtl/i2c_pkg.sv` | command struct `i2c_cmd_t`, direction, state and byte-kind enums |
| `rtl/i2c_master.sv` | the bus controller |
| `rtl/i2c_bus.sv` | the SCL and SDA wires: SDA as a wired-AND of all devices |
| `rtl/i2c_system.sv` | top level: controller + bus, slave pins as ports |
| `tb/i2c_slave_model.sv` | behavioural register-addressed slave (stands in for the clock and EEPROM chips) |
| `tb/tb_i2c_master.sv` | controller testbench, short SCL period |
| `tb/tb_i2c_bus.sv` | bus testbench, all input combinations |
| `tb/tb_i2c_system.sv` | end-to-end testbench at the default 50 MHz / 100 kHz |

## The bus and its two conditions

Both lines are high when the bus is idle. Data on SDA may change only while SCL
is low. The only two SDA edges allowed while SCL is high mark a transfer's
boundaries:

* **START**: SDA falls while SCL is high. The bus counts as busy from here on.
* **STOP**: SDA rises while SCL is high. The bus is idle again.

A START sent before a STOP is a **repeated START**. The controller uses it to
turn a transfer round from writing to reading without giving up the bus.

Only the master drives SCL. No slave can stretch the clock. SDA is open drain:
a device pulls it low or lets go, and a pull-up makes it high. So the wire
carries the AND of all the devices' outputs. The simulator has only two states,
so `i2c_bus` models the wire as exactly that AND. In the RTL every SDA output
uses the convention 1 = release, 0 = pull low.

## Frame formats

Bytes go out MSB first. After every byte there is a ninth clock pulse for the
acknowledge bit, and the device that received the byte drives that bit. Low
(ACK) means "go on". High (NACK) means "no more".

Master transmitter (`cmd.rw = I2C_WRITE`):

```
S | addr[6:0] 0 | A | reg[7:0] | A | data0 | A | ... | dataN-1 | A | P
```

Master receiver (`cmd.rw = I2C_READ`):

```
S | addr[6:0] 0 | A | reg[7:0] | A | Sr | addr[6:0] 1 | A | data0 | a | ... | dataN-1 | n | P
```

The slave sends `A`. The master sends `a` (ACK) after each byte it reads except
the last, and `n` (NACK) after the last one. The register address byte sets the
slave's register pointer. The data bytes then go to, or come from, consecutive
registers. This depends on the slave auto-incrementing its pointer, which real
clock and EEPROM chips do.

If any `A` the master waits for comes back high, the controller sends STOP
straight after that bit. It then raises `nack` together with `done`. This covers
an address that no device answers, a register address the slave refuses, and a
data byte the slave refuses (a write-protected EEPROM, for example).

## Bit timing inside the controller

This is the part worth reading before you change `i2c_master.sv`. One SCL
period is split into four **quarters** of `QUARTER = CLK_HZ / (4*SCL_HZ)`
system clocks each. The defaults, 50 MHz and 100 kHz, give 125 clocks per
quarter and 500 per bit. Every state that touches the bus lasts exactly four
quarters:

| state | q0 | q1 | q2 | q3 |
|---|---|---|---|---|
| START from idle | SCL 1, SDA 1 | SCL 1, SDA 1 | SCL 1, **SDA 0** | SCL 0, SDA 0 |
| repeated START | SCL 0, SDA 1 | SCL 1, SDA 1 | SCL 1, **SDA 0** | SCL 0, SDA 0 |
| data / ack bit | SCL 0, SDA = bit | SCL 1 | SCL 1, sample at end | SCL 0 |
| STOP | SCL 0, SDA 0 | SCL 1, SDA 0 | SCL 1, SDA 0 | SCL 1, **SDA 1** |

* SDA changes only in q0, while SCL is low. That leaves a full quarter of setup
  before SCL rises and a full quarter of hold after it falls.
* The controller samples SDA on the last clock of q2, near the end of the high
  phase. `sda_i` first passes a two-flop synchroniser, so the value sampled is
  two clocks old. That is why `QUARTER` must be at least 4, which an elaboration
  assertion checks.
* `scl_o` and `sda_o` come straight from flip-flops. They lag the state machine
  by one clock, the same for both lines, so the order of edges above holds.
* An assertion in the output register checks the bus rule: SDA never changes
  while SCL stays high, except in START and STOP.

The controller has four byte kinds: address+W, register, address+R and data.
The kind of the byte just sent decides what follows its acknowledge bit:

* address+W is followed by the register address.
* The register address is followed by a repeated START (read) or by the first
  data byte (write).
* address+R is followed by receiving.
* A data byte is followed by the next byte or by STOP.

Time for one transfer, counted from the clock cycle in which the command is
taken to the `done` pulse:

* write of n bytes: `1 + 4Q*(2 + 9*(2+n)) + n` clocks (START and STOP, plus one
  wait cycle per data byte when `wr_valid` is already high)
* read of n bytes: `1 + 4Q*(3 + 9*(3+n))` clocks (START, repeated START, STOP)

At the defaults, writing 7 clock registers takes 41,508 clocks, or 0.83 ms.

## Interface of `i2c_master` / `i2c_system`

| signal | dir | meaning |
|---|---|---|
| `cmd_valid`, `cmd_ready` | in, out | Command handshake. `cmd_ready` is high only when the controller is idle. |
| `cmd` (`i2c_cmd_t`) | in | `rw`, `slave_addr[6:0]`, `reg_addr[7:0]`, `nbytes[7:0]`. An `nbytes` of 0 counts as 1. |
| `wr_data`, `wr_valid`, `wr_ready` | in, in, out | Write bytes, one handshake per byte. While `wr_ready` is high the controller holds SCL low and waits. A late byte stalls the bus and is never lost. |
| `rd_data`, `rd_valid` | out | A one-cycle strobe after the 8th bit of each byte read. |
| `busy`, `done`, `nack` | out | `done` is a one-cycle pulse when STOP is complete. `nack` is valid with `done` and holds until the next command. |
| `scl_o`, `sda_o`, `sda_i` | out, out, in | Bus pins of `i2c_master`. `sda_o` = 0 means pull low. |
| `slave_scl`, `sda`, `slave_sda_o[1:0]` | out, out, in | On `i2c_system`: the pins of slave 1 (clock chip, bit 0) and slave 2 (EEPROM, bit 1). |

The reset is asynchronous and active low. It returns the controller to idle
with both lines released.

On an FPGA, drive the SDA pad as open drain, with the output enable set to
`!sda_o` and the pad input fed back to `sda_i`. SCL can be an ordinary output,
because no slave drives it.

## Parameters

| parameter | default | where |
|---|---|---|
| `CLK_HZ` | 50,000,000 | `i2c_master`, `i2c_system` |
| `SCL_HZ` | 100,000 (standard mode) | `i2c_master`, `i2c_system` |
| `N_DEV` | 3 (master + 2 slaves) | `i2c_bus` |

`CLK_HZ` and `SCL_HZ` are this design's own choice. Change them together to fit
your board. Keep `CLK_HZ / (4*SCL_HZ)` at 4 or more.

## How far it follows the source description, and where it departs

Taken from the protocol description: idle with both lines high; START and STOP
as SDA edges while SCL is high; a 7-bit address followed by the direction bit;
8-bit bytes sent MSB first with a ninth acknowledge pulse; the
register-addressed write and read frames (the read uses a repeated START); a
one-way SCL; and ending the transfer with STOP when a slave does not
acknowledge.

Choices made in this design:

* STOP is SDA *rising* while SCL is high. This is the standard meaning. One
  sentence of the source instead describes SDA being driven low at that point.
* The master sends NACK after the last byte it reads and ACK after the others.
* A transfer can carry 1 to 255 data bytes. The frame diagrams show a single
  data byte.
* The following are all this design's own: the four-quarter bit timing, the
  sample point, the synchroniser, the command and stream interface, the reset,
  and the 50 MHz / 100 kHz defaults.
* Not built: clock stretching and multi-master arbitration. Both are left out
  because SCL is one-way here. Also not built: 10-bit addressing and reads
  without a register address.
* The slave chips are not part of the RTL. The source names the clock chip as a
  DS1302. That part actually has a 3-wire serial interface, not I2C. The
  testbench models both slaves as generic register-addressed I2C slaves at
  0x68 (clock) and 0x50 (EEPROM), each with 256 registers that start at
  `i ^ SEED`.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`.

* `tb_i2c_master` uses `QUARTER` = 10 and two slave models. It checks the
  following:
  * writes reach the slave's registers, and reads return the slave's registers;
  * the master sends ACK three times and then NACK on a 4-byte read;
  * a repeated START appears on the bus;
  * an absent address ends in STOP after the first byte, with `nack` set;
  * a refused data byte ends the transfer and is not stored;
  * late write bytes hold SCL low;
  * `nbytes = 0` moves one byte;
  * each byte takes 9 SCL pulses, and no SCL period is shorter than
    4·`QUARTER`;
  * the exact transfer times given by the formulas above.
* `tb_i2c_bus` applies all 16 input combinations.
* `tb_i2c_system` runs the top at its default parameters, about 241,000 busy
  clocks:
  * it sets and reads back seven clock registers;
  * it writes an 8-byte EEPROM page while the data arrives late, then reads
    the page back;
  * it runs a one-byte write frame and a one-byte read frame;
  * it addresses an absent device;
  * it writes while the EEPROM refuses data.

  It counts START, repeated START, STOP, slave ACK, address and data NACK,
  master ACK and NACK, write stalls, transmitter mode and receiver mode. It
  fails if any of these never happened, and it checks the 500-clock SCL
  period.

Build and run any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/i2c_pkg.sv \
          tb/tb_i2c_system.sv --top-module tb_i2c_system -Mdir obj_sys
./obj_sys/Vtb_i2c_system
```

Use `tb_i2c_master` or `tb_i2c_bus` in place of `tb_i2c_system` to run the
other two.
