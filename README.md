# SPI and I2C master/slave controllers

This design puts the two most common board-level serial buses, SPI and I2C,
into FPGA logic. For each bus it has a master and a slave. The
interesting part is I2C. Its two wires are open drain, so every device reads
and writes the same SDA line through a tri-state buffer. A single transfer
then passes through a fixed sequence of START, address, acknowledge, data,
acknowledge and STOP. At each acknowledge the transfer can be cut short.

Everything runs from one 50 MHz clock. Both buses are paced by clock enables
from that clock:

| bus | rate asked for | divider | rate built |
|-----|----------------|---------|------------|
| SPI serial clock (CLK_3) | 3.6 MHz | half period of 7 clocks | 3.571 MHz |
| I2C SCL | 396 kHz (fast mode) | quarter period of 32 clocks | 390.6 kHz |

Both dividers are rounded up, so a bus never runs faster than asked for. In
particular, SCL never exceeds the 400 kHz limit of fast mode.

## Files

| file | what it is |
|------|------------|
| `rtl/serial_pkg.sv` | rates, dividers, I2C command/status types |
| `rtl/clk_en_div.sv` | clock-enable divider |
| `rtl/sync2.sv` | two-flop synchroniser |
| `rtl/spi_master.sv`, `rtl/spi_slave.sv` | SPI |
| `rtl/i2c_master.sv`, `rtl/i2c_slave.sv` | I2C |
| `rtl/od_iobuf.sv` | open-drain tri-state pad buffer |
| `rtl/serial_top.sv` | both buses, master and slave of each |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_serial_top` end to end |

## SPI

The bus has four wires: CLK_3, an active-low CS per slave, MOSI and MISO.
The transfer width is a parameter (`WIDTH`, default 8, any multiple of 8).
The master has one chip select per slave (`NUM_SS`, default 1), so with N
slaves the bus has 3+N wires.

CLK_3 idles high. Data moves on the rising edge and is sampled on the
falling edge, on both sides:

```
CS    ‾‾\____________________________________/‾‾‾
CLK_3 ‾‾‾‾‾‾\__/‾‾\__/‾‾ ... ‾‾\__/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
MOSI  ====X b7  X b6  X   ...  X b0 X==========
          ^ first bit valid when CS falls
```

One transfer works like this:

1. CS falls, and the MSB is on MOSI and MISO at once.
2. After one half period of set-up come `WIDTH` clock pulses.
3. One half period of hold follows, then CS rises. The rising CS ends the
   transfer.

An 8-bit transfer takes 17 half periods. From `start` to `done` that is
17 × 7 + 2 = 121 system clocks.

**SPI slave.** The slave does not clock on CLK_3. It brings CLK_3, CS and
MOSI through two-flop synchronisers and detects their edges in the 50 MHz
domain. That costs two to three clocks of delay on each edge. The delay is
safe as long as a half period of CLK_3 lasts at least 5 system clocks; the
default is 7. When CS rises after exactly `WIDTH` bits, the slave
delivers the word on `rx_data` and pulses `rx_valid`. A transfer cut short
is discarded. `miso_oe` is high while the slave is selected, so MISO can be
shared between several slaves.

**A note on clock mode.** This timing has CLK_3 idle high (CPOL = 1). The
first bit is already valid before the first (falling) edge. In the usual
SPI numbering that is mode 2 (CPOL = 1, CPHA = 0), although the original
description calls it CPOL = CPHA = 1. The design follows the edge rule,
"transmit on the rising edge, receive on the falling edge", not the mode
number. A slave that expects mode 3 needs the sampling and shifting edges
swapped in both modules.

## I2C

### Bus and buffers

I2C devices never drive a line high. `od_iobuf` either pulls its pad to 0
or leaves it in high impedance. A pull-up resistor on the board supplies
the 1. The buffer's `rd` output returns the level actually on the line.
That lets a device read what another device drives, and lets the master see
the slave's acknowledge. In simulation the pull-ups are `tri1` nets.

### One transfer

A transfer moves exactly one data byte:

```
START | A6..A0 R/W | ACK(slave) | D7..D0 | ACK/NACK | STOP or repeated START
        8 clocks      1 clock      8 clocks  1 clock
```

That makes 18 SCL clocks. In the master, each SCL period has four quarters
of `QDIV` system clocks. SDA changes in the first quarter, while SCL is low.
SCL is high for the second and third quarters, and SDA is sampled at the end
of the third. START, STOP and repeated START also take four quarters each.

The acknowledge slots decide how a transfer ends:

| situation | what the master does | `status` | length |
|-----------|----------------------|----------|--------|
| no slave acknowledges the address | STOP right after the 9th clock | `I2C_ADDR_NACK` | 11 slots, 10 SCL rises |
| write acknowledged | STOP | `I2C_OK` | 20 slots |
| write refused (NACK after the data) | releases SDA and SCL at once, no STOP | `I2C_DATA_NACK` | 19 slots |
| read | answers NACK (only one byte), then STOP | `I2C_OK` | 20 slots |

One slot is 4 × 32 = 128 clocks, or 2.56 µs at the defaults. A full
one-byte transfer therefore takes 51.2 µs.

### Repeated START

If the command's `restart` bit is set, a successful transfer does not end
with STOP. Instead the master reports `done` and keeps SCL low, so the bus
stays claimed. The next command begins with a repeated START.

### Commands

Commands are `i2c_cmd_t` structs handed over with a valid/ready handshake.
`cmd_ready` is high when the master is idle, and also while it holds the bus
for a repeated START.

### What the I2C logic leaves out

There is no arbitration, so only one master may be on the bus. There is no
clock stretching either: the slave never pulls SCL and the master never
reads it back. Addresses are 7-bit. Each transfer moves one data byte. For
standard mode (100 kHz) set `QDIV` to 125. High-speed mode (3.4 MHz) would
need its master-code preamble, which is not implemented.

### Slave

`i2c_slave` synchronises SCL and SDA to the system clock and watches them:

- SDA falling while SCL is high is a START. SDA rising while SCL is high is
  a STOP.
- It reads SDA on SCL rising edges. It changes SDA two to three clocks after
  SCL falls, well inside the 64-clock low phase.
- The address to answer to comes from the `own_addr` port.
- For a written byte, `ack_data` decides between ACK and NACK. The byte is
  delivered on `rx_data` either way.
- For a read, it sends `tx_data` and reports the master's answer on
  `master_ack`.
- After its one byte, or after a wrong address, it ignores the bus until the
  next START or STOP.

## Top level

`serial_top` holds both halves:

- **SPI.** The master drives the slave directly, and the four SPI lines are
  brought out for probing.
- **I2C.** The master and slave each sit behind their own `od_iobuf` pair on
  the two bidirectional pins `i2c_scl` and `i2c_sda`. These pins need
  external pull-ups, and they can also reach other I2C devices.

The design was originally shown with master and slave on separate FPGAs.
Joining them on one chip changes nothing on the wires.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Name the package first; `-y rtl` lets
verilator find every module by its file name:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/serial_pkg.sv tb/tb_serial_top.sv --top-module tb_serial_top
./obj_dir/Vtb_serial_top
```

For a block test, swap `tb_serial_top` for `tb_i2c_master`, `tb_i2c_slave`,
`tb_spi_master`, `tb_spi_slave`, `tb_clk_en_div` or `tb_od_iobuf`.
`tb_i2c_rates` runs an I2C master/slave pair at 100 kHz (`QDIV` = 125) and
one at the default rate, side by side.

### What the tests cover

`tb_serial_top` runs at the default parameters, with real-rate dividers, and
finishes in well under a second. It covers:

- an SPI exchange;
- an I2C address that nobody acknowledges;
- an acknowledged write;
- a refused write;
- a read;
- a write ending in a repeated START, followed by a read;
- random traffic on both buses at the same time.

It counts each of these mechanisms and fails if any never happened. It also
checks the SPI latency (121 clocks) and the I2C transfer lengths.

The block testbenches test each master against a behavioural model of the
other side, and each slave against a behavioural master. Each also checks:

- the SPI half period and clock idle level;
- the SCL period of 4 × `QDIV`;
- the number of SCL rises and START/STOP conditions.

## Where this departs from the original description, and how far to trust it

- **I2C rate.** The target is 396 kHz; the divider gives 390.6 kHz. The
  original frequency-divider code would have produced about 362 kHz, so the
  stated rate was followed rather than that code.
- **Tri-state buffer.** The original buffer could drive SCL high. Here both
  lines are strictly open drain, so two devices can never fight.
- **Single clock domain.** The slaves oversample the bus in the system clock
  domain instead of clocking on SCL or CLK_3.
- **R/W bit.** 0 means write and 1 means read, as in the I2C standard.
- **Invented details.** The SPI set-up and hold half periods, the position
  of SDA changes inside SCL low, and the repeated-START hand-off are this
  design's own choices.
- **Testing.** All behaviour was checked only in simulation, against models
  written from the bus rules. It has not been run on hardware or against
  third-party I2C or SPI devices.
