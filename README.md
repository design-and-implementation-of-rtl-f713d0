# I2C master for a 24C02 serial EEPROM

This is an FPGA-side I2C bus master that writes bytes into, and reads bytes
back from, a 24C02 serial EEPROM (256 x 8 bits, I2C slave address
`1010 A2 A1 A0`). I2C uses just two open-drain lines: SCL, the clock, which
this master drives, and SDA, the data line, which both ends drive. A pull-up
holds each line high. A device can only pull a line low, so the bus behaves
as a wired AND. Every transfer is framed by a START (SDA falls while SCL is
high) and a STOP (SDA rises while SCL is high). Bytes go MSB first. Each
byte is followed by a ninth, acknowledge bit, which the receiver pulls low
(ACK) or leaves high (NACK).

The core is a state machine that walks through the frames of an EEPROM
access one bit slot at a time. Around it sit a divider that sets the SCL
rate and lets a slave stretch the clock, a shift register for the byte on
the wire, and a spike filter on each input line.

```
             +------------------------- i2c_eeprom_top ---------------------------+
             |                                                                     |
 scl_i ----->| i2c_input_filter --scl_f--+                                         |
 sda_i ----->| i2c_input_filter --sda_f--+-> i2c_master                            |
             |                              |  i2c_clock_gen  (quarter ticks,      |
 host  <====>|  go, rw, dev_addr, reg_addr, |                   stretch detect)    |--> scl_oe
 command     |  nbytes, wdata / wdata_ack,  |  i2c_shift_reg  (MSB-first byte)    |--> sda_oe
             |  rdata / rdata_valid, done,  |  bus FSM        (IDLE .. STOP)      |
             |  ack_error, busy, state      |                                     |
             +---------------------------------------------------------------------+
```

`scl_oe` / `sda_oe` = 1 pulls the line low, and 0 lets it float high. On
an FPGA, connect each one to an open-drain pad (output enable driving a
constant 0) with an external pull-up; the datasheet value for this bus is
around 4.7 kOhm. `scl_i` / `sda_i` are the pad input levels.

## What goes on the wire

A **byte write** (the default transfer, one data byte):

| frame | bits | driven by |
|---|---|---|
| START | SDA falls, SCL high | master |
| slave address | 7 bits, e.g. `1010000` = 0x50 | master |
| R/W | `0` (write) | master |
| ACK | 1 bit | EEPROM |
| word (register) address | 8 bits | master |
| ACK | 1 bit | EEPROM |
| data | 8 bits, repeated for a page write | master |
| ACK | 1 bit after every data byte | EEPROM |
| STOP | SDA rises, SCL high | master |

A **random read** first writes the word address without any data. It
then turns the bus around with a *repeated START* (a START with no STOP
before it), sends the address again with R/W = 1, and receives:

```
S  [addr 0]  A  [word addr]  A  Sr  [addr 1]  A  [data]  A ... [data]  NACK  P
```

The master ACKs every read byte except the last one, which it NACKs. The
NACK tells the EEPROM to stop driving SDA so the master can send STOP. With
`nbytes` > 1 the same frames give a page write or a sequential read. A
24C02 buffers a page of 8 bytes, and the low three address bits wrap
around inside it. A sequential read wraps around the whole 256-byte array.

## The bus state machine

`i2c_master` moves through the states of `i2c_pkg::state_e`. The numbers
are the values on the `state` output:

| # | state | what happens in the slot(s) | next |
|---|---|---|---|
| 0 | IDLE | both lines released | START when `go` |
| 1 | START | START condition. Loads the shift register with `{dev_addr, R/W}` and sets `count = 6` | ADDR |
| 2 | ADDR | one address bit per slot. `count` counts 6..0 | RW |
| 3 | RW | the eighth bit: 0 on the first pass, 1 on the second pass of a read | ACK |
| 4 | ACK | the slave answers. Sets `count = 7` | REG (first pass), DATA (second pass of a read), STOP on NACK |
| 5 | REG | eight word-address bits | ACK_2 |
| 6 | ACK_2 | the slave answers | DATA (write), RSTART (read), STOP on NACK |
| 10 | RSTART | SCL low, SDA released, SCL high: set-up for the repeated START | START (second pass) |
| 7 | DATA | eight data bits, sent (write) or sampled (read) | ACK_3 |
| 8 | ACK_3 | write: the slave answers. Read: the master sends ACK, or NACK on the last byte | DATA while bytes remain, else STOP |
| 9 | STOP | STOP condition | START if `go` is still high, else IDLE |

`rst` is synchronous and active high. It sends the FSM to IDLE from any
state and releases both lines at once, even in the middle of a byte. When
`go` is held high, the machine goes from STOP straight back to START and
repeats the transfer. So with `go` tied high, the master runs transfers
back to back for as long as reset is low.

A read goes through START, ADDR, RW and ACK twice. The `pass2` flag tells
the two passes apart: it sets R/W and picks the state after ACK.

## Bit slots: where SCL and SDA change

This part takes the most care. Every state is one *slot* of four quarter
periods of SCL, and `i2c_clock_gen` ends each quarter with a one-cycle
`tick`. The rule the design keeps is that **SDA may change only while SCL is
low, except to make a START or a STOP**. An assertion in `i2c_master`
enforces it.

| slot | quarter 0 | quarter 1 | quarter 2 | quarter 3 |
|---|---|---|---|---|
| data / address / ACK bit | SCL low, SDA held | SCL low, SDA takes the new bit (or is released) | SCL released; SDA sampled at the end | SCL released |
| START | both released | both released | SDA low, SCL released | SDA low, SCL released |
| RSTART | SCL low, SDA held | SCL low, SDA released | both released | both released |
| STOP | SCL low, SDA held | SCL low, SDA low | SCL released, SDA low | SCL released, SDA low; SDA is released when the slot ends |

SDA changes one quarter after SCL falls, never on the same edge, which
gives the receiver hold time. The master samples SDA at the end of the
first high quarter. START and STOP conditions are held for two quarters
(5 us at 100 kHz), and so is the gap between a STOP and the next START.
Both drive enables come from flip-flops, so the pads never glitch.

**Clock stretching.** A slave may hold SCL low to gain time, typically
after acknowledging its address. When the master releases SCL but the
filtered line still reads low, `i2c_clock_gen` holds its count at zero and
raises `stretch`. The high quarters start only once SCL has actually risen,
so a stretched bit still gets its full high time.

**Input filtering.** `i2c_input_filter` passes each line through a
two-flip-flop synchroniser. It changes its output only after the new level
has held for `FILTER_LEN` cycles, so spikes on the bus are dropped. The
delay, 2 + `FILTER_LEN` cycles, is small next to a quarter period of 125
cycles.

## Host interface

| signal | dir | meaning |
|---|---|---|
| `go` | in | start a transfer. The command fields are captured when START begins. Hold it high for back-to-back transfers |
| `rw` | in | 0 write, 1 read |
| `dev_addr[6:0]` | in | slave address: 0x50 for a 24C02 with A2..A0 tied low |
| `reg_addr[7:0]` | in | EEPROM word address |
| `nbytes[NB_W-1:0]` | in | data bytes, 1..15; 0 counts as 1 |
| `wdata[7:0]` / `wdata_ack` | in / out | byte on offer; `wdata_ack` pulses once it has been taken, so present the next byte |
| `rdata[7:0]` / `rdata_valid` | out | each received byte, with a one-cycle strobe |
| `done` | out | one-cycle pulse after STOP |
| `ack_error` | out | a slave answered NACK, valid with `done`. The transfer was cut short with a STOP |
| `busy`, `state`, `stretch` | out | status |

A NACK to the address usually means that the EEPROM is busy with its
internal write cycle (about 5 ms on a 24C02). To wait for the write to
finish, keep repeating a write to the same address until `ack_error` stays
low; this is called acknowledge polling.

Timing at the defaults: one bit = 500 cycles (50 MHz / 100 kHz).

| transfer | slots | cycles without stretching |
|---|---|---|
| write of n bytes | 20 + 9n | 10 000 + 4 500 n (n = 1: 14 500 = 290 us) |
| read of n bytes | 31 + 9n | 15 500 + 4 500 n (n = 1: 20 000 = 400 us) |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock. Assumed board oscillator |
| `SCL_HZ` | 100 000 | SCL rate: standard mode, which the 24C02 supports at every supply voltage. The fast-mode 400 kHz also works with a 24C02 at 2.7 V or 5 V |
| `FILTER_LEN` | 3 | spike filter length in cycles (60 ns at 50 MHz) |
| `NB_W` | 4 | width of `nbytes` |

The quarter period is `CLK_HZ / (4 * SCL_HZ)` cycles rounded up, with a minimum of 2, so SCL never runs faster than `SCL_HZ`.

## Design choices and departures

- **Register byte.** The write frame includes the EEPROM word address (the
  register byte) between the address ACK and the data, as an EEPROM
  needs. A bare address, data, STOP state machine leaves it out.
- **States.** States 0 to 9 are numbered as in the reference write trace.
  A single RW state carries the eighth bit; there are no separate
  read/write states after ADDR. The read path (RSTART, second address
  pass, master ACK/NACK) reuses the states of the write path.
- **SCL rate.** SCL is divided down from the system clock to `SCL_HZ`. It
  is not gated straight from the system clock.
- **Reset and start.** Reset is synchronous. A separate `go` input starts
  transfers, and holding it high reproduces the "loop from STOP to START
  while reset is low" behaviour.
- **Additions.** Multi-byte transfers, the NACK reaction (STOP plus
  `ack_error`), clock-stretching support, the input filters, the four-quarter
  bit timing and the host handshake are this design's own choices.
- **Not included.** There is no multi-master arbitration: this is a
  single-master design. There is no 10-bit addressing. Standard (100 kHz),
  fast (400 kHz) and fast-mode-plus (1 MHz) rates are only a matter of
  `SCL_HZ`. High-speed mode (3.4 MHz) needs its own master code and is not
  supported. The open-drain pads and pull-ups are outside
  the RTL.

## Files

| file | contents |
|---|---|
| `rtl/i2c_pkg.sv` | R/W constants and the state enum |
| `rtl/i2c_eeprom_top.sv` | top: filters + master |
| `rtl/i2c_master.sv` | bus FSM and line drivers |
| `rtl/i2c_clock_gen.sv` | quarter-period ticks, stretch detection |
| `rtl/i2c_shift_reg.sv` | 8-bit MSB-first data register |
| `rtl/i2c_input_filter.sv` | synchroniser + spike filter |
| `tb/eeprom_24c02_model.sv` | behavioural 24C02: byte/page write, 8-byte page roll-over, write cycle with NACK, WP pin, random and sequential read, optional clock stretching |
| `tb/i2c_bus_monitor.sv` | passive decoder that logs START, STOP and byte+ACK frames |
| `tb/i2c_tb_pkg.sv` | bus-event type, EEPROM type code |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## Simulation

Each testbench checks itself, and ends by printing
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_i2c_eeprom_top \
    rtl/i2c_pkg.sv tb/i2c_tb_pkg.sv tb/tb_i2c_eeprom_top.sv
./obj_dir/Vtb_i2c_eeprom_top
```

(`-I` lets Verilator find the other modules by file name.) What each
testbench covers:

- `tb_i2c_eeprom_top` runs the top at its default parameters against the
  EEPROM model, with a 5 ms write cycle and 10 us of clock stretching after
  each address. It writes 0xAA to register 0xFF of slave 0x50, polls for
  the acknowledge until the write cycle ends, and reads the byte back while
  two-cycle spikes hit both master inputs. It also runs an 8-byte page
  write, a sequential read of the page, back-to-back transfers with `go`
  held, and a reset in the middle of a byte. A second EEPROM at slave
  address 0x51 shares the bus, and the test checks that each device answers
  only its own address. Every frame on the wire is
  checked against the expected sequence. It checks the SCL period (500
  cycles), each transfer's length in cycles, and that every mechanism
  happened at least once. It runs in under a second.
- `tb_i2c_master` runs the same kinds of transfers in fast mode (50 MHz /
  400 kHz, a 128-cycle SCL period), and
  also covers a slave address that nobody answers.
- `tb_i2c_clock_gen`, `tb_i2c_shift_reg` and `tb_i2c_input_filter` test the
  small blocks against reference models written in the testbench.

The EEPROM model is a simulation model only. It follows the 24C02 data
sheet in what it does, not in its analog timing.
