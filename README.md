# I2C master controller with three slaves

An I2C bus needs only two open-drain wires, SDA (data) and SCL (clock), to let
one controller reach many peripheral chips. This RTL implements a complete
bus system: a finite-state-machine **master controller** that turns a simple
parallel request ("write these bytes to register R of slave A" or "read N
bytes from register R of slave A") into the serial bus sequence, and three
**slaves** that recognise their own address and hold a register file that the
master writes and reads. Both 7-bit and 10-bit slave addresses are supported;
the default system has two 7-bit slaves and one 10-bit slave so that both
modes share the same bus.

```
            clk, rst_n
   start, rw, ten_bit      +-------------------+   SCL (master only)
   addr[9:0], reg_addr  -->|  i2c_master       |----------+-----------+-----------+
   nbytes, data_in[7:0]    |                   |   SDA    |           |           |
   data_out, done, ...  <--|                   |<=======>[slave 1]  [slave 2]  [slave 3]
                           +-------------------+          0x50       0x68      0x2A5 (10-bit)
```

Files (all SystemVerilog, one unit per file):

| file | contents |
|---|---|
| `rtl/i2c_pkg.sv` | shared constants (10-bit prefix `11110`, R/W encoding) and the state enums |
| `rtl/i2c_master.sv` | master controller |
| `rtl/i2c_slave.sv` | slave with 7/10-bit address match and a 256 x 8 register file |
| `rtl/i2c_system.sv` | top: master + three slaves, open-drain bus |
| `tb/tb_i2c_master.sv` | master against an independent scripted bus responder |
| `tb/tb_i2c_slave.sv` | two slaves against a bit-banged bus |
| `tb/tb_i2c_system.sv` | end to end, all parameters at their defaults |
| `tb/tb_i2c_freq.sv`, `tb/i2c_rate_check.sv` | whole system at 100 kHz, 400 kHz and 1 MHz SCL |

## Bus transactions

Every transfer on the bus is a START, a series of 9-bit frames (8 data bits,
MSB first, then one acknowledge bit driven by the receiver: low = ACK,
high = NACK), and a STOP. START is SDA falling while SCL is high; STOP is
SDA rising while SCL is high; at all other times SDA only changes while SCL
is low. The bus is idle when both lines are high.

The first byte after START addresses a slave. Its last bit is R/W: 0 for a
write, 1 for a read.

**Write** (the register pointer is set, then data follows):

```
S | addr[6:0] 0 | A | register | A | data 0 | A | ... | data N-1 | A | P
```

**Read** (a write of the register address, then a repeated START Sr and the
address again with R/W = 1; the master acknowledges each byte but NACKs the
last one to tell the slave to stop sending):

```
S | addr[6:0] 0 | A | register | A | Sr | addr[6:0] 1 | A | data 0 | A | ... | data N-1 | NACK | P
```

**10-bit addressing** replaces the single address byte with two:
`11110 a9 a8 R/W`, then `a7..a0`. Every slave whose two MSBs match may
acknowledge the first byte; only the one whose full address matches
acknowledges the second. In a read, only the first of the two bytes is
repeated after Sr (`11110 a9 a8 1`), and a slave answers it only if it saw
its full address since the last STOP.

The design moves 1 to 255 data bytes per transaction (`nbytes`, 0 is taken
as 1). The slave's register pointer advances by one per byte, in both
directions, and wraps at 256.

If a slave does not acknowledge the address, the register byte or any write
byte, the master abandons the transfer, sends STOP, and reports
`ack_error` with `done`.

## Master controller (`i2c_master`)

### Timing inside one SCL period

The master divides each SCL period into four quarters of
`QUARTER = CLK_HZ / (4*SCL_HZ)` clock cycles (125 at the defaults, 50 MHz and
100 kHz). Every bus action happens on a quarter boundary, so all line changes
come from flip-flops:

```
quarter          0        1        2        3     | next bit
SCL           ___low___________/'''''high'''''''''\___
SDA (data)    --hold--X  new bit  ================ X
                      ^ drive          ^ sample (end of quarter 2)
```

START, repeated START and STOP also take one SCL period each. The table
lists what the master does at the end of each quarter:

| state | end of q0 | end of q1 | end of q2 | end of q3 |
|---|---|---|---|---|
| START (bus idle) | – | SCL stays high | SDA low (START) | SCL low |
| repeated START | SDA released | SCL high | SDA low (Sr) | SCL low |
| data/ACK bit | drive SDA | SCL high | sample SDA | SCL low |
| STOP | SDA low | SCL high | SDA released (STOP) | idle, `done` |

Because SDA is driven a full quarter after SCL has fallen, a slave that lags
the bus by a few cycles (the slave uses a synchroniser) has time to release
its ACK before the master drives the next bit. `QUARTER` must be at least 8;
an elaboration-time assertion enforces this.

### State machine

`m_state_e` holds the bus-level state (IDLE, START, BYTE, RSTART, STOP) and
`m_frame_e` the meaning of the byte in flight (ADDR1, ADDR2, REG, RADDR,
WDATA, RDATA). After each frame's ACK bit the next frame is chosen:

```
ADDR1 --ten_bit--> ADDR2 --> REG --write--> WDATA (x nbytes) --> STOP
  \------7-bit----------/     \--read--> RSTART --> RADDR --> RDATA (x nbytes) --> STOP
any transmitted frame that is NACKed --> STOP with ack_error
```

### Latency

Counting from the clock edge that samples `start`, `done` is high after the
edge that ends this many SCL periods:

| transfer | SCL periods |
|---|---|
| write, 7-bit, N bytes | 2 + 9·(2+N) |
| write, 10-bit, N bytes | 2 + 9·(3+N) |
| read, 7-bit, N bytes | 3 + 9·(3+N) |
| read, 10-bit, N bytes | 3 + 9·(4+N) |
| abort on NACK of frame k (k = 1 for the address) | 2 + 9·k |

each SCL period being `4*QUARTER` clock cycles. A one-byte 7-bit write at
100 kHz is 29 periods, 290 µs.

### User interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request, accepted when `busy` is low |
| `rw` | in | 1 | 0 write, 1 read |
| `ten_bit` | in | 1 | 1: `addr` is a 10-bit address |
| `addr` | in | 10 | slave address (bits 6:0 in 7-bit mode) |
| `reg_addr` | in | 8 | register address inside the slave |
| `nbytes` | in | `NB_W` | data bytes to move |
| `data_in` | in | 8 | write data; taken at the start of each data byte |
| `data_req` | out | 1 | pulse: `data_in` taken, present the next byte |
| `data_out`, `data_out_valid` | out | 8, 1 | each received byte with a one-cycle strobe |
| `busy`, `done`, `ack_error` | out | 1 | status; `done` pulses after STOP |
| `scl_oe`, `sda_oe` | out | 1 | 1 = pull the line low |
| `sda_i` | in | 1 | SDA line level |

`rw`, `ten_bit`, `addr`, `reg_addr` and `nbytes` are latched at `start`.
`data_in` for the first byte must be valid when the register byte's ACK
completes; `data_req` then announces each byte consumed.

## Slave (`i2c_slave`)

Parameters: `ADDR` (10 bits), `TEN_BIT` (addressing mode) and `REGS`
(register file depth, default 256, at most 256).

SCL and SDA enter through two-flop synchronisers; START and STOP are detected
as an SDA edge while SCL is high in two consecutive samples, and bits are
taken on the synchronised SCL rising edge. A START (or repeated START) at
any time restarts address reception; a STOP always returns the slave to idle.

Received bytes are decided on the falling SCL edge after their eighth bit:
the slave pulls SDA low for the following bit period if it accepts the
byte. The first accepted byte after the address sets the register pointer;
every later byte is written at the pointer, which then advances. When
addressed for reading it puts the register at the pointer on SDA, one bit per
falling SCL edge, releases SDA for the master's ACK, and continues with the
next register on ACK or goes idle on NACK.

`loc_addr`/`loc_rdata` give the slave's local side a combinational read port
into the register file. The register file has no reset.

## System top (`i2c_system`)

The top instantiates the master and three slaves and forms the open-drain
lines as wired-AND with pull-ups: `sda = ~(master | slave1 | slave2 | slave3
pull-low enables)`, `scl = ~master pull-low`. The line levels are outputs, for
observation. Parameters: `CLK_HZ`, `SCL_HZ`, `NB_W` and, per slave,
`Sn_ADDR`/`Sn_TEN` (defaults 0x50 and 0x68 in 7-bit mode and 0x2A5 in 10-bit
mode). `loc_rdata[n]` reads slave n+1 at the shared `loc_addr`. An assertion
checks that no two slaves ever drive SDA at once.

A 7-bit slave address must not begin with `11110`, since those first bytes
announce a 10-bit address.

## Simulation

With Verilator 5 (the testbenches use timing controls):

```
verilator --binary --timing --assert -Irtl \
    rtl/i2c_pkg.sv rtl/i2c_master.sv rtl/i2c_slave.sv rtl/i2c_system.sv \
    tb/tb_i2c_system.sv --top-module tb_i2c_system -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a fixed number of cycles if something hangs. For `tb_i2c_freq` add
`tb/i2c_rate_check.sv`; `tb_i2c_master` and `tb_i2c_slave` need only the
package and their own module.

What the testbenches cover:

* `tb_i2c_system`, at the default parameters: writes and reads to all three
  slaves, single-byte and bursts, 7-bit and 10-bit, a register run crossing
  0x7F/0x80, two absent addresses (7-bit, and 10-bit with the right low byte
  but wrong MSBs) that must end in NACK abort, and random traffic. A reference
  register model predicts every read byte and every local-port value; every
  transaction's cycle count is checked against the table above; a bus monitor
  counts START, repeated START and STOP, and the test fails if any mechanism
  (either address mode, write, read, burst, NACK abort, each slave) never
  occurred.
* `tb_i2c_master`: a responder written independently of the slave logs the
  bus and checks the exact byte and condition sequence, ACK/NACK from the
  master in reads, and aborts at the address, the register and a data byte.
* `tb_i2c_slave`: bit-banged master; ACK/NACK for right and wrong addresses,
  pointer advance, burst read with NACK release, the 10-bit rules.
* `tb_i2c_freq`: the whole system at 100 kHz, 400 kHz and 1 MHz from 50 MHz.

## Design choices and limits

The protocol behaviour (START/STOP, 9-bit frames, 7/10-bit address
formats, register address byte followed by data, write-then-repeated-START
for reads) is standard I2C. The following are choices of this
implementation:

* Reset is asynchronous and active low. Clock 50 MHz and SCL 100 kHz by
  default; any ratio with `CLK_HZ/(4*SCL_HZ) >= 8` works (so 3.4 MHz
  high-speed mode does not at 50 MHz).
* The addressing mode is chosen per transaction by the `ten_bit` input rather
  than inferred from the address value.
* The master is the only clock source: no clock stretching by slaves and no
  multi-master arbitration. A part that needs to act as master or as slave at
  different times instantiates both modules; there is no single dual-role
  module.
* The slave's contents are a plain register file with pointer
  auto-increment. The intended slave device is a real-time clock chip; its
  timekeeping is not modelled, and the local read port is where such a device
  would attach.
* The bus is modelled inside one clock domain with ideal pull-ups; there are
  no pads, no rise-time model and no glitch filter beyond the synchroniser.
* The slave addresses 0x50, 0x68 and 0x2A5 are arbitrary defaults.
