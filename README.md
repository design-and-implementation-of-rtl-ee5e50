# I²C single master with a two-register slave

This is a small I²C system for an FPGA. One master drives the serial clock (SCL)
and the serial data line (SDA). It talks to one slave that has a 7-bit address.
Every bus transaction (a *frame*) has the same fixed shape:

```
START | A6 A5 A4 A3 A2 A1 A0 RW | ACK1 | D1[7:0] | ACK2 | D2[7:0] | ACK3 | STOP
```

That makes 27 bit slots between START and STOP. The master sends the address
and the R/W bit, then writes or reads two bytes. The slave answers in all three
acknowledge slots. The slave checks the address against its own ID and stores
the written bytes. On a read it sends them back, so a write followed by a read
returns the same two bytes.

## Files

| file | contents |
|---|---|
| `rtl/i2c_pkg.sv` | command struct `i2c_cmd_t`, R/W encoding, state enums, `FRAME_SLOTS` |
| `rtl/i2c_master.sv` | master: SCL generator, frame state machine, read-data and ACK capture |
| `rtl/i2c_slave.sv` | slave: START/STOP detection, address match, data registers, ACK and read-data driver |
| `rtl/topmodule.sv` | the master (`m1`) and slave (`m2`) wired together |
| `tb/tb_i2c_master.sv` | master against a behavioural slave written in the testbench |
| `tb/tb_i2c_slave.sv` | slave against a behavioural master written in the testbench |
| `tb/tb_topmodule.sv` | end-to-end run, 60+ random frames, resets, at a reduced SCL divider |
| `tb/tb_topmodule_full.sv` | end-to-end run at the default parameters (100 MHz / 100 kHz) |

## The frame and its timing

The master divides the system clock into *quarters* of an SCL period:

    QUARTER = CLK_FREQ_HZ / (4 * SCL_FREQ_HZ)      (250 clocks at the defaults)

Every bit slot takes four quarters:

| quarter | SCL | SDA from the master |
|---|---|---|
| 0 | low | new bit applied (or released for ACK / read) |
| 1 | rises | held |
| 2 | high | held; the master samples `sda_in` here |
| 3 | falls | held |

START takes a slot of its own. SDA and SCL are high, then SDA falls while SCL is
high, then SCL falls. STOP also takes a slot: SDA low, SCL rises, then SDA rises
while SCL is high. So a full frame is 29 SCL periods (116 quarters). That is
29,000 clocks or 290 µs at the defaults. If a slot has no acknowledge, the
master sends STOP at once. A frame cut short after the address is therefore 11
SCL periods long.

SDA never changes while SCL is high, except for START and STOP. A concurrent
assertion in the master (`sda_stable_while_scl_high`) checks this for the
master. The slave testbench checks it for the slave.

## Master (`i2c_master`)

The state machine follows the shape of the frame. Its states are `M_START`,
`M_ADDRESS`, `M_SLAVE_ACK`, `M_DATA_1`, `M_DATA_1_ACK`, `M_DATA_2`,
`M_DATA_2_ACK` and `M_STOP`. A 3-bit counter runs through the eight bits of each
byte state.

- **Runs continuously.** As long as `rst` is low, the master goes from STOP back
  to START and begins another frame. It samples `cmd` in the first quarter of
  every frame. `done` pulses for one clock at the end of each frame. A new
  command applied on that pulse is used by the next frame, because sampling
  comes one quarter later.
- **Write** (`rw = 0`): `data1` and then `data2` are shifted out MSB first.
- **Read** (`rw = 1`): the master releases SDA in the data slots and shifts
  `sda_in` into `s_datain1` and `s_datain2`.
- **Acknowledges**: the master releases SDA in the ACK slots. It records
  `~sda_in` in `ack_rx[0..2]`; bit 0 is the address slot.
- **Reset** (`rst`, synchronous, active high): returns to `M_START` from any
  state and releases SCL and SDA.

Ports: `clk`, `rst`, `cmd` (`i2c_cmd_t` = `{addr[6:0], rw, data1[7:0],
data2[7:0]}`, 24 bits), `sda_in`, `sda_out`, `scl`, `s_datain1`, `s_datain2`,
`ack_rx[2:0]`, `busy`, `done`.

## Slave (`i2c_slave`)

SCL and SDA pass through two-flop synchronisers. Edge detection then finds SCL
rising and falling edges, and START and STOP. A START anywhere restarts address
decoding, which also covers a repeated START. A STOP returns the slave to idle.

The slave samples bits on SCL rising edges and counts them per byte. It changes
its own `sda_out` on SCL falling edges. The one exception is a START or STOP,
which always releases it. On the falling edge after the
eighth address bit it compares the top 7 bits with `SLAVE_ADDR`:

- **No match**: the slave stays released until the next START or STOP.
- **Match**: it pulls SDA low for the ACK slot and sets `s_ack1`. On a write it
  stores the next two bytes in `s_data1` and `s_data2` and acknowledges each one
  (`s_ack2`, `s_ack3`). On a read it sends `s_data1` and then `s_data2`, MSB
  first, and also drives the ACK slot after each of those bytes.

The `s_ack*` flags are cleared at START and hold their value until the next
START. `rst1` is a synchronous active-high reset that clears the data registers.

Because of the synchronisers, the slave reacts about three clocks after an SCL
edge. QUARTER must therefore be at least 4. The master checks this at
elaboration.

## Top (`topmodule`)

The wiring is that of the block diagram. The master's `sda_out` goes to the
slave's `sda_in`, and `scl` goes from the master to the slave. The slave's
`sda_out` comes back to the master's `sda_in` and carries the acknowledges and
read data.

The two SDA directions are kept as separate signals, so no tristate is needed
inside the FPGA. `sda_bus` is the AND of the two outputs. It is the level a
shared open-drain SDA wire would carry, and it is brought out for observation
only.

Parameters: `CLK_FREQ_HZ` (100 MHz), `SCL_FREQ_HZ` (100 kHz) and `SLAVE_ADDR`
(7'h50). The design description gives none of these values. They are chosen
here: standard-mode I²C and a typical board clock.

## Where this departs from standard I²C, and other choices

- **Slave acknowledges read bytes.** On a read, the slave drives the ACK slot
  after each byte it sends, as the description requires. A standard I²C master
  would drive ACK/NACK there itself. Do not connect this master unchanged to an
  off-the-shelf slave for reads: the slave would see no acknowledge.
- **No command handshake.** The master never waits for a command; it repeats
  frames while out of reset. Gate it with `rst`, or change the command on
  `done`.
- **Fixed frame.** Every frame carries exactly two data bytes. There is no
  repeated START, no 10-bit addressing, no clock stretching and no
  multi-master arbitration.
- **Two resets.** `rst` resets the master and `rst1` resets the slave.
- **The two bytes are plain data.** The description also calls the first byte a
  "register address", but the slave has no register file. The slave stores both
  bytes; it does not decode the first as an address.
- **Command width.** The interface is sometimes described as a 27-bit input.
  Here the command is 24 bits (address, R/W and two bytes). The remaining three
  of the 27 bit slots are the slave's acknowledges.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a cycle watchdog.

- `tb_i2c_master`: uses a behavioural slave. Checks the decoded address, R/W and
  data; bytes read back; `ack_rx` with address and data-1 NACKs; frame lengths
  of 116 and 44 quarters; START/STOP counts; random frames; and a reset in the
  middle of a frame.
- `tb_i2c_slave`: uses a behavioural master. Checks the ACK level in every
  slot, stored and read-back bytes, silence for a foreign address, an early
  STOP, a repeated START inside a byte, reset, and that the slave never changes
  SDA while SCL is high.
- `tb_topmodule`: the whole system with QUARTER = 5. Runs random write, read and
  foreign-address frames against a model of the slave registers, plus a master
  reset mid-frame and a slave reset between frames. Checks every frame's length
  and counts each of these events; an event that never happens counts as a
  failure.
- `tb_topmodule_full`: default parameters. Runs a write, a read and a foreign
  address, and checks the 1000-clock SCL period and the 29,000-clock frame.

Running one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/i2c_pkg.sv rtl/i2c_master.sv \
    rtl/i2c_slave.sv rtl/topmodule.sv tb/tb_topmodule.sv --top-module tb_topmodule
./obj_dir/Vtb_topmodule
```

Replace the testbench file and `--top-module` to run the others. All of them
run in well under a second.

## Size

After coarse synthesis, master and slave together have 139 flip-flop bits and
about 280 word-level cells. There is no memory. The master's quarter counter
grows with `log2(QUARTER)`.
