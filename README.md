# ADV7513 HDMI transmitter configurator (DE10-Nano)

The HDMI output of the DE10-Nano board goes through an Analog Devices
ADV7513 transmitter. The chip comes out of power-up unconfigured. Before it
sends a picture or sound, an I2C master must write a few dozen of its
registers: it must be powered up, some reserved registers need fixed
values, and the audio and video formats must be set. The transmitter
also loses part of that state when the monitor is unplugged, so the
writes must be repeated on every hot-plug.

This RTL does all of that in FPGA logic, with no processor. After reset it
writes a 24-entry register table over I2C at 400 kHz. Then it watches the
transmitter's interrupt pin. When the interrupt reports a hot-plug event
and a monitor is present, it writes the table again.

The configuration it loads:

* 24-bit RGB 4:4:4 video with separate HSYNC/VSYNC, sent in HDMI mode (not
  DVI), with a 4:3 AVI InfoFrame. It is meant for 640x480 at a 25 MHz pixel
  clock.
* Standard I2S audio at 32 kHz, two channels, on the I2S0 input only. I2S1
  to I2S3 are not connected on this board.

## Structure

```
                 adv7513_hdmi_cfg (top)
   cfg_start ──►┌───────────────────────────────┐
 hdmi_tx_int ──►│ adv7513_ctrl                  │
                │   sequencer + IRQ handler     │──► cfg_done, cfg_error,
                │   └─ adv7513_cfg_rom (table)  │    hpd_state, busy
                │        │ cmd / rsp            │
                │        ▼                      │
                │ i2c_master                    │──► hdmi_i2c_scl_oe
                │   └─ i2c_scl_gen (÷125)       │◄── hdmi_i2c_sda_i
                │                               │──► hdmi_i2c_sda_oe
                └───────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/adv7513_pkg.sv` | device address, register numbers, interrupt bits, and the command/response structs |
| `rtl/i2c_scl_gen.sv` | divides 50 MHz by 125 into one SCL period and gives four phase strobes |
| `rtl/i2c_master.sv` | one-register I2C write or read, open-drain outputs |
| `rtl/adv7513_cfg_rom.sv` | the register table (combinational) |
| `rtl/adv7513_ctrl.sv` | walks the table and handles the interrupt |
| `rtl/adv7513_hdmi_cfg.sv` | top: wires the controller to the I2C master |

The controller and the I2C master share a small handshake. The controller
raises `cmd_valid` with an `i2c_cmd_t` (read flag, 7-bit device, register,
write data) and holds it until `cmd_ready` is high. The master accepts only
when the bus is idle. When its STOP is done, it pulses `rsp_valid` for one
cycle with an `i2c_rsp_t` (nack flag, read data). An assertion checks that
a pending request does not change before it is accepted.

## The register table

The table is written in this order. Bits marked "don't care" in the
transmitter's documentation are written as 0.

| # | reg | value | meaning |
|---|---|---|---|
| 0 | 0x41 | 0x10 | power up (clear the power-down bit) |
| 1 | 0x98 | 0x03 | fixed value the part requires |
| 2 | 0x9A | 0xE0 | fixed |
| 3 | 0x9C | 0x30 | fixed |
| 4 | 0x9D | 0x61 | fixed |
| 5 | 0xA2 | 0xA4 | fixed |
| 6 | 0xA3 | 0xA4 | fixed |
| 7 | 0xE0 | 0xD0 | fixed |
| 8 | 0xF9 | 0x00 | fixed |
| 9 | 0x01 | N[19:16] = 0x00 | audio clock regeneration N |
| 10 | 0x02 | N[15:8] = 0x11 | |
| 11 | 0x03 | N[7:0] = 0xE0 | N = 4576 |
| 12 | 0x07 | CTS[19:16] = 0x00 | audio clock regeneration CTS |
| 13 | 0x08 | CTS[15:8] = 0x6D | |
| 14 | 0x09 | CTS[7:0] = 0xDD | CTS = 28125 |
| 15 | 0x0C | 0x84 | standard I2S, sampling rate taken from 0x15, only I2S0 enabled |
| 16 | 0x15 | 0x30 | [7:4] = 0011: 32 kHz audio. [3:0] = 0000: 24-bit RGB 4:4:4 input, separate syncs |
| 17 | 0x73 | 0x01 | audio InfoFrame: 2 channels |
| 18 | 0x16 | 0x30 | output format, 4:4:4 RGB input style |
| 19 | 0xAF | 0x16 | bit 1 = HDMI mode; HDCP off; other bits at their defaults |
| 20 | 0x55 | 0x10 | AVI InfoFrame: RGB |
| 21 | 0x56 | 0x18 | AVI InfoFrame: 4:3 picture, active format same as picture |
| 22 | 0xBA | 0x60 | input clock delay 0 (0x70 works too) |
| 23 | 0x96 | 0xF6 | interrupts: hot-plug, monitor sense, Vsync, audio FIFO full, EDID ready, HDCP |

Register 0x15 holds both the audio sampling rate and the video input format,
so it is written only once. The table leaves some registers at their reset
values because the defaults are already right: 0x0B (no S/PDIF, I2S clock
latched on its rising edge, MCLK generated inside the part), 0x17 (4:3),
0x18 (no color-space conversion), 0x76 (front-left and front-right
speakers) and 0x97.

**N and CTS.** HDMI carries audio timing as N and CTS, where
128 × f_audio = f_pixel × N / CTS. For 32 kHz, the recommended pair for a
25.2/1.001 MHz pixel clock (the standard rate closest to the board's
25 MHz) is N = 4576 and CTS = 28125, both decimal. The module takes the
20-bit values as parameters `N_VALUE` and `CTS_VALUE` and splits them into
the three byte registers. Note that 0x02 0x81 0x25 is *not* CTS = 28125:
it is the decimal digits read as hex, which is 164133. The correct bytes
are 0x00 0x6D 0xDD. By default the transmitter measures CTS itself, so the
CTS registers only matter if CTS is switched to manual.

To change the audio rate or the video input format, override `I2S_FS` and
`INPUT_ID` (the two nibbles of 0x15). To change the clock delay, override
`VID_CLK_DLY`. To use a different N/CTS pair, override `N_VALUE` and
`CTS_VALUE`. The other entries are fixed in the case statement.

## How a transfer is timed on the bus

`i2c_scl_gen` counts from 0 to DIV − 1, where DIV = CLK_HZ / SCL_HZ =
125. It counts only while the master is busy. Each pass of the counter is
one SCL period, called a *slot*. Four strobes divide each slot:

```
count:   0        32         65          95        124
SCL:     ╲________________╱‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
         p_low    p_data     p_rise      p_mid
         pull     move SDA   release     sample SDA, or move it
         SCL low             SCL         for a START / STOP
```

The low phase takes 13/25 of the period. At 400 kHz that is 65 cycles
(1.3 µs) low and 60 cycles (1.2 µs) high. The SDA edge of a START or STOP
comes 30 cycles (0.6 µs) after SCL rises and 30 cycles before it falls.
These numbers meet the fast-mode I2C minimums exactly: 1.3 µs low,
0.6 µs high, and 0.6 µs START setup and hold. If you lower DIV below 125
(a faster system clock with the same SCL, or a faster SCL), check these
margins again. The module asserts DIV ≥ 8.

`i2c_master` spends one slot on each of these:

* a START
* each data bit
* each acknowledge bit
* a repeated START
* a STOP

A write is START, 0x72, ack, register, ack, data, ack, STOP. That is
29 slots: 72.5 µs at 400 kHz.

A read uses the combined format: START, 0x72, ack, register, ack,
repeated START, 0x73, ack, data, master NACK, STOP. That is 39 slots.

If the bus was idle before a START, SCL stays high for that START's whole
slot. A repeated START first pulls SCL low, releases SDA, lets SCL go
high, and then pulls SDA low.

If any address, register or data byte is not acknowledged, the master
sends a STOP at once and returns `nack = 1`.

The whole table (24 writes) takes 86,352 cycles, about 1.73 ms.

SDA is read through a two-flop synchronizer. The sample point (p_mid)
falls 30 cycles after SCL is released, so the two-cycle delay does not
matter. SCL is never read back, so a slave that stretches the clock is
not supported. The ADV7513 does not stretch the clock.

## Hot-plug handling

The controller starts to write the table right after reset. After the last
write is acknowledged it raises `cfg_done` and goes idle.

The interrupt input passes a two-flop synchronizer. It is active low by
default (`INT_ACTIVE_LOW`). When it is active and the controller is idle,
the controller does the following:

1. It reads register 0x96, the interrupt flags.
2. It writes the same value back to 0x96. The flags are write-1-to-clear,
   so this acknowledges exactly the flags it saw.
3. If bit 7 (hot-plug) was set, it reads 0x42. Bit 6 of 0x42 is the
   current HPD level, and the controller copies it to `hpd_state`.
4. If HPD is high, it writes the whole table again.

The re-write in step 4 is the useful part. When a monitor is unplugged the
transmitter powers down and forgets its fixed-value registers. The first
nine table entries power it up and reload those registers.

Flags other than hot-plug are cleared and otherwise ignored. This design
does not read the EDID and does not support HDCP.

The controller repeats this sequence for as long as the interrupt line
stays active.

A pulse on `cfg_start` while the controller is idle also writes the table
again.

If any transfer is not acknowledged, the controller stops, raises
`cfg_error`, and goes idle. The next table walk clears `cfg_error`. A walk
starts on `cfg_start` or on a hot-plug interrupt with a monitor present.

## Top-level ports and board hookup

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 50 MHz clock, asynchronous active-low reset |
| `cfg_start` | in | pulse: write the table again |
| `hdmi_i2c_scl_oe` | out | 1 = pull SCL low |
| `hdmi_i2c_sda_oe` | out | 1 = pull SDA low |
| `hdmi_i2c_sda_i` | in | SDA pin level |
| `hdmi_tx_int` | in | transmitter INT pin |
| `cfg_done` | out | table written |
| `cfg_error` | out | a transfer was not acknowledged |
| `hpd_state` | out | last HPD level read |
| `busy` | out | controller not idle |

At the pads, build open-drain buffers:
`HDMI_I2C_SCL = scl_oe ? 1'b0 : 1'bz`, and the same for SDA with
`hdmi_i2c_sda_i` taken from the SDA pad. The board provides the pull-ups.

The device address 0x72 (7-bit 0x39) is set by the board. The
transmitter's PD/AD pin has a 2 kΩ pull-down, and the pull-up footprint is
left empty, so the part answers at 0x72/0x73. On a board where PD/AD is
pulled high, set `DEV_ADDR = 7'h3D` (0x7A).

For the configured audio and video to reach the transmitter, the rest of
the FPGA design must supply two streams. Neither is part of this RTL:

* 640×480 RGB video with separate syncs.
* 32 kHz standard I2S audio on HDMI_I2S0, HDMI_SCLK and HDMI_LRCLK.

## Parameters

| parameter | default | effect |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock |
| `SCL_HZ` | 400 000 | I2C rate. 100 000 and 20 000 work too; DIV becomes 500 and 2500 |
| `DEV_ADDR` | 7'h39 | 7-bit transmitter address |
| `INT_ACTIVE_LOW` | 1 | interrupt polarity |
| `N_VALUE`, `CTS_VALUE` | 4576, 28125 | audio clock regeneration |

## What is established and what is chosen here

**Taken from the transmitter's programming and hardware guides and from
tests on the board:**

* the table values
* the 0x72 address
* the 400 kHz rate derived from the 50 MHz clock
* writing 0x15 once
* re-configuring after hot-plug, following the hot-plug branch of the
  vendor's interrupt-handling flow

**This design's own choices:**

* the order of the writes inside each group, and putting 0x96 last
* the 65/60 split of the SCL period
* stopping on a NACK
* the two synchronizers
* the active-low interrupt
* the `cfg_start` input and the status outputs
* the HPD state bit (0x42[6]), taken from the transmitter's register map

**Limits and points to check:**

* The 0x96 value 0xF6 was described as *enabling* interrupts. In this
  design, 0x96 is treated as the flag register, read and cleared by the
  handler. The hot-plug interrupt is enabled at reset, so this works. To
  enable the other interrupts, the enable register must be written as well.
* The table is written right after reset, whether or not a monitor is
  attached. With no monitor, the writes are acknowledged but the part
  stays powered down. The hot-plug interrupt that follows when a monitor
  is plugged in writes the table again.
* There is no EDID read, no HDCP, no AV-mute control and no retry
  timer.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/adv7513_model.sv` is a behavioural ADV7513 used by the testbenches. It
is an I2C slave with a 256-byte register map and a strap-selected address.
It models the HPD level in 0x42, the write-1-to-clear flags in 0x96, an
interrupt pin, and the loss of the fixed registers on unplug.

| testbench | what it checks |
|---|---|
| `tb_i2c_scl_gen` | strobe positions, a 125-cycle period; 100 kHz and 20 kHz instances |
| `tb_adv7513_cfg_rom` | all 24 entries against an independent list; N/CTS byte split |
| `tb_i2c_master` | writes and read-back against the model, random registers, START/STOP and SCL-pulse counts, transfer lengths of 29 and 39 slots, NACK abort at the wrong address, SDA never moving on an SCL edge |
| `tb_adv7513_ctrl` | command order after reset, on hot-plug with and without a monitor, on a non-HPD interrupt, on a NACK and a restart; uses a stand-in for the I2C master |
| `tb_adv7513_hdmi_cfg` | the whole design at default parameters against the model: full configuration and its duration, unplug, replug re-configuration, other interrupt, wrong address, restart. Each of these must happen at least once |

To run one with plain Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_adv7513_hdmi_cfg rtl/adv7513_pkg.sv tb/tb_adv7513_hdmi_cfg.sv
./obj_dir/Vtb_adv7513_hdmi_cfg
```

Replace the module name to run another testbench. The end-to-end run
simulates about 6 ms of bus time in well under a second.
