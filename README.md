# FEB serial loading: the SPAC Interface EPLD

A detector front-end board (FEB) carries many programmable and serially
loaded chips: Altera FLEX 6K and Xilinx XC4000 FPGAs that must be
configured, Altera devices that take run parameters, a daisy chain of DACs,
I2C delay lines, a temperature sensor, a pulser DAC and 16 pairs of analog
shapers. The controller that talks to the host (the SPAC) only offers a
parallel interface: write or read one byte at an 8-bit command code. The
SPAC Interface EPLD turns those byte accesses into each chip's serial
protocol.

The design splits into two kinds of work:

* **Protocols with hardware timing.** Altera and Xilinx configuration, the
  Altera parameter line and the shaper strobe. The EPLD makes the clocks,
  pulses and bit order itself. The host writes a byte and polls a busy bit.
* **Software-sequenced ("bit-bang") ports.** DAC chain, Xilinx parameter
  lines, I2C, temperature sensor, reset lines and pulser DAC. A write sets
  a few output lines and a read returns them along with the input pins. The
  host software does all the sequencing.

This repository holds synthesizable SystemVerilog for the EPLD. It also
holds the parameter receiver that sits inside each FEB Altera device, so the
parameter line can be simulated from end to end.

## Block structure

```
feb_serial_system              top: EPLD + NUM_DEV parameter receivers
├── spac_if_epld               command decode and read multiplexer
│   ├── param_master           Altera parameter line master (0x08/0x09)
│   ├── altera_cfg_loader      FLEX 6K passive-serial load (0x20-0x23)
│   │   └── cfg_shifter        byte / clock-burst shifter
│   ├── xilinx_cfg_loader      XC4000 slave-serial load (0x28-0x2B)
│   │   └── cfg_shifter
│   ├── shaper_ctrl            shaper CS, mode, strobe, data (0x30-0x33)
│   └── bitbang_port  x7       0x04, 0x10, 0x14, 0x18, 0x1C, 0x38, 0x3C
└── param_slave  x NUM_DEV     receiver in each FEB Altera device
```

`feb_serial_pkg` holds the command codes, the packet layout, the
parameter-register struct and the shaper mode enum.

## The SPAC command map

The bus is an 8-bit code (`spac_addr`), 8-bit data, a one-clock write strobe
(`spac_wr`) and a read port that returns the addressed register in the same
clock. This bus timing is this design's own choice.

| Code | Write | Read |
|------|-------|------|
| 0x04 | DAC `{clk, ld, sdo}` | `{sdi_from_chain, clk, ld, sdo}` |
| 0x08 | parameter data register | data byte of the last parameter read |
| 0x09 | parameter command `{W/R, ADD[2:0], CMD[3:0]}`, starts the packet | `{0000000, busy}` |
| 0x10 / 0x14 | Xilinx parameter lines `{strobe, dout}`, left / right | `{din, strobe, dout}` |
| 0x18 | I2C `{scl, sda}` | `{scl_pin, sda_pin, scl, sda}` |
| 0x1C | temperature sensor `{scl, sda}` | `{/int, scl_pin, sda_pin, scl, sda}` |
| 0x20 | shift a configuration byte to the Altera devices | `{busy, nSTATUS, CONF_DONE}` |
| 0x21 | nCONFIG pulse | |
| 0x22 | D[3:0]+1 extra DCLKs | |
| 0x23 | set DATA0 = D[0] | |
| 0x28 | shift a configuration byte to the Xilinx devices | `{/INIT, DONE, busy}` |
| 0x29 | /PROGRAM pulse | |
| 0x2A | D[3:0]+1 extra CCLKs | |
| 0x2B | set DIN = D[0] | |
| 0x30 / 0x31 | shaper CS[7:0] / CS[15:8] | same |
| 0x32 | shaper control byte, then a STROBE pulse | control byte |
| 0x33 | shaper control byte, no pulse | D[3:0] read from the shapers |
| 0x38 | `{overtemp_en, soft_reset, /xilinx_reset, /altera_reset}` | same |
| 0x3C | pulser DAC `{clk, ld, data}` | same |

Shaper control byte: D[1:0] = {M1, M0}, D2 = UP, D3 = DOWN, D[7:4] = data.
The modes {M1, M0} are: 00 read, 01 write, 10 set all, 11 clear all.

Any other code writes nothing and reads zero. 0x24 is treated as reserved.

## The parameter line (hardest part)

The FEB Altera devices take their run parameters over three wires: a
free-running RCLK (5 MHz), DATAIN from the EPLD and DATAOUT back to it.

```
bit:     H   W/R A2 A1 A0 C3 C2 C1 C0   D7 D6 ... D0
line:    DATAIN ------------------------  DATAIN (write) or DATAOUT (read)
```

* **Edges.** Both DATAIN and DATAOUT change on the falling edge of RCLK and
  are sampled on the rising edge. The header bit H is always 1, and the line
  is low at every other time. A receiver therefore starts a packet on the
  first rising edge at which it sees a 1.
* **Write.** All 17 bits come from the EPLD. The device whose address equals
  ADD stores D into the register selected by CMD.
* **Read.** After the last command bit the EPLD drives DATAIN low. The
  addressed device drives D7..D0 on DATAOUT on the next 8 falling edges, so
  the timing is the same as for a write. The EPLD samples these bits on the
  following 8 rising edges into the 0x08 read register.
* **Return line.** Devices that are not answering hold DATAOUT low, and the
  top ORs the DATAOUT lines of all devices together.
* **Packet time.** The packet starts at the first RCLK falling edge after
  the 0x09 write and lasts 17 periods (3.4 us). Busy therefore lasts at most
  18 periods. A command written while busy is ignored.
* **W/R polarity.** W/R = 1 means write. This polarity is an assumption.

`param_master` makes RCLK by dividing the system clock (20 MHz by default,
so RCLK is 5 MHz). It updates DATAIN only in the cycle in which RCLK falls,
and an assertion checks this rule. `param_slave` runs directly on RCLK. It
samples on the rising edge and drives DATAOUT from a falling-edge flop. A
real reset edge is needed to start its state machine, because RCLK is
stopped while the EPLD is in reset.

Registers of each device (command code: contents, MSB first):

| CMD | bits |
|-----|------|
| 0x1 | ID[7:0] |
| 0x2 | AUTO, ID[14:8] |
| 0x3 | UL[7:0] (upper threshold) |
| 0x4 | NG[1:0], GA[1:0], UL[11:8] |
| 0x5 | LL[7:0] (lower threshold) |
| 0x6 | GC[1:0], GB[1:0], LL[11:8] |
| 0x7 | TD[7:0] |
| 0x8 | TEST, TMODE, -, -, TD[11:8] (TMODE low: Xilinx ignored) |
| 0xF | write only: one-RCLK test pulse |

All registers can be read back. Bits marked "-" and unused codes read as 0.
The registers reset to 0.

## Configuration loaders

Both loaders use `cfg_shifter`. For each bit it puts the bit on the data
line, holds the clock low for half a period, then drives the clock high for
half a period. The device therefore samples with half a period of setup
time. A byte takes 8 clock periods. The clock-burst command gives
D[3:0]+1 pulses and leaves the data line unchanged. The clock goes out on
two identical lines, one for each side of the board.

**FLEX 6K (passive serial).** The loader works as follows:

1. The host writes 0x21. nCONFIG goes low for 2 us.
2. The device pulls nSTATUS low and later releases it.
3. The loader holds back any byte or clock command until nSTATUS has been
   high for 1 us, so no DCLK edge can come too early. Busy stays high while
   a command waits, and an assertion checks the rule.
4. The bytes go out LSB first.
5. Once CONF_DONE is high, the host writes 0x22 with D = 9. This gives the
   10 extra clocks the device needs to enter user mode.

DCLK runs at 5 MHz, below the 10 MHz limit.

**XC4000 (slave serial).** The load sequence is:

1. The host writes 0x29, which pulses /PROGRAM low for 2 us (high-low-high).
2. The host waits about 1 ms per device frame, in software: 1578 frames for
   an XC4028 and 1775 for an XC4036. It may watch /INIT in the 0x28 status.
3. The host sends the bytes, which go out MSB first.
4. The host writes 0x2A for the 1 to 4 extra CCLKs.

A command written while a loader is busy is ignored, and that includes the
nCONFIG and /PROGRAM pulses. The host must therefore poll busy after 0x21 or
0x29 before it sends the first byte.

The following are this design's own choices, not fixed by the protocol
description:

* the bit orders (LSB first for FLEX, MSB first for XC4000);
* the pulse widths (2 us);
* the clock rates (5 MHz);
* ignoring commands written while busy.

## Shaper control

The 128-channel board uses 25 shaper lines:

* 16 chip selects, one per shaper pair;
* M0, M1, UP, DOWN and STROBE, shared by all shapers;
* D[3:0], also shared.

A 0x32 write sets the lines. One clock later it raises STROBE for 1 us. The
strobe width and polarity are assumptions.

0x33 sets the lines without a strobe. In read mode (M = 00) the D bus is
released (`sh_d_oe` low) so the selected shaper can drive it, and 0x33 reads
the synchronised pins.

The shaper's -3 V / 0 V logic levels need level shifters outside this logic.

## Bit-bang ports and reset lines

`bitbang_port` is a small output register with read-back. In the read value
the synchronised input pins sit above the outputs.

* **I2C and temperature sensor.** The outputs reset to 1 (released) and are
  meant for open-drain pads: a 0 pulls the line low.
* **Reset lines (0x38).** These reset to 0. The Altera and Xilinx resets are
  active low, so the FEB devices stay in reset until software releases them.
* **Over-temperature interrupt.** `overtemp_irq` is high while 0x38 bit 3 is
  set and the sensor's /interrupt pin is low.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| all clocked blocks | `CLK_HZ` | 20 000 000 | system clock (assumed) |
| `param_master`, `spac_if_epld` | `RCLK_HZ` | 5 000 000 | parameter line clock |
| `spac_if_epld` | `CFG_HZ` | 5 000 000 | DCLK / CCLK (must stay below 10 MHz for FLEX) |
| `altera_cfg_loader` | `NCONFIG_NS`, `NSTATUS_WAIT_NS` | 2000, 1000 | nCONFIG pulse, wait after nSTATUS |
| `xilinx_cfg_loader` | `PROGRAM_NS` | 2000 | /PROGRAM pulse |
| `shaper_ctrl` | `STROBE_NS` | 1000 | STROBE width |
| `feb_serial_system` | `NUM_DEV` | 8 | number of parameter receivers (addresses 0..7) |
| `param_slave` | `DEV_ADDR` | 0 | device address |

The clock dividers round down to whole system clocks. With other values of
`CLK_HZ`, check that the resulting DCLK stays below 10 MHz.

## Where the design goes beyond or departs from the protocol description

* **I2C.** The protocol description says both that the I2C protocol is
  handled in the EPLD and that all I2C sequencing is done in software. The
  design follows the command table: I2C is bit-banged on 0x18.
* **Pulser DAC (0x3C).** The table says two bits are used but lists three
  (data, ld, clk). Three bits are implemented.
* **Host timing.** The SPAC bus timing, the system clock, the reset values
  and the number of parameter receivers are not specified. The values used
  here are listed above.
* **Outside this logic.** The external chips (FPGAs, DACs, I2C devices,
  sensor, shapers), the SPAC controller itself, the level shifters and the
  line termination are not part of the RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_param_master` | bits on the line, read-back, DATAIN edges, the 5 MHz RCLK, busy ≤ 18 periods |
| `tb_param_slave` | all registers written and read back, other addresses ignored, test pulse |
| `tb_altera_cfg_loader` | nCONFIG width, 1 us hold-off, LSB-first order, DCLK ≥ 100 ns, N+1 clocks, status |
| `tb_xilinx_cfg_loader` | /PROGRAM, MSB-first order, CCLK, extra clocks, status |
| `tb_shaper_ctrl` | all lines, STROBE timing and width, D release in read mode |
| `tb_bitbang_port` | outputs, read-back layout, reset values |
| `tb_spac_if_epld` | every command code through the bus |
| `tb_feb_serial_system` | the full system at default parameters, described below |
| `tb_config_workloads` | full-size loads through the top at default parameters, described below |

`tb_feb_serial_system` runs the whole system at the default parameters with
device models:

* it loads and reads back all 8 parameter devices;
* it fires a test pulse;
* it runs complete FLEX and XC4000 loads;
* it loads the DAC chain and the pulser DAC;
* it sends an I2C address byte and sees the acknowledge;
* it strobes and reads a shaper;
* it raises the interrupt.

It counts every mechanism and fails if one never happened. It runs in a few
seconds.

`tb_config_workloads` streams two full-size bitstreams through the top, one
SPAC write and busy poll per byte. The sizes are approximate device figures.

| Load | Size | Simulated time |
|------|------|----------------|
| XC4036 | 832,528 bits | 182 ms (8 CCLK periods of 200 ns plus about 150 ns of bus overhead per byte) |
| EPF6016-class FLEX 6K | 260,000 bits | 57 ms |

The device models check the bit count and a CRC-32 of the received bits.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/feb_serial_pkg.sv tb/tb_feb_serial_system.sv --top-module tb_feb_serial_system
./obj_dir/Vtb_feb_serial_system
```

Replace the testbench name to run another one. Verilator is two-state, so
the testbenches reset every register they read.
