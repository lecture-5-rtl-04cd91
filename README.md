# ODMB VME command interface in SystemVerilog

The ODMB (optical DAQ motherboard) of the CMS cathode strip chambers is
controlled over VME. A crate controller or a PC sends it 16-bit commands.
These commands do four kinds of work:

- drive JTAG to the seven front-end boards (DCFEBs) and to the ODMB's own FPGA;
- set control registers and fire test pulses;
- read back trigger and packet counters;
- keep a set of configuration registers that must survive radiation.

This RTL implements that command side. It covers the address decoder and the
four devices behind it. It also has the delay logic that the configuration
registers program.

The design decodes a VME address into a device number and a device-local
command. Each device then answers with a single acknowledge pulse.

Most of the design is simple. The hard part is the JTAG sequencer, so it gets
the most space below. It turns one VME write into a complete TMS/TDI sequence
(header, shift and tailer) at a slow clock. It can also stop the TAP in a
chosen state, so that one long register access can be split across several
VME commands.

## Commands and addresses

A command is a 16-bit address plus, for writes, a 16-bit data word.

| Address bits | Meaning |
|---|---|
| 15:12 | device number (1–9) |
| 11:2 | command inside the device (`cmd`, 10 bits) |
| 11:8 | for the JTAG devices, Y: the number of bits to shift minus one |

So `W 1B0C` sends a 12-bit data shift to device 1 (Y = B means 12 bits).

| Device | Module | Purpose |
|---|---|---|
| 1 | `cfebjtag` | JTAG to the 7 DCFEBs |
| 2 | `odmbjtag` | JTAG to the ODMB FPGA |
| 3 | `vmemon` + `odmb_counters` | control, pulses, counters |
| 4 | `vmeconfregs` | triple-voted configuration registers |
| 5–9 | outside (ports) | test FIFOs, PROM (BPI), system monitor, LV monitor, system tests |

`vme_dev_decoder` drives two things to every device:

- a one-hot `device` select;
- a shared command bus, `vme_cmd_t`: strobe, write, cmd and data.

It merges the replies (`vme_rsp_t`: dtack and data) with an OR, and gates each
reply's data with its dtack. Commands for device 0 or 10–15 are acknowledged
one cycle later with data 0, so the master never hangs.

### Handshake

The top-level VME port works like this:

- `vme_strobe` is high for one clock, together with `vme_write`, `vme_addr`
  and `vme_wdata`.
- The design answers with a one-clock `vme_dtack`. `vme_rdata` is valid in
  that cycle.
- Register commands answer one cycle after the strobe.
- JTAG shifts answer when the last TMS bit has been sent.
- A new strobe must not come before the previous dtack. An assertion in
  `odmb_vme` checks this.

This handshake stands in for the VME bus cycle handled by the board's VME
interface chip, which is not part of this RTL.

## The JTAG sequencer (`jtag_engine`)

One engine serves each JTAG device. It is started with an operation and these
options:

- the operation: data shift, instruction shift or JTAG reset;
- `header`: whether to send a TMS header;
- `tail`: none, back to Run-Test/Idle, or to Select-DR-Scan;
- the number of bits, 1–16;
- a 16-bit TDI word.

It advances on `tick`, a slow-clock enable. TCK runs at half the tick rate:
one tick drives TMS/TDI with TCK low, and the next raises TCK.

TMS sequences sent:

| Piece | TMS bits | TAP path |
|---|---|---|
| data header | 0 0 1 0 0 | Run-Test/Idle → Select-DR → Capture-DR → Shift-DR |
| instruction header | 0 0 1 1 0 0 | … → Select-IR → Capture-IR → Shift-IR |
| shift | 0 … 0, last bit 1 if a tailer follows | stays in Shift-xR, the last bit exits to Exit1 |
| tailer | 1 0 | Exit1 → Update → Run-Test/Idle |
| tailer to Select-DR | 1 1 | Exit1 → Update → Select-DR-Scan |
| data header after Select-DR | 0 0 | Select-DR → Capture-DR → Shift-DR |
| instruction header after Select-DR | 1 0 0 | Select-DR → Select-IR → Capture-IR → Shift-IR |
| JTAG reset | 1 1 1 1 1 0 | any state → Test-Logic-Reset → Run-Test/Idle |

How a shift behaves:

- Without a tailer, the TAP stays in Shift-DR/IR. The next command can go on
  shifting the same register with no header. This is how a 32-bit USERCODE is
  read as two 16-bit commands: the first has a header and no tailer, the
  second has a tailer and no header.
- The engine remembers when it left the TAP in Select-DR-Scan. The next header
  is then shortened, which saves the trip through Run-Test/Idle between an
  instruction and its data.

Data format:

- TDI sends the write word LSB first.
- TDO is sampled on the rising TCK edge and shifted into the top of a 16-bit
  register. After an n-bit shift, the n bits read back are in bits 15 down to
  16−n, first bit lowest.
- The register is read with `R x014`.

Timing: an operation with H header bits, N shift bits and T tailer bits takes
2·(H+N+T) ticks. Its `done` comes on the tick that ends the last TCK period.

At the top, `tick` divides `clk` by `SLOW_DIV` (default 16). With a 40 MHz
clock, TCK is 1.25 MHz.

## Device 1: DCFEB JTAG (`cfebjtag`)

| Command | Action |
|---|---|
| `W 1Y00 / 1Y04 / 1Y08 / 1Y0C` | data shift. Address bit 2 = header, bit 3 = tailer |
| `R 1014` | last 16 TDO bits |
| `W 1018` | JTAG reset |
| `W 1Y1C` | instruction shift with header and tailer |
| `W 1020 / R 1024` | DCFEB selection, one bit per board; all selected after reset |
| `W 1Y30 / 34 / 38 / 3C` | instruction shift. Header and tailer chosen by bits 2 and 3, as for data |
| `W 1Y48 / 1Y4C` | instruction shift, without / with header, ending in Select-DR-Scan |

TMS and TDI are shared by all seven boards. TCK is gated per board: only the
selected boards see clock edges. TDO is the OR of the selected boards' TDO
lines, so select one board when reading.

Reading a DCFEB's USERCODE takes six commands:

1. `W 1020 0004`: select DCFEB 3.
2. `W 191C 03C8`: load instruction 3C8.
3. `W 1F04`: 16 bits with a header.
4. `R 1014`: read the low half.
5. `W 1F08`: 16 bits with a tailer.
6. `R 1014`: read the high half.

## Device 2: ODMB FPGA JTAG (`odmbjtag`)

Device 2 has the same engine and the same data/instruction/reset commands, but
no selection and no Select-DR-Scan commands. `W 2020` toggles `V6_JTAG_SEL`,
which chooses the FPGA's JTAG chain.

## Device 3: control and monitoring (`vmemon`, `odmb_counters`)

The offsets below are address bits 11:0.

| Offset | Register or action |
|---|---|
| 000 | calibration mode |
| 004 | soft reset pulse |
| 008 | optical reset pulse |
| 010 | reprogram DCFEBs pulse |
| 014 | L1A reset / RESYNC pulse |
| 020 | test-point select |
| 024 | words per DCFEB packet before autokill. Reset to 1024, also by the soft reset |
| 100 | loopback |
| 110 | transmitter swing |
| 120 | DCFEB DONE bits (read only) |
| 124 | QPLL lock (read only) |
| 200 | DCFEB pulses (see below) |
| 300 / 304 / 308 | data / trigger / LVMB multiplexers |
| 400 | pedestal mode |
| 404 | OTMB data request |
| 408 | kill L1A and L1A_MATCHes |
| 40C | MASK_PLS |

`W 3200` sends one-clock pulses, one per bit:

| Bit | Pulse |
|---|---|
| 0 | INJPLS |
| 1 | EXTPLS |
| 2 | test L1A |
| 3 | LCT request |
| 4 | external trigger request |
| 5 | BC0 |

MASK_PLS blocks INJPLS and EXTPLS.

Any other read whose offset ends in C (`R 3YZC`) returns the counter chosen by
the byte YZ:

| YZ | Counter |
|---|---|
| 3F / 3B | L1A count, bits 15:0. The L1A counter is 24 bits |
| 3A | L1A count, bits 23:16 |
| 5F | L1As since the last hard reset |
| 38 / 39 | L1A→OTMBDAV / L1A→ALCTDAV gap, in clock cycles |
| 71–77 | LCTs per DCFEB |
| 78 / 79 | OTMBDAVs / ALCTDAVs |
| 21–29 | L1A_MATCHes per DCFEB, OTMB, ALCT |
| 41–49 | packets received |
| 4A / 4B | packets sent to the DDU / the PC |
| 51–59 | packets shipped |
| 61–67 | packets with good CRC |

Counter behaviour:

- The counters are 16 bits and saturate.
- All of them clear on hard reset.
- All but 5F also clear on a RESYNC: the CCB's or `W 3014`.
- A gap is latched when the DAV arrives, as the number of cycles since the
  last L1A.

## Device 4: configuration registers (`vmeconfregs`, `tmr_reg`)

There are twelve 16-bit registers at offsets 000–02C. Their low bits hold:

| Offset | Field |
|---|---|
| 000 | LCT_L1A_DLY |
| 004 | OTMB_DLY |
| 008 | CABLE_DLY |
| 00C | ALCT_DLY |
| 010 | INJ_DLY |
| 014 | EXT_DLY |
| 018 | CALLCT_DLY |
| 01C | KILL (7 DCFEBs, OTMB, ALCT) |
| 020 | CRATEID |
| 024 | firmware version, not writable |
| 028 | NWORDS_DUMMY |
| 02C | BX_DLY |

There are also read-only words: the board ID (`R 4100`, from an input port),
and the firmware version, build, month/day and year (`R 4200`–`4500`).

Each register is a `tmr_reg`:

- It holds three copies.
- It outputs their bitwise majority.
- It writes the voted value back into all three copies on every clock. An
  upset copy is corrected within one cycle, and two copies must fail in the
  same bit before the value changes.

A register can be written from three sources, in this priority:

1. an internal change request (`change_reg_index`), used for example for the
   automatic kill of a DCFEB;
2. an upload from the PROM (`bpi_cfg_*`);
3. a VME write.

A lower-priority write in the same cycle is lost.

## Trigger and calibration timing (`odmb_delays`, `delay_line`)

The delay registers act on the 40 MHz bunch-crossing (BX) clock. A delay of D
moves a signal D clock edges later; D = 0 passes it straight through.

- **preLCT → L1A.** Each DCFEB's preLCT is delayed by LCT_L1A_DLY + 100 BX.
  Set LCT_L1A_DLY to the LCT/L1A gap minus 100, and the delayed preLCT
  arrives with the L1A. An L1A that meets a DCFEB's delayed preLCT is that
  board's L1A_MATCH.
- **L1A → OTMBDAV / ALCTDAV.** The L1A, delayed by OTMB_DLY and by ALCT_DLY,
  comes out as `otmb_push` and `alct_push`. Set each to the gap read with
  `R 338C` / `R 339C`, and the push lines up with the DAV. The end-to-end test
  does exactly this.
- **INJPLS / EXTPLS.** These are delayed by 12.5 ns × INJ_DLY / EXT_DLY. The
  whole-BX part is a shift register. An odd setting adds a flop on the
  falling clock edge.
- **Calibration mode** (`W 3000 1`). The CCB's L1A is replaced: CALLCT_DLY BX
  after each pulse, the ODMB sends its own L1A and an L1A_MATCH to every DCFEB.
  The count starts from the whole-BX part of the pulse delay.
- **Pedestal mode** (`W 3400 1`). Every L1A carries an L1A_MATCH to every
  DCFEB.
- **Test L1A** (`W 3200` bit 2). An L1A is sent at once, with an L1A_MATCH to
  each DCFEB whose KILL bit is clear.
- **Kills** (`W 3408`). Bit 0 stops every L1A. Bits 1–7 stop the L1A_MATCHes
  of DCFEBs 1–7. They act after all the sources above are combined.
- **CABLE_DLY = 1.** The L1A, the L1A_MATCHes, RESYNC and BC0 to the DCFEBs
  come one BX later.

At the top, the `W 3200` INJPLS, EXTPLS and BC0 pulses are ORed with the CCB's,
and `W 3014` is sent as a RESYNC. MASK_PLS also blocks the CCB's INJPLS and
EXTPLS.

## What is outside this RTL

Devices 5–9 have the same `vme_cmd_t` / `vme_rsp_t` interface as the others,
brought out as `ext_bus`, `ext_device[9:5]` and `ext_rsp[9:5]`:

| Device | Function |
|---|---|
| 5 | test FIFOs |
| 6 | PROM access over BPI |
| 7 | voltage and temperature monitor |
| 8 | LVMB7 mezzanine control |
| 9 | production tests |

Their command sets are not specified here. The PROM's upload path into the
configuration registers is a set of ports.

The DCFEB and FPGA TAP controllers are the targets, not part of the design.
`tb/jtag_tap_model.sv` models them for simulation.

## Design choices and departures

These points are not fixed by the original firmware description:

- The system clock is assumed to be 40 MHz, and the slow clock is
  `clk/SLOW_DIV`. The original runs its JTAG logic from a separate slow
  clock, with flip-flop chains clocked by the VME strobe. Here everything is
  synchronous to one clock with a clock enable.
- The handshake: dtack when the operation has finished.
- The instruction header, the reset sequence and the Select-DR-Scan shortcuts
  are derived from the IEEE 1149.1 state diagram.
- The TDO position in the read register and the TDI bit order.
- Reset values:
  - DCFEB selection: all boards.
  - V6_JTAG_SEL: 0.
  - Swing: maximum.
  - Configuration registers: 0, except the version word and NWORDS_DUMMY = 8.
- The firmware date and version constants are placeholders (parameters).
- Register widths:
  - CRATEID is 8 bits.
  - KILL is 9 bits.
  - TP_SEL is 16 bits.
  - LOOPBACK is 3 bits.
- Counter widths and saturation, and the gap being counted in clock cycles.
- The L1A_MATCH rule, the calibration-mode details and the order in which
  modes and kills combine in `odmb_delays`. The KILL register acts only on
  the test L1A's matches.
- BX_DLY is stored but not applied: its use lies in the data path, which is
  not part of this RTL.
- The LCT request and external trigger request pulses of `W 3200` are only
  outputs (`dcfeb_pulse[4:3]`).
- Unused commands are acknowledged and read 0.

## Files

| File | Contents |
|---|---|
| `rtl/odmb_vme_pkg.sv` | command/reply structs, JTAG operation enums, `NFEB = 7` |
| `rtl/odmb_vme.sv` | top |
| `rtl/vme_dev_decoder.sv` | device decode and reply merge |
| `rtl/jtag_engine.sv` | TMS/TDI sequencer |
| `rtl/cfebjtag.sv` | device 1 |
| `rtl/odmbjtag.sv` | device 2 |
| `rtl/vmemon.sv` | device 3 |
| `rtl/odmb_counters.sv` | counters for device 3 |
| `rtl/vmeconfregs.sv`, `rtl/tmr_reg.sv` | device 4, triple-voted register |
| `rtl/odmb_delays.sv`, `rtl/delay_line.sv` | trigger and calibration delays, programmable shift-register delay |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/jtag_tap_model.sv` | behavioural 16-state TAP |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, or stops on
its own watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/odmb_vme_pkg.sv tb/tb_odmb_vme.sv --top-module tb_odmb_vme
./obj_dir/Vtb_odmb_vme
```

Replace `tb_odmb_vme` with any other testbench. To run them all:

```
for t in tb/tb_*.sv; do n=$(basename $t .sv)
  verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      --Mdir obj_$n rtl/odmb_vme_pkg.sv $t --top-module $n && ./obj_$n/V$n | grep TB_RESULT
done
```

The simulator is two-state. The testbenches reset everything they read, and
pass with `+verilator+rand+reset+2` (random initial values).

## Verification status

| Testbench | What it checks |
|---|---|
| `tb_jtag_engine` | every TMS sequence against the TAP model, including USERCODE read in two halves, Select-DR-Scan and its short header, random 1–16-bit writes; exact cycle counts |
| `tb_cfebjtag` | the USERCODE procedure, a 12-bit shift, the split instruction commands 1Y30–3C, 1Y48/4C, multi-board selection; unselected boards see no TCK edge; dtack timing |
| `tb_odmbjtag` | USERCODE read, a write split over three commands, random 1–16-bit writes with read-back and cycle counts at a half-rate tick, V6_JTAG_SEL |
| `tb_vmemon` | every register, pulse, masking and the counter read path |
| `tb_odmb_counters` | every counter code, reset and resync rules, gaps, saturation (with a 4-bit instance) |
| `tb_vmeconfregs` | all registers and fields, write priority, read-only words, TMR correction with forced copy upsets |
| `tb_vme_dev_decoder` | random commands to all 16 device numbers |
| `tb_delay_line` | random delays against a history model |
| `tb_odmb_delays` | every output on every cycle against a model under random settings, modes and kill masks; the 12.5 ns steps timed for all 32 values; the LCT/L1A example |
| `tb_odmb_vme` | end to end, at the default parameters (7 DCFEBs, `SLOW_DIV` = 16) |

The end-to-end test `tb_odmb_vme` drives only the top-level VME port. It
counts 18 mechanisms and fails if any of them never happens:

- JTAG shift;
- Select-DR-Scan;
- JTAG reset;
- TCK gating;
- FPGA JTAG;
- control register;
- pulse;
- pulse masking;
- counter read;
- counter resync;
- configuration write;
- PROM upload and internal change;
- TMR vote;
- external device;
- unmapped device;
- OTMB push alignment;
- test L1A with a killed DCFEB;
- calibration L1A.

All testbenches pass. Each was also run against a copy of its module with one
deliberate error, such as a wrong header bit, a wrong write priority, or a
delay off by one BX. Each of those runs failed.

Not verified:

- behaviour on real hardware;
- the timing of the physical VME cycle;
- anything that depends on devices 5–9.
