# UKM8032 — an 8032-compatible microcontroller around a licensed 8051 core

The UKM8032 is an Intel 8032-compatible 8-bit microcontroller. It is meant for
both ASIC and FPGA targets. The CPU is a licensed, pre-verified 8051-class core.
The chip is built by surrounding that core with the parts an 8032 needs and the
core does not contain:

- the four 8-bit I/O ports P0–P3, which give 32 I/O lines;
- the SFR block that connects those ports to the core's SFR bus;
- the 256-byte internal data RAM;
- the 8051-style multiplexing of the external memory bus onto the 40 package pins.

A testing variant, the **UKM8050**, adds an internal program ROM (2 kB by
default) on the core's internal-ROM bus. Test programs such as LED running
lights can then be loaded with the device image instead of an external EPROM,
and all 32 port lines stay free for I/O.

This repository contains the RTL of everything around the core. The core is
not included. Its buses are ports of `ukm8032` / `ukm8050`, so an 8051 core
with the usual SFR, internal-RAM, internal-ROM and external-memory buses
attaches one signal to one signal.

```
                 +---------------------------- ukm8050 --------------------------+
                 |  +------------------------- ukm8032 ----------------------+   |
  core buses <---+->| ukm8032_ext_sfr --we--> p0  p1  p2  p3 --> pins (40)   |   |
  (sfr, iram,    |  |      ^  pin/latch data  |   |   |   |                  |   |
   mem, p3 alt,  |  |      +------------------+---+---+---+                  |   |
   reset, ea_n)  |  | ukm8032_ram_256 (iram bus)     reset sync, xtal2       |   |
                 |  +--------------------------------------------------------+   |
  irom bus <-----+-> ukm8050_rom_2048 (ROM_BYTES, image from a hex file)         |
                 +---------------------------------------------------------------+
```

## Files

| file | what it is |
|---|---|
| `rtl/ukm8032_pkg.sv` | port SFR addresses, bus structs `sfr_bus_t`, `mem_bus_t`, `p3_alt_out_t`, `p3_alt_in_t` |
| `rtl/ukm8032_ext_sfr.sv` | SFR decoder: latch write enables and pin/latch read multiplexer |
| `rtl/ukm8032_p0.sv` … `ukm8032_p3.sv` | the four ports |
| `rtl/ukm8032_ram_256.sv` | 256 × 8 internal data RAM |
| `rtl/ukm8032.sv` | the microcontroller without program ROM (the main configuration) |
| `rtl/ukm8050_rom_2048.sv`, `rtl/ukm8050_led_prog.hex` | internal program ROM and its default image |
| `rtl/ukm8050.sv` | top level: `ukm8032` plus internal ROM |
| `tb/tb_*.sv` | one self-checking testbench per module |

## What the attached core has to do

The core interface is the least obvious part of the design. Every core-side
port follows the rules below.

**SFR bus (`sfr`, `sfr_rdata`, `sfr_hit`).** The core keeps its own SFRs (ACC,
B, PSW, SP, DPTR, timers, serial port, interrupt control). It sends every other
direct address from 80h to FFh out on this bus. `ukm8032_ext_sfr` answers for
P0 (80h), P1 (90h), P2 (A0h) and P3 (B0h):

- **Writes.** `sfr.wr` held for one clock writes `sfr.wdata` into the addressed
  port latch on that clock's rising edge.
- **Reads.** Reads are combinational. With `sfr.pin_reg_n = 1` a read returns
  the pin levels. This is what `MOV A,P1` needs. With `sfr.pin_reg_n = 0` it
  returns the latch. This is what read-modify-write instructions need (`ANL`,
  `ORL`, `XRL`, `CPL`, `INC`, `DEC`, `DJNZ`, bit set/clear on a port). Without
  it, a pin pulled low from outside would be copied back into its latch.
- **Other addresses.** `sfr_hit` is 1 only for the four port addresses. Any
  other address reads 00h, and a write to it is ignored.

**External memory bus (`mem`, `mem_rdata`).** The core signals a bus cycle with
the strobes, and the shell puts it on the pins the way an 8051 does:

| core strobe | P0 | P2 | other pins |
|---|---|---|---|
| `ale = 1` | low address, driven | high address | ALE = 1 |
| `psrd_n = 0` (code fetch) | released, data read back as `mem_rdata` | high address | PSEN_n = 0 |
| `rd_n = 0` (MOVX read) | released, data read back as `mem_rdata` | high address | P3.7 = 0 |
| `wr_n = 0` (MOVX write) | `mem.wdata`, driven | high address | P3.6 = 0 |
| none | open-drain latch | latch | — |

An external transparent latch (a '373) captures P0 while ALE is high. Its
outputs and P2 together form the 16-bit address, so 64 kB of external code and
64 kB of external data can be reached.

The core must keep the strobes exclusive: at most one of
`psrd_n`, `rd_n` and `wr_n` may be low, and none while `ale` is high. Assertions
in `ukm8032` check this, and also that the internal RAM is never read and
written in the same cycle.

**Internal RAM (`iram_*`).** The write is synchronous: `iram_we_n = 0` writes
on the rising edge. The read is asynchronous and gated: `iram_rdata` is the
addressed byte while `iram_rd_n = 0`, and 00h otherwise. All 256 bytes are
plain storage. The split between direct and indirect addressing of the upper
128 bytes is the core's job.

**Internal ROM (`irom_*`, `ukm8050` only).** The read is asynchronous.
`irom_rdata` is the addressed byte when `irom_cs_n = 0`, `irom_rd_n = 0` and the
address is below `ROM_BYTES`. Otherwise it is FFh. The core decides from
`core_ea_n` and its configured ROM size whether a fetch goes to this ROM or to
the external bus. With EA_n = 1, the usual 8051 rule is internal below the ROM
size and external above it.

**Port 3 alternates (`p3_alt_out`, `p3_alt_in`).** The serial outputs RXD
(shift-register mode) and TXD are ANDed into P3.0 and P3.1. Software must
therefore leave those latch bits at 1 to use them. The same holds for WR_n and
RD_n on P3.6 and P3.7. The pin levels of P3.0 and P3.2–P3.5 go back to the core
unsynchronised, as RXD, INT0_n, INT1_n, T0 and T1. The core is expected to
sample them with its own logic.

**Reset and clock.** `xtal1` is the only clock. `xtal2` is its inverse, the
output of the oscillator amplifier. The active-high `rst` pin resets every
port latch to FFh and drives `core_rst_n` low at once. The release is
synchronous: `core_rst_n` rises on the second rising `xtal1` edge after `rst`
falls. The RAM contents are not reset.

## Pins

The 40 package pins are: `xtal1`, `xtal2`, `rst`, `ea_n`, `ale`, `psen_n`, and
`p0`–`p3`, eight bits each. A bidirectional pin cannot be one port in a
two-state simulator or in a technology-independent netlist. Each port is
therefore split:

- `pN_i` is the level sensed on the pin.
- `pN_o` is the level the chip drives.
- **P0 is open drain** and has a per-bit drive enable, `p0_drv`. When idle,
  only the latch's 0 bits are driven. A 1 leaves the pin to an external
  pull-up. During bus cycles all eight bits are driven (address and write
  data), or none (reads).
- **P1–P3 are quasi-bidirectional.** A 0 is a strong pull-down and a 1 is a
  weak pull-up. On the board, the pin level is the AND of `pN_o` and whatever
  pulls the pin low from outside.

A pad ring maps these signals onto the target's I/O buffers: an IOBUF with
enable `p0_drv` for P0, and open-drain buffers with pull-ups for P1–P3.

## Internal ROM image

`ukm8050_rom_2048` fills every byte with FFh, like an erased EPROM. It then
loads `INIT_FILE` with `$readmemh` during elaboration, so on an FPGA the image
becomes block-RAM initial contents. The path is relative to the directory the
simulator or synthesis tool runs in, and the default is
`rtl/ukm8050_led_prog.hex`. The default image is a running light on Port 1:

```
0000: 74 FE   MOV  A,#0FEh
0002: F5 90   MOV  P1,A
0004: 7F 03   MOV  R7,#3
0006: DF FE   DJNZ R7,$
0008: 23      RL   A
0009: 80 F7   SJMP 0002h
```

The delay loop is short so that the program is quick to simulate. For real
LEDs, raise the count and nest the loop. Set `ROM_BYTES = 16384` for the
16 kB variant, the largest that fits the block memory of the FPGA originally
targeted.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if
something hangs.

- `tb_ukm8032_p0` … `p3`, `tb_ukm8032_ext_sfr`, `tb_ukm8032_ram_256`,
  `tb_ukm8050_rom_2048`: random and exhaustive stimulus against a reference
  model of each block. The ROM test also builds a 16 kB instance.
- `tb_ukm8032`: the microcontroller driven on its core-side buses. It covers
  reset release timing, port writes seen on the pins, pin reads and latch reads
  with bits pulled low from outside, non-port SFR addresses, all four
  external-bus strobes on the pins, the RAM, and the P3 alternate inputs.
- `tb_ukm8050`: end to end at the default parameters. The testbench contains a
  small instruction-level model of an 8051 core. The model understands only the
  dozen opcodes it needs and does one bus transaction per clock. The testbench
  also models the board: external 64 kB ROM and RAM behind an address latch,
  and pull-ups. The test has two phases:
  1. With EA_n = 1, the LED program runs from the internal ROM and P1 must step
     through FE, FD, FB, … 7F, FE.
  2. After a reset with EA_n = 0, a program is fetched from external ROM via
     ALE/PSEN_n. It does a MOVX write and read, an `ANL P1,#0Fh` while P1.3 is
     held low outside (the latch must read 5Ah, not 52h), a pin read, a `DJNZ`
     loop in internal RAM and a store to RAM.

  Every mechanism is counted and must occur at least once: reset synchroniser,
  internal and external fetch, MOVX read and write, SFR write, pin read, latch
  read, RAM read and write, the P3 alternate outputs, and the LED steps.

To simulate with Verilator, run from the repository root so that the ROM image
path resolves. For example:

```
verilator --binary --timing --assert -Irtl rtl/ukm8032_pkg.sv \
          tb/tb_ukm8050.sv -y rtl +libext+.sv --top-module tb_ukm8050 -o sim
./obj_dir/sim
```

Replace `tb_ukm8050` with any other testbench name. Each one finishes in well
under a second.

## How far to trust it, and where it departs from the original

The original design documents the block structure, the pin list, the memory
sizes and the target results. It does not document the insides of its
peripherals. Everything inside the peripheral blocks here is therefore the
standard 8051 behaviour those blocks must have, or this design's own choice:

- **Not included: the CPU core.** Nothing here executes instructions. The
  core-side port names and the `pin_reg_n` polarity follow common 8051-core
  conventions. Check them against the core you attach.
- **Internal RAM read timing.** The RAM reads asynchronously. The FPGA
  implementation of the original placed its internal RAM in one block RAM,
  which reads synchronously. With a core that expects a registered read,
  register `rdata` in `ukm8032_ram_256`.
- **Internal ROM read timing.** The ROM also reads asynchronously. The same
  remark applies to a core that expects a synchronous ROM.
- **Port 0 after a bus cycle.** A genuine 8051 writes FFh into the P0 latch
  when it uses P0 for the bus. Here the latch keeps its value and reappears
  when the cycle ends. Software that mixes MOVX with P0 output should write P0
  explicitly.
- **MOVX @Ri cycles.** For these 8-bit cycles, P2 shows `mem.addr[15:8]`, so
  the core must put the P2 contents there.
- **Own choices.** The reset synchroniser, the 00h read value of undecoded SFR
  addresses, the FFh fill of the ROM and the bus-priority order in P0 are this
  design's own.
- **Pads.** The pad buffers (input, output, clock and bidirectional) are
  target-library cells and are left to the pad ring.
