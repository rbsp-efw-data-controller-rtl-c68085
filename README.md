# RBSP EFW Data Controller Board FPGA in SystemVerilog

The Data Controller Board (DCB) is the main processor board of the Electric Field
and Waves instrument on the Radiation Belt Storm Probes. One FPGA holds almost
all of its digital logic:

- an 8-bit Z80 CPU;
- the CPU's bus, paging and memory decoding;
- two memory buses:
  - the "MBUS", an 8-bit bus shared by SRAM, EEPROM, boot PROM and ADC;
  - a private bus to a 256 MB SDRAM bulk memory, protected by a scrubber;
- a controller for eight NAND FLASH modules used as mass storage;
- four DMA engines:
  - one takes data words from the Digital Fields Board (DFB);
  - one stores spacecraft commands;
  - one sends telemetry frames to the spacecraft;
  - one moves FLASH pages;
- timekeeping, the watchdog and serial links to the other boards.

This repository is RTL for that FPGA, apart from the Z80 core itself. The
core is a bought IP block. The RTL brings its bus out as ports, so that a
core or a testbench can drive it.

Everything runs on one clock, SCLK = 16.777216 MHz (2^24 Hz). A 24-bit
counter of that clock, the Sample Time, is the time base for the whole
board. It rolls over once per second.

## Contents

- [Block map](#block-map)
- [The CPU's view: pages, I/O registers and bus cycles](#the-cpus-view-pages-io-registers-and-bus-cycles)
- [Memory traffic: one request bundle, two arbiters](#memory-traffic-one-request-bundle-two-arbiters)
- [SDRAM, its check bytes and the scrubber](#sdram-its-check-bytes-and-the-scrubber)
- [FLASH](#flash)
- [DFB data: sixteen double-buffered channels](#dfb-data-sixteen-double-buffered-channels)
- [Spacecraft links](#spacecraft-links)
- [Instrument-side outputs](#instrument-side-outputs)
- [Time, reset and interrupts](#time-reset-and-interrupts)
- [Where this RTL departs from, or fills in, the specification](#where-this-rtl-departs-from-or-fills-in-the-specification)
- [Simulating](#simulating)
- [Sizes and what was simulated at them](#sizes-and-what-was-simulated-at-them)
- [How far to trust it](#how-far-to-trust-it)

## Block map

The top module, `dcb_top`, wires the blocks below together.

| Area | Modules |
|---|---|
| CPU bus and registers | `cpu_mem_map`, `dcb_regs`, `int_ctl` |
| MBUS | `mbus_ctl`, `prio_arbiter` |
| SDRAM | `sdram_mgr` (arbiter, ECC, scrubber), `sdram_ctl` (commands, refresh), `ecc_secded32` |
| FLASH | `flash_pwr` (power sequencing), `flash_dma` (page transfers), `flash_ecc` |
| DFB | `cdi_tx` (commands out), `dfb_rx_merge` (two telemetry lines in), `dfb_dma` |
| Spacecraft | `glitch_filter`, `sc_pulse_sorter`, `cmd_dma`, `tlm_dma`, `uart_rx`, `uart_tx` |
| Instruments | `pcb_cmd_if`, `beb_dac_if`, `beb_amux`, `beb_actest`, `hk_adc_ctl` |
| Time and reset | `timebase`, `watchdog` |
| Debug | `debug_uart`, `sync_fifo`, `dbg_aux` (NMI button, alternate boot PROM, analyser strobes) |

`dcb_pkg` holds the shared pieces: the clock rate, the baud-rate divisors,
the memory-map bases and the memory request and response structs.

These parts of the board are outside the FPGA, or are not designed here:

- the Z80 core;
- the SRAM, EEPROM and PROM chips;
- the SDRAM module and the FLASH modules;
- the ADC with its multiplexer;
- the oscillator and the power-on reset network.

The testbenches use behavioural models of the SDRAM (`tb/sdram_model.sv`)
and the NAND FLASH (`tb/nand_model.sv`). The SDRAM model also checks
command timing rules.

## The CPU's view: pages, I/O registers and bus cycles

The Z80 addresses only 64 KB. The board's linear memory map is 29 bits wide
(512 MB). `cpu_mem_map` translates between the two:

| CPU address | Goes to |
|---|---|
| 0x0000–0x7FFF | Boot PROM while the ROMON bit is set (it is set after every reset); SRAM otherwise |
| 0x8000–0xDFFF | SRAM at the same address |
| 0xE000–0xEFFF | 4 KB window, linear address {PgReg0[16:0], A[11:0]} |
| 0xF000–0xFFFF | 4 KB window, linear address {PgReg1[16:0], A[11:0]} |

The linear map:

| Linear address | Contents |
|---|---|
| 0x0000000 | SRAM, 128 KB |
| 0x0020000 | EEPROM, 128 KB |
| 0x0040000 | ADC result: byte 0 is the low byte, byte 1 the high byte |
| 0x0080000 | Boot PROM, 32 KB |
| 0x00C0000 | FLASH, direct CPU access in diagnostic mode |
| Bit 28 set | SDRAM, 256 MB |

Anything else is a "null cycle". No chip select is driven, and a sticky
status flag is set.

Writes to the lower 32 KB of SRAM can be blocked by a control bit. This is
the "low-half write protect", which keeps code safe. A blocked CPU write
sets one flag. A blocked DMA write sets another.

PROM, EEPROM, ADC and FLASH cycles take three wait states; SRAM takes
none.

The I/O space (addresses 0x10–0xC1) holds the registers of every block.
Each block decodes the 8-bit I/O address itself. Its read data is a
combinational function of that address, and is zero outside the block's
own registers, so the top simply ORs all the read buses together.

In this RTL the CPU bus is a start/acknowledge handshake:

1. The CPU pulses `cpu_start` for one cycle. With it, it sets:
   - `cpu_io` (I/O or memory);
   - `cpu_we` (write or read);
   - `cpu_addr` and `cpu_wdata`.
2. It holds those signals until `cpu_ack` comes back.
3. `cpu_ack` lasts one cycle, and `cpu_rdata` is valid with it.

I/O cycles take two clocks. A memory cycle lasts as long as its target:
the MBUS, the SDRAM manager or the FLASH diagnostic port. A Z80 core's
MREQ/IORQ/WAIT timing would have to be adapted to this handshake.

## Memory traffic: one request bundle, two arbiters

Every DMA engine, and the CPU's SDRAM path, uses the same request bundle
(`dcb_pkg::mem_req_t`):

| Field | Meaning |
|---|---|
| `req` | request |
| `we` | write |
| `size4` | one byte, or one longword |
| `addr[28:0]` | linear byte address |
| `wdata[31:0]` | write data |

The response (`dcb_pkg::mem_rsp_t`) has `ack`, `err` and `rdata`.

Within a longword, byte 0 (the lowest address) is in bits 31:24.

The handshake:

1. A client raises `req` and holds it, with the other fields, until `ack`.
2. `ack` lasts one cycle.
3. The client drops `req` on the next clock edge.
4. The arbiters mask `req` with `ack`, so a request is never served twice.

In `dcb_top`, linear address bit 28 steers each DMA request. With bit 28
set it goes to the SDRAM manager; otherwise it goes to the MBUS.

**MBUS (`mbus_ctl`).**
- Priority order: CPU, DFB, command, telemetry, FLASH.
- The grant is held until the access is finished.
- A longword runs as four byte cycles on the 8-bit bus.
- DMA writes to the protected low 32 KB are refused, with `err` and the
  DMA low-half flag.
- DMA addresses outside the SRAM are refused as well.
- `cyc_type` tells which kind of cycle is on the bus.

**SDRAM (`sdram_mgr`).**
- Priority order: DFB, telemetry, CPU, scrubber, FLASH.
- One access at a time.
- `sdram_ctl` does the actual SDRAM commands.

## SDRAM, its check bytes and the scrubber

This is the least obvious part of the design.

### Power-up and commands

When the CPU sets the SDRAM power bit, `sdram_ctl` powers the module and
waits about half a second (2^23 cycles). It then initialises all four
dies:

1. PRECHARGE ALL;
2. two AUTO REFRESH commands;
3. LOAD MODE: burst length 1, CAS latency 2.

After that it raises SDRAM_Active and refreshes every 7.8 µs. Each access
is ACTIVE, then READ or WRITE of one byte or of four bytes, then
PRECHARGE.

An access before SDRAM_Active, or after power-off, is not performed:

- it ends at once with `err`;
- it sets the "SDRAM null cycle" flag.

The module is taken as four 64M×8 dies, so a byte address is
{cs[1:0], row[12:0], bank[1:0], col[10:0]}.

### Check bytes

The upper quarter of the SDRAM, from 0xC000000, holds one check byte for
each longword of the lower three quarters:

- its address is 0xC000000 + (A >> 2);
- bits 6:0 are the check bits of the SEC-DED code in `ecc_secded32`. That
  code is an extended Hamming code: it corrects one wrong bit and detects
  two;
- bit 7 is a tag meaning "these check bits are valid".

When ECC is on (register 0x30, bit 0), every access from a client other
than the scrubber goes through `sdram_mgr`:

- **Access to the upper quarter.** It is refused, and ScrubCSErrDet is set.
- **Write.** The manager also writes the check byte with the tag cleared.
  The CPU writes single bytes, so the manager cannot compute the check bits
  at that point.
- **Write in test mode** (0x30, bit 1). A CPU write stores the byte held in
  register 0x33 as the check byte instead. This lets software plant known
  errors.
- **Longword read.** The manager reads the check byte as well:
  - tag set: a single-bit error is corrected in the returned data and
    counted; a double error is counted only;
  - tag clear: the manager computes the check bits and writes them back
    with the tag set.

### The scrubber

The scrubber reads the lower three quarters one longword at a time, through
the same read path. The period is set in register 0x30:

| Setting | Period |
|---|---|
| 0 | 7.68 µs (128 cycles) |
| 1 | 250 µs |
| 2 | 2 ms |
| 3 | one longword per write to register 0x32 |

After power-up the tags hold random values. So until the scrubber has gone
once round the whole region, the manager treats every tag as clear and
rewrites every check byte it reads. When that first pass ends, it sets the
ECCSTATE bit, and from then on:

- a single-bit error the scrubber finds is written back corrected;
- the single-error and multi-error counters (0x31, 0x32) count up to 255;
- both counters clear when a new pass begins.

At the fastest period, one pass over the 192 MiB takes 6.4 minutes.

## FLASH

### Power (`flash_pwr`, register 0xA0)

Only one of the eight modules is powered at a time, chosen by a
3-to-8 decoder. After any change of the setting, the sequence is:

1. FLASH_ACTIVE drops and the write-protect pin is asserted.
2. The new module's power is ramped for 1 ms.
3. A RESET command goes to all its dies, and the block waits for ready.
4. FLASH_ACTIVE rises.

While it sequences, `flash_pwr` drives the FLASH bus itself.

### Page transfers (`flash_dma`)

`flash_dma` copies a range of pages of one 128 KB block, in either
direction, between FLASH and SRAM or SDRAM. It starts each transfer with a
RESET. Each page is then:

- **Write:** 0x80, five address bytes, 2048 data bytes, the spare bytes,
  0x10, wait for ready, then a status read. Bit 0 of the status is the
  program-failure flag.
- **Read:** 0x00, five address bytes, 0x30, wait for ready, then the data
  and spare bytes.

Errors:

- ready not seen within 4 ms sets a timeout error;
- a program failure ends the transfer, unless its override bit is set;
- the throttle bit adds 700 ns after each memory access, to limit the load
  on the MBUS.

### Page ECC (`flash_ecc`)

Each page is four segments of 512 bytes. Each segment gets three check
bytes of line and column parities; this is the usual NAND Hamming scheme.
They are written to the spare area:

| Spare offset | Contents |
|---|---|
| 0x830 | tag 0x42 |
| 0x831–0x83C | the twelve check bytes |
| 0x83D | the XOR of those twelve |

On a read with ECC enabled, and with a valid tag and parity, the block
acts as follows:

- a single flipped data bit is corrected by rewriting that longword in
  memory;
- errors that cannot be corrected are counted.

### Diagnostic mode

In diagnostic mode each CPU access to linear 0xC0000 becomes one FLASH bus
cycle:

- address bits 2:0 pick the chip enable;
- bit 4 drives CLE;
- bit 5 drives ALE.

## DFB data: sixteen double-buffered channels

The DFB sends 24-bit words on two serial lines. Each word has:

- a start bit;
- 8 bits of data ID and 16 bits of data, MSB first, two SCLK per bit;
- odd parity;
- a stop bit.

`dfb_rx_merge` merges the two lines into one stream. When both lines finish
on the same clock, line 0 goes first.

`dfb_dma` sends IDs 0x40–0x4F to channels 0–15. Each channel:

- packs two words into a longword, the first word in the high half;
- writes it to {page, index, 00} in a 4 KB buffer;
- starts at index 4, which leaves a 16-byte header for software;
- therefore holds at most 2040 words per buffer.

Software loads the next page while the current one fills. If swap is
enabled, the next termination tick (128 Hz, or 1 Hz per channel) closes
the buffer:

1. A half-filled longword is padded with zeros.
2. The "last buffer" status word is captured:
   {swap, timeout, overflow, odd, index}.
3. The next page becomes current.
4. The swap-status bit is set.

Errors:

- **Overflow.** A buffer that fills before the tick keeps its last
  longword, and later words are dropped.
- **Timeout.** The channel finished a longword while its previous one was
  still waiting for memory, so that one is lost.

## Spacecraft links

All spacecraft lines pass through `glitch_filter`. It removes pulses shorter
than four clocks (240 ns).

**Pulse sorter (`sc_pulse_sorter`).** The 1PPS and the spin pulse share one
line, and the sorter tells them apart by width:

| Width | Meaning |
|---|---|
| 30.5–53 µs | spin pulse |
| 69–91 µs | 1PPS |
| anything else | error |

At the trailing edge it latches the upper 16 bits of Sample Time.

**Command DMA (`cmd_dma`).** It receives bytes at 115200 Bd with odd parity,
and writes each one into a 1 KB SRAM buffer. It flags:

- parity errors;
- framing errors;
- overflow;
- timeout.

**Telemetry DMA (`tlm_dma`).** It reads a buffer of longwords and sends it
as one frame. The frame consists of:

- the sync bytes FE FA 30 C8;
- a header with two flags and the message length;
- the data;
- a 16-bit XOR checksum of everything after the sync bytes.

A second start during a frame sets BQERR. A 1PPS during a frame sets
BCERR. Its `done` output is one of the three interrupt sources.

## Instrument-side outputs

- **`cdi_tx`**: 24-bit commands to the DFB, sent as start bit, data,
  odd parity and stop, at 8 MHz.
- **`pcb_cmd_if`**: 8-bit commands to the power control board, MSB first
  at 1.048 MHz, followed by a strobe.
- **`beb_dac_if`**: loads the five daisy-chained BEB DACs in one
  90-bit shift, then pulses LDAC.
- **`beb_amux`**: the BEB multiplexer. The enables drop for a guard time
  whenever the setting changes.
- **`beb_actest`**: two AC-test square waves of 2^19 / N Hz, switched on
  and off at the 1 Hz tick.
- **`hk_adc_ctl`**: the housekeeping ADC's multiplexer address, its
  shutdown bit and its start-conversion pulse.

The BEB lines are inverted where the BEB's own buffers invert them.

## Time, reset and interrupts

**Timebase (`timebase`).** From the 24-bit Sample Time counter it derives:

- the 1 Hz tick (at rollover) and the 256, 128 and 64 Hz ticks;
- the 8 MHz DFB clock;
- a 799 kHz power-converter clock, which is SCLK/21, high for 11 cycles.

**Reset (`watchdog`).** The board reset is the OR of the power-on reset and
a 3 µs watchdog pulse. The watchdog pulse fires when software has not
written X5 to 0x1F for three 1 Hz ticks; a jumper input turns this off.

Two things survive a watchdog reset but not a power-on reset:

- the "watchdog reset detected" flag;
- the SDRAM power bit, so a watchdog reset does not lose the SDRAM
  contents.

**Interrupts (`int_ctl`).** There are three latched sources: the 256 Hz
tick, telemetry done and FLASH done. Each has an enable, and together they
drive the single Z80 interrupt.

**Debug-board hooks (`dbg_aux`).** These signals are used only with the
debug board:

- An NMI push-button must hold one level for 262,144 cycles (about
  15.6 ms) before it counts. Each accepted press sends one NMI pulse to
  the CPU; releasing the button sends none.
- While the ALTBOOTSEL jumper pulls its line low, boot-PROM cycles go to
  the debug board's PROM. ALTBOOTCS, ALTBOOTREAD and ALTBOOTWRITE follow
  the cycle, and the on-board PROM select stays off.
- LASTROBE(1:0) copy the MBUS read and write strobes for a logic analyser.
  LASTROBE(2) is a spare and is held low.

## Where this RTL departs from, or fills in, the specification

These points are decided here rather than taken from the specification.

**Departures and conflicts:**

- **DFB overflow.** One passage says a full DFB buffer wraps around, and a
  later revision says it stops writing. The overflow rule is used.
- **Check-byte address.** The address is 0xC000000, the upper quarter of
  256 MB.
- **Slowest scrub period.** The register table says 2 ms, and the prose
  says 1 ms; 2 ms is used, so a full pass at that rate takes 28 hours
  rather than 14.
- **AC-test frequency.** The fastest setting of the AC-test frequency is
  2^19 Hz (524 kHz), which follows from its 2^-19 s step.
- **Register 0x44.** Bits 1:0 are taken as TLM length bits 9:8 when read
  as well as when written.
- **Protoboard registers.** The protoboard-only registers 0xF0 and 0xF1
  are not built. The LED register at 0x18 is.

**Choices where the specification gives the function but not the logic:**

- the SEC-DED code;
- the FLASH Hamming bit layout, and the parity byte at 0x83D;
- the SDRAM geometry and timings;
- the serial bit orders where not stated;
- the guard and pulse lengths;
- the version number (0xC5);
- the register bits of the debug UART rate;
- the CPU bus handshake.

The opening comment of each RTL file says which parts of that module follow
the specification and which are its own.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`, then calls `$finish`, and each has its own
time-out. With Verilator 5, from the repository root:

```
t=dcb_top
verilator --binary --timing --assert -Wno-fatal -Itb -y rtl -y tb \
    rtl/dcb_pkg.sv tb/tb_$t.sv --top-module tb_$t -Mdir obj_$t -o sim
./obj_$t/sim
```

Replace `dcb_top` with any block name to run that block's `tb/tb_<block>.sv`.

**`tb_dcb_top`** runs the whole FPGA with these parameters shortened:

- SDRAM power-up wait: 200 cycles;
- scrub region: 64 longwords;
- FLASH ramp: 40 cycles.

It counts each mechanism and fails any that never happened:

- boot PROM, SRAM, low-half protect and null cycle;
- SDRAM access, and an ECC error found and repaired by the scrubber;
- command DMA, telemetry frame and interrupt;
- 1PPS;
- DFB DMA and buffer swap;
- CDI, PCB, DAC and BEB multiplexer;
- ADC read, debug UART loopback;
- FLASH power, FLASH page write and FLASH page read;
- a debounced NMI button press, and a boot cycle sent to the alternate
  boot PROM.

It takes a few seconds.

**`tb_dcb_full`** runs the top with every parameter at its default. It
covers a bit over four seconds of board time:

- the full half-second SDRAM power-up, then SDRAM access;
- the scrubber started;
- the 1 ms FLASH ramp;
- AC-test outputs switched on at a 1 Hz tick;
- the watchdog reset after three seconds without a kick, with the flags
  and the SDRAM power checked afterwards.

It takes about 75 s.

The SDRAM and NAND models in `tb/` are simple on purpose:

- they store only written bytes;
- the SDRAM model returns a fixed pattern for bytes never written;
- the NAND model has fixed ready times and can be told to fail a program
  or to stay busy.

## Sizes and what was simulated at them

All parameter defaults are the specification's numbers, or are derived from
them:

- the SDRAM power-up wait is 2^23 cycles;
- the scrub region is 50,331,648 longwords;
- the FLASH timeout is 4 ms;
- there are 16 DFB channels;
- buffers are 1024 bytes (commands) and 4 KB (DFB);
- the debug FIFOs hold 128 bytes.

Block testbenches shorten times where the default would only make the run
longer: baud divisors, power-up waits, scrub length and timeouts. The full
scrub pass (6.4 minutes of board time) is simulated only with a region of
64 longwords. Every other default is exercised by `tb_dcb_full`.

## How far to trust it

Every block has its own testbench. It compares the block against models
written independently in the testbench, including cycle counts where the
specification gives a rate. Each testbench has also been shown to fail
against a deliberately broken copy of its block. The two top-level tests
pass.

What has not been checked:

- the design against the real Z80 core, or against real SDRAM or FLASH
  parts;
- the DFB DMA memory timeout. It is implemented, but no test makes it
  happen.

The block interfaces inside the FPGA (the request bundle and the I/O
register bus) are this design's own. Treat them as the place to adapt when
connecting a real CPU core.
