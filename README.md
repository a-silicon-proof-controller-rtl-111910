# NanoController system: an always-on 4-bit-ISA controller that power-gates a 32-bit core

Battery-less devices that live on harvested energy spend almost all their time
doing trivial things: checking whether a key card is near the door, keeping
the time of day, noticing a time-out. Only a few times a day do they need a
real processor, for example to run an AES-encrypted RFID exchange. Waking a
general-purpose microcontroller from sleep on a periodic timer just to look
at a sensor costs far more energy than the check itself.

This RTL implements the digital part of a two-domain controller system built
around that observation:

* An **always-on domain** holds the *NanoController*, a very small
  programmable controller: an 8-bit accumulator/flag machine whose 16
  instructions are 4-bit nibbles, with a 64-byte instruction memory and a
  16-byte data memory, both built from flip-flops. It runs slowly (32 kHz in
  the intended application), polls sensors, keeps a software real-time clock
  and decides when the big core is needed.
* An **on/off domain** holds the *general-purpose controller* (GPC), a 32-bit
  core with 96 KiB instruction SRAM and 128 KiB data SRAM. It is powered only
  while the NanoController wants it. Because its memories are volatile, a
  hardware **bootloader** refills them from an external SPI flash after each
  power-up and, on request, page by page later.
* A **power-gating handshake** turns the NanoController's on/off command into
  an ordered power-up and power-down sequence (switch, isolation, reset), and
  the GPC can ask to be switched off again when its work is done.

The GPC processor core itself, its protocol peripherals, the analog power
switch, the clock generators and the SPI flash are not part of this RTL: they
connect through ports of the top module `nc_soc_top`.

## Block structure

```
                  always-on domain (nano_clk)            |  on/off domain (gpc_clk)
 gpio_in ──► ┌──────────────── nano_controller ───────┐  |
             │ nano_core ── nano_alu                   │  |  ┌─ spi_flash_boot ─┐  flash_*
 prog_* ───► │   │ i_addr/i_data   │ d_addr/d_rdata    │  |  │ READ 0x03, pages  │◄────────►
             │ nano_imem      nano_dmem   nano_io      │  |  └──┬─────────▲─────┘
             └─────────────────────────────┬──┬──────┘  |     │ words    │ page requests
                                 pwr_cmd   │  │ status   |  sram_sp    sram_sp      ◄── GPC core
                                           ▼  │          |  96 KiB I   128 KiB D        (ports)
                                     gpc_pwr_ctrl ───────┼──► gpc_rst_n (synchronised) ─┐
             pm_pwr_en ◄──┤  pm_pwr_good ──►│ iso_en     |        gpc_core_rst_n = rst & boot_done
             gpc_sd_req (from GPC) ── clamp by iso_en ── sync ──► nano_io STATUS[0]
```

| File | Role |
|---|---|
| `rtl/nano_pkg.sv` | opcodes, ALU operations, widths, I/O addresses |
| `rtl/nano_core.sv` | control FSM, decoder, literal decoding, PC, accumulator, flags |
| `rtl/nano_alu.sv` | 8-bit ALU with zero and carry |
| `rtl/nano_imem.sv` | 128 × 4-bit flip-flop instruction memory |
| `rtl/nano_dmem.sv` | 16 × 8-bit flip-flop data memory |
| `rtl/nano_io.sv` | memory-mapped GPIO, status and power-command registers |
| `rtl/nano_controller.sv` | the NanoController: the five blocks above |
| `rtl/gpc_pwr_ctrl.sv` | power-gating sequence for the GPC domain |
| `rtl/spi_flash_boot.sv` | SPI-flash bootloader for the GPC SRAMs |
| `rtl/sram_sp.sv` | behavioural model of the single-port SRAM macros (simulation only) |
| `rtl/sync_2ff.sv` | two-flip-flop synchroniser |
| `rtl/nc_soc_top.sv` | the system |

## The NanoController instruction set

The NanoController is a one-operand machine: every instruction works on the
accumulator `A` and at most one operand, and sets the zero flag `Z` and the
carry flag `C`. The program is a stream of 4-bit nibbles; the program counter
is 7 bits wide and counts nibbles, so the 64-byte memory holds 128 of them.

### Variable-length literals

Operands are not fixed-width fields. Each operand (an immediate, a data
address or a branch target) follows the opcode as a *literal* of one to
three nibbles:

```
 nibble = { more, v2, v1, v0 }        more = 1: another nibble follows
 value  = (value << 3) | v            most significant group first
```

| value range | nibbles | example |
|---|---|---|
| 0 … 7 | 1 | `5` → `0101` |
| 8 … 63 | 2 | `24` → `1011 0000` |
| 64 … 511 | 3 | `0x80` → `1010 1000 0000` |

Small constants and the low data addresses, which most control programs use
most, therefore cost one nibble. Leading zero groups are allowed, so an
assembler can give forward branch targets a fixed three-nibble size. A
literal longer than three nibbles keeps its last nine bits; immediates use
the low 8 bits, data addresses the low 5, branch targets the low 7.

### Opcodes

| code | mnemonic | operation | flags |
|---|---|---|---|
| 0 | `NOP` | — (no literal) | — |
| 1 | `LDI #k` | A ← k | Z |
| 2 | `LD a` | A ← M[a] | Z |
| 3 | `ST a` | M[a] ← A | — |
| 4 | `INC a` | M[a] ← M[a]+1, A ← result | Z, C = carry out |
| 5 | `DEC a` | M[a] ← M[a]−1, A ← result | Z, C = borrow |
| 6 | `CMPI #k` | compare A with k | Z = (A==k), C = (A<k) |
| 7 | `CMP a` | compare A with M[a] | Z, C as CMPI |
| 8 | `ANDI #k` | A ← A & k | Z |
| 9 | `ORI #k` | A ← A \| k | Z |
| A | `ADD a` | A ← A + M[a] | Z, C |
| B | `JMP t` | PC ← t | — |
| C | `JZ t` | if Z: PC ← t | — |
| D | `JNZ t` | if !Z: PC ← t | — |
| E | `JC t` | if C: PC ← t | — |
| F | `DJNZ a, t` | M[a] ← M[a]−1; if result ≠ 0: PC ← t (two literals) | Z |

`INC`/`DEC` on memory and `DJNZ` are read-modify-write instructions aimed at
counters, which is what state machines, timers and the software clock are
made of.

### Timing

The control unit fetches one nibble per clock. An instruction takes
**1 + (number of literal nibbles)** cycles: one for the opcode, one for each
literal nibble, and it executes in the cycle that fetches its last nibble
(the data memory and I/O are read combinationally and written at the end of
that cycle). `NOP` takes 1 cycle, `LD 3` 2 cycles, `ST 24` 3, `JMP` with a
3-nibble target 4, `DJNZ 2, t` 5.

`run = 0` freezes the core; reset clears PC, A and the flags (the memories
are not reset). The pulse `retire` marks the cycle in which an instruction
executes.

### Data space and I/O

| address | contents | access |
|---|---|---|
| 0 … 15 | data memory | r/w |
| 16 | `GPIO_IN`: inputs, two-flop synchronised (bit 0: proximity sensor in the example) | r |
| 17 | `STATUS`: bit 0 GPC shut-down request (synchronised), bit 1 GPC on, bit 2 power sequence busy | r |
| 24 | `GPIO_OUT` | r/w |
| 25 | `PWR_CMD`: bit 0 = keep the GPC domain on | r/w |
| others ≥ 16 | read 0, writes ignored | |

An input change becomes visible to `LD 16` two clock edges later.

### Loading a program

With `run = 0`, write nibbles through `prog_we/prog_addr/prog_data` (one per
clock), release reset, then raise `run`; execution starts at address 0.

## Power gating of the GPC domain

`gpc_pwr_ctrl` runs on the always-on clock and sequences the domain:

```
OFF ──PWR_CMD=1──► PWR_UP (pwr_en=1, wait pwr_good) ─► UNISO (isolation off)
    ─► RST_REL (RST_HOLD cycles) ─► ON (GPC reset released)
ON ──PWR_CMD=0──► RST (reset on) ─► ISO (isolation on) ─► PWR_DN (pwr_en=0, wait !pwr_good) ─► OFF
```

`pwr_good` from the analog power management is synchronised. A command that
changes in the middle of a sequence is acted on when the sequence has ended.
`STATUS` lets the program see `ON` and `busy`. Isolation (`gpc_iso_en`) is on
in every state except `UNISO`, `RST_REL`, `ON` and `RST`; inside the top it
clamps the GPC's shut-down request to 0, so a floating output of an
unpowered domain cannot look like a request. The GPC-domain reset is
synchronised to `gpc_clk` before use.

The policy is software: the NanoController program decides when to set
`PWR_CMD` and whether to honour a shut-down request or time out.

## The bootloader

`spi_flash_boot` lives in the on/off domain and comes out of reset with it.
It first loads instruction page 0 by itself, raises `gpc_boot_done`, and only
then does the top release the GPC core's reset (`gpc_core_rst_n`). After that
the core can ask for more pages with a valid/ready request (`req_dmem`
selects instruction or data SRAM, `req_page` the page); `req_done` pulses
when the page is in memory. Bootloader writes take priority over the core's
SRAM accesses, so the core should not use the SRAMs while a page it asked for
is loading.

One page is one flash `READ` (0x03) transaction in SPI mode 0: command byte
and 24-bit address MSB first, then `PAGE_BYTES` bytes. Bytes are packed
little-endian into 32-bit words and written to word address
`page × PAGE_BYTES/4 + n`. Instruction pages are at flash address
`page × PAGE_BYTES`, data pages at `IMEM_WORDS × 4 + page × PAGE_BYTES`.
With SCK at half the GPC clock (`HALF_DIV = 1`), a 256-byte page takes
(32 + 2048) × 2 + 2 = 4162 clocks.

## Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 24576 | GPC instruction SRAM, 32-bit words (96 KiB) |
| `DMEM_WORDS` | 32768 | GPC data SRAM, 32-bit words (128 KiB) |
| `PAGE_BYTES` | 256 | flash page size loaded per request |
| `HALF_DIV` | 1 | GPC clocks per SCK half period |
| `RST_HOLD` | 2 | always-on clocks between isolation release and GPC reset release |

The NanoController sizes (128 nibbles, 16 bytes, 8-bit data) are constants in
`nano_pkg`.

## Example: the door-lock control program

`tb/nano_app_pkg.sv` assembles the always-on part of an electronic door
lock: a software clock (data byte 1 advances every `TICKS` passes of the
idle loop), polling of a proximity sensor, and on a detection: switch the
GPC on, count down a time-out with `DJNZ`, switch it off on its shut-down
request (`GPIO_OUT = 0x40`) or on time-out (`0x80`), wait until the domain is
off, and return to polling. It is 100 nibbles (50 of the 64 bytes) and uses 4
data bytes. Its idle loop is 17 cycles (23 when the clock byte advances),
about 1900 sensor polls per second at 32 kHz.

Because an 8-bit immediate limits `TICKS` to 255, a clock in true seconds at
32 kHz needs one more counter byte; the example keeps the coarse form.

Measured at the intended clocks (32 kHz always-on, 6.25 MHz GPC, full-size
memories, 256-byte pages, `tb_door_lock_32k`):

| quantity | value |
|---|---|
| proximity sensor to `pm_pwr_en` | at most 31 always-on cycles (≈ 0.97 ms) |
| GPC domain powered, session ending with a shut-down request (boot page + one data page + a few accesses) | ≈ 2.9 ms |
| GPC domain powered, session ending by time-out (255 passes of a 14-cycle loop) | ≈ 112 ms |

Most of the 2.9 ms is the power sequence itself, which advances at the
always-on clock (≈ 31 µs per step, plus the switch model's 2–6 cycles to
power good), and the two 4162-cycle page loads (≈ 0.67 ms each).

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_nano_core`, `tb_nano_controller`: random programs (any nibble stream
  is a valid program) run in lockstep with an instruction-level reference
  model (`tb/nano_ref_pkg.sv`, written from the ISA tables above); PC,
  accumulator, flags, data memory, I/O registers and the cycle count of every
  instruction are compared. All 16 opcodes are executed. The controller test
  also runs the door-lock program against scripted sensor and GPC events.
* `tb_nano_alu`: all operand pairs for every operation.
* `tb_nano_imem`, `tb_nano_dmem`, `tb_sram_sp`, `tb_nano_io`: against
  shadow copies; synchroniser latency checked.
* `tb_gpc_pwr_ctrl`: 200 power cycles with a random-delay switch model;
  ordering of enable, isolation and reset is checked every cycle.
* `tb_spi_flash_boot`: against a behavioural flash (`tb/spi_flash_model.sv`,
  content is a function of the address); word data, addresses and the page
  cycle count are checked.
* `tb_nc_soc_top` and `tb_door_lock_32k`: the whole system at the default
  (full) sizes, in the shared environment `tb/soc_door_lock_env.sv`: the
  door-lock program on the NanoController, a power-switch model, the flash
  model and a behavioural stand-in for the GPC core that checks the booted
  words, requests a data page and then asks to be switched off (or stays
  silent to force a time-out). They count proximity events, power-ups, boot
  loads, on-demand loads, both power-off reasons, software-clock steps and
  clamped requests, fail if any of them never happened, and check the
  reaction time to the sensor. `tb_nc_soc_top` runs the GPC clock 32 times
  faster than the always-on clock (six sessions, well under a second);
  `tb_door_lock_32k` uses 32 kHz and 6.25 MHz (three sessions, a few
  seconds).

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nano_pkg.sv tb/nano_ref_pkg.sv tb/nano_app_pkg.sv \
    tb/tb_nc_soc_top.sv --top-module tb_nc_soc_top
./obj_dir/Vtb_nc_soc_top
```

Replace the testbench name for any other block. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/nano_pkg.sv rtl/nc_soc_top.sv`;
the remaining warnings are unused bits and observation outputs, and
reset nets that also appear in assertions' `disable iff`.

## Size

Coarse synthesis (generic cells, memories kept as memory bits) gives for
`nano_controller` about 136 word-level cells and 60 flip-flops plus about 690
memory bits, 640 of them the two memories (512 instruction, 128 data). The published NanoController logic
is about 220 standard-cell gates; the numbers here are not gate counts and are
not directly comparable. The SRAM models are not meant for synthesis; a real
implementation uses vendor macros.

## What follows the published design and what does not

Taken from the published system: the two-domain split and the role of each
part; an accumulator/flag NanoController with 16 instructions of 4 bits
covering load/store, increment/decrement, compare and conditional branch; an
8-bit data path; multi-cycle execution with variable-length literals; 64 B
instruction and 16 B data memory as flip-flop arrays; GPC memories of 96 KiB
and 128 KiB SRAM; a hardware bootloader that loads pages from SPI flash on
power-up and on demand; on/off control of the GPC by the NanoController and
shut-down requests from the GPC.

This design's own choices, where the published description gives no detail:

* the opcode list, its encoding and the flag rules; the literal format;
  one nibble per cycle with execution in the last literal cycle;
* the instruction encoding is not tuned to minimise switching activity, which
  the published design does for its target programs;
* the I/O map and the program-load port;
* the power sequence, isolation clamp, synchronisers and `RST_HOLD`;
* the bootloader's flash command, page size, flash layout, byte order, the
  automatic first page and the request handshake;
* the SRAM macro pins.

Not included: the GPC processor core (a generated 32-bit
transport-triggered-architecture core), its SPI/I2C/UART/GPIO peripherals,
the analog power and clock management, and the pad ring and debug interfaces
of the prototype chip.
