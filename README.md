# NES console in SystemVerilog

A Nintendo Entertainment System built as synchronous RTL for a Cyclone IV class
FPGA board (DE2-115 style: 2 MB SRAM, VGA DAC, audio codec, GPIO). Its parts:

- a 6502-compatible CPU
- the 2A03 peripherals: APU, 2 KB work RAM, OAM DMA and the controller port
- a PPU whose picture goes to a standard 60 Hz VGA monitor with 31.5 kHz lines
- a mapper-0 (NROM) cartridge held in block RAM
- a loader that copies one of 16 games from the board SRAM into that cartridge RAM

It is based on the "NES Emulation on FPGA" project report. This design goes
into more detail where the report does not, and each such point is marked as
an own choice in the file headers.

```
             +-------------------- nes_top (one 21.477 MHz clock) --------------------+
 SRAM  ----> | game_loader --> cart_nrom (PRG 32K, CHR 8K BRAM)                        |
 switches    |                   |PRG              |CHR (2 read ports)                 |
 key         |  cpu_6502 <--> nes_cpu_bus <--> ppu_top (regs, VRAM, OAM, palette,       |
             |     ^  ^          |   |   |          bg, sprites, merge, line buffer,    | --> VGA
             |  NMI|  |IRQ    nes_ram |  apu_top     VGA generator)                     |
             |     |  +---------------+--(frame IRQ)   |                                | --> audio sample
 pads  <---> |  nes_ctrl_if     oam_dma (halts CPU, copies page -> $2004)               |
             +--------------------------------------------------------------------------+
```

## Clocking

Everything runs on one master clock of 21.477 MHz. `nes_clkgen` makes the clock
enables:

- CPU and APU: master/12 (1.79 MHz)
- PPU dot: master/4 (5.37 MHz)
- VGA dot: master/2

Each PPU dot therefore has four master cycles, numbered by `ppu_phase`. The PPU
uses them to make four block-RAM reads per dot. The CPU/PPU ratio is exactly
3:1, as in the NTSC console.

## CPU (`cpu_6502`, `cpu_decoder`, `cpu_alu`)

- **State machine:** a multi-cycle machine with one group of states per
  addressing mode (zero page, absolute, indexed, the indirect forms, JSR/RTS/RTI,
  BRK/interrupts, stack, branches, read-modify-write). The control vector of each
  opcode comes from `cpu_decoder`, which uses the regular aaa-bbb-cc layout of
  the opcode map.
- **Memory timing:** the address is combinational and the read data arrives in
  the next CPU cycle. Memories are synchronous RAMs clocked on the CPU enable, so
  a read of a new address costs no extra cycle.
- **ALU:** `cpu_alu` registers its outputs (add, xor, or, and, shift left, shift
  right, hold). An instruction's ALU step and register write-back therefore
  overlap with the fetch and decode of the next instruction. This gives the
  6502's cycle counts, e.g. 2 cycles for immediate and implied ops and 3 for
  zero page.
- **Cycle counts:** branches take 2/3/4 cycles. Page crossings add a cycle on
  indexed reads; indexed writes and RMW always take the extra cycle.
- **Interrupts:** NMI is edge-triggered and IRQ level-triggered with the I flag.
  Both are polled at the instruction boundary and enter through a 7-cycle BRK
  sequence that pushes B=0.
- **DMA halt:** `rdy` freezes the CPU while OAM DMA owns the bus.
- **Departures from the 6502:** decimal mode is not implemented (the D flag is
  stored but ignored), as on the 2A03. Undocumented opcodes run as 2-cycle NOPs.

## CPU bus and 2A03 peripherals

The CPU memory map is decoded by `nes_cpu_bus`:

| Range | Target |
|---|---|
| $0000-$1FFF | `nes_ram`, 2 KB, mirrored |
| $2000-$3FFF | PPU registers, 8 mirrored |
| $4000-$4013, $4015, $4017 (write) | APU |
| $4014 | OAM DMA |
| $4016, $4017 (read) | controllers |
| $4020-$FFFF | cartridge |

Reads of unmapped addresses return the last value read (open bus).

**OAM DMA (`oam_dma`).** A write to $4014 halts the CPU. After one alignment
cycle, plus one more if the write ended on an odd CPU cycle, the engine makes
256 read/write pairs from $YY00-$YYFF to $2004. That is 513 or 514 CPU cycles,
and the engine owns the bus for all of them.

**Controllers (`nes_ctrl_if`).** Bit 0 of a $4016 write drives the shared latch
line. Each read of $4016 or $4017 returns the inverted data bit of pad 1 or 2
and pulses that pad's clock, which shifts the next button out of the pad's 4021
shift register. Bit 6 of the read value is 1, the usual open-bus value.

## PPU (`ppu_top`)

**Timing.** 262 lines of 341 dots. Lines 0-239 are visible and line 261 is the
pre-render line. VBlank (and the NMI, if enabled) starts at line 241 dot 1 and
ends at line 261 dot 1, which gives the game 2273 CPU cycles of VBlank. On odd
frames with rendering on, the last dot of the pre-render line is skipped
(89341.5 dots per frame on average).

**Registers (`ppu_regs`).** $2000-$2007, with the original scroll registers:
`v`, `t`, fine `x` and the write toggle `w`. The background unit shares `v`,
incrementing coarse X every 8 pixels and Y at dot 256, copying the horizontal
bits from `t` at dot 257 and the vertical bits during dots 280-304 of the
pre-render line. Because of this sharing, mid-frame scroll changes behave as on
the console. Other details:

- PPUDATA reads go through a one-byte buffer; palette reads are direct.
- The address increments by 1 or 32.
- OAMDATA writes increment OAMADDR.

**Memories.**

| Memory | Size | Notes |
|---|---|---|
| `ppu_vram` | 2 KB nametables | horizontal or vertical mirroring from the game header |
| `ppu_oam` | 256 B | 64 sprites × 4 bytes |
| `ppu_palette` | 32 × 6 bits | the $3F10/$14/$18/$1C mirrors |
| CHR pattern memory | 8 KB | in the cartridge, with two read ports (background; sprites/PPUDATA) |

**Background (`ppu_bg`).** The original renderer uses shift registers. This
design computes each pixel directly. In the four master cycles of a dot it
reads the nametable byte at `v`, the attribute byte and the two pattern planes
of the current row. It then outputs `{palette, colour}` for that x at the start
of the next dot. The pixel stream lags the dot counter by one dot, but every
increment and copy of `v` happens at the original dot.

**Sprites (`ppu_sprite`).**

- During each visible line, a master-clock state machine scans the 64 OAM
  entries. It keeps the first eight sprites that fall on the next line and sets
  the overflow flag if a ninth is found. The original's faulty overflow search
  is not copied.
- From dot 257 the pattern bytes of those sprites are fetched, with flips and
  8×16 mode applied.
- On the next line the sprite pixel for x is chosen combinationally: the
  lowest-index opaque sprite wins.

**Merger and output (`ppu_merge`, `ppu_linebuf`, `ppu_vga`).**

- `ppu_merge` applies the PPUMASK enables and left-column clipping, and picks
  the sprite or background pixel by the priority bit. It also detects a
  sprite-0 hit, which is never reported at x=255.
- The palette colour is written into a two-bank line buffer.
- `ppu_vga` runs at twice the dot rate and shows line y-1 while line y is being
  drawn. Each PPU line becomes two VGA lines of 341 VGA dots, giving 31.5 kHz
  lines and 524 lines per 60 Hz frame. With the default `VGA_DOUBLE=0` (a parameter of `ppu_top`) the
  second line is black, a scan-line look. With `VGA_DOUBLE=1` the line is
  repeated.
- Horizontal sync is 40 VGA dots after an 8-dot front porch. Vertical sync is
  the two VGA lines of PPU line 250.
- A 64-entry table turns the 6-bit NES colour into 8-bit RGB. The greyscale
  bit of PPUMASK masks the colour to its grey column before it enters the line
  buffer. The three emphasis bits are stored with each pixel. Each set bit
  dims the other two colour channels to 13/16, an approximation of the
  console's analogue attenuation.
- `vga_clk` is master/2 and `vga_sync_n` is tied low.

## APU (`apu_top`)

**Registers and frame counter.**

- `apu_regs` keeps a copy of $4000-$4013. The channels see a write one CPU cycle
  late, together with one-cycle write strobes that restart length counters,
  envelopes and sequencers.
- `apu_status` ($4015) holds the channel enables. Reading it returns the
  length-counter states and the frame IRQ, and clears the IRQ.
- `apu_frame_counter` takes $4017 directly with no delay. It produces
  quarter-frame clocks at CPU cycles 7457, 14913, 22371 and 29829 (4-step mode,
  IRQ at the end unless inhibited), or up to 37281 in 5-step mode.

**Channels.** They follow the NTSC APU:

- `apu_pulse` ×2: 8-step duty sequencer clocked every other CPU cycle, envelope,
  sweep, and length counter. The sweep negates by ones' complement on pulse 1 and
  two's complement on pulse 2.
- `apu_triangle`: 32-step sequencer clocked every CPU cycle, gated by the linear
  and length counters. It holds its level when stopped.
- `apu_noise`: 15-bit LFSR with the NTSC period table and a mode bit.
- `apu_envelope`: the envelope shared by the pulse and noise channels.

**Mixer (`apu_mixer`).** The console's resistor DACs become two lookup tables,
computed at elaboration from the usual fits:

- pulse: 95.52 / (8128/n + 100)
- triangle/noise/DMC: 163.67 / (24329/n + 100)

The result is one 16-bit sample per CPU cycle for the board codec (`audio_sample`,
`audio_valid`).

**Not built.** The delta-modulation channel (DMC) is not built. Its mixer input
is tied to zero and $4010-$4013 are stored but unused.

## Game loading (`game_loader`, `cart_nrom`)

The 2 MB SRAM (1 M 16-bit words) holds 16 slots of 128 KB. The slot is chosen
by `game_sel`. Slot layout, in words:

| Word | Content |
|---|---|
| $0000 | flags: bit 1 = 16 KB PRG, bit 0 = vertical mirroring |
| $0100-$40FF | 32 KB PRG, low byte first |
| $4100-$50FF | 8 KB CHR |

After reset, and on each press of `load_key`, the loader holds the console in
reset. It reads the slot at three master cycles per word and writes PRG, CHR
and the flags into `cart_nrom`. Then it releases the console, which starts at
the game's reset vector. A load takes about 2.9 ms.

`cart_nrom` maps the PRG at $8000-$FFFF. A 16 KB program appears twice.
Mapper-0 games (up to 32 KB PRG and 8 KB CHR) fit. A game whose program is
8 KB, such as Galaxian, must be stored twice in its slot. Games with
bank-switching mappers are not supported.

## Departures from the console, in summary

- **Timing:** one clock with enables instead of separate clock domains.
- **Buses:** separate CPU and PPU buses.
- **Cartridge and loading:** the cartridge lives in block RAM and is loaded
  from SRAM.
- **Rendering:** each background pixel is computed from memory rather than
  shifted out of registers, with the same per-dot cycle counts.
- **Not modelled:**
  - the original's faulty sprite-overflow search
  - PPU open bus
  - VRAM-address corruption by $2007 accesses during rendering
  - the $2002/VBlank race
  - decimal mode and undocumented opcodes
- **Audio:** no DMC; one mixed 16-bit digital sample instead of analogue DACs.
- **Not built:** save states and SD-card loading.

## Where this design differs from the report it is based on

- **CPU control.** The report's CPU steps through a microcode ROM of
  control vectors, one sequence per addressing mode. Here the same sequences
  are a hard-wired state machine, one state group per addressing mode,
  driven by the decoder's per-opcode control vector. The instruction overlap
  (next fetch during the last ALU and write-back step) and the one-cycle
  memory delay are kept.
- **VGA frame.** The report counts 512 VGA lines. Doubling 262 PPU lines
  gives 524, and that is what is generated, so the PPU frame timing stays
  exact. The report reserves PPU lines 243-262 for the vertical sync. Here
  they are blanked, with a two-VGA-line sync pulse at PPU line 250.
- **Cartridge space.** One passage puts the cartridge in board SRAM. The
  system described later copies the selected game into block RAM, which is
  what is built. The SRAM serves only as the game store.
- **Known failures in the report.** The report lists a few failing test
  ROMs: 8×16 sprite-0 hits, sprite-0 timing order, and noise-channel timing.
  This design follows the console's behaviour in those places, but it has
  not been run against those ROMs.
- **Not built.** The DMC channel was removed from the original system, and
  its save states were unfinished. Neither is part of this design. SD-card
  loading and the audio-codec configuration interface are also left out.
  The 16-bit sample output is meant for a codec driver supplied with the
  board.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Area | What the testbenches check |
|---|---|
| CPU | Each instruction's cycle count against a table; memory results of a test program; NMI and IRQ entry timing. The ALU is checked exhaustively against a model; the decoder by opcode class. |
| PPU memories | Against reference arrays, including mirroring. |
| Background unit | Renders whole frames at several scroll positions, nametable selections and pattern tables. Each pixel is compared with a reference computed from the scroll arithmetic. |
| Sprite unit | Compared per pixel against a reference that selects the first eight sprites and the first opaque one; overflow pulses are counted. Covers random OAM in 8×8 and 8×16 mode. |
| VGA | Sync counts and widths, visible-run lengths and colours, in both line modes. |
| APU channels | Tone periods, duty, envelope, sweep (including the pulse-1/pulse-2 negate difference), linear and length counters. The noise LFSR is compared shift by shift. |
| Mixer | Against the formulas. |
| Frame counter | Step spacing, IRQ set/clear and inhibit. |
| Loader and cartridge | Byte-exact loads and PRG mirroring. |

**End to end.** `tb_nes_top` runs the top at its default parameters. A model of
the board SRAM holds a small 6502 program that:

- waits for VBlank
- writes the palette and a nametable tile
- prepares a sprite page
- enables NMI and rendering
- starts a tone and the frame IRQ
- reads the controller in its main loop

The NMI handler starts an OAM DMA. The testbench counts and checks:

- the game load
- NMIs taken
- OAM DMAs and their 513/514-cycle CPU stalls
- frame IRQs handled
- PPUDATA writes
- sprite-0 hits
- odd-frame dot skips
- the length of each VBlank window, 2273-2274 CPU cycles
- the controller byte
- the exact number of sprite and background pixels on the VGA output
- audio activity

The run covers about eight frames and takes a few seconds in Verilator.

**Running a testbench** with Verilator 5 (from the repository root):

```
verilator --binary --timing -y rtl -y tb -Irtl -Itb \
  rtl/cpu_pkg.sv rtl/apu_pkg.sv tb/tb_nes_top.sv --top-module tb_nes_top
./obj_dir/Vtb_nes_top
```

Replace `tb_nes_top` with any other `tb_*` name to run that testbench.

**Sensitivity of the testbenches.** Each testbench was also run against a
copy of its module with one deliberate bug, and failed every time. The bugs
included an inverted overflow flag in the ALU, NMI taken through the IRQ
vector, a missing DMA alignment cycle, a missing odd-frame skip and swapped
sweep negation.

**Not covered by simulation.**

- real game ROMs
- the public CPU, PPU and APU test ROMs
- picture comparison against a reference emulator

The CPU testbench runs a representative program that covers each addressing
mode, taken and untaken branches, and branches that cross a page. It does not
cover every opcode. The decoder testbench checks a set of opcodes against the
opcode map. It also checks that undocumented opcodes decode as no-ops.
