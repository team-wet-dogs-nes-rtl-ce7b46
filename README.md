# An NES console in SystemVerilog

This is a Nintendo Entertainment System rebuilt as synthesizable SystemVerilog
for an FPGA board. It has a 6502 processor, the picture unit that draws
tiles and sprites, the five-channel sound unit, the glue that maps them into
the CPU address space (with the DMA engines and cartridge bank switching),
two game pads, a VGA output and an AC97 audio codec link. Game ROMs live in
block RAM and are filled through load ports. There is no cartridge
connector.

The design follows a student FPGA project report, "Team Wet Dogs NES
Project". That report names the blocks and describes how most of them work.
Register-level details it leaves out are taken from the console as it is
commonly documented. Those places are listed under "Departures and choices"
below.

## Block diagram

```
               +-----------+   addr/data   +--------------------------------+
  pads <-----> | controller|<------------->|           mapper_dma           |
  (x2)         +-----------+               | address decode, register       |
                                           | strobes, sprite DMA ($4014),   |
 +---------+  addr, dout, we, din, stall,  | sound DMA, NMI hold, banking   |
 | cpu6502 |<----------------------------->|                                |
 +---------+        nmi, nmi_ack, irq      +--+-------+--------+-------+----+
                                              |       |        |       |
                              work RAM 2 KB --+  PRG ROM --+   |       |
                                                 (banked)      |       |
           +-------------------------------------------------- +       |
           |  $2000-$2007                               $4000-$4017    |
      +----v----+  name-table RAM 2 KB          +-----------+          |
      |   ppu   |<-----------------             |    apu    |<---------+
      |         |<----- CHR ROM (banked)        | sq1 sq2   |  sound DMA
      +----+----+                               | tri noise |
           | 256x240 x 6 bit                    | dmc mixer |
      +----v---------+   vga_clk  +----------+  +-----+-----+
      | frame_buffer |----------->|vga_driver|-> VGA |18-bit sample
      +--------------+            +----------+  +-----v-----+
                                                |  ac97_if  |-> AC97 codec
                                                +-----------+
```

`nes_top` wires these together. `nes_pkg` holds the shared types, the 6502
decoder and the sound tables.

## Clocks and the CPU bus (read this first)

There is one main clock, `clk`, the picture clock. The picture unit draws one
dot per clock. The CPU and the sound unit advance only on clocks where the
clock enable `ce` is high, once every `CPU_DIV` = 4 clocks. The report's
picture unit runs four times as fast as the CPU. The real console uses a
ratio of 3, so one CPU cycle here covers 4 dots instead of 3. At a
7.16 MHz `clk` the CPU runs at 1.79 MHz, the console's rate.

A CPU cycle is four clocks long, and the bus works like this:

* `addr`, `dout` and `we` come straight from CPU state, so they are stable
  for the whole CPU cycle.
* The RAMs and ROMs read synchronously. Their data is ready one clock after
  the address, well before the end of the cycle.
* The CPU takes `din` at the clock edge where `ce` is high. Every side
  effect happens on that same edge:
  * memory writes
  * the one-clock register strobes to the picture unit, the sound unit and
    the pads
  * the clear-on-read of `$2002` and `$4015`
  * the pad shift on a `$4016` read

  So each CPU access reaches a register exactly once. The report asked for
  this ("only one PPU cycle").
* `stall` freezes the CPU at any point in any instruction. While it is high,
  the DMA engine in `mapper_dma` owns the bus and uses the same
  one-access-per-cycle timing.

The VGA side runs on its own `vga_clk`. The frame buffer is the only block
that crosses between the two clocks. It is a dual-port memory, so no
handshake is needed; a picture that is being rewritten can tear for one
frame. The AC97 side runs on the codec's `ac97_bit_clk`. The 18-bit sample
crosses into that clock once per audio frame through two registers.

`rst` is synchronous and active high. Hold it for a few cycles of every
clock. Load the ROMs while it is held.

## The processor (`cpu6502`)

`cpu6502` is a multi-cycle state machine for the documented 6502
instruction set:

* 151 opcodes, all addressing modes, binary arithmetic only. The console's
  CPU has no decimal mode, so the D flag is stored but has no effect.
* Undocumented opcodes run as 2-cycle no-ops.
* Every instruction takes exactly the number of cycles in the 6502 table.
  This includes the extra cycle when an indexed read crosses a page, and
  the 1 or 2 extra cycles of a taken branch. Games time themselves by
  counting cycles.
* Read-modify-write instructions make their dummy write.

Interrupts:

* Reset, NMI and IRQ/BRK use the vectors at `$FFFC`, `$FFFA` and `$FFFE`.
* NMI is a level request that `mapper_dma` holds until the CPU pulses
  `nmi_ack`.
* A rising IRQ that arrives while I=1 is remembered as one pending request
  and taken right after `CLI`. Only one is remembered.

`dbg_*` outputs show the registers. `sync` marks opcode fetches.

## The picture unit (`ppu`)

Frame timing is 341 dots by 262 lines:

* Lines 0-239 are drawn. The pixel for x = dot-1 goes to the frame buffer,
  one per clock.
* VBlank starts at line 241, dot 1. That sets status bit 7 and, when
  `$2000` bit 7 is set, raises `nmi`.
* Line 261 is the pre-render line. It clears VBlank, sprite 0 hit and
  overflow.

**Background.** The background pipeline fetches one tile per 8 dots, taking
two dots per memory access:

1. name-table byte
2. attribute byte
3. low pattern byte
4. high pattern byte

The pattern bytes are loaded into 16-bit shift registers that move one bit
per dot. The first two tiles of each line are fetched at dots 321-336 of the
line before. Scrolling works as follows:

* The scroll position is the `$2005` pair plus the base name-table bits of
  `$2000`.
* The horizontal part is latched at dot 257 of every line, so a change
  made in the middle of the frame takes effect on the next line. This is
  the status-bar split that games do with sprite 0.
* The vertical part is latched once, on the pre-render line.

Each attribute byte covers 4x4 tiles, with two bits per 2x2 quarter (layout
`33221100`).

**Sprites.** There are 64 sprites of 4 bytes each: Y-1, tile, attributes, X.
During dots 65-128 each sprite is tested against the line, one per dot:

* The first eight that hit, in OAM order, are kept for the next line.
* A ninth that hits sets the overflow flag. This is the clean version of
  the rule, without the console's hardware bug.

Their pattern bytes are fetched at dots 257-320, with flips applied (8x8 or
8x16). When drawing a pixel:

* The lowest-numbered opaque sprite wins.
* Attribute bit 5 puts that sprite behind an opaque background.
* Sprite 0 hit is set when an opaque pixel of sprite 0 lands on an opaque
  background pixel, except at x = 255. `$2001` left-column clipping is
  applied first.

**Palette.** The palette is 32 entries of 6 bits. Entries `$3F10/14/18/1C`
are the same as `$3F00/04/08/0C`, and colour 0 of any palette shows
`$3F00`. With the `$2001` monochrome bit set, only the grey column of the
system palette is used. The frame buffer stores the 6-bit system colour together with the
three colour-emphasis bits of `$2001` (bits 5, 6, 7: red, green, blue).
`vga_driver` turns the colour into RGB with a fixed 64-entry table. When
any emphasis bit is set, the channels that are not emphasised are dimmed
to 3/4.

**CPU registers.**

* `$2002` reads clear VBlank and the `$2005`/`$2006` write toggle.
* `$2007` reads below `$3F00` return the byte fetched by the previous
  read. Palette reads are direct.
* The CPU may reach video memory only while rendering is off or during
  VBlank, as on the console.

## The sound unit (`apu`, `apu_*`)

* **Frame sequencer (`apu_frame_seq`).** It divides the CPU clock by
  `STEP_CYC` = 7457 to make the 240 Hz quarter-frame tick and the 120 Hz
  half-frame tick, in 4-step or 5-step mode. In 4-step mode it raises a
  60 Hz interrupt unless `$4017` bit 6 inhibits it.
* **Two square channels (`apu_square`).** Each has an envelope, a sweep, a
  timer that clocks the 8-step duty sequencer every second period, and a
  length counter. The output is the envelope level, gated by the sweep
  mute, the duty bit and the length counter.
* **Triangle (`apu_triangle`).** The timer runs at the CPU rate. The
  32-step sequence is 15..0, 0..15. It advances only while both the linear
  counter and the length counter are non-zero.
* **Noise (`apu_noise`).** A 15-bit LFSR with feedback from bit 1 (long
  mode) or bit 6 (short mode). It has an envelope and a length counter.
* **DMC (`apu_dmc`).** This channel streams 1-bit delta samples from CPU
  memory:
  * It asks `mapper_dma` for one byte at a time (`dma_req`). `mapper_dma`
    stalls the CPU for four cycles and returns the byte with `dma_ack`.
  * Each bit moves the 7-bit output up or down by 2.
  * At the end of a sample it can loop or raise an interrupt.
* **Mixer (`apu_mixer`).** It applies the console's non-linear mixing:
  * square = 95.88 / (8128 / (sq1 + sq2) + 100)
  * tnd = 159.79 / (1 / (tri/8227 + noise/12241 + dmc/22638) + 100)

  Both terms come from lookup tables that are computed at elaboration by
  constant functions. The table is 31 entries for the squares and 203 for
  triangle, noise and DMC, indexed by 3·tri + 2·noise + dmc. The result is
  scaled by 2^18 into an unsigned 18-bit sample.

The original project could play only one channel at a time; this mixer sums
all five.

**Codec link (`ac97_if`).** The link runs on the codec's bit clock:

* It holds `audio_reset_b` low for `RESET_CYC` clocks, at least 1 µs.
* It then sends 256-bit frames: a 16-bit tag and twelve 20-bit slots, with
  `sync` high for the 16 tag bits.
* When the codec reports ready, it sends five register writes, one per
  frame:
  * master and headphone volume 0 dB
  * PCM volume
  * variable rate on
  * 48 kHz
* Every frame carries the current sample as two's complement in both PCM
  slots.

## Memory map, DMA and banking (`mapper_dma`)

| CPU address | goes to |
|---|---|
| `$0000-$1FFF` | 2 KB work RAM, repeated every 2 KB |
| `$2000-$3FFF` | picture registers, A[2:0] |
| `$4000-$4013`, `$4015`, `$4017` (write) | sound registers |
| `$4014` (write) | sprite DMA |
| `$4016` (write) | strobe of both pads |
| `$4015` (read) | sound status |
| `$4016`/`$4017` (read) | pad 1 / pad 2, bit 0 |
| `$6000-$7FFF` | 8 KB cartridge SRAM |
| `$8000-$BFFF`, `$C000-$FFFF` | two 16 KB program ROM windows |

**Sprite DMA.** Writing page P to `$4014` stalls the CPU for 513 cycles: one
idle cycle, then 256 reads of `$PP00+i`, each followed by a write to `$2004`.

**Sound DMA.** A sound DMA stalls the CPU for 4 cycles. If a sprite DMA is
running, the sound DMA waits for it to end.

**NMI.** The rising edge of the picture unit's NMI line is held until the
CPU acknowledges it.

**Cartridge banking.** Banking is chosen by the parameter `MAPPER`. A CPU
write to `$8000-$FFFF` stores the written value as a bank number:

| MAPPER | effect of a write to ROM |
|---|---|
| 0 | nothing; 32 KB program (or 16 KB seen twice), 8 KB patterns |
| 1 | value selects the 8 KB pattern bank |
| 2 | value selects the 16 KB program bank at `$8000`; `$C000` is fixed to the last bank |
| 3 | value[7:4] selects the program bank, value[3:0] the pattern bank |

`PRG_BANKS` and `CHR_BANKS` size the ROMs. The load ports of `nes_top` are
sized to match. Not decoded:

* the expansion area at `$4020-$5FFF`, which reads as 0
* mappers with their own serial registers or IRQ counters, such as MMC1
  and MMC3

## Pads (`controller`)

Each pad is polled on its own, `POLL_CYC` = 29830 CPU cycles apart
(60 times a second). A poll goes like this:

1. `pad_latch` is high for 12 µs.
2. Seven pulses on `pad_pulse` follow, each 6 µs high and 6 µs low.
3. The pad's active-low data line is sampled after the latch and after each
   pulse.

Games read the stored buttons through `$4016`/`$4017` in the console's way:

1. Write 1 to bit 0, then 0.
2. Eight reads return A, B, Select, Start, Up, Down, Left, Right in bit 0,
   with 1 meaning pressed.
3. Reads after the eighth return 1.

## Video out (`vga_driver`, `frame_buffer`)

The output is standard 640x480 at 60 Hz from a 25.175 MHz `vga_clk`:

* Each NES pixel is doubled in both directions, giving 512x480, centred
  with a 64-pixel border.
* The frame buffer is 256x240 entries of 9 bits (emphasis and colour).
  The picture unit writes it at its own clock; VGA reads it at `vga_clk`.

## Departures and choices

Places where this design follows the console, or its own choice, instead of
the report:

* **Clock ratio.** The picture unit runs at four dots per CPU cycle, as the
  report states, not three as on the console. Picture timing counted in CPU
  cycles is therefore 4/3 of the console's: a frame is 22,335 CPU cycles
  instead of 29,780. Games that count cycles between VBlank and a mid-frame
  effect will see the effect lower on the screen.
* **Sprite DMA address.** The report says the DMA starts on a write to
  `$4016` in one place and `$4014` in another. `$4014` is used, because
  `$4016` is the pad port.
* **Triangle timer.** The report says it is clocked by the frame sequencer.
  Here it runs on the CPU clock; only its counters use the frame ticks.
  This matches the console and the pitch range.
* **Button order.** The report lists "A B Start Select". The pad actually
  shifts A B Select Start, and that order is used.
* **Mixing.** The sound mixer sums all channels. The original played one at
  a time.
* **Sizes and tables.** The following are not given by the report and come
  from the console:
  * sprite DMA length
  * split of the style-3 bank value
  * 240-line / 262-line frame and the fetch schedule
  * sound register layout and tables
  * AC97 register settings
  * RGB palette
  * The 3/4 dimming used for colour emphasis
* **Not built.**
  * Cartridge reader: the report did not build one. ROM contents enter
    through the load ports.
  * The AC97 codec chip itself, which is outside the FPGA.
  * Mid-frame `$2006` scroll writes.
  * The console's sprite-overflow bug.
  * The expansion area of the memory map.

## Simulating

Every module in `rtl/` has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/nes_pkg.sv rtl/*.sv tb/ppu_tb.sv \
          --top-module ppu_tb -Mdir obj_ppu
./obj_ppu/Vppu_tb
```

The same command works for any `tb/<name>_tb.sv` with `--top-module
<name>_tb`. The most useful ones:

* **`nes_top_tb`.** A complete console with mapping style 3, four program
  banks and two pattern banks. The frame step and poll period are
  shortened. The testbench assembles a small game program into the
  program ROM and loads it. The program:
  * waits for VBlank and writes the palette
  * writes and reads back the cartridge SRAM
  * builds nine sprites on one line and copies them with sprite DMA
  * switches banks
  * starts a tone and a DMC sample
  * enables the frame IRQ, NMI and rendering
  * reads pad 1 in its NMI handler

  The testbench counts every mechanism and fails if any never happened:
  CPU stall cycles, sprite DMA, sound DMA, NMI, IRQ, bank swap, VBlank,
  sprite 0 hit, sprite overflow, pad polls and reads, VGA frames, AC97
  frames and sound output changes. It also checks RAM results, frame
  buffer pixels and the stall count (513 plus 4 per sound DMA).
* **`nes_top_full_tb`.** The same program on `nes_top` at its default
  parameters, for six frames. There is no banking, and the frame step and
  poll period are the real ones.
* **`ppu_tb`.** Random name tables, pattern data and palettes plus twelve
  sprites. Two whole frames (unscrolled and scrolled) are compared pixel by
  pixel with a reference model. It also checks VBlank/NMI timing, the
  flags, `$2007` buffering and that the emphasis bits reach every pixel.
* **`vga_driver_tb`.** One whole VGA frame: sync positions and widths,
  the frame-start pulse, and every visible pixel's RGB, including the
  emphasis dimming.
* **`cpu6502_tb`.** Checks results and the cycle count of every instruction
  against the 6502 table, under random stalls, with a pending IRQ and an
  NMI.

Sizes worth changing are parameters:

* `nes_top`: `MAPPER`, `PRG_BANKS`, `CHR_BANKS`, `STEP_CYC`, `POLL_CYC`
* `vga_driver`: the VGA timing
* `ac97_if`: `RESET_CYC`
* `nes_pkg`: `CPU_DIV`
