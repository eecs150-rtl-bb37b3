# Line-drawing graphics processor for an 800x600 frame buffer

A small processor system (a MIPS-style CPU with a 16-bit-per-pixel, 800x600
frame buffer in SRAM) can draw a line in software, but that costs many
instructions per pixel. Here the CPU only writes a *command list* into its
data memory and tells a graphics processor where the list starts. The graphics
processor fetches the list itself by DMA, using only the data-memory cycles the
CPU leaves idle, and draws every line with a hardware Bresenham engine at one
pixel per clock cycle. A vertical blanking interrupt (VBI) marks the end of
each displayed frame. This tells software when to start the next frame's list.

The RTL contains these blocks:

| module | role |
|---|---|
| `gfx_top` | the three new parts wired together; everything else of the system is reached through its ports |
| `dmem_arbiter` | shares the data-memory port between the CPU and the DMA; the CPU always wins |
| `graphics_processor` | `gp_dma` + `gp_parser` + `line_engine` |
| `gp_dma` | streams consecutive command words from memory into a 4-word prefetch FIFO |
| `gp_parser` | decodes commands and hands lines to the line engine |
| `line_engine` | Bresenham line drawing, one pixel per cycle, with stall |
| `vbi_gen` | raises the VBI when the video read-out reaches the last pixel of the frame |
| `gp_pkg` | shared widths, the command opcodes and the command/coordinate structs |

The CPU, its memories, the memory-mapped I/O decoder, the frame buffer, the SRAM
controller, the video address generator, the colour padding and the DVI output
are outside this RTL. `gfx_top` has a port for every signal by which they meet
the new blocks.

## Command lists

Every command is one or more 32-bit words. The first word's top byte,
`inst[31:24]`, is the command type:

| type | meaning | words |
|---|---|---|
| `0x00` STOP | end of list; the graphics processor goes idle | 1 |
| `0x01` LINE | draw a line in colour `inst[15:0]` | 3: command, endpoint A, endpoint B |

An endpoint word holds two 16-bit halves, `0xXXXX_YYYY`. Only the low 10 bits
of each half are used, which covers 0..1023 and therefore the 800x600
screen. Bits `[23:16]` of a LINE word are ignored. Any other type ends the list
as STOP does and also pulses `gp_bad_op`. The following list draws a blue
line and then a red one:

```
0x4000: 0x0100_001F   LINE, colour 0x001F
0x4004: 0x0010_0020   (0x10, 0x20)
0x4008: 0x001A_002B   (0x1A, 0x2B)
0x400C: 0x0100_F800   LINE, colour 0xF800
0x4010: 0x0123_0124   (0x123, 0x124)
0x4014: 0x00AA_00BB   (0xAA, 0xBB)
0x4018: 0x0000_0000   STOP
```

To run a list, write its byte address to the GP_CODE register. In `gfx_top`
that write is `gp_code_we` with the address on `gp_code`. The
memory-mapped address decoding that produces this strobe is outside this RTL.
A write always restarts the processor, even while a list is running. The old
list is abandoned at once, and so is the line in progress. The processor does
not restart by itself at each frame: software writes GP_CODE once per frame,
normally in the VBI service routine.

New command types are added to `gp_pkg::gp_op_e` and handled by a case item
in the `S_CMD` state of `gp_parser`, with further states for their argument
words.

## How a list runs

```
 GP_CODE write ──► gp_parser ──start/addr──► gp_dma ──req/addr──► dmem_arbiter ──► data memory
                      ▲   │                   │  ▲                     │
                      │   │◄──word/pop───FIFO─┘  └──gnt, rvalid/data───┘
                      │   ▼
                      │  line_engine ──pixel {x,y}, colour──► frame buffer
                      └──ready────┘          ◄──stall───────
```

1. **Fetch (`gp_dma`).** The GP_CODE write loads the DMA start address. From
   then on the DMA requests consecutive words (address +4) whenever the FIFO,
   together with reads still in flight, has room. A request waits until
   `dmem_arbiter` grants it. The grant comes in the same cycle whenever the
   CPU is not using the memory. The data returns `READ_LATENCY` (1) cycles
   later and is queued in the FIFO. The DMA accepts read data of any
   latency, provided it returns in order.
2. **Decode (`gp_parser`).** The parser pops the command word, then the two
   endpoint words, and waits until the line engine is ready. It hands the line
   over in one `start` cycle and goes straight on to the next command. The
   next command is therefore fetched and decoded while the current line is
   being drawn.
3. **Draw (`line_engine`).** See the next section.
4. **STOP.** The parser stops the DMA, which flushes its FIFO, and pulses
   `gp_list_done`. `gp_busy` stays high until the last line has been drawn.

**Restart and stale data.** A GP_CODE write or a STOP flushes the FIFO. With
a memory slower than one cycle, words of the old stream may still be on
their way. The DMA counts how many reads were outstanding at the flush and
throws that many returns away, so no word of an old list reaches the parser.

## The line engine

The engine computes the integer Bresenham line. Its arithmetic follows the
classic software routine step for step, so its pixels match that routine
exactly:

* *steep* = |y1−y0| > |x1−x0|. A steep line is drawn with x and y
  exchanged, so that the major axis is always the one that counts.
* The endpoints are ordered so that the major coordinate counts up.
* `deltax` = major span, `deltay` = |minor span|, `error` starts at
  `deltax/2`, and `ystep` is ±1.
* For every pixel: output it (with x and y exchanged back if steep), then
  `error -= deltay`. If the result is negative, the minor coordinate moves by
  `ystep` and `error += deltax`.

All the set-up work (two absolute differences, the comparison, two conditional
exchanges, the deltas) is combinational logic in the `start` cycle, and
registers capture the result. The drawing state then produces one pixel per
cycle. The per-pixel work is one subtraction, a sign test and an
add-or-keep. **A line of N pixels (N = max(|dx|,|dy|)+1) occupies the engine
for N+1 cycles.** `ready` returns in the cycle after the last pixel is
accepted. Because the parser already holds the next line, back-to-back lines
cost exactly one idle cycle each on the pixel port. Keeping the set-up in a
single cycle gives the longest combinational path in the design, about two
10-bit subtractions, a compare and some multiplexing. If that path limits the
clock, register the set-up results for one more cycle. Each line then costs
one more cycle.

The error register is 12 bits (`CW+2`), signed; its value always stays within
[−2^CW, 2^CW]. The engine does no clipping: endpoints beyond 799/599 (up to
1023) are drawn as given.

**Stall.** The pixel port is `pix_valid` (shown as `fb_valid`), the coordinate
and the colour. A pixel is written in a cycle when `fb_valid` is high and
`fb_stall` is low. While `fb_stall` is high the engine holds the same pixel,
so nothing is lost; an assertion checks this. Only the engine stops: the DMA
and the parser keep prefetching until the FIFO is full. The frame-buffer
coordinate is packed `{x[9:0], y[9:0]}` (20 bits).

## Sharing the data memory

`dmem_arbiter` has a fixed priority: whenever `mips_en` is high the CPU's
address, write data and byte enables go to the memory, and the DMA's request
waits. The CPU is never stalled. In any other cycle a DMA request is passed
through and granted (`gp_gnt`) in the same cycle. A one-bit pipeline marks
the returning word with `gp_rvalid`. Read data goes to both requesters
unchanged. An assertion checks that a DMA cycle never writes.

## End of frame: the VBI

`vbi_gen` watches the coordinate that the video address generator presents
while reading the frame buffer (`vid_valid`, `vid_crd = {x, y}`). On the first
cycle that the coordinate is the frame's last read (y = 599 and
x ≥ 800 − `X_STEP`), it pulses `vbi_pulse` and sets `vbi_irq`. `vbi_irq`
stays high until `vbi_ack`. The address must leave the last read before the
interrupt can be requested again, so holding that coordinate for several
cycles requests only once. `X_STEP` = 1 suits a read-out that steps one pixel
at a time; set it to 2 if the address generator steps through pixel pairs.

A typical frame loop in software:

1. The VBI handler acknowledges the interrupt and clears the frame buffer, or
   lets the hardware clear it as described below.
2. The handler writes GP_CODE with the list prepared during the previous
   frame. Lists usually alternate between two memory areas, for example
   0x4000 and 0x5000.
3. While the graphics processor draws, the main program writes the next
   frame's list into the other area.

This RTL does not erase frames. Software can clear the frame buffer. A
frame-buffer extension can write zero behind the video read-out. The graphics
processor can also redraw the previous frame's lines in black. All three
options depend on the frame-buffer write path, which is outside these blocks.

## Interfaces and timing of `gfx_top`

All logic is clocked on `clk`'s rising edge. The reset `rst` is synchronous
and active high. It clears the state machines, counters and valid bits but
not the datapath registers.

| port | dir | width | timing |
|---|---|---|---|
| `mips_en`, `mips_we`, `mips_addr`, `mips_wdata` | in | 1, 4, 32, 32 | CPU access; always accepted |
| `mips_rdata` | out | 32 | memory read data, passed through |
| `dmem_en`, `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 4, 32, 32 | to a synchronous memory |
| `dmem_rdata` | in | 32 | valid `READ_LATENCY` cycles after the address |
| `gp_code_we`, `gp_code` | in | 1, 32 | one-cycle GP_CODE write; restarts the processor |
| `fb_valid`, `fb_crd`, `fb_color` | out | 1, 20, 16 | pixel; written when `!fb_stall` |
| `fb_stall` | in | 1 | holds the pixel |
| `vid_valid`, `vid_crd` | in | 1, 20 | video read-out coordinate `{x, y}` |
| `vbi_irq`, `vbi_pulse` | out | 1, 1 | level until `vbi_ack`; one-cycle strobe |
| `vbi_ack` | in | 1 | clears `vbi_irq` |
| `gp_busy`, `gp_line_done`, `gp_list_done`, `gp_bad_op` | out | 1 each | status: running; a line's last pixel written; STOP read; unknown command read |

Parameters (defaults): `CW` 10 (coordinate bits), `PW` 16 (colour bits),
`DMA_DEPTH` 4, `READ_LATENCY` 1, `WIDTH` 800, `HEIGHT` 600, `X_STEP` 1.

Best-case throughput is one pixel per cycle plus one cycle per line. A
full-width line (800 pixels) takes 801 cycles. At 75 frames per second a
frame lasts about 13.3 ms, so the pixel budget per frame is f_clk/75 minus
stall cycles, for example about 666,000 pixels at 50 MHz.

## What is specified and what is chosen here

These points come from the specification: the STOP/LINE formats and the 0xXXXX_YYYY endpoints; the use of only 10 bits of each coordinate; the 16-bit colour and the 800x600 screen. It also gives the start on a GP_CODE write and execution until STOP. It further specifies Bresenham's algorithm at one pixel per cycle, a stall input that loses no pixel, DMA that takes only free data-memory cycles, and a VBI at the end of the frame read-out.

The following are choices made in this design:

* the one-cycle combinational line set-up;
* the overlap of fetching with drawing;
* the 4-word prefetch FIFO;
* the request/grant/read-valid handshake and one-cycle memory latency;
* the `{x, y}` packing of the 20-bit coordinate;
* the VBI trigger point and its level-plus-acknowledge form;
* the handling of unknown commands;
* what happens on a GP_CODE write during a running list;
* synchronous reset.

The address of GP_CODE in the CPU's I/O map is not defined here.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`line_ref_pkg` is an independent, plain-code Bresenham model that several of
them share.

* `tb_line_engine`: fixed lines (a single point, full width, full height, every
  octant, backwards diagonals, the 10-bit limit) and 300 random lines, half of
  them under 40 % random stall. Each pixel, the `done` pulse and, without
  stall, the N+1-cycle latency are checked. `clear` is also tested in mid-line.
* `tb_gp_dma`: random grants and random pops, with a two-cycle memory that
  keeps reads in flight at a restart. The words must be exactly the
  consecutive words of the current stream. A full FIFO must stop requests.
  STOP must end the stream.
* `tb_gp_parser`: random lists with random gaps and a line-engine model that
  stays busy for a random time. Checked: lines in order with their colour and
  coordinates, STOP and unknown commands, restart, and fetching during drawing.
* `tb_dmem_arbiter`: random CPU and DMA traffic against a memory model.
* `tb_vbi_gen`: a 16x8 raster with idle gaps and a held last read. Exactly one
  request per frame, held until acknowledged.
* `tb_graphics_processor`: the example list and random lists. Without stall
  there must be exactly one idle cycle per line after the first. A busy
  memory and a stalling frame buffer are then added.
* `tb_gfx_top`: the whole design at its default size. Models of the data
  memory, a CPU issuing random loads and stores, a frame buffer stalling 25 %
  of the time and an 800x600 raster scan surround it. Five frames run the
  alternating 0x4000/0x5000 frame loop described above: the example lines,
  the same lines moved by one pixel, then random lists written by CPU stores
  through the arbiter. One frame restarts the processor in mid-list with a
  list of two full-screen diagonals that ends in an unknown command. All
  pixels are checked in order, and the frame buffer is checked for the
  example's endpoints. The test counts each mechanism (stalls, CPU accesses
  during a list, LINE/STOP, steep and reversed lines, VBIs, the restart, the
  unknown command) and fails if any of them never happened. It runs about
  2.4 million cycles in a few seconds.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_gfx_top rtl/gp_pkg.sv tb/line_ref_pkg.sv tb/tb_gfx_top.sv
./obj_dir/Vtb_gfx_top
```

Replace the top module and file for any other testbench. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/gp_pkg.sv rtl/gfx_top.sv`.
The testbenches were run with two-state simulation and random initial
values. Everything that is read is reset or initialised first.

## Limits

* No timing closure has been done; see the note on the line set-up path.
* Frame erasing and the GP_CODE address decoding are not included.
* Lines are not clipped to 800x600.
* The DMA reads one word per free cycle at most and never bursts.
