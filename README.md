# Sobel edge detection and VGA display on a processor bus

This is a small system-on-chip that finds the edges in a gray-scale image and
shows the result on a monitor. Both jobs are done by hardware IPs on a shared
processor bus. The processor only writes their control registers:

1. Software places a gray-scale image in external memory.
2. It points the **edge-detection IP** at the image and at a free result
   area, and sets a start bit.
3. The IP's address generator streams the image through a Sobel filter and
   writes the result back row by row. When the image is finished it sets a
   completion bit and, if enabled, raises an interrupt.
4. Software points the **display IP** at the result and sets its enable bit.
5. The display IP's address generator reads the frame buffer again for every
   frame. It shows the frame on a 640x480 @ 60 Hz VGA monitor.

The structure follows a published FPGA prototyping setup. In that setup the
processor is a MicroBlaze soft core, the bus is the processor local bus, and
the memory is DDR. The setup names the blocks and says what each one does,
but it does not give their internals. The internals here are this design's
own: the bus protocol, the register map, buffering, sequencing, clocking and
the gradient approximation. Each file's opening comment says which parts
come from the source and which are choices made here.

The processor and the external memory are not part of the RTL. They connect
through two ports of the top module, `edge_display_soc`:

- `cpu_*`: a bus master port for the processor.
- `mem_*`: a bus slave port for the memory controller.

The UART that sits on the same bus in the original system is not included.

```
             cpu_* (processor)                mem_* (external memory)
                   |                                  ^
   +---------------v----------------------------------+------------------+
   |                         plb_bus                                     |
   |   masters: 0 display  1 processor  2 edge detection (fixed priority)|
   |   targets: memory | edge-detection registers | display registers    |
   +----^-------------------------^----------------^------------^--------+
        | regs                    | rd/wr          | regs       | rd
   +----+------+   start  +-------+-------+   +----+----+  +----+---------+
   | sobel_regs|--------->|sobel_addr_gen |   | vga_regs|->| vga_addr_gen |
   +-----------+<--done---+--+---------^--+   +---------+  +--+-------^---+
        | irq                | pixels  | result row           | flush | buffer
        v                 +--v---------+--+                +--v-------+----+
    sobel_irq             |  sobel_core   |                | vga_controller|--> hsync, vsync,
                          | 2 line bufs + |                | timing, pixel |    de, r, g, b
                          | result row buf|                | buffer        |
                          +---------------+                +---------------+
```

## Bus

`plb_bus` uses a simplified request/response protocol, defined in
`edsoc_pkg`. It is not the real processor-local-bus signalling.

- **Requests.** A request is `{we, addr[31:0], wdata[31:0]}`. It is offered
  with `req_valid` and is taken in the cycle that `req_ready` is high.
- **Writes.** Writes are posted: they get no response.
- **Reads.** Every read gets exactly one `rsp_valid` cycle with `rsp_rdata`.
  A master's reads are answered in the order they were issued.
- **Pixels.** A pixel is one byte at a byte address. It travels in bits
  [7:0]; the other bits are ignored.

**Arbitration.** Fixed priority, with one grant per cycle: display first,
then processor, then edge detection. The display goes first because it must
keep pace with the monitor. The display limits its own traffic (see the
buffer credit below), so the other two masters always get the rest of the
cycles.

**Address decode.** Bit 31 clear selects external memory.
`0x8000_0xxx` selects the edge-detection registers, and `0x8000_1xxx` the
display registers. Reads of any other address return 0, and writes to them
are dropped.

**Read routing.** Memory reads are pipelined, so several can be in flight.
For each one, the bus puts the issuing master's number into a routing queue
(`TAG_DEPTH` entries). Each memory response goes to the master at the head
of the queue. Register reads answer one cycle after the grant. A master's
register read waits until it has no memory reads in flight, which keeps its
responses in order.

**What the memory port must do:**

- Answer reads in order.
- Answer no earlier than one cycle after taking the request.
- Drive `mem_req_ready` without looking at `mem_req_valid`, because the
  grant depends on `mem_req_ready`.

## Registers

Offsets are from the IP's base address. All registers are 32 bits.

| IP | offset | name | bits |
|----|--------|------|------|
| edge detection | 0x00 | CTRL | [0] START: write 1 to start (ignored while busy); reads 1 while busy. [1] IRQ_EN |
| | 0x04 | STATUS | [0] DONE: set at completion, write 1 to clear. [1] BUSY |
| | 0x08 | SRC | source image base address |
| | 0x0C | DST | result image base address |
| | 0x10 | SIZE | [31:16] height, [15:0] width (read only) |
| display | 0x00 | CTRL | [0] ENABLE, applied at the next frame boundary |
| | 0x04 | STATUS | [0] UNDERFLOW: sticky, write 1 to clear. [1] DISPLAYING |
| | 0x08 | FB | frame buffer base address |

`sobel_irq` is high when both DONE and IRQ_EN are set.

Images are stored row after row, one byte per pixel, with a row stride equal
to the width: pixel (x, y) is at base + y·IMG_W + x.

## Edge-detection IP

### The filter (`sobel_core`)

Pixels enter at most one per clock, in raster order. Two line buffers hold
the previous two rows. A 3x3 window of registers shifts one column left on
every pixel.

When pixel (x, y) arrives with x ≥ 2 and y ≥ 2, the window is centred on
(x−1, y−1). From it the core computes:

```
Gx = (p[-1][+1] + 2 p[0][+1] + p[+1][+1]) - (p[-1][-1] + 2 p[0][-1] + p[+1][-1])
Gy = (p[+1][-1] + 2 p[+1][0] + p[+1][+1]) - (p[-1][-1] + 2 p[-1][0] + p[-1][+1])
out = min(255, |Gx| + |Gy|)          p[row offset][column offset]
```

One cycle later the result goes into a result-row buffer of `IMG_W` bytes.
The first and last columns of that buffer always read as 0. `|Gx| + |Gy|`
replaces the exact magnitude sqrt(Gx² + Gy²). No threshold is applied, so
the output is a gray-level edge-strength image.

### Row sequencing (`sobel_addr_gen`)

Fetching a row and writing a row never overlap:

```
for y in 0 .. H-1:
    read row y (W pipelined reads; responses stream into sobel_core)
    if y >= 1:
        wait for the 2-cycle filter pipeline to drain
        write result row y-1 to DST + (y-1)*W   (row 0 written as zeros)
write result row H-1 as zeros
pulse done
```

Only one result row is ever buffered. The row buffer is written while row y
streams in, and is read out before row y+1 starts.

**Cost.** Each pixel is read once and written once. That makes about
2·W·H bus transfers per image (614,400 at 640x480). Alone on the bus, the
full-size image takes 616,799 clock cycles, which is 12.3 ms at 50 MHz.
While the display is also running it takes 941,515 cycles, because the
display has priority on the bus.

## Display IP

### Timing (`vga_timing`, `vga_controller`)

The pixel rate is the system clock divided by `CLK_DIV`: 50 MHz / 2 =
25 MHz. The standard 640x480 mode is 25.175 MHz. The small difference is
within what monitors accept: 59.5 Hz instead of 59.94 Hz.

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

- Both syncs are active low.
- All monitor outputs are registered and change only on pixel ticks.
- The gray value drives red, green and blue equally. The top `COLOR_W` bits
  are used, so a board with a narrower DAC sets `COLOR_W`.

### Fetching the frame (`vga_addr_gen`)

Once per frame, at the first line of vertical blanking (line 480), the
address generator restarts:

1. It stops issuing reads.
2. It waits until every read it has in flight has returned.
3. It empties the pixel buffer.
4. It samples ENABLE and FB.
5. If enabled, it reads the `IMG_W·IMG_H` pixels from FB upward.

The generator issues a read only while `pixels in buffer + reads in flight <
FIFO_DEPTH`. This credit rule means a returning pixel always has room, so
the buffer can never overflow.

**Underflow.** If memory is too slow, a visible pixel can find the buffer
empty. That pixel is shown black, and UNDERFLOW is set. Because the
generator restarts at every frame, the next frame is aligned again.

**Bus load.** The display reads one pixel every 2 clocks, so it uses half of
the bus cycles.

## Parameters of `edge_display_soc`

| parameter | default | meaning |
|---|---|---|
| IMG_W, IMG_H | 640, 480 | image size = visible screen size |
| CLK_DIV | 2 | system clocks per pixel |
| FIFO_DEPTH | 64 | display pixel buffer (power of two) |
| TAG_DEPTH | 16 | memory reads in flight on the bus (power of two) |
| COLOR_W | 8 | bits per colour output |
| H_FP, H_SYNC, H_BP, V_FP, V_SYNC, V_BP | 16, 96, 48, 10, 2, 33 | porch and sync lengths |

**Sizes.** The image size is the screen size. The source gives only the
display mode, so a result image fills the screen exactly. On chip, the
design holds three 640-byte row memories, the 64-byte pixel buffer and
about 430 flip-flops. The external memory needs W·H bytes for each source
image and each result image.

## Departures and limits

- **Bus.** The processor-local-bus signalling is replaced by the simpler
  protocol above. Connecting a real soft processor and memory controller
  needs a bridge.
- **Canny.** The original block diagram labels the filter "Canny/Sobel".
  Only Sobel is described there, and only Sobel is built.
- **Not included:**
  - the processor
  - the external memory and its controller
  - the UART
  - the debugger path used to load images (testbenches write the memory
    model directly instead)
- **Performance counter.** A counter of the IP's active period is suggested
  in the source as a possible extension. It is not built.
- **Image size.** Images smaller than the screen, and runtime image sizes,
  are not supported. The size is fixed by parameters.
- **Memory writes.** A 32-bit processor write to memory stores only its low
  byte.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_sobel_core` | 8x6 random, flat and step images with random input gaps; every result row against a reference Sobel, including saturation and borders |
| `tb_sobel_addr_gen` | generator + core + memory model with random stalls: whole result images, no stray writes, busy/done, a cycle bound, two images back to back |
| `tb_sobel_regs`, `tb_vga_regs` | read-back, start only while idle, DONE / UNDERFLOW set and clear, interrupt masking |
| `tb_vga_timing` | default 640x480 timing over three frames: line 800, frame 420,000 ticks, sync positions and widths, 307,200 visible pixels |
| `tb_vga_controller` | tiny screen: pixel order, black when disabled, underflow count, outputs change only on ticks |
| `tb_vga_addr_gen` | per-frame restart, addresses, data order, the credit limit with a stalled consumer, no reads while disabled |
| `tb_plb_bus` | three random masters to memory and registers: every read value, response order, one grant per cycle, priority |
| `tb_edge_display_soc` | whole system at the default size (below) |

**The full-system test.** `tb_edge_display_soc` drives the processor port
with a bus functional model. It runs the complete flow at 640x480 with
every parameter at its default:

1. It processes an image and compares the result with a reference, pixel by
   pixel. It also checks the run time.
2. It captures a full VGA frame and compares it with the result.
3. It processes a second image while the first is on screen, switches the
   display to the new result and checks another frame.
4. It slows the memory to force an underflow, then checks that the next
   frame is correct again.
5. It checks that a disabled display is black.

About 12.5 million clock cycles are simulated, roughly 25 s with Verilator.

`tb/ddr_model.sv` is a behavioural memory: a byte array with fixed read
latency and random `req_ready` stalls.

### Running the tests

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/edsoc_pkg.sv tb/tb_edge_display_soc.sv --top-module tb_edge_display_soc
./obj_dir/Vtb_edge_display_soc
```

Substitute any other testbench name to run it instead. The simulator
starts with random values in uninitialised state. All design state that is
read is reset by `rst_n`.
