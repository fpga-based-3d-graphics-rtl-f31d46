# Tile-based 3D renderer on an FPGA PCI board, with VGA output

This is synthesizable SystemVerilog for the FPGA part of a PCI-card 3D
graphics processor. The card follows the Hybris tile rendering architecture.
The host PC does the geometry front end and sorts the triangles into
32x32-pixel screen tiles. The FPGA renders one tile at a time in on-chip
memory, writes finished tiles into an external framebuffer, and scans that
framebuffer out to a VGA monitor itself. Finished frames therefore never go
back over the PCI bus.

The target board has a PCI interface chip, a Xilinx Virtex XCV1000 and
four independent 2-Mbyte, 32-bit asynchronous SRAM banks. Two banks are
used as a huge double-buffered input FIFO for triangle data. The other two
form a double-buffered framebuffer.

```
 host --PCI--> [input bank 0] [input bank 1]               (external SRAM)
                     \           /
                  input_mux  (FPGA reads one bank, host fills the other)
                        |
                  input_tri_ctrl  (tile headers + 64-byte triangle records)
                        |  triangles, end-of-tile markers
  tile_engine:    setup_tri -> hs_fifo -> draw_tri -> hs_fifo -> draw_span
                                                                 |  read/modify/write
                                   tile_buffer 0 / 1  <-- tile_xbar (2x2)
                                                                 |
                                                     output_tile_ctrl
                                                                 |  one word per clock
                  fb_xbar (2x2, tristate pins)  <-- fb_swap_ctrl (bank select)
                     /                    \
  [framebuffer bank 0]              [framebuffer bank 1]    (external SRAM)
                        |
                  vga_display (vga_timing + fb_addr_gen)  -> 3x8-bit DAC, hsync, vsync
```

`hybris_top` wires all of this together. It uses two clocks. `clk` runs the
input side and the renderer; the original design ran it at 25 MHz.
`pix_clk` runs the display at 25.175 MHz.

## What the source description fixes and what this design chose

The block structure and the following figures come from the source
description:

- the pipeline stage names;
- depth-one FIFOs between the stages;
- two dual-ported 32x32 colour-and-depth tile buffers behind a 2x2 crossbar
  switched by the output tile controller;
- tile buffers with no reset, so they are cleared by writing;
- the buffer-swapping input multiplexer over two SRAM banks;
- the double-buffered framebuffer in two banks behind a 2x2 crossbar with
  tristate pins;
- two clock domains;
- the tiled framebuffer read out one 32-pixel tile row at a time;
- the VGA timing: 800 clocks per line with 640 visible and a 95-clock hsync,
  525 lines with 480 visible and a 2-line vsync.

The source only names the rasterizer stages (Setup Triangle, Draw Triangle /
Setup Span, Draw Span / Draw Pixel). Their algorithms are described in other
work. The algorithm here is the simplest complete one and is this design's
own, as are:

- the input bank format;
- every handshake;
- all widths other than the 24-bit colour and the 32-bit SRAM words;
- the clear values;
- when the framebuffer banks are swapped.

Each file's header comment says which is which.

## The rasterizer (the part to read first)

All rasterizing is done in tile-relative integer coordinates. The pixel
(x, y) of a tile is sampled at its integer position, with 0 <= x, y < 32.

**setup_tri** takes one triangle:

1. It subtracts the tile origin (tx*32, ty*32) from the vertices.
2. It computes twice the signed area. If the area is negative it exchanges
   v1 and v2, so the triangle becomes counter-clockwise. If the area is zero
   it drops the triangle.
3. It builds, for each edge a->b, `E(x,y) = A*x + B*y + C` with
   `A = ya - yb` and `B = xb - xa`. A pixel is covered when all three E are
   >= 0, so pixels exactly on an edge count as covered.
4. It clips the bounding box to the tile and drops the triangle if nothing
   is left.
5. It computes the depth plane's gradients in 16.16 fixed point with two
   56-bit sequential dividers:
   `dz/dx = ((z1-z0)(y2-y0) - (z2-z0)(y1-y0)) * 2^16 / area` and
   `dz/dy = ((x1-x0)(z2-z0) - (x2-x0)(z1-z0)) * 2^16 / area`.
   The quotients are truncated toward zero. Each divider produces 4
   quotient bits per clock.
6. It evaluates the edges and the depth at the top-left pixel of the box.

This takes 20 clocks per triangle.

**draw_tri** emits one span per box row, one per clock. A span carries:

- its row;
- the box's x range;
- the edge values and depth at its first pixel;
- the x increments (A and dz/dx).

Stepping down one row adds B and dz/dy.

**draw_span** walks the span:

- An uncovered pixel costs one clock.
- A covered pixel reads the tile buffer. The next clock it compares the
  rounded, clamped 16-bit depth with the stored one. If the new depth is
  strictly smaller, it writes colour and depth. This costs two clocks.

Triangles are drawn in input order. Equal depth keeps the earlier triangle.
Depth is unsigned, with 0 nearest.

Every step is an exact integer addition. So the incremental values equal a
direct evaluation of the plane and edge equations at each pixel. The
testbenches' reference model relies on this: it evaluates every pixel
directly, and the hardware must match it bit for bit.

## Tile double buffering and clearing

Block RAM cannot be cleared by a reset, so **output_tile_ctrl** clears by
writing. After reset it clears the buffer on its side, flips the crossbar
(`tile_xbar`), clears the other buffer, and only then raises `buf_ok`.
Clearing means depth 0xFFFF and colour `bg_color`; these take 2048 clocks.

When `draw_span` reaches an end-of-tile marker it raises `tile_valid`. The
controller, if idle, flips the crossbar and acknowledges in the same clock.
The renderer then goes on with the next tile in the other buffer.

Meanwhile the controller reads the finished tile, one pixel per clock. It
writes each colour to the framebuffer and writes the clear value back one
clock behind the read. A copy takes 1026 clocks. The buffer it hands over
at the next switch is therefore already clean.

## Input side

The host writes whole bank images. This avoids many small DMA transfers,
which are slow on PCI. After writing bank b the host pulses `host_full[b]`;
`bank_free[b]` tells it when the bank is empty again. **input_mux** reads
bank 0, then bank 1, then bank 0 again, and so on.

Bank format, in 32-bit words (defined in `hybris_pkg`):

| word | contents |
|---|---|
| tile header | `[31:30]=01`, `[29]` last tile of frame, `[23:12]` triangle count N, `[11:6]` tile y, `[5:0]` tile x |
| N x 16 words | triangle record: words 0-2 `{y[27:16], x[11:0]}` of vertex 0-2 (signed 12 bit); words 3-5 depth in `[15:0]`; word 6 colour `[23:0]`; words 7-15 unused |
| ... | more tiles |
| end of bank | `[31:30]=10` |

Each record is 64 bytes, the per-triangle size of the host's triangle heap.
**input_tri_ctrl** reads the seven used words of a record at one word per
clock. It follows asynchronous SRAM timing: the address is registered onto
the pins and the data is sampled at the next clock. It
sends a triangle per handshake, then an end-of-tile marker. At the end of a
bank it pulses `rd_done`. A tile with N = 0 still produces a cleared tile in
the framebuffer.

## Framebuffer, clock crossing and display

The framebuffer is stored tile by tile:

`address = ((y/32)*20 + x/32)*1024 + (y%32)*32 + x%32`

This is computed by **fb_addr_gen**, which both the output controller and
the display use. One pixel is one 32-bit word, colour in `[23:0]` as R, G, B.

With `sel = 0`, **fb_xbar** gives bank 0 to the renderer (write only) and
bank 1 to the display (read only). The data pins are split into
`fb_dq_o`, `fb_dq_oe` and `fb_dq_i`; `fb_dq_oe` drives the tristate pads.

When the output controller has written the last tile of a frame it pulses
`swap_req`. **fb_swap_ctrl** carries the request to the pixel clock as a
toggle through two flip-flops. At the next start of vertical blanking it
flips `sel`, and an acknowledge toggle comes back. The renderer takes no new
tile until `swap_done`, so `sel`, a pixel-clock register, never changes
while the renderer is using it. The SRAM is asynchronous, so no other
synchronization is needed on the data path.

**vga_display** runs `vga_timing`:

- 16-clock front porch and 49-clock back porch; 10-line and 33-line
  vertical porches;
- negative sync polarity.

These are the usual VGA values; the source does not state them. The
display registers the SRAM address one clock after the pixel position and
the returned data one clock later. It delays syncs and blank by the same
two clocks and outputs black during blanking.

## Throughput

The source reports a 70,000-triangle model (the Stanford Bunny) rendered at
12 frames/s with a 25 MHz render clock. That is at most 2.08 million clocks
per frame, or about 30 clocks per triangle.

In this design the steady-state cost of a small triangle is set by the
input reads (7 clocks) and setup (20 clocks). Small spans then take a few
clocks each in `draw_span`. Copying a tile out (1026 clocks) overlaps with
drawing the next tile.

`tb/tb_bunny_workload.sv` renders a synthetic scene of the same size:
70,000 triangles a few pixels across, scattered over the middle of a
640x480 screen. Binning gives 80,861 tile records, which stream through the
two input banks in three loads. The frame takes 1.71 million clocks, about
14.6 frames/s at 25 MHz, and the testbench fails if it takes more than the
2.08 million clock budget. The real mesh is not available, so this number is
only indicative. The framebuffer swap then waits for the next vertical
blanking, up to one display frame (16.7 ms). The renderer stalls during
that wait, because it must not write into the bank still on screen.

## Departures and omissions

- Storing each tile's depth into a global depth buffer is not built. The
  source mentions it as an option.
- Alpha blending is not built. The read port it would use exists.
- The triangle carries a flat colour. The source does not say what a
  triangle record contains.
- Framebuffer writes hold the write strobe low over consecutive words at
  one word per clock. A real asynchronous SRAM at speed needs its write
  pulse timing met, for example two clocks per word with a strobe gap.
- The alternative input path is not built. It would chain DMA transfers
  into an 8-kbyte input FIFO in spare block RAM, and the source describes it
  only as an option that needs a better driver.
- Parallel tile engines and anti-aliasing are not built. The source names
  them as future work.
- The PCI interface chip, the SRAM chips, the video DAC and the host
  software are outside the FPGA and are not modelled in RTL. The
  testbenches model the SRAMs as arrays.

## Simulating

All RTL is in `rtl/` (package `hybris_pkg.sv` first). Testbenches are in
`tb/`, and each ends by printing `TB_RESULT checks=N failures=M`.
`tb/hybris_ref_pkg.sv` is the pixel-exact reference renderer plus helpers
that build input bank images. Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_hybris_top -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hybris_pkg.sv tb/tb_hybris_top.sv -o sim && obj_dir/sim
```

`tb_hybris_top` runs the full-size design, with no parameters changed:

1. It fills both input banks with a complete 20x15-tile frame of random
   triangles.
2. It lets the FPGA render the frame.
3. It waits for the framebuffer swap.
4. It checks every one of the 307,200 pixels the DAC outputs receive in the
   next frame against the reference.
5. It repeats steps 1-4 with a second, different frame. This reuses both
   input banks and swaps the framebuffer banks back.

It also checks that these mechanisms occur: input bank switching, tile
buffer switching, empty tiles, culling, FIFO stalls, depth rejections and
both bank swaps. It runs in seconds.

The block testbenches are `tb_<module>.sv`. `tb_vga_timing` checks a full
640x480 raster. `tb_vga_display` uses a reduced raster.

To change the screen size, set the `H_*`/`V_*` parameters of `hybris_top`.
The number of tiles per row follows from `H_VIS`. The framebuffer must fit
in 512K words.
