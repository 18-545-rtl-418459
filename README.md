# A fixed-function OpenGL pipeline in SystemVerilog

This design draws 3D triangles in hardware. A host writes a short program of OpenGL
calls (`glVertex`, `glColor`, `glTranslate`, `glPushMatrix`, `glFlush`, ...) into an
instruction memory as 32-bit words. The pipeline then runs the program with no further
help from the host. It transforms every vertex through the modelview and projection
matrices, divides by w, and maps the result onto a 640x480 screen. It then fills each
triangle pixel by pixel with interpolated colour and depth. Finally it writes the
pixels into a double-buffered frame buffer in memory, with a per-pixel depth test.

All arithmetic is IEEE-754 single precision. The three stages have very different
amounts of work:

- the transform does a fixed amount of work per call;
- the rasterizer spends one clock per pixel of a triangle's bounding box;
- the frame buffer writer makes three bus transfers per pixel.

So each stage runs in its own clock domain, and dual-clock FIFOs join them:

```
            ct_clk                      raster_clk                  fbw_clk
 BRAM port ─► coordinate  ─vertex FIFO─►  pre-fetch ─► rasterizer ─pixel FIFO─► frame buffer ─► bus
 (program)    transform   ─colour FIFO─►  unit         core                      writer          (memory,
                                                                                                   DMA,
                                                                                                   display)
```

A stage stalls only when the FIFO in front of it is full.

## Instruction words

Each word is `{type[31], data[30:8], opcode[7:0]}`. When `type` is 1, `data` argument
words follow the instruction, and the fetch unit steps over them. Arguments are floats,
except for `glViewport`, whose arguments are integers. Matrices are sent column-major,
as in OpenGL. An all-zero word ends the program.

| call | type | data | opcode | hardware action |
|---|---|---|---|---|
| glBegin / glEnd | 0 | – | 01 / 02 | none (every three vertices form a triangle) |
| glVertex x y z | 1 | 3 | 03 | modelview, projection, divide by w, viewport; vertex and colour into the FIFOs |
| glColor r g b | 1 | 3 | 04 | current colour register |
| glFlush | 0 | – | 05 | vertex with x = y = z = 0xFFFFFFFF |
| glMatrixMode | 0 | mode | 10 | data bit 0: 0 modelview (0x1700), 1 projection (0x1701) |
| glMultMatrix | 1 | 16 | 11 | top := top × M |
| glLoadIdentity | 0 | – | 12 | top := I |
| glLoadMatrix | 1 | 16 | 13 | top := M |
| glPushMatrix / glPopMatrix | 0 | – | 14 / 15 | stack of the current mode |
| glRotate | 1 | 4 | 16 | arguments skipped; no action |
| glScale x y z | 1 | 3 | 17 | top := top × diag(x, y, z, 1) |
| glTranslate x y z | 1 | 3 | 18 | top := top × T(x, y, z) |
| glViewport x y w h | 1 | 4 | 19 | viewport registers |
| glFrustum / glOrtho | 1 | 6 | 1a / 1b | arguments skipped; no action |

The host is expected to do the trigonometry for rotations, and to build the projection
matrices. It sends the results with `glMultMatrix` or `glLoadMatrix`. The pipeline has
no sine, cosine or reciprocal hardware for building matrices.

Two details are this design's choices:

- `glMultMatrix` is encoded with type 1, so that its 16 words are skipped like those
  of `glLoadMatrix`.
- The `glMatrixMode` immediate is read from bit 0 of the data field.

## Coordinate transform (`coord_transform`)

The instruction cache (`icache`) holds 512 words and is built from logic rather than
block RAM. It has five combinational read ports: one for fetch, and four for the
argument words after the current instruction. Its write port has the shape of a
vendor BRAM port, so a processor bus-to-BRAM bridge can load programs: byte address,
four byte-lane enables, and registered read data.

`fetch` keeps the PC. Each instruction advances the PC by `1 + (type ? data : 0)`.
`fetch` holds the PC while `decode` is busy.

`decode` is a small state machine. It drives two 16-deep matrix stacks
(`matrix_stack`, with the identity at the bottom and the top read combinationally) and
one matrix multiplier. The multiplier (`matrix_mult` plus `matrix_row_comp`) has four
FP multipliers and three FP adders. It computes one element of the product per clock
and writes back one row every four clocks, so a 4x4 by 4x4 multiply takes 16 clocks.

A vertex reuses the same multiplier. The vertex `(x, y, z, 1)` goes in as column 0 of
the B operand, with the other columns zero. The vertex takes 16 clocks against the
modelview top, then 16 clocks against the projection top. Then comes the purely
combinational tail:

- `persp_div`: three dividers;
- `viewport`: three multipliers and three adders;
  - `x + w/2` and `y + h/2` are computed once, when `glViewport` loads the registers;
  - depth maps onto [0, 1].

A `glVertex` costs 34 transform clocks: one to issue, 32 to multiply, and one to write
the FIFOs. The write waits while either FIFO is full. Scale and translate cost one
16-clock multiply each, and load, push and pop cost one clock each.

The vertex and its current colour are written to the two FIFOs in the same cycle. They
are 96-bit words `{x, y, z}` and `{r, g, b}`.

`stack_error` pulses for one clock after a push on a full stack or a pop on an empty
one. The operation itself is ignored.

## Rasterizer (`rasterizer` = `raster_prefetch` + `raster_core`)

The FIFOs are 96 bits wide, so one read gives one vertex and its colour. The pre-fetch
unit collects three reads and offers them to the core (`tri_valid`). The core copies
the set when it is idle, and the pre-fetch unit immediately starts on the next three.
Reading the FIFOs therefore overlaps with scanning the previous triangle.

For each edge a→b the core uses the half function

    f_ab(x, y) = (x_b − x_a)(y − y_a) − (y_b − y_a)(x − x_a)

and keeps three of them (f12, f23, f31). The sequence for each triangle is:

1. **DIFF:** the six differences dx/dy.
2. **SETUP:** the bounding box and the normalisers f23(v1), f31(v2) and f12(v3).
   `raster_bbox` finds the box without any FP comparator. The signs of dx12, dx23 and
   dx31 (and of the dy's) show which vertex is leftmost, rightmost, topmost and
   bottommost. The box runs from floor(min) to ceil(max), clipped to the screen.
3. **START:** the half functions at the box's top-left pixel.
4. **SCAN:** one pixel per clock, left to right and top to bottom. Each step is a
   single FP addition per edge:
   - one pixel right: f −= dy_ab;
   - one row down: f += dx_ab, and the row start is kept.

A triangle therefore costs 3 clocks plus one clock per pixel of its box. The core
drops triangles that have zero area or lie off screen. The scan holds while the pixel
FIFO is full.

`raster_interp` forms the barycentric coordinates α = f23/f23(v1), β = f31/f31(v2) and
γ = f12/f12(v3) from the half functions. A pixel is drawn when none of them is
negative. Colour is α·c1 + β·c2 + γ·c3, scaled by 63 and truncated to 6 bits; z is
interpolated the same way.

The 96-bit pixel word is:

| bits | 95:89 | 88:80 | 79:74 | 73:64 | 63:56 | 55:50 | 49:48 | 47:42 | 41:40 | 39:34 | 33:32 | 31:0 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| field | 0 | y | 0 | x | 0 | red | 0 | green | 0 | blue | 0 | z (float) |

Bits 63:32 form exactly the 32-bit colour word the display controller reads. A flush
leaves the rasterizer as a pixel word of all ones.

## Frame buffer writer (`fbwriter`)

The frame buffer and z buffer memory is laid out as follows:

| region | address | 
|---|---|
| frame buffer 0 | 0x9000_0000 |
| z buffer 0 | 0x9020_0000 |
| frame buffer 1 | 0x9040_0000 |
| z buffer 1 | 0x9060_0000 |

Each region is 2 MB. Pixel (x, y) of a region is at `base + y·4096 + x·4`. Setting
address bit 21 moves from a frame buffer to its z buffer, and address bit 22 moves to
the other set.

For each pixel word the writer does up to three transfers:

1. Read the stored z. A stored 0 means the pixel is empty; otherwise the smaller z
   wins. The comparison is unsigned, which is valid because depths are non-negative
   floats.
2. If the new pixel wins, write the new z.
3. Then write the colour.

A losing pixel costs only the read.

On the flush word the writer:

1. writes the base address of the set it has just finished into the display
   controller's frame-base register (`TFT_BASE_REG`, 0x8620_0000);
2. switches `draw_buf` to the other set;
3. programs the DMA engine at `DMA_BASE` (0x8400_0000) to zero that set's frame and z
   buffer, which are contiguous (4 MB);
4. polls the DMA status until the fill is finished.

The DMA registers are: +0 destination, +4 length in bytes (the write starts the fill),
and +8 status (bit 0 = busy). The same clear runs for set 0 after reset. `clearing` is
high while the writer waits.

The writer cannot reach memory directly. It talks to memory, the DMA engine and the
display controller through a simple master port:

- `bus_req` is held, with address, direction and data stable, until the cycle in which
  `bus_ack` is high;
- read data is valid with `bus_ack`;
- an assertion checks this handshake.

To connect to a real system bus, put a bus master bridge behind this port.

## Floating point

`gl_pkg` holds the shared types (`float_t`, `vec3_t`, `vec4_t`, `mat4_t`, `pixel_t`,
`instr_t`, `opcode_e`). It also holds the arithmetic as functions: add/sub, multiply,
divide, int-to-float, and float-to-int with truncate, floor or ceiling. `fp_add`,
`fp_mul` and `fp_div` wrap those functions as modules.

All operations are combinational. They round to nearest even, flush denormals to zero,
and give infinity on overflow or division by zero. NaNs are not handled beyond being
passed through. These units are the simplest correct stand-ins for pipelined vendor FP
cores. Because everything is combinational, the rasterizer's per-pixel path (three
divides and several multiply-adds) is long. A real implementation at speed would
pipeline it.

## Where this differs from the original design, and why

- **Half-function step sign.** Stepping one pixel right changes f_ab by −(y_b − y_a).
  The original derivation writes "+constant_2", which contradicts its own definition of
  f_ab. The definition is followed.
- **Colour scale.** Colours are scaled by 63, the 6-bit full scale, and not by 2⁷−1.
  Scaling by 127 would overflow a 6-bit field.
- **Pixel word.** The pixel word layout above puts x in a 10-bit field and each colour
  in a 6-bit field, as the text describes. The original bit table does not fit those
  widths, so the exact positions are this design's reconstruction.
- **glRotate, glFrustum, glOrtho.** These calls are skipped: the matrices are computed
  by host software. glScale and glTranslate do build their matrix in hardware from the
  three arguments.
- **No clipping.** Triangles crossing the near plane or w = 0 are not clipped. Pixels
  outside the screen are removed by clipping the bounding box.
- **Vertex timing.** A vertex takes 34 transform clocks; the original quotes 32 for the
  two multiplies alone.
- **Clear before drawing.** The writer waits for the DMA clear to finish before it
  draws into a set. The original started drawing while the clear ran, which risks a
  late fill erasing new pixels.
- **Assumed constants.** The display and DMA register addresses, the DMA register map,
  the FIFO depth (16) and the depth convention are assumed.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each ends by
printing `TB_RESULT checks=N failures=M`. Reference values are computed independently
in double precision:

- `fp_ref_pkg`: real↔float conversion;
- `gl_prog_pkg`: a program builder that also keeps a software model of the transform
  (stacks, viewport, expected window coordinates);
- `raster_ref_pkg`: a reference rasterizer.

`plb_mem_model` is a behavioural model, for simulation only. It covers the memory
(random 0–3 cycle acknowledge), the DMA fill and the display base register.

`gl_accel_tb` runs the whole pipeline with every parameter at its default. It loads a
471-word program: a perspective projection, then two frames. Each frame is an
octahedron of eight triangles with per-vertex colours, placed with push, translate, a
rotation matrix and scale, and ended by a flush. The three clocks run at unrelated
periods. The testbench checks:

- every vertex and colour leaving the transform, against the model;
- every pixel leaving the rasterizer, against a double-precision rasterization of those
  vertices. Pixels within 10⁻³ (barycentric) of an edge may go either way.
- both finished frame buffers and z buffers, word by word, against a depth-test model
  of the pixel stream;
- that the first set is cleared after the second swap.

It also counts each mechanism and fails if one never occurs: transform stalls on a full
vertex/colour FIFO, rasterizer stalls on a full pixel FIFO, depth-test rejections,
buffer swaps, DMA clears, push/pop, matrix multiplies, divisions by w ≠ 1, and the
pre-fetch unit holding a triangle while the core is busy. One run covers about 192,000
pixels and takes about ten seconds in Verilator.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module gl_accel_tb \
    -y rtl -y tb rtl/gl_pkg.sv tb/fp_ref_pkg.sv tb/gl_prog_pkg.sv tb/raster_ref_pkg.sv \
    tb/gl_accel_tb.sv
obj_dir/Vgl_accel_tb +verilator+rand+reset+2
```

Replace `gl_accel_tb` with the name of any other testbench. `+verilator+rand+reset+2`
starts unreset state at random values, which checks that every register that is read
is also reset.

## What is not here

These parts are not included:

- the soft processor and its program loader;
- the host-side program generator;
- the system bus and its bridges;
- the display controller;
- the DMA engine;
- the SDRAM controller.

They are vendor cores or software, and the design depends only on their interfaces:
the instruction memory's BRAM port, and the writer's bus port. The instruction memory
is not a ring buffer: a program must fit in 512 words. The octahedron demo (about 240
words per frame) fits.

## Files

- `rtl/gl_pkg.sv`: types, opcodes and FP functions.
- `rtl/gl_accel.sv`: the top.
- The coordinate transform: `coord_transform`, `icache`, `fetch`, `decode`,
  `matrix_stack`, `matrix_mult`, `matrix_row_comp`, `persp_div`, `viewport`.
- `async_fifo`.
- The rasterizer: `rasterizer`, `raster_prefetch`, `raster_core`, `raster_bbox`,
  `raster_interp`.
- `fbwriter`.
- `fp_add`, `fp_mul`, `fp_div`.

Each file opens with a description of its interface and timing.
