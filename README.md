# A quad-pixel 3D rendering accelerator in SystemVerilog

This is a fixed-function graphics pipeline on one chip. It reads a list of
convex polygons from memory and rasterizes them into 2×2 pixel quads. Each
pixel is shaded with perspective-correct colours and a trilinearly filtered,
mip-mapped texture. The result is alpha-blended and depth-tested against a
floating-point Z-buffer. Peak throughput is **four pixels per clock**: one
quad enters the pixel pipelines every cycle and one quad is written back
every cycle.

The architecture follows the 1999 student report *Gate-Level Implementation
of a Hardware 3D Accelerator* (A. Sundquist, MIT 6.837). That report gives
the block structure, the pipeline order, the rates and the memory sizes. It
does not give formats, encodings, arithmetic details or stall policies;
those are this design's own and are listed in "Design choices" below.

## Data flow

```
 display list ──► setup / controller ──segments──► rasterizer ──quads──► pixel processor
   (ROM)              │                                ▲                 (4 pixel pipes)
                      └─── polygon data (2 slots) ─────┼────────────────►   │   ▲    │
                                                       │  slot released      │   │    │
                                                       └─────────────────────┘   │    │
                                         texture store ◄── 32 texel addresses ───┘    │
                                         (4 × 256 bits/clk) ── texels ──►              │
                       memory controller ◄── quad read (256 b) / quad write (256 b) ───┘
                       8 × eDRAM banks (8 Mbit each, 128 bits wide)  ◄── host port
```

| Block | File | Role |
|---|---|---|
| Top | `accel_top` | Wires everything together. Has preload ports for the display list and textures, and a host port to the frame buffer. |
| Display list | `display_list_rom` | 64K × 32 synchronous ROM that holds the scene. |
| Setup / controller | `setup_controller` | Streams polygon records. Loads polygon data into a free slot. Emits the outline as line segments. |
| Rasterizer | `rasterizer` | Contains `lr_arbiter`, 2 × `edge_queue`, 2 × `edge_rasterizer`, 2 × `edge_buffer`, `tile_walker` and `pixel_iterator`. |
| Pixel processor | `pixel_processor` | Four `pixel_pipe`s in lock step. Carries polygon data down the pipeline. Handles stalls and frame-buffer traffic. |
| Pixel pipe | `pixel_pipe` | Six stages built from `plane_eval`, `fp_recip`, `fp_mul`, `lod_calc`, `tex_addr`, `tex_filter`, `color_blend` and `z_test`. |
| Texture store | `texture_rom` | 2M × 32-bit texels (8 MB), 32 read ports. |
| Frame buffer | `memory_controller`, `edram_bank` | Eight 64K × 128-bit banks (8 × 8 Mbit) holding 1024 × 1024 pixels of 64 bits. |
| Float library | `fp_add`, `fp_mul`, `fp_recip`, `int_to_fp`, `fp_to_fix` | Combinational single-precision arithmetic. |
| Types | `accel_pkg` | Shared structs (`poly_t`, `seg_t`, `edge_t`, `quad_t`, `pixel_t`) and constants. |

## Number formats

- **Floats** use the IEEE-754 single-precision layout. Every operator is one
  combinational block.
  - Denormals flush to zero. Overflow saturates to the largest finite value.
  - There are no infinities or NaNs. Rounding is truncation.
  - A divide is a reciprocal followed by a multiply. The reciprocal
    (`fp_recip`) starts from a 64-entry seed table, computed at elaboration,
    and runs two Newton–Raphson steps. Its relative error is below 2^-21.
- **Depth** is stored as a 24-bit float: the pixel depth's exponent plus its
  top 16 fraction bits (`z[30:7]`).
  - Positive floats order like unsigned integers, so the depth test is an
    integer compare. A pixel passes when its depth is smaller than the stored
    depth.
  - This spreads depth resolution over a wide range, coarser far away.
- **Pixels** are 64 bits: `{8'h00, z24, R, G, B, A}`, with R in bits 31:24.

## Display list

Each polygon record is a header word, a texture-base word, 30 plane words
and then one word per vertex. A header whose vertex count is 0 ends the list.

| Word | Contents |
|---|---|
| 0 | `[7:0]` vertex count n (max 16), `[11:8]` last mip level, `[15:12]` log2 height, `[19:16]` log2 width, `[20]` texture on, `[21]` blend on, `[22]` depth test on, `[23]` depth write on |
| 1 | `[20:0]` word address of mip level 0 in the texture store |
| 2 … 31 | Float plane coefficients A, B, C for ten quantities, in this order: 1/z, u/z, v/z, diffuse R/z, G/z, B/z, A/z, specular R/z, G/z, B/z |
| 32 … | Vertices `{y[15:0], x[15:0]}` in integer pixels, convex, clockwise on a y-down screen |

The host computes the planes. Any quantity q that varies linearly across the
polygon in eye space gives a plane q/z = A·x + B·y + C in screen space.
Colours are in units of 1.0 = 256 steps. Texture coordinates repeat every
1.0.

The controller reads the list as a stream at one word per clock. Polygons
alternate between two *slots*. A slot's data is overwritten only after the
rasterizer has released it, which happens once the slot's last quad has
entered the pixel pipeline.

## Rasterizer

This part needs the most care. It turns a polygon outline into 2×2 quads in
tile order, at one quad per clock, while the next polygon is already being
scan-converted.

1. **Left/right sorting** (`lr_arbiter`). With clockwise winding on a y-down
   screen, every downward segment is a right edge and every upward segment a
   left edge.
   - Left edges are reversed so that both queues hold top-to-bottom edges.
   - Horizontal segments are dropped.
   - The last segment of a polygon also puts an end mark into the queue that
     did not get it. Both sides therefore see the end of every polygon, even
     one with no edges on a side.
2. **Edge scan conversion** (`edge_rasterizer`, one per side). One row per
   clock per side.
   - Pixel centres are at integer coordinates. An edge from (x0,y0) to
     (x1,y1) covers rows y0 ≤ y < y1.
   - For each row it writes ⌈x(y)⌉. A pixel is inside when
     left ≤ px < right, so two polygons that share an edge neither overlap
     nor leave a gap.
   - x(y) is stepped exactly, with an integer quotient and a carried
     remainder, so there is no rounding drift.
   - At the end mark each side reports the range of rows its edges covered.
3. **Edge buffers** (`edge_buffer`, one per side). Each holds one x value per
   screen row for each of the two slots (double buffering).
   - Rows are interleaved over eight banks.
   - One clock after a read, all eight rows of a tile row come out together.
4. **Tile walk** (`tile_walker`). Tiles are 8×8 pixels. Once both sides have
   finished a polygon, the walker steps through its tile rows; the covered
   rows are the intersection of both sides' ranges.
   - For each tile row it reads both buffers.
   - It keeps the eight per-row spans in registers, with empty spans outside
     the polygon.
   - It finds the leftmost and rightmost covered column, then hands the
     tiles in between, left to right, to the pixel iterator.
   - Cost per tile row: two clocks to read, plus one clock per tile.
   - A polygon that covers no pixel still sends one empty tile marked last,
     so its slot is always released.
5. **Quads** (`pixel_iterator`).
   - It turns each tile into up to 16 quads with 4-bit coverage masks.
   - Quads with an empty mask are skipped.
   - It sends one quad per clock and takes the next tile in the same clock
     as the current tile's last quad.

The edge rasterizers work on polygon *n+1* while the walker and iterator
draw polygon *n*. The end-to-end test measures exactly one quad per clock on
fully covered tiles.

## Pixel pipeline

Each of the four `pixel_pipe`s handles one pixel of the quad. All four move
together, one quad per clock:

| Stage | Work |
|---|---|
| 1 | Pixel x, y to float. Evaluate the ten planes (1/z, u/z, …). |
| 2 | z = 1/(1/z). |
| 3 | Multiply every attribute/z by z (perspective correction). Compute the level of detail. **Issue the quad's frame-buffer read.** |
| 4 | Convert u, v and colours to fixed point. Choose two mip levels. Form eight texel addresses. Old pixel arrives from memory. |
| 5 | Texels arrive. Trilinear filter. |
| 6 | Modulate the diffuse colour by the texture. Add specular (saturating). Alpha-blend over the old pixel. Run the depth test. **Write the quad.** |

**Level of detail.** With perspective interpolation, the screen derivatives
of u have a closed form: du/dx = z·(A_u − u·A_q), where A_q is the x
coefficient of the 1/z plane, and likewise for y and for v. The pipeline
computes the four derivatives per pixel. It scales each by the texture size
and takes the largest base-2 logarithm as the LOD, in 8.8 fixed point. The
logarithm is read from the float's exponent, with a linear approximation of
the mantissa; the error is below 0.09.

**Mip layout.** Level k of a 2^w × 2^h texture is (2^w ≫ k) × (2^h ≫ k)
texels, at least 1 × 1. It is stored row-major directly after level k−1. The
filter takes the four texels around the sample point in levels ⌊LOD⌋ and
⌊LOD⌋+1, clamped to the texture's last level. The blend weights are 8-bit.
Every blend is a + ((b − a)·f) ≫ 8.

**Blending.** Texture × diffuse is computed as a·(b+1) ≫ 8. Alpha
compositing uses a weight of (α + α[7]) / 256.

**Write mask.** A pixel is written only if it is covered *and* passes the
depth test. With depth writes off, the old depth is kept.

### Stalls

The frame-buffer read in stage 3 can be blocked in two ways:

- **Bank conflict.** The memory controller reports that the read and the
  stage-6 write fall into the same bank pair. The write goes ahead.
- **Read-after-write hazard.** The quad being read is still in stage 4, 5 or
  6 and has not been written yet. Overlapping polygons cause this.

In either case stages 1–3 hold and a bubble enters stage 4. Stages 4–6
always advance, so in-flight writes drain and the stall clears by itself.
The rasterizer sees this as back-pressure on `quad_ready`. An assertion
checks that no read is issued during a hazard. Texture reads are never
stalled: the texture store has one port per texel.

## Frame buffer and memory controller

The 1024 × 1024 screen is 512 × 512 quads. Quad (qx, qy) uses bank pair
p = qx mod 4:

- The top two pixels go in bank 2p, in one 128-bit word.
- The bottom two pixels go in bank 2p+1, at the same word address
  `{qy, qx[8:2]}`.

A quad read and a quad write each use one pair, 2 × 128 bits. They conflict
only when both use the same pair. Four horizontally neighbouring quads use
four different pairs, so a tile row in progress rarely collides with itself.

The host port reads or writes single pixels. It has the lowest priority,
after the pixel write and then the pixel read. Use it to clear the frame
buffer before rendering and to read it back afterwards.

## Design choices and departures from the source report

- **Taken from the report:**
  - Block structure and connections.
  - Four-pixel quads and the peak rate of four pixels per clock.
  - The stage order of the pixel pipeline.
  - Double-buffered rasterization with left/right edge queues and
    rasterizers, tiled iteration and a pixel iterator.
  - Combinational floating-point operators.
  - A 24-bit floating-point Z-buffer.
  - Trilinear mip-mapping with a per-pixel base-2 LOD.
  - 32-bit RGBA textures.
  - An 8 MB texture store and 8 × 8 Mbit eDRAM.
  - 128-bit memory ports and 4 × 256-bit texture ports.
- **This design's own choices:**
  - The display-list format.
  - Host-computed plane equations; the report does not say how setup derives
    them.
  - The coverage rule and the exact edge stepping.
  - 8×8 tiles.
  - The queue depth (8 entries).
  - The 16-vertex limit.
  - The float format details (IEEE layout, truncation, no denormals).
  - The reciprocal method.
  - The 24-bit depth encoding.
  - The LOD formula and the mip layout.
  - The blending arithmetic.
  - The screen size of 1024 × 1024.
  - The bank mapping and the stall policy.
  - The preload and host ports.
- **Not built:**
  - The report's fuller "complete" architecture: host interface, shared
    frame-buffer/texture memory with a prioritized controller, external
    SDRAM, texture caches and video output. The report itself describes it
    as unrealized.
  - The texture store is an ideal multi-ported ROM, as in the report's
    implemented system.
  - eDRAM timing and refresh are not modelled; each bank is a synchronous
    single-port array.
  - There is no timing analysis, so the report's 150 MHz is not checked.
    The combinational float operators make for long paths.
- Non-convex, counter-clockwise or self-intersecting outlines are not
  supported. Vertices are clipped to the screen by the caller.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
Reference values are computed independently in the testbench: real-valued
models for the arithmetic, and pixel-level or queue models for the control
logic.

| Area | What is checked |
|---|---|
| Float operators | Random and edge-case operands against real arithmetic, within the stated truncation error. |
| Rasterizer | About 40 random convex polygons plus degenerate ones against a coverage model: every pixel exactly once, tile order, and one quad per clock on a large square. |
| Edge, tile and quad units | Stepping against exact ceilings. Buffer reads. Coverage and order of tiles and quads under random back-pressure. Slot release. |
| Pixel path | LOD against real log2 of exact derivatives. Mip addressing against a layout model. Filtering, blending and the depth test against real-valued models. One pipe under random front-end stalls. The processor with a bank-conflict memory model and overlapping quads. Both stall kinds must occur. |
| Memories | Load and read-back, per-pixel write masks, conflict flag, host port. |
| Whole design (`tb_accel_top`) | See below. |

`tb_accel_top` runs the whole design at its default parameters. The scene is
17 polygons in a 96 × 96 window: flat-coloured and specular polygons; a
64 × 64 texture with six smaller mip levels, drawn in perspective, both
magnified and minified; blended, depth-rejected, zero-area and overlapping
polygons.

- The frame buffer is cleared through the host port and read back after
  rendering.
- Every pixel is compared with a reference renderer in the testbench. The
  tolerance is ±4 per colour channel and ±1 on the 24-bit depth.
- The test also counts how often each mechanism occurred. It fails if any
  never did. The mechanisms are:
  - bank-conflict stall;
  - read-after-write stall;
  - both slots busy;
  - textured, blended, depth-rejected, magnified and trilinear pixels;
  - an empty polygon.
- It also checks that a fully covered area streams at four pixels per clock.
- It takes about half a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/accel_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_accel_top.sv \
    --top-module tb_accel_top
./obj_dir/Vtb_accel_top
```

Replace `tb_accel_top` with any other testbench name. `tb_fp_pkg` holds the
testbench's float ↔ real conversions.
