# REND3R: a small 3D graphics engine in SystemVerilog

REND3R draws 3D scenes to a VGA monitor. A scene is described by a stream of
32-bit instructions: set up a camera, place lights, and store triangles or
analytic shapes (spheres, cylinders, cones). A "new frame" instruction then
renders the scene. The engine has two renderers that share one scene memory
and one frame buffer:

* **Rasterization**: each stored triangle is projected onto the screen, lit
  once (flat shading), and its pixels are filled in.
* **Raytracing**: for every pixel a ray is cast against every stored shape.
  The nearest hit is then lit by casting a shadow ray towards each light.

All geometry math is done in 16-bit (half-precision) floating point. The
frame is 512 x 384 pixels in RGB565. It is shown on a 1024 x 768, 60 Hz VGA
raster, each stored pixel drawn as a 2 x 2 block.

This RTL follows a published student design of the same name. The final
section lists where it departs from that description.

## Block structure

```
 net_clk                         clk (system)                              pix_clk
 ib_we/addr/data --> instruction_bank --> instruction_processor
                                            | property writes     | render/clear, done
                                            v                     v
                                       memory_bank  <-->  rasterization_controller --> rasterization_fsm
                                       (camera,           raytrace_controller --> raycaster
                                        lights, shapes)        |                          |
                                                               +------> frame_buffer <----+ (+ frame_zbuffer)
                                                                             |
                                                                             +--> vga --> hsync/vsync/RGB
```

`rend3r_top` wires these together. Its input `raytrace_mode` picks which
renderer a frame uses: it switches the memory-bank read ports, the
frame-buffer write port and the render request.

| Module | Role |
|---|---|
| `fp16_pkg` | Half-precision add, sub, mul, div, sqrt, compare, int/fixed conversion |
| `rend3r_pkg` | Instruction encodings, property numbers, record types, vector/quaternion/colour helpers |
| `instruction_bank` | Dual-clock program memory (4096 x 32) |
| `instruction_processor` | Fetch/decode/execute, update and compute modes |
| `memory_bank` | Camera registers, 64 light slots, 4096 shape/triangle slots |
| `rasterization_controller` | Clears the buffers, then offers each stored triangle in turn |
| `rasterization_fsm` | Per triangle: shade + project, then scan the bounding box with a depth test |
| `triangle_shade` | Flat lighting of one triangle over all light slots |
| `triangle_3d_to_2d` | Three vertex pipelines plus depth key and visibility; 63-cycle latency |
| `vertex_project` / `vertex_ndc_map` / `vertex_rasterize` | World to camera to near plane, then to viewport, then to pixels |
| `triangle_2d_fill` | Integer edge-function inside test, 4-cycle latency |
| `raytrace_controller` | Pixel-by-pixel ray scheduling, nearest-hit search, shadow rays, colour |
| `raycaster` | Fully pipelined ray/shape intersection, one pair per cycle, 205-cycle latency |
| `frame_buffer` | 512 x 384 x 16 RAM, written on `clk`, read on `pix_clk`, with a clear engine |
| `frame_zbuffer` | 512 x 384 x 16 depth RAM, clears to +infinity |
| `vga` | 1024 x 768 @ 60 Hz timing on a 65 MHz clock, 2x pixel doubling, 4-bit colour |

## Instruction set

Every instruction is 32 bits with a 3-bit opcode in `[2:0]`. The only
exception is the SD word, which has no opcode.

| Type | Opcode | Fields |
|---|---|---|
| F (frame) | 1 | func `[10:9]`: 00 end render (`er`), 01 new render (`nr`), 10 new frame (`nf`), 11 loop render (`lr`) |
| C (camera) | 2 | data `[31:16]`, prop `[15:11]` |
| L (light) | 3 | data `[31:16]`, prop `[15:11]`, light index `[8:3]` |
| SE (shape select) | 4 | index[18:3] `[31:16]`, prop `[15:11]`, prop2 `[10:6]`, index[2:0] `[5:3]` |
| SD (shape data) | none | data `[31:16]` for prop, data2 `[15:0]` for prop2 |

An SE word is always followed by an SD word. The processor takes the next
word as SD whatever its bits are. The opcode numbers are this design's
choice.

Property numbers:

* **Camera:** 1-3 location x/y/z; 4-7 rotation quaternion r/i/j/k; 8 near
  clip; 9 far clip; 10/11 horizontal/vertical field-of-view factors.
* **Light:** 0 source type (low 2 bits: 00 off, 01 directional); 1-3
  location; 4-6 forward direction; 7 RGB565 colour; 8 intensity.
* **Shape:** 1-3 location; 4-7 rotation quaternion; 8-10 *inverse* scale
  factors; 11 colour; 12 material (unused); 13 type (0 off, 1 sphere,
  2 cylinder, 3 cone).
* **Triangle:** uses the same record: vertices x1, y1, z1 … z3 in properties
  1-9 and colour in 11.

All values except colours and codes are half-precision floats.

### Processor behaviour

* **C, L, SE/SD:** write the property into the memory bank. A light or shape
  slot that was empty starts from all zeros.
* **`nr`:** drops every light and shape in one cycle and clears the frame.
* **`nf`:** enters **compute mode**. The processor stalls, and the selected
  controller renders the frame and pulses `done`. The processor then returns
  to update mode.
* **`lr`:** jumps to address 0.
* **`er`:** halts for good, as does running off the end of the bank.

## Rasterization path

For each occupied triangle slot, the controller hands the 3D triangle to
`rasterization_fsm` and waits while `pause` is high. Then:

1. **Shading** (`triangle_shade`), in parallel with step 2:
   * The normal is n = (v2 - v1) x (v3 - v1).
   * Each directional light adds `colour * min(1, intensity * max(0, n·(-fwd)) / |n|)`,
     channel-masked by the light colour, with saturating sums.
   * With no light on, the triangle keeps its colour.
   * Vertex order decides which face is lit.
   * Takes NUM_LIGHTS + 3 cycles.
2. **Projection** (`triangle_3d_to_2d`):
   * Each vertex is moved into camera space by the inverse camera rotation
     and divided onto the near plane: x' = nclip·x/d with d = -z, so the
     camera looks down -z.
   * It is mapped to the viewport. The viewport is ±5 by ±3.75 units at the
     near plane, times the fov factors.
   * It is then turned into pixels: px = floor((x+1)·256), py = floor((1-y)·192).
   * The depth key is the distance from the camera to the triangle's centroid.
   * The triangle is dropped unless all three vertices are past the near
     plane, the centroid is within the far clip and the bounding box touches
     the screen.
   * Pipelined, with a fixed latency of 63 cycles.
3. **Fill**:
   * The bounding box, clipped to the screen, is scanned at one pixel per
     cycle through `triangle_2d_fill`. This is an integer edge-function test
     that accepts either winding and includes the edges.
   * For each covered pixel the z-buffer is read. The pixel and depth are
     written only if the triangle's key is smaller.

**Cost:** one triangle costs 1 + 63 + 1 + (bounding-box pixels) + 6 cycles.
A frame also costs 196,608 clear cycles and 2 cycles per triangle slot.

## Raytracing path

### How a pixel is computed

`raytrace_controller` handles one pixel at a time:

1. **Primary ray.** It goes from the camera location through the pixel
   centre on the same viewport, rotated by the camera quaternion.
2. **Pass over the shapes.** Every shape slot is fed to `raycaster`, one
   per cycle. After the pipeline latency the nearest hit is kept. A miss
   gives a black pixel.
3. **Shadow rays.** On a hit, every light slot is read. For each directional
   light, a shadow ray is cast from the hit point towards the light, as
   another full pass over the shapes.
4. **Lighting.** If nothing blocks the shadow ray, the light adds the shape
   colour scaled by `intensity · max(0, n·(-fwd)) / |n|` and masked by the
   light colour. With no light on, the shape keeps its colour.

### Inside `raycaster`

The raycaster moves the ray into the shape's *normal space* instead of
transforming the shape:

```
s' = S^-1 R^-1 (s - T)
d' = S^-1 R^-1 d
```

This is why the shape record stores inverse scale factors. In that space:

* the sphere is the unit sphere;
* the cylinder is the infinite unit cylinder along z;
* the cone is the double cone z² = x² + y².

Each reduces to a t² + 2h t + c = 0. The smallest root above 1/4 is taken;
the threshold stops a surface from shadowing itself. The world hit point is
s + t·d. The normal is the surface gradient at the hit, carried back by
R·S^-1 and not normalised.

The arithmetic is 10 register stages. A delay line pads it to 205 cycles.

### Frame time

One pass costs NUM_SHAPES + 205 + 3 cycles. Per pixel:

* **miss:** NUM_SHAPES + 209 cycles;
* **hit, one light on:** 2·(NUM_SHAPES + 208) + 2·NUM_LIGHTS + 2 cycles;
* **each further light on:** about one more pass.

Example: 4096 shapes and one light, every pixel hitting, is about 1.72e9
cycles, or 17.2 s at 100 MHz.

## Number format and accuracy

`fp16_pkg` implements IEEE binary16 with these simplifications:

* rounding is to nearest even;
* subnormals are flushed to zero;
* exponent 31 is read as infinity, with no NaNs;
* overflow saturates.

With 11-bit mantissas, coordinates near 10 units are resolved to about
0.008. Expect edge pixels to differ by one from an exact model. Grazing
rays may flip between hit and miss.

## Clocks

| Clock | Nominal | Drives |
|---|---|---|
| `clk` | 100 MHz | Processor, memory bank, both renderers, frame-buffer write side |
| `pix_clk` | 65 MHz | `vga` and the frame-buffer read side |
| `net_clk` | 50 MHz | Instruction-bank write port, where a network receiver would connect |

Each crossing is a dual-port RAM; no other signal crosses clock domains.

## Departures from the published design

* **Visibility.** The published painter sorts projected triangles by
  centroid distance, far to near. Here the same centroid distance is kept
  per pixel in the frame z-buffer, and a pixel is only overwritten by a
  nearer triangle. The result is the same, with no sort and no 2D triangle
  buffer in external DRAM.
* **Fill scan.** Only the bounding box is scanned. One published cycle count
  assumes a scan of the whole screen per triangle.
* **Latencies.** The 63-cycle projection and 205-cycle raycaster latencies
  are reproduced by delay lines. The half-precision datapaths need 5 and 10
  cycles.
* **Floating point.** The vendor floating-point cores are replaced by the
  portable `fp16_pkg` functions.
* **Not built:**
  * the Ethernet receiver, whose write side is a top-level port;
  * DDR2 memory;
  * point lights, reflections and materials.
* **Own choices.** These are not specified by the source:
  * the default sizes (4096 instructions, 4096 shapes, 64 lights);
  * the lighting rule and the black background;
  * the viewport size and the camera convention (looking down -z);
  * the opcode numbers;
  * the `raytrace_mode` input that picks the renderer.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. Run one from the repository root with
verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/fp16_pkg.sv rtl/rend3r_pkg.sv tb/tb_fp_util_pkg.sv \
  tb/tb_rend3r_top.sv --top tb_rend3r_top -o sim && ./obj_dir/sim
```

`tb_fp_util_pkg` holds the real-number conversions and instruction
assemblers the testbenches share.

* **`tb_rend3r_top`** runs the whole engine on a 32 x 24 screen:
  * it loads a program through the network port;
  * it renders a rasterized frame and a raytraced frame;
  * it loops once and ends;
  * it compares pixels with real-arithmetic models and the frame time with
    the schedule above.
* **`tb_rend3r_full`** runs the default 512 x 384 configuration through one
  rasterized frame, about 405,000 cycles.

Unit testbenches compare each block with independent real-arithmetic or
integer models. The raycaster, both controllers, the shading and the
projection are checked this way.
