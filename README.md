# Ray-traced flying game in hardware

This design renders a small 3D game by ray tracing. The player steers a plane
with the arrow keys, past square obstacles that fly towards them, in the style
of *Star Fox*. There is no rasteriser. Every screen pixel is coloured by
casting a ray from the camera through that pixel and finding the nearest
triangle it meets. If that triangle is reflective, one reflected ray is traced
from the hit point and its colour is blended in. Each pixel is independent of the others, so the work is
spread over several identical **ray tracer units** that run in parallel. A
sequencer feeds them pixels and a second sequencer collects their results. The
finished pixels go into a double-buffered frame store held in two external ZBT
SRAMs, and a 1024x768 VGA display reads them back out.

Colours are 18 bits throughout (6 bits each for red, green and blue). Two
pixels therefore fill one 36-bit SRAM word.

## How a frame is made

```
 keyboard ──► game_logic ──(camera, triangles, light)──┐
                  ▲                                     ▼
                  │           rt_input_seq ──start/pix──► rt_unit x N_UNITS
                  │                ▲                        │ done/result
                  │                │                        ▼
                  │                │                  rt_output_seq   (one slot per unit)
                  │                │                        │ one result per cycle
                  │                │                        ▼
                  │                │                  bg_processor    (sky where the ray missed)
                  │                │                        │ pixel write
                  │   frame_swap   │                        ▼
                  └────────────────┴────────────────── frame_buffer ◄── hcount/vcount (VGA timing)
                                                            │ ZBT SRAM 0 / 1
                                                            ▼
                                                         rgb_dac ──► video DAC (8 bits per channel)
```

1. `rt_input_seq` walks an x/y counter over the screen in raster order. In
   every cycle where some unit is idle, it gives the current pixel to the
   lowest-numbered idle unit.
2. Each `rt_unit` traces its pixel in `4*N_POLY+2` cycles, or
   `8*N_POLY+27` cycles when the pixel shows a reflective surface. It then
   holds `done` and the result (colour, hit bit, x, y) until the result is
   taken.
3. `rt_output_seq` copies each finished result into that unit's own slot,
   which frees the unit. It sends at most one result per cycle onward.
4. `bg_processor` leaves hit pixels unchanged. A pixel whose ray missed
   everything gets a sky gradient computed from its (x, y).
5. `frame_buffer` writes the pixel into the back SRAM and counts the writes.
   The pixel after 786,431 writes completes the frame. The buffer then flips
   its status bit, so the finished frame goes on display, and pulses
   `frame_swap`.
6. `frame_swap` restarts the input sequencer. The same pulse steps the game
   world, so every frame is traced from one consistent scene.

Meanwhile the display side runs independently. `hcount`/`vcount` from the VGA
timing generator read the front SRAM, and `rgb_dac` turns each 18-bit pixel
into the codes for the board's video DAC.

## The ray tracer unit

This unit holds nearly all of the arithmetic. It is also the part that most
needs explaining.

**Geometry.** World coordinates are signed 12-bit integers. The camera sits at
`cam` and looks along +z, with +x to the right and +y up. The screen is a
plane `FOCAL` = 512 units in front of the camera. The ray for pixel (x, y)
therefore has the integer direction

    D = (x - 512, 384 - y, 512)

This direction is never normalised, and nothing below needs it to be.

**Intersection without division.** Each triangle (v0, v1, v2) is tested with
the Möller–Trumbore formulation, kept entirely in exact integers:

    e1 = v1 - v0     e2 = v2 - v0     T = cam - v0
    P  = D × e2      Q  = T × e1
    det = e1·P       u = T·P          v = D·Q          t = e2·Q

When `det` is negative, all four values are negated. The ray then hits the
triangle when `det > 0`, `u ≥ 0`, `v ≥ 0`, `u + v ≤ det` and `t > 0`. The
distance to the hit is `t/det`. The division is never carried out: two hits a
and b are compared by cross-multiplying, `t_a·det_b < t_b·det_a`, so the
nearest triangle is found with multipliers and comparators only.

**Widths.** With 12-bit coordinates, the largest intermediate (`t`) needs
about 40 bits, and the cross-multiplied comparison about 80 bits. The
datapath uses 64-bit signed values and a 128-bit comparison. These are
generous bounds rather than tight ones.

**Edges.** Hits on an edge are inclusive. A pixel exactly on the diagonal
shared by a square's two triangles hits both at the same distance. The unit
keeps the first one, and since both halves have the same colour, the result
is the same.

**Shading.** Each triangle carries a unit normal `n`, and the light is a unit
direction `L` towards the light. In both, 128 stands for 1.0. The shade is

    diffuse = clamp((n·L) >> 7, 0, 128)
    shade   = AMBIENT + ((128 - AMBIENT) * diffuse >> 7)     (AMBIENT = 32)
    channel = channel * shade >> 7

The normal comes with the triangle from the game logic, so the unit needs no
square root. A ray that meets nothing returns black with `hit = 0`.

**Reflection.** Each triangle carries a reflectivity `r` in eighths, where 0
means matt. If the nearest triangle has `r > 0`, a second ray is traced from
where the first one hit. The steps are:

1. *Hit point.* A restoring divider finds `k = floor(t·2^16 / det)`. It
   produces one quotient bit per cycle, 24 bits in all. The hit point,
   rounded to whole world units, is then

       H = O + round(D·k / 2^16)

   This is the only division in the design.
2. *Reflected direction.* It is kept as an exact integer by scaling it by
   128²:

       R = D·128² − 2(D·n)·n

   The scale does not matter to the intersection test.
3. *Reflected pass.* The ray (H, R) goes through the same four-cycles-per-
   triangle pass. The triangle it leaves is skipped, so it cannot hit itself.
4. *Blend.* The pixel becomes

       (c_primary·(8−r) + c_reflected·r) / 8

   Here `c_reflected` is the shaded colour of the triangle the reflected ray
   meets, or black if it meets nothing.

Only one bounce is traced.

**Schedule.** The unit is a multi-cycle state machine. After one cycle to
accept the pixel and form D, it spends four cycles on each triangle of each
pass:

1. edges and T;
2. the two cross products;
3. the four dot products, with the sign fix;
4. the hit test and the nearest-so-far update.

One more cycle then shades the result. A pixel thus takes `4*N_POLY + 2` =
34 cycles from `start` to `done` at the default of 8 triangles. A reflective
pixel adds 24 divider cycles, one cycle to set up the second ray, and a
second pass. In total that is `8*N_POLY + 27` = 91 cycles.

**Handshake.** `start` may only be raised while `busy` is low, and an
assertion checks this. `busy` rises in the next cycle and stays high until
the result is acknowledged. `done` stays high, with the result held, until
`ack` is high in the same cycle.

Textures are not modelled.

## Feeding and draining the units

`rt_input_seq` computes `start` combinationally from its counters and the
units' `busy` flags. This is why a unit must raise `busy` in the cycle after
its `start`. Once the last pixel of a frame has been handed out, the
sequencer raises `waiting` and issues nothing until `frame_swap` arrives.

`rt_output_seq` keeps one 40-bit slot per unit: a 39-bit result plus a valid
bit. A unit's `done` is acknowledged whenever its slot is empty. Each cycle a
scan pointer takes the first valid slot at or after where it last stopped,
sends that result out in the next cycle, and moves on past it. That order
serves the units round-robin, so none starves.

In the default game, simulation never showed two units finishing in the
same cycle. Units are started at most one per cycle, and each is restarted
as soon as it frees up. Their finishing times therefore stay staggered, even
though reflective pixels take longer. The slots still decouple each unit
from the single write path. The output sequencer's own testbench drives the
case where several units finish at once.

**Throughput.** With every unit busy and no reflections, a pixel leaves
every `(4*N_POLY + 3) / N_UNITS` cycles. The extra cycle is the hand-back.
At the defaults (4 units, 8 triangles) that is 6,881,280 cycles for a
1024x768 frame. The game's first frame, with its half-mirror obstacles, took
7,408,339 cycles in simulation. At a 65 MHz clock that is about 9 frames per
second. Adding units raises the rate almost linearly, until the output path
limit of one pixel per cycle.

## Frame buffer and SRAM layout

Each ZBT SRAM has 512K words of 36 bits and four 9-bit byte-write lanes.
Pixel (x, y) lives at address `{y, x[9:1]}`:

- pixels with even x go in bits 35:18;
- pixels with odd x go in bits 17:0.

A write enables only the two lanes of its half. A frame uses 384K of the 512K
words.

The status bit `rd_sel` names the SRAM on display. The other SRAM receives
the writes. The SRAMs are pipelined ZBT parts:

- write data is driven `ZBT_LAT` (2) cycles after its address;
- read data returns `ZBT_LAT` cycles after its address.

The word half and the buffer select travel down a matching delay line. The
displayed colour (`rd_color`) and `blank_out` therefore lag `hcount`/`vcount`
by `ZBT_LAT+1` cycles. `rgb_dac` adds one more cycle, and the top delays
`hsync`/`vsync` to match.

The renderer's results arrive out of order. The end of a frame is therefore
found by counting writes, not by watching for the bottom-right pixel.

The swap happens as soon as the last pixel is written. It does not wait for
vertical blanking, so a swap in mid-scan shows one frame torn at the scan
line where it happened.

## Game logic

PS/2 scan codes arrive one byte at a time with `key_valid`. The arrow keys
send `E0 xx` when pressed and `E0 F0 xx` when released:

| key   | code |
|-------|------|
| left  | 6B   |
| right | 74   |
| up    | 75   |
| down  | 72   |

A decoder keeps one "held" bit per arrow key. On each `frame_tick` the
camera moves `CAM_STEP` (16) units for every held key, kept within ±512.

There are `N_POLY/2` obstacles. Each is a camera-facing square of half-size
96, drawn as two triangles with normal (0, 0, −1). Every other obstacle is a
half mirror (reflectivity 4/8). They start on a 3x3 grid
of lanes, spread evenly in depth, and move 24 units closer every frame. One
that comes nearer than z = 64 is sent back 1920 units. The light direction is
fixed at (−1, 1, −2), normalised.

Collisions and scoring are not modelled.

## Top-level ports and outside parts

`rt_game_top` holds everything above. Four parts are outside it and reach it
through its ports:

- the VGA timing generator (`hcount`, `vcount`, `blank`, `hsync`, `vsync` in);
- the PS/2 keyboard interface (`key_code`, `key_valid` in);
- the two ZBT SRAMs (`zbt_*` arrays, index 0 and 1);
- the video DAC chip (`vga_r/g/b` 8-bit codes and the delayed syncs out).

`frame_swap` and `rd_sel` are brought out for observation.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_UNITS` | 4       | ray tracer units |
| `N_POLY`  | 8       | scene triangles (two per obstacle) |
| `H_PIX`, `V_PIX` | 1024, 768 | pixels per frame handed out and counted |
| `ZBT_LAT` | 2       | SRAM pipeline latency |

The 1024x768 screen, the 18-bit colour, the 40-bit output slot and the two
SRAM frame buffers are fixed by the design's specification. The following
are this implementation's own choices:

- the numbers of units and triangles;
- the intersection method, the lighting model and the single-bounce blend;
- the number formats;
- the SRAM packing;
- the sky gradient;
- the obstacle layout.

`H_PIX`/`V_PIX` only shrink the part of the screen that is traced and
counted. The ray directions still assume a 1024x768 screen, so a smaller
setting renders the top-left corner of the full view.

## Files

| file | contents |
|------|----------|
| `rtl/rt_pkg.sv` | shared types: colour, vectors, triangle record, result |
| `rtl/rt_unit.sv` | ray tracer unit |
| `rtl/rt_input_seq.sv` | input sequencer |
| `rtl/rt_output_seq.sv` | output sequencer |
| `rtl/bg_processor.sv` | background processor |
| `rtl/frame_buffer.sv` | double-buffered frame store, ZBT interface |
| `rtl/rgb_dac.sv` | 18-bit colour to video DAC codes |
| `rtl/game_logic.sv` | keyboard decoder and game world |
| `rtl/rt_game_top.sv` | top level |
| `tb/rt_ref_pkg.sv` | floating-point reference ray tracer |
| `tb/zbt_model.sv` | behavioural ZBT SRAM model |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog in case it hangs. Build
and run one with Verilator 5, for example the whole design:

```
verilator --binary --timing --assert --top-module tb_rt_game_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/rt_pkg.sv tb/rt_ref_pkg.sv tb/tb_rt_game_top.sv
./obj_dir/Vtb_rt_game_top
```

For another block, swap in that block's testbench module and file. The
package files come first because the rest import them.

- **`tb_rt_game_top`** runs the whole design at its defaults for two full
  frames, about 14 million cycles and half a minute.
  - It checks every pixel of both frames in the SRAMs against the reference
    ray tracer. That reference intersects planes and tests barycentric
    weights in floating point, a different route from the hardware.
  - It checks the VGA outputs for a whole displayed frame, and that the
    camera follows a held arrow key.
  - It requires at least one reflected pixel.
  - It requires at least one of each of these events: an issue stall with
    every unit busy, a buffered result, hit and background pixels, the
    sequencer waiting for the swap, and a swap.
  - Pixels where the answer hangs on an exact tie are skipped and counted.
    There are a few hundred per frame, all on the edges of obstacles.
- **`tb_rt_unit`** uses random triangle scenes, plus scenes with a tilted
  mirror that reflects into other triangles. It checks each pixel against
  the reference and checks both latencies: 26 and 75 cycles at the 6
  triangles it uses.
- **`tb_rt_input_seq`** checks raster order, the lowest-free-unit choice, and
  the wait for the swap.
- **`tb_rt_output_seq`** models the slots and pointer cycle by cycle, under
  heavy contention.
- **`tb_frame_buffer`** writes frames in random order, then checks the swap
  pulse, the status bit and the display read-back.
- **`tb_bg_processor`**, **`tb_rgb_dac`** and **`tb_game_logic`** compare
  against their formulas and a model of the game world.

Verilator's simulation has two states, so every register that is read is
reset or written before use.
