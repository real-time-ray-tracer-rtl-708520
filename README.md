# Fixed-point ray tracer accelerator, one image row per job

This is the FPGA half of a small real-time ray tracer. The scene is fixed: a
unit sphere standing on an infinite checkerboard floor, lit by one point
light that the host can move. A CPU on the same chip asks for the image one
row at a time. It writes the light position and a row index into six
registers, pulses `start` and waits for `done`. Six identical trace lanes
then render the 480 pixels of that row, six adjacent pixels per batch, into
an on-chip line buffer. The CPU reads the row back as 480 words of
`0x00RRGGBB`. Repeating this 360 times gives a 480×360 RGB888 frame.

All arithmetic is signed 24-bit fixed point with 10 fraction bits. Square
roots and divisions are bit-serial, one result bit per clock. A pixel
therefore spends tens of cycles in each pipeline stage, and the stages pass
it on with valid/ready handshakes, not on a fixed beat. Each pixel gets:

- a primary ray;
- a sphere test and a plane test;
- Lambert shading;
- one secondary ray. On the floor this is a shadow ray toward the light. On
  the sphere it is a mirror ray that picks up the floor or the sky.

## Host protocol

### Control slave (`rt_avalon_slave`)

The control slave has six 32-bit words. The read latency is one cycle.

| Word | Byte | Name     | Access | Contents |
|------|------|----------|--------|----------|
| 0    | 0x00 | CONTROL  | W      | bit 0 `start` (one-cycle pulse); bit 1 `clear_done`; other bits ignored |
| 1    | 0x04 | STATUS   | R      | bit 0 `busy`; bit 1 `done` (sticky); other bits 0 |
| 2    | 0x08 | ROW_Y    | R/W    | row index; low 9 bits kept (0..359 are meaningful) |
| 3    | 0x0C | LIGHT_X  | R/W    | light x, signed Q13.10 in bits [23:0]; bits [31:24] read 0 |
| 4    | 0x10 | LIGHT_Y  | R/W    | light y |
| 5    | 0x14 | LIGHT_Z  | R/W    | light z |

Writing `start` does three things: it sets `busy`, clears `done`, and sends a
one-cycle start pulse to the row scheduler. The row and light values the
scheduler latches are the ones in the registers on that cycle. A `start`
written while `busy` is high is ignored. When the last pixel of the row is in
the line buffer, `busy` falls and `done` rises. `done` stays high until
`clear_done` or the next `start`.

### Line-buffer slave

Word `x` of the line-buffer slave (`avs_lb_*`, addresses 0..479) is column
`x` of the last finished row, as `0x00RRGGBB`. The read latency is one cycle.
Reads while a row is being rendered return whatever is in the RAM at that
moment. Addresses of 480 and above read as zero.

### One row, as a driver would do it

1. Write ROW_Y, LIGHT_X, LIGHT_Y and LIGHT_Z.
2. Write CONTROL = 2 (`clear_done`). Then write CONTROL = 1 (`start`).
3. Poll STATUS until bit 1 is set.
4. Read words 0..479 of the line buffer.

At the default size a row takes 9,380 clock cycles from `start` to `done`.

## Inside a row

**`row_scheduler`** latches the row index and the light when it sees
`start`. It then issues the batches x = 0, 6, …, 474. A batch is issued only
when all six lanes are ready. All lanes get their valid in the same cycle, and
lane *i* takes pixel `x + i`. This keeps the lanes in lock step. The lanes are
identical and every stage has a fixed latency, so nothing is lost by it. The
scheduler counts the pixels the lanes write back. It raises `done` only once
all 480 are written, not when the last batch is issued.

**`line_buffer`** stores the row as six banks of 80 words × 24 bits. Column
`x` lives in bank `x mod 6`, at word `x / 6`. Lane *i* only ever writes bank
*i*, so all six lanes can write in the same cycle and each bank needs only one
write port. The bus reads one column per cycle through a read-side
multiplexer.

**`raytracer`** is the top level. It wires the slave, the scheduler, six
`raytracer_pipe` lanes and the line buffer together.

## The trace lane

Each lane (`raytracer_pipe`) is a chain of four stages. `raytracer_pipe`
holds S1 and `trace_pipe` holds S2 to S4:

| Stage | Module | Work | Latency |
|-------|--------|------|---------|
| S1 compute ray | `rt_ray_stage` | raw direction `U·(x−240) + V·(y−180) + W` (six constant multiplies), then normalized | 59 |
| S2 intersect | `rt_isect_stage` | sphere and plane tests in parallel from the eye, nearer hit kept, hit point `eye + t·d`, unit normal | 114 |
| S3 shade | `rt_shade_stage` | light direction normalized, `lum = max(0, n·l)`, base colour, ambient term `color_a`, diffuse term `color_b`, secondary ray | 58 |
| S4 shadow / reflect | `rt_shadow_stage` | secondary ray traced, terms combined, clamped, packed to RGB888 | 58 |

Latency is the number of clock edges from the cycle a stage takes a pixel to
the cycle its output valid rises.

Every stage holds exactly one pixel. It has three states:

- **idle:** ready is high;
- **busy:** its arithmetic units are running;
- **hold:** the result is done and held with stable data until the next stage
  is ready.

A transfer happens in any cycle where valid and ready are both high. Because
S2 is the slowest stage, S1 finishes early and waits in hold. So does S3
behind a busy S4 when pixels arrive back to back. The lane settles at one
pixel per about 115 cycles. The row time is therefore about 80 × 115 cycles
plus the fill of the other stages.

The signals that cross each stage boundary are:

- S1 → S2: `pixel_x`, `ray_dir`, `light`.
- S2 → S3: adds `obj_id` (00 miss, 01 plane, 10 sphere), `hit_point` and
  `normal`.
- S3 → S4: `pixel_x`, `obj_id`, `color_a`, `color_b`, `sec_origin` and
  `sec_dir`.
- S4 → line buffer: `col_addr` and `rgb888`.

The values passed through are re-registered in each stage.

The final colour depends on what the primary ray hit:

| Primary hit | Secondary ray | Pixel |
|-------------|---------------|-------|
| floor  | shadow ray from the hit point toward the light, tested against the sphere | blocked: `color_a` (ambient only); free: `color_a + color_b` |
| sphere | mirror ray `d − 2(d·n)n`, tested against the floor | `0.75·(color_a + color_b) + 0.25·(checker at the bounce, or sky on a miss)` |
| nothing | none | sky gradient (carried in `color_a`) |

The secondary ray starts 20/1024 units along its own direction from the hit
point, so it cannot hit the surface it leaves. Each channel is clamped to
[0, 1] and converted to 8 bits as `floor(c·255)`.

## Numbers and arithmetic units

`rt_pkg` defines these shared types and helpers:

- `fix_t` is a signed 24-bit word, Q13.10. That is one sign bit, 13 integer
  bits and 10 fraction bits. 1.0 is 1024, and the range is [−8192, 8192).
- `vec3_t` is a packed `{x, y, z}` of three words, 72 bits.
- Addition and subtraction saturate.
- Colours use the same format, with 1.0 meaning full intensity.

| Unit | Structure | Latency |
|------|-----------|---------|
| `fp_mul` | combinational 24×24 signed multiply, `>>> 10`, saturated | 0 |
| `vec3_dot` | three `fp_mul` and a saturating adder | 0 |
| `fp_sqrt` | digit-by-digit root of `x << 10`, one root bit per clock, 17 steps, rounded down; negative input gives 0 | `done` 18 cycles after `start` |
| `fp_div` | restoring divider on `abs(a) << 10` (34 bits), one quotient bit per clock, 34 steps; sign applied and result saturated in the last step; divide by zero gives ±max | `done` 35 cycles after `start` |
| `rt_norm_stage` | `v·v` → `sqrt` → `64 / length` → three multiplies → `>>> 6` | `done` 56 cycles after `start` |
| `intersect_sphere` | see below | 55 cycles |
| `intersect_plane` | `t = n·(p − o) / (n·d)`, two dot products and one divider | 37 cycles |

All sequential units have the same interface:

- `start` is taken while `busy` is low.
- `done` pulses for one cycle.
- The result holds until the next `start`.

Every unit always runs all of its steps, so its latency is fixed. The stage
timings above follow from that.

### Precision: where 10 fraction bits are tight

The camera is 7 units from the sphere, so the quantities in the intersection
test reach about 50. Three places need care.

- **Sphere discriminant.** The textbook form `h² − a·c` subtracts two
  numbers of about 50 to get a result near 0 at the silhouette. With
  1/1024 resolution this loses the sphere's outline. `intersect_sphere`
  uses an equal expression for unit-length `d` instead:
  `r² − |(o − C) − h·d|²`. Here `h = (o − C)·d`, and the vector is the offset
  from the centre to the point on the ray closest to it. Both roots
  `(−h ∓ s)/a` are then formed by two dividers running in parallel. The
  nearest root above `T_MIN` is returned.
- **Normalization.** A plain Q13.10 reciprocal `1/|v|` of a vector of length
  about 7 keeps only about seven significant bits. `rt_norm_stage` divides
  64 by `|v|` instead and shifts the products back by 6. The results are
  accurate to a few LSB over lengths 0.5 to about 90. Above about 90, `|v|²`
  saturates, so a light position should stay within about 90 units of every
  point it lights.
- **Ray directions must be unit length.** The sphere test assumes this. So
  does the offset of secondary rays. Every ray in the design comes out of a
  normalization unit, so this holds.

Pixels right on an edge can come out on either side of it. This covers the
sphere's outline, shadow edges, and checker lines, both on the floor and in
the sphere's reflection. It also covers the distant floor near the horizon,
where a checker square is only a few pixels high. Everywhere else the RTL
matches a floating-point model to within ±8 per 8-bit channel. The
Verification section gives the numbers.

The plane test is single-sided: it reports a hit only when `n·d < 0`. That is
correct here, because the camera and every secondary ray start above the
floor. The shadow test ignores the light's distance: any sphere hit in front
of the floor point counts as a shadow. This is exact as long as the light is
not between the floor and the sphere.

## The scene

All scene constants are in `rt_pkg` and can be changed there.

- **Camera:** eye at (0, 1.5, −7), looking along +z. The pixel step is 2/1024
  per pixel: U = (2/1024, 0, 0), V = (0, −2/1024, 0), W = (0, 0, 1). The
  image centre is at (240, 180).
- **Sphere:** centre (0, 1, 0), radius 1, colour (0.25, 0.35, 1.0).
- **Floor:** the plane y = 0. Checker squares are 1 × 1; the colour is picked
  by `floor(x) xor floor(z)` and is 0.9 or 0.3 grey.
- **Sky:** (0.65, 0.77, 1.0) + (0.2, 0.15, 0)·`dir.y`.
- **Weights:** ambient 0.2. The sphere mixes 0.75 of its own shading with
  0.25 of the reflected colour.
- **Light:** it comes from the LIGHT registers for every row. A reasonable
  position is a few units above and beside the sphere, such as (−3, 4, −3).

## Where this design departs from, or adds to, the original description

The original description fixes the following:

- the row-per-job protocol and the register map;
- the six lanes of four stages with valid/ready handshakes;
- the stage signals;
- Q13.10 arithmetic;
- the bit-serial root and divider;
- the sphere test with one root and two dividers, and the plane test with one
  divider;
- the shading and shadow/reflection rules;
- the 55-cycle sphere test.

The following are this design's own:

- **Stages hold a pixel for many cycles.** The description also speaks of a
  pixel moving one stage per cycle. That cannot agree with a 55-cycle sphere
  test and bit-serial units. Here each stage keeps a pixel for as long as its
  units need, and lanes move pixels with the valid/ready handshake.
- **An extra plane tracer in S4.** The description's primitive count gives
  S4 only a sphere tracer. A mirror ray leaving the sphere can only hit the
  floor or the sky, so S4 also has an `intersect_plane` for it. A lane
  therefore has two plane tracers, not one.
- **Extra arithmetic.** The mirror direction in S3 uses one more dot product
  and three multipliers. The stable sphere discriminant uses three `h·d`
  multipliers and a third dot product.
- **Stage boundaries.** The hit point and the surface normal are computed
  inside S2, and the light normalization inside S3. The description counts
  these at lane level. Drawing the line this way keeps every stage's ports
  exactly those listed above.
- **Values the description leaves open.** These are chosen to resemble its
  example frame:
  - the camera;
  - all colours;
  - the ambient and blend weights;
  - the secondary-ray offset;
  - `T_MIN`;
  - the checker size.
- **Details of the arithmetic units:** the scaled reciprocal in
  normalization, saturation everywhere, and the results for divide by zero
  and negative roots.
- **Bus and control details:**
  - one-cycle read latency on both slaves;
  - the light registers read back with zero upper bits;
  - `start` is ignored while busy;
  - the line buffer is split into six banks;
  - a batch is issued only when all six lanes are ready.
- **Reset:** synchronous and active high. It clears all control state and
  output registers. The line-buffer RAM is not cleared.

## Throughput and resources

- **Row time.** One row takes 9,380 cycles, and a frame is 360 rows, about
  3.38 M cycles.
- **Frame rate.** At a 50 MHz fabric clock that is about 15 frames per
  second before bus time. 24 frames per second needs about 81 MHz, or more
  lanes.
- **Multipliers.** Each lane has about 59 variable × variable 24-bit
  multipliers, about 354 for six lanes. A Cyclone V 5CSEMA5 has 87 DSP
  blocks, so most multipliers would be built in logic. Whether all six lanes
  fit in that device's 32,075 ALMs has not been checked with vendor
  synthesis.
- **RAM.** The line buffer needs 11.5 kbit of RAM.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. Expected
values come from `tb/rt_ref_pkg.sv`, a model that uses `real` arithmetic:

- ray generation;
- the sphere and plane tests;
- shading, shadow and reflection;
- per-stage intermediate values;
- a flag for pixels that lie on an edge.

The testbenches check each of the following:

- **Arithmetic units:** results over random and corner-case operands, and
  the exact latencies (18, 35, 56, 55 and 37 cycles).
- **Stages:** outputs against the model, latencies, and holding their output
  under back-pressure.
- **`raytracer_pipe` and `trace_pipe`:** whole pixels through the chained
  stages, with random stalls on the output.
- **`row_scheduler`, `line_buffer` and `rt_avalon_slave`:** batch order, the
  `done` condition, the bank mapping and the register and flag protocol.
- **`tb_raytracer`:** the end-to-end test at the default size. It acts as the
  driver and renders four rows (100, 200, 270, 330) with the light at
  (−3, 4, −3). Then:
  - It compares all 1,920 pixels with the model. Up to half of the edge
    pixels may differ. Other pixels must match within ±8 per channel.
  - It checks the status protocol.
  - It counts each case and fails if one never occurs. The cases are sky,
    lit floor, shadowed floor, sphere reflecting the floor, sphere reflecting
    the sky, a stage stalled by its successor, and all six lanes writing in
    the same cycle.

- **`tb_frame`:** renders two complete 480×360 frames as the host would,
  row by row. The light is at (−3, 4, −3) for one frame and at (2, 3, 2.5)
  (behind the sphere) for the other. It compares every pixel with the model
  and checks that every row takes the same 9,380 cycles. Each frame takes
  3,376,800 accelerator cycles. This test takes about a minute.

About 22% of a frame's pixels are classed as edge pixels. They lie along
checker lines, the sphere's outline and shadow edges. The whole distant
floor near the horizon is also in this class, because there a checker square
is only a few pixels high. About a quarter of the edge pixels differ from the
model by more than ±8. All other pixels are within ±8.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rt_pkg.sv tb/rt_ref_pkg.sv tb/tb_raytracer.sv --top-module tb_raytracer
    ./obj_dir/Vtb_raytracer

The same command works for any other testbench: replace `tb_raytracer` with
the testbench name. The end-to-end test finishes in well under a minute.

## Files

- `rtl/rt_pkg.sv`: types, scene constants, saturation, colour helpers.
- `rtl/fp_mul.sv`, `vec3_dot.sv`, `fp_sqrt.sv`, `fp_div.sv`: arithmetic
  primitives.
- `rtl/rt_norm_stage.sv`, `intersect_sphere.sv`, `intersect_plane.sv`:
  sequenced units built from the primitives.
- `rtl/rt_ray_stage.sv`, `rt_isect_stage.sv`, `rt_shade_stage.sv`,
  `rt_shadow_stage.sv`: the four stages.
- `rtl/trace_pipe.sv` (S2 to S4) and `raytracer_pipe.sv` (the whole lane).
- `rtl/row_scheduler.sv`, `line_buffer.sv`, `rt_avalon_slave.sv`,
  `raytracer.sv`: row control, storage, bus slave and top level.
- `tb/`: the reference model package and one testbench per module.
