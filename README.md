# Streaming RGB image enhancement

This is a small hardware unit that applies one of four classic point operations
to a stream of 24-bit RGB pixels:

| operation  | what each output pixel is                                                  |
|------------|----------------------------------------------------------------------------|
| invert     | the grayscale negative: `255 - I` on all three channels                    |
| threshold  | white if `I > threshold`, black otherwise                                  |
| contrast   | `+ add_val` on every channel if `I > threshold`, `- sub_val` if `I < threshold` |
| brightness | `+ bright_val` on every channel if `bright_sign = 1`, `- bright_val` if 0  |

Here `I` is the pixel's grayscale intensity. Every sum and difference saturates
at 255 and 0. A point operation looks at one pixel only, so the unit keeps no
line or frame buffer. It works on images of any size and takes the pixels in
any order: one pixel goes in per clock, and its result comes out one clock later.

The operations, their settings and the intensity estimate follow the published
design "FPGA Implementation of Image Enhancement Using Verilog HDL". That design
targets a Terasic DE0-Nano board (Cyclone IV, 50 MHz oscillator). Its
evaluation runs the operations in simulation on RGB pixel files. These settings
are used there, and the end-to-end test here uses them too:

- invert;
- threshold 120;
- contrast with threshold 90, +10 and -15;
- brightness with sign 0 and amount 60.

The way the four operations are joined into one unit, the pixel interface, the
timing and the reset are this implementation's own choices.

## Grayscale intensity

Three of the operations need the intensity of a colour pixel. In principle this
is the mean `(R+G+B)/3`. The published design avoids the divider and takes
`I = ((S>>1) + (S>>2)) >> 1` with `S = R+G+B`. This is about `3S/8`, i.e. 1.125
times the true mean. It uses two shifts and one adder. Each shift truncates, and
this implementation truncates the same way, so it matches the original bit for
bit.

The approximation has one trap. For bright pixels (`S > 680`) `3S/8` exceeds
255. The 10-bit value is therefore clamped to 255 (`gray_value`). Without the
clamp, an inverted white pixel would wrap round to a light gray instead of
becoming black. This is the one place where the output intentionally differs
from a literal reading of the original arithmetic.

`gray_value` has a parameter `EXACT_MEAN`:

- `0` (the default) gives the shift-and-add estimate above.
- `1` gives the exact `S/3` through a constant divider. It never needs the clamp.

With `EXACT_MEAN = 1`, threshold and contrast decisions come out about 11 %
lower in intensity than with the default. A threshold tuned for one setting is
therefore not right for the other.

## The operations in detail

- **Threshold** (`threshold_op`): a pixel exactly at the threshold becomes
  black. Only "above" is white.
- **Invert** (`invert_op`): outputs `255 - I` (the bit complement of `I`) on all
  channels. The result is always gray. Colour is not kept.
- **Contrast** (`contrast_op`): the three channels of a colour pixel all move by
  the same amount. Whether they go up or down depends on where the pixel's
  intensity lies relative to the pivot `threshold`. Dark pixels go darker and
  bright ones go brighter, which widens the spread around the pivot. A pixel
  exactly at the pivot passes through unchanged. The original text describes
  contrast as a stretch from the darkest pixel to black and the brightest to
  white. That would need the minimum and maximum of the whole image first. The
  operation actually defined, and the one built here, is the pivot rule above.
- **Brightness** (`brightness_op`): adds or subtracts one constant on every
  channel. The sign convention is `1` for add and `0` for subtract.

Saturation is shared by brightness and contrast (`img_pkg::sat_add`,
`sat_sub`):

- A 9-bit sum with bit 8 set gives 255.
- A 9-bit difference that borrows (bit 8 set) gives 0.

The original add clamp was written as "greater than 256". Read literally, that
lets a sum of exactly 256 through as 0 after truncation to 8 bits. Here every
sum above 255 saturates.

## Pixel stream and timing (`image_enhance_top`)

```
pix_in ──┬─> gray_value ──I──┬─> invert_op ─────┐
         │                   ├─> threshold_op ──┤ op
         ├───────────────────┴─> contrast_op ───┼──> register ──> pix_out
         └─────────────────────> brightness_op ─┘      in_valid ──> out_valid
```

- One intensity unit feeds invert, threshold and contrast. All four operations
  work in parallel. `op` (`img_pkg::op_t`: `OP_INVERT`, `OP_THRESHOLD`,
  `OP_CONTRAST`, `OP_BRIGHTNESS`) picks one of them.
- `in_valid` qualifies `pix_in`. A pixel presented in cycle *n* comes out on
  `pix_out` with `out_valid` in cycle *n+1*. There is no back-pressure: the unit
  always accepts a pixel.
- `op` and all settings are sampled with each pixel. They may change from one
  pixel to the next, which is how one stream can carry several operations.
- `rst_n` is synchronous and active low. It clears `out_valid` and `pix_out`.
- An assertion in the top checks that `out_valid` is `in_valid` delayed by one
  clock.
- When `in_valid` is low, `pix_out` holds its last value.

The logic between the input and the output register is an adder tree of three
8-bit values, two shifts, one add, a compare and a 9-bit add or subtract. After
synthesis it is about 49 word-level cells and 25 flip-flops. No timing closure
figure is claimed here. The original board clock is 50 MHz, which would give
50 Mpixel/s, or about 8 ms for a 768 x 512 image.

## Parts of the original system not covered

Two parts of the original system are not covered:

- **VGA and controller expansion board.** The original hardware has a home-made
  expansion board that connects the FPGA to a controller and a VGA monitor. No
  signals, timing or resolution are given for it, so there is no VGA controller
  here.
- **DE0-Nano board peripherals.** None of them (SDRAM, EEPROM, ADC,
  accelerometer) is used.
- **Image I/O.** In the original, images are exchanged as RGB pixel files
  converted by desktop software. Here the testbenches generate their images
  instead.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs against an integer model written separately from the RTL. Each
prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench              | what it covers |
|------------------------|----------------|
| `gray_value_tb`        | Both `EXACT_MEAN` variants. Every channel sum 0..765, the clamp boundary (`S` = 680 / 681) and 20 000 random pixels. |
| `threshold_op_tb`      | Every intensity against thresholds 0, 120, 255 and random ones. |
| `invert_op_tb`         | Every intensity. |
| `contrast_op_tb`       | The 90/+10/-15 example, the equal case, both clamps and 20 000 random cases. All branches must occur. |
| `brightness_op_tb`     | The sums 255/256/257, the differences -1/0/1 and 20 000 random cases. Both clamps must occur. |
| `image_enhance_top_tb` | End to end, default parameters (see below). |

`image_enhance_top_tb` runs the unit at its default parameters:

- It generates a 768 x 512 test image (gradients plus a hashed texture).
- It streams the image through once per operation, with the settings listed at
  the top.
- It then sends 50 000 random pixels with a random operation, random settings
  and random idle cycles.
- It checks every output pixel and the exact one-clock latency.
- It counts how often each mechanism occurred. Each count must be non-zero.
  The mechanisms are: each operation, operation switches, idle cycles, the
  intensity clamp, both threshold levels, the three contrast branches, and both
  clamps of contrast and brightness.

The run covers about 1.6 million clocks and takes about a second.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert --top-module image_enhance_top_tb \
    -y rtl -y tb rtl/img_pkg.sv tb/image_enhance_top_tb.sv
./obj_dir/Vimage_enhance_top_tb
```

Replace the testbench name to run another one. `-y rtl` lets Verilator find the
modules by file name. The package has to be listed first.

## Files

| file | contents |
|------|----------|
| `rtl/img_pkg.sv` | Pixel type `rgb_t`, `op_t`, channel width, saturating helpers. |
| `rtl/gray_value.sv` | Intensity estimate, with the `EXACT_MEAN` option. |
| `rtl/invert_op.sv` | Invert operation. |
| `rtl/threshold_op.sv` | Threshold operation. |
| `rtl/contrast_op.sv` | Contrast operation. |
| `rtl/brightness_op.sv` | Brightness operation. |
| `rtl/image_enhance_top.sv` | The streaming unit: operations in parallel, select, output register. |
| `tb/*_tb.sv` | One testbench per module, plus the end-to-end test. |

All operation modules are combinational. Only the top has a clock.

To change the channel width, edit `PIX_W` in `img_pkg`. The constant 255 used
throughout is derived from it as `PIX_MAX`. The testbench models assume 8 bits.
