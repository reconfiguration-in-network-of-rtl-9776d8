# Adaptive feature selection for a smart camera's FPGA pipeline

A camera that tracks objects with the KLT method first picks *features*:
pixels whose neighbourhood changes strongly in two directions, such as
corners. The tracker's run time grows with the number of features, and its
accuracy drops when there are too few. With a fixed threshold, that number
swings widely with lighting, focus and scene content. In one set of
measurements a fixed threshold of 512 gave 152 features in normal light, 1150
in bright light and none in the dark.

This RTL keeps the feature count in a target range by making the threshold a
register. The feature selector runs in the FPGA on the live pixel stream. It
counts the features of every frame. Software on the camera processor reads
that count and moves the threshold: up when there are too many features, down
when there are too few. The threshold can be changed at any moment. The
hardware picks up the new value at the next frame boundary, so the pixel
stream never stalls. A second control is a sharpening (restoration) filter in
front of the selector. Software switches it on when only a very low threshold
reaches the target, which is the sign of a blurred image.

The design follows the adaptive tracking camera of Ghiasi, Nahapetian, Moon
and Sarrafzadeh ("Reconfiguration in Network of Embedded Systems: Challenges
and Adaptive Tracking Case Study"). That system used an IQeye3 camera with a
Virtex-E FPGA and a PowerPC. The arithmetic details, the interfaces and the
clock-domain handling here are this implementation's own; each departure is
listed under [How this differs from the original system](#how-this-differs-from-the-original-system).

```
           pix_clk domain                                           cpu_clk domain
 in_*  ─► image_restoration ─► feature_select ─► out_* (pixel + feature flag)
          (3x3, on/off)        (3x3, threshold)
                                    │
                             feature_counter ──► cdc_handshake ──► ctrl_regs ◄─► processor bus
                                                                       │
 cfg_active ◄── applied between frames ◄── cfg_pending ◄── cdc_handshake ◄┘
```

## The pixel stream

Pixels are 8-bit intensities that arrive in raster order: top-left first,
left to right, then row by row. A pixel is marked by `in_valid`, and `in_sof`
flags the first pixel of a frame. The stream has **no back-pressure**. An
imager cannot be paused, so every stage accepts one pixel per clock and
produces one pixel per clock. Gaps (`in_valid` low) are allowed anywhere in a
frame.

The output carries every pixel of the frame, in the same order:

- `out_pix`: the restored pixel, or the unchanged pixel when restoration is off.
- `out_feature`: the feature flag for that pixel.
- `out_sof` / `out_eof`: mark the first and last pixel.

For a stream without gaps, the latency from input to output is
`2*width + 10` pixel clocks. Each 3x3 stage needs to see one row ahead, so
each stage adds one row plus a few register stages.

**Blanking requirement.** Both stages finish a frame on their own after its
last pixel: they keep clocking the line buffers to produce the last row. So
after the last input pixel of a frame, the next `in_sof` must come at least
`2*width + 12` clocks later. For a 1280-pixel row that is 2572 clocks, or
about two rows of vertical blanking. Assertions flag a frame that starts
early.

## Window generation (`window_gen`)

Both filters need, for every pixel, the 3x3 neighbourhood centred on it. The
pixels of that neighbourhood arrive over a span of more than two rows, so the
last `WIN-1` rows must be stored. `window_gen` stores them as one memory of
`MAX_W` words, one word per column. Each word holds that column's `WIN-1`
previous pixels, packed (16 bits for a 3x3 window).

When a pixel arrives at column `c`:

1. Stage 0 reads word `c`.
2. Stage 1 writes word `c` back with the new pixel shifted in at the bottom
   and the oldest pixel dropped. In the same cycle it pushes the full
   `WIN`-pixel column into a `WIN`x`WIN` shift register.

The two accesses to word `c` happen in different cycles, and the next pixel
reads column `c+1`, so the memory needs only one read port and one write port.
Storage is `(WIN-1)*width` pixels in memory plus `WIN*WIN` in registers. That
is the classic `(n-1)*rows + n` pixels for an n x n window.

The window centred on pixel `k` (raster index) is complete once pixel
`k + HALF*width + HALF` has arrived, where `HALF = (WIN-1)/2`.

- **Row wrap.** The generator does not track rows for this. The raster index
  moves across row ends naturally, so the centre is always the right pixel,
  even at the left and right edges.
- **Border flag.** Windows that reach outside the image contain pixels from
  the opposite edge or from the previous frame. `out_border` flags them, and
  downstream stages do not use those pixels.
- **Flush.** After the last pixel of a frame there is nothing left to
  complete the last `HALF*width + HALF` windows. The generator steps by
  itself for that many cycles, shifting in zeros, so every frame yields
  exactly `width*height` outputs.

The width and height are sampled at `in_sof` and held for the frame. `WIN` is
a parameter: any odd size of 3 or more works, and the testbench runs 3x3,
5x5 and 15x15.

## Restoration filter (`image_restoration`)

The filter is a sharpening kernel with weight 2 on the centre pixel and −1/8
on each of its eight neighbours. The weights sum to 1, so flat areas keep
their brightness and edges are steepened. The original system ran the
restoration iteratively over the image. That iteration is unrolled here into
a single evaluation per pixel:

```
out = clamp( round( (16*c − Σ neighbours) / 8 ), 0, 255 )     (round = halves up)
```

The sum is computed exactly in 14-bit signed integers. When `enable` is low,
or the window is on the border, the centre pixel passes unchanged, with the
same latency (`width + 4`). Switching the filter on or off therefore never
shifts the stream.

## Feature test (`feature_select`)

KLT feature selection forms, for each pixel, the gradient matrix over its
neighbourhood:

```
Z = Σ_W [ gx²   gx·gy ]
        [ gx·gy gy²   ]
```

A pixel is a feature when the smaller eigenvalue of `Z` exceeds the
threshold. The original system kept the computation in a 3x3 window with two
stored rows. This design does the same:

- **Gradients.** Each of the four 2x2 cells inside the window gives one
  gradient. `gx` is the right pair of pixels minus the left pair. `gy` is the
  bottom pair minus the top pair.
- **Sums.** `Sxx`, `Sxy` and `Syy` are the sums of the cell products.
  `Z = S/16`, which is the mean squared half-difference. This keeps useful
  thresholds in the hundreds to low thousands, the range the original system
  reported.
- **Eigenvalue test, with no square root.** `λmin(Z) > T` holds exactly when
  `Z − T·I` is positive definite. That is the case when

  ```
  Sxx − 16T > 0   and   (Sxx − 16T)(Syy − 16T) > Sxy²
  ```

  This needs two subtractions and two 44-bit products per pixel, and it is
  exact.

The feature test is a three-stage pipeline:

1. Gradients.
2. Products and sums.
3. Comparison.

Latency is `width + 6`. Border pixels are never features.

**Threshold units.** The threshold is compared with eigenvalues of this `Z`,
so the values that give a given count are this design's. They are not the
numbers of the original system's kernels.

## Processor interface (`ctrl_regs`)

The bus is simple and synchronous to `cpu_clk`:

- A write takes one cycle: `cpu_wr`, `cpu_addr`, `cpu_wdata`.
- A read answers one cycle after `cpu_rd`, on `cpu_rdata`, with `cpu_rvalid`.

| offset | name | bits | access | reset |
|---|---|---|---|---|
| 0x00 | CTRL | [0] restoration enable | RW | 0 |
| 0x04 | THRESH | [15:0] feature threshold | RW | 512 |
| 0x08 | IMG_SIZE | [15:0] width, [31:16] height | RW | 1280, 1024 |
| 0x0C | COUNT | [20:0] features in the latest finished frame | RO | 0 |
| 0x10 | STATUS | [15:0] frame number of that count; [30] new count since COUNT was last read; [31] written configuration not yet delivered to the pixel side | RO | 0 |

Unused offsets read 0. The 512 reset threshold is the fixed threshold that
the adaptive scheme was compared against.

## Crossing clocks and the "between frames" rule

Software may write at any time. The pixel pipeline must see one consistent
setting per frame. Two mechanisms provide this:

1. **Whole-word crossing.** Each write marks the configuration dirty.
   `ctrl_regs` then offers the whole configuration word (enable, threshold,
   width, height) to a `cdc_handshake`. The handshake flips a request toggle,
   synchronises it with two flip-flops and copies the held word into the
   pixel domain, then returns an acknowledge toggle the same way. Only the
   toggles cross between clocks unsynchronised. The data is sampled only
   after it has been stable for at least two destination clocks.
2. **Apply between frames.** The pixel side keeps the arriving word as
   `cfg_pending`. It copies it to `cfg_active` only while no frame is in the
   pipeline. A frame is in the pipeline from its `in_sof` until its last
   output pixel. All stages use `cfg_active`. A threshold written in the
   middle of frame N therefore takes effect on frame N+1, or on frame N+2 if
   it arrives after N+1 has started.

The per-frame result (count and frame number) goes back to `cpu_clk` through
a second `cdc_handshake`. If a newer count is produced before the crossing is
free, the newer count replaces it.

## The threshold loop (software)

The control loop itself is software and is not part of the RTL. The
end-to-end testbench contains a model of it:

- It polls STATUS and reads COUNT.
- It ignores counts from frames that used an older threshold. `frame_no`
  makes that possible.
- It aims at 150 features ± 10% (135 to 165). Above the band it raises the
  threshold and below the band it lowers it. It bisects between the last
  thresholds known to be too low and too high, and doubles the threshold
  while no upper bound is known.
- If the loop settles below a threshold of 120, the model turns restoration
  on and searches again. Sharpening raises the threshold at which the target
  count is reached, which was the observation in the original system.

A real implementation can use any policy. The hardware only needs the
register map above.

## Timing summary

| path | cycles |
|---|---|
| pixel in → restored pixel (`image_restoration`) | width + 4 |
| pixel in → pixel + flag (`feature_select`) | width + 6 |
| pixel in → pixel + flag (top) | 2·width + 10 |
| last pixel in → COUNT readable | ≈ width + 6 + 3 pixel clocks + 3 cpu clocks |
| idle clocks required between frames | ≥ 2·width + 12 |
| throughput | 1 pixel per pixel clock, no stalls |

## How this differs from the original system

- **Gradient kernels.** The original feature selector computes gradients with
  Gaussian and Gaussian-derivative kernels, but its implementation also works
  in a 3x3 window with two stored rows. No kernel coefficients are published.
  Here the gradients are plain differences over the 2x2 cells of the 3x3
  window, summed over the four cells.
- **Restoration on/off.** In the original system, enabling restoration meant
  loading a different FPGA configuration. Here it is a register bit that
  takes effect at the next frame.
- **Who counts features.** The original system describes a processor
  program that counts the features and sets the threshold. Here the FPGA
  counts and the processor reads the total.
- **Colour format.** The camera's own pipeline delivers Bayer-pattern data.
  This stage works on a single 8-bit intensity per pixel. Demosaicing, or
  working on one colour plane, is left to the surrounding pipeline.
- **Window size.** Windows larger than 3x3 are supported by `window_gen`
  (the original allowed up to 15x15 at 1280 pixels). The restoration kernel
  is defined for 3x3 only, because no coefficients for larger windows are
  given.
- **Interfaces.** The register map, bus, stream signalling, frame number,
  blanking requirement, reset values other than 512/1280, rounding and
  clamping are choices of this design.

**Not included.** Several parts of the surrounding system were proprietary or
off-chip, and are not built:

- the camera's base FPGA pipeline (correction, windowing, down-sampling, DMA);
- the imager, the PowerPC and memory;
- the pan/tilt unit and network;
- KLT tracking itself, which runs in software;
- the central controller.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
the RTL with an independent reference in `tb/tb_ref_pkg.sv`. The reference
computes the restoration in floating point, and the minimum eigenvalue in
closed form with a square root.

| testbench | what it covers |
|---|---|
| `tb_window_gen` | 3x3, 5x5 and 15x15 windows, five frame sizes (including the minimum), random input gaps; every window entry, border flag, markers, latency |
| `tb_image_restoration` | noise, textured, dark and blurred frames, filter on and off, minimum 3x3 image; every pixel, latency |
| `tb_feature_select` | thresholds 0 to 65535, bright, dark and blurred scenes; every flag; monotonic count; isolated dots whose eigenvalue equals the threshold exactly (checks strict `>`) |
| `tb_feature_counter` | random frame lengths and densities, gaps |
| `tb_cdc_handshake` | both directions between unrelated clocks (10 ns and 37 ns), back-to-back sends; order, integrity, bounded latency |
| `tb_ctrl_regs` | reset values, read-back, read-only and unused offsets, send only when the crossing is ready, status bits |
| `tb_adaptive_fs_top` | 120 frames of 64x48 with the software loop closed; see below |
| `tb_table2_scenes` | fixed threshold 512 against the adaptive loop on nine 96x72 scenes (below) |
| `tb_full_size` | two 1280x1024 frames at the default parameters, with a reconfiguration written during the first frame; every pixel and flag, both counts, latency `2*1280+10` |

`tb_adaptive_fs_top` runs the loop through five phases: normal light,
bright, dark, defocused, then sharp again. It checks every output pixel
against the reference, using the configuration applied to that frame, and
checks every COUNT the processor reads. It also counts each mechanism and
fails if any one never occurs:

- threshold raised and lowered;
- count inside the band, in every phase;
- restoration switched on and off;
- configuration writes that arrive during a frame and are deferred;
- frames with input gaps.

It also checks that the active configuration never changes inside a frame.

### Fixed against adaptive threshold

`tb_table2_scenes` repeats the kind of experiment the original system was
evaluated with, on synthetic 96x72 scenes. For each scene it runs one frame
at the fixed threshold 512, then runs the adaptive loop until the count is
within 135 to 165. The testbench prints:

| scene | restoration | fixed 512: features | adaptive: threshold | adaptive: features |
|---|---|---|---|---|
| normal light | off | 278 | 960 | 152 |
| bright light | off | 489 | 1536 | 145 |
| dark light | off | 0 | 112 | 164 |
| smooth round object | off | 49 | 32 | 140 |
| complex textured object | off | 327 | 1536 | 147 |
| two objects, one blurred | off | 272 | 896 | 147 |
| same, restored | on | 1107 | 3072 | 148 |
| defocused | off | 23 | 272 | 143 |
| defocused, restored | on | 207 | 768 | 153 |

The fixed threshold gives anywhere from 0 to over 1000 features. The adaptive
loop reaches the band on every scene within five frames. Restoration raises
the threshold at which the band is reached, which means stronger features
are selected. The original system also reported that, in a two-object scene
with one object out of focus, restoration moved features onto the blurred
object. The synthetic two-object scene here does not show that: the blurred
half gets about one feature with or without restoration. The testbench prints
that number but does not check it.

## Simulating

All files are SystemVerilog-2017 and build with plain Verilator 5 (`--timing`
is needed by the testbenches). Packages must come first. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/tracker_pkg.sv tb/tb_ref_pkg.sv \
  rtl/window_gen.sv rtl/image_restoration.sv rtl/feature_select.sv \
  rtl/feature_counter.sv rtl/cdc_handshake.sv rtl/ctrl_regs.sv rtl/adaptive_fs_top.sv \
  tb/tb_adaptive_fs_top.sv --top-module tb_adaptive_fs_top
./obj_dir/Vtb_adaptive_fs_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. On this
machine, `tb_full_size` takes about 10 seconds to build and run, and
`tb_adaptive_fs_top` about 2 seconds.

The only synthesis parameter is `MAX_W`, the longest row the line buffers
hold (default 1280). It sets the depth of the two line-buffer memories:
1280 words x 16 bits each, 40,960 bits in total. The image size itself is a
run-time register.

## Files

- `rtl/tracker_pkg.sv`: types (`cfg_t`, `result_t`), widths, reset values,
  register offsets.
- `rtl/window_gen.sv`: line buffer and sliding window.
- `rtl/image_restoration.sv`: sharpening filter.
- `rtl/feature_select.sv`: gradient matrix and eigenvalue test.
- `rtl/feature_counter.sv`: per-frame count.
- `rtl/cdc_handshake.sv`: clock-domain crossing for whole words.
- `rtl/ctrl_regs.sv`: processor register file.
- `rtl/adaptive_fs_top.sv`: top level.
- `tb/`: the testbenches and the reference model.
