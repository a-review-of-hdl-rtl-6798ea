# Reorderable RGB enhancement pipeline for ultrasound images

A small streaming image processor for making ultrasound images easier to read.
Four classic point operations — **pseudo-colour**, **contrast**, **invert** and
**brightness** — are each built once and chained into a four-stage pipeline.
The main idea is that the order of the filters is not fixed. One 8-bit control word,
`Filter_order`, gives each filter its position in the chain. Changing that word
re-routes the pixel stream from the next clock on, without stopping the stream and
without any extra copies of the filters. Pixels arrive one per clock as 8-bit R, G, B
and leave four clocks later.

```
             Filter_order[7:0]  (pseudo [1:0], contrast [3:2], invert [5:4], brightness [7:6])
                    |
        +-----------+-------------------------------------------------+
pixel ->| routing: filter at position 0 reads the pixel,              |
        |          filter at position k reads position k-1's vector   |
        |   [pseudocolor]  [contrast]  [invert]  [brightness]         |
        |        \             |           |          /               |
        |      stage_select x4: position k = filter whose field == k  |
        +-----------------------------------------------------------+-+
                                                position 3 -> Rout/Gout/Bout, ready
```

## The order word and the output vectors

`Filter_order` holds four 2-bit fields:

| bits  | filter       | value = position in the chain (0 = first) |
|-------|--------------|-------------------------------------------|
| [1:0] | pseudo-colour|                                           |
| [3:2] | contrast     |                                           |
| [5:4] | invert       |                                           |
| [7:6] | brightness   |                                           |

For example `8'b00_01_10_11` puts brightness first (0), then invert (1),
contrast (2) and pseudo-colour last (3).

Two routing steps turn the word into a chain (`rt_image_system.sv`):

* **Output vector of a position** (`stage_select.sv`). Position *k* carries the
  registered output of the filter whose field equals *k*. The selection is a priority
  chain: pseudo-colour, then contrast, then invert, and brightness when none of those
  claims the position. With a proper word (a permutation) the priority never shows.
  With a repeated position, the earlier filter in the chain wins. A position nobody
  claims shows the brightness filter. So some filters drop out of the path, and the
  output is not a meaningful image.
* **Input of a filter.** A filter at position 0 reads the incoming pixel. A filter at
  position *k* > 0 reads the output vector of position *k*−1. The output vector of
  position 3 is the system output.

Every filter registers its result, so the path is register → muxes → register. The
re-routing never forms a combinational loop, whatever the word holds. The `ready`
flag of each filter travels through the same muxes as its pixel.

The top module has an assertion that `Filter_order` is a permutation on every clock
where `data_in_ready` is high. All 24 permutations are legal and tested.

### Switching on the fly

When `Filter_order` changes, the new routing applies from the next clock. Nothing is
flushed. The pixel stream keeps its one-pixel-per-clock rate. Up to three pixels that
are inside the pipeline at the moment of the switch finish along the new routing. A
pixel that has already passed filter A may then be sent through A again, or skip B.
It may also leave early or late. If you need a clean cut, switch during a gap of at
least four idle clocks, for example between frames. The brightness and contrast
settings behave the same way.

## The filters

All four share one port list: `clk`, `rst`, `data_in_ready`, `Rin`/`Gin`/`Bin` (8 bit),
`Rout`/`Gout`/`Bout` (8 bit, registered) and `ready`. Each takes one pixel per clock
and has one clock of latency. `ready` is `data_in_ready` delayed by one clock. The
outputs hold their last value while no pixel arrives.

| module               | operation per channel                                   | setting |
|----------------------|---------------------------------------------------------|---------|
| `brightness_filter`  | `clamp(in + offset, 0, 255)`                            | `offset`, 9-bit signed, −256…255 |
| `contrast_filter`    | `clamp(floor((in − 128) · gain / 16) + 128, 0, 255)`    | `gain`, unsigned 4.4 fixed point (16 = ×1.0) |
| `invert_filter`      | `255 − in`                                              | none |
| `pseudocolor_filter` | luma → colour palette (below)                           | none |

**Pseudo-colour.** The filter first reduces the pixel to one intensity,
`Y = (77·R + 150·G + 29·B) >> 8`. These are the BT.601 luma weights in 8-bit fixed
point, and a grey pixel keeps its level. `Y[7:6]` picks one of four palette segments.
Within the segment, `t = {Y[5:0], Y[5:4]}` runs from 0 to 255:

| Y       | R     | G       | B       | hue run        |
|---------|-------|---------|---------|----------------|
| 0–63    | 0     | t       | 255     | blue → cyan    |
| 64–127  | 0     | 255     | 255 − t | cyan → green   |
| 128–191 | t     | 255     | 0       | green → yellow |
| 192–255 | 255   | 255 − t | 0       | yellow → red   |

The palette is computed in logic, so there is no lookup table to load. Grey levels
that look almost the same in an ultrasound image end up as clearly different hues.

## Interface and timing of the top (`rt_image_system`)

| port                | dir | width | meaning |
|---------------------|-----|-------|---------|
| `clk`, `rst`        | in  | 1     | clock; synchronous active-high reset (clears every filter's outputs and `ready`) |
| `data_in_ready`     | in  | 1     | a pixel is on `Rin/Gin/Bin` this clock |
| `Rin`,`Gin`,`Bin`   | in  | 8     | input pixel |
| `Filter_order`      | in  | 8     | order word (above) |
| `brightness_offset` | in  | 9 s   | brightness setting |
| `contrast_gain`     | in  | 8     | contrast setting, 4.4 fixed point |
| `Rout`,`Gout`,`Bout`| out | 8     | output pixel |
| `ready`             | out | 1     | a result is on the outputs |

A pixel sampled at rising edge *n* with `data_in_ready` high appears on the outputs
after edge *n*+3, with `ready` high. There is no back-pressure: the consumer must
accept one pixel per clock. The design holds no frame, so an image of any size
streams through. After synthesis the design has 100 flip-flops: 4 × (24 data bits +
`ready`).

## What follows the original description and what does not

Taken from the description of the system:

* four filters (pseudo-colour, contrast, invert, brightness) in a pipeline whose order
  comes from one control input and can change while the system runs;
* the layout of the 8-bit order word;
* the output-vector priority chain;
* the generic filter port names and 8-bit channel widths.

This design's own choices, where the description says nothing:

* the brightness, contrast and pseudo-colour formulas and the palette;
* the width and format of the two settings, which are input ports;
* the handshake meaning of `data_in_ready`/`ready`;
* synchronous reset;
* one register per filter, which gives the four-clock latency;
* the behaviour of a switch made while pixels are in flight;
* the assertion on the order word.

The original system also came with a PC program that converts bitmap files into
vector files for simulation, and the design was targeted at an FPGA board. Neither
is part of this RTL. The end-to-end testbench generates its own images instead of
reading files.

## Files

* `rtl/img_pkg.sv` — pixel struct `rgb_t`, filter enum `filt_e`, order-word helpers,
  saturation.
* `rtl/brightness_filter.sv`, `rtl/contrast_filter.sv`, `rtl/invert_filter.sv`,
  `rtl/pseudocolor_filter.sv` — the four filters.
* `rtl/stage_select.sv` — output vector of one position.
* `rtl/rt_image_system.sv` — the top.
* `tb/tb_<module>.sv` — one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

* Each filter testbench sends corner values, every grey level and random pixels, with
  random idle clocks in between. It checks every output against integer reference
  arithmetic, the one-clock latency and `ready` timing, and that the outputs hold while
  idle. Brightness and contrast are run at the extremes of their settings and at
  random ones.
* `tb_stage_select` applies all 256 order words, legal or not, to all four positions.
  It compares the result with the priority rule.
* `tb_rt_image_system` runs end to end at the design's only size. It streams 24
  synthetic 256×256 ultrasound-like frames: a bright fan, dark cysts and speckle,
  with a few tinted columns. Each frame starts in a different one of the 24
  permutations and switches order and settings half way through. It has random idle
  clocks and one mid-stream reset. About 1.57 million pixels are compared with a
  reference that applies the filters in word order and expects the result exactly four
  clocks later. Only the pixels inside the pipeline during a switch are skipped. The
  testbench counts, and fails if any never happened: every permutation, every palette
  segment, brightness clipping at 0 and 255, contrast clipping, idle clocks, a switch
  with pixels in flight, and a reset while streaming.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/img_pkg.sv tb/tb_rt_image_system.sv --top-module tb_rt_image_system
./obj_dir/Vtb_rt_image_system
```

The end-to-end run takes about two seconds. Swap in another `tb/tb_*.sv` and its
top-module name to run a block testbench.

## Changing it

* **Different filter maths.** Edit the function inside the filter. Port lists and
  timing stay as they are, and the routing does not care.
* **Another setting** (for example a selectable palette). Add an input port to the
  filter and bring it out on the top.
* **More filters.** `N_FILT` and the 2-bit position fields in `img_pkg` are tied to
  four filters. Five or more need 3-bit fields, a wider order word, one more
  `stage_select` priority step and one more instance in the top.
