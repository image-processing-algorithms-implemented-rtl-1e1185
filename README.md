# Streaming pixel pipelines: pseudo-colouring and negative image

Two very small image-processing circuits for a 256 x 256, 8-bit grey-scale
image held in on-chip memory. Both share one idea: a counter walks the image
memory one address per clock, the memory returns the pixel at that address,
and a processing unit turns it into an output pixel on the same clock period.
There is no buffering, no handshake and no stall: a whole frame takes exactly
65 536 clock periods, so at 300 MHz (3.33 ns per pixel) one frame is processed
in about 218 us.

* **Pseudo-colouring** maps each grey level to one of 16 colours of a "hot"
  palette (black, dark red, red, orange, yellow, white) and outputs 8-bit R, G
  and B.
* **Negative image** outputs `255 - pixel`.

The two were designed as alternatives on the same scheme (the colour unit is
swapped for the negative unit). `image_proc_top` places both complete
pipelines side by side; they share only the clock and the reset.

## Structure

```
             +---------------+   adresa[16:0]  +--------------+  date[7:0]   +-------------+
 clk ---+--->| pixel_counter |---------------->| image_memory |------------->|   color     |--> iesire_r/g/b[7:0]
        |    +---------------+                 +--------------+              |  (or        |
 rst ---+          | wrap -> frame_end                                       |  negative)  |--> iesire[7:0]
        +------------------------------------------------------------------->| clk         |
                                                                             +-------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/image_pkg.sv` | package | pixel and RGB types, image size, the 16-entry colour table |
| `rtl/pixel_counter.sv` | `pixel_counter` | address counter, one step per rising edge, wraps after the last pixel |
| `rtl/image_memory.sv` | `image_memory` | 65 536 x 8 ROM, asynchronous read, `$readmemh` load |
| `rtl/color.sv` | `color` | grey level -> RGB, registered on the falling edge |
| `rtl/negative.sv` | `negative` | grey level -> 255 - level, registered on the falling edge |
| `rtl/pseudocolor_system.sv` | `pseudocolor_system` | counter + memory + `color` |
| `rtl/negative_system.sv` | `negative_system` | counter + memory + `negative` |
| `rtl/image_proc_top.sv` | `image_proc_top` | both pipelines side by side (ports prefixed `pc_` and `ng_`) |

Port names (`adresa`, `date`, `intrare`, `iesire_*`) are the original
Romanian ones: address, data, input, output.

## Timing within one clock period

The design uses both clock edges, and this is the one thing to understand
before changing it:

1. **Rising edge**: `pixel_counter` advances `adresa`.
2. **First half period**: `image_memory` reads combinationally; `date` settles.
3. **Falling edge**: `color` (or `negative`) registers its result.

So the output for the pixel at address *a* is valid from the falling edge of
the period in which *a* is presented until the next falling edge, half a
period later than the address. The memory access and the colour lookup must
together fit in half a clock period. If you move the output registers to the
rising edge, the outputs become one full cycle late and the memory read path
gets the whole period; the testbenches would then need their sampling points
moved.

`wrap` / `frame_end` is high while the last address (65 535) is presented.
The next rising edge returns the count to 0 and the frame starts again.
`rst` is synchronous and active high. It clears only the counter; the output
registers are rewritten on the next falling edge anyway.

The address has 17 lines (`ADDR_W = 17`), as in the original schematic, but
the count only covers the image (`DEPTH = 65536`), so line 16 is always 0 and
the memory ignores it. A 16-bit counter would do the same job.

## The colour table

The palette is the hardest part to trust, so here is exactly what it is.

**Regions.** Region *k* = 1..15 holds grey levels 16k+1 .. 16k+16, and region
0 holds 0..16. The boundaries are those of the original comparisons
(`level > 16 && level < 33`, ...). They are one level off from an even split
of 16 levels per region: region 0 has 17 levels and region 15 only 15
(241..255). `color` finds the region by counting how many of the thresholds
16, 32, ..., 240 the pixel exceeds (15 comparators and a 16-way table).

**Entries.** Four entries are the original design's values, confirmed by its
simulation of the first pixels of the test photograph. The other twelve were
not published. They are filled with the standard 16-level "hot" colour map,
scaled to 0..255:

| Region | Levels | R | G | B | Origin |
|---|---|---|---|---|---|
| 0 | 0..16 | 43 | 0 | 0 | hot map |
| 1 | 17..32 | 77 | 11 | 57 | original |
| 2 | 33..48 | 102 | 31 | 73 | original |
| 3 | 49..64 | 104 | 22 | 70 | original |
| 4 | 65..80 | 213 | 0 | 0 | hot map |
| 5 | 81..96 | 255 | 0 | 0 | hot map |
| 6 | 97..112 | 152 | 83 | 102 | original |
| 7 | 113..128 | 255 | 85 | 0 | hot map |
| 8 | 129..144 | 255 | 128 | 0 | hot map |
| 9 | 145..160 | 255 | 170 | 0 | hot map |
| 10 | 161..176 | 255 | 213 | 0 | hot map |
| 11 | 177..192 | 255 | 255 | 0 | hot map |
| 12 | 193..208 | 255 | 255 | 64 | hot map |
| 13 | 209..224 | 255 | 255 | 128 | hot map |
| 14 | 225..240 | 255 | 255 | 191 | hot map |
| 15 | 241..255 | 255 | 255 | 255 | hot map |

The hot-map entries are `round(255 * v)` with, for region k and 6 red steps,
red `min((k+1)/6, 1)`, green `min(max((k-5)/6, 0), 1)` and blue
`max((k-11)/4, 0)`. The four original entries are not on this curve; they are
darker and bluer. The result is that the palette is not monotonic. If you have
the complete original table, or want a clean palette, pass your own
16-entry `image_pkg::color_table_t` as `color`'s `TABLE` parameter.

## The image memory

`image_memory` is a read-only array with an asynchronous read, which maps to
distributed RAM or, after retiming the read, to block RAM. It is filled in two
steps at start-up:

1. Every word gets the built-in test image `pixel(x, y) = x XOR y`, where
   x = address[7:0] is the column and y = address[15:8] the row. This image
   contains every grey level, so every colour region gets used.
2. If `INIT_FILE` names a hex file (one 2-digit hex pixel per line, row by
   row), `$readmemh` overwrites the words it covers. A short file overwrites
   only the first words.

The original design was loaded with a 256 x 256 photograph, converted to hex.
That image is not included. `tb/lena_first8.hex` holds just its first eight
pixels (42, 49, 52, 47, 50, 47, 60, 106), which is enough to check against the
original design's published simulation results. To process a real image, write
65 536 hex lines and set `INIT_FILE` on `image_proc_top`, `pseudocolor_system`
or `negative_system`. The path is relative to where the simulator runs.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `ADDR_W` | 17 | counter, memory, systems, top | address lines |
| `DEPTH` | 65 536 | counter, memory, systems, top | pixels per frame (power of two) |
| `INIT_FILE` | `""` | memory, systems, top | hex image file; empty = test image only |
| `TABLE` | `image_pkg::HOT_TABLE` | `color` | 16-entry RGB palette |

All defaults are the full-size design. It simulates in under a second.

## Resources

After generic synthesis, a single pipeline has one 512 kbit memory, a 17-bit
counter and 24 output flip-flops (8 for the negative pipeline). The top holds
two 512 kbit memories (1 Mbit), because each pipeline keeps its own copy of
the image. One pipeline fits the 648 kbit of block RAM of a Spartan-3E
XC3S1600E, the device the original design targeted. Both together do not.
To build both pipelines on that device, feed the two units from one shared
counter and memory.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With plain Verilator, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module image_proc_top_tb \
    rtl/image_pkg.sv tb/image_proc_top_tb.sv
./obj_dir/Vimage_proc_top_tb
```

Replace `image_proc_top_tb` with any other testbench name. The testbenches
that load `tb/lena_first8.hex` must run from the project root.

| Testbench | What it shows |
|---|---|
| `pixel_counter_tb` | count sequence, wrap every DEPTH clocks, mid-frame reset (small 37-word counter) |
| `image_memory_tb` | all 65 536 words: the hex file's 8 pixels, the test image elsewhere, and line 16 ignored |
| `color_tb` | all 256 levels against an independent table and region search; the region edges 16/17 and 32/33; the published colours of pixels 42, 49 and 106; outputs change only on the falling edge |
| `negative_tb` | all 256 levels; published results 42 -> 213 and 49 -> 206; falling-edge timing |
| `pseudocolor_system_tb` | one full frame plus 16 pixels, pixel by pixel; first eight colours equal the published waveform; frame takes exactly 65 536 clocks |
| `negative_system_tb` | the same for the negative pipeline; first eight results 213, 206, 203, 208, 205, 208, 195, 149 |
| `image_proc_top_tb` | the top at its default size: two full frames of both pipelines and a mid-frame reset. It counts frame wraps per pipeline, the pixels that fell in each of the 16 colour regions, and resets, and fails if any of these never happens |

## Where this design departs from the original, and what is its own

* **Twelve palette entries** are the standard hot map, not the original values
  (see above).
* **Reset and frame_end** are additions. The original counter had only a clock.
* **Counter wrap**: the count stops at the last pixel and starts again at 0.
  The original counter's behaviour past the image was not specified.
* **Asynchronous memory read** is a choice. It gives the published behaviour of
  one pixel read and processed per clock period, with the result on the
  falling edge.
* **Region logic** uses 15 threshold comparisons instead of the original
  chain of range tests (which synthesised to 28 comparators). The function is
  the same.
* **Test image**: an XOR pattern stands in for the photograph.
