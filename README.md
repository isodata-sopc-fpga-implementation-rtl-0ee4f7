# ISODATA image binarization peripheral

This peripheral turns a gray-scale image into a black-and-white one by global thresholding.
It picks the threshold with the iterative ISODATA method of Ridler and Calvard, working from
the image histogram. Dark ink on light paper comes out as 0 (black) and the paper as 255
(white). It is the kind of pre-processing step that comes before OCR or document analysis.

The architecture follows the article "ISODATA SOPC-FPGA implementation of image segmentation
using NIOS-II processor" (Radjah, Ziet, Benoudjit). In that work the block is a custom
peripheral next to a Nios II soft processor on an Altera Cyclone II board. This RTL covers
only the peripheral. The processor, the bus fabric, the memory controllers and the SD-card
and VGA interfaces are vendor IP, so they are not here. The peripheral has a plain Avalon-MM
slave port where the bus fabric would connect.

## The idea: threshold from the histogram, two classes scanned at once

ISODATA splits the 256 gray levels at a threshold T into a dark class C1 (levels 0..T) and a
light class C2 (levels T+1..255). It computes the mean gray level m1 of C1 and m2 of C2, and
sets T to floor((m1 + m2) / 2). This repeats until T no longer changes. The first T is the
mean of the whole image.

All of this needs only the histogram h(g), never the pixels. So the hardware first builds
the histogram in a 256 x 16-bit memory, and then iterates on those 256 words. The memory is
dual-ported, so both classes are read at the same time:

- a **down-counter**, loaded with T, sweeps class C1 from T down to 0 on port A;
- an **up-counter**, loaded with T+1, sweeps class C2 from T+1 up to 255 on port B.

Each class has its own multiply-accumulator (MAC), which sums h(g)·g (the first moment), and
its own accumulating adder, which sums h(g) (the population). When both sweeps are finished,
two combinational dividers give m1 and m2. An add-and-shift gives their average, and a
comparator checks it against T. If the average differs from T, it goes into the threshold
register and another sweep starts. If it equals T, the unit reports done. A sweep takes
max(T+1, 255-T) clocks because the two counters run in parallel. That is at most 256 clocks
and about 128 when T is near the middle.

## One run, step by step

`isodata_seg_ip` runs these steps by itself after a single start command:

| step | what happens | clocks |
|---|---|---|
| clear | all 256 histogram bins are set to 0 | 256 |
| histogram | every image pixel is read and its bin incremented | N + a few |
| ISODATA | initial pass (overall mean), then iterations until T is stable | (256+4) + Σ (max(T+1, 255−T) + 4) |
| binarize | every pixel is rewritten in place as 0 (≤ T) or 255 (> T) | N + 1 |

N is the image size in pixels. A 160 × 120 test page converges in 3 iterations. At 100 MHz
(the original system clock) the whole run takes about 0.4 ms. Most of that time goes to the
two passes over the pixels.

## Histogram builder (`histogram_unit`)

This is the least obvious part. Each pixel does a read-modify-write on the histogram memory.
The pixel value addresses the memory, the bin is read, a 16-bit adder adds 1, the result goes
into a 16-bit register, and from there it is written back. The memory read takes one clock.
To take one pixel per clock, the loop is therefore a three-stage pipeline:

```
clock t    : read bin[p_t]
clock t+1  : bin + 1  -> write register
clock t+2  : write register -> bin[p_t]
```

If a pixel hits the same bin as one of the two pixels before it, the value it read is stale.
This happens all the time in real images, which have long runs of equal pixels. So the adder
input takes the newest value from one of three sources, in this order of priority:

1. the write register, if the previous pixel had the same bin;
2. a one-clock copy of the last written value, if the pixel two ahead had the same bin;
3. the memory read data otherwise.

The original describes the read → +1 → register → write loop but not how back-to-back
repeats are handled. The forwarding is this design's own. The bins are 16 bits. The class
population accumulators are also 16 bits, and that limits an image to 65535 pixels.

## ISODATA unit (`isodata_unit`)

A small state machine runs the datapath: `S_LOAD` (load counters, clear accumulators),
`S_SCAN` (both counters sweep), `S_WAIT` (last read data arrives), `S_EVAL` (dividers and
comparator settle, T is loaded), `S_NEXT` (done or another sweep).

- **Initial threshold.** The method asks for the overall mean as the first T. The unit gets
  it with the same datapath: it makes one pass with T = 255, so every level falls in class
  C1 and m1 is the overall mean. This pass is not counted as an iteration.
- **Empty class.** If a class has no pixels (for example, a flat image), the method has no
  answer. The unit stops with `error` high, and the peripheral then leaves the image as it
  is and sets the ERROR status bit.
- **Termination.** floor((m1(T) + m2(T)) / 2) never decreases as T increases. So the
  sequence of thresholds is monotone and always reaches a fixed point. No iteration limit
  is needed.

Sub-blocks: `threshold_register` (with the T+1 incrementer), two `level_counter`s, two
`mac_unit`s (32-bit), two `sum_acc`s (16-bit), two `class_mean_div`s (combinational
restoring dividers, 32 / 16 → 8 bits, rounding down), `mean_average` (add and shift right)
and `threshold_comparator` (registered DONE).

## Binarizer (`binarizer`)

An address counter walks the image memory, one pixel per clock. A comparator checks each
pixel against T, and a multiplexer writes back 0 or 255 to the address read one clock
earlier. A pixel equal to T counts as background (0), matching the class split above.

## Processor interface

The Avalon-MM slave has 32-bit data. Reads return data one clock after they are accepted,
flagged by `avs_readdatavalid`. Address bit `AW` (AW = clog2(IMG_PIXELS)) selects the
image or the registers:

| address | name | access |
|---|---|---|
| `{1, i}` | pixel i | bits 7:0; read/write while idle, `avs_waitrequest` holds the bus while a run is busy |
| `{0, 0}` | CTRL | write bit 0 = 1 to start (ignored while busy) |
| `{0, 1}` | STATUS | bit 0 busy, bit 1 done, bit 2 error (both cleared by a start) |
| `{0, 2}` | THRESH | threshold of the last run |
| `{0, 3}` | ITER | ISODATA iterations of the last run |

`irq` follows the done bit. The software flow is: write the image, write CTRL, wait for
`irq` (or poll STATUS), read THRESH, then read the image back. In the original system the
image comes from the SD card and goes to the VGA output or back to the card.

## Sizes

| parameter | default | origin |
|---|---|---|
| gray levels / histogram | 256 × 16 bit (4 Kbit) | original |
| MAC accumulator | 32 bit | original (synthesis table) |
| population accumulator | 16 bit | original (synthesis table) |
| threshold, counters | 8 bit | original |
| `IMG_PIXELS` (on-chip image memory) | 19200 (160 × 120) | this design: the original gives no image size; 153,600 bits fit the 483,840 memory bits of the original EP2C35 device, a 65535-pixel image would not |

The register map, the on-chip image memory, the reset (asynchronous, active low) and all
cycle timing are this design's choices.

## Departures from the original and open points

- The original describes the iterations as starting either from the overall mean or from
  the midpoint of the occupied gray-level range. This design starts from the overall mean.
- One RTL view of part of the MAC in the original shows a 17-bit result. This design follows
  the register counts of the synthesis table instead: a 32-bit accumulator with an
  unregistered product.
- The original draws the binarization multiplexer with "0" and "255" inputs but does not
  state the sense as a rule. This design makes pixels above T white, matching "background =
  levels 0..T".
- The original keeps images in board memory (SRAM/SDRAM) behind the bus. Here the image sits
  in an on-chip memory inside the peripheral, so images larger than `IMG_PIXELS` must be
  tiled or scaled. The 65535-pixel limit of the 16-bit population accumulators applies in
  any case. The document-image test sets used with the original are larger than both limits.
- In the original, the end of the threshold computation is signalled to the processor before
  binarization. Here the ISODATA unit starts the binarizer directly, and the processor sees
  one DONE at the end of the whole run. The threshold remains readable in THRESH.
- The counter-bank histogram (256 counters) is mentioned in the original only as the
  alternative to the memory version, and is not built.

## Files

`rtl/` holds one module per file, plus `isodata_pkg.sv` (widths, register map, sequencer
states). `tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. Each compares against a software model (histogram,
Ridler–Calvard iteration, integer division) and checks cycle counts where the design
defines them. `tb_isodata_seg_ip` runs the whole peripheral at its default size on four
images: a synthetic text page, two flat regions, low-contrast noise, and a flat image that
must end in an error. It also counts that forwarding, multi-iteration runs, the empty-class
error, bus stalls and the interrupt all occurred.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl --top-module tb_isodata_seg_ip \
    rtl/isodata_pkg.sv tb/tb_isodata_seg_ip.sv -o sim
./obj_dir/sim
```

The same command runs any other testbench with its name substituted. Verilator finds the
modules in `rtl/` through `-Irtl`. Lint with `verilator --lint-only -Wall -Irtl
rtl/isodata_pkg.sv rtl/<module>.sv`. The remaining warnings are unused bits: the upper bus
data bits, the upper quotient bits and the dropped LSB of the mean sum.
