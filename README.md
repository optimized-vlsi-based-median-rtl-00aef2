# 3x3 median filter from data comparators

Impulse ("salt-and-pepper") noise replaces single pixels with 0 or 255.
A median filter removes that noise and keeps edges: each output pixel
becomes the median of its 3x3 neighbourhood. This RTL computes that median
in hardware. It uses only one kind of cell, the **data comparator (DC)**.
A DC takes two numbers and puts out the higher and the lower of them.
Nineteen DCs, wired as a fixed network, reduce the nine window pixels to
their median in one combinational pass. The design has no clock, no
registers and no control logic.

## The data comparator

```
        +-----------+
 A ---->| A < B     |--- sel
 B ---->|           |
        +-----------+
 H = sel ? B : A      (mux: data-in 0 = A, data-in 1 = B)
 L = sel ? A : B      (mux: data-in 0 = B, data-in 1 = A)
```

The DC is one magnitude comparator plus two 2:1 multiplexers that share its
result as their select line. The two multiplexers see the inputs in opposite
order, so one gives the maximum and the other the minimum. When A equals B
both outputs carry that value, so ties need no special case. File:
`rtl/data_comparator.sv`.

## The three-value group

Most of the network is built from one repeated group of three DCs
(`rtl/dc_sort3.sv`):

```
 x,y  -> DC-a -> hi_a, lo_a
 lo_a, z -> DC-b -> hi_b, lo      (lo = minimum of x, y, z)
 hi_a, hi_b -> DC-c -> hi, med    (hi = maximum, med = median)
```

## Why 19 comparators give the median of nine

The network, in `rtl/mf_dc.sv`, treats the window as three rows of three
pixels:

| level | cells | work |
|---|---|---|
| 1 | DC-1..3, DC-6..8, DC-15..17 | sort each row into high Hi, median Mi, low Li |
| 2 | DC-4, DC-5 | lowest of H1, H2, H3 |
| 2 | DC-18, DC-19 | highest of L1, L2, L3 |
| 2 | DC-9..11 (a three-value group) | median of M1, M2, M3 |
| 3 | DC-12..14 (a three-value group) | median of the three level-2 results = M |

The lowest row-high is at least as large as five pixels: the three pixels of
its own row, and the lows and medians of the other two rows. The highest
row-low is likewise no larger than five pixels. The median pixel therefore
always lies between these two values. The last stage picks it out with the
median of the row medians. The network is not a full sort: it uses 19 DCs,
where sorting nine values would take about 25.

The longest path runs through 9 DC cells: 3 in the row sort, 3 in the
median of the medians, and 3 in the final group. This path delay is the
whole latency of the filter. In a real system the filter sits between a
window generator (line buffers) and an output register. Neither of those
is part of this RTL.

## Interface

`mf_dc #(parameter int unsigned DATA_W = 8)`

| port | dir | width | meaning |
|---|---|---|---|
| `p0` .. `p8` | in | DATA_W | window pixels, row-major: `p0-p2` top row, `p3-p5` middle row (`p4` is the centre), `p6-p8` bottom row |
| `median` | out | DATA_W | median of the nine pixels, unsigned compare |

The inputs are unsigned. Any `DATA_W` of 2 or more works; the default is 8
(grey levels 0 to 255). `rtl/mf_dc_pkg.sv` holds the shared constants: pixel
width 8 and window size 9.

## How it relates to the published design

These points follow the published architecture:

* The DC structure, including its multiplexer input order.
* The 19-cell network and its numbering.
* The grouping into row sorters, min-of-highs, max-of-lows and
  median-of-medians.
* The final median taken from the low output of DC-14.
* The 8-bit `p0..p8` / `median` interface.

These are this implementation's own choices:

* Which row highs enter DC-4 and which enter DC-5, and likewise which row
  lows enter DC-18 and DC-19. Either order gives the same result.
* The width parameter and the package.

The published source describes the network as having fourteen blocks in one
place, but draws and numbers nineteen. The RTL follows the nineteen.

What is not here:

* A one-bit `error` output appears in the published timing report, but
  nothing says what it means, so it is not built.
* A "hybrid switching of data blocks" for different noise types is
  mentioned but never described, so it is not built either.
* The published FPGA results could not be reproduced here: 393 LUTs, about
  3.6 ns delay, about 21 mW of power. Coarse synthesis of this RTL
  gives 49 word-level cells: 19 comparators and 30 multiplexers.

## Verification

Each testbench checks itself. It ends with one line
`TB_RESULT checks=N failures=M` and stops with a failure if a watchdog time
runs out.

* `tb/tb_data_comparator.sv` tries all 65,536 input pairs of the 8-bit cell.
* `tb/tb_dc_sort3.sv` tries every triple of a 4-bit group and 50,000 random
  8-bit triples.
* `tb/tb_mf_dc.sv` runs the filter at its default parameters:
  * Two worked windows. `4E 56 69 FF 34 38 4D 3F 47` gives `4D`, and
    `92 65 10 75 95 90 20 50 53` gives `65`.
  * All 512 windows of 0/1 pixels. By the 0-1 principle for comparator
    networks, this alone shows the wiring is right for every input.
  * Flat windows with impulses.
  * 200,000 random windows, half of them with many equal values.

  It also counts how often each level-2 path (lowest row-high,
  median of row medians, highest row-low) alone delivered the median, and
  how often a centre impulse was removed. It fails if any of these never
  happened.
* `tb/tb_mf_dc_image.sv` generates a 512x512 test image and turns 20 % of
  its pixels into salt-and-pepper noise. It filters every pixel through
  the network, with edges replicated, and checks every output against a
  software median. It also checks that the filtered image lost nearly all
  impulses and gained at least 15 dB of PSNR. It prints about 12 dB before
  and 30 dB after.

Running a test with plain Verilator, for example the top level:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/mf_dc_pkg.sv rtl/data_comparator.sv rtl/dc_sort3.sv rtl/mf_dc.sv \
  tb/tb_mf_dc.sv --top-module tb_mf_dc -o sim
./obj_dir/sim
```

Lint reports some DC outputs as unused, for example the high output of the
cell that keeps the lowest row-high. Those outputs are left unconnected on
purpose.

## Changing it

* **Pixel width:** set `DATA_W`.
* **Signed pixels:** change the compare in `data_comparator` to a signed
  one.
* **Pipelining:** registers can be inserted between the levels in `mf_dc`.
  Register all signals that cross a level boundary together, to keep the
  nine paths aligned.
