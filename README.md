# 2D median filter for RGB video, built on a sorted systolic cell array

This is a non-recursive two-dimensional median filter for 24-bit RGB video,
sized for standard-definition PAL/NTSC (720 × 576 pixels, 25 frames/s) with
a window of up to 11 × 11 pixels. A median filter removes impulse noise
("salt and pepper") while keeping edges sharp. Each output pixel is the
median of the W_H × W_V input pixels around it.

Two ideas keep the hardware small:

* **Insertion into an always-sorted array.** The window's samples sit in a
  row of W_H·W_V cells kept in ascending order. Each clock, one new sample
  is inserted and the oldest one is dropped. The cells between the two
  positions shift by one place. This needs one comparator per cell (121 for
  11 × 11), where a sorting network needs far more. The median is always in
  the middle cell.
* **Sort a short key, fetch the colour later.** Sorting is done on a 10-bit
  key, Y = R + G + B, not on the 24-bit colour. Each cell stores its sample's
  *age* next to the key. The age is the number of samples that arrived after
  it. The colours of the last samples are kept in a shift register (the
  *delay line*). The median cell's age is used as the read address, so the
  output colour is the colour of the median-key pixel. Every output colour
  therefore appeared in the input.

Colours with the same key are treated as equal. Very different colours can
share a key (e.g. pure red and pure green of the same level), so this is a
median of a luminance-like value, not a per-channel median.

## Data flow

```
 in_rgb ─► line_buffer ─► column_serializer ─┬─► filter_value_gen ─► cell_array ──► median age
 (1 pixel   (W_V-1 lines)  (W_V samples,     │    (Y = R+G+B,         (W_H·W_V      │
  per W_V                   1 per clock)     │     1 clock)            sorted cells)│
  clocks)                                    │                                    ▼
                                             └──────────────► delay_line ──► out_rgb
                                                             (RGB of recent samples)
```

Module hierarchy (`rtl/`):

| module | role |
|---|---|
| `median_filter_2d` | top level |
| `input_front_end` | `line_buffer` + `column_serializer` + `filter_value_gen` |
| `filter_core` | `cell_array` + `delay_line`, latency compensation, output register |
| `cell_array` | W_H·W_V `filter_cell`s and `empty_gen` |
| `median_pkg` | shared types: `rgb_t`, `fv_t`, `ctrl_t`, `sample_t`, `fv_sample_t`, `cell_sel_e` |

### Moving the window one column = W_V new samples

Moving the window right by one pixel brings in a new column of W_V pixels
and drops the oldest column. The cell array takes exactly one sample per
clock. So for each input pixel, the front-end sends the W_V pixels of that
pixel's column one after another, oldest line first. This works because the
samples are dropped in the order they arrived: after a full column has gone
in, the array holds exactly the last W_H columns. The filter clock must
therefore be W_V times the pixel rate. For 720 × 576 × 25 = 10.368 Mpixel/s
and W_V = 11 that is 114.05 MHz. One frame takes 720·576·11 clocks.

The **line buffer** holds the previous W_V − 1 lines. It is one memory of
LINE_WIDTH words, and each word holds the W_V − 1 stored pixels of one
column. That is 720 × 240 bits (21,600 bytes) at the default size, which is
about eleven 18-kbit block RAMs. For each input pixel the word at its column
is read, sent on as a column together with the new pixel, and written back
shifted by one pixel: the oldest line drops out and the new pixel goes in.

## The sorting cell (`filter_cell`) and the array

Each cell holds a key (`data`), an age counter and an `empty` flag. The
flag is set when the age has reached N − 1 (N = W_H·W_V), meaning the cell
holds the oldest sample, which leaves with the next insertion. Exactly one
cell is empty at any time. `cell_array` asserts this.

Each cell compares the new sample with its own key: `cmpr = new > data`.
Because the array is sorted, `cmpr` is 1 for a prefix of the cells. The
insertion point is the first cell with `cmpr = 0`. `empty_gen` gives every
cell two OR-chain flags: `empty_left` (some cell to its left is empty) and
`empty_right` (some cell to its right is empty). With these and the
neighbours' `cmpr` bits, each cell decides on its own:

| situation | condition | the cell loads |
|---|---|---|
| this cell is empty | `cmpr_left && !cmpr_right` | the new sample |
| | `!cmpr_left` (new sample belongs further left) | left neighbour (shift right) |
| | otherwise (belongs further right) | right neighbour (shift left) |
| hole is to the right | `!cmpr` and `cmpr_left` | the new sample |
| | `!cmpr` and `!cmpr_left` | left neighbour |
| | `cmpr` | keeps its sample |
| hole is to the left | `cmpr` and `!cmpr_right` | the new sample |
| | `cmpr` and `cmpr_right` | right neighbour |
| | `!cmpr` | keeps its sample |

Edge cells see `cmpr_left = 1` at cell 0 and `cmpr_right = 0` at cell N − 1,
which stand for −∞ and +∞. Ages move with the data. A new sample gets age 0:
the multiplexer selects −1 and the incrementer after it makes 0. A sample
loaded from a neighbour gets that neighbour's age + 1. A kept sample's age
goes up by 1. All of this happens in a single clock.

Example with N = 5. The cells hold keys `[3 5 8 9 12]` with ages
`[2 4 0 3 1]`, so cell 1 (key 5, age 4) is empty. A new key 10 arrives;
`cmpr` is `[1 1 1 1 0]`. Cell 0 has the hole on its right and `cmpr = 1`, so
it keeps 3. Cell 1 is empty and both neighbours have `cmpr = 1`, so it takes
its right neighbour's 8. Cell 2 has the hole on its left, `cmpr = 1` and
`cmpr_right = 1`, so it takes 9. Cell 3 has `cmpr = 1` and `cmpr_right = 0`,
so it takes the new 10. Cell 4 has `cmpr = 0` and keeps 12. The result is
`[3 8 9 10 12]` with ages `[3 1 4 0 2]`, and cell 2 is now the empty one.

**Equal keys.** The new sample goes in front of all equal keys, so equal
keys are ordered newest first. This makes the output colour well defined
when several pixels of the window share the median key. The testbenches use
this same ordering in their reference models.

**Start-up.** After reset, cell i holds key 0 with age i. The window
therefore starts as N zero samples, and the delay line starts at zero to
match.

**Clock enable.** The cells change only in clocks where a sample is
presented. Gaps in the input do not age the samples.

## Delay line and latency compensation

`delay_line` is a shift register of N + 1 colours with a combinational read
port at any position. This is the structure of FPGA addressable shift
registers (SRL16 chains). It is written from the colour stream as the
serializer emits samples. The key of the same sample reaches the cells one
clock later, after `filter_value_gen`. At any moment, therefore, the delay
line may hold a sample that the cells do not hold yet. `filter_core` counts
such samples (`in_flight`: 0 or 1) and reads at `med_age + in_flight`.
During continuous streaming the count is 1. During gaps it is 0. Counting it
keeps the address right in both cases.

When the last sample of a column (`col_last`) has been sorted in, the window
of that pixel is complete. On the next edge, `filter_core` registers the
colour read from the delay line (`out_rgb`), the median key (`out_fv`) and
the pixel's `line_end`/`frame_end` flags.

## Interface and timing (`median_filter_2d`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | pixel handshake; a pixel is taken when both are high |
| `in_rgb` | in | 24 | `rgb_t` {r, g, b}, 8 bits each |
| `in_line_end`, `in_frame_end` | in | 1 | marks the last pixel of a line / of a frame |
| `out_valid` | out | 1 | one-clock strobe per output pixel |
| `out_rgb`, `out_fv` | out | 24, 10 | median pixel and its key R+G+B |
| `out_line_end`, `out_frame_end` | out | 1 | the flags of the input pixel the output belongs to |

* **Rate.** At most one pixel every W_V clocks. Under a continuous input,
  `in_ready` admits exactly one pixel per W_V clocks and the core takes a
  sample every clock with no bubbles.
* **Latency.** `out_valid` rises W_V + 3 clocks after the edge that
  accepted the pixel: 1 for the line buffer read and the serializer load,
  W_V − 1 until the column's last sample is out, then 1 each for the key,
  the sort and the output register.
* **Output order and position.** There is exactly one output per input
  pixel, in input order. Take the output for input pixel (row y, column x).
  It is the median over rows y−W_V+1 … y and over the columns of the W_H
  most recent pixels, x−W_H+1 … x. So it is the filtered value of image
  position (y − (W_V−1)/2, x − (W_H−1)/2). A user who wants the output
  aligned to the image must account for this offset.
* **Borders are not treated specially.** At the start of a line, the window
  still holds the last columns of the previous line. In the first rows of a
  frame, the upper rows come from the line buffer, which holds the end of
  the previous frame (zeros after power-up). The line length follows the
  `line_end` flags up to LINE_WIDTH. The column counter also wraps at
  LINE_WIDTH.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LINE_WIDTH` | 720 | pixels per line (line buffer depth) |
| `W_H`, `W_V` | 11, 11 | window width and height; use odd values, W_V ≥ 2, and a line of at least 2 pixels |

The window size is fixed when the design is built. A smaller window needs
new parameter values, not a run-time setting. At the defaults, yosys coarse
synthesis reports about 3,600 word-level cells and 2,552 flip-flop bits. On
top of that come the 172,800-bit line buffer memory and the 122 × 24 delay
line. The 121 cells make up almost all of the logic. The critical path runs
from a cell's key through its comparator, the neighbour's decision logic
and the multiplexers. The `empty_left`/`empty_right` chains are ripple ORs
across all 121 cells. If timing is tight, they are the first thing to turn
into a tree.

## Design choices and departures

The following points are this implementation's choices:

* Valid/ready handshake on the input, and the column serializer between the
  line buffer and the key generator.
* Output alignment, flag delivery with the output pixel, and no border
  handling (see above).
* The comparison polarity `new > data` with ascending order, and the
  resulting rule for equal keys.
* A one-stage key generator, and latency compensation by counting samples
  in flight rather than adding a constant.
* The reset state: cells at key 0 with ages 0 … N−1. The line buffer and
  delay line are zero-initialised, with no reset on them.
* The line buffer is a single wide memory rather than one memory per line.

Not included:

* A recursive mode. The outline is two 2:1 multiplexers that would feed the
  median key and colour back into the array and the delay line. It is not
  specified when they select the fed-back value.
* A variant that takes several samples per clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_filter_cell` | random neighbourhoods against a shift-semantics model; all four operations occur |
| `tb_empty_gen` | OR chains against a loop, one-hot and random vectors |
| `tb_cell_array` | 3×3 array: order, age permutation, one empty cell, median key and age vs a rank model, with many equal keys |
| `tb_delay_line` | every address after random pushes |
| `tb_filter_value_gen` | sum, extremes, flags, one-clock latency |
| `tb_line_buffer` | columns over 3 frames with random stalls on both sides; one pixel/clock when not stalled |
| `tb_column_serializer` | sample order, `col_last`, no idle clock between columns |
| `tb_input_front_end` | colour and key streams, one pixel per W_V clocks |
| `tb_filter_core` | median colour/key/flags and output time, with gaps (both values of `in_flight`) |
| `tb_median_filter_2d` | 4 frames of 12 × 6 pixels through a 5 × 3 window, gaps and back-pressure, ties; every output vs a reference; rate, latency, flags; counts each mechanism (four cell operations, hole left/right/at the insertion point, both compensation values) and fails if one never occurs |
| `tb_median_full` | one full 720 × 576 frame at the default parameters (11 × 11), every output against a histogram-based reference; checks the frame takes 720·576·11 clocks (+6) |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/median_pkg.sv tb/tb_median_filter_2d.sv --top-module tb_median_filter_2d
./obj_dir/Vtb_median_filter_2d
```

The full-frame test (`tb_median_full`) runs in about 15 s including the
build. To test another size, change the localparams at the top of
`tb_median_filter_2d`. Not verified: timing closure on any FPGA and
behaviour on real video.
