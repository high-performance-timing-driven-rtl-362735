# Timing-driven 2D rank filter

A rank filter replaces every pixel by the pixel of a chosen rank within the
window around it: rank 0 gives the minimum, the middle rank the median, the
top rank the maximum. Median filtering removes salt-and-pepper noise and
keeps edges sharp. This RTL filters a 24-bit RGB pixel stream with a
WV x WH window. Instead of ranking R, G and B separately, which would make up
colours that are not in the image, it ranks one magnitude per pixel (R+G+B,
10 bits) and outputs the original colour of the winning pixel.

The key trade-off is time against area. Each output needs WV new pixels
(one new window column). The core takes NI of them per clock. NI = WV is a
fully parallel filter running at the pixel rate. NI = 1 is a word-serial
filter running at WV times the pixel rate. Anything in between is a
"multiword" core. A fast clock lets a small NI do the work, and the
comparator count falls roughly in proportion to NI:

    comparators = (TAPV - NI)*NI + NI*(NI - 1)/2

The default build is a 7 x 7 window with NI = 2 on 1920-pixel lines. The core
runs at 4 clocks per pixel, because 7 rows are padded to 8. That suits
1080p video at a 75 MHz pixel clock with a 300 MHz core clock.

## How a sample's rank is kept up to date

The core never sorts. It keeps the window as a shift register of samples,
`d[0]` the newest. Next to every sample `i` it keeps a row of comparison
bits `m[i]`. Bit `b` of that row is 1 when sample `b` counts as smaller than
sample `i`. Equal values are ordered by age, so the older one counts as
smaller. Every sample therefore has a distinct rank, and the rank of sample
`i` is simply the number of ones in `m[i]`.

When NI samples enter, everything moves NI places towards the old end. The
comparison bits move NI places diagonally, so a bit that compared two old
samples stays valid and is never recomputed. Only pairs that include a new
sample need a comparator. One comparator serves both bits of a pair: the
old sample's bit takes the result, and the new sample's bit takes its
inverse. Bits that compared with the samples that just left fall off the
end.

A five-sample example, with samples entered oldest first as 0, 25, 37, 12,
12:

| position (age)  | 4 | 3  | 2  | 1  | 0  |
|-----------------|---|----|----|----|----|
| value           | 0 | 25 | 37 | 12 | 12 |
| ones in its row | 0 | 3  | 4  | 1  | 2  |

The second 12 is newer, so it ranks above the first. The core then compares
every count with `rank`. Exactly one position matches, and an encoder turns
it into an address.

## Padding and masks (`WV` not a multiple of `NI`)

A column is fed as `ceil(WV/NI)` groups of NI samples. When WV is not a
multiple of NI, the last group is padded with zeros. Each column then takes
`WVV = ceil(WV/NI)*NI` positions, and the registers hold a virtual kernel of
`TAPV = WVV*WH` positions. Padding samples are compared like any other
sample. Their bits are removed by a constant mask before the one-counters,
and they are never chosen.

The mask only has to be right in the one cycle per pixel that matters: the
clock in which the last group of a column enters. Only then is the window
aligned with the image columns. In that cycle, position `i` holds the pixel
of column age `i / WVV` (0 = newest column) and row `WVV-1 - i % WVV`
(0 = top row). Addresses from the other cycles are ignored.

The same mask gives non-rectangular windows. `WIN_MASK` has one bit per
window pixel, bit `c*WV + r`, where `c = 0` is the leftmost column and
`r = 0` the top row. For example, `9'b010_111_010` is a 3 x 3 plus shape.
The rank then runs over the enabled pixels only.

## Weighted ranks (`USE_WEIGHTS = 1`)

With integer weights, each comparison bit counts as many times as the weight
of the pixel it compares with. The count for sample `i` is then the total
weight of the smaller samples, a value in `0 .. W-1`, where W is the sum of
the weights. Not every value occurs, so the core does not test for equality.
It forms `|count - rank|` for each position and picks the smallest with a
tree of two-input minimum cells. Each cell passes on one bit saying which
input won, and these bits together form the address. On a tie the lower
position wins. `WEIGHTS` holds a `WT_W`-bit (default 4) weight per window
pixel, indexed like `WIN_MASK`. A weight of zero removes the pixel. The
default of all ones makes it an ordinary rank filter.

## Several outputs per column (`MULTI_OUT = 1`)

The padding rows can hold real pixels instead of zeros. Then the kernel of
`WVV` rows contains `NOUT = WVV - WV + 1` vertically overlapping windows:
window `k` covers kernel rows `k .. k+WV-1`. For 3 x 3 with NI = 2, a 4-row
kernel holds two 3 x 3 windows. The comparison bits already cover every pair
in the kernel, so `multi_output_core` shares one comparison matrix. It
replicates only the masks, the one-counters and the encoders, once per
window. The line buffer keeps `WVV-1` lines so the extra rows are real
image lines. The delay line gets one read port per window. Each accepted
pixel then gives `NOUT` results on `out_pix[NOUT-1:0]`. `out_pix[k]` belongs
to the window whose bottom row is `WVV-WV-k` lines above the current line.

Fewer core clocks per output only pay off if the input is scanned so that
each column serves new output lines. That needs an output buffer to put the
results back in raster order. Neither the scan order nor the output buffer
is built here: the input is still one pixel per column.

## Data flow and blocks

```
in_pix -> line_buffer --NI colours/clock--+--> fvg x NI --> filter core --addr--+
            ^                             |                                     v
          cntrl (accept, grp, step)       +-------------------------------> delay_line -> out_pix
          cntrl (sync / valid delay) --------------------------------------> out_valid, out_sync
```

| file | role |
|---|---|
| `rank_pkg.sv` | `rgb_t`, filter value type, shared constants |
| `line_buffer.sv` | WV-1 line memories. Builds the column ending at each new pixel and hands it out NI rows at a time. |
| `fvg.sv` | Filter value generator: R+G+B, or Y passed through |
| `rank_matrix.sv` | Sample and comparison-bit shift registers with the comparators |
| `filter_core.sv` | Rank core: `rank_matrix`, masked one-counters, equality, encoder |
| `weighted_filter_core.sv` | Weighted core: `rank_matrix`, weighted counts, difference units, minimum tree |
| `multi_output_core.sv` | Rank core with one mask, counter set and encoder per overlapping window |
| `delay_line.sv` | Full-colour pixels moving in step with the core, read at the core's address |
| `cntrl.sv` | Input handshake, group sequencing, core clock enable, delayed sync and valid |
| `rank_filter_top.sv` | Wires the blocks together |

The colour and the magnitude of a pixel travel separately. The core only
ever sees 10-bit magnitudes. The delay line holds the 24-bit colours in the
same order, so the core's position is also the colour's address.

## Timing

* Input: `in_valid`/`in_ready`. A pixel may be taken every `ceil(WV/NI)`
  clocks. An offered pixel must stay offered until it is taken; `cntrl`
  holds an assertion for this.
* The core, the filter-value path and the delay line advance only on `step`,
  which is high while a column is being fed. With back-to-back pixels it is
  high every clock.
* The core's address follows two enabled clocks after a column completes. It
  passes through the comparison registers, the one-counters and the address
  register. The delay line is `2*NI` entries longer than the core to cover
  this. Its output is registered.
* Every accepted pixel gives exactly one `out_valid` pulse, in order, with
  the pixel's own `in_sync` word on `out_sync`. When pixels arrive back to
  back, `out_valid` comes `ceil(WV/NI) + 4` clocks after the pixel was
  accepted. Results move only while later pixels keep the core stepping. The
  last pixel's result stays inside until more pixels arrive.
* The output for stream position (x, y) is the window whose bottom-right
  pixel is (x, y). Centring is up to the user, for example by delaying sync.
* `rank` is read when the address is formed. Hold it steady while filtering.

## Parameters (`rank_filter_top`)

| parameter | default | meaning |
|---|---|---|
| `LINE_W` | 1920 | pixels per line, the line memory depth |
| `WV`, `WH` | 7, 7 | window height and width |
| `NI` | 2 | samples per clock into the core; 1 = word-serial, WV = fully parallel |
| `SYNC_W` | 3 | width of the sync word carried with each pixel |
| `WIN_MASK` | all ones | window shape |
| `USE_WEIGHTS` | 0 | 1 selects the weighted core |
| `WT_W`, `WEIGHTS` | 4, all ones | weight width and per-pixel weights |
| `MULTI_OUT` | 0 | 1 selects the multiple-output core, real padding rows and `NOUT` outputs |
| `SUM_RGB` | 1 | 1: magnitude R+G+B; 0: the first component (Y) alone |

`rank` is `clog2(TAPV+1)` bits wide, or wide enough for the weight sum when
`USE_WEIGHTS` is set.

## Where this departs from the original architecture, or adds to it

* **One clock.** The original architecture runs the core at `FS*WV/NI` and
  leaves the meeting of pixel and core clocks open. Here everything runs on
  the core clock behind a ready/valid handshake.
* **Comparator inputs.** The comparators compare the incoming samples with
  the registers they will sit next to after the shift, not with a registered
  new-sample stage. Window and comparison bits therefore change on the same
  edge. The comparator count is unchanged.
* **One-counters.** All one-counters are adder trees. The optimisation that
  updates an old sample's count with an incrementer/decrementer is not used.
  With adder trees, masking reduces to a constant AND at the aligned cycle.
* **Multiple outputs per kernel are built only up to the core.** The core,
  the real-pixel line buffer and the multi-port delay line exist. The scan
  order and output buffer that turn them into a lower clock rate do not.
* **Not specified and chosen here:** image borders (no special handling: the
  first WV-1 lines and the left edge see pixels from elsewhere in the
  stream), the reset (asynchronous, active low; line memories are not
  cleared), zero padding values, the handshake, the sync word, the weight
  width, and the tie rule of the minimum tree.
* The weighted core works for any NI, not only the word-serial case.
* For YCbCr or YUV input (`SUM_RGB = 0`), the first component (Y) is used
  directly as the magnitude, shifted into the upper bits of the 10-bit
  value. No other magnitude formula is offered.
* `MULTI_OUT` works with the rectangular rank filter only. It takes
  precedence over `USE_WEIGHTS` and ignores `WIN_MASK`.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_filter_core` runs the five-sample example above and checks every count
  and address. It then runs random streams with stalls through 3 x 3/2,
  3 x 3/1, the plus-shaped 3 x 3/2 and 5 x 5/3 against a direct ranking
  model (`core_check.sv`). Values come from a narrow range half the time, so
  ties are common.
* `tb_weighted_filter_core` does the same for centre-weighted, irregular
  (with a zero) and unit weights.
* `tb_multi_output_core` checks every window's address for 3 x 3/2, 5 x 5/4
  and 7 x 7/3 kernels.
* `tb_line_buffer`, `tb_delay_line`, `tb_fvg` and `tb_cntrl` check their
  blocks against models. `tb_cntrl` also checks the group sequence, the
  4-clock pixel rate and the 8-clock latency for 7 x 7/2.
* `tb_rank_filter_top` filters 16-pixel-wide random images end to end. It
  uses seven configurations: 7 x 7/2 median with gaps, 7 x 7/2 back to
  back, 3 x 3/1 minimum, the plus-shaped window, the weighted filter, the
  two-output 3 x 3/2 filter and a 5 x 5/3 median ranked on the Y component.
  `filter_harness.sv` checks every output pixel whose window lies in the
  image, the sync words and the output count. It also counts back-pressure,
  idle core cycles, padded columns, ties and line wraps, and requires each
  to happen.
* `tb_rank_filter_full` runs the top with all defaults over a 1920 x 16 strip,
  checking every output whose window lies in the strip. A whole 1080p frame
  was not simulated.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/rank_pkg.sv tb/tb_rank_filter_top.sv --top-module tb_rank_filter_top
./obj_dir/Vtb_rank_filter_top
```

Clock-rate and FPGA resource figures are not reproduced; they depend on the
target device. All three cores are fully parameterised, so 3 x 3, 5 x 5 and
7 x 7 windows with NI from 1 up to WV are all the same RTL with different
parameters.
