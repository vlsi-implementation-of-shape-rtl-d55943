# Shape-adaptive discrete wavelet transform in hardware

A shape-adaptive DWT (SA-DWT) is a wavelet transform for a visual object of
arbitrary shape. Each image comes with a binary shape mask. Every row, and
then every column, breaks into segments of pixels that lie inside the object.

Each segment is transformed on its own:
- it is symmetrically extended at both of its ends;
- its coefficients are subsampled by global position, so lowpass comes from
  even positions and highpass from odd positions;
- a lone one-pixel segment becomes a single, scaled lowpass coefficient.

This makes the total number of coefficients equal to the number of object
pixels. A plain rectangular image is simply the case where the mask is all
ones.

The usual way to do this in hardware is to build a controller that knows where
every segment starts and ends, and to stall the filter at each boundary. This
design does not do that. The filter is a lifting datapath. At every
multiply-accumulate unit, small multiplexers choose each operand from the
masks of the neighbouring samples. When a neighbour lies outside the segment,
the mux takes the other neighbour instead, which is exactly symmetric
extension. The data flow is therefore the same for every shape: one even/odd
sample pair enters per clock and one lowpass/highpass pair leaves per clock,
with no stalls.

The RTL contains three systems, all instantiated side by side in `sadwt_top`:

| system | filter | purpose |
|---|---|---|
| `sadwt2d_direct` | (9,7) | 2-D forward transform of a frame held in an external frame memory, 3 levels, 1024 x 1024 by default |
| `sadwt2d_line` | (9,3) | 2-D forward transform of a raster-order pixel stream with on-chip line buffers only, 3 levels, 64 pixels wide by default |
| `sadwt93_1d` | (9,3) | 1-D core, forward and inverse, brought out on its own ports |

The 1-D (9,7) core `sadwt97_1d` also performs both directions. It is used
inside the direct-method system.

## Number format

Each texture value is 16-bit two's complement. Lifting coefficients are 12-bit
in Q1.10. `sadwt_pkg::fx_mul` forms the product, adds 512 and shifts it right
arithmetically by 10. The result is kept to 16 bits and wraps on overflow.

The (9,7) constants are listed below. Each Q1.10 value is round(real × 1024).

| constant | real value | Q1.10 |
|---|---|---|
| α | −1.586134342 | −1624 |
| β | −0.052980119 | −54 |
| γ | 0.882911076 | 904 |
| δ | 0.443506852 | 454 |
| ζ | 1.149604398 | 1177 |
| 1/ζ | 0.869864452 | 891 |

√2 = 1448 and 1/√2 = 724 in the same format.

The (9,3) filter uses no multipliers:
- α = −1/2;
- the even update is (19·(near odd pair) − 3·(far odd pair) + 32) >> 6, built from shifts and adds.

## The 1-D architecture

A sample pair travels with its two mask bits and a start-of-line flag (`sol`)
through the following stages:

1. **Shape analyzer** (`shape_analyzer`). It delays the stream by one pair and
   keeps a short history of masks. From these it builds, for every tap any
   stage will need, an "inside this segment" bit. A tap across a `sol`
   boundary, or in a pair marked invalid, counts as outside. It also flags
   one-point segments.
2. **Lifting stages** (`lift_stage`, and `lift4_stage` for the 4-tap (9,3)
   update). Each stage holds one pair in a register. It updates either the odd
   sample from the two even samples beside it, or the even sample from the two
   odd samples beside it.
   - The arithmetic is one MCU (`mcu`): out = d ± c·(a + b).
   - The two operands a and b come from a boundary-extension mux (`be_mux`).
     An outside neighbour is replaced by the inside one. If both neighbours
     are outside, both operands are 0, so a one-point segment passes through
     unchanged.
   - The 4-tap stage reflects its far taps back into the segment, repeatedly
     if necessary, so that segments of two or three samples also work.
3. **Subsample / normalise** (`subsample_unit`).
   - The lowpass coefficient is scaled by ζ and the highpass by 1/ζ (for
     (9,3), by √2 and 1/√2).
   - A one-point segment becomes √2·x in the lowpass slot. If the point lies at
     an odd position, the pair's `eoo` (even-or-odd) bit is set and its
     highpass mask is cleared. An inverse transform can then put the point
     back where it came from.

The (9,3) shape analysis is the same mask history used by the (9,7) core.
The far taps are handled by reflection inside the 4-tap stage. There is no
separate state machine for the longer filter.

The inverse transform uses the same stages: a pre-scale (`inv_prescale`), then
the lifting steps in reverse order with the products subtracted. Because each
step subtracts exactly the rounded product the forward step added, the round
trip is exact apart from the normalisation rounding. The testbenches accept an
error of at most 6.

| core | latency (clocks, pair in to pair out) | throughput |
|---|---|---|
| `sadwt97_1d` | 7 | one pair per clock |
| `sadwt93_1d` | 6 | one pair per clock |

The `dir` input selects the direction. The two cores have separate input and
output ports for samples (`samp_in` / `samp_out`) and coefficients
(`coef_in` / `coef_out`).

## 2-D direct method (`sadwt2d_direct`)

The frame stays in an external memory that can do two reads and two writes of
18-bit words per clock. Each word is `{eoo, mask, value}`.

The system runs two passes per level, rows then columns:
- The **read address controller** (`read_addr_ctrl`) reads one even/odd pair
  per clock.
- The pair passes through the (9,7) core.
- The **write address controller** (`write_addr_ctrl`) writes the
  lowpass/highpass result back to the same two addresses.

The storage is therefore in place and interleaved. At level j, the samples of
a line are the words at stride 2^j, so the next level reads only the LL
samples without moving any data.

Between passes, the read controller waits until the write controller reports
`pass_written`. This guarantees that the column pass reads finished row
results. The wait costs the pipeline depth, about 8 clocks per pass.

A frame therefore takes W·H·(1 + 1/4 + 1/16) clocks plus about 50. For
1024 × 1024 that is 1,376,306 clocks, measured in simulation. At 50 MHz that
gives 36.3 frames/s. Measured the same way, 256 × 256 takes 86,066 clocks
(580.9 frames/s) and 512 × 512 takes 344,114 clocks (145.3 frames/s).

Memory timing:
- Read data arrives one clock after the address (`mem_rd_en`, `mem_rd_addr0/1`,
  then `mem_rd_data0/1`).
- A write happens in the clock where `mem_wr_en` is high.
- Bit 17 of the highpass word is always 0, because only the lowpass word carries
  `eoo`.

Only the forward 2-D transform is built. The 18-bit word has room for a single
`eoo` bit. How that bit should be kept across the row and column passes of an
inverse is a choice this design leaves open.

## 2-D line-based method (`sadwt2d_line`)

Pixels arrive in raster order, one per clock, through a valid/ready handshake:
`in_valid`, `in_ready`, `in_value` and `in_mask`. Each level is one
`line_level`, and the LL output of a level feeds the next level.

Inside a level:

- **Row unit.** Pixels are paired, and one (9,3) lifting step (`sa93_step`)
  runs on each pair. The lifting state for the current row stays in a register.
- **FIFO.** Row coefficient pairs go into a short FIFO. The column side takes
  them out one coefficient per clock.
- **Data buffer** (`data_buffer`). This holds one line of row coefficients,
  `{eoo, mask, value}`, so that an even row can meet the odd row below it.
  Two rows then form a vertical pair.
- **Temporal buffer** (`temp_buffer`). The column unit is the same
  `sa93_step`, but its lifting state is held per column in this buffer instead
  of in registers. Each column therefore continues where the row above left it.
- **Flush.** At the end of a frame the column side runs two flush passes over
  the buffers to finish the last rows. `in_ready` stays low from the last pixel
  of the frame until the last level is done.
- **Normalisation.** Normalisation is done by shifts rather than by the √2
  gains of the two directions:
  - LL is doubled;
  - HH is halved, rounded;
  - LH and HL are unchanged.

Each level has two outputs, `out0[j]` and `out1[j]`. Each carries a valid
coefficient with its band (0 = LL, 1 = HL, 2 = LH, 3 = HH), its (y, x)
position in that level's grid, its mask, and its row and column `eoo` bits. The
LL coefficients of the last level come out on `out1[LEVELS-1]`. `frame_done`
pulses after the last coefficient of the frame.

The width of 64 comes from the buffer sizes this design targets: 112 words of
per-column state over three levels, which is 64 + 32 + 16. The height of 64 is
this design's own choice.

This design departs from a single shared row/column unit pair in two ways:
- **One unit pair per level.** Here every level has its own row and column
  units. A shared pair serving all levels would need a recursive-pyramid
  schedule, which this design does not implement. The coefficients are the
  same either way.
- **Data buffer size.** Rows are paired here, so each level needs one line
  of data buffer rather than three.

The inverse line-based transform is not built.

A third 2-D organisation is not built either. It alternates the pass order
between levels (row-column, then column-row) so that two passes in the same
direction run back to back. It is only an alternative to the two systems
here.

## Files

`rtl/` contains one module or package per file:

- **Packages:** `sadwt_pkg` (widths, constants, pair types, `fx_mul`) and
  `line_pkg` (line-based types).
- **1-D parts:** `mcu`, `be_mux`, `shape_analyzer`, `lift_stage`,
  `lift4_stage`, `inv_prescale`, `subsample_unit`, `sadwt97_1d`, `sadwt93_1d`.
- **Direct method:** `pass_scan` (the shared address counters),
  `read_addr_ctrl`, `write_addr_ctrl`, `sadwt2d_direct`.
- **Line-based method:** `sa93_step`, `data_buffer`, `temp_buffer`,
  `line_level`, `sadwt2d_line`.
- **Top:** `sadwt_top`.

`tb/` contains:
- a self-checking testbench `tb_<module>` for each main block;
- a reference model in `sadwt_ref_pkg`, which implements segment extraction,
  1-D forward and inverse, and the in-place 2-D direct method, written
  independently of the RTL;
- a behavioural model of the frame memory, `frame_memory_model`.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end tests are:
- `tb_sadwt_top`: runs all three systems at once at reduced sizes
  (64 × 32 direct frame, 32 × 32 line-based frame).
- `tb_sadwt_top_full`: does the same at the default sizes (1024 × 1024 direct
  frame, 64 × 64 line-based frame). It takes a few seconds.
- `tb_direct_workloads`: runs the direct-method system at 256 × 256 and
  512 × 512. It checks every word, and checks that the measured frame rate at
  50 MHz comes within 0.5 % of 581.2 and 145.3 frames/s respectively.

Both check every coefficient and the direct-method frame time. They also count
that each mechanism actually happened:
- pass changes;
- read stalls between passes;
- one-point segments;
- column flushes;
- input hold-off;
- both directions of the 1-D core.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint \
  --top-module tb_sadwt_top -y rtl -y tb -Irtl \
  rtl/sadwt_pkg.sv rtl/line_pkg.sv tb/sadwt_ref_pkg.sv tb/tb_sadwt_top.sv -o sim
./obj_dir/sim
```

Replace `tb_sadwt_top` with any other testbench name. The packages must come
first on the command line.

## How far to trust it

- **What is checked.** Every block's outputs are compared bit for bit with the
  reference model, across random shapes that include one-point and two-point
  segments. The (9,7) and (9,3) cores are also checked for round trips.
- **The reference model's own choices.** The reference model follows the same
  fixed-point rules as the RTL, so it confirms the RTL against this design's
  arithmetic. It is not an independent floating-point check. Three choices are
  made in both the model and the RTL:
  - the rounding;
  - the √2 gain of one-point segments;
  - the reflection of the far (9,3) taps.
- **Overflow.** Overflow wraps and is not detected. Inputs of 8-bit range leave
  ample headroom for three levels.
