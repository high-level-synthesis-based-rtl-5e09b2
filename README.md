# Sub-pixel interpolation engines for H.264/AVC and HEVC motion compensation

Motion vectors in H.264/AVC and HEVC point between pixels: luma to a quarter pixel, and
HEVC chroma to an eighth. The prediction block is built by filtering the reference picture
at those fractional positions. This is the most arithmetic-heavy step in the decoder
loop. It is also a large part of motion estimation in the encoder, which needs every
fractional phase of a block at once to compare candidates.

This RTL contains three engines. Each one takes the integer pixels around a prediction
unit (PU) and returns **all** fractional phases of that PU in one pass:

| engine | standard | PU | grid in | filters | phases out | cycles / PU |
|---|---|---|---|---|---|---|
| `h264_luma_interp` | H.264/AVC luma | 8x8 | 13x13 | 6-tap half, bilinear quarter | 16 (4x4) | 21 |
| `hevc_luma_interp` | HEVC luma | 8x8 | 15x15 | 8-tap at 1/4, 1/2, 3/4 | 16 (4x4) | 47 |
| `hevc_chroma_interp` | HEVC chroma | 4x4 | 7x7 | 4-tap at 1/8 .. 7/8 | 64 (8x8) | 39 |

None of the filters uses a multiplier. Every constant product is a sum of shifted copies
of the input (`interp_pkg::cmul`), so each tap becomes a few adders.

The same RTL tree also holds two arithmetic units of a depth-based view-synthesis
("renderer") model for 3D-HEVC, which are described at the end.

## The common two-pass scheme

A 2-D fractional sample is computed separably. The horizontal filter runs first, along
rows. The vertical filter then runs along columns, on either integer pixels or the
horizontal results. All three engines are built the same way: a small FSM with two
states.

* **LOAD**: the grid arrives one row per beat, using the `in_valid`/`in_ready`
  handshake. Each row is written to an integer buffer. In the same cycle, the horizontal
  filters run on it, and their results are written to intermediate buffers. When the last
  grid row is accepted, every horizontal phase of every grid row is already stored.
* **CALC**: the same filter hardware is turned 90 degrees. A multiplexer feeds it columns
  taken from one of the buffers, and the vertical phases come out. `in_ready` is low
  during CALC, so the next PU waits.

Reusing the filters in both directions keeps the datapath small. The price is that
loading and computing are not overlapped. The next PU can start loading in the cycle
after the last CALC beat.

If the source does not drive `in_valid` for a cycle, LOAD simply waits; any gap is
allowed. The output has no back-pressure. A result beat is valid for one cycle, and the
sink must take it.

Larger PUs (16x16, 64x64, ...) are cut into 8x8 (or 4x4 chroma) pieces by whoever feeds
the engine. Each piece comes with its own border. `tb/tb_interp_top.sv` does this for a
16x16 block.

## H.264/AVC luma engine

The grid is 13x13: the 8x8 block plus 2 pixels of border before it and 3 after it, in
each direction. The sample names follow the usual H.264 picture. `G` is the integer
pixel, `b` the horizontal half, `h` the vertical half and `j` the centre half. `a c d e f
g i k n p q r` are the quarter samples.

* `h264_hpi` is an array of 6-tap filters (1,-5,20,20,-5,1). It returns **unrounded**
  sums.
* `hpi1` has 9 lanes.
  * In LOAD, it filters the incoming row horizontally. The 8 unrounded sums, called b',
    are stored in a 16-bit buffer.
  * In CALC, it filters 9 columns of the integer buffer vertically, giving `h`. The ninth
    column is there because the quarter samples `g`, `k` and `r` of column 7 need the
    `h` sample of column 8 (`m`).
* `hpi2` has 8 lanes. In CALC, it filters columns of the b' buffer, giving `j` in the
  same cycle as `h`.
* `h264_qpel` forms the twelve quarter samples of one row as rounded averages
  `(x + y + 1) >> 1` of the neighbouring integer and half samples. It uses the
  neighbour pairs of the H.264 standard.

Rounding: `b = clip((b' + 16) >> 5)` and `h` likewise. `j = clip((sum + 512) >> 10)`,
where `sum` is the 6-tap filter applied to the unrounded b' values. The clip keeps
results in `[0, 255]`, as the standard requires.

CALC produces one PU row per cycle.
* Each beat carries `out_smp[v][u][x]`: the sample at vertical quarter phase `v` and
  horizontal quarter phase `u`, for column `x`. Phase (0,0) is the integer pixel.
* `out_y` is the row number, and `out_last` marks row 7.
* The first row is registered on the clock edge after the one that accepts the last
  grid row. A back-to-back stream takes 13 + 8 = 21 cycles per PU.

## HEVC luma engine

The grid is 15x15: 3 pixels of border before the block and 4 after, which is the reach
of an 8-tap filter. The filters, applied to A(-3)..A(4), are:

| phase | taps |
|---|---|
| 1/4 (a) | -1, 4, -10, 58, 17, -5, 1, 0 |
| 1/2 (b) | -1, 4, -11, 40, 40, -11, 4, -1 |
| 3/4 (c) | 0, 1, -5, 17, 58, -10, 4, -1 |

`hevc_luma_filterset` applies all three to one window, then shifts the results. The
engine has 8 of these units behind a multiplexer.

* **LOAD** (15 beats): the units filter 8 positions of the incoming row horizontally.
  The results a, b and c are stored for all 15 rows.
* **CALC** (32 beats): the multiplexer steps through four sources, with 8 PU rows for
  each. Each beat filters 8 columns vertically, giving the vertical phases 1/4, 1/2 and
  3/4 in one go.

| `out_xfrac` | source column | gives |
|---|---|---|
| 0 | integer pixels | d, h, n |
| 1 | stored a | e, i, p |
| 2 | stored b | f, j, q |
| 3 | stored c | g, k, r |

Each output beat carries `out_smp[v][x]`, for vertical phases v = 0..3 and the 8
columns. Here `v = 0` is the horizontal sample itself, or the integer pixel when
`out_xfrac = 0`. `out_y` is the row, and `out_last` marks beat 32.

Precision follows the HEVC intermediate format. Nothing is rounded back to pixels:
* the horizontal pass shifts by `BitDepth - 8`, which is 0 for 8-bit video;
* the vertical pass over a, b and c shifts by 6;
* the integer pixel is scaled by `<< (14 - BitDepth)`.

All outputs are therefore 14-bit-precision values, held in 16 signed bits. They are
ready for weighted or bi-prediction, and they can be negative. A back-to-back stream
takes 15 + 32 = 47 cycles per PU.

## HEVC chroma engine

This engine has the same structure as the luma engine, at eighth-pel resolution.

* The grid is 7x7: 1 pixel of border before the block and 2 after.
* Seven 4-tap filters, applied to B(-1)..B(2):
  * 1/8: (-2, 58, 10, -2)
  * 2/8: (-4, 54, 16, -2)
  * 3/8: (-6, 46, 28, -4)
  * 4/8: (-4, 36, 36, -4)
  * 5/8 to 7/8 are the mirrors of 3/8 down to 1/8.
* `hevc_chroma_filterset` applies all seven to one window.
* There are four such units, one per PU column.
* LOAD stores the seven horizontal phases, called ab..ah, for each of the 7 rows.
* CALC steps through 8 sources: the integer pixels, then ab..ah. Each source takes 4
  rows, so CALC is 32 beats.
* Each beat carries `out_smp[v][x]`, for the 8 vertical phases and 4 columns, along with
  `out_xfrac` (0..7) and `out_y`.
* A PU takes 7 + 32 = 39 cycles. Precision is as for luma.

## Renderer arithmetic (3D-HEVC)

For depth-map coding, 3D-HEVC measures distortion in a synthesized view rather than in
the depth map itself. This needs a view-synthesis model. Two of its arithmetic units are
given here; the rest of the model is not.

* `svdc_calc` computes the synthesized view distortion change. It streams `LANES`
  samples per beat of the reference view, the view synthesized with the original depth,
  and the view synthesized with the distorted depth. It accumulates two sums of squared
  differences, and at the beat flagged `in_last` it returns both sums and
  `svdc = SSD(dist, ref) - SSD(org, ref)`, a signed value. `in_first` restarts the sums.
  The result is registered on the edge that accepts the last beat.
* `disparity_calc` converts depth samples to disparities with a linear mapping:
  `d = (s * v + o) >>> n`. The scale `s`, offset `o` and shift `n` are run-time inputs.
  The shift is arithmetic. There is one register stage.

The other parts of the renderer are not built. These are: initialisation of the reference
view, up-sampling, warping, occlusion and hole filling, blending, and the memories. Their
connection points are the `svdc_*` and `disp_*` ports of the top.

## Top level

`interp_top` places the three engines and the two renderer units side by side. They
share only `clk` and the asynchronous active-low `rst_n`. Each unit's ports are brought
out with a prefix: `h264_`, `hevcl_`, `hevcc_`, `svdc_` and `disp_`. All parameters are
at their defaults: 8-bit video, 8x8 luma PUs, 4x4 chroma PUs, and one lane in each
renderer unit.

## Throughput

| engine | cycles / PU | QFHD (3840x2160) frames/s at 102 / 165 / 169 MHz |
|---|---|---|
| H.264 luma | 21 | 37.5 at 102 MHz |
| HEVC luma | 47 | 27.1 at 165 MHz |
| HEVC chroma (one 1920x1080 4:2:0 plane) | 39 | 33.4 at 169 MHz |

A QFHD frame holds 129,600 luma PUs of 8x8. The timing of this RTL has not been
analysed; the clock rates above are only reference points.

## Departures from the architecture it is based on

This RTL follows a published high-level-synthesis design for these engines. It differs
from that design in the following ways.

* **Cycle counts.** The reference reports 19, 28 and 27 cycles per PU. In that design,
  loading and filtering are pipelined by the synthesis tool. Here, LOAD and CALC are
  sequential and CALC runs one row per beat, which gives 21, 47 and 39 cycles. None of
  the three engines here reaches the reference frame rates at the reference clocks; see
  the table above.
* **Ninth hpi1 lane (H.264).** The reference has 8 half-pixel lanes. A ninth lane is added
  so that the `h` sample right of the block exists for `g`, `k` and `r` of the last
  column.
* **H.264 clipping.** Half and quarter results are clipped to the pixel range, as the
  standard requires.
* **HEVC 3/4 luma filter.** The filter is the mirror of the 1/4 filter, with taps summing
  to 64, as in the standard.
* **Integer source in the chroma multiplexer.** The chroma CALC multiplexer also reads the
  integer buffer. This is needed for the vertical-only phases ba..ha.
* **Interfaces.** The row handshake, result-beat layout, reset and all widths are this
  design's own choices.
* **Renderer.** Only the SVDC and disparity units are built.

## Files

* `rtl/interp_pkg.sv`: shared types, shift-and-add multiply, filter taps.
* `rtl/h264_hpi.sv`, `rtl/h264_qpel.sv`, `rtl/h264_luma_interp.sv`: the H.264 engine.
* `rtl/hevc_luma_filterset.sv`, `rtl/hevc_luma_interp.sv`: the HEVC luma engine.
* `rtl/hevc_chroma_filterset.sv`, `rtl/hevc_chroma_interp.sv`: the HEVC chroma engine.
* `rtl/svdc_calc.sv`, `rtl/disparity_calc.sv`: the renderer units.
* `rtl/interp_top.sv`: the top level.
* `tb/interp_ref_pkg.sv`: reference models written directly from the standards'
  formulas, sample by sample, with no shared code with the RTL.
* `tb/tb_*.sv`: self-checking testbenches, one per module, plus `tb_qfhd_strip` for throughput.

## Simulation

Each testbench checks every output against the reference package. It prints
`TB_RESULT checks=N failures=M`, and it has a watchdog.

The engine testbenches also check:
* the latency from the last grid row to the first result;
* the back-to-back cycles per PU;
* random gaps in `in_valid`;
* extreme patterns, such as all-white, all-black and checkerboards, which exercise the
  clip.

`tb_interp_top` is the end-to-end run:
* It builds a 32x32 luma picture and a 16x16 chroma picture.
* It cuts a 16x16 luma block into four PUs with borders clamped at the picture edge, and
  feeds them to both luma engines.
* It does the same with an 8x8 chroma block.
* It runs SVDC and disparity streams.
* It counts input stalls, clipped samples, negative HEVC samples, and SVDC results of
  both signs. Each counter must be non-zero.

`tb_qfhd_strip` is the throughput run. It sends the top PU row of a QFHD frame through all
three engines back to back: 480 luma PUs of 8x8, and 480 chroma PUs of 4x4. It generates
the picture from a hash of the pixel coordinates and checks all outputs, about 1.5 million
samples. It measures the steady-state cycles per PU and prints the QFHD frame rate those
give at the clocks in the throughput table.

With Verilator 5, the packages are named first and the modules are found through `-y`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/interp_pkg.sv tb/interp_ref_pkg.sv tb/tb_interp_top.sv \
  --top-module tb_interp_top -o sim
./obj_dir/sim
```

For another testbench, replace `tb_interp_top` with its name in both places. Each
testbench runs in under a second once built.
