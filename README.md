# Streaming Gaussian filter accelerator with four convolution architectures

This is an image-smoothing co-processor for an SoC FPGA. It takes an 8-bit grey-scale image in
raster order, one pixel per clock, and convolves it with a Gaussian kernel (σ = 1) over an N×N
window (N = 3 by default, 5 and 7 supported). The point of the design is to compare approaches.
The same filter is built four ways, with two *approximate-computing* knobs:

* **Precision scaling.** All arithmetic is fixed point. There are 8 or more integer bits and
  `F` fractional bits, and `F` is a parameter (8 by default; 4 is the smallest precision that
  still gives acceptable image quality).
* **Memoization.** In one of the architectures every multiplier is replaced by a 256-entry table
  of constants holding pixel × coefficient.

The four convolution operators all compute the same filter. Three of them give bit-identical
output: **2-D**, **Modified** and **LUT-based**. The **Separate** operator can differ by one grey
level (3×3, F = 8), because its 1-D coefficients and its intermediate truncation are quantised
differently. A real product would pick one operator. The top level here runs all four side by
side on the same frame, so they can be compared in one simulation.

```
 host DMA ──► input frame buffer ──► pixel streamer ──┬─► gaussian_filter (2-D)       ──► output frame buffer 0 ──► host DMA
 (write)      (IMG_W·IMG_H × 8 bit)  (1 pixel/clock)  ├─► gaussian_filter (Modified)  ──► output frame buffer 1
                                                      ├─► gaussian_filter (Separate)  ──► output frame buffer 2
                                                      └─► gaussian_filter (LUT-based) ──► output frame buffer 3
```

## One filter core: delay line, control block, operator

`gaussian_filter` is one accelerator core. It has three parts.

**Delay-line buffer** (`delay_line_buffer`). This is one long shift chain that moves on every
accepted pixel. The new pixel enters window register `P[N-1][N-1]` and moves left along the
bottom window row. It then passes through a *row buffer* of `IMG_W-N` pixels and enters the
right end of the row above, and so on up to `P[0][0]`, the oldest pixel. After every shift, the
N×N registers hold the neighbourhood whose bottom-right corner is the newest pixel. Each pixel
is read from the frame buffer only once. The row buffers are plain shift registers with an
enable.

**Control block** (`conv_control`). A column counter and a row counter follow the raster
position. Comparators raise `win_valid` once at least N rows and N columns have been seen, which
means the window lies wholly inside the image. The control block also raises `win_last` for the
last pixel of the frame, and then the counters restart. **Border windows are dropped.** A frame
of W×H pixels therefore gives (W−N+1)×(H−N+1) output pixels, for example 510×510 from 512×512.
There is no padding.

**Convolution operator.** This is one of the four architectures below. Its Q-format result is
turned back into a pixel by taking the integer part (truncation). The result is saturated at 255
when the word has more than 8 integer bits.

The input stream may pause: `in_valid` low freezes the delay line and the counters. The operator
pipelines never stall. Each result carries a valid bit that travels with it.

## Fixed-point arithmetic and the coefficients

These are the details that most affect the output values.

*Pixels* enter the datapath as Q`INT_W`.`F` words, with the pixel as the integer part and a zero
fraction. *Coefficients* are unsigned Q0.`F` constants computed at elaboration in
`gaussian_pkg`:

1. Sample `exp(-(x²+y²)/2)` on the N×N grid centred on the window.
2. Normalise the samples so they sum to 1.
3. Round each sample to the nearest multiple of 2^-F.
4. Set the centre weight to 2^F minus all the other weights. The weights then sum to exactly
   2^F. A flat image passes through unchanged, and no filtered value can exceed 255.

| kernel | F | corner / edge / centre (×2^-F) | 1-D taps (×2^-F) |
|---|---|---|---|
| 3×3 | 8 | 19 / 32 / 52 | 70, 116, 70 |
| 3×3 | 4 | 1 / 2 / 4 | 4, 8, 4 |

For other N and F, the same rule is applied by the functions `coef2d` and `coef1d`.

*Products.* A product is pixel word × coefficient, and it is cut back to F fractional bits by
truncation. For an integer pixel this cut loses nothing. It only loses bits in the vertical pass
of the Separate filter, whose inputs have fractions.

*Word widths.* The integer part of the word is the main cost difference between the
architectures. Each one uses the smallest width that cannot overflow:

| architecture | integer bits `INT_W` | why |
|---|---|---|
| 2-D, LUT-based | 8 | the weighted sum never exceeds 255 |
| Modified | 10 for 3×3, 11 for 5×5 and 7×7 | sums of 4 (or 8) pixels are formed before any multiplication |
| Separate | 9 | the intermediate horizontal result is kept as a Q9.F word |

`gaussian_pkg::default_int_w(arch, N)` returns these widths, and `gaussian_filter` uses them by
default.

## The four convolution operators

All four are fully pipelined and accept one window per clock. Pipeline registers follow the
multipliers (or tables) and every adder level except the last. The last adder drives the
result directly. Latencies are counted from the cycle the window is presented.

**2-D** (`conv2d_operator`). N² multipliers, one per coefficient, each followed by a register.
A binary adder tree (`adder_tree`) sums the products. Where a level has an odd number of words,
the odd word is carried to the next level. For 3×3, the levels have 4, 2, 1 and 1 adders, and
the latency is 4 cycles. In general the latency is ⌈log2 N²⌉ cycles.

**Modified** (`modified_operator`). The Gaussian kernel repeats its coefficients, so the operator
adds the pixels that share a coefficient *before* multiplying. In the 3×3 case:

* the four corner pixels are added by a two-level registered pre-adder tree;
* the four edge pixels of the centre are added the same way;
* the centre pixel is delayed by two registers to stay aligned.

Three multipliers follow (w_corner, w_edge, w_centre), each followed by a register. Then one
adder level sums corner + edge, and a final adder adds the centre. Latency is 4 cycles.

For larger N, positions are grouped into *classes* by the unordered pair of distances
{|i−c|, |j−c|} from the centre. There is one pre-adder tree per class, shorter trees are padded
with registers, and there is one multiplier per class. This gives 6 classes for 5×5 and 10 for
7×7. The latency is ⌈log2 (largest class)⌉ + ⌈log2 (classes)⌉ cycles: 4 for 3×3 and 7 for 7×7.
This operator trades multipliers for wider adders.

**Separate** (`separate_gaussian`, built from two `conv1d_operator`s). The N×N Gaussian equals a
horizontal 1×N pass followed by a vertical N×1 pass. Each pass is a complete filter with its
own control block and delay line.

* The horizontal pass has N registers. Each row of W pixels gives W−N+1 intermediate words.
* The vertical pass has N−1 row buffers of W−N+1 words each, and its control block waits for
  N intermediate rows.
* Intermediate words stay in Q9.F, so the horizontal fraction is not lost. The vertical products
  are truncated to F fractional bits.

Each 1-D operator has N multipliers, a register, and an adder tree: 2 cycles for N = 3. The core
therefore has 2N multipliers instead of N². Its results can differ from the other three, because its 1-D
coefficients are quantised separately and the vertical pass truncates. The testbenches model
that difference exactly.

**LUT-based** (`lut_operator` with `coef_lut`). This has the same structure as 2-D, but each
multiplier is a 256-entry constant table. Entry *p* holds p × w in Q8.F. The tables are computed
at elaboration and read combinationally, so a synthesis tool can map them to ROM or to logic. A
register follows each table. Latency is 4 cycles for 3×3. The output is identical to 2-D.

## Top level, interface and timing

`gaussian_accel_top` has the parameters `N = 3`, `F = 8`, `IMG_W = 512` and `IMG_H = 512`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of control state |
| `in_we`, `in_waddr`, `in_wdata[7:0]` | in | host writes the input image; address = row·IMG_W + col |
| `start` | in | one-cycle pulse that starts filtering the stored image; ignored while `busy` |
| `busy`, `done` | out | `busy` is high from start until every core has written its last pixel; then `done` is high until the next start |
| `out_raddr[4]`, `out_rdata[4][7:0]` | in/out | host reads the filtered images, one read port per architecture (index 0 = 2-D, 1 = Modified, 2 = Separate, 3 = LUT-based); address = row·(IMG_W−N+1) + col; data one cycle after the address |

After `start`, the streamer reads the input buffer at one pixel per clock. For 3×3, `done` rises
W·H + 9 cycles after the start pulse, which is 262,153 cycles for a 512×512 frame. The 9 extra
cycles are:

* 1 cycle to start the streamer;
* 1 cycle of RAM read;
* 6 cycles through the slowest core (Separate);
* 1 cycle to register `done`.

The frame buffers (`frame_buffer`) are simple dual-port RAMs with synchronous read. A read of the
address being written returns the old word.

The standalone core `gaussian_filter` has a stream interface: `in_valid`/`in_pixel` in, and
`out_valid`/`out_pixel`/`out_last` out. It can be used without the frame buffers.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` | 3 | all | window size (odd; 3, 5 and 7 tested) |
| `F` | 8 | all | fractional bits (8, 6 and 4 tested) |
| `INT_W` | per architecture (table above) | operators, `gaussian_filter` | integer bits of the data word |
| `IMG_W`, `IMG_H` | 512 | control, delay line, top | frame size; sets row-buffer length and frame-buffer depth |
| `ARCH` | `ARCH_2D` | `gaussian_filter` | operator: `ARCH_2D`, `ARCH_MODIFIED`, `ARCH_SEPARATE`, `ARCH_LUT` |

## How far this follows the reference architecture

The following parts follow the published architecture: the block structure (control block,
delay line, operator), the four operators and the placement of their pipeline registers, the
1×N and N×1 passes of the separable filter, the 256-entry tables, the word widths of each
architecture, σ = 1, and the evaluated window sizes, precisions and 512×512 frames.

The following are choices made here where the architecture leaves the detail open:

* **Borders.** Only complete windows produce output, and the image is not padded. A design that
  must produce a full-size output image needs padding logic and R = N/2 flush rows.
* **Coefficient rounding.** Round to nearest, with the centre weight absorbing the residual so
  that the weights sum to exactly 1.
* **Product truncation** to F fractional bits, and **output truncation** to the integer part with
  saturation.
* **Separate filter intermediates** are passed as Q9.F words rather than pixels.
* **Vertical buffer shape.** The vertical buffer of the separable filter is one column wide
  (N×1), which is all the N×1 operator reads. An N×N buffer would keep only extra registers that
  nothing uses.
* **Control handshake.** The `in_valid` stream handshake, `start`/`busy`/`done`, the reset style,
  and the synchronous-read frame buffers.
* **Four cores side by side** in the top level. A real system would pick one architecture.

Outside this RTL are the DMA controllers that move images between processor memory and the frame
buffers, the processor and its bridges, and FPGA resource, frequency and power figures.

## Verification

Each block has a self-checking testbench in `tb/`. The expected values come from
`gauss_ref_pkg`, an independent integer model of the filter that works on whole images. Each
testbench prints `TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_conv_control` | window and last flags, every cycle, with gaps; 3×3 and 1×3 windows, two frames |
| `tb_delay_line_buffer` | every window register against the pixel history; holds still without `in_valid` |
| `tb_conv2d_operator`, `tb_lut_operator`, `tb_modified_operator` | random and all-white windows, 3×3 Q.8 and 7×7 Q.4; exact results and exact latency |
| `tb_conv1d_operator` | random Q words, 3 and 5 taps; truncation and latency |
| `tb_separate_gaussian` | two frames, with gaps, 3×3 Q9.8 and 5×5 Q9.4; every intermediate-precision result |
| `tb_gaussian_filter` | all four architectures on the same stream, 3×3 Q.8 and 5×5 Q.4; pixels, frame ends, end-to-end latency |
| `tb_frame_buffer` | read latency and read-old-data on collisions |
| `tb_gaussian_accel_top` | host write → start → done → read back of all four outputs, three 20×12 frames; start ignored while busy; frame time |
| `tb_gaussian_accel_full` | the same at the default size: one 512×512 frame, every output pixel checked (about 10 s) |
| `tb_gaussian_workloads` | 3×3 Q.4, 3×3 Q.6, 5×5 Q.8 and 7×7 Q.8 at 512×512, plus 7×7 Q.4 at 100×100 (about 1 min) |

The test images are synthetic: random pixels with saturated white and black regions.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/gaussian_pkg.sv tb/gauss_ref_pkg.sv \
    -y rtl -y tb tb/tb_gaussian_accel_top.sv --top-module tb_gaussian_accel_top
./obj_dir/Vtb_gaussian_accel_top
```

Replace the testbench name to run another one. Every module in `rtl/` is synthesizable
SystemVerilog-2017. The only real-valued arithmetic is in the constant functions of
`gaussian_pkg` that compute the coefficients at elaboration.
