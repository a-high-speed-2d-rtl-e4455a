# 3x3 Gaussian convolver: one filtered pixel per clock, without multipliers

This is a hardware 2D convolution engine for image smoothing. It applies the
3x3 Gaussian kernel

```
        | 1 2 1 |
 1/16 * | 2 4 2 |
        | 1 2 1 |
```

to an 8-bit grey-scale image held in on-chip memory. Once its pipeline is
full, it writes one filtered pixel per clock. Every weight is a power of two,
so in the default datapath each product is a fixed shift: plain wiring with
no multiplier. The normalising divide by 16 is also a shift. The result is an
adder tree that keeps up with one pixel per clock.

A multiplier-based datapath is kept as an option with identical results. A
small 1D convolver with the `[1 2 1]` kernel sits beside the 2D engine. It is
the one-dimensional building block of the same filter, with its own control
unit.

## The kernel as three row kernels

The 3x3 window is split into its three rows. The top and bottom rows are
weighted `[1 2 1]` and the middle row `[2 4 2]`:

```
sum = [1 2 1]·top + [2 4 2]·middle + [1 2 1]·bottom      (0 .. 4080, 12 bits)
out = sum >> 4                                            (0 .. 255)
```

- `shift_121` computes `a + (b<<1) + c`. The result is 10 bits, at most 1020.
- `shift_242` computes `(a<<1) + (b<<2) + (c<<1)`. The result is 11 bits, at most 2040.
- `mult_kernel` computes `K0*a + K1*b + K2*c` with the coefficients as
  parameters. With `DATAPATH = DP_MULT` it replaces both shift kernels.

The divide truncates. A flat region of value *v* therefore stays exactly *v*,
and other regions can come out up to one grey level low compared with
rounding.

## Seeing the whole neighbourhood in one clock

The hard part of a streaming 2D filter is that it reads one pixel per clock
but needs nine pixels from three image rows for each result. `window_gen`
solves this with two line buffers and a 3x3 register window.

- **Line buffer 0** holds the previous row and **line buffer 1** the row
  before that, each `MAX_W` pixels deep and indexed by column.
- When pixel *(r, c)* arrives, the two buffers give *(r-1, c)* and
  *(r-2, c)* at the same column. With the new pixel they form a complete
  3-pixel column, which is shifted into the right side of the window. The
  window's oldest column falls out on the left.
- In the same clock, buffer 1 takes buffer 0's old value at column *c* and
  buffer 0 takes the new pixel. Each buffer is read and written at one
  address per clock, which suits FPGA block RAM.

Borders are handled by **tags**, not by flushing or counters in the
datapath. Each pixel travels with a `pix_tag_t {valid, row, col}`, which the
control unit generates from its raster counters. The window is marked valid
only when its newest (bottom-right) pixel has `row >= 2` and `col >= 2`. At
the start of every row the window still holds the last two columns of the
row before, and the tag marks those windows invalid. Nothing has to be
cleared between rows or images, and the stream may have idle clocks (tag
`valid = 0`) anywhere.

The filter produces only the positions whose whole window lies inside the
image (a *valid* convolution). A W x H image gives (W-2) x (H-2) results,
each centred on input pixel (r+1, c+1). There is no padding.

## Pipeline and timing

```
 clock edge      0             1 .. N           N+1        N+2        N+3            N+4
 conv2d_cu       start taken   (addresses 0..N-1 presented in the clocks before these edges)
 pixel_ram                     data + tag
 window_gen                    window reg (one edge after each data word)
 row kernels                                    last k_*
 adder, >>4                                                last wr_*
 out memory                                                           last write     done high
```

- Reads: N = W*H, one per clock, in raster order. Address is `r*W + c`.
- Input memory: registered read, so the control unit delays each tag by one
  clock to line it up with the read data.
- Datapath (`conv2d_du`): three register stages. The window register is
  followed by a register after the row kernels and a register after the
  adder and divide, which also carries the write address.
- Write address: results leave in raster order, so it is a counter. The
  control unit holds it at zero while idle.
- Completion: `done` is a one-clock pulse, W*H + 5 clocks after the edge that
  took `start`. By then the last result is in the output memory. A 128 x 128
  image therefore takes 16,389 clocks.

## Control units

`conv2d_cu` is a Moore machine. Its outputs depend only on the state
registers.

| state | outputs | leaves when |
|-------|---------|-------------|
| IDLE  | `clear` (write counter held at 0) | `start`: latches `img_w`, `img_h` |
| READ  | `rd_en`, `rd_addr`, raster row/col | last pixel read |
| DRAIN | `busy` | 4 clocks later (`DU_LAT`), when the last result is written |
| DONE  | `done`, `busy` | next clock, back to IDLE |

A `start` while busy is ignored. An assertion checks that the image size at
`start` is between 3 x 3 and `MAX_W` x `MAX_H`.

`conv1d` is the 1D unit with its own Moore control.

- IDLE waits for `start`.
- FILL takes the first two samples into the tap registers.
- RUN outputs `(x[n-2] + 2x[n-1] + x[n]) >> 2` one clock after each further
  valid sample.
- DONE is a one-clock pulse. It coincides with the last result after N
  samples.

A sequence of N samples gives N-2 results. Samples outside a sequence are
ignored.

## Using `conv_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; active-low synchronous reset |
| `img_w`, `img_h` | in | image size, 3..`MAX_W` by 3..`MAX_H`; sampled at `start` |
| `load_we`, `load_addr`, `load_data` | in | write a pixel into the input memory; address `r*img_w + c` |
| `start` | in | one-clock pulse; starts a run |
| `busy`, `done` | out | run in progress; one-clock end pulse |
| `rd_addr` → `rd_data` | in → out | read the output memory, one clock latency; address `r*(img_w-2) + c` |
| `c1_start`, `c1_din_valid`, `c1_din` | in | 1D unit: start a sequence, sample stream |
| `c1_dout_valid`, `c1_dout`, `c1_done` | out | 1D results and end pulse |

To run the filter:

1. Load the image.
2. Set the size.
3. Pulse `start`.
4. Wait for `done`.
5. Read the results.

Do not load or read the memories while `busy`. The output memory's write
port belongs to the convolver.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATAPATH` | `DP_BARREL` | `DP_BARREL`: shift kernels; `DP_MULT`: multiplier kernels (same results) |
| `MAX_W`, `MAX_H` | 128, 128 | largest image; sets the memory depth (`MAX_W*MAX_H` pixels each) and the line-buffer length |
| `N1D` | 10 | samples per 1D sequence |

At the defaults the two image memories take 2 x 128 kbit. That fits the
block RAM of a mid-size FPGA such as a Cyclone II EP2C35. Tag row and column
counters are 12 bits (`conv_pkg::TAG_CW`), so `MAX_W` and `MAX_H` can grow to
4095. Pixel width is fixed at 8 bits in `conv_pkg`.

## Where this design makes its own choices

The filter function, the row decomposition into `[1 2 1]` / `[2 4 2]` row
kernels, and the shift-based and multiplier-based variants come from the
architecture this design implements. So do the one-result-per-clock pipeline,
the single-clock neighbourhood access, the Moore control units, the on-chip
image memories and the 1D unit. The following are choices of this
implementation:

- **Word widths.** Pixels are 8-bit grey levels. Sums are kept at full
  precision (12 bits) until the final `>> 4`.
- **Rounding.** The normalisation truncates.
- **Borders.** Only valid-convolution output is produced. Border pixels are
  not filtered, and no padding is applied.
- **Memory and pipeline structure.** The line buffers, the tag scheme, the
  register placement and the 4-clock drain are this implementation's own.
- **Loading.** The host loads the image through a write port and reads
  results through a read port. There is no preloaded memory image, so one
  build serves any image.
- **Sizes.** The 128 x 128 maximum and the 10-sample 1D sequence length are
  chosen sizes. Both are parameters.
- **1D interface.** The 1D unit takes a valid-qualified sample stream.

Two things belong to the wider system and are not included here:

- a variant that keeps the image in an external SRAM chip;
- a wrapper that attaches the convolver to a vendor bus fabric for a soft
  processor.

Both would replace the two `pixel_ram` instances and the host ports of
`conv_top`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_shift_121`, `tb_shift_242`, `tb_mult_kernel` | kernels against integer sums, corners plus 2000 random triples; `mult_kernel` with three coefficient sets |
| `tb_pixel_ram` | fill, scrambled read-back, read-during-write returns the old word |
| `tb_window_gen` | every window against the image, valid exactly for row, col ≥ 2, one clock latency, window count per image, random idle clocks, width changes |
| `tb_conv2d_du` | both datapaths side by side against a reference filter: data, sum, address, latency, write count, all-white image, idle clocks |
| `tb_conv2d_cu` | raster addresses, tag alignment, `busy`/`clear`, `done` exactly W*H+5 clocks after start, start ignored while busy |
| `tb_conv1d` | both datapaths: every result, one-clock latency, N-2 results, `done` timing, idle samples ignored |
| `tb_conv_top` | whole design at default parameters (see below) |
| `tb_conv_top_mult` | whole design with `DATAPATH = DP_MULT` at 32 x 32 memories: five images, every pixel, clock count, one 1D sequence |
| `tb_gauss_noise` | 128 x 128 ramp plus noise (std ≈ 28) filtered in one run; exact match with the reference and noise power cut from about 800 to about 115 |

`tb_conv_top` runs the whole design at its default parameters. It covers six
images back to back:

- 10 x 5;
- 3 x 3;
- two 128 x 128 images, one random and one all white;
- 5 x 90;
- 120 x 4.

For each image it checks every output pixel and the exact clock count to
`done`. It also runs two 1D sequences. It counts that each mechanism actually
happened:

- border windows suppressed;
- back-to-back result clocks;
- pipeline drain;
- a start ignored while busy;
- a change of image size;
- 1D results.

To simulate with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/conv_pkg.sv tb/tb_conv_top.sv --top-module tb_conv_top
./obj_dir/Vtb_conv_top
```

Replace `tb_conv_top` with any other testbench name. Each run takes
seconds. Testbenches use only two-state values and `$urandom`.

## Files

| file | contents |
|------|----------|
| `rtl/conv_pkg.sv` | pixel, tag and window types; the `datapath_e` option |
| `rtl/conv_top.sv` | top level: memories, 2D control unit and datapath, 1D unit |
| `rtl/conv2d_cu.sv` | 2D Moore control unit |
| `rtl/conv2d_du.sv` | 2D datapath: window, row kernels, adder, divide, write address |
| `rtl/window_gen.sv` | line buffers and 3x3 window |
| `rtl/shift_121.sv`, `rtl/shift_242.sv` | multiplier-free row kernels |
| `rtl/mult_kernel.sv` | multiplier row kernel with parameter coefficients |
| `rtl/conv1d.sv` | 1D `[1 2 1]` convolver with its control unit |
| `rtl/pixel_ram.sv` | image memory, one write and one registered read port |
