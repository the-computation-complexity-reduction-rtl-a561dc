# Energy-scalable 5x5 Gaussian smoothing filter (ES-GSF)

A 5x5 Gaussian blur normally costs 25 multiplications per output pixel. This
filter uses none. It relies on two properties of the Gaussian kernel:

1. **Coefficients are equal on rings around the centre.** The pixels that
   share a coefficient are added first, so each coefficient is applied once,
   to a sum, not 25 times.
2. **Coefficients shrink towards the edge of the window.** The outer rings
   matter least. Dropping them gives a cheaper, coarser kernel. A 2-bit
   energy-scalability input `ES` picks how many rings take part, which trades
   image quality for switching activity.

Each ring's coefficient is written as a sum of two powers of two, so weighting
a ring sum takes only shifts and one adder. The shift/add network and its
four-way output selection follow the ES-GSF architecture described in "The
Computation Complexity Reduction of 2-D Gaussian Filter". The memory interface,
sequencing, window generation, border policy and all timing belong to this
implementation.

## The rings (boundaries)

Name the 5x5 window C11..C55 (row, column), with C33 at the centre:

| group | pixels | count | weight per pixel (ES=3) | exact Gaussian /273 |
|---|---|---|---|---|
| w0, centre | C33 | 1 | 40/256 = 0.156 | 41 (0.150) |
| w1, boundary B1 | C23 C32 C34 C43 | 4 | 24/256 = 0.094 | 26 (0.095) |
| w2, boundary B2 | C22 C24 C42 C44 | 4 | 16/256 = 0.063 | 16 (0.059) |
| w3, boundary B3 | C13 C31 C35 C53 | 4 | 5/256 = 0.020 | 7 (0.026) |
| w4, boundary B4 | C12 C14 C21 C25 C41 C45 C52 C54, plus the corners C11 C15 C51 C55 | 12 | 3/256 = 0.012 | 4 (0.015), corners 1 (0.004) |

With the corners in B4, the full kernel's weights add up to exactly 1
(40 + 4·24 + 4·16 + 4·5 + 12·3 = 256), so a flat image passes through
unchanged. Which ring the corners belong to is a choice of this
implementation. Setting the parameter `B4_CORNERS = 0` leaves them out, and
the full kernel's gain then drops to 244/256.

`gsf_boundary_sum` forms w0..w4 with plain adders: w0 is 8 bits, w1..w3 are
10 bits and w4 is 12 bits.

## The shift/add datapath (`esgsf_datapath`)

The ring sums pass through this network:

```
a0 = w0 + w0>>2                  (1.25    w0)
a1 = w1>>1 + w1>>2               (0.75    w1)
a3 = w3>>3 + w3>>5               (0.15625 w3)
a4 = w4>>4 + w4>>5               (0.09375 w4)

s01    = a0 + a1           ES=0:  y = s01    >> 2
s012   = s01 + w2>>1       ES=1:  y = s012   >> 3
s0123  = s012 + a3         ES=2:  y = s0123  >> 3
s01234 = s012 + (a3 + a4)  ES=3:  y = s01234 >> 3
```

Each longer kernel reuses the partial sum of the shorter one. The four results
meet at a multiplexer controlled by `ES`. Expressed in 1/256 per pixel:

| ES | rings used | weights (w0, w1, w2, w3, w4) | total gain |
|---|---|---|---|
| 0 | centre + B1 | 80, 48, –, –, – | 272/256 (1.0625) |
| 1 | centre + B1 + B2 | 40, 24, 16, –, – | 200/256 (0.78) |
| 2 | + B3 | 40, 24, 16, 5, – | 220/256 (0.86) |
| 3 | + B4 | 40, 24, 16, 5, 3 | 256/256 (1.0) |

Only ES=3 has unity gain. Modes 1 and 2 keep the /8 normalisation of the full
kernel, so they darken the image. Mode 0 brightens it slightly and needs
clamping. These gains come from the architecture as published. The RTL keeps
them and does not renormalise. To judge the modes, the end-to-end testbench
compares each one with the exact 5x5 Gaussian (41, 26, 16, 7, 4, 1)/273 on a
512x512 test image:

| ES | mean error distance | PSNR | global SSIM |
|---|---|---|---|
| 0 | 10.9 | 24.8 dB | 0.97 |
| 1 | 34.1 | 17.0 dB | 0.94 |
| 2 | 22.1 | 20.8 dB | 0.98 |
| 3 | 0.78 | 46.3 dB | 0.9998 |

Most of the error in modes 1 and 2 is the brightness shift, not blur quality.

**Fixed point.** Before any shift, the datapath appends `FRAC_W` fraction bits
to the ring sums. With the default `FRAC_W = 8` no shift loses a bit, and
the output is the exact weighted sum, rounded down (floor) to an integer.
`FRAC_W = 0` gives plain integer shifts that truncate at every step, which is
cheaper but less accurate. The final value is clamped to 255, which only
mode 0 can exceed.

**Energy scaling.** For modes that do not use a ring, `gsf_boundary_sum`
forces that ring's sum to zero (operand isolation). The B2..B4 adders and their
shift/add branches therefore stop toggling when a cheaper kernel is selected.
The selected output is not affected.

## Data flow and timing (`esgsf_top`)

```
host --wr_en/wr_addr/wr_data--> image_ram --> gsf_frame_seq --> gsf_window
     --> gsf_boundary_sum --> esgsf_datapath --> out_valid/out_pix/out_addr
```

- **Loading.** The host writes the image into `image_ram`, one pixel per
  clock. The pixel at row r, column c goes to address `r*IMG_W + c`. The
  default is a 512x512 image of 8-bit pixels, 262144 words.
- **Running.** A pulse on `start` makes `gsf_frame_seq` read every address
  once, in order, one per clock. Memory reads are synchronous, so data comes
  one clock after the address.
- **Window.** `gsf_window` keeps the last four rows in a line-buffer memory of
  `IMG_W` words, each word holding four pixels of one column. A 5x5 register
  array shifts one column per pixel. After pixel (r, c) arrives, it holds the
  window centred on (r-2, c-2).
- **Border.** Results are produced only for centres with a full window: rows
  2..IMG_H-3 and columns 2..IMG_W-3. The two-pixel border of the image
  produces no output.
- **Output.** `out_valid` marks one result per clock, with `out_pix`,
  `out_addr` (and `out_row`, `out_col`), and `out_es`, the mode it was
  computed in.
- **Timing.** Call the edge that samples `start` edge 0. Address a is read at
  edge a+1. The result whose window ends at that pixel is registered at edge
  a+4. `frame_done` is high after edge `IMG_W*IMG_H + 3`, together with the
  last result. `busy` is high until then and low in the next clock.
- **Changing ES.** `es` is sampled per window as it enters the ring-sum stage,
  so it may change at any clock, even inside a frame. Each result carries the
  mode that was used for it.
- **No back-pressure.** Do not write the memory while a frame is running.
- **Reset.** `rst_n` is an active-low asynchronous reset of the control and
  pipeline registers. Memory contents are not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 512, 512 | image size; the memory holds `IMG_W*IMG_H` pixels |
| `FRAC_W` | 8 | fraction bits inside the shift/add datapath |
| `B4_CORNERS` | 1 | corner pixels are part of ring B4 |
| `gsf_pkg::PIX_W` | 8 | pixel width (grey levels 0..255) |

## How far to trust it, and where it departs from the published architecture

- The ring grouping, the shift amounts, the adder chain and the four-input ES
  multiplexer are as published, including the non-unity gains of modes 0..2.
- The following are this implementation's own choices:
  - the corners' membership of B4;
  - the fraction bits, the floor rounding and the clamp;
  - operand isolation as the energy-saving mechanism;
  - the memory and sequencer, the sliding window with line buffers, and the
    border policy;
  - the pipeline registers and all handshakes.
- The published architecture describes splitting the image into 5x5
  sub-matrices. Here a sliding window is used, giving one output pixel per
  input pixel.
- Results are streamed out rather than stored in a second image memory.
- There is no clock gating. The energy saving here is only reduced toggling.
- No timing or FPGA resource figures are claimed. The line buffer is read
  asynchronously (distributed RAM on an FPGA). If it is moved to block RAM,
  add one pipeline stage.

Every block has a self-checking testbench. Each testbench compares the block
with a model written independently: for example, ring membership is derived
from each pixel's distance to the centre, and the weights are applied as
integer multiplications rather than shifts. The end-to-end tests check every
output pixel, the frame latency and the border, across all four modes, a mode
change inside a frame and an image reload.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end. Build and run
one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/gsf_pkg.sv rtl/*.sv \
    tb/tb_gsf_ref_pkg.sv tb/tb_esgsf_top.sv --top-module tb_esgsf_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_esgsf_datapath` | shift/add weights and clamp, every mode, against integer multiply |
| `tb_gsf_boundary_sum` | ring sums from distance classes, operand isolation |
| `tb_gsf_window` | every window of two 9x8 frames, with input gaps |
| `tb_image_ram` | write/read, read latency, read-before-write |
| `tb_gsf_frame_seq` | address order, strobes, start while busy |
| `tb_esgsf_top` | whole filter, 20x12 image, six frames |
| `tb_esgsf_full` | the same at the default 512x512 size (about 3 s) |

The unit testbenches need only `rtl/gsf_pkg.sv` and their module. The two
end-to-end testbenches also use `tb/tb_gsf_ref_pkg.sv`, the reference model,
which also generates the test image.
