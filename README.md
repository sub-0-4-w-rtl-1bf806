# Dark Channel Prior dehazing accelerator for a Zynq-class FPGA

Haze adds a veil of airlight to every pixel: a hazy pixel is
`I = J·t + A·(1 − t)`, the true radiance `J` dimmed by the transmission `t`
plus the atmospheric light `A` weighted by `1 − t`. The Dark Channel Prior
estimates the veil from the observation that in a haze-free outdoor patch at
least one colour channel is nearly black. So the darkest value around a pixel
shows how much airlight was added there.

This RTL does the whole flow in hardware, one full-HD (1920 × 1080) frame at a
time, as five kernels. Each kernel reads its input frames from DDR and writes
its result frame back. Software on the processing system starts the kernels one
after another:

| kernel | reads | computes | writes |
|---|---|---|---|
| `minmat_accel` | RGB input | `min(R, G, B)` per pixel | `img_minmat` |
| `darkchannel_accel` | `img_minmat` | `0.9 ·` value, then three 3 × 3 minimum passes (a 7 × 7 minimum) | `img_darkChannel` |
| `diffim_accel` | `img_minmat`, `img_darkChannel` | `0.6 · min(minmat, dark)` | `img_diff_im`, the per-pixel airlight veil `V` |
| `restoreout_accel` | RGB input, `img_diff_im` | radiance recovery, grey level, 256-bin histogram, cumulative tone table | `img_restoreOut`, `LUT_array` |
| `lut_accel` | `LUT_array`, `img_restoreOut` | `LUT[value]` on each of R, G, B | `img_output` |

The main departure from textbook DCP is the airlight. Textbook DCP uses one
global airlight value. Here the map `V = 0.6 · min(minmat, dark)` acts as a
spatially varying veil, so bright regions such as the sky keep more of their
airlight and are not over-dehazed.

## System structure

`dehaze_top` is the programmable-logic part of the system:

```
 PS general-purpose port ──► axil_periph_xbar ──► 10 AXI4-Lite slaves (2 per kernel)
                                                    │
   minmat  darkchannel  diffim  restoreout  lut     │ start / done / irq
   2 ports   2 ports   3 ports   4 ports   3 ports  │
      └─────────┴─────────┴─────────┴─────────┴──► axi_mem_intercon (14:1) ──► PS DDR port
```

Outside the top, and not part of this RTL: the ARM processing system, the
DDR memory and its controller, and the vendor reset generator. The top takes a
synchronous active-low `rst_n` instead of the reset generator. `irq[4:0]` are
the kernels' done interrupts.

Each kernel has two AXI4-Lite slaves:

* The **control slave** (`hls_ctrl_regs`) holds these registers:
  * `0x00` CTRL: bit 0 start (write 1, only taken when idle), bit 1 done (cleared when read), bit 2 idle.
  * `0x04` GIE and `0x08` IER: interrupt enables.
  * `0x0C` ISR: done status. Write 1 to clear it.
  * `0x10` ROWS and `0x18` COLS: the image size. They reset to 1080 and 1920.
  * `0x20` PARAM0 and `0x28` PARAM1: kernel scalars. The darkchannel and diffim kernels take a Q0.8 scale factor in PARAM0. The restoreout kernel takes `A` in PARAM0 and `DEN_MIN` in PARAM1.
  * `0x30` RESULT: read-only. The darkchannel kernel reports its atmospheric-light estimate here; the other kernels read 0.
* The **pointer slave** (`hls_ptr_regs`) holds the DDR byte address of image *k* at `0x10 + 8k`, in the order of the table above.

The crossbar gives each slave a 64 KB window from `0x43C0_0000`. Window `2k`
is the control slave of kernel *k* and window `2k+1` its pointer slave, with
*k* = 0 minmat, 1 darkchannel, 2 diffim, 3 restoreout, 4 lut. An address
outside the windows gets a DECERR response.

To process a frame, software does the following for each kernel in turn:

1. Write ROWS, COLS and the pointers.
2. Optionally write GIE, IER and the parameters.
3. Write 1 to CTRL.
4. Wait for the interrupt, or poll CTRL until done is set.
5. Write 1 to ISR.

Memory layout is up to software. Pixels are stored one per 32-bit word: RGB as
`{8'h00, B, G, R}`, single-channel images in bits `[7:0]`. Every buffer must
start on a 64-byte boundary, so no 16-beat burst crosses a 4 KB boundary.

## The streaming engines

Inside a kernel every pixel path is a valid/ready stream. At the ends are
`axi_rd_stream` and `axi_wr_stream`, one per m_axi port:

* **Reads.** The read engine issues INCR bursts of 16 words ahead of demand. It only requests what its 32-word FIFO can take, so R beats are never refused.
* **Writes.** The write engine buffers a whole burst before it raises AW, so it never holds the shared interconnect with a half-filled burst. `done` comes after the last B response.

With data available, every kernel moves one pixel per clock.

`axi_mem_intercon` grants AR and AW round-robin among the 14 ports. A grant
is held until the DDR port takes the request, so an address never changes while
it is valid; assertions check this. The DDR
port answers in order, so the interconnect uses no AXI IDs. It records which
port each granted burst came from in small FIFOs, up to 8 outstanding per
direction. R beats and B responses go back, and W beats are taken, in that
recorded order.

## The dark-channel filter

`min_filter3x3` is one 3 × 3 minimum pass with two line buffers of `MAX_W`
pixels. It walks an extended grid of `(rows+1) × (cols+1)` positions. At
position `(r, c)` it takes input pixel `(r, c)` if that exists, and emits
output `(r−1, c−1)` if that exists. So the output trails the input by one line
and one pixel, and the frame ends without extra flush logic. At the border
only neighbours inside the image count, which gives the same result as
replicating the edge.

`darkchannel_accel` scales once by 0.9 and chains three of these filters. That
gives the minimum over a 7 × 7 patch with six line buffers, still at one pixel
per clock.

While the dark channel streams out, the kernel also keeps its brightest
value, the classic DCP estimate of the atmospheric light. It reports that value
in RESULT. Software can copy it into the restoration kernel's `A` register, or
keep its own value.

## Radiance recovery and the tone table

With `V` the veil from the diffusion map, the haze model gives the following
for each channel:

```
J = A · (I − V) / max(A − V, DEN_MIN)        then saturate to 0..255
```

The three channels of a pixel share the denominator. So `restoreout_accel`
runs one 24-stage pipelined divider per pixel, computing
`R = round(A · 2^16 / den)`. Each channel is then one multiply:
`J = sat8(((I − V)⁺ · R + 2^15) >> 16)`.

`DEN_MIN` keeps dense-haze pixels from being blown up by a tiny transmission.
It defaults to 26, a transmission floor of about 0.1. With the default factors
`V` never exceeds 0.6 · 0.9 · 255, so the floor only bites when software raises
`DEN_MIN` or lowers `A`.

The grey level of each restored pixel is `(77R + 150G + 29B + 128) >> 8`. It
is counted in a 256 × 22-bit histogram, which is cleared in 256 clocks before
the frame. After the last pixel, the kernel turns the histogram into the table

```
LUT[i] = round(255 · cdf(i) / (rows · cols))
```

This takes one 32-clock serial division per entry. The kernel writes the table
to DDR, and `lut_accel` maps every channel of the restored frame through it.

## Timing

The simulated time for a full-HD frame is 22.7 M clocks for all five kernels,
against a behavioural DDR port with 8 cycles of latency per burst:

| kernel | clocks |
|---|---|
| minmat | 3.24 M |
| darkchannel | 3.25 M |
| diffim | 6.48 M |
| restoreout | 6.49 M |
| lut | 3.24 M |

At 100 MHz that is 0.227 s per frame (4.4 frames/s). The published HLS
implementation reaches about 0.27 s per frame (≈ 3.7 frames/s) on a PYNQ-Z2.

The run is memory-bound. Every kernel shares a single DDR port, so a kernel
that moves three words per pixel needs about three clocks per pixel. This RTL
has not been synthesised for, placed on or timed on an FPGA.

## Where this RTL departs from, or fills in, the published design

The published design is a set of HLS kernels. This RTL is a hand-written
equivalent, and these points are its own choices:

* **Dark-channel filter.** The source describes both an all-ones 3 × 3 convolution approximating a minimum and a sliding-window minimum. This RTL uses a true minimum, matching the definition of the dark channel.
* **Where the 0.9 factor is applied.** One description scales by 0.9 at every pass, and the flow chart scales once before the three passes. This RTL follows the flow chart.
* **Restoration formula.** The source names the steps (invert the haze model, clamp the denominator, saturate) but not the formula, its fixed-point widths, `A` or the floor. All of these, and the grey weights, are chosen here.
* **Tone table.** The table is described only as a recomputed, cumulative histogram. Plain histogram equalisation is used here.
* **Bus details.** The bus protocol, register offsets, address map, burst length, pixel packing and the arbitration scheme of the two interconnects are this design's choices.
* **Clock.** The system diagram names its reset block after a 50 MHz clock, while the text states 100 MHz. The timing figures above assume 100 MHz.

## Files

`rtl/`:

* `dehaze_pkg.sv`: bus structs, register offsets and two arithmetic helpers.
* The five kernels.
* `min_filter3x3.sv`, `pipe_div.sv`, `seq_div.sv`, `stream_fifo.sv`.
* The two AXI engines, the two register slaves and the two interconnects.
* `dehaze_top.sv`.

`tb/`:

* One self-checking testbench per block (`tb_<module>.sv`). Each ends by printing `TB_RESULT checks=N failures=M`.
* `axi_ddr_model.sv`: a behavioural multi-port DDR with optional random stalls.
* `dehaze_tb_core.sv`: the end-to-end bench, used by two wrappers:
  * `tb_dehaze_top` runs a 24 × 40 frame with DDR stalls.
  * `tb_dehaze_full` runs one 1920 × 1080 frame at default parameters. It takes about a minute and about 100 MB of memory.

The end-to-end bench acts as the processor. It builds a synthetic hazy image,
runs the five kernels through the control port, and compares every
intermediate frame with its own reference model. It also checks that each
mechanism occurred at least once:

* competing requests on the interconnect,
* DDR back-pressure,
* the denominator floor,
* output saturation,
* the five interrupts.

The bench also checks the airlight estimate in RESULT.

To simulate with Verilator, compile the package first, then the rest:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dehaze_top \
    rtl/dehaze_pkg.sv $(ls rtl/*.sv | grep -v dehaze_pkg) tb/*.sv
./obj_dir/Vtb_dehaze_top
```

Replace `tb_dehaze_top` with any other testbench module name to run that bench.
The image size is a register, so the same RTL runs any frame up to
`MAX_W` (1920) columns and 2047 rows.
