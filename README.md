# Video chunk processor: 3x3 image kernels from a live pixel stream, fifteen at a time

Most video pipelines store a whole frame in external DRAM before an image
filter can read the 3x3 neighbourhood of a pixel. This design avoids the frame
buffer. It keeps only the two previous image rows in on-chip RAM and cuts the
incoming video into **chunks** of 15 x 3 pixels. Each chunk is repacked into
the fifteen overlapping 3x3 **kernels** centred on its middle row. Fifteen
kernel processors, here Sobel edge detectors, then work on all fifteen kernels
at once. A chunk is ready every 15 pixel clocks, so the kernel processors see
15 kernels x 9 pixels x 3 channels in 15 clocks: 27 pixel operands per pixel
clock. At the Full-HD pixel clock of 148.5 MHz that is about 4.0 Gpixel/s
delivered to the algorithm blocks.

The RTL follows a published architecture for a Full-HD (1920 x 1080, 60 fps)
FPGA video system. That architecture fixes the block chain, the 15 x 3 chunk,
the fifteen parallel kernel processors, the 15-clock chunk period and the
three-clock Sobel kernel processor. Many details are not given there and were
chosen here: row-buffer organisation, boundary handling, bit widths, the Sobel
magnitude and all handshakes. They are listed under
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## Data flow

```
 camera stream --+                                              test kernels
                 |                                                   |
            +-----------+   +--------------+  columns  +-----------+ |  +----------+  15 kernels  +----------------------+  q[0..14]  +----------------+
 HDMI ----->| input_mux |-->| line_buffers |---------->|  chunk_   |-+->| test_mux |------------->| kernel_processor_    |----------->| video_streamer |--> 1 pixel
 stream     +-----------+   | (2 row RAMs) | 3 px/clk  | processor |    +----------+ chunk_valid  | array (15 x Sobel)   |  q_valid   +----------------+    per clock
                            +--------------+           +-----------+                              +----------------------+
```

| block | file | what it does |
|---|---|---|
| `input_mux` | `rtl/input_mux.sv` | Chooses the camera or the HDMI pixel stream (`in_sel`). Adds one register stage. |
| `line_buffers` | `rtl/line_buffers.sv` | Stores two rows. For every incoming pixel it emits the column {row y-2, row y-1, row y}. |
| `chunk_processor` | `rtl/chunk_processor.sv` | Collects 15 columns, forms 15 kernels and pulses `chunk_valid`. |
| `test_mux` | `rtl/test_mux.sv` | Feeds the kernel processors either live kernels or externally supplied test kernels (`test_sel`). |
| `sobel_kernel_processor` | `rtl/sobel_kernel_processor.sv` | Computes the Sobel gx, gy, \|gx\|+\|gy\| and an 8-bit edge pixel per channel in 3 pipeline stages. |
| `kernel_processor_array` | `rtl/kernel_processor_array.sv` | Fifteen Sobel processors side by side, one per kernel of the chunk. |
| `video_streamer` | `rtl/video_streamer.sv` | Sends the 15 results of each chunk out again, one pixel per clock. |
| `vcp_top` | `rtl/vcp_top.sv` | Connects the blocks above. |
| `vcp_pkg` | `rtl/vcp_pkg.sv` | Chunk geometry, pixel, column, kernel and chunk types. |

The whole design runs in one clock domain, the pixel clock.

## Pixels, columns, chunks and kernels

A pixel (`pixel_t`) has three 8-bit channels, for example R, G and B. Every
channel is filtered on its own.

**Row buffers.** Row y is written into RAM (y mod 2). At that moment this RAM
still holds row y-2, and the other RAM holds row y-1. Both RAMs are read at the
column being written, before the write. So the pixel (x, y) produces the
column `col[0..2]` = pixels (x, y-2), (x, y-1), (x, y) with no extra storage.
The column's centre row is y-1. Columns start once row 2 is arriving, so the
centre rows run from 1 to HEIGHT-2. The top and bottom image rows are never
centres: no kernels are produced for them. Storage is 2 x 1920 x 24 = 92,160
bits.

**Chunks.** Each row of columns is cut into chunks of 15. 1920 pixels give
128 chunks. Kernel k of a chunk (k = 0..14) is centred on chunk column k and
takes one column to its left and one to its right:

```
          previous chunk | this chunk (columns 0..14)        | next chunk
 columns: ...        14  |  0   1   2  ...  12  13  14       |  0 ...
 kernel 0:          [14     0   1]
 kernel 1:                 [0   1   2]
 ...
 kernel 14:                                 [13  14          0]
```

Kernels 1 to 13 lie entirely inside the chunk. Kernels 0 and 14 are
*boundary kernels*. They need the last column of the previous chunk and the
first column of the next one. The chunk processor keeps a 17-column shift
window: the 15 chunk columns plus both neighbours. It releases a chunk when
the first column of the following chunk has arrived, so every kernel it hands
on is complete.

At the image's left edge, column 0 stands in for the missing column -1. At the
right edge, column WIDTH-1 stands in for column WIDTH (edge replication). The
last chunk of a row has no right neighbour to wait for. It is released as soon
as the row's last column arrives.

Kernel layout (`kernel_t`) is `kernel[r][c]`, with r = 0..2 from top to bottom
and c = 0..2 from left to right. The centre is `kernel[1][1]`.

## Timing

With one pixel per clock (a Full-HD line is 1920 active pixels within 2200
clocks):

| event | clock edge |
|---|---|
| `vcp_top` samples pixel (15c+15, r+1), the pixel that completes chunk c of centre row r (for the row's last chunk: pixel (WIDTH-1, r+1)) | t |
| the column leaves `line_buffers` | t+1 |
| `chunk_valid` rises with the 15 kernels of chunk c, centre row r | t+3 |
| `q_valid`, `q[0..14]`, `gx`, `gy`, `mag` | t+6 |
| the chunk's first pixel appears on `out_pix` | t+7 |

- **Chunk period.** `chunk_valid` pulses every 15 clocks along a row, which is
  101.01 ns at 148.5 MHz. The last chunk of a row follows the one before it
  after 14 clocks. `video_streamer` has a one-chunk holding register for this
  case, so its output has no gaps.
- **First chunk.** The first chunk of a frame needs two full rows plus 16
  pixels. With Full-HD line timing, `chunk_valid` first rises 4418 pixel clocks
  (29.75 us) after the frame's first pixel.
- **Kernel processors.** The Sobel processors accept one chunk per clock, far
  more than the one per 15 clocks they receive.
- **Sync and reset.** `vsync` (high for any number of clocks before a frame)
  restarts the row and column counters. `rst` is synchronous and clears every
  control register. After reset the line buffers ignore pixels until the
  first `vsync`.
- **No back-pressure.** There is none anywhere: the input is a plain `valid`
  strobe and every block keeps up with one pixel per clock.

## Sobel kernel processor

For every channel:

```
gx  = (p[0][2] + 2 p[1][2] + p[2][2]) - (p[0][0] + 2 p[1][0] + p[2][0])
gy  = (p[2][0] + 2 p[2][1] + p[2][2]) - (p[0][0] + 2 p[0][1] + p[0][2])
mag = |gx| + |gy|                     (0..2040, 12 bits)
q   = min(mag, 255)
```

`gx` and `gy` are 12-bit signed values (range -1020..1020).

The three pipeline stages are:

1. the four weighted sums;
2. the two differences;
3. the absolute values, the magnitude and the saturation.

For an image whose value rises by one per column, every kernel gives gx = 8,
gy = 0 and mag = 8.

## Top-level interface (`vcp_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | pixel clock; synchronous active-high reset |
| `in_sel` | in | 0 = camera stream, 1 = HDMI stream |
| `cam_vsync`, `cam_valid`, `cam_pix` | in | camera-side pixel stream |
| `hdmi_vsync`, `hdmi_valid`, `hdmi_pix` | in | HDMI-receiver-side pixel stream |
| `test_sel`, `test_valid`, `test_kernels` | in | select and input for test kernels, e.g. from a test-image reader |
| `chunk_valid`, `kernels`, `chunk_idx`, `chunk_row` | out | the fifteen kernels of each chunk for further algorithm blocks, with the chunk's number in its row and its centre row |
| `q_valid`, `q`, `gx`, `gy`, `mag` | out | the fifteen Sobel results of the chunk |
| `out_valid`, `out_first`, `out_pix` | out | the edge image as a serial stream; `out_first` marks a chunk's first pixel |

Parameters: `WIDTH` (default 1920, a multiple of 15) and `HEIGHT` (default
1080). The chunk size, channel count and widths are constants in `vcp_pkg`.
The chunk processor's position counter is 4 bits wide, so `CHUNK_W` must not
exceed 16 without widening it.

## Where this design makes its own choices

The published architecture gives the block chain, the chunk geometry, the
parallel kernel processors and the rates. The following choices are this
design's own:

- **Pixel format.** The pixel width (8 bits per channel) and the gradient
  width (12 bits) are inferred from values shown in the reference simulation.
  They are not stated as such.
- **Boundary kernels.** The boundary kernels are completed from the
  neighbouring chunks, which delays each chunk by one column. The reference
  simulation appears to release a chunk as soon as its 15th column is in. Its
  last two kernels did not follow the regular column pattern. Here every
  kernel is a true 3x3 neighbourhood.
- **Image edges.** Left and right edges are handled by replication. Top and
  bottom rows produce no kernels.
- **Start-up latency.** The reference hardware reported about 59.4 us from
  reset to the first `chunk_valid`, which is roughly four Full-HD line
  periods. This design needs two rows plus 16 pixels (about 29.8 us). How the
  reference latency is made up is not known.
- **Sobel details.** The \|gx\|+\|gy\| magnitude and the saturation of `q` to
  8 bits were chosen here. The published design only requires three clocks
  per kernel.
- **Multiplexer and streamer details.** The select encodings of both
  multiplexers and the input register are choices of this design. So are the
  streamer's shift register and holding register.
- **Streamer scope.** The streamer does not rebuild sync or blanking for a
  video transmitter.

The surrounding system is not included:

- the camera capture and HDMI receive/transmit interfaces;
- the clock synthesis;
- the configuration processor;
- the test-image ROM and its kernel reader;
- other algorithm blocks, such as sharpening.

Their signals are top-level ports, and the chunk kernels are brought out so
that other kernel algorithms can be attached beside the Sobel array.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line. The reference models are in
`tb/vcp_tb_pkg.sv`:

- a deterministic test image, `img(x, y, seed)`, with edges in every
  direction;
- the kernel cut-out with edge replication;
- an integer Sobel model written straight from the formulas.

| testbench | what it checks |
|---|---|
| `tb_line_buffers` | Every column of 30 x 8 frames: content, position and one-clock latency. Covers pixel gaps, a frame cut short by `vsync`, an extra row beyond HEIGHT and back-to-back frames. |
| `tb_chunk_processor` | Every kernel, chunk number and row on a 45-wide image. Checks the exact `chunk_valid` clock, the 15-clock and 14-clock spacings, and column gaps. |
| `tb_chunk_processor_narrow` | The same on a 15-pixel-wide image, where one chunk touches both image edges. |
| `tb_sobel_kernel_processor` | Random and extreme kernels (saturation), back to back; the exact 3-clock latency. |
| `tb_kernel_processor_array` | Chunks of 15 random kernels, all results, the 3-clock latency. |
| `tb_input_mux`, `tb_test_mux` | Selection and timing. |
| `tb_video_streamer` | Order, `out_first`, start latency and gap-free output with 15- and 14-clock chunk spacing. |
| `tb_vcp_top` | End to end on 45 x 7 frames. Compares the serial output with the reference edge image and checks every chunk's kernels and timing. Counts the following, and fails if any never happens: 15- and 14-clock spacings, left and right boundary chunks, both sources, a frame cut by `vsync`, pixel gaps, test kernels through `test_mux`. |
| `tb_vcp_top_ramp` | A horizontal ramp (value = 0x1E + column, as in the reference simulation). Every kernel must hold columns k-1, k, k+1. Expected results are gx = 8, gy = 0, magnitude 8, and gx = 4 at the two image edges. Chunks must come every 15 clocks. |
| `tb_vcp_top_full` | One Full-HD frame at the default size with 2200-clock lines. All 1078 x 1920 output pixels are compared. Checks 128 chunks per row, the chunk spacings and the 4418-clock start-up latency. It runs in a few seconds. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vcp_pkg.sv tb/vcp_tb_pkg.sv \
    rtl/*.sv tb/tb_vcp_top.sv --top-module tb_vcp_top -Mdir obj_tb_vcp_top
./obj_tb_vcp_top/Vtb_vcp_top
```

Replace `tb_vcp_top` by any other testbench name. Lint a module with:

```
verilator --lint-only -Wall -Irtl rtl/vcp_pkg.sv rtl/vcp_top.sv --top-module vcp_top
```

## Size

Coarse synthesis of `vcp_top` at the default size gives about:

- 5,200 flip-flop bits;
- 97 kbit of memory, mostly the two 1920-pixel row RAMs (92,160 bits);
- roughly 1,600 word-level cells.

The row buffers and the chunk processor alone hold about 1,340 flip-flop
bits, nearly all in the 17-column chunk window and the kernel output register.
That is close to the 1,295 flip-flops reported for the same part of the
published FPGA implementation, which used 6 block RAMs. The rest of the
flip-flops and nearly all the arithmetic are in the fifteen three-channel
Sobel processors.
