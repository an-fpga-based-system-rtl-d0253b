# A PC-in-the-loop FPGA platform for real-time vision algorithms

Developing an image-processing algorithm for an FPGA is easier when the board
needs no camera or display logic of its own. In this platform a PC grabs
frames from an ordinary web camera and sends them, compressed, to the FPGA
over a parallel port. The FPGA decompresses each frame, runs the algorithm
under development and compresses the result. It then sends the result back,
and the PC shows it beside the original. Only the algorithm block changes
from one experiment to the next. Everything around it is a fixed test
harness: the port interface and the compression codec.

This repository is synthesizable SystemVerilog for the FPGA side of such a
system. It follows the published description of the platform ("An
FPGA-based System for Development of Real-time Embedded Vision
Applications"). That description fixes the list of modules and their order.
It also fixes the main idea of the codec: a colour transform, prediction
from the neighbouring pixels, then two fixed Huffman tables. Finally, it
names the algorithms that were built: Sobel edges, SUSAN edges and SUSAN
corners. Most of the details are this design's own choices and are marked
as such below: widths, code tables, the port protocol, border handling and
the rules of the detectors.

## The frame path

```
 PC ──pp_data/pp_ctrl──► pp_if ─bytes─► huff_dec ─Y,U,V diffs─► img_dec ─RGB─┐
                                                                             ▼
 PC ◄──pp_status──────── pp_if ◄─bytes─ huff_enc ◄─Y,U,V diffs─ img_enc ◄─RGB─ image_proc
                                                                             (Sobel | SUSAN edge | SUSAN corner)
```

`vision_top` wires the chain together. Every link is a valid/ready stream,
so the whole chain stalls when the PC falls behind, and nothing is lost or
buffered beyond the line memories. A frame is `WIDTH x HEIGHT` pixels
(default 320 x 240). Every block counts pixels or symbols itself, so there
are no start-of-frame or end-of-frame signals between blocks.

| Module | Role |
|---|---|
| `pp_if` | parallel-port handshake, bytes in, nibbles out |
| `huff_dec` / `huff_enc` | Huffman decoder and encoder, one table for brightness and one for colour |
| `img_dec` / `img_enc` | prediction and colour transform, inverse and forward |
| `image_proc` | RGB to gray, detector selection, result returned as gray RGB |
| `line_window` | line memories and K x K window for the detectors |
| `sobel`, `susan_edge`, `susan_corner` (with `susan_usan`) | the three algorithms |
| `vision_pkg` | shared types, code tables, colour transform and prediction functions |

## How a frame is coded

This is the part that must match bit for bit on both sides of the link. A
PC program written for this RTL must do exactly the same.

**Colour transform.** Each RGB pixel becomes three channels:

* Y = floor((R + 2G + B) / 4), 8 bits
* U = B − G and V = R − G, each rounded to 6-bit two's complement as
  Uq = clamp(floor((U + 4) / 8), −32, 31)

Brightness thus keeps more precision than colour. The inverse used by the
decoder is

* U' = 8·Uq and V' = 8·Vq
* G = Y − floor((U' + V') / 4)
* R = V' + G and B = U' + G, each clamped to 0..255

A gray pixel (R = G = B) survives the round trip exactly. That matters
because every detector returns gray images.

**Prediction.** Each channel value p is replaced by d = p − floor((left + up) / 2).
Large flat areas then become runs of small numbers. At the image border:

* in the first row, only the left neighbour is used;
* in the first column, only the upper neighbour is used;
* the first pixel of a frame is predicted as 128 for Y and 0 for U and V.

Differences wrap modulo 2^bits, so a Y symbol is 8 bits and a U or V symbol
is 6 bits. Both sides keep one row of {Y, U, V} (20 bits per column) to
supply the upper neighbour.

**Symbols and order.** Each pixel gives three symbols, in the order Y, U, V.
Pixels follow raster order.

**Code tables.** A symbol is first read as a signed number d and folded to
the index k = 2d for d ≥ 0, or k = −2d − 1 for d < 0, so small differences
get small indices. Each table is a canonical prefix code in which indices
come in classes of equal code length:

| Table | Class lengths (bits) | Indices per class | First code of each class |
|---|---|---|---|
| Y (256 symbols) | 2, 3, 4, 6, 8, 12 | 1, 2, 4, 8, 16, 225 | 00, 010, 1000, 110000, 11100000, 111100000000 |
| U/V (64 symbols) | 1, 3, 5, 9 | 1, 2, 4, 57 | 0, 100, 11000, 111000000 |

Within a class, the codes count up from the first code in index order. These
are the canonical codes that the usual algorithm builds from the lengths:
count the codes of each length, then assign consecutive values, shortest
codes first. The lengths were chosen for a two-sided geometric spread of
differences. Both tables are prefix-free but not complete: a 12-bit Y word
of 1111 1110 0001 or above is no code word. The source system derived its
tables from typical images but does not publish them. A different table is
a change to `hclass()` in `vision_pkg` and to the PC software, nothing else.

**Bit stream.** Code words are packed MSB first into bytes. After the last
symbol of a frame, the encoder pads the last byte with zeros. The decoder
drops those padding bits, so every frame starts on a byte boundary.

**Decoding.** `huff_dec` keeps a 24-bit left-aligned bit buffer and refills
it a byte at a time. Each cycle, the top bits of the buffer are compared
with every class of the current channel's table. A class of length L
matches when the top L bits lie in [first code, first code + count). The
shortest matching class gives the code length. Those bits are removed and
the index within the class is unfolded back to the symbol. Bits not yet
loaded read as zero. Because the code is prefix-free, a match needs only the
bits the code word actually has, so the last symbols of a frame decode
without look-ahead past the padding. If 12 or more bits match nothing, the
decoder pulses `err` (`dec_err` at the top) and drops one bit.

## The parallel-port link (`pp_if`)

The FPGA is given 8 data lines and 2 control lines from the PC, and drives
5 status lines back. In the source system the cable carries the image data
but its protocol is not described. This protocol is this design's own:

* `pp_ctrl[1]` is the direction: 0 when the PC writes, 1 when it reads.
* `pp_ctrl[0]` is the request. The PC inverts it to start a transfer.
* `pp_status[4]` is the acknowledge. It equals the request once the
  transfer is complete.
* With direction 0, between transfers `pp_status[3:0] = {0, 0, tx_avail,
  rx_free}`. A request stores the byte on `pp_data`. It is acknowledged only
  once the byte sits in the receive register.
* With direction 1, each request returns one nibble on `pp_status[3:0]`:
  first the high nibble of the next output byte, then its low nibble. The
  acknowledge is withheld until a byte exists.

All inputs pass two flip-flops. The PC must set up the data and the
direction at least one FPGA clock before it toggles the request, and should
wait three clocks after it changes the direction before it reads the flags.
A PC loop that never deadlocks goes as follows:

1. Poll the flags.
2. If `tx_avail` is set, read a byte.
3. Otherwise, if `rx_free` is set, write the next byte.

`tb/pp_host.sv` is such a PC model.

## Neighbourhood operators

`line_window` turns a pixel stream into a stream of K x K windows, one per
pixel, in the same order. It keeps K−1 line memories. Together with the
incoming pixel they give one new column per step, which shifts into a
K x K register array.

The window centred on pixel (r, c) is complete only when pixel
(r + R, c + R) has arrived, where R = (K−1)/2. The block therefore scans
R rows and R pixels past the end of the frame. Those steps take no input,
so the last windows leave without waiting for the next frame.

Positions outside the image take the value of the centre pixel. A detector
thus sees a flat surround at the border: Sobel finds no false edge there,
and SUSAN counts the outside positions as similar. This border rule is a
choice of this design.

* **`sobel`** uses a 3 x 3 window and the standard kernels. Its result is
  |Gx| + |Gy|, saturated to 255. It has two pipeline stages after the
  window: gradients, then magnitude.
* **`susan_edge`** uses a 7 x 7 window holding the 37-pixel circular SUSAN
  mask (rows of 3, 5, 7, 7, 7, 5, 3 pixels). `susan_usan` counts n, the
  mask pixels whose brightness is within T = 20 of the nucleus, using a
  hard threshold. The response is g − n where n < g, with g = 27 (¾ of 37).
  The output is that response times 8.
* **`susan_corner`** uses the same USAN with g = 18 (½ of 37). It adds a
  centroid test: the USAN centroid must lie at least one pixel from the
  nucleus, checked without division as sx² + sy² ≥ n². That rejects single
  bright dots and thin lines, whose USAN is small but centred. The output
  is (g − n) · 8.

Neither SUSAN block applies non-maximum suppression. Every detector takes
one pixel per clock. The latency is R rows plus a few clocks.

## Algorithm selection and frames in flight (`image_proc`)

`image_proc` converts each pixel to gray = (R + 2G + B) / 4 and feeds it to
one detector, chosen by `mode`:

| `mode` | Detector |
|---|---|
| 0 | Sobel |
| 1 | SUSAN edge |
| 2 | SUSAN corner |
| 3 | Sobel |

The result comes back as an RGB pixel with R = G = B.

`mode` is sampled only at the first pixel of a frame. The sampled value is
pushed into a 4-entry FIFO, and the output side reads results from the
detector named at the head of that FIFO. Because the detectors have
different latencies, frame n+1 can already be entering one detector while
frame n still drains from another. The FIFO keeps results in frame order,
and a change of `mode` during a frame takes effect at the next frame. When
four frames are in flight, a new frame waits.

## Rates, sizes and latency

* The detectors take 1 pixel per clock, and so do `img_dec` and
  `huff_dec` when bits are available. `img_enc` takes one pixel per 3
  clocks, because it emits three symbols per pixel. `huff_enc` takes one
  symbol per clock for short codes, and a little under one per two clocks
  for 12-bit codes. The port dominates everything: each byte costs the PC
  a full handshake.
* At 320 x 240, the shaded test picture compresses to about 43 KB per frame.
  The Sobel or SUSAN result of that noisy picture comes back at about
  46 KB.
* Generic synthesis of `vision_top` at the defaults gives about 2,260
  word-level cells, 563 flip-flops and 49,640 bits of memory. The memory is
  mostly the line buffers: 2 lines for Sobel, 6 lines for each SUSAN block,
  and one 20-bit row for each codec side. The published system was built on
  a Spartan-IIE with 300K gates.
* Parameters: `WIDTH` and `HEIGHT` on every block; the SUSAN threshold `T`
  (default 20). The chroma precision (`CHROMA_SHIFT = 3`, giving 6 bits) is
  a package constant.

## Departures and open points

* **From the source description:**
  * The frame order of blocks and the prediction equation are as described.
  * The colour transform is an integer reversible-style transform. The
    exact transform used originally is not published.
  * The published system derived its Huffman tables from sample images and
    does not give them. The tables here are assumed, as described above.
  * No frame size and no clock rate are given. 320 x 240 is a choice.
  * The detectors are the textbook versions of the named methods, with the
    simplifications listed above: hard SUSAN threshold, no non-maximum
    suppression, and the border rule.
* **Added here:** the port protocol, the mode FIFO, and the end-of-frame
  padding and alignment. These are needed to make the described blocks
  work together.
* **Not on the FPGA:** the PC software (capture, display, the software
  codec) and the camera. A PC program for this RTL must implement the
  coding section above exactly. `tb/ref_pkg.sv` does so and can serve as
  the specification.
* **Lossy colour:** coding is lossless for Y and loses the 3 low bits of
  U and V. Frames sent by the PC therefore reach the detector slightly
  altered in colour. Only the gray value matters to the detectors.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Every block has one: `tb/tb_<block>.sv`.

* `tb_vision_top` runs four 24 x 16 frames end to end through all modes.
* `tb_vision_top_full` runs four 320 x 240 frames with the top at its
  default parameters. It takes a few seconds once compiled.
* `tb_video_sobel` is the live-video case. It runs 12 successive
  320 x 240 frames of a shape moving over a fixed background, all through
  Sobel, and prints the clock at which each result frame leaves. With the
  PC model's fast handshake, a frame takes about 1.27 M clocks, almost all
  of it port traffic.
* The reference models are in `tb/ref_pkg.sv` and the PC model in
  `tb/pp_host.sv`.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/vision_pkg.sv tb/ref_pkg.sv tb/tb_vision_top.sv --top-module tb_vision_top
./obj_dir/Vtb_vision_top
```

Replace `tb_vision_top` with any other testbench name. Testbenches drive
their inputs on the falling clock edge and sample on the rising edge. Each
has a watchdog that fails the run if it hangs.
