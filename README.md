# Handwritten digit recogniser: a camera-to-LCD CNN pipeline

This RTL reads handwritten digits from a camera and classifies them with a
small convolutional neural network (CNN). It shows the live picture and the
recognised digit on an LCD. The main idea is **resource reuse**. The
network has six convolution layers, but the hardware does not build a stage
per layer. It has one 3x3 convolution engine, which computes eight kernels
in parallel, and one max-pooling engine. A small sequencer runs every layer
of the network on these two engines, one after the other. Two on-chip
buffers take turns as the source and the destination of each layer.

The design follows the paper *Implementation of CNN based chirography digit
identification* (TIJER, April 2023). That paper gives the network, the
system structure and a few hardware techniques. Everything below the block
level (widths, encodings, handshakes, loop orders, timings) is this design's
own. The section "Where this RTL departs from the paper" lists the
differences.

## System data flow

```
camera bytes ─► cam_capture ─► frame_buffer_ctrl ──AXI4──► external DDR3 (two frame banks)
                                      │ read stream of the last complete frame
                                      ├──► lcd_ctrl ─► LCD (image left, digit right)
                                      └──► preproc ─► cnn_core ─► class ─► lcd_ctrl
```

* `cam_capture` receives the sensor's 8-bit bus and joins each byte pair into
  one RGB565 pixel, high byte first.
* `frame_buffer_ctrl` writes each frame into one of two memory banks over
  AXI4 and reads the last complete frame back from the other bank. This is a
  ping-pong scheme.
* `lcd_ctrl` drives an 800x480 panel. It pulls the frame into the left
  640x480 area and draws the latest class as a seven-segment digit on the
  right.
* `preproc` watches the same read stream and turns the frame into a 28x28
  binary image of the character.
* `cnn_core` classifies that image. Its result goes to the display.

The whole design runs on one clock, `clk`.

## The network

The layer shapes come from the paper. All convolutions are 3x3 with stride 1
and "same" padding, and none has a bias term. Every convolution is followed by
a ReLU.

| step | layer            | input     | output    | weights         |
|------|------------------|-----------|-----------|-----------------|
| 0    | conv1            | 28x28x1   | 28x28x4   | 36              |
| 1    | conv2            | 28x28x4   | 28x28x4   | 144             |
| 2    | max pool 2x2     | 28x28x4   | 14x14x4   | –               |
| 3    | conv3            | 14x14x4   | 14x14x8   | 288             |
| 4    | conv4            | 14x14x8   | 14x14x8   | 576             |
| 5    | max pool 2x2     | 14x14x8   | 7x7x8     | –               |
| 6    | conv5            | 7x7x8     | 7x7x16    | 1152            |
| 7    | conv6            | 7x7x16    | 7x7x16    | 2304            |
| 8    | global max pool  | 7x7x16    | 1x1x16    | –               |
| 9    | dense (as 1x1 conv) | 1x1x16 | 1x1x11    | 176             |
|      | total            |           |           | 4676            |

The network ends in a softmax over 11 classes. Softmax does not change which
score is largest, so the hardware keeps only an arg-max. Class 10, the
eleventh output, is shown on the LCD as a dash.

## The CNN processor (`cnn_core`)

### Schedule and buffers

`cnn_pkg::layer_table` holds the ten steps above. Each entry gives the kind
(conv or pool), the kernel or window size, the input shape, the channel
counts, the first weight word and the source buffer. Buffer A holds the input
image. The steps run A→B, B→A, A→B and so on. Conv2, conv4 and conv6 write
into the buffer that the following pooling step reads.

Each buffer (`fm_ram`) is 3136 bytes, one write port and one read port with a
single cycle of read latency. 3136 bytes is the size of the largest map,
28x28x4. Maps are stored channel by channel:
`address = (channel*H + y)*W + x`.

Between steps the sequencer spends one cycle in a launch state. One image
takes **83,213 cycles** from `start` to `done`. The testbench checks this
number.

### Convolution engine (`conv_engine`)

* **Loops.** From the outermost: group of 8 output channels, row, column,
  input channel, kernel row, kernel column. One input byte is read per cycle,
  together with one 64-bit weight word that holds that tap's weight for each
  of the 8 kernels. Eight multipliers and eight 32-bit accumulators work in
  parallel. A layer with fewer than 8 outputs (conv1, conv2, or the dense
  layer's second group of 3 outputs) leaves some lanes unused.
* **Zero padding without storage.** The engine computes each tap's input
  coordinate and checks it against the map edges. A tap outside the map
  multiplies zero and does not read memory. No padded copy of the map exists.
* **Pipeline.** There are three parts: the issue stage (addresses, memory
  reads), the MAC stage, and an output serialiser. The serialiser writes the
  8 results of a pixel one per cycle while the next pixel accumulates. A pixel
  takes `CIN*K*K` cycles, at least 9 for 3x3 and 16 for the dense layer, so
  the serialiser always finishes in time. An assertion guards this.
* **Timing.** A layer takes `groups*H*W*CIN*K*K + lanes_of_last_group + 2`
  cycles.
* **Dense layer.** It runs as a 1x1 convolution of a 1x1 map with 16 input
  channels. The raw 32-bit sums leave on the `score` port and go to the
  arg-max.

### Number format

The paper only says that the weights are converted to fixed point. This
design uses the following format:

* weights are 8-bit signed, read as Q1.7 (value/128);
* activations are 8-bit unsigned integers, and the input image is 0 or 255;
* products are summed in 32 bits, then shifted right arithmetically by
  `QSHIFT` = 7 and clamped to 0..255. The clamp at zero is the ReLU.

To use trained weights, scale each one by 128, round it and saturate it to
-128..127. Then pack the weights as `cnn_pkg` describes:

```
word address = wbase(layer) + (group*CIN + cin)*K*K + ky*K + kx
lane l (bits 8l+7:8l) = weight of output channel 8*group + l
```

The values of `wbase` are 0, 9, 45, 81, 153, 297 and 585. There are 617
words in total. Load them through `wld_*` while the core is idle. The
network's accuracy depends on these weights. None are included, and the
testbenches use random ones.

### Pooling engine and classifier

`pool_engine` reads one byte per cycle over a PxP window and writes the
maximum. P = 2 for the two pooling layers, and P = 7 for global pooling. A
layer takes `C*(H/P)*(W/P)*P*P + 3` cycles. `argmax_unit` keeps the largest
score of the dense layer, and on a tie the lower index wins.

## Camera side and pre-processing

* **`cam_capture`.** VSYNC is high in the frame gap and HREF is high on
  active bytes. Each pixel comes out with its column and row, and with
  start-of-frame and end-of-frame flags.
* **`frame_buffer_ctrl`.**
  * The write side packs 4 pixels into a 64-bit word, collects the words in a
    64-word FIFO and writes INCR bursts of 16 beats. Bank 0 is at
    0x0000_0000 and bank 1 at 0x0010_0000.
  * A frame counts as complete after its last write response. The bank that
    holds it then becomes the read bank.
  * `rd_frame_start` starts a read of the complete frame. The LCD pulses it
    at the start of vertical blanking. Read bursts are issued whenever the
    read FIFO has room for one, and the pixels leave on a valid/ready stream.
  * With only two banks, the camera could start a new frame in the bank that
    is still being displayed. Such a camera frame is **dropped** whole, and
    `frame_dropped` pulses.
  * `wr_overflow` and `axi_error` are sticky error flags.
* **`preproc`.** Steps 1 and 2 run while the frame streams in. Step 3 then
  reads the stored binary image.
  1. **Capture.** Grey = (77R + 150G + 29B)/256. Histogram normalisation
     stretches the grey range [gmin, gmax] of the frame before to 0..255,
     and ink = stretched grey < `THRESH` (128), meaning dark ink on light
     paper. So a dim or low-contrast scene still splits at the middle of its
     own range. The range is measured on every frame streamed past, and
     applied to the next one. Before the first frame the range is 0..255. The
     binary image is kept at one bit per pixel (307,200 bits at 640x480).
  2. **Labelling, during the same pass.** The ink is split into 8-connected
     components at one pixel per cycle:
     * A line buffer holds the labels of the row above. A pixel looks at its
       left, upper-left, upper and upper-right neighbours. The first three
       always belong to one component already, so at most two roots meet,
       and at most one merge happens per pixel.
     * The parent table is kept *flat*: every label points straight at its
       root. A merge keeps the smaller label and rewrites every entry that
       pointed at the other one, in the same cycle. Finding a root is
       therefore a single lookup.
     * Each root keeps a pixel count and a bounding box, and a merge combines
       them.
     * At end-of-frame, the components with at least `MIN_PIX` (8) pixels
       together form the character box. Smaller ones are specks of dirt and
       are ignored. `NLAB` = 64 gives 63 labels per frame. Ink that finds no
       free label is kept in the character box rather than lost.
  3. **Resample.** The box is grown by one pixel to allow for the dilation
     and made square around its centre. It is then sampled onto a 24x24 grid
     at `origin + (2i+1)*side/48`. Each sample is the OR of the 3x3
     neighbourhood of its point, which is the same as sampling the image after
     a 3x3 dilation. A 2-pixel zero border makes the result 28x28. Ink becomes
     255.

  The block takes a frame only if the CNN is idle when the frame starts. A
  CNN run (83k cycles) is shorter than a frame, so at most every other frame
  is skipped. After end-of-frame it writes 784 bytes and pulses `done`
  784*9 + 4 cycles later.
* **`lcd_ctrl`.**
  * Timing: 800x480 active, 1016x528 total, syncs active low.
  * Image pixels that are not available in time are shown black.
  * The digit is 80x160 pixels at (680,160), with 12-pixel segments, white on
    dark blue.

## Top level (`digit_top`) ports

* Camera: `cam_vsync`, `cam_href`, `cam_data[7:0]`.
* Weight loading: `wld_we`, `wld_addr[9:0]`, `wld_data[63:0]`.
* AXI4 master to the frame memory: `m_aw*`, `m_w*`, `m_b*`, `m_ar*`, `m_r*`,
  64-bit data. In a board, this connects to the DDR3 controller.
* LCD: `lcd_hsync`, `lcd_vsync`, `lcd_de`, `lcd_rgb[15:0]`.
* Status: `result_valid`, `result_class`, `result_score`, `cnn_busy`,
  `frame_ready`, `frame_dropped`, `wr_overflow`, `axi_error`.

## Files

* `rtl/`: one module or package per file.
  * `cnn_pkg`: types, layer table, requantisation.
  * `conv_engine`, `pool_engine`, `argmax_unit`, `fm_ram`, `weight_ram`,
    `cnn_core`.
  * `cam_capture`, `sync_fifo`, `frame_buffer_ctrl`, `preproc`, `lcd_ctrl`.
  * `digit_top`.
* `tb/`: one self-checking testbench per block, `tb_<module>.sv`, plus
  `axi_mem_model.sv`. The memory model is a behavioural AXI4 slave with
  random back-pressure that stands in for the DDR3 memory. Each testbench
  prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cnn_pkg.sv tb/tb_digit_top.sv --top-module tb_digit_top -o sim
./obj_dir/sim
```

Replace `tb_digit_top` with any other testbench name to run that one.

* **`tb_digit_top`** runs the whole system at its full default size.
  * Setup: 640x480 camera frames of random pen strokes, random weights, and
    the AXI memory model.
  * For each of three results it works out which picture was read from the
    memory. It then models the pre-processing and the network on that picture
    and compares the class and the score.
  * It checks the number of lit digit pixels on the LCD.
  * It requires at least one occurrence each of: both banks written and read,
    a dropped frame, every network step, zero-padding taps, and a speck
    rejected by the labelling.
  * It takes a few seconds.
* `tb_cnn_core` runs the full network on four images against a reference
  model and checks the 83,213-cycle run time.
* `tb_preproc` checks every byte of the 28x28 image against a model that
  finds the components by flood fill. It includes specks that must be
  rejected, and frames under dim lighting where only the normalisation
  separates ink from paper.
* The engine testbenches check every output byte and the cycle formulas
  above.

## Where this RTL departs from the paper, and what is left out

* **One character per frame.** The labelling drops small noise components,
  but all larger components together form one character. The display shows
  one result, so several digits in one frame are not classified one by one.
* **Labelling before dilation.** The paper's order is threshold, dilate,
  label. Here the labels are found on the undilated image, and the dilation
  is applied only when sampling. A stroke broken by a 1-pixel gap therefore
  gives two components. Both are kept if each is large enough.
* **Histogram normalisation is a contrast stretch.** The paper names the
  step but not its form. Here it is a linear stretch of the grey range, and
  the range comes from the frame before, so no second pass over the frame is
  needed. It works because the lighting changes slowly compared with the
  frame rate.
* **Sizes the paper does not give.** The frame size, panel size, thresholds,
  label table size and noise size limit, number format, AXI width and burst
  length, and FIFO depths are all choices of this design, and all are
  parameters.
* **One clock.** There is a single clock and no clock-domain crossing. A board
  with a separate camera pixel clock, memory-controller clock and panel clock
  needs crossings, for example at the frame-cache FIFOs.
* **Not included.** The DDR3 chip and its controller/PHY, the camera and the
  LCD panel are external parts. The top only gives their interfaces.
* **Accuracy not reproduced.** The paper reports about 97% accuracy on MNIST.
  That depends on trained weights, which are not part of this RTL.
* **Frame dropping is this design's own rule.** With unsynchronised camera
  and display rates, two banks alone cannot guarantee whole frames.
