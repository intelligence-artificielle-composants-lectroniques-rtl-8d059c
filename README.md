# A digit recogniser that fits in twenty multipliers

This is a small convolutional neural network that reads a 28x28 handwritten digit and names it. It is
sized for a low-end flash FPGA, the SmartFusion2 M2S010, which has 21 RAM blocks of 1K x 18 and 22
hard 18x18 multiply-accumulate units. The whole network is built around that budget. Every
feature-map channel sits in its own 1K x 16 RAM. Every layer reads its input RAMs, computes, and writes
its output RAMs. Only a few multipliers are used per layer, and each one is reused over time. The
total is 17 RAMs and 20 multipliers, and an image takes about 25,300 clocks. At 30 images per second
the clock therefore only has to exceed 0.76 MHz.

```
camera bytes -> image_input -> [RAM 784]
  -> conv 1  3x3, 2 filters  + ReLU  -> [2 RAMs 26x26]   2 multipliers
  -> max pool 2x2 / 2                -> [2 RAMs 13x13]
  -> conv 2  3x3, 4 filters  + ReLU  -> [4 RAMs 11x11]   8 multipliers
  -> conv 3  3x3, 4 filters  + ReLU  -> [4 RAMs  9x9 ]   4 multipliers, one filter at a time
  -> conv 4  3x3, 2 filters  + ReLU  -> [2 RAMs  7x7 ]   4 multipliers, one filter at a time
  -> fully connected 98 -> 10        -> 10 score registers  2 multipliers, weights in 2 RAMs
  -> argmax                          -> digit 0..9
```

## Numbers: 16-bit words, 41-bit sums

All pixels, feature-map values and coefficients are signed 16-bit words (`cnn_pkg::data_t`). A 3x3
kernel row is packed into one 48-bit word with the leftmost column in bits [47:32]. A row of three
pixels is packed the same way, so a window and its kernel travel as three 48-bit lines each.

Products are summed in a 41-bit accumulator, which is 2 x 16 + 9 bits: nine full products cannot
overflow it. The result returns to 16 bits through a right shift by `FRAC_W` = 14 followed by
saturation (`cnn_pkg::scale_sat`). In other words, coefficients are read as values with 14
fractional bits, so 0x27C9 means 0.62. The shift amount and the saturation are this design's
choice. The original design says only that truncating coefficients and intermediate results costs
accuracy unless done with care.

The ReLU blocks follow the original exactly. They do a registered, wrapping 16-bit add of the bias,
then output zero when bit 15 of the sum is set. The channel adders of layers 2-4 saturate instead.

## Coefficients

- **Convolution 1** uses the original trained weights and biases. They are held as constants in
  `cnn_pkg` (`CONV1_W`, `CONV1_B`).
- **Layers 2-4 and the FC biases** have no published trained values. `cnn_pkg` generates
  placeholders from a hash of each coefficient's position (layer, filter, channel, row, column):
  - `gen_coef` gives a value in -8192..8191 (that is, ±0.5);
  - `gen_bias` is that value shifted right by 6;
  - `fc_bias` is an 8-bit value.
- **FC weights** live in two RAMs of 490 words, one per input channel of the FC layer. They are
  loaded at run time, by a processor in the original design.

The network therefore computes correctly, but it does not recognise real digits until a trained set
replaces `gen_coef`, `gen_bias` and `fc_bias`. Those three functions are the only place to change.

## How a convolution layer walks its input

`read_lsram` is the address generator shared by every convolution. It walks the output positions in
row-major order, left to right and top to bottom. For each position it:

1. issues nine single-word reads for the 3x3 window (`addr = (row+dr)*IN_W + col+dc`);
2. packs the returned words into three 48-bit lines;
3. raises `conv_start_o` ten clocks after the first read;
4. waits for `conv_done_i` before it moves to the next window.

It also pulses `line_end_o` and `frame_end_o`.

`conv_3x3` holds its 48-bit lines stable and runs one multiplier for nine clocks, one product per
clock. `done_o` rises nine clocks after `start_i`, with the scaled result. The layer writes its
output RAMs when the ReLU's `done_o` rises, at an address counter that steps by one per window. It
pulses `eof_o` one clock after the last write.

- **Convolution 1** (`conv_layer_1`) has one reader, two `conv_3x3` and two `relu`. Both filters run
  in lockstep on the same window.
- **Convolution 2** (`conv_layer_2`) has two readers, one per input channel. They run in lockstep.
  Eight `conv_3x3` units compute the four filters on both channels at once. Four `adder` units sum
  the channel pairs, then four `relu` units follow.
- **Max pool** (`maxpool_layer`) reads the four words of each 2x2 block from both channels at once,
  keeps the signed maximum and writes it. That takes six clocks per output.

## Layers 3 and 4: one filter at a time

Convolutions 3 and 4 have four input channels, so a full filter needs four 3x3 products per output
pixel. There are only four multipliers per layer, so filters are computed one after another on a
single `conv2d_x4` datapath. This is the part of the design with the most moving pieces. Both layers
are the same module, `conv_layer_34`, with `LAYER` = 3 or 4.

1. **Fetch.** Four `read_lsram` units, one per input channel, fetch the same window position in
   lockstep. Their lines stay stable while the filters are computed.
2. **Sequence.** `conv_scheduler` receives the readers' start pulse. It then runs the datapath
   `N_FILT` times (4 for layer 3, 2 for layer 4):
   - it sets `mux_select_o` to the filter number;
   - it pulses `start_o`;
   - on each `convdone_i` it stores `conv_result_i` in that filter's register;
   - it then moves to the next filter.

   After the last filter it pulses `convdone2ram_o`, which writes all the filter outputs to their
   RAMs and releases the readers.
3. **Select weights.** `conv_weights_sch` is a table indexed by `mux_select_o`. It returns the four
   kernels (`wgt_o[4][3]`) and the bias of the selected filter.
4. **Compute.** `conv2d_x4` runs four `conv_3x3` units in parallel, one per input channel, taking 9
   clocks. Their results go through a saturating sum (1 clock), then through `relu` with the bias
   (1 clock). Its latency is 11 clocks from `start_i` to `done_o`.

A window costs about 64 clocks in layer 3 and about 38 clocks in layer 4. A frame costs about 5,200
and about 1,900 clocks respectively.

## The fully connected layer

The 7x7x2 output of convolution 4 is 98 values in two RAMs of 49 words.

**Weights and loading.** The FC weights are in two more RAMs, 490 words each, stored digit-major:
weight `(d, i)` is at address `d*49 + i`. `write_lsram_weight` loads each weight RAM from the
processor-side ports:
- `UART_FRAME_RDY_I` restarts the address at 0 and clears the done flag;
- each `DATA_VALID_I` writes `DATA_I`;
- `EOF_I` sets `RAM_WR_DONE_O`.

**Sequencing.** `read_before_fcl` (two instances in lockstep, one per channel) remembers convolution
4's end-of-frame and starts once both weight RAMs report done. It then issues the 49 data and weight
addresses for each digit. Data and weights reach `fcl` two clocks later with `conv_start_o`. A
`one_digit_done_o` pulse follows each digit's last pair, and there are three idle clocks between
digits.

**Arithmetic.** `fcl` does two multiply-accumulates per clock: `acc += d0*w0 + d1*w1`. At the end of
a digit it scales the sum, adds the 8-bit sign-extended bias with saturation, and stores the score
in register `digit_o[weightnum]`. `mul_done_o` rises when digit 9 is stored.

**Result.** `max_comp` then returns the index of the largest score. On a tie the lowest index wins.

## Camera input

`image_input` takes an RGB565 pixel as two bytes on `cam_byte_i`, qualified by `cam_valid_i`:
- the first byte holds R[4:0] and G[5:3];
- the second byte holds G[2:0] and B[4:0].

It inverts the green field and stores it as `{8'h00, ~G, 2'b00}`. Dark ink on a light page thus
becomes a large value. `cam_sof_i` restarts the pixel counter. After the 784th pixel, `eof_o`
starts the network. Reducing a full camera frame to 28x28 is not part of this design: the camera
must deliver 28x28 pixels.

## Top level and timing

`cnn_top` contains the 17 `ram_dual_port` instances and the chain of layers. Its ports are:

| Port(s) | Purpose |
|---|---|
| `cam_valid_i`, `cam_byte_i`, `cam_sof_i` | camera pixels |
| `wgt_frame_rdy_i`, `wgt_valid_i[1:0]` (one bit per weight RAM), `wgt_data_i`, `wgt_eof_i` | FC weight loading |
| `digit_o[10]` with `digit_valid_o` | the ten scores |
| `digit_recog_result_o` with `result_valid_o` (one clock later) | the recognised digit |
| `layer_done_o` | the six end-of-frame strobes |

Reset is synchronous and active high. The blocks that keep the original active-low reset get the
inverse. RAM contents are not reset.

Layers do not overlap: each starts on the previous layer's end-of-frame pulse, so one image is
processed at a time. Convolution 1 has 676 windows and takes more than half of the about 25,300
clocks from the last camera byte to the result. The FC layer waits if the weights have not finished loading.

`ram_dual_port` is a 1K x 16 memory. It has a write port A and a read port B, enabled by `we_b` and
registered, so a read takes one clock. A read of an address being written returns the old word.

## Where this departs from the original

- **Placeholder coefficients.** Layers 2-4 and the FC biases use placeholder values (see
  Coefficients). The original reports a 22.84 % error rate on the 10,000 MNIST test images. That
  rate cannot be reproduced without its trained set.
- **Fixed-point scaling.** The 14-bit fractional scaling and the saturation in `conv_3x3`, `adder`,
  `conv2d_x4` and `fcl` are this design's choice.
- **ReLU in layers 3 and 4.** The original shows ReLU explicitly only for layers 1 and 2. Layers 3
  and 4 use the same ReLU.
- **Added ports:**
  - `conv_done_i` on `fc_layer`, driven by convolution 4's end-of-frame;
  - `RAM_WR_DONE_O` on `write_lsram_weight`;
  - `DATA_VALID_O` on `max_comp`;
  - `layer_done_o` on the top.
- **Window fetch.** Each window is fetched with nine single-word reads. The original does not show
  how its reader fills the three lines.
- **FC weight layout and gaps.** The digit-major weight layout and the idle clocks between digits
  are this design's choice.
- **Constant blocks.** The constant-only blocks of the original (the layer 1 and layer 2 weight
  tables and the FC bias table) are folded into `cnn_pkg` and wired in directly.
- **RAM count.** The network needs 17 RAM blocks. The original build reports 20 in use; the
  other three presumably serve the camera and display paths, which are not described.
- **Omitted hardware.** The processor, the PLL, the camera and the LCD boards are outside the RTL.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. It compares the block's outputs with
an independent integer model in `tb/cnn_ref_pkg.sv`, checks cycle counts where they are fixed, has a
watchdog, and ends by printing `TB_RESULT checks=<n> failures=<n>`.

`tb_cnn_top` runs the whole network at its default size. It sends three camera frames:
- the first before the FC weights are loaded, so the FC layer has to wait;
- the second after a weight reload.

For each frame it checks:
- all ten scores and the recognised digit, against a full software model of the network;
- that the frame finishes within 27,000 clocks.

It also counts each mechanism and fails if one never occurs: the layer strobes, filter switches in
layers 3 and 4, ReLU clamps, pooling choices, the wait for weights, and gaps in the camera stream.
It runs in well under a second.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_top.sv --top-module tb_cnn_top
./obj_dir/Vtb_cnn_top
```

Replace `cnn_top` with any block name to run that block's testbench. The testbenches work out every
expected value in SystemVerilog and read no data files.
