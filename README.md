# NeuroCorgi: a streaming MobileNet v1 feature extractor with hard-wired weights

This RTL turns an RGB video stream of up to 1280 x 720 pixels into
MobileNet v1 feature maps as the pixels arrive. It uses no external memory,
no weight memory and no instruction stream. Each of the 27 convolution layers
of the network is its own block of logic. Its weights are constants folded
into the multipliers. A pixel leaves a layer as soon as enough of its
neighbourhood has been seen, and it goes straight to the next layer.
Activations and weights are 4 bits wide. The only exception is the first
layer, which takes 8-bit colour and uses 8-bit weights. The chip sends out
four feature maps:

| map | after layer | channels | size (HD input) | clock |
|-----|-------------|----------|-----------------|-------|
| 0 | 7 (Conv3 1x1) | 128 | 320 x 180 | clk |
| 1 | 11 (Conv5 1x1) | 256 | 160 x 90 | clk/2 |
| 2 | 23 (Conv7_5 1x1) | 512 | 80 x 45 | clk/4 |
| 3 | 27 (Conv9 1x1) | 1024 | 40 x 23 | clk/4 |

A downstream classifier or segmentation head uses these maps. That head is
not part of this design.

## The data stream

Pixels travel in raster order. All channels of a pixel move together in one
valid/ready transfer. Channel `c` sits in bits `[4c+3:4c]`. Every layer
accepts a pixel only when it has room and holds its output until the next
layer takes it. A stall anywhere therefore propagates back to the video
input, and no data is lost. The image size is a run-time setting (`cfg_w`,
`cfg_h`, written over SPI). The memories are sized for 1280-pixel lines
(`MAX_W`). Every 3x3 layer pads the image by one pixel of zeros on each side.
A stride-2 layer maps n pixels to (n-1)/2+1, so a 1280 x 720 frame shrinks
to 640 x 360, then 320 x 180, 160 x 90, 80 x 45 and 40 x 23.

### Three clock domains

After each stride-2 layer there are four times fewer pixels, so deeper layers
have less work. Layers 1-8 run on `clk`, layers 9-12 on `clk/2` and layers
13-27 on `clk/4` (`clock_divider`, two toggle flip-flops). Crossing a clock
domain takes three steps:

1. `pixel_serializer` cuts the wide pixel into 128-bit words.
2. The words pass through an `async_fifo`. It uses Gray-code pointers and
   two-flop synchronizers. It is 512 words deep after layer 8 and 256 words
   deep after layer 12.
3. `pixel_deserializer` rebuilds the pixel on the other side.

The FIFOs also absorb the bursts caused by line ends and stride. Inside a
domain, the clock goes straight to each layer's port. In simulation, this
puts every flip-flop of a domain on the same clock event.

## How a layer computes: LB and DN

A layer can be built in one of two ways. The layer table in
`nc_pkg::layer_cfg` gives the mode of each layer.

**LB (line buffer): `lb_layer` + `line_buffer`.** The layer keeps the input.
`line_buffer` stores the last K-1 input lines and a K x K window register. A
walker steps over the padded frame, (W+2) x (H+2) positions. At a real
position it consumes an input pixel. At a padding position it shifts in zeros
without waiting for input. The walker offers a window when the window's
bottom-right corner lands on the stride grid. The layer computes all K x K x
fan-in products of a window in one clock, for `PAR` output channels at a
time. It takes `oz/PAR` clocks per output pixel, assembles the whole output
pixel in a register and then hands it on. Depth-wise layers ("LB Conv DW")
give each lane one channel and 9 products. Regular layers give each lane all
`iz` input channels, or all 27 values for layer 1. 1x1 layers need no line
buffer and take the pixel directly.

**DN (accumulation memory): `dn_conv_dw` + `dn_adapter` + `acc_sram`.** The
layer keeps partial sums instead of the input. `dn_adapter` hands each input
pixel on in slices of `PAR` channels. For each slice, the products with all
9 kernel taps are added into the up-to-9 output pixels that this input
touches. Nine read-modify-write ports of `acc_sram` make this a single clock.
The memory is a ring of three output rows, and row `oy` lives in slot
`oy mod 3`. A "touched" bit per stored pixel tells whether a contribution is
the first one, which starts from the bias, or a later one, which adds to the
stored value. Once input row `y` is complete, the layer drains every output
row whose last input row is `y`, that is min(2·oy+1, H-1) for stride 2. The
drained row goes through CLIP SCALE as whole pixels, and its touched bits
are cleared. Input is held off during the drain. In this design, DN is used
for the depth-wise layers of the 1/16 and 1/32 stages and for layer 12. At
those resolutions, three rows of partial sums take less memory than the
input lines.

LB and DN give the same result except for saturation order. LB saturates the
whole window sum once. DN saturates after every contribution, in raster
order. The reference model in `tb/nc_ref_pkg.sv` follows each mode exactly.

### Arithmetic of one output (ACC BIASES, then CLIP SCALE)

For each output channel:

```
acc  = SAT_acc( SAT_acc(sum of products) + (first ? bias : stored) )   // acc_bias
y    = min(max(acc, 0), clip)                                         // ReLU clip
q    = SAT_u4( (y * scale + 2^(sh-1)) >> sh )                          // clip_scale
```

`SAT_acc` saturates to the accumulator width of the layer (`accbits`: 20 bits
for layer 1, 10-12 bits for the others). `scale` is 8 bits (128..255), and
`sh = accbits + 2`. `mcm` multiplies an unsigned activation by a signed
constant weight, and `adder_tree` sums the products of one lane.

### Weights and other constants

The trained weights are not public. `nc_pkg` therefore generates every
weight, bias, clip level and scale with a fixed integer hash (`mix32`) of
layer, channel and tap:

- Weights lie in [-8, 7], or [-128, 127] for layer 1.
- In layers with a fan-in above 128, one weight in eight is forced to zero
  (pruning).
- Biases lie in ±2^(accbits-4).
- Clip levels lie in [2^(accbits-3), 2^(accbits-2)).

These are constant functions, so synthesis sees each multiplier as
multiplication by a constant, just as hard-wired weights would be. To use
real weights, replace `weight_of`, `bias_of`, `clip_of` and `scale_factor`.

### Lanes and throughput

The lanes per layer (`par` in the layer table) are this design's own choice.
They are set so that no layer needs more than about one clock per layer-1
input pixel:

- layer 1: 32 output channels per window, one window per clock;
- 1x1 layers: 8 or 16 output channels per clock;
- 3x3 depth-wise layers: 32 or 64 lanes.

In total this gives 44,832 multipliers. An HD frame takes about 0.93 M clocks
of `clk` (the padded frame walk of layer 1). At 59 MHz that is about 63
frames/s, and a 224 x 224 frame takes 51 k clocks.

## Chip top

`neurocorgi` wraps the core:

- `spi_config`: SPI mode 0 with 24-bit frames `{read, addr[6:0], data[15:0]}`,
  MSB first. The SPI inputs are oversampled on `clk`. Registers: 0 width
  (reset 1280), 1 height (reset 720), 2 map enable (reset 0xF), 3 read-only
  ID 0x4E43. A map whose enable bit is clear is dropped without stalling the
  network.
- `sync_fifo`: a 16-deep video input FIFO.
- Per map: a serializer and a dual-clock FIFO (32 words of 128 bits plus a
  last flag) into the `clk` domain.
- `output_mux`: round-robin over the four map FIFOs. It keeps a source
  selected until the last word of its pixel. Each output word carries
  `feat_map` (which map) and `feat_last` (last word of a pixel). A pixel of
  map k takes 4·2^k words, and word 0 holds channels 0-31.

## Where this design departs from the published chip

- **Constants.** Weights, biases, clip levels and scales come from a hash,
  not from training, so the feature maps are not those of a trained network.
- **Parallelism.** The lanes per layer are chosen here. The published chip
  has about 42 k multipliers, and this design has 44.8 k.
- **Accumulation memory.** The DN memory is a register array with nine
  read-modify-write ports, not banked SRAM macros.
- **Line buffer.** The line buffer keeps K-1 whole lines plus a K x K
  register window.
- **Not built: DN mode for regular convolution.** The published design
  describes this mode, but no layer of the network uses it.
- **Not built: the rest of the die.** The second, programmable accelerator on
  the die, power domains and pads are not part of this RTL.
- **Interfaces.** The SPI register map, the pixel and word formats, the
  FIFO depths other than the two inter-domain FIFOs, and the output mux
  policy are this design's choices.

## Files

- `rtl/nc_pkg.sv`: layer table, sizes, constant generators.
- `rtl/neurocorgi.sv`: chip top. `rtl/neurocorgi_core.sv`: the 27 layers and
  the domain crossings.
- `rtl/nc_layer.sv`: picks the LB or DN layer type.
- `rtl/lb_layer.sv`, `rtl/line_buffer.sv`: LB layers.
- `rtl/dn_conv_dw.sv`, `rtl/dn_adapter.sv`, `rtl/acc_sram.sv`: DN layers.
- `rtl/weights_hwlut.sv`, `rtl/mcm.sv`, `rtl/adder_tree.sv`,
  `rtl/acc_bias.sv`, `rtl/clip_scale.sv`: datapath.
- `rtl/async_fifo.sv`, `rtl/sync_fifo.sv`, `rtl/pixel_serializer.sv`,
  `rtl/pixel_deserializer.sv`, `rtl/clock_divider.sv`, `rtl/output_mux.sv`,
  `rtl/spi_config.sv`: stream plumbing and control.
- `tb/`: one self-checking test per module. `tb/nc_ref_pkg.sv` is a
  behavioural reference of the whole network, and `tb/layer_harness.sv`
  drives a single layer.

## Simulating

Every test prints `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/nc_pkg.sv tb/nc_ref_pkg.sv \
    rtl/*.sv tb/layer_harness.sv tb/tb_neurocorgi.sv --top-module tb_neurocorgi
./obj_dir/Vtb_neurocorgi
```

- **`tb_neurocorgi`** runs the whole chip with every parameter at its
  default. It sets the frame size to 32 x 32 over SPI and reads back the
  chip ID. It streams two frames, checks every activation of every map
  against the reference and rewrites the map enables between frames. The
  output is randomly not ready. 32 x 32 is the largest frame simulated
  end to end, and an HD frame was not simulated (about 0.93 M clocks through
  27 layers). The build takes about 2 minutes, and the run takes seconds.
- **`tb_neurocorgi_core`** does the same for the core on its own.
- **`tb_lb_layer` and `tb_dn_conv_dw`** check single layers of both kinds,
  with and without stalls, and check the clocks per pixel.

Reset is asynchronous and active low. It must be applied as a falling edge, because the divided clocks stand still while reset is held, so the layers on those clocks reset only on that edge. The end-to-end tests count each mechanism and fail if one never happens:
video stalls, output back-pressure, transfers through both inter-domain
FIFOs, DN layer outputs, line-buffer padding steps and the map-enable switch.
