// nc_pkg: types, layer table and hard-wired parameter tables of the NeuroCorgi
// feature extractor (MobileNet v1, alpha = 1, 27 convolution layers).
//
// The layer table (channels, kernel, stride, weight/activation/accumulator bits,
// computational mode and clock domain) follows the published topology table.
// The number of lanes each layer computes per clock (PAR) is this design's own
// choice, sized so that every layer keeps up with HD video at 30 frames/s at
// 59 MHz, and so that the whole network holds about 42k multipliers.
//
// The trained network parameters are not published. The "HW-LUT" functions
// below stand in for them: each weight, bias, clip level and scale factor is a
// fixed function (an integer hash) of its layer and index, so synthesis folds
// them into constant logic exactly as a table of trained values would be folded.
// Replacing these functions with real tables changes nothing else in the RTL.
package nc_pkg;

  localparam int unsigned NUM_LAYERS = 27;
  localparam int unsigned ABITS      = 4;    // activation bits between layers
  localparam int unsigned IN_BITS    = 8;    // bits per colour of the input image
  localparam int unsigned IN_CH      = 3;    // RGB
  localparam int unsigned MAX_W      = 1280; // largest input image
  localparam int unsigned MAX_H      = 720;
  localparam int unsigned XW         = 11;   // width of a column coordinate
  localparam int unsigned YW         = 10;   // width of a row coordinate
  localparam int unsigned SCALE_BITS = 8;    // unsigned per-channel scale factor
  localparam int unsigned FIFO_WORD  = 128;  // word of the inter-domain FIFOs

  typedef enum logic [1:0] {
    LB_CONV    = 2'd0,  // line buffer, regular convolution (incl. 1x1)
    LB_CONV_DW = 2'd1,  // line buffer, depth-wise convolution
    DN_CONV_DW = 2'd2   // accumulation storage (DN), depth-wise convolution
  } mode_e;

  typedef struct packed {
    int    iz;      // input channels
    int    oz;      // output channels
    int    k;       // kernel size (Kx = Ky)
    int    s;       // stride
    mode_e mode;
    int    wbits;   // weight bits
    int    ibits;   // input activation bits
    int    accbits; // accumulator bits
    int    par;     // lanes computed per clock (output channels or DW channels)
    int    dom;     // clock domain: 0 = clk, 1 = clk/2, 2 = clk/4
  } layer_cfg_t;

  // Layer l = 1..27.
  function automatic layer_cfg_t layer_cfg(int l);
    layer_cfg_t c;
    c.k = 1; c.s = 1; c.mode = LB_CONV; c.wbits = 4; c.ibits = ABITS; c.accbits = 10;
    c.par = 8; c.dom = 2;
    case (l)
      1:  begin c.iz = 3;   c.oz = 32;  c.k = 3; c.s = 2; c.wbits = 8; c.ibits = IN_BITS;
                c.accbits = 20; c.par = 32; c.dom = 0; end
      2:  begin c.iz = 32;  c.oz = 32;  c.k = 3; c.mode = LB_CONV_DW; c.accbits = 12; c.par = 32; c.dom = 0; end
      3:  begin c.iz = 32;  c.oz = 64;  c.accbits = 10; c.par = 16; c.dom = 0; end
      4:  begin c.iz = 64;  c.oz = 64;  c.k = 3; c.s = 2; c.mode = LB_CONV_DW; c.accbits = 11; c.par = 64; c.dom = 0; end
      5:  begin c.iz = 64;  c.oz = 128; c.accbits = 12; c.dom = 0; end
      6:  begin c.iz = 128; c.oz = 128; c.k = 3; c.mode = LB_CONV_DW; c.accbits = 10; c.par = 32; c.dom = 0; end
      7:  begin c.iz = 128; c.oz = 128; c.accbits = 11; c.dom = 0; end
      8:  begin c.iz = 128; c.oz = 128; c.k = 3; c.s = 2; c.mode = LB_CONV_DW; c.accbits = 11; c.par = 32; c.dom = 0; end
      9:  begin c.iz = 128; c.oz = 256; c.accbits = 11; c.dom = 1; end
      10: begin c.iz = 256; c.oz = 256; c.k = 3; c.mode = LB_CONV_DW; c.accbits = 10; c.par = 32; c.dom = 1; end
      11: begin c.iz = 256; c.oz = 256; c.accbits = 10; c.dom = 1; end
      12: begin c.iz = 256; c.oz = 256; c.k = 3; c.s = 2; c.mode = DN_CONV_DW; c.accbits = 10; c.par = 32; c.dom = 1; end
      13: begin c.iz = 256; c.oz = 512; c.accbits = 11; end
      14, 16, 18, 20, 22:
          begin c.iz = 512; c.oz = 512; c.k = 3; c.mode = DN_CONV_DW; c.accbits = 10; c.par = 32; end
      15, 17, 19, 21, 23:
          begin c.iz = 512; c.oz = 512; c.accbits = 10; end
      24: begin c.iz = 512; c.oz = 512; c.k = 3; c.s = 2; c.mode = DN_CONV_DW; c.accbits = 10; c.par = 32; end
      25: begin c.iz = 512; c.oz = 1024; c.accbits = 11; end
      26: begin c.iz = 1024; c.oz = 1024; c.k = 3; c.mode = DN_CONV_DW; c.accbits = 11; c.par = 32; end
      default: begin c.iz = 1024; c.oz = 1024; c.accbits = 10; end  // 27: Conv9_1x1
    endcase
    return c;
  endfunction

  // Output size of a layer for a given input size (padding 1 for 3x3 kernels).
  function automatic int out_dim(int in_dim, int s);
    return (s == 2) ? (in_dim - 1) / 2 + 1 : in_dim;
  endfunction

  // Largest input width of layer l (for sizing its line or accumulation memory).
  function automatic int max_in_w(int l);
    int w = MAX_W;
    for (int i = 1; i < l; i++) w = out_dim(w, layer_cfg(i).s);
    return w;
  endfunction

  function automatic int max_in_h(int l);
    int h = MAX_H;
    for (int i = 1; i < l; i++) h = out_dim(h, layer_cfg(i).s);
    return h;
  endfunction

  // Integer mixing function used to fill the hard-wired tables.
  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Weight of layer l, channel ch (output channel, or the channel of a DW layer)
  // and tap n (n = (ky*K + kx)*IZ + ic for a regular convolution, ky*K + kx for DW),
  // for a layer with wbits-bit weights. With 'pruned' set (layers whose fan-in
  // exceeds 128) only about one weight in eight is non-zero.
  function automatic int weight_of(int l, int ch, int n, int wbits, bit pruned);
    logic [31:0] h;
    h = mix32({l[4:0], ch[10:0], n[15:0]});
    if (pruned && h[31:29] != 3'd0) return 0;
    return (wbits == 8) ? int'($signed(h[7:0])) : int'($signed(h[3:0]));
  endfunction

  function automatic bit is_pruned(int l);
    layer_cfg_t c = layer_cfg(l);
    return ((c.mode == LB_CONV) ? c.k * c.k * c.iz : c.k * c.k) > 128;
  endfunction

  function automatic int weight(int l, int ch, int n);
    return weight_of(l, ch, n, layer_cfg(l).wbits, is_pruned(l));
  endfunction

  // Bias in [-2^(acc-4), 2^(acc-4)) for a layer with acc-bit accumulators.
  function automatic int bias_of(int l, int ch, int acc);
    logic [31:0] h;
    h = mix32({5'd31 - l[4:0], 5'h15, ch[10:0], 11'h5a5});
    return int'({16'd0, h[15:0]} % 32'(2 << (acc - 4))) - (1 << (acc - 4));
  endfunction

  function automatic int bias(int l, int ch);
    return bias_of(l, ch, layer_cfg(l).accbits);
  endfunction

  // Upper clipping level of the ReLU, in [2^(acc-3), 2^(acc-2)).
  function automatic int clip_of(int l, int ch, int acc);
    logic [31:0] h;
    h = mix32({l[4:0], 5'h0a, ch[10:0], 11'h333});
    return (1 << (acc - 3)) + int'({12'd0, h[19:0]} % 32'(1 << (acc - 3)));
  endfunction

  function automatic int clip_level(int l, int ch);
    return clip_of(l, ch, layer_cfg(l).accbits);
  endfunction

  // Scale factor in [128, 256), applied as (x * scale + 0.5) >> scale_shift(l).
  function automatic int scale_factor(int l, int ch);
    logic [31:0] h = mix32({l[4:0], 5'h11, ch[10:0], 11'h0f0});
    return 128 + int'(h[6:0]);
  endfunction

  function automatic int scale_shift(int l);
    return layer_cfg(l).accbits + 2;
  endfunction

  // Saturate a signed value to 'bits' bits.
  function automatic int sat_s(longint v, int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -(longint'(1) <<< (bits - 1));
    if (v > hi) return int'(hi);
    if (v < lo) return int'(lo);
    return int'(v);
  endfunction

  // Saturate a non-negative value to 'bits' unsigned bits.
  function automatic int sat_u(longint v, int bits);
    longint hi = (longint'(1) <<< bits) - 1;
    if (v > hi) return int'(hi);
    if (v < 0)  return 0;
    return int'(v);
  endfunction

endpackage
