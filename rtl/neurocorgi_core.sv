// neurocorgi_core: the feature extractor accelerator (FEA), a fixed-weight
// MobileNet v1 backbone of 27 convolution layers computed as a stream.
//
// Every layer is its own piece of hardware with its weights hard-wired, and
// pixels flow from layer to layer in image order (channels of a pixel
// together, then along the row, then row by row), so no external memory
// and no data transposition are needed. Layers 1-8 run on clk, layers 9-12
// on clk/2 and layers 13-27 on clk/4: deeper layers see 4x fewer pixels per
// stride-2 layer and are slower clocked to save power. Between the clock
// domains a pixel is cut into 128-bit words that cross a dual-clock FIFO
// (512 words after layer 8, 256 words after layer 12) and are reassembled.
// Each layer is an LB layer (line buffer; regular or depth-wise) or a DN
// layer (accumulation memory; depth-wise), as given by nc_pkg::layer_cfg.
//
// Four feature maps leave the core, each as whole pixels with valid/ready in
// the clock domain of the layer that makes it:
//   map 0: layer 7  (Conv3_1x1), 128 channels, 1/4 of the input size, clk
//   map 1: layer 11 (Conv5_1x1), 256 channels, 1/8,  clk_div2
//   map 2: layer 23 (Conv7_5_1x1), 512 channels, 1/16, clk_div4
//   map 3: layer 27 (Conv9_1x1), 1024 channels, 1/32, clk_div4
// A map whose bit in map_en is clear is not sent (and does not stall the
// network). Input: RGB pixels, 8 bits per colour (red in bits 7:0), on clk.
// cfg_w/cfg_h give the input image size (up to 1280 x 720); they must not
// change during a frame. Layer order, channel counts, bit widths, modes and
// clock domains follow the published design; handshakes, word order and the
// map enables are this design's choices.
module neurocorgi_core #(
  parameter int MAX_W = nc_pkg::MAX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [10:0]   cfg_w,
  input  logic [9:0]    cfg_h,
  input  logic [3:0]    map_en,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [23:0]   in_data,
  output logic          clk_div2,
  output logic          clk_div4,
  output logic          map0_valid,
  input  logic          map0_ready,
  output logic [511:0]  map0_data,
  output logic          map1_valid,
  input  logic          map1_ready,
  output logic [1023:0] map1_data,
  output logic          map2_valid,
  input  logic          map2_ready,
  output logic [2047:0] map2_data,
  output logic          map3_valid,
  input  logic          map3_ready,
  output logic [4095:0] map3_data
);
  localparam int NL = nc_pkg::NUM_LAYERS;
  localparam int DW = 4096;            // widest pixel (1024 x 4 bits)

  clock_divider u_div (.clk, .rst_n, .clk_div2, .clk_div4);

  // link[l]: stream into layer l+1 (link[0] = input pixels)
  logic          link_valid [NL+1];
  logic          link_ready [NL+1];
  logic [DW-1:0] link_data  [NL+1];
  // layer outputs
  logic          lo_valid [NL+1];
  logic          lo_ready [NL+1];
  logic [DW-1:0] lo_data  [NL+1];
  // input size of each layer
  logic [10:0]   wd [NL+2];
  logic [9:0]    hd [NL+2];

  logic          tap_valid [4];
  logic          tap_ready [4];

  assign link_valid[0] = in_valid;
  assign in_ready      = link_ready[0];
  assign link_data[0]  = DW'(in_data);
  assign wd[1] = cfg_w;
  assign hd[1] = cfg_h;
  // unused array ends
  assign lo_valid[0] = 1'b0;
  assign lo_data[0]  = '0;
  assign link_valid[NL] = 1'b0;
  assign link_data[NL]  = '0;

  function automatic int tap_of(int l);
    case (l)
      7:  return 0;
      11: return 1;
      23: return 2;
      27: return 3;
      default: return -1;
    endcase
  endfunction

  for (genvar l = 1; l <= NL; l++) begin : g_l
    localparam nc_pkg::layer_cfg_t CFG = nc_pkg::layer_cfg(l);
    localparam int IPW = CFG.iz * CFG.ibits;
    localparam int OPW = CFG.oz * nc_pkg::ABITS;
    localparam int LMW = (MAX_W * nc_pkg::max_in_w(l) + nc_pkg::MAX_W - 1) / nc_pkg::MAX_W;
    localparam int TAP = tap_of(l);

    assign wd[l+1] = (CFG.s == 2) ? ((wd[l] - 11'd1) >> 1) + 11'd1 : wd[l];
    assign hd[l+1] = (CFG.s == 2) ? ((hd[l] - 10'd1) >> 1) + 10'd1 : hd[l];

    logic [OPW-1:0] odat;
    assign lo_data[l] = DW'(odat);

    // ---------------- the layer ----------------
    // The clock is connected directly (no intermediate net), so that all
    // layers of one domain see the same clock edge.
    if (CFG.dom == 0) begin : g_c0
      nc_layer #(.LAYER(l), .MAX_W(LMW)) u_layer (
        .clk(clk), .rst_n, .cfg_w(wd[l]), .cfg_h(hd[l]),
        .in_valid(link_valid[l-1]), .in_ready(link_ready[l-1]), .in_data(link_data[l-1][IPW-1:0]),
        .out_valid(lo_valid[l]), .out_ready(lo_ready[l]), .out_data(odat));
    end else if (CFG.dom == 1) begin : g_c1
      nc_layer #(.LAYER(l), .MAX_W(LMW)) u_layer (
        .clk(clk_div2), .rst_n, .cfg_w(wd[l]), .cfg_h(hd[l]),
        .in_valid(link_valid[l-1]), .in_ready(link_ready[l-1]), .in_data(link_data[l-1][IPW-1:0]),
        .out_valid(lo_valid[l]), .out_ready(lo_ready[l]), .out_data(odat));
    end else begin : g_c2
      nc_layer #(.LAYER(l), .MAX_W(LMW)) u_layer (
        .clk(clk_div4), .rst_n, .cfg_w(wd[l]), .cfg_h(hd[l]),
        .in_valid(link_valid[l-1]), .in_ready(link_ready[l-1]), .in_data(link_data[l-1][IPW-1:0]),
        .out_valid(lo_valid[l]), .out_ready(lo_ready[l]), .out_data(odat));
    end

    // ---------------- output: fork to a feature map, or cross a domain ----------------
    if (TAP >= 0) begin : g_tap
      logic nxt_ready;
      logic en;
      assign nxt_ready      = (l == NL) ? 1'b1 : link_ready[l];
      assign en             = map_en[TAP];
      assign tap_valid[TAP] = lo_valid[l] && en && nxt_ready;
      assign lo_ready[l]    = nxt_ready && (!en || tap_ready[TAP]);
      if (l < NL) begin : g_fwd
        assign link_valid[l] = lo_valid[l] && (!en || tap_ready[TAP]);
        assign link_data[l]  = lo_data[l];
      end
    end else if (nc_pkg::layer_cfg(l + 1).dom != CFG.dom) begin : g_cdc
      // layer 8 (clk) -> layer 9 (clk/2): 512 words; layer 12 (clk/2) -> layer 13 (clk/4): 256 words
      localparam int DEPTH = (CFG.dom == 0) ? 512 : 256;
      logic sv, sr, fv, fr, sl;
      logic [nc_pkg::FIFO_WORD-1:0] sd, fd;
      logic [OPW-1:0] pd;
      if (CFG.dom == 0) begin : g_d01
        pixel_serializer #(.PIX_W(OPW), .WORD_W(nc_pkg::FIFO_WORD)) u_ser (
          .clk(clk), .rst_n, .in_valid(lo_valid[l]), .in_ready(lo_ready[l]), .in_data(odat),
          .out_valid(sv), .out_ready(sr), .out_data(sd), .out_last(sl));
        async_fifo #(.WIDTH(nc_pkg::FIFO_WORD), .DEPTH(DEPTH)) u_fifo (
          .rst_n, .wclk(clk), .in_valid(sv), .in_ready(sr), .in_data(sd),
          .rclk(clk_div2), .out_valid(fv), .out_ready(fr), .out_data(fd));
        pixel_deserializer #(.PIX_W(OPW), .WORD_W(nc_pkg::FIFO_WORD)) u_des (
          .clk(clk_div2), .rst_n, .in_valid(fv), .in_ready(fr), .in_data(fd),
          .out_valid(link_valid[l]), .out_ready(link_ready[l]), .out_data(pd));
      end else begin : g_d12
        pixel_serializer #(.PIX_W(OPW), .WORD_W(nc_pkg::FIFO_WORD)) u_ser (
          .clk(clk_div2), .rst_n, .in_valid(lo_valid[l]), .in_ready(lo_ready[l]), .in_data(odat),
          .out_valid(sv), .out_ready(sr), .out_data(sd), .out_last(sl));
        async_fifo #(.WIDTH(nc_pkg::FIFO_WORD), .DEPTH(DEPTH)) u_fifo (
          .rst_n, .wclk(clk_div2), .in_valid(sv), .in_ready(sr), .in_data(sd),
          .rclk(clk_div4), .out_valid(fv), .out_ready(fr), .out_data(fd));
        pixel_deserializer #(.PIX_W(OPW), .WORD_W(nc_pkg::FIFO_WORD)) u_des (
          .clk(clk_div4), .rst_n, .in_valid(fv), .in_ready(fr), .in_data(fd),
          .out_valid(link_valid[l]), .out_ready(link_ready[l]), .out_data(pd));
      end
      assign link_data[l] = DW'(pd);
      logic unused;
      assign unused = sl;
    end else begin : g_direct
      assign link_valid[l] = lo_valid[l];
      assign lo_ready[l]   = link_ready[l];
      assign link_data[l]  = lo_data[l];
    end
  end

  assign map0_valid   = tap_valid[0];
  assign tap_ready[0] = map0_ready;
  assign map0_data    = lo_data[7][511:0];
  assign map1_valid   = tap_valid[1];
  assign tap_ready[1] = map1_ready;
  assign map1_data    = lo_data[11][1023:0];
  assign map2_valid   = tap_valid[2];
  assign tap_ready[2] = map2_ready;
  assign map2_data    = lo_data[23][2047:0];
  assign map3_valid   = tap_valid[3];
  assign tap_ready[3] = map3_ready;
  assign map3_data    = lo_data[27];
endmodule
