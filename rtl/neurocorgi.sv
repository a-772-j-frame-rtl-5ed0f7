// neurocorgi: the NeuroCorgi chip, a fixed MobileNet v1 feature extractor
// for RGB video of up to 1280 x 720 pixels, with no external memory.
//
// Video pixels enter on clk through a small input FIFO and stream through the
// feature extractor core. The four feature maps the core produces (1/4, 1/8,
// 1/16 and 1/32 of the input size) are each cut into 128-bit words, cross into
// the clk domain through a dual-clock FIFO, and share one feature output,
// which sends whole pixels from the maps in turn (round robin). Image size and
// the enabled maps are set over SPI.
//
// Pins:
//   clk, rst_n                main clock (59 MHz for HD at 30 frames/s), async reset
//   spi_sclk/cs_n/mosi/miso   configuration (see spi_config)
//   vid_valid/ready/data      RGB input pixel, 8 bits per colour, red in bits 7:0
//   feat_valid/ready/data     128-bit feature word = 32 activations of 4 bits,
//                             activation c of the word in bits [4c+3:4c]
//   feat_map                  which map the word belongs to (0 = 1/4 ... 3 = 1/32)
//   feat_last                 last word of a pixel (4, 8, 16 or 32 words per pixel)
// The structure follows the published chip; FIFO depths at the pins, the
// word format and the SPI register map are this design's choices.
module neurocorgi #(
  parameter int MAX_W    = nc_pkg::MAX_W,
  parameter int IN_DEPTH = 16,
  parameter int OUT_DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         spi_sclk,
  input  logic         spi_cs_n,
  input  logic         spi_mosi,
  output logic         spi_miso,
  input  logic         vid_valid,
  output logic         vid_ready,
  input  logic [23:0]  vid_data,
  output logic         feat_valid,
  input  logic         feat_ready,
  output logic [127:0] feat_data,
  output logic [1:0]   feat_map,
  output logic         feat_last
);
  localparam int WW = nc_pkg::FIFO_WORD;

  logic [10:0] img_w;
  logic [9:0]  img_h;
  logic [3:0]  map_en;

  spi_config u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .img_w, .img_h, .map_en
  );

  logic        fv, fr;
  logic [23:0] fd;
  sync_fifo #(.WIDTH(24), .DEPTH(IN_DEPTH)) u_vin (
    .clk, .rst_n, .in_valid(vid_valid), .in_ready(vid_ready), .in_data(vid_data),
    .out_valid(fv), .out_ready(fr), .out_data(fd)
  );

  logic clk_div2, clk_div4;
  logic          mv [4];
  logic          mr [4];
  logic [511:0]  m0;
  logic [1023:0] m1;
  logic [2047:0] m2;
  logic [4095:0] m3;

  neurocorgi_core #(.MAX_W(MAX_W)) u_core (
    .clk, .rst_n, .cfg_w(img_w), .cfg_h(img_h), .map_en,
    .in_valid(fv), .in_ready(fr), .in_data(fd),
    .clk_div2, .clk_div4,
    .map0_valid(mv[0]), .map0_ready(mr[0]), .map0_data(m0),
    .map1_valid(mv[1]), .map1_ready(mr[1]), .map1_data(m1),
    .map2_valid(mv[2]), .map2_ready(mr[2]), .map2_data(m2),
    .map3_valid(mv[3]), .map3_ready(mr[3]), .map3_data(m3)
  );

  // ---------------- feature output path ----------------
  logic          qv [4];
  logic          qr [4];
  logic [WW-1:0] qd [4];
  logic          ql [4];

  // One serializer and dual-clock FIFO per map, clocked directly by the
  // clock of the layer that makes the map.
  for (genvar k = 0; k < 4; k++) begin : g_out
    localparam int PIXW = 512 << k;
    logic [PIXW-1:0] pix;
    logic            sv, sr, sl;
    logic [WW-1:0]   sd;
    logic [WW:0]     qword;
    if (k == 0)      begin : g_k0 assign pix = m0; end
    else if (k == 1) begin : g_k1 assign pix = m1; end
    else if (k == 2) begin : g_k2 assign pix = m2; end
    else             begin : g_k3 assign pix = m3; end

    if (k == 0) begin : g_w0
      pixel_serializer #(.PIX_W(PIXW), .WORD_W(WW)) u_ser (
        .clk(clk), .rst_n, .in_valid(mv[k]), .in_ready(mr[k]), .in_data(pix),
        .out_valid(sv), .out_ready(sr), .out_data(sd), .out_last(sl));
      async_fifo #(.WIDTH(WW + 1), .DEPTH(OUT_DEPTH)) u_fifo (
        .rst_n, .wclk(clk), .in_valid(sv), .in_ready(sr), .in_data({sl, sd}),
        .rclk(clk), .out_valid(qv[k]), .out_ready(qr[k]), .out_data(qword));
    end else if (k == 1) begin : g_w1
      pixel_serializer #(.PIX_W(PIXW), .WORD_W(WW)) u_ser (
        .clk(clk_div2), .rst_n, .in_valid(mv[k]), .in_ready(mr[k]), .in_data(pix),
        .out_valid(sv), .out_ready(sr), .out_data(sd), .out_last(sl));
      async_fifo #(.WIDTH(WW + 1), .DEPTH(OUT_DEPTH)) u_fifo (
        .rst_n, .wclk(clk_div2), .in_valid(sv), .in_ready(sr), .in_data({sl, sd}),
        .rclk(clk), .out_valid(qv[k]), .out_ready(qr[k]), .out_data(qword));
    end else begin : g_w2
      pixel_serializer #(.PIX_W(PIXW), .WORD_W(WW)) u_ser (
        .clk(clk_div4), .rst_n, .in_valid(mv[k]), .in_ready(mr[k]), .in_data(pix),
        .out_valid(sv), .out_ready(sr), .out_data(sd), .out_last(sl));
      async_fifo #(.WIDTH(WW + 1), .DEPTH(OUT_DEPTH)) u_fifo (
        .rst_n, .wclk(clk_div4), .in_valid(sv), .in_ready(sr), .in_data({sl, sd}),
        .rclk(clk), .out_valid(qv[k]), .out_ready(qr[k]), .out_data(qword));
    end
    assign qd[k] = qword[WW-1:0];
    assign ql[k] = qword[WW];
  end

  output_mux #(.N(4), .W(WW)) u_mux (
    .clk, .rst_n, .in_valid(qv), .in_ready(qr), .in_data(qd), .in_last(ql),
    .out_valid(feat_valid), .out_ready(feat_ready), .out_data(feat_data),
    .out_src(feat_map), .out_last(feat_last)
  );
endmodule
