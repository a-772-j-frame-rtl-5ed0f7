// tb_neurocorgi: end-to-end test of the whole chip, with every parameter of
// the top at its default (line buffers sized for 1280-pixel lines).
//
// The image size is set through the SPI port (the chip identifier is read
// back first), then two small frames are streamed through the video input.
// The four feature maps leave the chip as 128-bit words on one shared output;
// the test collects the words of each map, rebuilds each pixel from its
// 4/8/16/32 words and compares every activation with the reference model.
// Between the frames the map-enable register is rewritten over SPI so that
// only maps 1 and 3 are produced for frame 2. The output is randomly not
// ready, so back-pressure reaches back through the output FIFOs, the core
// and the video FIFO. The test counts, and requires at least once: video
// stalls, output back-pressure, transfers through both inter-domain FIFOs,
// DN-layer outputs, line-buffer padding steps and the map-enable switch.
// Frames of W0 x H0 pixels are used so that the run stays short; the design
// itself is not shrunk.
module tb_neurocorgi;
  import nc_pkg::*;
  localparam int W0 = 32, H0 = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;    // a real falling edge, so the asynchronous resets act in the divided-clock domains too
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic         vv, vr;
  logic [23:0]  vd;
  logic         fv, fr;
  logic [127:0] fd;
  logic [1:0]   fm;
  logic         fl;

  neurocorgi dut (
    .clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .vid_valid(vv), .vid_ready(vr), .vid_data(vd),
    .feat_valid(fv), .feat_ready(fr), .feat_data(fd), .feat_map(fm), .feat_last(fl));

  task automatic xfer(input logic rd, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    logic [23:0] f;
    f = {rd, a, d};
    cs_n = 0; #40;
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i]; #40;
      sclk = 1;
      if (i < 16) q[i] = miso;
      #40;
      sclk = 0;
    end
    #40 cs_n = 1; #80;
  endtask

  localparam int LAYER_OF [4] = '{7, 11, 23, 27};
  int img [2][];
  int expm [2][4][];
  int npix [4];
  int got [4] = '{0, 0, 0, 0};
  int wordc [4] = '{0, 0, 0, 0};
  logic [4095:0] pix [4];
  int ip = 0, in_stalls = 0, out_stalls = 0, frame = 0, silent_viol = 0;
  logic go = 0;
  logic [3:0] en_now = 4'hF;

  initial begin
    for (int f = 0; f < 2; f++) begin
      int cur[];
      int w, h;
      nc_ref_pkg::make_image(W0, H0, 3, 8, 300 + f, img[f]);
      cur = img[f]; w = W0; h = H0;
      for (int k = 0; k < 4; k++) begin
        int nxt[];
        nc_ref_pkg::ref_chain((k == 0) ? 1 : LAYER_OF[k-1] + 1, LAYER_OF[k], w, h, cur, nxt, w, h);
        expm[f][k] = nxt; npix[k] = w * h; cur = nxt;
      end
    end
  end

  // video source
  always @(posedge clk) begin
    if (!rst_n) vv <= 1'b0;
    else begin
      if (vv && !vr) in_stalls++;
      if (vv && vr) ip++;
      if (!vv || vr) begin
        if (go && ip < 2 * W0 * H0 && (ip < W0 * H0 || frame == 1) && $urandom % 8 != 0) begin
          int f, p;
          f = ip / (W0 * H0); p = ip % (W0 * H0);
          vv <= 1'b1;
          vd <= {8'(img[f][p*3 + 2]), 8'(img[f][p*3 + 1]), 8'(img[f][p*3])};
        end else vv <= 1'b0;
      end
    end
  end

  // feature output sink: rebuild pixels from words, check them
  always @(posedge clk) begin
    if (!rst_n) fr <= 1'b0;
    else begin
      if (fv && !fr) out_stalls++;
      if (fv && fr) begin
        int k, nw;
        k = int'(fm); nw = 4 << k;
        if (!en_now[k]) silent_viol++;
        pix[k][wordc[k]*128 +: 128] = fd;
        wordc[k]++;
        checks++;
        if (fl != (wordc[k] == nw)) begin
          failures++; $display("map %0d: last flag wrong at word %0d", k, wordc[k]);
        end
        if (wordc[k] == nw) begin
          int f, p, c0;
          wordc[k] = 0;
          f = (got[k] >= npix[k]) ? 1 : 0;
          p = got[k] % npix[k];
          c0 = 128 << k;
          for (int c = 0; c < c0; c++) begin
            checks++;
            if (int'(pix[k][c*4 +: 4]) != expm[f][k][p*c0 + c]) begin
              failures++;
              if (failures < 6) $display("map %0d frame %0d pixel %0d ch %0d: got %0d expected %0d",
                                         k, f, p, c, pix[k][c*4 +: 4], expm[f][k][p*c0 + c]);
            end
          end
          got[k]++;
        end
      end
      fr <= ($urandom % 4 != 0);
    end
  end

  int cdc8 = 0, cdc12 = 0, dn_outs = 0, pad_steps = 0;
  always @(posedge dut.clk_div2) if (rst_n && dut.u_core.g_l[8].g_cdc.fv && dut.u_core.g_l[8].g_cdc.fr) cdc8++;
  always @(posedge dut.clk_div4) if (rst_n && dut.u_core.g_l[12].g_cdc.fv && dut.u_core.g_l[12].g_cdc.fr) cdc12++;
  always @(posedge dut.clk_div4) if (rst_n && dut.u_core.lo_valid[14] && dut.u_core.lo_ready[14]) dn_outs++;
  always @(posedge clk) if (rst_n && dut.u_core.g_l[2].g_c0.u_layer.g_lb.u_layer.g_lb.u_lb.step
                            && !dut.u_core.g_l[2].g_c0.u_layer.g_lb.u_layer.g_lb.u_lb.real_pos) pad_steps++;

  task automatic expect_eq(int g, int e, string what);
    checks++;
    if (g != e) begin failures++; $display("%s: %0d, expected %0d", what, g, e); end
  endtask

  initial begin
    logic [15:0] q;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    xfer(1, 7'd3, 16'h0, q);        expect_eq(q, 16'h4E43, "chip id");
    xfer(0, 7'd0, 16'(W0), q);
    xfer(0, 7'd1, 16'(H0), q);
    xfer(1, 7'd0, 16'h0, q);        expect_eq(q, W0, "width read back");
    @(posedge clk) go = 1;
    wait (got[0] == npix[0] && got[1] == npix[1] && got[2] == npix[2] && got[3] == npix[3]);
    $display("frame 1 done at %0t", $time);
    xfer(0, 7'd2, 16'h000A, q);     // maps 1 and 3 only
    en_now = 4'b1010;
    @(posedge clk) frame = 1;
    wait (got[1] == 2 * npix[1] && got[3] == 2 * npix[3]);
    repeat (200) @(posedge clk);
    expect_eq(silent_viol, 0, "words from disabled maps");
    expect_eq(got[0] + got[2], npix[0] + npix[2], "pixels of disabled maps");
    $display("mechanisms: video stalls %0d, output stalls %0d, FIFO 8->9 %0d, FIFO 12->13 %0d, DN outputs %0d, padding steps %0d, map switches 1",
             in_stalls, out_stalls, cdc8, cdc12, dn_outs, pad_steps);
    checks += 5;
    if (in_stalls == 0) failures++;
    if (out_stalls == 0) failures++;
    if (cdc8 == 0 || cdc12 == 0) failures++;
    if (dn_outs == 0) failures++;
    if (pad_steps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      repeat (10000) @(posedge clk);
      $display("progress %0t: in %0d maps %0d %0d %0d %0d", $time, ip, got[0], got[1], got[2], got[3]);
    end
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("watchdog expired: got %0d %0d %0d %0d", got[0], got[1], got[2], got[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
