// tb_neurocorgi_core: end-to-end test of the 27-layer core on small images.
//
// Frame 1 (W0 x H0, all four maps enabled) and frame 2 (another image, maps
// 0 and 2 disabled) are streamed in; every activation of every enabled map is
// compared with the reference model, and disabled maps must stay silent.
// Map outputs are randomly not ready, so back-pressure runs through the
// whole pipeline and the clock-domain FIFOs. The test counts, and requires at
// least once: input stalls, map back-pressure, transfers through each
// inter-domain FIFO, DN row draining, line-buffer padding steps and a
// map-enable switch.
module tb_neurocorgi_core #(
  parameter int W0 = 32,
  parameter int H0 = 32
);
  import nc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;    // a real falling edge, so the asynchronous resets act in the divided-clock domains too
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]   map_en;
  logic         iv, ir;
  logic [23:0]  id;
  logic         d2, d4;
  logic         mv [4];
  logic         mr [4];
  logic [511:0] m0; logic [1023:0] m1; logic [2047:0] m2; logic [4095:0] m3;

  neurocorgi_core dut (
    .clk, .rst_n, .cfg_w(11'(W0)), .cfg_h(10'(H0)), .map_en,
    .in_valid(iv), .in_ready(ir), .in_data(id), .clk_div2(d2), .clk_div4(d4),
    .map0_valid(mv[0]), .map0_ready(mr[0]), .map0_data(m0),
    .map1_valid(mv[1]), .map1_ready(mr[1]), .map1_data(m1),
    .map2_valid(mv[2]), .map2_ready(mr[2]), .map2_data(m2),
    .map3_valid(mv[3]), .map3_ready(mr[3]), .map3_data(m3));

  localparam int LAYER_OF [4] = '{7, 11, 23, 27};
  int img [2][];
  int expm [2][4][];
  int mw [4], mh [4];
  int npix [4];
  int got [4] = '{0, 0, 0, 0};
  int frame_of_map [4] = '{0, 0, 0, 0};
  int silent_viol = 0;
  int ip = 0, in_stalls = 0, map_stalls = 0;
  int frame = 0;

  initial begin
    for (int f = 0; f < 2; f++) begin
      int cur[];
      int w, h;
      nc_ref_pkg::make_image(W0, H0, 3, 8, 100 + f, img[f]);
      cur = img[f]; w = W0; h = H0;
      for (int k = 0; k < 4; k++) begin
        int nxt[];
        nc_ref_pkg::ref_chain((k == 0) ? 1 : LAYER_OF[k-1] + 1, LAYER_OF[k], w, h, cur, nxt, w, h);
        expm[f][k] = nxt; mw[k] = w; mh[k] = h; cur = nxt;
      end
    end
    for (int k = 0; k < 4; k++) npix[k] = mw[k] * mh[k];
    $display("reference ready: maps %0dx%0d %0dx%0d %0dx%0d %0dx%0d", mw[0], mh[0], mw[1], mh[1], mw[2], mh[2], mw[3], mh[3]);
  end

  function automatic logic [4095:0] mdata(int k);
    case (k)
      0: return 4096'(m0);
      1: return 4096'(m1);
      2: return 4096'(m2);
      default: return m3;
    endcase
  endfunction

  // input driver (clk domain)
  always @(posedge clk) begin
    if (!rst_n) iv <= 1'b0;
    else begin
      if (iv && !ir) in_stalls++;
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 2 * W0 * H0 && (ip < W0 * H0 || frame == 1) && $urandom % 8 != 0) begin
          int f, p;
          f = ip / (W0 * H0); p = ip % (W0 * H0);
          iv <= 1'b1;
          id <= {8'(img[f][p*3 + 2]), 8'(img[f][p*3 + 1]), 8'(img[f][p*3])};
        end else iv <= 1'b0;
      end
    end
  end

  // map monitors, each in its own clock domain
  task automatic monitor(int k);
    if (mv[k] && !mr[k]) map_stalls++;
    if (mv[k] && mr[k]) begin
      logic [4095:0] d;
      int f, p, c0;
      d = mdata(k);
      if (!map_en[k]) silent_viol++;
      f = (got[k] >= npix[k]) ? 1 : 0;
      p = got[k] % npix[k];
      c0 = 128 << k;
      for (int c = 0; c < c0; c++) begin
        checks++;
        if (int'(d[c*4 +: 4]) != expm[f][k][p*c0 + c]) begin
          failures++;
          if (failures < 6) $display("map %0d frame %0d pixel %0d ch %0d: got %0d expected %0d",
                                     k, f, p, c, d[c*4 +: 4], expm[f][k][p*c0 + c]);
        end
      end
      got[k]++;
    end
  endtask

  // map monitors, each on the clock of its map
  always @(posedge clk)
    if (!rst_n) mr[0] <= 1'b0; else begin monitor(0); mr[0] <= ($urandom % 4 != 0); end
  always @(posedge d2)
    if (!rst_n) mr[1] <= 1'b0; else begin monitor(1); mr[1] <= ($urandom % 4 != 0); end
  always @(posedge d4)
    if (!rst_n) begin mr[2] <= 1'b0; mr[3] <= 1'b0; end
    else begin
      monitor(2); monitor(3);
      mr[2] <= ($urandom % 4 != 0); mr[3] <= ($urandom % 4 != 0);
    end

  // mechanism counters
  int cdc8 = 0, cdc12 = 0, dn_rows = 0, pad_steps = 0;
  always @(posedge d2) if (rst_n && dut.g_l[8].g_cdc.fv && dut.g_l[8].g_cdc.fr) cdc8++;
  always @(posedge d4) if (rst_n && dut.g_l[12].g_cdc.fv && dut.g_l[12].g_cdc.fr) cdc12++;
  always @(posedge d4) if (rst_n && dut.lo_valid[14] && dut.lo_ready[14]) dn_rows++;
  always @(posedge clk) if (rst_n && dut.g_l[2].g_c0.u_layer.g_lb.u_layer.g_lb.u_lb.step && !dut.g_l[2].g_c0.u_layer.g_lb.u_layer.g_lb.u_lb.real_pos) pad_steps++;

  initial begin
    int t0;
    map_en = 4'hF;
    repeat (4) @(posedge clk);
    $display("reset released");
    rst_n = 1;
    wait (got[0] == npix[0] && got[1] == npix[1] && got[2] == npix[2] && got[3] == npix[3]);
    $display("frame 1 done at %0t", $time);
    map_en = 4'b1010;       // maps 1 and 3 only
    frame  = 1;
    wait (got[1] == 2 * npix[1] && got[3] == 2 * npix[3]);
    repeat (50) @(posedge clk);
    checks++; if (silent_viol != 0) begin failures++; $display("disabled map sent data"); end
    checks++; if (got[0] != npix[0] || got[2] != npix[2]) begin failures++; $display("disabled map counted"); end
    $display("mechanisms: input stalls %0d, map stalls %0d, FIFO 8->9 %0d, FIFO 12->13 %0d, DN outputs %0d, padding steps %0d, map switches 1",
             in_stalls, map_stalls, cdc8, cdc12, dn_rows, pad_steps);
    checks += 5;
    if (in_stalls == 0) failures++;
    if (map_stalls == 0) failures++;
    if (cdc8 == 0 || cdc12 == 0) failures++;
    if (dn_rows == 0) failures++;
    if (pad_steps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      repeat (5000) @(posedge clk);
      $display("progress %0t: in %0d maps %0d %0d %0d %0d", $time, ip, got[0], got[1], got[2], got[3]);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired: got %0d %0d %0d %0d", got[0], got[1], got[2], got[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
