// layer_harness: drives one convolution layer (LB or DN, chosen by the
// layer table) with a generated image, checks every output activation
// against the reference model and measures the cycles from the first input
// to the last output. With STALL set, the input has random gaps and the
// output is randomly not ready; the harness also counts how often the layer
// was stalled by the output (out_valid && !out_ready).
module layer_harness #(
  parameter int LAYER = 2,
  parameter int W     = 8,
  parameter int H     = 6,
  parameter int SEED  = 1,
  parameter bit STALL = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   stalls
);
  import nc_pkg::*;
  localparam layer_cfg_t CFG = layer_cfg(LAYER);
  localparam int IB  = CFG.ibits;
  localparam int IPW = CFG.iz * IB;
  localparam int OPW = CFG.oz * 4;

  int img[], exp_img[];
  int WO, HO;

  logic           iv, ir, ov, ordy;
  logic [IPW-1:0] id;
  logic [OPW-1:0] od;

  if (CFG.mode == DN_CONV_DW) begin : g_dn
    dn_conv_dw #(.LAYER(LAYER), .MAX_W(W)) dut (
      .clk, .rst_n, .cfg_w(11'(W)), .cfg_h(10'(H)),
      .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od));
  end else begin : g_lb
    lb_layer #(.LAYER(LAYER), .MAX_W(W)) dut (
      .clk, .rst_n, .cfg_w(11'(W)), .cfg_h(10'(H)),
      .in_valid(iv), .in_ready(ir), .in_data(id),
      .out_valid(ov), .out_ready(ordy), .out_data(od));
  end

  initial begin
    nc_ref_pkg::make_image(W, H, CFG.iz, IB, SEED, img);
    nc_ref_pkg::ref_layer(LAYER, W, H, img, exp_img, WO, HO);
  end

  function automatic logic [IPW-1:0] pack(int p);
    logic [IPW-1:0] v;
    for (int c = 0; c < CFG.iz; c++) v[c*IB +: IB] = IB'(img[p*CFG.iz + c]);
    return v;
  endfunction

  int  ip, op, t0;
  bit  started;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip = 0; iv <= 1'b0; id <= '0; started = 0;
    end else begin
      if (iv && ir) begin
        if (!started) begin started = 1; t0 = cycles; end
        ip++;
      end
      if (!iv || ir) begin
        if (ip < W * H && (!STALL || $urandom % 4 != 0)) begin
          iv <= 1'b1; id <= pack(ip);
        end else iv <= 1'b0;
      end
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op = 0; checks = 0; failures = 0; cycles = 0; stalls = 0; ordy <= 1'b0; done <= 1'b0;
    end else begin
      if (!done) cycles++;
      if (ov && !ordy) stalls++;
      if (ov && ordy) begin
        for (int c = 0; c < CFG.oz; c++) begin
          int e;
          e = exp_img[op*CFG.oz + c];
          checks++;
          if (int'(od[c*4 +: 4]) != e) begin
            failures++;
            if (failures < 5)
              $display("layer %0d pixel %0d ch %0d: got %0d expected %0d", LAYER, op, c, od[c*4 +: 4], e);
          end
        end
        op++;
        if (op == WO * HO) begin done <= 1'b1; cycles = cycles - t0; end
      end
      ordy <= !STALL || ($urandom % 3 != 0);
    end
  end
endmodule
