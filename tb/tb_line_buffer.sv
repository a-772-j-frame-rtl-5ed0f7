// tb_line_buffer: two line buffers (3x3, stride 1 on a 7x5 image and stride 2
// on a 7x5 image, two 4-bit channels) fed two frames each with random gaps
// and random window back-pressure. Every window must equal the 3x3
// neighbourhood of the zero-padded image, in output raster order; the number
// of windows per frame must be W*H (stride 1) and 4*3 (stride 2).
module tb_line_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 7, H = 5;
  logic done [2];

  for (genvar s = 1; s <= 2; s++) begin : g_s
    localparam int WO = (s == 2) ? (W - 1) / 2 + 1 : W;
    localparam int HO = (s == 2) ? (H - 1) / 2 + 1 : H;
    logic iv, ir, wv, wr;
    logic [7:0]  id;
    logic [71:0] wd;
    line_buffer #(.C(2), .BITS(4), .K(3), .S(s), .MAX_W(W)) dut (
      .clk, .rst_n, .cfg_w(11'(W)), .cfg_h(10'(H)), .in_valid(iv), .in_ready(ir), .in_data(id),
      .win_valid(wv), .win_ready(wr), .win_data(wd));

    function automatic logic [7:0] pix(int f, int x, int y);
      if (x < 0 || y < 0 || x >= W || y >= H) return 8'h00;
      return 8'(nc_pkg::mix32(32'(f * 1000 + y * W + x + s * 77)));
    endfunction

    int ip = 0, op = 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        iv <= 1'b0; wr <= 1'b0; done[s-1] <= 1'b0;
      end else begin
        if (iv && ir) ip++;
        if (!iv || ir) begin
          if (ip < 2 * W * H && $urandom % 3 != 0) begin
            iv <= 1'b1;
            id <= pix(ip / (W * H), (ip % (W * H)) % W, (ip % (W * H)) / W);
          end else iv <= 1'b0;
        end
        if (wv && wr) begin
          int f, ox, oy;
          f  = op / (WO * HO);
          ox = (op % (WO * HO)) % WO;
          oy = (op % (WO * HO)) / WO;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              checks++;
              if (wd[(ky*3 + kx)*8 +: 8] !== pix(f, ox*s + kx - 1, oy*s + ky - 1)) begin
                failures++;
                if (failures < 4) $display("s%0d win %0d tap %0d,%0d wrong", s, op, ky, kx);
              end
            end
          op++;
          if (op == 2 * WO * HO) done[s-1] <= 1'b1;
        end
        wr <= ($urandom % 4 != 0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
