// tb_clip_scale: the clip and scale block of layer 3 over every 10-bit
// accumulation value and several channels. Expected value:
// min(15, floor((clamp(acc, 0, clip) * scale + 2^(sh-1)) / 2^sh)).
module tb_clip_scale;
  int checks = 0, failures = 0;
  logic [10:0] cb;
  logic signed [9:0] acc [2];
  logic [3:0]        act [2];

  clip_scale #(.LAYER(3), .PAR(2), .ACCBITS(10), .OBITS(4)) dut (.ch_base(cb), .acc, .act);

  initial begin
    int sh;
    sh = nc_pkg::scale_shift(3);
    for (int c = 0; c < 8; c++) begin
      cb = 11'(c * 2);
      for (int v = -512; v < 512; v++) begin
        acc[0] = 10'(v);
        acc[1] = 10'(-v - 1);
        #1;
        for (int p = 0; p < 2; p++) begin
          int y, e, ch;
          ch = c * 2 + p;
          y = int'(acc[p]);
          if (y > nc_pkg::clip_level(3, ch)) y = nc_pkg::clip_level(3, ch);
          if (y < 0) y = 0;
          e = (y * nc_pkg::scale_factor(3, ch) + (1 << (sh - 1))) / (1 << sh);
          if (e > 15) e = 15;
          checks++;
          if (int'(act[p]) != e) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
