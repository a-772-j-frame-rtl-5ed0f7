// tb_mcm: random activations through the multi-constant multipliers of
// layer 2 (4 lanes x 9 taps); every product must equal activation x weight.
module tb_mcm;
  int checks = 0, failures = 0;
  logic [10:0] cb;
  logic [3:0]        act  [4][9];
  logic signed [7:0] prod [4][9];

  mcm #(.LAYER(2), .PAR(4), .N(9), .IBITS(4), .WBITS(4)) dut (.ch_base(cb), .act, .prod);

  initial begin
    for (int it = 0; it < 200; it++) begin
      cb = 11'($urandom % 29);
      for (int p = 0; p < 4; p++) for (int n = 0; n < 9; n++) act[p][n] = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++)
        for (int n = 0; n < 9; n++) begin
          int e;
          e = int'(act[p][n]) * nc_pkg::weight(2, int'(cb) + p, n);
          checks++;
          if (int'(prod[p][n]) != e) failures++;
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
