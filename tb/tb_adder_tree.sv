// tb_adder_tree: random signed inputs, including all-extreme vectors, summed
// by the adder tree (3 lanes x 9 inputs of 8 bits); compares with a plain sum.
module tb_adder_tree;
  int checks = 0, failures = 0;
  logic signed [7:0]  din [3][9];
  logic signed [11:0] sum [3];

  adder_tree #(.PAR(3), .N(9), .IW(8)) dut (.din, .sum);

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int p = 0; p < 3; p++)
        for (int n = 0; n < 9; n++)
          din[p][n] = (it == 0) ? -8'sd128 : (it == 1) ? 8'sd127 : 8'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        int e;
        e = 0;
        for (int n = 0; n < 9; n++) e += int'(din[p][n]);
        checks++;
        if (int'(sum[p]) != e) failures++;
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
