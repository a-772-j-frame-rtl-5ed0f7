// tb_acc_bias: the accumulation and bias block of layer 3 (10-bit
// accumulators) with random partial sums, many beyond the accumulator range,
// and random choice between bias and stored accumulation. Expected value:
// clamp(clamp(psum) + (first ? bias : prev)) to [-512, 511].
module tb_acc_bias;
  int checks = 0, failures = 0;
  logic [10:0] cb;
  logic signed [15:0] psum [4];
  logic               first [4];
  logic signed [9:0]  prev [4];
  logic signed [9:0]  acc [4];

  acc_bias #(.LAYER(3), .PAR(4), .SW(16), .ACCBITS(10)) dut (.ch_base(cb), .psum, .first, .prev, .acc);

  function automatic int clamp(int v);
    return (v > 511) ? 511 : (v < -512) ? -512 : v;
  endfunction

  initial begin
    for (int it = 0; it < 500; it++) begin
      cb = 11'($urandom % 60);
      for (int p = 0; p < 4; p++) begin
        psum[p]  = ($urandom % 2) ? 16'($signed(10'($urandom))) : 16'($urandom % 4000) - 16'sd2000;
        first[p] = 1'($urandom);
        prev[p]  = 10'($urandom);
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        int e;
        e = clamp(clamp(int'(psum[p])) + (first[p] ? nc_pkg::bias(3, int'(cb) + p) : int'(prev[p])));
        checks++;
        if (int'(acc[p]) != e) failures++;
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
