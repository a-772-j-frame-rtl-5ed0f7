// tb_weights_hwlut: checks the hard-wired weight tables of a depth-wise layer
// (4-bit weights) and of layer 1 (8-bit weights) against an independent
// implementation of the table formula: w = low bits of hash({layer, channel,
// tap}), read as a signed number, with hash(x) = the xor-shift-multiply mix
// (x ^= x>>16; x *= 0x7feb352d; x ^= x>>15; x *= 0x846ca68b; x ^= x>>16).
module tb_weights_hwlut;
  int checks = 0, failures = 0;
  logic [10:0] cb1, cb2;
  logic signed [3:0] w1 [32][9];
  logic signed [7:0] w2 [32][27];

  weights_hwlut #(.LAYER(14), .PAR(32), .N(9),  .WBITS(4)) u1 (.ch_base(cb1), .w(w1));
  weights_hwlut #(.LAYER(1),  .PAR(32), .N(27), .WBITS(8)) u2 (.ch_base(cb2), .w(w2));

  function automatic logic [31:0] h(int l, int ch, int n);
    logic [31:0] x;
    x = {l[4:0], ch[10:0], n[15:0]};
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  initial begin
    for (int g = 0; g < 16; g++) begin
      cb1 = 11'(g * 32);
      cb2 = 11'd0;
      #1;
      for (int p = 0; p < 32; p++) begin
        for (int n = 0; n < 9; n++) begin
          logic [31:0] x;
          x = h(14, g*32 + p, n);
          checks++;
          if (w1[p][n] !== $signed(x[3:0])) failures++;
        end
        if (g == 0)
          for (int n = 0; n < 27; n++) begin
            logic [31:0] x;
            x = h(1, p, n);
            checks++;
            if (w2[p][n] !== $signed(x[7:0])) failures++;
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
