// adder_tree: sums the N products of each of PAR lanes in one clock cycle.
//
// Written as a sum over the inputs; synthesis builds the balanced tree of
// adders. The result is wide enough for any input (IW + clog2(N) bits), so no
// saturation happens here: the accumulator block saturates afterwards.
// Purely combinational.
module adder_tree #(
  parameter int PAR = 1,
  parameter int N   = 9,
  parameter int IW  = 8,
  localparam int OW = IW + $clog2(N + 1)
) (
  input  logic signed [IW-1:0] din  [PAR][N],
  output logic signed [OW-1:0] sum  [PAR]
);
  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      sum[p] = '0;
      for (int n = 0; n < N; n++) sum[p] += OW'(din[p][n]);
    end
  end
endmodule
