// weights_hwlut: hard-wired weight table of one layer.
//
// For the channel group starting at ch_base it returns the weights of PAR
// channels (output channels of a regular convolution, or the channels of a
// depth-wise layer) over N taps each. The table is pure combinational logic:
// the weights are constants, so synthesis reduces it to a small decoder of
// ch_base, and when ch_base is itself constant the table disappears into the
// multipliers. The values come from nc_pkg::weight(), which stands in for the
// trained, quantised weights (8 bits in layer 1, 4 bits elsewhere).
module weights_hwlut #(
  parameter int LAYER = 2,
  parameter int PAR   = nc_pkg::layer_cfg(LAYER).par,
  parameter int N     = 9,
  parameter int WBITS = nc_pkg::layer_cfg(LAYER).wbits
) (
  input  logic        [10:0]      ch_base,
  output logic signed [WBITS-1:0] w [PAR][N]
);
  localparam bit PRUNED = nc_pkg::is_pruned(LAYER);

  always_comb begin
    for (int p = 0; p < PAR; p++)
      for (int n = 0; n < N; n++)
        w[p][n] = WBITS'(nc_pkg::weight_of(LAYER, int'(ch_base) + p, n, WBITS, PRUNED));
  end
endmodule
