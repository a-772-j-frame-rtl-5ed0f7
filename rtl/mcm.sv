// mcm: multi-constant multipliers of one layer.
//
// Each of the PAR lanes multiplies N unsigned activations by N signed weights
// read from the layer's hard-wired weight table for channel ch_base + lane.
// Because the weights are constants, each product is a multiplication by a
// constant, which synthesis merges with the table (a multi-constant multiplier).
// Purely combinational; a product is IBITS + WBITS bits wide, signed.
module mcm #(
  parameter int LAYER = 2,
  parameter int PAR   = nc_pkg::layer_cfg(LAYER).par,
  parameter int N     = 9,
  parameter int IBITS = nc_pkg::layer_cfg(LAYER).ibits,
  parameter int WBITS = nc_pkg::layer_cfg(LAYER).wbits,
  localparam int PW   = IBITS + WBITS
) (
  input  logic        [10:0]      ch_base,
  input  logic        [IBITS-1:0] act  [PAR][N],
  output logic signed [PW-1:0]    prod [PAR][N]
);
  logic signed [WBITS-1:0] w [PAR][N];

  weights_hwlut #(.LAYER(LAYER), .PAR(PAR), .N(N), .WBITS(WBITS)) u_lut (
    .ch_base(ch_base), .w(w)
  );

  always_comb begin
    for (int p = 0; p < PAR; p++)
      for (int n = 0; n < N; n++)
        prod[p][n] = PW'($signed({1'b0, act[p][n]}) * w[p][n]);
  end
endmodule
