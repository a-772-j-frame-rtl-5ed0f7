// acc_bias: accumulation and bias block of a layer (PAR lanes).
//
// Per lane: the incoming partial sum is saturated to the accumulator width,
// then added either to the channel's bias (first contribution to an output)
// or to the accumulation stored so far, and the result is saturated again.
// The bias table is hard-wired (nc_pkg::bias stands in for trained values).
// Lane p serves channel ch_base + p. Purely combinational; the caller stores
// the result (accumulation registers or accumulation SRAM).
module acc_bias #(
  parameter int LAYER   = 2,
  parameter int PAR     = nc_pkg::layer_cfg(LAYER).par,
  parameter int SW      = 16,
  parameter int ACCBITS = nc_pkg::layer_cfg(LAYER).accbits
) (
  input  logic        [10:0]        ch_base,
  input  logic signed [SW-1:0]      psum  [PAR],
  input  logic                      first [PAR],
  input  logic signed [ACCBITS-1:0] prev  [PAR],
  output logic signed [ACCBITS-1:0] acc   [PAR]
);
  localparam longint HI = (longint'(1) <<< (ACCBITS - 1)) - 1;
  localparam longint LO = -(longint'(1) <<< (ACCBITS - 1));

  function automatic logic signed [ACCBITS-1:0] sat(longint v);
    if (v > HI) return ACCBITS'(HI);
    if (v < LO) return ACCBITS'(LO);
    return ACCBITS'(v);
  endfunction

  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      logic signed [ACCBITS-1:0] s, addend;
      s      = sat(longint'(psum[p]));
      addend = first[p] ? ACCBITS'(nc_pkg::bias_of(LAYER, int'(ch_base) + p, ACCBITS)) : prev[p];
      acc[p] = sat(longint'(s) + longint'(addend));
    end
  end
endmodule
