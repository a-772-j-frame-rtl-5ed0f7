// clip_scale: quantised activation function of a layer (PAR lanes).
//
// Per lane: the accumulation is clipped from above at the channel's clip level
// and from below at zero (clipped ReLU), multiplied by the channel's unsigned
// scale factor, rounded by adding one half and shifting right by the layer's
// scale shift, and saturated to the OBITS-bit unsigned activation. Clip levels
// and scale factors are hard-wired tables (nc_pkg stands in for trained
// values). Lane p serves channel ch_base + p. Purely combinational.
module clip_scale #(
  parameter int LAYER   = 2,
  parameter int PAR     = nc_pkg::layer_cfg(LAYER).par,
  parameter int ACCBITS = nc_pkg::layer_cfg(LAYER).accbits,
  parameter int OBITS   = nc_pkg::ABITS
) (
  input  logic        [10:0]        ch_base,
  input  logic signed [ACCBITS-1:0] acc [PAR],
  output logic        [OBITS-1:0]   act [PAR]
);
  localparam int SH = nc_pkg::scale_shift(LAYER);
  localparam int PW = ACCBITS + nc_pkg::SCALE_BITS + 1;

  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      logic signed [ACCBITS-1:0] clip, y;
      logic [PW-1:0] prod, rounded;
      clip = ACCBITS'(nc_pkg::clip_of(LAYER, int'(ch_base) + p, ACCBITS));
      y    = (acc[p] > clip) ? clip : acc[p];
      y    = (y > 0) ? y : '0;
      prod = PW'(unsigned'(y)) * PW'(nc_pkg::scale_factor(LAYER, int'(ch_base) + p));
      rounded = (prod + (PW'(1) << (SH - 1))) >> SH;
      act[p]  = (rounded > PW'((1 << OBITS) - 1)) ? OBITS'((1 << OBITS) - 1) : OBITS'(rounded);
    end
  end
endmodule
