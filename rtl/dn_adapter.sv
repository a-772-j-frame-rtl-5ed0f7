// dn_adapter: width adapter in front of a DN (accumulation-storage) layer.
//
// Takes one whole input pixel (C channels of BITS bits), keeps it in a
// register and hands it on as C/PAR slices of PAR channels, slice g carrying
// channels g*PAR .. g*PAR+PAR-1, with the slice index and a flag on the last
// slice. Valid/ready on both sides; a new pixel is taken in the clock that
// sends the last slice of the previous one, so a pixel costs C/PAR clocks.
module dn_adapter #(
  parameter int C    = 256,
  parameter int BITS = 4,
  parameter int PAR  = 32,
  localparam int G   = C / PAR,
  localparam int GW  = (G > 1) ? $clog2(G) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [C*BITS-1:0]   in_data,
  output logic                sl_valid,
  input  logic                sl_ready,
  output logic [PAR*BITS-1:0] sl_data,
  output logic [GW-1:0]       sl_grp,
  output logic                sl_last
);
  logic [C*BITS-1:0] pix;

  assign sl_last  = (sl_grp == GW'(G - 1));
  assign in_ready = !sl_valid || (sl_ready && sl_last);
  assign sl_data  = pix[int'(sl_grp)*PAR*BITS +: PAR*BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sl_valid <= 1'b0;
      sl_grp   <= '0;
    end else begin
      if (sl_valid && sl_ready) begin
        sl_grp <= sl_last ? '0 : sl_grp + 1'b1;
        if (sl_last) sl_valid <= 1'b0;
      end
      if (in_valid && in_ready) sl_valid <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) pix <= in_data;
  end
endmodule
