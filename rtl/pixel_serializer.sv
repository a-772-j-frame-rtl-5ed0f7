// pixel_serializer: cuts a pixel of PIX_W bits into PIX_W/WORD_W words.
//
// Word 0 carries the lowest bits (the lowest channels), so the words follow
// the channel order. The pixel is held in a register; a new pixel is taken in
// the clock that sends the last word of the previous one. Valid/ready on both
// sides. out_last marks the last word of a pixel.
module pixel_serializer #(
  parameter int PIX_W  = 512,
  parameter int WORD_W = 128,
  localparam int NW    = PIX_W / WORD_W,
  localparam int CW    = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WORD_W-1:0] out_data,
  output logic              out_last
);
  logic [PIX_W-1:0] pix;
  logic [CW-1:0]    idx;

  assign out_last = (idx == CW'(NW - 1));
  assign in_ready = !out_valid || (out_ready && out_last);
  assign out_data = pix[int'(idx)*WORD_W +: WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      idx       <= '0;
    end else begin
      if (out_valid && out_ready) begin
        idx <= out_last ? '0 : idx + 1'b1;
        if (out_last) out_valid <= 1'b0;
      end
      if (in_valid && in_ready) out_valid <= 1'b1;
    end
  end

  always_ff @(posedge clk) if (in_valid && in_ready) pix <= in_data;
endmodule
