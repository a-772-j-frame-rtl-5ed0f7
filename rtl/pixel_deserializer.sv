// pixel_deserializer: reassembles a pixel of PIX_W bits from WORD_W-bit words.
//
// The first word received fills the lowest bits. When the last word has been
// received the whole pixel is offered on the output (valid/ready); words are
// taken again once the pixel has left. Counterpart of pixel_serializer.
module pixel_deserializer #(
  parameter int PIX_W  = 512,
  parameter int WORD_W = 128,
  localparam int NW    = PIX_W / WORD_W,
  localparam int CW    = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [PIX_W-1:0]  out_data
);
  logic [CW-1:0] idx;

  assign in_ready = !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      idx       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (idx == CW'(NW - 1)) begin
          idx       <= '0;
          out_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (in_valid && in_ready) out_data[int'(idx)*WORD_W +: WORD_W] <= in_data;
endmodule
