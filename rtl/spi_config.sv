// spi_config: configuration registers written and read over SPI.
//
// SPI mode 0 (clock idles low, data sampled on the rising edge), chip select
// active low, most significant bit first. A transfer is 24 bits: a read flag
// (1 = read), a 7-bit register address and 16 data bits. For a write the data
// bits are stored when the 24th bit arrives; for a read the register is
// shifted out on MISO during the 16 data bits. The SPI pins are sampled with
// the system clock through two flip-flops, so sclk must be slower than clk/4.
//
// Registers: 0 input image width (reset 1280), 1 input image height
// (reset 720), 2 feature-map output enables, one bit per map, bit 0 = 1/4
// scale ... bit 3 = 1/32 scale (reset 4'hF), 3 identification (read only).
// The register map is this design's choice; the image size may be changed
// only between frames while the accelerator is idle.
module spi_config #(
  parameter logic [15:0] ID = 16'h4E43
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic [10:0] img_w,
  output logic [9:0]  img_h,
  output logic [3:0]  map_en
);
  logic [2:0]  sclk_s, cs_s, mosi_s;
  logic [4:0]  nbits;
  logic [23:0] shreg;
  logic [15:0] rdreg;
  logic        rise, fall, active;

  assign rise   = sclk_s[1] && !sclk_s[2];
  assign fall   = !sclk_s[1] && sclk_s[2];
  assign active = !cs_s[1];

  function automatic logic [15:0] read_reg(logic [6:0] a);
    case (a)
      7'd0:    return {5'd0, img_w};
      7'd1:    return {6'd0, img_h};
      7'd2:    return {12'd0, map_en};
      7'd3:    return ID;
      default: return 16'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
      nbits  <= '0; shreg <= '0; rdreg <= '0; miso <= 1'b0;
      img_w  <= 11'd1280;
      img_h  <= 10'd720;
      map_en <= 4'hF;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[1:0], mosi};
      if (!active) begin
        nbits <= '0;
        miso  <= 1'b0;
      end else if (rise) begin
        shreg <= {shreg[22:0], mosi_s[1]};
        nbits <= nbits + 5'd1;
        if (nbits == 5'd7) rdreg <= read_reg({shreg[5:0], mosi_s[1]});
        if (nbits == 5'd23 && !shreg[22]) begin
          case (shreg[21:15])
            7'd0: img_w  <= {shreg[9:0], mosi_s[1]};
            7'd1: img_h  <= {shreg[8:0], mosi_s[1]};
            7'd2: map_en <= {shreg[2:0], mosi_s[1]};
            default: ;
          endcase
        end
      end else if (fall && nbits >= 5'd8 && nbits < 5'd24) begin
        miso  <= rdreg[15];
        rdreg <= {rdreg[14:0], 1'b0};
      end
    end
  end
endmodule
