// tb_spi_config: SPI mode-0 transfers at clk/8: reads the reset values and
// the identification register, writes width, height and map enables, reads
// them back over MISO and checks the register outputs.
module tb_spi_config;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [10:0] w; logic [9:0] h; logic [3:0] en;

  spi_config dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .img_w(w), .img_h(h), .map_en(en));

  task automatic xfer(input logic rd, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    logic [23:0] f;
    f = {rd, a, d};
    cs_n = 0; #40;
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i]; #40;
      sclk = 1;
      if (i < 16) q[i] = miso;
      #40;
      sclk = 0;
    end
    #40 cs_n = 1; #80;
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    logic [15:0] q;
    #30 rst_n = 1; #50;
    expect_eq(w, 1280, "reset width"); expect_eq(h, 720, "reset height"); expect_eq(en, 15, "reset enables");
    xfer(1, 7'd3, 16'h0, q); expect_eq(q, 16'h4E43, "id");
    xfer(1, 7'd0, 16'h0, q); expect_eq(q, 1280, "read width");
    xfer(0, 7'd0, 16'd224, q); expect_eq(w, 224, "width");
    xfer(0, 7'd1, 16'd200, q); expect_eq(h, 200, "height");
    xfer(0, 7'd2, 16'h5, q);   expect_eq(en, 5, "enables");
    xfer(1, 7'd0, 16'h0, q); expect_eq(q, 224, "read width");
    xfer(1, 7'd1, 16'h0, q); expect_eq(q, 200, "read height");
    xfer(1, 7'd2, 16'h0, q); expect_eq(q, 5, "read enables");
    expect_eq(w, 224, "width kept after reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
