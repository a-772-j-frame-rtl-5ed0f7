// tb_pixel_deserializer: 128-bit words reassembled into 512-bit pixels,
// first word in the lowest bits, under random gaps and back-pressure.
module tb_pixel_deserializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ir, ov, orr;
  logic [127:0] id;
  logic [511:0] od;
  int ip = 0, op = 0;

  pixel_deserializer #(.PIX_W(512), .WORD_W(128)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));

  function automatic logic [127:0] word(int i);
    return {nc_pkg::mix32(32'(i*4)), nc_pkg::mix32(32'(i*4 + 1)), nc_pkg::mix32(32'(i*4 + 2)),
            nc_pkg::mix32(32'(i*4 + 3))};
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin iv <= 0; orr <= 0; end
    else begin
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 400 && $urandom % 3 != 0) begin iv <= 1; id <= word(ip); end
        else iv <= 0;
      end
      if (ov && orr) begin
        checks++;
        if (od !== {word(op*4 + 3), word(op*4 + 2), word(op*4 + 1), word(op*4)}) failures++;
        op++;
      end
      orr <= ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (op == 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
