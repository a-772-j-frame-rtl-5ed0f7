// tb_async_fifo: a 16-deep dual-clock FIFO between a fast writer (10 ns) and
// a slower reader (27 ns), then the other way round by holding the reader
// back; all words must arrive in order, none lost or repeated, and the FIFO
// must report full at least once.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #5 wclk = ~wclk;
  always #13.5 rclk = ~rclk;
  int checks = 0, failures = 0;
  logic iv, ir, ov, orr;
  logic [31:0] id, od;
  int ip = 0, op = 0, fulls = 0;

  async_fifo #(.WIDTH(32), .DEPTH(16)) dut (.rst_n, .wclk, .in_valid(iv), .in_ready(ir), .in_data(id),
    .rclk, .out_valid(ov), .out_ready(orr), .out_data(od));

  always @(posedge wclk) begin
    if (!rst_n) iv <= 0;
    else begin
      if (iv && !ir) fulls++;
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 500 && $urandom % 4 != 0) begin iv <= 1; id <= nc_pkg::mix32(32'(ip)); end
        else iv <= 0;
      end
    end
  end

  always @(posedge rclk) begin
    if (!rst_n) orr <= 0;
    else begin
      if (ov && orr) begin
        checks++;
        if (od !== nc_pkg::mix32(32'(op))) failures++;
        op++;
      end
      orr <= (op > 250) || ($urandom % 2 == 0);
    end
  end

  initial begin
    repeat (3) @(posedge rclk); rst_n = 1;
    wait (op == 500);
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge wclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
