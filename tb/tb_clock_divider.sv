// tb_clock_divider: after reset, clk_div2 must have exactly one rising edge
// every 2 clk cycles and clk_div4 one every 4, each aligned to a clk edge.
module tb_clock_divider;
  logic clk = 0, rst_n = 0, d2, d4;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n2 = 0, n4 = 0;
  realtime last2 = 0, last4 = 0;

  clock_divider dut (.clk, .rst_n, .clk_div2(d2), .clk_div4(d4));

  always @(posedge d2) if (rst_n) begin
    if (n2 > 0) begin checks++; if ($realtime - last2 != 20) failures++; end
    last2 = $realtime; n2++;
  end
  always @(posedge d4) if (rst_n) begin
    if (n4 > 0) begin checks++; if ($realtime - last4 != 40) failures++; end
    last4 = $realtime; n4++;
  end

  initial begin
    #23 rst_n = 1;
    repeat (400) @(posedge clk);
    checks += 2;
    if (n2 < 195 || n2 > 201) failures++;
    if (n4 < 97 || n4 > 101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
