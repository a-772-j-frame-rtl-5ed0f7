// tb_lb_layer: checks LB layers of each kind against the reference model:
// layer 1 (3x3 stride-2 regular convolution, 8-bit input), layer 2 (3x3
// depth-wise), layer 3 (1x1) and layer 4 (3x3 depth-wise, stride 2), on small
// images with random input gaps and output back-pressure. Layer 3 is also
// run at full rate to check its throughput: OZ/PAR = 4 clocks per pixel.
module tb_lb_layer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic done [N];
  int   ck [N], fl [N], cy [N], st [N];
  int   checks = 0, failures = 0;

  layer_harness #(.LAYER(1), .W(12), .H(8), .SEED(1), .STALL(1)) h1 (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]), .stalls(st[0]));
  layer_harness #(.LAYER(2), .W(9),  .H(6), .SEED(2), .STALL(1)) h2 (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]), .stalls(st[1]));
  layer_harness #(.LAYER(3), .W(5),  .H(4), .SEED(3), .STALL(1)) h3 (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]), .stalls(st[2]));
  layer_harness #(.LAYER(4), .W(9),  .H(7), .SEED(4), .STALL(1)) h4 (.clk, .rst_n, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .cycles(cy[3]), .stalls(st[3]));
  layer_harness #(.LAYER(3), .W(6),  .H(5), .SEED(5), .STALL(0)) h5 (.clk, .rst_n, .done(done[4]), .checks(ck[4]), .failures(fl[4]), .cycles(cy[4]), .stalls(st[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    // throughput of the 1x1 layer: 64/16 = 4 clocks per pixel, 30 pixels
    checks++;
    if (cy[4] > 30 * 4 + 3) begin
      failures++; $display("layer 3 took %0d cycles for 30 pixels", cy[4]);
    end
    checks++;
    if (st[0] + st[1] + st[3] == 0) begin failures++; $display("no output stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
