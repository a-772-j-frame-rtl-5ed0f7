// tb_dn_conv_dw: checks DN depth-wise layers against the reference model:
// layer 12 (stride 2, 256 channels) on an odd-sized image, layer 14
// (stride 1, 512 channels) with random gaps and back-pressure, and layer 26
// (1024 channels) at full rate, whose cycle count must stay within
// C/PAR = 32 clocks per input pixel plus one per output pixel.
module tb_dn_conv_dw;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 3;
  logic done [N];
  int   ck [N], fl [N], cy [N], st [N];
  int   checks = 0, failures = 0;

  layer_harness #(.LAYER(12), .W(9), .H(7), .SEED(11), .STALL(1)) h1 (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]), .stalls(st[0]));
  layer_harness #(.LAYER(14), .W(6), .H(5), .SEED(12), .STALL(1)) h2 (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]), .stalls(st[1]));
  layer_harness #(.LAYER(26), .W(4), .H(3), .SEED(13), .STALL(0)) h3 (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]), .stalls(st[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    checks++;
    if (cy[2] > 12 * 32 + 12 + 4) begin
      failures++; $display("layer 26 took %0d cycles", cy[2]);
    end
    checks++;
    if (st[0] + st[1] == 0) begin failures++; $display("no output stall seen"); end
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
