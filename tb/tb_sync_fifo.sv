// tb_sync_fifo: random pushes and pops on a 4-deep FIFO; data must come out
// in order, the FIFO must fill (in_ready low) at least once and then accept
// a back-to-back stream at one word per clock.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ir, ov, orr;
  logic [23:0] id, od;
  int ip = 0, op = 0, fulls = 0, cyc = 0, t0 = 0;
  bit fast = 0;

  sync_fifo #(.WIDTH(24), .DEPTH(4)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od));

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin iv <= 0; orr <= 0; end
    else begin
      if (iv && !ir) fulls++;
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 600 && (fast || $urandom % 2 == 0)) begin iv <= 1; id <= 24'(ip * 7 + 1); end
        else iv <= 0;
      end
      if (ov && orr) begin
        checks++;
        if (od !== 24'(op * 7 + 1)) failures++;
        op++;
        if (op == 300) begin fast = 1; t0 = cyc; end
      end
      orr <= fast || ($urandom % 3 == 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (op == 600);
    checks += 2;
    if (fulls == 0) failures++;
    if (cyc - t0 > 310) begin failures++; $display("slow: %0d", cyc - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
