// tb_pixel_serializer: 512-bit pixels cut into four 128-bit words, lowest
// word first, with the last flag on word 3, under random gaps and
// back-pressure; then at full rate one word per clock.
module tb_pixel_serializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ir, ov, orr, ol;
  logic [511:0] id;
  logic [127:0] od;
  int ip = 0, op = 0, cyc = 0, t0 = 0;
  bit fast = 0;

  pixel_serializer #(.PIX_W(512), .WORD_W(128)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od), .out_last(ol));

  function automatic logic [127:0] word(int p, int w);
    return {nc_pkg::mix32(32'(p*16 + w*4)), nc_pkg::mix32(32'(p*16 + w*4 + 1)),
            nc_pkg::mix32(32'(p*16 + w*4 + 2)), nc_pkg::mix32(32'(p*16 + w*4 + 3))};
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin iv <= 0; orr <= 0; end
    else begin
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 200 && (fast || $urandom % 3 != 0)) begin
          iv <= 1; id <= {word(ip, 3), word(ip, 2), word(ip, 1), word(ip, 0)};
        end else iv <= 0;
      end
      if (ov && orr) begin
        checks++;
        if (od !== word(op / 4, op % 4) || ol !== (op % 4 == 3)) failures++;
        op++;
        if (op == 400) begin fast = 1; t0 = cyc; end
      end
      orr <= fast || ($urandom % 3 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (op == 800);
    checks++;
    if (cyc - t0 > 410) begin failures++; $display("slow %0d", cyc - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
