// tb_output_mux: four sources send pixels of 1, 2, 3 and 4 words with random
// gaps; the output (with random back-pressure) must keep every pixel's words
// together, tag them with the right source, keep each source's order, and
// serve every source.
module tb_output_mux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv [4], ir [4], il [4];
  logic [15:0] idat [4];
  logic        ov, orr, ol;
  logic [15:0] od;
  logic [1:0]  os;
  int sent [4] = '{0, 0, 0, 0};
  int got [4]  = '{0, 0, 0, 0};
  int inpix = -1;

  output_mux #(.N(4), .W(16)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(idat),
    .in_last(il), .out_valid(ov), .out_ready(orr), .out_data(od), .out_src(os), .out_last(ol));

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) iv[k] <= 0;
      orr <= 0;
    end else begin
      for (int k = 0; k < 4; k++) begin
        if (iv[k] && ir[k]) sent[k]++;
        if (!iv[k] || ir[k]) begin
          if (sent[k] < 200 - 200 % (k + 1) && $urandom % 3 != 0) begin
            iv[k] <= 1; idat[k] <= 16'(k * 4096 + sent[k]); il[k] <= (sent[k] % (k + 1) == k);
          end else iv[k] <= 0;
        end
      end
      if (ov && orr) begin
        int k;
        k = int'(os);
        checks++;
        if (od !== 16'(k * 4096 + got[k]) || ol !== (got[k] % (k + 1) == k)) failures++;
        checks++;
        if (inpix >= 0 && inpix != k) failures++;
        inpix = ol ? -1 : k;
        got[k]++;
      end
      orr <= ($urandom % 4 != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (got[0] == 200 && got[1] == 200 && got[2] == 198 && got[3] == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("got %0d %0d %0d %0d", got[0], got[1], got[2], got[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
