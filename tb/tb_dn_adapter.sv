// tb_dn_adapter: pixels of 8 channels x 4 bits cut into 4 slices of 2
// channels; checks slice data, slice index and last flag, under random gaps
// and back-pressure, and that a back-to-back stream takes 4 clocks a pixel.
module tb_dn_adapter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ir, sv, sr, sl;
  logic [31:0] id;
  logic [7:0]  sd;
  logic [1:0]  sg;
  bit gaps = 1;

  dn_adapter #(.C(8), .BITS(4), .PAR(2)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .sl_valid(sv), .sl_ready(sr), .sl_data(sd), .sl_grp(sg), .sl_last(sl));

  function automatic logic [31:0] pix(int i);
    return nc_pkg::mix32(32'(i + 5));
  endfunction

  int ip = 0, op = 0, t_first = 0, t_last = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      iv <= 1'b0; sr <= 1'b0;
    end else begin
      if (iv && ir) ip++;
      if (!iv || ir) begin
        if (ip < 200 && (!gaps || $urandom % 3 != 0)) begin iv <= 1'b1; id <= pix(ip); end
        else iv <= 1'b0;
      end
      if (sv && sr) begin
        int p, g;
        p = op / 4; g = op % 4;
        checks++;
        if (sd !== pix(p)[g*8 +: 8] || sg !== 2'(g) || sl !== (g == 3)) failures++;
        if (op == 400) t_first = cyc;
        if (op == 799) t_last = cyc;
        op++;
      end
      sr <= !gaps || ($urandom % 4 != 0);
      if (op >= 400) gaps = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (op == 800);
    checks++;
    if (t_last - t_first > 400) begin failures++; $display("rate: %0d clocks for 100 pixels", t_last - t_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
