// tb_acc_sram: random read-modify-write traffic on a small accumulation
// memory (8 channels, 2-channel slices, 3 rows x 5 pixels, 2 update ports at
// distinct pixels), compared with a model array; checks the update-port reads
// and the whole-pixel read port.
module tb_acc_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]        grp;
  logic              en [2];
  logic [1:0]        slot [2];
  logic [2:0]        ox [2];
  logic signed [9:0] rdata [2][2];
  logic signed [9:0] wdata [2][2];
  logic [1:0]        es;
  logic [2:0]        ex;
  logic signed [9:0] ed [8];
  int model [3][5][8];

  acc_sram #(.C(8), .PAR(2), .ACCBITS(10), .ROWS(3), .MAX_WO(5), .NP(2)) dut (
    .clk, .grp, .en, .slot, .ox, .rdata, .wdata, .e_slot(es), .e_ox(ex), .e_data(ed));

  initial begin
    // fill every location once through port 0
    for (int r = 0; r < 3; r++)
      for (int x = 0; x < 5; x++)
        for (int g = 0; g < 4; g++) begin
          grp = 2'(g); en[0] = 1; en[1] = 0; slot[0] = 2'(r); ox[0] = 3'(x);
          for (int p = 0; p < 2; p++) begin
            wdata[0][p] = 10'($urandom); model[r][x][g*2+p] = int'(wdata[0][p]);
          end
          @(posedge clk); #1;
        end
    for (int it = 0; it < 400; it++) begin
      grp = 2'($urandom % 4);
      slot[0] = 2'($urandom % 3); ox[0] = 3'($urandom % 5);
      do begin slot[1] = 2'($urandom % 3); ox[1] = 3'($urandom % 5); end
      while (slot[1] == slot[0] && ox[1] == ox[0]);
      es = 2'($urandom % 3); ex = 3'($urandom % 5);
      #1;
      for (int q = 0; q < 2; q++) begin
        en[q] = 1'($urandom);
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (int'(rdata[q][p]) != model[slot[q]][ox[q]][int'(grp)*2+p]) failures++;
          wdata[q][p] = rdata[q][p] + 10'sd3;
        end
      end
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (int'(ed[c]) != model[es][ex][c]) failures++;
      end
      @(posedge clk); #1;
      for (int q = 0; q < 2; q++)
        if (en[q]) for (int p = 0; p < 2; p++) model[slot[q]][ox[q]][int'(grp)*2+p] = int'(wdata[q][p]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
