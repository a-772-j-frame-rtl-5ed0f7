// clock_divider: derives the two slower layer clocks from the main clock.
//
// clk_div2 toggles on every rising edge of clk and clk_div4 on every rising
// edge of clk_div2, so both are square waves whose rising edges coincide with
// rising edges of clk (after the flip-flop delay, which clock-tree balancing
// absorbs in silicon). Both start low after reset.
module clock_divider (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div2,
  output logic clk_div4
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_div2 <= 1'b0;
    else        clk_div2 <= ~clk_div2;
  end

  always_ff @(posedge clk_div2 or negedge rst_n) begin
    if (!rst_n) clk_div4 <= 1'b0;
    else        clk_div4 <= ~clk_div4;
  end
endmodule
