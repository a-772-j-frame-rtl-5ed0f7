// async_fifo: dual-clock FIFO between two clock domains.
//
// Used between the layer groups that run on clk, clk/2 and clk/4, and in
// front of the feature output. DEPTH (a power of two) entries of WIDTH bits.
// Write and read pointers are kept in Gray code and each is passed to the
// other domain through two flip-flops, so full and empty are judged
// pessimistically and safely. Valid/ready on both sides; out_data is the
// asynchronous read of the head entry. Both resets are the same asynchronous
// rst_n.
module async_fifo #(
  parameter int WIDTH = 128,
  parameter int DEPTH = 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             rst_n,
  input  logic             wclk,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic             rclk,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic        push, pop;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign in_ready  = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign out_valid = (rgray != wgray_r2);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) if (push) mem[wbin[AW-1:0]] <= in_data;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
endmodule
