// line_buffer: input-activation line buffer of a K x K convolution layer.
//
// It keeps K-1 lines of the input tensor in a line memory plus a K x K window
// of registers, and hands the window to the layer's multipliers once for
// every output pixel. The image is walked as if it were padded by one pixel
// on every side (padding 1, K = 3): the walker steps through (W+2) x (H+2)
// virtual positions, takes a pixel from the input stream at real positions
// and inserts zeros at padding positions, so padding costs cycles but no
// logic in the datapath. At each step the column of the K rows under the
// walker (K-1 from the line memory, one new) is shifted into the window and
// the line memory moves up by one row. A window is issued when its top-left
// virtual corner lies on the stride grid: vx-(K-1) and vy-(K-1) both
// multiples of S.
//
// Interface: pixel stream in (valid/ready, C channels of BITS bits, channel c
// at bits [c*BITS +: BITS]); window stream out (valid/ready, tap
// t = ky*K + kx at bits [(t*C + c)*BITS +: BITS]). The window output is a
// register: a window is held until taken. cfg_w/cfg_h give the image size;
// they must stay constant during a frame. Frames follow each other without gaps.
module line_buffer #(
  parameter int C     = 32,
  parameter int BITS  = 4,
  parameter int K     = 3,
  parameter int S     = 1,
  parameter int MAX_W = 640,
  localparam int PW   = C * BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [10:0]         cfg_w,
  input  logic [9:0]          cfg_h,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [PW-1:0]       in_data,
  output logic                win_valid,
  input  logic                win_ready,
  output logic [K*K*PW-1:0]   win_data
);
  localparam int PAD = (K - 1) / 2;
  localparam int AW  = $clog2(MAX_W + 2*PAD);

  logic [PW-1:0] lines [K-1][MAX_W + 2*PAD];
  logic [PW-1:0] win   [K][K];            // [ky][kx]
  logic [11:0]   vx;
  logic [10:0]   vy;
  logic          real_pos, step, issue, free;
  logic [PW-1:0] col [K];

  assign real_pos = (vx >= 12'(PAD)) && (vx < 12'(cfg_w) + 12'(PAD)) &&
                    (vy >= 11'(PAD)) && (vy < 11'(cfg_h) + 11'(PAD));
  assign free     = !win_valid || win_ready;
  assign step     = free && (!real_pos || in_valid);
  assign in_ready = free && real_pos;
  assign issue    = (vx >= 12'(K - 1)) && (vy >= 11'(K - 1)) &&
                    ((vx - 12'(K - 1)) % 12'(S) == 0) && ((vy - 11'(K - 1)) % 11'(S) == 0);

  always_comb begin
    for (int ky = 0; ky < K - 1; ky++) col[ky] = lines[ky][AW'(vx)];
    col[K-1] = real_pos ? in_data : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vx        <= '0;
      vy        <= '0;
      win_valid <= 1'b0;
    end else begin
      if (win_valid && win_ready) win_valid <= 1'b0;
      if (step) begin
        if (issue) win_valid <= 1'b1;
        if (vx == 12'(cfg_w) + 12'(2 * PAD) - 12'd1) begin
          vx <= '0;
          vy <= (vy == 11'(cfg_h) + 11'(2 * PAD) - 11'd1) ? '0 : vy + 11'd1;
        end else begin
          vx <= vx + 12'd1;
        end
      end
    end
  end

  // Line memory and window registers (no reset needed: padding rows and
  // columns overwrite all that is read before it is used).
  always_ff @(posedge clk) begin
    if (step) begin
      for (int ky = 0; ky < K - 1; ky++) lines[ky][AW'(vx)] <= col[ky+1];
      for (int ky = 0; ky < K; ky++) begin
        for (int kx = 0; kx < K - 1; kx++) win[ky][kx] <= win[ky][kx+1];
        win[ky][K-1] <= col[ky];
      end
    end
  end

  always_comb begin
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        win_data[(ky*K + kx)*PW +: PW] = win[ky][kx];
  end
endmodule
