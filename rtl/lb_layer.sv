// lb_layer: one line-buffer (LB) layer, regular or depth-wise convolution.
//
// Input pixels (all IZ channels at once) enter a line buffer that issues a
// K x K window per output pixel; 1x1 layers take the pixel itself as the
// window. The window is held in a register while the layer computes PAR
// output channels per clock: for a regular convolution every lane sees the
// whole window (K*K*IZ taps) and computes one output channel; for a
// depth-wise convolution lane p sees the K*K taps of channel g*PAR + p.
// Per clock: multi-constant multipliers, adder tree, bias addition with
// saturation, clipped ReLU and fixed-point scaling. Results are collected in
// the output register, which is sent as one pixel of OZ 4-bit activations.
//
// Timing: a pixel takes OZ/PAR clocks (IZ/PAR for depth-wise); the next
// window is taken in the clock that finishes the current one. The structure
// (line buffer, MCM, adder tree, accumulation and bias, clip and scale) and the
// layer table follow the published design; the lane count, the handshakes
// and the whole-pixel transfers between layers are this design's choices.
module lb_layer #(
  parameter int LAYER   = 2,
  parameter int MAX_W   = nc_pkg::max_in_w(LAYER),
  parameter int PAR     = nc_pkg::layer_cfg(LAYER).par,
  localparam nc_pkg::layer_cfg_t CFG = nc_pkg::layer_cfg(LAYER),
  localparam int IZ    = CFG.iz,
  localparam int OZ    = CFG.oz,
  localparam int K     = CFG.k,
  localparam bit DW    = (CFG.mode != nc_pkg::LB_CONV),
  localparam int IBITS = CFG.ibits,
  localparam int OBITS = nc_pkg::ABITS,
  localparam int IPW   = IZ * IBITS,
  localparam int OPW   = OZ * OBITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [10:0]     cfg_w,     // input image width of this layer
  input  logic [9:0]      cfg_h,     // input image height of this layer
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IPW-1:0]  in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [OPW-1:0]  out_data
);
  localparam int WBITS = CFG.wbits;
  localparam int ACC   = CFG.accbits;
  localparam int N     = DW ? K * K : K * K * IZ;
  localparam int G     = OZ / PAR;                 // groups per pixel
  localparam int PWID  = IBITS + WBITS;
  localparam int SW    = PWID + $clog2(N + 1);

  // ---------------- window source ----------------
  logic                  win_valid, win_ready;
  logic [K*K*IPW-1:0]    win_data;

  if (K > 1) begin : g_lb
    line_buffer #(.C(IZ), .BITS(IBITS), .K(K), .S(CFG.s), .MAX_W(MAX_W)) u_lb (
      .clk, .rst_n, .cfg_w, .cfg_h,
      .in_valid, .in_ready, .in_data,
      .win_valid, .win_ready, .win_data
    );
  end else begin : g_direct
    assign win_valid = in_valid;
    assign in_ready  = win_ready;
    assign win_data  = in_data;
    logic unused;
    assign unused = ^{cfg_w, cfg_h};
  end

  // ---------------- group sequencer ----------------
  logic                      busy, adv, last;
  logic [$clog2(G+1)-1:0]    g;
  logic [K*K*IPW-1:0]        wreg;
  logic [10:0]               ch_base;

  assign last      = (g == ($bits(g))'(G - 1));
  assign adv       = busy && (!out_valid || out_ready);
  assign win_ready = !busy || (adv && last);
  assign ch_base   = 11'(int'(g) * PAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      g         <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (adv) begin
        g <= last ? '0 : g + 1'b1;
        if (last) out_valid <= 1'b1;
      end
      if (win_valid && win_ready) busy <= 1'b1;
      else if (adv && last)       busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (win_valid && win_ready) wreg <= win_data;
  end

  // ---------------- datapath ----------------
  logic        [IBITS-1:0] act  [PAR][N];
  logic signed [PWID-1:0]  prod [PAR][N];
  logic signed [SW-1:0]    psum [PAR];
  logic                    first [PAR];
  logic signed [ACC-1:0]   zero_prev [PAR];
  logic signed [ACC-1:0]   accv [PAR];
  logic        [OBITS-1:0] res  [PAR];

  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      first[p]     = 1'b1;      // a whole window is summed in one clock
      zero_prev[p] = '0;
      for (int n = 0; n < N; n++) begin
        if (DW) act[p][n] = wreg[(n*IZ + int'(ch_base) + p)*IBITS +: IBITS];
        else    act[p][n] = wreg[n*IBITS +: IBITS];
      end
    end
  end

  mcm #(.LAYER(LAYER), .PAR(PAR), .N(N), .IBITS(IBITS), .WBITS(WBITS)) u_mcm (
    .ch_base, .act, .prod
  );
  adder_tree #(.PAR(PAR), .N(N), .IW(PWID)) u_tree (.din(prod), .sum(psum));
  acc_bias #(.LAYER(LAYER), .PAR(PAR), .SW(SW), .ACCBITS(ACC)) u_acc (
    .ch_base, .psum, .first, .prev(zero_prev), .acc(accv)
  );
  clip_scale #(.LAYER(LAYER), .PAR(PAR), .ACCBITS(ACC), .OBITS(OBITS)) u_cs (
    .ch_base, .acc(accv), .act(res)
  );

  always_ff @(posedge clk) begin
    if (adv)
      for (int p = 0; p < PAR; p++) out_data[(int'(ch_base) + p)*OBITS +: OBITS] <= res[p];
  end
endmodule
