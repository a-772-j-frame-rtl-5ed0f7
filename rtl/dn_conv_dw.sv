// dn_conv_dw: one depth-wise 3x3 layer in DN mode (accumulation storage).
//
// Instead of buffering input lines, the layer multiplies each input
// activation by all K*K weights of its channel at once (multi-constant
// multipliers, one activation times nine constants) and adds each product
// into the accumulation of the output pixel that tap contributes to. The
// accumulations live in an accumulation memory of three output rows used as
// a ring (row oy in slot oy mod 3). The first contribution to an output takes
// the bias in place of the stored value (one "touched" bit per stored pixel).
// Padding is 1 on every side; stride S is 1 or 2. An output row is finished
// when the last input row it needs, min(oy*S + 1, H - 1), has been taken;
// the layer then stops taking input and sends the finished rows pixel by
// pixel through clip and scale, clearing their touched bits.
//
// Input: whole pixels (C channels x 4 bits), cut into C/PAR slices by a DN
// adapter, one slice per clock. Output: whole pixels. Timing: C/PAR clocks per
// input pixel plus one clock per output pixel. The DN principle, the
// accumulation/bias block and clip/scale follow the published design; the
// three-row ring, the touched bits and the row-wise draining are this
// design's choices.
module dn_conv_dw #(
  parameter int LAYER  = 12,
  parameter int MAX_W  = nc_pkg::max_in_w(LAYER),
  parameter int PAR    = nc_pkg::layer_cfg(LAYER).par,
  localparam nc_pkg::layer_cfg_t CFG = nc_pkg::layer_cfg(LAYER),
  localparam int C     = CFG.iz,
  localparam int OBITS = nc_pkg::ABITS,
  localparam int PW    = C * OBITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [10:0]     cfg_w,     // input width of this layer
  input  logic [9:0]      cfg_h,     // input height of this layer
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [PW-1:0]   in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [PW-1:0]   out_data
);
  localparam int K      = 3;
  localparam int S      = CFG.s;
  localparam int NT     = K * K;
  localparam int ACC    = CFG.accbits;
  localparam int IBITS  = CFG.ibits;
  localparam int WBITS  = CFG.wbits;
  localparam int PWID   = IBITS + WBITS;
  localparam int G      = C / PAR;
  localparam int GW     = (G > 1) ? $clog2(G) : 1;
  localparam int MAX_WO = nc_pkg::out_dim(MAX_W, S);
  localparam int XW     = $clog2(MAX_WO);

  // ---------------- DN adapter ----------------
  logic                  sl_valid, sl_ready, sl_last;
  logic [PAR*IBITS-1:0]  sl_data;
  logic [GW-1:0]         sl_grp;

  dn_adapter #(.C(C), .BITS(IBITS), .PAR(PAR)) u_adapt (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .sl_valid, .sl_ready, .sl_data, .sl_grp, .sl_last
  );

  // ---------------- position and state ----------------
  typedef enum logic {ACCUM, EMIT} state_e;
  state_e      state;
  logic [10:0] x, wo;
  logic [9:0]  y, ho, ydone, eoy;
  logic [10:0] eox;
  logic        take;
  logic        touched [3][MAX_WO];

  assign wo       = 11'(nc_pkg::out_dim(int'(cfg_w), S));
  assign ho       = 10'(nc_pkg::out_dim(int'(cfg_h), S));
  assign sl_ready = (state == ACCUM);
  assign take     = sl_valid && sl_ready;

  function automatic logic [9:0] last_row(logic [9:0] oy, logic [9:0] h);
    int r = int'(oy) * S + 1;
    return (r > int'(h) - 1) ? h - 10'd1 : 10'(r);
  endfunction

  function automatic logic [1:0] mod3(int v);
    return 2'(v % 3);
  endfunction

  // ---------------- tap targets ----------------
  logic          t_en   [NT];
  logic [1:0]    t_slot [NT];
  logic [XW-1:0] t_ox   [NT];

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      int ky, kx, dx, dy, oxi, oyi;
      ky  = t / K;
      kx  = t % K;
      dx  = int'(x) + 1 - kx;
      dy  = int'(y) + 1 - ky;
      oxi = dx / S;
      oyi = dy / S;
      t_en[t]   = (dx >= 0) && (dy >= 0) && (dx % S == 0) && (dy % S == 0) &&
                  (oxi < int'(wo)) && (oyi < int'(ho));
      t_slot[t] = mod3(oyi < 0 ? 0 : oyi);
      t_ox[t]   = XW'(oxi < 0 ? 0 : oxi);
    end
  end

  // ---------------- multipliers and accumulation ----------------
  logic        [IBITS-1:0] act  [PAR][NT];
  logic signed [PWID-1:0]  prod [PAR][NT];
  logic signed [ACC-1:0]   rdata [NT][PAR];
  logic signed [ACC-1:0]   wdata [NT][PAR];
  logic                    wen [NT];
  logic [10:0]             ch_base;

  assign ch_base = 11'(int'(sl_grp) * PAR);

  always_comb begin
    for (int p = 0; p < PAR; p++)
      for (int t = 0; t < NT; t++) act[p][t] = sl_data[p*IBITS +: IBITS];
    for (int t = 0; t < NT; t++) wen[t] = take && t_en[t];
  end

  mcm #(.LAYER(LAYER), .PAR(PAR), .N(NT), .IBITS(IBITS), .WBITS(WBITS)) u_mcm (
    .ch_base, .act, .prod
  );

  for (genvar t = 0; t < NT; t++) begin : g_tap
    logic signed [PWID-1:0] ps [PAR];
    logic                   fst [PAR];
    logic signed [ACC-1:0]  pv [PAR];
    logic signed [ACC-1:0]  nv [PAR];
    always_comb begin
      for (int p = 0; p < PAR; p++) begin
        ps[p]  = prod[p][t];
        fst[p] = !touched[t_slot[t]][t_ox[t]];
        pv[p]  = rdata[t][p];
        wdata[t][p] = nv[p];
      end
    end
    acc_bias #(.LAYER(LAYER), .PAR(PAR), .SW(PWID), .ACCBITS(ACC)) u_acc (
      .ch_base, .psum(ps), .first(fst), .prev(pv), .acc(nv)
    );
  end

  logic signed [ACC-1:0] e_data [C];
  logic [OBITS-1:0]      e_act  [C];

  acc_sram #(.C(C), .PAR(PAR), .ACCBITS(ACC), .ROWS(3), .MAX_WO(MAX_WO), .NP(NT)) u_mem (
    .clk, .grp(sl_grp), .en(wen), .slot(t_slot), .ox(t_ox), .rdata, .wdata,
    .e_slot(mod3(int'(eoy))), .e_ox(XW'(eox)), .e_data
  );

  clip_scale #(.LAYER(LAYER), .PAR(C), .ACCBITS(ACC), .OBITS(OBITS)) u_cs (
    .ch_base(11'd0), .acc(e_data), .act(e_act)
  );

  always_comb begin
    for (int c = 0; c < C; c++) out_data[c*OBITS +: OBITS] = e_act[c];
  end
  assign out_valid = (state == EMIT);

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ACCUM;
      x <= '0; y <= '0; ydone <= '0; eoy <= '0; eox <= '0;
      for (int r = 0; r < 3; r++)
        for (int i = 0; i < MAX_WO; i++) touched[r][i] <= 1'b0;
    end else begin
      case (state)
        ACCUM: if (take && sl_last) begin
          for (int t = 0; t < NT; t++)
            if (t_en[t]) touched[t_slot[t]][t_ox[t]] <= 1'b1;
          if (x == cfg_w - 11'd1) begin
            x     <= '0;
            y     <= (y == cfg_h - 10'd1) ? '0 : y + 10'd1;
            ydone <= y;
            if (eoy < ho && last_row(eoy, cfg_h) == y) state <= EMIT;
          end else begin
            x <= x + 11'd1;
          end
        end
        EMIT: if (out_ready) begin
          touched[mod3(int'(eoy))][XW'(eox)] <= 1'b0;
          if (eox == wo - 11'd1) begin
            eox <= '0;
            if (eoy == ho - 10'd1) begin
              eoy   <= '0;
              state <= ACCUM;
            end else begin
              eoy <= eoy + 10'd1;
              if (last_row(eoy + 10'd1, cfg_h) != ydone) state <= ACCUM;
            end
          end else begin
            eox <= eox + 11'd1;
          end
        end
        default: state <= ACCUM;
      endcase
    end
  end
endmodule
