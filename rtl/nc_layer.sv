// nc_layer: one layer of the network, built as an LB layer (line buffer,
// regular or depth-wise convolution) or a DN layer (accumulation memory,
// depth-wise), whichever the layer table gives for LAYER. Interface and timing
// are those of lb_layer and dn_conv_dw: whole input and output pixels with
// valid/ready, cfg_w/cfg_h the input size of this layer.
module nc_layer #(
  parameter int LAYER = 2,
  parameter int MAX_W = nc_pkg::max_in_w(LAYER),
  localparam nc_pkg::layer_cfg_t CFG = nc_pkg::layer_cfg(LAYER),
  localparam int IPW = CFG.iz * CFG.ibits,
  localparam int OPW = CFG.oz * nc_pkg::ABITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [10:0]     cfg_w,
  input  logic [9:0]      cfg_h,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IPW-1:0]  in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [OPW-1:0]  out_data
);
  if (CFG.mode == nc_pkg::DN_CONV_DW) begin : g_dn
    dn_conv_dw #(.LAYER(LAYER), .MAX_W(MAX_W)) u_layer (.*);
  end else begin : g_lb
    lb_layer #(.LAYER(LAYER), .MAX_W(MAX_W)) u_layer (.*);
  end
endmodule
