// nc_ref_pkg: reference model of the feature extractor, for testbenches.
//
// Computes a layer (or the whole network) on images held in dynamic arrays,
// element (x, y, c) at index (y*W + x)*C + c, by the textbook definition of a
// padded convolution followed by the quantised activation. It shares with
// the RTL only the constant tables of nc_pkg (weights, biases, clip levels,
// scales); the loops, padding, saturation and rounding are written here
// independently. Arithmetic rules it encodes:
//  - LB layers: acc = sat(sat(sum of all products) + bias)
//  - DN layers: contributions in input raster order, the first one
//    acc = sat(sat(p) + bias), each later one acc = sat(sat(p) + acc)
//  - out = min(15, (clamp(acc, 0, clip) * scale + 2^(sh-1)) >> sh)
package nc_ref_pkg;
  import nc_pkg::*;

  function automatic longint rsat(longint v, int bits);
    longint hi = (longint'(1) <<< (bits - 1)) - 1;
    longint lo = -hi - 1;
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int ract(int l, int ch, longint acc);
    longint y   = acc;
    longint clp = longint'(clip_level(l, ch));
    int     sh  = scale_shift(l);
    longint z;
    if (y > clp) y = clp;
    if (y < 0)   y = 0;
    z = (y * longint'(scale_factor(l, ch)) + (longint'(1) <<< (sh - 1))) >>> sh;
    return (z > 15) ? 15 : int'(z);
  endfunction

  function automatic void ref_layer(input int l, input int W, input int H, input int in_img[],
                                    output int out_img[], output int WO, output int HO);
    layer_cfg_t c = layer_cfg(l);
    int k = c.k, s = c.s, pad = (c.k - 1) / 2;
    int acb = c.accbits;
    bit pr = is_pruned(l);
    WO = (s == 2) ? (W - 1) / 2 + 1 : W;
    HO = (s == 2) ? (H - 1) / 2 + 1 : H;
    out_img = new[WO * HO * c.oz];
    for (int oy = 0; oy < HO; oy++)
      for (int ox = 0; ox < WO; ox++)
        for (int oc = 0; oc < c.oz; oc++) begin
          longint acc = 0;
          bit     first = 1;
          longint sum = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              int ix = ox * s + kx - pad, iy = oy * s + ky - pad;
              if (ix < 0 || iy < 0 || ix >= W || iy >= H) continue;
              if (c.mode == LB_CONV) begin
                for (int ic = 0; ic < c.iz; ic++)
                  sum += longint'(in_img[(iy*W + ix)*c.iz + ic]) *
                         longint'(weight_of(l, oc, (ky*k + kx)*c.iz + ic, c.wbits, pr));
              end else if (c.mode == LB_CONV_DW) begin
                sum += longint'(in_img[(iy*W + ix)*c.iz + oc]) * longint'(weight_of(l, oc, ky*k + kx, c.wbits, pr));
              end else begin
                longint p = longint'(in_img[(iy*W + ix)*c.iz + oc]) * longint'(weight_of(l, oc, ky*k + kx, c.wbits, pr));
                acc = rsat(rsat(p, acb) + (first ? longint'(bias_of(l, oc, acb)) : acc), acb);
                first = 0;
              end
            end
          if (c.mode != DN_CONV_DW) acc = rsat(rsat(sum, acb) + longint'(bias_of(l, oc, acb)), acb);
          out_img[(oy*WO + ox)*c.oz + oc] = ract(l, oc, acc);
        end
  endfunction

  // Runs layers first..last; returns the output of 'last'.
  function automatic void ref_chain(input int first, input int last, input int W, input int H,
                                    input int in_img[], output int out_img[],
                                    output int WO, output int HO);
    int cur[];
    int w = W, h = H;
    cur = in_img;
    for (int l = first; l <= last; l++) begin
      int nxt[];
      int wo, ho;
      ref_layer(l, w, h, cur, nxt, wo, ho);
      cur = nxt; w = wo; h = ho;
    end
    out_img = cur; WO = w; HO = h;
  endfunction

  // Deterministic test image: 8-bit RGB (or 4-bit activations when bits == 4).
  function automatic void make_image(input int W, input int H, input int C, input int bits,
                                     input int seed, output int img[]);
    img = new[W * H * C];
    for (int i = 0; i < W * H * C; i++)
      img[i] = int'(mix32(32'(i) ^ (32'(seed) << 20)) % (32'd1 << bits));
  endfunction
endpackage
