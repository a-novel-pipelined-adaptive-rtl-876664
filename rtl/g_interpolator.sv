// g_interpolator: reconfigurable green interpolator for red and blue sites.
//
// With H = G(i,j-1)+G(i,j+1), V = G(i-1,j)+G(i+1,j) and the colour
// Laplacian L = 2*RB(i,j) - RB(i,j-2) - RB(i,j+2), the three models are
//   MODE_NONE (Eq. 4):  G = (3H +  V + 2L) / 8
//   MODE_HOR  (Eq. 5):  G = (4H      + 2L) / 8
//   MODE_VER  (Eq. 6):  G = ( H + 3V +  L) / 8
// One datapath serves all three: 3H and 3V are built as x + (x<<1), two
// multiplexers pick the pair of green terms ({V,3H}, {H,3H} or {3V,H}), a
// third picks L<<1 or L, and a final add and 3-bit shift give the result.
// Only adders, shifters and multiplexers are used. The shift is an
// arithmetic one (rounds towards minus infinity) and the result is
// saturated to the pixel range.
//
// Purely combinational; `mode` is chosen per pixel from TD/DH/DV. The adder,
// shifter and multiplexer structure and the /8 scaling follow the source's
// G interpolator figure; the weights are read from that figure together
// with Eq. (4)-(6), and the saturation is this design's choice.
module g_interpolator
  import demosaic_pkg::*;
(
  input  interp_mode_e mode,
  input  pix_t g_up,      // G(i-1,j)
  input  pix_t g_dn,      // G(i+1,j)
  input  pix_t g_lf,      // G(i,j-1)
  input  pix_t g_rt,      // G(i,j+1)
  input  pix_t rb_c,      // RB(i,j)
  input  pix_t rb_l2,     // RB(i,j-2)
  input  pix_t rb_r2,     // RB(i,j+2)
  output pix_t g_out
);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t v, h, v3, h3, s2, lap, sel_a, sel_b, sel_l, sum;

  always_comb begin
    v   = sx(g_up) + sx(g_dn);
    h   = sx(g_lf) + sx(g_rt);
    v3  = v + (v <<< 1);
    h3  = h + (h <<< 1);
    s2  = sx(rb_l2) + sx(rb_r2);
    lap = (sx(rb_c) <<< 1) - s2;
    unique case (mode)
      MODE_HOR: begin sel_a = h;  sel_b = h3; sel_l = lap <<< 1; end
      MODE_VER: begin sel_a = v3; sel_b = h;  sel_l = lap;       end
      default:  begin sel_a = v;  sel_b = h3; sel_l = lap <<< 1; end
    endcase
    sum   = sel_a + sel_b + sel_l;
    g_out = clamp_pix(sum >>> 3);
  end
endmodule
