// rb_m1_interpolator: red at blue sites and blue at red sites (RB_M1).
//
// At an R or B centre the opposite colour sits on the four diagonals. With
// D = sum of the four diagonal samples, V = G(i-1,j)+G(i+1,j),
// H = G(i,j-1)+G(i,j+1) and g = the green already interpolated at the
// centre, the three models are
//   MODE_NONE (Eq. 7):  RB = D/4 + g - (V + H)/4   = (2D + 8g - 2V - 2H) / 8
//   MODE_HOR  (Eq. 8):  RB = D/4 + g - (3V + H)/8  = (2D + 8g - 3V -  H) / 8
//   MODE_VER  (Eq. 9):  RB = D/4 + g - (V + 3H)/8  = (2D + 8g -  V - 3H) / 8
// The three share one adder tree: a multiplexer picks the green correction
// term and the sum is shifted right by three bits (arithmetic, rounding
// towards minus infinity) and saturated to the pixel range.
//
// Purely combinational. The equations are the source's; the common /8
// datapath and the saturation are this design's choices.
module rb_m1_interpolator
  import demosaic_pkg::*;
(
  input  interp_mode_e mode,
  input  pix_t rb_ul,     // RB(i-1,j-1)
  input  pix_t rb_ur,     // RB(i-1,j+1)
  input  pix_t rb_dl,     // RB(i+1,j-1)
  input  pix_t rb_dr,     // RB(i+1,j+1)
  input  pix_t g_up,      // G(i-1,j)
  input  pix_t g_dn,      // G(i+1,j)
  input  pix_t g_lf,      // G(i,j-1)
  input  pix_t g_rt,      // G(i,j+1)
  input  pix_t g_c,       // interpolated green at (i,j)
  output pix_t rb_out
);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t d, v, h, corr, sum;

  always_comb begin
    d = sx(rb_ul) + sx(rb_ur) + sx(rb_dl) + sx(rb_dr);
    v = sx(g_up) + sx(g_dn);
    h = sx(g_lf) + sx(g_rt);
    unique case (mode)
      MODE_HOR: corr = v + (v <<< 1) + h;
      MODE_VER: corr = v + h + (h <<< 1);
      default:  corr = (v + h) <<< 1;
    endcase
    sum    = (d <<< 1) + (sx(g_c) <<< 3) - corr;
    rb_out = clamp_pix(sum >>> 3);
  end
endmodule
