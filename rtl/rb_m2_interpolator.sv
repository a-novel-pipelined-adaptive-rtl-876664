// rb_m2_interpolator: red or blue at a green site whose upper and lower
// neighbours carry that colour (RB_M2, Eq. 10).
//
//   RB = (RB(i-1,j) + RB(i+1,j))/2 + G(i,j)/2
//        - (G(i-1,j-1) + G(i-1,j+1) + G(i+1,j-1) + G(i+1,j+1))/8
// computed as (4*(up+down) + 4*G - diagonal-sum) >>> 3 and saturated to the
// pixel range. At a green site of a Bayer mosaic the four diagonals are
// green too, so the last term is a local green mean used as a correction.
//
// Purely combinational. The equation is the source's; the common /8
// scaling and saturation are this design's choices.
module rb_m2_interpolator
  import demosaic_pkg::*;
(
  input  pix_t rb_up,     // RB(i-1,j)
  input  pix_t rb_dn,     // RB(i+1,j)
  input  pix_t g_c,       // G(i,j)
  input  pix_t g_ul,      // G(i-1,j-1)
  input  pix_t g_ur,      // G(i-1,j+1)
  input  pix_t g_dl,      // G(i+1,j-1)
  input  pix_t g_dr,      // G(i+1,j+1)
  output pix_t rb_out
);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t vs, gd, sum;

  always_comb begin
    vs     = sx(rb_up) + sx(rb_dn);
    gd     = sx(g_ul) + sx(g_ur) + sx(g_dl) + sx(g_dr);
    sum    = (vs <<< 2) + (sx(g_c) <<< 2) - gd;
    rb_out = clamp_pix(sum >>> 3);
  end
endmodule
