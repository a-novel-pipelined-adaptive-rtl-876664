// rb_m3_interpolator: red or blue at a green site whose left and right
// neighbours carry that colour (RB_M3, Eq. 11).
//
//   RB = (RB(i,j-1) + RB(i,j+1))/2 + G(i,j) - (g(i,j-1) + g(i,j+1))/2
// where g(i,j-1) and g(i,j+1) are the greens already interpolated by the
// G interpolator at the two neighbouring R/B sites (colour-difference
// interpolation along the row). Computed as
// ((left + right) + 2*G - (gl + gr)) >>> 1 and saturated to the pixel range.
//
// Purely combinational; the surrounding pipeline supplies the two
// interpolated greens from a one-cycle-later and a one-cycle-earlier
// G interpolator result. The equation is the source's (its second green term
// is read as the interpolated g(i,j+1), since no green sample exists there);
// the scaling and saturation are this design's choices.
module rb_m3_interpolator
  import demosaic_pkg::*;
(
  input  pix_t rb_lf,     // RB(i,j-1)
  input  pix_t rb_rt,     // RB(i,j+1)
  input  pix_t g_c,       // G(i,j)
  input  pix_t gi_lf,     // interpolated g(i,j-1)
  input  pix_t gi_rt,     // interpolated g(i,j+1)
  output pix_t rb_out
);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t sum;

  always_comb begin
    sum    = sx(rb_lf) + sx(rb_rt) + (sx(g_c) <<< 1) - sx(gi_lf) - sx(gi_rt);
    rb_out = clamp_pix(sum >>> 1);
  end
endmodule
