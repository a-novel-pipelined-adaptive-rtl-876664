// output_mux: the two output multiplexers (green, and red/blue) that
// assemble the RGB pixel from the raw sample and the interpolator results.
//
// The CFA site of the output pixel selects the sources:
//   B site  : B = raw, G = G interpolator, R = RB_M1
//   R site  : R = raw, G = G interpolator, B = RB_M1
//   G site in a blue row : G = raw, B = RB_M3 (row neighbours are blue),
//                          R = RB_M2 (column neighbours are red)
//   G site in a red row  : G = raw, R = RB_M3, B = RB_M2
// Purely combinational; the select comes from the controller's position
// tag. The two multiplexers are the source's; the select encoding is this
// design's choice.
module output_mux
  import demosaic_pkg::*;
(
  input  cfa_site_e site,
  input  pix_t      raw,     // CFA sample at the pixel
  input  pix_t      g_int,   // G interpolator result
  input  pix_t      rb_m1,   // opposite colour at an R/B site
  input  pix_t      rb_m2,   // colour of the column neighbours at a G site
  input  pix_t      rb_m3,   // colour of the row neighbours at a G site
  output rgb_t      rgb
);
  always_comb begin
    unique case (site)
      SITE_B:  rgb = '{r: rb_m1, g: g_int, b: raw};
      SITE_R:  rgb = '{r: raw,   g: g_int, b: rb_m1};
      SITE_GB: rgb = '{r: rb_m2, g: raw,   b: rb_m3};
      default: rgb = '{r: rb_m3, g: raw,   b: rb_m2};   // SITE_GR
    endcase
  end
endmodule
