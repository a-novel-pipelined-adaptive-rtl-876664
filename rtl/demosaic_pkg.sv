// demosaic_pkg: types, constants and small helper functions shared by the
// adaptive edge-enhanced Bayer colour interpolation processor.
//
// Pixels are PIX_W-bit unsigned samples (8 bits, as in the edge-detector
// waveform the design is based on). The 3x5 CFA window is held as
// win[row][col] with row 0..2 = image rows i-1, i, i+1 and col 0..4 =
// image columns j-2 .. j+2, so win[1][2] is the centre sample P(i,j).
// The Bayer phase follows the classic layout B at (even,even),
// R at (odd,odd) and G elsewhere.
//
// The interpolation model (no edge / horizontal / vertical) is chosen from
// the edge detector's TD, DH and DV values; the choice is encoded as
// interp_mode_e and shared by the G and RB_M1 interpolators.
package demosaic_pkg;

  localparam int unsigned PIX_W = 8;             // sample width
  localparam int unsigned DIR_W = PIX_W + 2;     // DH / DV: sum of three |differences|
  localparam int unsigned TD_W  = PIX_W + 3;     // TD = DH + DV
  localparam int unsigned ACC_W = PIX_W + 6;     // signed accumulator width of the interpolators

  typedef logic [PIX_W-1:0] pix_t;
  typedef pix_t win_row_t [5];
  typedef win_row_t win_t [3];

  typedef enum logic [1:0] {
    MODE_NONE = 2'd0,   // TD below threshold: isotropic weighting, Eq. (4) / (7)
    MODE_HOR  = 2'd1,   // edge, DH < DV: horizontal enhancement, Eq. (5) / (8)
    MODE_VER  = 2'd2    // edge, DH > DV: vertical enhancement,   Eq. (6) / (9)
  } interp_mode_e;

  typedef enum logic [1:0] {
    SITE_B   = 2'd0,    // blue sample  (even row, even column)
    SITE_GB  = 2'd1,    // green sample in a blue row (even row, odd column)
    SITE_GR  = 2'd2,    // green sample in a red row  (odd row, even column)
    SITE_R   = 2'd3     // red sample   (odd row, odd column)
  } cfa_site_e;

  // Image position of a window centre as it travels down the pipeline.
  localparam int unsigned POS_W = 16;
  typedef struct packed {
    logic             valid;   // centre lies inside the frame
    logic [POS_W-1:0] row;
    logic [POS_W-1:0] col;
  } pos_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // CFA site of image position (row, col).
  function automatic cfa_site_e site_of(input logic row_lsb, input logic col_lsb);
    return cfa_site_e'({row_lsb, col_lsb});
  endfunction

  // Model choice: edge enhancement only when enabled and TD exceeds the
  // threshold; the direction with the smaller difference is interpolated
  // along. Ties (TD equal to the threshold, DH equal to DV) use the
  // isotropic model.
  function automatic interp_mode_e select_mode(input logic edge_en,
                                               input logic [TD_W-1:0] td,
                                               input logic [DIR_W-1:0] dh,
                                               input logic [DIR_W-1:0] dv,
                                               input logic [TD_W-1:0] threshold);
    if (!edge_en || td <= threshold) return MODE_NONE;
    if (dh < dv) return MODE_HOR;
    if (dh > dv) return MODE_VER;
    return MODE_NONE;
  endfunction

  // Saturate a signed accumulator to the pixel range.
  function automatic pix_t clamp_pix(input logic signed [ACC_W-1:0] v);
    if (v < 0) return '0;
    if (v > $signed({{(ACC_W - PIX_W){1'b0}}, {PIX_W{1'b1}}})) return '1;
    return v[PIX_W-1:0];
  endfunction

  // Zero-extend a pixel into the signed accumulator width.
  function automatic logic signed [ACC_W-1:0] sx(input pix_t p);
    return $signed({{(ACC_W - PIX_W){1'b0}}, p});
  endfunction

endpackage
