// demosaic_top: streaming adaptive edge-enhanced colour interpolation
// processor for a Bayer colour filter array (B at even/even, R at odd/odd).
//
// One CFA sample enters per accepted cycle and one full RGB pixel leaves
// per step, in raster order. The datapath:
//   register bank (3x5 window, two line buffers)
//     -> border mirroring
//     -> pipelined edge detector (DH, DV, TD; 4 steps) while the window is
//        carried along a 4-step delay line
//     -> step 4: model choice (none / horizontal / vertical) from TD, DH,
//        DV and the THRESHOLD; G interpolator (Eq. 4-6), RB_M1 (Eq. 7-9)
//        and RB_M2 (Eq. 10) work on the same window
//     -> step 5: the results are registered; RB_M3 (Eq. 11) needs the
//        interpolated green of both row neighbours, so it runs here, taking
//        g(i,j-1) from the step-5 register of one step earlier and g(i,j+1)
//        straight from the G interpolator, which by then works on the next
//        pixel
//     -> output multiplexers and output register (step 6).
// All registers move together on the controller's `adv` (an accepted input
// pixel, or a flush step after the end of a frame), so input stalls freeze
// the whole pipeline. Each pixel leaves IMG_W + 2 + 6 steps after its CFA
// sample entered; after the last sample of a frame the controller flushes
// for IMG_W + 8 cycles with `in_ready` low.
//
// `edge_en` = 1 selects the adaptive edge-enhanced interpolation; with 0
// every pixel uses the isotropic model (the design without edge
// enhancement). `out_mode` reports the model used for the pixel on the
// output (meaningful at R/B sites).
//
// The block structure, equations and register bank follow the source. The
// threshold value, border mirroring, saturation, flush and the exact
// pipeline alignment are this design's choices.
module demosaic_top
  import demosaic_pkg::*;
#(
  parameter int unsigned IMG_W     = 1920,
  parameter int unsigned IMG_H     = 1080,
  parameter int unsigned THRESHOLD = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             edge_en,
  input  logic             in_valid,
  output logic             in_ready,
  input  pix_t             in_pix,
  output logic             out_valid,
  output rgb_t             out_rgb,
  output logic [POS_W-1:0] out_row,
  output logic [POS_W-1:0] out_col,
  output interp_mode_e     out_mode,
  output logic             flushing
);
  localparam int unsigned ED_LAT = 4;   // edge detector steps

  logic adv;
  pos_t centre;

  demosaic_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIPE_TAIL(ED_LAT + 2)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .adv, .flushing, .centre
  );

  // ---------------------------------------------------------------- window
  win_t win_raw, win0;

  register_bank #(.IMG_W(IMG_W)) u_bank (
    .clk, .rst_n, .en(adv), .pix_in(in_pix), .win(win_raw)
  );

  window_mirror #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mirror (
    .row(centre.row), .col(centre.col), .win_in(win_raw), .win_out(win0)
  );

  // ---------------------------------------------------------- edge detector
  pix_t             ed_p [8];
  logic [DIR_W-1:0] dh, dv;
  logic [TD_W-1:0]  td;

  assign ed_p = '{win0[0][3], win0[0][1], win0[1][3], win0[1][1],
                  win0[2][1], win0[2][3], win0[0][2], win0[2][2]};

  edge_detector u_edge (.clk, .rst_n, .en(adv), .p(ed_p), .dh, .dv, .td);

  // window and position delay line matching the edge detector
  win_t win_d [1:ED_LAT];
  pos_t pos_d [1:ED_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= ED_LAT; k++) begin
        pos_d[k] <= '0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 5; c++) win_d[k][r][c] <= '0;
      end
    end else if (adv) begin
      win_d[1] <= win0;
      pos_d[1] <= centre;
      for (int k = 2; k <= ED_LAT; k++) begin
        win_d[k] <= win_d[k-1];
        pos_d[k] <= pos_d[k-1];
      end
    end
  end

  // ------------------------------------------------ step 4: interpolators
  win_t         w4;
  interp_mode_e mode4;
  pix_t         g4, rb1_4, rb2_4;

  assign w4    = win_d[ED_LAT];
  assign mode4 = select_mode(edge_en, td, dh, dv, TD_W'(THRESHOLD));

  g_interpolator u_g (
    .mode(mode4),
    .g_up(w4[0][2]), .g_dn(w4[2][2]), .g_lf(w4[1][1]), .g_rt(w4[1][3]),
    .rb_c(w4[1][2]), .rb_l2(w4[1][0]), .rb_r2(w4[1][4]),
    .g_out(g4)
  );

  rb_m1_interpolator u_rb_m1 (
    .mode(mode4),
    .rb_ul(w4[0][1]), .rb_ur(w4[0][3]), .rb_dl(w4[2][1]), .rb_dr(w4[2][3]),
    .g_up(w4[0][2]), .g_dn(w4[2][2]), .g_lf(w4[1][1]), .g_rt(w4[1][3]),
    .g_c(g4),
    .rb_out(rb1_4)
  );

  rb_m2_interpolator u_rb_m2 (
    .rb_up(w4[0][2]), .rb_dn(w4[2][2]), .g_c(w4[1][2]),
    .g_ul(w4[0][1]), .g_ur(w4[0][3]), .g_dl(w4[2][1]), .g_dr(w4[2][3]),
    .rb_out(rb2_4)
  );

  // ------------------------------------------------- step 5: registers
  pix_t         raw5, rb_l5, rb_r5, g5, g6, rb1_5, rb2_5;
  pos_t         pos5;
  interp_mode_e mode5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {raw5, rb_l5, rb_r5, g5, g6, rb1_5, rb2_5} <= '0;
      pos5  <= '0;
      mode5 <= MODE_NONE;
    end else if (adv) begin
      raw5  <= w4[1][2];
      rb_l5 <= w4[1][1];
      rb_r5 <= w4[1][3];
      g5    <= g4;       // g(i,j) register
      g6    <= g5;       // g(i,j-1) register
      rb1_5 <= rb1_4;
      rb2_5 <= rb2_4;
      pos5  <= pos_d[ED_LAT];
      mode5 <= mode4;
    end
  end

  // RB_M3 for the step-5 pixel: neighbours' interpolated greens, mirrored
  // at the left and right frame borders.
  pix_t gi_lf, gi_rt, rb3_5;

  assign gi_lf = (pos5.col == '0)                 ? g4 : g6;
  assign gi_rt = (pos5.col == POS_W'(IMG_W - 1))  ? g6 : g4;

  rb_m3_interpolator u_rb_m3 (
    .rb_lf(rb_l5), .rb_rt(rb_r5), .g_c(raw5), .gi_lf, .gi_rt, .rb_out(rb3_5)
  );

  rgb_t rgb5;

  output_mux u_mux (
    .site(site_of(pos5.row[0], pos5.col[0])),
    .raw(raw5), .g_int(g5), .rb_m1(rb1_5), .rb_m2(rb2_5), .rb_m3(rb3_5),
    .rgb(rgb5)
  );

  // ------------------------------------------------ step 6: output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_row   <= '0;
      out_col   <= '0;
      out_mode  <= MODE_NONE;
    end else begin
      out_valid <= adv && pos5.valid;
      if (adv) begin
        out_rgb  <= rgb5;
        out_row  <= pos5.row;
        out_col  <= pos5.col;
        out_mode <= mode5;
      end
    end
  end

  // An accepted pixel is never dropped: input handshake is honoured.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> adv);
  // No input is taken while the tail of a frame is flushed.
  assert property (@(posedge clk) disable iff (!rst_n) flushing |-> !in_ready);
endmodule
