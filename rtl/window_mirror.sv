// window_mirror: border handling for the 3x5 CFA window.
//
// Samples of the window that fall outside the frame are replaced by the
// sample mirrored about the border row or column, two positions away for a
// one-step overhang and so on (row -1 -> row 1, column -2 -> column 2,
// column W -> column W-2, ...). Mirroring by an even distance keeps the
// Bayer colour of every position, so the interpolators see a valid mosaic
// at the frame edges. The window columns that overhang the left or right
// border hold samples of the neighbouring image row (the register bank
// runs on across row ends), and the top row overhangs into the previous
// frame; all of them are replaced here.
//
// Purely combinational, controlled by the centre position. The source
// does not describe border handling; this mirroring is this design's
// choice.
module window_mirror
  import demosaic_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
) (
  input  logic [POS_W-1:0] row,   // centre position
  input  logic [POS_W-1:0] col,
  input  win_t win_in,
  output win_t win_out
);
  logic top, bot, c0, c1, cw2, cw1;

  // source row / column of each window position
  function automatic logic [1:0] row_src(input int unsigned r, input logic t, input logic b);
    if (r == 0 && t) return 2'd2;
    if (r == 2 && b) return 2'd0;
    return 2'(r);
  endfunction

  function automatic logic [2:0] col_src(input int unsigned c, input logic l0, input logic l1,
                                         input logic r1, input logic r0);
    if (c == 0 && l0) return 3'd4;
    if (c == 0 && l1) return 3'd2;
    if (c == 1 && l0) return 3'd3;
    if (c == 3 && r0) return 3'd1;
    if (c == 4 && r0) return 3'd0;
    if (c == 4 && r1) return 3'd2;
    return 3'(c);
  endfunction

  always_comb begin
    top = (row == '0);
    bot = (row == POS_W'(IMG_H - 1));
    c0  = (col == '0);
    c1  = (col == POS_W'(1));
    cw2 = (col == POS_W'(IMG_W - 2));
    cw1 = (col == POS_W'(IMG_W - 1));
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 5; c++)
        win_out[r][c] = win_in[row_src(r, top, bot)][col_src(c, c0, c1, cw2, cw1)];
  end
endmodule
