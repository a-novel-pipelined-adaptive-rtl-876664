// register_bank: 3x5 sliding window over a raster-scan Bayer stream.
//
// Fifteen pixel registers are arranged as three shift rows of five
// (Reg 04..00, Reg 14..10, Reg 24..20). When `en` is high the new CFA pixel,
// P(i+1, j+3), enters the bottom row at Reg 24 and every row shifts one
// place towards column j-2. The sample leaving the bottom row (Reg 20) is
// written into line buffer 2, whose output enters the middle row at Reg 14;
// the sample leaving the middle row (Reg 10) goes into line buffer 1, whose
// output enters the top row at Reg 04. Each row plus its line buffer is one
// image row (IMG_W samples) long, so the three rows always hold the same
// five columns of three consecutive image rows.
//
// Interface: one pixel in per enabled cycle, all fifteen samples out as
// win[row][col] (row 0 = i-1, col 0 = j-2). The window is a register
// output: it shows the state after the last enabled clock edge.
// The register/line-buffer arrangement follows the register-bank figure;
// the line-buffer length of IMG_W-5 is what makes that arrangement
// a one-row delay.
module register_bank
  import demosaic_pkg::*;
#(
  parameter int unsigned IMG_W = 1920
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t pix_in,
  output win_t win
);
  pix_t lb1_out, lb2_out;

  line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W - 5)) u_lb1 (
    .clk, .rst_n, .en, .din(win[1][0]), .dout(lb1_out)
  );
  line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W - 5)) u_lb2 (
    .clk, .rst_n, .en, .din(win[2][0]), .dout(lb2_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 5; c++) win[r][c] <= '0;
    end else if (en) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
      win[0][4] <= lb1_out;
      win[1][4] <= lb2_out;
      win[2][4] <= pix_in;
    end
  end

  initial assert (IMG_W >= 6) else $error("register_bank: IMG_W must be at least 6");
endmodule
