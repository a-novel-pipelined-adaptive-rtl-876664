// tb_demosaic_top: end-to-end test of the colour interpolation processor
// on small frames (20 x 12), four frames back to back:
//   frame 0: edge enhancement on, random input gaps (stalls)
//   frame 1: edge enhancement off (isotropic model only), random gaps
//   frame 2: edge enhancement on, pixels offered every cycle
//   frame 3: edge enhancement on, pure random content, random gaps
// The images mix flat areas with noise, vertical and horizontal stripes,
// random texture and full-scale spots. Every output pixel is compared
// with the frame-level reference model (demosaic_ref_pkg), its position
// must follow raster order, its reported interpolation model must match
// the reference at R/B sites, and it must leave exactly IMG_W + 8 steps
// after its CFA sample entered. The test also counts how often each
// mechanism happened - stalls, flushes, the three interpolation models,
// the edge-enhancement-off mode, the four frame borders, the four Bayer
// sites and output saturation - and fails if any of them never did.
module tb_demosaic_top;
  import demosaic_pkg::*;
  import demosaic_ref_pkg::*;

  localparam int unsigned W = 20, H = 12, THR = 64, NF = 4;
  localparam int unsigned NPIX = W * H;
  localparam int unsigned STEPS_PER_FRAME = NPIX + W + 8;

  logic clk = 0, rst_n = 0, edge_en = 1, in_valid = 0;
  logic in_ready, out_valid, flushing;
  pix_t in_pix = 0;
  rgb_t out_rgb;
  logic [POS_W-1:0] out_row, out_col;
  interp_mode_e out_mode;

  demosaic_top #(.IMG_W(W), .IMG_H(H), .THRESHOLD(THR)) dut (.*);

  always #5 clk = ~clk;

  demosaic_ref refs [NF];
  int checks = 0, failures = 0;
  longint steps = 0;          // pipeline steps taken so far
  int outputs = 0;
  int n_stall = 0, n_flush = 0, n_mode [3] = '{0, 0, 0}, n_edge_off = 0;
  int n_top = 0, n_bot = 0, n_left = 0, n_right = 0, n_sat = 0, n_site [4] = '{0, 0, 0, 0};
  bit stall_frame [NF] = '{1, 1, 0, 1};

  function automatic byte unsigned gen(int f, int r, int c);
    int zone;
    if (f == 3) return 8'($urandom);
    zone = ((r / 4) * 3 + (c / 7) + f) % 6;
    case (zone)
      0: return 8'(100 + $urandom_range(0, 6));                   // flat
      1: return ((c / 2) % 2) ? 8'd220 : 8'd30;                   // vertical stripes
      2: return ((r / 2) % 2) ? 8'd210 : 8'd40;                   // horizontal stripes
      3: return 8'($urandom);                                     // texture
      4: return ((r + c) % 5 == 0) ? 8'd255 : 8'd0;               // spots
      default: return 8'(c * 12 + r * 3);                         // ramp
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, what);
    end
  endtask

  // step counter: the pipeline moves on an accepted pixel or a flush cycle
  always @(posedge clk) if (rst_n && ((in_valid && in_ready) || flushing)) steps <= steps + 1;
  always @(posedge clk) if (rst_n && flushing) n_flush++;

  // driver
  initial begin
    for (int f = 0; f < NF; f++) begin
      refs[f] = new(W, H, THR);
      refs[f].edge_en = (f != 1);
      for (int r = 0; r < int'(H); r++)
        for (int c = 0; c < int'(W); c++) refs[f].img[r * W + c] = gen(f, r, c);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      edge_en = refs[f].edge_en;
      for (int k = 0; k < int'(NPIX); k++) begin
        if (stall_frame[f])
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 0;
            n_stall++;
            @(negedge clk);
          end
        in_valid = 1;
        in_pix   = refs[f].img[k];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic int f  = outputs / NPIX;
      automatic int k  = outputs % NPIX;
      automatic int er = k / W, ec = k % W;
      automatic bit [23:0] e;
      check(int'(out_row) == er && int'(out_col) == ec,
            $sformatf("position %0d,%0d expected %0d,%0d", out_row, out_col, er, ec));
      e = refs[f].expected(er, ec);
      check(out_rgb == e, $sformatf("frame %0d pixel (%0d,%0d): rgb %06x expected %06x",
                                    f, er, ec, out_rgb, e));
      check(steps == longint'(f) * STEPS_PER_FRAME + k + W + 9,
            $sformatf("pixel %0d left after %0d steps", outputs, steps));
      if (refs[f].mode_used >= 0) begin
        check(int'(out_mode) == refs[f].mode_used, "interpolation model differs");
        if (refs[f].edge_en) n_mode[refs[f].mode_used]++;
        else n_edge_off++;
      end
      if (refs[f].saturated) n_sat++;
      if (er == 0) n_top++;
      if (er == int'(H) - 1) n_bot++;
      if (ec == 0) n_left++;
      if (ec == int'(W) - 1) n_right++;
      n_site[(er % 2) * 2 + (ec % 2)]++;
      outputs++;
      if (outputs == int'(NF * NPIX)) begin
        $display("stalls=%0d flush=%0d none=%0d hor=%0d ver=%0d edge_off=%0d sat=%0d",
                 n_stall, n_flush, n_mode[0], n_mode[1], n_mode[2], n_edge_off, n_sat);
        $display("borders top=%0d bottom=%0d left=%0d right=%0d sites B=%0d GB=%0d GR=%0d R=%0d",
                 n_top, n_bot, n_left, n_right, n_site[0], n_site[1], n_site[2], n_site[3]);
        foreach (n_mode[m]) check(n_mode[m] > 0, "an interpolation model never used");
        check(n_stall > 0 && n_flush > 0, "no stall or no flush");
        check(n_edge_off > 0 && n_sat > 0, "edge-off mode or saturation never seen");
        check(n_top > 0 && n_bot > 0 && n_left > 0 && n_right > 0, "a border never seen");
        foreach (n_site[s]) check(n_site[s] > 0, "a Bayer site never seen");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NF * STEPS_PER_FRAME * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d outputs", outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
