// tb_rb_m2_interpolator: random neighbourhoods; expected value
//   (up + down)/2 + G/2 - (sum of the four diagonal greens)/8
// computed in floating point, rounded down and saturated to 0..255.
module tb_rb_m2_interpolator;
  import demosaic_pkg::*;
  pix_t rb_up, rb_dn, g_c, g_ul, g_ur, g_dl, g_dr, rb_out;
  int checks = 0, failures = 0;

  rb_m2_interpolator dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real e;
      int  expv;
      rb_up = pix_t'($urandom); rb_dn = pix_t'($urandom); g_c = pix_t'($urandom);
      g_ul  = pix_t'($urandom); g_ur = pix_t'($urandom);
      g_dl  = pix_t'($urandom); g_dr = pix_t'($urandom);
      if (n % 4 == 0) begin g_ul = 255; g_ur = 255; g_dl = 255; g_dr = 255; g_c = 0; end
      #1;
      e = (real'(rb_up) + real'(rb_dn)) / 2.0 + real'(g_c) / 2.0
          - (real'(g_ul) + real'(g_ur) + real'(g_dl) + real'(g_dr)) / 8.0;
      expv = int'($floor(e));
      if (expv < 0)   expv = 0;
      if (expv > 255) expv = 255;
      checks++;
      if (int'(rb_out) != expv) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d in %0d %0d %0d %0d %0d %0d %0d", rb_out, expv, rb_up, rb_dn, g_c, g_ul, g_ur, g_dl, g_dr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
