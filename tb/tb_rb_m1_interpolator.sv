// tb_rb_m1_interpolator: random neighbourhoods in all three modes. The
// expected value is computed in floating point as
//   none: D/4 + g - (V + H)/4
//   hor : D/4 + g - (3V + H)/8
//   ver : D/4 + g - (V + 3H)/8
// (D: diagonal sum, V/H: column/row green sums, g: centre green), rounded
// down and saturated to 0..255.
module tb_rb_m1_interpolator;
  import demosaic_pkg::*;
  interp_mode_e mode;
  pix_t rb_ul, rb_ur, rb_dl, rb_dr, g_up, g_dn, g_lf, g_rt, g_c, rb_out;
  int checks = 0, failures = 0;

  rb_m1_interpolator dut (.*);

  initial begin
    for (int n = 0; n < 6000; n++) begin
      real d, v, h, e;
      int  expv;
      mode  = interp_mode_e'(n % 3);
      rb_ul = pix_t'($urandom); rb_ur = pix_t'($urandom);
      rb_dl = pix_t'($urandom); rb_dr = pix_t'($urandom);
      g_up  = pix_t'($urandom); g_dn = pix_t'($urandom);
      g_lf  = pix_t'($urandom); g_rt = pix_t'($urandom);
      g_c   = pix_t'($urandom);
      #1;
      d = real'(rb_ul) + real'(rb_ur) + real'(rb_dl) + real'(rb_dr);
      v = real'(g_up) + real'(g_dn);
      h = real'(g_lf) + real'(g_rt);
      case (mode)
        MODE_NONE: e = d / 4.0 + real'(g_c) - (v + h) / 4.0;
        MODE_HOR:  e = d / 4.0 + real'(g_c) - (3.0 * v + h) / 8.0;
        default:   e = d / 4.0 + real'(g_c) - (v + 3.0 * h) / 8.0;
      endcase
      expv = int'($floor(e));
      if (expv < 0)   expv = 0;
      if (expv > 255) expv = 255;
      checks++;
      if (int'(rb_out) != expv) begin
        failures++;
        if (failures < 10) $display("mode=%s got %0d expected %0d", mode.name(), rb_out, expv);
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
