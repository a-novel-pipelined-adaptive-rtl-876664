// tb_rb_m3_interpolator: random neighbourhoods; expected value
//   (left + right)/2 + G - (g_left + g_right)/2
// computed in floating point, rounded down and saturated to 0..255.
module tb_rb_m3_interpolator;
  import demosaic_pkg::*;
  pix_t rb_lf, rb_rt, g_c, gi_lf, gi_rt, rb_out;
  int checks = 0, failures = 0;

  rb_m3_interpolator dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real e;
      int  expv;
      rb_lf = pix_t'($urandom); rb_rt = pix_t'($urandom); g_c = pix_t'($urandom);
      gi_lf = pix_t'($urandom); gi_rt = pix_t'($urandom);
      #1;
      e = (real'(rb_lf) + real'(rb_rt)) / 2.0 + real'(g_c) - (real'(gi_lf) + real'(gi_rt)) / 2.0;
      expv = int'($floor(e));
      if (expv < 0)   expv = 0;
      if (expv > 255) expv = 255;
      checks++;
      if (int'(rb_out) != expv) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", rb_out, expv);
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
