// tb_g_interpolator: random and extreme neighbourhoods in all three modes.
// The expected green is computed in floating point from the weighted sums
//   none: 3/8*H + 1/8*V + 1/4*L
//   hor : 1/2*H         + 1/4*L
//   ver : 1/8*H + 3/8*V + 1/8*L
// (H, V: sums of the row / column green neighbours, L = 2*c - l2 - r2),
// rounded down and saturated to 0..255. All weights are multiples of 1/8,
// so the floating-point sums are exact.
module tb_g_interpolator;
  import demosaic_pkg::*;
  interp_mode_e mode;
  pix_t g_up, g_dn, g_lf, g_rt, rb_c, rb_l2, rb_r2, g_out;
  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;

  g_interpolator dut (.*);

  function automatic pix_t pick(int n);
    case (n % 5)
      0: return 8'd0;
      1: return 8'd255;
      default: return pix_t'($urandom);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 6000; n++) begin
      real h, v, l, e;
      int  expv;
      mode = interp_mode_e'(n % 3);
      g_up = pick($urandom); g_dn = pick($urandom); g_lf = pick($urandom); g_rt = pick($urandom);
      rb_c = pick($urandom); rb_l2 = pick($urandom); rb_r2 = pick($urandom);
      #1;
      h = real'(g_lf) + real'(g_rt);
      v = real'(g_up) + real'(g_dn);
      l = 2.0 * real'(rb_c) - real'(rb_l2) - real'(rb_r2);
      case (mode)
        MODE_NONE: e = 0.375 * h + 0.125 * v + 0.25 * l;
        MODE_HOR:  e = 0.5 * h + 0.25 * l;
        default:   e = 0.125 * h + 0.375 * v + 0.125 * l;
      endcase
      expv = int'($floor(e));
      if (expv < 0)   begin expv = 0;   sat_lo++; end
      if (expv > 255) begin expv = 255; sat_hi++; end
      checks++;
      if (int'(g_out) != expv) begin
        failures++;
        if (failures < 10) $display("mode=%s got %0d expected %0d", mode.name(), g_out, expv);
      end
    end
    if (sat_lo == 0 || sat_hi == 0) begin
      failures++;
      $display("saturation not exercised lo=%0d hi=%0d", sat_lo, sat_hi);
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
