// tb_output_mux: for each of the four Bayer sites, checks that R, G and B
// come from the source the site calls for (raw sample, G interpolator,
// RB_M1, RB_M2 or RB_M3), using distinct random values on every input.
module tb_output_mux;
  import demosaic_pkg::*;
  cfa_site_e site;
  pix_t raw, g_int, rb_m1, rb_m2, rb_m3;
  rgb_t rgb;
  int checks = 0, failures = 0;

  output_mux dut (.*);

  task automatic expect_rgb(pix_t r, pix_t g, pix_t b);
    checks++;
    if (rgb.r !== r || rgb.g !== g || rgb.b !== b) begin
      failures++;
      $display("site=%s got %02x %02x %02x expected %02x %02x %02x", site.name(),
               rgb.r, rgb.g, rgb.b, r, g, b);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      raw = 8'd10 + 8'(n % 40); g_int = 8'd60 + 8'(n % 40); rb_m1 = 8'd110 + 8'(n % 40);
      rb_m2 = 8'd160 + 8'(n % 40); rb_m3 = 8'd210 + 8'(n % 40);
      site = cfa_site_e'(n % 4);
      #1;
      case (site)
        SITE_B:  expect_rgb(rb_m1, g_int, raw);
        SITE_R:  expect_rgb(raw, g_int, rb_m1);
        SITE_GB: expect_rgb(rb_m2, raw, rb_m3);
        default: expect_rgb(rb_m3, raw, rb_m2);
      endcase
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
