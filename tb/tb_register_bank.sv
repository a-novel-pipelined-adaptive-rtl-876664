// tb_register_bank: streams random pixels with random gaps into a register
// bank for a 9-pixel-wide image and checks every window position: after
// n accepted pixels, win[r][c] must be the pixel accepted
// (4-c) + (2-r)*IMG_W steps before the newest one.
module tb_register_bank;
  import demosaic_pkg::*;
  localparam int unsigned W = 9;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t pix_in = 0;
  win_t win;
  int checks = 0, failures = 0;
  pix_t hist [$];

  register_bank #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 4) != 0);
      pix_in = pix_t'($urandom);
      if (en) hist.push_back(pix_in);
      @(posedge clk); #1;
      if (hist.size() >= 2 * W + 5) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 5; c++) begin
            automatic int back = (4 - c) + (2 - r) * W;
            checks++;
            if (win[r][c] !== hist[hist.size() - 1 - back]) begin
              failures++;
              if (failures < 10)
                $display("win[%0d][%0d]=%02x expected %02x", r, c, win[r][c],
                         hist[hist.size() - 1 - back]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
