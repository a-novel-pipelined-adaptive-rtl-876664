// tb_edge_detector: drives random neighbourhoods with random enable gaps
// and checks DH, DV and TD against the difference sums
//   DH = |P(i+1,j+1)-P(i+1,j-1)| + |P(i,j+1)-P(i,j-1)| + |P(i-1,j+1)-P(i-1,j-1)|
//   DV = |P(i-1,j-1)-P(i+1,j-1)| + |P(i-1,j)-P(i+1,j)| + |P(i-1,j+1)-P(i+1,j+1)|
//   TD = DH + DV
// computed here with integers. The result for a set of inputs must appear
// exactly four enabled cycles after it was presented (random data makes
// any other latency mismatch).
module tb_edge_detector;
  import demosaic_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t p [8];
  logic [DIR_W-1:0] dh, dv;
  logic [TD_W-1:0]  td;
  int checks = 0, failures = 0;
  int exp_dh [$], exp_dv [$], exp_td [$];

  edge_detector dut (.*);

  always #5 clk = ~clk;

  function automatic int ad(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    for (int k = 0; k < 8; k++) p[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 8; k++)
        p[k] = (n % 7 == 0) ? pix_t'($urandom_range(0, 1) * 255) : pix_t'($urandom);
      if (en) begin
        // p0=P(i-1,j+1) p1=P(i-1,j-1) p2=P(i,j+1) p3=P(i,j-1)
        // p4=P(i+1,j-1) p5=P(i+1,j+1) p6=P(i-1,j) p7=P(i+1,j)
        automatic int h = ad(p[5], p[4]) + ad(p[2], p[3]) + ad(p[0], p[1]);
        automatic int v = ad(p[1], p[4]) + ad(p[6], p[7]) + ad(p[0], p[5]);
        exp_dh.push_back(h);
        exp_dv.push_back(v);
        exp_td.push_back(h + v);
      end
      @(posedge clk); #1;
      if (en && exp_dh.size() >= 4) begin
        automatic int k = exp_dh.size() - 4;   // presented four enables ago
        checks++;
        if (int'(dh) != exp_dh[k] || int'(dv) != exp_dv[k] || int'(td) != exp_td[k]) begin
          failures++;
          if (failures < 10)
            $display("n=%0d dh=%0d dv=%0d td=%0d expected %0d %0d %0d", n, dh, dv, td,
                     exp_dh[k], exp_dv[k], exp_td[k]);
        end
      end
    end
    // Directed case: the sample values p0..p4 = 3D D9 8A 8E 8F of the
    // reference waveform, completed with p5=36, p6=5B, p7=00, must give
    // DV = 0xAC and, in their low bits as shown there, TD[7:0] = 0xA5 and
    // DH[2:0] = 3'b001.
    @(negedge clk);
    en = 1;
    p = '{8'h3D, 8'hD9, 8'h8A, 8'h8E, 8'h8F, 8'h36, 8'h5B, 8'h00};
    for (int s = 0; s < 4; s++) begin
      @(posedge clk); #1;
      @(negedge clk);
      p = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    end
    checks++;
    if (dv != DIR_W'(8'hAC) || td[7:0] != 8'hA5 || dh[2:0] != 3'b001) begin
      failures++;
      $display("waveform case: dh=%0h dv=%0h td=%0h", dh, dv, td);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
