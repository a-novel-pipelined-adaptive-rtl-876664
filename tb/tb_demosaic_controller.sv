// tb_demosaic_controller: runs three 8x4 frames with random input gaps.
// Checks, cycle by cycle:
//   - adv is high exactly when a pixel is accepted or the FSM is flushing,
//   - in_ready is low only while flushing,
//   - each frame takes W*H accepted pixels followed by W+2+6 flush steps,
//   - after step a of a frame the centre tag is position a-(W+2) in raster
//     order when that lies inside the frame, and invalid otherwise.
// Input stalls must have happened during the run.
module tb_demosaic_controller;
  import demosaic_pkg::*;
  localparam int unsigned W = 8, H = 4, TAIL = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, adv, flushing;
  pos_t centre;
  int checks = 0, failures = 0, stalls = 0, flush_steps = 0;

  demosaic_controller #(.IMG_W(W), .IMG_H(H), .PIPE_TAIL(TAIL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int a = 0;
      int accepted = 0;
      int flushed = 0;
      while (a < W * H + W + 2 + TAIL) begin
        bit took;
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        #1;
        check(adv == (flushing || in_valid), "adv does not follow input/flush");
        check(in_ready == !flushing, "in_ready not the inverse of flushing");
        check(flushing == (a >= W * H), "flush state at the wrong step");
        if (!adv) stalls++;
        took = adv;
        if (in_valid && in_ready) accepted++;
        if (flushing) begin flushed++; flush_steps++; end
        @(posedge clk); #1;
        if (took) begin
          automatic int ci = a - int'(W + 2);
          if (ci >= 0 && ci < int'(W * H))
            check(centre.valid && centre.row == POS_W'(ci / W) && centre.col == POS_W'(ci % W),
                  $sformatf("centre tag wrong at step %0d", a));
          else
            check(!centre.valid, $sformatf("centre tag valid at step %0d", a));
          a++;
        end
      end
      check(accepted == W * H, "wrong number of accepted pixels");
      check(flushed == W + 2 + TAIL, "wrong flush length");
    end
    if (stalls == 0 || flush_steps == 0) begin
      failures++;
      $display("stalls=%0d flush steps=%0d: mechanism not exercised", stalls, flush_steps);
    end
    $display("stalls=%0d flush steps=%0d", stalls, flush_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
