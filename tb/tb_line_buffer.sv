// tb_line_buffer: checks that the line buffer is an exact DEPTH-step delay
// under irregular enables. A queue model holds every word written; once
// DEPTH words are in, the output must equal the word written DEPTH enables
// earlier. Enables are random so the memory must hold its state when idle.
module tb_line_buffer;
  localparam int unsigned DEPTH = 7;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  line_buffer #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      #1;
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            $display("mismatch at write %0d: dout=%02x expected %02x", hist.size(), dout,
                     hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(din);
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
