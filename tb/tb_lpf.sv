// tb_lpf: checks the moving-average low-pass filter.
//
// Random samples (including full-scale ones) are applied and the output
// must be floor(sum of the last four inputs / 4) one cycle later. A
// component at half the sample rate (+A, -A, ...) must be removed
// completely, as needed to suppress the double-carrier product term.
`timescale 1ns/1ps
module tb_lpf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [15:0] din = 0, dout;
  lpf dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[$];
  initial begin
    int s, want;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) hist.push_front(0);
    for (int k = 0; k < 4000; k++) begin
      if (k < 2000) din = (k % 97 < 4) ? -16'sd32768 : 16'($urandom);
      else          din = (k % 2) ? 16'sd3000 : -16'sd3000;
      hist.push_front(int'(din));
      @(negedge clk);
      s = hist[0] + hist[1] + hist[2] + hist[3];
      want = (s >= 0) ? s / 4 : -((-s + 3) / 4);
      checks++;
      if (int'(dout) != want) begin
        failures++;
        $display("FAIL: k=%0d got %0d want %0d", k, dout, want);
      end
      if (k > 2004) begin
        checks++;
        if (dout != 0) begin failures++; $display("FAIL: fs/2 not removed"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
