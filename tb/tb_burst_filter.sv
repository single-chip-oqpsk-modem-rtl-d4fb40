// tb_burst_filter: checks the RSSI smoothing filter.
//
// The reference runs y += (16*rssi - y) >> 3 (arithmetic, floor) on a
// 12-bit state and outputs y / 16. Inputs are steps (0 -> 200 -> 30 ->
// 255 -> 0) with random ripple. The output must match every cycle, and
// the step response must be smooth: no single-cycle jump larger than an
// eighth of the step plus one.
`timescale 1ns/1ps
module tb_burst_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] rssi = 0, env;
  burst_filter dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y = 0, d, prev = 0, lvl;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      lvl = (k < 200) ? 0 : (k < 900) ? 200 : (k < 1500) ? 30 : (k < 2200) ? 255 : 0;
      if (k % 3 == 0 && lvl > 10 && lvl < 240) lvl += $urandom_range(0, 10) - 5;
      rssi = 8'(lvl);
      d = rssi * 16 - y;
      y = y + ((d >= 0) ? d / 8 : -((-d + 7) / 8));
      @(negedge clk);
      checks++;
      if (int'(env) != y / 16) begin
        failures++;
        $display("FAIL: k=%0d env=%0d want %0d", k, env, y / 16);
      end
      checks++;
      if (int'(env) - prev > 33 || prev - int'(env) > 33) begin
        failures++;
        $display("FAIL: jump from %0d to %0d", prev, env);
      end
      prev = int'(env);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
