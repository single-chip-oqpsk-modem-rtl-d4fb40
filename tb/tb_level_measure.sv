// tb_level_measure: checks the level measurement unit of the ALC.
//
// Random X samples with a programmable mean magnitude are applied. The
// testbench sums |X| over each 256-sample window, as the unit should,
// and checks the gain after every window: gain + (16*target - mean)/16,
// clamped to [16, 1023]. Samples with meas_en low must not count and
// must leave the gain unchanged. A closed-loop part models the
// correlator (X proportional to gain^2) and checks that the measured
// level converges to the target.
`timescale 1ns/1ps
module tb_level_measure;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic meas_en = 0;
  logic signed [DEM_W-1:0] x = 0;
  logic [7:0] target = 96;
  logic [RXG_W-1:0] gain;
  logic at_limit;
  level_measure dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sum = 0, cnt = 0, n_clamp = 0;
  bit closed_loop = 0;
  int amp = 500;
  always @(negedge clk) begin
    int a, g, want;
    if (closed_loop) a = int'(longint'(amp) * gain * gain / (256 * 256));
    else             a = amp;
    if (a > 30000) a = 30000;
    meas_en = ($urandom_range(0, 7) != 0);
    x = 16'($urandom_range(0, 1) ? a + $urandom_range(0, 40) - 20 : -a + $urandom_range(0, 40) - 20);
    g = int'(gain);
    @(posedge clk);
    #1;
    if (rst_n) begin
      if (meas_en) begin
        sum += (x < 0) ? -int'(x) : int'(x);
        cnt++;
        if (cnt == 256) begin
          want = g + ((int'(target) * 16 - sum / 256) >>> 4);
          if (want > 1023) begin want = 1023; n_clamp++; end
          if (want < 16)   begin want = 16;   n_clamp++; end
          check(int'(gain) == want, $sformatf("gain %0d want %0d", gain, want));
          sum = 0; cnt = 0;
        end else check(gain == RXG_W'(g), "gain holds inside a window");
      end else check(gain == RXG_W'(g), "gain holds while meas_en is low");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    amp = 3000;  repeat (256 * 40) @(posedge clk);    // too strong: gain falls to the floor
    amp = 50;    repeat (256 * 60) @(posedge clk);    // too weak: gain rises to the ceiling
    check(n_clamp > 0, "gain clamped at a limit");
    amp = 700;   closed_loop = 1;
    repeat (256 * 80) @(posedge clk);
    begin
      int lvl;
      lvl = int'(longint'(amp) * gain * gain / (256 * 256));
      check(lvl > 96 * 16 - 150 && lvl < 96 * 16 + 150, $sformatf("closed loop level %0d", lvl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
