// tb_decimator: checks the resampler/decimator.
//
// A random X stream is applied with strobes at random spacing (at least
// two cycles) and random fractional phases. For each strobe the output,
// one cycle later, must equal X(n) + floor((X(n+1) - X(n)) * frac / 16),
// and exactly one dout_valid pulse must follow each strobe.
`timescale 1ns/1ps
module tb_decimator;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [DEM_W-1:0] x = 0, dout;
  logic clk_stb = 0, dout_valid;
  logic [3:0] frac = 0;
  decimator dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x0, x1, f, d, want, n_valid = 0, n_stb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      x = 16'($signed(16'($urandom)) >>> 1);
      clk_stb = 1; frac = 4'($urandom);
      x0 = int'(x); f = int'(frac);
      @(negedge clk);
      n_stb++;
      clk_stb = 0;
      x = 16'($signed(16'($urandom)) >>> 1);
      x1 = int'(x);
      @(negedge clk);
      d = (x1 - x0) * f;
      want = x0 + ((d >= 0) ? d / 16 : -((-d + 15) / 16));
      checks++;
      if (!dout_valid || int'(dout) != want) begin
        failures++;
        $display("FAIL: x0=%0d x1=%0d f=%0d got %0d/%0d want %0d", x0, x1, f, dout, dout_valid, want);
      end
      if (dout_valid) n_valid++;
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        checks++;
        if (dout_valid) begin failures++; $display("FAIL: extra dout_valid"); end
      end
    end
    checks++;
    if (n_valid != n_stb) begin failures++; $display("FAIL: %0d outputs for %0d strobes", n_valid, n_stb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
