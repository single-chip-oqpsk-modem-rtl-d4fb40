// tb_correlator: checks the two-branch delay-and-multiply correlator.
//
// A random IF stream is applied; the reference keeps its own history and
// computes X = -(IF(n) * IF(n-9)) / 8 and Y = -(IF(n) * IF(n-1)) / 8
// (floor, saturated to 16 bits), i.e. delays D + T/2 = 1 + 8 and D = 1
// samples. A second part feeds a clean fs/4 carrier whose phase ramps by
// +-90 degrees over each bit and checks the sign of X (summed over two
// samples, which cancels the term at twice the carrier): positive for a
// +90 degree step over one bit, negative for -90 degrees.
`timescale 1ns/1ps
module tb_correlator;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [IF_W-1:0] if_in = 0;
  logic signed [DEM_W-1:0] x_out, y_out;
  correlator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_prod(input int a, input int b);
    int p, q;
    p = a * b;
    q = (p >= 0) ? p / 8 : -((-p + 7) / 8);   // floor(p / 8)
    q = -q;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  localparam real PI = 3.14159265358979;
  int hist[$];
  initial begin
    real ph, step, phi;
    int n, xsum;
    int n_pos = 0, n_neg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin if_in = 0; hist.push_front(0); @(negedge clk); end
    for (int k = 0; k < 3000; k++) begin
      if_in = (k == 100) ? -10'sd512 : 10'($urandom);
      hist.push_front(int'(if_in));
      @(negedge clk);
      check(int'(x_out) == ref_prod(hist[0], hist[SPB + 1]), $sformatf("X at %0d", k));
      check(int'(y_out) == ref_prod(hist[0], hist[1]), $sformatf("Y at %0d", k));
    end
    // constant-envelope signal whose phase steps by +-90 degrees each bit
    ph = 0.0;
    for (int b = 0; b < 40; b++) begin
      step = (b % 3 == 0) ? -PI / 2 : PI / 2;
      for (int m = 0; m < SPB; m++) begin
        n = b * SPB + m;
        // linear phase ramp over the bit
        phi = ph + step * real'(m + 1) / real'(SPB);
        if_in = 10'($rtoi(200.0 * $cos(PI / 2.0 * n + phi)));
        @(negedge clk);
        // at the end of the bit X reflects this bit's phase step
        // the sum of two successive products cancels the term at twice the carrier
        if (m == SPB - 2) xsum = int'(x_out);
        if (b > 1 && m == SPB - 1) begin
          xsum += int'(x_out);
          if (step > 0) begin check(xsum > 0, "X > 0 for a +90 degree step"); n_pos++; end
          else          begin check(xsum < 0, "X < 0 for a -90 degree step"); n_neg++; end
        end
      end
      ph = ph + step;
    end
    check(n_pos > 0 && n_neg > 0, "both step directions tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
