// tb_digital_upconv: checks the loopback up-converter.
//
// Random I/Q samples are applied; the reference computes
// I*cos(pi*n/2) - Q*sin(pi*n/2) with real arithmetic, divides by 4
// (floor) and saturates to 10 bits, and the output sample of each cycle
// is compared with it.
`timescale 1ns/1ps
module tb_digital_upconv;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [IQ_W-1:0] i_in = 0, q_in = 0;
  logic signed [IF_W-1:0] if_out;
  digital_upconv dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, want;
    real v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      i_in = (k % 500 == 7) ? 12'sd2047 : 12'($signed(12'($urandom)) >>> 1);
      q_in = 12'($signed(12'($urandom)) >>> 1);
      v = real'(i_in) * $cos(3.14159265358979 * n / 2.0) - real'(q_in) * $sin(3.14159265358979 * n / 2.0);
      want = $rtoi($floor(v / 4.0 + 0.001));
      if (want > 511) want = 511;
      if (want < -512) want = -512;
      @(negedge clk);
      n++;
      checks++;
      if (int'(if_out) != want) begin
        failures++;
        $display("FAIL: n=%0d I=%0d Q=%0d got %0d want %0d", n - 1, i_in, q_in, if_out, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
