// tb_gain_stage: checks the digital gain element.
//
// Random signed samples and unsigned gains, including the extremes, go
// through the default configuration (12-bit sample, 8-bit gain, /128,
// 12-bit output); the result must equal floor(din*gain/128) saturated to
// the 12-bit range, one cycle later.
`timescale 1ns/1ps
module tb_gain_stage;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [11:0] din = 0;
  logic [7:0] gain = 0;
  logic signed [11:0] dout;
  gain_stage dut (.*);

  int checks = 0, failures = 0, n_sat = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, want;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      din  = (k < 4) ? ((k % 2) ? -12'sd2048 : 12'sd2047) : 12'($urandom);
      gain = (k < 4) ? ((k < 2) ? 8'd255 : 8'd0) : 8'($urandom);
      @(negedge clk);
      p = longint'(din) * longint'(gain);
      want = (p >= 0) ? p / 128 : -((-p + 127) / 128);   // floor division
      if (want > 2047)  begin want = 2047;  n_sat++; end
      if (want < -2048) begin want = -2048; n_sat++; end
      checks++;
      if (longint'(dout) != want) begin
        failures++;
        $display("FAIL: din=%0d gain=%0d dout=%0d want=%0d", din, gain, dout, want);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
