// tb_burst_control: checks the receive burst control state machine.
//
// The smoothed envelope is driven with: a spike shorter than on_cnt (no
// burst), a real burst (rx_burst must rise exactly on the on_cnt-th sample
// above on_thr and fall on the off_cnt-th sample below off_thr), a dip
// inside a burst shorter than off_cnt (no drop), values between the two
// thresholds (hysteresis: no change), and, with burst_len programmed, an
// over-long burst that must be cut after burst_len*64 samples and may not
// restart until the envelope has dropped.
`timescale 1ns/1ps
module tb_burst_control;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] env = 0;
  logic [7:0] on_thr = 40, off_thr = 20, on_cnt = 4, off_cnt = 16, burst_len = 0;
  logic rx_burst;
  burst_control dut (.*);

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

  // apply `n` samples of value v; return the index (1-based) of the sample
  // after which rx_burst changed, or 0
  task automatic apply(input int v, input int n, output int changed_at);
    logic prev_b;
    changed_at = 0;
    for (int i = 1; i <= n; i++) begin
      prev_b = rx_burst;
      env = 8'(v);
      @(negedge clk);
      if (rx_burst != prev_b && changed_at == 0) changed_at = i;
    end
  endtask

  initial begin
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apply(0, 20, c);
    apply(100, 3, c);  check(c == 0 && !rx_burst, "short spike ignored");
    apply(0, 20, c);
    apply(100, 50, c); check(c == 4 && rx_burst, $sformatf("burst starts on sample %0d (want 4)", c));
    apply(5, 10, c);   check(c == 0 && rx_burst, "short dip ignored");
    apply(30, 40, c);  check(c == 0 && rx_burst, "between thresholds: burst holds");
    apply(5, 40, c);   check(c == 16 && !rx_burst, $sformatf("burst ends on sample %0d (want 16)", c));
    apply(30, 40, c);  check(c == 0 && !rx_burst, "between thresholds: idle holds");
    // burst length limit: 2 * 64 samples
    burst_len = 2;
    apply(100, 4, c);  check(c == 4, "limited burst starts");
    apply(100, 200, c); check(c == 2 * 8 * SPB && !rx_burst, $sformatf("burst cut after %0d more samples", c));
    apply(100, 50, c); check(c == 0 && !rx_burst, "no restart while the envelope stays high");
    apply(5, 16, c);
    apply(100, 10, c); check(c == 4 && rx_burst, "restart after the envelope dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
