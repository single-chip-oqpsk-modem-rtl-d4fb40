// tb_power_control: checks the transmit power control unit.
//
// The testbench closes the loop with a model of the external detector:
// measured power = level * gain / 128 * 2^(8 - attenuate), saturated to
// 8 bits, where `level` is the un-scaled envelope. It checks that
//  * no measurement is used outside bursts or in the first SETTLE samples
//    of each burst, and every later in-burst sample is used;
//  * after each window of 256 used samples the gain moves by exactly
//    (target - mean) / 4, computed here from the samples that were fed;
//  * the attenuator steps (and the fine gain is rescaled) when the needed
//    gain is out of range, in both directions, and the loop then settles
//    within a few LSBs of the target.
`timescale 1ns/1ps
module tb_power_control;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tx_burst = 0;
  logic [PWR_W-1:0] pwr_meas = 0;
  logic [7:0] pwr_target = 128;
  logic [TXG_W-1:0] gain;
  logic [ATT_W-1:0] attenuate;
  logic at_limit, meas_valid;
  power_control dut (.*);

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

  int level = 100;
  always_comb begin
    int p;
    p = level * int'(gain) / 128;
    p = (int'(attenuate) <= 8) ? p << (8 - int'(attenuate)) : p >> (int'(attenuate) - 8);
    pwr_meas = (p > 255) ? 8'd255 : 8'(p);
  end

  // reference: the window average and the expected next gain
  int sum = 0, cnt = 0, since_burst = 0, n_windows = 0, n_att_up = 0, n_att_down = 0;
  int exp_gain, exp_att, g_new;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!tx_burst) begin
        check(!meas_valid, "no measurement outside bursts");
        since_burst = 0;
        sum = 0; cnt = 0;
      end else begin
        check(meas_valid == (since_burst >= 64), "measurements skip the burst ramp");
        if (since_burst < 64) since_burst++;
        else begin
          sum += int'(pwr_meas);
          cnt++;
          if (cnt == 256) begin
            g_new = int'(gain) + ((int'(pwr_target) - sum / 256) >>> 2);
            exp_att = int'(attenuate);
            if (g_new > 255 || g_new >= 192) begin
              if (attenuate != 0) begin exp_att--; exp_gain = g_new >>> 1; n_att_down++; end
              else exp_gain = (g_new > 255) ? 255 : g_new;
            end else if (g_new < 64) begin
              if (attenuate != 15) begin exp_att++; exp_gain = (g_new < 1) ? 2 : g_new * 2; n_att_up++; end
              else exp_gain = (g_new < 1) ? 1 : g_new;
            end else exp_gain = g_new;
            @(negedge clk);
            check(int'(gain) == exp_gain && int'(attenuate) == exp_att,
                  $sformatf("window %0d: gain %0d att %0d, want %0d %0d", n_windows, gain, attenuate, exp_gain, exp_att));
            n_windows++;
            sum = 0; cnt = 0;
          end
        end
      end
    end
  end

  task automatic burst(input int len);
    @(negedge clk) tx_burst = 1;
    repeat (len) @(negedge clk);
    tx_burst = 0;
    repeat (50) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    level = 100;  pwr_target = 128;
    for (int b = 0; b < 12; b++) burst(64 + 256 * 3 + 17);
    check(pwr_meas >= 120 && pwr_meas <= 136, $sformatf("settled near target: %0d", pwr_meas));
    level = 6;                          // weak signal: needs less attenuation
    for (int b = 0; b < 12; b++) burst(64 + 256 * 3 + 17);
    level = 200;                        // strong signal: needs more attenuation
    for (int b = 0; b < 16; b++) burst(64 + 256 * 3 + 17);
    check(pwr_meas >= 120 && pwr_meas <= 136, $sformatf("settled near target again: %0d", pwr_meas));
    check(n_att_down > 0, "attenuation reduced");
    check(n_att_up > 0, "attenuation increased");
    $display("windows=%0d att_down=%0d att_up=%0d", n_windows, n_att_down, n_att_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
