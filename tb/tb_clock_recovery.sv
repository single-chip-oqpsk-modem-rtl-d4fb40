// tb_clock_recovery: checks burst-mode clock recovery.
//
// Each burst is a synthetic demodulated waveform: random levels +-A held
// at eye centres c_k = n0 + k*SPB and joined by raised-cosine transitions
// (so crossings lie halfway between centres), with a fractional offset
// n0 that differs per burst, including offsets near the bit boundary.
// Every burst opens with the preamble 1100 11... . The testbench checks:
//  * lock within three symbols (six bits) of the burst start;
//  * after lock, each strobe's sampling instant (strobe sample plus
//    frac/16) lies within one sample of an eye centre;
//  * strobes come exactly every SPB samples;
//  * a new burst resets the lock and re-acquires a different phase;
//  * shallow crossings (below the slope threshold) are not accepted.
`timescale 1ns/1ps
module tb_clock_recovery;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic burst = 0;
  logic signed [DEM_W-1:0] x = 0;
  logic [DEM_W-2:0] slope_thr = 15'd320;
  logic clk_stb, locked, extremum;
  logic [3:0] frac;
  clock_recovery dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;
  real n0;
  int  cur_n = -1;          // sample index (from the burst start) of the value on x
  int  last_stb = -1;
  bit  in_burst = 0;
  int  n_stb = 0, n_lock = 0;
  always @(posedge clk) begin
    real tau, d;
    if (in_burst && clk_stb) begin
      tau = real'(cur_n) + real'(frac) / 16.0;
      d = tau - n0;
      d = d - SPB * $floor(d / SPB + 0.5);
      check(d <= 1.0 && d >= -1.0, $sformatf("strobe at %f is %f samples from an eye centre", tau, d));
      if (last_stb >= 0) check(cur_n - last_stb == SPB, $sformatf("strobe spacing %0d", cur_n - last_stb));
      last_stb = cur_n;
      n_stb++;
    end
  end

  task automatic run_burst(input real off, input int nbits, input int amp, input bit expect_lock = 1);
    int lev[$];
    int first_lock;
    real u, v;
    n0 = off;
    lev.delete();
    for (int k = 0; k < nbits + 2; k++)
      lev.push_back(k < 8 ? (((k / 2) % 2) == 0 ? amp : -amp) : ($urandom_range(0, 1) ? amp : -amp));
    first_lock = -1;
    last_stb = -1;
    @(negedge clk);
    burst = 1; in_burst = 1;
    for (int n = 0; n < nbits * SPB; n++) begin
      // position between centres c_k and c_(k+1)
      u = (real'(n) - n0) / SPB;
      if (u < 0) v = lev[0];
      else begin
        int k;
        real f;
        k = $rtoi($floor(u));
        f = u - k;
        v = lev[k] * (1.0 + $cos(PI * f)) / 2.0 + lev[k + 1] * (1.0 - $cos(PI * f)) / 2.0;
      end
      x = 16'($rtoi(v));
      cur_n = n;
      @(negedge clk);
      if (locked && first_lock < 0) first_lock = n;
    end
    if (expect_lock)
      check(first_lock >= 0 && first_lock <= 6 * SPB, $sformatf("locked after %0d samples", first_lock));
    else
      check(first_lock < 0, "no lock on a waveform without steep crossings");
    if (first_lock >= 0) n_lock++;
    burst = 0; in_burst = 0;
    x = 0;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    int n_ext;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    run_burst(2.25, 80, 3000);
    run_burst(5.5, 80, 3000);
    run_burst(7.8, 80, 3000);
    run_burst(0.1, 80, 2000);
    run_burst(3.6, 80, 3000);
    check(n_lock == 5, "every burst acquired");
    check(n_stb > 300, "strobes produced");
    // a small waveform whose crossings are too shallow must not be accepted
    n_ext = 0;
    fork
      run_burst(2.0, 20, 300, 1'b0);
      begin
        repeat (20 * SPB) begin @(posedge clk); if (extremum) n_ext++; end
      end
    join
    check(n_ext == 0, "shallow crossings rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
