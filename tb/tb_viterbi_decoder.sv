// tb_viterbi_decoder: checks the 4-state Viterbi soft decision decoder.
//
// Random data with frequent alternating runs is turned into decimated X
// samples with the decoder's channel model: x_k = 0 when a_(k-1) and
// a_(k+1) both differ from a_k, else +-A, plus uniform noise of up to
// A/4. The decoded stream must equal the data with a lag of TB - 1 bits
// (no errors). The test also counts the bits that a plain sign decision
// would get wrong (those near zero level) to show that the sequence
// decision is what recovers them, restarts the decoder mid-stream with
// `start`, and checks that output begins again only after TB new samples.
`timescale 1ns/1ps
module tb_viterbi_decoder;
  import odqpsk_pkg::*;
  localparam int TB = 16;
  localparam int A  = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, din_valid = 0;
  logic signed [DEM_W-1:0] din = 0;
  logic [DEM_W-2:0] level = 15'(A);
  logic dout, dout_valid;
  viterbi_decoder #(.TB(TB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a[$];
  task automatic gen(input int n);
    a.delete();
    for (int k = 0; k < n + 2; k++)
      if (k % 23 >= 8 && k % 23 < 15 && k > 0) a.push_back(-a[k - 1]);
      else a.push_back($urandom_range(0, 1) ? 1 : -1);
  endtask

  int n_slicer_wrong = 0;
  task automatic run(input int n);
    int mu, xv, outs, k_out;
    outs = 0;
    for (int k = 1; k <= n; k++) begin
      mu = (a[k - 1] != a[k] && a[k + 1] != a[k]) ? 0 : A * a[k];
      xv = mu + $urandom_range(0, A / 2) - A / 4;
      if ((xv > 0) != (a[k] > 0)) n_slicer_wrong++;
      @(negedge clk);
      din = 16'(xv); din_valid = 1;
      @(negedge clk);
      din_valid = 0;
      if (k <= TB) check(!dout_valid, "no output before the survivors are full");
      if (dout_valid) begin
        // output given with sample k is a_(k - TB + 1)
        k_out = k - TB + 1;
        if (k_out >= 4) check(dout == (a[k_out] > 0), $sformatf("bit %0d: got %0d want %0d", k_out, dout, a[k_out] > 0));
        outs++;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(outs == n - TB, $sformatf("%0d outputs for %0d inputs", outs, n));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen(1500);
    run(1500);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    gen(800);
    run(800);
    $display("bits a sign decision gets wrong: %0d", n_slicer_wrong);
    check(n_slicer_wrong > 50, "the test includes zero-level bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
