// tb_prbs_gen: checks the PRBS-9 test pattern generator.
//
// A reference LFSR (x^9 + x^5 + 1, seed all ones) is stepped alongside;
// every output bit must match, the register must hold while disabled or
// without a strobe, and the sequence must repeat after exactly 511 bits
// with 256 ones per period.
`timescale 1ns/1ps
module tb_prbs_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, stb = 0, dout;
  prbs_gen dut (.*);

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

  initial begin
    bit r[9];
    bit seq[$];
    bit nb;
    int ones = 0;
    for (int i = 0; i < 9; i++) r[i] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1100; k++) begin
      en = (k % 7 != 3);
      stb = (k % 5 != 1);
      @(negedge clk);
      if (en && stb) begin
        // shift towards the output end; new bit = r[8] ^ r[4] (taps 9 and 5)
        nb = r[8] ^ r[4];
        for (int i = 8; i > 0; i--) r[i] = r[i - 1];
        r[0] = nb;
        seq.push_back(dout);
      end
      check(dout == r[8], $sformatf("bit %0d", k));
    end
    for (int i = 0; i < 511; i++) ones += seq[i];
    check(ones == 256, $sformatf("%0d ones per period", ones));
    for (int i = 0; i + 511 < seq.size(); i++) check(seq[i] == seq[i + 511], "period 511");
    for (int p = 1; p < 511; p++) begin
      bit same;
      same = 1;
      for (int i = 0; i < 100; i++) if (seq[i] != seq[i + p]) same = 0;
      if (same) begin check(0, $sformatf("shorter period %0d", p)); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
