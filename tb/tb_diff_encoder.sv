// tb_diff_encoder: checks the differential encoder against b_k = j a_k b_(k-1).
//
// Random bits are applied with random strobe spacing and random burst
// gating. The reference multiplies complex numbers (kept as integer
// real/imaginary pairs) exactly as the formula says and compares the
// encoder's phase index (b = j^sym) after every strobe. It also checks
// that consecutive in-burst symbols alternate between the real and the
// imaginary axis and that the symbol is held outside bursts.
`timescale 1ns/1ps
module tb_diff_encoder;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0, bit_in = 0, burst = 0;
  sym_phase_t sym;
  logic sym_on, sym_stb;
  diff_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase index of a complex unit value
  function automatic int idx(input int re, input int im);
    if (re == 1) return 0;
    if (im == 1) return 1;
    if (re == -1) return 2;
    return 3;
  endfunction

  initial begin
    int bre = 1, bim = 0, nre, nim, a, prev_axis = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(negedge clk);
      stb = 1; bit_in = 1'($urandom_range(0, 1)); burst = ($urandom_range(0, 9) != 0);
      @(negedge clk);
      stb = 0;
      if (burst) begin
        a = bit_in ? 1 : -1;
        // b_k = j * a * b_(k-1): (j*a)*(re + j im) = -a*im + j*a*re
        nre = -a * bim; nim = a * bre;
        bre = nre; bim = nim;
      end
      check(sym_stb == 1'b1, "sym_stb follows stb");
      check(sym_on == burst, "sym_on follows burst");
      check(int'(sym) == idx(bre, bim), $sformatf("symbol %0d: got j^%0d want j^%0d", k, sym, idx(bre, bim)));
      if (burst) begin
        if (prev_axis >= 0) check((sym % 2) != prev_axis, "symbols alternate between axes");
        prev_axis = sym % 2;
      end
      @(negedge clk);
      check(sym_stb == 1'b0, "sym_stb is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
