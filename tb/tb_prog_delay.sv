// tb_prog_delay: checks the programmable IF delay.
//
// For several delay settings (0, 1, 5, 63 and random ones) a random sample
// stream is applied and the output must equal the input delay + 1
// cycles earlier, compared against a history kept by the testbench.
`timescale 1ns/1ps
module tb_prog_delay;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] delay = 0;
  logic [9:0] din = 0, dout;
  prog_delay dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] hist[$];
  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      d = (s == 0) ? 0 : (s == 1) ? 1 : (s == 2) ? 5 : (s == 3) ? 63 : $urandom_range(0, 63);
      delay = 6'(d);
      hist.delete();
      for (int k = 0; k < 300; k++) begin
        din = 10'($urandom);
        hist.push_front(din);
        @(negedge clk);
        if (k > d + 1) begin
          checks++;
          if (dout != hist[d]) begin
            failures++;
            $display("FAIL: delay %0d sample %0d: got %0d want %0d", d, k, dout, hist[d]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
