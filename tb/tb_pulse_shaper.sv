// tb_pulse_shaper: checks the raised cosine I/Q pulse shaping filters.
//
// The reference evaluates the rolloff-1 raised cosine pulse
// h(x) = sinc(x) cos(pi x) / (1 - 4x^2) directly with real arithmetic
// (x in rail symbol periods, two bit periods) and superposes one pulse
// per in-burst symbol, real symbols on I and imaginary ones on Q, every
// pulse centred four bit periods after its symbol enters. Each output
// sample must agree within 8 LSBs (rounding of the integer coefficients).
// It also checks: zero output with no burst, the peak of an isolated
// symbol (256 at the centre, 128 one bit off centre), and the ramp: a
// burst that starts from silence rises through intermediate values.
`timescale 1ns/1ps
module tb_pulse_shaper;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sym_stb = 0, sym_on = 0;
  sym_phase_t sym = 0;
  logic signed [SHP_W-1:0] i_out, q_out;
  pulse_shaper dut (.*);

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

  localparam real PI = 3.14159265358979;
  function automatic real h(input real x);
    if (x == 0.0) return 1.0;
    if (x == 0.5 || x == -0.5) return 0.5;
    return ($sin(PI * x) / (PI * x)) * $cos(PI * x) / (1.0 - 4.0 * x * x);
  endfunction

  // symbols entered so far: value (re, im), cycle of their strobe
  int sre[$], sim_[$], st[$];
  int cyc = 0;
  bit monitor_on = 0;

  // Expected output at cycle c: the output register shows phase
  // m = c - strobe - 2 of each symbol's pulse.
  task automatic expect_at(input int c, output real ei, output real eq);
    int d;
    real x;
    ei = 0.0; eq = 0.0;
    for (int i = 0; i < st.size(); i++) begin
      d = c - 2 - st[i];
      if (d >= 0 && d < NTAP * SPB) begin
        x = real'(d - int'(NTAP * SPB / 2)) / real'(2 * SPB);
        ei += sre[i] * 256.0 * h(x);
        eq += sim_[i] * 256.0 * h(x);
      end
    end
  endtask

  int peak_i = 0;
  bit track_peak = 0;
  always @(negedge clk) begin
    real ei, eq;
    cyc++;
    if (track_peak && i_out > peak_i) peak_i = i_out;
    if (monitor_on) begin
      expect_at(cyc, ei, eq);
      check((real'(i_out) - ei) < 8.0 && (ei - real'(i_out)) < 8.0,
            $sformatf("I at cycle %0d: got %0d want %f", cyc, i_out, ei));
      check((real'(q_out) - eq) < 8.0 && (eq - real'(q_out)) < 8.0,
            $sformatf("Q at cycle %0d: got %0d want %f", cyc, q_out, eq));
    end
  end

  // one strobe every SPB cycles
  task automatic push(input bit on, input sym_phase_t p);
    @(posedge clk);
    #1 sym_stb = 1; sym_on = on; sym = p;
    sre.push_back(!on ? 0 : (p == 0) ? 1 : (p == 2) ? -1 : 0);
    sim_.push_back(!on ? 0 : (p == 1) ? 1 : (p == 3) ? -1 : 0);
    st.push_back(cyc + 1);
    @(posedge clk);
    #1 sym_stb = 0;
    repeat (SPB - 2) @(posedge clk);
  endtask

  initial begin
    sym_phase_t p = 0;
    int ramp_vals = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    monitor_on = 1;
    // silence: output must be zero
    for (int k = 0; k < 10; k++) push(1'b0, 2'd0);
    check(i_out == 0 && q_out == 0, "no output outside a burst");
    // isolated symbol b = 1: pulse peak 256 at its centre, 128 one bit either side
    track_peak = 1;
    push(1'b1, 2'd0);
    for (int k = 0; k < 9; k++) push(1'b0, 2'd0);
    track_peak = 0;
    check(peak_i == 256, $sformatf("isolated pulse peak %0d", peak_i));
    // random burst of differentially encoded symbols
    for (int k = 0; k < 300; k++) begin
      p = $urandom_range(0, 1) ? p + 2'd1 : p - 2'd1;
      push(1'b1, p);
      if (k < 6 && i_out != 0 && i_out > -200 && i_out < 200) ramp_vals++;
    end
    check(ramp_vals > 0, "burst start ramps up");
    for (int k = 0; k < 10; k++) push(1'b0, 2'd0);
    check(i_out == 0 && q_out == 0, "burst end ramps down to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
