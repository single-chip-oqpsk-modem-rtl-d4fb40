// tb_odqpsk_ber: bit error rate of the modem over a noisy IF channel.
//
// The modem runs in continuous mode, receiving on its external IF input.
// A model of the radio loop up-converts I_bus/Q_bus to the quarter-rate
// IF (I, -Q, -I, Q), adds white Gaussian noise (Box-Muller from $urandom)
// and quantises the sum to the 10-bit IF input. For several noise levels
// the test sends NBITS random bits and counts errors of
//   * the modem output rx_data (4-state Viterbi decoder), and
//   * a sign decision on the same decimated X samples (a hard slicer),
// after aligning each stream with the transmitted bits. The SNR is the
// ratio of the measured IF signal and noise powers over the whole sample
// band (there is no channel filter, so the in-band SNR is higher); it is
// reported, not compared with any external curve. The clock recovery
// slope threshold is raised to 170 (from the reset value 80) so that
// noise crossings do not pull the recovered clock.
// Checks: no Viterbi errors without noise; at every noise level the
// Viterbi decoder makes fewer errors than the slicer (which always loses
// the zero-level bits); the Viterbi error count does not rise as the
// noise falls; the lowest noise level gives a Viterbi BER below 2e-2.
// Observed: 0, 509, 153 and 50 Viterbi errors against 1448, 863, 910 and
// 968 slicer errors in 6000 bits at SNR 99, 12.5, 15.1 and 17.5 dB.
`timescale 1ns/1ps
module tb_odqpsk_ber;
  import odqpsk_pkg::*;

  localparam int NBITS  = 6000;   // bits counted per noise level
  localparam int SETTLE = 600;    // bits sent before counting starts
  localparam int NLEV   = 4;
  localparam real SIGMA [NLEV] = '{0.0, 16.0, 12.0, 9.0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_data = 0, tx_clock = 0, tx_burst = 0;
  logic signed [IQ_W-1:0] i_bus, q_bus;
  logic [PWR_W-1:0] pwr_meas;
  logic [ATT_W-1:0] attenuate;
  logic signed [IF_W-1:0] if_in;
  logic [RSSI_W-1:0] rssi;
  logic rx_data, rx_clock, rx_burst;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic signed [DEM_W-1:0] y_mon, x_mon;
  logic clk_locked, pcu_meas_valid, cr_extremum;

  odqpsk_modem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel and detector models ----------------
  localparam real PI = 3.14159265358979;
  real sigma = 0.0, sig_pow = 0.0, noise_pow = 0.0;
  int  n_pow = 0;
  bit  measure = 0;
  int  ch_n = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  always_ff @(posedge clk) begin
    int env, p, q;
    real v, nz, r;
    ch_n <= (ch_n + 1) % 4;
    v = (ch_n == 0) ? real'(i_bus) : (ch_n == 1) ? -real'(q_bus) :
        (ch_n == 2) ? -real'(i_bus) : real'(q_bus);
    v = v / 4.0;
    nz = sigma * gauss();
    if (measure) begin
      sig_pow   <= sig_pow + v * v;
      noise_pow <= noise_pow + nz * nz;
      n_pow     <= n_pow + 1;
    end
    r = v + nz;
    if (r > 511.0) q = 511;
    else if (r < -512.0) q = -512;
    else q = $rtoi(r + (r >= 0.0 ? 0.5 : -0.5));
    if_in <= IF_W'(q);
    env = (i_bus < 0 ? -int'(i_bus) : int'(i_bus)) + (q_bus < 0 ? -int'(q_bus) : int'(q_bus));
    rssi <= (env >> 2 > 255) ? 8'd255 : 8'(env >> 2);
    p = (env << 8) >> (int'(attenuate) + 3);
    pwr_meas <= (p > 255) ? 8'd255 : 8'(p);
  end

  // ---------------- SPI master (mode 0, sclk = clk/16) ----------------
  task automatic spi_wr(input logic [6:0] a, input logic [7:0] d);
    logic [15:0] f;
    f = {1'b1, a, d};
    spi_cs_n = 0;
    repeat (8) @(posedge clk);
    for (int b = 15; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (8) @(posedge clk);
      spi_sclk = 1;
      repeat (8) @(posedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(posedge clk);
    spi_cs_n = 1;
    repeat (8) @(posedge clk);
  endtask

  // ---------------- transmitter drive ----------------
  bit sent[$];
  task automatic send_bit(input bit b);
    @(negedge clk); tx_data = b; tx_clock = 0;
    repeat (SPB/2) @(negedge clk);
    tx_clock = 1;
    repeat (SPB/2 - 1) @(negedge clk);
  endtask

  // ---------------- receiver capture ----------------
  bit rx_vit[$], rx_hard[$];
  always @(posedge clk) begin
    if (rx_clock) rx_vit.push_back(rx_data);
    if (dut.x_dec_valid) rx_hard.push_back(dut.x_dec > 0);
  end

  // errors of `rx` against `tx` at the best offset (searched on a window)
  function automatic int count_errors(input bit tx[$], input bit rx[$], input int skip);
    int best, off, e;
    best = 1 << 30; off = 0;
    for (int o = -200; o < 60; o++) begin
      e = 0;
      for (int i = skip; i < skip + 300; i++)
        if (i + o < 0 || i + o >= rx.size() || tx[i] != rx[i + o]) e++;
      if (e < best) begin best = e; off = o; end
    end
    e = 0;
    for (int i = skip; i < tx.size() - 40; i++)
      if (i + off < 0 || i + off >= rx.size() || tx[i] != rx[i + off]) e++;
    return e;
  endfunction

  initial begin
    int ev [NLEV], eh [NLEV];
    real snr;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    spi_wr(A_CTRL, 8'h00);      // external IF, continuous mode
    spi_wr(A_SLOPE_THR, 8'd170); // stricter crossing qualification in noise
    tx_burst = 1;
    for (int l = 0; l < NLEV; l++) begin
      sigma = SIGMA[l];
      sent.delete(); rx_vit.delete(); rx_hard.delete();
      sig_pow = 0.0; noise_pow = 0.0; n_pow = 0;
      for (int i = 0; i < SETTLE + NBITS + 40; i++) begin
        bit b;
        b = 1'($urandom_range(0, 1));
        sent.push_back(b);
        measure = (i >= SETTLE);
        send_bit(b);
      end
      measure = 0;
      ev[l] = count_errors(sent, rx_vit, SETTLE);
      eh[l] = count_errors(sent, rx_hard, SETTLE);
      snr = (noise_pow > 0.0) ? 10.0 * $log10(sig_pow / noise_pow) : 99.0;
      $display("sigma %5.1f  SNR %5.1f dB  Viterbi errors %0d/%0d  slicer errors %0d/%0d",
               sigma, snr, ev[l], NBITS, eh[l], NBITS);
    end
    check(ev[0] == 0, "no Viterbi errors without noise");
    for (int l = 0; l < NLEV; l++)
      check(ev[l] < eh[l], $sformatf("Viterbi beats the slicer at noise level %0d", l));
    for (int l = 2; l < NLEV; l++)
      check(ev[l] <= ev[l-1], $sformatf("Viterbi errors do not rise as the noise falls (level %0d)", l));
    check(ev[NLEV-1] * 50 < NBITS, "Viterbi BER below 2e-2 at the lowest noise level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
