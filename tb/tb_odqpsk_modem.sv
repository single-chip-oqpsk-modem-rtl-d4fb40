// tb_odqpsk_modem: end-to-end test of the modem at its default parameters.
//
// The transmitter is fed with bursts of random bits, each opened by a short
// preamble (1100 repeated). The RSSI and power-measurement inputs are
// driven by simple models of the external detectors computed from I_bus
// and Q_bus (envelope |I| + |Q|, scaled; the power measurement also
// follows the attenuator code at 6 dB per step), and the IF input by a
// model of the external radio loop (quarter-rate up-conversion with its
// own carrier phase). The test programs the registers over SPI and reads
// status back, then runs in turn: one long continuous-mode transmission;
// four bursts in burst mode over the internal loopback; one burst over the
// external IF input with the IF delayed by 5 samples; three bursts over
// a hard-limited external IF (limiter receiver, Viterbi level lowered);
// two bursts with a preamble of only three symbols; one burst of the
// PRBS-9 test pattern, checked against the generator recurrence; and
// bursts with and without the burst length limit. Every payload is
// compared with what was sent, after locating it in the received stream.
// It counts the mechanisms seen: loopback and burst mode switches, burst
// detections, clock recovery acquisitions, ALC and PCU updates, attenuator
// steps, Viterbi decisions on zero-level (alternating) samples, external
// IF input, receive delay, limiter receiver, short preamble, PRBS
// transmission and burst length cut-off,
// and fails for each that never happened.
`timescale 1ns/1ps
module tb_odqpsk_modem;
  import odqpsk_pkg::*;

  localparam int NBURST  = 4;
  localparam int PAYLOAD = 120;
  localparam int PRE     = 16;

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

  // ---------------- external models ----------------
  int env_iq;
  always_comb env_iq = (i_bus < 0 ? -int'(i_bus) : int'(i_bus)) + (q_bus < 0 ? -int'(q_bus) : int'(q_bus));
  // external RF loop: the same quarter-rate up-conversion as the internal
  // loopback (I, -Q, -I, Q), with its own free-running carrier phase
  // own carrier phase; with `limiter` set the IF is hard-limited to +-LIM
  // (limiter receiver)
  localparam int LIM = 200;
  int ext_n = 3;
  bit limiter = 0;
  always_ff @(posedge clk) begin
    int v;
    ext_n <= (ext_n + 1) % 4;
    v = (ext_n == 0) ? int'(i_bus) : (ext_n == 1) ? -int'(q_bus) :
        (ext_n == 2) ? -int'(i_bus) : int'(q_bus);
    if (limiter) if_in <= (v > 0) ? IF_W'(LIM) : (v < 0) ? IF_W'(-LIM) : '0;
    else         if_in <= IF_W'(v >>> 2);
  end
  always_ff @(posedge clk) begin
    int r, p;
    r = env_iq >> 2;
    rssi <= (r > 255) ? 8'd255 : 8'(r);
    p = (env_iq << 8) >> (int'(attenuate) + 3);
    pwr_meas <= (p > 255) ? 8'd255 : 8'(p);
  end

  // ---------------- SPI master ----------------
  task automatic spi_xfer(input bit wr, input logic [6:0] addr, input logic [7:0] wdata,
                          output logic [7:0] rdata);
    logic [15:0] f;
    f = {wr, addr, wdata};
    rdata = '0;
    spi_cs_n = 0;
    repeat (8) @(posedge clk);
    for (int b = 15; b >= 0; b--) begin
      spi_mosi = f[b];
      repeat (8) @(posedge clk);
      spi_sclk = 1;
      if (b < 8) rdata = {rdata[6:0], spi_miso};
      repeat (8) @(posedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(posedge clk);
    spi_cs_n = 1;
    repeat (8) @(posedge clk);
  endtask
  task automatic spi_wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    spi_xfer(1'b1, a, d, dummy);
  endtask
  task automatic spi_rd(input logic [6:0] a, output logic [7:0] d);
    spi_xfer(1'b0, a, 8'h00, d);
  endtask

  // ---------------- transmitter drive ----------------
  // tx_clock: period SPB cycles; tx_data changes at its falling edge.
  task automatic send_bit(input bit b);
    @(negedge clk); tx_data = b; tx_clock = 0;
    repeat (SPB/2) @(negedge clk);
    tx_clock = 1;
    repeat (SPB/2 - 1) @(negedge clk);
  endtask

  bit sent_bits[$];
  // Preamble, `skip` unrecorded random bits, `n` recorded random bits, tail, guard.
  task automatic send_burst(input int skip, input int n, input int pre = PRE);
    tx_burst = 1;
    for (int i = 0; i < pre; i++) send_bit(((i / 2) % 2) == 0);
    for (int i = 0; i < skip + n; i++) begin
      bit b;
      b = 1'($urandom_range(0, 1));
      // force some alternating runs, which demodulate to zero level
      if (i % 20 >= 10 && i % 20 < 16) b = (i % 2);
      if (i >= skip) sent_bits.push_back(b);
      send_bit(b);
    end
    for (int i = 0; i < 24; i++) send_bit(((i / 2) % 2) == 0);  // tail
    tx_burst = 0;
    for (int i = 0; i < 40; i++) send_bit(0);                   // guard
  endtask

  // ---------------- receiver capture ----------------
  bit rx_bits[$];
  int n_rx_clock = 0;
  always @(posedge clk) if (rx_clock) begin
    rx_bits.push_back(rx_data);
    n_rx_clock++;
  end

  // ---------------- mechanism counters ----------------
  int n_burst_det = 0, n_lock = 0, n_extremum = 0, n_pcu_valid = 0, n_att_step = 0;
  int n_alc_change = 0, n_zero_level = 0;
  int burst_run = 0, max_burst_run = 0;
  logic rx_burst_d = 0, locked_d = 0;
  logic [ATT_W-1:0] att_d = 8;
  logic [RXG_W-1:0] rxg_d = 256;
  always @(posedge clk) begin
    rx_burst_d <= rx_burst;
    locked_d   <= clk_locked;
    att_d      <= attenuate;
    rxg_d      <= dut.rx_gain;
    if (rx_burst && !rx_burst_d) n_burst_det++;
    burst_run = rx_burst ? burst_run + 1 : 0;
    if (burst_run > max_burst_run) max_burst_run = burst_run;
    if (clk_locked && !locked_d) n_lock++;
    if (cr_extremum) n_extremum++;
    if (pcu_meas_valid) n_pcu_valid++;
    if (attenuate != att_d) n_att_step++;
    if (dut.rx_gain != rxg_d) n_alc_change++;
    if (dut.x_dec_valid && (dut.x_dec < 400) && (dut.x_dec > -400)) n_zero_level++;
  end

  // Locate `sent` in `rx` (allowing an offset) and count bit errors.
  function automatic int best_errors(input bit sent[$], input bit rx[$], output int off);
    int best, e;
    best = sent.size() + 1;
    off = -1;
    for (int o = 0; o + sent.size() <= rx.size(); o++) begin
      e = 0;
      for (int i = 0; i < sent.size(); i++) if (sent[i] != rx[o + i]) e++;
      if (e < best) begin best = e; off = o; end
    end
    return best;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rd;
    int off, errs, n_loop_modes = 0, n_burst_modes = 0, n_ext_if = 0, n_delay = 0;
    int n_prbs = 0, n_cut = 0, prbs_errs, n_limiter = 0, n_short_pre = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // register access
    spi_rd(A_ALC_TGT, rd);
    check(rd == CFG_DEFAULT.alc_target, "SPI reads the reset value of ALC_TARGET");
    spi_wr(A_CTRL, 8'h01);          // loopback, continuous mode
    spi_rd(A_CTRL, rd);
    check(rd == 8'h01, "SPI write/read of CTRL");
    n_loop_modes++;

    // phase 1: continuous mode, one long transmission; ALC and PCU settle
    // during its first part and the rest is checked
    sent_bits.delete(); rx_bits.delete();
    send_burst(6 * PAYLOAD, PAYLOAD);
    errs = best_errors(sent_bits, rx_bits, off);
    $display("continuous: %0d rx bits, %0d errors at offset %0d", rx_bits.size(), errs, off);
    check(errs == 0, "continuous-mode payload received without errors");

    // phase 2: burst mode
    spi_wr(A_CTRL, 8'h03);
    n_burst_modes++;
    for (int b = 0; b < NBURST; b++) begin
      sent_bits.delete(); rx_bits.delete();
      send_burst(0, PAYLOAD);
      errs = best_errors(sent_bits, rx_bits, off);
      $display("burst %0d: %0d rx bits, %0d errors at offset %0d", b, rx_bits.size(), errs, off);
      check(errs == 0, $sformatf("burst %0d payload received without errors", b));
    end

    spi_rd(A_STATUS, rd);
    check(rd[1] == 1'b1, "clock recovery reports lock after a burst");
    spi_rd(A_ATTEN, rd);
    check(rd == 8'(attenuate), "SPI reads the attenuator code");

    // phase 3: external IF input instead of the loopback, with the IF
    // delayed by 5 samples against the RSSI envelope
    spi_wr(A_CTRL, 8'h02);
    spi_wr(A_RX_DELAY, 8'd5);
    sent_bits.delete(); rx_bits.delete();
    send_burst(0, PAYLOAD);
    errs = best_errors(sent_bits, rx_bits, off);
    $display("external IF, delay 5: %0d rx bits, %0d errors at offset %0d", rx_bits.size(), errs, off);
    check(errs == 0, "external IF burst received without errors");
    n_ext_if++;
    n_delay++;
    spi_wr(A_RX_DELAY, 8'd0);

    // phase 3b: limiter receiver, the external IF hard-limited to two levels.
    // Limiting flattens the X eye (its mean magnitude comes closer to its
    // peak), so the Viterbi reference level is programmed lower. The first
    // burst lets the ALC settle to the new signal and is not checked.
    spi_wr(A_VIT_LVL, 8'd128);
    limiter = 1;
    for (int b = 0; b < 3; b++) begin
      sent_bits.delete(); rx_bits.delete();
      send_burst(0, PAYLOAD);
      errs = best_errors(sent_bits, rx_bits, off);
      $display("limiter burst %0d: %0d rx bits, %0d errors at offset %0d", b, rx_bits.size(), errs, off);
      if (b > 0) check(errs == 0, "limiter receiver burst received without errors");
    end
    limiter = 0;
    n_limiter++;
    spi_wr(A_VIT_LVL, CFG_DEFAULT.vit_level);
    repeat (3) send_burst(0, PAYLOAD);   // ALC settles back to the linear signal

    // phase 3c: preamble of three symbols (6 bits) over the loopback
    spi_wr(A_CTRL, 8'h03);
    for (int b = 0; b < 2; b++) begin
      sent_bits.delete(); rx_bits.delete();
      send_burst(0, PAYLOAD, 6);
      errs = best_errors(sent_bits, rx_bits, off);
      $display("3-symbol preamble burst %0d: %0d rx bits, %0d errors at offset %0d", b, rx_bits.size(), errs, off);
      check(errs == 0, "burst with a 3-symbol preamble received without errors");
    end
    n_short_pre++;

    // phase 4: PRBS-9 test pattern in place of tx_data. The received bits
    // must obey the generator recurrence r[n] = r[n-9] xor r[n-5].
    spi_wr(A_CTRL, 8'h07);
    sent_bits.delete(); rx_bits.delete();
    send_burst(0, PAYLOAD);
    prbs_errs = 0;
    for (int i = 24; i < PAYLOAD; i++)
      if (rx_bits[i] != (rx_bits[i-9] ^ rx_bits[i-5])) prbs_errs++;
    $display("PRBS: %0d rx bits, %0d recurrence violations", rx_bits.size(), prbs_errs);
    check(rx_bits.size() >= PAYLOAD && prbs_errs == 0, "PRBS pattern received");
    check(rx_bits.sum() with (int'(item)) > PAYLOAD / 4, "PRBS pattern is not constant");
    n_prbs++;

    // phase 5: burst length limit of 1 x 64 samples
    spi_wr(A_CTRL, 8'h03);
    spi_wr(A_BURST_LEN, 8'd1);
    max_burst_run = 0;
    send_burst(0, 32);
    $display("burst length limit: longest rx_burst %0d samples", max_burst_run);
    check(max_burst_run > 0 && max_burst_run <= 8 * SPB, "burst length limit cuts rx_burst");
    if (max_burst_run == 8 * SPB) n_cut++;
    spi_wr(A_BURST_LEN, 8'd0);
    max_burst_run = 0;
    send_burst(0, 32);
    check(max_burst_run > 8 * SPB, "no cut with the limit off");

    $display("mechanisms: bursts=%0d locks=%0d extrema=%0d pcu_valid=%0d att_steps=%0d alc_changes=%0d zero_level=%0d",
             n_burst_det, n_lock, n_extremum, n_pcu_valid, n_att_step, n_alc_change, n_zero_level);
    check(n_burst_det >= NBURST, "burst detector fired for every burst");
    check(n_lock >= NBURST, "clock recovery re-acquired on every burst");
    check(n_pcu_valid > 0, "PCU used valid power measurements");
    check(n_att_step > 0, "PCU stepped the attenuator");
    check(n_alc_change > 0, "ALC adjusted the receive gain");
    check(n_zero_level > 0, "Viterbi decoded zero-level samples");
    check(n_loop_modes > 0 && n_burst_modes > 0, "mode switches exercised");
    $display("mechanisms: external_if=%0d rx_delay=%0d limiter=%0d short_preamble=%0d prbs=%0d burst_len_cut=%0d",
             n_ext_if, n_delay, n_limiter, n_short_pre, n_prbs, n_cut);
    check(n_ext_if > 0 && n_delay > 0 && n_prbs > 0 && n_cut > 0, "IF input, delay, PRBS and cut-off exercised");
    check(n_limiter > 0 && n_short_pre > 0, "limiter receiver and short preamble exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
