// odqpsk_modem: single-chip offset differential QPSK (ODQPSK) burst modem.
//
// Transmitter: tx_data bits, timed by tx_clock and framed by tx_burst, are
// differentially encoded (b_k = j a_k b_(k-1)), shaped by full raised
// cosine filters into I/Q baseband and scaled by two gain elements whose
// gain the power control unit sets from the external power measurement;
// the PCU also drives the coarse RF attenuator code.
// Receiver: the IF samples (from the receive A/D, or in loopback mode from
// the internal fs/4 up-converter fed by the transmitter) pass a
// programmable delay and the ALC's digital gain into a two-branch
// delay-and-multiply correlator with low-pass filters. The X branch (delay
// one bit plus a quarter carrier period) carries the data; the Y branch
// (quarter carrier period) is brought out as a test point. The clock
// recovery finds steep crossings of X, the decimator resamples X once per
// bit, and a 4-state Viterbi decoder delivers rx_data with a one-cycle
// rx_clock strobe per bit. The level measurement unit closes the ALC loop
// on the LPF output while a burst is received.
// Burst detector: the 8-bit RSSI is smoothed and qualified into rx_burst,
// which resets clock recovery and the Viterbi decoder at each burst start
// and gates the ALC measurement. In continuous mode (CTRL.burst_mode = 0)
// the receiver behaves as if rx_burst were always high.
// All parameters are programmed over the SPI monitor/control port.
//
// Everything runs on `clk`, the sample clock, at SPB = 8 samples per bit;
// tx_clock must have a period of SPB clk cycles. tx_* inputs are
// resynchronised (3 cycles). Block structure and signal flow follow the
// document's functional block diagram; clocking, widths and all the
// numeric choices listed in each block are this design's.
module odqpsk_modem
  import odqpsk_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // transmitter
  input  logic                    tx_data,
  input  logic                    tx_clock,
  input  logic                    tx_burst,
  output logic signed [IQ_W-1:0]  i_bus,
  output logic signed [IQ_W-1:0]  q_bus,
  input  logic [PWR_W-1:0]        pwr_meas,
  output logic [ATT_W-1:0]        attenuate,
  // receiver
  input  logic signed [IF_W-1:0]  if_in,
  input  logic [RSSI_W-1:0]       rssi,
  output logic                    rx_data,
  output logic                    rx_clock,
  output logic                    rx_burst,
  // monitor/control
  input  logic                    spi_sclk,
  input  logic                    spi_cs_n,
  input  logic                    spi_mosi,
  output logic                    spi_miso,
  // test points
  output logic signed [DEM_W-1:0] y_mon,
  output logic signed [DEM_W-1:0] x_mon,
  output logic                    clk_locked,
  output logic                    pcu_meas_valid,  // PCU is using the current pwr_meas sample
  output logic                    cr_extremum      // clock recovery accepted a crossing
);
  cfg_t  cfg;
  stat_t stat;

  // ---------------- transmitter ----------------
  logic tx_stb, tx_data_s, tx_burst_s;
  edge_sync u_sync_clk   (.clk, .rst_n, .d(tx_clock), .q(),           .rise(tx_stb));
  edge_sync u_sync_data  (.clk, .rst_n, .d(tx_data),  .q(tx_data_s),  .rise());
  edge_sync u_sync_burst (.clk, .rst_n, .d(tx_burst), .q(tx_burst_s), .rise());

  logic prbs_bit, enc_bit;
  prbs_gen u_prbs (.clk, .rst_n, .en(cfg.prbs_en), .stb(tx_stb), .dout(prbs_bit));
  assign enc_bit = cfg.prbs_en ? prbs_bit : tx_data_s;

  sym_phase_t sym;
  logic       sym_on, sym_stb;
  diff_encoder u_enc (.clk, .rst_n, .stb(tx_stb), .bit_in(enc_bit), .burst(tx_burst_s),
                      .sym, .sym_on, .sym_stb);

  logic signed [SHP_W-1:0] i_shp, q_shp;
  pulse_shaper u_shp (.clk, .rst_n, .sym_stb, .sym, .sym_on, .i_out(i_shp), .q_out(q_shp));

  logic [TXG_W-1:0] tx_gain;
  logic             pcu_limit;
  power_control u_pcu (.clk, .rst_n, .tx_burst(tx_burst_s), .pwr_meas,
                       .pwr_target(cfg.pwr_target), .gain(tx_gain), .attenuate,
                       .at_limit(pcu_limit), .meas_valid(pcu_meas_valid));

  gain_stage #(.IN_W(SHP_W), .G_W(TXG_W), .SHIFT(7), .OUT_W(IQ_W))
    u_gain_i (.clk, .rst_n, .din(i_shp), .gain(tx_gain), .dout(i_bus));
  gain_stage #(.IN_W(SHP_W), .G_W(TXG_W), .SHIFT(7), .OUT_W(IQ_W))
    u_gain_q (.clk, .rst_n, .din(q_shp), .gain(tx_gain), .dout(q_bus));

  // ---------------- loopback ----------------
  logic signed [IF_W-1:0] if_lb, if_sel;
  digital_upconv u_upc (.clk, .rst_n, .i_in(i_bus), .q_in(q_bus), .if_out(if_lb));
  assign if_sel = cfg.loopback ? if_lb : if_in;

  // ---------------- burst detector ----------------
  logic [RSSI_W-1:0] env;
  burst_filter u_bfilt (.clk, .rst_n, .rssi, .env);
  burst_control u_bctl (.clk, .rst_n, .env, .on_thr(cfg.bc_on_thr), .off_thr(cfg.bc_off_thr),
                        .on_cnt(cfg.bc_on_cnt), .off_cnt(cfg.bc_off_cnt),
                        .burst_len(cfg.burst_len), .rx_burst);

  logic burst_eff, burst_eff_d, burst_start;
  assign burst_eff = cfg.burst_mode ? rx_burst : 1'b1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) burst_eff_d <= 1'b0;
    else        burst_eff_d <= burst_eff;
  end
  assign burst_start = burst_eff & ~burst_eff_d;

  // ---------------- receiver data path ----------------
  logic [IF_W-1:0] if_dly;
  prog_delay #(.W(IF_W), .DEPTH(64))
    u_dly (.clk, .rst_n, .delay(cfg.rx_delay), .din(if_sel), .dout(if_dly));

  logic [RXG_W-1:0]       rx_gain;
  logic signed [IF_W-1:0] if_g;
  gain_stage #(.IN_W(IF_W), .G_W(RXG_W), .SHIFT(8), .OUT_W(IF_W))
    u_gain_rx (.clk, .rst_n, .din(signed'(if_dly)), .gain(rx_gain), .dout(if_g));

  logic signed [DEM_W-1:0] x_raw, y_raw, x_f, y_f;
  correlator #(.D(1)) u_corr (.clk, .rst_n, .if_in(if_g), .x_out(x_raw), .y_out(y_raw));
  lpf #(.W(DEM_W), .LEN_LOG2(2)) u_lpf_x (.clk, .rst_n, .din(x_raw), .dout(x_f));
  lpf #(.W(DEM_W), .LEN_LOG2(2)) u_lpf_y (.clk, .rst_n, .din(y_raw), .dout(y_f));
  assign x_mon = x_f;
  assign y_mon = y_f;

  logic alc_limit;
  level_measure u_lmu (.clk, .rst_n, .meas_en(burst_eff), .x(x_f), .target(cfg.alc_target),
                       .gain(rx_gain), .at_limit(alc_limit));

  logic       cr_stb;
  logic [3:0] cr_frac;
  clock_recovery #(.FRAC(4)) u_cr (.clk, .rst_n, .burst(burst_eff), .x(x_f),
                                   .slope_thr((DEM_W-1)'({cfg.slope_thr, 2'b00})),
                                   .clk_stb(cr_stb), .frac(cr_frac), .locked(clk_locked),
                                   .extremum(cr_extremum));

  logic signed [DEM_W-1:0] x_dec;
  logic                    x_dec_valid;
  decimator #(.FRAC(4)) u_dec (.clk, .rst_n, .x(x_f), .clk_stb(cr_stb), .frac(cr_frac),
                               .dout(x_dec), .dout_valid(x_dec_valid));

  viterbi_decoder #(.TB(16)) u_vit (.clk, .rst_n, .start(burst_start), .din(x_dec),
                                    .din_valid(x_dec_valid),
                                    .level((DEM_W-1)'({cfg.vit_level, 4'b0000})),
                                    .dout(rx_data), .dout_valid(rx_clock));

  // ---------------- monitor/control ----------------
  always_comb begin
    stat.attenuate  = attenuate;
    stat.tx_gain    = tx_gain;
    stat.rx_gain    = rx_gain;
    stat.rx_burst   = rx_burst;
    stat.clk_locked = clk_locked;
    stat.alc_limit  = alc_limit;
    stat.pcu_limit  = pcu_limit;
  end
  spi_regs u_spi (.clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso, .cfg, .stat);
endmodule
