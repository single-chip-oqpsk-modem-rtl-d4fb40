// odqpsk_pkg: types and constants shared by the ODQPSK modem.
//
// The modem runs in a single clock domain: one clock edge per sample, SPB
// samples per transmitted bit (bit period Tb = T/2, T being the period of a
// symbol on one rail of the offset QPSK signal). The widths below are this
// design's choices; only the 8-bit RSSI input is fixed by the block diagram.
//
// RC_COEF is the full raised cosine pulse (rolloff 1) applied to the
// complex symbol stream b_k:
//   h(x) = sinc(x) * cos(pi*x) / (1 - 4*x^2),  x = (j - 32) / (2*SPB) in units of T,
// for j = 0..63 (8 bit periods, i.e. +-2T), scaled so that h(0) = 256 and
// rounded to the nearest integer (h(+-T/2) = 128 exactly).
//
// cfg_t holds the programmable system parameters written over SPI;
// stat_t holds the monitor points read back over SPI.
package odqpsk_pkg;

  localparam int unsigned SPB    = 8;    // samples per bit
  localparam int unsigned NTAP   = 8;    // pulse span in bits
  localparam int unsigned SHP_W  = 12;   // pulse shaper output width
  localparam int unsigned IQ_W   = 12;   // I_bus / Q_bus width
  localparam int unsigned IF_W   = 10;   // receive IF sample width
  localparam int unsigned DEM_W  = 16;   // correlator / LPF output width
  localparam int unsigned RSSI_W = 8;    // RSSI sample width
  localparam int unsigned PWR_W  = 8;    // transmit power measurement width
  localparam int unsigned TXG_W  = 8;    // PCU fine gain, 128 = unity
  localparam int unsigned ATT_W  = 4;    // coarse attenuation code, 6 dB per step
  localparam int unsigned RXG_W  = 10;   // ALC digital gain, 256 = unity

  typedef logic signed [9:0] coef_t;
  localparam coef_t RC_COEF [NTAP*SPB] = '{
      0,   1,   1,   2,   2,   2,   2,   1,   0,  -1,  -3,  -5,  -6,  -7,  -6,  -4,
      0,   7,  16,  28,  43,  61,  82, 104, 128, 152, 176, 198, 217, 234, 246, 253,
    256, 253, 246, 234, 217, 198, 176, 152, 128, 104,  82,  61,  43,  28,  16,   7,
      0,  -4,  -6,  -7,  -6,  -5,  -3,  -1,   0,   1,   2,   2,   2,   2,   1,   1};

  // Complex symbol b_k = j^phase: 0 -> 1, 1 -> j, 2 -> -1, 3 -> -j.
  typedef logic [1:0] sym_phase_t;

  typedef struct packed {
    logic       loopback;     // 1: receiver fed from the internal up-converter
    logic       burst_mode;   // 1: burst operation, 0: continuous
    logic       prbs_en;      // 1: transmit the internal test pattern
    logic [7:0] pwr_target;   // desired transmit power level
    logic [7:0] alc_target;   // demodulator output level, times 16
    logic [7:0] vit_level;    // Viterbi reference level, times 16
    logic [7:0] slope_thr;    // clock recovery slope threshold, times 4
    logic [5:0] rx_delay;     // IF delay in samples
    logic [7:0] bc_on_thr;    // burst start threshold on the smoothed RSSI
    logic [7:0] bc_off_thr;   // burst end threshold on the smoothed RSSI
    logic [7:0] bc_on_cnt;    // samples above bc_on_thr to declare a burst
    logic [7:0] bc_off_cnt;   // samples below bc_off_thr to end a burst
    logic [7:0] burst_len;    // maximum burst length in units of 8 bits, 0 = none
  } cfg_t;

  typedef struct packed {
    logic [ATT_W-1:0] attenuate;
    logic [TXG_W-1:0] tx_gain;
    logic [RXG_W-1:0] rx_gain;
    logic             rx_burst;
    logic             clk_locked;
    logic             alc_limit;
    logic             pcu_limit;
  } stat_t;

  // Register addresses of the monitor/control interface.
  localparam logic [6:0] A_CTRL      = 7'h00;
  localparam logic [6:0] A_PWR_TGT   = 7'h01;
  localparam logic [6:0] A_ALC_TGT   = 7'h02;
  localparam logic [6:0] A_VIT_LVL   = 7'h03;
  localparam logic [6:0] A_SLOPE_THR = 7'h04;
  localparam logic [6:0] A_RX_DELAY  = 7'h05;
  localparam logic [6:0] A_BC_ON_THR = 7'h06;
  localparam logic [6:0] A_BC_OFF_THR= 7'h07;
  localparam logic [6:0] A_BC_ON_CNT = 7'h08;
  localparam logic [6:0] A_BC_OFF_CNT= 7'h09;
  localparam logic [6:0] A_BURST_LEN = 7'h0A;
  localparam logic [6:0] A_ATTEN     = 7'h10;
  localparam logic [6:0] A_TX_GAIN   = 7'h11;
  localparam logic [6:0] A_RX_GAIN   = 7'h12;
  localparam logic [6:0] A_STATUS    = 7'h13;

  localparam cfg_t CFG_DEFAULT = '{
    loopback:   1'b0,
    burst_mode: 1'b1,
    prbs_en:    1'b0,
    pwr_target: 8'd128,
    alc_target: 8'd96,
    vit_level:  8'd192,
    slope_thr:  8'd80,
    rx_delay:   6'd0,
    bc_on_thr:  8'd40,
    bc_off_thr: 8'd20,
    bc_on_cnt:  8'd4,
    bc_off_cnt: 8'd16,
    burst_len:  8'd0
  };

  // Saturate a wide signed value to W bits.
  function automatic logic signed [31:0] sat_signed(input logic signed [31:0] v, input int unsigned w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
