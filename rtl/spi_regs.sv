// spi_regs: monitor/control SPI slave and register file.
//
// Gives an external microcontroller access to the programmable system
// parameters (cfg_t) and to the monitor points (stat_t). SPI mode 0,
// 16-bit frames, most significant bit first, framed by cs_n low:
//   bit 15     1 = write, 0 = read
//   bits 14:8  register address (see the A_* constants in odqpsk_pkg)
//   bits 7:0   write data; on a read, the slave drives the register on
//              spi_miso during these eight clocks.
// The SPI pins are resynchronised to the sample clock, which must run at
// least eight times faster than spi_sclk. Data are taken on rising sclk
// edges, MISO changes after falling edges. A write takes effect when the
// 16th bit arrives. Reading an address that holds no register returns 0.
// The document names the SPI monitor/control interface and lists what it
// programs (burst length, decision thresholds, burst recovery features);
// the frame format and register map are this design's.
module spi_regs
  import odqpsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  spi_sclk,
  input  logic  spi_cs_n,
  input  logic  spi_mosi,
  output logic  spi_miso,
  output cfg_t  cfg,
  input  stat_t stat
);
  logic [2:0] sclk_s;
  logic [1:0] cs_s;
  logic [1:0] mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  logic sclk_rise, sclk_fall, active;
  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign active    = ~cs_s[1];

  logic [3:0]  nbits;
  logic [14:0] shreg;   // bits received so far
  logic [7:0]  txreg;

  function automatic logic [7:0] read_reg(input logic [6:0] a, input cfg_t c, input stat_t s);
    unique case (a)
      A_CTRL:       return {5'b0, c.prbs_en, c.burst_mode, c.loopback};
      A_PWR_TGT:    return c.pwr_target;
      A_ALC_TGT:    return c.alc_target;
      A_VIT_LVL:    return c.vit_level;
      A_SLOPE_THR:  return c.slope_thr;
      A_RX_DELAY:   return {2'b0, c.rx_delay};
      A_BC_ON_THR:  return c.bc_on_thr;
      A_BC_OFF_THR: return c.bc_off_thr;
      A_BC_ON_CNT:  return c.bc_on_cnt;
      A_BC_OFF_CNT: return c.bc_off_cnt;
      A_BURST_LEN:  return c.burst_len;
      A_ATTEN:      return 8'(s.attenuate);
      A_TX_GAIN:    return s.tx_gain;
      A_RX_GAIN:    return s.rx_gain[RXG_W-1:RXG_W-8];
      A_STATUS:     return {4'b0, s.pcu_limit, s.alc_limit, s.clk_locked, s.rx_burst};
      default:      return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits    <= '0;
      shreg    <= '0;
      txreg    <= '0;
      spi_miso <= 1'b0;
      cfg      <= CFG_DEFAULT;
    end else if (!active) begin
      nbits    <= '0;
      spi_miso <= 1'b0;
    end else begin
      if (sclk_rise) begin
        nbits <= nbits + 1'b1;
        shreg <= {shreg[13:0], mosi_s[1]};
        if (nbits == 4'd7)
          txreg <= read_reg({shreg[5:0], mosi_s[1]}, cfg, stat);
        if (nbits == 4'd15 && shreg[14]) begin
          unique case (shreg[13:7])
            A_CTRL:       {cfg.prbs_en, cfg.burst_mode, cfg.loopback} <= {shreg[1:0], mosi_s[1]};
            A_PWR_TGT:    cfg.pwr_target <= {shreg[6:0], mosi_s[1]};
            A_ALC_TGT:    cfg.alc_target <= {shreg[6:0], mosi_s[1]};
            A_VIT_LVL:    cfg.vit_level  <= {shreg[6:0], mosi_s[1]};
            A_SLOPE_THR:  cfg.slope_thr  <= {shreg[6:0], mosi_s[1]};
            A_RX_DELAY:   cfg.rx_delay   <= {shreg[4:0], mosi_s[1]};
            A_BC_ON_THR:  cfg.bc_on_thr  <= {shreg[6:0], mosi_s[1]};
            A_BC_OFF_THR: cfg.bc_off_thr <= {shreg[6:0], mosi_s[1]};
            A_BC_ON_CNT:  cfg.bc_on_cnt  <= {shreg[6:0], mosi_s[1]};
            A_BC_OFF_CNT: cfg.bc_off_cnt <= {shreg[6:0], mosi_s[1]};
            A_BURST_LEN:  cfg.burst_len  <= {shreg[6:0], mosi_s[1]};
            default: ;
          endcase
        end
      end
      if (sclk_fall) begin
        if (nbits >= 4'd8) begin
          spi_miso <= txreg[7];
          txreg    <= {txreg[6:0], 1'b0};
        end
      end
    end
  end
endmodule
