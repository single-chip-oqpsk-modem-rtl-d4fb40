// tb_spi_regs: checks the SPI monitor/control register file.
//
// An SPI mode-0 master (sclk = clk/16) reads every configuration register
// after reset and compares it with the reset defaults, writes random
// values to all of them and checks both the cfg_t outputs and the
// read-back, checks that a read does not modify a register, that a frame
// aborted by raising cs_n early writes nothing, and reads the status
// registers against random monitor inputs.
`timescale 1ns/1ps
module tb_spi_regs;
  import odqpsk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  cfg_t cfg;
  stat_t stat;
  spi_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input bit wr, input logic [6:0] addr, input logic [7:0] wdata,
                      output logic [7:0] rdata, input int nbits = 16);
    logic [15:0] f;
    f = {wr, addr, wdata};
    rdata = '0;
    spi_cs_n = 0;
    repeat (8) @(posedge clk);
    for (int b = 15; b >= 16 - nbits; b--) begin
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

  localparam int NCFG = 11;
  logic [6:0] addrs [NCFG] = '{A_CTRL, A_PWR_TGT, A_ALC_TGT, A_VIT_LVL, A_SLOPE_THR, A_RX_DELAY,
                               A_BC_ON_THR, A_BC_OFF_THR, A_BC_ON_CNT, A_BC_OFF_CNT, A_BURST_LEN};
  logic [7:0] masks [NCFG] = '{8'h07, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h3F, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF};

  function automatic logic [7:0] cfg_field(input cfg_t c, input logic [6:0] a);
    case (a)
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
      default:      return 8'hxx;
    endcase
  endfunction

  initial begin
    logic [7:0] rd, vals [NCFG];
    stat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NCFG; i++) begin
      xfer(0, addrs[i], 8'h00, rd);
      check(rd == cfg_field(CFG_DEFAULT, addrs[i]), $sformatf("reset value of register %0h: %0h", addrs[i], rd));
    end
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < NCFG; i++) begin
        vals[i] = 8'($urandom) & masks[i];
        xfer(1, addrs[i], vals[i], rd);
        check(cfg_field(cfg, addrs[i]) == vals[i], $sformatf("cfg output of register %0h", addrs[i]));
      end
      for (int i = 0; i < NCFG; i++) begin
        xfer(0, addrs[i], 8'hA5, rd);
        check(rd == vals[i], $sformatf("read back register %0h: %0h want %0h", addrs[i], rd, vals[i]));
        check(cfg_field(cfg, addrs[i]) == vals[i], "a read leaves the register unchanged");
      end
    end
    // aborted write (cs_n raised after 12 bits)
    xfer(1, A_PWR_TGT, ~vals[1], rd, 12);
    check(cfg.pwr_target == vals[1], "aborted frame writes nothing");
    // status
    for (int r = 0; r < 5; r++) begin
      stat = stat_t'($urandom);
      xfer(0, A_ATTEN, 8'h00, rd);   check(rd == 8'(stat.attenuate), "attenuate status");
      xfer(0, A_TX_GAIN, 8'h00, rd); check(rd == stat.tx_gain, "tx gain status");
      xfer(0, A_RX_GAIN, 8'h00, rd); check(rd == stat.rx_gain[RXG_W-1:RXG_W-8], "rx gain status");
      xfer(0, A_STATUS, 8'h00, rd);
      check(rd == {4'b0, stat.pcu_limit, stat.alc_limit, stat.clk_locked, stat.rx_burst}, "status flags");
    end
    xfer(0, 7'h7F, 8'h00, rd);
    check(rd == 8'h00, "unmapped address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
