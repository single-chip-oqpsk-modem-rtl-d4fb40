// power_control: transmit Power Control Unit (PCU).
//
// Closes the transmit power loop: an external detector measures the
// envelope of the transmitted RF signal and an A/D converter feeds the
// samples back on `pwr_meas`. Only samples taken inside a burst are used:
// after tx_burst rises the first SETTLE samples (the ramp of the shaped
// burst) are skipped and every sample after that until tx_burst falls is
// valid, so guard intervals with zero power never enter the average.
// 2^AVG_LOG2 valid samples are averaged; the error against the desired
// level then updates the fine digital gain of I_bus and Q_bus
// (gain += error / 2^LOOP_SHIFT, 128 = unity). When the fine gain leaves
// [GAIN_LO, GAIN_HI] the coarse attenuation code is stepped by one (taken
// as 6 dB per step) and the fine gain is doubled or halved to keep the
// output level continuous. At the end of the range the gain is clamped
// and `at_limit` is raised.
// The document gives the two outputs and the rule on valid measurements;
// the averaging, the loop law, the step size of the attenuator and the
// reset values (gain 128, attenuation 8) are this design's.
//
// Timing: gain and attenuation change one cycle after the last sample of
// an averaging window.
module power_control
  import odqpsk_pkg::*;
#(
  parameter int unsigned SETTLE     = 64,
  parameter int unsigned AVG_LOG2   = 8,
  parameter int unsigned LOOP_SHIFT = 2,
  parameter int unsigned GAIN_LO    = 64,
  parameter int unsigned GAIN_HI    = 192
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_burst,
  input  logic [PWR_W-1:0] pwr_meas,
  input  logic [7:0]       pwr_target,
  output logic [TXG_W-1:0] gain,
  output logic [ATT_W-1:0] attenuate,
  output logic             at_limit,
  output logic             meas_valid   // sample currently used by the loop
);
  localparam int unsigned ACC_W = PWR_W + AVG_LOG2;

  logic [$clog2(SETTLE+1)-1:0] settle_cnt;
  logic [AVG_LOG2-1:0]         n;
  logic [ACC_W-1:0]            acc;

  assign meas_valid = tx_burst && (settle_cnt == ($clog2(SETTLE+1))'(SETTLE));

  logic [ACC_W-1:0]   acc_next;
  logic [PWR_W-1:0]   avg;
  logic signed [11:0] err, step, g_new;
  always_comb begin
    acc_next = acc + ACC_W'(pwr_meas);
    avg      = acc_next[ACC_W-1:AVG_LOG2];
    err      = 12'(signed'({1'b0, pwr_target})) - 12'(signed'({1'b0, avg}));
    step     = err >>> LOOP_SHIFT;
    g_new    = 12'(signed'({1'b0, gain})) + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      settle_cnt <= '0;
      n          <= '0;
      acc        <= '0;
      gain       <= TXG_W'(128);
      attenuate  <= ATT_W'(8);
      at_limit   <= 1'b0;
    end else begin
      if (!tx_burst) begin
        settle_cnt <= '0;
        n          <= '0;
        acc        <= '0;
      end else if (!meas_valid) begin
        settle_cnt <= settle_cnt + 1'b1;
      end else begin
        n   <= n + 1'b1;
        acc <= acc_next;
        if (n == '1) begin
          acc      <= '0;
          at_limit <= 1'b0;
          if (g_new > 12'sd255 || g_new >= signed'(12'(GAIN_HI))) begin
            if (attenuate != '0) begin
              attenuate <= attenuate - 1'b1;
              gain      <= TXG_W'(g_new >>> 1);
            end else begin
              gain     <= (g_new > 12'sd255) ? TXG_W'(255) : TXG_W'(g_new);
              at_limit <= (g_new > 12'sd255);
            end
          end else if (g_new < signed'(12'(GAIN_LO))) begin
            if (attenuate != '1) begin
              attenuate <= attenuate + 1'b1;
              gain      <= (g_new < 12'sd1) ? TXG_W'(2) : TXG_W'(g_new <<< 1);
            end else begin
              gain     <= (g_new < 12'sd1) ? TXG_W'(1) : TXG_W'(g_new);
              at_limit <= (g_new < 12'sd1);
            end
          end else begin
            gain <= TXG_W'(g_new);
          end
        end
      end
    end
  end
endmodule
