// level_measure: Level Measurement Unit (LMU) of the automatic level control.
//
// Keeps the demodulator output at a programmed level whatever the input
// amplitude. While `meas_en` is high (rx_burst in burst mode), |X| of the
// low-pass filter output is accumulated over 2^AVG_LOG2 samples. At the end
// of each window the mean is compared with `target` (in units of 16 LSBs of
// X) and the receive digital gain in front of the correlator is moved by
// (target - mean) / 2^LOOP_SHIFT, clamped to [GAIN_MIN, 2^RXG_W - 1]
// (256 = unity). Outside bursts the gain holds. `at_limit` flags a clamped
// gain. The document gives the loop (a level measurement feeding a
// digital gain back to the correlator input, measuring only under
// rx_burst); the mean-magnitude detector and the loop law are this
// design's. Timing: the gain changes one cycle after a window closes.
module level_measure
  import odqpsk_pkg::*;
#(
  parameter int unsigned AVG_LOG2   = 8,
  parameter int unsigned LOOP_SHIFT = 4,
  parameter int unsigned GAIN_MIN   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    meas_en,
  input  logic signed [DEM_W-1:0] x,
  input  logic [7:0]              target,
  output logic [RXG_W-1:0]        gain,
  output logic                    at_limit
);
  localparam int unsigned ACC_W = DEM_W + AVG_LOG2;
  localparam int unsigned E_W   = DEM_W + 3;

  logic [AVG_LOG2-1:0] n;
  logic [ACC_W-1:0]    acc;
  logic [DEM_W-1:0]    mag;
  logic [ACC_W-1:0]    acc_next;
  logic signed [E_W-1:0] err, g_new;

  always_comb begin
    mag      = x[DEM_W-1] ? DEM_W'(-x) : DEM_W'(x);
    acc_next = acc + ACC_W'(mag);
    err      = signed'(E_W'({target, 4'b0})) - signed'(E_W'(acc_next[ACC_W-1:AVG_LOG2]));
    g_new    = signed'(E_W'(gain)) + (err >>> LOOP_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n        <= '0;
      acc      <= '0;
      gain     <= RXG_W'(256);
      at_limit <= 1'b0;
    end else if (meas_en) begin
      n   <= n + 1'b1;
      acc <= acc_next;
      if (n == '1) begin
        acc <= '0;
        if (g_new > signed'(E_W'((1 << RXG_W) - 1))) begin
          gain     <= '1;
          at_limit <= 1'b1;
        end else if (g_new < signed'(E_W'(GAIN_MIN))) begin
          gain     <= RXG_W'(GAIN_MIN);
          at_limit <= 1'b1;
        end else begin
          gain     <= RXG_W'(g_new);
          at_limit <= 1'b0;
        end
      end
    end
  end
endmodule
