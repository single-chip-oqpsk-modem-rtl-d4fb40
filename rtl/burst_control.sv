// burst_control: Receive Burst Control, the second stage of the burst detector.
//
// Turns the smoothed RSSI envelope into the burst detect signal rx_burst.
// A burst starts when the envelope has stayed above `on_thr` for `on_cnt`
// consecutive samples and ends when it has stayed below `off_thr` for
// `off_cnt` samples; the two thresholds give hysteresis and the counts
// reject short spikes and dips, which keeps the jitter of the detect edge
// low. The frame structure enters through `burst_len`: when non-zero,
// a burst is closed after burst_len * 8 bits even if the envelope stays
// high (a following burst with no guard gap), and the detector then waits
// for the envelope to drop before it can start again.
// The document gives the stage's purpose and the programmability of the
// burst length; thresholds, counts and the state machine are this
// design's. Timing: rx_burst is registered; it rises on the on_cnt-th
// sample above threshold.
module burst_control
  import odqpsk_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RSSI_W-1:0] env,
  input  logic [7:0]        on_thr,
  input  logic [7:0]        off_thr,
  input  logic [7:0]        on_cnt,
  input  logic [7:0]        off_cnt,
  input  logic [7:0]        burst_len,
  output logic              rx_burst
);
  typedef enum logic [1:0] {IDLE, ACTIVE, WAIT_LOW} state_t;
  localparam int unsigned LEN_W = 8 + $clog2(8 * SPB);

  state_t          state;
  logic [7:0]      run;
  logic [LEN_W-1:0] len;
  logic            above, below, len_done;

  always_comb begin
    above    = env > RSSI_W'(on_thr);
    below    = env < RSSI_W'(off_thr);
    len_done = (burst_len != '0) && (len == LEN_W'({burst_len, {$clog2(8 * SPB){1'b0}}}) - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      run      <= '0;
      len      <= '0;
      rx_burst <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          run <= above ? run + 1'b1 : '0;
          if (above && run + 1'b1 >= on_cnt) begin
            state    <= ACTIVE;
            rx_burst <= 1'b1;
            run      <= '0;
            len      <= '0;
          end
        end
        ACTIVE: begin
          len <= len + 1'b1;
          run <= below ? run + 1'b1 : '0;
          if (below && run + 1'b1 >= off_cnt) begin
            state    <= IDLE;
            rx_burst <= 1'b0;
            run      <= '0;
          end else if (len_done) begin
            state    <= WAIT_LOW;
            rx_burst <= 1'b0;
            run      <= '0;
          end
        end
        WAIT_LOW: begin
          run <= below ? run + 1'b1 : '0;
          if (below && run + 1'b1 >= off_cnt) begin
            state <= IDLE;
            run   <= '0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
