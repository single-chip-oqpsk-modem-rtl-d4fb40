// pulse_shaper: full raised cosine (rolloff 1) I/Q pulse shaping filters.
//
// The complex symbol stream b_k (one symbol per bit period, alternating
// between the real and imaginary axis) is filtered by a raised cosine pulse
// whose rail symbol period is two bit periods, so the I rail carries the
// real symbols and the Q rail the imaginary ones half a symbol later: an
// offset QPSK signal. The filter is polyphase: a shift register holds the
// last NTAP symbols and, at output phase m (0..SPB-1 samples into the bit),
// I = sum_i Re(b_(k-i)) * h[i*SPB + m], Q likewise with Im. Each symbol
// component is -1, 0 or +1, so every tap is an add, a subtract or nothing.
// Symbols outside a burst enter as zero, so each burst ramps up and down
// along the pulse tails instead of switching abruptly (burst shaping).
// Pulse shape and rolloff follow the document; the span of 8 bit periods,
// the coefficient scale (h(0) = 256) and the widths are this design's.
//
// Timing: a new symbol is taken on `sym_stb`; the output is registered and
// changes every clock cycle. SPB clock cycles per bit are expected; if the
// next strobe is late the last phase is held.
module pulse_shaper
  import odqpsk_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sym_stb,
  input  sym_phase_t               sym,
  input  logic                     sym_on,
  output logic signed [SHP_W-1:0]  i_out,
  output logic signed [SHP_W-1:0]  q_out
);
  typedef struct packed {
    logic       on;
    sym_phase_t ph;
  } tap_t;

  tap_t                   taps [NTAP];
  logic [$clog2(SPB)-1:0] m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAP; i++) taps[i] <= '0;
      m <= '0;
    end else if (sym_stb) begin
      taps[0] <= '{on: sym_on, ph: sym};
      for (int i = 1; i < NTAP; i++) taps[i] <= taps[i-1];
      m <= '0;
    end else if (m != $clog2(SPB)'(SPB - 1)) begin
      m <= m + 1'b1;
    end
  end

  logic signed [SHP_W-1:0] i_sum, q_sum;
  always_comb begin
    i_sum = '0;
    q_sum = '0;
    for (int i = 0; i < NTAP; i++) begin
      if (taps[i].on) begin
        unique case (taps[i].ph)
          2'd0: i_sum = i_sum + SHP_W'(RC_COEF[i*SPB + int'(m)]);
          2'd2: i_sum = i_sum - SHP_W'(RC_COEF[i*SPB + int'(m)]);
          2'd1: q_sum = q_sum + SHP_W'(RC_COEF[i*SPB + int'(m)]);
          2'd3: q_sum = q_sum - SHP_W'(RC_COEF[i*SPB + int'(m)]);
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= i_sum;
      q_out <= q_sum;
    end
  end
endmodule
