// diff_encoder: differential encoder of the offset DQPSK transmitter.
//
// Implements b_k = j * a_k * b_(k-1) with a_k in {-1,+1} and b_k in
// {1, j, -1, -j}. b_k is kept as a 2-bit phase index p (b_k = j^p), so the
// rule becomes p_k = p_(k-1) + 1 for a_k = +1 (data bit 1) and p_(k-1) - 1
// for a_k = -1 (data bit 0), modulo 4. Consecutive symbols therefore
// alternate between the real and the imaginary axis, which is what makes
// the result an offset QPSK signal. The encoding rule is the document's;
// the bit mapping (1 -> +1), holding the phase between bursts and the reset
// value p = 0 are this design's choices.
//
// Timing: on a cycle with `stb` high the bit on `bit_in` is encoded; `sym`,
// `sym_on` (tx burst active) and `sym_stb` are valid one cycle later.
module diff_encoder
  import odqpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stb,      // one pulse per bit period
  input  logic       bit_in,   // 1 -> a_k = +1, 0 -> a_k = -1
  input  logic       burst,    // transmit burst active
  output sym_phase_t sym,      // b_k = j^sym
  output logic       sym_on,   // symbol belongs to a burst (else transmit zero)
  output logic       sym_stb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym     <= '0;
      sym_on  <= 1'b0;
      sym_stb <= 1'b0;
    end else begin
      sym_stb <= stb;
      if (stb) begin
        sym_on <= burst;
        if (burst) sym <= bit_in ? sym + 2'd1 : sym - 2'd1;
      end
    end
  end
endmodule
