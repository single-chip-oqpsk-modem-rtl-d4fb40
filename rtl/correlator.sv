// correlator: delay-and-multiply complex correlator of the demodulator.
//
// Two branches multiply the IF sample by a delayed copy of itself:
//   X(n) = -IF(n) * IF(n - D - SPB)   (delay D + T/2, T/2 = one bit)
//   Y(n) = -IF(n) * IF(n - D)         (delay D)
// After low-pass filtering, a product IF(n)*IF(n-d) keeps
// 0.5*Re{s(n) s*(n-d) exp(j*w*d)}, s being the complex envelope and w the
// IF carrier. D makes w*D a quarter turn (D = 1 sample for a carrier at a
// quarter of the sample rate), so X becomes the imaginary part of the
// phase step over one bit, Im{s(n) s*(n-SPB)}: positive for a_k = +1,
// negative for a_k = -1 (the binary X eye). Y measures the phase change
// over D alone, i.e. the instantaneous frequency (the three-level Y eye).
// The sign inversion makes X positive for a data bit 1. The two-branch
// structure with delays D+T/2 and D is the document's; D, the sign and the
// scaling (product / 8, saturated to DEM_W bits) are this design's.
// Latency: 1 cycle.
module correlator
  import odqpsk_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IF_W-1:0]  if_in,
  output logic signed [DEM_W-1:0] x_out,
  output logic signed [DEM_W-1:0] y_out
);
  localparam int unsigned LEN = D + SPB;
  localparam int unsigned P_W = 2 * IF_W + 1;

  logic signed [IF_W-1:0] dl [LEN];   // dl[i] = IF(n - 1 - i)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) dl[i] <= '0;
    end else begin
      dl[0] <= if_in;
      for (int i = 1; i < LEN; i++) dl[i] <= dl[i-1];
    end
  end

  function automatic logic signed [DEM_W-1:0] scale(input logic signed [P_W-1:0] p);
    logic signed [P_W-1:0] s;
    s = -(p >>> 3);
    if (s > P_W'((1 <<< (DEM_W - 1)) - 1)) return {1'b0, {(DEM_W-1){1'b1}}};
    if (s < -P_W'(1 <<< (DEM_W - 1)))      return {1'b1, {(DEM_W-1){1'b0}}};
    return s[DEM_W-1:0];
  endfunction

  logic signed [P_W-1:0] px, py;
  always_comb begin
    px = P_W'(if_in) * P_W'(dl[LEN-1]);
    py = P_W'(if_in) * P_W'(dl[D-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out <= '0;
      y_out <= '0;
    end else begin
      x_out <= scale(px);
      y_out <= scale(py);
    end
  end
endmodule
