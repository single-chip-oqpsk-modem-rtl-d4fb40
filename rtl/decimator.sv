// decimator: resampling and decimation of the demodulated waveform.
//
// Produces one X sample per bit at the instant chosen by the clock
// recovery. On `clk_stb` the current sample X(n) and the fractional phase
// are captured; in the next cycle X(n+1) is present and the output is the
// linear interpolation X(n) + frac * (X(n+1) - X(n)) / 2^FRAC, flagged by
// `dout_valid`. The document shows a resampler driven by the recovered
// clock and its error, followed by decimation; linear interpolation is
// this design's choice. Latency: 1 cycle after `clk_stb`.
module decimator
  import odqpsk_pkg::*;
#(
  parameter int unsigned FRAC = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DEM_W-1:0] x,
  input  logic                    clk_stb,
  input  logic [FRAC-1:0]         frac,
  output logic signed [DEM_W-1:0] dout,
  output logic                    dout_valid
);
  localparam int unsigned P_W = DEM_W + FRAC + 2;

  logic                    pend;
  logic signed [DEM_W-1:0] x0;
  logic [FRAC-1:0]         f0;
  logic signed [P_W-1:0]   interp;

  always_comb
    interp = P_W'(x0) + (((P_W'(x) - P_W'(x0)) * signed'(P_W'({1'b0, f0}))) >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      x0         <= '0;
      f0         <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      pend       <= clk_stb;
      dout_valid <= pend;
      if (clk_stb) begin
        x0 <= x;
        f0 <= frac;
      end
      if (pend) dout <= DEM_W'(interp);
    end
  end
endmodule
