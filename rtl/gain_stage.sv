// gain_stage: digital gain element.
//
// Multiplies a signed sample by an unsigned gain, divides by 2^SHIFT with an
// arithmetic shift and saturates to OUT_W bits. With the defaults a gain
// of 128 is unity. The modem uses it three times: the two transmit gain
// elements on I_bus and Q_bus (gain from the power control unit) and the
// receive gain in front of the correlator (gain from the level
// measurement unit). The document gives the function (a gain feeding each
// bus); the fixed-point format is this design's. Latency: 1 cycle.
module gain_stage #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned G_W   = 8,
  parameter int unsigned SHIFT = 7,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic        [G_W-1:0]   gain,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned P_W = IN_W + G_W + 1;
  localparam logic signed [P_W-1:0] MAXV = P_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [P_W-1:0] MINV = P_W'(-(64'sd1 <<< (OUT_W - 1)));

  logic signed [P_W-1:0] prod, scaled;
  always_comb begin
    prod   = P_W'(din) * $signed({1'b0, gain});
    scaled = prod >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             dout <= '0;
    else if (scaled > MAXV) dout <= MAXV[OUT_W-1:0];
    else if (scaled < MINV) dout <= MINV[OUT_W-1:0];
    else                    dout <= scaled[OUT_W-1:0];
  end
endmodule
