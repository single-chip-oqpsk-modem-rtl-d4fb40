// burst_filter: Receive Burst Filter, the smoothing stage of the burst detector.
//
// Smooths the 8-bit RSSI envelope with a first-order recursive low-pass
// filter, y += (rssi - y) / 2^K, kept with FR extra fractional bits so
// that small steps are not lost. It removes the ripple of the envelope
// detector while following the rise and fall of a burst within a few
// times 2^K samples. The document gives the stage's purpose (capturing the
// analogue features of the envelope); the filter is this design's choice.
// Latency: 1 cycle; time constant 2^K samples.
module burst_filter
  import odqpsk_pkg::*;
#(
  parameter int unsigned K  = 3,
  parameter int unsigned FR = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RSSI_W-1:0] rssi,
  output logic [RSSI_W-1:0] env
);
  localparam int unsigned Y_W = RSSI_W + FR;
  logic [Y_W-1:0]        y;
  logic signed [Y_W+1:0] delta;

  always_comb delta = signed'((Y_W+2)'({rssi, {FR{1'b0}}})) - signed'((Y_W+2)'(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= Y_W'(signed'((Y_W+2)'(y)) + (delta >>> K));
  end

  assign env = y[Y_W-1:FR];
endmodule
